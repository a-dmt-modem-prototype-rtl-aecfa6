// fft_r4: in-place (I)FFT built around a single radix-4 butterfly engine.
//
// The modem computes its 2048-point IFFT (transmitter) and FFT (receiver)
// with one radix-4 butterfly processing engine in 16-bit fixed point,
// scaling the intermediate results by a 12-bit Scale_Factor and returning
// one output sample per cycle.  The internal organisation below is this
// design's own:
//
//   LOAD    N input samples are written into one working memory, in natural
//           order.  While loading, in_req is high and in_index counts the
//           sample wanted next; the producer answers, after any fixed
//           latency, with in_valid and the sample's own index in_addr.
//   COMPUTE decimation-in-frequency, floor(LOG2N/2) radix-4 stages and, when
//           LOG2N is odd, a final radix-2 stage done as two radix-2
//           butterflies per cycle.  One butterfly (4 reads, 4 writes) per
//           cycle, so N/4 cycles per stage.  Twiddles are 18-bit with 16
//           fraction bits (1.0 is exact), sized for an 18x18 multiplier.
//   UNLOAD  N results leave in natural order, one per cycle, with out_index;
//           the memory is read at the mixed-radix digit-reversed address.
//
// Scaling: stage s shifts its results right by scale_factor[2s+1:2s]
// (0..3 bits, rounded half to even), then saturates to DW bits.  scale_factor is latched
// at start.  INVERSE=1 gives the inverse transform without the 1/N factor,
// computed as conj(FFT(conj(x))).
//
// Timing: start (one cycle, while idle) -> N+latency cycles LOAD ->
// NSTAGES*N/4 cycles COMPUTE -> N cycles UNLOAD; done pulses with the last
// output sample.  For N=2048: 3072 compute cycles.
// An assertion checks that the producer never returns more samples than
// were requested; it is disabled during reset, which lint reports as a
// synchronous use of rst_n next to its asynchronous one.
module fft_r4 #(
  parameter int unsigned LOG2N   = 11,
  parameter int unsigned DW      = 16,
  parameter int unsigned IDX_W   = 12,
  parameter int unsigned SF_W    = 12,
  parameter bit          INVERSE = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [SF_W-1:0]      scale_factor,
  // load side
  output logic                 in_req,
  output logic [IDX_W-1:0]     in_index,
  input  logic                 in_valid,
  input  logic [IDX_W-1:0]     in_addr,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  // result side
  output logic                 out_valid,
  output logic [IDX_W-1:0]     out_index,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned N       = 1 << LOG2N;
  localparam int unsigned NR4     = LOG2N / 2;          // radix-4 stages
  localparam bit          HAS_R2  = (LOG2N % 2) == 1;   // final radix-2 stage
  localparam int unsigned NSTAGES = NR4 + (HAS_R2 ? 1 : 0);
  localparam int unsigned BW      = LOG2N - 2;          // butterfly counter
  localparam int unsigned TWW     = 18;                 // twiddle width
  localparam int unsigned TWF     = 16;                 // twiddle fraction bits
  localparam int unsigned SW      = DW + 2;             // butterfly sum width
  localparam int unsigned PW      = SW + TWW + 1;       // product sum width

  typedef logic signed [TWW-1:0] tw_t;
  typedef logic signed [SW-1:0]  sum_t;

  // W_N^e = cos(2*pi*e/N) - j*sin(2*pi*e/N), rounded to TWF fraction bits.
  function automatic tw_t [N-1:0] make_cos();
    tw_t [N-1:0] r;
    for (int e = 0; e < int'(N); e++)
      r[e] = tw_t'($rtoi($floor(real'(1 << TWF) * $cos(2.0 * 3.14159265358979323846 * e / N) + 0.5)));
    return r;
  endfunction
  function automatic tw_t [N-1:0] make_msin();
    tw_t [N-1:0] r;
    for (int e = 0; e < int'(N); e++)
      r[e] = tw_t'($rtoi($floor(-real'(1 << TWF) * $sin(2.0 * 3.14159265358979323846 * e / N) + 0.5)));
    return r;
  endfunction
  localparam tw_t [N-1:0] TW_RE = make_cos();
  localparam tw_t [N-1:0] TW_IM = make_msin();

  // Position in memory of frequency k after the DIF stages: the radix-4
  // digits of k (least significant first) weighted by N/4, N/16, ..., and
  // the top bit (radix-2 stage) weighted by 1.
  function automatic logic [LOG2N-1:0] digit_rev(input logic [LOG2N-1:0] k);
    logic [LOG2N-1:0] p;
    p = '0;
    for (int s = 0; s < int'(NR4); s++)
      p[LOG2N-2*s-1 -: 2] = k[2*s +: 2];
    if (HAS_R2) p[0] = k[LOG2N-1];
    return p;
  endfunction

  function automatic logic signed [DW-1:0] sat(input logic signed [PW-1:0] v);
    if (v > PW'(signed'((1 << (DW-1)) - 1)))  return DW'((1 << (DW-1)) - 1);
    else if (v < -PW'(signed'(1 << (DW-1))))  return DW'(-(1 << (DW-1)));
    else                                      return v[DW-1:0];
  endfunction

  // Negation that maps the most negative value to the most positive one.
  function automatic logic signed [DW-1:0] neg(input logic signed [DW-1:0] v);
    return (v == DW'(1 << (DW-1))) ? DW'((1 << (DW-1)) - 1) : -v;
  endfunction

  // Arithmetic shift right by sh with round-half-to-even, so that the
  // rounding adds no bias that the following stages would accumulate.
  function automatic logic signed [PW-1:0] rnd(input logic signed [PW-1:0] v,
                                               input int unsigned sh);
    logic signed [PW-1:0] bias;
    if (sh == 0) return v;
    bias = (PW'(1) <<< (sh - 1)) - PW'(1);
    if (v[sh]) bias = bias + PW'(1);
    return (v + bias) >>> sh;
  endfunction

  // Round and shift right by sh (0..3), then saturate.
  function automatic logic signed [DW-1:0] scale(input logic signed [PW-1:0] v,
                                                 input int unsigned sh);
    logic signed [PW-1:0] r;
    r = rnd(v, sh);
    return sat(r);
  endfunction

  // Multiply by a twiddle, drop TWF fraction bits with rounding, scale.
  function automatic logic signed [2*DW-1:0] twiddle_scale(
      input sum_t tr, input sum_t ti, input tw_t wr, input tw_t wi,
      input int unsigned sh);
    logic signed [PW-1:0] pr, pi;
    pr = PW'(tr) * PW'(wr) - PW'(ti) * PW'(wi);
    pi = PW'(tr) * PW'(wi) + PW'(ti) * PW'(wr);
    pr = rnd(pr, TWF + sh);
    pi = rnd(pi, TWF + sh);
    return {sat(pr), sat(pi)};
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_COMP, S_UNLOAD} state_t;
  state_t state;

  logic [2*DW-1:0]    mem [N];
  logic [LOG2N:0]     req_cnt, rcv_cnt, out_cnt;
  logic [BW-1:0]      bfly;
  logic [2:0]         stage;
  logic [SF_W-1:0]    sf_q;

  // ---------------------------------------------------------------- compute
  logic [LOG2N-1:0]   a0, a1, a2, a3;
  logic [LOG2N-1:0]   tw_e1, tw_e2, tw_e3;
  logic [2*DW-1:0]    y0, y1, y2, y3;
  int unsigned        sh;
  int unsigned        lg;            // log2 of the quarter span L

  always_comb begin
    logic [LOG2N-1:0] j, base;
    logic signed [DW-1:0] ar, ai, br, bi, cr, ci, dr, di;
    sum_t t0r, t0i, t1r, t1i, t2r, t2i, t3r, t3i;
    logic signed [PW-1:0] ur, ui, vr, vi;
    {t0r, t0i, t1r, t1i, t2r, t2i, t3r, t3i} = '0;
    {ur, ui, vr, vi} = '0;
    sh    = int'(sf_q[2*stage +: 2]);
    lg    = (LOG2N >= 2*int'(stage) + 2) ? LOG2N - 2*int'(stage) - 2 : 0;
    j     = LOG2N'(bfly) & ((LOG2N'(1) << lg) - 1'b1);
    base  = (LOG2N'(bfly) >> lg) << (lg + 2);
    if (HAS_R2 && stage == 3'(NR4)) begin
      a0 = {bfly, 2'd0}; a1 = {bfly, 2'd1}; a2 = {bfly, 2'd2}; a3 = {bfly, 2'd3};
    end else begin
      a0 = base + j;
      a1 = a0 + (LOG2N'(1) << lg);
      a2 = a1 + (LOG2N'(1) << lg);
      a3 = a2 + (LOG2N'(1) << lg);
    end
    tw_e1 = j << (2 * stage);
    tw_e2 = tw_e1 << 1;
    tw_e3 = tw_e2 + tw_e1;
    {ar, ai} = mem[a0];
    {br, bi} = mem[a1];
    {cr, ci} = mem[a2];
    {dr, di} = mem[a3];
    if (HAS_R2 && stage == 3'(NR4)) begin
      ur = PW'(ar) + PW'(br);  ui = PW'(ai) + PW'(bi);
      vr = PW'(ar) - PW'(br);  vi = PW'(ai) - PW'(bi);
      y0 = {scale(ur, sh), scale(ui, sh)};
      y1 = {scale(vr, sh), scale(vi, sh)};
      ur = PW'(cr) + PW'(dr);  ui = PW'(ci) + PW'(di);
      vr = PW'(cr) - PW'(dr);  vi = PW'(ci) - PW'(di);
      y2 = {scale(ur, sh), scale(ui, sh)};
      y3 = {scale(vr, sh), scale(vi, sh)};
    end else begin
      t0r = SW'(ar) + SW'(br) + SW'(cr) + SW'(dr);
      t0i = SW'(ai) + SW'(bi) + SW'(ci) + SW'(di);
      t2r = SW'(ar) - SW'(br) + SW'(cr) - SW'(dr);
      t2i = SW'(ai) - SW'(bi) + SW'(ci) - SW'(di);
      // (a-c) -/+ j(b-d)
      t1r = SW'(ar) - SW'(cr) + SW'(bi) - SW'(di);
      t1i = SW'(ai) - SW'(ci) - SW'(br) + SW'(dr);
      t3r = SW'(ar) - SW'(cr) - SW'(bi) + SW'(di);
      t3i = SW'(ai) - SW'(ci) + SW'(br) - SW'(dr);
      y0 = {scale(PW'(t0r), sh), scale(PW'(t0i), sh)};
      y1 = twiddle_scale(t1r, t1i, TW_RE[tw_e1], TW_IM[tw_e1], sh);
      y2 = twiddle_scale(t2r, t2i, TW_RE[tw_e2], TW_IM[tw_e2], sh);
      y3 = twiddle_scale(t3r, t3i, TW_RE[tw_e3], TW_IM[tw_e3], sh);
    end
  end

  // ---------------------------------------------------------------- control
  logic last_bfly, last_stage;
  assign last_bfly  = (bfly == {BW{1'b1}});
  assign last_stage = (stage == 3'(NSTAGES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      req_cnt <= '0;
      rcv_cnt <= '0;
      out_cnt <= '0;
      bfly    <= '0;
      stage   <= '0;
      sf_q    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          sf_q    <= scale_factor;
          req_cnt <= '0;
          rcv_cnt <= '0;
        end
        S_LOAD: begin
          if (in_req) req_cnt <= req_cnt + 1'b1;
          if (in_valid) begin
            rcv_cnt <= rcv_cnt + 1'b1;
            if (rcv_cnt == (LOG2N+1)'(N - 1)) begin
              state <= S_COMP;
              bfly  <= '0;
              stage <= '0;
            end
          end
        end
        S_COMP: begin
          bfly <= bfly + 1'b1;
          if (last_bfly) begin
            stage <= stage + 1'b1;
            if (last_stage) begin
              state   <= S_UNLOAD;
              out_cnt <= '0;
            end
          end
        end
        S_UNLOAD: begin
          out_cnt <= out_cnt + 1'b1;
          if (out_cnt == (LOG2N+1)'(N - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_req   = (state == S_LOAD) && (req_cnt < (LOG2N+1)'(N));
  assign in_index = IDX_W'(req_cnt);
  assign busy     = (state != S_IDLE);

  // ----------------------------------------------------------------- memory
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid)
      mem[in_addr[LOG2N-1:0]] <= {in_re, INVERSE ? neg(in_im) : in_im};
    else if (state == S_COMP) begin
      mem[a0] <= y0;
      mem[a1] <= y1;
      mem[a2] <= y2;
      mem[a3] <= y3;
    end
  end

  // ----------------------------------------------------------------- output
  logic signed [DW-1:0] unl_re, unl_im;
  assign {unl_re, unl_im} = mem[digit_rev(out_cnt[LOG2N-1:0])];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_index <= '0;
      out_re    <= '0;
      out_im    <= '0;
      done      <= 1'b0;
    end else begin
      out_valid <= (state == S_UNLOAD);
      done      <= (state == S_UNLOAD) && (out_cnt == (LOG2N+1)'(N - 1));
      if (state == S_UNLOAD) begin
        out_index <= IDX_W'(out_cnt[LOG2N-1:0]);
        out_re    <= unl_re;
        out_im    <= INVERSE ? neg(unl_im) : unl_im;
      end
    end
  end

  // The load producer must not return more samples than were asked for.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LOAD && in_valid) |-> (rcv_cnt <= req_cnt));

endmodule
