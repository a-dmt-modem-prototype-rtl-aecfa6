// feq_lms: per-carrier frequency equalizer with normalised-LMS adaptation,
// the constellation detector and the training-symbol switch.
//
// What it does.  For carrier k in symbol n the demodulated bin Y is
// multiplied by the carrier's complex coefficient W to give the equalised
// point S~ = W * Y.  The detector slices S~ to the nearest point S^ of the
// carrier's l-bit constellation (the same rectangular QAM the transmitter's
// mapper produces) and returns both the point and its bit word.  The error
// is e = S~ - R, where R is the detector output S^ in normal operation and
// the known training point S (input ref_re/ref_im) while `train` is high.
// The coefficient is then updated as
//     W <- W - mu * e * conj(Y) / |Y|^2
// and written back, ready for the same carrier in the next symbol.
//
// How it works.  One carrier is handled at a time in four cycles:
//   1. accept: the bin, carrier index, bit load, mode and reference are
//      registered and the coefficient memory is read;
//   2. equalise: S~ = W * Y, rounded and saturated to 16 bits;
//   3. detect: per axis v = floor((16 x + M g) / (2 g)) clamped to 0..M-1,
//      done by multiplying with a constant reciprocal of 2g; the point is
//      rebuilt exactly as the mapper builds it; e and |Y|^2 are formed;
//   4. update: delta = mu * e * conj(Y) / |Y|^2 (one divider), W - delta is
//      saturated and written; results are presented on the outputs.
// `in_ready` is high only in the accept state, so the block takes one
// carrier every four clocks (a 200-carrier symbol in 8 us at 100 MHz).
// The divider is combinational and is the long path of the block.
//
// Formats.  Y and S~ are 16-bit integers on the scale of the transmitter's
// mapper (RMS per carrier).  W is CW bits with 16 fraction bits (CW = 24 gives
// gains up to +-128).  mu is unsigned with 16 fraction bits (0.1 -> 6554).
// A carrier whose coefficient has never been written reads W = 1; `clear`
// forgets every coefficient.  A bin with |Y|^2 = 0 leaves W unchanged.
//
// Interface: in_valid/in_ready handshake with in_idx (carrier), y_re/y_im,
// bits (0..10), train, ref_re/ref_im; out_valid for one cycle with out_idx,
// eq_re/eq_im (S~), dec_re/dec_im (S^), dec_word, err_re/err_im (e).
//
// Following the modem's description: equalizer and detector structure, the
// training switch, normalisation by the instantaneous power |Y|^2 and the
// step size mu.  This design's own choices: doing it in logic at all (the
// modem runs this on its DSP), the update direction and the use of conj(Y)
// in the update (the textbook normalised LMS; it converges for 0 < mu < 2),
// every number format, the initial W = 1 and the four-cycle schedule.
module feq_lms
  import dmt_pkg::*;
#(
  parameter int unsigned AW  = 10,      // carriers 0..2^AW-1
  parameter int unsigned CW  = 24,      // coefficient width, 16 fraction bits
  parameter int unsigned RMS = 8192     // constellation RMS (as the mapper)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [15:0]                mu,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [AW-1:0]              in_idx,
  input  logic signed [SAMPLE_W-1:0] y_re,
  input  logic signed [SAMPLE_W-1:0] y_im,
  input  logic [BL_W-1:0]            bits,
  input  logic                       train,
  input  logic signed [SAMPLE_W-1:0] ref_re,
  input  logic signed [SAMPLE_W-1:0] ref_im,
  output logic                       out_valid,
  output logic [AW-1:0]              out_idx,
  output logic signed [SAMPLE_W-1:0] eq_re,
  output logic signed [SAMPLE_W-1:0] eq_im,
  output logic signed [SAMPLE_W-1:0] dec_re,
  output logic signed [SAMPLE_W-1:0] dec_im,
  output logic [MAX_BITS-1:0]        dec_word,
  output logic signed [SAMPLE_W:0]   err_re,
  output logic signed [SAMPLE_W:0]   err_im
);

  localparam int unsigned NC   = 1 << AW;
  localparam int unsigned FRAC = 16;
  localparam int unsigned RSH  = 24;                  // reciprocal fraction bits
  localparam logic signed [CW-1:0] W_ONE = CW'(1 << FRAC);
  localparam logic signed [CW-1:0] W_MAX = {1'b0, {(CW-1){1'b1}}};
  localparam logic signed [CW-1:0] W_MIN = {1'b1, {(CW-1){1'b0}}};

  typedef logic [23:0] recip_t;

  function automatic gain_t [MAX_BITS:0] make_gains();
    gain_t [MAX_BITS:0] g;
    for (int l = 0; l <= int'(MAX_BITS); l++) g[l] = qam_gain(l, RMS);
    return g;
  endfunction
  localparam gain_t [MAX_BITS:0] GAIN = make_gains();

  // round(2^RSH / (2 g)) for each constellation size
  function automatic recip_t [MAX_BITS:0] make_recips();
    recip_t [MAX_BITS:0] r;
    r[0] = '0;
    for (int l = 1; l <= int'(MAX_BITS); l++)
      r[l] = recip_t'($rtoi($floor(real'(1 << RSH) / (2.0 * real'(GAIN[l])) + 0.5)));
    return r;
  endfunction
  localparam recip_t [MAX_BITS:0] RECIP = make_recips();

  typedef enum logic [1:0] {S_ACCEPT, S_EQ, S_DET, S_UPD} state_t;
  state_t state;

  // coefficient memory and its written flags
  logic signed [CW-1:0] w_re_mem [NC];
  logic signed [CW-1:0] w_im_mem [NC];
  logic [NC-1:0]        w_known;

  // registered carrier context
  logic [AW-1:0]              k_q;
  logic signed [SAMPLE_W-1:0] yr_q, yi_q, rr_q, ri_q;
  logic [BL_W-1:0]            l_q;
  logic                       train_q;
  logic signed [CW-1:0]       wr_q, wi_q;
  logic signed [SAMPLE_W-1:0] sr_q, si_q;     // S~
  logic signed [SAMPLE_W-1:0] dr_q, di_q;     // S^
  logic [MAX_BITS-1:0]        word_q;
  logic signed [SAMPLE_W:0]   er_q, ei_q;     // e
  logic [31:0]                pw_q;           // |Y|^2

  function automatic logic signed [SAMPLE_W-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767) return 16'sh7fff;
    if (v < -48'sd32768) return 16'sh8000;
    return SAMPLE_W'(v);
  endfunction

  // ---- stage 2: S~ = W * Y ---------------------------------------------------
  logic signed [SAMPLE_W-1:0] eq_r_c, eq_i_c;
  always_comb begin
    logic signed [47:0] ar, ai;
    ar = 48'(wr_q) * 48'(yr_q) - 48'(wi_q) * 48'(yi_q);
    ai = 48'(wr_q) * 48'(yi_q) + 48'(wi_q) * 48'(yr_q);
    eq_r_c = sat16((ar + 48'sd32768) >>> FRAC);
    eq_i_c = sat16((ai + 48'sd32768) >>> FRAC);
  end

  // ---- stage 3: detector -----------------------------------------------------
  // index of the nearest of M = 2^b levels on one axis
  function automatic logic [4:0] slice(input logic signed [SAMPLE_W-1:0] x,
                                       input logic [3:0] b, input gain_t g, input recip_t r);
    logic signed [47:0] num, q;
    int m;
    if (b == 0) return '0;
    m   = 1 << b;
    num = 48'(x) * 48'sd16 + 48'(m) * 48'(signed'({1'b0, g}));
    q   = (num * 48'(signed'({1'b0, r}))) >>> RSH;
    if (q < 48'sd0) return '0;
    if (q > 48'(m - 1)) return 5'(m - 1);
    return 5'(q);
  endfunction

  function automatic logic signed [SAMPLE_W-1:0] point(input logic [4:0] v,
                                                       input logic [3:0] b, input gain_t g);
    logic signed [25:0] p;
    if (b == 0) return '0;
    p = 26'(2 * int'(v) - ((1 << b) - 1)) * signed'({8'd0, g});
    return SAMPLE_W'((p + 26'sd8) >>> 4);
  endfunction

  logic signed [SAMPLE_W-1:0] det_r_c, det_i_c;
  logic [MAX_BITS-1:0]        word_c;
  always_comb begin
    logic [3:0] bi, bq;
    logic [4:0] vi, vq;
    bi      = 4'((int'(l_q) + 1) / 2);
    bq      = 4'(int'(l_q) / 2);
    vi      = slice(sr_q, bi, GAIN[l_q], RECIP[l_q]);
    vq      = slice(si_q, bq, GAIN[l_q], RECIP[l_q]);
    det_r_c = point(vi, bi, GAIN[l_q]);
    det_i_c = point(vq, bq, GAIN[l_q]);
    word_c  = MAX_BITS'(vi) | MAX_BITS'(MAX_BITS'(vq) << bi);
  end

  // ---- stage 4: normalised LMS update ----------------------------------------
  logic signed [CW-1:0] w_new_r, w_new_i;
  always_comb begin
    logic signed [35:0] cr, ci;      // e * conj(Y)
    logic signed [55:0] nr, ni, dr, di, tr, ti;
    cr = 36'(er_q) * 36'(yr_q) + 36'(ei_q) * 36'(yi_q);
    ci = 36'(ei_q) * 36'(yr_q) - 36'(er_q) * 36'(yi_q);
    nr = 56'(cr) * 56'(signed'({1'b0, mu}));
    ni = 56'(ci) * 56'(signed'({1'b0, mu}));
    if (pw_q != '0) begin
      dr = nr / 56'(signed'({1'b0, pw_q}));
      di = ni / 56'(signed'({1'b0, pw_q}));
    end else begin
      dr = '0;
      di = '0;
    end
    tr = 56'(wr_q) - dr;
    ti = 56'(wi_q) - di;
    w_new_r = (tr > 56'(W_MAX)) ? W_MAX : (tr < 56'(W_MIN)) ? W_MIN : CW'(tr);
    w_new_i = (ti > 56'(W_MAX)) ? W_MAX : (ti < 56'(W_MIN)) ? W_MIN : CW'(ti);
  end

  assign in_ready = (state == S_ACCEPT) && !clear;

  // coefficient memory (not reset; the written flags are)
  always_ff @(posedge clk) begin
    if (state == S_ACCEPT && in_valid && in_ready) begin
      wr_q <= w_known[in_idx] ? w_re_mem[in_idx] : W_ONE;
      wi_q <= w_known[in_idx] ? w_im_mem[in_idx] : '0;
    end
    if (state == S_UPD) begin
      w_re_mem[k_q] <= w_new_r;
      w_im_mem[k_q] <= w_new_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_ACCEPT;
      w_known   <= '0;
      k_q       <= '0;
      yr_q      <= '0;
      yi_q      <= '0;
      rr_q      <= '0;
      ri_q      <= '0;
      l_q       <= '0;
      train_q   <= 1'b0;
      sr_q      <= '0;
      si_q      <= '0;
      dr_q      <= '0;
      di_q      <= '0;
      word_q    <= '0;
      er_q      <= '0;
      ei_q      <= '0;
      pw_q      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      eq_re     <= '0;
      eq_im     <= '0;
      dec_re    <= '0;
      dec_im    <= '0;
      dec_word  <= '0;
      err_re    <= '0;
      err_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) w_known <= '0;
      unique case (state)
        S_ACCEPT: if (in_valid && in_ready) begin
          k_q     <= in_idx;
          yr_q    <= y_re;
          yi_q    <= y_im;
          l_q     <= (bits > BL_W'(MAX_BITS)) ? BL_W'(MAX_BITS) : bits;
          train_q <= train;
          rr_q    <= ref_re;
          ri_q    <= ref_im;
          state   <= S_EQ;
        end
        S_EQ: begin
          sr_q  <= eq_r_c;
          si_q  <= eq_i_c;
          state <= S_DET;
        end
        S_DET: begin
          dr_q   <= det_r_c;
          di_q   <= det_i_c;
          word_q <= word_c;
          er_q   <= (SAMPLE_W + 1)'(sr_q) - (SAMPLE_W + 1)'(train_q ? rr_q : det_r_c);
          ei_q   <= (SAMPLE_W + 1)'(si_q) - (SAMPLE_W + 1)'(train_q ? ri_q : det_i_c);
          pw_q   <= 32'(32'(yr_q) * 32'(yr_q)) + 32'(32'(yi_q) * 32'(yi_q));
          state  <= S_UPD;
        end
        S_UPD: begin
          w_known[k_q] <= 1'b1;
          out_valid    <= 1'b1;
          out_idx      <= k_q;
          eq_re        <= sr_q;
          eq_im        <= si_q;
          dec_re       <= dr_q;
          dec_im       <= di_q;
          dec_word     <= word_q;
          err_re       <= er_q;
          err_im       <= ei_q;
          state        <= S_ACCEPT;
        end
        default: state <= S_ACCEPT;
      endcase
    end
  end

endmodule
