// cp_insert: cyclic-prefix insertion and DAC word for the transmitter.
//
// Each real IFFT block of N samples is sent as its last CP samples followed
// by the whole block, so the channel's delay spread stays inside the prefix.
// The prefix length comes from the 9-bit CP_Length register as
// CP = CP_Length + 1 (1..512 samples, covering the modem's 20..512 range);
// it is latched at the start of each symbol.
//
// Two block buffers of N 16-bit words alternate: the IFFT writes one (in any
// order, by index) while the other is played.  A buffer becomes playable
// when in_done marks the IFFT's last sample.  Playback runs one sample per
// clock: sym_start marks the first prefix sample, dft_start the first sample
// of the block proper.  When no block is ready the output is 0 (idle line)
// and idle is high; a waiting block always starts on the next cycle.
// in_ready tells the IFFT whether a buffer is free for its next block.
// The DAC word is the IFFT's real output with its two least significant bits
// dropped (16 -> 14 bits, two's complement).  The buffering and idle policy
// are this design's own.
module cp_insert
  import dmt_pkg::*;
#(
  parameter int unsigned LOG2N = N_DFT_LOG2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [CP_W-1:0]            cp_length,
  input  logic                       in_valid,
  input  logic [IDX_W-1:0]           in_idx,
  input  logic signed [SAMPLE_W-1:0] in_re,
  input  logic                       in_done,
  output logic                       in_ready,
  output logic signed [DAC_W-1:0]    dac_data,
  output logic                       sym_start,
  output logic                       dft_start,
  output logic                       idle
);

  localparam int unsigned N = 1 << LOG2N;

  logic [SAMPLE_W-1:0] buf0 [N];
  logic [SAMPLE_W-1:0] buf1 [N];
  logic [1:0]          full;            // buffer holds a whole block
  logic                wsel;            // buffer the IFFT writes
  logic                rsel;            // buffer being played
  logic                playing;
  logic                in_prefix;
  logic [LOG2N:0]      pos;             // sample counter in the prefix / block
  logic [LOG2N:0]      cp_len_q;

  assign in_ready = !full[wsel];

  always_ff @(posedge clk) begin
    if (in_valid && !wsel) buf0[in_idx[LOG2N-1:0]] <= in_re;
    if (in_valid &&  wsel) buf1[in_idx[LOG2N-1:0]] <= in_re;
  end

  logic [LOG2N-1:0] raddr;
  logic [SAMPLE_W-1:0] rword;
  assign raddr = in_prefix ? LOG2N'((LOG2N+1)'(N) - cp_len_q + pos) : pos[LOG2N-1:0];
  assign rword = rsel ? buf1[raddr] : buf0[raddr];

  logic last_sample;
  assign last_sample = !in_prefix && (pos == (LOG2N+1)'(N - 1));

  // buffer flags after this cycle's IFFT completion and playback release
  logic [1:0] full_n;
  always_comb begin
    full_n = full;
    if (in_done) full_n[wsel] = 1'b1;
    if (playing && last_sample) full_n[rsel] = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= '0;
      wsel      <= 1'b0;
      rsel      <= 1'b0;
      playing   <= 1'b0;
      in_prefix <= 1'b0;
      pos       <= '0;
      cp_len_q  <= '0;
      dac_data  <= '0;
      sym_start <= 1'b0;
      dft_start <= 1'b0;
      idle      <= 1'b1;
    end else begin
      sym_start <= 1'b0;
      dft_start <= 1'b0;
      if (in_done) wsel <= ~wsel;
      if (playing) begin
        dac_data  <= rword[SAMPLE_W-1 -: DAC_W];
        idle      <= 1'b0;
        sym_start <= in_prefix && (pos == '0);
        dft_start <= !in_prefix && (pos == '0);
        if (in_prefix) begin
          if (pos == cp_len_q - 1'b1) begin
            in_prefix <= 1'b0;
            pos       <= '0;
          end else begin
            pos <= pos + 1'b1;
          end
        end else if (last_sample) begin
          rsel    <= ~rsel;
          playing <= 1'b0;
        end else begin
          pos <= pos + 1'b1;
        end
      end else begin
        dac_data <= '0;
        idle     <= 1'b1;
      end
      // start the next block as soon as it is ready
      if ((!playing && full_n[rsel]) || (playing && last_sample && full_n[~rsel])) begin
        playing   <= 1'b1;
        in_prefix <= 1'b1;
        pos       <= '0;
        cp_len_q  <= (LOG2N+1)'(cp_length) + 1'b1;
      end
      full <= full_n;
    end
  end

endmodule
