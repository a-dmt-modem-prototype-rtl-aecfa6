// bit_alloc: per-carrier SNDR estimation and bit-load calculation.
//
// During the training phase the equalizer's error e = S~ - S on every
// carrier measures everything that disturbs that carrier after
// equalization: noise plus the distortion the equalizer could not follow.
// This block accumulates, per carrier k, the error energy
//     E[k] = sum |e|^2        and the number of measurements  C[k]
// and, when asked, turns them into a bit load.  With the constellations'
// common RMS value, the signal to noise-and-distortion ratio is
//     SNDR[k] = RMS^2 * C[k] / E[k]
// and the load is the largest l (0..10) whose constellation reaches the
// target bit error rate with a guard margin, by the usual SNR-gap rule
//     SNDR[k] >= G * (2^l - 1),   G = 10^((GAP_CDB + MARGIN_CDB) / 1000).
// The test is done for every l in parallel as
//     RMS^2 * C * 2^8 >= round(G * (2^l - 1) * 2^8) * E
// so no division is needed.  With EVEN_ONLY set, only even loads are
// granted (a carrier that reaches 5 bits gets 4).
//
// Interface (one clock domain, the DSP side):
//   clear                forget every measurement (one cycle);
//   in_valid, in_idx,    one error sample for carrier in_idx;
//   err_re, err_im       accumulated in the same cycle;
//   q_idx                carrier queried; q_bits and q_count (C,
//                        saturating at 65535) follow one clock later.
// A carrier that has never been measured reads 0 bits.  The energy sum is
// 48 bits, enough for 65535 errors at full scale.
//
// Following the modem's description: the SNDR of each carrier is estimated
// while the equalizer trains, and the load is chosen from it for a bit
// error rate of 1e-5 with a 3 dB margin; even loads only in the reported
// tests.  This design's own choices: the error-energy estimator, the SNR-gap
// rule with a 9.8 dB gap for 1e-5 on uncoded QAM, the fixed-point test and
// doing this in logic rather than in DSP software.
module bit_alloc
  import dmt_pkg::*;
#(
  parameter int unsigned AW         = 10,
  parameter int unsigned RMS        = 8192,
  parameter int unsigned GAP_CDB    = 980,   // SNR gap, 1/100 dB
  parameter int unsigned MARGIN_CDB = 300,   // guard margin, 1/100 dB
  parameter bit          EVEN_ONLY  = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic [AW-1:0]            in_idx,
  input  logic signed [SAMPLE_W:0] err_re,
  input  logic signed [SAMPLE_W:0] err_im,
  input  logic [AW-1:0]            q_idx,
  output logic [BL_W-1:0]          q_bits,
  output logic [15:0]              q_count
);

  localparam int unsigned NC = 1 << AW;
  typedef logic [31:0] thr_t;

  // round(G * (2^l - 1) * 256) for l = 1..10
  function automatic thr_t [MAX_BITS:1] make_thresholds();
    thr_t [MAX_BITS:1] t;
    real g = 10.0 ** (real'(GAP_CDB + MARGIN_CDB) / 1000.0);
    for (int l = 1; l <= int'(MAX_BITS); l++)
      t[l] = thr_t'($rtoi($floor(g * real'((1 << l) - 1) * 256.0 + 0.5)));
    return t;
  endfunction
  localparam thr_t [MAX_BITS:1] THR = make_thresholds();

  logic [47:0]   energy [NC];
  logic [15:0]   count  [NC];
  logic [NC-1:0] seen;

  logic [34:0] p;                    // |e|^2 of the incoming sample
  assign p = 35'(36'(err_re) * 36'(err_re) + 36'(err_im) * 36'(err_im));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      energy[in_idx] <= (seen[in_idx] ? energy[in_idx] : 48'd0) + 48'(p);
      count[in_idx]  <= seen[in_idx] ? ((count[in_idx] == 16'hffff) ? count[in_idx]
                                                                     : count[in_idx] + 16'd1)
                                     : 16'd1;
    end
  end

  // bit load from (E, C) of the queried carrier
  logic [BL_W-1:0] bits_c;
  logic [15:0]     count_c;
  always_comb begin
    logic [47:0]  e;
    logic [79:0]  lhs, rhs;
    bits_c  = '0;
    count_c = seen[q_idx] ? count[q_idx] : 16'd0;
    e       = energy[q_idx];
    lhs     = 80'(RMS) * 80'(RMS) * 80'(count_c) * 80'd256;
    for (int l = 1; l <= int'(MAX_BITS); l++) begin
      rhs = 80'(THR[l]) * 80'(e);
      if (count_c != 16'd0 && lhs >= rhs && (!EVEN_ONLY || (l % 2) == 0))
        bits_c = BL_W'(l);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen    <= '0;
      q_bits  <= '0;
      q_count <= '0;
    end else begin
      q_bits  <= bits_c;
      q_count <= count_c;
      if (clear) seen <= '0;
      else if (in_valid) seen[in_idx] <= 1'b1;
    end
  end

endmodule
