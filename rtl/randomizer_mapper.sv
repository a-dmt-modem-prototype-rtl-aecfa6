// randomizer_mapper: bank of ten LFSRs and the constellation mapper.
//
// For each carrier the transmitter draws an l-bit pseudo-random word, where
// l (0..10) is the carrier's bit load, and maps it onto a constellation of
// 2^l points; all constellations are scaled to the same mean energy.  The
// bank holds ten elementary LFSRs; LFSR i supplies bit i of the word and
// advances only when i < l, so a carrier of l bits consumes exactly one bit
// from each of the first l LFSRs.
//
// This design's own choices, none of which the modem's description fixes:
//   * each LFSR is the 23-bit sequence x^23 + x^18 + 1 (Fibonacci form, the
//     output is bit 22), with seed SEED_BASE xor (i * 0x1234F);
//   * mapping is rectangular QAM in natural binary: the low ceil(l/2) bits
//     select the in-phase level, the high floor(l/2) bits the quadrature
//     level, levels being the odd integers -(M-1)..(M-1); l = 1 is BPSK on
//     the real axis and l = 0 sends nothing;
//   * a constellation with MI x MQ levels has mean energy
//     E = ((MI^2 - 1) + (MQ^2 - 1)) / 3, and each level is multiplied by
//     GAIN[l] = round(16 * RMS / sqrt(E)) and divided by 16, so every
//     constellation has an RMS value of RMS per carrier (default 8192).
// Interface: one carrier per cycle, (in_valid, in_idx, in_bits) in, the same
// index out one cycle later with the 16-bit mapped point and the raw word.
module randomizer_mapper
  import dmt_pkg::*;
#(
  parameter int unsigned RMS       = 8192,
  parameter logic [22:0] SEED_BASE = 23'h2A5A5A
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [IDX_W-1:0]           in_idx,
  input  logic [BL_W-1:0]            in_bits,
  output logic                       out_valid,
  output logic [IDX_W-1:0]           out_idx,
  output logic [MAX_BITS-1:0]        out_word,
  output logic signed [SAMPLE_W-1:0] out_re,
  output logic signed [SAMPLE_W-1:0] out_im
);

  function automatic gain_t [MAX_BITS:0] make_gains();
    gain_t [MAX_BITS:0] g;
    for (int l = 0; l <= int'(MAX_BITS); l++) g[l] = qam_gain(l, RMS);
    return g;
  endfunction
  localparam gain_t [MAX_BITS:0] GAIN = make_gains();

  logic [22:0] lfsr [MAX_BITS];
  logic [MAX_BITS-1:0] word;

  always_comb
    for (int i = 0; i < int'(MAX_BITS); i++) word[i] = lfsr[i][22];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(MAX_BITS); i++)
        lfsr[i] <= SEED_BASE ^ 23'(i * 32'h1234F);
    end else if (in_valid) begin
      for (int i = 0; i < int'(MAX_BITS); i++)
        if (i < int'(in_bits)) lfsr[i] <= {lfsr[i][21:0], lfsr[i][22] ^ lfsr[i][17]};
    end
  end

  // Level of a b-bit field v: 2v - (2^b - 1).
  function automatic logic signed [6:0] level(input logic [4:0] v, input int b);
    if (b == 0) return '0;
    return 7'(2 * int'(v) - ((1 << b) - 1));
  endfunction

  logic [MAX_BITS-1:0]        w;
  logic signed [SAMPLE_W-1:0] map_re, map_im;

  always_comb begin
    logic [4:0] vi, vq;
    logic [3:0] bi, bq;
    logic signed [25:0] pr, pq;
    bi = 4'((int'(in_bits) + 1) / 2);
    bq = 4'(int'(in_bits) / 2);
    w  = word & MAX_BITS'((1 << in_bits) - 1);
    vi = 5'(w & MAX_BITS'((1 << bi) - 1));
    vq = 5'(w >> bi);
    pr = 26'(level(vi, bi)) * signed'({8'd0, GAIN[in_bits]});
    pq = 26'(level(vq, bq)) * signed'({8'd0, GAIN[in_bits]});
    map_re = SAMPLE_W'((pr + 26'sd8) >>> 4);
    map_im = SAMPLE_W'((pq + 26'sd8) >>> 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_word  <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      out_idx   <= in_idx;
      out_word  <= w;
      out_re    <= map_re;
      out_im    <= map_im;
    end
  end

endmodule
