// tb_bit_alloc: checks SNDR estimation and bit-load choice.
//
// 48 carriers get 64 random error samples each, with a per-carrier error
// amplitude spread over a wide range, so the SNDRs run from below the
// 1-bit threshold to above the 10-bit one.  The testbench keeps its own
// exact error energy per carrier and works out the expected load in
// floating point from SNDR = RMS^2 * count / energy and the SNR-gap rule
// (gap 9.8 dB + 3 dB margin); it compares two instances, the default
// (even loads only) and one that grants odd loads too.  It also checks the
// count, that unmeasured carriers read 0 bits and that clear forgets
// everything, and that the whole 0..10 range of loads was produced.
module tb_bit_alloc;
  import dmt_tb_pkg::*;
  localparam int NCAR = 48, NS = 64;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [9:0] in_idx = '0, q_idx = '0;
  logic signed [16:0] err_re = '0, err_im = '0;
  logic [3:0] q_bits, q_bits_odd;
  logic [15:0] q_count, q_count_odd;

  always #5 clk = ~clk;

  bit_alloc dut (.*);
  bit_alloc #(.EVEN_ONLY(1'b0)) dut_odd (
    .clk, .rst_n, .clear, .in_valid, .in_idx, .err_re, .err_im, .q_idx,
    .q_bits(q_bits_odd), .q_count(q_count_odd));

  longint energy [NCAR];
  int seen_bits [11];

  function automatic int expect_bits(input longint e, input int c, input bit even_only);
    real g = 10.0 ** (12.8 / 10.0);
    real sndr;
    int best = 0;
    if (c == 0) return 0;
    if (e == 0) return even_only ? 10 : 10;
    sndr = 8192.0 * 8192.0 * real'(c) / real'(e);
    for (int l = 1; l <= 10; l++)
      if (sndr >= g * real'((1 << l) - 1) && (!even_only || l % 2 == 0)) best = l;
    return best;
  endfunction

  task automatic query(input int k, output int b, output int bo, output int c);
    @(negedge clk) q_idx = 10'(k);
    @(posedge clk); #1;
    b = int'(q_bits); bo = int'(q_bits_odd); c = int'(q_count);
  endtask

  initial begin
    automatic int b, bo, c;
    for (int l = 0; l <= 10; l++) seen_bits[l] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCAR; k++) energy[k] = 0;
    // carrier k: error amplitude a = 8192 * 10^(-(k*55/NCAR)/20) * 1.7 (uniform
    // noise of +-a has RMS a/sqrt(3) per axis)
    for (int n = 0; n < NS; n++)
      for (int k = 0; k < NCAR; k++) begin
        automatic real a = 8192.0 * 1.7 * (10.0 ** (-(real'(k) * 55.0 / real'(NCAR)) / 20.0));
        automatic int ai = (a < 1.0) ? 1 : int'(a);
        automatic int er = int'($urandom_range(2 * ai)) - ai;
        automatic int ei = int'($urandom_range(2 * ai)) - ai;
        @(negedge clk);
        in_valid = 1'b1; in_idx = 10'(100 + k);
        err_re = 17'(er); err_im = 17'(ei);
        energy[k] += longint'(er) * er + longint'(ei) * ei;
      end
    @(negedge clk) in_valid = 1'b0;
    for (int k = 0; k < NCAR; k++) begin
      query(100 + k, b, bo, c);
      check(c == NS, $sformatf("carrier %0d count %0d", k, c));
      check(b == expect_bits(energy[k], NS, 1'b1),
            $sformatf("carrier %0d even-only bits %0d want %0d (SNDR %0.1f dB)", k, b,
                      expect_bits(energy[k], NS, 1'b1),
                      10.0 * $log10(8192.0 * 8192.0 * NS / real'(energy[k]))));
      check(bo == expect_bits(energy[k], NS, 1'b0),
            $sformatf("carrier %0d bits %0d want %0d", k, bo, expect_bits(energy[k], NS, 1'b0)));
      seen_bits[bo]++;
    end
    for (int l = 0; l <= 10; l++) check(seen_bits[l] > 0, $sformatf("load %0d produced", l));
    // unmeasured carriers
    for (int k = 0; k < 8; k++) begin
      query(500 + k, b, bo, c);
      check(b == 0 && bo == 0 && c == 0, "unmeasured carrier reads 0");
    end
    // clear
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int k = 0; k < NCAR; k += 7) begin
      query(100 + k, b, bo, c);
      check(b == 0 && bo == 0 && c == 0, "clear forgets the carrier");
    end
    report();
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
