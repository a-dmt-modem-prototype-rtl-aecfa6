// tb_randomizer_mapper: drives random bit loads 0..10 and compares every
// output word and constellation point with an independent model of the
// LFSR bank and of rectangular QAM scaled to an RMS of 8192.  It also checks
// that LFSRs above the bit load do not advance (an l=0 carrier consumes
// nothing) and that the measured mean energy of each constellation size is
// the same to within 10 percent.
module tb_randomizer_mapper;
  import dmt_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [11:0] in_idx = '0, out_idx;
  logic [3:0]  in_bits = '0;
  logic        out_valid;
  logic [9:0]  out_word;
  logic signed [15:0] out_re, out_im;
  lfsr_bank    model;
  real         energy [11];
  int          count [11];

  always #5 clk = ~clk;

  randomizer_mapper dut (.*);

  initial begin
    int l_prev = 0, w_prev = 0;
    bit have_prev = 0;
    model = new();
    for (int l = 0; l <= 10; l++) begin energy[l] = 0.0; count[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n <= 6000; n++) begin
      automatic int l = $urandom_range(10);
      automatic bit v = (n < 6000) && ($urandom_range(7) != 0);
      if (have_prev) begin
        real mr, mi;
        map_point(w_prev, l_prev, 8192.0, mr, mi);
        check(out_valid && int'(out_word) == w_prev,
              $sformatf("n=%0d l=%0d word %0h want %0h", n, l_prev, out_word, w_prev));
        check(real'(out_re) - mr <= 1.5 && mr - real'(out_re) <= 1.5 &&
              real'(out_im) - mi <= 1.5 && mi - real'(out_im) <= 1.5,
              $sformatf("n=%0d l=%0d point (%0d,%0d) want (%f,%f)", n, l_prev, out_re, out_im, mr, mi));
        energy[l_prev] += real'(out_re) ** 2 + real'(out_im) ** 2;
        count[l_prev]++;
      end else if (n > 0) begin
        check(!out_valid, "no output without input");
      end
      have_prev = v;
      if (v) begin
        l_prev = l;
        w_prev = model.draw(l);
      end
      in_valid = v; in_bits = 4'(l); in_idx = 12'(n);
      @(negedge clk);
    end
    check(count[0] > 100, "l=0 carriers seen");
    check(energy[0] == 0.0, "unused carriers carry no energy");
    for (int l = 1; l <= 10; l++) begin
      automatic real e = energy[l] / count[l] / (8192.0 * 8192.0);
      check(e > 0.9 && e < 1.1, $sformatf("mean energy of %0d-bit constellation %f", l, e));
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
