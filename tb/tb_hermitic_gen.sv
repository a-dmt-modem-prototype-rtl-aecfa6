// tb_hermitic_gen: feeds random carrier values for indices 0..2047 and
// checks that bins 1..1023 pass unchanged, bin 0 loses its imaginary part,
// bin 1024 is zero and bin 2048-k is the conjugate of bin k, with a
// one-cycle latency.  Two spectra are sent back to back.
module tb_hermitic_gen;
  import dmt_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [11:0] in_idx = '0, out_idx;
  logic signed [15:0] in_re = '0, in_im = '0, out_re, out_im;
  int xr [1024], xi [1024];

  always #5 clk = ~clk;

  hermitic_gen dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int k = 0; k <= 2048; k++) begin
        if (k > 0) begin
          automatic int p = k - 1;
          int wr, wi;
          if (p < 1024)       begin wr = xr[p]; wi = (p == 0) ? 0 : xi[p]; end
          else if (p == 1024) begin wr = 0; wi = 0; end
          else                begin wr = xr[2048 - p]; wi = -xi[2048 - p]; end
          check(out_valid && out_idx == 12'(p) && out_re == 16'(wr) && out_im == 16'(wi),
                $sformatf("bin %0d got (%0d,%0d) want (%0d,%0d)", p, out_re, out_im, wr, wi));
        end
        in_valid = (k < 2048);
        in_idx   = 12'(k);
        if (k < 1024) begin
          xr[k] = $urandom_range(60000) - 30000;
          xi[k] = $urandom_range(60000) - 30000;
          in_re = 16'(xr[k]); in_im = 16'(xi[k]);
        end else begin
          in_re = 16'($urandom); in_im = 16'($urandom);   // ignored
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
      @(negedge clk);
      check(!out_valid, "idle after spectrum");
    end
    report();
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
