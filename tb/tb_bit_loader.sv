// tb_bit_loader: loads a random bit-load table, then reads it carrier by
// carrier as the IFFT index does (0..2047) and checks the one-cycle read
// latency, the returned bit loads, the clamp to 10 bits and that the
// mirrored half of the index range reads as 0.
module tb_bit_loader;
  import dmt_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_valid = 1'b0;
  logic [9:0]  wr_addr = '0;
  logic [3:0]  wr_data = '0, out_bits;
  logic [11:0] rd_idx = '0, out_idx;
  logic        out_valid;
  int          tbl [1024];

  always #5 clk = ~clk;

  bit_loader dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 1024; k++) begin
      tbl[k] = (k % 97 == 0) ? 15 : $urandom_range(10);
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 10'(k); wr_data = 4'(tbl[k]);
    end
    @(negedge clk) wr_en = 1'b0;
    for (int k = 0; k <= 2048; k++) begin
      if (k > 0) begin
        automatic int want = (k - 1 >= 1024) ? 0 : (tbl[k - 1] > 10 ? 10 : tbl[k - 1]);
        check(out_valid && out_idx == 12'(k - 1) && int'(out_bits) == want,
              $sformatf("carrier %0d: valid %0d idx %0d bits %0d want %0d",
                        k - 1, out_valid, out_idx, out_bits, want));
      end
      rd_valid = (k < 2048);
      rd_idx   = 12'(k);
      @(negedge clk);
    end
    check(!out_valid, "valid drops after the last index");
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
