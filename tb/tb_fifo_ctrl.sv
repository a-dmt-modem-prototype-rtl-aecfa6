// tb_fifo_ctrl: sweeps indices 0..2047 with random carrier ranges and FIFO
// full states and checks that Fifo_WEN is given exactly to the bins inside
// [Down_Carrier, Top_Carrier] while Start is set and the FIFO is not full,
// that a bin meeting a full FIFO is counted as overflow, and that Fifo_REN
// follows the DSP read request only while the FIFO is not empty.
module tb_fifo_ctrl;
  import dmt_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, bin_valid = 1'b0, fifo_full = 1'b0;
  logic [11:0] top_carrier = '0, down_carrier = '0, index_output = '0;
  logic fifo_wen, overflow, dsp_rd = 1'b0, fifo_empty = 1'b0, fifo_ren;
  logic [15:0] overflow_count;
  int drops = 0;

  always #5 clk = ~clk;

  fifo_ctrl dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      down_carrier = 12'($urandom_range(300));
      top_carrier  = 12'(down_carrier + $urandom_range(400));
      start = (rep != 2);
      for (int k = 0; k < 2048; k++) begin
        bit want_wr, want_ovf;
        @(negedge clk);
        bin_valid = ($urandom_range(9) != 0);
        index_output = 12'(k);
        fifo_full = ($urandom_range(9) == 0);
        dsp_rd = $urandom_range(1);
        fifo_empty = ($urandom_range(3) == 0);
        #1;
        want_wr  = start && bin_valid && k >= down_carrier && k <= top_carrier && !fifo_full;
        want_ovf = start && bin_valid && k >= down_carrier && k <= top_carrier && fifo_full;
        if (want_ovf) drops++;
        check(fifo_wen == want_wr, $sformatf("wen k=%0d range %0d..%0d", k, down_carrier, top_carrier));
        check(overflow == want_ovf, "overflow flag");
        check(fifo_ren == (dsp_rd && !fifo_empty), "ren");
      end
    end
    @(negedge clk);
    check(int'(overflow_count) == drops && drops > 0, $sformatf("overflow count %0d want %0d", overflow_count, drops));
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
