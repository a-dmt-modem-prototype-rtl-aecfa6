// tb_async_fifo: 50 MHz writer and 100 MHz reader with random enables.
// Every word read must be the next word written; the FIFO must report full
// after 512 writes with no reads and empty once drained; writes while full
// are dropped.  Words are counted through 3000 transfers.
module tb_async_fifo;
  import dmt_tb_pkg::*;
  logic wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, wr_full, rd_valid, rd_empty;
  logic [31:0] wr_data = '0, rd_data;
  int sent[$];
  int n_read = 0, n_written = 0;
  bit reader_on = 0;

  always #10 wr_clk = ~wr_clk;
  always #5  rd_clk = ~rd_clk;

  async_fifo dut (.wr_clk, .wr_rst_n(rst_n), .wr_en, .wr_data, .wr_full,
                  .rd_clk, .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_valid, .rd_empty);

  always @(posedge rd_clk) begin
    #1;
    if (rd_valid) begin
      check(sent.size() > 0 && rd_data == 32'(sent.pop_front()), "read order");
      n_read++;
    end
    rd_en = reader_on && ($urandom_range(3) != 0);
  end

  initial begin
    repeat (3) @(negedge wr_clk);
    rst_n = 1'b1;
    check(rd_empty && !wr_full, "empty after reset");
    // fill without reading
    for (int i = 0; i < 520; i++) begin
      @(negedge wr_clk);
      wr_en = 1'b1; wr_data = 32'(i * 7919 + 1);
      if (!wr_full) begin sent.push_back(i * 7919 + 1); n_written++; end
    end
    @(negedge wr_clk) wr_en = 1'b0;
    check(wr_full && n_written == 512, $sformatf("full after %0d writes", n_written));
    reader_on = 1;
    while (n_written < 3000) begin
      @(negedge wr_clk);
      wr_en = ($urandom_range(1) == 1);
      wr_data = $urandom;
      if (wr_en && !wr_full) begin sent.push_back(int'(wr_data)); n_written++; end
    end
    @(negedge wr_clk) wr_en = 1'b0;
    repeat (1200) @(negedge wr_clk);
    check(n_read == 3000, $sformatf("read %0d words", n_read));
    check(rd_empty, "empty after drain");
    report();
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
