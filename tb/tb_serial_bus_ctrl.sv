// tb_serial_bus_ctrl: writes every register over the serial bus and checks
// the outputs, the one-cycle bit-load table strobe, the reset values, that
// an address outside the map changes nothing and that a frame cut short by
// dropping ser_en is discarded.
module tb_serial_bus_ctrl;
  import dmt_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ser_en = 1'b0, ser_bit = 1'b0;
  logic [11:0] scale_factor, top_carrier, down_carrier;
  logic [8:0]  cp_length;
  logic        start, tbl_we;
  logic [9:0]  tbl_addr;
  logic [3:0]  tbl_data;
  int          strobes = 0;
  logic [9:0]  last_addr;
  logic [3:0]  last_data;

  always #5 clk = ~clk;

  serial_bus_ctrl dut (.*);

  always @(posedge clk) if (tbl_we) begin
    strobes++;
    last_addr = tbl_addr;
    last_data = tbl_data;
  end

  task automatic send(input logic [15:0] addr, input logic [15:0] data, input int nbits = 32);
    logic [31:0] f = {addr, data};
    for (int i = 31; i > 31 - nbits; i--) begin
      @(negedge clk);
      ser_en = 1'b1;
      ser_bit = f[i];
    end
    @(negedge clk);
    ser_en = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cp_length == 9'd299 && scale_factor == 0 && !start, "reset values");
    send(16'h0000, 16'h0abc);  check(scale_factor == 12'habc, "scale factor");
    send(16'h0001, 16'h012b);  check(cp_length == 9'h12b, "cp length");
    send(16'h0002, 16'h00c8);  check(top_carrier == 12'd200, "top carrier");
    send(16'h0003, 16'h0011);  check(down_carrier == 12'd17, "down carrier");
    send(16'h0004, 16'h0001);  check(start, "start set");
    send(16'h0004, 16'h0000);  check(!start, "start cleared");
    send(16'h1000 + 16'd517, 16'h0009);
    check(strobes == 1 && last_addr == 10'd517 && last_data == 4'd9, "table write");
    send(16'h13ff, 16'h0003);
    check(strobes == 2 && last_addr == 10'd1023 && last_data == 4'd3, "table write top");
    send(16'h0777, 16'h0fff);
    check(strobes == 2 && scale_factor == 12'habc && top_carrier == 12'd200, "unmapped address ignored");
    send(16'h0000, 16'h0123, 20);          // cut short
    check(scale_factor == 12'habc, "partial frame discarded");
    send(16'h0000, 16'h0123);
    check(scale_factor == 12'h123, "frame after partial one");
    // back-to-back frames without dropping ser_en
    begin
      logic [63:0] f2 = {16'h0002, 16'h0155, 16'h0003, 16'h0044};
      for (int i = 63; i >= 0; i--) begin
        @(negedge clk); ser_en = 1'b1; ser_bit = f2[i];
      end
      @(negedge clk); ser_en = 1'b0;
      @(negedge clk);
      check(top_carrier == 12'h155 && down_carrier == 12'h044, "back-to-back frames");
    end
    report();
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
