// async_fifo: dual-clock FIFO between the receiver FPGA and the DSP bus.
//
// The receiver writes 32-bit words at the 50 MHz sampling clock (WR_CLK) and
// the DSP reads them over its 32-bit synchronous bus at 100 MHz (RD_CLK); a
// FIFO of 512 positions absorbs the latency of the DSP's interrupt service.
// The insides are the usual ones: binary pointers one bit wider than the
// address, exchanged between the clock domains in Gray code through
// two-flop synchronisers.  wr_full is exact in the write domain and rd_empty
// exact in the read domain; each is pessimistic by the synchroniser delay.
// A read (rd_en while !rd_empty) returns its word on rd_data one RD_CLK
// later, flagged by rd_valid.  Writes while full and reads while empty are
// ignored.  DEPTH must be a power of two.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             rd_empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, wptr_gray, rptr, rptr_gray;
  logic [AW:0] rgray_w1, rgray_w2;       // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;       // write pointer seen by the reader

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ------------------------------------------------------------ write side
  logic do_wr;
  assign do_wr     = wr_en && !wr_full;
  assign wptr_gray = bin2gray(wptr);
  assign wr_full   = (wptr_gray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk)
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr     <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      rgray_w1 <= rptr_gray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ------------------------------------------------------------- read side
  logic do_rd;
  assign do_rd     = rd_en && !rd_empty;
  assign rptr_gray = bin2gray(rptr);
  assign rd_empty  = (rptr_gray == wgray_r2);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr     <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      wgray_r1 <= wptr_gray;
      wgray_r2 <= wgray_r1;
      rd_valid <= do_rd;
      if (do_rd) begin
        rd_data <= mem[rptr[AW-1:0]];
        rptr    <= rptr + 1'b1;
      end
    end
  end

endmodule
