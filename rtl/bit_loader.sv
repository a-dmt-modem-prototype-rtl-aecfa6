// bit_loader: per-carrier constellation size table of the transmitter.
//
// A memory of N_DFT/2 = 1024 positions, one 4-bit word per carrier, holding
// the number of bits l (0 = unused carrier, up to 10 = 1024-point
// constellation) loaded on that carrier.  The IFFT's input index steps
// through it one carrier per cycle.  The table is written from the serial
// control block (wr_*).  Reads are synchronous: the index presented with
// rd_valid comes back one cycle later with its bit load.  Indices at or above
// N_DFT/2 (the mirrored half of the spectrum) return l = 0, and stored values
// above 10 are read as 10; both are this design's own rules.
module bit_loader
  import dmt_pkg::*;
#(
  parameter int unsigned AW = 10              // log2(N_DFT/2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [BL_W-1:0]   wr_data,
  input  logic              rd_valid,
  input  logic [IDX_W-1:0]  rd_idx,
  output logic              out_valid,
  output logic [IDX_W-1:0]  out_idx,
  output logic [BL_W-1:0]   out_bits
);

  logic [BL_W-1:0] table_q [1 << AW];
  logic [BL_W-1:0] rd_word;

  always_ff @(posedge clk) begin
    if (wr_en) table_q[wr_addr] <= wr_data;
    rd_word <= table_q[rd_idx[AW-1:0]];
  end

  logic in_half_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      in_half_q <= 1'b0;
    end else begin
      out_valid <= rd_valid;
      out_idx   <= rd_idx;
      in_half_q <= (rd_idx < IDX_W'(1 << AW));
    end
  end

  always_comb begin
    if (!in_half_q)                        out_bits = '0;
    else if (rd_word > BL_W'(MAX_BITS))    out_bits = BL_W'(MAX_BITS);
    else                                   out_bits = rd_word;
  end

endmodule
