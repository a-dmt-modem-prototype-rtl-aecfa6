// fifo_ctrl: decides which FFT outputs of the receiver reach the DSP.
//
// The DSP cannot process all carriers, so it sets Down_Carrier and
// Top_Carrier and only the FFT bins with Down_Carrier <= index <= Top_Carrier
// are written into the FIFO, as long as Start is set.  Fifo_WEN is asserted
// for such a bin when the FIFO is not full; a bin that finds the FIFO full
// is lost and counted (overflow pulse and a saturating 16-bit counter).
// On the read side Fifo_REN is the DSP's read request gated by !Fifo_empty,
// combinationally in the read clock domain.  The write filter follows the
// receiver's description; the drop policy and counter are this design's own.
module fifo_ctrl
  import dmt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  top_carrier,
  input  logic [IDX_W-1:0]  down_carrier,
  input  logic              bin_valid,
  input  logic [IDX_W-1:0]  index_output,
  input  logic              fifo_full,
  output logic              fifo_wen,
  output logic              overflow,
  output logic [15:0]       overflow_count,
  // read clock domain
  input  logic              dsp_rd,
  input  logic              fifo_empty,
  output logic              fifo_ren
);

  logic in_range;
  assign in_range = start && bin_valid &&
                    (index_output >= down_carrier) && (index_output <= top_carrier);
  assign fifo_wen = in_range && !fifo_full;
  assign overflow = in_range && fifo_full;
  assign fifo_ren = dsp_rd && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   overflow_count <= '0;
    else if (overflow && overflow_count != '1)    overflow_count <= overflow_count + 1'b1;
  end

endmodule
