// serial_bus_ctrl: configuration registers loaded by the DSP over a serial bus.
//
// The DSP sets the modem's control signals once, before transmission:
// Scale_Factor (IFFT/FFT stage scaling), CP_Length (cyclic prefix), the
// Top_Carrier / Down_Carrier range the receiver forwards, the Start bit, and
// the bit-load table of the transmitter.  Both FPGAs carry this block; each
// uses the registers it needs.
//
// The bus format is this design's own: while ser_en is high, one bit of
// ser_bit is taken on every clock edge, most significant bit first.  A frame
// is 32 bits: a 16-bit register address followed by 16 bits of data.  The
// write takes effect on the edge that takes the 32nd bit; dropping ser_en
// abandons a partial frame.  Register map (addresses in dmt_pkg):
//   0x0000 Scale_Factor [11:0]     0x0001 CP_Length [8:0]: prefix = value+1
//   0x0002 Top_Carrier  [11:0]     0x0003 Down_Carrier [11:0]
//   0x0004 control, bit 0 = Start  0x1000+k  bit load of carrier k [3:0]
// Writes to the bit-load window appear for one cycle on tbl_we/tbl_addr/
// tbl_data.  Reset values: CP_Length 299 (a 300-sample prefix), others 0.
module serial_bus_ctrl
  import dmt_pkg::*;
#(
  parameter int unsigned TBL_AW = 10          // log2(N_DFT/2)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ser_en,
  input  logic                ser_bit,
  output logic [SF_W-1:0]     scale_factor,
  output logic [CP_W-1:0]     cp_length,
  output logic [IDX_W-1:0]    top_carrier,
  output logic [IDX_W-1:0]    down_carrier,
  output logic                start,
  output logic                tbl_we,
  output logic [TBL_AW-1:0]   tbl_addr,
  output logic [BL_W-1:0]     tbl_data
);

  logic [30:0] shreg;
  logic [4:0]  nbits;
  logic [31:0] frame;
  logic        commit;

  assign frame  = {shreg, ser_bit};
  assign commit = ser_en && (nbits == 5'd31);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg        <= '0;
      nbits        <= '0;
      scale_factor <= '0;
      cp_length    <= CP_W'(299);
      top_carrier  <= '0;
      down_carrier <= '0;
      start        <= 1'b0;
      tbl_we       <= 1'b0;
      tbl_addr     <= '0;
      tbl_data     <= '0;
    end else begin
      tbl_we <= 1'b0;
      if (!ser_en) begin
        nbits <= '0;
      end else begin
        shreg <= frame[30:0];
        nbits <= nbits + 1'b1;          // wraps to 0 after a whole frame
      end
      if (commit) begin
        unique casez (frame[31:16])
          REG_SCALE_FACTOR: scale_factor <= frame[SF_W-1:0];
          REG_CP_LENGTH:    cp_length    <= frame[CP_W-1:0];
          REG_TOP_CARRIER:  top_carrier  <= frame[IDX_W-1:0];
          REG_DOWN_CARRIER: down_carrier <= frame[IDX_W-1:0];
          REG_CONTROL:      start        <= frame[0];
          default: if (frame[31:16] >= REG_BITLOAD_BASE &&
                       frame[31:16] <  REG_BITLOAD_BASE + 16'(1 << TBL_AW)) begin
            tbl_we   <= 1'b1;
            tbl_addr <= frame[16 +: TBL_AW];
            tbl_data <= frame[BL_W-1:0];
          end
        endcase
      end
    end
  end

endmodule
