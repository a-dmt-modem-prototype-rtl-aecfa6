// tx_fpga: transmitter side of the DMT modem.
//
// Runs sample by sample on the 50 MHz DAC clock.  The IFFT's input index
// walks the carriers; each index flows through the bit loader (bit load l of
// the carrier), the randomizer bank and mapper (a random point of a 2^l
// constellation) and the hermitic generator (which fills bins N/2..N-1 with
// conjugates so the time signal is real), and comes back into the IFFT with
// its index.  The real IFFT output goes to the cyclic-prefix inserter, whose
// 14-bit word drives the DAC.  Scale_Factor, CP_Length, the bit-load table
// and the Start (run) bit arrive over the serial bus.
//
// While Start is set, a new IFFT block is started whenever the IFFT is idle
// and the prefix inserter has a free buffer (the restart loop around the
// IFFT).  With one butterfly engine an IFFT block takes about
// 2048 + 3072 + 2048 cycles, so blocks are separated by idle (zero) samples
// on the line; sym_start / dft_start mark the first prefix sample and the
// first block sample of every symbol on dac_data.  Using the Start bit to
// gate the transmitter is this design's own choice.
module tx_fpga
  import dmt_pkg::*;
#(
  parameter int unsigned LOG2N = N_DFT_LOG2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ser_en,
  input  logic                    ser_bit,
  output logic signed [DAC_W-1:0] dac_data,
  output logic                    sym_start,
  output logic                    dft_start,
  output logic                    idle
);

  logic [SF_W-1:0]    scale_factor;
  logic [CP_W-1:0]    cp_length;
  logic               run;
  logic               tbl_we;
  logic [LOG2N-2:0]   tbl_addr;
  logic [BL_W-1:0]    tbl_data;

  serial_bus_ctrl #(.TBL_AW(LOG2N - 1)) u_ser (
    .clk, .rst_n, .ser_en, .ser_bit,
    .scale_factor, .cp_length,
    .top_carrier(), .down_carrier(),
    .start(run), .tbl_we, .tbl_addr, .tbl_data);

  // IFFT and its restart loop
  logic               ifft_start, ifft_req, ifft_busy, ifft_done;
  logic [IDX_W-1:0]   index_input;
  logic               her_valid;
  logic [IDX_W-1:0]   her_idx;
  logic signed [SAMPLE_W-1:0] real_input, imag_input;
  logic               ifft_ov;
  logic [IDX_W-1:0]   ifft_oidx;
  logic signed [SAMPLE_W-1:0] real_out, imag_out;
  logic               cp_ready;

  assign ifft_start = run && !ifft_busy && !ifft_done && cp_ready;

  // bit loader
  logic               bl_valid;
  logic [IDX_W-1:0]   bl_idx;
  logic [BL_W-1:0]    bl_bits;

  bit_loader #(.AW(LOG2N - 1)) u_bit_loader (
    .clk, .rst_n,
    .wr_en(tbl_we), .wr_addr(tbl_addr), .wr_data(tbl_data),
    .rd_valid(ifft_req), .rd_idx(index_input),
    .out_valid(bl_valid), .out_idx(bl_idx), .out_bits(bl_bits));

  // randomizer bank + mapper
  logic               map_valid;
  logic [IDX_W-1:0]   map_idx;
  logic signed [SAMPLE_W-1:0] map_re, map_im;

  randomizer_mapper u_mapper (
    .clk, .rst_n,
    .in_valid(bl_valid), .in_idx(bl_idx), .in_bits(bl_bits),
    .out_valid(map_valid), .out_idx(map_idx), .out_word(),
    .out_re(map_re), .out_im(map_im));

  hermitic_gen #(.LOG2N(LOG2N)) u_hermitic (
    .clk, .rst_n,
    .in_valid(map_valid), .in_idx(map_idx), .in_re(map_re), .in_im(map_im),
    .out_valid(her_valid), .out_idx(her_idx),
    .out_re(real_input), .out_im(imag_input));

  fft_r4 #(.LOG2N(LOG2N), .DW(SAMPLE_W), .IDX_W(IDX_W), .SF_W(SF_W), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n,
    .start(ifft_start), .scale_factor,
    .in_req(ifft_req), .in_index(index_input),
    .in_valid(her_valid), .in_addr(her_idx), .in_re(real_input), .in_im(imag_input),
    .out_valid(ifft_ov), .out_index(ifft_oidx), .out_re(real_out), .out_im(imag_out),
    .busy(ifft_busy), .done(ifft_done));

  cp_insert #(.LOG2N(LOG2N)) u_cp (
    .clk, .rst_n, .cp_length,
    .in_valid(ifft_ov), .in_idx(ifft_oidx), .in_re(real_out), .in_done(ifft_done),
    .in_ready(cp_ready),
    .dac_data, .sym_start, .dft_start, .idle);

endmodule
