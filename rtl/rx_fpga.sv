// rx_fpga: receiver side of the DMT modem, up to the bus towards the DSP.
//
// The 12-bit ADC word is registered and placed in the upper bits of the
// FFT's 16-bit real input (the imaginary input is tied to zero).  There is
// no prefix removal here: when Start is set and the FFT is idle, the FFT
// begins a block on rx_sync, which must coincide with the first sample
// after the cyclic prefix on adc_data.  On a shared board rx_sync can come
// straight from the transmitter; that link is this design's own choice.
// The FFT's 16-bit real and imaginary outputs are packed into one 32-bit
// word (real in bits 31:16) and, for indices between Down_Carrier and
// Top_Carrier, written into a 512-word dual-clock FIFO read by the DSP at
// 100 MHz (fclk).  A DSP read (dsp_rd while !dsp_empty) returns its word on
// dsp_data with dsp_valid one fclk later.
module rx_fpga
  import dmt_pkg::*;
#(
  parameter int unsigned LOG2N      = N_DFT_LOG2,
  parameter int unsigned FIFO_WORDS = FIFO_DEPTH
) (
  input  logic                    clk,         // SCLK_G, 50 MHz
  input  logic                    fclk,        // FCLK_G, 100 MHz
  input  logic                    rst_n,
  input  logic                    ser_en,
  input  logic                    ser_bit,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic                    rx_sync,
  input  logic                    dsp_rd,
  output logic [BUS_W-1:0]        dsp_data,
  output logic                    dsp_valid,
  output logic                    dsp_empty,
  output logic                    overflow,
  output logic [15:0]             overflow_count,
  output logic                    fft_done
);

  logic [SF_W-1:0]  scale_factor;
  logic [IDX_W-1:0] top_carrier, down_carrier;
  logic             start;

  serial_bus_ctrl #(.TBL_AW(LOG2N - 1)) u_ser (
    .clk, .rst_n, .ser_en, .ser_bit,
    .scale_factor, .cp_length(),
    .top_carrier, .down_carrier,
    .start, .tbl_we(), .tbl_addr(), .tbl_data());

  logic signed [ADC_W-1:0] adc_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) adc_q <= '0;
    else        adc_q <= adc_data;

  logic               fft_busy, fft_req, bin_valid;
  logic [IDX_W-1:0]   fft_index, index_output;
  logic signed [SAMPLE_W-1:0] real_output, imag_output, real_input;

  assign real_input = {adc_q, {(SAMPLE_W-ADC_W){1'b0}}};

  fft_r4 #(.LOG2N(LOG2N), .DW(SAMPLE_W), .IDX_W(IDX_W), .SF_W(SF_W), .INVERSE(1'b0)) u_fft (
    .clk, .rst_n,
    .start(start && rx_sync && !fft_busy), .scale_factor,
    .in_req(fft_req), .in_index(fft_index),
    .in_valid(fft_req), .in_addr(fft_index), .in_re(real_input), .in_im('0),
    .out_valid(bin_valid), .out_index(index_output),
    .out_re(real_output), .out_im(imag_output),
    .busy(fft_busy), .done(fft_done));

  // PACK: real part in the upper half of the bus word
  logic [BUS_W-1:0] packed_word;
  assign packed_word = {real_output, imag_output};

  logic fifo_wen, fifo_ren, fifo_full;

  fifo_ctrl u_fifo_ctrl (
    .clk, .rst_n, .start, .top_carrier, .down_carrier,
    .bin_valid, .index_output, .fifo_full, .fifo_wen,
    .overflow, .overflow_count,
    .dsp_rd, .fifo_empty(dsp_empty), .fifo_ren);

  async_fifo #(.WIDTH(BUS_W), .DEPTH(FIFO_WORDS)) u_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(fifo_wen), .wr_data(packed_word),
    .wr_full(fifo_full),
    .rd_clk(fclk), .rd_rst_n(rst_n), .rd_en(fifo_ren),
    .rd_data(dsp_data), .rd_valid(dsp_valid), .rd_empty(dsp_empty));

endmodule
