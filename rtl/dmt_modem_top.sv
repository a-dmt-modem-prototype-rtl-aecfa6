// dmt_modem_top: the digital part of the DMT power-line modem board.
//
// The transmitter FPGA and the receiver FPGA sit side by side and share the
// 50 MHz sampling clock, so the receiver needs no clock recovery.  Each has
// its own serial configuration bus from the DSP.  The converters, coupling
// circuits and power line are outside this module: dac_data goes to the
// 14-bit DAC and adc_data comes from the 12-bit ADC.  The transmitter's
// dft_start strobe (first sample after the cyclic prefix) is handed to the
// receiver as its block sync, which assumes the analog path adds no delay
// in samples; this shared-board sync is this design's own choice.  The
// receiver's FIFO is read by the DSP on the 100 MHz bus clock fclk.
//
// On the DSP side sits the frequency equalizer and detector (feq_lms), also
// clocked by fclk.  The DSP program hands it each FIFO word (feq_y, packed
// real part high) with the carrier index, the carrier's bit load and, while
// training, the known training point; it returns the equalised point, the
// decision and the decision error.  In the modem's description this stage is
// software on the DSP; building it as logic next to the FIFO is this design's
// own choice, and which words reach it, with which index and bit load, is
// left to the DSP program.  Next to it, bit_alloc collects the equalizer's
// error energy per carrier while bl_measure is high (the training phase)
// and answers a carrier query on bl_q_idx with the bit load that carrier
// can carry (bl_q_bits, one fclk later), which the DSP then writes into the
// transmitter's bit-load table over the serial bus.
//
// Interface timing: tx_* and adc_data on clk; dsp_* and feq_* on fclk.
module dmt_modem_top
  import dmt_pkg::*;
(
  input  logic                       clk,           // 50 MHz sampling clock
  input  logic                       fclk,          // 100 MHz DSP bus clock
  input  logic                       rst_n,
  input  logic                       tx_ser_en,
  input  logic                       tx_ser_bit,
  input  logic                       rx_ser_en,
  input  logic                       rx_ser_bit,
  output logic signed [DAC_W-1:0]    dac_data,
  output logic                       tx_sym_start,
  output logic                       tx_idle,
  input  logic signed [ADC_W-1:0]    adc_data,
  input  logic                       dsp_rd,
  output logic [BUS_W-1:0]           dsp_data,
  output logic                       dsp_valid,
  output logic                       dsp_empty,
  output logic                       rx_overflow,
  output logic [15:0]                rx_overflow_count,
  output logic                       rx_fft_done,
  // equalizer / detector (fclk domain)
  input  logic                       feq_clear,
  input  logic [15:0]                feq_mu,
  input  logic                       feq_in_valid,
  output logic                       feq_in_ready,
  input  logic [IDX_W-3:0]           feq_idx,
  input  logic [BUS_W-1:0]           feq_y,
  input  logic [BL_W-1:0]            feq_bits,
  input  logic                       feq_train,
  input  logic signed [SAMPLE_W-1:0] feq_ref_re,
  input  logic signed [SAMPLE_W-1:0] feq_ref_im,
  output logic                       feq_out_valid,
  output logic [IDX_W-3:0]           feq_out_idx,
  output logic signed [SAMPLE_W-1:0] feq_eq_re,
  output logic signed [SAMPLE_W-1:0] feq_eq_im,
  output logic signed [SAMPLE_W-1:0] feq_dec_re,
  output logic signed [SAMPLE_W-1:0] feq_dec_im,
  output logic [MAX_BITS-1:0]        feq_dec_word,
  output logic signed [SAMPLE_W:0]   feq_err_re,
  output logic signed [SAMPLE_W:0]   feq_err_im,
  // SNDR estimation and bit loading (fclk domain)
  input  logic                       bl_clear,
  input  logic                       bl_measure,
  input  logic [IDX_W-3:0]           bl_q_idx,
  output logic [BL_W-1:0]            bl_q_bits,
  output logic [15:0]                bl_q_count
);

  logic tx_dft_start;

  tx_fpga u_tx (
    .clk, .rst_n, .ser_en(tx_ser_en), .ser_bit(tx_ser_bit),
    .dac_data, .sym_start(tx_sym_start), .dft_start(tx_dft_start), .idle(tx_idle));

  rx_fpga u_rx (
    .clk, .fclk, .rst_n, .ser_en(rx_ser_en), .ser_bit(rx_ser_bit),
    .adc_data, .rx_sync(tx_dft_start),
    .dsp_rd, .dsp_data, .dsp_valid, .dsp_empty,
    .overflow(rx_overflow), .overflow_count(rx_overflow_count),
    .fft_done(rx_fft_done));

  feq_lms #(.AW(IDX_W - 2)) u_feq (
    .clk(fclk), .rst_n, .clear(feq_clear), .mu(feq_mu),
    .in_valid(feq_in_valid), .in_ready(feq_in_ready), .in_idx(feq_idx),
    .y_re(feq_y[BUS_W-1:SAMPLE_W]), .y_im(feq_y[SAMPLE_W-1:0]),
    .bits(feq_bits), .train(feq_train), .ref_re(feq_ref_re), .ref_im(feq_ref_im),
    .out_valid(feq_out_valid), .out_idx(feq_out_idx),
    .eq_re(feq_eq_re), .eq_im(feq_eq_im), .dec_re(feq_dec_re), .dec_im(feq_dec_im),
    .dec_word(feq_dec_word), .err_re(feq_err_re), .err_im(feq_err_im));

  bit_alloc #(.AW(IDX_W - 2)) u_alloc (
    .clk(fclk), .rst_n, .clear(bl_clear),
    .in_valid(feq_out_valid && bl_measure), .in_idx(feq_out_idx),
    .err_re(feq_err_re), .err_im(feq_err_im),
    .q_idx(bl_q_idx), .q_bits(bl_q_bits), .q_count(bl_q_count));

endmodule
