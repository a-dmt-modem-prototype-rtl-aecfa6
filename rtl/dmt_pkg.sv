// dmt_pkg: constants and types shared by the DMT modem blocks.
//
// The numbers follow the modem's system parameters: a 2048-point DFT
// (so 1024 possible baseband carriers), 16-bit fixed-point samples inside
// the (I)FFT, constellations of 0 to 10 bits, a 14-bit DAC word and a 12-bit
// ADC word, 12-bit carrier indices and Scale_Factor, 9-bit CP_Length.
// The serial-bus register map at the end is this design's own choice.
package dmt_pkg;

  localparam int unsigned N_DFT_LOG2 = 11;               // N_DFT = 2048
  localparam int unsigned N_DFT      = 1 << N_DFT_LOG2;
  localparam int unsigned N_HALF     = N_DFT / 2;        // carriers 0..1023
  localparam int unsigned SAMPLE_W   = 16;               // (I)FFT word
  localparam int unsigned IDX_W      = 12;               // Index_input / Index_Output
  localparam int unsigned SF_W       = 12;               // Scale_Factor
  localparam int unsigned CP_W       = 9;                // CP_Length
  localparam int unsigned BL_W       = 4;                // bit-load word
  localparam int unsigned MAX_BITS   = 10;               // largest constellation 2^10
  localparam int unsigned DAC_W      = 14;
  localparam int unsigned ADC_W      = 12;
  localparam int unsigned BUS_W      = 32;               // FPGA-DSP bus / FIFO word
  localparam int unsigned FIFO_DEPTH = 512;

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // Level multiplier of an l-bit rectangular constellation (see
  // randomizer_mapper): levels are odd integers, a point is level * gain / 16,
  // and the gain makes the mean energy per carrier equal to rms^2.
  typedef logic [17:0] gain_t;

  function automatic gain_t qam_gain(input int l, input int unsigned rms);
    int  bi = (l + 1) / 2;
    int  bq = l / 2;
    real e;
    if (l <= 0) return '0;
    e = (real'((1 << (2 * bi)) - 1) + real'((1 << (2 * bq)) - 1)) / 3.0;
    return gain_t'($rtoi($floor(16.0 * real'(rms) / $sqrt(e) + 0.5)));
  endfunction

  // Serial bus frames are 32 bits: a 16-bit register address, then 16 bits
  // of data, most significant bit first.
  localparam logic [15:0] REG_SCALE_FACTOR = 16'h0000;
  localparam logic [15:0] REG_CP_LENGTH    = 16'h0001;
  localparam logic [15:0] REG_TOP_CARRIER  = 16'h0002;
  localparam logic [15:0] REG_DOWN_CARRIER = 16'h0003;
  localparam logic [15:0] REG_CONTROL      = 16'h0004;   // bit 0: Start / run
  localparam logic [15:0] REG_BITLOAD_BASE = 16'h1000;   // 0x1000 + carrier

endpackage
