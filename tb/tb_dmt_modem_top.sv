// tb_dmt_modem_top: end-to-end run of the modem at its default sizes.
//
// The DAC output is looped back to the ADC through a flat channel of gain
// 0.75 (the DAC word times 3/16, i.e. 0.75 on the 12-bit ADC scale).  Both
// FPGAs are configured over their serial buses: 200 carriers 41..240 with
// bit loads cycling through 0..10, a 300-sample prefix, Scale_Factor 0x555
// in the transmitter (2^-6) and 0x155 in the receiver (2^-5), so that the
// round trip has unit gain.  The DSP side reads the FIFO at 100 MHz.  Every
// received carrier is decided twice and compared with an independent model
// of the randomizer bank: by the testbench's own slicer (which knows the
// channel gain) and by the modem's equalizer and detector, which is trained
// on symbol 0 with mu close to 1 and then runs decision-directed with
// mu = 0.1.
//
// Mechanisms counted, each of which must happen: prefix insertion
// (dft_start 300 samples after sym_start), idle line between symbols, each
// bit load 1..10 decided without error, the equalizer learning the 1/0.75
// gain and its detector deciding every later carrier correctly, carriers
// outside Down..Top not delivered, a FIFO overflow while the DSP stops
// reading, and the restart of delivery after it.  Finally the bit loads
// derived from the measured error energy are queried: each must match the
// load the testbench works out from the errors it saw itself (SNR-gap rule,
// 12.8 dB), and most carriers must reach 8 bits or more.
module tb_dmt_modem_top;
  import dmt_tb_pkg::*;
  localparam int N = 2048, CP = 300, K0 = 41, K1 = 240, NCAR = K1 - K0 + 1;
  logic clk = 1'b0, fclk = 1'b0, rst_n = 1'b0;
  logic tx_ser_en = 1'b0, tx_ser_bit = 1'b0, rx_ser_en = 1'b0, rx_ser_bit = 1'b0;
  logic signed [13:0] dac_data;
  logic signed [11:0] adc_data;
  logic tx_sym_start, tx_idle, dsp_rd = 1'b0, dsp_valid, dsp_empty;
  logic rx_overflow, rx_fft_done;
  logic [31:0] dsp_data;
  logic [15:0] rx_overflow_count;
  logic feq_clear = 1'b0, feq_in_valid = 1'b0, feq_train = 1'b0;
  logic feq_in_ready, feq_out_valid;
  logic [15:0] feq_mu = '0;
  logic [9:0] feq_idx = '0, feq_out_idx, feq_dec_word;
  logic [31:0] feq_y = '0;
  logic [3:0] feq_bits = '0;
  logic signed [15:0] feq_ref_re = '0, feq_ref_im = '0;
  logic signed [15:0] feq_eq_re, feq_eq_im, feq_dec_re, feq_dec_im;
  logic signed [16:0] feq_err_re, feq_err_im;
  logic bl_clear = 1'b0, bl_measure = 1'b0;
  logic [9:0] bl_q_idx = '0;
  logic [3:0] bl_q_bits;
  logic [15:0] bl_q_count;
  localparam real GAIN = 0.75;

  always #10 clk = ~clk;
  always #5  fclk = ~fclk;

  dmt_modem_top dut (.*);

  assign adc_data = 12'((32'(dac_data) * 3) >>> 4);     // flat channel, gain 0.75

  int words[$];
  always @(posedge fclk) begin
    #1;
    if (dsp_valid) words.push_back(int'(dsp_data));
  end

  // mechanism counters
  int n_prefix = 0, n_idle = 0, n_overflow = 0, n_symbols_ok = 0;
  int n_feq_trained = 0, n_feq_ok = 0, n_feq_bad = 0;
  int n_bits[11];
  int sym_t = -1, period = 0;
  always @(posedge clk) begin
    #1;
    if (tx_sym_start) begin
      if (sym_t > 0) period = sym_t + 1;
      sym_t = 0;
    end
    else if (sym_t >= 0) sym_t++;
    if (dut.u_tx.dft_start && sym_t == CP) n_prefix++;
    if (tx_idle && rst_n) n_idle++;
    if (rx_overflow) n_overflow++;
  end

  task automatic send(input bit rx, input logic [15:0] addr, input logic [15:0] data);
    logic [31:0] f = {addr, data};
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      if (rx) begin rx_ser_en = 1'b1; rx_ser_bit = f[i]; end
      else    begin tx_ser_en = 1'b1; tx_ser_bit = f[i]; end
    end
    @(negedge clk); rx_ser_en = 1'b0; tx_ser_en = 1'b0;
  endtask

  function automatic int bits_of(int k);
    return (k >= K0 && k <= K1) ? (k % 11) : 0;
  endfunction

  // Transmitted words of every symbol, in carrier order.
  lfsr_bank model;
  int tx_words[$];
  function automatic void model_symbol();
    for (int k = 0; k < N / 2; k++)
      if (bits_of(k) > 0) tx_words.push_back(model.draw(bits_of(k)));
  endfunction

  // Nearest point of the l-bit constellation (same geometry as the model).
  function automatic int slice(input real yr, input real yi, input int l);
    int best = 0;
    real bd = 1.0e30;
    for (int w = 0; w < (1 << l); w++) begin
      real pr, pi, d;
      map_point(w, l, 8192.0, pr, pi);
      d = (yr - pr) ** 2 + (yi - pi) ** 2;
      if (d < bd) begin bd = d; best = w; end
    end
    return best;
  endfunction

  // Error energy seen per carrier while measuring, and the load the gap rule
  // (9.8 dB for a 1e-5 error rate plus a 3 dB margin, even loads) gives for it.
  longint m_energy [N / 2];
  int     m_count [N / 2];
  function automatic int expect_load(input int k);
    real g = 10.0 ** (12.8 / 10.0);
    real sndr;
    int best = 0;
    if (m_count[k] == 0) return 0;
    if (m_energy[k] == 0) return 10;
    sndr = 8192.0 * 8192.0 * real'(m_count[k]) / real'(m_energy[k]);
    for (int l = 2; l <= 10; l += 2) if (sndr >= g * real'((1 << l) - 1)) best = l;
    return best;
  endfunction

  // Pass one received carrier through the modem's equalizer and detector.
  task automatic feq_carrier(input int k, input int w, input int l, input bit tr,
                             input int want);
    real pr, pi;
    map_point(want, l, 8192.0, pr, pi);
    @(negedge fclk);
    while (!feq_in_ready) @(negedge fclk);
    feq_idx = 10'(k); feq_y = 32'(w); feq_bits = 4'(l); feq_train = tr;
    feq_ref_re = 16'($rtoi(pr + (pr >= 0.0 ? 0.5 : -0.5)));
    feq_ref_im = 16'($rtoi(pi + (pi >= 0.0 ? 0.5 : -0.5)));
    feq_mu = tr ? 16'hffff : 16'd6554;
    bl_measure = !tr;
    feq_in_valid = 1'b1;
    @(negedge fclk);
    feq_in_valid = 1'b0;
    while (!feq_out_valid) @(negedge fclk);
    if (!tr) begin
      m_energy[k] += longint'(feq_err_re) * feq_err_re + longint'(feq_err_im) * feq_err_im;
      m_count[k]++;
    end
    if (tr) n_feq_trained++;
    else if (int'(feq_dec_word) == want && int'(feq_out_idx) == k) n_feq_ok++;
    else n_feq_bad++;
  endtask

  // Check one received symbol against the next transmitted one.
  task automatic check_symbol(input int sym);
    int errors = 0;
    real evm = 0.0, ref_pow = 0.0;
    for (int k = K0; k <= K1; k++) begin
      automatic int w = words.pop_front();
      automatic int l = bits_of(k);
      automatic real yr = real'(16'(w >>> 16)) / GAIN;
      automatic real yi = real'(16'(w)) / GAIN;
      if (l > 0) begin
        automatic int want = tx_words.pop_front();
        automatic int got = slice(yr, yi, l);
        real pr, pi;
        map_point(want, l, 8192.0, pr, pi);
        evm += (yr - pr) ** 2 + (yi - pi) ** 2;
        ref_pow += pr ** 2 + pi ** 2;
        if (got == want) n_bits[l]++;
        else errors++;
        feq_carrier(k, w, l, sym == 0, want);
      end
    end
    check(errors == 0, $sformatf("symbol %0d: %0d carrier errors", sym, errors));
    $display("symbol %0d: EVM %0.1f dB", sym, 10.0 * $log10(evm / ref_pow));
    if (errors == 0) n_symbols_ok++;
  endtask

  initial begin
    model = new();
    for (int l = 0; l <= 10; l++) n_bits[l] = 0;
    for (int k = 0; k < N / 2; k++) begin m_energy[k] = 0; m_count[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    dsp_rd = 1'b1;
    for (int k = 0; k < N / 2; k++) send(1'b0, 16'h1000 + 16'(k), 16'(bits_of(k)));
    send(1'b0, 16'h0000, 16'h0555);
    send(1'b0, 16'h0001, 16'(CP - 1));
    send(1'b1, 16'h0000, 16'h0155);
    send(1'b1, 16'h0002, 16'(K1));
    send(1'b1, 16'h0003, 16'(K0));
    send(1'b1, 16'h0004, 16'h0001);
    send(1'b0, 16'h0004, 16'h0001);       // transmitter runs
    // every transmitted symbol is received: the receiver finishes a block
    // before the transmitter's next one begins
    for (int s = 0; s < 3; s++) begin
      model_symbol();
      @(posedge rx_fft_done);
      repeat (10) @(negedge clk);
      check(words.size() == NCAR, $sformatf("symbol %0d: %0d words", s, words.size()));
      if (words.size() == NCAR) check_symbol(s);
    end
    // DSP stalls for three symbols: 600 bins for 512 places
    dsp_rd = 1'b0;
    for (int s = 3; s < 6; s++) begin
      model_symbol();
      @(posedge rx_fft_done);
    end
    repeat (10) @(negedge clk);
    check(int'(rx_overflow_count) == 3 * NCAR - 512, $sformatf("overflow count %0d", rx_overflow_count));
    dsp_rd = 1'b1;
    repeat (1200) @(negedge clk);
    check(words.size() == 512, $sformatf("%0d words after the stall", words.size()));
    // the first two stalled symbols arrived whole
    for (int s = 3; s < 5; s++) check_symbol(s);
    words.delete();
    // symbol 5 was cut short by the overflow; delivery resumes with symbol 6
    tx_words.delete();
    model_symbol();
    @(posedge rx_fft_done);
    repeat (10) @(negedge clk);
    check(words.size() == NCAR, $sformatf("after stall: %0d words", words.size()));
    if (words.size() == NCAR) check_symbol(6);
    // mechanisms
    check(n_prefix >= 7, $sformatf("prefix inserted %0d times", n_prefix));
    check(n_idle > 0, "idle line between symbols");
    check(n_overflow > 0, "FIFO overflow happened");
    check(n_symbols_ok == 6, $sformatf("%0d symbols decided without error", n_symbols_ok));
    for (int l = 1; l <= 10; l++)
      check(n_bits[l] > 0, $sformatf("bit load %0d exercised", l));
    check(n_feq_trained == 182, $sformatf("equalizer trained on %0d carriers", n_feq_trained));
    check(n_feq_ok == 5 * 182 && n_feq_bad == 0,
          $sformatf("equalizer decisions: %0d right, %0d wrong", n_feq_ok, n_feq_bad));
    $display("prefix %0d, idle cycles %0d, lost bins %0d, symbols ok %0d, symbol period %0d cycles",
             n_prefix, n_idle, n_overflow, n_symbols_ok, period);
    begin
      automatic int n_q = 0, n_q_ok = 0, n_q_high = 0;
      for (int k = K0; k <= K1; k++) begin
        automatic int want = expect_load(k);
        @(negedge fclk) bl_q_idx = 10'(k);
        @(posedge fclk); #1;
        n_q++;
        if (int'(bl_q_count) == m_count[k] && int'(bl_q_bits) == want) n_q_ok++;
        else $display("carrier %0d: count %0d bits %0d, want %0d and %0d", k, bl_q_count,
                      bl_q_bits, m_count[k], want);
        if (bl_q_bits >= 4'd8) n_q_high++;
      end
      check(n_q_ok == n_q, $sformatf("bit loading: %0d of %0d carriers as expected", n_q_ok, n_q));
      check(n_q_high >= 170, $sformatf("%0d carriers granted 8 bits or more", n_q_high));
      $display("bit loading from measured SNDR: %0d of %0d carriers as expected, %0d at 8 bits or more",
               n_q_ok, n_q, n_q_high);
    end
    $display("equalizer: trained %0d carriers, then %0d decisions right, %0d wrong",
             n_feq_trained, n_feq_ok, n_feq_bad);
    report();
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
