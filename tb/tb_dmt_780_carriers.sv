// tb_dmt_780_carriers: the modem with its widest carrier set, 780 carriers
// (indices 41..820, i.e. 1 MHz to 20 MHz at 24.4 kHz spacing), default sizes.
//
// The DAC is looped back to the ADC through an ideal channel.  Bit loads
// are 2..6 bits (2 + k mod 5).  On the DSP side a reader takes words from
// the FIFO only as fast as the equalizer accepts them (one carrier per four
// 100 MHz clocks), so during each 780-bin burst the FIFO itself holds the
// backlog.  Symbol 0 trains the equalizer, symbols 1..3 are decided by it.
//
// Checks: no bin lost (overflow count 0), the FIFO backlog stays within its
// 512 words but does build up (more than 256 words, so the buffering is
// really used), every carrier of every symbol comes out of the equalizer
// with the right index, and every decision of symbols 1..3 equals the word
// of an independent model of the randomizer bank.
module tb_dmt_780_carriers;
  import dmt_tb_pkg::*;
  localparam int N = 2048, CP = 300, K0 = 41, K1 = 820, NCAR = K1 - K0 + 1, NSYM = 4;
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

  always #10 clk = ~clk;
  always #5  fclk = ~fclk;

  dmt_modem_top dut (.*);

  assign adc_data = dac_data[13:2];        // ideal channel

  function automatic int bits_of(int k);
    return (k >= K0 && k <= K1) ? 2 + (k % 5) : 0;
  endfunction

  // transmitted words, symbol after symbol, carrier after carrier
  lfsr_bank model;
  int tx_words[$];

  // FIFO occupancy seen from both sides
  int n_written = 0, n_read = 0, backlog_max = 0;
  always @(posedge clk) begin
    #1;
    if (dut.u_rx.fifo_wen) n_written++;
    if (n_written - n_read > backlog_max) backlog_max = n_written - n_read;
  end

  // DSP reader: keeps at most two words waiting for the equalizer
  int rxq[$];
  bit rd_pending = 1'b0;
  always @(posedge fclk) begin
    #1;
    if (dsp_valid) begin
      rxq.push_back(int'(dsp_data));
      n_read++;
    end
  end
  always @(negedge fclk) begin
    rd_pending = dsp_rd;
    dsp_rd = rst_n && !dsp_empty && !rd_pending && (rxq.size() < 2);
  end

  // Equalizer feeder: one word per accepted handshake
  typedef struct { int k; int l; int w; bit tr; } job_t;
  job_t inflight[$];
  int fed = 0;
  always @(negedge fclk) begin
    feq_in_valid = 1'b0;
    if (feq_in_ready && rxq.size() > 0 && fed < NSYM * NCAR) begin
      automatic int sym = fed / NCAR;
      automatic int k = K0 + fed % NCAR;
      automatic int l = bits_of(k);
      automatic int w = tx_words[fed];
      automatic real pr, pi;
      map_point(w, l, 8192.0, pr, pi);
      feq_y = 32'(rxq.pop_front());
      feq_idx = 10'(k);
      feq_bits = 4'(l);
      feq_train = (sym == 0);
      feq_mu = (sym == 0) ? 16'hffff : 16'd6554;
      feq_ref_re = 16'($rtoi(pr + (pr >= 0.0 ? 0.5 : -0.5)));
      feq_ref_im = 16'($rtoi(pi + (pi >= 0.0 ? 0.5 : -0.5)));
      feq_in_valid = 1'b1;
      inflight.push_back('{k, l, w, sym == 0});
      fed++;
    end
  end

  // Equalizer results
  int n_out = 0, n_ok = 0, n_bad = 0, n_idx_bad = 0;
  always @(posedge fclk) begin
    #1;
    if (feq_out_valid) begin
      automatic job_t j = inflight.pop_front();
      n_out++;
      if (int'(feq_out_idx) != j.k) n_idx_bad++;
      if (!j.tr) begin
        if (int'(feq_dec_word) == j.w) n_ok++;
        else begin
          n_bad++;
          if (n_bad < 10) $display("carrier %0d l=%0d decided %0d sent %0d", j.k, j.l, feq_dec_word, j.w);
        end
      end
    end
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

  initial begin
    model = new();
    for (int s = 0; s < NSYM; s++)
      for (int k = K0; k <= K1; k++) tx_words.push_back(model.draw(bits_of(k)));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N / 2; k++) send(1'b0, 16'h1000 + 16'(k), 16'(bits_of(k)));
    send(1'b0, 16'h0000, 16'h0555);
    send(1'b0, 16'h0001, 16'(CP - 1));
    send(1'b1, 16'h0000, 16'h0155);
    send(1'b1, 16'h0002, 16'(K1));
    send(1'b1, 16'h0003, 16'(K0));
    send(1'b1, 16'h0004, 16'h0001);
    send(1'b0, 16'h0004, 16'h0001);
    while (n_out < NSYM * NCAR) @(negedge clk);
    check(rx_overflow_count == 0, $sformatf("%0d bins lost", rx_overflow_count));
    check(backlog_max <= 512, $sformatf("backlog %0d words", backlog_max));
    check(backlog_max > 256, $sformatf("FIFO buffering used: backlog %0d words", backlog_max));
    check(n_idx_bad == 0, $sformatf("%0d carriers out of order", n_idx_bad));
    check(n_ok == (NSYM - 1) * NCAR && n_bad == 0,
          $sformatf("decisions: %0d right, %0d wrong", n_ok, n_bad));
    $display("780 carriers: FIFO backlog peak %0d words, %0d decisions right, %0d wrong",
             backlog_max, n_ok, n_bad);
    report();
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
