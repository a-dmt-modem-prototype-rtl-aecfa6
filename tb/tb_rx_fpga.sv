// tb_rx_fpga: the receiver at full size (2048-point FFT, 512-word FIFO).
//
// Drives the ADC with random 12-bit samples, pulses rx_sync on the first
// sample of a block, and reads the FIFO as the DSP would at 100 MHz.  With
// Down_Carrier = 41, Top_Carrier = 240 and Scale_Factor = 0x155 (2^-5), the
// DSP must receive exactly bins 41..240 of the block, packed real:imag,
// within a few LSBs of a double-precision DFT of the samples.  Then the DSP
// stops reading for four blocks (800 bins for 512 places): the FIFO
// control must count 288 lost bins and the DSP must then drain 512 words,
// which must be bins 41..240 of the next blocks, in order.
module tb_rx_fpga;
  import dmt_tb_pkg::*;
  localparam int N = 2048, K0 = 41, K1 = 240;
  logic clk = 1'b0, fclk = 1'b0, rst_n = 1'b0, ser_en = 1'b0, ser_bit = 1'b0;
  logic signed [11:0] adc_data = '0;
  logic rx_sync = 1'b0, dsp_rd = 1'b0, dsp_valid, dsp_empty, overflow, fft_done;
  logic [31:0] dsp_data;
  logic [15:0] overflow_count;
  int   words[$];

  always #10 clk = ~clk;
  always #5  fclk = ~fclk;

  rx_fpga dut (.*);

  always @(posedge fclk) begin
    #1;
    if (dsp_valid) words.push_back(int'(dsp_data));
  end

  task automatic send(input logic [15:0] addr, input logic [15:0] data);
    logic [31:0] f = {addr, data};
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk); ser_en = 1'b1; ser_bit = f[i];
    end
    @(negedge clk); ser_en = 1'b0;
  endtask

  // Send one block of N random samples; return them in xr.
  task automatic block(output real xr[]);
    xr = new[N];
    @(negedge clk);
    while (dut.fft_busy) @(negedge clk);
    for (int t = 0; t < N; t++) begin
      automatic int v = $urandom_range(600) - 300;
      adc_data = 12'(v);
      xr[t] = real'(v * 16);
      rx_sync = (t == 0);
      @(negedge clk);
    end
    rx_sync = 1'b0;
    adc_data = '0;
  endtask

  initial begin
    real xr[], xi[], yr[], yi[];
    int max_err = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(16'h0000, 16'h0155);
    send(16'h0002, 16'(K1));
    send(16'h0003, 16'(K0));
    send(16'h0004, 16'h0001);
    // block 1, DSP reading
    dsp_rd = 1'b1;
    block(xr);
    xi = new[N];
    foreach (xi[t]) xi[t] = 0.0;
    dft(N, 1'b0, 5, xr, xi, yr, yi);
    @(posedge fft_done);
    repeat (20) @(negedge clk);
    check(words.size() == K1 - K0 + 1, $sformatf("%0d words for one block", words.size()));
    for (int k = K0; k <= K1 && words.size() > 0; k++) begin
      automatic int w = words.pop_front();
      automatic real er = real'(16'(w >>> 16)) - yr[k];
      automatic real ei = real'(16'(w)) - yi[k];
      check(er < 4.0 && er > -4.0 && ei < 4.0 && ei > -4.0,
            $sformatf("bin %0d got (%0d,%0d) want (%f,%f)", k, 16'(w >>> 16), 16'(w), yr[k], yi[k]));
    end
    check(overflow_count == 0, "no overflow while reading");
    // four blocks without reading
    dsp_rd = 1'b0;
    for (int b = 0; b < 4; b++) begin
      block(xr);
      dft(N, 1'b0, 5, xr, xi, yr, yi);
      if (b < 2) begin
        // remember the expected bins of the first blocks
        for (int k = K0; k <= K1; k++) begin
          automatic int er = int'(yr[k]);
          exp_re.push_back(er);
        end
      end
    end
    @(posedge fft_done);
    repeat (10) @(negedge clk);
    check(int'(overflow_count) == 4 * (K1 - K0 + 1) - 512,
          $sformatf("overflow count %0d", overflow_count));
    dsp_rd = 1'b1;
    repeat (600) @(negedge clk);
    check(words.size() == 512, $sformatf("drained %0d words", words.size()));
    check(dsp_empty, "empty after drain");
    for (int i = 0; i < 400 && words.size() > 0; i++) begin
      automatic int w = words.pop_front();
      automatic int d = int'(16'(w >>> 16)) - exp_re[i];
      check(d < 4 && d > -4, $sformatf("stored word %0d", i));
    end
    report();
    $finish;
  end
  int exp_re[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
