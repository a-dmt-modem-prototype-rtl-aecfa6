// tb_tx_fpga: the whole transmitter at full size (2048-point IFFT).
//
// Configures it over the serial bus like the DSP would: carriers 41..240
// carry bit loads cycling through 0..10 (the rest are unused),
// Scale_Factor = 0x555 (one bit per stage, 2^-6 in all) and a 300-sample
// prefix.  For three symbols it captures the DAC line and compares it with
// an independent model: LFSR bank -> ideal constellation points ->
// Hermitian spectrum -> double-precision inverse DFT / 64 -> two LSBs
// dropped.  It checks the prefix (the last 300 samples, repeated exactly),
// the dft_start marker 300 samples after sym_start, the symbol length of
// 2348 samples, and that idle samples separate the symbols.
module tb_tx_fpga;
  import dmt_tb_pkg::*;
  localparam int N = 2048, CP = 300, K0 = 41, K1 = 240;
  logic clk = 1'b0, rst_n = 1'b0, ser_en = 1'b0, ser_bit = 1'b0;
  logic signed [13:0] dac_data;
  logic sym_start, dft_start, idle;
  lfsr_bank model;

  always #10 clk = ~clk;

  tx_fpga dut (.*);

  task automatic send(input logic [15:0] addr, input logic [15:0] data);
    logic [31:0] f = {addr, data};
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk); ser_en = 1'b1; ser_bit = f[i];
    end
    @(negedge clk); ser_en = 1'b0;
  endtask

  function automatic int bits_of(int k);
    return (k >= K0 && k <= K1) ? (k % 11) : 0;
  endfunction

  int line[$];
  int idle_seen = 0;

  initial begin
    int max_err = 0;
    model = new();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N / 2; k++) send(16'h1000 + 16'(k), 16'(bits_of(k)));
    send(16'h0000, 16'h0555);
    send(16'h0001, 16'(CP - 1));
    send(16'h0004, 16'h0001);
    for (int s = 0; s < 3; s++) begin
      real xr[], xi[], yr[], yi[];
      automatic int t_dft = -1;
      xr = new[N]; xi = new[N];
      for (int k = 0; k < N; k++) begin xr[k] = 0.0; xi[k] = 0.0; end
      for (int k = 0; k < N / 2; k++) begin
        automatic int l = bits_of(k);
        if (l > 0) begin
          real pr, pi;
          map_point(model.draw(l), l, 8192.0, pr, pi);
          xr[k] = pr; xi[k] = pi;
          xr[N - k] = pr; xi[N - k] = -pi;
        end
      end
      dft(N, 1'b1, 6, xr, xi, yr, yi);
      // wait for the symbol and capture it
      idle_seen = 0;
      while (!sym_start) begin
        @(posedge clk); #1;
        if (idle) idle_seen++;
      end
      if (s > 0) check(idle_seen > 0, "idle gap between symbols");
      line.delete();
      for (int t = 0; t < N + CP; t++) begin
        check(!idle, "no idle inside a symbol");
        if (dft_start) begin
          check(t_dft < 0, "single dft_start");
          t_dft = t;
        end
        if (t > 0) check(!sym_start, "single sym_start");
        line.push_back(int'(dac_data));
        @(posedge clk); #1;
      end
      check(t_dft == CP, $sformatf("dft_start at %0d", t_dft));
      check(idle || sym_start, "symbol ends after 2348 samples");
      for (int t = 0; t < CP; t++)
        check(line[t] == line[N + t], $sformatf("prefix sample %0d", t));
      for (int t = 0; t < N; t++) begin
        automatic real want = yr[t] / 4.0;
        automatic real err = real'(line[CP + t]) - want;
        if (err < 0) err = -err;
        if (int'(err) > max_err) max_err = int'(err);
        check(err <= 3.0, $sformatf("sym %0d t %0d dac %0d want %f", s, t, line[CP + t], want));
      end
    end
    $display("max DAC error %0d LSB", max_err);
    report();
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
