// tb_fft_r4: checks the radix-4 (I)FFT engine against a direct DFT computed
// in double precision.
//
// Three engines run: a 2048-point inverse transform (the transmitter's
// configuration, odd log2 so it ends with a radix-2 stage), a 64-point
// forward transform (even log2, radix-4 stages only) and a 32-point forward
// transform with saturation provoked by a zero Scale_Factor.  Each output
// bin must lie within a few LSBs of the reference scaled by 2^-(total shift),
// outputs must come out in natural order one per cycle, and the compute time
// must be NSTAGES*N/4 cycles.
module tb_fft_r4;
  localparam int unsigned IDX_W = 12;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // One test harness per engine configuration.
  `define FFT_HARNESS(NAME, LG, INV)                                          \
    logic                  NAME``_start, NAME``_req, NAME``_iv, NAME``_ov;     \
    logic                  NAME``_busy, NAME``_done;                           \
    logic [IDX_W-1:0]      NAME``_idx, NAME``_iaddr, NAME``_oidx;              \
    logic signed [15:0]    NAME``_ire, NAME``_iim, NAME``_ore, NAME``_oim;     \
    logic [11:0]           NAME``_sf;                                          \
    fft_r4 #(.LOG2N(LG), .INVERSE(INV)) NAME (                                 \
      .clk, .rst_n, .start(NAME``_start), .scale_factor(NAME``_sf),           \
      .in_req(NAME``_req), .in_index(NAME``_idx), .in_valid(NAME``_iv),        \
      .in_addr(NAME``_iaddr), .in_re(NAME``_ire), .in_im(NAME``_iim),          \
      .out_valid(NAME``_ov), .out_index(NAME``_oidx), .out_re(NAME``_ore),     \
      .out_im(NAME``_oim), .busy(NAME``_busy), .done(NAME``_done));

  `FFT_HARNESS(big, 11, 1'b1)
  `FFT_HARNESS(mid, 6, 1'b0)
  `FFT_HARNESS(sml, 5, 1'b0)

  // Reference DFT with sign -1 (forward) or +1 (inverse), scaled by 2^-shift.
  task automatic ref_dft(input int n, input bit inv, input int shift,
                         input int xr[], input int xi[],
                         output real yr[], output real yi[]);
    real pi2 = 2.0 * 3.14159265358979323846;
    real sgn = inv ? 1.0 : -1.0;
    yr = new[n];
    yi = new[n];
    for (int k = 0; k < n; k++) begin
      real ar = 0.0, ai = 0.0;
      for (int t = 0; t < n; t++) begin
        real ang = sgn * pi2 * real'((k * t) % n) / real'(n);
        ar += xr[t] * $cos(ang) - xi[t] * $sin(ang);
        ai += xr[t] * $sin(ang) + xi[t] * $cos(ang);
      end
      yr[k] = ar / (2.0 ** shift);
      yi[k] = ai / (2.0 ** shift);
    end
  endtask

  function automatic real clip(input real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  // Drive one transform and check it.  Producer latency is one cycle.
  `define RUN_FFT(NAME, LG, INV, SF, AMP, TOL, SAT)                           \
    begin                                                                     \
      int n = 1 << LG;                                                        \
      int xr[], xi[];                                                         \
      real yr[], yi[];                                                        \
      int shift = 0, got = 0, t_last_in = 0, t_first_out = -1, cyc = 0;      \
      int nst = (LG / 2) + (LG % 2);                                          \
      int expect_k = 0;                                                       \
      logic [11:0] sfv = SF;                                                  \
      xr = new[n]; xi = new[n];                                               \
      for (int i = 0; i < n; i++) begin                                       \
        xr[i] = int'($urandom_range(2 * AMP)) - AMP;                          \
        xi[i] = int'($urandom_range(2 * AMP)) - AMP;                          \
      end                                                                     \
      for (int s = 0; s < nst; s++) shift += int'(sfv[2*s +: 2]);              \
      ref_dft(n, INV, shift, xr, xi, yr, yi);                                 \
      NAME``_sf = SF;                                                         \
      @(negedge clk) NAME``_start = 1'b1;                                     \
      @(negedge clk) NAME``_start = 1'b0;                                     \
      while (got < n) begin                                                   \
        logic req_d; logic [IDX_W-1:0] idx_d;                                 \
        req_d = NAME``_req; idx_d = NAME``_idx;                               \
        @(posedge clk); #1 cyc++;                                              \
        if (NAME``_ov) begin                                                  \
          real er, ei;                                                        \
          if (t_first_out < 0) t_first_out = cyc;                             \
          er = real'(NAME``_ore) - clip(yr[expect_k]);                        \
          ei = real'(NAME``_oim) - clip(yi[expect_k]);                        \
          check(int'(NAME``_oidx) == expect_k, $sformatf("%s order k=%0d got %0d", `"NAME`", expect_k, NAME``_oidx)); \
          check((SAT || (er < TOL && er > -TOL && ei < TOL && ei > -TOL)),     \
                $sformatf("%s bin %0d got (%0d,%0d) want (%f,%f)", `"NAME`",   \
                          expect_k, NAME``_ore, NAME``_oim, yr[expect_k], yi[expect_k])); \
          if (SAT) check(NAME``_ore <= 32767 && NAME``_ore >= -32768, "sat range"); \
          expect_k++; got++;                                                  \
        end                                                                   \
        NAME``_iv = req_d;                                                    \
        NAME``_iaddr = idx_d;                                                 \
        if (req_d) begin                                                      \
          NAME``_ire = 16'(xr[idx_d]); NAME``_iim = 16'(xi[idx_d]);           \
          t_last_in = cyc + 1;                                                \
        end                                                                   \
      end                                                                     \
      @(posedge clk); #1;                                                     \
      check(!NAME``_busy, "engine idle after unload");                        \
      check(t_first_out - t_last_in == nst * n / 4 + 1,                       \
            $sformatf("%s compute cycles %0d want %0d", `"NAME`",             \
                      t_first_out - t_last_in, nst * n / 4 + 1));             \
    end

  initial begin
    {big_start, mid_start, sml_start, big_iv, mid_iv, sml_iv} = '0;
    {big_iaddr, mid_iaddr, sml_iaddr} = '0;
    {big_ire, big_iim, mid_ire, mid_iim, sml_ire, sml_iim} = '0;
    {big_sf, mid_sf, sml_sf} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 64-point forward, one bit per stage
    `RUN_FFT(mid, 6, 1'b0, 12'h015, 8000, 4.0, 1'b0)
    `RUN_FFT(mid, 6, 1'b0, 12'h02a, 16000, 4.0, 1'b0)
    // 32-point forward, even and odd shifts, then no scaling (saturates)
    `RUN_FFT(sml, 5, 1'b0, 12'h036, 12000, 4.0, 1'b0)
    `RUN_FFT(sml, 5, 1'b0, 12'h000, 30000, 4.0, 1'b1)
    // 2048-point inverse, one bit per stage (total shift 6)
    `RUN_FFT(big, 11, 1'b1, 12'h555, 4000, 6.0, 1'b0)
    // 2048-point inverse with 2,2,2,2,2,1 (total shift 11)
    `RUN_FFT(big, 11, 1'b1, 12'h6aa, 30000, 6.0, 1'b0)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
