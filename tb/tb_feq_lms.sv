// tb_feq_lms: checks the equalizer/detector against a floating-point model
// of the same normalised LMS recursion, over 24 carriers of a random
// complex channel (gain 0.25..2, any phase) with a little additive noise.
//
//   * an untouched carrier equalises with W = 1 (S~ = Y);
//   * training with QPSK reference points at mu = 0.1: every S~ must track
//     the model, e must equal S~ - reference, and at the end the equalised
//     points must sit within -40 dB of the references;
//   * decision-directed data with loads of 1..10 bits: every word decided
//     correctly, S^ equal to the transmitter's point, e = S~ - S^;
//   * a channel rotating 0.4 degrees per symbol is tracked with each of the
//     step sizes 0.05, 0.1 and 0.15 (16-QAM, no decision errors) but not
//     with mu = 0 (errors appear);
//   * a zero bin leaves W unchanged, and `clear` brings back W = 1.
module tb_feq_lms;
  import dmt_pkg::*;
  import dmt_tb_pkg::*;

  localparam int NCAR = 24;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [15:0] mu = '0;
  logic in_valid = 1'b0, in_ready, train = 1'b0, out_valid;
  logic [9:0] in_idx = '0, out_idx;
  logic signed [15:0] y_re = '0, y_im = '0, ref_re = '0, ref_im = '0;
  logic [3:0] bits = '0;
  logic signed [15:0] eq_re, eq_im, dec_re, dec_im;
  logic [9:0] dec_word;
  logic signed [16:0] err_re, err_im;

  always #5 clk = ~clk;

  feq_lms dut (.*);

  // channel and model state per carrier
  int  car [NCAR];
  real hr [NCAR], hi [NCAR];
  real wr [NCAR], wi [NCAR];
  int  load [NCAR];
  real rot = 0.0;
  localparam logic [15:0] MUS [3] = '{16'd3277, 16'd6554, 16'd9830};
  int n_tracked = 0;

  // Quantised mapper point (same arithmetic as the transmitter).
  function automatic void qpoint(input int w, input int l, output int re, output int im);
    int bi = (l + 1) / 2, bq = l / 2;
    int g = int'(qam_gain(l, 8192));
    int vi = w % (1 << bi), vq = w >> bi;
    longint pr = longint'(2 * vi - ((1 << bi) - 1)) * g;
    longint pq = (bq == 0) ? 0 : longint'(2 * vq - ((1 << bq) - 1)) * g;
    re = (l == 0) ? 0 : int'((pr + 8) >>> 4);
    im = (l == 0) ? 0 : int'((pq + 8) >>> 4);
  endfunction

  function automatic int clip16(input real v);
    if (v > 32767.0) return 32767;
    if (v < -32768.0) return -32768;
    return $rtoi(v + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Send one bin through the DUT and wait for its result.
  task automatic run_bin(input int c, input int yr, input int yi, input int l,
                         input bit tr, input int rr, input int ri);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_idx = 10'(car[c]); y_re = 16'(yr); y_im = 16'(yi);
    bits = 4'(l); train = tr; ref_re = 16'(rr); ref_im = 16'(ri);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    check(int'(out_idx) == car[c], $sformatf("index %0d", car[c]));
  endtask

  // Pass a transmitted point through the channel of carrier c.
  function automatic void channel(input int c, input int sr, input int si,
                                  input int noise, output int yr, output int yi);
    real cr = hr[c] * $cos(rot) - hi[c] * $sin(rot);
    real ci = hr[c] * $sin(rot) + hi[c] * $cos(rot);
    yr = clip16(cr * sr - ci * si + real'(int'($urandom_range(2 * noise)) - noise));
    yi = clip16(cr * si + ci * sr + real'(int'($urandom_range(2 * noise)) - noise));
  endfunction

  // Model: S~ = W*Y, then W -= mu e conj(Y) / |Y|^2 with e = S~ - R.
  task automatic model_step(input int c, input int yr, input int yi, input real m,
                            input real rr, input real ri, output real sr, output real si);
    real p = real'(yr) * yr + real'(yi) * yi;
    real er, ei;
    sr = wr[c] * yr - wi[c] * yi;
    si = wr[c] * yi + wi[c] * yr;
    er = sr - rr;
    ei = si - ri;
    if (p > 0.0) begin
      wr[c] -= m * (er * yr + ei * yi) / p;
      wi[c] -= m * (ei * yr - er * yi) / p;
    end
  endtask

  function automatic bit near(input int got, input real want, input real tol);
    real d = real'(got) - want;
    return (d <= tol) && (d >= -tol);
  endfunction

  initial begin
    automatic int yr, yi, sr, si, w, l;
    automatic real msr, msi, m, pe, ps;
    automatic int errs;

    for (int c = 0; c < NCAR; c++) begin
      automatic real a = 0.25 + 1.75 * real'($urandom_range(1000)) / 1000.0;
      automatic real ph = 2.0 * PI * real'($urandom_range(1000)) / 1000.0;
      car[c] = 41 + 8 * c + int'($urandom_range(7));
      hr[c] = a * $cos(ph);
      hi[c] = a * $sin(ph);
      wr[c] = 1.0;
      wi[c] = 0.0;
      load[c] = 1 + (c % 10);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // untouched carriers read W = 1, mu = 0 keeps it
    mu = 16'd0;
    for (int c = 0; c < 4; c++) begin
      channel(c, 3000, -2000, 0, yr, yi);
      run_bin(c, yr, yi, 2, 1'b1, 0, 0);
      check(int'(eq_re) == yr && int'(eq_im) == yi, "W = 1 before any update");
    end

    // training: QPSK references, mu = 0.1
    mu = 16'd6554;
    m  = real'(mu) / 65536.0;
    pe = 0.0; ps = 0.0;
    for (int n = 0; n < 150; n++) begin
      for (int c = 0; c < NCAR; c++) begin
        w = int'($urandom_range(3));
        qpoint(w, 2, sr, si);
        channel(c, sr, si, 2, yr, yi);
        model_step(c, yr, yi, m, sr, si, msr, msi);
        run_bin(c, yr, yi, 2, 1'b1, sr, si);
        check(near(eq_re, msr, 6.0 + 0.002 * (msr < 0 ? -msr : msr)) &&
              near(eq_im, msi, 6.0 + 0.002 * (msi < 0 ? -msi : msi)),
              $sformatf("train n=%0d c=%0d S~ (%0d,%0d) model (%f,%f)", n, c, eq_re, eq_im, msr, msi));
        check(int'(err_re) == int'(eq_re) - sr && int'(err_im) == int'(eq_im) - si,
              "training error = S~ - S");
        if (n == 149) begin
          pe += real'(err_re) * err_re + real'(err_im) * err_im;
          ps += real'(sr) * sr + real'(si) * si;
        end
      end
    end
    $display("after training: error %0.1f dB", 10.0 * $log10(pe / ps));
    check(pe / ps < 1.0e-4, "training converged below -40 dB");

    // decision-directed data, loads 1..10
    errs = 0;
    for (int n = 0; n < 40; n++) begin
      for (int c = 0; c < NCAR; c++) begin
        l = load[c];
        w = int'($urandom_range((1 << l) - 1));
        qpoint(w, l, sr, si);
        channel(c, sr, si, 2, yr, yi);
        run_bin(c, yr, yi, l, 1'b0, 0, 0);
        model_step(c, yr, yi, m, real'(dec_re), real'(dec_im), msr, msi);
        if (int'(dec_word) != w) errs++;
        check(int'(dec_word) == w, $sformatf("data n=%0d c=%0d l=%0d word %0d want %0d", n, c, l, dec_word, w));
        check(int'(dec_re) == sr && int'(dec_im) == si, "decided point is the transmitter's point");
        check(int'(err_re) == int'(eq_re) - int'(dec_re) && int'(err_im) == int'(eq_im) - int'(dec_im),
              "decision error = S~ - S^");
        check(near(eq_re, msr, 6.0 + 0.002 * (msr < 0 ? -msr : msr)) &&
              near(eq_im, msi, 6.0 + 0.002 * (msi < 0 ? -msi : msi)), "data S~ follows model");
      end
    end
    $display("data phase: %0d word errors", errs);

    // slowly rotating channel: tracked with each tested step size
    // (0.05, 0.1 and 0.15), 40 degrees each
    foreach (MUS[i]) begin
      mu = MUS[i];
      errs = 0;
      for (int n = 0; n < 100; n++) begin
        rot += 0.4 * PI / 180.0;
        for (int c = 0; c < NCAR; c++) begin
          w = int'($urandom_range(15));
          qpoint(w, 4, sr, si);
          channel(c, sr, si, 2, yr, yi);
          run_bin(c, yr, yi, 4, 1'b0, 0, 0);
          if (int'(dec_word) != w) errs++;
        end
      end
      n_tracked++;
      $display("tracking with mu=%0.3f over 40 degrees: %0d word errors", real'(mu) / 65536.0, errs);
      check(errs == 0, $sformatf("rotation tracked with mu = %0d/65536", mu));
    end

    // same rotation with mu = 0: the frozen equalizer fails
    mu = 16'd0;
    errs = 0;
    for (int n = 0; n < 100; n++) begin
      rot += 0.4 * PI / 180.0;
      for (int c = 0; c < NCAR; c++) begin
        w = int'($urandom_range(15));
        qpoint(w, 4, sr, si);
        channel(c, sr, si, 2, yr, yi);
        run_bin(c, yr, yi, 4, 1'b0, 0, 0);
        if (int'(dec_word) != w) errs++;
      end
    end
    $display("frozen equalizer over 40 more degrees: %0d word errors", errs);
    check(errs > 0, "mu = 0 does not track");

    // zero bin leaves W alone (bracketed by two frozen reads)
    channel(0, 4000, 1000, 0, yr, yi);
    run_bin(0, yr, yi, 2, 1'b0, 0, 0);
    sr = eq_re; si = eq_im;
    mu = 16'd6554;
    run_bin(0, 0, 0, 2, 1'b1, 5000, 5000);
    check(eq_re == 0 && eq_im == 0, "zero bin equalises to zero");
    mu = 16'd0;
    run_bin(0, yr, yi, 2, 1'b0, 0, 0);
    check(int'(eq_re) == sr && int'(eq_im) == si, "zero bin does not disturb W");

    // clear restores W = 1
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int c = 0; c < 4; c++) begin
      run_bin(c, 1234, -567, 2, 1'b0, 0, 0);
      check(eq_re == 16'sd1234 && eq_im == -16'sd567, "clear restores W = 1");
    end

    check(n_tracked == 3, "all three step sizes tried");
    report();
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
    $finish;
  end
endmodule
