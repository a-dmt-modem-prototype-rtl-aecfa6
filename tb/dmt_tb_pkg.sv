// dmt_tb_pkg: reference models shared by the modem testbenches.
//
// Written from the block descriptions, not from the RTL: a model of the ten
// x^23 + x^18 + 1 LFSRs, the rectangular-QAM mapping with equal mean
// energy, a direct DFT in double precision, and check counters.
package dmt_tb_pkg;

  int checks = 0;
  int failures = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endfunction

  function automatic void report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  // Randomizer bank model.
  class lfsr_bank;
    bit [22:0] r [10];
    function new(bit [22:0] seed_base = 23'h2A5A5A);
      for (int i = 0; i < 10; i++) r[i] = seed_base ^ 23'(i * 32'h1234F);
    endfunction
    // Draw an l-bit word: bit i from LFSR i, which then steps.
    function int draw(int l);
      int w = 0;
      for (int i = 0; i < l; i++) begin
        w |= int'(r[i][22]) << i;
        r[i] = {r[i][21:0], r[i][22] ^ r[i][17]};
      end
      return w;
    endfunction
  endclass

  // Ideal (unquantised) constellation point of word w with l bits, scaled
  // to an RMS of rms per carrier.
  function automatic void map_point(input int w, input int l, input real rms,
                                    output real re, output real im);
    int bi = (l + 1) / 2, bq = l / 2;
    int mi = 1 << bi, mq = 1 << bq;
    real e, g;
    re = 0.0; im = 0.0;
    if (l == 0) return;
    e = (real'(mi * mi - 1) + real'(mq * mq - 1)) / 3.0;
    g = rms / $sqrt(e);
    re = g * real'(2 * (w % mi) - (mi - 1));
    im = (bq == 0) ? 0.0 : g * real'(2 * (w / mi) - (mq - 1));
  endfunction

  // Direct DFT, sign -1 forward or +1 inverse, divided by 2^shift.
  function automatic void dft(input int n, input bit inv, input int shift,
                              input real xr[], input real xi[],
                              output real yr[], output real yi[]);
    real pi2 = 2.0 * 3.14159265358979323846;
    real c[], s[];
    c = new[n]; s = new[n];
    for (int t = 0; t < n; t++) begin
      c[t] = $cos(pi2 * t / n);
      s[t] = (inv ? 1.0 : -1.0) * $sin(pi2 * t / n);
    end
    yr = new[n]; yi = new[n];
    for (int k = 0; k < n; k++) begin
      real ar = 0.0, ai = 0.0;
      for (int t = 0; t < n; t++) begin
        int e = (k * t) % n;
        ar += xr[t] * c[e] - xi[t] * s[e];
        ai += xr[t] * s[e] + xi[t] * c[e];
      end
      yr[k] = ar / (2.0 ** shift);
      yi[k] = ai / (2.0 ** shift);
    end
  endfunction

endpackage
