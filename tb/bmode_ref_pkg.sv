// bmode_ref_pkg: reference model of the B-mode back end, for the testbenches.
//
// Written from the definitions, not from the RTL:
//   * Hilbert coefficients h[m] = 2/(pi*m) * (0.54 - 0.46*cos(2*pi*(m+33)/66)) for
//     odd m in -33..33, 0 for even m, rounded to 1.15;
//   * per scan line, Q[n] = sat16((sum_m h[m] * x[n-m]) >>> 15) with x = 0 outside
//     the line, and I[n] = x[n];
//   * envelope = floor(sqrt(I^2 + Q^2));
//   * grey level = clamp(round(255 + (255*20/dr) * log10(env / 32768)), 0, 255),
//     0 for env = 0.
// It also synthesises a small cyst-phantom-like RF frame: speckle from random
// scatterers convolved with a 2.5 MHz Hann-windowed pulse sampled at 40 MHz, an
// anechoic circular cyst, a strong point target and depth attenuation.
package bmode_ref_pkg;

  localparam real PI = 3.14159265358979;

  function automatic int hilb_coef(int m);
    real w;
    if (m % 2 == 0) return 0;
    w = 0.54 - 0.46 * $cos(2.0 * PI * (m + 33) / 66.0);
    return int'($floor(2.0 / (PI * m) * w * 32768.0 + 0.5));
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int isqrt(longint s);
    longint r;
    r = longint'($floor($sqrt(real'(s))));
    while (r * r > s) r--;
    while ((r + 1) * (r + 1) <= s) r++;
    return int'(r);
  endfunction

  // Envelope of one scan line.
  function automatic void envelope_line(input int x [], output int env [], output int n_sat);
    int c [-33:33];
    n_sat = 0;
    for (int m = -33; m <= 33; m++) c[m] = hilb_coef(m);
    env = new[x.size()];
    for (int n = 0; n < x.size(); n++) begin
      longint acc = 0;
      longint q;
      for (int m = -33; m <= 33; m++)
        if (n - m >= 0 && n - m < x.size()) acc += longint'(c[m]) * x[n - m];
      q = acc >>> 15;
      if (q > 32767 || q < -32768) n_sat++;
      q = sat16(q);
      env[n] = isqrt(longint'(x[n]) * x[n] + q * q);
    end
  endfunction

  function automatic real grey_real(int env, int dr);
    if (env == 0) return 0.0;
    return 255.0 + (255.0 * 20.0 / dr) * $log10(real'(env) / 32768.0);
  endfunction

  function automatic int grey(int env, int dr);
    real g;
    g = grey_real(env, dr);
    if (env == 0 || g < 0.0) return 0;
    if (g > 255.0) return 255;
    return int'($floor(g + 0.5));
  endfunction

  // Synthetic phantom frame, samples[line][n].
  function automatic void phantom(input int samples, input int lines, output int rf [][]);
    real pulse [32];
    real scat [];
    for (int k = 0; k < 32; k++)
      pulse[k] = $cos(2.0 * PI * 2.5 / 40.0 * k) * (0.5 - 0.5 * $cos(2.0 * PI * (k + 0.5) / 32.0));
    rf = new[lines];
    scat = new[samples];
    for (int l = 0; l < lines; l++) begin
      rf[l] = new[samples];
      for (int n = 0; n < samples; n++) begin
        real dl, dn, a;
        dl = real'(l - lines / 2) / lines;
        dn = real'(n - samples / 2) / samples;
        a  = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
        if (dl * dl + dn * dn < 0.04) a = 0.0;                // cyst
        scat[n] = a * 6000.0 * $exp(-3.0 * n / samples);     // depth attenuation
      end
      if (l == lines / 4) scat[samples / 4] = 40000.0;        // point target (clips)
      for (int n = 0; n < samples; n++) begin
        real v = 0.0;
        for (int k = 0; k < 32; k++) if (n - k >= 0) v += scat[n - k] * pulse[k];
        rf[l][n] = sat16(longint'($floor(v + 0.5)));
      end
    end
  endfunction

endpackage
