// psd_ref_pkg: reference model of the fixed-point PSD estimator, used by the
// testbenches to work out expected values independently of the RTL.
//
// Values are carried as longint and wrapped to 32 bits where the hardware
// keeps 32 bits. tdiv() divides with truncation toward zero. The FFT is a
// plain in-place radix-2 loop over bit-reversed input with twiddles
// round(10,000 * exp(-j*2*pi*k/16)); W^0 and W^4 are used as the whole
// numbers 1 and -j without division.
package psd_ref_pkg;

  function automatic longint w32(input longint v);
    return longint'(int'(v));
  endfunction

  function automatic longint tdiv(input longint a, input longint d);
    longint q;
    if (d == 0) return 0;
    q = (a < 0 ? -a : a) / d;
    return (a < 0) ? -q : q;
  endfunction

  // Scaled twiddle W16^k, computed from cos/sin.
  function automatic void tw(input int k, output longint wr, output longint wi,
                             output bit scaled);
    real pi;
    pi = 3.14159265358979323846;
    if (k == 0)      begin wr = 1; wi = 0;  scaled = 0; end
    else if (k == 4) begin wr = 0; wi = -1; scaled = 0; end
    else begin
      real c, s;
      c = 10000.0 * $cos(2.0 * pi * k / 16.0);
      s = -10000.0 * $sin(2.0 * pi * k / 16.0);
      wr = longint'($rtoi(c + (c < 0 ? -0.5 : 0.5)));
      wi = longint'($rtoi(s + (s < 0 ? -0.5 : 0.5)));
      scaled = 1;
    end
  endfunction

  // 16-point fixed-point FFT of real input a[0..15].
  function automatic void fft16(input longint a [16], input longint F,
                                output longint xr [16], output longint xi [16]);
    longint yr [16], yi [16];
    for (int i = 0; i < 16; i++) begin
      int r;
      r = ((i & 1) << 3) | ((i & 2) << 1) | ((i & 4) >> 1) | ((i & 8) >> 3);
      xr[i] = a[r];
      xi[i] = 0;
    end
    for (int h = 1; h < 16; h = h * 2) begin
      yr = xr; yi = xi;
      for (int g = 0; g < 16; g += 2 * h)
        for (int j = 0; j < h; j++) begin
          longint wr, wi, br, bi, pr, pim;
          bit sc;
          tw(j * (8 / h), wr, wi, sc);
          br = xr[g+j+h]; bi = xi[g+j+h];
          pr  = w32(br * wr - bi * wi);
          pim = w32(br * wi + bi * wr);
          if (sc) begin pr = tdiv(pr, F); pim = tdiv(pim, F); end
          yr[g+j]   = w32(xr[g+j] + pr);  yi[g+j]   = w32(xi[g+j] + pim);
          yr[g+j+h] = w32(xr[g+j] - pr);  yi[g+j+h] = w32(xi[g+j] - pim);
        end
      xr = yr; xi = yi;
    end
  endfunction

  // One LMS update for sample n (1-based) of x[0..] (x[m-1] is x(m)).
  function automatic void lms(input longint x [], input int n, input int fl,
                              input longint u, input longint F,
                              inout longint A [16], output longint ef);
    longint e;
    e = x[n-1];
    for (int k = 1; k <= fl; k++) begin
      longint al;
      al = (n - k < 1) ? 0 : x[n-k-1];
      e = w32(e + tdiv(w32(A[k-1] * al), F));
    end
    for (int k = 1; k <= fl; k++) begin
      longint be, p2;
      be = (n - k < 1) ? 0 : x[n-k-1];
      p2 = tdiv(w32(e * be), F);
      A[k-1] = w32(A[k-1] - tdiv(w32(2 * u * p2), F));
    end
    ef = e;
  endfunction

  // Test signal: 0.1 sin(2pi 100 t) + 0.3 sin(2pi 200 t) + 0.5 sin(2pi 300 t),
  // sampled at 1 kHz from t = 0, scaled by F and truncated.
  function automatic longint sig(input int m, input longint F);
    real pi, t, v;
    pi = 3.14159265358979323846;
    t = real'(m) / 1000.0;
    v = 0.1 * $sin(2.0*pi*100.0*t) + 0.3 * $sin(2.0*pi*200.0*t)
      + 0.5 * $sin(2.0*pi*300.0*t);
    return longint'($rtoi(v * real'(F)));
  endfunction

endpackage
