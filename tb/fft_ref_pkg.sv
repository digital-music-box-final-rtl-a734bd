// fft_ref_pkg: reference models for the music-box testbenches.
//
// fft32_ref computes a 32-point radix-2 decimation-in-time FFT with the same
// fixed-point rules as the hardware (Q1.15 twiddles exp(+2*pi*i*k/32) rounded
// from cos/sin, product truncated to bits [30:15], 16-bit wrapping sums, no
// scaling), written as the textbook in-place iteration over groups of
// butterflies rather than with the hardware's address rotation.
// peak_ref returns the first bin 0..15 of largest re^2 + im^2 (0 if all are 0).
package fft_ref_pkg;

  typedef int vec32_t [32];

  function automatic int wrap16(input longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int tw_re(input int k);
    return int'($floor(32767.0 * $cos(2.0 * 3.14159265358979 * k / 32.0) + 0.5));
  endfunction

  function automatic int tw_im(input int k);
    return int'($floor(32767.0 * $sin(2.0 * 3.14159265358979 * k / 32.0) + 0.5));
  endfunction

  function automatic int bitrev5(input int n);
    int r = 0;
    for (int b = 0; b < 5; b++) if (n & (1 << b)) r |= 1 << (4 - b);
    return r;
  endfunction

  // bits [30:15] of the 33-bit two's-complement value p, as a signed 16-bit number
  function automatic int q15(input longint p);
    return wrap16(p >>> 15);
  endfunction

  function automatic void fft32_ref(input vec32_t xr, input vec32_t xi,
                                    output vec32_t yr, output vec32_t yi);
    vec32_t ar, ai;
    for (int n = 0; n < 32; n++) begin
      ar[bitrev5(n)] = xr[n];
      ai[bitrev5(n)] = xi[n];
    end
    for (int s = 0; s < 5; s++) begin
      int half = 1 << s;
      for (int g = 0; g < 32; g += 2 * half)
        for (int k = 0; k < half; k++) begin
          int a = g + k, b = g + k + half;
          int e = k * (16 / half);
          longint wr = tw_re(e), wi = tw_im(e);
          longint br = ar[b], bi = ai[b];
          int tr = q15(br * wr - bi * wi);
          int ti = q15(bi * wr + br * wi);
          int a_r = ar[a], a_i = ai[a];
          ar[a] = wrap16(a_r + tr);  ai[a] = wrap16(a_i + ti);
          ar[b] = wrap16(a_r - tr);  ai[b] = wrap16(a_i - ti);
        end
    end
    yr = ar;
    yi = ai;
  endfunction

  function automatic int peak_ref(input vec32_t yr, input vec32_t yi);
    longint best = 0;
    int bin = 0;
    for (int k = 0; k < 16; k++) begin
      longint e = longint'(yr[k]) * yr[k] + longint'(yi[k]) * yi[k];
      if (e > best) begin best = e; bin = k; end
    end
    return bin;
  endfunction

endpackage
