// fft_ref_pkg: reference models used by the testbenches. They are written
// independently of the RTL: a textbook in-place iterative radix-2 FFT over
// 64-bit integers (longint, which wraps exactly like the hardware), with its
// own copy of the twiddle table, plus a floating-point DFT for accuracy checks.
package fft_ref_pkg;

  typedef longint vec16_t [16];

  // W16^k scaled by 128; k = 0..7.
  localparam longint TWR [8] = '{128, 118, 90, 49, 0, -49, -90, -118};
  localparam longint TWI [8] = '{0, -49, -90, -118, -128, -118, -90, -49};

  function automatic int brev(input int i);
    int r = 0;
    for (int b = 0; b < 4; b++) if (i[b]) r |= 1 << (3 - b);
    return r;
  endfunction

  // Forward FFT of a natural-order sequence; result scaled by 128^4.
  function automatic void fft(input vec16_t xr, input vec16_t xi,
                              output vec16_t yr, output vec16_t yi);
    longint ar[16], ai[16];
    for (int i = 0; i < 16; i++) begin
      ar[brev(i)] = xr[i];
      ai[brev(i)] = xi[i];
    end
    for (int len = 2; len <= 16; len *= 2) begin
      for (int base = 0; base < 16; base += len) begin
        for (int k = 0; k < len / 2; k++) begin
          longint wr, wi, tr, ti, pr, pi;
          int p, q;
          p  = base + k;
          q  = base + k + len / 2;
          wr = TWR[k * (16 / len)];
          wi = TWI[k * (16 / len)];
          tr = ar[q] * wr - ai[q] * wi;
          ti = ar[q] * wi + ai[q] * wr;
          pr = ar[p] * 128;
          pi = ai[p] * 128;
          ar[p] = pr + tr;  ai[p] = pi + ti;
          ar[q] = pr - tr;  ai[q] = pi - ti;
        end
      end
    end
    yr = ar;
    yi = ai;
  endfunction

  // Full round trip as the core computes it: forward FFT, conjugate and
  // divide by 2^28, second FFT, divide by 16; divisions truncate toward zero.
  function automatic void round_trip(input vec16_t x, output vec16_t zr, output vec16_t zi);
    vec16_t zero, fr, fi, cr, ci, gr, gi;
    for (int i = 0; i < 16; i++) zero[i] = 0;
    fft(x, zero, fr, fi);
    for (int i = 0; i < 16; i++) begin
      cr[i] = fr[i] / 64'sd268435456;
      ci[i] = (-fi[i]) / 64'sd268435456;
    end
    fft(cr, ci, gr, gi);
    for (int i = 0; i < 16; i++) begin
      zr[i] = gr[i] / 16;
      zi[i] = gi[i] / 16;
    end
  endfunction

  // Exact DFT in floating point.
  function automatic void dft_real(input vec16_t x, output real yr[16], output real yi[16]);
    for (int k = 0; k < 16; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < 16; n++) begin
        yr[k] += real'(x[n]) * $cos(2.0 * 3.14159265358979 * k * n / 16.0);
        yi[k] -= real'(x[n]) * $sin(2.0 * 3.14159265358979 * k * n / 16.0);
      end
    end
  endfunction

endpackage
