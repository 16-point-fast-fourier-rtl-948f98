// tb_inverse_fft16: checks the inverse-transform module.
//  1. Random complex bins: output must equal the integer FFT model divided by
//     16 (rounded toward zero), exactly.
//  2. The document's demonstration: the conjugated, rescaled spectrum of the
//     ramp 0..15 must give the published round-trip values to six decimals
//     after dividing by 2^28.
//  3. Round trip of random real sequences: each sample must come back within
//     1 + 3% of the sequence's peak (twiddle quantisation bounds the error).
module tb_inverse_fft16;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0;

  cplx_t x [16], y [16];

  inverse_fft16 dut (.x(x), .y(y));

  localparam real SCALE = 268435456.0;

  // Published round trip of 0..15.
  localparam real PUB_RE [16] = '{0.25, 1.112389, 2.044922, 3.182549, 3.875, 4.915062, 6.044922, 7.304710,
                                  7.75, 9.020424, 9.955078, 10.950264, 12.125, 12.952126, 13.955078, 14.562477};
  localparam real PUB_IM [16] = '{0.0, -0.007835, 0.0, -0.013695, 0.0, 0.014732, 0.0, 0.007744,
                                  0.0, 0.007835, 0.0, 0.013695, 0.0, -0.014732, 0.0, -0.007744};

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec16_t xr, xi, er, ei, fr, fi, zero;
    for (int i = 0; i < 16; i++) zero[i] = 0;

    for (int it = 0; it < 200; it++) begin
      for (int i = 0; i < 16; i++) begin
        xr[i] = longint'($signed($urandom)) >>> $urandom_range(24);
        xi[i] = longint'($signed($urandom)) >>> $urandom_range(24);
        x[brev(i)] = '{re: xr[i], im: xi[i]};
      end
      #1;
      fft(xr, xi, er, ei);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (y[k].re !== (er[k] / 16) || y[k].im !== (ei[k] / 16)) begin
          failures++;
          if (failures < 10) $display("FAIL random set %0d sample %0d", it, k);
        end
      end
    end

    for (int it = 0; it < 50; it++) begin
      longint peak = 0;
      for (int i = 0; i < 16; i++) begin
        xr[i] = (it == 0) ? longint'(i) : longint'($urandom_range(2000)) - 1000;
        if (xr[i] > peak) peak = xr[i];
        if (-xr[i] > peak) peak = -xr[i];
      end
      fft(xr, zero, fr, fi);
      for (int i = 0; i < 16; i++)
        x[brev(i)] = '{re: fr[i] / 64'sd268435456, im: (-fi[i]) / 64'sd268435456};
      #1;
      for (int n = 0; n < 16; n++) begin
        real gr, gi, tol;
        gr  = real'($signed(y[n].re)) / SCALE;
        gi  = real'($signed(y[n].im)) / SCALE;
        tol = 1.0 + 0.03 * real'(peak);
        if (it == 0) begin
          $display("x[%0d] = %f + (%f)i", n, gr, gi);
          checks++;
          if (fabs(gr - PUB_RE[n]) > 1.0e-6 || fabs(gi - PUB_IM[n]) > 1.0e-6) begin
            failures++;
            $display("FAIL ramp sample %0d differs from published %f + (%f)i", n, PUB_RE[n], PUB_IM[n]);
          end
        end
        checks++;
        if (fabs(gr - real'(xr[n])) > tol || fabs(gi) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL round trip set %0d sample %0d: %f vs %0d", it, n, gr, xr[n]);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
