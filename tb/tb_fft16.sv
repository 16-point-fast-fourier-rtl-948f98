// tb_fft16: checks the 16-point FFT datapath.
//  1. The ramp 0..15 (the document's demonstration input): every bin must
//     equal the published forward results to the six printed decimals after
//     dividing by 2^28, and be within 0.25 of the exact DFT.
//  2. Random integer sequences, real and complex: every bin must equal an
//     independent integer FFT model exactly.
// Input is applied in bit-reversed order, as the block expects.
module tb_fft16;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  int checks = 0, failures = 0;

  cplx_t x [16], y [16];

  fft16 dut (.x(x), .y(y));

  // Published forward transform of 0..15 (bins 0..15).
  localparam real PUB_RE [16] = '{120.0, -8.005859, -8.0, -8.066406, -8.0, -7.933594, -8.0, -7.994141,
                                  -8.0, -7.994141, -8.0, -7.933594, -8.0, -8.066406, -8.0, -8.005859};
  localparam real PUB_IM [16] = '{0.0, 40.058594, 19.25, 11.869141, 8.0, 5.369141, 3.25, 1.558594,
                                  0.0, -1.558594, -3.25, -5.369141, -8.0, -11.869141, -19.25, -40.058594};
  localparam real SCALE = 268435456.0;  // 2^28

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic apply(input vec16_t xr, input vec16_t xi);
    for (int i = 0; i < 16; i++) x[i] = '{re: xr[brev(i)], im: xi[brev(i)]};
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec16_t xr, xi, er, ei;
    real dr[16], di[16];

    // 1. Document's ramp.
    for (int i = 0; i < 16; i++) begin xr[i] = i; xi[i] = 0; end
    apply(xr, xi);
    dft_real(xr, dr, di);
    for (int k = 0; k < 16; k++) begin
      real gr, gi;
      gr = real'($signed(y[k].re)) / SCALE;
      gi = real'($signed(y[k].im)) / SCALE;
      $display("X[%0d] = %f + (%f)i", k, gr, gi);
      checks++;
      if (fabs(gr - PUB_RE[k]) > 1.0e-6 || fabs(gi - PUB_IM[k]) > 1.0e-6) begin
        failures++;
        $display("FAIL ramp bin %0d differs from published %f + (%f)i", k, PUB_RE[k], PUB_IM[k]);
      end
      checks++;
      if (fabs(gr - dr[k]) > 0.25 || fabs(gi - di[k]) > 0.25) begin
        failures++;
        $display("FAIL ramp bin %0d too far from exact DFT %f + (%f)i", k, dr[k], di[k]);
      end
    end

    // 2. Random inputs against the integer model.
    for (int it = 0; it < 300; it++) begin
      for (int i = 0; i < 16; i++) begin
        xr[i] = longint'($signed($urandom)) >>> $urandom_range(24);
        xi[i] = (it % 2) ? longint'($signed($urandom)) >>> $urandom_range(24) : 0;
      end
      apply(xr, xi);
      fft(xr, xi, er, ei);
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (y[k].re !== er[k] || y[k].im !== ei[k]) begin
          failures++;
          if (failures < 10) $display("FAIL random set %0d bin %0d", it, k);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
