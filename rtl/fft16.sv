// fft16: 16-point radix-2 decimation-in-time FFT, fully parallel and
// combinational, built as in the document from four butterfly stages:
// eight 2-point (bu2_0..bu2_7), four 4-point (bu4_0..bu4_3), two 8-point
// (bu8_0, bu8_1) and one 16-point butterfly (bu16_0).
//
// Input order: x[i] must hold sample bitrev4(i) of the time sequence (the
// bit reversal is done in the wiring in front of this block). Output y[k] is
// frequency bin k in natural order, scaled by 2^28 (2^7 per stage).
// Interface: unpacked arrays of 16 fft_pkg::cplx_t; no clock, no latency.
module fft16
  import fft_pkg::*;
(
  input  cplx_t x [NPOINT],
  output cplx_t y [NPOINT]
);

  cplx_t s1 [NPOINT];
  cplx_t s2 [NPOINT];
  cplx_t s3 [NPOINT];

  // Stage 1: eight 2-point butterflies on adjacent input pairs.
  for (genvar g = 0; g < 8; g++) begin : g_bu2
    cplx_t bi [2];
    cplx_t bo [2];
    assign bi[0] = x[2*g];
    assign bi[1] = x[2*g+1];
    butterfly #(.N(2)) bu2 (.x(bi), .y(bo));
    assign s1[2*g]   = bo[0];
    assign s1[2*g+1] = bo[1];
  end

  // Stage 2: four 4-point butterflies.
  for (genvar g = 0; g < 4; g++) begin : g_bu4
    cplx_t bi [4];
    cplx_t bo [4];
    for (genvar i = 0; i < 4; i++) begin : g_w
      assign bi[i]      = s1[4*g+i];
      assign s2[4*g+i]  = bo[i];
    end
    butterfly #(.N(4)) bu4 (.x(bi), .y(bo));
  end

  // Stage 3: two 8-point butterflies.
  for (genvar g = 0; g < 2; g++) begin : g_bu8
    cplx_t bi [8];
    cplx_t bo [8];
    for (genvar i = 0; i < 8; i++) begin : g_w
      assign bi[i]      = s2[8*g+i];
      assign s3[8*g+i]  = bo[i];
    end
    butterfly #(.N(8)) bu8 (.x(bi), .y(bo));
  end

  // Stage 4: one 16-point butterfly.
  butterfly #(.N(16)) bu16_0 (.x(s3), .y(y));

endmodule
