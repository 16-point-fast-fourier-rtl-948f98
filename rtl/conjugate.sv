// conjugate: prepares the forward spectrum for the inverse transform.
//
// The document computes the inverse FFT as a second forward FFT fed with the
// complex conjugate of the first one's output, the conjugate being formed by
// negating the imaginary part. That is what this block does to each of the 16
// bins. In addition it divides every part by 2^MID_SHIFT, rounding toward
// zero: the forward FFT leaves its result scaled by 2^28, and a second
// unscaled pass would need 2^56 of headroom on top of the signal, more than a
// 64-bit word has. Dividing by 2^28 returns the spectrum to the scale of the
// input samples. The document does not spell this step out; this division,
// with this rounding, is the one under which the core reproduces the
// document's published round-trip results exactly.
//
// Combinational; ports are unpacked arrays of 16 fft_pkg::cplx_t.
module conjugate
  import fft_pkg::*;
#(
  parameter int unsigned MID_SHIFT = LOG2N * TW_SHIFT
) (
  input  cplx_t x [NPOINT],
  output cplx_t y [NPOINT]
);

  // Signed division by 2^MID_SHIFT rounding toward zero: bias negative
  // values by 2^MID_SHIFT - 1 before the arithmetic shift.
  localparam sample_t BIAS = sample_t'((64'sd1 <<< MID_SHIFT) - 64'sd1);

  function automatic sample_t div_pow2(input sample_t v);
    return (v + (v[DATA_W-1] ? BIAS : sample_t'(0))) >>> MID_SHIFT;
  endfunction

  for (genvar i = 0; i < NPOINT; i++) begin : g_bin
    sample_t neg_im;
    assign neg_im  = -x[i].im;
    assign y[i].re = div_pow2(x[i].re);
    assign y[i].im = div_pow2(neg_im);
  end

endmodule
