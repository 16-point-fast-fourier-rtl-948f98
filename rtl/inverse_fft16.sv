// inverse_fft16: the inverse-transform module. It runs a second fft16 on the
// (already conjugated and bit-reversed) spectrum and divides the result by
// N = 16, as the document describes. The division rounds toward zero
// (bias negative values by 15, then shift right arithmetically by 4). Since
// the first FFT stage multiplies everything by 128, the FFT result is always
// a multiple of 128 and the division is in fact exact. As in the document, the result is not conjugated again; for a
// real input sequence the imaginary parts come out near zero either way.
//
// With the conjugate block's default rescaling, an input sample v arrives
// here as v and leaves as about v * 2^28, i.e. the output is the time
// sequence in a fixed-point format with 28 fraction bits.
//
// Input order: x[i] holds bin bitrev4(i). Output y[n] is sample n.
// Combinational; ports are unpacked arrays of 16 fft_pkg::cplx_t.
module inverse_fft16
  import fft_pkg::*;
(
  input  cplx_t x [NPOINT],
  output cplx_t y [NPOINT]
);

  localparam sample_t BIAS = sample_t'(NPOINT) - sample_t'(1);

  cplx_t f [NPOINT];

  fft16 u_fft (.x(x), .y(f));

  for (genvar i = 0; i < NPOINT; i++) begin : g_div
    assign y[i].re = (f[i].re + (f[i].re[DATA_W-1] ? BIAS : sample_t'(0))) >>> LOG2N;
    assign y[i].im = (f[i].im + (f[i].im[DATA_W-1] ? BIAS : sample_t'(0))) >>> LOG2N;
  end

endmodule
