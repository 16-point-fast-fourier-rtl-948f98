// butterfly: one radix-2 decimation-in-time stage of width N (N = 2, 4, 8, 16),
// the blocks named butterfly2, butterfly4, butterfly8 and butterfly16 in the
// 16-point FFT.
//
// Inputs x[0 .. N/2-1] are the transform of the even half, x[N/2 .. N-1] that
// of the odd half. For k < N/2 the stage forms
//     t        = x[k+N/2] * W_N^k      (W_N^k = W16^(k*16/N), scaled by 128)
//     y[k]     = 128*x[k] + t
//     y[k+N/2] = 128*x[k] - t
// so every output carries one more factor 2^7 than its inputs. Following the
// document, nothing is shifted back: after four stages the result is the DFT
// scaled by 2^28. The upper leg is multiplied by 128 (W^0) rather than shifted
// so the two legs stay in the same format; arithmetic wraps at 64 bits.
//
// Purely combinational; no clock. Ports are unpacked arrays of fft_pkg::cplx_t.
module butterfly
  import fft_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  cplx_t x [N],
  output cplx_t y [N]
);

  localparam int unsigned HALF   = N / 2;
  localparam int unsigned TWSTEP = NPOINT / N;

  for (genvar k = 0; k < HALF; k++) begin : g_bfly
    localparam tw_t WR = tw_re(k * TWSTEP);
    localparam tw_t WI = tw_im(k * TWSTEP);

    sample_t tr, ti, ur, ui;

    always_comb begin
      // Complex product of the lower leg with the twiddle factor.
      tr = x[k+HALF].re * sample_t'(WR) - x[k+HALF].im * sample_t'(WI);
      ti = x[k+HALF].re * sample_t'(WI) + x[k+HALF].im * sample_t'(WR);
      // Upper leg times W^0 = 128.
      ur = x[k].re * sample_t'(TW_ONE);
      ui = x[k].im * sample_t'(TW_ONE);
      y[k].re      = ur + tr;
      y[k].im      = ui + ti;
      y[k+HALF].re = ur - tr;
      y[k+HALF].im = ui - ti;
    end
  end

endmodule
