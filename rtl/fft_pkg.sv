// fft_pkg: number formats, twiddle table and index helpers shared by the
// 16-point FFT core.
//
// Samples are 64-bit two's-complement integers. A complex value is a packed
// pair {re, im}. Twiddle factors W16^k = cos(2*pi*k/16) - j*sin(2*pi*k/16) are
// stored as integers scaled by 2^7 = 128, so |W| = 128 represents 1.0. The
// document fixes the 64-bit word and the 2^7 scale factor; the individual
// magnitudes 128, 118, 90 and 49 are this design's choice, picked because with
// them the forward transform of the ramp 0..15 reproduces the document's
// published results digit for digit (e.g. X[1] = -8.005859 + 40.058594i).
package fft_pkg;

  localparam int unsigned NPOINT   = 16;  // transform length
  localparam int unsigned LOG2N    = 4;   // number of butterfly stages
  localparam int unsigned DATA_W   = 64;  // bits per real or imaginary part
  localparam int unsigned TW_SHIFT = 7;   // twiddle scale 2^7 = 128
  localparam int unsigned TW_ONE   = 1 << TW_SHIFT;

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Twiddle factors need 9 signed bits because +128 must be representable.
  typedef logic signed [8:0] tw_t;

  // Real part of W16^k, k = 0..7: round-half-down of 128*cos(2*pi*k/16)
  // taken from three-decimal values (0.924 -> 118, 0.707 -> 90, 0.383 -> 49).
  function automatic tw_t tw_re(input int unsigned k);
    case (k % 8)
      0: return tw_t'(128);
      1: return tw_t'(118);
      2: return tw_t'(90);
      3: return tw_t'(49);
      4: return tw_t'(0);
      5: return tw_t'(-49);
      6: return tw_t'(-90);
      default: return tw_t'(-118);
    endcase
  endfunction

  // Imaginary part of W16^k = -128*sin(2*pi*k/16), same magnitudes.
  function automatic tw_t tw_im(input int unsigned k);
    case (k % 8)
      0: return tw_t'(0);
      1: return tw_t'(-49);
      2: return tw_t'(-90);
      3: return tw_t'(-118);
      4: return tw_t'(-128);
      5: return tw_t'(-118);
      6: return tw_t'(-90);
      default: return tw_t'(-49);
    endcase
  endfunction

  // Bit reversal of a 4-bit index: the decimation-in-time input order.
  function automatic int unsigned bitrev4(input logic [3:0] i);
    return int'({i[0], i[1], i[2], i[3]});
  endfunction

endpackage
