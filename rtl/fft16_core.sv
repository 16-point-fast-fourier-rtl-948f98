// fft16_core: a 16-point FFT core in "control unit + datapath" style with
// serial I/O, as the document proposes.
//
// Sixteen real 64-bit samples enter one per cycle on si and are collected by
// an input SIPO. The fully combinational datapath then runs a forward 16-point
// FFT (imaginary inputs tied to zero), conjugates the spectrum, and runs the
// inverse transform (a second FFT divided by 16). Two PISOs, one for the real
// and one for the imaginary parts, capture the 16 results and shift them out
// on so_re / so_im. The control FSM sequences fill, load and read-out.
//
// Number formats: si is a signed integer. The forward spectrum (internal
// signal spectrum) is the DFT scaled by 2^28. so_re / so_im carry the
// reconstructed time sequence scaled by 2^28 (28 fraction bits); the 2^28
// rescale between the two transforms is this design's choice (see conjugate).
// The document reads out the result of the inverse path; the forward
// spectrum stays internal, as in its pin count (clk, rst, start, 64 in, 128 out).
//
// Handshake (this design's choice, the document only says the FSM moves
// between filling the SIPO and reading the PISO): pulse start while busy is
// low; in_take is high in the 16 following cycles, and the sample on si is
// taken in each of them (x[0] first). out_valid is then high for 16 cycles
// with results n = 0..15 in order. One pass is 34 cycles from start.
module fft16_core
  import fft_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [DATA_W-1:0]   si,
  output logic                in_take,
  output logic                busy,
  output logic                out_valid,
  output logic [DATA_W-1:0]   so_re,
  output logic [DATA_W-1:0]   so_im
);

  logic                       sipo_en, load, piso_en;
  logic [DATA_W*NPOINT-1:0]   po;
  logic [DATA_W*NPOINT-1:0]   pi_re, pi_im;

  cplx_t fwd_in   [NPOINT];
  cplx_t spectrum [NPOINT];
  cplx_t conj_out [NPOINT];
  cplx_t inv_in   [NPOINT];
  cplx_t inv_out  [NPOINT];

  control_unit #(.DEPTH(NPOINT)) u_ctrl (
    .clk, .rst, .start,
    .sipo_en, .load, .piso_en, .out_valid, .busy
  );

  sipo #(.DATA_W(DATA_W), .DEPTH(NPOINT)) u_sipo (
    .clk, .rst, .en(sipo_en), .si, .po
  );

  // Bit-reversed input order for the decimation-in-time FFT; the input
  // samples are real, so the imaginary inputs are zero.
  for (genvar i = 0; i < NPOINT; i++) begin : g_fwd_in
    localparam int unsigned SRC = bitrev4(i);
    assign fwd_in[i].re = sample_t'(po[SRC*DATA_W +: DATA_W]);
    assign fwd_in[i].im = '0;
  end

  fft16 u_forward (.x(fwd_in), .y(spectrum));

  conjugate u_conj (.x(spectrum), .y(conj_out));

  for (genvar i = 0; i < NPOINT; i++) begin : g_inv_in
    localparam int unsigned SRC = bitrev4(i);
    assign inv_in[i] = conj_out[SRC];
  end

  inverse_fft16 u_inverse (.x(inv_in), .y(inv_out));

  for (genvar i = 0; i < NPOINT; i++) begin : g_pack
    assign pi_re[i*DATA_W +: DATA_W] = inv_out[i].re;
    assign pi_im[i*DATA_W +: DATA_W] = inv_out[i].im;
  end

  piso #(.DATA_W(DATA_W), .DEPTH(NPOINT)) u_piso_re (
    .clk, .rst, .load, .en(piso_en), .pi(pi_re), .so(so_re)
  );

  piso #(.DATA_W(DATA_W), .DEPTH(NPOINT)) u_piso_im (
    .clk, .rst, .load, .en(piso_en), .pi(pi_im), .so(so_im)
  );

  assign in_take = sipo_en;

endmodule
