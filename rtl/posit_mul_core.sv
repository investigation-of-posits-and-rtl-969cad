// posit_mul_core: multiplies two decoded posits (outputs of posit_decoder).
//
// Steps, following the posit multiplication core: the special cases are
// checked (NaR times anything, and zero times NaR, give NaR; zero times a
// number gives zero); the significands 1.f are multiplied into a 2*SIGW-bit
// product whose MSB is the overflow bit (product in [2,4)); the product is
// normalised by one position when that bit is clear; the result scale is
// scale_a + scale_b + overflow. The sign is the XOR of the signs.
//
// Outputs go to posit_encoder: fraction below the hidden one (FRW =
// 2*SIGW-1 bits, exact) and a sticky bit that is always 0 here.
// Combinational.
module posit_mul_core #(
  parameter int N    = 16,
  parameter int ES   = 1,
  parameter int SW   = arith_pkg::posit_scale_width(N, ES),
  parameter int SIGW = N - 2 - ES,
  parameter int FRW  = 2 * SIGW - 1
) (
  input  logic                  a_sign, a_zero, a_nar,
  input  logic signed [SW-1:0]  a_scale,
  input  logic        [SIGW-1:0] a_sig,
  input  logic                  b_sign, b_zero, b_nar,
  input  logic signed [SW-1:0]  b_scale,
  input  logic        [SIGW-1:0] b_sig,
  output logic                  r_sign, r_zero, r_nar,
  output logic signed [SW:0]    r_scale,
  output logic        [FRW-1:0] r_frac,
  output logic                  r_sticky
);

  logic [2*SIGW-1:0] prod;
  logic              ovf;

  assign prod     = a_sig * b_sig;
  assign ovf      = prod[2*SIGW-1];
  assign r_frac   = ovf ? prod[2*SIGW-2:0] : {prod[2*SIGW-3:0], 1'b0};
  assign r_scale  = (SW+1)'(a_scale) + (SW+1)'(b_scale) + (SW+1)'(ovf);
  assign r_sign   = a_sign ^ b_sign;
  assign r_nar    = a_nar | b_nar;
  assign r_zero   = (a_zero | b_zero) & ~r_nar;
  assign r_sticky = 1'b0;

endmodule
