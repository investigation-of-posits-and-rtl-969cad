// posit_adder: complete N-bit posit adder, z = x + y.
//
// The three-part posit datapath: two posit_decoder instances extract sign,
// specials, scaling factor and significand of x and y; the addition core (posit_add_core) computes
// the exact sum as sign, scale, normalised fraction and sticky; the
// posit_encoder rounds it to nearest-even on the bit string and forms the
// result. NaR (100..0, the posit infinity) propagates; posits never overflow
// or underflow. Entirely combinational, as the evaluated units are; a
// surrounding design registers inputs and outputs. Defaults N=16, ES=1 are
// the 16-bit configuration evaluated; (8,0) and (32,2) are the other two.
module posit_adder #(
  parameter int N  = 16,
  parameter int ES = 1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] z
);

  localparam int SW   = arith_pkg::posit_scale_width(N, ES);
  localparam int SIGW = N - 2 - ES;
  localparam int FRW  = 2 * SIGW + 1;

  logic                  xs, xz, xn, ys, yz, yn, rs, rz, rn, rst;
  logic signed [SW-1:0]  xe, ye;
  logic        [SIGW-1:0] xm, ym;
  logic signed [SW:0]    re;
  logic        [FRW-1:0] rf;

  posit_decoder #(.N(N), .ES(ES)) u_dec_x (
    .p(x), .sign(xs), .is_zero(xz), .is_nar(xn), .scale(xe), .sig(xm));
  posit_decoder #(.N(N), .ES(ES)) u_dec_y (
    .p(y), .sign(ys), .is_zero(yz), .is_nar(yn), .scale(ye), .sig(ym));

  posit_add_core #(.N(N), .ES(ES)) u_core (
    .a_sign(xs), .a_zero(xz), .a_nar(xn), .a_scale(xe), .a_sig(xm),
    .b_sign(ys), .b_zero(yz), .b_nar(yn), .b_scale(ye), .b_sig(ym),
    .r_sign(rs), .r_zero(rz), .r_nar(rn), .r_scale(re), .r_frac(rf), .r_sticky(rst));

  posit_encoder #(.N(N), .ES(ES), .SWI(SW + 1), .FRW(FRW)) u_enc (
    .sign(rs), .is_zero(rz), .is_nar(rn), .scale(re), .frac(rf), .sticky(rst), .p(z));

endmodule
