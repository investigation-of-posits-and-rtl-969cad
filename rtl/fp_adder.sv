// fp_adder: dual-path IEEE 754 binary adder, z = x + y (subtraction is
// addition of a negated operand).
//
// Structure: fp_add_swap orders the operands by exponent and decides the
// path; fp_add_close (exponent difference <= 1 with effective subtraction:
// 1-bit shift, |m_x - m_y|, LZC/shift) and fp_add_far (alignment shift,
// sticky, add/subtract, prenorm) both compute; a multiplexer driven by the
// close/far choice picks one (e_z, m_z, s'); fp_round rounds to nearest even
// and forms subnormal, overflow and inexact results. Special operands are
// handled beside the datapath: NaN in gives the canonical quiet NaN
// (sign 0, exponent all ones, fraction MSB 1), inf - inf gives it with the
// invalid flag, a signalling NaN operand raises invalid, an infinity passes
// through. An exact zero sum is +0 except (-0) + (-0). The canonical NaN and
// the tininess-before-rounding underflow are this design's choices.
//
// Combinational. Defaults are binary32 (EXP_WIDTH 8, SIG_WIDTH 24 including
// the hidden bit); the evaluated 16- and 8-bit formats are (5, 11) and (3, 5).
module fp_adder #(
  parameter int EXP_WIDTH = 8,
  parameter int SIG_WIDTH = 24,
  parameter int W         = EXP_WIDTH + SIG_WIDTH
) (
  input  logic [W-1:0]          x,
  input  logic [W-1:0]          y,
  output logic [W-1:0]          z,
  output arith_pkg::fp_flags_t  flags
);

  localparam int EW  = EXP_WIDTH;
  localparam int P   = SIG_WIDTH;
  localparam int EZW = EW + 2;

  logic                 s_x, op_sub, close, c_neg, c_zero, f_s;
  logic [EW-1:0]        e_x, e_diff;
  logic [P-1:0]         m_x, m_y;
  logic signed [EZW-1:0] c_e, f_e, r_e;
  logic [P:0]           c_m, f_m, r_m;
  logic                 r_s, r_sign, r_zero;
  logic [W-1:0]         r_z;
  logic                 ovf, unf, inx;
  logic                 x_nan, y_nan, x_inf, y_inf, x_snan, y_snan;

  fp_add_swap #(.EXP_WIDTH(EW), .SIG_WIDTH(P)) u_swap (
    .x(x), .y(y), .s_x(s_x), .op_sub(op_sub), .close(close),
    .e_x(e_x), .e_diff(e_diff), .m_x(m_x), .m_y(m_y));

  fp_add_close #(.EXP_WIDTH(EW), .SIG_WIDTH(P)) u_close (
    .e_x(e_x), .d_one(e_diff[0]), .m_x(m_x), .m_y(m_y),
    .neg(c_neg), .e_z(c_e), .m_z(c_m), .zero(c_zero));

  fp_add_far #(.EXP_WIDTH(EW), .SIG_WIDTH(P)) u_far (
    .e_x(e_x), .e_diff(e_diff), .op_sub(op_sub), .m_x(m_x), .m_y(m_y),
    .e_z(f_e), .m_z(f_m), .s_z(f_s));

  // Path multiplexer (c/f).
  always_comb begin
    if (close) begin
      r_e    = c_e;
      r_m    = c_m;
      r_s    = 1'b0;
      r_zero = c_zero;
      r_sign = c_zero ? 1'b0 : (s_x ^ c_neg);
    end else begin
      r_e    = f_e;
      r_m    = f_m;
      r_s    = f_s;
      r_zero = (f_m == '0) && !f_s;
      r_sign = s_x;
    end
  end

  fp_round #(.EXP_WIDTH(EW), .SIG_WIDTH(P)) u_round (
    .sign(r_sign), .zero(r_zero), .e_z(r_e), .m_z(r_m), .s_z(r_s),
    .z(r_z), .overflow(ovf), .underflow(unf), .inexact(inx));

  // Exception handling for special operands.
  assign x_nan  = (x[W-2 -: EW] == '1) && (x[P-2:0] != '0);
  assign y_nan  = (y[W-2 -: EW] == '1) && (y[P-2:0] != '0);
  assign x_inf  = (x[W-2 -: EW] == '1) && (x[P-2:0] == '0);
  assign y_inf  = (y[W-2 -: EW] == '1) && (y[P-2:0] == '0);
  assign x_snan = x_nan && !x[P-2];
  assign y_snan = y_nan && !y[P-2];

  always_comb begin
    flags = '0;
    if (x_nan || y_nan || (x_inf && y_inf && (x[W-1] != y[W-1]))) begin
      z             = {1'b0, {EW{1'b1}}, 1'b1, {(P-2){1'b0}}};
      flags.invalid = x_snan || y_snan || !(x_nan || y_nan);
    end else if (x_inf) begin
      z = x;
    end else if (y_inf) begin
      z = y;
    end else begin
      z               = r_z;
      flags.overflow  = ovf;
      flags.underflow = unf;
      flags.inexact   = inx;
    end
  end

endmodule
