// fp_add_swap: "exponent difference / swap" stage of the dual-path IEEE 754
// adder.
//
// Unpacks x and y (binary format with EXP_WIDTH exponent bits and a
// significand of SIG_WIDTH bits including the hidden bit). A subnormal or
// zero operand gets hidden bit 0 and effective biased exponent 1. The operands
// are swapped when needed so that e_x >= e_y, as the adder algorithm requires;
// the stage then gives the exponent difference e_x - e_y, the effective
// operation (+/- = s_x XOR s_y) and the path choice: the close path is taken
// for an effective subtraction with an exponent difference of at most one,
// the far path otherwise. Combinational.
module fp_add_swap #(
  parameter int EXP_WIDTH = 8,
  parameter int SIG_WIDTH = 24,
  parameter int W         = EXP_WIDTH + SIG_WIDTH
) (
  input  logic [W-1:0]         x,
  input  logic [W-1:0]         y,
  output logic                 s_x,        // sign of the operand with the larger exponent
  output logic                 op_sub,     // effective subtraction
  output logic                 close,      // 1: close path, 0: far path
  output logic [EXP_WIDTH-1:0] e_x,        // larger effective biased exponent
  output logic [EXP_WIDTH-1:0] e_diff,     // e_x - e_y
  output logic [SIG_WIDTH-1:0] m_x,        // significand of the larger-exponent operand
  output logic [SIG_WIDTH-1:0] m_y
);

  localparam int EW = EXP_WIDTH;
  localparam int F  = SIG_WIDTH - 1;

  logic [EW-1:0] ex_raw, ey_raw, ex_eff, ey_eff;
  logic [SIG_WIDTH-1:0] mx_raw, my_raw;
  logic swap;

  assign ex_raw = x[W-2 -: EW];
  assign ey_raw = y[W-2 -: EW];
  assign ex_eff = (ex_raw == '0) ? EW'(1) : ex_raw;
  assign ey_eff = (ey_raw == '0) ? EW'(1) : ey_raw;
  assign mx_raw = {ex_raw != '0, x[F-1:0]};
  assign my_raw = {ey_raw != '0, y[F-1:0]};
  assign swap   = ey_eff > ex_eff;

  assign s_x    = swap ? y[W-1] : x[W-1];
  assign e_x    = swap ? ey_eff : ex_eff;
  assign e_diff = swap ? (ey_eff - ex_eff) : (ex_eff - ey_eff);
  assign m_x    = swap ? my_raw : mx_raw;
  assign m_y    = swap ? mx_raw : my_raw;
  assign op_sub = x[W-1] ^ y[W-1];
  assign close  = op_sub && (e_diff <= EW'(1));

endmodule
