// fp_round: "rounding, normalization and exception handling" stage of the
// IEEE 754 adder.
//
// Takes the path result (sign, exponent e_z as a signed biased value,
// significand m_z of p+1 bits with the hidden bit at the MSB and a round bit
// at the LSB, and sticky s_z). Steps:
//  * exponent below the minimum: m_z is shifted right by 1 - e_z (bits
//    shifted out join the sticky) and e_z becomes 1 -- the result is
//    subnormal;
//  * the exponent field is e_z, or 0 when the hidden bit is 0 (subnormal);
//  * round to nearest, ties to even: inc = round & (lsb | sticky), added to the
//    packed {exponent field, fraction}, so a carry out of the fraction moves
//    into the exponent (subnormal to normal, or largest finite to infinity);
//  * an exponent at or above all-ones gives infinity with the overflow flag.
// Flags: overflow, underflow (tiny before rounding and inexact) and inexact.
// Round-to-nearest-even is the only mode: it is the mode the design uses,
// as posits do. Combinational. The stage's place and the flags follow the
// dual-path adder; the denormalising shift and the choice of detecting
// tininess before rounding are this design's own.
module fp_round #(
  parameter int EXP_WIDTH = 8,
  parameter int SIG_WIDTH = 24,
  parameter int EZW       = EXP_WIDTH + 2,
  parameter int W         = EXP_WIDTH + SIG_WIDTH
) (
  input  logic                  sign,
  input  logic                  zero,     // exact zero result
  input  logic signed [EZW-1:0] e_z,
  input  logic [SIG_WIDTH:0]    m_z,
  input  logic                  s_z,
  output logic [W-1:0]          z,
  output logic                  overflow,
  output logic                  underflow,
  output logic                  inexact
);

  localparam int P  = SIG_WIDTH;
  localparam int EW = EXP_WIDTH;
  localparam int CW = $clog2(P + 3);

  logic [CW-1:0]  dshift;
  logic [2*P+2:0] den;
  logic [P:0]     m_d;
  logic           st_d, rb, lsb, inc, tiny, big;
  logic [EW-1:0]  ef;
  logic [W-2:0]   packed_r;

  // Denormalisation for results below the minimum normal exponent.
  always_comb begin
    if (e_z >= EZW'(1))                 dshift = '0;
    else if (e_z <= -EZW'(P + 1))       dshift = CW'(P + 2);
    else                                dshift = CW'(EZW'(1) - e_z);
  end
  assign den  = {m_z, {(P+2){1'b0}}} >> dshift;
  assign m_d  = den[2*P+2 -: P+1];
  assign st_d = s_z | (|den[P+1:0]);

  assign big  = (e_z >= EZW'((1 << EW) - 1));
  assign ef   = m_d[P] ? ((e_z >= EZW'(1)) ? e_z[EW-1:0] : EW'(1)) : '0;
  assign rb   = m_d[0];
  assign lsb  = m_d[1];
  assign inc  = rb & (lsb | st_d);
  assign tiny = ~m_d[P];
  assign packed_r = {ef, m_d[P-1:1]} + (W-1)'(inc);

  always_comb begin
    overflow  = 1'b0;
    inexact   = rb | st_d;
    if (zero) begin
      z       = {sign, {(W-1){1'b0}}};
      inexact = 1'b0;
    end else if (big || packed_r[W-2 -: EW] == '1) begin
      z        = {sign, {EW{1'b1}}, {(P-1){1'b0}}};
      overflow = 1'b1;
      inexact  = 1'b1;
    end else begin
      z = {sign, packed_r};
    end
    underflow = tiny & inexact & ~zero;
  end

endmodule
