// fp_multiplier: IEEE 754 binary multiplier, z = x * y.
//
// Datapath (two halves working side by side):
//  * exponent side: the biased exponents are added, (e_x+b) + (e_y+b), and
//    two candidates are formed in parallel, the sum minus b (e_x+e_y+b) and
//    the sum minus b-1 (e_x+e_y+b+1); a multiplexer picks the second when the
//    product MSB z_-1 is set or the incrementer carries out (an OR gate);
//  * significand side: the p-bit significands 1.m_x and 1.m_y give a 2p-bit
//    product z_-1 z_0 ... z_{2p-2}; a multiplexer controlled by z_-1 takes the
//    p-1 fraction bits z_0..z_{p-2} (z_-1 = 1) or z_1..z_{p-1} (z_-1 = 0); the
//    sticky bit is the OR of z_{p+1}..z_{2p-2}; the rounding logic (round to
//    nearest, ties to even) looks at z_-1, z_{p-2}, z_{p-1}, z_p and the
//    sticky bit and drives the incrementer.
// Additions of this design to that structure, needed for full IEEE
// behaviour: subnormal operands are normalised first by a leading zero count
// (their exponent can then go below 1); a result below the normal range is
// shifted right before the fraction multiplexer (bits leaving join the
// sticky) and takes exponent candidates 0 and 1, so rounding up into the
// normal range works through the same incrementer carry; an exponent at or
// above all-ones gives infinity and overflow. Specials: NaN in gives the
// canonical quiet NaN, infinity times zero gives it with invalid,
// infinity times a number is infinity, zero times a number is a signed zero.
// Flags follow the adder (tininess before rounding).
//
// Combinational. Defaults binary32: EXP_WIDTH 8, SIG_WIDTH 24 (with the
// hidden bit).
module fp_multiplier #(
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
  localparam int XW  = EW + 3;                 // signed exponent arithmetic
  localparam int CW  = $clog2(P + 1);
  localparam int DW  = $clog2(2 * P + 1);
  localparam int BIAS = (1 << (EW - 1)) - 1;

  logic [EW-1:0]  ex, ey;
  logic [P-1:0]   mx_raw, my_raw, mx, my;
  logic [CW-1:0]  lzx, lzy;
  logic signed [XW-1:0] ex_n, ey_n, esum, cand0, cand1, e_sel, base0, base1;
  logic [2*P-1:0] prod, prod_n, prod_t;
  logic           z_m1, tiny, sticky, lsb, rbit, inc, cout, sel, ovf;
  logic [DW-1:0]  tshift;
  logic [P-2:0]   frac_sel, frac_inc;
  logic           x_zero, y_zero, x_nan, y_nan, x_inf, y_inf, x_snan, y_snan, sgn;
  logic [4*P-1:0] tsh_full;

  assign ex     = x[W-2 -: EW];
  assign ey     = y[W-2 -: EW];
  assign mx_raw = {ex != '0, x[P-2:0]};
  assign my_raw = {ey != '0, y[P-2:0]};

  // Subnormal operands: normalise so the hidden bit is 1.
  lzc #(.WIDTH(P)) u_lzx (.in_bits(mx_raw), .count(lzx));
  lzc #(.WIDTH(P)) u_lzy (.in_bits(my_raw), .count(lzy));
  assign mx   = mx_raw << lzx;
  assign my   = my_raw << lzy;
  assign ex_n = XW'($signed({1'b0, (ex == '0) ? EW'(1) : ex})) - XW'($signed({1'b0, lzx}));
  assign ey_n = XW'($signed({1'b0, (ey == '0) ? EW'(1) : ey})) - XW'($signed({1'b0, lzy}));

  // Exponent side: sum, then -b and -(b-1) in parallel.
  assign esum  = ex_n + ey_n;
  assign cand0 = esum - XW'(BIAS);
  assign cand1 = esum - XW'(BIAS - 1);

  // Significand product.
  assign prod = mx * my;

  // Results below the normal range: shift right so that the hidden bit of a
  // number with biased exponent 1 sits at z_0.
  assign prod_n = prod[2*P-1] ? prod : (prod << 1);             // hidden at 2P-1
  assign tiny   = (prod[2*P-1] ? cand1 : cand0) < XW'(1);
  always_comb begin
    logic signed [XW-1:0] amount;
    amount = XW'(2) - (prod[2*P-1] ? cand1 : cand0);
    tshift = (amount > XW'(2 * P)) ? DW'(2 * P) : DW'(amount);
  end
  assign tsh_full = {prod_n, {(2*P){1'b0}}} >> tshift;
  assign prod_t   = tiny ? (tsh_full[4*P-1 -: 2*P] | (2*P)'(|tsh_full[2*P-1:0])) : prod;

  // z_-1 selected fraction, rounding bits and sticky.
  assign z_m1     = prod_t[2*P-1];
  assign frac_sel = z_m1 ? prod_t[2*P-2 -: P-1] : prod_t[2*P-3 -: P-1];
  assign lsb      = z_m1 ? prod_t[P]   : prod_t[P-1];      // z_{p-2} / z_{p-1}
  assign rbit     = z_m1 ? prod_t[P-1] : prod_t[P-2];      // z_{p-1} / z_p
  assign sticky   = z_m1 ? (|prod_t[P-2:0]) : (|prod_t[P-3:0]);
  assign inc      = rbit & (lsb | sticky);

  // Incrementer with carry out.
  assign {cout, frac_inc} = {1'b0, frac_sel} + P'(inc);

  // Exponent multiplexer controlled by (z_-1 OR carry out).
  assign base0 = tiny ? XW'(0) : cand0;
  assign base1 = tiny ? XW'(1) : cand1;
  assign sel   = z_m1 | cout;
  assign e_sel = sel ? base1 : base0;
  assign ovf   = (e_sel >= XW'((1 << EW) - 1));

  // Exception handling.
  assign x_zero = (x[W-2:0] == '0);
  assign y_zero = (y[W-2:0] == '0);
  assign x_nan  = (ex == '1) && (x[P-2:0] != '0);
  assign y_nan  = (ey == '1) && (y[P-2:0] != '0);
  assign x_inf  = (ex == '1) && (x[P-2:0] == '0);
  assign y_inf  = (ey == '1) && (y[P-2:0] == '0);
  assign x_snan = x_nan && !x[P-2];
  assign y_snan = y_nan && !y[P-2];
  assign sgn    = x[W-1] ^ y[W-1];

  always_comb begin
    flags = '0;
    if (x_nan || y_nan || (x_inf && y_zero) || (y_inf && x_zero)) begin
      z             = {1'b0, {EW{1'b1}}, 1'b1, {(P-2){1'b0}}};
      flags.invalid = x_snan || y_snan || !(x_nan || y_nan);
    end else if (x_inf || y_inf) begin
      z = {sgn, {EW{1'b1}}, {(P-1){1'b0}}};
    end else if (x_zero || y_zero) begin
      z = {sgn, {(W-1){1'b0}}};
    end else if (ovf) begin
      z              = {sgn, {EW{1'b1}}, {(P-1){1'b0}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else begin
      z               = {sgn, e_sel[EW-1:0], frac_inc};
      flags.inexact   = rbit | sticky;
      flags.underflow = tiny & (rbit | sticky);
    end
  end

endmodule
