// fp_add_far: far path of the dual-path IEEE 754 adder.
//
// Used for effective addition, and for subtraction with an exponent
// difference of 2 or more. m_y is right-shifted by e_x - e_y into a 2p+2-bit
// field: its top p bits are the aligned significand, then the guard bit g,
// the round bit r, and the low p bits whose OR is the sticky bit s (a shift
// of p+2 or more leaves only the sticky bit). The adder/subtracter then works
// on {m_x, 000} +/- {aligned, g, r, s}, so a borrow out of g, r and s is
// exact; carrying g, r, s through the subtracter is this design's choice.
// Prenorm (a 2-bit shift) looks at the two leading bits of the sum:
//   "1x" carry out: e_z = e_x + 1, the guard becomes the round bit, s' = g|r|s;
//   "01":           e_z = e_x, s' = r|s;
//   "00":           e_z = e_x - 1, s' = s (not done for e_x = 1, where the
//                   result is subnormal and stays unshifted).
// m_z is p+1 bits (significand and round bit), value
// m_z * 2^(e_z - bias - p). Combinational.
module fp_add_far #(
  parameter int EXP_WIDTH = 8,
  parameter int SIG_WIDTH = 24,
  parameter int EZW       = EXP_WIDTH + 2
) (
  input  logic [EXP_WIDTH-1:0]  e_x,
  input  logic [EXP_WIDTH-1:0]  e_diff,
  input  logic                  op_sub,
  input  logic [SIG_WIDTH-1:0]  m_x,
  input  logic [SIG_WIDTH-1:0]  m_y,
  output logic signed [EZW-1:0] e_z,
  output logic [SIG_WIDTH:0]    m_z,
  output logic                  s_z
);

  localparam int P  = SIG_WIDTH;
  localparam int SH = 2 * P + 2;
  localparam int CW = $clog2(SH + 1);

  logic [CW-1:0]   dcap;
  logic [SH-1:0]   shifted;
  logic [P-1:0]    aligned;
  logic            g, r, s;
  logic [P+3:0]    sum;
  logic signed [EZW-1:0] ex_s;

  assign dcap    = (e_diff > EXP_WIDTH'(P + 2)) ? CW'(P + 2) : CW'(e_diff);
  assign shifted = {m_y, {(P+2){1'b0}}} >> dcap;
  assign aligned = shifted[SH-1 -: P];
  assign g       = shifted[P+1];
  assign r       = shifted[P];
  assign s       = |shifted[P-1:0];

  assign sum = op_sub ? ({1'b0, m_x, 3'b000} - {1'b0, aligned, g, r, s})
                      : ({1'b0, m_x, 3'b000} + {1'b0, aligned, g, r, s});

  assign ex_s = EZW'($signed({1'b0, e_x}));

  // Prenorm: 2-bit shift chosen by the two leading bits.
  always_comb begin
    if (sum[P+3]) begin
      m_z = sum[P+3:3];
      s_z = |sum[2:0];
      e_z = ex_s + EZW'(1);
    end else if (sum[P+2] || e_x == EXP_WIDTH'(1)) begin
      m_z = sum[P+2:2];
      s_z = |sum[1:0];
      e_z = ex_s;
    end else begin
      m_z = sum[P+1:1];
      s_z = sum[0];
      e_z = ex_s - EZW'(1);
    end
  end

endmodule
