// fp_add_close: close path of the dual-path IEEE 754 adder.
//
// Used for effective subtraction with exponent difference 0 or 1, where
// massive cancellation can occur but no alignment rounding is needed. m_y is
// shifted right by one bit when the difference is 1 (p+1-bit operands), the
// absolute difference |m_x - m_y| is formed (neg reports that m_y was the
// larger, so the result sign flips), a leading zero count lambda normalises
// it and e_z = e_x - lambda. The sticky bit of this path is 0: the result is
// exact. If the normalising shift would take the exponent below the minimum
// normal exponent, the shift stops at e_z = 1 and the result stays
// subnormal (this limit follows the adder's e_min rule).
//
// Output m_z is p+1 bits with the hidden bit at the MSB, value
// m_z * 2^(e_z - bias - p). Combinational.
module fp_add_close #(
  parameter int EXP_WIDTH = 8,
  parameter int SIG_WIDTH = 24,
  parameter int EZW       = EXP_WIDTH + 2
) (
  input  logic [EXP_WIDTH-1:0]  e_x,
  input  logic                  d_one,     // exponent difference is 1
  input  logic [SIG_WIDTH-1:0]  m_x,
  input  logic [SIG_WIDTH-1:0]  m_y,
  output logic                  neg,
  output logic signed [EZW-1:0] e_z,
  output logic [SIG_WIDTH:0]    m_z,
  output logic                  zero
);

  localparam int P  = SIG_WIDTH;
  localparam int CW = $clog2(P + 2);

  logic [P:0]   mx1, my1, absd;
  logic [P+1:0] diff;
  logic [CW-1:0] lambda, shamt;
  logic signed [EZW-1:0] ex_s;

  assign mx1  = {m_x, 1'b0};
  assign my1  = d_one ? {1'b0, m_y} : {m_y, 1'b0};   // 1-bit shift
  assign diff = {1'b0, mx1} - {1'b0, my1};
  assign neg  = diff[P+1];
  assign absd = neg ? (my1 - mx1) : diff[P:0];
  assign zero = (absd == '0);

  lzc #(.WIDTH(P+1)) u_lzc (.in_bits(absd), .count(lambda));

  assign ex_s = EZW'($signed({1'b0, e_x}));
  always_comb begin
    if (ex_s - EZW'($signed({1'b0, lambda})) >= EZW'(1)) begin
      shamt = lambda;
      e_z   = ex_s - EZW'($signed({1'b0, lambda}));
    end else begin
      shamt = CW'(e_x - 1'b1);
      e_z   = EZW'(1);
    end
  end

  assign m_z = absd << shamt;

endmodule
