// tb_fp_add_close: test of fp_add_close for binary16 (p = 11).
// Random normal and subnormal significands with exponent difference 0 or 1.
// The result value m_z * 2^e_z must equal |m_x - m_y / 2^d| * 2^e_x exactly
// (scaled integers), neg must say which operand was larger, and m_z must be
// normalised (MSB set) unless the exponent stopped at 1.
// Timing: the block is combinational; each input is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_fp_add_close;
  logic [4:0]  e_x;
  logic        d_one, neg, zero;
  logic [10:0] m_x, m_y;
  logic signed [6:0] e_z;
  logic [11:0] m_z;
  int checks = 0, failures = 0;

  fp_add_close #(.EXP_WIDTH(5), .SIG_WIDTH(11)) dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint a, b, d, got, exp;
      e_x   = 5'($urandom_range(1, 30));
      d_one = (e_x > 1) ? 1'($urandom) : 1'b0;
      m_x   = {1'b1, 10'($urandom)};
      m_y   = {1'b1, 10'($urandom)};
      if (i % 7 == 0) m_y = m_x ^ 11'($urandom_range(0, 3));
      if (e_x == 1 && i % 2 == 0) begin m_x[10] = 1'b0; m_y[10] = 1'($urandom); end
      #1;
      a = longint'(m_x) << 1;
      b = d_one ? longint'(m_y) : longint'(m_y) << 1;
      d = (a >= b) ? a - b : b - a;
      exp = d << (int'(e_x) + 12);
      got = longint'(m_z) << (int'(e_z) + 12);
      checks++;
      if (got != exp || neg != (b > a) || zero != (d == 0) ||
          (d != 0 && !m_z[11] && e_z != 1) || e_z < 1) begin
        failures++;
        if (failures <= 10) $display("FAIL e_x=%0d d1=%b mx=%h my=%h got m_z=%h e_z=%0d", e_x, d_one, m_x, m_y, m_z, e_z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
