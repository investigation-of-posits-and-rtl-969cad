// tb_fp_round: test of fp_round for binary16 (5, 11).
// Random sign, exponent from far below the subnormal range to above the
// overflow threshold, normalised (p+1)-bit significand with round bit and a
// random sticky. The value they stand for (sticky adds a tiny amount that
// cannot make a tie) is rounded by ref_pkg and the result and the overflow,
// underflow and inexact flags compared. Exact zero is checked too.
// Timing: the block is combinational; each input is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_fp_round;
  import ref_pkg::*;

  logic        sign, zero, s_z, overflow, underflow, inexact;
  logic signed [6:0] e_z;
  logic [11:0] m_z;
  logic [15:0] z;
  int checks = 0, failures = 0;

  fp_round #(.EXP_WIDTH(5), .SIG_WIDTH(11)) dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] exp;
      logic [3:0] fl;
      fx_t mag;
      int ez;
      sign = 1'($urandom);
      zero = (i % 101 == 4);
      ez   = $urandom_range(0, 50) - 16;
      e_z  = 7'(ez);
      m_z  = {1'b1, 11'($urandom)};
      s_z  = 1'($urandom);
      if (i % 4 == 0) begin m_z[0] = 1'b1; s_z = 1'b0; end        // ties
      if (i % 8 == 1) m_z = 12'hfff;                              // carries
      #1;
      // value = m_z * 2^(e_z - 15 - 11)
      mag = (fx_t'(m_z) << (FB + ez - 26)) + fx_t'(s_z);
      if (zero) begin exp = 64'(sign) << 15; fl = 4'b0; end
      else exp = round_to(1'b0, 5, 10, sign, mag, fl);
      checks++;
      if (64'(z) != exp || {overflow, underflow, inexact} != fl[2:0]) begin
        failures++;
        if (failures <= 10) $display("FAIL s=%b e_z=%0d m_z=%h st=%b got=%h/%b%b%b exp=%h/%b", sign, ez, m_z, s_z, z, overflow, underflow, inexact, exp, fl);
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
