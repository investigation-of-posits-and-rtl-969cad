// tb_fp_add_swap: test of fp_add_swap for binary16 (5, 11).
// Random operands, including subnormals and zeros; the expected ordering,
// exponent difference, effective operation and close/far choice are worked
// out from the operand fields in the testbench.
// Timing: the block is combinational; each pair is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_fp_add_swap;
  logic [15:0] x, y;
  logic s_x, op_sub, close;
  logic [4:0] e_x, e_diff;
  logic [10:0] m_x, m_y;
  int checks = 0, failures = 0;

  fp_add_swap #(.EXP_WIDTH(5), .SIG_WIDTH(11)) dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int ex, ey, ee, ed;
      logic [10:0] mx, my, ml, ms;
      logic sl, sub, cl;
      x = 16'($urandom); y = 16'($urandom);
      if (i % 4 == 1) y[14:10] = x[14:10] + 5'($urandom_range(0, 2)) - 5'd1;
      if (i % 8 == 3) x[14:10] = 5'd0;
      #1;
      ex = (x[14:10] == 0) ? 1 : int'(x[14:10]);
      ey = (y[14:10] == 0) ? 1 : int'(y[14:10]);
      mx = {x[14:10] != 0, x[9:0]};
      my = {y[14:10] != 0, y[9:0]};
      if (ey > ex) begin ee = ey; ed = ey - ex; ml = my; ms = mx; sl = y[15]; end
      else         begin ee = ex; ed = ex - ey; ml = mx; ms = my; sl = x[15]; end
      sub = x[15] ^ y[15];
      cl  = sub && ed <= 1;
      checks++;
      if (int'(e_x) != ee || int'(e_diff) != ed || m_x != ml || m_y != ms || s_x != sl || op_sub != sub || close != cl) begin
        failures++;
        if (failures <= 10) $display("FAIL x=%h y=%h", x, y);
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
