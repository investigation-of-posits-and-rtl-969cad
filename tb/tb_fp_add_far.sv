// tb_fp_add_far: test of fp_add_far for binary16 (p = 11).
// Random significands, exponent differences 0..30 (addition) or 2..30
// (subtraction). With everything scaled to integers, the exact result R must
// satisfy m_z * K <= R < (m_z + 1) * K with K = 2^(e_z - e_x) ulps, and the
// sticky s' must be set exactly when R is not m_z * K; m_z must be
// normalised (MSB set) after prenorm unless e_x is 1.
// Timing: the block is combinational; each input is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_fp_add_far;
  logic [4:0]  e_x, e_diff;
  logic        op_sub, s_z;
  logic [10:0] m_x, m_y;
  logic signed [6:0] e_z;
  logic [11:0] m_z;
  int checks = 0, failures = 0;

  fp_add_far #(.EXP_WIDTH(5), .SIG_WIDTH(11)) dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [127:0] r, lo, hi;
      int sh;
      op_sub = 1'($urandom);
      e_diff = op_sub ? 5'($urandom_range(2, 30)) : 5'($urandom_range(0, 30));
      e_x    = 5'($urandom_range(int'(e_diff) + 1, 30));
      m_x    = {1'b1, 10'($urandom)};
      m_y    = {1'b1, 10'($urandom)};
      if (i % 9 == 0) begin m_x = {1'b1, 10'd0}; m_y = '1; end
      #1;
      // Exact value in units of 2^-(10 + 40) relative to 2^(e_x - bias).
      r  = (128'(m_x) << 40);
      r  = op_sub ? r - ((128'(m_y) << 40) >> e_diff) : r + ((128'(m_y) << 40) >> e_diff);
      // m_z has p+1 bits: its LSB weighs 2^(e_z - e_x) * 2^-(p) relative units.
      sh = 40 - 1 + (int'(e_z) - int'(e_x));
      lo = 128'(m_z) << sh;
      hi = 128'(m_z + 12'd1) << sh;
      checks++;
      if (!(lo <= r && r < hi) || s_z != (r != lo) || !m_z[11]) begin
        failures++;
        if (failures <= 10) $display("FAIL e_x=%0d d=%0d sub=%b mx=%h my=%h m_z=%h e_z=%0d s=%b", e_x, e_diff, op_sub, m_x, m_y, m_z, e_z, s_z);
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
