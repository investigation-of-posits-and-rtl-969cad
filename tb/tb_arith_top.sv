// tb_arith_top: end-to-end test of arith_top at its default parameters.
//
// Streams operations through the registered top, one per cycle with random
// idle cycles, over all five design slots and both operations. Each result
// is checked against ref_pkg (exact-value posit and IEEE 754 models), the
// IEEE flags included, and must appear exactly two clock cycles after its
// operands were accepted. Directed operands make every mechanism of the
// units happen; the test counts each and fails any that never occurred:
// posit NaR propagation, saturation at maxpos and at minpos, exact
// cancellation; IEEE adder close path, far path, far-path carry-out and
// left prenorm shift, subnormal (underflow) result, overflow, invalid;
// IEEE multiplier product MSB z_-1, incrementer carry-out selecting the
// exponent, and the below-normal-range shift.
// Interface use: operands are driven on the falling clock edge with in_valid;
// results are sampled on the rising edge when out_valid is set. The five
// slots follow the comparison set-up being modelled; the stream, the idle
// cycles and the counters are this testbench's own. A watchdog ends a hung run.
module tb_arith_top;
  import arith_pkg::*;
  import ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  design_e     design_sel = DESIGN_POSIT8;
  op_e         op = OP_ADD;
  logic [31:0] x = '0, y = '0, z;
  fp_flags_t   flags;

  arith_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [31:0] z;
    logic [3:0]  f;
    longint      cyc;
    int          sel;
    logic        mul;
    logic [31:0] x, y;
  } exp_t;
  exp_t   q[$];
  longint cycle = 0;
  int     checks = 0, failures = 0;

  // Mechanism counters.
  localparam int NM = 16;
  int mech [NM];
  string mname [NM] = '{"posit NaR", "posit maxpos saturation", "posit minpos saturation",
                        "posit cancellation", "fp add close path", "fp add far path",
                        "fp add far carry", "fp add far left shift", "fp underflow",
                        "fp overflow", "fp invalid", "fp mul z_-1", "fp mul carry-out",
                        "fp mul tiny shift", "all slots used", "idle cycles"};
  int slot_ops [1:5][2];

  function automatic exp_t model(input int sel, input logic mul, input logic [31:0] a, input logic [31:0] b);
    exp_t e;
    logic [3:0] f;
    logic [63:0] r;
    f = 4'b0;
    if (sel <= 4) begin
      int n, es;
      n  = (sel == 1) ? 8 : (sel == 3) ? 32 : 16;
      es = (sel == 1) ? 0 : (sel == 3) ? 2 : 1;
      r  = ref_op(1'b1, mul, n, es, 64'(a) & ((64'd1 << n) - 1), 64'(b) & ((64'd1 << n) - 1), f);
    end else begin
      r  = ref_op(1'b0, mul, 8, 23, 64'(a), 64'(b), f);
    end
    e.z = r[31:0]; e.f = f; e.sel = sel; e.mul = mul; e.x = a; e.y = b;
    return e;
  endfunction

  task automatic issue(input int sel, input logic mul, input logic [31:0] a, input logic [31:0] b);
    exp_t e;
    @(negedge clk);
    in_valid   = 1'b1;
    design_sel = design_e'(sel);
    op         = mul ? OP_MUL : OP_ADD;
    x = a; y = b;
    e = model(sel, mul, a, b);
    e.cyc = cycle;                      // counter value before the accepting edge
    q.push_back(e);
    slot_ops[sel][mul]++;
    if ($urandom_range(0, 7) == 0) begin
      @(negedge clk);
      in_valid = 1'b0;
      mech[15]++;
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        e = q.pop_front();
        if (z != e.z || flags != e.f || cycle != e.cyc + 2) begin
          failures++;
          if (failures <= 10)
            $display("FAIL sel=%0d mul=%0d x=%h y=%h got=%h/%b exp=%h/%b cycle %0d (issued %0d)",
                     e.sel, e.mul, e.x, e.y, z, flags, e.z, e.f, cycle, e.cyc);
        end
        if (e.sel <= 4) begin
          int n;
          n = (e.sel == 1) ? 8 : (e.sel == 3) ? 32 : 16;
          if (e.z == 32'(64'd1 << (n - 1)))                     mech[0]++;
          if (e.z == 32'((64'd1 << (n - 1)) - 1) && e.mul)   mech[1]++;
          if (e.z == 32'd1 && e.mul)                         mech[2]++;
          if (e.z == 32'd0 && !e.mul && e.x != 0)            mech[3]++;
        end else begin
          if (e.f[2]) mech[9]++;
          if (e.f[1]) mech[8]++;
          if (e.f[3]) mech[10]++;
        end
      end
    end
    // Datapath events of the IEEE slot while an operation is in its units.
    if (rst_n && dut.v_q && dut.sel_q == DESIGN_FPU_X) begin
      if (dut.op_q == OP_ADD) begin
        if (dut.u_fx_add.close)  mech[4]++;
        else                     mech[5]++;
        if (!dut.u_fx_add.close && dut.u_fx_add.u_far.sum[24+3]) mech[6]++;
        if (!dut.u_fx_add.close && !dut.u_fx_add.u_far.sum[24+3] && !dut.u_fx_add.u_far.sum[24+2]
            && dut.u_fx_add.e_x > 1 && dut.u_fx_add.u_far.sum != 0) mech[7]++;
      end else begin
        if (dut.u_fx_mul.z_m1) mech[11]++;
        if (dut.u_fx_mul.cout) mech[12]++;
        if (dut.u_fx_mul.tiny) mech[13]++;
      end
    end
  end

  function automatic logic [31:0] rnd_operand(input int sel);
    if (sel == 5 && $urandom_range(0, 3) == 0)
      return {1'($urandom), 8'($urandom_range(100, 150)), 23'($urandom)};
    return $urandom;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Directed operands per slot.
    for (int s = 1; s <= 5; s++) begin
      logic [31:0] nar, maxp, minp;
      nar  = (s == 1) ? 32'h80 : (s == 3) ? 32'h8000_0000 : 32'h8000;
      maxp = (s == 1) ? 32'h7f : (s == 3) ? 32'h7fff_ffff : 32'h7fff;
      minp = 32'h1;
      if (s <= 4) begin
        issue(s, 0, nar, 32'h12);
        issue(s, 1, nar, 32'h0);
        issue(s, 1, maxp, maxp);
        issue(s, 1, minp, minp);
        issue(s, 0, 32'h35, -32'h35);
        issue(s, 0, maxp, maxp);
      end else begin
        issue(s, 0, 32'h3f80_0000, 32'hbf7f_ffff);   // close path, deep cancellation
        issue(s, 0, 32'h3f80_0000, 32'h3f80_0000);   // far path, carry out
        issue(s, 0, 32'h3f80_0000, 32'hbc00_0001);   // far path, left prenorm
        issue(s, 0, 32'h0080_0001, 32'h8080_0000);   // subnormal result
        issue(s, 0, 32'h7f7f_ffff, 32'h7f7f_ffff);   // overflow
        issue(s, 0, 32'h7f80_0000, 32'hff80_0000);   // inf - inf: invalid
        issue(s, 1, 32'h3fff_ffff, 32'h3fff_ffff);   // z_-1 set
        issue(s, 1, 32'h3fff_fffe, 32'h3f80_0001);   // incrementer carry-out
        issue(s, 1, 32'h0080_0003, 32'h3e80_0000);   // below normal range
        issue(s, 1, 32'h7f00_0000, 32'h7f00_0000);   // overflow
        issue(s, 1, 32'h0080_0000, 32'h0080_0000);   // underflow to zero
        issue(s, 1, 32'h7f80_0000, 32'h0000_0000);   // inf * 0: invalid
      end
    end
    // Random operations over every slot and both operations.
    for (int i = 0; i < 4000; i++) begin
      int s;
      s = $urandom_range(1, 5);
      issue(s, 1'($urandom), rnd_operand(s), rnd_operand(s));
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", q.size());
    end
    mech[14] = 1;
    for (int s = 1; s <= 5; s++)
      for (int m = 0; m < 2; m++)
        if (slot_ops[s][m] == 0) mech[14] = 0;
    for (int m = 0; m < NM; m++) begin
      $display("mechanism %-26s %0d", mname[m], mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mname[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
