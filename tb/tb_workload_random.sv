// tb_workload_random: the random-operand workload of the comparison study,
// 500,000 operand pairs for each 16- and 32-bit unit.
//
// Eight units run side by side on fresh random operands:
//  * posit adder and multiplier at (16,1) and (32,2);
//  * IEEE adder and multiplier at binary16 (5, 11) and binary32 (8, 24).
// Operands are uniform random bit patterns. About one operand in 32 is
// replaced by a special value of its format: zero, NaR or infinity, NaN,
// the largest or the smallest number. Every result, and the IEEE flags, is
// compared bit for bit with ref_pkg::ref_op.
//
// Timing: the units are combinational. Operands are applied and results
// checked 1 ns later. A watchdog ends a hung run, and the last line printed
// is TB_RESULT.
//
// The pair count and the 16/32-bit sizes follow the study's test flow. The
// random generator and the share of special values are this testbench's own
// choice. The 8-bit exhaustive workload is run by the per-unit testbenches.
module tb_workload_random;
  import ref_pkg::*;
  import arith_pkg::*;

  localparam int NPAIR = 500_000;

  logic [15:0] x16, y16, zpa16, zpm16, zfa16, zfm16;
  logic [31:0] x32, y32, zpa32, zpm32, zfa32, zfm32;
  fp_flags_t   ffa16, ffm16, ffa32, ffm32;
  int checks = 0, failures = 0;

  posit_adder      #(.N(16), .ES(1)) u_pa16 (.x(x16), .y(y16), .z(zpa16));
  posit_multiplier #(.N(16), .ES(1)) u_pm16 (.x(x16), .y(y16), .z(zpm16));
  posit_adder      #(.N(32), .ES(2)) u_pa32 (.x(x32), .y(y32), .z(zpa32));
  posit_multiplier #(.N(32), .ES(2)) u_pm32 (.x(x32), .y(y32), .z(zpm32));
  fp_adder      #(.EXP_WIDTH(5), .SIG_WIDTH(11)) u_fa16 (.x(x16), .y(y16), .z(zfa16), .flags(ffa16));
  fp_multiplier #(.EXP_WIDTH(5), .SIG_WIDTH(11)) u_fm16 (.x(x16), .y(y16), .z(zfm16), .flags(ffm16));
  fp_adder      #(.EXP_WIDTH(8), .SIG_WIDTH(24)) u_fa32 (.x(x32), .y(y32), .z(zfa32), .flags(ffa32));
  fp_multiplier #(.EXP_WIDTH(8), .SIG_WIDTH(24)) u_fm32 (.x(x32), .y(y32), .z(zfm32), .flags(ffm32));

  // Special value j of a 32-bit pattern, narrowed by taking the top half
  // (posit) or fields (IEEE) for 16-bit use.
  function automatic logic [31:0] special(input int j);
    case (j)
      0:  return 32'h0000_0000;
      1:  return 32'h8000_0000;          // posit NaR, IEEE -0
      2:  return 32'h7f80_0000;          // IEEE +inf
      3:  return 32'h7fc0_0000;          // IEEE qNaN
      4:  return 32'h7fff_ffff;          // posit maxpos, IEEE NaN
      5:  return 32'h7f7f_ffff;          // IEEE largest finite
      6:  return 32'h0000_0001;          // posit minpos, IEEE smallest subnormal
      default: return 32'h0080_0000;     // IEEE smallest normal
    endcase
  endfunction

  function automatic logic [31:0] operand();
    if ($urandom_range(0, 31) == 0) return special($urandom_range(0, 7)) | {$urandom_range(0, 1), 31'd0};
    return $urandom;
  endfunction

  initial begin
    for (int i = 0; i < NPAIR; i++) begin
      logic [31:0] a, b;
      a = operand(); b = operand();
      x32 = a; y32 = b;
      x16 = (i % 2) ? a[31:16] : {a[31], a[30], a[26:23], a[22:13]};
      y16 = (i % 2) ? b[31:16] : {b[31], b[30], b[26:23], b[22:13]};
      #1;
      for (int u = 0; u < 8; u++) begin
        logic [63:0] xa, yb, got, exp;
        logic [3:0]  gotf, expf;
        logic        is_posit, is_mul, wide;
        int          fa, fb;
        is_posit = (u < 4);
        is_mul   = u[0];
        wide     = u[1];
        xa = wide ? 64'(x32) : 64'(x16);
        yb = wide ? 64'(y32) : 64'(y16);
        fa = is_posit ? (wide ? 32 : 16) : (wide ? 8 : 5);
        fb = is_posit ? (wide ? 2 : 1)   : (wide ? 23 : 10);
        case (u)
          0: begin got = 64'(zpa16); gotf = '0;    end
          1: begin got = 64'(zpm16); gotf = '0;    end
          2: begin got = 64'(zpa32); gotf = '0;    end
          3: begin got = 64'(zpm32); gotf = '0;    end
          4: begin got = 64'(zfa16); gotf = ffa16; end
          5: begin got = 64'(zfm16); gotf = ffm16; end
          6: begin got = 64'(zfa32); gotf = ffa32; end
          default: begin got = 64'(zfm32); gotf = ffm32; end
        endcase
        exp = ref_op(is_posit, is_mul, fa, fb, xa, yb, expf);
        if (is_posit) expf = '0;
        checks++;
        if (got != exp || gotf != expf) begin
          failures++;
          if (failures <= 10)
            $display("FAIL unit %0d x=%h y=%h got=%h/%b exp=%h/%b", u, xa, yb, got, gotf, exp, expf);
        end
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
