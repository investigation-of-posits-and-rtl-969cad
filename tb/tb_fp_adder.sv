// tb_fp_adder: self-checking test of fp_adder at the three evaluated formats:
// 8-bit (3 exponent bits, significand 5 with the hidden bit), 16-bit (5, 11)
// and 32-bit (8, 24).
//
// The 8-bit unit is tested exhaustively (all 65,536 operand pairs); the 16-
// and 32-bit units with special operands (signed zeros, infinities, quiet
// and signalling NaNs, subnormals, largest finite, smallest normal) paired
// with each other, and random pairs biased toward close exponents,
// cancellation and the subnormal range. The result and the four status flags
// are compared with ref_pkg::ref_op, an exact-value model.
// The units are combinational: operands are applied, and the result is
// sampled 1 ns later. The formats are the evaluated ones; the operand choice
// and counts are this testbench's own. A watchdog ends a hung run.
module tb_fp_adder;
  import ref_pkg::*;
  import arith_pkg::*;

  logic [7:0]  x8,  y8,  z8;
  logic [15:0] x16, y16, z16;
  logic [31:0] x32, y32, z32;
  fp_flags_t   f8, f16, f32;
  int checks = 0, failures = 0;

  localparam int FA [3] = '{3, 5, 8};
  localparam int FB [3] = '{4, 10, 23};
  localparam logic POSIT = 1'b0;
  localparam int NEXH = 65536;          // exhaustive 8-bit pairs
  localparam int NDIR = 144;            // directed pairs
  localparam int NRND = 6000;           // random pairs

  fp_adder #(.EXP_WIDTH(3), .SIG_WIDTH(5))  dut8  (.x(x8),  .y(y8),  .z(z8),  .flags(f8));
  fp_adder #(.EXP_WIDTH(5), .SIG_WIDTH(11)) dut16 (.x(x16), .y(y16), .z(z16), .flags(f16));
  fp_adder #(.EXP_WIDTH(8), .SIG_WIDTH(24)) dut32 (.x(x32), .y(y32), .z(z32), .flags(f32));

  // Directed operand j as a 32-bit pattern; 16-bit formats use a narrowed copy.
  function automatic logic [31:0] special(input int j);
    logic [31:0] r;
      case (j % 12)
        0:  r = 32'h0000_0000;
        1:  r = 32'h8000_0000;
        2:  r = 32'h7f80_0000;
        3:  r = 32'hff80_0000;
        4:  r = 32'h7fc0_0000;
        5:  r = 32'h7f80_0001;
        6:  r = 32'h0000_0001;
        7:  r = 32'h007f_ffff;
        8:  r = 32'h7f7f_ffff;
        9:  r = 32'h8080_0000;
        10: r = $urandom;
        default: r = {1'($urandom), 8'($urandom_range(0, 2)), 23'($urandom)};
      endcase
    return r;
  endfunction

  function automatic logic [15:0] narrow(input logic [31:0] v);
    if (POSIT) return v[31:16];
    // keep sign, top exponent bit, low 4 exponent bits and top fraction bits
    return {v[31], v[30], v[26:23], v[22:13]};
  endfunction

  initial begin
    for (int i = 0; i < NEXH + NDIR + NRND; i++) begin
      logic [31:0] a, b;
      if (i < NEXH) begin
        a = 32'(i / 256); b = 32'(i % 256);
      end else if (i < NEXH + NDIR) begin
        a = special((i - NEXH) % 12);
        b = special((i - NEXH) / 12);
      end else begin
        a = $urandom;
        case (i % 4)
          0: b = $urandom;
          1: b = -a;
          2: b = {~a[31], a[30:0] ^ 31'($urandom_range(0, 15))};
          default: b = {1'($urandom), a[30:23] + 8'($urandom_range(0, 30)), 23'($urandom)};
        endcase
        if (!POSIT && i % 16 == 5) a[30:23] = 8'($urandom_range(0, 3));
      end
      x8 = a[7:0]; y8 = b[7:0];
      x16 = narrow(a); y16 = narrow(b);
      x32 = a; y32 = b;
      #1;
      for (int w = (i < NEXH) ? 0 : 1; w < ((i < NEXH) ? 1 : 3); w++) begin
        logic [63:0] xa, yb, got, exp;
        logic [3:0]  gotf, expf;
        xa   = (w == 0) ? 64'(x8) : (w == 1) ? 64'(x16) : 64'(x32);
        yb   = (w == 0) ? 64'(y8) : (w == 1) ? 64'(y16) : 64'(y32);
        got  = (w == 0) ? 64'(z8) : (w == 1) ? 64'(z16) : 64'(z32);
        gotf = (w == 0) ? f8 : (w == 1) ? f16 : f32;
        exp  = ref_op(POSIT, 1'b0, FA[w], FB[w], xa, yb, expf);
        checks++;
        if (got != exp || gotf != expf) begin
          failures++;
          if (failures <= 10)
            $display("FAIL width %0d x=%h y=%h got=%h/%b exp=%h/%b", w, xa, yb, got, gotf, exp, expf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
