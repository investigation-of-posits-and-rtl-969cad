// tb_posit_multiplier: self-checking test of posit_multiplier at the three evaluated
// configurations (n, es) = (8,0), (16,1) and (32,2).
//
// The 8-bit unit is tested exhaustively (all 65,536 operand pairs); the 16-
// and 32-bit units with directed operands (zero, NaR, maxpos, minpos, +-1,
// x and -x, neighbours) and random pairs. Every result is compared bit for
// bit with ref_pkg::ref_op, an exact-value model.
// The units are combinational: operands are applied, and the result is
// sampled 1 ns later. The formats are the evaluated ones; the operand choice
// and counts are this testbench's own. A watchdog ends a hung run.
module tb_posit_multiplier;
  import ref_pkg::*;
  import arith_pkg::*;

  logic [7:0]  x8,  y8,  z8;
  logic [15:0] x16, y16, z16;
  logic [31:0] x32, y32, z32;
  fp_flags_t   f8, f16, f32;
  int checks = 0, failures = 0;

  localparam int FA [3] = '{8, 16, 32};
  localparam int FB [3] = '{0, 1, 2};
  localparam logic POSIT = 1'b1;
  localparam int NEXH = 65536;          // exhaustive 8-bit pairs
  localparam int NDIR = 144;            // directed pairs
  localparam int NRND = 6000;           // random pairs

  posit_multiplier #(.N(8),  .ES(0)) dut8  (.x(x8),  .y(y8),  .z(z8));
  posit_multiplier #(.N(16), .ES(1)) dut16 (.x(x16), .y(y16), .z(z16));
  posit_multiplier #(.N(32), .ES(2)) dut32 (.x(x32), .y(y32), .z(z32));
  assign f8 = '0; assign f16 = '0; assign f32 = '0;

  // Directed operand j as a 32-bit pattern; 16-bit formats use a narrowed copy.
  function automatic logic [31:0] special(input int j);
    logic [31:0] r;
      case (j % 8)
        0: r = 32'h0000_0000;
        1: r = 32'h8000_0000;
        2: r = 32'h7fff_ffff;
        3: r = 32'h0000_0001;
        4: r = 32'h4000_0000;
        5: r = 32'hc000_0000;
        6: r = 32'hffff_ffff;
        default: r = $urandom;
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
        exp  = ref_op(POSIT, 1'b1, FA[w], FB[w], xa, yb, expf);
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
