// tb_posit_add_core: test of posit_add_core for (16,1), fed by two
// posit_decoder instances. The core output (sign, scale, fraction, sticky)
// stands for a value; the sticky bit adds a tiny amount that can never make
// a tie. That value must round (ref_pkg) to the same posit as the exact
// sum, zero must be flagged exactly when the sum is zero, and NaR when
// an operand is NaR. Random and directed operand pairs.
// Timing: the block is combinational; each pair is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_posit_add_core;
  import ref_pkg::*;

  localparam int N = 16, ES = 1;
  localparam int SW   = arith_pkg::posit_scale_width(N, ES);
  localparam int SIGW = N - 2 - ES;
  localparam int FRW  = 2 * SIGW + 1;

  logic [N-1:0] x, y;
  logic xs, xz, xn, ys, yz, yn, rs, rz, rn, rst;
  logic signed [SW-1:0] xe, ye;
  logic [SIGW-1:0] xm, ym;
  logic signed [SW:0] re;
  logic [FRW-1:0] rf;
  int checks = 0, failures = 0;

  posit_decoder #(.N(N), .ES(ES)) u_dx (.p(x), .sign(xs), .is_zero(xz), .is_nar(xn), .scale(xe), .sig(xm));
  posit_decoder #(.N(N), .ES(ES)) u_dy (.p(y), .sign(ys), .is_zero(yz), .is_nar(yn), .scale(ye), .sig(ym));
  posit_add_core #(.N(N), .ES(ES)) dut (
    .a_sign(xs), .a_zero(xz), .a_nar(xn), .a_scale(xe), .a_sig(xm),
    .b_sign(ys), .b_zero(yz), .b_nar(yn), .b_scale(ye), .b_sig(ym),
    .r_sign(rs), .r_zero(rz), .r_nar(rn), .r_scale(re), .r_frac(rf), .r_sticky(rst));

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [63:0] exp, got;
      logic [3:0] fl;
      fx_t mag;
      x = N'($urandom);
      case (i % 6)
        0: y = -x;
        1: y = x ^ N'($urandom_range(0, 7));
        2: y = (i % 12 == 2) ? '0 : 16'h8000;
        default: y = N'($urandom);
      endcase
      if (i % 50 == 7) x = '0;
      #1;
      exp = ref_op(1'b1, 1'b0, N, ES, 64'(x), 64'(y), fl);
      if (rn)      got = 64'h8000;
      else if (rz) got = 0;
      else begin
        mag = (fx_t'((64'd1 << FRW) | 64'(rf)) << (FB + int'(re) - FRW)) + fx_t'(rst);
        got = round_to(1'b1, N, ES, rs, mag, fl);
      end
      checks++;
      if (got != exp || rz != (exp == 0) || rn != (xn | yn)) begin
        failures++;
        if (failures <= 10) $display("FAIL x=%h y=%h got=%h exp=%h", x, y, got, exp);
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
