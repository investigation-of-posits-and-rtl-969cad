// tb_posit_encoder: test of posit_encoder at (16,1) and (8,0).
// Random sign, scaling factor (well beyond the posit range on both sides, so
// saturation at maxpos and minpos is exercised), fraction and sticky are
// applied; the exact value they stand for (the sticky bit adds a tiny amount
// that can never produce a tie) is rounded by ref_pkg and compared. Zero and
// NaR inputs are checked too.
// Timing: the block is combinational; each input is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_posit_encoder;
  import ref_pkg::*;

  localparam int FRW16 = 20, FRW8 = 12;
  logic        sg, zr, nr, st;
  logic signed [arith_pkg::posit_scale_width(16, 1):0] sc16;
  logic signed [arith_pkg::posit_scale_width(8, 0):0]  sc8;
  logic [FRW16-1:0] f16;
  logic [FRW8-1:0]  f8;
  logic [15:0] p16;
  logic [7:0]  p8;
  int checks = 0, failures = 0;

  posit_encoder #(.N(16), .ES(1), .FRW(FRW16)) dut16 (.sign(sg), .is_zero(zr), .is_nar(nr), .scale(sc16), .frac(f16), .sticky(st), .p(p16));
  posit_encoder #(.N(8),  .ES(0), .FRW(FRW8))  dut8  (.sign(sg), .is_zero(zr), .is_nar(nr), .scale(sc8),  .frac(f8),  .sticky(st), .p(p8));

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int s16v, s8v;
      logic [3:0] fl;
      for (int w = 0; w < 2; w++) begin
        int n, es, frw, scv;
        logic [63:0] exp, got, fr;
        fx_t mag;
        if (w == 0) begin
          sg = 1'($urandom); st = 1'($urandom);
          zr = (i % 97 == 3); nr = (i % 89 == 5);
          s16v = $urandom_range(0, 80) - 40;
          s8v  = $urandom_range(0, 20) - 10;
          sc16 = s16v[arith_pkg::posit_scale_width(16, 1):0];
          sc8  = s8v[arith_pkg::posit_scale_width(8, 0):0];
          f16  = FRW16'($urandom); f8 = FRW8'($urandom);
          if (i % 5 == 0) begin f16[FRW16-14:0] = '0; f8[FRW8-7:0] = '0; st = 0; end
          #1;
        end
        n   = (w == 0) ? 16 : 8;
        es  = (w == 0) ? 1 : 0;
        frw = (w == 0) ? FRW16 : FRW8;
        scv = (w == 0) ? s16v : s8v;
        fr  = (w == 0) ? 64'(f16) : 64'(f8);
        got = (w == 0) ? 64'(p16) : 64'(p8);
        mag = (fx_t'((64'd1 << frw) | fr) << (FB + scv - frw)) + fx_t'(st);
        if (nr)      exp = 64'd1 << (n - 1);
        else if (zr) exp = 0;
        else         exp = round_to(1'b1, n, es, sg, mag, fl);
        checks++;
        if (got != exp) begin
          failures++;
          if (failures <= 10) $display("FAIL n=%0d s=%b scale=%0d frac=%h st=%b got=%h exp=%h", n, sg, scv, fr, st, got, exp);
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
