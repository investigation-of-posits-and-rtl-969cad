// tb_posit_decoder: exhaustive test of posit_decoder for (16,1) and (8,0).
// For every encoding the decoded fields are turned back into a value,
// sig * 2^(scale - fraction bits), and compared with the exact value from
// ref_pkg; sign, zero and NaR flags are checked against the encoding.
// Timing: the block is combinational; each encoding is checked 1 ns after it
// is applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_posit_decoder;
  import ref_pkg::*;

  logic [15:0] p16;
  logic [7:0]  p8;
  logic        s16, z16, n16, s8, z8, n8;
  logic signed [arith_pkg::posit_scale_width(16, 1)-1:0] e16;
  logic signed [arith_pkg::posit_scale_width(8, 0)-1:0]  e8;
  logic [12:0] m16;
  logic [5:0]  m8;
  int checks = 0, failures = 0;

  posit_decoder #(.N(16), .ES(1)) dut16 (.p(p16), .sign(s16), .is_zero(z16), .is_nar(n16), .scale(e16), .sig(m16));
  posit_decoder #(.N(8),  .ES(0)) dut8  (.p(p8),  .sign(s8),  .is_zero(z8),  .is_nar(n8),  .scale(e8),  .sig(m8));

  initial begin
    for (int i = 0; i < 65536; i++) begin
      for (int w = 0; w < 2; w++) begin
        int n, sigw, scale;
        logic [63:0] code;
        logic [31:0] sig;
        logic s, z, nr;
        fx_t got, exp;
        n    = (w == 0) ? 16 : 8;
        if (w == 1 && i >= 256) continue;
        code = 64'(i);
        p16 = 16'(i); p8 = 8'(i);
        #1;
        sigw  = (w == 0) ? 13 : 6;
        scale = (w == 0) ? int'(e16) : int'(e8);
        sig   = (w == 0) ? 32'(m16) : 32'(m8);
        s     = (w == 0) ? s16 : s8;
        z     = (w == 0) ? z16 : z8;
        nr    = (w == 0) ? n16 : n8;
        exp   = val(1'b1, n, (w == 0) ? 1 : 0, code);
        got   = fx_t'(sig) << (FB + scale - (sigw - 1));
        checks++;
        if (z != (code == 0) || nr != (code == (64'd1 << (n - 1))) || s != code[n-1] ||
            (!z && !nr && got != exp)) begin
          failures++;
          if (failures <= 10) $display("FAIL n=%0d p=%h scale=%0d sig=%h", n, code, scale, sig);
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
