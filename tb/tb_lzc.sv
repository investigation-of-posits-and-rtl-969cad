// tb_lzc: self-checking test of lzc at WIDTH 13 and 1.
// Drives all-zero, every one-hot pattern with random lower bits, and random
// vectors; the expected count comes from a scan from the MSB.
// Timing: the block is combinational; each vector is checked 1 ns after it is
// applied. The format sizes follow the evaluated formats; stimulus, checks
// and counts are this testbench's own choice. A watchdog ends a hung run, and
// the last line printed is TB_RESULT.
module tb_lzc;
  logic [12:0] v;
  logic [3:0]  c;
  logic [0:0]  v1;
  logic [0:0]  c1;
  int checks = 0, failures = 0;

  lzc #(.WIDTH(13)) dut  (.in_bits(v),  .count(c));
  lzc #(.WIDTH(1))  dut1 (.in_bits(v1), .count(c1));

  function automatic int ref_count(input logic [12:0] a);
    int n = 0;
    for (int i = 12; i >= 0; i--) begin
      if (a[i]) break;
      n++;
    end
    return n;
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i == 0) v = '0;
      else if (i < 14) v = (13'd1 << (i - 1)) | (13'($urandom) & ((13'd1 << (i - 1)) - 1));
      else v = 13'($urandom) >> $urandom_range(0, 12);
      v1 = 1'(i);
      #1;
      checks += 2;
      if (int'(c) != ref_count(v)) begin
        failures++;
        $display("FAIL v=%b got %0d exp %0d", v, c, ref_count(v));
      end
      if (c1 != ~v1) failures++;
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
