// lzc: leading-zero counter.
//
// Counts the zeros above the most significant one of in_bits; an all-zero
// input gives WIDTH. It serves as the leading zero detector of the posit
// decoder (regime run length), of the posit adder normalisation and of the
// IEEE close path ("LZC/shift"). Purely combinational. The scan structure is
// this design's choice: the source names the detector but not its insides.
module lzc #(
  parameter int WIDTH = 8,
  parameter int CW    = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] in_bits,
  output logic [CW-1:0]    count
);

  always_comb begin
    count = CW'(WIDTH);
    for (int i = 0; i < WIDTH; i++) begin
      if (in_bits[i]) count = CW'(WIDTH - 1 - i);
    end
  end

endmodule
