// posit_add_core: adds two decoded posits (outputs of posit_decoder).
//
// Steps, following the posit addition core: the operation (add or subtract
// magnitudes) is the XOR of the signs; zero and NaR operands are handled
// first; the magnitudes are compared by their concatenated scaling factor and
// significand; the smaller significand is right-shifted by the offset
// |scale_a - scale_b| into a field AW = 2*SIGW+2 bits wide, the bits shifted
// out being ORed into a sticky LSB; the significands are added or subtracted;
// a leading zero count of the (AW+1)-bit result, whose MSB holds the carry
// (overflow) bit, normalises it, and the result scale is the larger scale plus
// the overflow position minus the leading zero count.
//
// Outputs go to posit_encoder: sign, zero/NaR flags, scale (SW+1 bits),
// fraction below the hidden one (FRW = AW-1 bits) and sticky.
// Combinational. The alignment width and the sticky-in-LSB subtraction are
// this design's choices. The field is wide enough that, for the posit sizes
// used here, the sticky bit has never been seen to change a rounded result
// (the 8-bit sizes are checked over all operand pairs); it is kept so that
// the core stays exact for any parameters.
module posit_add_core #(
  parameter int N    = 16,
  parameter int ES   = 1,
  parameter int SW   = arith_pkg::posit_scale_width(N, ES),
  parameter int SIGW = N - 2 - ES,
  parameter int AW   = 2 * SIGW + 2,
  parameter int FRW  = AW - 1
) (
  input  logic                  a_sign, a_zero, a_nar,
  input  logic signed [SW-1:0]  a_scale,
  input  logic        [SIGW-1:0] a_sig,
  input  logic                  b_sign, b_zero, b_nar,
  input  logic signed [SW-1:0]  b_scale,
  input  logic        [SIGW-1:0] b_sig,
  output logic                  r_sign, r_zero, r_nar,
  output logic signed [SW:0]    r_scale,
  output logic        [FRW-1:0] r_frac,
  output logic                  r_sticky
);

  localparam int CW = $clog2(AW + 2);

  logic                 a_ge, op_sub, s_sticky;
  logic signed [SW:0]   l_scale, s_scale, diff;
  logic [SIGW-1:0]      l_sig, s_sig;
  logic                 l_sign;
  logic [CW-1:0]        dcap;
  logic [2*AW-1:0]      align;
  logic [AW-1:0]        l_ext, s_ext;
  logic [AW:0]          sum, norm;
  logic [CW-1:0]        lz;

  // Magnitude comparison on {scale, significand}.
  assign a_ge    = (a_scale > b_scale) || ((a_scale == b_scale) && (a_sig >= b_sig));
  assign l_scale = a_ge ? (SW+1)'(a_scale) : (SW+1)'(b_scale);
  assign s_scale = a_ge ? (SW+1)'(b_scale) : (SW+1)'(a_scale);
  assign l_sig   = a_ge ? a_sig : b_sig;
  assign s_sig   = a_ge ? b_sig : a_sig;
  assign l_sign  = a_ge ? a_sign : b_sign;
  assign op_sub  = a_sign ^ b_sign;

  // Offset and alignment of the smaller significand.
  assign diff  = l_scale - s_scale;
  assign dcap  = (diff > (SW+1)'(AW)) ? CW'(AW) : CW'(diff);
  assign align = {s_sig, {(2*AW-SIGW){1'b0}}} >> dcap;
  assign s_sticky = |align[AW-1:0];
  assign l_ext = {l_sig, {(AW-SIGW){1'b0}}};
  assign s_ext = align[2*AW-1:AW] | AW'(s_sticky);

  assign sum = op_sub ? ({1'b0, l_ext} - {1'b0, s_ext}) : ({1'b0, l_ext} + {1'b0, s_ext});

  lzc #(.WIDTH(AW+1)) u_norm (.in_bits(sum), .count(lz));

  assign norm = sum << lz;

  always_comb begin
    r_nar    = a_nar | b_nar;
    r_zero   = 1'b0;
    r_sign   = l_sign;
    r_scale  = l_scale + 1'b1 - (SW+1)'($signed({1'b0, lz}));
    r_frac   = norm[AW-1:1];
    r_sticky = norm[0];
    if (a_zero && b_zero) begin
      r_zero = 1'b1;
    end else if (a_zero || b_zero) begin
      // x + 0 = x: pass the non-zero operand through.
      r_sign   = a_zero ? b_sign : a_sign;
      r_scale  = a_zero ? (SW+1)'(b_scale) : (SW+1)'(a_scale);
      r_frac   = {(a_zero ? b_sig[SIGW-2:0] : a_sig[SIGW-2:0]), {(FRW-SIGW+1){1'b0}}};
      r_sticky = 1'b0;
    end else if (sum == '0) begin
      r_zero = 1'b1;                    // exact cancellation x + (-x)
    end
  end

endmodule
