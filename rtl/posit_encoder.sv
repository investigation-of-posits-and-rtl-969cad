// posit_encoder: builds an N-bit posit from a core result.
//
// The scaling factor is split into regime k = scale >> ES and exponent
// e = scale mod 2^ES. The regime is formed as the pattern "10" (k >= 0) or
// "01" (k < 0) placed ahead of {e, fraction} and arithmetic-shifted right by k
// (k >= 0) or -k-1 (k < 0), which yields k+1 ones and a zero, or -k zeros and
// a one. From the shifted string the top N-1 bits are the posit body; the next
// bit is the guard G, the one after it the round bit R, and the OR of all
// remaining bits together with the incoming sticky is S. The body is
// incremented by Round = G & (LSB | R | S) (round to nearest, ties to even),
// and the sign is applied by two's complement of the whole word.
//
// Magnitudes beyond maxpos (k >= N-2) give maxpos and magnitudes below minpos
// (k <= -(N-1)) give minpos: a posit never overflows to infinity nor
// underflows to zero. This saturation is the posit rule; the way it is
// detected here is this design's choice. Combinational.
module posit_encoder #(
  parameter int N   = 16,
  parameter int ES  = 1,
  parameter int SWI = arith_pkg::posit_scale_width(N, ES) + 1,
  parameter int FRW = 2 * (N - 2 - ES) + 1
) (
  input  logic                  sign,
  input  logic                  is_zero,
  input  logic                  is_nar,
  input  logic signed [SWI-1:0] scale,
  input  logic        [FRW-1:0] frac,
  input  logic                  sticky,
  output logic        [N-1:0]   p
);

  localparam int TW = 2 + ES + FRW;     // regime head, exponent, fraction
  localparam int TX = TW + N;           // room so no bit is lost in the shift
  localparam int RW = $clog2(N + 1);

  logic signed [SWI-1:0] k;
  logic [TW-1:0]  head;
  logic [TX-1:0]  shifted;
  logic [RW-1:0]  rshift;
  logic [N-2:0]   body, body_r;
  logic           lsb, g, r, s, rnd, sat_hi, sat_lo;
  logic [N-1:0]   mag;

  assign k      = scale >>> ES;
  assign sat_hi = (k >= SWI'(N - 2));
  assign sat_lo = (k <= -SWI'(N - 1));
  assign rshift = (k >= 0) ? RW'(k) : RW'(-(k + SWI'(1)));

  always_comb begin
    head = TW'(frac);
    head = head | (TW'(scale & SWI'((1 << ES) - 1)) << FRW);
    head = head | ((k >= 0) ? (TW'(2'b10) << (TW - 2)) : (TW'(2'b01) << (TW - 2)));
  end

  assign shifted = $unsigned($signed({head, {N{1'b0}}}) >>> rshift);
  assign body    = shifted[TX-1 -: N-1];
  assign lsb     = body[0];
  assign g       = shifted[TX-N];
  assign r       = shifted[TX-N-1];
  assign s       = (|shifted[TX-N-2:0]) | sticky;
  assign rnd     = g & (lsb | r | s);
  assign body_r  = body + (N-1)'(rnd);

  always_comb begin
    if (sat_hi)      mag = {1'b0, {(N-1){1'b1}}};
    else if (sat_lo) mag = {{(N-1){1'b0}}, 1'b1};
    else             mag = {1'b0, body_r};
    if (is_nar)       p = {1'b1, {(N-1){1'b0}}};
    else if (is_zero) p = '0;
    else              p = sign ? (~mag + 1'b1) : mag;
  end

endmodule
