// posit_decoder: extracts the fields of an N-bit type-3 posit with ES
// exponent bits.
//
// Order of work, as in the posit extraction algorithm: the specials zero
// (000..0) and infinity/NaR (100..0) are flagged; the sign is taken from the
// MSB and, for a negative posit, the two's complement of the word is taken;
// the bit after the sign is the regime sign; a leading zero count (lzc) of the
// body, inverted when the regime sign is 1, gives the run length m, so that
// k = m-1 (regime sign 1) or k = -m (regime sign 0); the body is shifted left
// past the regime and its termination bit, the top ES bits are the exponent e
// and the rest is fraction.
//
// Outputs: scale = k*2^ES + e (signed, SW bits) and sig = 1.f with the hidden
// one at the MSB and the fraction left aligned (N-2-ES bits, the most a posit
// of this size can hold). Combinational. Field widths and the scale encoding
// are this design's choices; the algorithm follows the source.
module posit_decoder #(
  parameter int N    = 16,
  parameter int ES   = 1,
  parameter int SW   = arith_pkg::posit_scale_width(N, ES),
  parameter int SIGW = N - 2 - ES
) (
  input  logic                 [N-1:0]    p,
  output logic                            sign,
  output logic                            is_zero,
  output logic                            is_nar,
  output logic signed          [SW-1:0]   scale,
  output logic                 [SIGW-1:0] sig
);

  localparam int BW = N - 1;            // body width (all bits but the sign)
  localparam int CW = $clog2(BW + 1);

  logic [N-1:0]  mag;                  // mag[N-1] is only set for NaR
  logic [BW-1:0] body, run_src, rem;
  logic          rsign;
  logic [CW-1:0] run;
  logic signed [SW-1:0] k;
  logic [SIGW-2:0] frac;

  assign sign    = p[N-1];
  assign is_zero = (p == '0);
  assign is_nar  = (p == {1'b1, {(N-1){1'b0}}});
  assign mag     = sign ? (~p + 1'b1) : p;
  assign body    = mag[BW-1:0];
  assign rsign   = body[BW-1];
  assign run_src = rsign ? ~body : body;

  lzc #(.WIDTH(BW)) u_run (.in_bits(run_src), .count(run));

  // Drop the regime and its termination bit.
  assign rem = body << ({1'b0, run} + 1'b1);
  assign k   = rsign ? SW'($signed({1'b0, run}) - 1) : -SW'($signed({1'b0, run}));
  assign frac = rem[BW-1-ES -: SIGW-1];
  assign sig  = {1'b1, frac};

  if (ES > 0) begin : g_exp
    logic [ES-1:0] e;
    assign e     = rem[BW-1 -: ES];
    assign scale = (k <<< ES) + SW'($signed({1'b0, e}));
  end else begin : g_noexp
    assign scale = k;
  end

endmodule
