// arith_pkg: shared types for the posit / IEEE 754 arithmetic units.
//
// fp_flags_t is the IEEE 754 status flag bundle produced by the floating-point
// adder and multiplier (invalid, overflow, underflow, inexact; division by zero
// cannot arise from addition or multiplication). Posit units raise no flags.
// design_e numbers the unit slots of the comparison top (1..5, as in the
// testbench flow the design was made for) and op_e chooses add or multiply.
// posit_scale_width gives the signed width that holds any scaling factor
// k*2^es + e of an (n, es) posit, with margin for the core's carry.
// No logic and no timing. The slot numbering follows the comparison set-up;
// the encodings and the flag order are this design's choice.
package arith_pkg;

  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

  typedef enum logic [2:0] {
    DESIGN_POSIT8   = 3'd1,
    DESIGN_POSIT16  = 3'd2,
    DESIGN_POSIT32  = 3'd3,
    DESIGN_POSIT_X  = 3'd4,
    DESIGN_FPU_X    = 3'd5
  } design_e;

  typedef enum logic {
    OP_ADD = 1'b0,
    OP_MUL = 1'b1
  } op_e;

  // Width of a signed posit scaling factor k*2^es + e for an n-bit posit,
  // with two spare bits so sums of two scaling factors plus carries fit.
  function automatic int posit_scale_width(input int n, input int es);
    return $clog2(n * (1 << es)) + 3;
  endfunction

endpackage
