// arith_top: side-by-side posit and IEEE 754 adders and multipliers with a
// design-select multiplexer, for comparing the two number formats on equal
// operands.
//
// Five unit slots, each holding an adder and a multiplier, see the same
// operands x and y (a narrower unit uses the low bits):
//   DESIGN 1: posit (8,0)      DESIGN 2: posit (16,1)     DESIGN 3: posit (32,2)
//   DESIGN 4: posit (PX_NBITS, PX_ES), a parametrisable slot, default (16,1)
//   DESIGN 5: IEEE 754 (FX_EXP_WIDTH, FX_SIG_WIDTH), default binary32 (8, 24)
// Each slot's result (temp_z) goes to a 5-to-1 multiplexer chosen by
// design_sel, after op has picked the adder or the multiplier; z is the
// selected result zero-extended to 32 bits. flags carries the IEEE status
// flags when DESIGN 5 is selected and is 0 for posits. An unused design_sel
// code gives z = 0.
//
// The arithmetic units are combinational; as in the evaluation set-up, the
// inputs and outputs are registered. Timing: operands, op and design_sel
// presented with in_valid are captured on a rising clock edge, and the result
// appears with out_valid after the next rising edge (latency 2 cycles, one
// operation per cycle). Active-low synchronous reset clears the valid bits
// and registers. The register boundary and valid signals are this design's
// choices; the slot arrangement follows the comparison test bench layout.
module arith_top #(
  parameter int PX_NBITS     = 16,
  parameter int PX_ES        = 1,
  parameter int FX_EXP_WIDTH = 8,
  parameter int FX_SIG_WIDTH = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  arith_pkg::design_e   design_sel,
  input  arith_pkg::op_e       op,
  input  logic [31:0]          x,
  input  logic [31:0]          y,
  output logic                 out_valid,
  output logic [31:0]          z,
  output arith_pkg::fp_flags_t flags
);
  import arith_pkg::*;

  localparam int FXW = FX_EXP_WIDTH + FX_SIG_WIDTH;

  // Input registers.
  logic        v_q;
  design_e     sel_q;
  op_e         op_q;
  logic [31:0] x_q, y_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      sel_q <= DESIGN_POSIT8;
      op_q  <= OP_ADD;
      x_q   <= '0;
      y_q   <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        sel_q <= design_sel;
        op_q  <= op;
        x_q   <= x;
        y_q   <= y;
      end
    end
  end

  // Unit slots.
  logic [7:0]          p8_add,  p8_mul;
  logic [15:0]         p16_add, p16_mul;
  logic [31:0]         p32_add, p32_mul;
  logic [PX_NBITS-1:0] px_add,  px_mul;
  logic [FXW-1:0]      fx_add,  fx_mul;
  fp_flags_t           fx_add_flags, fx_mul_flags;

  posit_adder      #(.N(8),  .ES(0)) u_p8_add  (.x(x_q[7:0]),  .y(y_q[7:0]),  .z(p8_add));
  posit_multiplier #(.N(8),  .ES(0)) u_p8_mul  (.x(x_q[7:0]),  .y(y_q[7:0]),  .z(p8_mul));
  posit_adder      #(.N(16), .ES(1)) u_p16_add (.x(x_q[15:0]), .y(y_q[15:0]), .z(p16_add));
  posit_multiplier #(.N(16), .ES(1)) u_p16_mul (.x(x_q[15:0]), .y(y_q[15:0]), .z(p16_mul));
  posit_adder      #(.N(32), .ES(2)) u_p32_add (.x(x_q),       .y(y_q),       .z(p32_add));
  posit_multiplier #(.N(32), .ES(2)) u_p32_mul (.x(x_q),       .y(y_q),       .z(p32_mul));
  posit_adder      #(.N(PX_NBITS), .ES(PX_ES)) u_px_add (
    .x(x_q[PX_NBITS-1:0]), .y(y_q[PX_NBITS-1:0]), .z(px_add));
  posit_multiplier #(.N(PX_NBITS), .ES(PX_ES)) u_px_mul (
    .x(x_q[PX_NBITS-1:0]), .y(y_q[PX_NBITS-1:0]), .z(px_mul));
  fp_adder      #(.EXP_WIDTH(FX_EXP_WIDTH), .SIG_WIDTH(FX_SIG_WIDTH)) u_fx_add (
    .x(x_q[FXW-1:0]), .y(y_q[FXW-1:0]), .z(fx_add), .flags(fx_add_flags));
  fp_multiplier #(.EXP_WIDTH(FX_EXP_WIDTH), .SIG_WIDTH(FX_SIG_WIDTH)) u_fx_mul (
    .x(x_q[FXW-1:0]), .y(y_q[FXW-1:0]), .z(fx_mul), .flags(fx_mul_flags));

  // Per-slot results (temp_z) and the 5-to-1 multiplexer.
  logic [31:0] temp_z [1:5];
  logic [31:0] z_d;
  fp_flags_t   flags_d;

  always_comb begin
    temp_z[1] = 32'(op_q == OP_MUL ? p8_mul  : p8_add);
    temp_z[2] = 32'(op_q == OP_MUL ? p16_mul : p16_add);
    temp_z[3] = 32'(op_q == OP_MUL ? p32_mul : p32_add);
    temp_z[4] = 32'(op_q == OP_MUL ? px_mul  : px_add);
    temp_z[5] = 32'(op_q == OP_MUL ? fx_mul  : fx_add);
    flags_d   = '0;
    case (sel_q)
      DESIGN_POSIT8:  z_d = temp_z[1];
      DESIGN_POSIT16: z_d = temp_z[2];
      DESIGN_POSIT32: z_d = temp_z[3];
      DESIGN_POSIT_X: z_d = temp_z[4];
      DESIGN_FPU_X: begin
        z_d     = temp_z[5];
        flags_d = (op_q == OP_MUL) ? fx_mul_flags : fx_add_flags;
      end
      default: z_d = '0;
    endcase
  end

  // Output registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z         <= '0;
      flags     <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        z     <= z_d;
        flags <= flags_d;
      end
    end
  end

  if (PX_NBITS > 32 || FXW > 32) begin : g_width_check
    $error("arith_top: unit slots are limited to 32-bit operands");
  end

endmodule
