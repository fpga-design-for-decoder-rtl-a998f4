// phi_unit: piecewise-linear phi(x) = -log(tanh(x/2)) on a multiply-add
// slice, shared between the forward and the inverse transform.
//
// phi is approximated by the modified Masera model: nine intervals of x,
// each with a linear piece whose slope was made an integer by scaling slope
// and offset by a power of two (1, 2, 8 or 16); the last two pieces are the
// constants 0.0625 and 0. Three registered stages, 3.5 fixed point in and
// out (units of 1/32):
//   1. coeff_choice: phase_choice selects the operand (0: incoming message
//      magnitude, 1: saturated residue); its interval selects slope, offset
//      and scale, registered with the operand.
//   2. multiply-add, every cycle: slope * x + offset (the DSP slice).
//   3. en_scaling: arithmetic right shift by log2(scale), clamped to 0..255.
// An operand on x_fwd/x_res in cycle t gives y in cycle t+3. The real
// function is its own inverse, so the same unit serves both directions.
//
// Follows the reference design: the nine pieces, integer slopes, scale
// factors and the positive 0.0625 piece. Own choices: offsets rounded to
// 1/32 (all are exact), the shift rounds down, the multiply-add is plain
// logic, and the transform spans three registered stages as the control
// schedule spaces coeff_choice and en_scaling.
module phi_unit
  import ldpc_pkg::*;
(
  input  logic             clk,
  input  logic             phase_choice,
  input  logic             coeff_choice,
  input  logic             en_scaling,
  input  logic [MAG_W-1:0] x_fwd,
  input  logic [MAG_W-1:0] x_res,
  output logic [MAG_W-1:0] y
);
  logic [MAG_W-1:0] x1_q;
  phi_coef_t        k1_q;
  logic signed [15:0] mac2_q;
  logic [2:0]         sh2_q;

  always_ff @(posedge clk) begin
    if (coeff_choice) begin
      x1_q <= phase_choice ? x_res : x_fwd;
      k1_q <= phi_coef(phase_choice ? x_res : x_fwd);
    end
    mac2_q <= 16'($signed(k1_q.slope)) * $signed({8'd0, x1_q}) + $signed({8'd0, k1_q.offset});
    sh2_q  <= k1_q.shift;
  end

  logic signed [15:0] scaled;
  assign scaled = mac2_q >>> sh2_q;

  always_ff @(posedge clk) begin
    if (en_scaling) begin
      if (scaled < 0)              y <= '0;
      else if (scaled > 16'sd255)  y <= 8'd255;
      else                         y <= scaled[MAG_W-1:0];
    end
  end
endmodule
