// check_node: check processing unit for one line of the plane.
//
// Computes, for its nine edges, the log-BP check-to-bit message
//   sign_j = XOR of the other eight signs,
//   mag_j  = phi( sum over the other eight of phi(mag) ),
// with sign and magnitude on separate subpaths, both total-sum-first.
// Sign subpath: a 1-bit 3-input XOR with synchronous clear accumulates both
//   incoming signs per cycle (en_sign_acc) and holds the total; two 13-cell
//   shift registers replay the signs, and XOR with the total gives the
//   outgoing signs (en_sign_res), timed to meet the magnitudes.
// Magnitude subpath: two phi units transform the incoming magnitudes (phase
//   0); a 12-bit adder with clear accumulates the ten values (en_add_c); two
//   5-cell shift registers replay them; the subtractors form
//   total - (phi_j + phi(0)), removing the dummy tenth operand's phi(0) as
//   well (en_sub_c); the result is saturated to 8 bits (en_sat_c) and sent
//   back through the same phi units (phase 1, the inverse transform).
//   en_reschoice_c registers the magnitudes next to the signs on the outputs.
// Codeword test: when the operands are value vectors, only the sign subpath
//   runs and its total is the parity of the guessed bits on this line,
//   brought out on parity.
// Timing (iteration cycles): value vectors at the inputs in 17-21, parity
// valid in 22; messages at the inputs in 24-28, results on the outputs in
// 38-42 for the check memory.
//
// Follows the reference design: separate sign and magnitude subpaths, XOR
// accumulator with clear, 12-bit magnitude accumulator, removal of the phi(0)
// offset brought in by the zero tenth operand, reuse of the phi units for the
// inverse. Own choices: the offset value 254 (the first linear piece at 0;
// the reference text quotes 252), clamping to 0..255 before the inverse, and
// the shift-register depths. Only the check-side control fields are used.
module check_node
  import ldpc_pkg::*;
(
  input  logic  clk,
  input  cvec_t ctl,
  input  msg_t  in_a,
  input  msg_t  in_b,
  output msg_t  out_a,
  output msg_t  out_b,
  output logic  parity
);
  typedef logic [CACC_W-1:0] cacc_t;

  logic sacc_q;
  logic ssr_a, ssr_b;
  logic osg_a_q, osg_b_q;
  logic [MAG_W-1:0] phi_a, phi_b, msr_a, msr_b;
  logic [MAG_W-1:0] sat_a_q, sat_b_q, om_a_q, om_b_q;
  cacc_t cacc_q;
  logic signed [CACC_W:0] dif_a, dif_b;
  logic signed [CACC_W:0] sub_a_q, sub_b_q;

  // sign subpath
  always_ff @(posedge clk) begin
    if (ctl.cl_sign_acc)      sacc_q <= 1'b0;
    else if (ctl.en_sign_acc) sacc_q <= sacc_q ^ in_a[MSG_W-1] ^ in_b[MSG_W-1];
    if (ctl.en_sign_res) begin
      osg_a_q <= sacc_q ^ ssr_a;
      osg_b_q <= sacc_q ^ ssr_b;
    end
  end
  assign parity = sacc_q;

  shift_reg #(.WIDTH(1), .DEPTH(13)) u_ssr_a (.clk, .en(ctl.en_sign_shift), .d(in_a[MSG_W-1]), .q(ssr_a));
  shift_reg #(.WIDTH(1), .DEPTH(13)) u_ssr_b (.clk, .en(ctl.en_sign_shift), .d(in_b[MSG_W-1]), .q(ssr_b));

  // magnitude subpath
  phi_unit u_phi_a (.clk, .phase_choice(ctl.phase_choice_c), .coeff_choice(ctl.coeff_choice_c),
                    .en_scaling(ctl.en_scaling_c), .x_fwd(in_a[MAG_W-1:0]), .x_res(sat_a_q), .y(phi_a));
  phi_unit u_phi_b (.clk, .phase_choice(ctl.phase_choice_c), .coeff_choice(ctl.coeff_choice_c),
                    .en_scaling(ctl.en_scaling_c), .x_fwd(in_b[MAG_W-1:0]), .x_res(sat_b_q), .y(phi_b));

  shift_reg #(.WIDTH(MAG_W), .DEPTH(5)) u_msr_a (.clk, .en(ctl.en_mag_shift_c), .d(phi_a), .q(msr_a));
  shift_reg #(.WIDTH(MAG_W), .DEPTH(5)) u_msr_b (.clk, .en(ctl.en_mag_shift_c), .d(phi_b), .q(msr_b));

  assign dif_a = $signed({1'b0, cacc_q}) - $signed({5'd0, msr_a}) - $signed({5'd0, PHI_ZERO});
  assign dif_b = $signed({1'b0, cacc_q}) - $signed({5'd0, msr_b}) - $signed({5'd0, PHI_ZERO});

  function automatic logic [MAG_W-1:0] sat8(logic signed [CACC_W:0] v);
    if (v < 0)                    return '0;
    else if (v > (CACC_W+1)'(255)) return 8'hFF;
    else                          return v[MAG_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (ctl.cl_add_c)      cacc_q <= '0;
    else if (ctl.en_add_c) cacc_q <= cacc_q + cacc_t'(phi_a) + cacc_t'(phi_b);
    if (ctl.en_sub_c) begin
      sub_a_q <= dif_a;
      sub_b_q <= dif_b;
    end
    if (ctl.en_sat_c) begin
      sat_a_q <= sat8(sub_a_q);
      sat_b_q <= sat8(sub_b_q);
    end
    if (ctl.en_reschoice_c) begin
      om_a_q <= phi_a;
      om_b_q <= phi_b;
    end
  end

  assign out_a = {osg_a_q, om_a_q};
  assign out_b = {osg_b_q, om_b_q};
endmodule
