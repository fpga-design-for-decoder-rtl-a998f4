// bit_node: bit (variable-node) processing unit for one point of the plane.
//
// Computes, for its nine edges, residue_j = intrinsic + sum of the other
// eight check-to-bit messages, by the total-sum-first method:
//   accumulation scan: the operands arrive two per cycle (perfect access
//     pattern) over five cycles, the tenth being 0. Each is turned from
//     9-bit sign-magnitude into 13-bit 2's complement (1 sign, 7 integer,
//     5 fraction bits) and registered; a 3-input adder with synchronous clear
//     adds both to its own output (en_add_b). en_intr_add then adds the
//     latched intrinsic information once, giving the total information,
//     which is held for the output scan.
//   codeword guess: the sign of the total is the hard decision (1 = bit 1
//     under the log(P0/P1) convention). With en_codetest the output register
//     is loaded with the value vector, the guess copied into all nine bits.
//   output scan: two shift registers of 6 cells replay the converted
//     operands in arrival order; two subtractors form total - operand
//     (en_sub_b), the result is turned back to sign-magnitude (en_res_conv)
//     and its magnitude saturated to 8 bits, 7.96875 (en_sat_b), and it is
//     registered on the outputs (en_out_b) for the bit memory, two per cycle.
// Intrinsic latch: intr_in is latched by en_intr_wr.
// Timing (cycles of the 42-cycle iteration): operands at the inputs in cycles
// 5-9, total valid in 12, value vector on the outputs in 13, residues on the
// outputs in 16-20. All enables come from the central control vector.
//
// Follows the reference design: 13-bit two's complement datapath, 3-input
// accumulator with clear, intrinsic latch, shift-register replay, saturation
// at the 9-bit frontier, value vector for the codeword test. Own choices:
// the sign convention (bit 1 = negative total) and shift-register depth.
// The unit takes the whole control vector; only the bit-side fields are
// used, the check-side fields are left unconnected inside.
module bit_node
  import ldpc_pkg::*;
(
  input  logic  clk,
  input  cvec_t ctl,
  input  msg_t  intr_in,
  input  msg_t  in_a,
  input  msg_t  in_b,
  output msg_t  out_a,
  output msg_t  out_b,
  output logic  guess
);
  typedef logic signed [BACC_W-1:0] acc_t;

  function automatic acc_t sm2tc(msg_t m);
    acc_t mag;
    mag = acc_t'({1'b0, m[MAG_W-1:0]});
    return m[MSG_W-1] ? -mag : mag;
  endfunction

  msg_t intr_q;
  acc_t pre_a_q, pre_b_q;     // converted operands
  acc_t acc_q, total_q;
  acc_t sr_a, sr_b;           // shift register outputs
  acc_t res_a_q, res_b_q;     // residues (2's complement)
  logic cs_a_q, cs_b_q;       // converted sign
  logic [BACC_W-2:0] cm_a_q, cm_b_q;  // converted magnitude, 12 bits
  msg_t sat_a_q, sat_b_q;

  function automatic msg_t saturate(logic s, logic [BACC_W-2:0] m);
    return {s, (m > (BACC_W-1)'(255)) ? 8'hFF : m[MAG_W-1:0]};
  endfunction

  always_ff @(posedge clk) begin
    if (ctl.en_intr_wr) intr_q <= intr_in;
    pre_a_q <= sm2tc(in_a);
    pre_b_q <= sm2tc(in_b);
    if (ctl.cl_add_b)       acc_q <= '0;
    else if (ctl.en_add_b)  acc_q <= acc_q + pre_a_q + pre_b_q;
    if (ctl.en_intr_add)    total_q <= acc_q + sm2tc(intr_q);
    if (ctl.en_sub_b) begin
      res_a_q <= total_q - sr_a;
      res_b_q <= total_q - sr_b;
    end
    if (ctl.en_res_conv) begin
      cs_a_q <= res_a_q[BACC_W-1];
      cs_b_q <= res_b_q[BACC_W-1];
      cm_a_q <= res_a_q[BACC_W-1] ? (BACC_W-1)'(-res_a_q) : res_a_q[BACC_W-2:0];
      cm_b_q <= res_b_q[BACC_W-1] ? (BACC_W-1)'(-res_b_q) : res_b_q[BACC_W-2:0];
    end
    if (ctl.en_sat_b) begin
      sat_a_q <= saturate(cs_a_q, cm_a_q);
      sat_b_q <= saturate(cs_b_q, cm_b_q);
    end
    if (ctl.en_out_b) begin
      out_a <= ctl.en_codetest ? {MSG_W{guess}} : sat_a_q;
      out_b <= ctl.en_codetest ? {MSG_W{guess}} : sat_b_q;
    end
  end

  assign guess = total_q[BACC_W-1];

  shift_reg #(.WIDTH(BACC_W), .DEPTH(6)) u_sr_a (.clk, .en(ctl.en_shift_b), .d(pre_a_q), .q(sr_a));
  shift_reg #(.WIDTH(BACC_W), .DEPTH(6)) u_sr_b (.clk, .en(ctl.en_shift_b), .d(pre_b_q), .q(sr_b));
endmodule
