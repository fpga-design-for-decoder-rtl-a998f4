// proc_switch: 5:1 circular processor switch at one input port of a node.
//
// On every enabled rising edge the word on input k is registered to the
// output, k going 0, 1, 2, 3, 4 and back to 0; the rotation restarts at 0
// whenever en drops. Together with the memory switch one cycle earlier it
// brings the k-th operand pair of the perfect access sequence to the node.
// The output holds its last value while en is low.
//
// Follows the reference design: registered circular 5:1 switch. Own choice:
// restart at input 0 when idle.
module proc_switch
  import ldpc_pkg::*;
#(
  parameter int unsigned NIN = N_PAIRS
) (
  input  logic clk,
  input  logic en,
  input  msg_t din [NIN],
  output msg_t dout
);
  logic [$clog2(NIN)-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (en) begin
      dout  <= din[sel_q];
      sel_q <= (32'(sel_q) == NIN - 1) ? '0 : sel_q + 1'b1;
    end else begin
      sel_q <= '0;
    end
  end
endmodule
