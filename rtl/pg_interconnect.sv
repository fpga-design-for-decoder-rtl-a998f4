// pg_interconnect: dedicated-wire network from the 73 memory blocks of one
// kind to the 73 processing units of the other kind.
//
// Each memory data port feeds a 1:5 memory switch, and each processing-unit
// input is fed by a 5:1 processor switch; between them runs one wire per
// Tanner-graph edge. Location k of memory block i holds the message for
// offset D[k], so in access cycle c port A carries the message for unit
// (i + S*D[2c]) and port B the one for unit (i + S*D[2c+1]), where S = +1
// for check memories read by bit units (point p meets line p + D[k]) and
// S = -1 for bit memories read by check units (line l holds point l - D[k]).
// Wiring output c of a memory switch to input c of the matching processor
// switch makes every unit receive exactly two distinct operands per cycle:
// the perfect access pattern, with no memory conflicts. Output 4 of every
// port-B memory switch is left open and input 4 of every port-B processor
// switch is tied to zero: the dummy tenth operand.
//
// Timing: memory data in cycle t is on the unit input in cycle t+2 (one
// register in each switch), with en_mmux one cycle ahead of en_pmux.
//
// Follows the reference design: memory switch -> processor switch wiring by
// point-line incidence, open fifth output on port B, zero fifth input on
// port B. Own choice: the shift-invariant stored order for every block, so
// port A always carries offsets D[0,2,4,6,8] and port B D[1,3,5,7]; the
// reference design's detailed example uses a sorted order instead.
module pg_interconnect
  import ldpc_pkg::*;
#(
  parameter bit CHECK_TO_BIT = 1'b1  // 1: check memories -> bit units (S=+1)
) (
  input  logic clk,
  input  logic en_mmux,
  input  logic en_pmux,
  input  msg_t mem_a [N_NODES],
  input  msg_t mem_b [N_NODES],
  output msg_t pu_a  [N_NODES],
  output msg_t pu_b  [N_NODES]
);
  msg_t sw_a [N_NODES][N_PAIRS];   // memory switch outputs, port A
  msg_t sw_b [N_NODES][N_PAIRS];   // memory switch outputs, port B
  msg_t in_a [N_NODES][N_PAIRS];   // processor switch inputs, port A
  msg_t in_b [N_NODES][N_PAIRS];   // processor switch inputs, port B

  function automatic int unsigned src(int unsigned unit, int unsigned k);
    // memory block whose location k carries the message for this unit
    if (CHECK_TO_BIT) return (unit + D_OFF[k]) % N_NODES;
    else              return (unit + N_NODES - D_OFF[k]) % N_NODES;
  endfunction

  for (genvar i = 0; i < N_NODES; i++) begin : g_mem
    mem_switch u_msw_a (.clk, .en(en_mmux), .din(mem_a[i]), .dout(sw_a[i]));
    mem_switch u_msw_b (.clk, .en(en_mmux), .din(mem_b[i]), .dout(sw_b[i]));
  end

  for (genvar u = 0; u < N_NODES; u++) begin : g_pu
    for (genvar c = 0; c < N_PAIRS; c++) begin : g_wire
      assign in_a[u][c] = sw_a[src(u, 2*c)][c];
      if (2*c + 1 < DEG) begin : g_b
        assign in_b[u][c] = sw_b[src(u, 2*c + 1)][c];
      end else begin : g_zero
        assign in_b[u][c] = '0;
      end
    end
    proc_switch u_psw_a (.clk, .en(en_pmux), .din(in_a[u]), .dout(pu_a[u]));
    proc_switch u_psw_b (.clk, .en(en_pmux), .din(in_b[u]), .dout(pu_b[u]));
  end
endmodule
