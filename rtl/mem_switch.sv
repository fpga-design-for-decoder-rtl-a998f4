// mem_switch: 1:5 circular memory switch at one data port of a memory block.
//
// On every enabled rising edge the word on din is registered onto one of the
// five outputs, in the order output 0, 1, 2, 3, 4 and back to 0. Output k
// drives the interconnect wire to the processing unit that consumes the word
// read in the k-th cycle of the access sequence. The rotation restarts at
// output 0 whenever en drops. Outputs not being loaded keep their value; a
// processing unit samples each wire only in the cycle after it was loaded.
//
// Follows the reference design: registered circular 1:5 switch loaded in
// five consecutive cycles. Own choice: restart at output 0 when idle.
module mem_switch
  import ldpc_pkg::*;
#(
  parameter int unsigned NOUT = N_PAIRS
) (
  input  logic clk,
  input  logic en,
  input  msg_t din,
  output msg_t dout [NOUT]
);
  logic [$clog2(NOUT)-1:0] sel_q;

  always_ff @(posedge clk) begin
    if (en) begin
      dout[sel_q] <= din;
      sel_q <= (32'(sel_q) == NOUT - 1) ? '0 : sel_q + 1'b1;
    end else begin
      sel_q <= '0;
    end
  end
endmodule
