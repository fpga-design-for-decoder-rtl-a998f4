// cword_decide: syndrome check and decoded-word output register.
//
// With en_codetest it captures the 73 hard decisions of the bit nodes (the
// guess vector). With decide_cword it reads the 73 check-node parities (the
// syndrome of the guess vector), raises valid_word if all are 0, loads the
// guess vector into the output register and pulses decided. valid_word and
// codeword hold until the next decision or clr. Decision in cycle 22 of an
// iteration, result visible in cycle 23.
//
// Follows the reference design: syndrome = parities of the guess vector,
// collected at the top, all-zero means stop. Own choice: the guess vector is
// captured in a register when the value vector is formed.
module cword_decide
  import ldpc_pkg::*;
(
  input  logic               clk,
  input  logic               clr,
  input  logic               en_codetest,
  input  logic               decide_cword,
  input  logic [N_NODES-1:0] guess,
  input  logic [N_NODES-1:0] parity,
  output logic               decided,
  output logic               valid_word,
  output logic [N_NODES-1:0] codeword
);
  logic [N_NODES-1:0] guess_q;

  always_ff @(posedge clk) begin
    if (clr) begin
      decided    <= 1'b0;
      valid_word <= 1'b0;
      codeword   <= '0;
      guess_q    <= '0;
    end else begin
      if (en_codetest) guess_q <= guess;
      decided <= decide_cword;
      if (decide_cword) begin
        valid_word <= ~|parity;
        codeword   <= guess_q;
      end
    end
  end
endmodule
