// tdp_mem: one message memory block, true dual port, 12 words of 9 bits.
//
// Each bit node and each check node owns one such block (146 in all). Port A
// and port B each have an address and a write enable; a common block enable
// gates both. Reads and writes take one cycle. The ports work in NO CHANGE
// mode: a write leaves that port's data output unchanged, so a value read
// earlier (the value vector during the codeword test) stays on the output
// while new messages are written elsewhere. Location 9 (the tenth) holds the
// all-zero word and ignores writes, so that a read of it always returns 0.
// flush clears the whole block; the decoder pulses it in its START state.
// The two ports never address the same word (port A even, port B odd), so
// no write collision rule is needed. Storage is a plain register array,
// which maps to distributed RAM or flip-flops; a block RAM macro with the
// same port behaviour can replace it.
//
// Follows the reference design: true dual port, NO CHANGE mode on both
// ports, zero tenth word. Own choices: flush instead of initialisation
// files, the write mask on location 9 (the schedule still pulses port B's
// write enable there), and the value-vector addresses.
module tdp_mem
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              flush,
  input  logic              en,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  msg_t              din_a,
  output msg_t              dout_a,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  msg_t              din_b,
  output msg_t              dout_b
);
  msg_t mem [MEM_DEPTH];

  always_ff @(posedge clk) begin
    if (flush) begin
      for (int unsigned i = 0; i < MEM_DEPTH; i++) mem[i] <= '0;
      dout_a <= '0;
      dout_b <= '0;
    end else if (en) begin
      if (we_a) begin
        if (32'(addr_a) != ZERO_LOC && 32'(addr_a) < MEM_DEPTH) mem[addr_a] <= din_a;
      end else begin
        dout_a <= (32'(addr_a) < MEM_DEPTH) ? mem[addr_a] : '0;
      end
      if (we_b) begin
        if (32'(addr_b) != ZERO_LOC && 32'(addr_b) < MEM_DEPTH) mem[addr_b] <= din_b;
      end else begin
        dout_b <= (32'(addr_b) < MEM_DEPTH) ? mem[addr_b] : '0;
      end
    end
  end
  // the two ports never write the same word in one cycle
  a_no_write_collision: assert property (@(posedge clk) disable iff (flush)
    (en && we_a && we_b) |-> (addr_a != addr_b));
endmodule
