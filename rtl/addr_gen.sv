// addr_gen: address generation unit shared by all memories of one kind.
//
// The memories are read and written two words per cycle in the order they
// are stored, so the unit only counts: port A gets 0,2,4,6,8 and port B
// 1,3,5,7,9 over five successive enabled cycles, and then the sequence
// starts again. The first enabled cycle after an idle cycle (or after the
// value-vector write) starts from 0/1. With codetest high the unit instead
// presents the value-vector locations 10 (A) and 11 (B); the check-side unit
// has this input tied low. Addresses are registered: an enable in cycle t
// gives the address in cycle t+1. The memory block enable is the enable
// delayed by one cycle, so it is high exactly while the addresses are valid.
// start (the decoder's START state) returns the unit to 0/1.
//
// Follows the reference design: one shared generator per memory kind, two
// addresses per cycle for five cycles, memory enabled from the next cycle.
// Own choices: the registered counter and its restart rule.
module addr_gen
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              start,
  input  logic              en,
  input  logic              codetest,
  output logic [ADDR_W-1:0] addr_a,
  output logic [ADDR_W-1:0] addr_b,
  output logic              mem_en
);
  logic [2:0] pair_q;     // 0..4 normal pairs
  logic       special_q;  // value-vector locations
  logic       run_q;      // previous cycle was a counting cycle

  always_ff @(posedge clk) begin
    if (start) begin
      pair_q    <= '0;
      special_q <= 1'b0;
      run_q     <= 1'b0;
      mem_en    <= 1'b0;
    end else begin
      mem_en <= en;
      if (en) begin
        if (codetest) begin
          special_q <= 1'b1;
          run_q     <= 1'b0;
        end else begin
          special_q <= 1'b0;
          run_q     <= 1'b1;
          if (run_q && pair_q != 3'(N_PAIRS - 1)) pair_q <= pair_q + 3'd1;
          else pair_q <= '0;
        end
      end else begin
        run_q <= 1'b0;
      end
    end
  end

  always_comb begin
    if (special_q) begin
      addr_a = ADDR_W'(VV_LOC);
      addr_b = ADDR_W'(VV_LOC + 1);
    end else begin
      addr_a = {pair_q, 1'b0};
      addr_b = {pair_q, 1'b1};
    end
  end
  // port B always addresses the word after port A's, port A an even word
  a_pair: assert property (@(posedge clk) (addr_a[0] == 1'b0) && (addr_b == addr_a + 1'b1));
endmodule
