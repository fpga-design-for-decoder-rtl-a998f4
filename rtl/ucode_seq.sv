// ucode_seq: microcode sequencer and decoder state machine.
//
// States: IDLE, START, RUN, STOP. start moves IDLE or STOP to START, which
// lasts one cycle and flushes the memories (flush). RUN steps the control
// store address upc through 0..41 and back to 0, one word per cycle, with no
// branches: every iteration runs the same 42 words. The only exit is
// handled outside the microcode: when the syndrome decision (decided, one
// cycle after decide_cword) reports valid_word, or the iteration count has
// reached MAX_ITER without a valid word, the sequencer stops (STOP), and the
// control store is cleared to the idle word from the next cycle. done is
// high in STOP, fail marks the iteration-limit exit. iter counts the
// iterations of the current block, 1 in the first; first_iter gates the
// intrinsic latch.
//
// Follows the reference design: a plain counter, no branches, exit handled
// outside the microcode, iteration limit 50. Own choices: the four states,
// the flush in START and the fail output.
module ucode_seq
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_ITER = 50
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       decided,
  input  logic       valid_word,
  output logic       flush,
  output logic       rom_en,
  output logic       rom_clr,
  output logic [5:0] upc,
  output logic [6:0] iter,
  output logic       first_iter,
  output logic       running,
  output logic       done,
  output logic       fail
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN, S_STOP} state_t;
  state_t state_q;
  logic [5:0] upc_q;
  logic       stop_now;

  assign stop_now = (state_q == S_RUN) && decided && (valid_word || 32'(iter) >= MAX_ITER);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      upc_q   <= '0;
      iter    <= '0;
      fail    <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE, S_STOP: if (start) state_q <= S_START;
        S_START: begin
          state_q <= S_RUN;
          upc_q   <= 6'd1;
          iter    <= 7'd1;
          fail    <= 1'b0;
        end
        S_RUN: begin
          if (stop_now) begin
            state_q <= S_STOP;
            fail    <= !valid_word;
          end else begin
            upc_q <= (32'(upc_q) == ITER_CYCLES - 1) ? '0 : upc_q + 6'd1;
            if (decided) iter <= iter + 7'd1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign flush      = (state_q == S_START);
  assign rom_en     = (state_q == S_START) || (state_q == S_RUN);
  assign rom_clr    = rst || stop_now || (state_q == S_IDLE) || (state_q == S_STOP);
  assign upc        = (state_q == S_START) ? 6'd0 : upc_q;
  assign first_iter = (iter == 7'd1);
  assign running    = (state_q == S_RUN);
  assign done       = (state_q == S_STOP);
endmodule
