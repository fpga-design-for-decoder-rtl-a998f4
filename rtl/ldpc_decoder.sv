// ldpc_decoder: fully parallel log-BP decoder for the length-73 PG(2,2^3)
// LDPC code (rate 45/73, row and column weight 9).
//
// One bit processing unit per point and one check processing unit per line
// (73 + 73), each owning a 12 x 9 dual-port message memory. Bit units read
// check memories and write bit memories; check units read bit memories and
// write check memories; the two networks are pg_interconnect instances.
// Every memory is read and written two words per cycle in stored order, so
// one address generator per memory kind serves all 73 blocks. A central
// microprogrammed controller (ucode_seq + control_rom) broadcasts one 40-bit
// control vector per cycle to all units of both kinds (flooding schedule).
//
// Iteration (42 cycles): bit update in cycles 1-20 (read check memories
// 2-6, bit totals in 12, value vectors written in 13, bit-to-check messages
// written in 16-20); codeword test in 15-23 in parallel with the bit output
// scan (speculative: the new messages are computed whatever the test says);
// check update in 21-42 (check-to-bit messages written in 38-42). The
// decision at the end of cycle 22 either stops the decoder with valid_word and the
// decoded word on codeword, or lets the next iteration start.
//
// Interface: drive intr (intrinsic LLRs, 9-bit sign-magnitude, log(P0/P1)
// convention, 3.5 fixed point) and pulse start for one cycle; intr must be
// stable from start until the first cycle after START (it is latched in the
// first iteration's cycle 1). done is high (n-1)*42 + 24 clock edges
// after the edge that samples start, for n iterations; valid_word then tells whether codeword is a codeword
// and fail whether the MAX_ITER limit ended the decoding. iterations gives n.
//
// Follows the reference design: the fully parallel architecture, memory
// organisation, interconnect, flooding schedule and control words. Own
// choices: the block interface (start/done/fail/busy/iterations, parallel
// intrinsic inputs), a flush of all memories at start, gating of the
// intrinsic latch to the first iteration, and rising-edge-only clocking.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_ITER = 50
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  msg_t               intr [N_NODES],
  output logic [N_NODES-1:0] codeword,
  output logic               valid_word,
  output logic               done,
  output logic               fail,
  output logic               busy,
  output logic [6:0]         iterations
);
  // control path ---------------------------------------------------------
  logic       flush, rom_en, rom_clr, first_iter, decided;
  logic [5:0] upc;
  cvec_t      rom_q, ctl;

  ucode_seq #(.MAX_ITER(MAX_ITER)) u_seq (
    .clk, .rst, .start, .decided, .valid_word,
    .flush, .rom_en, .rom_clr, .upc, .iter(iterations), .first_iter,
    .running(busy), .done, .fail
  );

  control_rom u_rom (.clk, .clr(rom_clr), .en(rom_en), .addr(upc), .cvec(rom_q));

  always_comb begin
    ctl = rom_q;
    ctl.en_intr_wr = rom_q.en_intr_wr & first_iter;
  end

  // address generation -----------------------------------------------------
  logic [ADDR_W-1:0] baddr_a, baddr_b, caddr_a, caddr_b;
  logic              bmem_en, cmem_en;

  addr_gen u_badd (.clk, .start(flush), .en(ctl.badd_en), .codetest(ctl.codetest_wr),
                   .addr_a(baddr_a), .addr_b(baddr_b), .mem_en(bmem_en));
  addr_gen u_cadd (.clk, .start(flush), .en(ctl.cadd_en), .codetest(1'b0),
                   .addr_a(caddr_a), .addr_b(caddr_b), .mem_en(cmem_en));

  // datapath ----------------------------------------------------------------
  msg_t bpu_out_a [N_NODES], bpu_out_b [N_NODES];   // bit units -> bit memories
  msg_t cpu_out_a [N_NODES], cpu_out_b [N_NODES];   // check units -> check memories
  msg_t bmem_a [N_NODES], bmem_b [N_NODES];         // bit memory read data
  msg_t cmem_a [N_NODES], cmem_b [N_NODES];         // check memory read data
  msg_t bpu_in_a [N_NODES], bpu_in_b [N_NODES];
  msg_t cpu_in_a [N_NODES], cpu_in_b [N_NODES];
  logic [N_NODES-1:0] guess, parity;

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    bit_node u_bpu (.clk, .ctl, .intr_in(intr[i]), .in_a(bpu_in_a[i]), .in_b(bpu_in_b[i]),
                    .out_a(bpu_out_a[i]), .out_b(bpu_out_b[i]), .guess(guess[i]));
    tdp_mem u_bmem (.clk, .flush, .en(bmem_en),
                    .we_a(ctl.en_wr_bmem_1), .addr_a(baddr_a), .din_a(bpu_out_a[i]), .dout_a(bmem_a[i]),
                    .we_b(ctl.en_wr_bmem_2), .addr_b(baddr_b), .din_b(bpu_out_b[i]), .dout_b(bmem_b[i]));
    check_node u_cpu (.clk, .ctl, .in_a(cpu_in_a[i]), .in_b(cpu_in_b[i]),
                      .out_a(cpu_out_a[i]), .out_b(cpu_out_b[i]), .parity(parity[i]));
    tdp_mem u_cmem (.clk, .flush, .en(cmem_en),
                    .we_a(ctl.en_wr_cmem_1), .addr_a(caddr_a), .din_a(cpu_out_a[i]), .dout_a(cmem_a[i]),
                    .we_b(ctl.en_wr_cmem_2), .addr_b(caddr_b), .din_b(cpu_out_b[i]), .dout_b(cmem_b[i]));
  end

  // check memories -> bit units
  pg_interconnect #(.CHECK_TO_BIT(1'b1)) u_net_cb (
    .clk, .en_mmux(ctl.en_mmux_c), .en_pmux(ctl.en_pmux_b),
    .mem_a(cmem_a), .mem_b(cmem_b), .pu_a(bpu_in_a), .pu_b(bpu_in_b));

  // bit memories -> check units
  pg_interconnect #(.CHECK_TO_BIT(1'b0)) u_net_bc (
    .clk, .en_mmux(ctl.en_mmux_b), .en_pmux(ctl.en_pmux_c),
    .mem_a(bmem_a), .mem_b(bmem_b), .pu_a(cpu_in_a), .pu_b(cpu_in_b));

  // codeword test -------------------------------------------------------
  cword_decide u_dec (.clk, .clr(rst | flush), .en_codetest(ctl.en_codetest),
                      .decide_cword(ctl.decide_cword), .guess, .parity,
                      .decided, .valid_word, .codeword);
endmodule
