// control_rom: control store of the microprogrammed controller.
//
// 42 words of 40 bits, one per cycle of a decoding iteration; every bit of a
// word is one control signal of the datapath (field layout in
// ldpc_pkg::cvec_t). The contents are the iteration schedule built by
// ldpc_pkg::ucode_row(), evaluated as a
// combinational table in front of the output register. The read is synchronous: the word at addr appears
// on cvec in the next cycle, which is the cycle it controls. clr forces the
// all-zero (idle) word, used when the decoder is not running.
//
// Follows the reference design: 42 words, sequential read, one word per
// iteration cycle, contents identical to its schedule tables. Own choice:
// the table is logic rather than a RAM loaded from an initialisation file,
// and its width is the 40 bits of the tables.
module control_rom
  import ldpc_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       en,
  input  logic [5:0] addr,
  output cvec_t      cvec
);
  // elaboration-time check that the word layout has the documented width
  if ($bits(cvec_t) != CVEC_W) begin : g_width_check
    $error("cvec_t is %0d bits, expected %0d", $bits(cvec_t), CVEC_W);
  end

  always_ff @(posedge clk) begin
    if (clr)     cvec <= '0;
    else if (en) cvec <= (32'(addr) < ITER_CYCLES) ? ucode_row(32'(addr) + 1) : '0;
  end
endmodule
