// shift_reg: enabled synchronous shift register (the shift-register block of
// the node processing units).
//
// On each rising edge with en high, d enters cell 1 and every cell moves one
// place towards the output; q is the last cell, so a word appears on q
// DEPTH enabled edges after it was taken in. With en low all cells hold. The
// node units use it to replay their operands, in arrival order, to the
// output-scan subtractors without reading the memories a second time.
// Depth and width are parameters; the nodes use 13 x 6 (bit magnitudes),
// 8 x 5 (check magnitudes) and 1 x 13 (check signs). No reset: every cell is
// written before it is read in the node schedule.
//
// Follows the reference design: 13-bit cells shifting on the rising edge.
// Own choice: the depths, derived from the control schedule.
module shift_reg #(
  parameter int unsigned WIDTH = 13,
  parameter int unsigned DEPTH = 6
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] cells [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      cells[0] <= d;
      for (int unsigned i = 1; i < DEPTH; i++) cells[i] <= cells[i-1];
    end
  end

  assign q = cells[DEPTH-1];
endmodule
