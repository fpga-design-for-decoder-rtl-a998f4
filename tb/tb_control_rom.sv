// tb_control_rom: checks the control store word by word against the
// 42-row iteration schedule written out below as literal 40-bit rows
// (bit 39 first), independent of the interval description used by the
// design. Bits left undefined by the schedule are 0 in the row and 0 in
// the companion mask, and are not compared. Also checked: one-cycle read latency, addresses past the
// last word read the idle word, en low holds the output, clr forces the
// idle word.
module tb_control_rom;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  logic clr, en;
  logic [5:0] addr;
  cvec_t cvec;
  int checks = 0, failures = 0;
  control_rom dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [39:0] sched [42] = '{
    40'b1000000000000000000000000000000000001000,  // cycle 1
    40'b0000000000000000000000000000000000001000,  // cycle 2
    40'b0000000000000000000000000000000000001001,  // cycle 3
    40'b0100000000000000000000000000000000001001,  // cycle 4
    40'b0101000000000000000000000000000000001001,  // cycle 5
    40'b0100110000000000000000000000000000000001,  // cycle 6
    40'b0100110000000000000000000000000000000001,  // cycle 7
    40'b0100110000000000000000000000000000000000,  // cycle 8
    40'b0000110000000000000000000000000000000000,  // cycle 9
    40'b0000110000000000000000000000000000000000,  // cycle 10
    40'b0000011000000000000000000000000000000000,  // cycle 11
    40'b0000010111001100000000000000000000000000,  // cycle 12
    40'b0000010011100111000000000000000000000000,  // cycle 13
    40'b0000010001110000000000000000000000000000,  // cycle 14
    40'b0000010001111100100000000000000000000000,  // cycle 15
    40'b0000000001111111100000110000000000000000,  // cycle 16
    40'b0000000000111111100000010010000000000000,  // cycle 17
    40'b0000000000011111100000010010000000000000,  // cycle 18
    40'b0000000000001111100000010010000000000000,  // cycle 19
    40'b0000000000000111000000010010000000000000,  // cycle 20
    40'b0000000000000100000000000010000000000000,  // cycle 21
    40'b0000000000000100100010000000000000000000,  // cycle 22
    40'b0000000000000100100000110000000000000000,  // cycle 23
    40'b0000000000000100100000010110010000000000,  // cycle 24
    40'b0000000000000000100000010110010000000000,  // cycle 25
    40'b0000000000000000100001010110011000000000,  // cycle 26
    40'b0000000000000000000000010110011110000000,  // cycle 27
    40'b0000000000000000000000000110011110000000,  // cycle 28
    40'b0000000000000000000000000100001110000000,  // cycle 29
    40'b0000000000000000000000000100001110000000,  // cycle 30
    40'b0000000000000000000000000100000110000000,  // cycle 31
    40'b0000000000000000000000000100100011000000,  // cycle 32
    40'b0000000000000000000000000100100011100000,  // cycle 33
    40'b0000000000000000000000000100110011100000,  // cycle 34
    40'b0000000000000000000000000100110011100000,  // cycle 35
    40'b0000000000000000000000000100111001100000,  // cycle 36
    40'b0000000000000000000000000101111000111000,  // cycle 37
    40'b0000000000000000000000000101111000011110,  // cycle 38
    40'b0000000000000000000000000101101000011110,  // cycle 39
    40'b0000000000000000000000000101101000011110,  // cycle 40
    40'b0000000000000000000000000001100000011110,  // cycle 41
    40'b0000000000000000000000000000100000000100  // cycle 42
  };

  // 1 where the schedule defines the bit
  logic [39:0] defined [42] = '{
    40'b1111111111111111111111111111111111111111,  // cycle 1,
    40'b1111111111111111111111111111111111111111,  // cycle 2,
    40'b1111111111111111111111111111111111111111,  // cycle 3,
    40'b1111111111111111111111111111111111111111,  // cycle 4,
    40'b1111111111111111111111111111111111111111,  // cycle 5,
    40'b1111111111111111111111111111111111111111,  // cycle 6,
    40'b1111111111111111111111111111111111111111,  // cycle 7,
    40'b1111111111111111111111111111111111111111,  // cycle 8,
    40'b1111111111111111111111111111111111111111,  // cycle 9,
    40'b1111111111111111111111111111111111111111,  // cycle 10,
    40'b1111111111111111111111111111111111111111,  // cycle 11,
    40'b1111111111111111111111111111111111111111,  // cycle 12,
    40'b1111111111111111111111111111111111111111,  // cycle 13,
    40'b1111111111111111111111111111111111111111,  // cycle 14,
    40'b1111111111111111111111111111111111111111,  // cycle 15,
    40'b1111111111111111111111111111111111111111,  // cycle 16,
    40'b1111111111111111111111111111111111111111,  // cycle 17,
    40'b1111111111111111111111111111111111111111,  // cycle 18,
    40'b1111111111111111111111111111111111111111,  // cycle 19,
    40'b1111111111111111111111111111111111111111,  // cycle 20,
    40'b1111111111111111111111111111111111111111,  // cycle 21,
    40'b1111111111111111111111111111111111111111,  // cycle 22,
    40'b1111111111111111111111111111111111111111,  // cycle 23,
    40'b1111111111111111111111111111111111111111,  // cycle 24,
    40'b1111111111111111111111111111111111111111,  // cycle 25,
    40'b1111111111111111111111111111111111111111,  // cycle 26,
    40'b1111111111111111111111111111111111111111,  // cycle 27,
    40'b1111111111111111111111111111111111111111,  // cycle 28,
    40'b1111111111111111111111111111111111111111,  // cycle 29,
    40'b1111111111111111111111111111111111111111,  // cycle 30,
    40'b1111111111111111111111111111111111111111,  // cycle 31,
    40'b1111111111111111111111111111111111111111,  // cycle 32,
    40'b1111111111111111111111111111111111111111,  // cycle 33,
    40'b1111111111111111111111111111111111111111,  // cycle 34,
    40'b1111111111111111111111111111111111111111,  // cycle 35,
    40'b1111111111111111111111111111111111111111,  // cycle 36,
    40'b1111111111111111111111101101111111111111,  // cycle 37,
    40'b1111111111111111111111111111111111111111,  // cycle 38,
    40'b1111111111111111111111111111111111111111,  // cycle 39,
    40'b1111111111111111111111111111111111111111,  // cycle 40,
    40'b1111111111111111111111111111111111111111,  // cycle 41,
    40'b1111111111111111111111111111111111110101  // cycle 42
  };

  task automatic chk(logic [39:0] got, logic [39:0] exp, string s, logic [39:0] m = '1);
    bit bad = 1'b0;
    for (int b = 0; b < 40; b++) if (m[b] && got[b] !== exp[b]) bad = 1'b1;
    checks++;
    if (bad) begin failures++; $display("FAIL %s got %b exp %b", s, got, exp); end
  endtask

  initial begin
    logic [39:0] last;
    clr = 1'b1; en = 1'b0; addr = '0;
    @(negedge clk);
    chk(cvec, '0, "clr");
    clr = 1'b0;
    // sequential sweep, as in a decoding iteration
    for (int rep = 0; rep < 3; rep++)
      for (int a = 0; a < 42; a++) begin
        en = 1'b1; addr = 6'(a);
        @(negedge clk);
        chk(cvec, sched[a], $sformatf("row %0d", a + 1), defined[a]);
      end
    // random addresses, enables and clears
    last = cvec;
    for (int i = 0; i < 2000; i++) begin
      automatic logic c = ($urandom_range(15, 0) == 0);
      automatic logic e = 1'($urandom);
      automatic logic [5:0] a2 = 6'($urandom);
      clr = c; en = e; addr = a2;
      @(negedge clk);
      if (c) chk(cvec, '0, "clr");
      else if (!e) chk(cvec, last, "hold");
      else if (a2 >= 6'd42) chk(cvec, '0, "past last word");
      else chk(cvec, sched[a2], $sformatf("row %0d", a2 + 1), defined[a2]);
      last = cvec;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
