// tb_ucode_seq: runs the sequencer (with a small iteration limit of 4)
// through decoding blocks that end with a valid word after 1..4 iterations
// or at the limit, plus restarts from STOP, a start while idle after reset
// and a reset in the middle of a block. The decision pulse is produced
// here the way the datapath produces it: one cycle after control word 22,
// i.e. in the cycle whose control store address is 23. Checked every cycle
// against counters kept here: flush only in START, the address sequence
// 0,1,..,41,0,.., the iteration number and first_iter, running, rom_en,
// rom_clr (also in the stopping cycle), done, fail and the total length
// (n-1)*42 + 24 clock edges from the edge that samples start to done.
module tb_ucode_seq;
  localparam int MAXI = 4;
  logic clk = 1'b0;
  logic rst, start, decided, valid_word;
  logic flush, rom_en, rom_clr, first_iter, running, done, fail;
  logic [5:0] upc;
  logic [6:0] iter;
  int checks = 0, failures = 0;
  int good_iter;  // iteration whose decision reports a valid word
  ucode_seq #(.MAX_ITER(MAXI)) dut (.*);
  always #5 clk = ~clk;
  assign decided = running && upc == 6'd23;
  assign valid_word = decided && 32'(iter) == good_iter;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s (t=%0t)", s, $time); end
  endtask

  // start a block and follow it to the end; returns after done is seen
  task automatic block(int g, int abort_at = -1);
    int c, k, last_k;
    bit exp_fail;
    good_iter = g;
    last_k = (g >= 1 && g <= MAXI) ? g : MAXI;
    exp_fail = !(g >= 1 && g <= MAXI);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(flush && upc == 0 && rom_en && !rom_clr && !running && !done, "START cycle");
    c = 1;
    forever begin
      @(negedge clk);
      if (c == abort_at) begin
        rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
        chk(!running && !done && !flush && rom_clr && !rom_en && iter == 0, "reset during a block");
        return;
      end
      k = (c >= 23) ? (c - 23) / 42 + 2 : 1;
      if (c % 42 == 23 && (c - 23) / 42 + 1 == last_k) begin
        chk(running && rom_clr && upc == 23, "stopping cycle");
        @(negedge clk);
        chk(done && !running && !rom_en && rom_clr && fail == exp_fail && !flush, "STOP state");
        chk(c + 1 == (last_k - 1) * 42 + 24, "block length");
        chk(32'(iter) == last_k, "iteration count at stop");
        repeat (3) begin @(negedge clk); chk(done && fail == exp_fail && 32'(iter) == last_k, "STOP holds"); end
        return;
      end
      chk(running && !flush && rom_en && !rom_clr && !done, $sformatf("RUN flags at %0d", c));
      chk(32'(upc) == c % 42, $sformatf("address at %0d: %0d", c, upc));
      chk(32'(iter) == (c % 42 == 23 ? k - 1 : k),
          $sformatf("iteration at %0d: %0d", c, iter));
      chk(first_iter == (iter == 1), "first_iter");
      c++;
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; good_iter = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3) begin @(negedge clk); chk(!running && !done && !rom_en && rom_clr && !flush, "IDLE"); end
    for (int g = 1; g <= MAXI; g++) block(g);
    block(0);          // never valid: iteration limit
    block(MAXI + 1);   // valid too late: iteration limit
    block(2);
    block(3, 30);      // reset in the middle
    block(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
