// tb_bit_node: runs one bit processing unit through several 42-cycle
// iterations under the iteration microcode. Each iteration feeds nine random
// sign-magnitude check-to-bit messages two per cycle in cycles 5-9 (the
// tenth operand 0) and checks, against integer arithmetic done here: the
// hard decision in cycle 12, the value vector on both outputs in cycle 13,
// and the nine saturated residues (intrinsic + sum of the other eight) in
// cycles 16-20. The intrinsic input is latched only in the first
// iteration and scrambled afterwards.
module tb_bit_node;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  cvec_t ctl;
  msg_t intr_in, in_a, in_b, out_a, out_b;
  logic guess;
  int checks = 0, failures = 0, sat_seen = 0;
  bit_node dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic [8:0] got, logic [8:0] exp, string s);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask
  function automatic int v(msg_t m); return m[8] ? -int'(m[7:0]) : int'(m[7:0]); endfunction
  function automatic msg_t sm(int x);
    int a = x < 0 ? -x : x;
    if (a > 255) a = 255;
    return {x < 0, 8'(a)};
  endfunction
  initial begin
    msg_t intr_v;
    msg_t msg [10];
    int total;
    ctl = '0; in_a = '0; in_b = '0; intr_in = '0;
    repeat (2) @(negedge clk);
    for (int it = 0; it < 12; it++) begin
      if (it == 0) intr_v = 9'($urandom);
      for (int k = 0; k < 9; k++) msg[k] = (it % 3 == 0) ? {1'($urandom), 8'($urandom_range(40, 0))} : 9'($urandom);
      msg[9] = '0;
      total = v(intr_v);
      for (int k = 0; k < 10; k++) total += v(msg[k]);
      for (int c = 1; c <= 42; c++) begin
        ctl = ucode_row(c);
        ctl.en_intr_wr = ctl.en_intr_wr && (it == 0);
        intr_in = (c == 1 && it == 0) ? intr_v : 9'($urandom);
        in_a = (c >= 5 && c <= 9) ? msg[2 * (c - 5)] : 9'($urandom);
        in_b = (c >= 5 && c <= 9) ? msg[2 * (c - 5) + 1] : 9'($urandom);
        @(negedge clk);
        if (c + 1 == 12) chk(9'(guess), 9'(total < 0), "guess");
        if (c + 1 == 13) begin
          chk(out_a, {9{total < 0}}, "value vector A");
          chk(out_b, {9{total < 0}}, "value vector B");
        end
        if (c + 1 >= 16 && c + 1 <= 20) begin
          automatic int p = c + 1 - 16;
          chk(out_a, sm(total - v(msg[2*p])), $sformatf("it %0d residue %0d", it, 2*p));
          if (p < 4) chk(out_b, sm(total - v(msg[2*p+1])), $sformatf("it %0d residue %0d", it, 2*p+1));
          if (total - v(msg[2*p]) > 255 || total - v(msg[2*p]) < -255) sat_seen++;
        end
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
