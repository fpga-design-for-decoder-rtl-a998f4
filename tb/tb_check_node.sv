// tb_check_node: runs one check processing unit through several 42-cycle
// iterations under the iteration microcode. Value vectors in cycles 17-21
// must give the parity of the nine guessed bits in cycle 22; nine random
// bit-to-check messages in cycles 24-28 (tenth operand 0) must give, in
// cycles 38-42, sign = XOR of the other eight signs and magnitude =
// phi(min(255, sum of the other eight phi values)), with phi the interval
// table of the approximation evaluated here in integer arithmetic.
module tb_check_node;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  cvec_t ctl;
  msg_t in_a, in_b, out_a, out_b;
  logic parity;
  int checks = 0, failures = 0;
  check_node dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int phi_ref(int x);
    if (x < 4)    return 254 - 48 * x;
    if (x <= 8)   return (248 - 15 * x) / 2;
    if (x <= 24)  return 82 - 2 * x;
    if (x <= 32)  return 56 - x;
    if (x <= 64)  return (80 - x) / 2;
    if (x <= 90)  return (128 - x) / 8;
    if (x <= 120) return (160 - x) / 16;
    if (x <= 194) return 2;
    return 0;
  endfunction
  task automatic chk(logic [8:0] got, logic [8:0] exp, string s);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask
  function automatic msg_t expect_msg(msg_t m [10], int j);
    int s = 0; int sum = 0;
    for (int k = 0; k < 9; k++) if (k != j) begin s ^= int'(m[k][8]); sum += phi_ref(int'(m[k][7:0])); end
    if (sum > 255) sum = 255;
    return {1'(s), 8'(phi_ref(sum))};
  endfunction
  initial begin
    msg_t msg [10];
    bit g [10];
    ctl = '0; in_a = '0; in_b = '0;
    repeat (2) @(negedge clk);
    for (int it = 0; it < 16; it++) begin
      automatic int par = 0;
      for (int k = 0; k < 9; k++) begin
        g[k] = 1'($urandom); par ^= int'(g[k]);
        msg[k] = (it % 2) ? {1'($urandom), 8'($urandom_range(12, 0))} : 9'($urandom);
      end
      g[9] = 0; msg[9] = '0;
      for (int c = 1; c <= 42; c++) begin
        ctl = ucode_row(c);
        in_a = 9'($urandom); in_b = 9'($urandom);
        if (c >= 17 && c <= 21) begin in_a = {9{g[2*(c-17)]}}; in_b = {9{g[2*(c-17)+1]}}; end
        if (c >= 24 && c <= 28) begin in_a = msg[2*(c-24)]; in_b = msg[2*(c-24)+1]; end
        @(negedge clk);
        if (c + 1 == 22) chk(9'(parity), 9'(par), "parity");
        if (c + 1 >= 38 && c + 1 <= 42) begin
          automatic int p = c + 1 - 38;
          chk(out_a, expect_msg(msg, 2*p), $sformatf("it %0d msg %0d", it, 2*p));
          if (p < 4) chk(out_b, expect_msg(msg, 2*p+1), $sformatf("it %0d msg %0d", it, 2*p+1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
