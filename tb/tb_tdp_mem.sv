// tb_tdp_mem: checks the dual-port message memory: flush to zero, one-cycle
// reads and writes on both ports, NO CHANGE outputs during writes, the
// read-only zero word at location 9 and the block enable.
module tb_tdp_mem;
  import ldpc_pkg::*;
  logic clk = 1'b0, flush, en, we_a, we_b;
  logic [ADDR_W-1:0] addr_a, addr_b;
  msg_t din_a, din_b, dout_a, dout_b;
  int checks = 0, failures = 0;
  tdp_mem dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  msg_t model [MEM_DEPTH];
  msg_t exp_a, exp_b;
  task automatic chk(msg_t got, msg_t exp, string s);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask
  initial begin
    {flush, en, we_a, we_b} = '0; addr_a = '0; addr_b = 4'd1; din_a = '0; din_b = '0;
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    for (int i = 0; i < MEM_DEPTH; i++) model[i] = '0;
    exp_a = '0; exp_b = '0;
    chk(dout_a, '0, "dout_a after flush"); chk(dout_b, '0, "dout_b after flush");
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom_range(4, 0) != 0);
      addr_a = 4'(2 * $urandom_range(5, 0));
      addr_b = 4'(2 * $urandom_range(5, 0) + 1);
      we_a = $urandom_range(1, 0); we_b = $urandom_range(1, 0);
      din_a = 9'($urandom); din_b = 9'($urandom);
      @(negedge clk);
      if (en) begin
        if (we_a) begin if (addr_a != 4'(ZERO_LOC)) model[addr_a] = din_a; end else exp_a = model[addr_a];
        if (we_b) begin if (addr_b != 4'(ZERO_LOC)) model[addr_b] = din_b; end else exp_b = model[addr_b];
      end
      chk(dout_a, exp_a, "port A"); chk(dout_b, exp_b, "port B");
    end
    chk(model[ZERO_LOC], '0, "zero word kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
