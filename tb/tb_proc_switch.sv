// tb_proc_switch: checks that the 5:1 processor switch registers inputs
// 0,1,2,3,4,0,... on successive enabled cycles, holds while disabled and
// restarts at input 0 after en drops.
module tb_proc_switch;
  import ldpc_pkg::*;
  logic clk = 1'b0, en;
  msg_t din [5], dout;
  int checks = 0, failures = 0;
  proc_switch dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    msg_t exp;
    int k = 0;
    en = 1'b1; foreach (din[j]) din[j] = '0;
    @(negedge clk); en = 1'b0; @(negedge clk);
    exp = dout;
    for (int i = 0; i < 600; i++) begin
      en = ($urandom_range(5, 0) != 0);
      foreach (din[j]) din[j] = 9'($urandom);
      @(negedge clk);
      if (en) begin exp = din[k]; k = (k == 4) ? 0 : k + 1; end else k = 0;
      checks++;
      if (dout !== exp) begin failures++; $display("FAIL i=%0d dout %h exp %h", i, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
