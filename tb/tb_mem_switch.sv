// tb_mem_switch: checks that the 1:5 memory switch puts successive words on
// outputs 0,1,2,3,4,0,... one cycle later, leaves the other outputs alone,
// and restarts at output 0 after en drops.
module tb_mem_switch;
  import ldpc_pkg::*;
  logic clk = 1'b0, en;
  msg_t din, dout [5];
  int checks = 0, failures = 0;
  mem_switch dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    msg_t model [5];
    int k = 0;
    en = 1'b0; din = '0;
    @(negedge clk); @(negedge clk);
    // load every output once
    en = 1'b1;
    for (int i = 0; i < 5; i++) begin din = 9'(i + 1); @(negedge clk); model[i] = 9'(i + 1); end
    en = 1'b0; @(negedge clk);
    k = 0;
    for (int i = 0; i < 600; i++) begin
      en = ($urandom_range(5, 0) != 0);
      din = 9'($urandom);
      @(negedge clk);
      if (en) begin model[k] = din; k = (k == 4) ? 0 : k + 1; end else k = 0;
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (dout[j] !== model[j]) begin failures++; $display("FAIL i=%0d out %0d = %h exp %h", i, j, dout[j], model[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
