// tb_shift_reg: checks the enabled shift register against a queue model:
// random data and random enable, output compared every cycle once filled.
module tb_shift_reg;
  localparam int W = 13, D = 6;
  logic clk = 1'b0, en;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;
  shift_reg #(.WIDTH(W), .DEPTH(D)) dut (.clk, .en, .d, .q);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [W-1:0] model [$];
  initial begin
    en = 1'b0; d = '0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (model.size() >= D) begin
        checks++;
        if (q !== model[model.size() - D]) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, model[model.size()-D]); end
      end
      en = ($urandom_range(3, 0) != 0);
      d = W'($urandom);
      if (en) model.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
