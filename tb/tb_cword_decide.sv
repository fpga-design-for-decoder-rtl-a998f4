// tb_cword_decide: random sequences of en_codetest, decide_cword and clr
// with random guess and parity vectors (parity all-zero in a quarter of the
// decisions). A model kept here tracks the captured guess vector and checks
// decided, valid_word and codeword every cycle, including that the output
// holds between decisions and that a guess captured in the same cycle as a
// decision is not the one reported.
module tb_cword_decide;
  import ldpc_pkg::*;
  logic clk = 1'b0;
  logic clr, en_codetest, decide_cword, decided, valid_word;
  logic [N_NODES-1:0] guess, parity, codeword;
  int checks = 0, failures = 0, n_valid = 0, n_invalid = 0;
  cword_decide dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [N_NODES-1:0] rnd();
    return {$urandom, $urandom, $urandom};
  endfunction
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    logic [N_NODES-1:0] g_m, cw_m;
    logic v_m, d_m;
    clr = 1'b1; en_codetest = 0; decide_cword = 0; guess = '0; parity = '0;
    @(negedge clk);
    g_m = '0; cw_m = '0; v_m = 0; d_m = 0;
    for (int i = 0; i < 3000; i++) begin
      clr = ($urandom_range(63, 0) == 0);
      en_codetest = 1'($urandom);
      decide_cword = ($urandom_range(3, 0) == 0);
      guess = rnd();
      parity = ($urandom_range(3, 0) == 0) ? '0 : rnd() & (rnd() | 73'd1 << $urandom_range(72, 0));
      if (clr) begin g_m = '0; cw_m = '0; v_m = 0; d_m = 0; end
      else begin
        d_m = decide_cword;
        if (decide_cword) begin
          v_m = (parity == '0); cw_m = g_m;
          if (v_m) n_valid++; else n_invalid++;
        end
        if (en_codetest) g_m = guess;
      end
      @(negedge clk);
      chk(decided == d_m && valid_word == v_m && codeword == cw_m, $sformatf("step %0d", i));
    end
    chk(n_valid > 20 && n_invalid > 20, "both decisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
