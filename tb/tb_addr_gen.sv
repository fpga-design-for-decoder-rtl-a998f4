// tb_addr_gen: drives the bit-side enable pattern of one iteration (value
// vector pair, a pause, then ten counting cycles) and the check-side
// pattern, and checks the address pairs cycle by cycle: 0/1..8/9 after a
// start or pause, wrap to 0/1 after 8/9, 10/11 with codetest, block enable
// one cycle after the address enable.
module tb_addr_gen;
  import ldpc_pkg::*;
  logic clk = 1'b0, start, en, codetest, mem_en;
  logic [ADDR_W-1:0] addr_a, addr_b;
  int checks = 0, failures = 0;
  addr_gen dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int expa [$], expe [$];
    bit prev_en, prev_run; int pair; bit special;
    start = 1'b1; en = 1'b0; codetest = 1'b0;
    @(negedge clk); start = 1'b0;
    prev_run = 0; pair = 0; special = 0; prev_en = 0;
    for (int c = 1; c <= 42 * 3; c++) begin
      automatic int cc = (c - 1) % 42 + 1;
      automatic cvec_t v = ucode_row(cc);
      en = (c <= 42) ? v.badd_en : v.cadd_en;
      codetest = (c <= 42) ? v.codetest_wr : 1'b0;
      if (c > 84) begin en = $urandom_range(1, 0); codetest = ($urandom_range(5, 0) == 0); end
      @(negedge clk);
      // independent model of the documented sequence
      if (en) begin
        if (codetest) begin special = 1; prev_run = 0; end
        else begin pair = (prev_run && pair != 4) ? pair + 1 : 0; special = 0; prev_run = 1; end
      end else prev_run = 0;
      checks += 3;
      if (addr_a != (special ? 4'd10 : 4'(2 * pair))) begin failures++; $display("FAIL c=%0d addr_a %0d", c, addr_a); end
      if (addr_b != (special ? 4'd11 : 4'(2 * pair + 1))) begin failures++; $display("FAIL c=%0d addr_b %0d", c, addr_b); end
      if (mem_en != en) begin failures++; $display("FAIL c=%0d mem_en", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
