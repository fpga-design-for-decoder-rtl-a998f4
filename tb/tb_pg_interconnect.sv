// tb_pg_interconnect: drives all 73 memory ports of both network directions
// with random words for the five access cycles (memory switches enabled in
// cycles 1-5, processor switches in 2-6) and checks that unit u receives,
// on input A in cycle c+2, the word read from memory u+S*D[2c] and on input
// B that of memory u+S*D[2c+1] (0 for the tenth operand), S = +1 for check
// memories to bit units and -1 for bit memories to check units.
module tb_pg_interconnect;
  import ldpc_pkg::*;
  localparam int N = 73;
  int unsigned d [9] = '{0, 1, 71, 38, 11, 20, 43, 59, 67};
  logic clk = 1'b0, en_mmux, en_pmux;
  msg_t mem_a [N], mem_b [N], cb_a [N], cb_b [N], bc_a [N], bc_b [N];
  int checks = 0, failures = 0;
  pg_interconnect #(.CHECK_TO_BIT(1'b1)) dut_cb (.clk, .en_mmux, .en_pmux, .mem_a, .mem_b, .pu_a(cb_a), .pu_b(cb_b));
  pg_interconnect #(.CHECK_TO_BIT(1'b0)) dut_bc (.clk, .en_mmux, .en_pmux, .mem_a, .mem_b, .pu_a(bc_a), .pu_b(bc_b));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  msg_t data_a [5][N], data_b [5][N];
  task automatic chk(msg_t got, msg_t exp, string s);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", s, got, exp); end
  endtask
  initial begin
    en_mmux = 1'b0; en_pmux = 1'b0;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 5; c++) for (int i = 0; i < N; i++) begin data_a[c][i] = 9'($urandom); data_b[c][i] = 9'($urandom); end
      for (int t = 0; t < 8; t++) begin
        en_mmux = (t < 5);
        en_pmux = (t >= 1 && t < 6);
        for (int i = 0; i < N; i++) begin
          mem_a[i] = (t < 5) ? data_a[t][i] : 9'($urandom);
          mem_b[i] = (t < 5) ? data_b[t][i] : 9'($urandom);
        end
        @(negedge clk);
        if (t >= 1 && t < 6) begin
          automatic int c = t - 1;
          for (int u = 0; u < N; u++) begin
            chk(cb_a[u], data_a[c][(u + d[2*c]) % N], $sformatf("c->b A u%0d c%0d", u, c));
            chk(bc_a[u], data_a[c][(u + N - d[2*c]) % N], $sformatf("b->c A u%0d c%0d", u, c));
            chk(cb_b[u], (c < 4) ? data_b[c][(u + d[2*c+1]) % N] : '0, $sformatf("c->b B u%0d c%0d", u, c));
            chk(bc_b[u], (c < 4) ? data_b[c][(u + N - d[2*c+1]) % N] : '0, $sformatf("b->c B u%0d c%0d", u, c));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
