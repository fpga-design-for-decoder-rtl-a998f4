// tb_phi_unit: streams every 8-bit magnitude through the phi unit, first as
// forward operands (phase 0), then as residues (phase 1), and compares the
// result three cycles later with the interval table of the modified
// Masera approximation, evaluated here with integer arithmetic. Also
// checks that the approximation stays within 0.5 of -log(tanh(x/2)) for
// x >= 0.25 and never increases with x.
module tb_phi_unit;
  import ldpc_pkg::*;
  logic clk = 1'b0, phase_choice, coeff_choice, en_scaling;
  logic [7:0] x_fwd, x_res, y;
  int checks = 0, failures = 0;
  phi_unit dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
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
  initial begin
    int pipe [$];
    int prev = 1000;
    phase_choice = 0; coeff_choice = 0; en_scaling = 0; x_fwd = 0; x_res = 0;
    for (int ph = 0; ph < 2; ph++) begin
      for (int i = 0; i < 256 + 3; i++) begin
        automatic int x = i;
        phase_choice = ph[0];
        coeff_choice = (i < 256);
        en_scaling = 1'b1;
        x_fwd = ph ? 8'($urandom) : 8'(x);
        x_res = ph ? 8'(x) : 8'($urandom);
        @(negedge clk);
        if (i >= 2) begin
          automatic int xi = i - 2;
          checks++;
          if (int'(y) != phi_ref(xi)) begin failures++; $display("FAIL phase %0d x=%0d y=%0d exp=%0d", ph, xi, y, phi_ref(xi)); end
        end
      end
    end
    for (int x = 0; x < 256; x++) begin
      automatic real xr = x / 32.0;
      checks++;
      if (phi_ref(x) > prev) begin failures++; $display("FAIL not monotonic at %0d", x); end
      prev = phi_ref(x);
      if (x >= 8) begin
        automatic real t = $exp(xr); automatic real ph = $ln((t + 1.0) / (t - 1.0));
        checks++;
        if ((phi_ref(x) / 32.0 - ph) > 0.5 || (ph - phi_ref(x) / 32.0) > 0.5) begin
          failures++; $display("FAIL approximation x=%f approx=%f phi=%f", xr, phi_ref(x) / 32.0, ph); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
