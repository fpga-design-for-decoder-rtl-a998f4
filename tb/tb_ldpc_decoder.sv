// tb_ldpc_decoder: end-to-end test of the PG(2,2^3) decoder at its default
// size (73 bits, degree 9, 42-cycle iterations, 50-iteration limit).
//
// The testbench builds the parity-check matrix from the offset list,
// derives a basis of the code (null space of H, Gauss-Jordan over GF(2)),
// and checks that it has dimension 45. It then decodes frames of random
// codewords sent over a BPSK/AWGN channel (0 -> +1, LLR = 2y/sigma^2,
// quantised to 9-bit sign-magnitude 3.5 fixed point) at the noise levels
// sigma = 0.84 ... 0.57, plus clean and pure-noise frames. Each frame is
// also decoded by a bit-true reference model of the same fixed-point
// log-BP flooding algorithm written here from the algorithm description
// (phi from its interval table, bit-first schedule, zero initial
// check-to-bit messages). Checked per frame: valid_word, fail, the output
// word, the iteration count, the cycle count (start to done =
// (n-1)*42 + 24 clock edges) and, for valid words, H*c = 0 and equality
// with the sent codeword when the model also recovered it. After start
// the intrinsic inputs are scrambled, so the latch-once behaviour is
// exercised. For each noise level the mean iteration count and the number
// of wrong output bits are printed (the convergence and error-rate
// figures of merit). Mechanisms counted and required: stop on a valid word in the
// first iteration, stop after several iterations, stop by the iteration
// limit, bit-residue saturation, check-residue saturation, zero-operand
// reads and value-vector reads held during bit-memory writes (NO CHANGE).
module tb_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int N = N_NODES;
  localparam int MAXIT = 50;

  logic clk = 1'b0;
  logic rst, start;
  msg_t intr [N];
  logic [N-1:0] codeword;
  logic valid_word, done, fail, busy;
  logic [6:0] iterations;

  ldpc_decoder dut (.clk, .rst, .start, .intr, .codeword, .valid_word, .done, .fail, .busy, .iterations);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- code
  int unsigned doff [9] = '{0, 1, 71, 38, 11, 20, 43, 59, 67};
  bit [N-1:0] H [N];
  bit [N-1:0] basis [$];

  function automatic bit [N-1:0] syndrome(bit [N-1:0] c);
    bit [N-1:0] s;
    for (int l = 0; l < N; l++) s[l] = ^(H[l] & c);
    return s;
  endfunction

  task automatic build_code();
    bit [N-1:0] R [N];
    int pc [N];
    bit piv [N];
    int rank = 0;
    for (int l = 0; l < N; l++) begin
      H[l] = '0;
      for (int j = 0; j < 9; j++) H[l][(l + N - int'(doff[j])) % N] = 1'b1;
      R[l] = H[l];
      piv[l] = 1'b0;
    end
    for (int col = 0; col < N; col++) begin
      int r = -1;
      for (int i = rank; i < N; i++) if (R[i][col] && r < 0) r = i;
      if (r < 0) continue;
      begin bit [N-1:0] t = R[r]; R[r] = R[rank]; R[rank] = t; end
      for (int i = 0; i < N; i++) if (i != rank && R[i][col]) R[i] ^= R[rank];
      pc[rank] = col; piv[col] = 1'b1; rank++;
    end
    for (int f = 0; f < N; f++) if (!piv[f]) begin
      bit [N-1:0] v = '0;
      v[f] = 1'b1;
      for (int i = 0; i < rank; i++) if (R[i][f]) v[pc[i]] = 1'b1;
      basis.push_back(v);
    end
    check(rank == 28, $sformatf("rank of H is %0d, expected 28", rank));
    check(basis.size() == 45, "code dimension 45");
    foreach (basis[i]) check(syndrome(basis[i]) == '0, "basis vector is a codeword");
  endtask

  function automatic bit [N-1:0] random_codeword();
    bit [N-1:0] c = '0;
    foreach (basis[i]) if ($urandom_range(1, 0) == 1) c ^= basis[i];
    return c;
  endfunction

  // ------------------------------------------------------ reference model
  int m_bit_sat, m_chk_sat;  // saturation events seen by the model

  function automatic int phi_ref(int x);  // x, result in 1/32 units
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

  function automatic int sm_val(msg_t m);
    return m[8] ? -int'(m[7:0]) : int'(m[7:0]);
  endfunction

  function automatic msg_t to_sm(int v, ref int satcnt);
    int a = (v < 0) ? -v : v;
    if (a > 255) begin a = 255; satcnt++; end
    return {v < 0, 8'(a)};
  endfunction

  task automatic model(input msg_t llr [N], output bit ok, output bit [N-1:0] word, output int iters);
    msg_t cm [N][9];   // check memory l, location k: message to point l - D[k]
    msg_t bm [N][9];   // bit memory p, location k: message to line p + D[k]
    bit [N-1:0] g;
    for (int i = 0; i < N; i++) for (int k = 0; k < 9; k++) cm[i][k] = '0;
    ok = 1'b0;
    for (int it = 1; it <= MAXIT; it++) begin
      iters = it;
      for (int p = 0; p < N; p++) begin
        int in [9];
        int tot = sm_val(llr[p]);
        for (int k = 0; k < 9; k++) begin
          in[k] = sm_val(cm[(p + int'(doff[k])) % N][k]);
          tot += in[k];
        end
        g[p] = (tot < 0);
        for (int k = 0; k < 9; k++) bm[p][k] = to_sm(tot - in[k], m_bit_sat);
      end
      word = g;
      if (syndrome(g) == '0) begin ok = 1'b1; return; end
      for (int l = 0; l < N; l++) begin
        int ph [9];
        bit sg [9];
        int tot = phi_ref(0);
        bit stot = 1'b0;
        for (int k = 0; k < 9; k++) begin
          msg_t m = bm[(l + N - int'(doff[k])) % N][k];
          sg[k] = m[8];
          ph[k] = phi_ref(int'(m[7:0]));
          tot += ph[k];
          stot ^= sg[k];
        end
        for (int k = 0; k < 9; k++) begin
          int r = tot - ph[k] - phi_ref(0);
          if (r > 255) begin r = 255; m_chk_sat++; end
          cm[l][k] = {stot ^ sg[k], 8'(phi_ref(r))};
        end
      end
    end
  endtask

  // -------------------------------------------------------------- channel
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(1_000_000, 0)) / 1_000_000.0;
    return s - 6.0;
  endfunction

  function automatic msg_t quant(real llr);
    int v = $rtoi(llr * 32.0 + ((llr < 0.0) ? -0.5 : 0.5));
    int a = (v < 0) ? -v : v;
    if (a > 255) a = 255;
    return {v < 0, 8'(a)};
  endfunction

  // --------------------------------------------------------------- frames
  int n_first = 0, n_multi = 0, n_limit = 0, n_frames = 0;
  int frame_iters, frame_errors;   // last frame: iterations, bit errors against the sent word
  int zero_reads = 0, nochange_holds = 0;

  // zero word and held value vector, watched in bit memory 0 and check memory 0
  always @(posedge clk) begin
    if (dut.bmem_en && !dut.ctl.en_wr_bmem_2 && dut.baddr_b == 4'(ZERO_LOC)) zero_reads++;
    if (dut.bmem_en && dut.ctl.en_wr_bmem_1 && dut.baddr_a != 4'(VV_LOC)
        && dut.g_node[0].u_bmem.dout_a == {9{dut.guess[0]}}) nochange_holds++;
  end

  task automatic run_frame(input bit [N-1:0] sent, input real sigma, input bit noise_only);
    msg_t llr [N];
    bit m_ok; bit [N-1:0] m_word; int m_it;
    int t0, t1;
    for (int i = 0; i < N; i++) begin
      real y = noise_only ? sigma * gauss() : ((sent[i] ? -1.0 : 1.0) + sigma * gauss());
      llr[i] = (sigma == 0.0) ? (sent[i] ? 9'h140 : 9'h040) : quant(2.0 * y / (sigma * sigma));
    end
    model(llr, m_ok, m_word, m_it);
    @(negedge clk);
    intr = llr;
    start = 1'b1;
    @(negedge clk);
    t0 = cyc;
    start = 1'b0;
    @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++) intr[i] = 9'($urandom);   // latched already
    while (!done) @(negedge clk);
    t1 = cyc;
    n_frames++;
    check(valid_word == m_ok, $sformatf("frame %0d valid_word %0b, model %0b", n_frames, valid_word, m_ok));
    check(fail == !m_ok, $sformatf("frame %0d fail flag", n_frames));
    check(32'(iterations) == m_it, $sformatf("frame %0d iterations %0d, model %0d", n_frames, iterations, m_it));
    check(codeword == m_word, $sformatf("frame %0d decoded word differs from model", n_frames));
    check(t1 - t0 == (m_it - 1) * 42 + 24, $sformatf("frame %0d took %0d cycles, expected %0d",
          n_frames, t1 - t0, (m_it - 1) * 42 + 24));
    if (valid_word) check(syndrome(codeword) == '0, "valid word satisfies all checks");
    if (m_ok && !noise_only && sigma <= 0.65) check(codeword == sent || m_word != sent, "sent word recovered");
    frame_iters = int'(iterations);
    frame_errors = $countones(codeword ^ sent);
    if (m_ok && m_it == 1) n_first++;
    if (m_ok && m_it > 1) n_multi++;
    if (!m_ok) n_limit++;
  endtask

  real sigmas [7] = '{0.84, 0.81, 0.78, 0.73, 0.68, 0.63, 0.57};
  int  frames_per_sigma = 10;

  initial begin
    rst = 1'b1; start = 1'b0;
    for (int i = 0; i < N; i++) intr[i] = '0;
    m_bit_sat = 0; m_chk_sat = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    build_code();
    run_frame('0, 0.0, 1'b0);                    // all-zero word, no noise
    run_frame(random_codeword(), 0.0, 1'b0);     // clean codeword
    foreach (sigmas[s]) begin
      automatic int it_sum = 0, err_sum = 0;
      for (int f = 0; f < frames_per_sigma; f++) begin
        run_frame(random_codeword(), sigmas[s], 1'b0);
        it_sum += frame_iters;
        err_sum += frame_errors;
      end
      // SNR = -20 log10(sigma) dB; BER over frames_per_sigma * 73 bits
      $display("sigma %.2f (SNR %.2f dB): mean iterations %.1f, bit errors %0d of %0d",
               sigmas[s], -20.0 * $log10(sigmas[s]), real'(it_sum) / frames_per_sigma,
               err_sum, frames_per_sigma * N);
    end
    run_frame('0, 1.2, 1'b1);                    // pure noise: iteration limit
    run_frame('0, 1.5, 1'b1);
    $display("frames %0d: first-iteration stops %0d, multi-iteration %0d, limit %0d",
             n_frames, n_first, n_multi, n_limit);
    $display("model saturations: bit %0d check %0d; zero-word reads %0d; NO CHANGE holds %0d",
             m_bit_sat, m_chk_sat, zero_reads, nochange_holds);
    check(n_first > 0, "a frame stopped in the first iteration");
    check(n_multi > 0, "a frame needed several iterations");
    check(n_limit > 0, "a frame hit the iteration limit");
    check(m_bit_sat > 0, "bit residue saturation happened");
    check(m_chk_sat > 0, "check residue saturation happened");
    check(zero_reads > 0, "zero location read");
    check(nochange_holds > 0, "value vector held during bit memory writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
