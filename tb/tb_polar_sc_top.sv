// tb_polar_sc_top: end-to-end test of the top level at its default size
// (N = 1024 rate-1/2 polar code, 6-bit LLRs, 10-bit received samples).
//
// Decoder: noisy BPSK codewords of a (1024, 512) code, frozen set from the
// erasure-channel construction, at three noise levels, plus one random LLR
// vector with a random frozen mask.  u_hat and x_hat are compared with the
// bit-by-bit reference decoder, the decode must take 3N/4 - 1 = 767 cycles,
// and the high-SNR codeword must come back error free.
// Estimator: random samples and symbols of BPSK, QPSK and 16QAM, compared
// with the complex LS formula, two cycles after the inputs.
// Mechanisms counted (each must occur): left-child and right-child stage
// activations, P-node cycles, a frozen first / second bit in a P node, the
// P-node comparator both ways, a g candidate picked by partial sum 1, the
// partial-sum fold reaching the root, and each modulation with both the
// r and 3r multiples in use.
module tb_polar_sc_top;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  localparam int N = 1024, Q = 6, W = 10, FRAC = 12;
  localparam int NL = $clog2(N), JW = NL - 2, EW = W + FRAC + 4;

  logic clk = 0, rst_n = 0;
  logic dec_start = 0;
  logic [N-1:0][Q-1:0] dec_llr;
  logic [N-1:0] dec_frozen;
  logic dec_busy, dec_done, dec_u_out_valid;
  logic [3:0] dec_u_out;
  logic [JW-1:0] dec_u_out_index;
  logic [N-1:0] dec_u_hat, dec_x_hat;
  logic est_in_valid = 0, est_out_valid;
  mod_e est_mode;
  logic signed [W-1:0] est_r1_re, est_r1_im, est_r2_re, est_r2_im;
  logic signed [2:0] est_xf_re, est_xf_im, est_xs_re, est_xs_im;
  logic signed [EW-1:0] est_eps_re, est_eps_im;

  int checks = 0, failures = 0, cycles = 0;

  polar_sc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------ mechanism counters
  int n_left = 0, n_right = 0, n_pcyc = 0, n_fz1 = 0, n_fz2 = 0;
  int n_comp1 = 0, n_comp0 = 0, n_usum1 = 0, n_root = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_x3 = 0;
  always @(posedge clk) begin
    for (int s = 2; s <= NL - 1; s++) begin
      if (dut.u_dec.stage_en[s]) begin
        if (dut.u_dec.j[NL - 1 - s]) n_right++;
        else                          n_left++;
      end
    end
    if (dut.u_dec.p_en) begin
      n_pcyc++;
      if (dut.u_dec.fz4[0]) n_fz1++;
      if (dut.u_dec.fz4[1]) n_fz2++;
      if (dut.u_dec.u_p_first.comp) n_comp1++; else n_comp0++;
      if (dut.u_dec.ps0 || dut.u_dec.ps1) n_usum1++;
      if (&dut.u_dec.j) n_root++;
    end
    if (est_in_valid) begin
      n_mode[int'(est_mode)]++;
      for (int k = 0; k < 8; k++) if (dut.u_est.c_sel[k] == CSEL_X3) n_x3++;
    end
  end

  // --------------------------------------------------------------- decoder
  task automatic decode(uint_q llr, bit_q fz, bit_q sent, bit expect_clean);
    bit_q ru, rx;
    int busy_cycles, errs;
    ru = sc_decode(llr, fz, Q, rx);
    for (int i = 0; i < N; i++) begin
      dec_llr[i] = Q'(llr[i]);
      dec_frozen[i] = fz[i];
    end
    @(negedge clk) dec_start = 1;
    @(negedge clk) dec_start = 0;
    busy_cycles = 0;
    while (!dec_done) begin
      if (dec_busy) busy_cycles++;
      @(negedge clk);
    end
    check(busy_cycles == 3 * N / 4 - 1, $sformatf("latency %0d", busy_cycles));
    errs = 0;
    for (int i = 0; i < N; i++) begin
      check(dec_u_hat[i] == ru[i], $sformatf("u_hat[%0d]", i));
      check(dec_x_hat[i] == rx[i], $sformatf("x_hat[%0d]", i));
      if (sent.size() == N && dec_u_hat[i] != sent[i]) errs++;
    end
    if (expect_clean) check(errs == 0, $sformatf("%0d bit errors at high SNR", errs));
  endtask

  // ------------------------------------------------------------- estimator
  longint exp_re [$], exp_im [$];
  int est_sent = 0, est_got = 0;
  logic [1:0] vpipe;
  always @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else begin
      vpipe <= {vpipe[0], est_in_valid};
      if (vpipe[1] || est_out_valid) begin
        check(est_out_valid && vpipe[1], "estimator latency");
        check(longint'(est_eps_re) == exp_re[est_got], "eps re");
        check(longint'(est_eps_im) == exp_im[est_got], "eps im");
        est_got++;
      end
    end
  end

  function automatic int coord(mod_e m, bit imag);
    int q16 [4] = '{-3, -1, 1, 3};
    case (m)
      MOD_BPSK: return imag ? 0 : ($urandom_range(0, 1) ? 1 : -1);
      MOD_QPSK: return $urandom_range(0, 1) ? 1 : -1;
      default:  return q16[$urandom_range(0, 3)];
    endcase
  endfunction

  initial begin
    bit_q fz, u, x, rf, none;
    uint_q llr, rl;
    dec_llr = '0; dec_frozen = '0; est_mode = MOD_BPSK;
    {est_r1_re, est_r1_im, est_r2_re, est_r2_im} = '0;
    {est_xf_re, est_xf_im, est_xs_re, est_xs_im} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Estimator burst: 300 estimates, all three modulations.
    for (int t = 0; t < 300; t++) begin
      int a1, b1, a2, b2, fr, fim, sr, sim, den, k;
      @(negedge clk);
      est_in_valid = 1;
      est_mode = mod_e'(t % 3);
      a1 = $urandom_range(0, 1023) - 512; b1 = $urandom_range(0, 1023) - 512;
      a2 = $urandom_range(0, 1023) - 512; b2 = $urandom_range(0, 1023) - 512;
      fr = coord(est_mode, 0); fim = coord(est_mode, 1);
      sr = coord(est_mode, 0); sim = coord(est_mode, 1);
      est_r1_re = W'(a1); est_r1_im = W'(b1); est_r2_re = W'(a2); est_r2_im = W'(b2);
      est_xf_re = 3'(fr); est_xf_im = 3'(fim); est_xs_re = 3'(sr); est_xs_im = 3'(sim);
      den = fr * fr + fim * fim + sr * sr + sim * sim;
      k = ((1 << FRAC) + den / 2) / den;
      exp_re.push_back(longint'(a1 * fr + b1 * fim + a2 * sr + b2 * sim) * k);
      exp_im.push_back(longint'(b1 * fr - a1 * fim + b2 * sr - a2 * sim) * k);
      est_sent++;
    end
    @(negedge clk) est_in_valid = 0;

    // Decoder: (1024, 512) codewords at three noise levels.
    fz = frozen_set(N, N / 2);
    for (int t = 0; t < 3; t++) begin
      u = {};
      for (int i = 0; i < N; i++) u.push_back(fz[i] ? 1'b0 : 1'($urandom));
      x = encode(u);
      llr = make_llrs(x, 8.0, 2.0 + 3.0 * t, Q);
      decode(llr, fz, u, t == 0);
    end
    // Random LLRs and frozen mask.
    rf = {}; rl = {};
    for (int i = 0; i < N; i++) begin
      rf.push_back(1'($urandom_range(0, 2) == 0));
      rl.push_back($urandom_range(0, (1 << Q) - 1));
    end
    none = {};
    decode(rl, rf, none, 0);

    check(est_got == est_sent, "estimates returned");
    check(n_left > 0,  "left-child stage activations");
    check(n_right > 0, "right-child stage activations");
    check(n_pcyc == 4 * N / 4, "P-node cycles");
    check(n_fz1 > 0 && n_fz2 > 0, "frozen bits in P nodes");
    check(n_comp1 > 0 && n_comp0 > 0, "P-node comparator both ways");
    check(n_usum1 > 0, "g candidate selected by partial sum 1");
    check(n_root == 4, "partial sums folded to the root");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all modulations");
    check(n_x3 > 0, "3r multiples used");
    $display("mechanisms: left %0d right %0d P %0d frozen1 %0d frozen2 %0d comp1 %0d comp0 %0d usum1 %0d root %0d modes %0d/%0d/%0d x3 %0d",
             n_left, n_right, n_pcyc, n_fz1, n_fz2, n_comp1, n_comp0, n_usum1, n_root,
             n_mode[0], n_mode[1], n_mode[2], n_x3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
