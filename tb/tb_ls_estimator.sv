// tb_ls_estimator: random received samples and random symbols of each
// modulation (BPSK +/-1, QPSK +/-1 +/-j, 16QAM {+/-1,+/-3}^2).  The expected
// estimate is formed with complex integer arithmetic:
//   num = R1*conj(XF) + R2*conj(XS),  eps = num * round(2^12 / D),
//   D = |XF|^2 + |XS|^2,
// and must appear exactly two cycles after the inputs, one per cycle.
module tb_ls_estimator;
  import polar_pkg::*;
  localparam int W = 10, FRAC = 12, EW = W + FRAC + 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  mod_e mode;
  logic signed [W-1:0] r1_re, r1_im, r2_re, r2_im;
  logic signed [2:0] xf_re, xf_im, xs_re, xs_im;
  logic signed [EW-1:0] eps_re, eps_im;
  int checks = 0, failures = 0, cycles = 0;
  longint exp_re [$], exp_im [$];
  int sent = 0, got = 0;

  ls_estimator #(.W(W), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int coord(mod_e m, bit imag);
    int q16 [4] = '{-3, -1, 1, 3};
    case (m)
      MOD_BPSK: return imag ? 0 : ($urandom_range(0, 1) ? 1 : -1);
      MOD_QPSK: return $urandom_range(0, 1) ? 1 : -1;
      default:  return q16[$urandom_range(0, 3)];
    endcase
  endfunction

  // Pipeline check: out_valid must follow in_valid by two cycles.
  logic [1:0] vpipe;
  always @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else begin
      vpipe <= {vpipe[0], in_valid};
      checks++;
      if (out_valid !== vpipe[1]) failures++;
      if (out_valid) begin
        checks += 2;
        if (longint'(eps_re) != exp_re[got]) failures++;
        if (longint'(eps_im) != exp_im[got]) failures++;
        got++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int a1, b1, a2, b2, fr, fim, sr, sim, nre, nim, den, k;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      mode = mod_e'(t % 3);
      a1 = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
      b1 = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
      a2 = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
      b2 = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
      fr = coord(mode, 0); fim = coord(mode, 1); sr = coord(mode, 0); sim = coord(mode, 1);
      r1_re = W'(a1); r1_im = W'(b1); r2_re = W'(a2); r2_im = W'(b2);
      xf_re = 3'(fr); xf_im = 3'(fim); xs_re = 3'(sr); xs_im = 3'(sim);
      if (in_valid) begin
        nre = a1 * fr + b1 * fim + a2 * sr + b2 * sim;
        nim = b1 * fr - a1 * fim + b2 * sr - a2 * sim;
        den = fr * fr + fim * fim + sr * sr + sim * sim;
        k = ((1 << FRAC) + den / 2) / den;
        exp_re.push_back(longint'(nre) * k);
        exp_im.push_back(longint'(nim) * k);
        sent++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (got != sent) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
