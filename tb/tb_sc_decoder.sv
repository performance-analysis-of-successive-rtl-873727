// tb_sc_decoder: the 2b-SC decoder at N = 64 against the bit-by-bit
// reference decoder of polar_ref_pkg.
//
// Runs noisy BPSK codewords of a rate-1/2 code at several noise levels and
// random LLR vectors with random frozen masks (which hit ties, negative
// zeros and saturation).  For each decode it checks u_hat and x_hat against
// the reference, every u_out group against the reference bits, the number of
// u_out groups (N/4), and that busy stays high exactly 3N/4 - 1 cycles.
module tb_sc_decoder;
  import polar_ref_pkg::*;
  localparam int N  = 64;
  localparam int Q  = 6;
  localparam int NL = $clog2(N);
  localparam int JW = (NL > 3) ? NL - 2 : 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][Q-1:0] llr_in;
  logic [N-1:0] frozen;
  logic busy, done, u_out_valid;
  logic [3:0] u_out;
  logic [JW-1:0] u_out_index;
  logic [N-1:0] u_hat, x_hat;
  int checks = 0, failures = 0, cycles = 0;

  sc_decoder #(.N(N), .Q(Q)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_one(uint_q llr, bit_q fz);
    bit_q ru, rx;
    int busy_cycles = 0, groups = 0;
    ru = sc_decode(llr, fz, Q, rx);
    for (int i = 0; i < N; i++) begin
      llr_in[i] = Q'(llr[i]);
      frozen[i] = fz[i];
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      if (u_out_valid) begin
        groups++;
        for (int k = 0; k < 4; k++)
          check($sformatf("u_out idx %0d bit %0d", u_out_index, k), u_out[k] == ru[4*u_out_index + k]);
      end
      @(negedge clk);
    end
    if (u_out_valid) begin
      groups++;
      for (int k = 0; k < 4; k++)
        check($sformatf("u_out idx %0d bit %0d", u_out_index, k), u_out[k] == ru[4*u_out_index + k]);
    end
    check($sformatf("latency %0d, expected %0d", busy_cycles, 3 * N / 4 - 1), busy_cycles == 3 * N / 4 - 1);
    check($sformatf("groups %0d", groups), groups == N / 4);
    for (int i = 0; i < N; i++) begin
      check($sformatf("u_hat[%0d]", i), u_hat[i] == ru[i]);
      check($sformatf("x_hat[%0d]", i), x_hat[i] == rx[i]);
    end
  endtask

  initial begin
    bit_q fz, u, x;
    uint_q llr;
    int errs_clean;
    llr_in = '0; frozen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fz = frozen_set(N, N / 2);
    // Noisy codewords.
    for (int t = 0; t < 12; t++) begin
      u = {};
      for (int i = 0; i < N; i++) u.push_back(fz[i] ? 1'b0 : 1'($urandom));
      x = encode(u);
      llr = make_llrs(x, 8.0, 2.0 + 2.0 * (t % 4), Q);
      run_one(llr, fz);
      if (t % 4 == 0) begin
        errs_clean = 0;
        for (int i = 0; i < N; i++) if (u_hat[i] != u[i]) errs_clean++;
        check("high-SNR codeword decoded without error", errs_clean == 0);
      end
    end
    // Random LLRs and random frozen masks.
    for (int t = 0; t < 12; t++) begin
      bit_q rf;
      uint_q rl;
      rf = {};
      rl = {};
      for (int i = 0; i < N; i++) begin
        rf.push_back(1'($urandom_range(0, 2) == 0));
        rl.push_back($urandom_range(0, (1 << Q) - 1));
      end
      run_one(rl, rf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
