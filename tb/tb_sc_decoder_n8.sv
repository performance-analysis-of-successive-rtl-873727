// tb_sc_decoder_n8: the eight-bit decoding tree (three levels: two f/g
// stages and the P-node stage).  Every one of the 256 frozen masks is run
// with random LLRs, and noisy codewords of an (8, 4) code are added.  Each
// decode must match the bit-by-bit reference decoder and take
// 3*8/4 - 1 = 5 cycles: stage 1, stage 2 (left half), P (u0..u3),
// stage 2 (right half), P (u4..u7), which is also checked cycle by cycle.
module tb_sc_decoder_n8;
  import polar_ref_pkg::*;
  localparam int N = 8, Q = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][Q-1:0] llr_in;
  logic [N-1:0] frozen;
  logic busy, done, u_out_valid;
  logic [3:0] u_out;
  logic [0:0] u_out_index;
  logic [N-1:0] u_hat, x_hat;
  int checks = 0, failures = 0, cycles = 0;

  sc_decoder #(.N(N), .Q(Q)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 100000);
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

  task automatic run_one(uint_q llr, bit_q fz);
    bit_q ru, rx;
    // expected unit per cycle: 1 = stage 1, 2 = stage 2, 0 = P node
    int want [5] = '{1, 2, 0, 2, 0};
    ru = sc_decode(llr, fz, Q, rx);
    for (int i = 0; i < N; i++) begin
      llr_in[i] = Q'(llr[i]);
      frozen[i] = fz[i];
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    for (int c = 0; c < 5; c++) begin
      check(busy, "busy");
      check(dut.stage_en[1] == (want[c] == 1) && dut.stage_en[2] == (want[c] == 2) &&
            dut.p_en == (want[c] == 0), $sformatf("unit in cycle %0d", c));
      @(negedge clk);
    end
    check(done && !busy, "done after 5 cycles");
    for (int i = 0; i < N; i++) begin
      check(u_hat[i] == ru[i], $sformatf("u_hat[%0d]", i));
      check(x_hat[i] == rx[i], $sformatf("x_hat[%0d]", i));
    end
  endtask

  initial begin
    bit_q fz, u, x;
    uint_q llr;
    llr_in = '0; frozen = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 256; m++) begin
      fz = {}; llr = {};
      for (int i = 0; i < N; i++) begin
        fz.push_back(m[i]);
        llr.push_back($urandom_range(0, (1 << Q) - 1));
      end
      run_one(llr, fz);
    end
    fz = frozen_set(N, N / 2);
    for (int t = 0; t < 50; t++) begin
      u = {};
      for (int i = 0; i < N; i++) u.push_back(fz[i] ? 1'b0 : 1'($urandom));
      x = encode(u);
      llr = make_llrs(x, 6.0, 3.0, Q);
      run_one(llr, fz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
