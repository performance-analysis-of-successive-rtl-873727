// tb_sc_ctrl: the decoder schedule at N = 32.  The expected sequence of
// stage activations and P-node cycles is built from the tree walk: node 0
// needs stages 1 .. n-1, node j > 0 needs stages n-1-ctz(j) .. n-1, each
// followed by one P cycle.  Every cycle of two decodes is compared with it;
// the count must be 3N/4 - 1 cycles and done must pulse once per decode.
module tb_sc_ctrl;
  localparam int N  = 32;
  localparam int NL = $clog2(N);
  localparam int JW = (NL > 3) ? NL - 2 : 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NL-1:1] stage_en;
  logic p_en, busy, done;
  logic [JW-1:0] j;
  int checks = 0, failures = 0, cycles = 0;

  sc_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int exp_stage [$];       // 0 = P cycle
    int exp_j [$];
    for (int jj = 0; jj < N / 4; jj++) begin
      int first, tz;
      first = 1;
      if (jj != 0) begin
        tz = 0;
        while (((jj >> tz) & 1) == 0) tz++;
        first = NL - 1 - tz;
      end
      for (int s = first; s <= NL - 1; s++) begin
        exp_stage.push_back(s);
        exp_j.push_back(jj);
      end
      exp_stage.push_back(0);
      exp_j.push_back(jj);
    end
    check(exp_stage.size() == 3 * N / 4 - 1, "schedule length");
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int c = 0; c < exp_stage.size(); c++) begin
        logic [NL-1:1] want;
        want = '0;
        if (exp_stage[c] != 0) want[exp_stage[c]] = 1'b1;
        check(busy, $sformatf("busy in cycle %0d", c));
        check(stage_en == want, $sformatf("cycle %0d stage_en %b", c, stage_en));
        check(p_en == (exp_stage[c] == 0), $sformatf("cycle %0d p_en", c));
        if (exp_stage[c] == 0 || exp_stage[c] >= 2)
          check(j == JW'(exp_j[c]), $sformatf("cycle %0d j=%0d", c, j));
        check(!done, "early done");
        @(negedge clk);
      end
      check(done && !busy, "done after the last P cycle");
      @(negedge clk);
      check(!done && !busy, "done is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
