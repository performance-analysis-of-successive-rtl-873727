// tb_psg: partial sum generator at N = 32.  Random groups of four bits are
// fed in decoding order (j = 0 .. N/4-1).  After every group, each level's
// register must hold the polar encoding of the last finished left child at
// that level, and after the last group the codeword output must equal the
// polar encoding of all N bits; both are computed by the reference encoder.
module tb_psg;
  import polar_ref_pkg::*;
  localparam int N  = 32;
  localparam int NL = $clog2(N);
  localparam int JW = (NL > 3) ? NL - 2 : 1;

  logic clk = 0, we = 0;
  logic [JW-1:0] j;
  logic [3:0] u4;
  logic [N-5:0] beta_flat;
  logic [N-1:0] codeword;
  int checks = 0, failures = 0, cycles = 0;

  psg #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_q u, seg, enc, x;
    for (int rep = 0; rep < 20; rep++) begin
      u = {};
      for (int i = 0; i < N; i++) u.push_back(1'($urandom));
      for (int jj = 0; jj < N / 4; jj++) begin
        @(negedge clk);
        we = 1; j = JW'(jj);
        u4 = {u[4*jj+3], u[4*jj+2], u[4*jj+1], u[4*jj]};
        @(negedge clk);
        we = 0;
        for (int l = 1; l <= NL - 2; l++) begin
          int len, done_nodes, m;
          len = N >> l;
          done_nodes = (4 * jj + 4) / len;
          if (done_nodes == 0) continue;
          m = ((done_nodes - 1) % 2 == 0) ? done_nodes - 1 : done_nodes - 2;
          seg = {};
          for (int k = 0; k < len; k++) seg.push_back(u[m * len + k]);
          enc = encode(seg);
          for (int k = 0; k < len; k++) begin
            checks++;
            if (beta_flat[N - (N >> (l - 1)) + k] !== enc[k]) begin
              failures++;
              if (failures < 10) $display("level %0d bit %0d after j=%0d wrong", l, k, jj);
            end
          end
        end
      end
      x = encode(u);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (codeword[k] !== x[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
