// tb_g_node: exhaustive check of the g node for Q = 6.  Both outputs are
// compared with d+c and d-c computed on integers and saturated to +/-31,
// with zero as +0; the Usum selection used by the decoder is applied to the
// outputs and checked against g(c,d,u) = d + (1-2u)c.
module tb_g_node;
  localparam int Q = 6;
  localparam int LIM = (1 << (Q - 1)) - 1;
  logic [Q-1:0] c, d, ga, gs;
  int checks = 0, failures = 0;
  int sat_seen = 0;

  g_node #(.Q(Q)) dut (.llr_c(c), .llr_d(d), .g_add(ga), .g_sub(gs));

  function automatic int val(int code);
    int m = code % (1 << (Q - 1));
    return (code >> (Q - 1)) ? -m : m;
  endfunction
  function automatic logic [Q-1:0] code(int v);
    int m = (v < 0) ? -v : v;
    if (m > LIM) m = LIM;
    return Q'(((v < 0) ? (1 << (Q - 1)) : 0) + m);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << Q); a++) begin
      for (int b = 0; b < (1 << Q); b++) begin
        c = Q'(a); d = Q'(b);
        #1;
        for (int u = 0; u < 2; u++) begin
          int expv;
          logic [Q-1:0] got;
          expv = u ? val(b) - val(a) : val(b) + val(a);
          got  = u ? gs : ga;
          if (expv > LIM || expv < -LIM) sat_seen++;
          checks++;
          if (got !== code(expv)) begin
            failures++;
            if (failures < 10) $display("g(c=%0d,d=%0d,u=%0d) = %0h, expected %0h", a, b, u, got, code(expv));
          end
        end
      end
    end
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
