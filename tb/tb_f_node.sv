// tb_f_node: exhaustive check of the f node for Q = 6: every pair of
// sign-magnitude inputs against f(c,d) = sign(c)sign(d)min(|c|,|d|)
// worked out on integers.
module tb_f_node;
  localparam int Q = 6;
  logic [Q-1:0] c, d, y;
  int checks = 0, failures = 0;

  f_node #(.Q(Q)) dut (.llr_c(c), .llr_d(d), .fnode_out(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << Q); a++) begin
      for (int b = 0; b < (1 << Q); b++) begin
        int ma, mb, sa, sb, exp_mag, exp_sign;
        c = Q'(a); d = Q'(b);
        #1;
        sa = a >> (Q - 1); sb = b >> (Q - 1);
        ma = a % (1 << (Q - 1)); mb = b % (1 << (Q - 1));
        exp_mag  = (ma < mb) ? ma : mb;
        exp_sign = (sa != sb) ? 1 : 0;
        checks++;
        if (y !== Q'(exp_sign * (1 << (Q - 1)) + exp_mag)) begin
          failures++;
          if (failures < 10) $display("f(%0d,%0d) = %0d, expected sign %0d mag %0d", a, b, y, exp_sign, exp_mag);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
