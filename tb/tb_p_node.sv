// tb_p_node: exhaustive check of the two-bit decision for Q = 6.  For every
// input pair and frozen pattern, u_{2i-1} must be the sign of f(c,d) and
// u_{2i} the sign of g(c,d,u_{2i-1}) = d + (1-2u_{2i-1})c, both computed on
// integers; frozen bits must be 0.  When the g value is exactly 0 the
// decision must follow the larger-or-equal magnitude (c side).
module tb_p_node;
  localparam int Q = 6;
  logic [Q-1:0] c, d;
  logic f1, f2, u1, u2;
  int checks = 0, failures = 0;

  p_node #(.Q(Q)) dut (.llr_c(c), .llr_d(d), .frozen1(f1), .frozen2(f2), .u_odd(u1), .u_even(u2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int fz = 0; fz < 4; fz++) begin
      for (int a = 0; a < (1 << Q); a++) begin
        for (int b = 0; b < (1 << Q); b++) begin
          int sa, sb, ma, mb, va, vb, g, e1, e2;
          c = Q'(a); d = Q'(b); f1 = fz[0]; f2 = fz[1];
          #1;
          sa = a >> (Q - 1); sb = b >> (Q - 1);
          ma = a % (1 << (Q - 1)); mb = b % (1 << (Q - 1));
          va = sa ? -ma : ma; vb = sb ? -mb : mb;
          e1 = f1 ? 0 : (sa ^ sb);
          g  = e1 ? vb - va : vb + va;
          if (f2)         e2 = 0;
          else if (g < 0) e2 = 1;
          else if (g > 0) e2 = 0;
          else            e2 = (ma >= mb) ? (sa ^ e1) : sb;
          checks += 2;
          if (u1 !== 1'(e1)) failures++;
          if (u2 !== 1'(e2)) begin
            failures++;
            if (failures < 10) $display("c=%0d d=%0d fz=%0d: u2=%0b expected %0d", a, b, fz, u2, e2);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
