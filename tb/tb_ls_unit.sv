// tb_ls_unit: random received components and random controls.  The
// expected sums are built term by term on integers: each mux gives 0, r or
// 3r of its component (C0..C7 read ReR1, ImR1, ReR2, ImR2, ImR1, ReR1,
// ImR2, ReR2), each unit adds its two terms with the signs of its control,
// and S4/S5 combine the four unit results.
module tb_ls_unit;
  import polar_pkg::*;
  localparam int W = 10;
  logic signed [W+1:0] r_x1 [4], r_x3 [4];
  csel_e c_sel [8];
  logic [1:0] s_ctl [6];
  logic signed [W+3:0] num_re, num_im;
  int checks = 0, failures = 0;
  int src [8] = '{0, 1, 2, 3, 1, 0, 3, 2};

  ls_unit #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sgn(int v, bit neg); return neg ? -v : v; endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int r [4];
      int term [8];
      int u [4];
      int e_re, e_im;
      for (int k = 0; k < 4; k++) begin
        r[k] = $urandom_range(0, (1 << W) - 1) - (1 << (W - 1));
        if (t < 8) r[k] = (t % 2) ? -(1 << (W - 1)) : (1 << (W - 1)) - 1;  // extremes
        r_x1[k] = (W+2)'(r[k]);
        r_x3[k] = (W+2)'(3 * r[k]);
      end
      for (int k = 0; k < 8; k++) begin
        c_sel[k] = csel_e'($urandom_range(0, 2));
        term[k] = (c_sel[k] == CSEL_ZERO) ? 0 : (c_sel[k] == CSEL_X1) ? r[src[k]] : 3 * r[src[k]];
      end
      for (int k = 0; k < 6; k++) s_ctl[k] = 2'($urandom);
      for (int k = 0; k < 4; k++)
        u[k] = sgn(term[2*k], s_ctl[k][1]) + sgn(term[2*k+1], s_ctl[k][0]);
      e_re = sgn(u[0], s_ctl[4][1]) + sgn(u[1], s_ctl[4][0]);
      e_im = sgn(u[2], s_ctl[5][1]) + sgn(u[3], s_ctl[5][0]);
      #1;
      checks += 2;
      if (int'(num_re) != e_re) failures++;
      if (int'(num_im) != e_im) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
