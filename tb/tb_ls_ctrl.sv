// tb_ls_ctrl: every modulation and every coordinate combination of XF and XS
// in {-3,-1,0,1,3}.  For each of the eight partial products the expected
// signed coefficient (ReXF, ImXF, ReXS, ImXS, ReXF, -ImXF, ReXS, -ImXS, with
// Im taken as 0 in BPSK) must match the mux select (its magnitude) and the
// add/subtract negate bit (its sign, when nonzero); S4/S5 must add; F0/F1
// must index the symbol energy |XF|^2+|XS|^2.
module tb_ls_ctrl;
  import polar_pkg::*;
  mod_e mode;
  logic signed [2:0] xf_re, xf_im, xs_re, xs_im;
  csel_e c_sel [8];
  logic [1:0] s_ctl [6];
  logic [2:0] f_sel [2];
  int checks = 0, failures = 0;
  int vals [5] = '{-3, -1, 0, 1, 3};
  int dens [6] = '{2, 4, 12, 20, 28, 36};

  ls_ctrl dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    for (int m = 0; m < 3; m++)
    for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++)
    for (int c = 0; c < 5; c++) for (int d = 0; d < 5; d++) begin
      int coef [8];
      int fi, si, den, idx;
      mode = mod_e'(m);
      xf_re = 3'(vals[a]); xf_im = 3'(vals[b]); xs_re = 3'(vals[c]); xs_im = 3'(vals[d]);
      #1;
      fi = (m == 0) ? 0 : vals[b];
      si = (m == 0) ? 0 : vals[d];
      coef = '{vals[a], fi, vals[c], si, vals[a], -fi, vals[c], -si};
      for (int k = 0; k < 8; k++) begin
        int mag;
        bit neg;
        mag = (coef[k] < 0) ? -coef[k] : coef[k];
        check(c_sel[k] == ((mag == 0) ? CSEL_ZERO : (mag == 1) ? CSEL_X1 : CSEL_X3));
        neg = s_ctl[k / 2][(k % 2) ? 0 : 1];
        if (coef[k] != 0) check(neg == (coef[k] < 0));
      end
      check(s_ctl[4] == 2'b00 && s_ctl[5] == 2'b00);
      den = vals[a] * vals[a] + fi * fi + vals[c] * vals[c] + si * si;
      idx = 7;
      for (int i = 0; i < 6; i++) if (dens[i] == den) idx = i;
      check(f_sel[0] == 3'(idx) && f_sel[1] == 3'(idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
