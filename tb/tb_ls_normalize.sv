// tb_ls_normalize: random numerators and every divisor index.  The output
// must be num * round(2^FRAC / D) for D = 2, 4, 12, 20, 28, 36 (index 0..5)
// and 0 for index 6 and 7; each real product is also checked to lie within
// |num|/2 of num * 2^FRAC / D.
module tb_ls_normalize;
  localparam int W = 10, FRAC = 12;
  localparam int NW = W + 4, EW = W + FRAC + 4;
  logic signed [NW-1:0] num_re, num_im;
  logic [2:0] f_sel [2];
  logic signed [EW-1:0] eps_re, eps_im;
  int checks = 0, failures = 0;
  int dens [6] = '{2, 4, 12, 20, 28, 36};

  ls_normalize #(.W(W), .FRAC(FRAC)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int a, b, fa, fb;
      longint ea, eb;
      a = $urandom_range(0, 12 * (1 << (W - 1))) - 6 * (1 << (W - 1));
      b = $urandom_range(0, 12 * (1 << (W - 1))) - 6 * (1 << (W - 1));
      fa = $urandom_range(0, 7); fb = $urandom_range(0, 7);
      num_re = NW'(a); num_im = NW'(b);
      f_sel[0] = 3'(fa); f_sel[1] = 3'(fb);
      #1;
      ea = (fa < 6) ? longint'(a) * ((4096 + dens[fa] / 2) / dens[fa]) : 0;
      eb = (fb < 6) ? longint'(b) * ((4096 + dens[fb] / 2) / dens[fb]) : 0;
      checks += 2;
      if (longint'(eps_re) != ea) failures++;
      if (longint'(eps_im) != eb) failures++;
      if (fa < 6) begin
        real exact;
        exact = real'(a) * 4096.0 / real'(dens[fa]);
        checks++;
        if ((real'(eps_re) - exact) > real'((a < 0) ? -a : a) / 2.0 + 1.0 ||
            (exact - real'(eps_re)) > real'((a < 0) ? -a : a) / 2.0 + 1.0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
