// tb_ls_coord_precalc: the multiples r and 3r for every 10-bit value of each
// of the four received components.
module tb_ls_coord_precalc;
  localparam int W = 10;
  logic signed [W-1:0] r [4];
  logic signed [W+1:0] r_x1 [4], r_x3 [4];
  int checks = 0, failures = 0;

  ls_coord_precalc #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      for (int k = 0; k < 4; k++) r[k] = W'(k[0] ? -v - 1 : v);
      #1;
      for (int k = 0; k < 4; k++) begin
        int x;
        x = k[0] ? -v - 1 : v;
        checks += 2;
        if (int'(r_x1[k]) != x)     failures++;
        if (int'(r_x3[k]) != 3 * x) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
