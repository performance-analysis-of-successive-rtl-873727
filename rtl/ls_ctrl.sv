// ls_ctrl: LS control unit of the two stage channel estimator.
//
// The estimate is eps = (R1*conj(XF) + R2*conj(XS)) / (|XF|^2 + |XS|^2),
// where XF and XS are the symbols sent with the two received samples R1 and
// R2.  This unit turns the modulation and the coordinates of XF and XS into
// the controls of the datapath:
//   C0..C7  mux selects of the eight partial products: 0, r or 3r, from the
//           magnitude of the coordinate (0, 1 or 3);
//   S0..S5  {negate a, negate b} of the six add/subtract units, from the
//           coordinate signs (and the minus of the conjugate in Im);
//   F0, F1  index of the reciprocal 1/D used by the final normalization,
//           D = |XF|^2 + |XS|^2 in {2, 4, 12, 20, 28, 36} -> index 0..5,
//           anything else -> 7 (estimate forced to 0).
// Partial products: C0 ReR1*ReXF, C1 ImR1*ImXF, C2 ReR2*ReXS, C3 ImR2*ImXS,
// C4 ImR1*ReXF, C5 ReR1*ImXF, C6 ImR2*ReXS, C7 ReR2*ImXS; S0 = C0+C1,
// S1 = C2+C3, S2 = C4-C5, S3 = C6-C7, S4 = S0+S1, S5 = S2+S3.
// In BPSK mode the imaginary coordinates are taken as 0.  The control names
// follow the published estimator; their widths and this mapping are this
// design's choice.  Coordinates are 3-bit two's complement.
// Purely combinational.
module ls_ctrl
  import polar_pkg::*;
(
  input  mod_e              mode,
  input  logic signed [2:0] xf_re, xf_im, xs_re, xs_im,
  output csel_e             c_sel [8],
  output logic [1:0]        s_ctl [6],               // {negate a, negate b}
  output logic [2:0]        f_sel [2]
);
  function automatic csel_e mag_sel(input logic signed [2:0] x);
    case (x)
      3'sd1, -3'sd1: return CSEL_X1;
      3'sd3, -3'sd3: return CSEL_X3;
      default:       return CSEL_ZERO;
    endcase
  endfunction

  function automatic logic [5:0] sq(input logic signed [2:0] x);
    return 6'($signed(x) * $signed(x));
  endfunction

  logic signed [2:0] fi, si;
  logic [5:0]        d;
  logic [2:0]        idx;

  always_comb begin
    fi = (mode == MOD_BPSK) ? 3'sd0 : xf_im;
    si = (mode == MOD_BPSK) ? 3'sd0 : xs_im;

    c_sel[0] = mag_sel(xf_re);  c_sel[1] = mag_sel(fi);
    c_sel[2] = mag_sel(xs_re);  c_sel[3] = mag_sel(si);
    c_sel[4] = mag_sel(xf_re);  c_sel[5] = mag_sel(fi);
    c_sel[6] = mag_sel(xs_re);  c_sel[7] = mag_sel(si);

    s_ctl[0] = {xf_re[2],  fi[2]};
    s_ctl[1] = {xs_re[2],  si[2]};
    s_ctl[2] = {xf_re[2], ~fi[2]};
    s_ctl[3] = {xs_re[2], ~si[2]};
    s_ctl[4] = 2'b00;
    s_ctl[5] = 2'b00;

    d = sq(xf_re) + sq(fi) + sq(xs_re) + sq(si);
    case (d)
      6'd2:    idx = 3'd0;
      6'd4:    idx = 3'd1;
      6'd12:   idx = 3'd2;
      6'd20:   idx = 3'd3;
      6'd28:   idx = 3'd4;
      6'd36:   idx = 3'd5;
      default: idx = 3'd7;
    endcase
    f_sel[0] = idx;
    f_sel[1] = idx;
  end
endmodule
