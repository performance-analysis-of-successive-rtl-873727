// g_node: g function of the successive-cancellation decoder, precomputed
// for both values of the partial sum.
//
// Both sign-magnitude inputs are converted to two's complement (S2C); an
// adder forms d+c and a subtractor d-c in parallel; each result is
// converted back to sign-magnitude (C2S), saturating at +/-(2^(Q-1)-1) and
// returning zero as +0.  In the published g-node diagram a mux driven by the
// partial sum Usum then picks one of the two.  Here both results are
// outputs: the decoder stores them and applies the Usum selection one cycle
// later, when the partial sum is known (the precomputation scheme).
//   g(c,d,u) = d + (1-2u)*c     ->  g_add for u = 0, g_sub for u = 1.
// The subtraction order (d-c) and the saturation are this design's choice.
// Purely combinational.
module g_node #(
  parameter int unsigned Q = 6
) (
  input  logic [Q-1:0] llr_c,            // LLR(c), upper input
  input  logic [Q-1:0] llr_d,            // LLR(d), lower input
  output logic [Q-1:0] g_add,            // d + c, sign-magnitude
  output logic [Q-1:0] g_sub             // d - c, sign-magnitude
);
  localparam int signed MAXMAG = (1 << (Q - 1)) - 1;

  logic signed [Q+1:0] c_tc, d_tc, sum_tc, dif_tc;

  // S2C: sign-magnitude to two's complement.
  function automatic logic signed [Q+1:0] s2c(input logic [Q-1:0] sm);
    logic signed [Q+1:0] m;
    m = $signed({3'b000, sm[Q-2:0]});
    return sm[Q-1] ? -m : m;
  endfunction

  // C2S: two's complement to sign-magnitude, saturating.
  function automatic logic [Q-1:0] c2s(input logic signed [Q+1:0] v);
    logic signed [Q+1:0] m;
    m = (v < 0) ? -v : v;
    if (m > (Q+2)'(MAXMAG)) m = (Q+2)'(MAXMAG);
    return {v < 0, m[Q-2:0]};
  endfunction

  always_comb begin
    c_tc   = s2c(llr_c);
    d_tc   = s2c(llr_d);
    sum_tc = d_tc + c_tc;
    dif_tc = d_tc - c_tc;
    g_add  = c2s(sum_tc);
    g_sub  = c2s(dif_tc);
  end
endmodule
