// psg: partial sum generator of the 2-bit successive-cancellation decoder.
//
// A g node at tree level l needs the partial sums of its left sibling: the
// polar encoding (x = u * F^(x)m, F = [1 0; 1 1]) of every bit decided in
// that sibling's subtree.  The generator keeps one register per level
// l = 1 .. n-2 (n = log2 N, width N/2^l) holding the partial sums of the
// last left child finished at that level.
//
// In each P-node cycle (we = 1) four bits u4 = u[4j .. 4j+3] arrive for the
// length-4 node j at level n-2.  They are encoded with the polar butterfly,
// and the result is folded upwards while the node is a right child:
//   beta_parent = { beta_right , beta_left_sibling ^ beta_right }
// (lower half = XOR, upper half = right child's sums).  The fold stops at
// the first ancestor that is a left child, whose level register is written.
// The ancestor of node j at level l is a right child when bit (n-2-l) of j
// is 1, so the level written is set by the trailing ones of j.  When j is
// the last node the fold reaches the root and the level-0 register takes the
// re-encoded codeword.  All folding is combinational; registers update on
// the clock edge that ends the P-node cycle, so the sums are ready for the
// next stage activation.
// Only the existence of a simple, encoder-like partial sum generator is
// given by the published design; this structure is this design's own.
// No reset: each register is written before it is read in every decode.
module psg #(
  parameter int unsigned N = 1024,                   // code length, >= 8
  localparam int unsigned NL = $clog2(N),
  localparam int unsigned JW = (NL > 3) ? NL - 2 : 1,
  localparam int unsigned BW = N - 4                 // sum of N/2^l, l=1..n-2
) (
  input  logic          clk,
  input  logic          we,                          // P-node cycle
  input  logic [JW-1:0] j,                           // length-4 node index
  input  logic [3:0]    u4,                          // u[4j+k] in bit k
  output logic [BW-1:0] beta_flat,                   // level l at offset N-N/2^(l-1)
  output logic [N-1:0]  codeword                     // valid after last node
);
  // Encoding of the four new bits (level n-2 node).
  logic [3:0] beta4;
  always_comb begin
    beta4[0] = u4[0] ^ u4[1] ^ u4[2] ^ u4[3];
    beta4[1] = u4[1] ^ u4[3];
    beta4[2] = u4[2] ^ u4[3];
    beta4[3] = u4[3];
  end

  for (genvar l = 0; l <= NL - 2; l++) begin : g_lvl
    localparam int unsigned LEN = N >> l;
    localparam int unsigned LOW = NL - 2 - l;        // index bits below level l
    logic [LEN-1:0] chain;                           // sums of the level-l ancestor
    logic [LEN-1:0] beta_q;                          // stored left-child sums
    logic           wr;

    if (l == NL - 2) begin : g_leaf
      assign chain = beta4;
    end else begin : g_fold
      assign chain = {g_lvl[l+1].chain, g_lvl[l+1].beta_q ^ g_lvl[l+1].chain};
    end

    // Write when every ancestor below level l is a right child and the
    // ancestor at level l is a left child (or is the root).
    if (l == 0) begin : g_root
      assign wr = we && (&j);
    end else if (LOW == 0) begin : g_low0
      assign wr = we && !j[0];
    end else begin : g_mid
      assign wr = we && (&j[LOW-1:0]) && !j[LOW];
    end

    always_ff @(posedge clk) begin
      if (wr) beta_q <= chain;
    end

    if (l >= 1) begin : g_out
      assign beta_flat[(N - (N >> (l - 1))) +: LEN] = beta_q;
    end
  end

  assign codeword = g_lvl[0].beta_q;
endmodule
