// sc_decoder: tree-based 2-bit successive-cancellation (2b-SC) polar decoder
// with precomputation.
//
// The decoder recovers the N-bit input word u of a polar code from N channel
// LLRs, deciding frozen positions as 0.  Its decoding tree has n = log2 N
// levels.  Stages 1 .. n-1 are arrays of processing elements: stage s has
// N/2^s PEs, each an f node and a g node, and one register set of N/2^s
// entries each for f, g(u=0) and g(u=1).  Stage s reads the LLRs of its
// current node (length N/2^(s-1)):
//   * stage 1 reads the channel LLRs;
//   * stage s > 1 reads stage s-1's f results when its node is a left child,
//     or, when it is a right child, stage s-1's two g results per position,
//     picked by the left sibling's partial sums (the Usum mux of the g node).
// Because f and both g candidates of a node are formed in the same cycle,
// a node costs one cycle whatever its children need later (precomputation).
// The last stage is two P nodes in one cycle: the first decides u[4j],
// u[4j+1] from stage n-1's f pair, their partial sums select stage n-1's g
// pair, and the second decides u[4j+2], u[4j+3].  The partial sum generator
// (psg) folds the four bits into the per-level partial sums, and the
// controller (sc_ctrl) sequences everything.
//
// Interface and timing: with busy low, a start pulse loads llr_in and
// frozen.  The decode then takes 3N/4 - 1 cycles (busy high), one per stage
// activation or P cycle.  u_out/u_out_index give each group of four bits the
// cycle after it is decided; done pulses with u_hat (decoded bits) and x_hat
// (their re-encoding, the codeword estimate) valid; both stay until the next
// decode.  LLRs are Q-bit sign-magnitude, index i = code bit i; u_hat bit i is
// u_i, natural order, x = u * F^(x)n with F = [1 0; 1 1].
// The f, g and P node circuits, the tree-based organisation, N = 1024 and the
// 3N/4 - 1 latency follow the published design; the word length Q, the bit
// order, the register organisation and the handshake are this design's own.
module sc_decoder #(
  parameter int unsigned N = 1024,                   // code length, power of 2, >= 8
  parameter int unsigned Q = 6,                      // LLR word length
  localparam int unsigned NL = $clog2(N),
  localparam int unsigned JW = (NL > 3) ? NL - 2 : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,                // synchronous, active low
  input  logic                 start,
  input  logic [N-1:0][Q-1:0]  llr_in,               // channel LLRs
  input  logic [N-1:0]         frozen,               // 1 = frozen position
  output logic                 busy,
  output logic                 done,
  output logic [3:0]           u_out,                // u[4*idx + k] in bit k
  output logic                 u_out_valid,
  output logic [JW-1:0]        u_out_index,
  output logic [N-1:0]         u_hat,
  output logic [N-1:0]         x_hat
);
  localparam int unsigned BW = N - 4;

  logic [N-1:0][Q-1:0] chan_q;
  logic [N-1:0]        frozen_q;
  logic [NL-1:1]       stage_en;
  logic                p_en;
  logic [JW-1:0]       j;
  logic [BW-1:0]       beta_flat;
  logic [3:0]          u4;

  sc_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .stage_en, .p_en, .j, .busy, .done
  );

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      chan_q   <= llr_in;
      frozen_q <= frozen;
    end
  end

  // ---------------------------------------------------------------- stages
  for (genvar s = 1; s <= NL - 1; s++) begin : g_stage
    localparam int unsigned LEN = N >> s;            // outputs per kind
    logic [Q-1:0] in_v [2*LEN];
    logic [Q-1:0] f_d  [LEN], ga_d [LEN], gs_d [LEN];
    logic [Q-1:0] f_q  [LEN], ga_q [LEN], gs_q [LEN];

    if (s == 1) begin : g_src_chan
      always_comb begin
        for (int i = 0; i < 2 * LEN; i++) in_v[i] = chan_q[i];
      end
    end else begin : g_src_prev
      // Partial sums of the left sibling at level s-1, and whether the
      // level s-1 node is a right child.
      logic [2*LEN-1:0] usum;
      logic             right;
      assign usum  = beta_flat[(N - (N >> (s - 2))) +: 2 * LEN];
      assign right = j[NL - 1 - s];
      always_comb begin
        for (int i = 0; i < 2 * LEN; i++) begin
          if (!right)      in_v[i] = g_stage[s-1].f_q[i];
          else if (usum[i]) in_v[i] = g_stage[s-1].gs_q[i];
          else             in_v[i] = g_stage[s-1].ga_q[i];
        end
      end
    end

    for (genvar i = 0; i < LEN; i++) begin : g_pe
      f_node #(.Q(Q)) u_f (.llr_c(in_v[i]), .llr_d(in_v[i+LEN]), .fnode_out(f_d[i]));
      g_node #(.Q(Q)) u_g (.llr_c(in_v[i]), .llr_d(in_v[i+LEN]),
                           .g_add(ga_d[i]), .g_sub(gs_d[i]));
    end

    always_ff @(posedge clk) begin
      if (stage_en[s]) begin
        f_q  <= f_d;
        ga_q <= ga_d;
        gs_q <= gs_d;
      end
    end
  end

  // ------------------------------------------------------ last stage: P nodes
  logic [3:0]   fz4;
  logic         ps0, ps1;
  logic [Q-1:0] gsel0, gsel1;

  assign fz4   = frozen_q[{j, 2'b00} +: 4];
  assign ps0   = u4[0] ^ u4[1];                      // partial sums of u[4j], u[4j+1]
  assign ps1   = u4[1];
  assign gsel0 = ps0 ? g_stage[NL-1].gs_q[0] : g_stage[NL-1].ga_q[0];
  assign gsel1 = ps1 ? g_stage[NL-1].gs_q[1] : g_stage[NL-1].ga_q[1];

  p_node #(.Q(Q)) u_p_first (
    .llr_c(g_stage[NL-1].f_q[0]), .llr_d(g_stage[NL-1].f_q[1]),
    .frozen1(fz4[0]), .frozen2(fz4[1]), .u_odd(u4[0]), .u_even(u4[1])
  );
  p_node #(.Q(Q)) u_p_second (
    .llr_c(gsel0), .llr_d(gsel1),
    .frozen1(fz4[2]), .frozen2(fz4[3]), .u_odd(u4[2]), .u_even(u4[3])
  );

  psg #(.N(N)) u_psg (
    .clk, .we(p_en), .j, .u4, .beta_flat, .codeword(x_hat)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_out_valid <= 1'b0;
    end else begin
      u_out_valid <= p_en;
    end
    if (p_en) begin
      u_hat[{j, 2'b00} +: 4] <= u4;
      u_out       <= u4;
      u_out_index <= j;
    end
  end
endmodule
