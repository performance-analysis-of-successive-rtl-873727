// sc_ctrl: schedule of the 2-bit successive-cancellation decoder with
// precomputation.
//
// The decoding tree of a length-N code (n = log2 N levels) is walked in
// successive-cancellation order.  One clock cycle does one of two things:
//  * a stage activation (ST_STAGE, stage s = 1 .. n-1): the PE array of
//    stage s reads the LLR vector of its node and stores f and both g
//    candidates of the node's two children;
//  * a P-node cycle (ST_PNODE): the last stage decides the four bits of the
//    length-4 node j (two chained P nodes).
// A decode starts with stages 1 .. n-1 for node j = 0, then the P cycle.
// After the P cycle of node j the next node j+1 shares its ancestors with j
// down to level n-2-t, where t is the number of trailing zeros of j+1, so
// only stages n-1-t .. n-1 run again.  The total is 3N/4 - 1 cycles per
// codeword (5 for N = 8, 767 for N = 1024), the latency the published
// 2b-SC-Precomputation decoder states.  The state encoding, the start/done
// handshake and the synchronous active-low reset are this design's choice.
//
// Timing: start is sampled in ST_IDLE; the first stage activation is the
// next cycle; busy is high for exactly 3N/4 - 1 cycles; done pulses for one
// cycle right after the last P cycle.
module sc_ctrl
  import polar_pkg::*;
#(
  parameter int unsigned N = 1024,                   // code length, >= 8
  localparam int unsigned NL = $clog2(N),
  localparam int unsigned JW = (NL > 3) ? NL - 2 : 1,
  localparam int unsigned SW = $clog2(NL)
) (
  input  logic          clk,
  input  logic          rst_n,                       // synchronous, active low
  input  logic          start,                       // begin a decode
  output logic [NL-1:1] stage_en,                    // one-hot stage activation
  output logic          p_en,                        // P-node cycle
  output logic [JW-1:0] j,                           // current length-4 node
  output logic          busy,
  output logic          done
);
  dec_state_e    state_q;
  logic [SW-1:0] stage_q;
  logic [JW-1:0] j_q, j_next;
  logic [SW-1:0] next_stage;

  // Stage to resume at after node j: n-1 - ctz(j+1).
  always_comb begin
    int unsigned tz;
    j_next = j_q + JW'(1);
    tz = 0;
    for (int b = JW - 1; b >= 0; b--) begin
      if (j_next[b]) tz = b;
    end
    next_stage = SW'(NL - 1 - tz);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      stage_q <= SW'(1);
      j_q     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: begin
          if (start) begin
            state_q <= ST_STAGE;
            stage_q <= SW'(1);
            j_q     <= '0;
          end
        end
        ST_STAGE: begin
          if (stage_q == SW'(NL - 1)) state_q <= ST_PNODE;
          else                        stage_q <= stage_q + SW'(1);
        end
        ST_PNODE: begin
          if (j_q == JW'((N / 4) - 1)) begin
            state_q <= ST_IDLE;
            done    <= 1'b1;
          end else begin
            j_q     <= j_next;
            stage_q <= next_stage;
            state_q <= ST_STAGE;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int s = 1; s <= NL - 1; s++) begin
      stage_en[s] = (state_q == ST_STAGE) && (stage_q == SW'(s));
    end
  end

  assign p_en = (state_q == ST_PNODE);
  assign j    = j_q;
  assign busy = (state_q != ST_IDLE);

  // A P cycle only ever follows stage n-1, and a stage only runs while busy.
  a_pnode_after_last_stage: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_STAGE && stage_q != SW'(NL - 1)) |=> state_q == ST_STAGE);
endmodule
