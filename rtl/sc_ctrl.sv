// sc_ctrl: schedule of the radix-4 SC decoder.
//
// The decoder walks the radix-4 tree depth first. dig[k] (k = 1 .. L-1,
// L = log4 n) is the index (0..3) of the current node among the four
// children of its level-(k-1) parent; together the digits name the current
// 4-bit leaf. Each cycle the controller issues one operation:
//   OP_PU    the PU line computes child dig[lvl] of the current level
//            lvl-1 node, i.e. the LLRs of level lvl (1 cycle per node)
//   OP_LEAF  the LSPU decides the 4 bits of the current leaf
//   OP_SPC   the special sub-code unit decides the 16 bits of the current
//            level L-2 node
// After level L-2 is computed the node is handed to OP_SPC if its frozen
// pattern is special (spc_hit) and special decoding is enabled; otherwise
// OP_PU continues to the leaf. After a leaf or special node the digits are
// advanced like a base-4 counter; the highest digit that changed sets the
// level where LLR computation restarts.
//
// Partial-sum lookahead (psl_en): during OP_LEAF of leaf c < 3 the idle PUs
// compute leaf c+1 for all 16 outcomes, so the controller goes straight to
// the next OP_LEAF without an OP_PU cycle. This makes each 16-LLR node take
// 1 + 4 cycles instead of 4 + 4, and a special node 1 cycle.
// Resulting latency for n = 1024: 596 cycles (radix-4 only), 404 (with
// lookahead), 404 - 4 per special node (with both).
//
// Handshake: `start` (one cycle, while idle) begins a decode; psl_en and
// spc_en are sampled then. `busy` is high from the next cycle until the
// last operation; `done` pulses the cycle after it; `cycles` then holds
// the number of operation cycles of that decode. Active-low synchronous
// reset.
module sc_ctrl
  import polar_pkg::*;
#(
  parameter int unsigned N = 1024  // code length, power of 4, >= 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       psl_en,
  input  logic       spc_en,
  input  logic       spc_hit,   // current level L-2 node has a special pattern
  output dec_op_e    op,
  output logic [$clog2(log4(N))-1:0] lvl,  // level being computed by OP_PU
  output logic [1:0] dig [log4(N)],
  output logic       psl_now,   // lookahead active this cycle
  output logic       busy,
  output logic       done,
  output logic [15:0] cycles
);

  localparam int unsigned L  = log4(N);
  localparam int unsigned LW = $clog2(L);

  logic psl_q, spc_q;
  logic [1:0] dig_n [L];
  logic [LW-1:0] lvl_n;
  dec_op_e op_n;
  logic last;

  assign busy    = (op != OP_IDLE);
  assign psl_now = (op == OP_LEAF) && psl_q && (dig[L-1] != 2'd3);

  // Next state for the end of a leaf (from = L-1) or a special node
  // (from = L-2): increment the digits from level `from` upward.
  always_comb begin
    int p;
    op_n  = op;
    lvl_n = lvl;
    last  = 1'b0;
    for (int k = 0; k < L; k++) dig_n[k] = dig[k];
    p = 0;
    unique case (op)
      OP_PU: begin
        if (int'(lvl) == L - 2 && spc_q && spc_hit) begin
          op_n = OP_SPC;
        end else if (int'(lvl) == L - 1) begin
          op_n = OP_LEAF;
        end else begin
          lvl_n = lvl + 1'b1;
        end
      end
      OP_LEAF, OP_SPC: begin
        // lowest level whose digit can still be incremented
        p = 0;
        for (int k = 1; k < L; k++) begin
          if (k <= ((op == OP_LEAF) ? L - 1 : L - 2) && dig[k] != 2'd3) p = k;
        end
        if (p == 0) begin
          last = 1'b1;
          op_n = OP_IDLE;
        end else begin
          dig_n[p] = dig[p] + 2'd1;
          for (int k = 1; k < L; k++) if (k > p) dig_n[k] = 2'd0;
          if (op == OP_LEAF && p == L - 1 && psl_q) begin
            op_n = OP_LEAF;   // next leaf LLRs come from the lookahead
          end else begin
            op_n  = OP_PU;
            lvl_n = LW'(p);
          end
        end
      end
      default: begin
        if (start) begin
          op_n  = OP_PU;
          lvl_n = LW'(1);
          for (int k = 0; k < L; k++) dig_n[k] = 2'd0;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op     <= OP_IDLE;
      lvl    <= '0;
      psl_q  <= 1'b0;
      spc_q  <= 1'b0;
      done   <= 1'b0;
      cycles <= '0;
      for (int k = 0; k < L; k++) dig[k] <= 2'd0;
    end else begin
      op   <= op_n;
      lvl  <= lvl_n;
      done <= last;
      for (int k = 0; k < L; k++) dig[k] <= dig_n[k];
      if (op == OP_IDLE && start) begin
        psl_q  <= psl_en;
        spc_q  <= spc_en;
        cycles <= '0;
      end else if (op != OP_IDLE) begin
        cycles <= cycles + 16'd1;
      end
    end
  end

  // A special node is only ever entered from level L-2.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (op == OP_SPC) |-> ($past(op) == OP_PU));

endmodule
