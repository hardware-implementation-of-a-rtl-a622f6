// psum_unit: partial-sum store and update network.
//
// The g-type PU functions need the partial sums (re-encoded decided bits)
// of the earlier children of the node being processed. For every radix-4
// level k = 0 .. L-2 (L = log4 n) the unit keeps one register P_k of n/4^k
// bits: slot c (bits c*M/4 .. c*M/4 + M/4 - 1, M = n/4^k) holds the
// partial sums of child c of the current level-k node.
//
// Updates come 4 bits at a time (a leaf decided by the LSPU) or 16 bits at a
// time (a special sub-code node). The new bits are turned into partial
// sums with the polar transform and written into their slot. When the
// written child is the last one (c = 3) of its parent, the parent's partial
// sums follow at once from the radix-4 combination
//   beta[i]        = b0 ^ b1 ^ b2 ^ b3
//   beta[i+M/4]    = b1 ^ b3
//   beta[i+M/2]    = b2 ^ b3
//   beta[i+3M/4]   = b3
// (each generation-matrix 1 replaced by the 4-bit encoding of the new
// bits), and the chain continues upward in the same cycle, so all partial
// sums are current on the next clock edge.
//
// Read side: for PU i working on level `src`, b = {P[M/2+i], P[M/4+i], P[i]}.
// P of the last stored level (the 16-LLR node) is also given out whole for
// the lookahead unit. The registers need no reset: a slot is always written
// before any PU reads it.
module psum_unit
  import polar_pkg::*;
#(
  parameter int unsigned N   = 1024,  // code length, a power of 4, >= 64
  parameter int unsigned NPU = 256    // PUs served by the read side
) (
  input  logic                 clk,
  input  logic                 leaf_we,     // 4 bits decided
  input  logic [3:0]           leaf_u,
  input  logic                 spc_we,      // 16 bits decided
  input  logic [15:0]          spc_u,
  input  logic [1:0]           dig [log4(N)],  // path digits, dig[k] = child
                                               // index at level k (k >= 1)
  input  logic [$clog2(log4(N))-1:0] src,    // level read by the PUs
  output logic [2:0]           pu_b [NPU],
  output logic [15:0]          node_b       // P of level L-2
);

  localparam int unsigned L    = log4(N);
  localparam int unsigned PTOT = lvl_off(N, L - 1);  // levels 0..L-2
  localparam int unsigned VTOT = lvl_off(N, L);      // levels 0..L-1

  logic p   [PTOT];  // stored partial sums
  logic v   [VTOT];  // partial sums of a node finished this cycle
  logic cmpl [L];    // node at level k finished this cycle
  logic [3:0] leaf_x;
  logic x, b0, b1, b2, b3;
  int unsigned m4;

  always_comb begin
    for (int j = 0; j < VTOT; j++) v[j] = 1'b0;
    leaf_x = 4'b0000;
    x = 1'b0;
    {b0, b1, b2, b3} = 4'b0000;
    for (int k = 0; k < L; k++) cmpl[k] = 1'b0;
    // leaf (level L-1, 4 bits) or special node (level L-2, 16 bits)
    if (leaf_we) begin
      cmpl[L-1] = 1'b1;
      leaf_x = enc4(leaf_u);
      for (int i = 0; i < 4; i++) v[lvl_off(N, L-1) + i] = leaf_x[i];
    end
    if (spc_we || (leaf_we && dig[L-1] == 2'd3)) cmpl[L-2] = 1'b1;
    for (int k = L - 3; k >= 0; k--)
      cmpl[k] = cmpl[k+1] && (dig[k+1] == 2'd3);
    // partial sums of a finished level-k node, built bottom-up
    for (int k = L - 2; k >= 0; k--) begin
      m4 = lvl_size(N, k) / 4;
      if (k == L - 2 && spc_we) begin
        for (int i = 0; i < 16; i++) begin
          x = 1'b0;
          for (int j = 0; j < 16; j++)
            if ((i & j) == i) x = x ^ spc_u[j];
          v[lvl_off(N, k) + i] = x;
        end
      end else begin
        for (int i = 0; i < m4; i++) begin
          b0 = p[lvl_off(N, k) + i];
          b1 = p[lvl_off(N, k) + m4 + i];
          b2 = p[lvl_off(N, k) + 2 * m4 + i];
          b3 = v[lvl_off(N, k + 1) + i];
          v[lvl_off(N, k) + i]          = b0 ^ b1 ^ b2 ^ b3;
          v[lvl_off(N, k) + m4 + i]     = b1 ^ b3;
          v[lvl_off(N, k) + 2 * m4 + i] = b2 ^ b3;
          v[lvl_off(N, k) + 3 * m4 + i] = b3;
        end
      end
    end
  end

  // A finished level-k node (k >= 1) goes into slot dig[k] of level k-1.
  always_ff @(posedge clk) begin
    for (int k = 1; k < L; k++) begin
      if (cmpl[k]) begin
        for (int c = 0; c < 4; c++) begin
          if (dig[k] == 2'(c)) begin
            for (int i = 0; i < lvl_size(N, k); i++)
              p[lvl_off(N, k-1) + c * lvl_size(N, k) + i] <= v[lvl_off(N, k) + i];
          end
        end
      end
    end
  end

  always_comb begin
    for (int n = 0; n < NPU; n++) pu_b[n] = 3'b000;
    for (int k = 0; k < L - 1; k++) begin
      if (int'(src) == k) begin
        for (int i = 0; i < lvl_size(N, k) / 4; i++) begin
          pu_b[i][0] = p[lvl_off(N, k) + i];
          pu_b[i][1] = p[lvl_off(N, k) + lvl_size(N, k) / 4 + i];
          pu_b[i][2] = p[lvl_off(N, k) + lvl_size(N, k) / 2 + i];
        end
      end
    end
    for (int i = 0; i < 16; i++) node_b[i] = p[lvl_off(N, L - 2) + i];
  end

endmodule
