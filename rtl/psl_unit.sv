// psl_unit: partial sum lookahead for the last radix-4 level.
//
// While the LSPU is still deciding the 4 bits of child c of a 16-LLR node,
// the next child c+1 can already be computed for all 16 values those bits
// may take. This unit builds the operands of the 16 x 4 = 64 processing-unit
// evaluations (hypothesis h, output index i uses PU 4h+i): the operands are
// the node LLRs L[i], L[i+4], L[i+8], L[i+12]; the partial sums of children
// below c come from the partial-sum store, and the partial sum of child c is
// the 4-bit polar transform of the hypothesis h. Once the LSPU has decided,
// its 4 bits select hypothesis h = u through a 16:1 multiplexer, so the
// next child's LLRs are ready for the LSPU in the very next cycle.
// Only used for c = 0, 1, 2. Combinational.
module psl_unit
  import polar_pkg::*;
#(
  parameter int unsigned Q = 5   // LLR width
) (
  input  logic signed [Q-1:0] node_l [16],  // LLRs of the 16-LLR node
  input  logic        [15:0]  node_b,       // partial sums of its children
  input  logic        [1:0]   cur,          // child being decided now
  // operands for PUs 0..63
  output logic signed [Q-1:0] pu_l  [64][4],
  output pu_fn_e              pu_fn [64],
  output logic        [2:0]   pu_b  [64],
  // results of PUs 0..63 and the selection
  input  logic signed [Q-1:0] pu_y  [64],
  input  logic        [3:0]   u_sel,        // bits decided by the LSPU
  output logic signed [Q-1:0] next_l [4]    // LLRs of child cur+1
);

  logic [3:0] hx;

  always_comb begin
    hx = 4'b0000;
    for (int h = 0; h < 16; h++) begin
      for (int i = 0; i < 4; i++) begin
        hx = enc4(4'(h));
        for (int q = 0; q < 4; q++) pu_l[4*h+i][q] = node_l[i + 4*q];
        pu_fn[4*h+i] = pu_fn_e'(cur + 2'd1);
        for (int c = 0; c < 3; c++) begin
          if (c < int'(cur))       pu_b[4*h+i][c] = node_b[4*c + i];
          else if (c == int'(cur)) pu_b[4*h+i][c] = hx[i];
          else                     pu_b[4*h+i][c] = 1'b0;
        end
      end
    end
    for (int i = 0; i < 4; i++) next_l[i] = pu_y[4*int'(u_sel) + i];
  end

endmodule
