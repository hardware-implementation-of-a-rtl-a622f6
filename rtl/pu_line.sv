// pu_line: the line of radix-4 processing units.
//
// A line architecture instantiates only as many PUs as the busiest cycle
// needs: producing one radix-4 child of the n-LLR channel word takes n/4
// PUs, so the line holds NPU = n/4 units (256 for n = 1024). Smaller nodes
// use the first units of the line and leave the rest idle; the partial-sum
// lookahead borrows 64 of those idle units. Every PU has its own operands,
// function and partial sums, so the line can run the 64 lookahead
// hypotheses side by side. Combinational.
module pu_line
  import polar_pkg::*;
#(
  parameter int unsigned Q   = 5,    // LLR width
  parameter int unsigned NPU = 256   // number of processing units
) (
  input  logic signed [Q-1:0] l  [NPU][4],  // operands L0..L3 per PU
  input  pu_fn_e              fn [NPU],     // function per PU
  input  logic        [2:0]   b  [NPU],     // partial sums per PU
  output logic signed [Q-1:0] y  [NPU]      // results
);

  for (genvar p = 0; p < NPU; p++) begin : g_pu
    r4_pu #(.Q(Q)) u_pu (
      .l (l[p]),
      .fn(fn[p]),
      .b (b[p]),
      .y (y[p])
    );
  end

endmodule
