// llr_mem: LLR storage of the decoder, channel word plus even stages only.
//
// Radix-4 processing skips every odd radix-2 stage, so only the LLRs of the
// radix-4 levels are stored: level 0 (the n channel LLRs) and, for the node
// currently being worked on at each deeper level k = 1 .. L-1, its n/4^k
// LLRs. All levels live in one flat array, level k at offset lvl_off(n, k).
//
// The array is split into four quarter banks per level so that PU i of a
// level-k operation gets its four operands a[i], a[i+M/4], a[i+M/2],
// a[i+3M/4] (M = n/4^k) from four different banks in the same cycle:
// every PU of the line reads without conflict. The banks are registers,
// read combinationally and written on the clock edge.
//
// Writes: the channel word is loaded LOAD_W LLRs per beat at beat address
// ld_addr (beat b fills LLRs b*LOAD_W ...). A PU operation writes the first
// n/4^k results of the line into the level named by `wr_lvl`. The
// lookahead writes the 4 LLRs of the last level (the leaf node).
module llr_mem
  import polar_pkg::*;
#(
  parameter int unsigned Q      = 5,     // LLR width
  parameter int unsigned N      = 1024,  // code length, power of 4, >= 64
  parameter int unsigned NPU    = 256,   // PUs in the line
  parameter int unsigned LOAD_W = 16     // channel LLRs per load beat
) (
  input  logic                    clk,
  // channel load
  input  logic                    ld_en,
  input  logic [$clog2(N/LOAD_W)-1:0] ld_addr,
  input  logic signed [Q-1:0]     ld_llr [LOAD_W],
  // PU results
  input  logic                    pu_we,
  input  logic [$clog2(log4(N))-1:0] wr_lvl,   // level written (1 .. L-1)
  input  logic signed [Q-1:0]     pu_y [NPU],
  // lookahead result for the leaf level
  input  logic                    leaf_we,
  input  logic signed [Q-1:0]     leaf_y [4],
  // reads
  input  logic [$clog2(log4(N))-1:0] src,      // level read by the PUs
  output logic signed [Q-1:0]     pu_l [NPU][4],
  output logic signed [Q-1:0]     node_l [16],  // level L-2 (16 LLRs)
  output logic signed [Q-1:0]     leaf_l [4]    // level L-1 (4 LLRs)
);

  localparam int unsigned L    = log4(N);
  localparam int unsigned ATOT = lvl_off(N, L);  // levels 0..L-1

  logic signed [Q-1:0] a [ATOT];

  always_ff @(posedge clk) begin
    if (ld_en) begin
      for (int j = 0; j < LOAD_W; j++)
        a[int'(ld_addr) * LOAD_W + j] <= ld_llr[j];
    end
    if (pu_we) begin
      for (int k = 1; k < L; k++) begin
        if (int'(wr_lvl) == k) begin
          for (int i = 0; i < lvl_size(N, k); i++)
            a[lvl_off(N, k) + i] <= pu_y[i];
        end
      end
    end
    if (leaf_we) begin
      for (int i = 0; i < 4; i++) a[lvl_off(N, L - 1) + i] <= leaf_y[i];
    end
  end

  always_comb begin
    for (int n = 0; n < NPU; n++)
      for (int q = 0; q < 4; q++) pu_l[n][q] = '0;
    for (int k = 0; k < L - 1; k++) begin
      if (int'(src) == k) begin
        for (int i = 0; i < lvl_size(N, k) / 4; i++)
          for (int q = 0; q < 4; q++)
            pu_l[i][q] = a[lvl_off(N, k) + q * (lvl_size(N, k) / 4) + i];
      end
    end
    for (int i = 0; i < 16; i++) node_l[i] = a[lvl_off(N, L - 2) + i];
    for (int i = 0; i < 4; i++)  leaf_l[i] = a[lvl_off(N, L - 1) + i];
  end

endmodule
