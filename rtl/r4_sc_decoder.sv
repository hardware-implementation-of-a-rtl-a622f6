// r4_sc_decoder: simplified radix-4 successive cancellation polar decoder.
//
// Decodes one n-bit polar codeword (default n = 1024, Q = 5-bit LLRs) with
// min-sum SC decoding on a radix-4 tree: a line of n/4 radix-4 processing
// units produces the LLRs two radix-2 stages at a time, a last stage unit
// (LSPU) decides 4 bits per cycle, 16-bit nodes with a special frozen
// pattern are decided in one cycle, and partial-sum lookahead (PSL)
// computes the next leaf for all 16 possible outcomes of the current one.
//
// Interface
//   ld_valid/ld_llr : channel LLRs, LOAD_W per beat, in index order, only
//                     while idle; n/LOAD_W beats fill the word
//   info_mask       : bit i = 1 when u_i carries data, 0 when frozen to 0;
//                     held stable during a decode
//   start           : one-cycle pulse while idle, after loading
//   psl_en, spc_en  : enable lookahead / special sub-codes (sampled at start)
//   busy, done      : done pulses once when u_hat is complete
//   u_hat           : all n decided bits u_0..u_{n-1} (frozen positions 0)
//   latency         : decoding cycles of the last codeword (start excluded,
//                     loading excluded)
//   bad_pattern     : sticky, a 4-bit leaf had an impossible frozen pattern
// Latency for n = 1024: 596 cycles (radix-4), 404 (with PSL), and 4 fewer
// for every special 16-bit node (with both). Control decisions and LLR /
// partial-sum accesses happen in the same cycle as the PU work they feed;
// channel loading happens before `start` and is not counted.
// Active-low synchronous reset.
// The special-node class `spc_kind` drives no logic: it is kept as a named
// internal status (the decided bits come from the same unit's `u` output)
// so that a testbench or debugger can see which shape was decoded.
module r4_sc_decoder
  import polar_pkg::*;
#(
  parameter int unsigned N      = 1024,  // code length, power of 4, >= 64
  parameter int unsigned Q      = 5,     // LLR width
  parameter int unsigned LOAD_W = 16     // channel LLRs per load beat
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_valid,
  input  logic signed [Q-1:0] ld_llr [LOAD_W],
  input  logic [N-1:0]        info_mask,
  input  logic                start,
  input  logic                psl_en,
  input  logic                spc_en,
  output logic                busy,
  output logic                done,
  output logic [N-1:0]        u_hat,
  output logic [15:0]         latency,
  output logic                bad_pattern
);

  localparam int unsigned L   = log4(N);
  localparam int unsigned LW  = $clog2(L);
  localparam int unsigned NPU = (N / 4 > 64) ? N / 4 : 64;
  localparam int unsigned NB  = N / LOAD_W;

  // ---------------- control
  dec_op_e    op;
  logic [LW-1:0] lvl, src;
  logic [1:0] dig [L];
  logic       psl_now, spc_hit;

  sc_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .psl_en, .spc_en, .spc_hit,
    .op, .lvl, .dig, .psl_now, .busy, .done, .cycles(latency)
  );

  assign src = lvl - 1'b1;

  // index of the current leaf (4-bit node) and 16-bit node
  logic [2*(L-1)-1:0] leaf_idx;
  logic [2*(L-2)-1:0] node_idx;
  always_comb begin
    leaf_idx = '0;
    for (int k = 1; k < L; k++) leaf_idx = {leaf_idx[2*(L-1)-3:0], dig[k]};
    node_idx = leaf_idx[2*(L-1)-1:2];
  end

  // ---------------- channel load
  logic [$clog2(NB)-1:0] ld_addr;
  always_ff @(posedge clk) begin
    if (!rst_n || start) ld_addr <= '0;
    else if (ld_valid && op == OP_IDLE) ld_addr <= ld_addr + 1'b1;
  end

  // ---------------- LLR memory
  logic signed [Q-1:0] mem_pu_l [NPU][4];
  logic signed [Q-1:0] node_l [16];
  logic signed [Q-1:0] leaf_l [4];
  logic signed [Q-1:0] pu_y [NPU];
  logic signed [Q-1:0] psl_l [4];

  llr_mem #(.Q(Q), .N(N), .NPU(NPU), .LOAD_W(LOAD_W)) u_mem (
    .clk,
    .ld_en  (ld_valid && op == OP_IDLE),
    .ld_addr,
    .ld_llr,
    .pu_we  (op == OP_PU),
    .wr_lvl (lvl),
    .pu_y,
    .leaf_we(psl_now),
    .leaf_y (psl_l),
    .src,
    .pu_l   (mem_pu_l),
    .node_l,
    .leaf_l
  );

  // ---------------- last stage and special sub-code units
  logic [3:0]  leaf_info, leaf_u;
  logic        leaf_bad;
  logic [15:0] node_info, spc_u;
  spc_kind_e   spc_kind;

  assign leaf_info = info_mask[4*leaf_idx +: 4];
  assign node_info = info_mask[16*node_idx +: 16];

  lspu #(.Q(Q)) u_lspu (
    .l(leaf_l), .info(leaf_info), .u(leaf_u), .bad(leaf_bad)
  );

  spc_decoder #(.Q(Q), .K(16)) u_spc (
    .l(node_l), .info(node_info), .kind(spc_kind), .hit(spc_hit), .u(spc_u)
  );

  // ---------------- partial sums
  logic [2:0]  ps_pu_b [NPU];
  logic [15:0] node_b;

  psum_unit #(.N(N), .NPU(NPU)) u_psum (
    .clk,
    .leaf_we(op == OP_LEAF),
    .leaf_u,
    .spc_we (op == OP_SPC),
    .spc_u,
    .dig,
    .src,
    .pu_b   (ps_pu_b),
    .node_b
  );

  // ---------------- partial-sum lookahead
  logic signed [Q-1:0] psl_pu_l [64][4];
  pu_fn_e              psl_pu_fn [64];
  logic [2:0]          psl_pu_b [64];
  logic signed [Q-1:0] psl_pu_y [64];

  psl_unit #(.Q(Q)) u_psl (
    .node_l, .node_b, .cur(dig[L-1]),
    .pu_l(psl_pu_l), .pu_fn(psl_pu_fn), .pu_b(psl_pu_b),
    .pu_y(psl_pu_y), .u_sel(leaf_u), .next_l(psl_l)
  );

  // ---------------- PU line with operand selection
  logic signed [Q-1:0] line_l [NPU][4];
  pu_fn_e              line_fn [NPU];
  logic [2:0]          line_b [NPU];

  always_comb begin
    for (int p = 0; p < NPU; p++) begin
      line_l[p]  = mem_pu_l[p];
      line_fn[p] = pu_fn_e'(dig[lvl]);
      line_b[p]  = ps_pu_b[p];
      if (psl_now && p < 64) begin
        line_l[p]  = psl_pu_l[p];
        line_fn[p] = psl_pu_fn[p];
        line_b[p]  = psl_pu_b[p];
      end
    end
    for (int p = 0; p < 64; p++) psl_pu_y[p] = pu_y[p];
  end

  pu_line #(.Q(Q), .NPU(NPU)) u_line (
    .l(line_l), .fn(line_fn), .b(line_b), .y(pu_y)
  );

  // ---------------- decided bits
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_hat       <= '0;
      bad_pattern <= 1'b0;
    end else begin
      if (start && op == OP_IDLE) bad_pattern <= 1'b0;
      if (op == OP_LEAF) begin
        u_hat[4*leaf_idx +: 4] <= leaf_u;
        if (leaf_bad) bad_pattern <= 1'b1;
      end
      if (op == OP_SPC) u_hat[16*node_idx +: 16] <= spc_u;
    end
  end

endmodule
