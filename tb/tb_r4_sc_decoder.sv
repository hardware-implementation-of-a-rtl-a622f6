// tb_r4_sc_decoder: end-to-end test of the radix-4 SC decoder at n = 256.
//
// Codewords are built from random data bits on Bhattacharyya-constructed
// codes of several rates, some with 16-bit nodes forced to each special
// pattern, BPSK-mapped and given Gaussian-like noise (sum of uniforms),
// quantised to 5-bit LLRs. Every frame is decoded in all four modes
// (radix-4 only, +lookahead, +special sub-codes, both) and checked
// bit-exactly against the radix-2 software reference, with the cycle count
// checked against the schedule (for n = 1024 this gives 596 / 404 /
// 404 - 4 per special node). Noise-free frames must return the sent bits.
// The run also counts how often each mechanism fired: PU cycles, leaf
// decisions, lookahead cycles, each of the six leaf patterns and each of the
// seven special kinds; one that never fired is a failure.
module tb_r4_sc_decoder;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int N = 256;
  localparam int Q = 5;
  localparam int LW = 16;

  logic clk = 0, rst_n = 0;
  logic ld_valid = 0;
  logic signed [Q-1:0] ld_llr [LW];
  logic [N-1:0] info_mask = '0;
  logic start = 0, psl_en = 0, spc_en = 0;
  logic busy, done, bad_pattern;
  logic [N-1:0] u_hat;
  logic [15:0] latency;

  r4_sc_decoder #(.N(N), .Q(Q), .LOAD_W(LW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pu = 0, n_leaf = 0, n_psl = 0;
  int n_kind [8];
  int n_pat [16];

  initial begin
    for (int i = 0; i < 8; i++) n_kind[i] = 0;
    for (int i = 0; i < 16; i++) n_pat[i] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.op == OP_PU) n_pu++;
    if (dut.op == OP_LEAF) begin
      n_leaf++;
      n_pat[dut.leaf_info]++;
    end
    if (dut.psl_now) n_psl++;
    if (dut.op == OP_SPC) n_kind[dut.spc_kind]++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit info [NMAX];
  bit ub [NMAX];
  bit xb [NMAX];
  int ch [NMAX];
  bit uref [NMAX];

  function automatic int gauss100();  // approx N(0, 1) times 100
    int acc = 0;
    for (int i = 0; i < 12; i++) acc += $urandom_range(0, 1000);
    return (acc - 6000) / 10;
  endfunction

  task automatic decode_check(bit psl, bit spc, bit noiseless);
    int lat, nspc, errs;
    ref_decode(N, Q, ch, info, psl, spc, uref, lat, nspc);
    for (int i = 0; i < N; i++) info_mask[i] = info[i];
    // load
    for (int b = 0; b < N / LW; b++) begin
      ld_valid <= 1;
      for (int j = 0; j < LW; j++) ld_llr[j] <= Q'(ch[b * LW + j]);
      @(posedge clk);
    end
    ld_valid <= 0;
    psl_en <= psl;
    spc_en <= spc;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    errs = 0;
    for (int i = 0; i < N; i++) if (u_hat[i] != uref[i]) errs++;
    checks++;
    if (errs != 0) begin
      failures++;
      $display("mismatch psl=%0d spc=%0d: %0d bits differ from reference", psl, spc, errs);
    end
    checks++;
    if (int'(latency) != lat) begin
      failures++;
      $display("latency psl=%0d spc=%0d: got %0d expected %0d", psl, spc, latency, lat);
    end
    checks++;
    if (bad_pattern) begin
      failures++;
      $display("bad leaf pattern flagged");
    end
    if (noiseless) begin
      errs = 0;
      for (int i = 0; i < N; i++) if (u_hat[i] != ub[i]) errs++;
      checks++;
      if (errs != 0) begin
        failures++;
        $display("noise-free frame decoded with %0d errors", errs);
      end
    end
  endtask

  initial begin
    static int rates [4] = '{N / 2, N / 4, 3 * N / 4, N / 8};
    static real zs [4] = '{0.5, 0.3, 0.6, 0.4};
    // the seven special patterns, and one plain node whose leaves are 1010
    static bit [15:0] forced [8] = '{16'h0000, 16'h8000, 16'h8080, 16'h8888,
                              16'hC000, 16'hF000, 16'hFFFF, 16'hAAAA};
    for (int j = 0; j < LW; j++) ld_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int fr = 0; fr < 24; fr++) begin
      bit noiseless;
      noiseless = (fr % 4 == 0);
      construct(N, rates[fr % 4], zs[(fr / 4) % 4], info);
      if (fr % 3 == 1) begin
        // force some 16-bit nodes to special patterns
        for (int nd = 0; nd < N / 16; nd += 2)
          for (int i = 0; i < 16; i++) info[nd * 16 + i] = forced[(nd / 2 + fr) % 8][i];
      end
      for (int i = 0; i < N; i++) begin
        ub[i] = info[i] ? 1'($urandom_range(0, 1)) : 1'b0;
        xb[i] = ub[i];
      end
      encode(N, xb);
      for (int i = 0; i < N; i++) begin
        int a, v;
        a = 4 + (fr % 3);  // signal amplitude in LLR units
        v = xb[i] ? -a : a;
        if (!noiseless) v = v + (gauss100() * (3 + fr % 4)) / 100;
        ch[i] = sat(v, Q);
      end
      decode_check(0, 0, noiseless);
      decode_check(1, 0, noiseless);
      decode_check(0, 1, noiseless);
      decode_check(1, 1, noiseless);
    end
    // mechanism coverage
    checks++;
    if (n_pu == 0 || n_leaf == 0 || n_psl == 0) begin
      failures++;
      $display("mechanism missing: pu=%0d leaf=%0d psl=%0d", n_pu, n_leaf, n_psl);
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (n_kind[k + 1] == 0) begin
        failures++;
        $display("special kind %0d never decoded", k + 1);
      end
    end
    foreach (n_pat[pt]) begin
      if (pt == 'b0000 || pt == 'b1000 || pt == 'b1100 || pt == 'b1010 ||
          pt == 'b1110 || pt == 'b1111) begin
        checks++;
        if (n_pat[pt] == 0) begin
          failures++;
          $display("leaf pattern %b never seen", 4'(pt));
        end
      end
    end
    $display("counts: pu=%0d leaf=%0d psl=%0d spc kinds=%p leaf patterns=%p",
             n_pu, n_leaf, n_psl, n_kind, n_pat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
