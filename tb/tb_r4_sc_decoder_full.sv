// tb_r4_sc_decoder_full: the decoder at its default size, a (1024, 512)
// code, with every parameter left at its default.
//
// One noisy codeword on the rate-1/2 Bhattacharyya code (erasure
// probability 0.5 construction) is decoded in the four modes. Each result
// is compared bit-exactly with the radix-2 software reference, and the
// cycle counts with the design's latency figures: 596 cycles for radix-4
// decoding, 404 with partial-sum lookahead, and 4 cycles fewer per special
// 16-bit node when special sub-codes are enabled. A noise-free codeword
// must come back exactly.
module tb_r4_sc_decoder_full;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int N = 1024;
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

  r4_sc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
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

  function automatic int gauss100();
    int acc = 0;
    for (int i = 0; i < 12; i++) acc += $urandom_range(0, 1000);
    return (acc - 6000) / 10;
  endfunction

  task automatic decode_check(bit psl, bit spc, int exp_lat, int save, bit noiseless);
    int lat, nspc, errs;
    ref_decode(N, Q, ch, info, psl, spc, uref, lat, nspc);
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
    for (int i = 0; i < N; i++) if (u_hat[i] != (noiseless ? ub[i] : uref[i])) errs++;
    checks++;
    if (errs != 0) begin
      failures++;
      $display("psl=%0d spc=%0d: %0d bits wrong", psl, spc, errs);
    end
    if (spc) exp_lat = exp_lat - save * nspc;
    checks++;
    if (int'(latency) != exp_lat || lat != exp_lat) begin
      failures++;
      $display("psl=%0d spc=%0d: latency %0d, expected %0d", psl, spc, latency, exp_lat);
    end
    $display("psl=%0d spc=%0d: %0d cycles, %0d special 16-bit nodes", psl, spc, latency,
             spc ? nspc : 0);
  endtask

  initial begin
    for (int j = 0; j < LW; j++) ld_llr[j] = '0;
    construct(N, N / 2, 0.5, info);
    for (int i = 0; i < N; i++) info_mask[i] = info[i];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int fr = 0; fr < 2; fr++) begin
      for (int i = 0; i < N; i++) begin
        ub[i] = info[i] ? 1'($urandom_range(0, 1)) : 1'b0;
        xb[i] = ub[i];
      end
      encode(N, xb);
      for (int i = 0; i < N; i++) begin
        int v;
        v = xb[i] ? -4 : 4;
        if (fr == 1) v = v + (gauss100() * 4) / 100;
        ch[i] = sat(v, Q);
      end
      // a special node replaces 8 cycles (no lookahead) or 5 cycles by 1
      decode_check(0, 0, 596, 0, fr == 0);
      decode_check(1, 0, 404, 0, fr == 0);
      decode_check(0, 1, 596, 7, fr == 0);
      decode_check(1, 1, 404, 4, fr == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
