// r4_size_run: testbench helper that exercises one decoder instance of
// code length N on its own clock-driven sequence and reports its counts.
//
// It builds a rate-1/2 Bhattacharyya code (design parameter 0.5), then for
// a noise-free and two noisy codewords decodes in all four modes. The
// decisions must match the radix-2 software reference bit for bit (the
// noise-free word must return the sent bits), and the cycle counts must
// equal LAT_R4 (radix-4 only) and LAT_PSL (with lookahead), less 7 or 4
// cycles per special 16-bit node when special sub-codes are on.
// `finished` rises when all decodes are done; checks/failures are then
// final. Not synthesizable.
module r4_size_run
  import polar_pkg::*;
  import polar_ref_pkg::*;
#(
  parameter int N       = 64,
  parameter int LAT_R4  = 36,
  parameter int LAT_PSL = 24
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int Q = 5;
  localparam int LW = 16;

  logic rst_n = 0;
  logic ld_valid = 0;
  logic signed [Q-1:0] ld_llr [LW];
  logic [N-1:0] info_mask = '0;
  logic start = 0, psl_en = 0, spc_en = 0;
  logic busy, done, bad_pattern;
  logic [N-1:0] u_hat;
  logic [15:0] latency;

  r4_sc_decoder #(.N(N), .Q(Q), .LOAD_W(LW)) dut (.*);

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

  task automatic decode_check(bit psl, bit spc, bit noiseless);
    int lat, nspc, errs, exp_lat;
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
      $display("n=%0d psl=%0d spc=%0d: %0d bits wrong", N, psl, spc, errs);
    end
    exp_lat = psl ? LAT_PSL : LAT_R4;
    if (spc) exp_lat = exp_lat - (psl ? 4 : 7) * nspc;
    checks++;
    if (int'(latency) != exp_lat || lat != exp_lat) begin
      failures++;
      $display("n=%0d psl=%0d spc=%0d: latency %0d, expected %0d", N, psl, spc, latency,
               exp_lat);
    end
    checks++;
    if (bad_pattern) begin
      failures++;
      $display("n=%0d: impossible leaf pattern flagged", N);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    finished = 0;
    for (int j = 0; j < LW; j++) ld_llr[j] = '0;
    construct(N, N / 2, 0.5, info);
    for (int i = 0; i < N; i++) info_mask[i] = info[i];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int fr = 0; fr < 3; fr++) begin
      for (int i = 0; i < N; i++) begin
        ub[i] = info[i] ? 1'($urandom_range(0, 1)) : 1'b0;
        xb[i] = ub[i];
      end
      encode(N, xb);
      for (int i = 0; i < N; i++) begin
        int v;
        v = xb[i] ? -4 : 4;
        if (fr != 0) v = v + (gauss100() * 4) / 100;
        ch[i] = sat(v, Q);
      end
      for (int m = 0; m < 4; m++) decode_check(m[0], m[1], fr == 0);
    end
    $display("n=%0d: %0d checks, %0d failures", N, checks, failures);
    finished = 1;
  end

endmodule
