// tb_sc_ctrl: runs the scheduler for a 256-bit code in all four modes with
// a random set of special 16-bit nodes. Checks that leaves and special
// nodes are visited exactly once each in bit order, that every OP_PU
// computes a level whose parent is current, that the lookahead removes the
// PU cycle of leaves 1..3, that `done` pulses once, and that the cycle
// count equals 4 + 16 + per 16-bit node 1 (special), 5 (lookahead) or 8.
module tb_sc_ctrl;
  import polar_pkg::*;

  localparam int N = 256, L = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, psl_en = 0, spc_en = 0, spc_hit;
  dec_op_e op;
  logic [1:0] lvl;
  logic [1:0] dig [L];
  logic psl_now, busy, done;
  logic [15:0] cycles;

  sc_ctrl #(.N(N)) dut (.*);

  bit hit16 [16];
  assign spc_hit = hit16[{dig[1], dig[2]}];

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int rep = 0; rep < 40; rep++) begin
      int nhit, exp_lat, next_leaf, ndone, npu_leaf;
      bit psl, spc;
      psl = rep[0];
      spc = rep[1];
      nhit = 0;
      for (int i = 0; i < 16; i++) begin
        hit16[i] = ($urandom_range(0, 3) == 0);
        if (hit16[i]) nhit++;
      end
      exp_lat = 4 + 16 + (spc ? nhit : 0) + (16 - (spc ? nhit : 0)) * (psl ? 5 : 8);
      psl_en <= psl;
      spc_en <= spc;
      start <= 1;
      @(posedge clk);
      start <= 0;
      next_leaf = 0;
      ndone = 0;
      npu_leaf = 0;
      while (next_leaf < 64) begin
        @(negedge clk);
        if (op == OP_LEAF) begin
          expect_true({dig[1], dig[2], dig[3]} == 6'(next_leaf), "leaf order");
          next_leaf++;
        end else if (op == OP_SPC) begin
          expect_true(spc && {dig[1], dig[2], dig[3]} == 6'(next_leaf) && hit16[next_leaf / 4],
                      "special node order");
          next_leaf += 4;
        end else if (op == OP_PU) begin
          expect_true(lvl != 0, "PU level");
          // deeper digits must be 0 when a level is freshly computed
          for (int k = 1; k < L; k++) if (k > lvl) expect_true(dig[k] == 0, "fresh subtree");
          if (lvl == 3) begin
            npu_leaf++;
            if (psl) expect_true(dig[3] == 0, "lookahead skips leaf PU cycle");
          end
        end else begin
          expect_true(0, "idle before all leaves were decided");
          next_leaf = 64;
        end
      end
      @(negedge clk);
      while (!done && ndone == 0) begin
        expect_true(0, "done late");
        @(negedge clk);
        ndone++;
      end
      expect_true(done && !busy, "done pulse");
      expect_true(int'(cycles) == exp_lat, $sformatf("latency %0d expected %0d", cycles, exp_lat));
      @(negedge clk);
      expect_true(!done, "single done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
