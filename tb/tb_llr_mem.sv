// tb_llr_mem: loads a random 64-LLR channel word in 16-LLR beats, then
// checks the conflict-free operand ports (PU i gets a[i], a[i+M/4],
// a[i+M/2], a[i+3M/4] of the selected level), writes PU results into
// levels 1 and 2 and lookahead results into the leaf level, and checks the
// 16-LLR node and leaf outputs.
module tb_llr_mem;
  localparam int Q = 5, N = 64, NPU = 16, LW = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic ld_en = 0;
  logic [1:0] ld_addr = '0;
  logic signed [Q-1:0] ld_llr [LW];
  logic pu_we = 0;
  logic [1:0] wr_lvl = '0;
  logic signed [Q-1:0] pu_y [NPU];
  logic leaf_we = 0;
  logic signed [Q-1:0] leaf_y [4];
  logic [1:0] src = '0;
  logic signed [Q-1:0] pu_l [NPU][4];
  logic signed [Q-1:0] node_l [16];
  logic signed [Q-1:0] leaf_l [4];

  llr_mem #(.Q(Q), .N(N), .NPU(NPU), .LOAD_W(LW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("got %0d expected %0d", got, exp);
    end
  endtask

  initial begin
    int ch [N], l1 [16], l2 [4], lf [4];
    for (int i = 0; i < 4; i++) leaf_y[i] = '0;
    for (int rep = 0; rep < 50; rep++) begin
      for (int i = 0; i < N; i++) ch[i] = $urandom_range(0, 31) - 16;
      for (int bt = 0; bt < N / LW; bt++) begin
        ld_en <= 1;
        ld_addr <= 2'(bt);
        for (int j = 0; j < LW; j++) ld_llr[j] <= Q'(ch[bt * LW + j]);
        @(posedge clk);
      end
      ld_en <= 0;
      src <= 2'd0;
      @(posedge clk);
      #1;
      for (int i = 0; i < 16; i++)
        for (int q = 0; q < 4; q++) expect_eq(int'(pu_l[i][q]), ch[i + 16 * q]);
      // level 1
      for (int i = 0; i < NPU; i++) begin
        l1[i] = $urandom_range(0, 31) - 16;
        pu_y[i] = Q'(l1[i]);
      end
      pu_we <= 1;
      wr_lvl <= 2'd1;
      @(posedge clk);
      // level 2
      for (int i = 0; i < NPU; i++) pu_y[i] <= Q'(i < 4 ? 0 : 7);
      for (int i = 0; i < 4; i++) begin
        l2[i] = $urandom_range(0, 31) - 16;
        pu_y[i] <= Q'(l2[i]);
      end
      wr_lvl <= 2'd2;
      src <= 2'd1;
      @(posedge clk);
      pu_we <= 0;
      #1;
      for (int i = 0; i < 4; i++)
        for (int q = 0; q < 4; q++) expect_eq(int'(pu_l[i][q]), l1[i + 4 * q]);
      for (int i = 0; i < 16; i++) expect_eq(int'(node_l[i]), l1[i]);
      for (int i = 0; i < 4; i++) expect_eq(int'(leaf_l[i]), l2[i]);
      // channel word untouched by the level writes
      src <= 2'd0;
      #1;
      for (int i = 0; i < 16; i++) expect_eq(int'(pu_l[i][1]), ch[i + 16]);
      // lookahead write of the leaf level
      for (int i = 0; i < 4; i++) begin
        lf[i] = $urandom_range(0, 31) - 16;
        leaf_y[i] <= Q'(lf[i]);
      end
      leaf_we <= 1;
      @(posedge clk);
      leaf_we <= 0;
      #1;
      for (int i = 0; i < 4; i++) expect_eq(int'(leaf_l[i]), lf[i]);
      for (int i = 0; i < 16; i++) expect_eq(int'(node_l[i]), l1[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
