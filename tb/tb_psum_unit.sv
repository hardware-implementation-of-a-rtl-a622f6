// tb_psum_unit: runs a 64-bit code's worth of decisions through the
// partial-sum store (3 radix-4 levels). Each 16-bit node is finished either
// as four 4-bit leaves or as one 16-bit special write. After every write
// the PU read ports for both levels and the node output must hold the
// polar transform of the bits decided so far in each finished child,
// computed in software.
module tb_psum_unit;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int N = 64;
  localparam int NPU = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic leaf_we = 0, spc_we = 0;
  logic [3:0] leaf_u = '0;
  logic [15:0] spc_u = '0;
  logic [1:0] dig [3];
  logic [1:0] src;
  logic [2:0] pu_b [NPU];
  logic [15:0] node_b;

  psum_unit #(.N(N), .NPU(NPU)) dut (.clk, .leaf_we, .leaf_u, .spc_we, .spc_u, .dig, .src,
                                     .pu_b, .node_b);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ud [64];   // decided bits so far

  // transform of bits [base, base+size)
  function automatic bit [15:0] xf(int base, int size);
    bit t [NMAX];
    bit [15:0] r = '0;
    for (int i = 0; i < NMAX; i++) t[i] = 0;
    for (int i = 0; i < size; i++) t[i] = ud[base + i];
    encode(size, t);
    for (int i = 0; i < size; i++) r[i] = t[i];
    return r;
  endfunction

  // check: level-0 slots of finished 16-bit nodes, level-1 slots of
  // finished leaves of the current node
  task automatic check(int n16, int nleaf);
    src = 2'd0;
    #1;
    for (int c = 0; c < 3; c++) begin
      if (c < n16) begin
        bit [15:0] e;
        e = xf(16 * c, 16);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (pu_b[i][c] != e[i]) failures++;
        end
      end
    end
    src = 2'd1;
    #1;
    for (int c = 0; c < 3; c++) begin
      if (c < nleaf) begin
        bit [15:0] e;
        e = xf(16 * n16 + 4 * c, 4);
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (pu_b[i][c] != e[i] || node_b[4 * c + i] != e[i]) failures++;
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) dig[i] = 2'd0;
    src = '0;
    for (int rep = 0; rep < 40; rep++) begin
      for (int n16 = 0; n16 < 4; n16++) begin
        dig[1] = 2'(n16);
        if ((rep + n16) % 3 == 0) begin
          spc_u = 16'($urandom());
          for (int i = 0; i < 16; i++) ud[16 * n16 + i] = spc_u[i];
          dig[2] = 2'd0;
          spc_we = 1;
          @(posedge clk);
          #1 spc_we = 0;
          check(n16 + 1, 0);
        end else begin
          for (int c = 0; c < 4; c++) begin
            dig[2] = 2'(c);
            leaf_u = 4'($urandom());
            for (int i = 0; i < 4; i++) ud[16 * n16 + 4 * c + i] = leaf_u[i];
            leaf_we = 1;
            @(posedge clk);
            #1 leaf_we = 0;
            check(c == 3 ? n16 + 1 : n16, c == 3 ? 0 : c + 1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
