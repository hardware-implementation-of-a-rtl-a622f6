// tb_psl_unit: closes the lookahead unit around a 64-PU line. For a random
// 16-LLR node, random partial sums of the earlier children and a random
// outcome u of the child being decided, the selected LLRs must equal child
// cur+1 computed directly in software with the true partial sums, and every
// one of the 16 hypotheses must match its own software value.
module tb_psl_unit;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int Q = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [Q-1:0] node_l [16];
  logic [15:0] node_b;
  logic [1:0] cur;
  logic signed [Q-1:0] pu_l [64][4];
  pu_fn_e pu_fn [64];
  logic [2:0] pu_b [64];
  logic signed [Q-1:0] pu_y [64];
  logic [3:0] u_sel;
  logic signed [Q-1:0] next_l [4];

  psl_unit #(.Q(Q)) dut (.node_l, .node_b, .cur, .pu_l, .pu_fn, .pu_b, .pu_y, .u_sel, .next_l);
  pu_line #(.Q(Q), .NPU(64)) u_line (.l(pu_l), .fn(pu_fn), .b(pu_b), .y(pu_y));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // entry i of child c of a 16-LLR node, via radix-2 steps
  function automatic int child(int v [16], int c, bit [15:0] beta, int i);
    int L0 = v[i], L1 = v[i + 4], L2 = v[i + 8], L3 = v[i + 12];
    bit b0 = beta[i], b1 = beta[4 + i], b2 = beta[8 + i];
    int lft0 = fms(L0, L2), lft1 = fms(L1, L3);
    int rgt0 = L2 + ((b0 ^ b1) ? -L0 : L0);
    int rgt1 = L3 + (b1 ? -L1 : L1);
    case (c)
      0: return sat(fms(lft0, lft1), Q);
      1: return sat(lft1 + (b0 ? -lft0 : lft0), Q);
      2: return sat(fms(rgt0, rgt1), Q);
      default: return sat(rgt1 + (b2 ? -rgt0 : rgt0), Q);
    endcase
  endfunction

  initial begin
    int v [16];
    bit [15:0] beta, bh;
    bit [3:0] uu, xx;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 16; i++) begin
        v[i] = $urandom_range(0, 30) - 15;
        node_l[i] = Q'(v[i]);
      end
      beta = 16'($urandom());
      node_b = beta;
      cur = 2'(t % 3);
      uu = 4'($urandom_range(0, 15));
      u_sel = uu;
      #1;
      xx = {uu[3], uu[2] ^ uu[3], uu[1] ^ uu[3], uu[0] ^ uu[1] ^ uu[2] ^ uu[3]};
      bh = beta;
      for (int i = 0; i < 4; i++) bh[4 * (t % 3) + i] = xx[i];
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(next_l[i]) != child(v, t % 3 + 1, bh, i)) begin
          failures++;
          if (failures < 10) $display("cur=%0d u=%b i=%0d: %0d expected %0d", t % 3, uu, i,
                                      next_l[i], child(v, t % 3 + 1, bh, i));
        end
      end
      // every hypothesis
      for (int h = 0; h < 16; h++) begin
        bit [3:0] hx;
        hx = {h[3], h[2] ^ h[3], h[1] ^ h[3], h[0] ^ h[1] ^ h[2] ^ h[3]};
        bh = beta;
        for (int i = 0; i < 4; i++) bh[4 * (t % 3) + i] = hx[i];
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(pu_y[4 * h + i]) != child(v, t % 3 + 1, bh, i)) failures++;
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
