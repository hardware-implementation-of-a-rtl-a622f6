// tb_pu_line: drives every PU of an 8-unit line with its own random
// operands, function and partial sums in the same cycle and checks each
// result against two radix-2 min-sum steps computed in software.
module tb_pu_line;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int Q = 5;
  localparam int NPU = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [Q-1:0] l [NPU][4];
  pu_fn_e fn [NPU];
  logic [2:0] b [NPU];
  logic signed [Q-1:0] y [NPU];

  pu_line #(.Q(Q), .NPU(NPU)) dut (.l, .fn, .b, .y);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int v [4], int f, bit [2:0] ps);
    int lft0 = fms(v[0], v[2]), lft1 = fms(v[1], v[3]);
    int rgt0 = v[2] + ((ps[0] ^ ps[1]) ? -v[0] : v[0]);
    int rgt1 = v[3] + (ps[1] ? -v[1] : v[1]);
    case (f)
      0: return sat(fms(lft0, lft1), Q);
      1: return sat(lft1 + (ps[0] ? -lft0 : lft0), Q);
      2: return sat(fms(rgt0, rgt1), Q);
      default: return sat(rgt1 + (ps[2] ? -rgt0 : rgt0), Q);
    endcase
  endfunction

  initial begin
    int v [NPU][4];
    int f [NPU];
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < NPU; p++) begin
        for (int q = 0; q < 4; q++) begin
          v[p][q] = $urandom_range(0, 30) - 15;
          l[p][q] = Q'(v[p][q]);
        end
        f[p] = $urandom_range(0, 3);
        fn[p] = pu_fn_e'(f[p]);
        b[p] = 3'($urandom_range(0, 7));
      end
      #1;
      for (int p = 0; p < NPU; p++) begin
        checks++;
        if (int'(y[p]) != model(v[p], f[p], b[p])) begin
          failures++;
          if (failures < 10) $display("PU %0d: y=%0d expected %0d", p, y[p], model(v[p], f[p], b[p]));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
