// tb_r4_pu: checks the radix-4 processing unit against two radix-2 min-sum
// steps computed in software (f and g on wide integers, one saturation at
// the end), for random operands, all four functions and all partial sums,
// plus the saturation corners.
module tb_r4_pu;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int Q = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [Q-1:0] l [4];
  pu_fn_e fn;
  logic [2:0] b;
  logic signed [Q-1:0] y;

  r4_pu #(.Q(Q)) dut (.l, .fn, .b, .y);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // child of a radix-4 node, built as a radix-2 step on the parent's halves
  function automatic int model(int v [4], int f, bit [2:0] ps);
    int lft0, lft1, rgt0, rgt1;
    lft0 = fms(v[0], v[2]);                       // left child entries
    lft1 = fms(v[1], v[3]);
    rgt0 = v[2] + ((ps[0] ^ ps[1]) ? -v[0] : v[0]);  // right child, with the
    rgt1 = v[3] + (ps[1] ? -v[1] : v[1]);            // left half's sums
    case (f)
      0: return sat(fms(lft0, lft1), Q);
      1: return sat(lft1 + (ps[0] ? -lft0 : lft0), Q);
      2: return sat(fms(rgt0, rgt1), Q);
      default: return sat(rgt1 + (ps[2] ? -rgt0 : rgt0), Q);
    endcase
  endfunction

  initial begin
    int v [4];
    int e;
    for (int t = 0; t < 20000; t++) begin
      for (int q = 0; q < 4; q++) begin
        v[q] = (t < 200) ? ((t % 2 != 0) ? -15 : 15) : $urandom_range(0, 30) - 15;
        l[q] = Q'(v[q]);
      end
      fn = pu_fn_e'(t % 4);
      b = 3'($urandom_range(0, 7));
      #1;
      e = model(v, t % 4, b);
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10)
          $display("fn=%0d b=%b l=%0d %0d %0d %0d: y=%0d expected %0d",
                   t % 4, b, v[0], v[1], v[2], v[3], y, e);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
