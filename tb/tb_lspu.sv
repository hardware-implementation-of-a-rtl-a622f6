// tb_lspu: checks the last stage unit. For random LLRs and the six legal
// frozen patterns the decided bits must equal the closed-form rules; where
// no magnitudes tie, the patterns decided by plain SC (all but u1,u3-only)
// must also equal a step-by-step min-sum SC decision of the four bits.
// Noise-free inputs must return the encoded bits, and an illegal pattern
// must raise `bad`.
module tb_lspu;
  import polar_ref_pkg::*;

  localparam int Q = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [Q-1:0] l [4];
  logic [3:0] info, u;
  logic bad;

  lspu #(.Q(Q)) dut (.l, .info, .u, .bad);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-by-bit min-sum SC on a 4-bit node; ok = no zero LLR was met
  function automatic bit [3:0] sc4(int v [4], bit [3:0] m, output bit ok);
    bit [3:0] r = '0;
    int a0, a1, b0, b1, x;
    ok = 1;
    a0 = fms(v[0], v[2]);
    a1 = fms(v[1], v[3]);
    x = fms(a0, a1);
    if (m[0]) begin r[0] = x < 0; ok &= (x != 0); end
    x = a1 + (r[0] ? -a0 : a0);
    if (m[1]) begin r[1] = x < 0; ok &= (x != 0); end
    b0 = v[2] + ((r[0] ^ r[1]) ? -v[0] : v[0]);
    b1 = v[3] + (r[1] ? -v[1] : v[1]);
    x = fms(b0, b1);
    if (m[2]) begin r[2] = x < 0; ok &= (x != 0); end
    x = b1 + (r[2] ? -b0 : b0);
    if (m[3]) begin r[3] = x < 0; ok &= (x != 0); end
    return r;
  endfunction

  initial begin
    static bit [3:0] pats [6] = '{4'b0000, 4'b1000, 4'b1100, 4'b1010, 4'b1110, 4'b1111};
    int v [4];
    bit [3:0] e, w, xs;
    bit ok, distinct;
    for (int t = 0; t < 30000; t++) begin
      bit [3:0] m;
      m = pats[t % 6];
      for (int q = 0; q < 4; q++) v[q] = $urandom_range(0, 30) - 15;
      if (t % 10 == 0) begin
        // noise-free: random data bits on the pattern, encoded
        w = 4'($urandom_range(0, 15)) & m;
        xs = {w[3], w[2] ^ w[3], w[1] ^ w[3], w[0] ^ w[1] ^ w[2] ^ w[3]};
        for (int q = 0; q < 4; q++) v[q] = xs[q] ? -3 : 3;
      end
      for (int q = 0; q < 4; q++) l[q] = Q'(v[q]);
      info = m;
      #1;
      e = ref_leaf(v, m);
      checks++;
      if (u !== e || bad) begin
        failures++;
        if (failures < 10) $display("pattern %b l=%p: u=%b expected %b", m, v, u, e);
      end
      if (t % 10 == 0) begin
        checks++;
        if (u !== w) begin
          failures++;
          $display("noise-free pattern %b: u=%b sent %b", m, u, w);
        end
      end
      distinct = 1;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          if (iabs(v[i]) == iabs(v[j]) || v[i] == 0) distinct = 0;
      if (v[3] == 0) distinct = 0;
      if (distinct && m != 4'b1010) begin
        e = sc4(v, m, ok);
        if (ok) begin
          checks++;
          if (u !== e) begin
            failures++;
            if (failures < 10) $display("SC pattern %b l=%p: u=%b SC %b", m, v, u, e);
          end
        end
      end
      @(posedge clk);
    end
    // illegal patterns
    for (int m = 0; m < 16; m++) begin
      info = 4'(m);
      #1;
      checks++;
      if (bad != !(m == 0 || m == 8 || m == 12 || m == 10 || m == 14 || m == 15)) begin
        failures++;
        $display("pattern %b: bad=%0d", 4'(m), bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
