// tb_spc_decoder: checks the 16-bit special sub-code decoder. The kind must
// match the frozen pattern; decided bits must equal the group-equation
// solution of the reference for random LLRs, and noise-free codewords of
// every special pattern must come back exactly. Non-special masks must
// give hit = 0.
module tb_spc_decoder;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int Q = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [Q-1:0] l [16];
  logic [15:0] info, u;
  spc_kind_e kind;
  logic hit;

  spc_decoder #(.Q(Q), .K(16)) dut (.l, .info, .kind, .hit, .u);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static bit [15:0] masks [7] = '{16'h0000, 16'h8000, 16'h8080, 16'h8888,
                             16'hC000, 16'hF000, 16'hFFFF};
    int v [16];
    bit xb [NMAX];
    bit [15:0] w, e;
    for (int t = 0; t < 14000; t++) begin
      bit [15:0] m;
      bit clean;
      clean = (t % 2 == 0);
      m = masks[t % 7];
      w = 16'($urandom()) & m;
      for (int i = 0; i < NMAX; i++) xb[i] = 0;
      for (int i = 0; i < 16; i++) xb[i] = w[i];
      encode(16, xb);
      for (int i = 0; i < 16; i++) begin
        v[i] = clean ? (xb[i] ? -4 : 4) : $urandom_range(0, 30) - 15;
        l[i] = Q'(v[i]);
      end
      info = m;
      #1;
      e = ref_spc(v, m);
      checks++;
      if (!hit || int'(kind) != spc_kind(m) || u !== e) begin
        failures++;
        if (failures < 10) $display("mask %h: hit=%0d kind=%0d u=%h expected %h", m, hit, kind, u, e);
      end
      if (clean) begin
        checks++;
        if (u !== w) begin
          failures++;
          if (failures < 10) $display("noise-free mask %h: u=%h sent %h", m, u, w);
        end
      end
      @(posedge clk);
    end
    for (int t = 0; t < 2000; t++) begin
      info = 16'($urandom());
      #1;
      checks++;
      if (hit != (spc_kind(info) != K_NONE)) begin
        failures++;
        $display("mask %h: hit=%0d", info, hit);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
