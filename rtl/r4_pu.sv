// r4_pu: radix-4 combined processing unit.
//
// From four LLRs of a level-k node, L0 = a[i], L1 = a[i+M/4], L2 = a[i+M/2],
// L3 = a[i+3M/4] (M = node size), it computes entry i of one of the node's
// four radix-4 children in one step, skipping the odd radix-2 stage:
//   ff = f(f(L0,L2), f(L1,L3))
//   fg = f(L1,L3) + (-1)^b0 f(L0,L2)
//   gf = f((-1)^(b0^b1) L0 + L2, (-1)^b1 L1 + L3)
//   gg = ((-1)^b1 L1 + L3) + (-1)^b2 ((-1)^(b0^b1) L0 + L2)
// with the min-sum f(a,b) = sgn(a)sgn(b)min(|a|,|b|) and g(a,b,s) =
// (-1)^s a + b. b0, b1, b2 are the partial sums at index i of the node's
// already decoded children 0, 1 and 2; the unit forms the combined sums
// s00 = b0, s01 = b0^b1, s11 = b1, s10 = b2 of the four equations itself.
//
// The equations follow the radix-4 PU definition of the design. The
// intermediate values are kept Q+3 bits wide and the result is saturated
// once, to the symmetric range +-(2^(Q-1)-1), so that |y| always fits in
// Q-1 bits; that saturation rule is this implementation's choice.
// Purely combinational, no clock.
module r4_pu
  import polar_pkg::*;
#(
  parameter int unsigned Q = 5  // LLR width in bits (two's complement)
) (
  input  logic signed [Q-1:0] l [4],  // L0..L3
  input  pu_fn_e              fn,     // which child to produce
  input  logic        [2:0]   b,      // partial sums of children 0..2
  output logic signed [Q-1:0] y       // saturated result
);

  localparam int unsigned W = Q + 3;
  localparam logic signed [W-1:0] LMAX = W'((1 << (Q - 1)) - 1);

  // Min-sum f on wide values.
  function automatic logic signed [W-1:0] fmin(logic signed [W-1:0] p,
                                               logic signed [W-1:0] q);
    logic signed [W-1:0] pa, qa, m;
    pa = p[W-1] ? -p : p;
    qa = q[W-1] ? -q : q;
    m  = (pa < qa) ? pa : qa;
    return (p[W-1] ^ q[W-1]) ? -m : m;
  endfunction

  logic signed [W-1:0] e [4];
  logic signed [W-1:0] f02, f13, g02, g13, r;

  always_comb begin
    for (int q = 0; q < 4; q++) e[q] = W'(l[q]);
    f02 = fmin(e[0], e[2]);
    f13 = fmin(e[1], e[3]);
    g02 = (b[0] ^ b[1]) ? e[2] - e[0] : e[2] + e[0];
    g13 = b[1] ? e[3] - e[1] : e[3] + e[1];
    unique case (fn)
      FN_FF:   r = fmin(f02, f13);
      FN_FG:   r = b[0] ? f13 - f02 : f13 + f02;
      FN_GF:   r = fmin(g02, g13);
      default: r = b[2] ? g13 - g02 : g13 + g02;
    endcase
    if (r > LMAX)       y = Q'(LMAX);
    else if (r < -LMAX) y = Q'(-LMAX);
    else                y = Q'(r);
  end

endmodule
