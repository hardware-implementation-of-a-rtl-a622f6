// polar_ref_pkg: software reference for the radix-4 SC decoder testbenches.
//
// Independent of the RTL structure: it decodes on the plain radix-2 SC tree
// (f/g min-sum on wide integers, depth-first walk with an explicit
// position instead of recursion) and only applies the decoder's
// quantisation rule (LLRs saturated to +-(2^(Q-1)-1) at every even radix-2
// depth, i.e. at node sizes n, n/4, n/16, ...). 4-bit nodes are decided with
// the last-stage closed forms and special 16-bit nodes by solving the group
// equations of their code bits. It also builds codes (Bhattacharyya
// construction), encodes, and predicts the decoder's cycle count.
package polar_ref_pkg;

  localparam int NMAX = 1024;
  localparam int DMAX = 11;

  // kinds, same numbering as the decoder's special sub-code classes
  localparam int K_NONE = 0, K_RATE0 = 1, K_REP = 2, K_HALF = 3,
                 K_QUART = 4, K_LAST2 = 5, K_LAST4 = 6, K_RATE1 = 7;

  int  wk_alpha [DMAX][NMAX];
  bit  wk_betal [DMAX][NMAX];
  bit  wk_b     [NMAX];
  bit  wk_b2    [NMAX];
  real wk_z     [NMAX];

  function automatic int ilog2(int n);
    int r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  function automatic int sat(int v, int q);
    int m = (1 << (q - 1)) - 1;
    if (v > m) return m;
    if (v < -m) return -m;
    return v;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int fms(int a, int b);
    int m = iabs(a) < iabs(b) ? iabs(a) : iabs(b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // Bhattacharyya construction: data bits are the k positions with the
  // smallest Z; ties go to the higher index. Walking the index bits from the
  // most significant one, a 0 means the f branch (2z - z^2), a 1 the g
  // branch (z^2).
  function automatic void construct(int n, int k, real z0, output bit info [NMAX]);
    int m = ilog2(n);
    for (int i = 0; i < NMAX; i++) info[i] = 0;
    for (int i = 0; i < n; i++) begin
      real z = z0;
      for (int b = m - 1; b >= 0; b--) z = (((i >> b) & 1) != 0) ? z * z : 2.0 * z - z * z;
      wk_z[i] = z;
    end
    for (int i = 0; i < n; i++) begin
      int rank = 0;
      for (int j = 0; j < n; j++)
        if (wk_z[j] < wk_z[i] || (wk_z[j] == wk_z[i] && j > i)) rank++;
      info[i] = (rank < k);
    end
  endfunction

  // x = u * G_n (natural order), in place
  function automatic void encode(int n, inout bit v [NMAX]);
    for (int h = 1; h < n; h = h * 2)
      for (int j = 0; j < n; j++)
        if ((j & h) == 0) v[j] = v[j] ^ v[j | h];
  endfunction

  function automatic int spc_kind(bit [15:0] info);
    case (info)
      16'h0000: return K_RATE0;
      16'h8000: return K_REP;
      16'h8080: return K_HALF;
      16'h8888: return K_QUART;
      16'hC000: return K_LAST2;
      16'hF000: return K_LAST4;
      16'hFFFF: return K_RATE1;
      default:  return K_NONE;
    endcase
  endfunction

  // Special node: code bit j carries the XOR of the data bits i whose
  // index bits contain those of j. Sum the LLRs of each group of code bits
  // with the same data set, then solve from the highest data bit down.
  function automatic bit [15:0] ref_spc(int l [16], bit [15:0] info);
    bit [15:0] u = '0;
    for (int d = 15; d >= 0; d--) begin
      if (info[d]) begin
        bit [15:0] sig_d = '0;
        int sum = 0;
        bit x = 0;
        for (int i = 0; i < 16; i++) if (info[i] && (i & d) == d) sig_d[i] = 1;
        for (int j = 0; j < 16; j++) begin
          bit [15:0] sig_j = '0;
          for (int i = 0; i < 16; i++) if (info[i] && (i & j) == j) sig_j[i] = 1;
          if (sig_j == sig_d) sum += l[j];
        end
        x = (sum < 0);
        for (int i = d + 1; i < 16; i++) if (sig_d[i]) x ^= u[i];
        u[d] = x;
      end
    end
    return u;
  endfunction

  // 4-bit node, closed forms of the last stage unit.
  function automatic bit [3:0] ref_leaf(int l [4], bit [3:0] info);
    bit s0 = l[0] < 0, s1 = l[1] < 0, s2 = l[2] < 0, s3 = l[3] < 0;
    int a0 = iabs(l[0]), a1 = iabs(l[1]), a2 = iabs(l[2]), a3 = iabs(l[3]);
    int m02 = a0 < a2 ? a0 : a2, m13 = a1 < a3 ? a1 : a3;
    bit [3:0] u = '0;
    case (info)
      4'b1000: u[3] = (l[0] + l[1] + l[2] + l[3]) < 0;
      4'b1100: begin
        u[3] = (l[1] + l[3]) < 0;
        u[2] = ((l[0] + l[2]) < 0) ^ u[3];
      end
      4'b1010: begin
        u[3] = (l[2] + l[3]) < 0;
        u[1] = ((l[0] + l[1]) < 0) ^ u[3];
      end
      4'b1110: begin
        if (m13 < m02) begin
          // |f(L1,L3)| smaller: u1 follows f(L0,L2)
          u[1] = s0 ^ s2;
          u[2] = (a1 < a3) ? s2 ^ s3 : s0 ^ s1;
          u[3] = (a1 < a3) ? s3 : s0 ^ s1 ^ s2;
        end else begin
          u[1] = s1 ^ s3;
          u[2] = (a0 < a2) ? s2 ^ s3 : s0 ^ s1;
          u[3] = s3;
        end
      end
      4'b1111: u = {s3, s2 ^ s3, s1 ^ s3, s0 ^ s1 ^ s2 ^ s3};
      default: u = '0;
    endcase
    return u;
  endfunction

  // Full decode. Returns the decided bits and the predicted cycle count.
  function automatic void ref_decode(int n, int q, int ch [NMAX], bit info [NMAX],
                                     bit psl, bit spc, output bit u [NMAX],
                                     output int lat, output int n_spc);
    int d = 0, p = 0, s;
    int nlev = ilog2(n) / 2;  // radix-4 levels
    bit fin;
    for (int i = 0; i < NMAX; i++) u[i] = 0;
    for (int i = 0; i < n; i++) wk_alpha[0][i] = ch[i];
    n_spc = 0;
    forever begin
      s = n >> d;
      fin = 0;
      if (s == 16 && spc) begin
        bit [15:0] m;
        for (int i = 0; i < 16; i++) m[i] = info[p * 16 + i];
        if (spc_kind(m) != K_NONE) begin
          int l16 [16];
          bit [15:0] r;
          for (int i = 0; i < 16; i++) l16[i] = wk_alpha[d][i];
          r = ref_spc(l16, m);
          for (int i = 0; i < 16; i++) begin
            u[p * 16 + i] = r[i];
            wk_b[i] = r[i];
          end
          n_spc++;
          fin = 1;
        end
      end
      if (!fin && s == 4) begin
        int l4 [4];
        bit [3:0] m, r;
        for (int i = 0; i < 4; i++) begin
          l4[i] = wk_alpha[d][i];
          m[i] = info[p * 4 + i];
        end
        r = ref_leaf(l4, m);
        for (int i = 0; i < 4; i++) begin
          u[p * 4 + i] = r[i];
          wk_b[i] = r[i];
        end
        fin = 1;
      end
      if (fin) begin
        encode(s, wk_b);
        // climb while this node is a right child
        while (d > 0 && (p % 2) == 1) begin
          for (int i = 0; i < s; i++) begin
            wk_b2[i]     = wk_betal[d][i] ^ wk_b[i];
            wk_b2[i + s] = wk_b[i];
          end
          s = s * 2;
          for (int i = 0; i < s; i++) wk_b[i] = wk_b2[i];
          d--;
          p = p / 2;
        end
        if (d == 0) break;
        // left child done: store its partial sums, go to the right sibling
        for (int i = 0; i < s; i++) wk_betal[d][i] = wk_b[i];
        p++;
        for (int i = 0; i < s; i++) begin
          int g = wk_alpha[d-1][i + s] + (wk_b[i] ? -wk_alpha[d-1][i] : wk_alpha[d-1][i]);
          wk_alpha[d][i] = (d % 2 == 0) ? sat(g, q) : g;
        end
      end else begin
        for (int i = 0; i < s / 2; i++) begin
          int f = fms(wk_alpha[d][i], wk_alpha[d][i + s / 2]);
          wk_alpha[d+1][i] = ((d + 1) % 2 == 0) ? sat(f, q) : f;
        end
        d++;
        p = p * 2;
      end
    end
    // cycles: every node of radix-4 levels 1 .. nlev-2 once, then per
    // 16-bit node 1 (special), 5 (lookahead) or 8 cycles
    lat = 0;
    for (int k = 1; k <= nlev - 2; k++) lat += (1 << (2 * k));
    lat += n_spc + (n / 16 - n_spc) * (psl ? 5 : 8);
  endfunction

endpackage
