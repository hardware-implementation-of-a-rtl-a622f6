// spc_decoder: special sub-code decoder for a K-bit node (K = 16).
//
// When the frozen pattern of a whole K-bit node is one of seven simple
// shapes, its bits can be decided at once from sums of the node's LLRs,
// because frozen bits make several code bits carry the same value. The
// unit classifies the node's `info` mask (bit i = 1 when u_i carries data)
// and decodes it in one combinational step. S(set) is the sign bit of the
// sum of the LLRs in the set.
//   RATE0  no data bit         : all zero
//   REP    u[K-1] only         : u[K-1] = S(all)
//   HALF   u[K/2-1], u[K-1]    : u[K-1] = S(upper half),
//                                u[K/2-1] = S(lower half) ^ u[K-1]
//   QUART  u[qK/4-1], q=1..4   : code bits of quarter q all equal the XOR
//                                of the data bits whose index covers them;
//                                each quarter sum gives one equation, solved
//                                from the last quarter down
//   LAST2  u[K-2], u[K-1]      : u[K-1] = S(odd LLRs),
//                                u[K-2] = S(even LLRs) ^ u[K-1]
//   LAST4  u[K-4..K-1]         : T_r = S(L[4j+r]); (T0..T3) are treated as
//                                the signs of a rate-one 4-bit code
//   RATE1  all data            : u = (sign bits) * G_K
// Anything else is SPC_NONE (`hit` low, u = 0) and is decoded by the
// processing units and the LSPU instead.
// The quarter and last-four equations are written from the encoding
// x = u * G_K; they are this implementation's reading of the rules.
// Sums are Q + log2(K) bits wide, so they never overflow. Combinational.
module spc_decoder
  import polar_pkg::*;
#(
  parameter int unsigned Q = 5,   // LLR width
  parameter int unsigned K = 16   // node size handled (power of two, >= 8)
) (
  input  logic signed [Q-1:0] l [K],  // node LLRs
  input  logic        [K-1:0] info,   // 1 = data bit
  output spc_kind_e           kind,   // which special pattern
  output logic                hit,    // node is special
  output logic        [K-1:0] u       // decided bits
);

  localparam int unsigned W = Q + $clog2(K) + 1;

  logic signed [W-1:0] e [K];
  logic [K-1:0] s;
  logic signed [W-1:0] sa, slo, shi, sev, sod;
  logic signed [W-1:0] squ [4];
  logic signed [W-1:0] sres [4];
  logic [3:0] qs, ts;

  // Masks of the special patterns.
  function automatic logic [K-1:0] bit_at(int unsigned i);
    return {{(K - 1){1'b0}}, 1'b1} << i;
  endfunction

  localparam logic [K-1:0] M_REP   = bit_at(K - 1);
  localparam logic [K-1:0] M_HALF  = bit_at(K - 1) | bit_at(K / 2 - 1);
  localparam logic [K-1:0] M_QUART = bit_at(K - 1) | bit_at(3 * K / 4 - 1) |
                                     bit_at(K / 2 - 1) | bit_at(K / 4 - 1);
  localparam logic [K-1:0] M_LAST2 = bit_at(K - 1) | bit_at(K - 2);
  localparam logic [K-1:0] M_LAST4 = bit_at(K - 1) | bit_at(K - 2) |
                                     bit_at(K - 3) | bit_at(K - 4);

  always_comb begin
    sa  = '0;
    slo = '0;
    shi = '0;
    sev = '0;
    sod = '0;
    for (int q = 0; q < 4; q++) begin
      squ[q]  = '0;
      sres[q] = '0;
    end
    for (int i = 0; i < K; i++) begin
      e[i] = W'(l[i]);
      s[i] = l[i][Q-1];
      sa   = sa + e[i];
      if (i < K / 2) slo = slo + e[i];
      else           shi = shi + e[i];
      if (i % 2 == 0) sev = sev + e[i];
      else            sod = sod + e[i];
      squ[i / (K / 4)] = squ[i / (K / 4)] + e[i];
      sres[i % 4]      = sres[i % 4] + e[i];
    end
    for (int q = 0; q < 4; q++) begin
      qs[q] = squ[q][W-1];
      ts[q] = sres[q][W-1];
    end

    if (info == '0)          kind = SPC_RATE0;
    else if (info == M_REP)   kind = SPC_REP;
    else if (info == M_HALF)  kind = SPC_HALF;
    else if (info == M_QUART) kind = SPC_QUART;
    else if (info == M_LAST2) kind = SPC_LAST2;
    else if (info == M_LAST4) kind = SPC_LAST4;
    else if (info == '1)      kind = SPC_RATE1;
    else                      kind = SPC_NONE;
    hit = (kind != SPC_NONE);

    u = '0;
    unique case (kind)
      SPC_REP: u[K-1] = sa[W-1];
      SPC_HALF: begin
        u[K-1]   = shi[W-1];
        u[K/2-1] = slo[W-1] ^ shi[W-1];
      end
      SPC_QUART: begin
        u[K-1]     = qs[3];
        u[3*K/4-1] = qs[2] ^ qs[3];
        u[K/2-1]   = qs[1] ^ qs[3];
        u[K/4-1]   = qs[0] ^ qs[1] ^ qs[2] ^ qs[3];
      end
      SPC_LAST2: begin
        u[K-1] = sod[W-1];
        u[K-2] = sev[W-1] ^ sod[W-1];
      end
      SPC_LAST4: begin
        u[K-1] = ts[3];
        u[K-2] = ts[2] ^ ts[3];
        u[K-3] = ts[1] ^ ts[3];
        u[K-4] = ts[0] ^ ts[1] ^ ts[2] ^ ts[3];
      end
      SPC_RATE1: begin
        // u_i = XOR of s_j over all j whose bit set contains that of i.
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++)
            if ((j & i) == i) u[i] = u[i] ^ s[j];
      end
      default: u = '0;
    endcase
  end

endmodule
