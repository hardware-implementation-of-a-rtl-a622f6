// polar_pkg: types and helper functions shared by the radix-4 successive
// cancellation (SC) polar decoder.
//
// The decoder works on a radix-4 tree: level k holds one node of
// n/4^k log-likelihood ratios (LLRs); level 0 is the channel word. Only these
// even radix-2 stages are ever stored. The helpers below give the size of a
// level and its offset inside the flat arrays that hold all levels back to
// back. enc4 is the 4-bit polar transform x = u*G4 (natural bit order, no
// bit-reversal), used to turn decided bits into partial sums.
package polar_pkg;

  // Processing-unit function: which of the four grandchildren is produced.
  typedef enum logic [1:0] {
    FN_FF = 2'd0,  // child 0: f(f, f)
    FN_FG = 2'd1,  // child 1: f-side g
    FN_GF = 2'd2,  // child 2: g-side f
    FN_GG = 2'd3   // child 3: g(g, g)
  } pu_fn_e;

  // Operation the decoder performs in a cycle.
  typedef enum logic [1:0] {
    OP_IDLE = 2'd0,  // waiting for a codeword
    OP_PU   = 2'd1,  // processing units compute one node of the next level
    OP_LEAF = 2'd2,  // last stage unit decides 4 bits (plus lookahead)
    OP_SPC  = 2'd3   // special sub-code unit decides 16 bits
  } dec_op_e;

  // Special sub-code frozen patterns (criteria 1..7 for a k-bit node).
  typedef enum logic [2:0] {
    SPC_NONE  = 3'd0,  // not special: decoded through PUs and the LSPU
    SPC_RATE0 = 3'd1,  // all frozen
    SPC_REP   = 3'd2,  // only the last bit carries data
    SPC_HALF  = 3'd3,  // bits k/2-1 and k-1 carry data
    SPC_QUART = 3'd4,  // bits k/4-1, k/2-1, 3k/4-1, k-1 carry data
    SPC_LAST2 = 3'd5,  // the last two bits carry data
    SPC_LAST4 = 3'd6,  // the last four bits carry data
    SPC_RATE1 = 3'd7   // no frozen bits
  } spc_kind_e;

  // Number of LLRs of one node at radix-4 level k of an n-bit code.
  function automatic int unsigned lvl_size(int unsigned n, int unsigned k);
    return n >> (2 * k);
  endfunction

  // Offset of level k in an array that stores levels 0, 1, ... back to back.
  function automatic int unsigned lvl_off(int unsigned n, int unsigned k);
    int unsigned s;
    s = 0;
    for (int unsigned j = 0; j < k; j++) s += n >> (2 * j);
    return s;
  endfunction

  // log4(n) for n a power of four.
  function automatic int unsigned log4(int unsigned n);
    int unsigned r;
    r = 0;
    while ((n >> (2 * r)) > 1) r++;
    return r;
  endfunction

  // 4-bit polar transform x = u * G4, bit i of the vector is u_i / x_i.
  function automatic logic [3:0] enc4(logic [3:0] u);
    return {u[3], u[2] ^ u[3], u[1] ^ u[3], u[0] ^ u[1] ^ u[2] ^ u[3]};
  endfunction

endpackage
