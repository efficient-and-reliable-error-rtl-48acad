// tes_pkg: types, constants and helper functions shared by the error-detecting
// polynomial-hash engines of the Hash-Counter-Hash tweakable enciphering
// schemes (HCH, HCTR, XCB).
//
// Field: GF(2^128) in polynomial basis, bit i of a 128-bit word is the
// coefficient of x^i, reduction polynomial f(x) = x^128 + x^7 + x^2 + x + 1.
// The carry-less 64x64 product and the 255-to-128-bit reduction used by the
// Karatsuba-Ofman multiplier are defined here as functions.
//
// The phase-2 exponent tables follow the hash definitions of the three modes:
//   HCH : branch k (0-based) multiplies by K^(q-1-k)              (one step)
//   HCTR: branch 0,1 by K^q, branch k>=2 by K^(q-k+1), then branch 0 by K^1
//   XCB : branch 0,1,2 by K^q, branch k>=3 by K^(q-k+2), then branch 0 by
//         K^2 and branch 1 by K^1                                  (two steps)
// The swap partner functions give the customizable entry swapping of the
// recomputation run (adjacent pairs, or interleaved pairs at distance 2).
package tes_pkg;

  localparam int unsigned BLK_W = 128;
  typedef logic [BLK_W-1:0] blk_t;

  typedef enum logic [1:0] {
    MODE_HCH  = 2'd0,
    MODE_HCTR = 2'd1,
    MODE_XCB  = 2'd2
  } tes_mode_e;

  // accumulator source of a branch issue
  typedef enum logic [1:0] {
    ACC_R    = 2'd0,  // continue the chain held in the branch register
    ACC_ZERO = 2'd1,  // start a new chain
    ACC_ALT  = 2'd2   // start from the stored phase-1 value
  } acc_sel_e;

  typedef enum logic {
    SWAP_ADJACENT    = 1'b0,
    SWAP_INTERLEAVED = 1'b1
  } swap_e;

  // Carry-less product of two 64-bit polynomials, computed column by column:
  // bit j of the product is the parity of a AND (b reversed, shifted so that
  // b[j-i] lines up with a[i]).
  function automatic logic [126:0] clmul64(input logic [63:0] a, input logic [63:0] b);
    logic [63:0]  b_rev;
    logic [189:0] win;
    logic [126:0] r;
    b_rev = {<<{b}};
    win   = {63'b0, b_rev, 63'b0};
    for (int j = 0; j < 127; j++) r[j] = ^(a & win[126-j +: 64]);
    return r;
  endfunction

  // Reduce a 255-bit product modulo f(x). x^128 = x^7 + x^2 + x + 1, so the
  // upper 127 bits are folded twice into the lower half.
  function automatic blk_t gf_reduce(input logic [254:0] c);
    logic [126:0] hi;
    logic [134:0] fold;
    logic [6:0]   hi2;
    blk_t         r;
    hi   = c[254:128];
    fold = {8'b0, hi} ^ ({8'b0, hi} << 1) ^ ({8'b0, hi} << 2) ^ ({8'b0, hi} << 7);
    hi2  = fold[134:128];
    r    = c[127:0] ^ fold[127:0];
    r    = r ^ {121'b0, hi2} ^ ({121'b0, hi2} << 1) ^ ({121'b0, hi2} << 2) ^ ({121'b0, hi2} << 7);
    return r;
  endfunction

  // Branch that receives branch k's entry in the swapped run.
  function automatic int unsigned swap_partner(input int unsigned k, input swap_e s);
    return (s == SWAP_ADJACENT) ? (k ^ 1) : (k ^ 2);
  endfunction

  // Number of phase-2 multiplication steps after phase 1.
  function automatic int unsigned p2_steps(input tes_mode_e m);
    return (m == MODE_HCH) ? 1 : 2;
  endfunction

  // Offset of the mode's hash exponents: HCH 0, HCTR 2, XCB 3.
  function automatic int unsigned mode_off(input tes_mode_e m);
    case (m)
      MODE_HCTR: return 2;
      MODE_XCB:  return 3;
      default:   return 0;
    endcase
  endfunction

  // Exponent used by branch k in the first phase-2 step (the step that also
  // adds the last message block of the branch).
  function automatic int unsigned exp_p2a(input int unsigned k, input int unsigned q,
                                          input tes_mode_e m);
    int unsigned e;
    e = q + mode_off(m) - 1 - k;
    return (e > q) ? q : e;
  endfunction

  // Exponent used by branch k in the second phase-2 step (HCTR and XCB);
  // 0 means multiply by one, i.e. the branch keeps its value.
  function automatic int unsigned exp_p2b(input int unsigned k, input tes_mode_e m);
    int unsigned off;
    off = mode_off(m);
    return (off > 0 && k + 1 < off) ? off - 1 - k : 0;
  endfunction

endpackage
