// xor_tree: modulo-2 addition of the Q branch registers, plus an extra term.
//
// Forms sum = extra + r[0] + r[1] + ... + r[Q-1] over GF(2)^128 as a balanced
// binary tree of 128-bit XORs (log2(Q) levels). For HCH the extra term is Q
// (phase 3, H = Q + H^p2); HCTR and XCB drive it with zero.
//
// Purely combinational. Q must be a power of two.
module xor_tree
  import tes_pkg::*;
#(
  parameter int unsigned Q = 64
) (
  input  blk_t r [Q],
  input  blk_t extra,
  output blk_t sum
);

  localparam int unsigned LEVELS = $clog2(Q);

  initial begin
    assert ((1 << LEVELS) == Q) else $error("xor_tree: Q must be a power of two");
  end

  // Pairwise reduction, level by level: after level l the first Q >> l
  // entries of t hold the partial sums of that level.
  always_comb begin
    blk_t t [Q];
    for (int unsigned i = 0; i < Q; i++) t[i] = r[i];
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned i = 0; i < (Q >> l); i++) begin
        t[i] = t[2*i] ^ t[2*i+1];
      end
    end
    sum = t[0] ^ extra;
  end

endmodule
