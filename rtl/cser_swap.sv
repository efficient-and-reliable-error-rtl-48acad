// cser_swap: entry swap network of the CSER (customizable swapped entries for
// recomputation) scheme.
//
// In the recomputation run every branch works on the entries of a partner
// branch, so that a fault fixed in one multiplier corrupts two different
// lane chains in the two runs and the comparison sees a mismatch.
//   SWAP_ADJACENT   : branches 2i and 2i+1 exchange entries   (out[j] = in[j^1])
//   SWAP_INTERLEAVED: branches 4i+j and 4i+j+2 exchange       (out[j] = in[j^2])
// The interleaved form keeps the two runs of one lane chain apart by one
// branch, for faults that hit neighbouring multipliers together.
// The swap is an involution, so the same network also maps the swapped run's
// registers back to lane order for the comparison.
//
// Purely combinational. Q must be a multiple of 4. The two pairings are the
// ones drawn for the adjacent and the interleaved variants; selecting them at
// run time with swap_sel is this design's choice.
module cser_swap
  import tes_pkg::*;
#(
  parameter int unsigned Q = 64
) (
  input  swap_e swap_sel,
  input  blk_t  din  [Q],
  output blk_t  dout [Q]
);

  initial begin
    assert (Q % 4 == 0) else $error("cser_swap: Q must be a multiple of 4");
  end

  for (genvar j = 0; j < Q; j++) begin : g_lane
    localparam int unsigned ADJ = swap_partner(j, SWAP_ADJACENT);
    localparam int unsigned ILV = swap_partner(j, SWAP_INTERLEAVED);
    assign dout[j] = (swap_sel == SWAP_ADJACENT) ? din[ADJ] : din[ILV];
  end

endmodule
