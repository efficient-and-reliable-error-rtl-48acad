// cser_checker: comparison unit of the CSER error detection.
//
// Phase-1 check: on cap_chk the branch registers of the normal run are stored
// in the check bank chk; on cmp_chk (one clock later, when the branch
// registers hold the swapped run at the same step) the swapped run's
// registers are mapped back to lane order through the same swap network and
// compared lane by lane. A mismatch sets the sticky flag err_lane[c] of lane
// chain c; err_p1 is their OR. The check bank also supplies the stored
// phase-1 result from which phase 2 is recomputed (chk output).
//
// Final check: on cap_hash the normal run's hash is stored (and output as
// hash); on cmp_hash the recomputed hash is compared, setting err_p2.
// clear resets all error flags (the engine pulses it at the start of an
// operation).
//
// Comparing register contents of the two runs without any decoding follows
// the scheme; per-lane flags and sticky behaviour are this design's choice.
module cser_checker
  import tes_pkg::*;
#(
  parameter int unsigned Q = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  swap_e   swap_sel,
  input  blk_t    r       [Q],
  input  logic    cap_chk,
  input  logic    cmp_chk,
  input  blk_t    hash_in,
  input  logic    cap_hash,
  input  logic    cmp_hash,
  output blk_t    chk     [Q],
  output blk_t    hash,
  output logic [Q-1:0] err_lane,
  output logic    err_p1,
  output logic    err_p2
);

  blk_t r_lane [Q];

  cser_swap #(.Q(Q)) u_unswap (
    .swap_sel (swap_sel),
    .din      (r),
    .dout     (r_lane)
  );

  always_ff @(posedge clk) begin
    if (cap_chk) chk <= r;
    if (cap_hash) hash <= hash_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_lane <= '0;
      err_p2   <= 1'b0;
    end else if (clear) begin
      err_lane <= '0;
      err_p2   <= 1'b0;
    end else begin
      if (cmp_chk) begin
        for (int unsigned c = 0; c < Q; c++) begin
          if (r_lane[c] != chk[c]) err_lane[c] <= 1'b1;
        end
      end
      if (cmp_hash && hash_in != hash) err_p2 <= 1'b1;
    end
  end

  assign err_p1 = |err_lane;

endmodule
