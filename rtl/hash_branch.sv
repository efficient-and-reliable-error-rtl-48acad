// hash_branch: one parallel Horner branch of the polynomial hash.
//
// Each enabled clock the branch issues acc xor m into its sub-pipelined
// GF(2^128) multiplier with operand k, and loads the multiplier result into
// its branch register r one enabled clock later:
//     r <= (acc xor m) * k,   acc = 0, r or alt (acc_sel)
// Because the multiplier holds one register stage, the loop r -> XOR ->
// multiplier stage -> r contains two registers, and the normal run and the
// swapped recomputation run of the CSER scheme occupy them alternately: the
// run whose value is in r issues while the other run's partial products sit
// in the multiplier stage. acc_sel = ACC_ZERO starts a new Horner chain,
// ACC_ALT starts from an externally supplied value (used by the recomputation
// of phase 2 from the stored phase-1 result).
//
// XOR, multiplier and branch register follow the drawn branch; interleaving
// the two runs through the pipeline stage is this design's choice.
module hash_branch
  import tes_pkg::*;
#(
  parameter bit PIPE = 1'b1
) (
  input  logic     clk,
  input  logic     en,
  input  acc_sel_e acc_sel,
  input  blk_t     alt,
  input  blk_t     m,
  input  blk_t     k,
  output blk_t     r
);

  blk_t acc, a, p;

  always_comb begin
    unique case (acc_sel)
      ACC_ZERO: acc = '0;
      ACC_ALT:  acc = alt;
      default:  acc = r;
    endcase
    a = acc ^ m;
  end

  gf128_mul_ko #(.PIPE(PIPE)) u_mul (
    .clk (clk),
    .en  (en),
    .a   (a),
    .b   (k),
    .p   (p)
  );

  always_ff @(posedge clk) begin
    if (en) r <= p;
  end

endmodule
