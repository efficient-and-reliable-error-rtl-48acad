// gf128_mul_ko: GF(2^128) multiplier, p = a * b mod (x^128 + x^7 + x^2 + x + 1).
//
// One Karatsuba-Ofman step splits each operand into 64-bit halves and forms
// three carry-less 64x64 products: z0 = a0*b0, z2 = a1*b1 and
// zm = (a0+a1)*(b0+b1). They are recombined as z2*x^128 + (zm+z0+z2)*x^64 + z0
// and the 255-bit result is reduced modulo f(x).
//
// PIPE = 1 (default) places one register stage after the three sub-products,
// so p belongs to the operands presented one enabled clock earlier; the
// register advances only while en is high. PIPE = 0 makes the multiplier
// purely combinational (clk and en unused).
//
// The one-step Karatsuba-Ofman structure and the single sub-pipelining stage
// follow the benchmarked configuration; where the stage sits (after the
// sub-products, before recombination and reduction) is this design's choice.
module gf128_mul_ko
  import tes_pkg::*;
#(
  parameter bit PIPE = 1'b1
) (
  input  logic clk,
  input  logic en,
  input  blk_t a,
  input  blk_t b,
  output blk_t p
);

  logic [126:0] z0_d, z2_d, zm_d;
  logic [126:0] z0_q, z2_q, zm_q;

  always_comb begin
    z0_d = clmul64(a[63:0],   b[63:0]);
    z2_d = clmul64(a[127:64], b[127:64]);
    zm_d = clmul64(a[63:0] ^ a[127:64], b[63:0] ^ b[127:64]);
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (en) begin
        z0_q <= z0_d;
        z2_q <= z2_d;
        zm_q <= zm_d;
      end
    end
  end else begin : g_comb
    assign z0_q = z0_d;
    assign z2_q = z2_d;
    assign zm_q = zm_d;
  end

  logic [126:0] z1;
  logic [254:0] c;
  always_comb begin
    z1 = zm_q ^ z0_q ^ z2_q;
    c  = {z2_q, 128'b0} ^ {64'b0, z1, 64'b0} ^ {128'b0, z0_q};
    p  = gf_reduce(c);
  end

endmodule
