// key_power_gen: table of hash-subkey powers K^0 .. K^Q.
//
// Phase 1 of every branch multiplies by K^Q and phase 2 by branch-specific
// powers K^0 .. K^Q, so the engine needs the whole table. After start the
// unit stores K^0 = 1 and K^1 = key and then runs the chain K^i = K^(i-1) * K
// through one sub-pipelined Karatsuba-Ofman multiplier, feeding each product
// straight back as the next operand: one new power per clock.
//
// Timing: start is taken in IDLE; the table is complete and done pulses Q
// clocks after the start clock (pow[Q] written on that edge), ready stays high
// from then until the next start. pow is held stable while ready is high.
//
// The powers are computed "as is" by repeated multiplication; a single shared
// multiplier and the table as registers are this design's choices.
module key_power_gen
  import tes_pkg::*;
#(
  parameter int unsigned Q = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  blk_t key,
  output logic busy,
  output logic ready,
  output logic done,
  output blk_t pow [Q+1]
);

  localparam int unsigned CW = $clog2(Q + 1) + 1;

  typedef enum logic [1:0] {KG_IDLE, KG_FIRST, KG_RUN} kg_state_e;
  kg_state_e   state;
  logic [CW-1:0] cnt;   // exponent of the product leaving the multiplier

  blk_t mul_a, mul_p;
  logic mul_en;

  always_comb begin
    mul_en = (state == KG_FIRST) || (state == KG_RUN);
    mul_a  = (state == KG_FIRST) ? pow[1] : mul_p;
  end

  gf128_mul_ko #(.PIPE(1'b1)) u_mul (
    .clk (clk),
    .en  (mul_en),
    .a   (mul_a),
    .b   (pow[1]),
    .p   (mul_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= KG_IDLE;
      cnt   <= '0;
      ready <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        KG_IDLE: begin
          if (start) begin
            ready <= 1'b0;
            cnt   <= CW'(2);
            state <= (Q >= 2) ? KG_FIRST : KG_IDLE;
            if (Q < 2) begin
              ready <= 1'b1;
              done  <= 1'b1;
            end
          end
        end
        KG_FIRST: state <= KG_RUN;
        KG_RUN: begin
          cnt <= cnt + CW'(1);
          if (cnt == CW'(Q)) begin
            state <= KG_IDLE;
            ready <= 1'b1;
            done  <= 1'b1;
          end
        end
        default: state <= KG_IDLE;
      endcase
    end
  end

  // power table (datapath, no reset needed: ready qualifies it)
  always_ff @(posedge clk) begin
    if (state == KG_IDLE && start) begin
      pow[0] <= blk_t'(1);
      pow[1] <= key;
    end else if (state == KG_RUN) begin
      for (int unsigned i = 2; i <= Q; i++) begin
        if (cnt == CW'(i)) pow[i] <= mul_p;
      end
    end
  end

  assign busy = (state != KG_IDLE);

endmodule
