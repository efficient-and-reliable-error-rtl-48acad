// tb_gf128_mul_ko: checks the Karatsuba-Ofman GF(2^128) multiplier against a
// bit-serial reference, for the pipelined (one register stage, result one
// clock after the operands) and the combinational configuration, including
// the operands 0, 1, x and all-ones, and checks that a low enable holds the
// pipeline register.
module tb_gf128_mul_ko;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  blk_t a, b, p_pipe, p_comb;
  logic en;

  gf128_mul_ko #(.PIPE(1'b1)) dut_pipe (.clk(clk), .en(en), .a(a), .b(b), .p(p_pipe));
  gf128_mul_ko #(.PIPE(1'b0)) dut_comb (.clk(clk), .en(en), .a(a), .b(b), .p(p_comb));

  task automatic check(input string what, input blk_t got, input blk_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t va [$];
    blk_t vb [$];
    blk_t exp_prev;
    // directed operands
    va.push_back(128'd0);          vb.push_back(rand128());
    va.push_back(128'd1);          vb.push_back(rand128());
    va.push_back(128'd2);          vb.push_back({1'b1, 127'd0});
    va.push_back({128{1'b1}});     vb.push_back({128{1'b1}});
    va.push_back({1'b1, 127'd0});  vb.push_back({1'b1, 127'd0});
    for (int i = 0; i < 300; i++) begin
      va.push_back(rand128());
      vb.push_back(rand128());
    end
    // x * x^127 = x^128 = x^7 + x^2 + x + 1
    check("x*x^127", ref_mul(128'd2, {1'b1, 127'd0}), 128'h87);
    en = 1'b1;
    a = va[0]; b = vb[0];
    @(negedge clk);
    for (int i = 0; i < va.size(); i++) begin
      a = va[i]; b = vb[i];
      #1;
      check("comb", p_comb, ref_mul(va[i], vb[i]));
      @(posedge clk); #1;
      check("pipe", p_pipe, ref_mul(va[i], vb[i]));
      @(negedge clk);
    end
    // stall: enable low must hold the stage
    exp_prev = ref_mul(a, b);
    en = 1'b0;
    a = rand128(); b = rand128();
    repeat (3) @(posedge clk);
    #1 check("hold", p_pipe, exp_prev);
    en = 1'b1;
    @(posedge clk); #1 check("after hold", p_pipe, ref_mul(a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
