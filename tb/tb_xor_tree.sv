// tb_xor_tree: checks the modulo-2 addition tree at the default size
// (Q = 64) and at Q = 4 against a sequential XOR of the inputs and the extra
// term, with random words, single set bits and all-zero inputs.
module tb_xor_tree;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  int checks = 0, failures = 0;

  blk_t r64 [64], r4 [4], ex, s64, s4;

  xor_tree #(.Q(64)) dut64 (.r(r64), .extra(ex), .sum(s64));
  xor_tree #(.Q(4))  dut4  (.r(r4),  .extra(ex), .sum(s4));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 40; rep++) begin
      blk_t e64, e4;
      ex = (rep % 3 == 0) ? '0 : rand128();
      for (int j = 0; j < 64; j++) begin
        if (rep < 5) r64[j] = '0;
        else if (rep < 10) r64[j] = (j == rep * 7 % 64) ? (128'd1 << (rep * 13)) : '0;
        else r64[j] = rand128();
      end
      for (int j = 0; j < 4; j++) r4[j] = rand128();
      #1;
      e64 = ex;
      for (int j = 0; j < 64; j++) e64 = e64 ^ r64[j];
      e4 = ex;
      for (int j = 0; j < 4; j++) e4 = e4 ^ r4[j];
      checks += 2;
      if (s64 !== e64) begin failures++; $display("FAIL q64 rep %0d", rep); end
      if (s4 !== e4)   begin failures++; $display("FAIL q4 rep %0d", rep); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
