// tb_cser_swap: checks both swap variants of the entry swap network at the
// default size (Q = 64) with random entries. Expected routing is written out
// from the pair rules: adjacent pairs (1,2),(3,4),.. and interleaved pairs
// (1,3),(2,4),(5,7),(6,8),.. in 1-based branch numbers; applying the network
// twice must return the original order.
module tb_cser_swap;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned Q = 64;
  int checks = 0, failures = 0;

  swap_e sel;
  blk_t din [Q], dout [Q], dback [Q];

  cser_swap #(.Q(Q)) dut  (.swap_sel(sel), .din(din),  .dout(dout));
  cser_swap #(.Q(Q)) dut2 (.swap_sel(sel), .din(dout), .dout(dback));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < 2; s++) begin
        sel = swap_e'(s);
        for (int j = 0; j < Q; j++) din[j] = rand128();
        #1;
        for (int j = 0; j < Q; j++) begin
          int b1, p1;  // 1-based branch and its partner
          b1 = j + 1;
          if (s == 0) p1 = (b1 % 2 == 1) ? b1 + 1 : b1 - 1;
          else        p1 = (((b1 - 1) % 4) < 2) ? b1 + 2 : b1 - 2;
          checks++;
          if (dout[j] !== din[p1-1]) begin
            failures++;
            $display("FAIL sel=%0d branch %0d", s, b1);
          end
          checks++;
          if (dback[j] !== din[j]) begin
            failures++;
            $display("FAIL involution sel=%0d branch %0d", s, b1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
