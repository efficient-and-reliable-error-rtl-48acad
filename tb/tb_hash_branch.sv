// tb_hash_branch: runs two independent Horner chains interleaved through one
// branch, as the normal and the recomputation run do, and compares the
// branch register with the bit-serial reference after every step. Also
// checks the ACC_ALT restart and that a low enable freezes both chains.
module tb_hash_branch;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic     en;
  acc_sel_e acc_sel;
  blk_t     alt, m, k, r;

  hash_branch dut (.clk(clk), .en(en), .acc_sel(acc_sel), .alt(alt), .m(m), .k(k), .r(r));

  task automatic check(input string what, input blk_t got, input blk_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t key, st [2], a_alt;
    key = rand128();
    k = key;
    st[0] = '0; st[1] = '0;
    en = 1'b1; alt = '0;
    @(negedge clk);
    // 12 steps per chain; chain c issues on clocks with parity c
    for (int s = 0; s < 12; s++) begin
      for (int c = 0; c < 2; c++) begin
        blk_t mm;
        mm = rand128();
        if (s == 0) acc_sel = ACC_ZERO;
        else if (s == 6 && c == 1) acc_sel = ACC_ALT;
        else acc_sel = ACC_R;
        a_alt = rand128();
        alt = a_alt;
        m = mm;
        // register holds chain c's value while chain c issues (from step 1)
        if (s > 0) check($sformatf("chain %0d step %0d", c, s), r, st[c]);
        if (s == 0) st[c] = ref_mul(mm, key);
        else if (s == 6 && c == 1) st[c] = ref_mul(a_alt ^ mm, key);
        else st[c] = ref_mul(st[c] ^ mm, key);
        // a stall in the middle: nothing may move
        if (s == 4 && c == 0) begin
          blk_t hold;
          @(posedge clk); #1;
          hold = r;
          en = 1'b0;
          m = rand128();
          repeat (3) @(posedge clk);
          #1 check("stall hold", r, hold);
          en = 1'b1;
          m = mm;
          acc_sel = ACC_R;
          @(negedge clk);
          // chain 1 now issues: stall repeated nothing, schedule continues
          continue;
        end
        @(negedge clk);
      end
    end
    acc_sel = ACC_R;
    m = '0;
    check("final chain 0", r, st[0]);
    @(negedge clk);
    check("final chain 1", r, st[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
