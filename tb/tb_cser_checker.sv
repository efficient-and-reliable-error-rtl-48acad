// tb_cser_checker: checks the comparison unit at Q = 8 for both swap
// variants: a swapped-run register set that matches the stored normal run
// raises no flag; a single corrupted branch register raises exactly the flag
// of the lane chain it holds; the hash compare flags only a differing hash;
// clear resets the flags; chk returns the stored registers.
module tb_cser_checker;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned Q = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic rst_n, clear, cap_chk, cmp_chk, cap_hash, cmp_hash, err_p1, err_p2;
  swap_e sel;
  blk_t r [Q], chk [Q], hash_in, hash;
  logic [Q-1:0] err_lane;

  cser_checker #(.Q(Q)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .swap_sel(sel), .r(r),
    .cap_chk(cap_chk), .cmp_chk(cmp_chk), .hash_in(hash_in), .cap_hash(cap_hash),
    .cmp_hash(cmp_hash), .chk(chk), .hash(hash), .err_lane(err_lane), .err_p1(err_p1),
    .err_p2(err_p2));

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t lane [Q];
    rst_n = 1'b0; clear = 1'b0; cap_chk = 0; cmp_chk = 0; cap_hash = 0; cmp_hash = 0;
    sel = SWAP_ADJACENT; hash_in = '0;
    for (int j = 0; j < Q; j++) r[j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int rep = 0; rep < 8; rep++) begin
      int bad;
      bad = (rep < 2) ? -1 : (rep * 3) % Q;
      @(negedge clk);
      sel = swap_e'(rep % 2);
      clear = 1'b1;
      for (int j = 0; j < Q; j++) begin
        lane[j] = rand128();
        r[j] = lane[j];
      end
      cap_chk = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      cap_chk = 1'b0;
      for (int j = 0; j < Q; j++) check("chk", chk[j], lane[j]);
      // swapped run: branch j holds the lane of its partner
      for (int j = 0; j < Q; j++) begin
        int p;
        p = (rep % 2 == 0) ? (j ^ 1) : (((j % 4) < 2) ? j + 2 : j - 2);
        r[j] = lane[p];
        if (j == bad) r[j] = r[j] ^ (128'd1 << (rep * 11));
      end
      cmp_chk = 1'b1;
      @(negedge clk);
      cmp_chk = 1'b0;
      begin
        logic [Q-1:0] exp_flags;
        int p;
        exp_flags = '0;
        if (bad >= 0) begin
          p = (rep % 2 == 0) ? (bad ^ 1) : (((bad % 4) < 2) ? bad + 2 : bad - 2);
          exp_flags[p] = 1'b1;
        end
        check("err_lane", 128'(err_lane), 128'(exp_flags));
        check("err_p1", 128'(err_p1), 128'(bad >= 0));
      end
      // hash compare
      hash_in = rand128();
      cap_hash = 1'b1;
      @(negedge clk);
      cap_hash = 1'b0;
      check("hash", hash, hash_in);
      if (rep % 3 == 1) hash_in = hash_in ^ 128'h100;
      cmp_hash = 1'b1;
      @(negedge clk);
      cmp_hash = 1'b0;
      check("err_p2", 128'(err_p2), 128'(rep % 3 == 1));
    end
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check("clear", 128'({err_lane, err_p2}), '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
