// tb_poly_hash_cser: end-to-end check of the error-detecting hash engine in
// all three modes (HCH, HCTR, XCB) at Q = 8 branches.
// For random keys, messages of G = 2..6 groups, both swap variants, full and
// partial (l < G-1) phase-1 checking and random gaps in the message stream,
// the hash is compared with a plain Horner evaluation over all blocks and the
// error flags must stay low. Without gaps the start-to-done latency must be
// Q + 3 + 2*(G-1+P2) clocks. Then stuck-at faults are forced on one branch
// multiplier output (permanent, in both runs) and as one-clock flips
// (transient, in one run) and the error flags must rise.
module tb_poly_hash_cser;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned Q    = 8;
  localparam int unsigned MAXG = 8;
  localparam int unsigned CW   = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0;

  logic          rst_n;
  logic          start     [3];
  blk_t          hkey      [3];
  blk_t          q_term    [3];
  blk_t          x0        [3];
  blk_t          x1        [3];
  logic [CW-1:0] n_groups  [3];
  logic [CW-1:0] l_steps   [3];
  swap_e         swap_sel  [3];
  logic          msg_valid [3];
  logic          msg_ready [3];
  logic [CW-1:0] msg_idx   [3];
  blk_t          msg       [3][Q];
  logic          busy      [3];
  logic          done      [3];
  blk_t          hash      [3];
  logic          err_p1    [3];
  logic          err_p2    [3];
  logic [Q-1:0]  err_lane  [3];

  blk_t mem [3][MAXG][Q];

  for (genvar e = 0; e < 3; e++) begin : g_eng
    poly_hash_cser #(.MODE(tes_mode_e'(e)), .Q(Q), .CNT_W(CW)) dut (
      .clk(clk), .rst_n(rst_n), .start(start[e]), .hkey(hkey[e]), .q_term(q_term[e]),
      .extra0(x0[e]), .extra1(x1[e]), .n_groups(n_groups[e]), .l_steps(l_steps[e]),
      .swap_sel(swap_sel[e]), .msg_valid(msg_valid[e]), .msg_ready(msg_ready[e]),
      .msg_idx(msg_idx[e]), .msg(msg[e]), .busy(busy[e]), .done(done[e]), .hash(hash[e]),
      .err_p1(err_p1[e]), .err_p2(err_p2[e]), .err_lane(err_lane[e]));
    always_comb begin
      for (int k = 0; k < Q; k++) msg[e][k] = mem[e][msg_idx[e] % MAXG][k];
    end
  end

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation on engine e. gaps: percentage of clocks with msg_valid low.
  // Returns the hash and the error flags.
  task automatic run_op(input int e, input int g, input int l, input swap_e sw, input int gaps,
                        output blk_t h, output logic ep1, output logic ep2, output int cyc,
                        input bit check_hash = 1);
    blk_t m [];
    blk_t exp_h;
    m = new[g * Q];
    @(negedge clk);
    hkey[e] = rand128(); q_term[e] = rand128(); x0[e] = rand128(); x1[e] = rand128();
    for (int i = 0; i < g; i++)
      for (int k = 0; k < Q; k++) begin
        mem[e][i][k] = rand128();
        m[i*Q + k] = mem[e][i][k];
      end
    n_groups[e] = CW'(g); l_steps[e] = CW'(l); swap_sel[e] = sw;
    msg_valid[e] = (gaps == 0);
    start[e] = 1'b1;
    @(posedge clk);
    #1 start[e] = 1'b0;
    cyc = 0;
    while (!done[e]) begin
      // the source drops valid only between transfers, never during an offer
      logic xfer;
      @(negedge clk);
      if (gaps > 0 && !msg_valid[e]) msg_valid[e] = ($urandom % 100) >= gaps;
      #1;
      if (gaps > 0 && !msg_valid[e] && busy[e]) n_stall++;
      xfer = msg_valid[e] && msg_ready[e];
      @(posedge clk); #1;
      // after a transfer the next group may be offered at once or later
      if (gaps > 0 && xfer) msg_valid[e] = ($urandom % 100) >= gaps;
      cyc++;
      if (cyc > 10000) break;
    end
    msg_valid[e] = 1'b0;
    h = hash[e]; ep1 = err_p1[e]; ep2 = err_p2[e];
    exp_h = ref_hash(e, hkey[e], q_term[e], x0[e], x1[e], m);
    if (check_hash) check($sformatf("hash mode %0d G %0d l %0d sw %0d", e, g, l, sw), h, exp_h);
  endtask

  initial begin
    blk_t h;
    logic ep1, ep2, flip;
    int cyc;
    rst_n = 1'b0;
    for (int e = 0; e < 3; e++) begin
      start[e] = 0; msg_valid[e] = 0; n_groups[e] = 2; l_steps[e] = 0; swap_sel[e] = SWAP_ADJACENT;
      hkey[e] = '0; q_term[e] = '0; x0[e] = '0; x1[e] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // fault-free operations
    for (int e = 0; e < 3; e++) begin
      for (int rep = 0; rep < 12; rep++) begin
        int g, l, gaps, np2;
        g = 2 + (rep % 5);
        l = (rep % 3 == 2) ? 1 : 0;
        gaps = (rep % 4 == 3) ? 30 : 0;
        np2 = (e == 0) ? 1 : 2;
        run_op(e, g, l, swap_e'(rep % 2), gaps, h, ep1, ep2, cyc);
        check("no err_p1", 128'(ep1), 0);
        check("no err_p2", 128'(ep2), 0);
        if (gaps == 0) check($sformatf("latency mode %0d G %0d", e, g), 128'(cyc),
                             128'(Q + 3 + 2 * (g - 1 + np2)));
      end
    end
    check("stalls seen", 128'(n_stall > 0), 1);

    // permanent stuck-at fault on one multiplier output bit, both swap variants
    for (int e = 0; e < 3; e++) begin
      for (int s = 0; s < 2; s++) begin
        case (e)
          0: force g_eng[0].dut.g_branch[3].u_branch.p[17] = 1'b1;
          1: force g_eng[1].dut.g_branch[3].u_branch.p[17] = 1'b1;
          default: force g_eng[2].dut.g_branch[3].u_branch.p[17] = 1'b1;
        endcase
        run_op(e, 4, 0, swap_e'(s), 0, h, ep1, ep2, cyc, 0);
        case (e)
          0: release g_eng[0].dut.g_branch[3].u_branch.p[17];
          1: release g_eng[1].dut.g_branch[3].u_branch.p[17];
          default: release g_eng[2].dut.g_branch[3].u_branch.p[17];
        endcase
        check($sformatf("permanent fault detected mode %0d", e), 128'(ep1), 1);
      end
    end

    // transient fault: one clock of a flipped bit in the normal run, phase 1
    fork
      begin
        blk_t hh; logic a1, a2; int cc;
        run_op(0, 5, 0, SWAP_INTERLEAVED, 0, hh, a1, a2, cc, 0);
        check("transient fault detected", 128'(a1 | a2), 1);
      end
      begin
        // issue of step 1 of the normal run: Q+2 clocks after start + 2
        repeat (Q + 6) @(posedge clk);
        #2 flip = ~g_eng[0].dut.g_branch[5].u_branch.p[3];
        force g_eng[0].dut.g_branch[5].u_branch.p[3] = flip;
        @(posedge clk);
        #2 release g_eng[0].dut.g_branch[5].u_branch.p[3];
      end
    join

    // transient fault in phase 2 of the normal run: only the final compare
    // can see it
    fork
      begin
        blk_t hh; logic a1, a2; int cc;
        run_op(0, 4, 0, SWAP_ADJACENT, 0, hh, a1, a2, cc, 0);
        check("phase-2 fault detected", 128'(a2), 1);
        check("phase-2 fault not in phase 1", 128'(a1), 0);
      end
      begin
        // the normal run's step G-1 result (G = 4) enters the branch
        // registers Q+2+2*3+1 clocks after start; flip one bit of it
        @(negedge clk);
        @(posedge clk);
        repeat (Q + 9) @(posedge clk);
        #2 flip = ~g_eng[0].dut.g_branch[6].u_branch.r[77];
        force g_eng[0].dut.g_branch[6].u_branch.r[77] = flip;
        #4 release g_eng[0].dut.g_branch[6].u_branch.r[77];
      end
    join

    // after the faults, a clean run must pass again
    run_op(1, 3, 0, SWAP_ADJACENT, 0, h, ep1, ep2, cyc);
    check("clean after fault", 128'(ep1 | ep2), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
