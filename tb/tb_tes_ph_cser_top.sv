// tb_tes_ph_cser_top: end-to-end test of the top at its default size
// (Q = 64 branches) with messages of pi = 2^10 blocks (G = 16 groups).
// For each of the three engines (HCH, HCTR, XCB):
//   1. adjacent swapping, full phase-1 check, no gaps: hash against a plain
//      Horner reference, no error flag, latency Q + 3 + 2*(G-1+P2) clocks;
//   2. interleaved swapping, partial check after l = 3 steps, random gaps in
//      the message stream (stalls);
//   3. a permanent stuck-at-1 on one multiplier output bit: phase-1 flag;
//   4. a bit flip in one branch register holding the normal run's phase-2
//      result: final-compare flag, phase-1 flag clear.
// Each mechanism (mode, swap variant, full/partial check, stall, phase-1
// detection, phase-2 detection) is counted and must occur.
module tb_tes_ph_cser_top;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned Q  = 64;
  localparam int unsigned G  = 16;
  localparam int unsigned CW = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mode [3];
  int n_adj = 0, n_ilv = 0, n_full = 0, n_part = 0, n_stall = 0, n_det1 = 0, n_det2 = 0;

  logic rst_n;
  // per-engine stimulus and response (index 0 HCH, 1 HCTR, 2 XCB)
  logic          start     [3];
  blk_t          key       [3];
  blk_t          qt;
  blk_t          x0        [3];
  blk_t          x1;
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

  blk_t mem [3][G][Q];
  logic v;   // value forced by the transient fault

  for (genvar e = 0; e < 3; e++) begin : g_src
    always_comb begin
      for (int k = 0; k < Q; k++) msg[e][k] = mem[e][msg_idx[e] % G][k];
    end
  end

  tes_ph_cser_top dut (
    .clk(clk), .rst_n(rst_n),
    .hch_start(start[0]), .hch_rkey(key[0]), .hch_qterm(qt), .hch_n_groups(n_groups[0]),
    .hch_l_steps(l_steps[0]), .hch_swap_sel(swap_sel[0]), .hch_msg_valid(msg_valid[0]),
    .hch_msg_ready(msg_ready[0]), .hch_msg_idx(msg_idx[0]), .hch_msg(msg[0]),
    .hch_busy(busy[0]), .hch_done(done[0]), .hch_hash(hash[0]), .hch_err_p1(err_p1[0]),
    .hch_err_p2(err_p2[0]), .hch_err_lane(err_lane[0]),
    .hctr_start(start[1]), .hctr_hkey(key[1]), .hctr_len(x0[1]), .hctr_n_groups(n_groups[1]),
    .hctr_l_steps(l_steps[1]), .hctr_swap_sel(swap_sel[1]), .hctr_msg_valid(msg_valid[1]),
    .hctr_msg_ready(msg_ready[1]), .hctr_msg_idx(msg_idx[1]), .hctr_msg(msg[1]),
    .hctr_busy(busy[1]), .hctr_done(done[1]), .hctr_hash(hash[1]), .hctr_err_p1(err_p1[1]),
    .hctr_err_p2(err_p2[1]), .hctr_err_lane(err_lane[1]),
    .xcb_start(start[2]), .xcb_hkey(key[2]), .xcb_tweak(x0[2]), .xcb_len(x1),
    .xcb_n_groups(n_groups[2]), .xcb_l_steps(l_steps[2]), .xcb_swap_sel(swap_sel[2]),
    .xcb_msg_valid(msg_valid[2]), .xcb_msg_ready(msg_ready[2]), .xcb_msg_idx(msg_idx[2]),
    .xcb_msg(msg[2]), .xcb_busy(busy[2]), .xcb_done(done[2]), .xcb_hash(hash[2]),
    .xcb_err_p1(err_p1[2]), .xcb_err_p2(err_p2[2]), .xcb_err_lane(err_lane[2]));

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
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

  task automatic set_fault(input int e, input int kind, input bit on);
    // kind 1: stuck-at-1 on bit 40 of branch 10's multiplier output
    // kind 2: inverted bit 99 of branch 33's register
    if (kind == 1) begin
      case (e)
        0: if (on) force dut.u_hch.g_branch[10].u_branch.p[40] = 1'b1;
           else release dut.u_hch.g_branch[10].u_branch.p[40];
        1: if (on) force dut.u_hctr.g_branch[10].u_branch.p[40] = 1'b1;
           else release dut.u_hctr.g_branch[10].u_branch.p[40];
        default: if (on) force dut.u_xcb.g_branch[10].u_branch.p[40] = 1'b1;
           else release dut.u_xcb.g_branch[10].u_branch.p[40];
      endcase
    end else begin
      case (e)
        0: begin
          v = ~dut.u_hch.g_branch[33].u_branch.r[99];
          if (on) force dut.u_hch.g_branch[33].u_branch.r[99] = v;
          else release dut.u_hch.g_branch[33].u_branch.r[99];
        end
        1: begin
          v = ~dut.u_hctr.g_branch[33].u_branch.r[99];
          if (on) force dut.u_hctr.g_branch[33].u_branch.r[99] = v;
          else release dut.u_hctr.g_branch[33].u_branch.r[99];
        end
        default: begin
          v = ~dut.u_xcb.g_branch[33].u_branch.r[99];
          if (on) force dut.u_xcb.g_branch[33].u_branch.r[99] = v;
          else release dut.u_xcb.g_branch[33].u_branch.r[99];
        end
      endcase
    end
  endtask

  // inj: 0 none, 1 permanent phase-1 fault, 2 transient phase-2 fault
  task automatic run_op(input int e, input int l, input swap_e sw, input int gaps, input int inj,
                        output int cyc, output blk_t exp_h);
    blk_t m [];
    m = new[G * Q];
    @(negedge clk);
    key[e] = rand128(); x0[e] = rand128();
    if (e == 0) qt = rand128();
    if (e == 2) x1 = rand128();
    for (int i = 0; i < G; i++)
      for (int k = 0; k < Q; k++) begin
        mem[e][i][k] = rand128();
        m[i*Q + k] = mem[e][i][k];
      end
    exp_h = ref_hash(e, key[e], qt, x0[e], x1, m);
    n_groups[e] = CW'(G); l_steps[e] = CW'(l); swap_sel[e] = sw;
    msg_valid[e] = (gaps == 0);
    if (inj == 1) set_fault(e, 1, 1);
    start[e] = 1'b1;
    @(posedge clk);
    #1 start[e] = 1'b0;
    cyc = 0;
    fork
      if (inj == 2) begin
        // the normal run's phase-2 step G-1 result enters the branch
        // registers Q+2G+1 clocks after start; flip one bit of it
        repeat (Q + 2 * G + 1) @(posedge clk);
        #2 set_fault(e, 2, 1);
        #4 set_fault(e, 2, 0);
      end
      while (!done[e]) begin
        logic xfer;
        @(negedge clk);
        if (gaps > 0 && !msg_valid[e]) msg_valid[e] = ($urandom % 100) >= gaps;
        #1;
        if (gaps > 0 && !msg_valid[e] && busy[e]) n_stall++;
        xfer = msg_valid[e] && msg_ready[e];
        @(posedge clk); #1;
        if (gaps > 0 && xfer) msg_valid[e] = ($urandom % 100) >= gaps;
        cyc++;
        if (cyc > 5000) break;
      end
    join
    if (inj == 1) set_fault(e, 1, 0);
    msg_valid[e] = 1'b0;
    n_mode[e]++;
    if (sw == SWAP_ADJACENT) n_adj++; else n_ilv++;
    if (l == 0) n_full++; else n_part++;
  endtask

  initial begin
    int cyc;
    blk_t exp_h;
    rst_n = 1'b0;
    qt = '0; x1 = '0;
    for (int e = 0; e < 3; e++) begin
      n_mode[e] = 0;
      start[e] = 0; msg_valid[e] = 0; n_groups[e] = CW'(G); l_steps[e] = 0;
      swap_sel[e] = SWAP_ADJACENT; key[e] = '0; x0[e] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int e = 0; e < 3; e++) begin
      int np2;
      np2 = (e == 0) ? 1 : 2;
      // 1. clean, adjacent, full check
      run_op(e, 0, SWAP_ADJACENT, 0, 0, cyc, exp_h);
      check($sformatf("hash e%0d adjacent", e), hash[e], exp_h);
      check("flags clean", 128'({err_p1[e], err_p2[e], err_lane[e]}), '0);
      check($sformatf("latency e%0d", e), 128'(cyc), 128'(Q + 3 + 2 * (G - 1 + np2)));
      // 2. clean, interleaved, partial check after 3 steps, with stalls
      run_op(e, 3, SWAP_INTERLEAVED, 35, 0, cyc, exp_h);
      check($sformatf("hash e%0d interleaved", e), hash[e], exp_h);
      check("flags clean", 128'({err_p1[e], err_p2[e], err_lane[e]}), '0);
      // 3. permanent fault in branch 10
      run_op(e, 0, SWAP_INTERLEAVED, 0, 1, cyc, exp_h);
      check("permanent fault flagged", 128'(err_p1[e]), 1);
      // branch 10 computes lane 10 (normal run) and lane 8 (interleaved run)
      check("faulty lanes", 128'(err_lane[e] & ~((64'd1 << 10) | (64'd1 << 8))), 0);
      if (err_p1[e]) n_det1++;
      // 4. transient fault in phase 2 of the normal run
      run_op(e, 0, SWAP_ADJACENT, 0, 2, cyc, exp_h);
      check("phase-2 fault flagged", 128'(err_p2[e]), 1);
      check("phase-1 clean", 128'(err_p1[e]), 0);
      if (err_p2[e]) n_det2++;
    end

    for (int e = 0; e < 3; e++) check($sformatf("mode %0d exercised", e), 128'(n_mode[e] > 0), 1);
    check("adjacent swap exercised", 128'(n_adj > 0), 1);
    check("interleaved swap exercised", 128'(n_ilv > 0), 1);
    check("full check exercised", 128'(n_full > 0), 1);
    check("partial check exercised", 128'(n_part > 0), 1);
    check("stall exercised", 128'(n_stall > 0), 1);
    check("phase-1 detection exercised", 128'(n_det1 > 0), 1);
    check("phase-2 detection exercised", 128'(n_det2 > 0), 1);
    $display("mechanisms: ops/mode %0d %0d %0d, adjacent %0d, interleaved %0d, full %0d, partial %0d, stall clocks %0d, p1 detections %0d, p2 detections %0d",
             n_mode[0], n_mode[1], n_mode[2], n_adj, n_ilv, n_full, n_part, n_stall, n_det1, n_det2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
