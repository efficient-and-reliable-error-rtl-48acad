// tb_fault_campaign: LFSR-driven fault-injection campaign on the three hash
// engines (poly_hash_cser in HCH, HCTR and XCB mode) at Q = 8 branches with
// interleaved swapping and the full phase-1 check (l_steps = 0).
//
// How: a 32-bit maximal-length LFSR (x^32 + x^22 + x^2 + x + 1) picks the
// fault sites, stuck-at values and injection clocks. Faults are applied with
// force/release: a permanent fault holds one multiplier output bit at 0 or 1
// for the whole operation; a transient fault inverts one branch register bit
// for one clock, at a random clock of the RUN state. Each operation hashes
// G = 8..16 groups with random keys and data. Six fault models, 150
// injections each per mode:
//   single transient / permanent     one site
//   multiple transient / permanent   2-4 sites
//   biased transient / permanent     2-4 sites in the six leftmost branches
// Sites: bit 5, 42, 79 or 116 of any branch.
//
// Checks: an injection that corrupts the hash (compared with the plain-Horner
// reference) must raise err_p1 or err_p2; single faults may never corrupt it
// silently, and for every model at least 95 % of the corrupting injections
// must be flagged. Per-model coverage is printed. Timing: a watchdog ends the
// run after 2,000,000 clocks.
//
// From the published evaluation: LFSR-driven selection of fault position,
// value and time; single, multiple and biased models, transient and
// permanent; biased faults in the six leftmost branches. This bench's
// choices: the reduced size (Q = 8, 150 rather than up to 100,000 injections
// per model), the fixed set of bit sites, the 95 % threshold, and counting
// coverage over injections that actually change the hash.
module tb_fault_campaign;
  import tes_pkg::*;
  import gf_ref_pkg::*;

  localparam int unsigned Q    = 8;
  localparam int unsigned MAXG = 16;
  localparam int unsigned CW   = 16;
  localparam int unsigned NB   = 4;
  localparam int unsigned NINJ = 150;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic          rst_n;
  logic          start     [3];
  blk_t          hkey      [3];
  blk_t          q_term    [3];
  blk_t          x0        [3];
  blk_t          x1        [3];
  logic [CW-1:0] n_groups  [3];
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

  // fault controls: p = permanent (stuck-at on the multiplier output),
  // t = transient (inverted register bit while t_on is high)
  logic p_on  [3][Q][NB];
  logic p_val [3][Q][NB];
  logic t_on  [3][Q][NB];
  logic t_val [3][Q][NB];

  for (genvar e = 0; e < 3; e++) begin : g_eng
    poly_hash_cser #(.MODE(tes_mode_e'(e)), .Q(Q), .CNT_W(CW)) dut (
      .clk(clk), .rst_n(rst_n), .start(start[e]), .hkey(hkey[e]), .q_term(q_term[e]),
      .extra0(x0[e]), .extra1(x1[e]), .n_groups(n_groups[e]), .l_steps('0),
      .swap_sel(SWAP_INTERLEAVED), .msg_valid(1'b1), .msg_ready(msg_ready[e]),
      .msg_idx(msg_idx[e]), .msg(msg[e]), .busy(busy[e]), .done(done[e]), .hash(hash[e]),
      .err_p1(err_p1[e]), .err_p2(err_p2[e]), .err_lane(err_lane[e]));
    always_comb begin
      for (int k = 0; k < Q; k++) msg[e][k] = mem[e][msg_idx[e] % MAXG][k];
    end
    for (genvar b = 0; b < Q; b++) begin : g_b
      for (genvar t = 0; t < NB; t++) begin : g_t
        localparam int BIT = 5 + 37 * t;   // bits 5, 42, 79, 116
        always @(p_on[e][b][t]) begin
          if (p_on[e][b][t]) force g_eng[e].dut.g_branch[b].u_branch.p[BIT] = p_val[e][b][t];
          else release g_eng[e].dut.g_branch[b].u_branch.p[BIT];
        end
        always @(t_on[e][b][t]) begin
          if (t_on[e][b][t]) begin
            t_val[e][b][t] = ~g_eng[e].dut.g_branch[b].u_branch.r[BIT];
            force g_eng[e].dut.g_branch[b].u_branch.r[BIT] = t_val[e][b][t];
          end else begin
            release g_eng[e].dut.g_branch[b].u_branch.r[BIT];
          end
        end
      end
    end
  end

  // LFSR used for every random choice of the campaign
  logic [31:0] lfsr = 32'hACE1_2468;
  function automatic int unsigned lfsr_next(input int unsigned range);
    for (int i = 0; i < 32; i++)
      lfsr = {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
    return lfsr % range;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one transient flip of site (e,b,t) after 'at' clocks
  task automatic transient(input int e, input int b, input int t, input int at);
    repeat (at) @(posedge clk);
    #2 t_on[e][b][t] = 1'b1;
    #4 t_on[e][b][t] = 1'b0;
  endtask

  // model: 0 single, 1 multiple, 2 biased; perm: permanent or transient
  task automatic inject_op(input int e, input int model, input bit perm,
                           output bit effective, output bit detected);
    blk_t m [];
    blk_t exp_h;
    int g, nf, span;
    int fb [4], ft [4], fat [4];
    g = 8 + lfsr_next(MAXG - 7);
    m = new[g * Q];
    @(negedge clk);
    hkey[e] = rand128(); q_term[e] = rand128(); x0[e] = rand128(); x1[e] = rand128();
    for (int i = 0; i < g; i++)
      for (int k = 0; k < Q; k++) begin
        mem[e][i][k] = rand128();
        m[i*Q + k] = mem[e][i][k];
      end
    exp_h = ref_hash(e, hkey[e], q_term[e], x0[e], x1[e], m);
    n_groups[e] = CW'(g);
    nf = (model == 0) ? 1 : 2 + lfsr_next(3);
    span = 2 * (g - 1 + ((e == 0) ? 1 : 2)) + 2;   // clocks of the RUN state
    for (int i = 0; i < nf; i++) begin
      fb[i]  = (model == 2) ? lfsr_next(6) : lfsr_next(Q);
      ft[i]  = lfsr_next(NB);
      fat[i] = Q + 2 + lfsr_next(span);
      if (perm) begin
        p_val[e][fb[i]][ft[i]] = lfsr_next(2) == 1;
        p_on[e][fb[i]][ft[i]] = 1'b1;
      end
    end
    start[e] = 1'b1;
    @(posedge clk);
    #1 start[e] = 1'b0;
    fork
      if (!perm && nf > 0) transient(e, fb[0], ft[0], fat[0]);
      if (!perm && nf > 1) transient(e, fb[1], ft[1], fat[1]);
      if (!perm && nf > 2) transient(e, fb[2], ft[2], fat[2]);
      if (!perm && nf > 3) transient(e, fb[3], ft[3], fat[3]);
      while (!done[e]) @(posedge clk);
    join
    #1;
    for (int i = 0; i < nf; i++) p_on[e][fb[i]][ft[i]] = 1'b0;
    effective = (hash[e] !== exp_h);
    detected  = err_p1[e] | err_p2[e];
  endtask

  initial begin
    string mname [3] = '{"single", "multiple", "biased"};
    rst_n = 1'b0;
    for (int e = 0; e < 3; e++) begin
      start[e] = 0; n_groups[e] = 2;
      hkey[e] = '0; q_term[e] = '0; x0[e] = '0; x1[e] = '0;
      for (int b = 0; b < Q; b++)
        for (int t = 0; t < NB; t++) begin
          p_on[e][b][t] = 0; p_val[e][b][t] = 0; t_on[e][b][t] = 0;
        end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int model = 0; model < 3; model++) begin
      for (int perm = 0; perm < 2; perm++) begin
        for (int e = 0; e < 3; e++) begin
          int n_eff, n_det, n_det_eff, n_silent;
          n_eff = 0; n_det = 0; n_det_eff = 0; n_silent = 0;
          for (int i = 0; i < NINJ; i++) begin
            bit eff, det;
            inject_op(e, model, perm[0], eff, det);
            n_eff += eff; n_det += det; n_det_eff += (eff && det); n_silent += (eff && !det);
          end
          $display("mode %0d %-8s %-9s: %0d injections, %0d corrupt the hash, %0d flagged, %0d corrupt and flagged, %0d silent, coverage of corrupting faults %0d.%01d %%",
                   e, mname[model], perm ? "permanent" : "transient", NINJ, n_eff, n_det,
                   n_det_eff, n_silent,
                   (n_eff > 0) ? (1000 * n_det_eff / n_eff) / 10 : 100,
                   (n_eff > 0) ? (1000 * n_det_eff / n_eff) % 10 : 0);
          check($sformatf("injections take effect (mode %0d model %0d perm %0d)", e, model, perm),
                n_eff > 0);
          if (model == 0)
            check($sformatf("no silent single fault (mode %0d perm %0d)", e, perm), n_silent == 0);
          check($sformatf("coverage >= 95%% (mode %0d model %0d perm %0d)", e, model, perm),
                n_det_eff * 100 >= 95 * n_eff);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
