// poly_hash_cser: q-branch parallel polynomial hash of one Hash-Counter-Hash
// mode (HCH, HCTR or XCB) with CSER error detection.
//
// Hash computed (K = hash subkey, m_1..m_pi the message blocks, pi = G*Q):
//   HCH : H = Qt + sum_j m_j K^(pi-j)                      (Qt = q_term input)
//   HCTR: H = sum_j m_j K^(pi-j+2) + X0 K                   (X0 = bin_n(|m|))
//   XCB : H = sum_j m_j K^(pi-j+3) + X0 K^2 + X1 K          (X0 = T,
//                                                            X1 = len(P)||len(T))
// Branch k (0-based) owns the lane chain m_{iQ+k+1}, i = 0..G-1.
//   Phase 1, steps 0..G-2 : r_k <- (r_k + m_{sQ+k+1}) * K^Q           (Horner)
//   Phase 2, step G-1     : r_k <- (r_k + last block of lane) * K^a(k)
//   Phase 2, step G       : r_k <- (r_k + X) * K^b(k)   (HCTR, XCB only; X is
//                            X0 for branch 0, X1 for branch 1 in XCB, else 0)
//   Phase 3               : H = XOR of all r_k (+ Qt for HCH)
// with the exponent tables a(k), b(k) of tes_pkg.
//
// Error detection (CSER): every step is run twice, interleaved through the
// one-stage sub-pipelined multipliers. On even clocks ("slot 0") the normal
// run issues, on odd clocks ("slot 1") the recomputation run issues the same
// step. In phase 1 the recomputation run feeds every branch with its swap
// partner's entry (adjacent or interleaved, swap_sel), so a faulty multiplier
// disturbs different lanes in the two runs. After l steps (l_steps; 0 or
// >= G-1 means all G-1 phase-1 steps) the normal run's registers are stored
// and compared with the recomputation run's registers mapped back to lane
// order; with l < G-1 the recomputation run then idles until phase 2.
// Phase 2 and 3 are recomputed without swapping: the recomputation run
// restarts from the stored phase-1 result of the normal run, and the two
// final XOR-tree outputs are compared.
//
// Interface: start (in idle) takes hkey, q_term, extra0/1, n_groups (G >= 2),
// l_steps and swap_sel. The subkey powers are computed first (Q clocks).
// Message groups are requested in order: msg_idx names the group, msg holds
// Q blocks (msg[k] = m_{idx*Q+k+1}) and must stay valid and stable until
// msg_ready; while a needed group is not valid the whole engine stalls.
// done pulses with hash, err_p1 (phase-1 mismatch), err_p2 (final
// mismatch) and err_lane valid; they hold until the next start.
// Latency without stalls: done is high Q + 3 + 2*(G-1+P2) clocks after the
// start clock (Q for the key powers, two clocks per step for the two runs),
// P2 = 1 (HCH) or 2 (HCTR, XCB).
//
// The branch structure, swap variants, the choice between checking after l
// steps or after all of phase 1, and unswapped recomputation of phases 2 and
// 3 follow the scheme. The interleaving of the two runs in the pipeline, the
// message handshake and the flag encoding are this design's choices.
module poly_hash_cser
  import tes_pkg::*;
#(
  parameter tes_mode_e   MODE  = MODE_HCH,
  parameter int unsigned Q     = 64,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // operation request
  input  logic             start,
  input  blk_t             hkey,
  input  blk_t             q_term,
  input  blk_t             extra0,
  input  blk_t             extra1,
  input  logic [CNT_W-1:0] n_groups,
  input  logic [CNT_W-1:0] l_steps,
  input  swap_e            swap_sel,
  // message groups
  input  logic             msg_valid,
  output logic             msg_ready,
  output logic [CNT_W-1:0] msg_idx,
  input  blk_t             msg [Q],
  // result
  output logic             busy,
  output logic             done,
  output blk_t             hash,
  output logic             err_p1,
  output logic             err_p2,
  output logic [Q-1:0]     err_lane
);

  localparam int unsigned NP2 = p2_steps(MODE);

  initial begin
    assert (Q >= 4 && Q % 4 == 0) else $error("poly_hash_cser: Q must be a multiple of 4");
  end

  typedef enum logic [1:0] {ST_IDLE, ST_KEYGEN, ST_RUN} state_e;
  state_e state;

  // latched request
  blk_t             q_term_q, extra0_q, extra1_q;
  logic [CNT_W-1:0] g_last;   // G-1: index of the last group, first phase-2 step
  logic [CNT_W-1:0] l_chk;    // phase-1 step after which the runs are compared
  logic [CNT_W-1:0] t_end;    // number of steps per run
  swap_e            swap_q;

  logic [CNT_W-1:0] step;
  logic             slot;     // 0: normal run issues, 1: recomputation run

  // ---------------------------------------------------------------- key powers
  logic kg_start, kg_busy, kg_ready, kg_done;
  blk_t pow [Q+1];

  assign kg_start = (state == ST_IDLE) && start;

  key_power_gen #(.Q(Q)) u_kpow (
    .clk   (clk),
    .rst_n (rst_n),
    .start (kg_start),
    .key   (hkey),
    .busy  (kg_busy),
    .ready (kg_ready),
    .done  (kg_done),
    .pow   (pow)
  );

  // ---------------------------------------------------------------- control
  logic run, in_p1, at_last, at_extra, at_end;
  logic s_uses_msg, need_msg, en;

  always_comb begin
    run        = (state == ST_RUN);
    in_p1      = (step < g_last);
    at_last    = (step == g_last);
    at_extra   = (NP2 == 2) && (step == g_last + CNT_W'(1));
    at_end     = (step == t_end);
    // the recomputation run reads the group in its checked phase-1 steps and
    // in the first phase-2 step
    s_uses_msg = (step < l_chk) || at_last;
    need_msg   = run && (in_p1 || at_last) && (!slot || s_uses_msg);
    en         = run && !(need_msg && !msg_valid);
    msg_ready  = en && need_msg && (slot || !s_uses_msg);
    msg_idx    = step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      step   <= '0;
      slot   <= 1'b0;
      done   <= 1'b0;
      g_last <= '0;
      l_chk  <= '0;
      t_end  <= '0;
      swap_q <= SWAP_ADJACENT;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (start) begin
            state  <= ST_KEYGEN;
            g_last <= n_groups - CNT_W'(1);
            t_end  <= n_groups - CNT_W'(1) + CNT_W'(NP2);
            l_chk  <= (l_steps == '0 || l_steps >= n_groups - CNT_W'(1))
                      ? n_groups - CNT_W'(1) : l_steps;
            swap_q <= swap_sel;
            step   <= '0;
            slot   <= 1'b0;
          end
        end
        ST_KEYGEN: begin
          if (kg_ready) state <= ST_RUN;
        end
        ST_RUN: begin
          if (en) begin
            slot <= ~slot;
            if (slot) step <= step + CNT_W'(1);
            if (at_end && slot) begin
              state <= ST_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == ST_IDLE && start) begin
      q_term_q <= q_term;
      extra0_q <= extra0;
      extra1_q <= extra1;
    end
  end

  assign busy = (state != ST_IDLE);

  // ---------------------------------------------------------------- swap
  blk_t msg_sw [Q];

  cser_swap #(.Q(Q)) u_swap (
    .swap_sel (swap_q),
    .din      (msg),
    .dout     (msg_sw)
  );

  // ---------------------------------------------------------------- branches
  blk_t r   [Q];
  blk_t chk [Q];

  for (genvar k = 0; k < Q; k++) begin : g_branch
    localparam int unsigned EA = exp_p2a(k, Q, MODE);
    localparam int unsigned EB = exp_p2b(k, MODE);

    blk_t     m_k, k_k, x_k;
    acc_sel_e acc_k;

    // phase-2 extra input of this branch
    if (k == 0 && mode_off(MODE) >= 2) begin : g_x0
      assign x_k = extra0_q;
    end else if (k == 1 && mode_off(MODE) >= 3) begin : g_x1
      assign x_k = extra1_q;
    end else begin : g_x_none
      assign x_k = '0;
    end

    always_comb begin
      acc_k = ACC_R;
      m_k   = '0;
      k_k   = pow[Q];
      if (in_p1) begin
        acc_k = (step == '0) ? ACC_ZERO : ACC_R;
        m_k   = slot ? msg_sw[k] : msg[k];
      end else if (at_last) begin
        acc_k = slot ? ACC_ALT : ACC_R;
        m_k   = msg[k];
        k_k   = pow[EA];
      end else if (at_extra) begin
        m_k   = x_k;
        k_k   = pow[EB];
      end
    end

    hash_branch #(.PIPE(1'b1)) u_branch (
      .clk     (clk),
      .en      (en),
      .acc_sel (acc_k),
      .alt     (chk[k]),
      .m       (m_k),
      .k       (k_k),
      .r       (r[k])
    );
  end

  // ---------------------------------------------------------------- phase 3
  blk_t tree_sum;

  xor_tree #(.Q(Q)) u_tree (
    .r     (r),
    .extra ((MODE == MODE_HCH) ? q_term_q : '0),
    .sum   (tree_sum)
  );

  // ---------------------------------------------------------------- checker
  logic cap_chk, cmp_chk, cap_hash, cmp_hash;

  always_comb begin
    cap_chk  = en && !slot && ((step == l_chk) || at_last);
    cmp_chk  = en &&  slot &&  (step == l_chk);
    cap_hash = en && !slot && at_end;
    cmp_hash = en &&  slot && at_end;
  end

  cser_checker #(.Q(Q)) u_check (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (kg_start),
    .swap_sel (swap_q),
    .r        (r),
    .cap_chk  (cap_chk),
    .cmp_chk  (cmp_chk),
    .hash_in  (tree_sum),
    .cap_hash (cap_hash),
    .cmp_hash (cmp_hash),
    .chk      (chk),
    .hash     (hash),
    .err_lane (err_lane),
    .err_p1   (err_p1),
    .err_p2   (err_p2)
  );

  // ---------------------------------------------------------------- rules
  // a group offered with valid must stay offered until it is taken
  property p_valid_held;
    @(posedge clk) disable iff (!rst_n) (msg_valid && need_msg && !msg_ready) |=> msg_valid;
  endproperty
  a_valid_held: assert property (p_valid_held)
    else $error("poly_hash_cser: msg_valid dropped before msg_ready");

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("poly_hash_cser: start while busy");

  a_groups: assert property (@(posedge clk) disable iff (!rst_n)
                             (start && !busy) |-> (n_groups >= CNT_W'(2)))
    else $error("poly_hash_cser: n_groups must be at least 2");

endmodule
