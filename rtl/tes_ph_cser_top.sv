// tes_ph_cser_top: the error-detecting polynomial hashes of the three
// Hash-Counter-Hash tweakable enciphering modes, side by side.
//
// Each engine is a Q-branch (default 64) parallel Horner hash over GF(2^128)
// with CSER error detection (recomputation with swapped entries through the
// sub-pipelined multipliers, see poly_hash_cser):
//   hch_*  : H = Qt + sum m_j R^(pi-j)                R = E_K(T), Qt = E_K(R + bin(n*pi))
//   hctr_* : H = sum m_j h^(pi-j+2) + bin(|m|) h
//   xcb_*  : H = sum m_j h^(pi-j+3) + T h^2 + (bin(|P|) || bin(|T|)) h
// The block cipher that produces R, Qt and the subkeys, and the counter-mode
// layer between the two hash calls, are outside this design: their values
// enter as ports.
//
// The three engines are independent; each has its own request, message and
// result ports with the protocol of poly_hash_cser (start in idle, message
// groups by msg_idx with valid/ready, done pulse with hash and error flags).
module tes_ph_cser_top
  import tes_pkg::*;
#(
  parameter int unsigned Q     = 64,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---------------- HCH
  input  logic             hch_start,
  input  blk_t             hch_rkey,       // R = E_K(T)
  input  blk_t             hch_qterm,      // Q = E_K(R + bin_n(n*pi))
  input  logic [CNT_W-1:0] hch_n_groups,
  input  logic [CNT_W-1:0] hch_l_steps,
  input  swap_e            hch_swap_sel,
  input  logic             hch_msg_valid,
  output logic             hch_msg_ready,
  output logic [CNT_W-1:0] hch_msg_idx,
  input  blk_t             hch_msg [Q],
  output logic             hch_busy,
  output logic             hch_done,
  output blk_t             hch_hash,
  output logic             hch_err_p1,
  output logic             hch_err_p2,
  output logic [Q-1:0]     hch_err_lane,
  // ---------------- HCTR
  input  logic             hctr_start,
  input  blk_t             hctr_hkey,      // h
  input  blk_t             hctr_len,       // bin_n(|m|)
  input  logic [CNT_W-1:0] hctr_n_groups,
  input  logic [CNT_W-1:0] hctr_l_steps,
  input  swap_e            hctr_swap_sel,
  input  logic             hctr_msg_valid,
  output logic             hctr_msg_ready,
  output logic [CNT_W-1:0] hctr_msg_idx,
  input  blk_t             hctr_msg [Q],
  output logic             hctr_busy,
  output logic             hctr_done,
  output blk_t             hctr_hash,
  output logic             hctr_err_p1,
  output logic             hctr_err_p2,
  output logic [Q-1:0]     hctr_err_lane,
  // ---------------- XCB
  input  logic             xcb_start,
  input  blk_t             xcb_hkey,       // h
  input  blk_t             xcb_tweak,      // T
  input  blk_t             xcb_len,        // bin_{n/2}(|P|) || bin_{n/2}(|T|)
  input  logic [CNT_W-1:0] xcb_n_groups,
  input  logic [CNT_W-1:0] xcb_l_steps,
  input  swap_e            xcb_swap_sel,
  input  logic             xcb_msg_valid,
  output logic             xcb_msg_ready,
  output logic [CNT_W-1:0] xcb_msg_idx,
  input  blk_t             xcb_msg [Q],
  output logic             xcb_busy,
  output logic             xcb_done,
  output blk_t             xcb_hash,
  output logic             xcb_err_p1,
  output logic             xcb_err_p2,
  output logic [Q-1:0]     xcb_err_lane
);

  poly_hash_cser #(.MODE(MODE_HCH), .Q(Q), .CNT_W(CNT_W)) u_hch (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (hch_start),
    .hkey      (hch_rkey),
    .q_term    (hch_qterm),
    .extra0    ('0),
    .extra1    ('0),
    .n_groups  (hch_n_groups),
    .l_steps   (hch_l_steps),
    .swap_sel  (hch_swap_sel),
    .msg_valid (hch_msg_valid),
    .msg_ready (hch_msg_ready),
    .msg_idx   (hch_msg_idx),
    .msg       (hch_msg),
    .busy      (hch_busy),
    .done      (hch_done),
    .hash      (hch_hash),
    .err_p1    (hch_err_p1),
    .err_p2    (hch_err_p2),
    .err_lane  (hch_err_lane)
  );

  poly_hash_cser #(.MODE(MODE_HCTR), .Q(Q), .CNT_W(CNT_W)) u_hctr (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (hctr_start),
    .hkey      (hctr_hkey),
    .q_term    ('0),
    .extra0    (hctr_len),
    .extra1    ('0),
    .n_groups  (hctr_n_groups),
    .l_steps   (hctr_l_steps),
    .swap_sel  (hctr_swap_sel),
    .msg_valid (hctr_msg_valid),
    .msg_ready (hctr_msg_ready),
    .msg_idx   (hctr_msg_idx),
    .msg       (hctr_msg),
    .busy      (hctr_busy),
    .done      (hctr_done),
    .hash      (hctr_hash),
    .err_p1    (hctr_err_p1),
    .err_p2    (hctr_err_p2),
    .err_lane  (hctr_err_lane)
  );

  poly_hash_cser #(.MODE(MODE_XCB), .Q(Q), .CNT_W(CNT_W)) u_xcb (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (xcb_start),
    .hkey      (xcb_hkey),
    .q_term    ('0),
    .extra0    (xcb_tweak),
    .extra1    (xcb_len),
    .n_groups  (xcb_n_groups),
    .l_steps   (xcb_l_steps),
    .swap_sel  (xcb_swap_sel),
    .msg_valid (xcb_msg_valid),
    .msg_ready (xcb_msg_ready),
    .msg_idx   (xcb_msg_idx),
    .msg       (xcb_msg),
    .busy      (xcb_busy),
    .done      (xcb_done),
    .hash      (xcb_hash),
    .err_p1    (xcb_err_p1),
    .err_p2    (xcb_err_p2),
    .err_lane  (xcb_err_lane)
  );

endmodule
