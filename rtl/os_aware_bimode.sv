// os_aware_bimode - Bi-Mode predictor built on the split user/kernel history.
//
// Bi-Mode keeps two direction tables of 2-bit counters, one meant for
// mostly-taken branches and one for mostly-not-taken branches, both indexed
// Gshare-style by history XOR address, plus a choice table indexed by the
// address alone. The choice counter decides which direction table gives the
// prediction, so branches with opposite biases that alias in the index land
// in different tables. The OS-aware form replaces the single global history
// with split_history: user-mode and kernel-mode branches index the
// direction tables with their own mode's history.
//
// Update at commit, as in the usual Bi-Mode scheme: only the direction
// table that was chosen is trained; the choice counter is trained with the
// outcome except when it chose against the outcome and the chosen
// direction counter was nevertheless right.
//
// Default size: two 16K-entry direction tables (HIST_BITS = 14, 32K
// direction counters) and a 16K-entry choice table (CHOICE_BITS = 14), the
// 1.5x Gshare cost the document lists for Bi-Mode at 32K entries. How that
// budget divides into the three tables is this design's reading.
//
// Interface and timing: predict, resolve and ready as split_bhsr_gshare.
// pred_choice (1 = the taken-biased table was used) travels with the
// branch together with pred_idx, pred_hist and pred_taken, and comes back
// on the commit port as cmt_choice and cmt_pred with cmt_pc and cmt_idx.
module os_aware_bimode
  import os_aware_pkg::*;
#(
  parameter int unsigned HIST_BITS       = 14,
  parameter int unsigned CHOICE_BITS     = 14,
  parameter int unsigned PC_LSB          = 2,
  parameter bit          ZERO_K_ON_ENTRY = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  input  logic                 pred_valid,
  input  logic [PC_W-1:0]      pred_pc,
  input  exec_mode_e           pred_mode,
  output logic                 pred_taken,
  output logic                 pred_choice,
  output logic [HIST_BITS-1:0] pred_idx,
  output logic [HIST_BITS-1:0] pred_hist,
  input  logic                 res_valid,
  input  exec_mode_e           res_mode,
  input  logic [HIST_BITS-1:0] res_hist,
  input  logic                 res_taken,
  input  logic                 cmt_valid,
  input  logic [PC_W-1:0]      cmt_pc,
  input  logic [HIST_BITS-1:0] cmt_idx,
  input  logic                 cmt_choice,
  input  logic                 cmt_pred,
  input  logic                 cmt_taken
);

  ctr2_t choice_ctr, t_ctr, nt_ctr;
  logic  c_ready, t_ready, nt_ready;
  logic  choice_upd;
  logic  k_entry_unused;

  split_history #(
    .U_BITS          (HIST_BITS),
    .K_BITS          (HIST_BITS),
    .ZERO_K_ON_ENTRY (ZERO_K_ON_ENTRY)
  ) u_split_hist (
    .clk        (clk),
    .rst_n      (rst_n),
    .pred_valid (pred_valid),
    .pred_mode  (pred_mode),
    .pred_taken (pred_taken),
    .act_hist   (pred_hist),
    .k_entry    (k_entry_unused),
    .res_valid  (res_valid),
    .res_mode   (res_mode),
    .res_hist   (res_hist),
    .res_taken  (res_taken)
  );

  always_comb begin
    pred_idx    = pred_hist ^ pred_pc[PC_LSB +: HIST_BITS];
    pred_choice = ctr_taken(choice_ctr);
    pred_taken  = pred_choice ? ctr_taken(t_ctr) : ctr_taken(nt_ctr);
    // Skip the choice update when it chose against the outcome but the
    // chosen direction counter still predicted correctly.
    choice_upd  = cmt_valid && !((cmt_choice != cmt_taken) && (cmt_pred == cmt_taken));
  end

  bht #(.IDX_BITS(CHOICE_BITS)) u_choice (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (c_ready),
    .rd_idx    (pred_pc[PC_LSB +: CHOICE_BITS]),
    .rd_ctr    (choice_ctr),
    .upd_valid (choice_upd),
    .upd_idx   (cmt_pc[PC_LSB +: CHOICE_BITS]),
    .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(HIST_BITS)) u_taken_dir (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (t_ready),
    .rd_idx    (pred_idx),
    .rd_ctr    (t_ctr),
    .upd_valid (cmt_valid && cmt_choice),
    .upd_idx   (cmt_idx),
    .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(HIST_BITS)) u_ntaken_dir (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (nt_ready),
    .rd_idx    (pred_idx),
    .rd_ctr    (nt_ctr),
    .upd_valid (cmt_valid && !cmt_choice),
    .upd_idx   (cmt_idx),
    .upd_taken (cmt_taken)
  );

  assign ready = c_ready && t_ready && nt_ready;

endmodule
