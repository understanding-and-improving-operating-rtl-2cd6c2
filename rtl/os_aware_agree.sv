// os_aware_agree - Agree predictor built on the split user/kernel history.
//
// An Agree predictor attaches to every branch a biasing bit, its most
// likely direction, kept in the branch target buffer. The counter table is
// indexed Gshare-style, but its counters predict whether the branch will
// agree with its biasing bit rather than its direction. Two aliasing
// branches that both usually follow their own bias then push a shared
// counter the same way, whatever their directions. The OS-aware form
// takes the Gshare history from split_history, so user-mode and
// kernel-mode branches index the table with their own mode's history.
//
// The biasing bit lives in the host's branch target buffer, which is not
// part of this block: it arrives with each prediction (pred_bias) and again
// with each commit (cmt_bias). Prediction = bias when the counter says
// "agree", its complement otherwise. At commit the counter steps towards
// "agree" when the outcome equals the bias and towards "disagree"
// otherwise. A counter that says "agree" has its upper bit set.
//
// Default size: HIST_BITS = 15, a 32K-entry table.
// Interface and timing: predict, resolve, commit and ready as
// split_bhsr_gshare, plus the two bias inputs.
module os_aware_agree
  import os_aware_pkg::*;
#(
  parameter int unsigned HIST_BITS       = 15,
  parameter int unsigned PC_LSB          = 2,
  parameter bit          ZERO_K_ON_ENTRY = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  input  logic                 pred_valid,
  input  logic [PC_W-1:0]      pred_pc,
  input  exec_mode_e           pred_mode,
  input  logic                 pred_bias,
  output logic                 pred_taken,
  output logic [HIST_BITS-1:0] pred_idx,
  output logic [HIST_BITS-1:0] pred_hist,
  input  logic                 res_valid,
  input  exec_mode_e           res_mode,
  input  logic [HIST_BITS-1:0] res_hist,
  input  logic                 res_taken,
  input  logic                 cmt_valid,
  input  logic [HIST_BITS-1:0] cmt_idx,
  input  logic                 cmt_bias,
  input  logic                 cmt_taken
);

  ctr2_t rd_ctr;
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

  assign pred_idx   = pred_hist ^ pred_pc[PC_LSB +: HIST_BITS];
  assign pred_taken = ctr_taken(rd_ctr) ? pred_bias : !pred_bias;

  bht #(.IDX_BITS(HIST_BITS)) u_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (ready),
    .rd_idx    (pred_idx),
    .rd_ctr    (rd_ctr),
    .upd_valid (cmt_valid),
    .upd_idx   (cmt_idx),
    .upd_taken (cmt_taken == cmt_bias)
  );

endmodule
