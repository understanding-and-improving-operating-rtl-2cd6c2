// split_bhsr_gshare - Gshare predictor with split user/kernel history.
//
// A Gshare predictor indexes one table of 2-bit counters with the XOR of
// the global branch history and the low branch-address bits. Here the one
// global history register is replaced by two, U-BHSR and K-BHSR, and the
// execution-mode bit of the status register picks which of them is XORed
// with the address. Kernel branches therefore build their correlation from
// kernel history only, and a user program that resumes after an interrupt
// finds its own history untouched. The counter table stays shared: user
// and kernel branches divide it dynamically, so no mode gets less table
// than a conventional Gshare of the same size.
//
// Default size: HIST_BITS = 15, i.e. 15-bit histories and a 32K-entry
// table, the size the document's headline results use. The address bits
// used are pc[PC_LSB +: HIST_BITS]; PC_LSB = 2 skips the byte offset of
// 32-bit instructions.
//
// Interface and timing (all inputs sampled at the rising clock edge):
//   predict  - pred_valid/pred_pc/pred_mode in; pred_taken, pred_idx and
//              pred_hist out in the same cycle. The predicted direction is
//              shifted into the mode's history register at the edge.
//              The caller keeps pred_idx and pred_hist with the branch.
//   resolve  - res_valid marks a misprediction: res_mode/res_hist (the
//              branch's pred_hist)/res_taken repair that mode's history.
//   commit   - cmt_valid/cmt_idx (the branch's pred_idx)/cmt_taken step
//              the counter in order at commit.
//   ready    - low for 2**HIST_BITS cycles after reset while the table is
//              cleared.
// Speculative history with repair and counter update at commit follow the
// document's evaluation machine; the interface itself is this design's.
module split_bhsr_gshare
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
  output logic                 pred_taken,
  output logic [HIST_BITS-1:0] pred_idx,
  output logic [HIST_BITS-1:0] pred_hist,
  output logic                 k_entry,
  input  logic                 res_valid,
  input  exec_mode_e           res_mode,
  input  logic [HIST_BITS-1:0] res_hist,
  input  logic                 res_taken,
  input  logic                 cmt_valid,
  input  logic [HIST_BITS-1:0] cmt_idx,
  input  logic                 cmt_taken
);

  ctr2_t rd_ctr;

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
    .k_entry    (k_entry),
    .res_valid  (res_valid),
    .res_mode   (res_mode),
    .res_hist   (res_hist),
    .res_taken  (res_taken)
  );

  assign pred_idx   = pred_hist ^ pred_pc[PC_LSB +: HIST_BITS];
  assign pred_taken = ctr_taken(rd_ctr);

  bht #(.IDX_BITS(HIST_BITS)) u_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (ready),
    .rd_idx    (pred_idx),
    .rd_ctr    (rd_ctr),
    .upd_valid (cmt_valid),
    .upd_idx   (cmt_idx),
    .upd_taken (cmt_taken)
  );

endmodule
