// split_gshare - Gshare predictor with split history and split tables.
//
// Splitting the history registers still lets a user branch and a kernel
// branch with the same XORed index fight over one counter. This predictor
// also splits the counter table: a U-BHT indexed by U-BHSR XOR address for
// user-mode branches and a K-BHT indexed by K-BHSR XOR address for
// kernel-mode branches. The execution-mode bit selects which table's
// counter becomes the prediction and which table a committing branch
// updates, so user/kernel aliasing is gone entirely. Because the kernel
// has far fewer active branch sites, its table is small.
//
// Default size: U_BITS = 14 (16K-entry U-BHT, half of a 32K Gshare) and
// K_BITS = 11 (2K-entry K-BHT), 18K counters in all, the document's main
// configuration. Each history register is as long as its table's index.
// The address bits used are pc[PC_LSB +: U_BITS] or pc[PC_LSB +: K_BITS].
//
// Interface and timing: as split_bhsr_gshare, with indices and histories
// carried at IW = max(U_BITS, K_BITS) bits (the kernel's are
// zero-extended) and a mode on the commit port to pick the table. ready
// rises once both tables are cleared (2**max(U_BITS, K_BITS) cycles).
// Both tables are read every cycle and the mode bit picks one counter.
module split_gshare
  import os_aware_pkg::*;
#(
  parameter int unsigned U_BITS          = 14,
  parameter int unsigned K_BITS          = 11,
  parameter int unsigned PC_LSB          = 2,
  parameter bit          ZERO_K_ON_ENTRY = 1'b0,
  localparam int unsigned IW             = (U_BITS > K_BITS) ? U_BITS : K_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          ready,
  input  logic          pred_valid,
  input  logic [PC_W-1:0] pred_pc,
  input  exec_mode_e    pred_mode,
  output logic          pred_taken,
  output logic [IW-1:0] pred_idx,
  output logic [IW-1:0] pred_hist,
  output logic          k_entry,
  input  logic          res_valid,
  input  exec_mode_e    res_mode,
  input  logic [IW-1:0] res_hist,
  input  logic          res_taken,
  input  logic          cmt_valid,
  input  exec_mode_e    cmt_mode,
  input  logic [IW-1:0] cmt_idx,
  input  logic          cmt_taken
);

  ctr2_t             u_ctr, k_ctr;
  logic              u_ready, k_ready;
  logic [U_BITS-1:0] u_idx;
  logic [K_BITS-1:0] k_idx;

  split_history #(
    .U_BITS          (U_BITS),
    .K_BITS          (K_BITS),
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

  always_comb begin
    u_idx    = pred_hist[U_BITS-1:0] ^ pred_pc[PC_LSB +: U_BITS];
    k_idx    = pred_hist[K_BITS-1:0] ^ pred_pc[PC_LSB +: K_BITS];
    pred_idx = '0;
    if (pred_mode == MODE_KERNEL) begin
      pred_idx[K_BITS-1:0] = k_idx;
      pred_taken           = ctr_taken(k_ctr);
    end else begin
      pred_idx[U_BITS-1:0] = u_idx;
      pred_taken           = ctr_taken(u_ctr);
    end
  end

  bht #(.IDX_BITS(U_BITS)) u_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (u_ready),
    .rd_idx    (u_idx),
    .rd_ctr    (u_ctr),
    .upd_valid (cmt_valid && cmt_mode == MODE_USER),
    .upd_idx   (cmt_idx[U_BITS-1:0]),
    .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(K_BITS)) k_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (k_ready),
    .rd_idx    (k_idx),
    .rd_ctr    (k_ctr),
    .upd_valid (cmt_valid && cmt_mode == MODE_KERNEL),
    .upd_idx   (cmt_idx[K_BITS-1:0]),
    .upd_taken (cmt_taken)
  );

  assign ready = u_ready && k_ready;

endmodule
