// split_bimode - Bi-Mode predictor with split history and split tables.
//
// The split-table counterpart of os_aware_bimode. User-mode branches use a
// pair of user direction tables (taken-biased and not-taken-biased),
// indexed by U-BHSR XOR address; kernel-mode branches use a pair of kernel
// direction tables indexed by K-BHSR XOR address. The choice table, indexed
// by address alone, is shared by both modes, as it holds no history.
// The mode bit picks which pair is read and which pair a commit trains.
//
// Update rules are those of Bi-Mode: only the chosen direction table of the
// branch's mode is trained, and the choice counter is trained with the
// outcome unless it chose against the outcome while the chosen direction
// counter was right.
//
// Default size: U_BITS = 13 and K_BITS = 10, i.e. user direction tables of
// 2 x 8K (16K, half of the 32K direction budget) and kernel direction
// tables of 2 x 1K (2K), with a 16K-entry choice table (CHOICE_BITS = 14).
// The 16K + 2K split follows the document's split configuration; dividing
// each part equally between the two direction tables and keeping one
// shared choice table are this design's reading.
//
// Interface and timing as os_aware_bimode, with indices and histories at
// max(U_BITS, K_BITS) bits (kernel values zero-extended) and a mode on the
// commit port.
module split_bimode
  import os_aware_pkg::*;
#(
  parameter int unsigned U_BITS          = 13,
  parameter int unsigned K_BITS          = 10,
  parameter int unsigned CHOICE_BITS     = 14,
  parameter int unsigned PC_LSB          = 2,
  parameter bit          ZERO_K_ON_ENTRY = 1'b0,
  localparam int unsigned IW             = (U_BITS > K_BITS) ? U_BITS : K_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            ready,
  input  logic            pred_valid,
  input  logic [PC_W-1:0] pred_pc,
  input  exec_mode_e      pred_mode,
  output logic            pred_taken,
  output logic            pred_choice,
  output logic [IW-1:0]   pred_idx,
  output logic [IW-1:0]   pred_hist,
  input  logic            res_valid,
  input  exec_mode_e      res_mode,
  input  logic [IW-1:0]   res_hist,
  input  logic            res_taken,
  input  logic            cmt_valid,
  input  exec_mode_e      cmt_mode,
  input  logic [PC_W-1:0] cmt_pc,
  input  logic [IW-1:0]   cmt_idx,
  input  logic            cmt_choice,
  input  logic            cmt_pred,
  input  logic            cmt_taken
);

  ctr2_t             choice_ctr, ut_ctr, un_ctr, kt_ctr, kn_ctr;
  logic              c_ready, ut_ready, un_ready, kt_ready, kn_ready;
  logic [U_BITS-1:0] u_idx;
  logic [K_BITS-1:0] k_idx;
  logic              choice_upd, cmt_k, cmt_u;
  logic              k_entry_unused;

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
    .k_entry    (k_entry_unused),
    .res_valid  (res_valid),
    .res_mode   (res_mode),
    .res_hist   (res_hist),
    .res_taken  (res_taken)
  );

  always_comb begin
    u_idx       = pred_hist[U_BITS-1:0] ^ pred_pc[PC_LSB +: U_BITS];
    k_idx       = pred_hist[K_BITS-1:0] ^ pred_pc[PC_LSB +: K_BITS];
    pred_choice = ctr_taken(choice_ctr);
    pred_idx    = '0;
    if (pred_mode == MODE_KERNEL) begin
      pred_idx[K_BITS-1:0] = k_idx;
      pred_taken           = pred_choice ? ctr_taken(kt_ctr) : ctr_taken(kn_ctr);
    end else begin
      pred_idx[U_BITS-1:0] = u_idx;
      pred_taken           = pred_choice ? ctr_taken(ut_ctr) : ctr_taken(un_ctr);
    end
    choice_upd = cmt_valid && !((cmt_choice != cmt_taken) && (cmt_pred == cmt_taken));
    cmt_k      = cmt_valid && (cmt_mode == MODE_KERNEL);
    cmt_u      = cmt_valid && (cmt_mode == MODE_USER);
  end

  bht #(.IDX_BITS(CHOICE_BITS)) u_choice (
    .clk (clk), .rst_n (rst_n), .ready (c_ready),
    .rd_idx (pred_pc[PC_LSB +: CHOICE_BITS]), .rd_ctr (choice_ctr),
    .upd_valid (choice_upd), .upd_idx (cmt_pc[PC_LSB +: CHOICE_BITS]), .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(U_BITS)) u_taken_dir (
    .clk (clk), .rst_n (rst_n), .ready (ut_ready),
    .rd_idx (u_idx), .rd_ctr (ut_ctr),
    .upd_valid (cmt_u && cmt_choice), .upd_idx (cmt_idx[U_BITS-1:0]), .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(U_BITS)) u_ntaken_dir (
    .clk (clk), .rst_n (rst_n), .ready (un_ready),
    .rd_idx (u_idx), .rd_ctr (un_ctr),
    .upd_valid (cmt_u && !cmt_choice), .upd_idx (cmt_idx[U_BITS-1:0]), .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(K_BITS)) k_taken_dir (
    .clk (clk), .rst_n (rst_n), .ready (kt_ready),
    .rd_idx (k_idx), .rd_ctr (kt_ctr),
    .upd_valid (cmt_k && cmt_choice), .upd_idx (cmt_idx[K_BITS-1:0]), .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(K_BITS)) k_ntaken_dir (
    .clk (clk), .rst_n (rst_n), .ready (kn_ready),
    .rd_idx (k_idx), .rd_ctr (kn_ctr),
    .upd_valid (cmt_k && !cmt_choice), .upd_idx (cmt_idx[K_BITS-1:0]), .upd_taken (cmt_taken)
  );

  assign ready = c_ready && ut_ready && un_ready && kt_ready && kn_ready;

endmodule
