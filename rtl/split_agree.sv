// split_agree - Agree predictor with split history and split tables.
//
// The split-table counterpart of os_aware_agree: user-mode branches use a
// U-BHT of agree/disagree counters indexed by U-BHSR XOR address, kernel
// branches a K-BHT indexed by K-BHSR XOR address. The execution-mode bit
// picks the counter for a prediction and the table a commit trains, so a
// user branch and a kernel branch can never share a counter. A counter
// whose upper bit is set says "agree with the biasing bit"; the prediction
// is then the biasing bit, otherwise its complement. At commit the counter
// steps towards "agree" when the outcome equals the bias.
//
// Default size: U_BITS = 14 and K_BITS = 11, a 16K-entry U-BHT and a
// 2K-entry K-BHT (18K counters in place of a 32K-entry Agree), the
// document's configuration. Each history is as long as its table index.
//
// Interface and timing as split_gshare, plus the biasing bit from the
// host's branch target buffer on pred_bias and again on cmt_bias.
module split_agree
  import os_aware_pkg::*;
#(
  parameter int unsigned U_BITS          = 14,
  parameter int unsigned K_BITS          = 11,
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
  input  logic            pred_bias,
  output logic            pred_taken,
  output logic [IW-1:0]   pred_idx,
  output logic [IW-1:0]   pred_hist,
  input  logic            res_valid,
  input  exec_mode_e      res_mode,
  input  logic [IW-1:0]   res_hist,
  input  logic            res_taken,
  input  logic            cmt_valid,
  input  exec_mode_e      cmt_mode,
  input  logic [IW-1:0]   cmt_idx,
  input  logic            cmt_bias,
  input  logic            cmt_taken
);

  ctr2_t             u_ctr, k_ctr;
  logic              u_ready, k_ready, agree;
  logic [U_BITS-1:0] u_idx;
  logic [K_BITS-1:0] k_idx;
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
    u_idx    = pred_hist[U_BITS-1:0] ^ pred_pc[PC_LSB +: U_BITS];
    k_idx    = pred_hist[K_BITS-1:0] ^ pred_pc[PC_LSB +: K_BITS];
    pred_idx = '0;
    if (pred_mode == MODE_KERNEL) begin
      pred_idx[K_BITS-1:0] = k_idx;
      agree                = ctr_taken(k_ctr);
    end else begin
      pred_idx[U_BITS-1:0] = u_idx;
      agree                = ctr_taken(u_ctr);
    end
    pred_taken = agree ? pred_bias : !pred_bias;
  end

  bht #(.IDX_BITS(U_BITS)) u_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (u_ready),
    .rd_idx    (u_idx),
    .rd_ctr    (u_ctr),
    .upd_valid (cmt_valid && cmt_mode == MODE_USER),
    .upd_idx   (cmt_idx[U_BITS-1:0]),
    .upd_taken (cmt_taken == cmt_bias)
  );

  bht #(.IDX_BITS(K_BITS)) k_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .ready     (k_ready),
    .rd_idx    (k_idx),
    .rd_ctr    (k_ctr),
    .upd_valid (cmt_valid && cmt_mode == MODE_KERNEL),
    .upd_idx   (cmt_idx[K_BITS-1:0]),
    .upd_taken (cmt_taken == cmt_bias)
  );

  assign ready = u_ready && k_ready;

endmodule
