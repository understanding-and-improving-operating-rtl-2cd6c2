// os_aware_bp_top - OS-aware branch prediction, all variants side by side.
//
// The idea throughout: user code and kernel code branch very differently
// (kernel visits are short, exception-driven and biased differently), and
// when they share one history register and one counter table they destroy
// each other's state. The processor already knows which mode it is in, so
// the status register's mode bit is used to give each mode its own history
// (and, in the split predictor, its own table).
//
// The top decodes the mode bit once from the processor status register
// (mode_decode) and presents every fetched conditional branch to eight
// predictors that share that mode bit and the branch stream:
//   sbg - split_bhsr_gshare: split U/K history, one shared 32K table
//   sg  - split_gshare:      split U/K history, 16K U-BHT + 2K K-BHT
//   bm  - os_aware_bimode:   Bi-Mode with split U/K history
//   ag  - os_aware_agree:    Agree with split U/K history
//   mh  - os_aware_multi_hybrid: Multi-Hybrid whose Gshare part has split
//                            U/K history
//   sag - split_agree:       Agree with split history, 16K U-BHT + 2K K-BHT
//   sbm - split_bimode:      Bi-Mode with split history and split direction
//                            tables (8K+8K user, 1K+1K kernel)
//   smh - os_aware_multi_hybrid with its Gshare part split into an 8K U-BHT
//                            and a 2K K-BHT
// Each predictor is a complete alternative; a processor would use one. They
// are placed together so that one branch stream can exercise and compare
// them. Each has its own resolve (misprediction repair) and commit ports,
// because the state a branch carries back (index, history, choice) is
// different for each.
//
// The eight predictors, the 32K budget and the 16K + 2K split are the
// published configuration. Placing all of them in one top, and the
// per-predictor resolve and commit ports, are this design's choices.
//
// Interface and timing:
//   psr, pred_valid, pred_pc - the fetched branch; mode is the decoded
//     execution mode, which the caller keeps with the branch and returns
//     on the resolve and commit ports.
//   pred_bias - the branch's Agree biasing bit from the host's branch
//     target buffer (not part of this design); cmt_bias returns it.
//   Predictions are combinational in the cycle of pred_valid; history
//   registers shift at the following edge; counters are written at the
//   edge after a commit. ready rises when every table has been cleared
//   after reset (2**15 cycles at the default sizes). The low bits of
//   mh_gas_idx and smh_gas_idx are address bits passed through from
//   pred_pc (see os_aware_multi_hybrid).
module os_aware_bp_top
  import os_aware_pkg::*;
#(
  parameter int unsigned SBG_BITS = 15,
  parameter int unsigned SG_U_BITS = 14,
  parameter int unsigned SG_K_BITS = 11,
  parameter int unsigned BM_BITS = 14,
  parameter int unsigned AG_BITS = 15,
  parameter int unsigned MH_GS_BITS = 14,
  parameter int unsigned MH_PS_BITS = 13,
  parameter int unsigned MH_BC_BITS = 12,
  parameter int unsigned MH_GAS_HBITS = 8,
  parameter int unsigned MH_GAS_ABITS = 4,
  parameter int unsigned SAG_U_BITS = 14,
  parameter int unsigned SAG_K_BITS = 11,
  parameter int unsigned SBM_U_BITS = 13,
  parameter int unsigned SBM_K_BITS = 10,
  parameter int unsigned SBM_CHOICE_BITS = 14,
  parameter int unsigned SMH_GS_BITS = 13,
  parameter int unsigned SMH_GS_K_BITS = 11,
  localparam int unsigned MH_GAS_BITS = MH_GAS_HBITS + MH_GAS_ABITS,
  localparam int unsigned SG_W = (SG_U_BITS > SG_K_BITS) ? SG_U_BITS : SG_K_BITS,
  localparam int unsigned SAG_W = (SAG_U_BITS > SAG_K_BITS) ? SAG_U_BITS : SAG_K_BITS,
  localparam int unsigned SBM_W = (SBM_U_BITS > SBM_K_BITS) ? SBM_U_BITS : SBM_K_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  input  logic [31:0]         psr,
  input  logic                pred_valid,
  input  logic [PC_W-1:0]     pred_pc,
  input  logic                pred_bias,
  output exec_mode_e          mode,
  // split BHSR Gshare
  output logic                sbg_taken,
  output logic [SBG_BITS-1:0] sbg_idx,
  output logic [SBG_BITS-1:0] sbg_hist,
  input  logic                sbg_res_valid,
  input  exec_mode_e          sbg_res_mode,
  input  logic [SBG_BITS-1:0] sbg_res_hist,
  input  logic                sbg_res_taken,
  input  logic                sbg_cmt_valid,
  input  logic [SBG_BITS-1:0] sbg_cmt_idx,
  input  logic                sbg_cmt_taken,
  output logic                k_entry,
  // split Gshare
  output logic                sg_taken,
  output logic [SG_W-1:0]     sg_idx,
  output logic [SG_W-1:0]     sg_hist,
  input  logic                sg_res_valid,
  input  exec_mode_e          sg_res_mode,
  input  logic [SG_W-1:0]     sg_res_hist,
  input  logic                sg_res_taken,
  input  logic                sg_cmt_valid,
  input  exec_mode_e          sg_cmt_mode,
  input  logic [SG_W-1:0]     sg_cmt_idx,
  input  logic                sg_cmt_taken,
  // OS-aware Bi-Mode
  output logic                bm_taken,
  output logic                bm_choice,
  output logic [BM_BITS-1:0]  bm_idx,
  output logic [BM_BITS-1:0]  bm_hist,
  input  logic                bm_res_valid,
  input  exec_mode_e          bm_res_mode,
  input  logic [BM_BITS-1:0]  bm_res_hist,
  input  logic                bm_res_taken,
  input  logic                bm_cmt_valid,
  input  logic [PC_W-1:0]     bm_cmt_pc,
  input  logic [BM_BITS-1:0]  bm_cmt_idx,
  input  logic                bm_cmt_choice,
  input  logic                bm_cmt_pred,
  input  logic                bm_cmt_taken,
  // OS-aware Agree
  output logic                ag_taken,
  output logic [AG_BITS-1:0]  ag_idx,
  output logic [AG_BITS-1:0]  ag_hist,
  input  logic                ag_res_valid,
  input  exec_mode_e          ag_res_mode,
  input  logic [AG_BITS-1:0]  ag_res_hist,
  input  logic                ag_res_taken,
  input  logic                ag_cmt_valid,
  input  logic [AG_BITS-1:0]  ag_cmt_idx,
  input  logic                ag_cmt_bias,
  input  logic                ag_cmt_taken,
  // OS-aware Multi-Hybrid
  output logic                    mh_taken,
  output logic [2:0]              mh_sel,
  output logic [3:0]              mh_comp,
  output logic [MH_GS_BITS-1:0]   mh_gs_idx,
  output logic [MH_GS_BITS-1:0]   mh_hist,
  output logic [MH_GAS_BITS-1:0]  mh_gas_idx,
  output logic [MH_GAS_HBITS-1:0] mh_ghist,
  output logic [MH_PS_BITS-1:0]   mh_ps_idx,
  input  logic                    mh_res_valid,
  input  exec_mode_e              mh_res_mode,
  input  logic [MH_GS_BITS-1:0]   mh_res_hist,
  input  logic [MH_GAS_HBITS-1:0] mh_res_ghist,
  input  logic                    mh_res_taken,
  input  logic                    mh_cmt_valid,
  input  exec_mode_e              mh_cmt_mode,
  input  logic [PC_W-1:0]         mh_cmt_pc,
  input  logic [3:0]              mh_cmt_comp,
  input  logic [MH_GS_BITS-1:0]   mh_cmt_gs_idx,
  input  logic [MH_GAS_BITS-1:0]  mh_cmt_gas_idx,
  input  logic [MH_PS_BITS-1:0]   mh_cmt_ps_idx,
  input  logic                    mh_cmt_taken,
  // split Agree
  output logic                    sag_taken,
  output logic [SAG_W-1:0]        sag_idx,
  output logic [SAG_W-1:0]        sag_hist,
  input  logic                    sag_res_valid,
  input  exec_mode_e              sag_res_mode,
  input  logic [SAG_W-1:0]        sag_res_hist,
  input  logic                    sag_res_taken,
  input  logic                    sag_cmt_valid,
  input  exec_mode_e              sag_cmt_mode,
  input  logic [SAG_W-1:0]        sag_cmt_idx,
  input  logic                    sag_cmt_bias,
  input  logic                    sag_cmt_taken,
  // split Bi-Mode
  output logic                    sbm_taken,
  output logic                    sbm_choice,
  output logic [SBM_W-1:0]        sbm_idx,
  output logic [SBM_W-1:0]        sbm_hist,
  input  logic                    sbm_res_valid,
  input  exec_mode_e              sbm_res_mode,
  input  logic [SBM_W-1:0]        sbm_res_hist,
  input  logic                    sbm_res_taken,
  input  logic                    sbm_cmt_valid,
  input  exec_mode_e              sbm_cmt_mode,
  input  logic [PC_W-1:0]         sbm_cmt_pc,
  input  logic [SBM_W-1:0]        sbm_cmt_idx,
  input  logic                    sbm_cmt_choice,
  input  logic                    sbm_cmt_pred,
  input  logic                    sbm_cmt_taken,
  // Multi-Hybrid with split Gshare tables
  output logic                    smh_taken,
  output logic [2:0]              smh_sel,
  output logic [3:0]              smh_comp,
  output logic [SMH_GS_BITS-1:0]  smh_gs_idx,
  output logic [SMH_GS_BITS-1:0]  smh_hist,
  output logic [MH_GAS_BITS-1:0]  smh_gas_idx,
  output logic [MH_GAS_HBITS-1:0] smh_ghist,
  output logic [MH_PS_BITS-1:0]   smh_ps_idx,
  input  logic                    smh_res_valid,
  input  exec_mode_e              smh_res_mode,
  input  logic [SMH_GS_BITS-1:0]  smh_res_hist,
  input  logic [MH_GAS_HBITS-1:0] smh_res_ghist,
  input  logic                    smh_res_taken,
  input  logic                    smh_cmt_valid,
  input  exec_mode_e              smh_cmt_mode,
  input  logic [PC_W-1:0]         smh_cmt_pc,
  input  logic [3:0]              smh_cmt_comp,
  input  logic [SMH_GS_BITS-1:0]  smh_cmt_gs_idx,
  input  logic [MH_GAS_BITS-1:0]  smh_cmt_gas_idx,
  input  logic [MH_PS_BITS-1:0]   smh_cmt_ps_idx,
  input  logic                    smh_cmt_taken
);

  logic sbg_ready, sg_ready, bm_ready, ag_ready, mh_ready, sag_ready, sbm_ready, smh_ready;
  logic sg_k_entry_unused;

  mode_decode u_mode (
    .psr  (psr),
    .mode (mode)
  );

  split_bhsr_gshare #(.HIST_BITS(SBG_BITS)) u_sbg (
    .clk        (clk),
    .rst_n      (rst_n),
    .ready      (sbg_ready),
    .pred_valid (pred_valid),
    .pred_pc    (pred_pc),
    .pred_mode  (mode),
    .pred_taken (sbg_taken),
    .pred_idx   (sbg_idx),
    .pred_hist  (sbg_hist),
    .k_entry    (k_entry),
    .res_valid  (sbg_res_valid),
    .res_mode   (sbg_res_mode),
    .res_hist   (sbg_res_hist),
    .res_taken  (sbg_res_taken),
    .cmt_valid  (sbg_cmt_valid),
    .cmt_idx    (sbg_cmt_idx),
    .cmt_taken  (sbg_cmt_taken)
  );

  split_gshare #(.U_BITS(SG_U_BITS), .K_BITS(SG_K_BITS)) u_sg (
    .clk        (clk),
    .rst_n      (rst_n),
    .ready      (sg_ready),
    .pred_valid (pred_valid),
    .pred_pc    (pred_pc),
    .pred_mode  (mode),
    .pred_taken (sg_taken),
    .pred_idx   (sg_idx),
    .pred_hist  (sg_hist),
    .k_entry    (sg_k_entry_unused),
    .res_valid  (sg_res_valid),
    .res_mode   (sg_res_mode),
    .res_hist   (sg_res_hist),
    .res_taken  (sg_res_taken),
    .cmt_valid  (sg_cmt_valid),
    .cmt_mode   (sg_cmt_mode),
    .cmt_idx    (sg_cmt_idx),
    .cmt_taken  (sg_cmt_taken)
  );

  os_aware_bimode #(.HIST_BITS(BM_BITS), .CHOICE_BITS(BM_BITS)) u_bm (
    .clk         (clk),
    .rst_n       (rst_n),
    .ready       (bm_ready),
    .pred_valid  (pred_valid),
    .pred_pc     (pred_pc),
    .pred_mode   (mode),
    .pred_taken  (bm_taken),
    .pred_choice (bm_choice),
    .pred_idx    (bm_idx),
    .pred_hist   (bm_hist),
    .res_valid   (bm_res_valid),
    .res_mode    (bm_res_mode),
    .res_hist    (bm_res_hist),
    .res_taken   (bm_res_taken),
    .cmt_valid   (bm_cmt_valid),
    .cmt_pc      (bm_cmt_pc),
    .cmt_idx     (bm_cmt_idx),
    .cmt_choice  (bm_cmt_choice),
    .cmt_pred    (bm_cmt_pred),
    .cmt_taken   (bm_cmt_taken)
  );

  os_aware_agree #(.HIST_BITS(AG_BITS)) u_ag (
    .clk        (clk),
    .rst_n      (rst_n),
    .ready      (ag_ready),
    .pred_valid (pred_valid),
    .pred_pc    (pred_pc),
    .pred_mode  (mode),
    .pred_bias  (pred_bias),
    .pred_taken (ag_taken),
    .pred_idx   (ag_idx),
    .pred_hist  (ag_hist),
    .res_valid  (ag_res_valid),
    .res_mode   (ag_res_mode),
    .res_hist   (ag_res_hist),
    .res_taken  (ag_res_taken),
    .cmt_valid  (ag_cmt_valid),
    .cmt_idx    (ag_cmt_idx),
    .cmt_bias   (ag_cmt_bias),
    .cmt_taken  (ag_cmt_taken)
  );

  os_aware_multi_hybrid #(
    .GS_BITS   (MH_GS_BITS),
    .PS_BITS   (MH_PS_BITS),
    .BC_BITS   (MH_BC_BITS),
    .GAS_HBITS (MH_GAS_HBITS),
    .GAS_ABITS (MH_GAS_ABITS)
  ) u_mh (
    .clk          (clk),
    .rst_n        (rst_n),
    .ready        (mh_ready),
    .pred_valid   (pred_valid),
    .pred_pc      (pred_pc),
    .pred_mode    (mode),
    .pred_taken   (mh_taken),
    .pred_sel     (mh_sel),
    .pred_comp    (mh_comp),
    .pred_gs_idx  (mh_gs_idx),
    .pred_hist    (mh_hist),
    .pred_gas_idx (mh_gas_idx),
    .pred_ghist   (mh_ghist),
    .pred_ps_idx  (mh_ps_idx),
    .res_valid    (mh_res_valid),
    .res_mode     (mh_res_mode),
    .res_hist     (mh_res_hist),
    .res_ghist    (mh_res_ghist),
    .res_taken    (mh_res_taken),
    .cmt_valid    (mh_cmt_valid),
    .cmt_mode     (mh_cmt_mode),
    .cmt_pc       (mh_cmt_pc),
    .cmt_comp     (mh_cmt_comp),
    .cmt_gs_idx   (mh_cmt_gs_idx),
    .cmt_gas_idx  (mh_cmt_gas_idx),
    .cmt_ps_idx   (mh_cmt_ps_idx),
    .cmt_taken    (mh_cmt_taken)
  );

  split_agree #(.U_BITS(SAG_U_BITS), .K_BITS(SAG_K_BITS)) u_sag (
    .clk        (clk),
    .rst_n      (rst_n),
    .ready      (sag_ready),
    .pred_valid (pred_valid),
    .pred_pc    (pred_pc),
    .pred_mode  (mode),
    .pred_bias  (pred_bias),
    .pred_taken (sag_taken),
    .pred_idx   (sag_idx),
    .pred_hist  (sag_hist),
    .res_valid  (sag_res_valid),
    .res_mode   (sag_res_mode),
    .res_hist   (sag_res_hist),
    .res_taken  (sag_res_taken),
    .cmt_valid  (sag_cmt_valid),
    .cmt_mode   (sag_cmt_mode),
    .cmt_idx    (sag_cmt_idx),
    .cmt_bias   (sag_cmt_bias),
    .cmt_taken  (sag_cmt_taken)
  );

  split_bimode #(.U_BITS(SBM_U_BITS), .K_BITS(SBM_K_BITS), .CHOICE_BITS(SBM_CHOICE_BITS)) u_sbm (
    .clk         (clk),
    .rst_n       (rst_n),
    .ready       (sbm_ready),
    .pred_valid  (pred_valid),
    .pred_pc     (pred_pc),
    .pred_mode   (mode),
    .pred_taken  (sbm_taken),
    .pred_choice (sbm_choice),
    .pred_idx    (sbm_idx),
    .pred_hist   (sbm_hist),
    .res_valid   (sbm_res_valid),
    .res_mode    (sbm_res_mode),
    .res_hist    (sbm_res_hist),
    .res_taken   (sbm_res_taken),
    .cmt_valid   (sbm_cmt_valid),
    .cmt_mode    (sbm_cmt_mode),
    .cmt_pc      (sbm_cmt_pc),
    .cmt_idx     (sbm_cmt_idx),
    .cmt_choice  (sbm_cmt_choice),
    .cmt_pred    (sbm_cmt_pred),
    .cmt_taken   (sbm_cmt_taken)
  );

  os_aware_multi_hybrid #(
    .GS_BITS   (SMH_GS_BITS),
    .GS_K_BITS (SMH_GS_K_BITS),
    .PS_BITS   (MH_PS_BITS),
    .BC_BITS   (MH_BC_BITS),
    .GAS_HBITS (MH_GAS_HBITS),
    .GAS_ABITS (MH_GAS_ABITS)
  ) u_smh (
    .clk          (clk),
    .rst_n        (rst_n),
    .ready        (smh_ready),
    .pred_valid   (pred_valid),
    .pred_pc      (pred_pc),
    .pred_mode    (mode),
    .pred_taken   (smh_taken),
    .pred_sel     (smh_sel),
    .pred_comp    (smh_comp),
    .pred_gs_idx  (smh_gs_idx),
    .pred_hist    (smh_hist),
    .pred_gas_idx (smh_gas_idx),
    .pred_ghist   (smh_ghist),
    .pred_ps_idx  (smh_ps_idx),
    .res_valid    (smh_res_valid),
    .res_mode     (smh_res_mode),
    .res_hist     (smh_res_hist),
    .res_ghist    (smh_res_ghist),
    .res_taken    (smh_res_taken),
    .cmt_valid    (smh_cmt_valid),
    .cmt_mode     (smh_cmt_mode),
    .cmt_pc       (smh_cmt_pc),
    .cmt_comp     (smh_cmt_comp),
    .cmt_gs_idx   (smh_cmt_gs_idx),
    .cmt_gas_idx  (smh_cmt_gas_idx),
    .cmt_ps_idx   (smh_cmt_ps_idx),
    .cmt_taken    (smh_cmt_taken)
  );

  assign ready = sbg_ready && sg_ready && bm_ready && ag_ready && mh_ready &&
                 sag_ready && sbm_ready && smh_ready;

endmodule
