// os_aware_multi_hybrid - Multi-Hybrid predictor with a split-history Gshare.
//
// A Multi-Hybrid predictor runs several simple predictors in parallel and
// learns, per branch, which of them to trust. Its components, in priority
// order, are:
//   2bc     - 2-bit counters indexed by the branch address (4K entries)
//   GAs     - counters indexed by global history bits concatenated with
//             address bits (4K entries)
//   Gshare  - counters indexed by history XOR address (16K entries); in the
//             OS-aware form its history comes from split_history, so user
//             and kernel branches use their own history registers. With
//             GS_K_BITS > 0 the component is a split Gshare instead: a
//             2**GS_BITS-entry U-BHT and a 2**GS_K_BITS-entry K-BHT, each
//             indexed by its own mode's history (the "split predictor"
//             form; 8K + 2K replaces the 16K component)
//   Pshare  - counters indexed by the branch's own local history XOR
//             address (8K entries), local histories in a 1K-entry table
//   always taken
// The counter budget follows the document: half of a 32K total to Gshare,
// a quarter to Pshare and an eighth each to 2bc and GAs. The fast-warming
// 2bc and static components give usable predictions right after a context
// switch.
//
// Selection: each branch address selects one of 2K entries of five 2-bit
// selection counters (one per component; in the host these live in the
// branch target buffer). The prediction comes from the highest-priority
// component whose selection counter is 3, or from always-taken if none is.
// At commit: if some component that was right has its selection counter at
// 3, the counters of the components that were wrong are decremented;
// otherwise the counters of the components that were right are
// incremented. All selection counters start at 3. Every component counter
// table is trained with the outcome at commit; the local history of the
// branch is shifted at commit.
//
// The components, their budget split, their priority and the 2K x 5
// selection counters are the document's. The selection update rule, the
// GAs history/address split (8 + 4 bits), the local history table size,
// the non-speculative local histories and GAs using a conventional
// (unsplit) global history register are this design's choices.
//
// Interface and timing as split_bhsr_gshare; cmt_mode selects the Gshare
// table in the split form and is ignored otherwise. In the split form the
// kernel's Gshare index and history are zero-extended to GS_BITS. With a prediction the block
// returns everything the commit needs: pred_comp (the four table
// components' directions: bit 0 2bc, 1 GAs, 2 Gshare, 3 Pshare), the
// three history-based indices and the two global histories. The resolve
// port repairs both global history registers. The low GAS_ABITS bits of
// pred_gas_idx are address bits carried straight from pred_pc, so that the
// commit port gets the whole GAs index back; no state drives them.
module os_aware_multi_hybrid
  import os_aware_pkg::*;
#(
  parameter int unsigned GS_BITS         = 14,
  parameter int unsigned GS_K_BITS       = 0,
  parameter int unsigned PS_BITS         = 13,
  parameter int unsigned BC_BITS         = 12,
  parameter int unsigned GAS_HBITS       = 8,
  parameter int unsigned GAS_ABITS       = 4,
  parameter int unsigned LHT_BITS        = 10,
  parameter int unsigned SEL_BITS        = 11,
  parameter int unsigned PC_LSB          = 2,
  parameter bit          ZERO_K_ON_ENTRY = 1'b0,
  localparam int unsigned GAS_BITS       = GAS_HBITS + GAS_ABITS,
  localparam int unsigned NCOMP          = 5,
  localparam int unsigned GS_KH          = (GS_K_BITS == 0) ? GS_BITS : GS_K_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  input  logic                 pred_valid,
  input  logic [PC_W-1:0]      pred_pc,
  input  exec_mode_e           pred_mode,
  output logic                 pred_taken,
  output logic [2:0]           pred_sel,
  output logic [3:0]           pred_comp,
  output logic [GS_BITS-1:0]   pred_gs_idx,
  output logic [GS_BITS-1:0]   pred_hist,
  output logic [GAS_BITS-1:0]  pred_gas_idx,
  output logic [GAS_HBITS-1:0] pred_ghist,
  output logic [PS_BITS-1:0]   pred_ps_idx,
  input  logic                 res_valid,
  input  exec_mode_e           res_mode,
  input  logic [GS_BITS-1:0]   res_hist,
  input  logic [GAS_HBITS-1:0] res_ghist,
  input  logic                 res_taken,
  input  logic                 cmt_valid,
  input  exec_mode_e           cmt_mode,
  input  logic [PC_W-1:0]      cmt_pc,
  input  logic [3:0]           cmt_comp,
  input  logic [GS_BITS-1:0]   cmt_gs_idx,
  input  logic [GAS_BITS-1:0]  cmt_gas_idx,
  input  logic [PS_BITS-1:0]   cmt_ps_idx,
  input  logic                 cmt_taken
);

  typedef ctr2_t sel_t [NCOMP];

  // ---------------------------------------------------------------- state
  logic [PS_BITS-1:0] lht [2**LHT_BITS];   // local histories
  sel_t               sel [2**SEL_BITS];   // selection counters

  localparam int unsigned SWEEP_BITS = (LHT_BITS > SEL_BITS) ? LHT_BITS : SEL_BITS;
  logic                  sweep_busy;
  logic [SWEEP_BITS-1:0] sweep_idx;

  logic  bc_ready, gas_ready, gs_ready, ps_ready;
  ctr2_t bc_ctr, gas_ctr, gs_ctr, ps_ctr;
  logic  k_entry_unused;
  logic [GAS_HBITS-1:0] ghist;

  // ----------------------------------------------------------- predict
  logic [BC_BITS-1:0] bc_idx;
  logic [NCOMP-1:0]   comp_dir;
  sel_t               sel_rd;

  always_comb begin
    bc_idx       = pred_pc[PC_LSB +: BC_BITS];
    pred_gs_idx  = pred_hist ^ pred_pc[PC_LSB +: GS_BITS];
    if (GS_K_BITS != 0 && pred_mode == MODE_KERNEL) begin
      pred_gs_idx = '0;
      pred_gs_idx[GS_KH-1:0] = pred_hist[GS_KH-1:0] ^ pred_pc[PC_LSB +: GS_KH];
    end
    pred_gas_idx = {ghist, pred_pc[PC_LSB +: GAS_ABITS]};
    pred_ghist   = ghist;
    pred_ps_idx  = lht[pred_pc[PC_LSB +: LHT_BITS]] ^ pred_pc[PC_LSB +: PS_BITS];
    comp_dir     = {1'b1, ctr_taken(ps_ctr), ctr_taken(gs_ctr),
                    ctr_taken(gas_ctr), ctr_taken(bc_ctr)};
    pred_comp    = comp_dir[3:0];
    sel_rd       = sel[pred_pc[PC_LSB +: SEL_BITS]];
    // highest-priority component whose selection counter is saturated
    pred_sel     = 3'(NCOMP - 1);
    for (int c = NCOMP - 1; c >= 0; c--) begin
      if (sel_rd[c] == CTR_STRONG_T) pred_sel = 3'(c);
    end
    pred_taken   = comp_dir[pred_sel];
  end

  // ------------------------------------------------------------ commit
  logic [NCOMP-1:0] right;
  logic             top_right;
  sel_t             sel_cur, sel_nxt;
  logic [SEL_BITS-1:0] cmt_sel_a;
  logic [LHT_BITS-1:0] cmt_lht_a;

  always_comb begin
    cmt_sel_a = cmt_pc[PC_LSB +: SEL_BITS];
    cmt_lht_a = cmt_pc[PC_LSB +: LHT_BITS];
    right     = ~({1'b1, cmt_comp} ^ {NCOMP{cmt_taken}});
    sel_cur   = sel[cmt_sel_a];
    top_right = 1'b0;
    for (int c = 0; c < NCOMP; c++) begin
      if (right[c] && sel_cur[c] == CTR_STRONG_T) top_right = 1'b1;
    end
    for (int c = 0; c < NCOMP; c++) begin
      sel_nxt[c] = sel_cur[c];
      if (top_right && !right[c])  sel_nxt[c] = ctr_update(sel_cur[c], 1'b0);
      if (!top_right && right[c])  sel_nxt[c] = ctr_update(sel_cur[c], 1'b1);
    end
  end

  always_ff @(posedge clk) begin
    if (sweep_busy) begin
      lht[sweep_idx[LHT_BITS-1:0]] <= '0;
      for (int c = 0; c < NCOMP; c++) sel[sweep_idx[SEL_BITS-1:0]][c] <= CTR_STRONG_T;
    end else if (cmt_valid) begin
      lht[cmt_lht_a] <= {cmt_taken, lht[cmt_lht_a][PS_BITS-1:1]};
      sel[cmt_sel_a] <= sel_nxt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep_busy <= 1'b1;
      sweep_idx  <= '0;
    end else if (sweep_busy) begin
      sweep_idx <= sweep_idx + 1'b1;
      if (&sweep_idx) sweep_busy <= 1'b0;
    end
  end

  // -------------------------------------------------------- components
  split_history #(
    .U_BITS          (GS_BITS),
    .K_BITS          (GS_KH),
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

  bhsr #(.HIST_BITS(GAS_HBITS)) u_gas_hist (
    .clk        (clk),
    .rst_n      (rst_n),
    .hist       (ghist),
    .clear      (1'b0),
    .spec_valid (pred_valid),
    .spec_taken (pred_taken),
    .rep_valid  (res_valid),
    .rep_hist   (res_ghist),
    .rep_taken  (res_taken)
  );

  bht #(.IDX_BITS(BC_BITS)) u_bc (
    .clk (clk), .rst_n (rst_n), .ready (bc_ready),
    .rd_idx (bc_idx), .rd_ctr (bc_ctr),
    .upd_valid (cmt_valid), .upd_idx (cmt_pc[PC_LSB +: BC_BITS]), .upd_taken (cmt_taken)
  );

  bht #(.IDX_BITS(GAS_BITS)) u_gas (
    .clk (clk), .rst_n (rst_n), .ready (gas_ready),
    .rd_idx (pred_gas_idx), .rd_ctr (gas_ctr),
    .upd_valid (cmt_valid), .upd_idx (cmt_gas_idx), .upd_taken (cmt_taken)
  );

  if (GS_K_BITS == 0) begin : g_gs_shared
    logic unused_cmt_mode;
    assign unused_cmt_mode = cmt_mode;
    bht #(.IDX_BITS(GS_BITS)) u_gs (
      .clk (clk), .rst_n (rst_n), .ready (gs_ready),
      .rd_idx (pred_gs_idx), .rd_ctr (gs_ctr),
      .upd_valid (cmt_valid), .upd_idx (cmt_gs_idx), .upd_taken (cmt_taken)
    );
  end else begin : g_gs_split
    ctr2_t gs_u_ctr, gs_k_ctr;
    logic  gs_u_ready, gs_k_ready;
    bht #(.IDX_BITS(GS_BITS)) u_gs (
      .clk (clk), .rst_n (rst_n), .ready (gs_u_ready),
      .rd_idx (pred_gs_idx), .rd_ctr (gs_u_ctr),
      .upd_valid (cmt_valid && cmt_mode == MODE_USER), .upd_idx (cmt_gs_idx),
      .upd_taken (cmt_taken)
    );
    bht #(.IDX_BITS(GS_KH)) k_gs (
      .clk (clk), .rst_n (rst_n), .ready (gs_k_ready),
      .rd_idx (pred_gs_idx[GS_KH-1:0]), .rd_ctr (gs_k_ctr),
      .upd_valid (cmt_valid && cmt_mode == MODE_KERNEL), .upd_idx (cmt_gs_idx[GS_KH-1:0]),
      .upd_taken (cmt_taken)
    );
    assign gs_ctr   = (pred_mode == MODE_KERNEL) ? gs_k_ctr : gs_u_ctr;
    assign gs_ready = gs_u_ready && gs_k_ready;
  end

  bht #(.IDX_BITS(PS_BITS)) u_ps (
    .clk (clk), .rst_n (rst_n), .ready (ps_ready),
    .rd_idx (pred_ps_idx), .rd_ctr (ps_ctr),
    .upd_valid (cmt_valid), .upd_idx (cmt_ps_idx), .upd_taken (cmt_taken)
  );

  assign ready = !sweep_busy && bc_ready && gas_ready && gs_ready && ps_ready;

endmodule
