// tb_os_aware_bp_top - end-to-end run of all OS-aware predictors at full size.
//
// The bench builds a branch trace with the shape that makes user/kernel
// interference hurt: a user program (64 branch sites in a loop: loop
// branches, biased branches, branches correlated with their predecessor,
// random branches) interrupted at random points by short kernel visits:
//   TLB refill  - one always-taken branch, entered with EXL set
//   scheduler   - six branches that follow a slowly drifting system load,
//                 weakly biased overall, kernel KSU level
//   exception   - a dispatch decision tree, not-taken, not-taken, taken
//                 (interrupt) or not-taken x3, taken (system call)
// The trace is played through a small pipeline model: up to four
// unresolved branches in flight, each resolved and committed in order six
// cycles after it was fetched. When any predictor mispredicted the oldest
// branch, every predictor's history is repaired with its checkpoint and the
// true direction, the younger branches are squashed and fetched again. So
// every predictor sees the same correct-path stream, with speculative
// history, repair and in-order commit as in a real front end.
//
// Checks: the tables clear in 2**15 cycles; every prediction of the
// split-history Gshare and the split Gshare equals a model kept in the
// bench; every mechanism happens (mode switches both ways, kernel entry by
// EXL and by KSU, repairs and squashes, a full window stalling fetch,
// commits to both split tables, both Bi-Mode direction tables and both
// kernel ones of the split-table Bi-Mode, Agree "disagree" predictions in
// both Agree forms, at least three components selected in both
// Multi-Hybrid forms); every predictor is right on more than 80% of branches; and
// the split-history Gshare mispredicts fewer branches in all than a
// conventional 32K Gshare with one shared history, modelled in the bench
// on the same trace (user and kernel counts are printed separately). All
// predictor parameters are at their defaults.
module tb_os_aware_bp_top;
  import os_aware_pkg::*;

  localparam int NTR    = 300000;
  localparam int WIN    = 4;
  localparam int RESLAT = 6;
  localparam logic [31:0] PSR_USER = 32'h0000_0010;  // KSU = user
  localparam logic [31:0] PSR_EXL  = 32'h0000_0012;  // user KSU, EXL set
  localparam logic [31:0] PSR_KERN = 32'h0000_0000;  // KSU = kernel

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT pins
  logic ready, pred_valid, pred_bias, k_entry;
  logic [31:0] psr, pred_pc;
  exec_mode_e mode;
  logic sbg_taken, sbg_res_valid, sbg_res_taken, sbg_cmt_valid, sbg_cmt_taken;
  logic [14:0] sbg_idx, sbg_hist, sbg_res_hist, sbg_cmt_idx;
  exec_mode_e sbg_res_mode;
  logic sg_taken, sg_res_valid, sg_res_taken, sg_cmt_valid, sg_cmt_taken;
  logic [13:0] sg_idx, sg_hist, sg_res_hist, sg_cmt_idx;
  exec_mode_e sg_res_mode, sg_cmt_mode;
  logic bm_taken, bm_choice, bm_res_valid, bm_res_taken, bm_cmt_valid, bm_cmt_choice,
        bm_cmt_pred, bm_cmt_taken;
  logic [13:0] bm_idx, bm_hist, bm_res_hist, bm_cmt_idx;
  logic [31:0] bm_cmt_pc;
  exec_mode_e bm_res_mode;
  logic ag_taken, ag_res_valid, ag_res_taken, ag_cmt_valid, ag_cmt_bias, ag_cmt_taken;
  logic [14:0] ag_idx, ag_hist, ag_res_hist, ag_cmt_idx;
  exec_mode_e ag_res_mode;
  logic mh_taken, mh_res_valid, mh_res_taken, mh_cmt_valid, mh_cmt_taken;
  logic [2:0] mh_sel;
  logic [3:0] mh_comp, mh_cmt_comp;
  logic [13:0] mh_gs_idx, mh_hist, mh_res_hist, mh_cmt_gs_idx;
  logic [11:0] mh_gas_idx, mh_cmt_gas_idx;
  logic [7:0] mh_ghist, mh_res_ghist;
  logic [12:0] mh_ps_idx, mh_cmt_ps_idx;
  logic [31:0] mh_cmt_pc;
  exec_mode_e mh_res_mode, mh_cmt_mode;
  logic sag_taken, sag_res_valid, sag_res_taken, sag_cmt_valid, sag_cmt_bias, sag_cmt_taken;
  logic [13:0] sag_idx, sag_hist, sag_res_hist, sag_cmt_idx;
  exec_mode_e sag_res_mode, sag_cmt_mode;
  logic sbm_taken, sbm_choice, sbm_res_valid, sbm_res_taken, sbm_cmt_valid, sbm_cmt_choice,
        sbm_cmt_pred, sbm_cmt_taken;
  logic [12:0] sbm_idx, sbm_hist, sbm_res_hist, sbm_cmt_idx;
  logic [31:0] sbm_cmt_pc;
  exec_mode_e sbm_res_mode, sbm_cmt_mode;
  logic smh_taken, smh_res_valid, smh_res_taken, smh_cmt_valid, smh_cmt_taken;
  logic [2:0] smh_sel;
  logic [3:0] smh_comp, smh_cmt_comp;
  logic [12:0] smh_gs_idx, smh_hist, smh_res_hist, smh_cmt_gs_idx;
  logic [11:0] smh_gas_idx, smh_cmt_gas_idx;
  logic [7:0] smh_ghist, smh_res_ghist;
  logic [12:0] smh_ps_idx, smh_cmt_ps_idx;
  logic [31:0] smh_cmt_pc;
  exec_mode_e smh_res_mode, smh_cmt_mode;

  os_aware_bp_top dut (.*);

  // --------------------------------------------------------------- trace
  logic [31:0] tr_pc  [NTR];
  logic [31:0] tr_psr [NTR];
  logic        tr_t   [NTR];

  task automatic build_trace();
    int n = 0, site = 0, run = 0, kind, iter = 0, load = 0;
    logic prev = 0;
    while (n < NTR) begin
      if (run == 0) begin
        run  = 5 + $urandom % 30;
        kind = $urandom % 10;
        if ($urandom % 40 == 0) load = $urandom % 64;   // system load drifts
        if (kind < 6) begin                       // TLB refill handler
          tr_pc[n] = 32'h8000_0080; tr_psr[n] = PSR_EXL; tr_t[n] = 1; n++;
        end else if (kind < 9) begin              // scheduler run-queue scan
          for (int b = 0; b < 6 && n < NTR; b++) begin
            tr_pc[n] = 32'h8001_2000 + 32'(b * 8); tr_psr[n] = PSR_KERN;
            tr_t[n] = load[b]; n++;
          end
        end else begin                            // exception dispatch tree
          int depth = ($urandom % 2) ? 3 : 4;
          for (int b = 0; b < depth && n < NTR; b++) begin
            tr_pc[n] = 32'h8000_7dd8 + 32'(b * 8); tr_psr[n] = PSR_EXL;
            tr_t[n] = (b == depth - 1); n++;
          end
        end
      end else begin
        logic t;
        case (site % 4)
          0: t = (iter % 8) != 7;                  // loop branch
          1: t = (site % 16) == 5;                 // always one way
          2: t = !prev;                            // correlated with predecessor
          default: t = (iter % 3) == 0;            // periodic
        endcase
        if (site % 16 == 15 && ($urandom % 10) == 0) t = !t;   // some noise
        if (n < NTR) begin
          tr_pc[n] = 32'h0040_0000 + 32'(site * 12); tr_psr[n] = PSR_USER; tr_t[n] = t; n++;
        end
        prev = t;
        site = (site + 1) % 64;
        if (site == 0) iter++;
        run--;
      end
    end
  endtask

  // ------------------------------------------------ in-flight branches
  typedef struct {
    int idx; int fcyc; exec_mode_e m; logic bias;
    logic sbg_t; logic [14:0] sbg_i, sbg_h;
    logic sg_t;  logic [13:0] sg_i, sg_h;
    logic bm_t, bm_c; logic [13:0] bm_i, bm_h;
    logic ag_t;  logic [14:0] ag_i, ag_h;
    logic mh_t;  logic [3:0] mh_c; logic [13:0] mh_gi, mh_h; logic [11:0] mh_ai;
    logic [7:0] mh_g; logic [12:0] mh_pi;
    logic sag_t; logic [13:0] sag_i, sag_h;
    logic sbm_t, sbm_c; logic [12:0] sbm_i, sbm_h;
    logic smh_t; logic [3:0] smh_c; logic [12:0] smh_gi, smh_h; logic [11:0] smh_ai;
    logic [7:0] smh_g; logic [12:0] smh_pi;
  } flight_t;
  flight_t win [$];

  // ------------------------------------------------------- bench models
  logic [14:0] m_sbg_u, m_sbg_k;
  byte         m_sbg_t [2**15];
  logic [13:0] m_sg_u;
  logic [10:0] m_sg_k;
  byte         m_sg_ut [2**14];
  byte         m_sg_kt [2**11];
  // conventional Gshare baseline, one history, updated in trace order
  logic [14:0] b_hist;
  byte         b_t [2**15];
  logic        btb_bias [bit [31:0]];

  function automatic byte stepc(byte c, logic t);
    return t ? (c == 3 ? byte'(3) : byte'(c + 1)) : (c == 0 ? byte'(0) : byte'(c - 1));
  endfunction

  int checks = 0, failures = 0, cyc = 0;
  int n_u2k = 0, n_k2u = 0, n_exl = 0, n_ksu = 0, n_kentry = 0, n_repair = 0, n_squash = 0;
  int n_stall = 0, n_sg_u = 0, n_sg_k = 0, n_bm_t = 0, n_bm_nt = 0, n_ag_dis = 0;
  int mh_sel_cnt [5];
  int smh_sel_cnt [5];
  int n_sag_dis = 0, n_sbm_kt = 0, n_sbm_knt = 0;
  int wrong [8];
  int kwrong [8];
  int sbg_kmiss = 0, base_kmiss = 0, sbg_umiss = 0, base_umiss = 0, nk = 0, nu = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle_inputs();
    pred_valid = 0; psr = PSR_USER; pred_pc = 0; pred_bias = 0;
    sbg_res_valid = 0; sbg_res_mode = MODE_USER; sbg_res_hist = 0; sbg_res_taken = 0;
    sbg_cmt_valid = 0; sbg_cmt_idx = 0; sbg_cmt_taken = 0;
    sg_res_valid = 0; sg_res_mode = MODE_USER; sg_res_hist = 0; sg_res_taken = 0;
    sg_cmt_valid = 0; sg_cmt_mode = MODE_USER; sg_cmt_idx = 0; sg_cmt_taken = 0;
    bm_res_valid = 0; bm_res_mode = MODE_USER; bm_res_hist = 0; bm_res_taken = 0;
    bm_cmt_valid = 0; bm_cmt_pc = 0; bm_cmt_idx = 0; bm_cmt_choice = 0; bm_cmt_pred = 0;
    bm_cmt_taken = 0;
    ag_res_valid = 0; ag_res_mode = MODE_USER; ag_res_hist = 0; ag_res_taken = 0;
    ag_cmt_valid = 0; ag_cmt_idx = 0; ag_cmt_bias = 0; ag_cmt_taken = 0;
    mh_res_valid = 0; mh_res_mode = MODE_USER; mh_res_hist = 0; mh_res_ghist = 0;
    mh_res_taken = 0; mh_cmt_valid = 0; mh_cmt_pc = 0; mh_cmt_comp = 0; mh_cmt_gs_idx = 0;
    mh_cmt_gas_idx = 0; mh_cmt_ps_idx = 0; mh_cmt_taken = 0; mh_cmt_mode = MODE_USER;
    sag_res_valid = 0; sag_res_mode = MODE_USER; sag_res_hist = 0; sag_res_taken = 0;
    sag_cmt_valid = 0; sag_cmt_mode = MODE_USER; sag_cmt_idx = 0; sag_cmt_bias = 0;
    sag_cmt_taken = 0;
    sbm_res_valid = 0; sbm_res_mode = MODE_USER; sbm_res_hist = 0; sbm_res_taken = 0;
    sbm_cmt_valid = 0; sbm_cmt_mode = MODE_USER; sbm_cmt_pc = 0; sbm_cmt_idx = 0;
    sbm_cmt_choice = 0; sbm_cmt_pred = 0; sbm_cmt_taken = 0;
    smh_res_valid = 0; smh_res_mode = MODE_USER; smh_res_hist = 0; smh_res_ghist = 0;
    smh_res_taken = 0; smh_cmt_valid = 0; smh_cmt_mode = MODE_USER; smh_cmt_pc = 0;
    smh_cmt_comp = 0; smh_cmt_gs_idx = 0; smh_cmt_gas_idx = 0; smh_cmt_ps_idx = 0;
    smh_cmt_taken = 0;
  endtask

  initial begin
    int next, resolved, clr, distinct;
    logic squash, fetch, t, e_sbg_t, e_sg_t, base_pred;
    logic [14:0] e_sbg_h, e_sbg_i;
    logic [13:0] e_sg_h, e_sg_i;
    exec_mode_e last_mode, fm;
    flight_t f, o;

    build_trace();
    idle_inputs();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    clr = 0;
    while (!ready) begin @(posedge clk); #1 clr++; end
    checks++;
    if (clr != 2 ** 15) begin failures++; $display("FAIL tables ready after %0d cycles", clr); end

    m_sbg_u = 0; m_sbg_k = 0; m_sg_u = 0; m_sg_k = 0; b_hist = 0;
    foreach (m_sbg_t[i]) m_sbg_t[i] = 1;
    foreach (m_sg_ut[i]) m_sg_ut[i] = 1;
    foreach (m_sg_kt[i]) m_sg_kt[i] = 1;
    foreach (b_t[i]) b_t[i] = 1;
    next = 0; resolved = 0; last_mode = MODE_USER;

    while (resolved < NTR) begin
      idle_inputs();
      squash = 0;
      // ---- resolve and commit the oldest branch
      if (win.size() > 0 && cyc - win[0].fcyc >= RESLAT) begin
        o = win.pop_front();
        t = tr_t[o.idx];
        squash = (o.sbg_t != t) || (o.sg_t != t) || (o.bm_t != t) || (o.ag_t != t) ||
                 (o.mh_t != t) || (o.sag_t != t) || (o.sbm_t != t) || (o.smh_t != t);
        if (o.sbg_t != t) begin wrong[0]++; if (o.m == MODE_KERNEL) kwrong[0]++; end
        if (o.sg_t  != t) begin wrong[1]++; if (o.m == MODE_KERNEL) kwrong[1]++; end
        if (o.bm_t  != t) begin wrong[2]++; if (o.m == MODE_KERNEL) kwrong[2]++; end
        if (o.ag_t  != t) begin wrong[3]++; if (o.m == MODE_KERNEL) kwrong[3]++; end
        if (o.mh_t  != t) begin wrong[4]++; if (o.m == MODE_KERNEL) kwrong[4]++; end
        if (o.sag_t != t) begin wrong[5]++; if (o.m == MODE_KERNEL) kwrong[5]++; end
        if (o.sbm_t != t) begin wrong[6]++; if (o.m == MODE_KERNEL) kwrong[6]++; end
        if (o.smh_t != t) begin wrong[7]++; if (o.m == MODE_KERNEL) kwrong[7]++; end
        if (o.m == MODE_KERNEL) begin nk++; if (o.sbg_t != t) sbg_kmiss++; end
        else begin nu++; if (o.sbg_t != t) sbg_umiss++; end
        // conventional Gshare on the same trace, in trace order
        base_pred = b_t[b_hist ^ tr_pc[o.idx][16:2]] >= 2;
        if (base_pred != t) begin if (o.m == MODE_KERNEL) base_kmiss++; else base_umiss++; end
        b_t[b_hist ^ tr_pc[o.idx][16:2]] = stepc(b_t[b_hist ^ tr_pc[o.idx][16:2]], t);
        b_hist = {t, b_hist[14:1]};
        if (!btb_bias.exists(tr_pc[o.idx])) btb_bias[tr_pc[o.idx]] = t;
        if (squash) begin
          n_repair++;
          if (win.size() > 0) n_squash++;
          next = o.idx + 1;
          win.delete();
          sbg_res_valid = 1; sbg_res_mode = o.m; sbg_res_hist = o.sbg_h; sbg_res_taken = t;
          sg_res_valid  = 1; sg_res_mode  = o.m; sg_res_hist  = o.sg_h;  sg_res_taken  = t;
          bm_res_valid  = 1; bm_res_mode  = o.m; bm_res_hist  = o.bm_h;  bm_res_taken  = t;
          ag_res_valid  = 1; ag_res_mode  = o.m; ag_res_hist  = o.ag_h;  ag_res_taken  = t;
          mh_res_valid  = 1; mh_res_mode  = o.m; mh_res_hist  = o.mh_h;  mh_res_ghist  = o.mh_g;
          mh_res_taken  = t;
          sag_res_valid = 1; sag_res_mode = o.m; sag_res_hist = o.sag_h; sag_res_taken = t;
          sbm_res_valid = 1; sbm_res_mode = o.m; sbm_res_hist = o.sbm_h; sbm_res_taken = t;
          smh_res_valid = 1; smh_res_mode = o.m; smh_res_hist = o.smh_h; smh_res_ghist = o.smh_g;
          smh_res_taken = t;
        end
        sbg_cmt_valid = 1; sbg_cmt_idx = o.sbg_i; sbg_cmt_taken = t;
        sg_cmt_valid  = 1; sg_cmt_mode = o.m; sg_cmt_idx = o.sg_i; sg_cmt_taken = t;
        bm_cmt_valid  = 1; bm_cmt_pc = tr_pc[o.idx]; bm_cmt_idx = o.bm_i; bm_cmt_choice = o.bm_c;
        bm_cmt_pred   = o.bm_t; bm_cmt_taken = t;
        ag_cmt_valid  = 1; ag_cmt_idx = o.ag_i; ag_cmt_bias = o.bias; ag_cmt_taken = t;
        mh_cmt_valid  = 1; mh_cmt_pc = tr_pc[o.idx]; mh_cmt_comp = o.mh_c; mh_cmt_gs_idx = o.mh_gi;
        mh_cmt_gas_idx = o.mh_ai; mh_cmt_ps_idx = o.mh_pi; mh_cmt_taken = t; mh_cmt_mode = o.m;
        sag_cmt_valid = 1; sag_cmt_mode = o.m; sag_cmt_idx = o.sag_i; sag_cmt_bias = o.bias;
        sag_cmt_taken = t;
        sbm_cmt_valid = 1; sbm_cmt_mode = o.m; sbm_cmt_pc = tr_pc[o.idx]; sbm_cmt_idx = o.sbm_i;
        sbm_cmt_choice = o.sbm_c; sbm_cmt_pred = o.sbm_t; sbm_cmt_taken = t;
        smh_cmt_valid = 1; smh_cmt_mode = o.m; smh_cmt_pc = tr_pc[o.idx]; smh_cmt_comp = o.smh_c;
        smh_cmt_gs_idx = o.smh_gi; smh_cmt_gas_idx = o.smh_ai; smh_cmt_ps_idx = o.smh_pi;
        smh_cmt_taken = t;
        if (o.m == MODE_KERNEL) n_sg_k++; else n_sg_u++;
        resolved++;
      end
      // ---- fetch the next branch of the trace
      fetch = 0;
      if (!squash && next < NTR) begin
        if (win.size() < WIN) fetch = 1;
        else n_stall++;
      end
      if (fetch) begin
        pred_valid = 1;
        pred_pc    = tr_pc[next];
        psr        = tr_psr[next];
        pred_bias  = btb_bias.exists(pred_pc) ? btb_bias[pred_pc] : 1'b1;
      end
      #1;
      if (fetch) begin
        fm = (psr == PSR_USER) ? MODE_USER : MODE_KERNEL;
        checks++;
        if (mode != fm) begin failures++; $display("FAIL mode %0d for psr %h", mode, psr); end
        // split-history Gshare model
        e_sbg_h = (fm == MODE_KERNEL) ? m_sbg_k : m_sbg_u;
        e_sbg_i = e_sbg_h ^ pred_pc[16:2];
        e_sbg_t = m_sbg_t[e_sbg_i] >= 2;
        // split Gshare model
        e_sg_h  = (fm == MODE_KERNEL) ? {3'b0, m_sg_k} : m_sg_u;
        e_sg_i  = (fm == MODE_KERNEL) ? {3'b0, m_sg_k ^ pred_pc[12:2]} : (m_sg_u ^ pred_pc[15:2]);
        e_sg_t  = (fm == MODE_KERNEL) ? (m_sg_kt[e_sg_i[10:0]] >= 2) : (m_sg_ut[e_sg_i] >= 2);
        checks++;
        if (sbg_hist != e_sbg_h || sbg_idx != e_sbg_i || sbg_taken != e_sbg_t ||
            sg_hist != e_sg_h || sg_idx != e_sg_i || sg_taken != e_sg_t) begin
          failures++;
          if (failures < 10)
            $display("FAIL branch %0d sbg h=%h/%h t=%b/%b sg h=%h/%h t=%b/%b", next,
                     sbg_hist, e_sbg_h, sbg_taken, e_sbg_t, sg_hist, e_sg_h, sg_taken, e_sg_t);
        end
        if (fm != last_mode) begin if (fm == MODE_KERNEL) n_u2k++; else n_k2u++; end
        if (k_entry) n_kentry++;
        if (fm == MODE_KERNEL && psr == PSR_EXL) n_exl++;
        if (fm == MODE_KERNEL && psr == PSR_KERN) n_ksu++;
        if (bm_choice) n_bm_t++; else n_bm_nt++;
        if (ag_taken != pred_bias) n_ag_dis++;
        mh_sel_cnt[mh_sel]++;
        smh_sel_cnt[smh_sel]++;
        if (sag_taken != pred_bias) n_sag_dis++;
        if (fm == MODE_KERNEL) begin if (sbm_choice) n_sbm_kt++; else n_sbm_knt++; end
        f.idx = next; f.fcyc = cyc; f.m = fm; f.bias = pred_bias;
        f.sbg_t = sbg_taken; f.sbg_i = sbg_idx; f.sbg_h = sbg_hist;
        f.sg_t = sg_taken; f.sg_i = sg_idx; f.sg_h = sg_hist;
        f.bm_t = bm_taken; f.bm_c = bm_choice; f.bm_i = bm_idx; f.bm_h = bm_hist;
        f.ag_t = ag_taken; f.ag_i = ag_idx; f.ag_h = ag_hist;
        f.mh_t = mh_taken; f.mh_c = mh_comp; f.mh_gi = mh_gs_idx; f.mh_h = mh_hist;
        f.mh_ai = mh_gas_idx; f.mh_g = mh_ghist; f.mh_pi = mh_ps_idx;
        f.sag_t = sag_taken; f.sag_i = sag_idx; f.sag_h = sag_hist;
        f.sbm_t = sbm_taken; f.sbm_c = sbm_choice; f.sbm_i = sbm_idx; f.sbm_h = sbm_hist;
        f.smh_t = smh_taken; f.smh_c = smh_comp; f.smh_gi = smh_gs_idx; f.smh_h = smh_hist;
        f.smh_ai = smh_gas_idx; f.smh_g = smh_ghist; f.smh_pi = smh_ps_idx;
        win.push_back(f);
        last_mode = fm;
        next++;
      end
      // ---- clock edge: advance the bench models
      @(posedge clk);
      cyc++;
      if (sbg_res_valid) begin
        if (sbg_res_mode == MODE_KERNEL) m_sbg_k = {sbg_res_taken, sbg_res_hist[14:1]};
        else                             m_sbg_u = {sbg_res_taken, sbg_res_hist[14:1]};
        if (sg_res_mode == MODE_KERNEL)  m_sg_k  = {sg_res_taken, sg_res_hist[10:1]};
        else                             m_sg_u  = {sg_res_taken, sg_res_hist[13:1]};
      end else if (fetch) begin
        if (fm == MODE_KERNEL) begin m_sbg_k = {e_sbg_t, m_sbg_k[14:1]}; m_sg_k = {e_sg_t, m_sg_k[10:1]}; end
        else                   begin m_sbg_u = {e_sbg_t, m_sbg_u[14:1]}; m_sg_u = {e_sg_t, m_sg_u[13:1]}; end
      end
      if (sbg_cmt_valid) begin
        m_sbg_t[sbg_cmt_idx] = stepc(m_sbg_t[sbg_cmt_idx], sbg_cmt_taken);
        if (sg_cmt_mode == MODE_KERNEL) m_sg_kt[sg_cmt_idx[10:0]] = stepc(m_sg_kt[sg_cmt_idx[10:0]], sg_cmt_taken);
        else                            m_sg_ut[sg_cmt_idx] = stepc(m_sg_ut[sg_cmt_idx], sg_cmt_taken);
      end
      #1;
    end

    $display("branches %0d (user %0d, kernel %0d) in %0d cycles", NTR, nu, nk, cyc);
    $display("mispredicted: split-BHSR Gshare %0d, split Gshare %0d, Bi-Mode %0d, Agree %0d, Multi-Hybrid %0d",
             wrong[0], wrong[1], wrong[2], wrong[3], wrong[4]);
    $display("mispredicted: split-table Agree %0d, split-table Bi-Mode %0d, split-table Multi-Hybrid %0d",
             wrong[5], wrong[6], wrong[7]);
    $display("kernel mispredictions: sbg %0d sg %0d bm %0d ag %0d mh %0d sag %0d sbm %0d smh %0d",
             kwrong[0], kwrong[1], kwrong[2], kwrong[3], kwrong[4], kwrong[5], kwrong[6], kwrong[7]);
    $display("kernel mispredictions: split-BHSR Gshare %0d, shared-history Gshare %0d", sbg_kmiss, base_kmiss);
    $display("user mispredictions:   split-BHSR Gshare %0d, shared-history Gshare %0d", sbg_umiss, base_umiss);
    $display("mode switches U->K %0d K->U %0d, kernel entries %0d (EXL %0d, KSU %0d branches)",
             n_u2k, n_k2u, n_kentry, n_exl, n_ksu);
    $display("repairs %0d, squashes %0d, fetch stalls %0d, U-BHT commits %0d, K-BHT commits %0d",
             n_repair, n_squash, n_stall, n_sg_u, n_sg_k);
    $display("Bi-Mode taken/not-taken table %0d/%0d, Agree disagree %0d, MH selections %0d %0d %0d %0d %0d",
             n_bm_t, n_bm_nt, n_ag_dis, mh_sel_cnt[0], mh_sel_cnt[1], mh_sel_cnt[2],
             mh_sel_cnt[3], mh_sel_cnt[4]);
    $display("split Agree disagree %0d, split Bi-Mode kernel taken/not-taken table %0d/%0d, split MH selections %0d %0d %0d %0d %0d",
             n_sag_dis, n_sbm_kt, n_sbm_knt, smh_sel_cnt[0], smh_sel_cnt[1], smh_sel_cnt[2],
             smh_sel_cnt[3], smh_sel_cnt[4]);
    distinct = 0;
    for (int c = 0; c < 5; c++) if (mh_sel_cnt[c] > 0) distinct++;
    checks++; if (n_u2k == 0 || n_k2u == 0) failures++;
    checks++; if (n_kentry == 0 || n_kentry != n_u2k) failures++;
    checks++; if (n_exl == 0 || n_ksu == 0) failures++;
    checks++; if (n_repair == 0 || n_squash == 0) failures++;
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_sg_u == 0 || n_sg_k == 0) failures++;
    checks++; if (n_bm_t == 0 || n_bm_nt == 0) failures++;
    checks++; if (n_ag_dis == 0) failures++;
    checks++; if (distinct < 3) failures++;
    distinct = 0;
    for (int c = 0; c < 5; c++) if (smh_sel_cnt[c] > 0) distinct++;
    checks++; if (distinct < 3) failures++;
    checks++; if (n_sag_dis == 0) failures++;
    checks++; if (n_sbm_kt == 0 || n_sbm_knt == 0) failures++;
    for (int p = 0; p < 8; p++) begin
      checks++;
      if (wrong[p] * 10 > NTR * 2) begin failures++; $display("FAIL predictor %0d accuracy", p); end
    end
    checks++;
    if (sbg_kmiss + sbg_umiss >= base_kmiss + base_umiss) begin
      failures++;
      $display("FAIL split history did not reduce full-system mispredictions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
