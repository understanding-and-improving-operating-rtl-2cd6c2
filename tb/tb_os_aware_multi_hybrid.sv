// tb_os_aware_multi_hybrid - checks the OS-aware Multi-Hybrid predictor.
// Two small copies take the same stream of user and kernel bursts: one with
// a shared 64-entry Gshare table (split history only) and one whose Gshare
// component is split into a 64-entry U-BHT and a 16-entry K-BHT. Both have
// 64-entry Pshare, 32-entry 2bc and GAs tables, 8 local histories and 8
// selection entries. Each copy commits its own predictions three branches
// behind; repairs come at random. A model in the bench keeps every history
// and table of each copy, works out each component's direction, the
// selected component and the final prediction, and applies the
// selection-counter rule at commit. At least three different components
// must win selections in each copy.
module tb_os_aware_multi_hybrid;
  import os_aware_pkg::*;
  localparam int GS = 6, GK = 4, PS = 6, BC = 5, GH = 3, GA = 2, LH = 3, SB = 3;
  localparam int GW = GH + GA;

  logic clk = 0, rst_n = 0;
  logic pred_valid, res_valid, res_taken;
  logic [31:0] pred_pc;
  exec_mode_e pred_mode, res_mode;
  logic [GS-1:0] res_hist;
  logic [GH-1:0] res_ghist;

  logic          ready [2], p_taken [2], cmt_valid [2], cmt_taken [2];
  logic [2:0]    p_sel [2];
  logic [3:0]    p_comp [2], cmt_comp [2];
  logic [GS-1:0] p_gs_idx [2], p_hist [2], cmt_gs_idx [2];
  logic [GW-1:0] p_gas_idx [2], cmt_gas_idx [2];
  logic [GH-1:0] p_ghist [2];
  logic [PS-1:0] p_ps_idx [2], cmt_ps_idx [2];
  logic [31:0]   cmt_pc [2];
  exec_mode_e    cmt_mode [2];

  int checks = 0, failures = 0, n_repair = 0;
  int n_sel [2][5];
  int n_kgs = 0;

  os_aware_multi_hybrid #(.GS_BITS(GS), .PS_BITS(PS), .BC_BITS(BC), .GAS_HBITS(GH),
                          .GAS_ABITS(GA), .LHT_BITS(LH), .SEL_BITS(SB)) dut_shared (
    .clk, .rst_n, .ready(ready[0]), .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(p_taken[0]), .pred_sel(p_sel[0]), .pred_comp(p_comp[0]),
    .pred_gs_idx(p_gs_idx[0]), .pred_hist(p_hist[0]), .pred_gas_idx(p_gas_idx[0]),
    .pred_ghist(p_ghist[0]), .pred_ps_idx(p_ps_idx[0]),
    .res_valid, .res_mode, .res_hist, .res_ghist, .res_taken,
    .cmt_valid(cmt_valid[0]), .cmt_mode(cmt_mode[0]), .cmt_pc(cmt_pc[0]), .cmt_comp(cmt_comp[0]),
    .cmt_gs_idx(cmt_gs_idx[0]), .cmt_gas_idx(cmt_gas_idx[0]), .cmt_ps_idx(cmt_ps_idx[0]),
    .cmt_taken(cmt_taken[0]));

  os_aware_multi_hybrid #(.GS_BITS(GS), .GS_K_BITS(GK), .PS_BITS(PS), .BC_BITS(BC),
                          .GAS_HBITS(GH), .GAS_ABITS(GA), .LHT_BITS(LH), .SEL_BITS(SB)) dut_split (
    .clk, .rst_n, .ready(ready[1]), .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(p_taken[1]), .pred_sel(p_sel[1]), .pred_comp(p_comp[1]),
    .pred_gs_idx(p_gs_idx[1]), .pred_hist(p_hist[1]), .pred_gas_idx(p_gas_idx[1]),
    .pred_ghist(p_ghist[1]), .pred_ps_idx(p_ps_idx[1]),
    .res_valid, .res_mode, .res_hist, .res_ghist, .res_taken,
    .cmt_valid(cmt_valid[1]), .cmt_mode(cmt_mode[1]), .cmt_pc(cmt_pc[1]), .cmt_comp(cmt_comp[1]),
    .cmt_gs_idx(cmt_gs_idx[1]), .cmt_gas_idx(cmt_gas_idx[1]), .cmt_ps_idx(cmt_ps_idx[1]),
    .cmt_taken(cmt_taken[1]));

  always #5 clk = ~clk;

  // ---- models, index 0 = shared Gshare table, 1 = split Gshare tables
  logic [GS-1:0] uh [2];
  logic [GS-1:0] kh [2];
  logic [GH-1:0] gh [2];
  logic [PS-1:0] lht [2][2**LH];
  int sel [2][2**SB][5];
  int bc [2][2**BC];
  int gas [2][2**GW];
  int gs [2][2**GS];
  int gsk [2**GK];
  int ps [2][2**PS];

  function automatic int step(int c, logic t);
    return t ? (c == 3 ? 3 : c + 1) : (c == 0 ? 0 : c - 1);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] pc; exec_mode_e m; logic [3:0] comp; logic [GS-1:0] gsi;
                   logic [GW-1:0] gai; logic [PS-1:0] psi; logic t; } ent_t;
  ent_t q0 [$];
  ent_t q1 [$];

  initial begin
    int cyc, distinct, e_sel [2];
    logic [GS-1:0] e_hist [2];
    logic [GS-1:0] e_gs [2];
    logic [GW-1:0] e_gas [2];
    logic [PS-1:0] e_ps [2];
    logic [4:0]    e_dir [2];
    logic          e_t [2];
    logic          gsdir, top_right, outcome;
    logic [SB-1:0] sa;
    logic [4:0]    right;
    ent_t e;
    exec_mode_e cur;

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; res_valid = 0; res_mode = MODE_USER;
    res_hist = 0; res_ghist = 0; res_taken = 0;
    for (int i = 0; i < 2; i++) begin
      cmt_valid[i] = 0; cmt_mode[i] = MODE_USER; cmt_pc[i] = 0; cmt_comp[i] = 0;
      cmt_gs_idx[i] = 0; cmt_gas_idx[i] = 0; cmt_ps_idx[i] = 0; cmt_taken[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready[0] || !ready[1]) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 2 ** GS) begin failures++; $display("FAIL ready after %0d", cyc); end
    for (int i = 0; i < 2; i++) begin
      uh[i] = 0; kh[i] = 0; gh[i] = 0;
      foreach (lht[i][j]) lht[i][j] = 0;
      foreach (sel[i][j, c]) sel[i][j][c] = 3;
      foreach (bc[i][j]) bc[i][j] = 1;
      foreach (gas[i][j]) gas[i][j] = 1;
      foreach (gs[i][j]) gs[i][j] = 1;
      foreach (ps[i][j]) ps[i][j] = 1;
    end
    foreach (gsk[j]) gsk[j] = 1;
    cur = MODE_USER;

    for (int t = 0; t < 8000; t++) begin
      if ($urandom % 12 == 0) cur = (cur == MODE_USER) ? MODE_KERNEL : MODE_USER;
      pred_valid = ($urandom % 5) != 0;
      pred_mode  = cur;
      pred_pc    = {16'h0, 8'($urandom % 24), 2'b00} + (cur == MODE_KERNEL ? 32'h8000_7d00 : 32'h0040_0000);
      res_valid  = ($urandom % 9) == 0;
      res_mode   = exec_mode_e'($urandom % 2);
      res_hist   = GS'($urandom);
      res_ghist  = GH'($urandom);
      res_taken  = $urandom % 2;
      for (int i = 0; i < 2; i++) begin
        cmt_valid[i] = 0;
        if ((i == 0 ? q0.size() : q1.size()) > 3) begin
          e = (i == 0) ? q0.pop_front() : q1.pop_front();
          cmt_valid[i] = 1; cmt_mode[i] = e.m; cmt_pc[i] = e.pc; cmt_comp[i] = e.comp;
          cmt_gs_idx[i] = e.gsi; cmt_gas_idx[i] = e.gai; cmt_ps_idx[i] = e.psi; cmt_taken[i] = e.t;
        end
      end
      #1;
      outcome = pred_pc[4] ? (pred_pc[3:2] != 2'b11) ^ (($urandom % 8) == 0) : t[0] ^ t[1];
      for (int i = 0; i < 2; i++) begin
        if (i == 1 && pred_mode == MODE_KERNEL) begin
          e_hist[i] = {{(GS-GK){1'b0}}, kh[i][GK-1:0]};
          e_gs[i]   = {{(GS-GK){1'b0}}, kh[i][GK-1:0] ^ pred_pc[2 +: GK]};
          gsdir     = gsk[e_gs[i][GK-1:0]] >= 2;
        end else begin
          e_hist[i] = (pred_mode == MODE_KERNEL) ? kh[i] : uh[i];
          e_gs[i]   = e_hist[i] ^ pred_pc[2 +: GS];
          gsdir     = gs[i][e_gs[i]] >= 2;
        end
        e_gas[i] = {gh[i], pred_pc[2 +: GA]};
        e_ps[i]  = lht[i][pred_pc[2 +: LH]] ^ pred_pc[2 +: PS];
        e_dir[i] = {1'b1, ps[i][e_ps[i]] >= 2, gsdir, gas[i][e_gas[i]] >= 2, bc[i][pred_pc[2 +: BC]] >= 2};
        e_sel[i] = 4;
        for (int c = 4; c >= 0; c--) if (sel[i][pred_pc[2 +: SB]][c] == 3) e_sel[i] = c;
        e_t[i]   = e_dir[i][e_sel[i]];
        if (pred_valid) begin
          checks++;
          if (p_hist[i] != e_hist[i] || p_gs_idx[i] != e_gs[i] || p_gas_idx[i] != e_gas[i] ||
              p_ps_idx[i] != e_ps[i] || p_comp[i] != e_dir[i][3:0] || int'(p_sel[i]) != e_sel[i] ||
              p_taken[i] != e_t[i] || p_ghist[i] != gh[i]) begin
            failures++;
            if (failures < 10)
              $display("FAIL copy %0d t=%0d sel=%0d/%0d comp=%b/%b t=%b/%b", i, t, p_sel[i], e_sel[i],
                       p_comp[i], e_dir[i][3:0], p_taken[i], e_t[i]);
          end
          n_sel[i][e_sel[i]]++;
          e.pc = pred_pc; e.m = pred_mode; e.comp = p_comp[i]; e.gsi = p_gs_idx[i];
          e.gai = p_gas_idx[i]; e.psi = p_ps_idx[i]; e.t = outcome;
          if (i == 0) q0.push_back(e); else q1.push_back(e);
        end
      end
      if (res_valid) n_repair++;
      @(posedge clk);
      for (int i = 0; i < 2; i++) begin
        if (res_valid && res_mode == MODE_USER) uh[i] = {res_taken, res_hist[GS-1:1]};
        else if (pred_valid && pred_mode == MODE_USER) uh[i] = {e_t[i], uh[i][GS-1:1]};
        if (i == 1) begin
          if (res_valid && res_mode == MODE_KERNEL) kh[i] = GS'({res_taken, res_hist[GK-1:1]});
          else if (pred_valid && pred_mode == MODE_KERNEL) kh[i] = GS'({e_t[i], kh[i][GK-1:1]});
        end else begin
          if (res_valid && res_mode == MODE_KERNEL) kh[i] = {res_taken, res_hist[GS-1:1]};
          else if (pred_valid && pred_mode == MODE_KERNEL) kh[i] = {e_t[i], kh[i][GS-1:1]};
        end
        if (res_valid) gh[i] = {res_taken, res_ghist[GH-1:1]};
        else if (pred_valid) gh[i] = {e_t[i], gh[i][GH-1:1]};
        if (cmt_valid[i]) begin
          sa = cmt_pc[i][2 +: SB];
          right = ~({1'b1, cmt_comp[i]} ^ {5{cmt_taken[i]}});
          top_right = 0;
          for (int c = 0; c < 5; c++) if (right[c] && sel[i][sa][c] == 3) top_right = 1;
          for (int c = 0; c < 5; c++) begin
            if (top_right && !right[c]) sel[i][sa][c] = step(sel[i][sa][c], 0);
            if (!top_right && right[c]) sel[i][sa][c] = step(sel[i][sa][c], 1);
          end
          bc[i][cmt_pc[i][2 +: BC]] = step(bc[i][cmt_pc[i][2 +: BC]], cmt_taken[i]);
          gas[i][cmt_gas_idx[i]]    = step(gas[i][cmt_gas_idx[i]], cmt_taken[i]);
          if (i == 1 && cmt_mode[i] == MODE_KERNEL) begin
            gsk[cmt_gs_idx[i][GK-1:0]] = step(gsk[cmt_gs_idx[i][GK-1:0]], cmt_taken[i]);
            n_kgs++;
          end else begin
            gs[i][cmt_gs_idx[i]] = step(gs[i][cmt_gs_idx[i]], cmt_taken[i]);
          end
          ps[i][cmt_ps_idx[i]]      = step(ps[i][cmt_ps_idx[i]], cmt_taken[i]);
          lht[i][cmt_pc[i][2 +: LH]] = {cmt_taken[i], lht[i][cmt_pc[i][2 +: LH]][PS-1:1]};
        end
      end
      #1;
    end
    for (int i = 0; i < 2; i++) begin
      distinct = 0;
      for (int c = 0; c < 5; c++) if (n_sel[i][c] > 0) distinct++;
      $display("copy %0d selected: 2bc %0d, GAs %0d, Gshare %0d, Pshare %0d, always-taken %0d",
               i, n_sel[i][0], n_sel[i][1], n_sel[i][2], n_sel[i][3], n_sel[i][4]);
      checks++;
      if (distinct < 3) failures++;
    end
    $display("repairs %0d, K-BHT commits in the split copy %0d", n_repair, n_kgs);
    checks++;
    if (n_repair == 0 || n_kgs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
