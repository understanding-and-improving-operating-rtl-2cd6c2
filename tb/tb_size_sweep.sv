// tb_size_sweep - the two OS-aware Gshare forms at every table size.
//
// Accuracy of these predictors is usually quoted for total budgets from 8K
// to 256K counters, and the kernel-history zeroing variant at 32K. This
// bench builds all of them at once and plays one branch trace through each:
//   split-history Gshare   HIST_BITS = 13 .. 18   (8K .. 256K counters)
//   split Gshare           U_BITS = 12 .. 17, K_BITS = 11
//                          (U-BHT half the budget, K-BHT fixed at 2K)
//   split-history Gshare   HIST_BITS = 15 with ZERO_K_ON_ENTRY = 1
// The trace has the same shape as the end-to-end bench: a user loop of 64
// branch sites interrupted by short kernel visits (a TLB refill handler, a
// scheduler scan following a drifting load, an exception dispatch tree).
// Branches go through one at a time: predicted in one cycle; in the next
// cycle committed with the true direction and, if that predictor was
// wrong, its history repaired. So every predictor keeps a correct-path
// history of its own.
//
// Checks: each table finishes clearing after exactly 2**bits cycles;
// every prediction, index and history of every instance equals a model in
// the bench (the zeroing model clears the kernel history on each kernel
// entry); kernel entries occur. The mispredictions of each instance and of
// a conventional one-history Gshare of the same size (also modelled in the
// bench) are printed, split into user and kernel branches.
module tb_size_sweep;
  import os_aware_pkg::*;

  localparam int NTR = 100000;
  localparam int NS  = 6;                    // sizes 2**13 .. 2**18
  localparam int NI  = 2 * NS + 1;           // instances
  localparam int MW  = 18;
  localparam logic [31:0] PSR_USER = 32'h0000_0010;
  localparam logic [31:0] PSR_EXL  = 32'h0000_0012;
  localparam logic [31:0] PSR_KERN = 32'h0000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // instance i: 0..5 split-history (bits 13+i), 6..11 split tables
  // (U bits 12+i-6), 12 split-history 32K with zeroing
  logic          pred_valid;
  logic [31:0]   pred_pc;
  exec_mode_e    pred_mode;
  logic          rdy   [NI];
  logic          p_t   [NI];
  logic [MW-1:0] p_idx [NI];
  logic [MW-1:0] p_h   [NI];
  logic          kent  [NI];
  logic          res_v [NI];
  exec_mode_e    res_m;
  logic [MW-1:0] res_h [NI];
  logic          res_t;
  logic          cmt_v;
  exec_mode_e    cmt_m;
  logic [MW-1:0] cmt_i [NI];
  logic          cmt_t;

  for (genvar g = 0; g < NS; g++) begin : g_sbg
    localparam int B = 13 + g;
    logic [B-1:0] idx, h;
    split_bhsr_gshare #(.HIST_BITS(B)) dut (
      .clk, .rst_n, .ready(rdy[g]), .pred_valid, .pred_pc, .pred_mode,
      .pred_taken(p_t[g]), .pred_idx(idx), .pred_hist(h), .k_entry(kent[g]),
      .res_valid(res_v[g]), .res_mode(res_m), .res_hist(res_h[g][B-1:0]), .res_taken(res_t),
      .cmt_valid(cmt_v), .cmt_idx(cmt_i[g][B-1:0]), .cmt_taken(cmt_t));
    assign p_idx[g] = MW'(idx);
    assign p_h[g]   = MW'(h);
  end

  for (genvar g = 0; g < NS; g++) begin : g_sg
    localparam int B = 12 + g;
    logic [B-1:0] idx, h;
    split_gshare #(.U_BITS(B), .K_BITS(11)) dut (
      .clk, .rst_n, .ready(rdy[NS+g]), .pred_valid, .pred_pc, .pred_mode,
      .pred_taken(p_t[NS+g]), .pred_idx(idx), .pred_hist(h), .k_entry(kent[NS+g]),
      .res_valid(res_v[NS+g]), .res_mode(res_m), .res_hist(res_h[NS+g][B-1:0]), .res_taken(res_t),
      .cmt_valid(cmt_v), .cmt_mode(cmt_m), .cmt_idx(cmt_i[NS+g][B-1:0]), .cmt_taken(cmt_t));
    assign p_idx[NS+g] = MW'(idx);
    assign p_h[NS+g]   = MW'(h);
  end

  logic [14:0] z_idx, z_h;
  split_bhsr_gshare #(.HIST_BITS(15), .ZERO_K_ON_ENTRY(1'b1)) dut_zero (
    .clk, .rst_n, .ready(rdy[NI-1]), .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(p_t[NI-1]), .pred_idx(z_idx), .pred_hist(z_h), .k_entry(kent[NI-1]),
    .res_valid(res_v[NI-1]), .res_mode(res_m), .res_hist(res_h[NI-1][14:0]), .res_taken(res_t),
    .cmt_valid(cmt_v), .cmt_idx(cmt_i[NI-1][14:0]), .cmt_taken(cmt_t));
  assign p_idx[NI-1] = MW'(z_idx);
  assign p_h[NI-1]   = MW'(z_h);

  // ------------------------------------------------------------- trace
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
        if ($urandom % 40 == 0) load = $urandom % 64;
        if (kind < 6) begin
          tr_pc[n] = 32'h8000_0080; tr_psr[n] = PSR_EXL; tr_t[n] = 1; n++;
        end else if (kind < 9) begin
          for (int b = 0; b < 6 && n < NTR; b++) begin
            tr_pc[n] = 32'h8001_2000 + 32'(b * 8); tr_psr[n] = PSR_KERN; tr_t[n] = load[b]; n++;
          end
        end else begin
          int depth = ($urandom % 2) ? 3 : 4;
          for (int b = 0; b < depth && n < NTR; b++) begin
            tr_pc[n] = 32'h8000_7dd8 + 32'(b * 8); tr_psr[n] = PSR_EXL; tr_t[n] = (b == depth - 1); n++;
          end
        end
      end else begin
        logic t;
        case (site % 4)
          0: t = (iter % 8) != 7;
          1: t = (site % 16) == 5;
          2: t = !prev;
          default: t = (iter % 3) == 0;
        endcase
        if (site % 16 == 15 && ($urandom % 10) == 0) t = !t;
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

  // ------------------------------------------------------------ models
  int          ubits [NI];     // user history / U-BHT index width
  int          kbits [NI];     // kernel history width
  bit          split_tbl [NI];
  bit          zero_k [NI];
  logic [MW-1:0] mu [NI];
  logic [MW-1:0] mk [NI];
  byte         mt  [NI][];     // shared table or U-BHT
  byte         mkt [NI][];     // K-BHT
  logic [MW-1:0] bh [NS];      // conventional Gshare
  byte         bt  [NS][];
  int          miss_u [NI], miss_k [NI], bmiss_u [NS], bmiss_k [NS];

  function automatic byte stepc(byte c, logic t);
    return t ? (c == 3 ? byte'(3) : byte'(c + 1)) : (c == 0 ? byte'(0) : byte'(c - 1));
  endfunction

  function automatic logic [MW-1:0] shift(logic [MW-1:0] h, logic t, int w);
    logic [MW-1:0] r = (h >> 1);
    r[w-1] = t;
    return r & MW'((64'(1) << w) - 1);
  endfunction

  int checks = 0, failures = 0, n_kent = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, nk, nu;
    logic [MW-1:0] e_h, e_i, mask;
    logic e_t, t, bp;
    exec_mode_e m, last;
    logic [MW-1:0] s_h [NI];
    logic [MW-1:0] s_i [NI];
    logic          s_t [NI];
    bit            done [NI];

    for (int i = 0; i < NI; i++) begin
      if (i < NS)       begin ubits[i] = 13 + i;      kbits[i] = 13 + i; split_tbl[i] = 0; zero_k[i] = 0; end
      else if (i < NI-1) begin ubits[i] = 12 + i - NS; kbits[i] = 11;     split_tbl[i] = 1; zero_k[i] = 0; end
      else              begin ubits[i] = 15;          kbits[i] = 15;     split_tbl[i] = 0; zero_k[i] = 1; end
      mt[i] = new[2 ** ubits[i]];
      foreach (mt[i][j]) mt[i][j] = 1;
      mkt[i] = new[2 ** 11];
      foreach (mkt[i][j]) mkt[i][j] = 1;
      mu[i] = 0; mk[i] = 0; miss_u[i] = 0; miss_k[i] = 0; done[i] = 0;
    end
    for (int s = 0; s < NS; s++) begin
      bt[s] = new[2 ** (13 + s)];
      foreach (bt[s][j]) bt[s][j] = 1;
      bh[s] = 0; bmiss_u[s] = 0; bmiss_k[s] = 0;
    end
    build_trace();

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; res_m = MODE_USER; res_t = 0;
    cmt_v = 0; cmt_m = MODE_USER; cmt_t = 0;
    foreach (res_v[i]) begin res_v[i] = 0; res_h[i] = 0; cmt_i[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (cyc < 2 ** 18 + 4) begin
      for (int i = 0; i < NI; i++) begin
        if (rdy[i] && !done[i]) begin
          done[i] = 1;
          checks++;
          if (cyc != 2 ** (split_tbl[i] ? (ubits[i] > 11 ? ubits[i] : 11) : ubits[i])) begin
            failures++;
            $display("FAIL instance %0d ready after %0d cycles", i, cyc);
          end
        end
      end
      @(posedge clk); #1 cyc++;
    end

    last = MODE_USER; nk = 0; nu = 0;
    for (int n = 0; n < NTR; n++) begin
      m = (tr_psr[n] == PSR_USER) ? MODE_USER : MODE_KERNEL;
      t = tr_t[n];
      if (m == MODE_KERNEL) nk++; else nu++;
      // ---- predict
      pred_valid = 1; pred_pc = tr_pc[n]; pred_mode = m;
      #1;
      if (m == MODE_KERNEL && last == MODE_USER) n_kent++;
      for (int i = 0; i < NI; i++) begin
        if (m == MODE_KERNEL) begin
          e_h = (zero_k[i] && last == MODE_USER) ? '0 : mk[i];
          mask = MW'((64'(1) << kbits[i]) - 1);
          e_i = (e_h ^ MW'(pred_pc[2 +: MW])) & mask;
          e_t = split_tbl[i] ? mkt[i][e_i] >= 2 : mt[i][e_i] >= 2;
        end else begin
          e_h = mu[i];
          mask = MW'((64'(1) << ubits[i]) - 1);
          e_i = (e_h ^ MW'(pred_pc[2 +: MW])) & mask;
          e_t = mt[i][e_i] >= 2;
        end
        checks++;
        if (p_h[i] != e_h || p_idx[i] != e_i || p_t[i] != e_t ||
            kent[i] != (m == MODE_KERNEL && last == MODE_USER)) begin
          failures++;
          if (failures < 10)
            $display("FAIL branch %0d instance %0d h=%h/%h i=%h/%h t=%b/%b", n, i, p_h[i], e_h,
                     p_idx[i], e_i, p_t[i], e_t);
        end
        s_h[i] = e_h; s_i[i] = e_i; s_t[i] = e_t;
        if (e_t != t) begin if (m == MODE_KERNEL) miss_k[i]++; else miss_u[i]++; end
      end
      @(posedge clk);
      for (int i = 0; i < NI; i++) begin
        if (m == MODE_KERNEL) mk[i] = shift(s_h[i], s_t[i], kbits[i]);
        else                  mu[i] = shift(s_h[i], s_t[i], ubits[i]);
      end
      // ---- commit, repair where wrong
      #1;
      pred_valid = 0; cmt_v = 1; cmt_m = m; cmt_t = t; res_m = m; res_t = t;
      for (int i = 0; i < NI; i++) begin
        cmt_i[i] = s_i[i];
        res_v[i] = (s_t[i] != t);
        res_h[i] = s_h[i];
      end
      @(posedge clk);
      for (int i = 0; i < NI; i++) begin
        if (res_v[i]) begin
          if (m == MODE_KERNEL) mk[i] = shift(s_h[i], t, kbits[i]);
          else                  mu[i] = shift(s_h[i], t, ubits[i]);
        end
        if (split_tbl[i] && m == MODE_KERNEL) mkt[i][s_i[i]] = stepc(mkt[i][s_i[i]], t);
        else                                  mt[i][s_i[i]]  = stepc(mt[i][s_i[i]], t);
      end
      // conventional Gshare of each size, one shared history
      for (int s = 0; s < NS; s++) begin
        e_i = (bh[s] ^ MW'(tr_pc[n][2 +: MW])) & MW'((64'(1) << (13 + s)) - 1);
        bp = bt[s][e_i] >= 2;
        if (bp != t) begin if (m == MODE_KERNEL) bmiss_k[s]++; else bmiss_u[s]++; end
        bt[s][e_i] = stepc(bt[s][e_i], t);
        bh[s] = shift(bh[s], t, 13 + s);
      end
      #1;
      cmt_v = 0;
      foreach (res_v[i]) res_v[i] = 0;
      last = m;
    end

    $display("branches %0d (user %0d, kernel %0d), kernel entries %0d", NTR, nu, nk, n_kent);
    $display("size   conventional (user+kernel)   split history   split tables");
    for (int s = 0; s < NS; s++)
      $display("%4dK   %6d + %6d           %6d + %6d   %6d + %6d", 2 ** (3 + s),
               bmiss_u[s], bmiss_k[s], miss_u[s], miss_k[s], miss_u[NS+s], miss_k[NS+s]);
    $display("32K split history with kernel zeroing: %0d + %0d", miss_u[NI-1], miss_k[NI-1]);
    checks++;
    if (n_kent == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
