// tb_split_gshare - checks the split-history, split-table Gshare predictor.
// A small copy (256-entry U-BHT, 32-entry K-BHT) takes a stream of user and
// kernel bursts with commits three branches behind and occasional repairs.
// A model in the bench keeps the two histories and the two tables and
// predicts index, history and direction for every branch. A directed phase
// then trains one kernel counter hard and checks that the user counter at
// the same index did not move.
module tb_split_gshare;
  import os_aware_pkg::*;
  localparam int UB = 8;
  localparam int KB = 5;

  logic clk = 0, rst_n = 0;
  logic pred_valid, res_valid, res_taken, cmt_valid, cmt_taken;
  logic [31:0] pred_pc;
  exec_mode_e pred_mode, res_mode, cmt_mode;
  logic [UB-1:0] res_hist, cmt_idx, p_idx, p_hist;
  logic ready, p_taken, k_entry;

  int checks = 0, failures = 0;
  int n_switch = 0, n_ucmt = 0, n_kcmt = 0, n_repair = 0;

  split_gshare #(.U_BITS(UB), .K_BITS(KB)) dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(p_taken), .pred_idx(p_idx), .pred_hist(p_hist), .k_entry,
    .res_valid, .res_mode, .res_hist, .res_taken,
    .cmt_valid, .cmt_mode, .cmt_idx, .cmt_taken);

  always #5 clk = ~clk;

  logic [UB-1:0] uh;
  logic [KB-1:0] kh;
  int ut [2**UB];
  int kt [2**KB];

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

  initial begin
    int cyc;
    logic [UB-1:0] e_hist, e_idx;
    logic e_t;
    logic [UB-1:0] q_idx [$];
    logic          q_t   [$];
    exec_mode_e    q_m   [$];
    exec_mode_e    cur, last;

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; res_valid = 0; res_mode = MODE_USER;
    res_hist = 0; res_taken = 0; cmt_valid = 0; cmt_mode = MODE_USER; cmt_idx = 0; cmt_taken = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 2 ** UB) begin failures++; $display("FAIL ready after %0d", cyc); end
    uh = 0; kh = 0;
    foreach (ut[i]) ut[i] = 1;
    foreach (kt[i]) kt[i] = 1;
    cur = MODE_USER; last = MODE_USER;

    for (int t = 0; t < 8000; t++) begin
      if ($urandom % 12 == 0) cur = (cur == MODE_USER) ? MODE_KERNEL : MODE_USER;
      pred_valid = ($urandom % 5) != 0;
      pred_mode  = cur;
      pred_pc    = {16'h0, 8'($urandom % 24), 2'b00} + (cur == MODE_KERNEL ? 32'h8000_7d00 : 32'h0040_0000);
      res_valid  = ($urandom % 9) == 0;
      res_mode   = exec_mode_e'($urandom % 2);
      res_hist   = UB'($urandom);
      if (res_mode == MODE_KERNEL) res_hist[UB-1:KB] = '0;
      res_taken  = $urandom % 2;
      cmt_valid  = 0;
      if (q_idx.size() > 3) begin
        cmt_valid = 1;
        cmt_idx   = q_idx.pop_front();
        cmt_taken = q_t.pop_front();
        cmt_mode  = q_m.pop_front();
      end
      #1;
      e_hist = '0;
      if (pred_mode == MODE_KERNEL) begin
        e_hist[KB-1:0] = kh;
        e_idx = '0;
        e_idx[KB-1:0] = kh ^ pred_pc[2 +: KB];
        e_t = kt[e_idx[KB-1:0]] >= 2;
      end else begin
        e_hist = uh;
        e_idx  = uh ^ pred_pc[2 +: UB];
        e_t    = ut[e_idx] >= 2;
      end
      if (pred_valid) begin
        checks++;
        if (p_hist != e_hist || p_idx != e_idx || p_taken != e_t) begin
          failures++;
          $display("FAIL t=%0d m=%0d h=%h/%h i=%h/%h t=%b/%b", t, pred_mode, p_hist, e_hist,
                   p_idx, e_idx, p_taken, e_t);
        end
        if (pred_mode != last) n_switch++;
        q_idx.push_back(p_idx);
        q_m.push_back(pred_mode);
        q_t.push_back((pred_pc[4:2] != 3'b111) ^ (($urandom % 10) == 0));
      end
      if (res_valid) n_repair++;
      @(posedge clk);
      if (res_valid && res_mode == MODE_USER) uh = {res_taken, res_hist[UB-1:1]};
      else if (pred_valid && pred_mode == MODE_USER) uh = {e_t, uh[UB-1:1]};
      if (res_valid && res_mode == MODE_KERNEL) kh = {res_taken, res_hist[KB-1:1]};
      else if (pred_valid && pred_mode == MODE_KERNEL) kh = {e_t, kh[KB-1:1]};
      if (pred_valid) last = pred_mode;
      if (cmt_valid) begin
        if (cmt_mode == MODE_KERNEL) begin kt[cmt_idx[KB-1:0]] = step(kt[cmt_idx[KB-1:0]], cmt_taken); n_kcmt++; end
        else begin ut[cmt_idx] = step(ut[cmt_idx], cmt_taken); n_ucmt++; end
      end
      #1;
    end

    // directed: drive kernel counter 3 to not-taken, user counter 3 must not move
    pred_valid = 0; res_valid = 0;
    cmt_valid = 1; cmt_mode = MODE_KERNEL; cmt_idx = UB'(3); cmt_taken = 0;
    repeat (4) @(posedge clk);
    #1 cmt_mode = MODE_USER; cmt_taken = 1;
    repeat (4) @(posedge clk);
    #1 cmt_valid = 0;
    checks++;
    if (dut.k_bht.mem[3] != CTR_STRONG_NT || dut.u_bht.mem[3] != CTR_STRONG_T) begin
      failures++;
      $display("FAIL split tables: k=%0d u=%0d", dut.k_bht.mem[3], dut.u_bht.mem[3]);
    end

    $display("mode switches %0d, user commits %0d, kernel commits %0d, repairs %0d",
             n_switch, n_ucmt, n_kcmt, n_repair);
    checks++;
    if (n_switch == 0 || n_ucmt == 0 || n_kcmt == 0 || n_repair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
