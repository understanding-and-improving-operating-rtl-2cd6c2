// tb_os_aware_bimode - checks the OS-aware Bi-Mode predictor.
// A small copy (64-entry choice table, two 64-entry direction tables) takes
// a stream of user and kernel bursts; commits follow three branches behind
// and repairs come at random. A model in the bench keeps the two histories
// and the three tables, predicts choice, index and direction of every
// branch, and applies the Bi-Mode update rule, including the case where
// the choice counter is left alone.
module tb_os_aware_bimode;
  import os_aware_pkg::*;
  localparam int HB = 6;
  localparam int CB = 6;

  logic clk = 0, rst_n = 0;
  logic pred_valid, res_valid, res_taken, cmt_valid, cmt_taken, cmt_choice, cmt_pred;
  logic [31:0] pred_pc, cmt_pc;
  exec_mode_e pred_mode, res_mode;
  logic [HB-1:0] res_hist, cmt_idx, p_idx, p_hist;
  logic ready, p_taken, p_choice;

  int checks = 0, failures = 0;
  int n_skip = 0, n_tsel = 0, n_ntsel = 0, n_switch = 0, n_repair = 0;

  os_aware_bimode #(.HIST_BITS(HB), .CHOICE_BITS(CB)) dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(p_taken), .pred_choice(p_choice), .pred_idx(p_idx), .pred_hist(p_hist),
    .res_valid, .res_mode, .res_hist, .res_taken,
    .cmt_valid, .cmt_pc, .cmt_idx, .cmt_choice, .cmt_pred, .cmt_taken);

  always #5 clk = ~clk;

  logic [HB-1:0] uh, kh;
  int ct [2**CB];
  int tt [2**HB];
  int nt [2**HB];

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
    logic [HB-1:0] e_hist, e_idx;
    logic e_t, e_c;
    logic [HB-1:0] q_idx [$];
    logic [31:0]   q_pc  [$];
    logic          q_t [$], q_c [$], q_p [$];
    exec_mode_e    cur, last;

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; res_valid = 0; res_mode = MODE_USER;
    res_hist = 0; res_taken = 0; cmt_valid = 0; cmt_pc = 0; cmt_idx = 0; cmt_taken = 0;
    cmt_choice = 0; cmt_pred = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 2 ** HB) begin failures++; $display("FAIL ready after %0d", cyc); end
    uh = 0; kh = 0;
    foreach (ct[i]) ct[i] = 1;
    foreach (tt[i]) tt[i] = 1;
    foreach (nt[i]) nt[i] = 1;
    cur = MODE_USER; last = MODE_USER;

    for (int t = 0; t < 8000; t++) begin
      if ($urandom % 12 == 0) cur = (cur == MODE_USER) ? MODE_KERNEL : MODE_USER;
      pred_valid = ($urandom % 5) != 0;
      pred_mode  = cur;
      pred_pc    = {16'h0, 8'($urandom % 24), 2'b00} + (cur == MODE_KERNEL ? 32'h8000_7d00 : 32'h0040_0000);
      res_valid  = ($urandom % 9) == 0;
      res_mode   = exec_mode_e'($urandom % 2);
      res_hist   = HB'($urandom);
      res_taken  = $urandom % 2;
      cmt_valid  = 0;
      if (q_idx.size() > 3) begin
        cmt_valid  = 1;
        cmt_idx    = q_idx.pop_front();
        cmt_pc     = q_pc.pop_front();
        cmt_taken  = q_t.pop_front();
        cmt_choice = q_c.pop_front();
        cmt_pred   = q_p.pop_front();
      end
      #1;
      e_hist = (pred_mode == MODE_KERNEL) ? kh : uh;
      e_idx  = e_hist ^ pred_pc[2 +: HB];
      e_c    = ct[pred_pc[2 +: CB]] >= 2;
      e_t    = e_c ? (tt[e_idx] >= 2) : (nt[e_idx] >= 2);
      if (pred_valid) begin
        checks++;
        if (p_hist != e_hist || p_idx != e_idx || p_taken != e_t || p_choice != e_c) begin
          failures++;
          $display("FAIL t=%0d h=%h/%h i=%h/%h c=%b/%b t=%b/%b", t, p_hist, e_hist,
                   p_idx, e_idx, p_choice, e_c, p_taken, e_t);
        end
        if (pred_mode != last) n_switch++;
        if (e_c) n_tsel++; else n_ntsel++;
        q_idx.push_back(p_idx);
        q_pc.push_back(pred_pc);
        q_c.push_back(p_choice);
        q_p.push_back(p_taken);
        q_t.push_back((pred_pc[4:2] != 3'b111) ^ (($urandom % 4) == 0));
      end
      if (res_valid) n_repair++;
      @(posedge clk);
      if (res_valid && res_mode == MODE_USER) uh = {res_taken, res_hist[HB-1:1]};
      else if (pred_valid && pred_mode == MODE_USER) uh = {e_t, uh[HB-1:1]};
      if (res_valid && res_mode == MODE_KERNEL) kh = {res_taken, res_hist[HB-1:1]};
      else if (pred_valid && pred_mode == MODE_KERNEL) kh = {e_t, kh[HB-1:1]};
      if (pred_valid) last = pred_mode;
      if (cmt_valid) begin
        if ((cmt_choice != cmt_taken) && (cmt_pred == cmt_taken)) n_skip++;
        else ct[cmt_pc[2 +: CB]] = step(ct[cmt_pc[2 +: CB]], cmt_taken);
        if (cmt_choice) tt[cmt_idx] = step(tt[cmt_idx], cmt_taken);
        else            nt[cmt_idx] = step(nt[cmt_idx], cmt_taken);
      end
      #1;
    end
    $display("taken-table uses %0d, not-taken-table uses %0d, choice updates skipped %0d, switches %0d",
             n_tsel, n_ntsel, n_skip, n_switch);
    checks++;
    if (n_tsel == 0 || n_ntsel == 0 || n_skip == 0 || n_switch == 0 || n_repair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
