// tb_split_bimode - checks the Bi-Mode predictor with split direction tables.
// A small copy (256-entry choice table, 128+128 user and 16+16 kernel
// direction counters) takes a stream of user and kernel bursts in which
// some branches are mostly taken and others mostly not taken. A model in
// the bench keeps both histories and all five tables and predicts index,
// history, choice and direction for every branch; commits go three
// branches behind and repairs come at random. At commit the model applies
// the Bi-Mode rules: only the chosen direction table of the branch's mode
// is trained, and the choice counter is left alone when it pointed the
// wrong way but the chosen table was still right. All four direction
// tables must be used.
module tb_split_bimode;
  import os_aware_pkg::*;
  localparam int UB = 7, KB = 4, CB = 8;

  logic clk = 0, rst_n = 0;
  logic pred_valid, res_valid, res_taken, cmt_valid, cmt_taken, cmt_choice, cmt_pred;
  logic [31:0] pred_pc, cmt_pc;
  exec_mode_e pred_mode, res_mode, cmt_mode;
  logic [UB-1:0] res_hist, cmt_idx, p_idx, p_hist;
  logic ready, p_taken, p_choice;

  int checks = 0, failures = 0, n_repair = 0, n_skip = 0;
  int n_use [4];

  split_bimode #(.U_BITS(UB), .K_BITS(KB), .CHOICE_BITS(CB)) dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(p_taken), .pred_choice(p_choice), .pred_idx(p_idx), .pred_hist(p_hist),
    .res_valid, .res_mode, .res_hist, .res_taken,
    .cmt_valid, .cmt_mode, .cmt_pc, .cmt_idx, .cmt_choice, .cmt_pred, .cmt_taken);

  always #5 clk = ~clk;

  logic [UB-1:0] uh;
  logic [KB-1:0] kh;
  int ch [2**CB];
  int utk [2**UB];
  int unt [2**UB];
  int ktk [2**KB];
  int knt [2**KB];

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

  typedef struct { logic [31:0] pc; exec_mode_e m; logic [UB-1:0] idx; logic c, p, t; } ent_t;

  initial begin
    int cyc;
    logic [UB-1:0] e_hist, e_idx;
    logic e_c, e_t, outcome;
    ent_t q [$];
    ent_t e;
    exec_mode_e cur;

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; res_valid = 0; res_mode = MODE_USER;
    res_hist = 0; res_taken = 0; cmt_valid = 0; cmt_mode = MODE_USER; cmt_pc = 0; cmt_idx = 0;
    cmt_choice = 0; cmt_pred = 0; cmt_taken = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 2 ** CB) begin failures++; $display("FAIL ready after %0d", cyc); end
    uh = 0; kh = 0;
    foreach (ch[i]) ch[i] = 1;
    foreach (utk[i]) utk[i] = 1;
    foreach (unt[i]) unt[i] = 1;
    foreach (ktk[i]) ktk[i] = 1;
    foreach (knt[i]) knt[i] = 1;
    cur = MODE_USER;

    for (int t = 0; t < 8000; t++) begin
      if ($urandom % 12 == 0) cur = (cur == MODE_USER) ? MODE_KERNEL : MODE_USER;
      pred_valid = ($urandom % 5) != 0;
      pred_mode  = cur;
      pred_pc    = {16'h0, 8'($urandom % 24), 2'b00} + (cur == MODE_KERNEL ? 32'h8000_7d00 : 32'h0040_0000);
      res_valid  = ($urandom % 9) == 0;
      res_mode   = exec_mode_e'($urandom % 2);
      res_hist   = UB'($urandom);
      res_taken  = $urandom % 2;
      cmt_valid  = 0;
      if (q.size() > 3) begin
        e = q.pop_front();
        cmt_valid = 1; cmt_mode = e.m; cmt_pc = e.pc; cmt_idx = e.idx;
        cmt_choice = e.c; cmt_pred = e.p; cmt_taken = e.t;
      end
      #1;
      e_c = ch[pred_pc[2 +: CB]] >= 2;
      if (pred_mode == MODE_KERNEL) begin
        e_hist = UB'(kh);
        e_idx  = UB'(kh ^ pred_pc[2 +: KB]);
        e_t    = e_c ? (ktk[e_idx[KB-1:0]] >= 2) : (knt[e_idx[KB-1:0]] >= 2);
      end else begin
        e_hist = uh;
        e_idx  = uh ^ pred_pc[2 +: UB];
        e_t    = e_c ? (utk[e_idx] >= 2) : (unt[e_idx] >= 2);
      end
      if (pred_valid) begin
        checks++;
        if (p_hist != e_hist || p_idx != e_idx || p_choice != e_c || p_taken != e_t) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d h=%h/%h i=%h/%h c=%b/%b t=%b/%b", t, p_hist, e_hist, p_idx, e_idx,
                     p_choice, e_c, p_taken, e_t);
        end
        n_use[{pred_mode == MODE_KERNEL, e_c}]++;
        // odd sites lean taken, even sites lean not taken, one in five flips
        outcome = pred_pc[2] ^ (($urandom % 5) == 0);
        e.pc = pred_pc; e.m = pred_mode; e.idx = p_idx; e.c = p_choice; e.p = p_taken; e.t = outcome;
        q.push_back(e);
      end
      if (res_valid) n_repair++;
      @(posedge clk);
      if (res_valid && res_mode == MODE_USER) uh = {res_taken, res_hist[UB-1:1]};
      else if (pred_valid && pred_mode == MODE_USER) uh = {e_t, uh[UB-1:1]};
      if (res_valid && res_mode == MODE_KERNEL) kh = {res_taken, res_hist[KB-1:1]};
      else if (pred_valid && pred_mode == MODE_KERNEL) kh = {e_t, kh[KB-1:1]};
      if (cmt_valid) begin
        if ((cmt_choice != cmt_taken) && (cmt_pred == cmt_taken)) n_skip++;
        else ch[cmt_pc[2 +: CB]] = step(ch[cmt_pc[2 +: CB]], cmt_taken);
        if (cmt_mode == MODE_KERNEL) begin
          if (cmt_choice) ktk[cmt_idx[KB-1:0]] = step(ktk[cmt_idx[KB-1:0]], cmt_taken);
          else            knt[cmt_idx[KB-1:0]] = step(knt[cmt_idx[KB-1:0]], cmt_taken);
        end else begin
          if (cmt_choice) utk[cmt_idx] = step(utk[cmt_idx], cmt_taken);
          else            unt[cmt_idx] = step(unt[cmt_idx], cmt_taken);
        end
      end
      #1;
    end
    $display("user taken/not-taken table %0d/%0d, kernel %0d/%0d, choice kept %0d, repairs %0d",
             n_use[1], n_use[0], n_use[3], n_use[2], n_skip, n_repair);
    checks++;
    if (n_use[0] == 0 || n_use[1] == 0 || n_use[2] == 0 || n_use[3] == 0 || n_skip == 0 ||
        n_repair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
