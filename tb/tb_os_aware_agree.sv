// tb_os_aware_agree - checks the OS-aware Agree predictor.
// A small copy (256 counters) takes a stream of user and kernel bursts.
// The bench stands in for the branch target buffer: a branch's biasing bit
// is its first committed outcome. A model in the bench keeps the histories
// and the table and predicts index and direction for every branch; the
// counters must learn "agree" and "disagree".
module tb_os_aware_agree;
  import os_aware_pkg::*;
  localparam int HB = 8;

  logic clk = 0, rst_n = 0;
  logic pred_valid, pred_bias, res_valid, res_taken, cmt_valid, cmt_taken, cmt_bias;
  logic [31:0] pred_pc;
  exec_mode_e pred_mode, res_mode;
  logic [HB-1:0] res_hist, cmt_idx, p_idx, p_hist;
  logic ready, p_taken;

  int checks = 0, failures = 0;
  int n_agree = 0, n_disagree = 0, n_repair = 0;

  os_aware_agree #(.HIST_BITS(HB)) dut (
    .clk, .rst_n, .ready, .pred_valid, .pred_pc, .pred_mode, .pred_bias,
    .pred_taken(p_taken), .pred_idx(p_idx), .pred_hist(p_hist),
    .res_valid, .res_mode, .res_hist, .res_taken,
    .cmt_valid, .cmt_idx, .cmt_bias, .cmt_taken);

  always #5 clk = ~clk;

  logic [HB-1:0] uh, kh;
  int at [2**HB];
  logic bias_known [bit [31:0]];

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
    logic e_t, outcome;
    logic [HB-1:0] q_idx [$];
    logic [31:0]   q_pc [$];
    logic          q_t [$], q_b [$];
    exec_mode_e    cur;

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; pred_bias = 0; res_valid = 0;
    res_mode = MODE_USER; res_hist = 0; res_taken = 0; cmt_valid = 0; cmt_idx = 0;
    cmt_taken = 0; cmt_bias = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 2 ** HB) begin failures++; $display("FAIL ready after %0d", cyc); end
    uh = 0; kh = 0;
    foreach (at[i]) at[i] = 1;
    cur = MODE_USER;

    for (int t = 0; t < 8000; t++) begin
      if ($urandom % 12 == 0) cur = (cur == MODE_USER) ? MODE_KERNEL : MODE_USER;
      pred_valid = ($urandom % 5) != 0;
      pred_mode  = cur;
      pred_pc    = {16'h0, 8'($urandom % 24), 2'b00} + (cur == MODE_KERNEL ? 32'h8000_7d00 : 32'h0040_0000);
      // biasing bit from the stand-in BTB; unknown branches assume taken
      pred_bias  = bias_known.exists(pred_pc) ? bias_known[pred_pc] : 1'b1;
      res_valid  = ($urandom % 9) == 0;
      res_mode   = exec_mode_e'($urandom % 2);
      res_hist   = HB'($urandom);
      res_taken  = $urandom % 2;
      cmt_valid  = 0;
      if (q_idx.size() > 3) begin
        cmt_valid = 1;
        cmt_idx   = q_idx.pop_front();
        cmt_taken = q_t.pop_front();
        cmt_bias  = q_b.pop_front();
        void'(q_pc.pop_front());
      end
      #1;
      e_hist = (pred_mode == MODE_KERNEL) ? kh : uh;
      e_idx  = e_hist ^ pred_pc[2 +: HB];
      e_t    = (at[e_idx] >= 2) ? pred_bias : !pred_bias;
      if (pred_valid) begin
        checks++;
        if (p_hist != e_hist || p_idx != e_idx || p_taken != e_t) begin
          failures++;
          $display("FAIL t=%0d h=%h/%h i=%h/%h t=%b/%b", t, p_hist, e_hist, p_idx, e_idx, p_taken, e_t);
        end
        if (at[e_idx] >= 2) n_agree++; else n_disagree++;
        outcome = (pred_pc[4:2] != 3'b111) ^ (($urandom % 4) == 0);
        if (!bias_known.exists(pred_pc)) bias_known[pred_pc] = outcome;
        q_idx.push_back(p_idx);
        q_pc.push_back(pred_pc);
        q_b.push_back(pred_bias);
        q_t.push_back(outcome);
      end
      if (res_valid) n_repair++;
      @(posedge clk);
      if (res_valid && res_mode == MODE_USER) uh = {res_taken, res_hist[HB-1:1]};
      else if (pred_valid && pred_mode == MODE_USER) uh = {e_t, uh[HB-1:1]};
      if (res_valid && res_mode == MODE_KERNEL) kh = {res_taken, res_hist[HB-1:1]};
      else if (pred_valid && pred_mode == MODE_KERNEL) kh = {e_t, kh[HB-1:1]};
      if (cmt_valid) at[cmt_idx] = step(at[cmt_idx], cmt_taken == cmt_bias);
      #1;
    end
    $display("agree predictions %0d, disagree predictions %0d, repairs %0d", n_agree, n_disagree, n_repair);
    checks++;
    if (n_agree == 0 || n_disagree == 0 || n_repair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
