// tb_split_bhsr_gshare - checks the split-history Gshare predictor.
// Two copies with 8-bit histories (256 counters) take the same branch
// stream: the plain scheme and the variant that empties the kernel history
// on kernel entry. The stream has user and kernel bursts, branches with a
// per-address bias, commits three branches behind the predictions and
// occasional repairs. A model in the bench keeps both history registers and
// the counter table of each copy and predicts index, history and direction
// for every branch; the copies must agree with it every cycle.
module tb_split_bhsr_gshare;
  import os_aware_pkg::*;
  localparam int HB = 8;
  localparam int N  = 2 ** HB;

  logic clk = 0, rst_n = 0;
  logic pred_valid, res_valid, res_taken, cmt_valid, cmt_taken;
  logic [31:0] pred_pc;
  exec_mode_e pred_mode, res_mode;
  logic [HB-1:0] res_hist, cmt_idx;
  logic a_ready, b_ready, a_taken, b_taken, a_kentry, b_kentry;
  logic [HB-1:0] a_idx, b_idx, a_hist, b_hist;

  int checks = 0, failures = 0;
  int n_switch = 0, n_entry = 0, n_repair = 0, n_preserved = 0;

  split_bhsr_gshare #(.HIST_BITS(HB)) dut_a (
    .clk, .rst_n, .ready(a_ready), .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(a_taken), .pred_idx(a_idx), .pred_hist(a_hist), .k_entry(a_kentry),
    .res_valid, .res_mode, .res_hist, .res_taken, .cmt_valid, .cmt_idx, .cmt_taken);

  split_bhsr_gshare #(.HIST_BITS(HB), .ZERO_K_ON_ENTRY(1'b1)) dut_b (
    .clk, .rst_n, .ready(b_ready), .pred_valid, .pred_pc, .pred_mode,
    .pred_taken(b_taken), .pred_idx(b_idx), .pred_hist(b_hist), .k_entry(b_kentry),
    .res_valid, .res_mode, .res_hist, .res_taken, .cmt_valid, .cmt_idx, .cmt_taken);

  always #5 clk = ~clk;

  // ---- model
  logic [HB-1:0] ua, ka, ub, kb;
  int ta [N];
  exec_mode_e last;

  function automatic logic [HB-1:0] sh(logic [HB-1:0] h, logic t);
    return {t, h[HB-1:1]};
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
    logic [HB-1:0] ea_hist, eb_hist, ea_idx, eb_idx, u_saved;
    logic ea_t, eb_t, entering;
    logic [HB-1:0] q_idx [$];
    logic          q_t   [$];
    logic          in_k_visit;
    exec_mode_e    cur;

    pred_valid = 0; pred_pc = 0; pred_mode = MODE_USER; res_valid = 0; res_mode = MODE_USER;
    res_hist = 0; res_taken = 0; cmt_valid = 0; cmt_idx = 0; cmt_taken = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!a_ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != N || !b_ready) begin failures++; $display("FAIL ready after %0d", cyc); end
    ua = 0; ka = 0; ub = 0; kb = 0; last = MODE_USER;
    foreach (ta[i]) ta[i] = 1;
    cur = MODE_USER; in_k_visit = 0; u_saved = 0;

    for (int t = 0; t < 8000; t++) begin
      // stimulus
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
        cmt_valid = 1;
        cmt_idx   = q_idx.pop_front();
        cmt_taken = q_t.pop_front();
      end
      #1;
      // expected prediction
      entering = pred_valid && pred_mode == MODE_KERNEL && last == MODE_USER;
      ea_hist  = (pred_mode == MODE_KERNEL) ? ka : ua;
      eb_hist  = (pred_mode == MODE_KERNEL) ? (entering ? '0 : kb) : ub;
      ea_idx   = ea_hist ^ pred_pc[2 +: HB];
      eb_idx   = eb_hist ^ pred_pc[2 +: HB];
      ea_t     = ta[ea_idx] >= 2;
      eb_t     = ta[eb_idx] >= 2;
      if (pred_valid) begin
        checks++;
        if (a_hist != ea_hist || a_idx != ea_idx || a_taken != ea_t ||
            b_hist != eb_hist || b_idx != eb_idx || b_taken != eb_t || b_kentry != entering) begin
          failures++;
          $display("FAIL t=%0d A h=%h/%h i=%h/%h t=%b/%b  B h=%h/%h i=%h/%h t=%b/%b",
                   t, a_hist, ea_hist, a_idx, ea_idx, a_taken, ea_t,
                   b_hist, eb_hist, b_idx, eb_idx, b_taken, eb_t);
        end
        if (entering) n_entry++;
        if (pred_mode != last) n_switch++;
        // user history must come back unchanged after a kernel visit
        if (pred_mode == MODE_KERNEL && !in_k_visit) begin in_k_visit = 1; u_saved = ua; end
        if (pred_mode == MODE_USER && in_k_visit) begin
          in_k_visit = 0;
          if (u_saved == ua) begin
            n_preserved++;
            checks++;
            if (a_hist != u_saved) failures++;
          end
        end
        // the outcome follows a per-address bias
        q_idx.push_back(a_idx);
        q_t.push_back((pred_pc[4:2] != 3'b111) ^ (($urandom % 10) == 0));
      end
      if (res_valid) n_repair++;
      // model update at the edge
      @(posedge clk);
      if (res_valid && res_mode == MODE_USER) begin ua = sh(res_hist, res_taken); ub = ua; end
      else if (pred_valid && pred_mode == MODE_USER) begin ua = sh(ua, ea_t); ub = sh(ub, eb_t); end
      if (res_valid && res_mode == MODE_KERNEL) begin ka = sh(res_hist, res_taken); kb = ka; end
      else if (pred_valid && pred_mode == MODE_KERNEL) begin
        ka = sh(ka, ea_t);
        kb = sh(entering ? '0 : kb, eb_t);
      end
      if (pred_valid) last = pred_mode;
      if (cmt_valid) ta[cmt_idx] = cmt_taken ? (ta[cmt_idx] == 3 ? 3 : ta[cmt_idx] + 1)
                                             : (ta[cmt_idx] == 0 ? 0 : ta[cmt_idx] - 1);
      #1;
    end
    $display("mode switches %0d, kernel entries %0d, repairs %0d, user history kept %0d",
             n_switch, n_entry, n_repair, n_preserved);
    checks++;
    if (n_switch == 0 || n_entry == 0 || n_repair == 0 || n_preserved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
