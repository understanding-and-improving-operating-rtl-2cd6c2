// tb_bht - checks the 2-bit counter table.
// A 64-entry table: the clearing sweep must take exactly 64 cycles and
// leave every counter at the initial value; then random commit updates are
// applied to the table and to a model array in the bench, and every read
// is compared, including a read of the entry written in the same cycle.
module tb_bht;
  import os_aware_pkg::*;
  localparam int IB = 6;
  localparam int N  = 2 ** IB;

  logic clk = 0, rst_n = 0;
  logic ready;
  logic [IB-1:0] rd_idx, upd_idx;
  ctr2_t rd_ctr;
  logic upd_valid, upd_taken;
  int checks = 0, failures = 0;
  int model [N];
  int sat_hi = 0, sat_lo = 0;

  bht #(.IDX_BITS(IB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    upd_valid = 0; upd_idx = 0; upd_taken = 0; rd_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != N) begin failures++; $display("FAIL clear took %0d cycles", cyc); end
    for (int i = 0; i < N; i++) begin
      model[i] = 1;
      rd_idx = IB'(i); #1;
      checks++;
      if (rd_ctr != CTR_INIT) begin failures++; $display("FAIL init entry %0d = %0d", i, rd_ctr); end
    end
    for (int t = 0; t < 5000; t++) begin
      upd_valid = ($urandom % 4) != 0;
      upd_idx   = IB'($urandom % 8);  // few entries so counters saturate
      upd_taken = ($urandom % 3) != 0 ? (upd_idx < 4) : ($urandom % 2 == 1);
      rd_idx    = IB'($urandom % 8);
      #1;
      checks++;
      if (int'(rd_ctr) != model[rd_idx]) begin
        failures++;
        $display("FAIL t=%0d idx=%0d got %0d exp %0d", t, rd_idx, rd_ctr, model[rd_idx]);
      end
      @(posedge clk);
      if (upd_valid) begin
        if (upd_taken && model[upd_idx] == 3) sat_hi++;
        if (!upd_taken && model[upd_idx] == 0) sat_lo++;
        if (upd_taken)  model[upd_idx] = (model[upd_idx] == 3) ? 3 : model[upd_idx] + 1;
        else            model[upd_idx] = (model[upd_idx] == 0) ? 0 : model[upd_idx] - 1;
      end
      #1;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("saturated-high updates %0d, saturated-low updates %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
