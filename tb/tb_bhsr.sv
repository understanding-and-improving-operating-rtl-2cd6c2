// tb_bhsr - checks the history shift register.
// Random speculative shifts, repairs and clears, alone and together, are
// applied to the register and to a model in the bench; the register must
// match the model after every clock.
module tb_bhsr;
  localparam int HB = 8;

  logic clk = 0, rst_n = 0;
  logic [HB-1:0] hist, rep_hist;
  logic clear, spec_valid, spec_taken, rep_valid, rep_taken;
  int checks = 0, failures = 0;
  logic [HB-1:0] model;
  int n_rep_spec = 0, n_clear_spec = 0;

  bhsr #(.HIST_BITS(HB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; spec_valid = 0; spec_taken = 0; rep_valid = 0; rep_hist = 0; rep_taken = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = '0;
    checks++;
    if (hist != 0) failures++;
    // directed: shift 1,0,1 into zero -> 101 at the top
    spec_valid = 1;
    spec_taken = 1; @(posedge clk); #1;
    spec_taken = 0; @(posedge clk); #1;
    spec_taken = 1; @(posedge clk); #1;
    spec_valid = 0;
    checks++;
    if (hist != {3'b101, {(HB-3){1'b0}}}) begin failures++; $display("FAIL directed %b", hist); end
    model = hist;
    for (int t = 0; t < 5000; t++) begin
      spec_valid = $urandom % 2;
      spec_taken = $urandom % 2;
      rep_valid  = ($urandom % 5) == 0;
      rep_hist   = HB'($urandom);
      rep_taken  = $urandom % 2;
      clear      = ($urandom % 7) == 0;
      if (rep_valid && spec_valid) n_rep_spec++;
      if (clear && spec_valid && !rep_valid) n_clear_spec++;
      @(posedge clk);
      if (rep_valid)       model = {rep_taken, rep_hist[HB-1:1]};
      else if (spec_valid) model = {spec_taken, (clear ? {(HB-1){1'b0}} : model[HB-1:1])};
      else if (clear)      model = '0;
      #1;
      checks++;
      if (hist != model) begin
        failures++;
        $display("FAIL t=%0d hist=%b exp=%b", t, hist, model);
      end
    end
    checks++;
    if (n_rep_spec == 0 || n_clear_spec == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
