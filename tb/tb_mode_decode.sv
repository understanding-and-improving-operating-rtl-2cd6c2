// tb_mode_decode - checks the status-register mode decode.
// Directed values for every KSU/EXL/ERL combination, then random status
// words; the expected mode is worked out from the bit fields in the bench.
module tb_mode_decode;
  import os_aware_pkg::*;

  logic [31:0] psr;
  exec_mode_e  mode;
  int checks = 0, failures = 0;
  int n_kernel = 0, n_user = 0;

  mode_decode dut (.psr(psr), .mode(mode));

  task automatic check(logic [31:0] v);
    logic exp_k;
    psr = v;
    #1;
    exp_k = (v[4:3] == 2'b00) | v[1] | v[2];
    checks++;
    if ((mode == MODE_KERNEL) != exp_k) begin
      failures++;
      $display("FAIL psr=%h mode=%0d expected kernel=%0b", v, mode, exp_k);
    end
    if (exp_k) n_kernel++; else n_user++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // every combination of KSU, ERL, EXL with other bits random
    for (int i = 0; i < 32; i++) check({$urandom} & 32'hFFFF_FFE0 | 32'(i));
    check(32'h0000_0010);   // user, no exception level: user
    check(32'h0000_0012);   // user with EXL: kernel (TLB refill)
    check(32'h0000_0008);   // supervisor: user part
    check(32'h0000_0000);   // kernel
    for (int i = 0; i < 2000; i++) check($urandom);
    checks++;
    if (n_kernel == 0 || n_user == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
