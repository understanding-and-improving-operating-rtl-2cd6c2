// mode_decode - execution-mode bit from the processor status register.
//
// The OS-aware predictors send each branch to the user or the kernel part of
// the predictor according to the processor's current privilege level, which
// the processor status register already records. This block reads a
// MIPS R10000-style status register and returns one mode bit.
//
// How it works: the two-bit KSU field (status bits 4:3) holds the base
// privilege level, 00 = kernel, 01 = supervisor, 10 = user. The processor
// is also in kernel mode whenever the exception level bit EXL (bit 1) or
// the error level bit ERL (bit 2) is set, as during a TLB refill handler.
// Kernel mode is therefore KSU == 00, or EXL, or ERL; supervisor and user
// levels are both steered to the user part.
//
// Using the status register's mode field is what the predictors are built
// around; the exact bit positions follow the MIPS R10000 register layout,
// and folding supervisor level into "user" is this design's own choice.
//
// Interface: psr (32 bits) in, mode out. Purely combinational, no clock.
module mode_decode
  import os_aware_pkg::*;
(
  input  logic [31:0] psr,
  output exec_mode_e  mode
);

  localparam int unsigned KSU_LSB = 3;
  localparam int unsigned ERL_BIT = 2;
  localparam int unsigned EXL_BIT = 1;

  logic [1:0] ksu;
  logic       kernel;

  always_comb begin
    ksu    = psr[KSU_LSB +: 2];
    kernel = (ksu == 2'b00) || psr[EXL_BIT] || psr[ERL_BIT];
    mode   = kernel ? MODE_KERNEL : MODE_USER;
  end

endmodule
