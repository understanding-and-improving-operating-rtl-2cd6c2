// split_history - a user BHSR and a kernel BHSR behind one mode-selected port.
//
// This is the OS-aware part that every predictor here shares: instead of
// one global history register, branches executed in user mode shift their
// directions into the U-BHSR and branches executed in kernel mode into the
// K-BHSR. A prediction in a given mode sees only its own mode's history,
// so a burst of kernel branches (a TLB refill, a scheduler pass) leaves the
// user history as it was, and the other way round. Switching mode is just
// a change of the select; nothing is copied or flushed.
//
// Interface and timing:
//   pred_mode selects the register; act_hist is that register's value,
//   zero-extended to HW bits, and is combinational from pred_mode. When
//   pred_valid is high, pred_taken (the predicted direction) is shifted
//   into the selected register at the next edge.
//   res_valid repairs the register of res_mode after a misprediction:
//   it is reloaded with res_hist (the history the branch was predicted
//   with, as act_hist returned it) shifted by the real direction
//   res_taken. A repair wins over a prediction in the same cycle.
//   With ZERO_K_ON_ENTRY set, the first kernel-mode prediction after a
//   user-mode one sees an all-zero kernel history and the K-BHSR restarts
//   from zero: the "clear the kernel history on an OS call" variant the
//   document measured against the plain scheme. It is off by default,
//   since the document presents the plain scheme as the design.
//
// The two registers, their selection by the execution-mode bit and the
// zeroing variant follow the document; the mode tracking for detecting
// kernel entry and the repair mechanism are this design's choices.
module split_history
  import os_aware_pkg::*;
#(
  parameter int unsigned U_BITS          = 15,
  parameter int unsigned K_BITS          = 15,
  parameter bit          ZERO_K_ON_ENTRY = 1'b0,
  localparam int unsigned HW             = (U_BITS > K_BITS) ? U_BITS : K_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pred_valid,
  input  exec_mode_e    pred_mode,
  input  logic          pred_taken,
  output logic [HW-1:0] act_hist,
  output logic          k_entry,
  input  logic          res_valid,
  input  exec_mode_e    res_mode,
  input  logic [HW-1:0] res_hist,
  input  logic          res_taken
);

  logic [U_BITS-1:0] u_hist;
  logic [K_BITS-1:0] k_hist;
  exec_mode_e        last_mode;
  logic              k_clear;

  // A kernel-mode prediction that follows a user-mode one marks kernel entry.
  assign k_entry = pred_valid && (pred_mode == MODE_KERNEL) && (last_mode == MODE_USER);
  assign k_clear = ZERO_K_ON_ENTRY && k_entry && !(res_valid && res_mode == MODE_KERNEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          last_mode <= MODE_USER;
    else if (pred_valid) last_mode <= pred_mode;
  end

  always_comb begin
    act_hist = '0;
    if (pred_mode == MODE_KERNEL) begin
      if (!(ZERO_K_ON_ENTRY && k_entry)) act_hist[K_BITS-1:0] = k_hist;
    end else begin
      act_hist[U_BITS-1:0] = u_hist;
    end
  end

  bhsr #(.HIST_BITS(U_BITS)) u_bhsr (
    .clk        (clk),
    .rst_n      (rst_n),
    .hist       (u_hist),
    .clear      (1'b0),
    .spec_valid (pred_valid && pred_mode == MODE_USER),
    .spec_taken (pred_taken),
    .rep_valid  (res_valid && res_mode == MODE_USER),
    .rep_hist   (res_hist[U_BITS-1:0]),
    .rep_taken  (res_taken)
  );

  bhsr #(.HIST_BITS(K_BITS)) k_bhsr (
    .clk        (clk),
    .rst_n      (rst_n),
    .hist       (k_hist),
    .clear      (k_clear),
    .spec_valid (pred_valid && pred_mode == MODE_KERNEL),
    .spec_taken (pred_taken),
    .rep_valid  (res_valid && res_mode == MODE_KERNEL),
    .rep_hist   (res_hist[K_BITS-1:0]),
    .rep_taken  (res_taken)
  );

endmodule
