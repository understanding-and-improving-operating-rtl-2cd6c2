// bhsr - branch history shift register with speculative update and repair.
//
// Holds the directions (1 = taken) of the most recent HIST_BITS conditional
// branches of one execution mode. The newest outcome enters at the most
// significant end and the oldest falls out of bit 0, as the register is
// drawn with bits entering on the left and leaving on the right.
//
// The register is updated speculatively: when a branch is predicted, its
// predicted direction is shifted in at once (spec_valid, spec_taken) so the
// next branch already sees it. When a branch turns out mispredicted, the
// owner returns the history that branch was predicted with (rep_hist) and
// its real direction (rep_taken); the register is reloaded with that
// history shifted by the real direction, discarding everything younger.
// A repair takes priority over a speculative shift in the same cycle,
// because the branch being predicted then is on the wrong path.
//
// clear zeroes the register (used when the kernel history is emptied on
// entry to the kernel); together with spec_valid it shifts the predicted
// direction into an all-zero history. Reset clears the register.
//
// Speculative update with later correction follows the document; the shift
// direction, the zero reset value and the checkpoint-based repair are this
// design's choices. All updates take effect at the next clock edge.
module bhsr #(
  parameter int unsigned HIST_BITS = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [HIST_BITS-1:0] hist,
  input  logic                 clear,
  input  logic                 spec_valid,
  input  logic                 spec_taken,
  input  logic                 rep_valid,
  input  logic [HIST_BITS-1:0] rep_hist,
  input  logic                 rep_taken
);

  function automatic logic [HIST_BITS-1:0] shift_in(logic [HIST_BITS-1:0] h, logic t);
    logic [HIST_BITS:0] w;
    w = {t, h};
    return w[HIST_BITS:1];
  endfunction

  logic [HIST_BITS-1:0] hist_q;
  logic [HIST_BITS-1:0] base;

  assign base = clear ? '0 : hist_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          hist_q <= '0;
    else if (rep_valid)  hist_q <= shift_in(rep_hist, rep_taken);
    else if (spec_valid) hist_q <= shift_in(base, spec_taken);
    else if (clear)      hist_q <= '0;
  end

  assign hist = hist_q;

endmodule
