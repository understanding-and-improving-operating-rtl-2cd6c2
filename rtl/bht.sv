// bht - branch history table: 2**IDX_BITS two-bit saturating counters.
//
// The table is the pattern store of every predictor here. It has one read
// port used at prediction time and one read-modify-write port used when a
// branch commits: the committing branch's counter is read, stepped towards
// the outcome and written back in the same cycle. Predictions read the
// table combinationally, so the counter for an index presented in a cycle
// is visible in that cycle. A write in cycle t is seen by reads from cycle
// t+1 on.
//
// After reset the table is cleared by a sweep that writes CTR_INIT into one
// entry per cycle, 2**IDX_BITS cycles in all, because a RAM of this size
// has no reset of its own. ready is low during the sweep; updates offered
// then are dropped and reads return whatever the array holds.
//
// The 2-bit counter and the per-mode table sizes are the document's; the
// single-cycle read, the port arrangement and the clearing sweep are this
// design's choices.
module bht
  import os_aware_pkg::*;
#(
  parameter int unsigned IDX_BITS = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ready,
  // prediction read port
  input  logic [IDX_BITS-1:0] rd_idx,
  output ctr2_t               rd_ctr,
  // commit-time update port
  input  logic                upd_valid,
  input  logic [IDX_BITS-1:0] upd_idx,
  input  logic                upd_taken
);

  localparam int unsigned ENTRIES = 2 ** IDX_BITS;

  ctr2_t               mem [ENTRIES];
  logic                init_busy;
  logic [IDX_BITS-1:0] init_idx;

  logic                we;
  logic [IDX_BITS-1:0] wa;
  ctr2_t               wd;

  always_comb begin
    if (init_busy) begin
      we = 1'b1;
      wa = init_idx;
      wd = CTR_INIT;
    end else begin
      we = upd_valid;
      wa = upd_idx;
      wd = ctr_update(mem[upd_idx], upd_taken);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == IDX_BITS'(ENTRIES - 1)) init_busy <= 1'b0;
    end
  end

  assign ready  = !init_busy;
  assign rd_ctr = mem[rd_idx];

endmodule
