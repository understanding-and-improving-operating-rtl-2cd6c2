// os_aware_pkg - shared types and helpers for the OS-aware branch predictors.
//
// Every table in these predictors holds 2-bit saturating counters: a counter
// predicts "taken" when its upper bit is set, moves one step towards 3 on a
// taken outcome and one step towards 0 on a not-taken outcome. The execution
// mode that steers the user/kernel split is carried as a one-bit enum. The
// counter encoding, the initial counter value and the 32-bit address width
// are this design's own choices; the 2-bit saturating counter itself is the
// conventional BHT entry the predictors are built from.
package os_aware_pkg;

  // Execution mode taken from the processor status register.
  typedef enum logic {
    MODE_USER   = 1'b0,
    MODE_KERNEL = 1'b1
  } exec_mode_e;

  typedef logic [1:0] ctr2_t;

  localparam ctr2_t CTR_STRONG_NT = 2'd0;
  localparam ctr2_t CTR_WEAK_NT   = 2'd1;
  localparam ctr2_t CTR_WEAK_T    = 2'd2;
  localparam ctr2_t CTR_STRONG_T  = 2'd3;

  // Value every counter takes after reset.
  localparam ctr2_t CTR_INIT = CTR_WEAK_NT;

  // Width of a branch (program counter) address.
  localparam int unsigned PC_W = 32;

  // Counter predicts taken when its upper bit is set.
  function automatic logic ctr_taken(ctr2_t c);
    return c[1];
  endfunction

  // Saturating step towards the outcome.
  function automatic ctr2_t ctr_update(ctr2_t c, logic taken);
    if (taken) return (c == CTR_STRONG_T)  ? c : ctr2_t'(c + 2'd1);
    else       return (c == CTR_STRONG_NT) ? c : ctr2_t'(c - 2'd1);
  endfunction

endpackage
