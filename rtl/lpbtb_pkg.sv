// Shared types and constants of the low-power branch target buffer front end.
//
// The front end skips branch target buffer (BTB) look-ups on instructions that
// are predicted to be non-branches. After every BTB hit a "repose counter" is
// loaded with the predicted non-branch instruction count (NBIC) that follows
// the branch; the BTB is looked up again only once that counter has run down
// to zero. Three ways of predicting the NBIC are provided and selected by
// nbic_mode_e:
//   NBIC_FIXED  - a constant (programmable) NBIC;
//   NBIC_LAST   - the distance between the two most recent branches (LD register);
//   NBIC_FIELDS - per-branch NBIC_T / NBIC_NT fields stored in the BTB entry and
//                 chosen by the predicted direction (the main configuration).
// Instructions are 32-bit words (word size 4 bytes), as in the ARM machine the
// scheme was evaluated on.
package lpbtb_pkg;

  localparam int unsigned INSN_BYTES = 4;   // size of one instruction in bytes
  localparam int unsigned INSN_SHIFT = 2;   // log2(INSN_BYTES)

  typedef enum logic [1:0] {
    NBIC_FIXED  = 2'd0,
    NBIC_LAST   = 2'd1,
    NBIC_FIELDS = 2'd2
  } nbic_mode_e;

  // 2-bit saturating direction counter states
  typedef enum logic [1:0] {
    CTR_SNT = 2'd0,  // strongly not-taken
    CTR_WNT = 2'd1,  // weakly not-taken
    CTR_WT  = 2'd2,  // weakly taken
    CTR_ST  = 2'd3   // strongly taken
  } dir_ctr_e;

  function automatic dir_ctr_e ctr_next(dir_ctr_e c, logic taken);
    if (taken) return (c == CTR_ST)  ? CTR_ST  : dir_ctr_e'(c + 2'd1);
    else       return (c == CTR_SNT) ? CTR_SNT : dir_ctr_e'(c - 2'd1);
  endfunction

endpackage
