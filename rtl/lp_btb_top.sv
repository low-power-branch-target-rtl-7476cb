// lp_btb_top - low-power branch target buffer front end.
//
// A conventional fetcher looks up the BTB for every fetched instruction,
// although only a small share of instructions are branches. Here a repose
// counter in the fetcher predicts how many non-branch instructions follow the
// branch just found (the NBIC) and suppresses the BTB look-up - no tag
// comparison at all - for that many fetches. When the counter is zero the BTB
// is looked up; a miss keeps it looked up on the next fetch, a hit reloads the
// counter with a new NBIC. Three NBIC predictors are built in and chosen at run
// time by a mode register (nbic_mode_e, reset value NBIC_FIELDS):
//   NBIC_FIXED  - fixed_nbic register (resets to 3, writable);
//   NBIC_LAST   - LD register of an nbic_counter on the decode stream;
//   NBIC_FIELDS - the hit entry's NBIC_T or NBIC_NT, by predicted direction,
//                 gathered by nbic_gather on the execute stream.
//
// Pipeline interface (one instruction per cycle per stage):
//   IF: if_pc is the address fetched this cycle unless if_stall is high.
//       if_lookup says whether the BTB was looked up for it; if_hit,
//       if_pred_taken and if_pred_next are the prediction the pipeline must
//       carry along; if_repose is the repose counter. All combinational.
//   ID: id_valid/id_is_branch for each decoded, non-squashed instruction
//       (drives the last-NBIC distance counter, as in the source design).
//   EX: ex_valid/ex_is_branch/ex_pc/ex_taken/ex_target for each executed,
//       non-squashed instruction; branches train the BTB and the NBIC fields.
//       ex_redirect/ex_redirect_pc, raised by the pipeline when the actual
//       next pc differs from the carried if_pred_next, restart fetch; the
//       fetch of that cycle is squashed (no look-up) and the repose counter is
//       cleared.
//   CFG: cfg_mode_we/cfg_mode select the predictor; cfg_nbic_we/cfg_nbic set
//       the fixed NBIC. Both take effect the next cycle.
// All state resets asynchronously on rst_n low.
//
// Follows the source design: repose counter semantics, the three predictors,
// NBIC_T/NBIC_NT selection, 8-bit NBIC. This design's own choices: BTB size and
// replacement, the run-time mode register (the source treats the three as
// separate designs), the redirect/stall handshake and clearing the counter on
// a redirect.
module lp_btb_top
  import lpbtb_pkg::*;
#(
  parameter int unsigned     ENTRIES    = 64,
  parameter int unsigned     PC_W       = 32,
  parameter int unsigned     NBIC_W     = 8,
  parameter int unsigned     FIXED_NBIC = 3,
  parameter logic [PC_W-1:0] RESET_PC   = '0,
  localparam int unsigned    IDX_W      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_mode_we,
  input  logic [1:0]        cfg_mode,
  input  logic              cfg_nbic_we,
  input  logic [NBIC_W-1:0] cfg_nbic,
  output logic [1:0]        mode,
  // instruction fetch
  input  logic              if_stall,
  output logic [PC_W-1:0]   if_pc,
  output logic              if_lookup,
  output logic              if_hit,
  output logic              if_pred_taken,
  output logic [PC_W-1:0]   if_pred_next,
  output logic [NBIC_W-1:0] if_repose,
  // decode
  input  logic              id_valid,
  input  logic              id_is_branch,
  // execute
  input  logic              ex_valid,
  input  logic              ex_is_branch,
  input  logic [PC_W-1:0]   ex_pc,
  input  logic              ex_taken,
  input  logic [PC_W-1:0]   ex_target,
  input  logic              ex_redirect,
  input  logic [PC_W-1:0]   ex_redirect_pc
);

  // ---------------- mode register ----------------
  nbic_mode_e mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           mode_q <= NBIC_FIELDS;
    else if (cfg_mode_we) mode_q <= (cfg_mode == 2'd3) ? NBIC_FIELDS : nbic_mode_e'(cfg_mode);
  end
  assign mode = mode_q;

  // ---------------- repose counter ----------------
  logic              fetch_go;
  logic              rc_zero;
  logic              lk_hit, lk_taken;
  logic [PC_W-1:0]   lk_target;
  logic [NBIC_W-1:0] lk_nbic_t, lk_nbic_nt;
  logic [NBIC_W-1:0] nbic_sel, nbic_fixed, nbic_last;

  assign fetch_go  = !if_stall && !ex_redirect;
  assign if_lookup = rc_zero && fetch_go;

  repose_counter #(.NBIC_W(NBIC_W)) u_repose (
    .clk, .rst_n,
    .fetch    (fetch_go),
    .clear    (ex_redirect),
    .load     (lk_hit),
    .load_val (nbic_sel),
    .lookup   (rc_zero),
    .count    (if_repose)
  );

  // ---------------- NBIC predictors ----------------
  fixed_nbic #(.NBIC_W(NBIC_W), .RESET_NBIC(FIXED_NBIC)) u_fixed (
    .clk, .rst_n,
    .cfg_we   (cfg_nbic_we),
    .cfg_nbic (cfg_nbic),
    .nbic     (nbic_fixed)
  );

  logic [NBIC_W-1:0] id_count_unused;
  nbic_counter #(.NBIC_W(NBIC_W)) u_last (
    .clk, .rst_n,
    .valid     (id_valid),
    .is_branch (id_is_branch),
    .count     (id_count_unused),
    .ld        (nbic_last)
  );

  always_comb begin
    unique case (mode_q)
      NBIC_FIXED: nbic_sel = nbic_fixed;
      NBIC_LAST:  nbic_sel = nbic_last;
      default:    nbic_sel = lk_taken ? lk_nbic_t : lk_nbic_nt;
    endcase
  end

  // ---------------- BTB ----------------
  logic              up_en;
  logic [IDX_W-1:0]  up_idx;
  logic              up_alloc_unused;
  logic              fw_en, fw_taken;
  logic [IDX_W-1:0]  fw_idx;
  logic [PC_W-1:0]   fw_pc;
  logic [NBIC_W-1:0] fw_nbic;

  assign up_en = ex_valid && ex_is_branch;

  btb #(.ENTRIES(ENTRIES), .PC_W(PC_W), .NBIC_W(NBIC_W)) u_btb (
    .clk, .rst_n,
    .lk_en      (if_lookup),
    .lk_pc      (if_pc),
    .lk_hit     (lk_hit),
    .lk_taken   (lk_taken),
    .lk_target  (lk_target),
    .lk_nbic_t  (lk_nbic_t),
    .lk_nbic_nt (lk_nbic_nt),
    .up_en      (up_en),
    .up_pc      (ex_pc),
    .up_taken   (ex_taken),
    .up_target  (ex_target),
    .up_idx     (up_idx),
    .up_alloc   (up_alloc_unused),
    .fw_en      (fw_en),
    .fw_idx     (fw_idx),
    .fw_pc      (fw_pc),
    .fw_taken   (fw_taken),
    .fw_nbic    (fw_nbic)
  );

  nbic_gather #(.PC_W(PC_W), .NBIC_W(NBIC_W), .IDX_W(IDX_W)) u_gather (
    .clk, .rst_n,
    .ex_valid     (ex_valid),
    .ex_is_branch (ex_is_branch),
    .ex_pc        (ex_pc),
    .ex_taken     (ex_taken),
    .ex_idx       (up_idx),
    .fw_en        (fw_en),
    .fw_idx       (fw_idx),
    .fw_pc        (fw_pc),
    .fw_taken     (fw_taken),
    .fw_nbic      (fw_nbic)
  );

  // ---------------- fetcher ----------------
  fetch_unit #(.PC_W(PC_W), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .stall       (if_stall),
    .redirect    (ex_redirect),
    .redirect_pc (ex_redirect_pc),
    .bp_hit      (lk_hit),
    .bp_taken    (lk_taken),
    .bp_target   (lk_target),
    .pc          (if_pc),
    .pred_taken  (if_pred_taken),
    .pred_next   (if_pred_next)
  );

  assign if_hit = lk_hit;

  // The BTB is never searched for a fetch that does not happen, and a hit
  // needs a search.
  a_no_lookup_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                          if_lookup |-> (!if_stall && !ex_redirect));
  a_hit_needs_lookup:    assert property (@(posedge clk) disable iff (!rst_n)
                                          if_hit |-> if_lookup);
  // A field write and an update come only from an executed branch.
  a_fw_on_branch:        assert property (@(posedge clk) disable iff (!rst_n)
                                          fw_en |-> up_en);

endmodule
