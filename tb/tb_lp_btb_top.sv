// tb_lp_btb_top - end-to-end test of the low-power BTB front end at its
// default parameters (64 entries, 8-bit NBIC).
//
// The testbench models a three-stage IF/ID/EX pipeline around the front end
// and a synthetic program held in arrays (word addresses):
//    0..3   straight-line code
//    4      outer loop B head
//    5..10  body of inner loop A (6 non-branches)
//    11     loop A branch, back to 5, taken 7 times then falls through
//    14     branch taken every other time (to 17)
//    18     loop B branch, back to 4, taken 5 times then falls through
//    19..258 80 never-taken branches, each after two non-branches: more
//           branches than BTB entries, so the BTB replaces entries every pass
//    260    jump back to 0
// EX resolves each instruction against this program, checks that the fetched
// stream is exactly the program's path, and raises a redirect whenever the
// carried prediction was wrong - including a taken branch that was fetched
// without a BTB look-up (2 penalty cycles, as in the evaluation of the scheme).
//
// Checks: program order; if_lookup against an independent repose-counter
// model (the fixed and last-NBIC values are modelled here, NBIC_T/NBIC_NT are
// taken from the front end); in NBIC_FIELDS mode, the steady state of loop A
// (from its fourth iteration) looks up the loop branch on every fetch and
// none of the 6 body instructions. Phases: NBIC_FIELDS (reset default), then
// a run-time switch to NBIC_LAST, then NBIC_FIXED with 3, 5 and 16 (16 is the
// fixed value of the published comparison), then NBIC_FIXED with 0 - which
// looks up every fetch, i.e. a conventional BTB - and NBIC_FIELDS again, warm.
// From the cycle and look-up counts it estimates energy per instruction with
// the scheme's model, E = P_R*cycles + (P_L-P_R)*look-ups, the BTB taking 10 %
// of processor power, and requires NBIC_FIELDS to beat the conventional BTB. Per phase
// it prints the look-up precisions of branches (BLP), non-branches (NLP) and
// all instructions (LP) and the performance loss BN/IC*2. Every mechanism
// (reposed fetch, look-up miss, hit loading the counter, taken branch missed
// while reposed, mispredict, BTB replacement, NBIC_T and NBIC_NT writes,
// stall, mode switch) must occur at least once.
module tb_lp_btb_top;
  import lpbtb_pkg::*;
  localparam int unsigned PC_W = 32, W = 8, P = 264;
  localparam int PENALTY = 2;

  logic clk = 1'b0, rst_n = 1'b1;
  logic cfg_mode_we, cfg_nbic_we;
  logic [1:0] cfg_mode, mode;
  logic [W-1:0] cfg_nbic;
  logic if_stall, if_lookup, if_hit, if_pred_taken;
  logic [PC_W-1:0] if_pc, if_pred_next;
  logic [W-1:0] if_repose;
  logic id_valid, id_is_branch;
  logic ex_valid, ex_is_branch, ex_taken, ex_redirect;
  logic [PC_W-1:0] ex_pc, ex_target, ex_redirect_pc;

  lp_btb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  typedef enum int {K_NB, K_LOOP, K_ALT, K_NEVER, K_JUMP} kind_e;
  kind_e pk   [P];
  int    ptgt [P];   // target word address
  int    ptrip[P];   // loop trip count
  int    pcnt [P];   // per-branch state

  function automatic void build_prog();
    for (int i = 0; i < P; i++) begin pk[i] = K_NB; ptgt[i] = 0; ptrip[i] = 0; pcnt[i] = 0; end
    pk[11] = K_LOOP; ptgt[11] = 5; ptrip[11] = 8;
    pk[14] = K_ALT;  ptgt[14] = 17;
    pk[18] = K_LOOP; ptgt[18] = 4; ptrip[18] = 6;
    for (int k = 0; k < 80; k++) begin pk[21 + 3*k] = K_NEVER; ptgt[21 + 3*k] = 2; end
    pk[260] = K_JUMP; ptgt[260] = 0;
  endfunction

  function automatic int widx(logic [PC_W-1:0] pc);
    return int'(pc >> 2);
  endfunction

  // ---------------- pipeline registers ----------------
  logic            d_v, d_lk, d_hit;
  logic [PC_W-1:0] d_pc, d_pn;
  logic            e_v, e_lk, e_hit;
  logic [PC_W-1:0] e_pc, e_pn;
  logic [PC_W-1:0] exp_pc;

  // statistics of the current phase
  longint ic, bic, b_lk, n_nolk, bn, cyc, lkc;
  // energy per instruction of each reported phase (see report)
  real e_conv, e_fields, e_last, e_fixed3;
  // mechanism counters over the whole run
  int n_reposed, n_lk_miss, n_hit_load, n_bn, n_mispred, n_evict_miss, n_wr_t, n_wr_nt,
      n_stall, n_switch, n_exact_chk, n_conv_skip;
  // repose model
  int rc_model, ld_model, dist_model, fixed_model;
  int passes;
  int loopA_taken;

  // Energy model of the evaluation: processor power P_R with the BTB idle,
  // P_L = P_R + BTB share during a look-up, BTB share 10 % of the processor.
  // E = P_R * cycles + (P_L - P_R) * look-ups, reported per instruction.
  localparam real BTB_SHARE = 0.10;
  function automatic real energy_per_insn();
    return ((1.0 - BTB_SHARE) * real'(cyc) + BTB_SHARE * real'(lkc)) / real'(ic);
  endfunction

  task automatic report(string name, output real e);
    real blp, nlp, lp, pl;
    e = energy_per_insn();
    blp = 100.0 * real'(b_lk) / real'(bic);
    nlp = 100.0 * real'(n_nolk) / real'(ic - bic);
    lp  = 100.0 * real'(b_lk + n_nolk) / real'(ic);
    pl  = 100.0 * real'(bn) * PENALTY / real'(ic);
    $display("%-14s IC=%0d BIC=%0d BLP=%6.2f%% NLP=%6.2f%% LP=%6.2f%% BN=%0d perf.loss=%5.2f%% cycles=%0d lookups=%0d E/insn=%6.4f",
             name, ic, bic, blp, nlp, lp, bn, pl, cyc, lkc, e);
    ic = 0; bic = 0; b_lk = 0; n_nolk = 0; bn = 0; cyc = 0; lkc = 0;
  endtask

  // one clock of the pipeline; cfg inputs are driven by the caller
  task automatic tick();
    kind_e k;
    int wi;
    logic taken;
    logic [PC_W-1:0] tgt, actual;
    logic is_br_id;
    @(negedge clk);
    cyc++;
    // ---- EX ----
    taken = 1'b0; tgt = '0; actual = '0; k = K_NB;
    if (e_v) begin
      wi = widx(e_pc);
      checks++;
      if (e_pc != exp_pc) begin
        failures++; $display("FAIL EX pc=%h expected %h", e_pc, exp_pc);
      end
      k = pk[wi];
      tgt = PC_W'(ptgt[wi] * 4);
      case (k)
        K_NB:    taken = 1'b0;
        K_LOOP:  taken = (pcnt[wi] < ptrip[wi] - 1);
        K_ALT:   taken = (pcnt[wi] % 2 == 0);
        K_NEVER: taken = 1'b0;
        K_JUMP:  taken = 1'b1;
      endcase
      actual = taken ? tgt : e_pc + 4;
    end
    ex_valid       = e_v;
    ex_is_branch   = e_v && (k != K_NB);
    ex_pc          = e_pc;
    ex_taken       = taken;
    ex_target      = tgt;
    ex_redirect    = e_v && (actual != e_pn);
    ex_redirect_pc = actual;
    // ---- ID ----
    is_br_id     = pk[widx(d_pc) % P] != K_NB;
    id_valid     = d_v && !ex_redirect;
    id_is_branch = is_br_id;
    // ---- IF ----
    if_stall = ($urandom_range(0, 9) == 0);
    #1;
    // repose-counter model check
    checks++;
    if (if_lookup != (rc_model == 0 && !if_stall && !ex_redirect)) begin
      failures++;
      $display("FAIL if_lookup=%0b model rc=%0d pc=%h", if_lookup, rc_model, if_pc);
    end
    if (if_stall) n_stall++;
    if (if_lookup) lkc++;
    if (!if_stall && !ex_redirect) begin
      if (if_lookup && !if_hit) n_lk_miss++;
      if (!if_lookup) n_reposed++;
      if (!if_lookup && mode == 2'(NBIC_FIXED) && fixed_model == 0) n_conv_skip++;
    end
    // ---- statistics for the instruction in EX ----
    if (e_v) begin
      ic++;
      if (k != K_NB) begin
        bic++;
        if (e_lk) b_lk++;
        if (taken && !e_lk) begin bn++; n_bn++; end
        if (e_lk && !e_hit && dut.u_btb.up_en && passes > 0) n_evict_miss++;
      end else if (!e_lk) n_nolk++;
      if (ex_redirect && e_lk) n_mispred++;
      // loop A steady state, NBIC_FIELDS mode
      if (mode == 2'(NBIC_FIELDS) && loopA_taken >= 3 && wi >= 5 && wi <= 11) begin
        checks++; n_exact_chk++;
        if (e_lk != (wi == 11)) begin
          failures++;
          $display("FAIL loop A steady state: pc=%h lookup=%0b iter=%0d", e_pc, e_lk, loopA_taken);
        end
      end
    end
    if (dut.fw_en) begin
      if (dut.fw_taken) n_wr_t++; else n_wr_nt++;
    end
    @(posedge clk);
    // ---- model updates (after the edge) ----
    if (!if_stall && !ex_redirect && if_lookup && if_hit) n_hit_load++;
    if (ex_redirect) rc_model = 0;
    else if (!if_stall) begin
      if (rc_model != 0) rc_model--;
      else if (if_hit) begin
        case (mode)
          2'(NBIC_FIXED): rc_model = fixed_model;
          2'(NBIC_LAST):  rc_model = ld_model;
          default:        rc_model = if_pred_taken ? int'(dut.lk_nbic_t) : int'(dut.lk_nbic_nt);
        endcase
      end
    end
    if (id_valid) begin
      if (id_is_branch) begin ld_model = dist_model; dist_model = 0; end
      else if (dist_model < 255) dist_model++;
    end
    if (e_v) begin
      if (k == K_LOOP || k == K_ALT) pcnt[wi] = (k == K_LOOP && !taken) ? 0 : pcnt[wi] + 1;
      if (wi == 11) loopA_taken = taken ? loopA_taken + 1 : 0;
      if (k == K_JUMP) passes++;
      exp_pc = actual;
    end
    // shift pipeline
    e_v = d_v && !ex_redirect; e_pc = d_pc; e_lk = d_lk; e_hit = d_hit; e_pn = d_pn;
    d_v = !if_stall && !ex_redirect; d_pc = if_pc; d_lk = if_lookup; d_hit = if_hit; d_pn = if_pred_next;
  endtask

  task automatic run_passes(int n);
    int target;
    target = passes + n;
    while (passes < target) tick();
  endtask

  task automatic cfg_write(logic mwe, logic [1:0] m, logic nwe, logic [W-1:0] v);
    @(negedge clk);
    cfg_mode_we = mwe; cfg_mode = m; cfg_nbic_we = nwe; cfg_nbic = v;
    @(posedge clk);
    #1;
    cfg_mode_we = 1'b0; cfg_nbic_we = 1'b0;
    if (mwe) begin
      n_switch++;
      checks++;
      if (mode != m) begin failures++; $display("FAIL mode=%0d want %0d", mode, m); end
    end
    if (nwe) fixed_model = int'(v);
  endtask

  initial begin
    build_prog();
    cfg_mode_we = 0; cfg_mode = 0; cfg_nbic_we = 0; cfg_nbic = 0;
    if_stall = 0; id_valid = 0; id_is_branch = 0;
    ex_valid = 0; ex_is_branch = 0; ex_taken = 0; ex_redirect = 0;
    ex_pc = 0; ex_target = 0; ex_redirect_pc = 0;
    d_v = 0; d_lk = 0; d_hit = 0; d_pc = 0; d_pn = 0;
    e_v = 0; e_lk = 0; e_hit = 0; e_pc = 0; e_pn = 0;
    exp_pc = 0; ic = 0; bic = 0; b_lk = 0; n_nolk = 0; bn = 0; cyc = 0; lkc = 0;
    n_reposed = 0; n_lk_miss = 0; n_hit_load = 0; n_bn = 0; n_mispred = 0; n_evict_miss = 0;
    n_wr_t = 0; n_wr_nt = 0; n_stall = 0; n_switch = 0; n_exact_chk = 0; n_conv_skip = 0;
    rc_model = 0; ld_model = 0; dist_model = 0; fixed_model = 3; passes = 0; loopA_taken = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (mode != 2'(NBIC_FIELDS)) begin failures++; $display("FAIL reset mode %0d", mode); end

    begin
      real e_dummy;
      run_passes(3);
      report("NBIC_FIELDS", e_dummy);
      cfg_write(1'b1, 2'(NBIC_LAST), 1'b0, '0);
      run_passes(2);
      report("NBIC_LAST", e_last);
      cfg_write(1'b1, 2'(NBIC_FIXED), 1'b0, '0);
      run_passes(2);
      report("NBIC_FIXED=3", e_fixed3);
      cfg_write(1'b0, '0, 1'b1, 8'd5);
      run_passes(2);
      report("NBIC_FIXED=5", e_dummy);
      cfg_write(1'b0, '0, 1'b1, 8'd16);
      run_passes(2);
      report("NBIC_FIXED=16", e_dummy);
      // fixed NBIC 0 never reposes: a conventional BTB, the energy reference
      cfg_write(1'b0, '0, 1'b1, 8'd0);
      run_passes(2);
      checks++;
      if (lkc == 0 || n_conv_skip != 0) begin
        failures++; $display("FAIL conventional phase skipped %0d look-ups", n_conv_skip);
      end
      report("conventional", e_conv);
      cfg_write(1'b1, 2'(NBIC_FIELDS), 1'b0, '0);
      run_passes(2);
      report("NBIC_FIELDS", e_fields);
      $display("energy saving vs conventional BTB (BTB = 10%% of power): fields %5.2f%%  last %5.2f%%  fixed3 %5.2f%%",
               100.0 * (1.0 - e_fields / e_conv), 100.0 * (1.0 - e_last / e_conv),
               100.0 * (1.0 - e_fixed3 / e_conv));
      checks++;
      if (!(e_fields < e_conv)) begin
        failures++; $display("FAIL per-branch NBIC fields do not save energy on this program");
      end
    end

    $display("mechanisms: reposed=%0d lookup_miss=%0d hit_load=%0d taken_reposed=%0d mispredict=%0d",
             n_reposed, n_lk_miss, n_hit_load, n_bn, n_mispred);
    $display("            evicted_branch_miss=%0d nbic_t_writes=%0d nbic_nt_writes=%0d stalls=%0d mode_switches=%0d exact_checks=%0d",
             n_evict_miss, n_wr_t, n_wr_nt, n_stall, n_switch, n_exact_chk);
    if (n_reposed == 0)    begin failures++; $display("FAIL no reposed fetch"); end
    if (n_lk_miss == 0)    begin failures++; $display("FAIL no look-up miss"); end
    if (n_hit_load == 0)   begin failures++; $display("FAIL no hit"); end
    if (n_bn == 0)         begin failures++; $display("FAIL no taken branch fetched while reposed"); end
    if (n_mispred == 0)    begin failures++; $display("FAIL no mispredict"); end
    if (n_evict_miss == 0) begin failures++; $display("FAIL no replacement observed"); end
    if (n_wr_t == 0)       begin failures++; $display("FAIL no NBIC_T write"); end
    if (n_wr_nt == 0)      begin failures++; $display("FAIL no NBIC_NT write"); end
    if (n_stall == 0)      begin failures++; $display("FAIL no stall"); end
    if (n_switch < 3)      begin failures++; $display("FAIL no mode switch"); end
    if (n_exact_chk < 50)  begin failures++; $display("FAIL loop A steady state not reached"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
