// btb - fully associative branch target buffer with NBIC fields.
//
// Each entry holds a valid bit, the branch address (tag), the branch target,
// a 2-bit saturating direction counter and two non-branch instruction count
// fields: NBIC_T (the number of non-branch instructions that followed this
// branch the last time it was taken) and NBIC_NT (the same when it was not
// taken). The buffer is a content addressable memory: a look-up compares the
// fetch address against every tag and at most one entry matches.
//
// Ports
//   Look-up (instruction fetch, combinational): when lk_en is low no tag is
//   compared and all look-up outputs are held at zero - this is the power
//   saving the surrounding logic aims at. On a hit lk_taken is the counter's
//   MSB, lk_target the stored target, lk_nbic_t / lk_nbic_nt the two fields.
//   Update (execute stage, one clock): up_en with the resolved branch pc,
//   direction and target. A known branch trains its counter (and its target
//   when taken); an unknown branch is allocated in round-robin order, its
//   counter set to weakly taken / weakly not-taken after the outcome and its
//   NBIC fields cleared to INIT_NBIC. up_idx (combinational) is the entry the
//   update writes.
//   Field write (one clock): fw_en writes fw_nbic into NBIC_T (fw_taken=1)
//   or NBIC_NT (fw_taken=0) of entry fw_idx, but only if that entry still
//   holds fw_pc and is not being re-allocated by the update port in the same
//   cycle, so a branch that was evicted meanwhile cannot corrupt another.
//
// Following the source design: tag/target/direction content, CAM organisation,
// NBIC_T/NBIC_NT fields initialised to zero, update after execution. Own
// choices: entry count (64), 2-bit counter, round-robin replacement, the tag
// check on the field write port. Instructions are word aligned, so the two
// low address bits of every pc input are ignored.
module btb
  import lpbtb_pkg::*;
#(
  parameter int unsigned ENTRIES   = 64,
  parameter int unsigned PC_W      = 32,
  parameter int unsigned NBIC_W    = 8,
  parameter int unsigned INIT_NBIC = 0,
  localparam int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned TAG_W    = PC_W - INSN_SHIFT
) (
  input  logic              clk,
  input  logic              rst_n,
  // look-up port
  input  logic              lk_en,
  input  logic [PC_W-1:0]   lk_pc,
  output logic              lk_hit,
  output logic              lk_taken,
  output logic [PC_W-1:0]   lk_target,
  output logic [NBIC_W-1:0] lk_nbic_t,
  output logic [NBIC_W-1:0] lk_nbic_nt,
  // update port
  input  logic              up_en,
  input  logic [PC_W-1:0]   up_pc,
  input  logic              up_taken,
  input  logic [PC_W-1:0]   up_target,
  output logic [IDX_W-1:0]  up_idx,
  output logic              up_alloc,
  // NBIC field write port
  input  logic              fw_en,
  input  logic [IDX_W-1:0]  fw_idx,
  input  logic [PC_W-1:0]   fw_pc,
  input  logic              fw_taken,
  input  logic [NBIC_W-1:0] fw_nbic
);

  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [TAG_W-1:0]  target;
    dir_ctr_e          ctr;
    logic [NBIC_W-1:0] nbic_t;
    logic [NBIC_W-1:0] nbic_nt;
  } entry_t;

  entry_t            mem [ENTRIES];
  logic [IDX_W-1:0]  rr_ptr;

  // ---------------- look-up (CAM search, gated by lk_en) ----------------
  logic [ENTRIES-1:0] lk_match;
  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++)
      lk_match[i] = lk_en && mem[i].valid && mem[i].tag == lk_pc[PC_W-1:INSN_SHIFT];
  end

  always_comb begin
    lk_hit     = 1'b0;
    lk_taken   = 1'b0;
    lk_target  = '0;
    lk_nbic_t  = '0;
    lk_nbic_nt = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (lk_match[i]) begin
        lk_hit     = 1'b1;
        lk_taken   = mem[i].ctr[1];
        lk_target  = {mem[i].target, {INSN_SHIFT{1'b0}}};
        lk_nbic_t  = mem[i].nbic_t;
        lk_nbic_nt = mem[i].nbic_nt;
      end
    end
  end

  // A branch is allocated only when it misses, so at most one tag matches.
  a_cam_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lk_match))
    else $error("btb: several entries match pc %h", lk_pc);

  // ---------------- update search ----------------
  logic             up_hit;
  logic [IDX_W-1:0] up_hit_idx;
  always_comb begin
    up_hit     = 1'b0;
    up_hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (mem[i].valid && mem[i].tag == up_pc[PC_W-1:INSN_SHIFT]) begin
        up_hit     = 1'b1;
        up_hit_idx = IDX_W'(i);
      end
    end
  end

  assign up_idx   = up_hit ? up_hit_idx : rr_ptr;
  assign up_alloc = up_en && !up_hit;

  logic fw_ok;
  assign fw_ok = fw_en && mem[fw_idx].valid &&
                 mem[fw_idx].tag == fw_pc[PC_W-1:INSN_SHIFT] &&
                 !(up_alloc && up_idx == fw_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_ptr <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) mem[i] <= '0;
    end else begin
      if (fw_ok) begin
        if (fw_taken) mem[fw_idx].nbic_t  <= fw_nbic;
        else          mem[fw_idx].nbic_nt <= fw_nbic;
      end
      if (up_en) begin
        if (up_hit) begin
          mem[up_hit_idx].ctr <= ctr_next(mem[up_hit_idx].ctr, up_taken);
          if (up_taken) mem[up_hit_idx].target <= up_target[PC_W-1:INSN_SHIFT];
        end else begin
          mem[rr_ptr].valid   <= 1'b1;
          mem[rr_ptr].tag     <= up_pc[PC_W-1:INSN_SHIFT];
          mem[rr_ptr].target  <= up_target[PC_W-1:INSN_SHIFT];
          mem[rr_ptr].ctr     <= up_taken ? CTR_WT : CTR_WNT;
          mem[rr_ptr].nbic_t  <= NBIC_W'(INIT_NBIC);
          mem[rr_ptr].nbic_nt <= NBIC_W'(INIT_NBIC);
          rr_ptr <= (rr_ptr == IDX_W'(ENTRIES - 1)) ? '0 : rr_ptr + 1'b1;
        end
      end
    end
  end

endmodule
