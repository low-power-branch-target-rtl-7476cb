// nbic_gather - collects each branch's own NBIC_T / NBIC_NT values at run time.
//
// Watches the stream of executed (resolved, non-squashed) instructions. An
// internal nbic_counter counts non-branch instructions since the last branch.
// When a branch executes, the count is the NBIC that followed the previous
// branch, and it is written into that previous branch's BTB entry: into
// NBIC_T if the previous branch was taken, into NBIC_NT otherwise. The
// current branch then becomes the "previous" branch; its BTB entry index
// (ex_idx, from the BTB update port) is remembered so that the later field
// write reaches one entry directly without another CAM search.
//
// Interface: ex_* describe one executed instruction per cycle; fw_* is the
// BTB field write request, combinational in the cycle of the branch. The
// write carries the previous branch's pc so the BTB can drop it if that
// entry was replaced meanwhile.
// Following the source design: counting, selection of NBIC_T / NBIC_NT by the
// previous branch's direction. Own choices: counting on the executed stream
// (where the direction is known) and addressing by the stored entry index.
module nbic_gather #(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned NBIC_W = 8,
  parameter int unsigned IDX_W  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ex_valid,
  input  logic              ex_is_branch,
  input  logic [PC_W-1:0]   ex_pc,
  input  logic              ex_taken,
  input  logic [IDX_W-1:0]  ex_idx,
  output logic              fw_en,
  output logic [IDX_W-1:0]  fw_idx,
  output logic [PC_W-1:0]   fw_pc,
  output logic              fw_taken,
  output logic [NBIC_W-1:0] fw_nbic
);

  logic [NBIC_W-1:0] count;
  logic [NBIC_W-1:0] ld_unused;

  nbic_counter #(.NBIC_W(NBIC_W)) u_cnt (
    .clk, .rst_n,
    .valid     (ex_valid),
    .is_branch (ex_is_branch),
    .count     (count),
    .ld        (ld_unused)
  );

  logic             prev_valid;
  logic [IDX_W-1:0] prev_idx;
  logic [PC_W-1:0]  prev_pc;
  logic             prev_taken;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_valid <= 1'b0;
      prev_idx   <= '0;
      prev_pc    <= '0;
      prev_taken <= 1'b0;
    end else if (ex_valid && ex_is_branch) begin
      prev_valid <= 1'b1;
      prev_idx   <= ex_idx;
      prev_pc    <= ex_pc;
      prev_taken <= ex_taken;
    end
  end

  assign fw_en    = ex_valid && ex_is_branch && prev_valid;
  assign fw_idx   = prev_idx;
  assign fw_pc    = prev_pc;
  assign fw_taken = prev_taken;
  assign fw_nbic  = count;

endmodule
