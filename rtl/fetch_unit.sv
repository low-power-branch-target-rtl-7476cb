// fetch_unit - program counter of the instruction fetcher.
//
// Holds the pc of the instruction fetched this cycle and chooses the next one:
// a redirect from the execute stage (branch mispredicted, including a taken
// branch that was fetched without a BTB look-up) has priority; a stall keeps
// the pc; a BTB look-up that hit with a taken prediction jumps to the
// predicted target; otherwise the pc advances by one instruction (4 bytes).
//
// Interface: bp_hit / bp_taken / bp_target come combinationally from the BTB
// for the current pc (all zero when the BTB was not looked up). pred_taken and
// pred_next tell the pipeline what was predicted for the fetched instruction.
// The pc updates on the rising clock edge and resets to RESET_PC.
// Following the source design: pc+word on miss or not-taken, target on
// taken hit. Own choices: stall/redirect handshake and reset address.
module fetch_unit
  import lpbtb_pkg::*;
#(
  parameter int unsigned   PC_W     = 32,
  parameter logic [PC_W-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stall,
  input  logic            redirect,
  input  logic [PC_W-1:0] redirect_pc,
  input  logic            bp_hit,
  input  logic            bp_taken,
  input  logic [PC_W-1:0] bp_target,
  output logic [PC_W-1:0] pc,
  output logic            pred_taken,
  output logic [PC_W-1:0] pred_next
);

  assign pred_taken = bp_hit && bp_taken;
  assign pred_next  = pred_taken ? bp_target : pc + PC_W'(INSN_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (redirect) pc <= redirect_pc;
    else if (!stall)   pc <= pred_next;
  end

endmodule
