// repose_counter - decides whether the current fetch looks up the BTB.
//
// The counter holds how many of the coming fetches are still predicted to be
// non-branch instructions. While it is non-zero every fetch decrements it and
// the BTB is "reposed" (not looked up). When it is zero the fetch looks up the
// BTB (lookup = 1); if that look-up hits, the counter is loaded with the
// predicted NBIC (load/load_val), otherwise it stays at zero so the BTB keeps
// being looked up until it hits.
//
// Interface: fetch marks a cycle in which an instruction is fetched; clear
// (pipeline redirect) forces the counter to zero and has priority. lookup and
// count are combinational from the register. Both follow the source design,
// except clear on redirect, which is this design's choice: after a redirect the
// fetched path is new and the prediction made on the old path no longer holds.
module repose_counter #(
  parameter int unsigned NBIC_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch,
  input  logic              clear,
  input  logic              load,
  input  logic [NBIC_W-1:0] load_val,
  output logic              lookup,
  output logic [NBIC_W-1:0] count
);

  assign lookup = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               count <= '0;
    else if (clear)           count <= '0;
    else if (fetch) begin
      if (count != '0)        count <= count - 1'b1;
      else if (load)          count <= load_val;
    end
  end

endmodule
