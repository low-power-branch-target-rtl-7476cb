// nbic_counter - distance counter and LD (last distance) register.
//
// Counts the non-branch instructions seen on an instruction stream since the
// last branch. Each valid non-branch increments the count (saturating at the
// largest NBIC_W-bit value); a valid branch copies the count into the LD
// register and restarts the count at zero. LD is therefore the number of
// non-branch instructions between the two most recent branches: the "last
// NBIC" prediction. count is also used by the NBIC gathering logic.
//
// Interface: valid / is_branch describe one instruction per cycle; count and
// ld are registered. Following the source design: increment on non-branch,
// copy-and-reset on branch. Own choice: saturation instead of wrap-around.
module nbic_counter #(
  parameter int unsigned NBIC_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic              is_branch,
  output logic [NBIC_W-1:0] count,
  output logic [NBIC_W-1:0] ld
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      ld    <= '0;
    end else if (valid) begin
      if (is_branch) begin
        ld    <= count;
        count <= '0;
      end else if (count != '1) begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
