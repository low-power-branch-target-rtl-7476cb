// fixed_nbic - NBIC source of the fixed-NBIC approach.
//
// Supplies one NBIC value for every branch. The value is chosen off line
// (arbitrarily, or from profiling a program) and does not change while a
// program runs; here it is a register that resets to RESET_NBIC and can be
// rewritten by configuration software through cfg_we / cfg_nbic (takes effect
// the next cycle).
//
// Following the source design: one constant NBIC for all branches, "about 3"
// as the arbitrary choice. Own choice: the configuration write port that lets
// a profiled value be installed.
module fixed_nbic #(
  parameter int unsigned NBIC_W     = 8,
  parameter int unsigned RESET_NBIC = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [NBIC_W-1:0] cfg_nbic,
  output logic [NBIC_W-1:0] nbic
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      nbic <= NBIC_W'(RESET_NBIC);
    else if (cfg_we) nbic <= cfg_nbic;
  end

endmodule
