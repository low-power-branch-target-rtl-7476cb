// tb_fixed_nbic - self-checking test of the fixed NBIC register: resets to
// RESET_NBIC (3), holds its value without a write, takes a new value one
// cycle after a write.
module tb_fixed_nbic;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic cfg_we;
  logic [W-1:0] cfg_nbic, nbic;
  int checks = 0, failures = 0;
  logic [W-1:0] expv;

  fixed_nbic #(.NBIC_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_nbic = 8'hAA;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 checks++; if (nbic != 8'd3) begin failures++; $display("FAIL reset value %0d", nbic); end
    #1 rst_n = 1'b1;
    expv = 8'd3;
    for (int i = 0; i < 500; i++) begin
      cfg_we = 1'($urandom_range(0, 3) == 0);
      cfg_nbic = W'($urandom);
      @(posedge clk);
      if (cfg_we) expv = cfg_nbic;
      #1 checks++;
      if (nbic != expv) begin failures++; $display("FAIL nbic=%0d exp=%0d", nbic, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
