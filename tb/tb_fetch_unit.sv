// tb_fetch_unit - self-checking test of the fetch pc logic. Random stall,
// redirect and BTB answers; the pc sequence and the prediction outputs are
// compared with a reference: redirect > stall > taken hit > pc+4.
module tb_fetch_unit;
  localparam int unsigned PC_W = 32;
  logic clk = 1'b0, rst_n = 1'b1;
  logic stall, redirect, bp_hit, bp_taken, pred_taken;
  logic [PC_W-1:0] redirect_pc, bp_target, pc, pred_next;
  int checks = 0, failures = 0;
  logic [PC_W-1:0] rpc, rnext;

  fetch_unit #(.PC_W(PC_W), .RESET_PC(32'h100)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0; redirect = 0; bp_hit = 0; bp_taken = 0; redirect_pc = 0; bp_target = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    rpc = 32'h100;
    for (int i = 0; i < 5000; i++) begin
      stall       = 1'($urandom_range(0, 7) == 0);
      redirect    = 1'($urandom_range(0, 9) == 0);
      bp_hit      = 1'($urandom_range(0, 2) == 0);
      bp_taken    = 1'($urandom_range(0, 1));
      redirect_pc = {$urandom} & ~32'h3;
      bp_target   = {$urandom} & ~32'h3;
      #1;
      rnext = (bp_hit && bp_taken) ? bp_target : rpc + 32'd4;
      checks++;
      if (pc != rpc || pred_next != rnext || pred_taken != (bp_hit && bp_taken)) begin
        failures++;
        $display("FAIL pc=%h/%h pred_next=%h/%h", pc, rpc, pred_next, rnext);
      end
      @(posedge clk);
      if (redirect) rpc = redirect_pc;
      else if (!stall) rpc = rnext;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
