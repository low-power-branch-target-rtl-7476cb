// tb_nbic_gather - self-checking test of NBIC gathering.
// A random executed-instruction stream with random BTB indices. At every
// branch after the first, the field write must target the previous branch's
// index and pc, select NBIC_T / NBIC_NT by that branch's direction and carry
// the number of non-branches since it; at all other times no write.
module tb_nbic_gather;
  localparam int unsigned PC_W = 32, W = 8, IW = 6;
  logic clk = 1'b0, rst_n = 1'b1;
  logic ex_valid, ex_is_branch, ex_taken, fw_en, fw_taken;
  logic [PC_W-1:0] ex_pc, fw_pc;
  logic [IW-1:0] ex_idx, fw_idx;
  logic [W-1:0] fw_nbic;
  int checks = 0, failures = 0;

  nbic_gather #(.PC_W(PC_W), .NBIC_W(W), .IDX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pv, pt, exp_en;
    int unsigned pidx, cnt, writes;
    logic [PC_W-1:0] ppc;
    ex_valid = 0; ex_is_branch = 0; ex_taken = 0; ex_pc = 0; ex_idx = 0;
    pv = 0; pt = 0; pidx = 0; cnt = 0; ppc = 0; writes = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      ex_valid     = 1'($urandom_range(0, 4) != 0);
      ex_is_branch = 1'($urandom_range(0, 5) == 0);
      ex_taken     = 1'($urandom_range(0, 1));
      ex_pc        = {$urandom} & ~32'h3;
      ex_idx       = IW'($urandom);
      #1;
      exp_en = ex_valid && ex_is_branch && pv;
      checks++;
      if (fw_en != exp_en ||
          (exp_en && (fw_idx != IW'(pidx) || fw_pc != ppc || fw_taken != pt || fw_nbic != W'(cnt)))) begin
        failures++;
        $display("FAIL en=%0b/%0b idx=%0d/%0d pc=%h/%h tk=%0b/%0b n=%0d/%0d",
                 fw_en, exp_en, fw_idx, pidx, fw_pc, ppc, fw_taken, pt, fw_nbic, cnt);
      end
      if (exp_en) writes++;
      @(posedge clk);
      if (ex_valid) begin
        if (ex_is_branch) begin
          pv = 1; pt = ex_taken; pidx = int'(ex_idx); ppc = ex_pc; cnt = 0;
        end else if (cnt < 255) cnt++;
      end
      #1;
    end
    checks++;
    if (writes < 50) begin failures++; $display("FAIL only %0d writes", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
