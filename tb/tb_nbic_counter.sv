// tb_nbic_counter - self-checking test of the distance counter / LD register.
// A random instruction stream (valid, is_branch) is compared every cycle with
// a reference count of non-branches since the last branch and the last such
// distance. A long branch-free run checks saturation at 255.
module tb_nbic_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic valid, is_branch;
  logic [W-1:0] count, ld;
  int checks = 0, failures = 0;
  int unsigned rc, rld;

  nbic_counter #(.NBIC_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic v, logic b);
    valid = v; is_branch = b;
    @(posedge clk);
    if (v) begin
      if (b) begin rld = rc; rc = 0; end
      else if (rc < 255) rc++;
    end
    #1;
    checks++;
    if (count != W'(rc) || ld != W'(rld)) begin
      failures++;
      $display("FAIL count=%0d/%0d ld=%0d/%0d", count, rc, ld, rld);
    end
  endtask

  initial begin
    valid = 0; is_branch = 0; rc = 0; rld = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // directed: branch, 5 non-branches, branch -> LD = 5
    step(1, 1);
    repeat (5) step(1, 0);
    step(0, 1);
    step(1, 1);
    checks++; if (ld != 8'd5) begin failures++; $display("FAIL ld=%0d want 5", ld); end
    // saturation
    repeat (300) step(1, 0);
    step(1, 1);
    checks++; if (ld != 8'd255) begin failures++; $display("FAIL saturated ld=%0d", ld); end
    for (int i = 0; i < 5000; i++)
      step(1'($urandom_range(0, 4) != 0), 1'($urandom_range(0, 6) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
