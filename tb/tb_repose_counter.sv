// tb_repose_counter - self-checking test of the repose counter.
// Drives random fetch / clear / load / load_val and compares lookup and count
// every cycle with a reference model: zero means look up; a hit at zero loads
// the NBIC; a non-zero count decrements once per fetch; clear wins. Also runs
// the fixed sequence of a branch with NBIC 4: exactly 4 fetches without
// look-up, then a look-up on the fifth.
module tb_repose_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic fetch, clear, load;
  logic [W-1:0] load_val, count;
  logic lookup;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;

  repose_counter #(.NBIC_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    checks++;
    if (count != W'(ref_cnt) || lookup != (ref_cnt == 0)) begin
      failures++;
      $display("FAIL t=%0t count=%0d ref=%0d lookup=%0b", $time, count, ref_cnt, lookup);
    end
  endtask

  task automatic step(logic f, logic c, logic l, logic [W-1:0] v);
    fetch = f; clear = c; load = l; load_val = v;
    @(posedge clk);
    if (c) ref_cnt = 0;
    else if (f) begin
      if (ref_cnt != 0) ref_cnt = ref_cnt - 1;
      else if (l) ref_cnt = int'(v);
    end
    #1 check_now();
  endtask

  int unsigned skipped;
  initial begin
    fetch = 0; clear = 0; load = 0; load_val = 0; ref_cnt = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check_now();
    // directed: hit with NBIC 4 -> 4 reposed fetches, then a look-up
    step(1, 0, 1, 8'd4);
    skipped = 0;
    while (!lookup && skipped < 10) begin
      skipped++;
      step(1, 0, 0, 8'd0);
    end
    checks++;
    if (skipped != 4) begin failures++; $display("FAIL reposed %0d fetches, want 4", skipped); end
    // miss at zero keeps looking up
    step(1, 0, 0, 8'd9);
    checks++; if (!lookup) begin failures++; $display("FAIL lookup dropped after miss"); end
    // random
    for (int i = 0; i < 5000; i++)
      step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 15) == 0),
           1'($urandom_range(0, 1)), W'($urandom_range(0, 12)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
