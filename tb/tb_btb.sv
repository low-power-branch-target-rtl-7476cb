// tb_btb - self-checking test of the branch target buffer.
// Runs with 4 entries so that replacement happens often. Each cycle drives a
// random look-up, update and NBIC field write drawn from 8 branch addresses,
// and compares the look-up outputs, up_idx and up_alloc with a reference
// model kept in plain arrays (round-robin allocation, 2-bit counters, fields
// cleared on allocation, field writes only to an entry still holding the
// branch). Also checks that a disabled look-up reports nothing.
module tb_btb;
  import lpbtb_pkg::*;
  localparam int unsigned N = 4, PC_W = 32, W = 8, IW = 2;
  logic clk = 1'b0, rst_n = 1'b1;
  logic lk_en, lk_hit, lk_taken, up_en, up_taken, up_alloc, fw_en, fw_taken;
  logic [PC_W-1:0] lk_pc, lk_target, up_pc, up_target, fw_pc;
  logic [W-1:0] lk_nbic_t, lk_nbic_nt, fw_nbic;
  logic [IW-1:0] up_idx, fw_idx;
  int checks = 0, failures = 0;

  btb #(.ENTRIES(N), .PC_W(PC_W), .NBIC_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic            m_v   [N];
  logic [PC_W-1:0] m_pc  [N];
  logic [PC_W-1:0] m_tgt [N];
  int              m_ctr [N];
  int              m_t   [N];
  int              m_nt  [N];
  int              m_rr;
  int              allocs, fwrites, hits_seen;

  function automatic int find(logic [PC_W-1:0] pc);
    for (int i = 0; i < N; i++) if (m_v[i] && m_pc[i] == pc) return i;
    return -1;
  endfunction

  function automatic logic [PC_W-1:0] rnd_pc();
    return 32'h1000 + 32'($urandom_range(0, 7)) * 32'h24;
  endfunction

  initial begin
    int e, u, ui;
    bit fok, alloc;
    lk_en = 0; up_en = 0; fw_en = 0; lk_pc = 0; up_pc = 0; fw_pc = 0;
    up_taken = 0; up_target = 0; fw_taken = 0; fw_nbic = 0; fw_idx = 0;
    for (int i = 0; i < N; i++) begin m_v[i] = 0; m_pc[i] = 0; m_tgt[i] = 0; m_ctr[i] = 0; m_t[i] = 0; m_nt[i] = 0; end
    m_rr = 0; allocs = 0; fwrites = 0; hits_seen = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      lk_en     = 1'($urandom_range(0, 3) != 0);
      lk_pc     = rnd_pc();
      up_en     = 1'($urandom_range(0, 1));
      up_pc     = rnd_pc();
      up_taken  = 1'($urandom_range(0, 2) != 0);
      up_target = {$urandom} & ~32'h3;
      fw_en     = 1'($urandom_range(0, 1));
      fw_idx    = IW'($urandom_range(0, N - 1));
      fw_pc     = ($urandom_range(0, 3) != 0) ? m_pc[fw_idx] : rnd_pc();
      fw_taken  = 1'($urandom_range(0, 1));
      fw_nbic   = W'($urandom);
      #1;
      // look-up
      e = lk_en ? find(lk_pc) : -1;
      checks++;
      if (e < 0) begin
        if (lk_hit || lk_taken || lk_target != 0 || lk_nbic_t != 0 || lk_nbic_nt != 0) begin
          failures++; $display("FAIL spurious lookup output pc=%h en=%0b", lk_pc, lk_en);
        end
      end else begin
        hits_seen++;
        if (!lk_hit || lk_taken != (m_ctr[e] >= 2) || lk_target != m_tgt[e] ||
            lk_nbic_t != W'(m_t[e]) || lk_nbic_nt != W'(m_nt[e])) begin
          failures++;
          $display("FAIL lookup pc=%h hit=%0b tk=%0b/%0d tgt=%h/%h t=%0d/%0d nt=%0d/%0d",
                   lk_pc, lk_hit, lk_taken, m_ctr[e], lk_target, m_tgt[e],
                   lk_nbic_t, m_t[e], lk_nbic_nt, m_nt[e]);
        end
      end
      // update index
      u = find(up_pc);
      alloc = up_en && (u < 0);
      ui = (u < 0) ? m_rr : u;
      checks++;
      if (up_idx != IW'(ui) || up_alloc != alloc) begin
        failures++; $display("FAIL cyc=%0d up_pc=%h up_idx=%0d/%0d alloc=%0b/%0b", cyc, up_pc, up_idx, ui, up_alloc, alloc);
      end
      fok = fw_en && m_v[fw_idx] && m_pc[fw_idx] == fw_pc && !(alloc && ui == int'(fw_idx));
      @(posedge clk);
      if (fok) begin
        fwrites++;
        if (fw_taken) m_t[fw_idx] = int'(fw_nbic); else m_nt[fw_idx] = int'(fw_nbic);
      end
      if (up_en) begin
        if (u >= 0) begin
          m_ctr[u] = up_taken ? ((m_ctr[u] == 3) ? 3 : m_ctr[u] + 1)
                              : ((m_ctr[u] == 0) ? 0 : m_ctr[u] - 1);
          if (up_taken) m_tgt[u] = up_target;
        end else begin
          allocs++;
          m_v[m_rr] = 1; m_pc[m_rr] = up_pc; m_tgt[m_rr] = up_target;
          m_ctr[m_rr] = up_taken ? 2 : 1; m_t[m_rr] = 0; m_nt[m_rr] = 0;
          m_rr = (m_rr + 1) % N;
        end
      end
      #1;
    end
    checks++;
    if (allocs < 10 || fwrites < 10 || hits_seen < 100) begin
      failures++; $display("FAIL coverage allocs=%0d fwrites=%0d hits=%0d", allocs, fwrites, hits_seen);
    end
    $display("allocs=%0d fwrites=%0d hits=%0d", allocs, fwrites, hits_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
