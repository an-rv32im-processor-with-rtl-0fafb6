// tb_btb: self-checking test of the branch target buffer. A reference model
// keeps the cached branches in recency order (most recent first). Random
// lookups and updates over 100 branch addresses overflow the 64 entries, so
// hits, targets and LRU evictions are all compared with the model, as are
// the statistics counters.
`timescale 1ns/1ps
module tb_btb;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic lv = 0, ue = 0;
  logic [31:0] lpc = 0, upc = 0, ut = 0, pt;
  logic hit;
  logic [5:0] li, ri;
  logic [15:0] lc, hc, uc, ic;
  int checks = 0, failures = 0;
  int unsigned m_lk = 0, m_hit = 0, m_upd = 0;
  logic [31:0] q_pc [$], q_t [$];
  always #5 clk = ~clk;

  btb #(.ENTRIES(N)) dut (.clk, .rst_n, .lookup_valid(lv), .lookup_pc(lpc), .hit,
    .predicted_target(pt), .lookup_index(li), .update_enable(ue), .update_pc(upc),
    .update_target(ut), .replace_index(ri), .lookup_count(lc), .hit_count(hc),
    .update_count(uc), .invalid_entry_count(ic));

  function automatic int find(logic [31:0] pc);
    foreach (q_pc[i]) if (q_pc[i] == pc) return i;
    return -1;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int k, j;
      @(negedge clk);
      lv = ($urandom % 4) != 0;
      lpc = 32'(4 * ($urandom % ((cyc < 1500) ? 40 : 100)));
      ue = ($urandom % 3) == 0;
      upc = 32'(4 * ($urandom % ((cyc < 1500) ? 40 : 100)));
      ut = $urandom;
      #1;
      k = find(lpc);
      checks++;
      if (hit !== (lv && k >= 0) || (hit && pt !== q_t[k])) begin
        failures++;
        $display("FAIL cycle %0d pc %h: hit %0d exp %0d", cyc, lpc, hit, lv && k >= 0);
      end
      // model update at the clock edge
      if (lv) m_lk++;
      if (lv && k >= 0) m_hit++;
      if (ue) begin
        m_upd++;
        j = find(upc);
        if (j >= 0) begin q_pc.delete(j); q_t.delete(j); end
        q_pc.push_front(upc); q_t.push_front(ut);
        if (q_pc.size() > N) begin void'(q_pc.pop_back()); void'(q_t.pop_back()); end
      end else if (lv && k >= 0) begin
        logic [31:0] t;
        t = q_t[k];
        q_pc.delete(k); q_t.delete(k);
        q_pc.push_front(lpc); q_t.push_front(t);
      end
      @(posedge clk); #1;
      checks++;
      if (lc != 16'(m_lk) || hc != 16'(m_hit) || uc != 16'(m_upd) || ic != 16'(N - q_pc.size())) begin
        failures++;
        $display("FAIL counters %0d %0d %0d %0d", lc, hc, uc, ic);
      end
    end
    $display("hits %0d of %0d lookups", m_hit, m_lk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
