// tb_spec_buffer: self-checking test of the speculative buffer. Results
// tagged with unresolved branches must wait, commit in order once their
// branch resolves correctly, retire without writing when it was
// mispredicted, and non-speculative results commit at once. A queue model
// predicts every committed entry; `full` must hold off a fifth entry.
`timescale 1ns/1ps
module tb_spec_buffer;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic iv = 0, av = 0, rv = 0, rok = 0;
  sb_entry_t ie, oe;
  logic [4:0] at = 0, rt = 0;
  logic ov, osq, full;
  logic [2:0] cnt;
  int checks = 0, failures = 0;
  sb_entry_t q [$];
  bit resolved [32], ok [32];
  always #5 clk = ~clk;

  spec_buffer #(.DEPTH(4)) dut (.clk, .rst_n, .in_valid(iv), .in_entry(ie), .alloc_valid(av),
    .alloc_tag(at), .resolve_valid(rv), .resolve_tag(rt), .resolve_ok(rok),
    .out_valid(ov), .out_entry(oe), .out_squashed(osq), .full, .count(cnt));

  initial begin
    int committed = 0, squashed = 0, waits = 0;
    ie = '0;
    foreach (resolved[i]) begin resolved[i] = 0; ok[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit exp_pop, exp_sq;
      @(negedge clk);
      // stimulus
      iv = ($urandom % 3) != 0;
      ie.rd = 5'($urandom); ie.value = $urandom; ie.reg_write = 1;
      ie.speculative = ($urandom % 2); ie.tag = 5'($urandom % 4);
      rv = ($urandom % 4) == 0; rt = 5'($urandom % 4); rok = ($urandom % 3) != 0;
      av = ($urandom % 16) == 0; at = 5'($urandom % 4);
      #1;
      exp_pop = q.size() > 0 && (!q[0].speculative || resolved[q[0].tag]);
      exp_sq  = exp_pop && q[0].speculative && !ok[q[0].tag];
      checks++;
      if (ov != exp_pop || (exp_pop && (oe.rd != q[0].rd || oe.value != q[0].value ||
          osq != exp_sq || oe.reg_write != !exp_sq))) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: out %0d exp %0d", cyc, ov, exp_pop);
      end
      checks++;
      if (full != (q.size() == 4 && !exp_pop)) begin failures++; $display("FAIL full"); end
      if (exp_pop) begin void'(q.pop_front()); committed++; if (exp_sq) squashed++; end
      else if (q.size() > 0) waits++;
      if (iv && !full) q.push_back(ie);
      if (av) resolved[at] = 0;
      if (rv) begin resolved[rt] = 1; ok[rt] = rok; end
    end
    $display("committed %0d squashed %0d waiting cycles %0d", committed, squashed, waits);
    checks++;
    if (squashed == 0 || waits == 0) begin failures++; $display("FAIL squash/wait not exercised"); end
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
