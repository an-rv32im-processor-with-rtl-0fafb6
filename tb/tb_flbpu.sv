// tb_flbpu: self-checking test of the fuzzy logic branch prediction unit.
// Each branch is presented in fetch, its prediction recorded, and its
// outcome fed back one cycle later as the execute stage would. Checked:
// pre-decode and the PC + offset target, the BTB target after a taken
// branch, the decision rule (strength against threshold) and confidence,
// the threshold's step from 0x40 to 0x35 after a missed taken branch, the
// accuracy percentage against counts kept here, the learning phase, and
// emergency learning after four mispredictions in a row. A loop branch must
// be learned (predicted taken) within a few iterations.
`timescale 1ns/1ps
module tb_flbpu;
  import rv_pkg::*;
  import tb_rv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] pc = 0, instr = 0, tgt, utgt = 0, upc = 0;
  logic isb, pt, hit, uv = 0, ut = 0, up = 0, emerg;
  logic [7:0] conf, str, thr, run, acc, hist;
  logic [2:0] rule;
  pattern_e pat;
  logic [1:0] phase;
  logic [15:0] tot, cor, bh, bl;
  int checks = 0, failures = 0, n = 0, ncor = 0;
  always #5 clk = ~clk;

  flbpu dut (.clk, .rst_n, .fetch_valid(1'b1), .pc_in(pc), .instruction(instr),
    .is_branch(isb), .predict_taken(pt), .predicted_target(tgt), .confidence_level(conf),
    .prediction_strength(str), .btb_hit(hit), .upd_valid(uv), .upd_pc(upc), .upd_taken(ut),
    .upd_target(utgt), .upd_predicted(up), .dynamic_threshold(thr), .rule_fired(rule),
    .pattern_type(pat), .global_history(hist), .learning_phase(phase),
    .emergency_learning_active(emerg), .consecutive_mispredictions(run),
    .total_branches(tot), .correct_predictions(cor), .prediction_accuracy(acc),
    .btb_hit_count(bh), .btb_lookup_count(bl));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // present one branch, return the prediction, then resolve it
  task automatic branch(input logic [31:0] p, input logic [31:0] ins, input bit outcome, output bit pred);
    int d, c, et;
    @(negedge clk);
    pc = p; instr = ins; uv = 0;
    #1;
    pred = pt;
    chk(isb, "branch recognised");
    if (!emerg) begin
      chk(pt == (str >= thr), "decision is strength >= threshold");
      d = (str >= thr) ? str - thr : thr - str;
      c = (2 * d > 127) ? 127 : 2 * d;
      chk(conf == 8'(c), $sformatf("confidence %0d exp %0d", conf, c));
    end else begin
      chk(pt == ins[31] && conf == 0, "emergency: backward taken, zero confidence");
    end
    if (!hit) chk(tgt == p + {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0}, "target pc+imm");
    @(negedge clk);
    uv = 1; upc = p; ut = outcome; up = pred;
    utgt = p + {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
    // threshold model: unchanged when right, one step towards the outcome
    // when wrong, back to 0x40 on the fourth miss in a row
    et = thr;
    if (pred != outcome) begin
      if (run + 1 >= 4) et = 'h40;
      else if (outcome) et = (thr >= 'h2B) ? thr - 'h0B : 'h20;
      else              et = (thr + 'h0B <= 'h60) ? thr + 'h0B : 'h60;
    end
    @(negedge clk);
    uv = 0;
    chk(thr == 8'(et), $sformatf("threshold %h exp %h", thr, et));
    n++; if (pred == outcome) ncor++;
    chk(tot == 16'(n) && cor == 16'(ncor) && acc == 8'(ncor * 100 / n), "accuracy counters");
  endtask

  initial begin
    bit p;
    int learned_at;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // non-branch
    pc = 32'h8; instr = ADDI(1, 1, 1); #1;
    chk(!isb && !pt, "non-branch not predicted");
    chk(thr == 8'h40, "initial threshold 0x40");
    // a forward branch: prediction then a missed taken outcome moves the threshold
    branch(32'h100, BEQ(1, 2, 16), 1'b1, p);
    chk(phase == 0, "learning phase 0 at first");
    if (!p) chk(thr == 8'h35, $sformatf("threshold 0x35 after missed taken, got %h", thr));
    else    chk(thr == 8'h40, "threshold unchanged after a correct prediction");
    // the BTB now knows the taken branch
    @(negedge clk); pc = 32'h100; instr = BEQ(1, 2, 16); #1;
    chk(hit && tgt == 32'h110, "BTB target after taken branch");
    // loop branch: taken 12 times
    learned_at = -1;
    for (int i = 0; i < 12; i++) begin
      branch(32'h38, BNE(1, 2, -24), 1'b1, p);
      if (p && learned_at < 0) learned_at = i;
    end
    chk(learned_at >= 0 && learned_at < 6, $sformatf("loop branch learned at iteration %0d", learned_at));
    chk(phase != 0, "learning phase left 0");
    // mispredictions in a row: outcome always opposite to the prediction
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); pc = 32'h200; instr = BLT(3, 4, 8); #1;
      branch(32'h200, BLT(3, 4, 8), !pt, p);
    end
    chk(emerg && thr == 8'h40, "emergency learning after four misses, threshold reset");
    branch(32'h300, BGE(3, 4, -8), 1'b1, p);
    chk(p == 1 && !emerg, "emergency: backward predicted taken, cleared when correct");
    for (int i = 0; i < 60; i++) branch(32'(4 * ($urandom % 64)), b_type(($urandom % 2) ? -8 : 12, 1, 2, 3'($urandom % 2)), ($urandom % 4) != 0, p);
    $display("accuracy %0d%% over %0d branches", acc, n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
