// tb_ghr: self-checking test of the global history register. It replays the
// sequence of the published waveform (taken count 2 after three branches,
// then history 07, 0F, 1F) and random outcomes, and compares history,
// taken count and pattern class with a model of the classification rules.
`timescale 1ns/1ps
module tb_ghr;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0, update = 0, taken = 0;
  logic [7:0] hist, seen, stab;
  logic [3:0] tc;
  pattern_e pat, prev;
  logic learn, mnt;
  logic [2:0] trans;
  int checks = 0, failures = 0;
  logic [7:0] mh;
  int ms;
  always #5 clk = ~clk;

  ghr dut (.clk, .rst_n, .update, .taken, .history(hist), .taken_count(tc), .pattern(pat),
           .learning(learn), .mostly_not_taken(mnt), .total_seen(seen), .stability(stab),
           .transitions(trans), .previous_pattern(prev));

  function automatic pattern_e model(logic [7:0] h, int s);
    int c = $countones(h);
    int v = (s > 8) ? 8 : s;
    if (s < 4) return PAT_LEARNING;
    if (c == 0) return PAT_ALL_NT;
    if (c == v) return PAT_ALL_T;
    if (h[3:0] == 4'b0101 || h[3:0] == 4'b1010) return PAT_ALTERNATING;
    if (2 * c > v) return PAT_MOSTLY_T;
    return PAT_MOSTLY_NT;
  endfunction

  task automatic push(bit t);
    @(negedge clk); update = 1; taken = t;
    @(negedge clk); update = 0;
    mh = {mh[6:0], t}; ms++;
    checks++;
    if (hist !== mh || tc !== 4'($countones(mh)) || pat !== model(mh, ms) ||
        seen !== 8'((ms > 255) ? 255 : ms) || mnt !== ($countones(mh) < 3)) begin
      failures++;
      $display("FAIL after %0d: hist=%h tc=%0d pat=%b (exp %h %b)", ms, hist, tc, pat, mh, model(mh, ms));
    end
  endtask

  initial begin
    mh = 0; ms = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    push(0); push(1); push(1);
    checks++; if (hist != 8'h03 || pat != PAT_LEARNING) begin failures++; $display("FAIL waveform point 03/100"); end
    push(1);
    checks++; if (hist != 8'h07 || pat != PAT_MOSTLY_T || tc != 3) begin failures++; $display("FAIL waveform point 07/110"); end
    push(1); push(1);
    checks++; if (hist != 8'h1F || pat != PAT_MOSTLY_T) begin failures++; $display("FAIL waveform point 1F/110"); end
    repeat (8) push(1);
    checks++; if (pat != PAT_ALL_T) begin failures++; $display("FAIL all taken"); end
    repeat (8) push(0);
    checks++; if (pat != PAT_ALL_NT) begin failures++; $display("FAIL all not taken"); end
    repeat (4) begin push(1); push(0); end
    checks++; if (pat != PAT_ALTERNATING) begin failures++; $display("FAIL alternating"); end
    repeat (300) push($urandom % 2);
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
