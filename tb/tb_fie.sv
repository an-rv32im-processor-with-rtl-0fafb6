// tb_fie: self-checking test of the fuzzy inference engine. For every
// pattern, taken count, branch kind, direction and boost it recomputes the
// memberships, rule strengths (min), dominant rule and weighted-average
// output independently and compares them with the engine.
`timescale 1ns/1ps
module tb_fie;
  import rv_pkg::*;
  pattern_e pat;
  logic [3:0] tc;
  logic last;
  logic [2:0] it;
  logic [11:0] off;
  logic [7:0] boost, ps_out, hs, psv, is, os;
  logic [2:0] rule;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fie dut (.pattern(pat), .taken_count(tc), .last_taken(last), .instr_type(it),
           .branch_offset(off), .boost, .prediction_strength(ps_out), .rule_fired(rule),
           .history_strength(hs), .pattern_strength(psv), .instr_strength(is), .offset_strength(os));

  function automatic int mn(int x, int y); return x < y ? x : y; endfunction

  initial begin
    pattern_e pats [6] = '{PAT_ALL_NT, PAT_ALTERNATING, PAT_LEARNING, PAT_MOSTLY_NT, PAT_MOSTLY_T, PAT_ALL_T};
    int pvals [6] = '{8, 64, 32, 40, 96, 120};
    int ivals [8] = '{96, 117, 64, 64, 80, 72, 80, 72};
    int codes [5] = '{0, 1, 4, 5, 7};
    for (int p = 0; p < 6; p++)
      for (int t = 0; t <= 8; t++)
        for (int k = 0; k < 8; k++)
          for (int d = 0; d < 2; d++)
            for (int bo = 0; bo < 2; bo++)
              for (int l = 0; l < 2; l++) begin
                int h, pv, iv, ov, w[5], c[5], num, den, q, best, exp;
                pat = pats[p]; tc = 4'(t); it = 3'(k); off = d ? 12'hFFC : 12'h010;
                boost = bo ? 8'h08 : 8'h00; last = l;
                #1;
                h  = (pat == PAT_LEARNING) ? 32 : (t >= 3) ? 96 : 32 * t;
                pv = pvals[p]; iv = ivals[k]; ov = d ? 112 : 32;
                w[0] = (pat == PAT_LEARNING) ? 0 : mn(127 - h, 127 - pv); c[0] = 16;
                w[1] = (pat == PAT_ALTERNATING) ? 96 : 0;               c[1] = l ? 24 : 104;
                w[2] = mn(h, pv);                                       c[2] = 112;
                w[3] = mn(ov, iv);                                      c[3] = 108;
                w[4] = iv / 2;                                          c[4] = iv;
                num = 0; den = 0; best = 4;
                for (int r = 0; r < 5; r++) begin num += w[r] * c[r]; den += w[r]; end
                for (int r = 3; r >= 0; r--) if (w[r] > w[best]) best = r;
                q = num / den + (bo ? 8 : 0);
                exp = q > 127 ? 127 : q;
                checks++;
                if (ps_out != 8'(exp) || rule != 3'(codes[best]) || hs != 8'(h) ||
                    psv != 8'(pv) || is != 8'(iv) || os != 8'(ov)) begin
                  failures++;
                  if (failures < 10)
                    $display("FAIL p=%0d t=%0d k=%0d d=%0d: got %0d rule %b, exp %0d rule %0d", p, t, k, d, ps_out, rule, exp, codes[best]);
                end
              end
    // printed values: learning history with BEQ and BNE
    pat = PAT_LEARNING; tc = 2; it = 3'b000; off = 12'h000; boost = 0; #1;
    checks++; if (hs != 8'h20 || is != 8'h60 || os != 8'h20 || rule != 3'b111) begin failures++; $display("FAIL learning point"); end
    it = 3'b001; #1;
    checks++; if (is != 8'h75) begin failures++; $display("FAIL BNE strength"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
