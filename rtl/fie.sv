// fie: fuzzy inference engine of the FLBPU.
//
// Combinational, in three steps as in the FLBPU flow (fuzzify, evaluate
// rules, defuzzify). All strengths are on a 0..127 scale, where a high value
// means "taken is likely".
//  1. Fuzzification. history_strength grows with the number of taken
//     outcomes in the global history (0x20 per taken outcome, at most 0x60;
//     0x20 while the history is still learning). pattern_strength maps the
//     six pattern classes, instr_strength the branch kind (funct3: BEQ 0x60,
//     BNE 0x75, ...), offset_strength the branch direction (backward,
//     loop-like 0x70; forward 0x20).
//  2. Rules, each firing with the minimum of its terms (fuzzy AND), each
//     with a singleton output: 000 history says not taken -> 0x10;
//     001 alternating history -> opposite of the last outcome;
//     100 history says taken -> 0x70; 101 backward branch of a loop-like
//     kind -> 0x6C; 111 instruction kind alone, at half weight -> its own
//     strength. The rule with the highest firing strength is reported as
//     rule_fired (the dominant rule).
//  3. Defuzzification by the weighted average of the rule outputs, plus the
//     learning-phase boost, saturated at 127.
// The membership values 0x20, 0x60, 0x75, the boost of 0x08 and the rule
// codes 100 and 111 appear in the published waveforms; the rule set, the
// other values and the weighted-average defuzzifier are this design's own.
// Every strength is an 8-bit field holding 0..127, so bit 7 of each output
// strength is always zero; the width matches the published waveforms.
module fie
  import rv_pkg::*;
(
  input  pattern_e    pattern,
  input  logic [3:0]  taken_count,
  input  logic        last_taken,
  input  logic [2:0]  instr_type,       // funct3 of the conditional branch
  input  logic [11:0] branch_offset,    // low bits of the B immediate, [11] = sign
  input  logic [7:0]  boost,
  output logic [7:0]  prediction_strength,
  output logic [2:0]  rule_fired,
  output logic [7:0]  history_strength,
  output logic [7:0]  pattern_strength,
  output logic [7:0]  instr_strength,
  output logic [7:0]  offset_strength
);
  localparam int NR = 5;
  localparam logic [2:0] RULE_CODE [NR] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b111};

  logic [6:0]  hs, ps, is, os;
  logic [6:0]  w [NR];
  logic [6:0]  c [NR];
  logic [17:0] num;
  logic [9:0]  den;
  logic [17:0] q;
  logic [8:0]  with_boost;
  int unsigned best;

  function automatic logic [6:0] fmin(input logic [6:0] x, input logic [6:0] y);
    return (x < y) ? x : y;
  endfunction

  always_comb begin
    // 1. fuzzification
    if (pattern == PAT_LEARNING)      hs = 7'h20;
    else if (taken_count >= 4'd3)     hs = 7'h60;
    else                              hs = {taken_count[1:0], 5'b0};
    unique case (pattern)
      PAT_ALL_NT:      ps = 7'h08;
      PAT_MOSTLY_NT:   ps = 7'h28;
      PAT_ALTERNATING: ps = 7'h40;
      PAT_MOSTLY_T:    ps = 7'h60;
      PAT_ALL_T:       ps = 7'h78;
      default:         ps = 7'h20;   // learning
    endcase
    unique case (instr_type)
      3'b000:  is = 7'h60;   // BEQ
      3'b001:  is = 7'h75;   // BNE
      3'b100:  is = 7'h50;   // BLT
      3'b101:  is = 7'h48;   // BGE
      3'b110:  is = 7'h50;   // BLTU
      3'b111:  is = 7'h48;   // BGEU
      default: is = 7'h40;
    endcase
    os = branch_offset[11] ? 7'h70 : 7'h20;

    // 2. rule evaluation
    w[0] = (pattern == PAT_LEARNING) ? 7'd0 : fmin(7'h7F - hs, 7'h7F - ps);
    c[0] = 7'h10;
    w[1] = (pattern == PAT_ALTERNATING) ? 7'h60 : 7'd0;
    c[1] = last_taken ? 7'h18 : 7'h68;
    w[2] = fmin(hs, ps);
    c[2] = 7'h70;
    w[3] = fmin(os, is);
    c[3] = 7'h6C;
    w[4] = is >> 1;
    c[4] = is;

    best = NR - 1;
    for (int r = NR - 2; r >= 0; r--)
      if (w[r] > w[best]) best = r;
    rule_fired = RULE_CODE[best];

    // 3. defuzzification: weighted average of the singleton outputs
    num = '0;
    den = '0;
    for (int r = 0; r < NR; r++) begin
      num = num + 18'(w[r] * c[r]);
      den = den + 10'(w[r]);
    end
    q = (den != '0) ? num / 18'(den) : 18'd0;
    with_boost = 9'(q[6:0]) + 9'(boost);
    prediction_strength = (with_boost > 9'd127) ? 8'd127 : with_boost[7:0];

    history_strength = {1'b0, hs};
    pattern_strength = {1'b0, ps};
    instr_strength   = {1'b0, is};
    offset_strength  = {1'b0, os};
  end
endmodule
