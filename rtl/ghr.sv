// ghr: global history register and pattern classifier of the FLBPU.
//
// An 8-bit shift register takes the outcome of every resolved conditional
// branch at bit 0 (1 = taken). From the history and the number of branches
// seen so far, a combinational classifier puts the history into one of six
// pattern classes (rv_pkg::pattern_e): learning while fewer than four
// branches have been seen, then all-not-taken, all-taken, alternating (the
// last four outcomes 0101 or 1010), mostly-taken or mostly-not-taken by
// majority over the valid history bits. The register also counts branches
// seen (saturating at 255), pattern changes (transitions, wrapping) and the
// updates since the last pattern change (stability, saturating).
// The document fixes the 8-bit history and "six patterns"; the class rules
// are this design's own, chosen so that the class codes match the published
// waveform (history 03 after three branches -> 100, 07/0F/1F -> 110).
// Outputs change in the cycle after `update`.
module ghr
  import rv_pkg::*;
#(
  parameter int HIST_LEN = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                update,
  input  logic                taken,
  output logic [HIST_LEN-1:0] history,
  output logic [3:0]          taken_count,
  output pattern_e            pattern,
  output logic                learning,
  output logic                mostly_not_taken,
  output logic [7:0]          total_seen,
  output logic [7:0]          stability,
  output logic [2:0]          transitions,
  output pattern_e            previous_pattern
);
  logic [HIST_LEN-1:0] hist_q;
  logic [7:0]          seen_q, stab_q;
  logic [2:0]          trans_q;
  pattern_e            pat_now, prev_q;
  logic [3:0]          valid_bits, cnt;

  always_comb begin
    cnt = '0;
    for (int i = 0; i < HIST_LEN; i++) cnt = cnt + {3'b0, hist_q[i]};
    valid_bits = (seen_q >= 8'(HIST_LEN)) ? 4'(HIST_LEN) : seen_q[3:0];
    if (seen_q < 8'd4)
      pat_now = PAT_LEARNING;
    else if (cnt == 4'd0)
      pat_now = PAT_ALL_NT;
    else if (cnt == valid_bits)
      pat_now = PAT_ALL_T;
    else if (hist_q[3:0] == 4'b0101 || hist_q[3:0] == 4'b1010)
      pat_now = PAT_ALTERNATING;
    else if ({cnt, 1'b0} > {1'b0, valid_bits})
      pat_now = PAT_MOSTLY_T;
    else
      pat_now = PAT_MOSTLY_NT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q  <= '0;
      seen_q  <= '0;
      stab_q  <= '0;
      trans_q <= '0;
      prev_q  <= PAT_LEARNING;
    end else if (update) begin
      hist_q <= {hist_q[HIST_LEN-2:0], taken};
      if (seen_q != 8'hFF) seen_q <= seen_q + 8'd1;
      prev_q <= pat_now;
      if (pat_now != prev_q) begin
        stab_q  <= '0;
        trans_q <= trans_q + 3'd1;
      end else if (stab_q != 8'hFF) begin
        stab_q <= stab_q + 8'd1;
      end
    end
  end

  assign history          = hist_q;
  assign taken_count      = cnt;
  assign pattern          = pat_now;
  assign learning         = (pat_now == PAT_LEARNING);
  assign mostly_not_taken = (cnt < 4'd3);
  assign total_seen       = seen_q;
  assign stability        = stab_q;
  assign transitions      = trans_q;
  assign previous_pattern = prev_q;
endmodule
