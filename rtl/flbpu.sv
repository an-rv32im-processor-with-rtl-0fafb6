// flbpu: fuzzy logic branch prediction unit, used in the fetch stage.
//
// Prediction (combinational, same cycle as the fetch): the fetched word is
// pre-decoded; for a conditional branch the fuzzy inference engine (fie)
// turns the global history pattern (ghr), the branch kind (funct3), the
// branch offset and a learning-phase boost into a prediction strength
// 0..127. The final decision is "taken" when the strength reaches the
// dynamic threshold. The target is the BTB's on a hit, otherwise PC plus
// the B-immediate. confidence_level is twice the distance between strength
// and threshold (saturated at 127).
//
// Update (one clock edge after upd_valid, from the execute stage): the
// outcome shifts into the GHR, a taken branch is written to the BTB, and
// accuracy counters advance. On a misprediction the threshold moves by
// THR_STEP towards the outcome (down after a missed taken branch, up after
// a missed not-taken one) within 0x20..0x60. After EMERG_MISS mispredictions
// in a row, emergency learning starts: the threshold returns to THR_INIT
// and, until the next correct prediction, branches are predicted by
// direction alone (backward taken) with zero confidence.
// learning_phase is 0 for the first three branches, 1 while accuracy is
// below 50 % (the FIE then gets a boost of 0x08) and 2 afterwards.
// From the document: the GHR/FIE/BTB structure, 64 BTB entries with LRU, a
// dynamic threshold (initial 0x40, 0x35 after the first adaptation, hence
// the step of 0x0B) and accuracy tracking. The update rules, the confidence
// formula, the learning phases and emergency learning are this design's own.
module flbpu
  import rv_pkg::*;
#(
  parameter int         XLEN_P     = 32,
  parameter int         BTB_ENTRIES = 64,
  parameter logic [7:0] THR_INIT   = 8'h40,
  parameter logic [7:0] THR_STEP   = 8'h0B,
  parameter logic [7:0] THR_MIN    = 8'h20,
  parameter logic [7:0] THR_MAX    = 8'h60,
  parameter int         EMERG_MISS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction, fetch stage
  input  logic              fetch_valid,
  input  logic [XLEN_P-1:0] pc_in,
  input  logic [31:0]       instruction,
  output logic              is_branch,
  output logic              predict_taken,
  output logic [XLEN_P-1:0] predicted_target,
  output logic [7:0]        confidence_level,
  output logic [7:0]        prediction_strength,
  output logic              btb_hit,
  // update, execute stage
  input  logic              upd_valid,
  input  logic [XLEN_P-1:0] upd_pc,
  input  logic              upd_taken,
  input  logic [XLEN_P-1:0] upd_target,
  input  logic              upd_predicted,
  // state and statistics
  output logic [7:0]        dynamic_threshold,
  output logic [2:0]        rule_fired,
  output pattern_e          pattern_type,
  output logic [7:0]        global_history,
  output logic [1:0]        learning_phase,
  output logic              emergency_learning_active,
  output logic [7:0]        consecutive_mispredictions,
  output logic [15:0]       total_branches,
  output logic [15:0]       correct_predictions,
  output logic [7:0]        prediction_accuracy,
  output logic [15:0]       btb_hit_count,
  output logic [15:0]       btb_lookup_count
);
  // ---------------- pre-decode ----------------
  logic [XLEN_P-1:0] imm_b, calculated_target;
  logic [2:0]        instr_type;
  logic [11:0]       branch_offset;
  always_comb begin
    is_branch  = fetch_valid && (instruction[6:0] == OP_BRANCH);
    instr_type = instruction[14:12];
    imm_b = {{(XLEN_P-12){instruction[31]}}, instruction[7], instruction[30:25],
             instruction[11:8], 1'b0};
    calculated_target = pc_in + imm_b;
    branch_offset = {instruction[31], imm_b[10:0]};
  end

  // ---------------- GHR ----------------
  logic [7:0] hist;
  logic [3:0] tcount;
  pattern_e   pat, prev_pat;
  logic       learn, mnt;
  logic [7:0] seen, stab;
  logic [2:0] trans;
  ghr #(.HIST_LEN(8)) u_ghr (
    .clk, .rst_n, .update(upd_valid), .taken(upd_taken),
    .history(hist), .taken_count(tcount), .pattern(pat), .learning(learn),
    .mostly_not_taken(mnt), .total_seen(seen), .stability(stab),
    .transitions(trans), .previous_pattern(prev_pat)
  );

  // ---------------- FIE ----------------
  logic [7:0] boost, strength, hs, ps, is_s, os;
  fie u_fie (
    .pattern(pat), .taken_count(tcount), .last_taken(hist[0]),
    .instr_type, .branch_offset, .boost,
    .prediction_strength(strength), .rule_fired,
    .history_strength(hs), .pattern_strength(ps),
    .instr_strength(is_s), .offset_strength(os)
  );

  // ---------------- BTB ----------------
  logic [XLEN_P-1:0] btb_target;
  logic [$clog2(BTB_ENTRIES)-1:0] lk_idx, rp_idx;
  logic [15:0] btb_upd_cnt, btb_inv_cnt;
  btb #(.ENTRIES(BTB_ENTRIES), .XLEN_P(XLEN_P)) u_btb (
    .clk, .rst_n,
    .lookup_valid(is_branch), .lookup_pc(pc_in),
    .hit(btb_hit), .predicted_target(btb_target), .lookup_index(lk_idx),
    .update_enable(upd_valid && upd_taken), .update_pc(upd_pc), .update_target(upd_target),
    .replace_index(rp_idx),
    .lookup_count(btb_lookup_count), .hit_count(btb_hit_count),
    .update_count(btb_upd_cnt), .invalid_entry_count(btb_inv_cnt)
  );

  // ---------------- prediction logic ----------------
  logic [7:0]  thr_q, miss_run_q;
  logic        emerg_q;
  logic [15:0] total_q, correct_q;
  logic [8:0]  margin;
  logic [23:0] acc_full;

  always_comb begin
    margin = '0;
    if (emerg_q) begin
      predict_taken    = is_branch && instruction[31];
      confidence_level = 8'd0;
    end else begin
      predict_taken = is_branch && (strength >= thr_q);
      margin = (strength >= thr_q) ? 9'(strength - thr_q) : 9'(thr_q - strength);
      margin = margin << 1;
      confidence_level = (margin > 9'd127) ? 8'd127 : margin[7:0];
    end
    predicted_target = btb_hit ? btb_target : calculated_target;
    prediction_strength = strength;

    acc_full = (total_q != 16'd0) ? (24'(correct_q) * 24'd100) / 24'(total_q) : 24'd0;
    prediction_accuracy = acc_full[7:0];
    if (total_q < 16'd3)                learning_phase = 2'd0;
    else if (prediction_accuracy < 8'd50) learning_phase = 2'd1;
    else                                learning_phase = 2'd2;
    boost = (learning_phase == 2'd1) ? 8'h08 : 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr_q      <= THR_INIT;
      miss_run_q <= '0;
      emerg_q    <= 1'b0;
      total_q    <= '0;
      correct_q  <= '0;
    end else if (upd_valid) begin
      total_q <= total_q + 16'd1;
      if (upd_predicted == upd_taken) begin
        correct_q  <= correct_q + 16'd1;
        miss_run_q <= '0;
        emerg_q    <= 1'b0;
      end else begin
        if (miss_run_q != 8'hFF) miss_run_q <= miss_run_q + 8'd1;
        if (miss_run_q + 8'd1 >= 8'(EMERG_MISS)) begin
          emerg_q <= 1'b1;
          thr_q   <= THR_INIT;
        end else if (upd_taken) begin
          thr_q <= (thr_q >= THR_MIN + THR_STEP) ? thr_q - THR_STEP : THR_MIN;
        end else begin
          thr_q <= (thr_q + THR_STEP <= THR_MAX) ? thr_q + THR_STEP : THR_MAX;
        end
      end
    end
  end

  assign dynamic_threshold          = thr_q;
  assign pattern_type               = pat;
  assign global_history             = hist;
  assign emergency_learning_active  = emerg_q;
  assign consecutive_mispredictions = miss_run_q;
  assign total_branches             = total_q;
  assign correct_predictions        = correct_q;
endmodule
