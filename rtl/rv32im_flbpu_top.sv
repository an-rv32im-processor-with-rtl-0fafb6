// rv32im_flbpu_top: five-stage RV32IM pipeline with a fuzzy logic branch
// prediction unit (FLBPU), selective execution, dependency analysis, hazard
// control with forwarding and a speculative buffer before writeback.
//
// Stages: fetch (PC, instruction memory, FLBPU prediction, selective
// execution decision) -> decode (decoder, register file, dependency
// checker) -> execute (forwarding muxes, ALU, M-extension unit, branch and
// jump resolution) -> memory (data memory) -> speculative buffer ->
// writeback (register file write).
// Branch handling: the FLBPU predicts every conditional branch in the cycle
// it is fetched. The selective execution controller then either follows the
// prediction (speculate) or stops fetch until the branch resolves (hold).
// Branches and jumps resolve in execute. A speculated branch that was
// mispredicted, a held branch, JAL and JALR redirect fetch from execute
// and flush decode and execute: two cycles lost. A correctly speculated
// branch costs nothing. Pipeline registers carry a 3-bit confidence score
// (confidence >> 4), the dependency class and the branch tag of the
// speculated branch an instruction was fetched under.
// Other hazards: operands are forwarded from memory and writeback; a load
// followed by a user stalls one cycle; a divide stalls the pipe for its 33
// cycles; the register file writes through to decode.
// Interface: mode_rt = 1 selects real-time mode (every branch held). The
// instruction and data memories are loaded through the *_we ports while
// rst_n is low. perf gives the performance counters, events the per-cycle
// strobes of each mechanism, dbg_reg_* a read port into the register file.
// From the document: the five stages, the FLBPU with GHR/FIE/BTB, the
// dependency checker, hazard control, speculative buffer, selective
// execution and the dual mode. Memory sizes, the redirect scheme and the
// resolution stage details are this design's own choices.
module rv32im_flbpu_top
  import rv_pkg::*;
#(
  parameter int IMEM_WORDS  = 256,
  parameter int DMEM_WORDS  = 256,
  parameter int BTB_ENTRIES = 64,
  parameter int SB_DEPTH    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode_rt,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_we,
  input  logic [31:0] dmem_waddr,
  input  logic [31:0] dmem_wdata,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  output perf_t       perf,
  output events_t     events,
  output logic [7:0]  prediction_accuracy,
  output logic [7:0]  dynamic_threshold,
  output set_state_e  set_state,
  output logic [1:0]  hazard_state
);
  // ------------------------------------------------------------------
  // pipeline register types
  // ------------------------------------------------------------------
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
    logic        pred_dir;    // FLBPU direction
    logic        path_taken;  // direction actually fetched
    logic        speculated;  // a branch followed speculatively
    logic        held;        // a branch held until resolution
    logic [2:0]  conf;        // confidence score
    logic        shadow;      // fetched under a speculated branch
    logic [4:0]  tag;
  } if_id_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] imm;
    logic [31:0] rd1;
    logic [31:0] rd2;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        pred_dir;
    logic        path_taken;
    logic        speculated;
    logic        held;
    logic [2:0]  conf;
    logic        shadow;
    logic [4:0]  tag;
    dep_e        dep;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        mem_write;
    logic        mem_read;
    res_src_e    res_src;
    logic [2:0]  funct3;
    logic [31:0] alu;
    logic [31:0] mdu;
    logic [31:0] pc4;
    logic [31:0] store_data;
    logic [4:0]  rd;
    logic [2:0]  conf;
    logic        shadow;
    logic [4:0]  tag;
  } ex_mem_t;

  if_id_t  fd_q, fd_n;
  id_ex_t  de_q, de_n;
  ex_mem_t em_q, em_n;

  // hazard and control wires
  logic [1:0] fwd_a, fwd_b;
  logic stall_f, stall_d, stall_e, flush_d, flush_e, bubble_m;
  logic redirect_e;
  logic [31:0] redirect_pc;

  // ------------------------------------------------------------------
  // FETCH
  // ------------------------------------------------------------------
  logic [31:0] pc_q, pc_next, instr_f;
  logic        f_is_branch, f_pred_taken, f_btb_hit;
  logic [31:0] f_pred_target;
  logic [7:0]  f_conf, f_strength;
  logic        set_speculate, set_stall_f, set_shadow, branch_go, operands_late;
  logic [4:0]  set_tag;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc_q), .rdata(instr_f),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // execute-stage branch information used by the FLBPU update
  logic        br_e, taken_e, mispred_e;
  logic [31:0] br_target_e;

  logic [2:0]  bp_rule;
  pattern_e    bp_pattern;
  logic [7:0]  bp_hist, bp_miss_run;
  logic [1:0]  bp_phase;
  logic        bp_emerg;
  logic [15:0] bp_total, bp_correct, bp_btb_hits, bp_btb_lookups;

  flbpu #(.BTB_ENTRIES(BTB_ENTRIES)) u_flbpu (
    .clk, .rst_n,
    .fetch_valid(1'b1), .pc_in(pc_q), .instruction(instr_f),
    .is_branch(f_is_branch), .predict_taken(f_pred_taken),
    .predicted_target(f_pred_target), .confidence_level(f_conf),
    .prediction_strength(f_strength), .btb_hit(f_btb_hit),
    .upd_valid(br_e), .upd_pc(de_q.pc), .upd_taken(taken_e),
    .upd_target(br_target_e), .upd_predicted(de_q.pred_dir),
    .dynamic_threshold, .rule_fired(bp_rule), .pattern_type(bp_pattern),
    .global_history(bp_hist), .learning_phase(bp_phase),
    .emergency_learning_active(bp_emerg), .consecutive_mispredictions(bp_miss_run),
    .total_branches(bp_total), .correct_predictions(bp_correct),
    .prediction_accuracy, .btb_hit_count(bp_btb_hits), .btb_lookup_count(bp_btb_lookups)
  );

  // a fetched branch whose operands come from a load or M operation in flight
  ctrl_t ctrl_d;
  always_comb begin
    logic [4:0] rs1_f, rs2_f, rd_dd;
    rs1_f = instr_f[19:15];
    rs2_f = instr_f[24:20];
    rd_dd = fd_q.instr[11:7];
    operands_late =
      (ctrl_d.valid && (ctrl_d.mem_read || ctrl_d.muldiv) && rd_dd != 5'd0 &&
       (rd_dd == rs1_f || rd_dd == rs2_f)) ||
      (de_q.ctrl.valid && (de_q.ctrl.mem_read || de_q.ctrl.muldiv) && de_q.rd != 5'd0 &&
       (de_q.rd == rs1_f || de_q.rd == rs2_f));
  end

  assign branch_go = f_is_branch && !stall_f && !flush_d;

  selective_exec u_set (
    .clk, .rst_n, .mode_rt,
    .branch_in_f(f_is_branch), .branch_go, .confidence(f_conf),
    .operands_late,
    .resolve(br_e), .mispredict(br_e && (de_q.pred_dir != taken_e)),
    .cancel(de_q.ctrl.valid && (de_q.ctrl.jal || de_q.ctrl.jalr)),
    .speculate(set_speculate), .stall_f(set_stall_f), .in_shadow(set_shadow),
    .branch_tag(set_tag), .state(set_state)
  );

  always_comb begin
    if (redirect_e)
      pc_next = redirect_pc;
    else if (stall_f)
      pc_next = pc_q;
    else if (branch_go && set_speculate && f_pred_taken)
      pc_next = f_pred_target;
    else
      pc_next = pc_q + 32'd4;

    fd_n.valid      = 1'b1;
    fd_n.pc         = pc_q;
    fd_n.instr      = instr_f;
    fd_n.pred_dir   = f_pred_taken;
    fd_n.path_taken = set_speculate && f_pred_taken;
    fd_n.speculated = f_is_branch && set_speculate;
    fd_n.held       = f_is_branch && !set_speculate;
    fd_n.conf       = f_conf[6:4];
    fd_n.shadow     = set_shadow;
    fd_n.tag        = (f_is_branch && set_speculate) ? set_tag + 5'd1 : set_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0;
      fd_q <= '0;
    end else begin
      pc_q <= pc_next;
      if (flush_d)       fd_q <= '0;
      else if (!stall_d) fd_q <= fd_n;
    end
  end

  // ------------------------------------------------------------------
  // DECODE
  // ------------------------------------------------------------------
  logic [31:0] imm_d, rd1_d, rd2_d;
  ctrl_t       ctrl_raw;
  sb_entry_t   wb_entry;
  logic        wb_valid, wb_squashed;
  logic        wb_we;

  decoder u_dec (.instr(fd_q.instr), .ctrl(ctrl_raw), .imm(imm_d));
  always_comb begin
    ctrl_d = ctrl_raw;
    if (!fd_q.valid) ctrl_d = '0;
  end

  assign wb_we = wb_valid && wb_entry.reg_write;

  regfile u_rf (
    .clk, .rst_n,
    .ra1(fd_q.instr[19:15]), .ra2(fd_q.instr[24:20]), .rd1(rd1_d), .rd2(rd2_d),
    .we(wb_we), .wa(wb_entry.rd), .wd(wb_entry.value),
    .dbg_ra(dbg_reg_addr), .dbg_rd(dbg_reg_data)
  );

  dep_e       dep_class_d;
  logic [6:0] dep_vec_d;
  logic       indep_d, load_use;
  logic       raw1_m, raw1_w, raw2_m, raw2_w;

  dependency_checker u_dep (
    .rs1_d(fd_q.instr[19:15]), .rs2_d(fd_q.instr[24:20]),
    .uses_rs1_d(ctrl_d.uses_rs1), .uses_rs2_d(ctrl_d.uses_rs2),
    .rd_d(fd_q.instr[11:7]), .regwrite_d(ctrl_d.reg_write),
    .spec_d(fd_q.shadow && (set_state == SET_SPECULATE)),
    .rs1_e(de_q.rs1), .rs2_e(de_q.rs2),
    .uses_rs1_e(de_q.ctrl.uses_rs1), .uses_rs2_e(de_q.ctrl.uses_rs2),
    .rd_e(de_q.rd), .regwrite_e(de_q.ctrl.reg_write), .load_e(de_q.ctrl.mem_read),
    .rd_m(em_q.rd), .regwrite_m(em_q.valid && em_q.reg_write),
    .rd_w(wb_entry.rd), .regwrite_w(wb_we),
    .dep_class(dep_class_d), .dep_vec(dep_vec_d), .independent(indep_d),
    .load_use,
    .raw_dep_rs1_mem(raw1_m), .raw_dep_rs1_wb(raw1_w),
    .raw_dep_rs2_mem(raw2_m), .raw_dep_rs2_wb(raw2_w)
  );

  always_comb begin
    de_n.ctrl       = ctrl_d;
    de_n.pc         = fd_q.pc;
    de_n.imm        = imm_d;
    de_n.rd1        = rd1_d;
    de_n.rd2        = rd2_d;
    de_n.rs1        = fd_q.instr[19:15];
    de_n.rs2        = fd_q.instr[24:20];
    de_n.rd         = fd_q.instr[11:7];
    de_n.pred_dir   = fd_q.pred_dir;
    de_n.path_taken = fd_q.path_taken;
    de_n.speculated = fd_q.speculated;
    de_n.held       = fd_q.held;
    de_n.conf       = fd_q.conf;
    de_n.shadow     = fd_q.shadow;
    de_n.tag        = fd_q.tag;
    de_n.dep        = dep_class_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        de_q <= '0;
    else if (flush_e)  de_q <= '0;
    else if (!stall_e) de_q <= de_n;
  end

  // ------------------------------------------------------------------
  // EXECUTE
  // ------------------------------------------------------------------
  logic [31:0] result_m, src_a, src_b, alu_a, alu_b, alu_y, mdu_y;
  logic        alu_c, alu_v, alu_z;
  logic        mdu_busy, mdu_done, mdu_start, div_stall;

  always_comb begin
    unique case (fwd_a)
      2'b10:   src_a = result_m;
      2'b01:   src_a = wb_entry.value;
      default: src_a = de_q.rd1;
    endcase
    unique case (fwd_b)
      2'b10:   src_b = result_m;
      2'b01:   src_b = wb_entry.value;
      default: src_b = de_q.rd2;
    endcase
    alu_a = de_q.ctrl.alu_src_a_pc ? de_q.pc : src_a;
    alu_b = de_q.ctrl.alu_src_b_imm ? de_q.imm : src_b;
  end

  alu u_alu (.a(alu_a), .b(alu_b), .alu_ctrl(de_q.ctrl.alu_op),
             .result(alu_y), .carry(alu_c), .overflow(alu_v), .zero(alu_z));

  assign mdu_start = de_q.ctrl.valid && de_q.ctrl.muldiv && !mdu_busy;

  muldiv u_mdu (.clk, .rst_n, .start(mdu_start), .funct3(de_q.ctrl.funct3),
                .a(src_a), .b(src_b), .busy(mdu_busy), .done(mdu_done), .result(mdu_y));

  assign div_stall = de_q.ctrl.valid && de_q.ctrl.muldiv && de_q.ctrl.funct3[2] && !mdu_done;

  // branch and jump resolution
  always_comb begin
    logic eq, lt, ltu;
    eq  = (src_a == src_b);
    lt  = ($signed(src_a) < $signed(src_b));
    ltu = (src_a < src_b);
    unique case (de_q.ctrl.funct3)
      3'b000:  taken_e = eq;
      3'b001:  taken_e = !eq;
      3'b100:  taken_e = lt;
      3'b101:  taken_e = !lt;
      3'b110:  taken_e = ltu;
      3'b111:  taken_e = !ltu;
      default: taken_e = 1'b0;
    endcase
    br_e        = de_q.ctrl.valid && de_q.ctrl.branch;
    br_target_e = de_q.pc + de_q.imm;
    mispred_e   = br_e && de_q.speculated && (de_q.path_taken != taken_e);
    redirect_e  = (br_e && (de_q.held || mispred_e)) ||
                  (de_q.ctrl.valid && (de_q.ctrl.jal || de_q.ctrl.jalr));
    if (de_q.ctrl.jalr)
      redirect_pc = (src_a + de_q.imm) & ~32'd1;
    else if (de_q.ctrl.jal || taken_e)
      redirect_pc = br_target_e;
    else
      redirect_pc = de_q.pc + 32'd4;
  end

  always_comb begin
    em_n.valid      = de_q.ctrl.valid;
    em_n.reg_write  = de_q.ctrl.reg_write;
    em_n.mem_write  = de_q.ctrl.mem_write;
    em_n.mem_read   = de_q.ctrl.mem_read;
    em_n.res_src    = de_q.ctrl.res_src;
    em_n.funct3     = de_q.ctrl.funct3;
    em_n.alu        = alu_y;
    em_n.mdu        = mdu_y;
    em_n.pc4        = de_q.pc + 32'd4;
    em_n.store_data = src_b;
    em_n.rd         = de_q.rd;
    em_n.conf       = de_q.conf;
    em_n.shadow     = de_q.shadow;
    em_n.tag        = de_q.tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        em_q <= '0;
    else if (bubble_m) em_q <= '0;
    else               em_q <= em_n;
  end

  // ------------------------------------------------------------------
  // MEMORY
  // ------------------------------------------------------------------
  logic [31:0] load_data;
  logic        sb_full;
  logic [$clog2(SB_DEPTH):0] sb_count;
  sb_entry_t   sb_in;

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(em_q.alu), .we(em_q.valid && em_q.mem_write), .funct3(em_q.funct3),
    .wdata(em_q.store_data), .rdata(load_data),
    .load_we(dmem_we), .load_addr(dmem_waddr), .load_data(dmem_wdata)
  );

  always_comb begin
    unique case (em_q.res_src)
      RES_PC4: result_m = em_q.pc4;
      RES_MDU: result_m = em_q.mdu;
      RES_MEM: result_m = load_data;
      default: result_m = em_q.alu;
    endcase
    sb_in.rd          = em_q.rd;
    sb_in.value       = result_m;
    sb_in.reg_write   = em_q.reg_write;
    sb_in.speculative = em_q.shadow;
    sb_in.tag         = em_q.tag;
  end

  spec_buffer #(.DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst_n,
    .in_valid(em_q.valid), .in_entry(sb_in),
    .alloc_valid(branch_go && set_speculate), .alloc_tag(set_tag + 5'd1),
    .resolve_valid(br_e && de_q.speculated), .resolve_tag(de_q.tag),
    .resolve_ok(!mispred_e),
    .out_valid(wb_valid), .out_entry(wb_entry), .out_squashed(wb_squashed),
    .full(sb_full), .count(sb_count)
  );

  // ------------------------------------------------------------------
  // hazard control
  // ------------------------------------------------------------------
  logic [7:0] hz_miss_run;
  hazard_unit u_hz (
    .clk, .rst_n,
    .raw_dep_rs1_mem(raw1_m), .raw_dep_rs1_wb(raw1_w),
    .raw_dep_rs2_mem(raw2_m), .raw_dep_rs2_wb(raw2_w),
    .load_use(load_use), .div_stall, .redirect_e, .set_stall_f,
    .branch_resolved(br_e && de_q.speculated), .branch_mispredicted(mispred_e),
    .forward_a(fwd_a), .forward_b(fwd_b),
    .stall_f, .stall_d, .stall_e, .flush_d, .flush_e, .bubble_m,
    .hazard_state, .consecutive_mispredictions(hz_miss_run)
  );

  // ------------------------------------------------------------------
  // performance monitoring
  // ------------------------------------------------------------------
  always_comb begin
    events = '0;
    events.retire           = wb_valid && !wb_squashed;
    events.branch_resolved  = br_e;
    events.branch_correct   = br_e && (de_q.pred_dir == taken_e);
    events.spec_branch      = branch_go && set_speculate;
    events.held_branch      = branch_go && !set_speculate;
    events.mispredict_flush = mispred_e;
    events.jump_redirect    = de_q.ctrl.valid && (de_q.ctrl.jal || de_q.ctrl.jalr);
    events.load_use_stall   = load_use && !div_stall && !redirect_e;
    events.div_stall        = div_stall;
    events.set_stall        = set_stall_f && !stall_d && !redirect_e;
    events.fwd_mem          = de_q.ctrl.valid && (fwd_a == 2'b10 || fwd_b == 2'b10);
    events.fwd_wb           = de_q.ctrl.valid && (fwd_a == 2'b01 || fwd_b == 2'b01);
    events.btb_hit          = branch_go && f_btb_hit;
    events.emergency        = bp_emerg;
    events.conservative     = (set_state == SET_CONSERVATIVE);
    events.shadow_commit    = wb_valid && wb_entry.speculative && !wb_squashed;
    events.dep_waw          = fd_q.valid && dep_vec_d[DEP_WAW];
    events.dep_control      = fd_q.valid && dep_vec_d[DEP_CONTROL];
  end

  perf_monitor u_perf (
    .clk, .rst_n,
    .retire(events.retire), .branch_resolved(br_e), .branch_correct(events.branch_correct),
    .mispredict(mispred_e), .speculated(events.spec_branch), .held(events.held_branch),
    .stall(stall_f), .flush(redirect_e), .forward(events.fwd_mem || events.fwd_wb),
    .btb_hit(events.btb_hit), .accuracy_ok(bp_phase == 2'd2),
    .perf
  );
endmodule
