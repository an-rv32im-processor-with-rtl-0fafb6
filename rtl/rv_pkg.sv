// rv_pkg: types and constants shared by the RV32IM pipeline with the fuzzy
// logic branch prediction unit (FLBPU) and selective execution.
//
// It holds the RV32 opcodes, the ALU operation codes, the decoded control
// bundle, the six global-history pattern classes, the seven dependency
// classes, the selective-execution states, the speculative-buffer entry and
// the performance counter bundle. Opcode values follow the RISC-V base ISA.
// ALU codes 0 (add) and 1 (subtract) match the published waveforms; every
// other encoding in this package is this design's own choice.
package rv_pkg;

  localparam int XLEN = 32;

  // RV32 major opcodes
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_SLT  = 4'd5,
    ALU_SLTU = 4'd6,
    ALU_SLL  = 4'd7,
    ALU_SRL  = 4'd8,
    ALU_SRA  = 4'd9,
    ALU_PASSB = 4'd10
  } alu_op_e;

  // Immediate formats. 00 (I) and 10 (B) as in the published waveforms.
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_src_e;

  // Source of the value written back to rd
  typedef enum logic [1:0] {
    RES_ALU  = 2'd0,
    RES_MEM  = 2'd1,
    RES_PC4  = 2'd2,
    RES_MDU  = 2'd3
  } res_src_e;

  typedef struct packed {
    logic       valid;      // a real instruction (0 = bubble)
    logic       reg_write;
    logic       mem_write;
    logic       mem_read;
    logic       branch;     // conditional branch
    logic       jal;
    logic       jalr;
    logic       alu_src_a_pc; // operand A is the PC (AUIPC)
    logic       alu_src_b_imm;
    logic       muldiv;     // M-extension operation
    logic       uses_rs1;
    logic       uses_rs2;
    res_src_e   res_src;
    alu_op_e    alu_op;
    logic [1:0] alu_op_class; // ALUOp: 00 add, 01 branch compare, 10 by funct
    imm_src_e   imm_src;
    logic [2:0] funct3;
  } ctrl_t;

  // Six global-history pattern classes
  typedef enum logic [2:0] {
    PAT_ALL_NT      = 3'b000,
    PAT_ALTERNATING = 3'b010,
    PAT_LEARNING    = 3'b100,
    PAT_MOSTLY_NT   = 3'b101,
    PAT_MOSTLY_T    = 3'b110,
    PAT_ALL_T       = 3'b111
  } pattern_e;

  // Seven dependency classes, listed from least to most severe
  typedef enum logic [2:0] {
    DEP_NONE     = 3'd0,
    DEP_WAW      = 3'd1,
    DEP_RAW_WB   = 3'd2,
    DEP_RAW_MEM  = 3'd3,
    DEP_RAW_EX   = 3'd4,
    DEP_CONTROL  = 3'd5,
    DEP_LOAD_USE = 3'd6
  } dep_e;

  // Selective execution controller states
  typedef enum logic [1:0] {
    SET_NORMAL       = 2'd0,
    SET_SPECULATE    = 2'd1,
    SET_HOLD         = 2'd2,
    SET_CONSERVATIVE = 2'd3
  } set_state_e;

  localparam int TAG_W = 5;

  typedef struct packed {
    logic [4:0]       rd;
    logic [XLEN-1:0]  value;
    logic             reg_write;
    logic             speculative;
    logic [TAG_W-1:0] tag;
  } sb_entry_t;

  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] retired;
    logic [31:0] branches;
    logic [31:0] correct;
    logic [31:0] mispredicts;
    logic [31:0] speculated;
    logic [31:0] held;
    logic [31:0] stalls;
    logic [31:0] flushes;
    logic [31:0] forwards;
    logic [31:0] btb_hits;
    logic [31:0] learning_cycles;
  } perf_t;

  // One-cycle event strobes brought out of the processor for observation
  typedef struct packed {
    logic retire;
    logic branch_resolved;
    logic branch_correct;
    logic spec_branch;      // a branch was followed speculatively
    logic held_branch;      // a branch was held until resolution
    logic mispredict_flush; // a speculated branch was wrong: decode/execute flushed
    logic jump_redirect;
    logic load_use_stall;
    logic div_stall;
    logic set_stall;        // fetch waits behind an outstanding branch
    logic fwd_mem;
    logic fwd_wb;
    logic btb_hit;
    logic emergency;        // FLBPU emergency learning active
    logic conservative;     // selective execution in conservative state
    logic shadow_commit;    // a result fetched under a speculated branch committed
    logic dep_waw;
    logic dep_control;
  } events_t;

endpackage
