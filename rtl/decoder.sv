// decoder: RV32IM instruction decoder of the decode stage.
//
// Combinational. From the 32-bit instruction it produces the control bundle
// rv_pkg::ctrl_t (register write, memory access, branch/jump, operand
// selects, result source, ALU operation, ALUOp class, immediate format) and
// the sign-extended immediate. The ALUOp classes 00 (add), 01 (branch
// compare) and 10 (decided by funct3/funct7) and the immediate-format codes
// 00 (I) and 10 (B) follow the published waveforms; the remaining encodings
// are this design's own. FENCE, ECALL, EBREAK and CSR instructions, which
// the document does not discuss, decode as no-operations, as do unknown
// opcodes.
module decoder
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic [31:0] imm
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  always_comb begin
    opc = instr[6:0];
    f3  = instr[14:12];
    f7  = instr[31:25];
    ctrl = '0;
    ctrl.valid   = 1'b1;
    ctrl.funct3  = f3;
    ctrl.alu_op  = ALU_ADD;
    ctrl.res_src = RES_ALU;
    ctrl.imm_src = IMM_I;
    unique case (opc)
      OP_LUI: begin
        ctrl.reg_write = 1'b1; ctrl.alu_src_b_imm = 1'b1; ctrl.imm_src = IMM_U;
        ctrl.alu_op = ALU_PASSB;
      end
      OP_AUIPC: begin
        ctrl.reg_write = 1'b1; ctrl.alu_src_b_imm = 1'b1; ctrl.imm_src = IMM_U;
        ctrl.alu_src_a_pc = 1'b1;
      end
      OP_JAL: begin
        ctrl.reg_write = 1'b1; ctrl.jal = 1'b1; ctrl.imm_src = IMM_J; ctrl.res_src = RES_PC4;
      end
      OP_JALR: begin
        ctrl.reg_write = 1'b1; ctrl.jalr = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.alu_src_b_imm = 1'b1; ctrl.res_src = RES_PC4;
      end
      OP_BRANCH: begin
        ctrl.branch = 1'b1; ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
        ctrl.imm_src = IMM_B; ctrl.alu_op_class = 2'b01;
        ctrl.alu_op = (f3[2:1] == 2'b11) ? ALU_SLTU : (f3[2] ? ALU_SLT : ALU_SUB);
      end
      OP_LOAD: begin
        ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1; ctrl.uses_rs1 = 1'b1;
        ctrl.alu_src_b_imm = 1'b1; ctrl.res_src = RES_MEM;
      end
      OP_STORE: begin
        ctrl.mem_write = 1'b1; ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
        ctrl.alu_src_b_imm = 1'b1; ctrl.imm_src = IMM_S;
      end
      OP_IMM, OP_REG: begin
        ctrl.reg_write = 1'b1; ctrl.uses_rs1 = 1'b1; ctrl.alu_op_class = 2'b10;
        ctrl.uses_rs2 = (opc == OP_REG);
        ctrl.alu_src_b_imm = (opc == OP_IMM);
        if (opc == OP_REG && f7 == 7'b0000001) begin
          ctrl.muldiv = 1'b1; ctrl.res_src = RES_MDU;
        end else begin
          unique case (f3)
            3'b000: ctrl.alu_op = (opc == OP_REG && f7[5]) ? ALU_SUB : ALU_ADD;
            3'b001: ctrl.alu_op = ALU_SLL;
            3'b010: ctrl.alu_op = ALU_SLT;
            3'b011: ctrl.alu_op = ALU_SLTU;
            3'b100: ctrl.alu_op = ALU_XOR;
            3'b101: ctrl.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
            3'b110: ctrl.alu_op = ALU_OR;
            default: ctrl.alu_op = ALU_AND;
          endcase
        end
      end
      default: ;   // FENCE, SYSTEM and unknown opcodes: no operation
    endcase

    unique case (ctrl.imm_src)
      IMM_S:   imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   imm = {instr[31:12], 12'b0};
      IMM_J:   imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = {{20{instr[31]}}, instr[31:20]};
    endcase
  end
endmodule
