// tb_decoder: self-checking test of the instruction decoder. Instructions
// are assembled with tb_rv_pkg and the decoded controls and immediates are
// compared with values worked out by hand for each format.
`timescale 1ns/1ps
module tb_decoder;
  import rv_pkg::*;
  import tb_rv_pkg::*;
  logic [31:0] instr, imm;
  ctrl_t c;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  decoder dut (.instr, .ctrl(c), .imm);

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s (instr %h)", s, instr); end
  endtask

  initial begin
    instr = ADDI(1, 2, -5); #1;
    chk(c.reg_write && c.alu_src_b_imm && c.alu_op == ALU_ADD && imm == -32'sd5 && c.imm_src == IMM_I && c.alu_op_class == 2'b10, "addi");
    instr = SUB(3, 4, 5); #1;
    chk(c.reg_write && !c.alu_src_b_imm && c.alu_op == ALU_SUB && c.uses_rs2, "sub");
    instr = SRAI(3, 4, 7); #1;
    chk(c.alu_op == ALU_SRA && imm[4:0] == 5'd7, "srai");
    instr = SLTU(3, 4, 5); #1;
    chk(c.alu_op == ALU_SLTU, "sltu");
    instr = 32'hFE209EE3; #1;     // bne x1, x2, -4
    chk(c.branch && !c.reg_write && imm == 32'hFFFF_FFFC && c.imm_src == IMM_B && c.alu_op_class == 2'b01 && c.funct3 == 3'b001, "bne");
    instr = BLTU(1, 2, 2048); #1;
    chk(c.branch && imm == 32'd2048 && c.alu_op == ALU_SLTU, "bltu");
    instr = LW(7, 6, 12); #1;
    chk(c.mem_read && c.reg_write && c.res_src == RES_MEM && imm == 12, "lw");
    instr = SW(5, 6, -8); #1;
    chk(c.mem_write && !c.reg_write && imm == -32'sd8 && c.uses_rs2 && c.imm_src == IMM_S, "sw");
    instr = LUI(9, 32'hABCDE); #1;
    chk(c.reg_write && c.alu_op == ALU_PASSB && imm == 32'hABCDE000, "lui");
    instr = AUIPC(9, 1); #1;
    chk(c.alu_src_a_pc && imm == 32'h1000, "auipc");
    instr = JAL(1, -2048); #1;
    chk(c.jal && c.res_src == RES_PC4 && imm == -32'sd2048, "jal");
    instr = JALR(0, 1, 4); #1;
    chk(c.jalr && c.uses_rs1 && imm == 4, "jalr");
    instr = DIV(3, 4, 5); #1;
    chk(c.muldiv && c.res_src == RES_MDU && c.funct3 == 3'b100, "div");
    instr = MUL(3, 4, 5); #1;
    chk(c.muldiv && c.funct3 == 3'b000, "mul");
    instr = 32'h0000_0073; #1;    // ecall: no operation
    chk(!c.reg_write && !c.mem_write && !c.branch, "ecall is a nop");
    // random immediates in every format
    for (int i = 0; i < 200; i++) begin
      int v, rd, rs1, rs2;
      v = int'($urandom % 4096) - 2048; rd = $urandom % 32; rs1 = $urandom % 32; rs2 = $urandom % 32;
      instr = ADDI(rd, rs1, v); #1;
      chk(imm == 32'(v) && c.reg_write && c.uses_rs1, "random I");
      instr = SW(rs2, rs1, v); #1;
      chk(imm == 32'(v) && c.mem_write && c.uses_rs2, "random S");
      v = 2 * (int'($urandom % 4096) - 2048);
      instr = BGE(rs1, rs2, v); #1;
      chk(imm == 32'(v) && c.branch && c.funct3 == 3'b101, "random B");
      v = 2 * (int'($urandom % (1 << 20)) - (1 << 19));
      instr = JAL(rd, v); #1;
      chk(imm == 32'(v) && c.jal, "random J");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
