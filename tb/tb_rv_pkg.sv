// tb_rv_pkg: testbench helpers for the RV32IM processor.
//
// Instruction encoders (a small assembler), a test program that exercises
// the pipeline's mechanisms, and rv_ref, an instruction-set reference model
// that executes the same program one instruction at a time. The testbenches
// compare the processor's registers and data memory with the reference
// model, which shares no code with the RTL.
package tb_rv_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_type(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_type(input int imm20, input int rd, input logic [6:0] op);
    return {20'(imm20), 5'(rd), op};
  endfunction
  function automatic logic [31:0] j_type(input int off, input int rd);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] ADDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b100, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLLI(int rd, int rs1, int sh);  return i_type(sh, rs1, 3'b001, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRLI(int rd, int rs1, int sh);  return i_type(sh, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SRAI(int rd, int rs1, int sh);  return i_type(sh | 32'h400, rs1, 3'b101, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ADD(int rd, int rs1, int rs2);  return r_type(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB(int rd, int rs1, int rs2);  return r_type(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR(int rd, int rs1, int rs2);  return r_type(7'h00, rs2, rs1, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR(int rd, int rs1, int rs2);   return r_type(7'h00, rs2, rs1, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT(int rd, int rs1, int rs2);  return r_type(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLTU(int rd, int rs1, int rs2); return r_type(7'h00, rs2, rs1, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MUL(int rd, int rs1, int rs2);  return r_type(7'h01, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MULH(int rd, int rs1, int rs2); return r_type(7'h01, rs2, rs1, 3'b001, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MULHU(int rd, int rs1, int rs2);return r_type(7'h01, rs2, rs1, 3'b011, rd, 7'b0110011); endfunction
  function automatic logic [31:0] DIV(int rd, int rs1, int rs2);  return r_type(7'h01, rs2, rs1, 3'b100, rd, 7'b0110011); endfunction
  function automatic logic [31:0] DIVU(int rd, int rs1, int rs2); return r_type(7'h01, rs2, rs1, 3'b101, rd, 7'b0110011); endfunction
  function automatic logic [31:0] REM(int rd, int rs1, int rs2);  return r_type(7'h01, rs2, rs1, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] LW(int rd, int rs1, int imm);   return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LB(int rd, int rs1, int imm);   return i_type(imm, rs1, 3'b000, rd, 7'b0000011); endfunction
  function automatic logic [31:0] LHU(int rd, int rs1, int imm);  return i_type(imm, rs1, 3'b101, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW(int rs2, int rs1, int imm);  return s_type(imm, rs2, rs1, 3'b010); endfunction
  function automatic logic [31:0] SB(int rs2, int rs1, int imm);  return s_type(imm, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] SH(int rs2, int rs1, int imm);  return s_type(imm, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BEQ(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b000); endfunction
  function automatic logic [31:0] BNE(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b001); endfunction
  function automatic logic [31:0] BLT(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b100); endfunction
  function automatic logic [31:0] BGE(int rs1, int rs2, int off); return b_type(off, rs2, rs1, 3'b101); endfunction
  function automatic logic [31:0] BLTU(int rs1, int rs2, int off);return b_type(off, rs2, rs1, 3'b110); endfunction
  function automatic logic [31:0] LUI(int rd, int imm20);         return u_type(imm20, rd, 7'b0110111); endfunction
  function automatic logic [31:0] AUIPC(int rd, int imm20);       return u_type(imm20, rd, 7'b0010111); endfunction
  function automatic logic [31:0] JAL(int rd, int off);           return j_type(off, rd); endfunction
  function automatic logic [31:0] JALR(int rd, int rs1, int imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction

  // Test program. Word index = address / 4. `outer` sets how often the
  // whole body runs (the branch count grows with it).
  function automatic void build_program(ref logic [31:0] p[$], input int outer);
    p.delete();
    p.push_back(ADDI(20, 0, outer));     // 0x00 x20 = outer count
    p.push_back(ADDI(21, 0, 0));         // 0x04 x21 = LFSR-like state
    p.push_back(LUI(22, 32'h12345));     // 0x08
    p.push_back(ADDI(22, 22, 32'h678));  // 0x0C x22 = 0x12345678
    // OUTER: 0x10
    p.push_back(ADDI(2, 0, 8));          // 0x10 loop bound
    p.push_back(ADDI(1, 0, 0));          // 0x14 i
    p.push_back(ADDI(5, 0, 0));          // 0x18 sum
    p.push_back(ADDI(6, 0, 64));         // 0x1C data pointer
    // L1: 0x20
    p.push_back(ADD(5, 5, 1));           // 0x20 sum += i   (forward from memory/wb)
    p.push_back(SW(5, 6, 0));            // 0x24
    p.push_back(LW(7, 6, 0));            // 0x28
    p.push_back(ADD(8, 7, 1));           // 0x2C load-use
    p.push_back(ADDI(6, 6, 4));          // 0x30
    p.push_back(ADDI(1, 1, 1));          // 0x34
    p.push_back(BNE(1, 2, -24));         // 0x38 -> 0x20
    // alternating forward branch loop
    p.push_back(ADDI(9, 0, 0));          // 0x3C j
    p.push_back(ADDI(10, 0, 12));        // 0x40
    // L2: 0x44
    p.push_back(ANDI(12, 9, 1));         // 0x44
    p.push_back(BEQ(12, 0, 8));          // 0x48 -> 0x50
    p.push_back(ADDI(11, 11, 3));        // 0x4C
    p.push_back(ADDI(9, 9, 1));          // 0x50
    p.push_back(BLT(9, 10, -16));        // 0x54 -> 0x44
    // irregular branch driven by a shift/xor sequence
    p.push_back(ADDI(13, 0, 10));        // 0x58 k
    // L3: 0x5C
    p.push_back(SLLI(14, 22, 3));        // 0x5C
    p.push_back(XOR(22, 22, 14));        // 0x60
    p.push_back(SRLI(14, 22, 5));        // 0x64
    p.push_back(XOR(22, 22, 14));        // 0x68
    p.push_back(ANDI(15, 22, 4));        // 0x6C
    p.push_back(BNE(15, 0, 8));          // 0x70 -> 0x78
    p.push_back(ADDI(21, 21, 1));        // 0x74
    p.push_back(ADDI(13, 13, -1));       // 0x78
    p.push_back(BNE(13, 0, -32));        // 0x7C -> 0x5C
    // five straight-line branches on successive bits of x22 (both
    // outcomes fall through to the next instruction)
    for (int n = 0; n < 5; n++) begin
      p.push_back(SLLI(22, 22, 1));      // 0x80 + 8n
      p.push_back(BLT(22, 0, 4));        // 0x84 + 8n
    end
    // M extension
    p.push_back(MUL(16, 5, 2));          // 0xA8
    p.push_back(DIV(17, 16, 10));        // 0xAC
    p.push_back(REM(18, 16, 10));        // 0xB0
    p.push_back(MULH(19, 22, 22));       // 0xB4
    p.push_back(DIVU(23, 22, 13));       // 0xB8 divide by zero (x13 = 0)
    p.push_back(ADD(24, 17, 18));        // 0xBC uses divide results
    // call and return
    p.push_back(JAL(1, 24));             // 0xC0 -> 0xD8
    p.push_back(SH(24, 0, 128));         // 0xC4
    p.push_back(LHU(25, 0, 128));        // 0xC8
    p.push_back(ADDI(20, 20, -1));       // 0xCC
    p.push_back(BNE(20, 0, -192));       // 0xD0 -> 0x10
    p.push_back(JAL(0, 0));              // 0xD4 END: jump to itself
    // FUNC: 0xD8
    p.push_back(SB(16, 0, 132));         // 0xD8
    p.push_back(LB(26, 0, 132));         // 0xDC
    p.push_back(AUIPC(27, 1));           // 0xE0
    p.push_back(JALR(0, 1, 0));          // 0xE4 return
  endfunction

  localparam int END_PC = 32'hD4;

  class rv_ref;
    logic [31:0] x [32];
    logic [31:0] mem [];
    logic [31:0] prog [$];
    logic [31:0] pc;
    int unsigned retired, branches;
    logic [31:0] end_pc;   // address of the final self-jump

    function new(int words);
      mem = new[words];
      foreach (mem[i]) mem[i] = '0;
      foreach (x[i]) x[i] = '0;
      pc = 0; retired = 0; branches = 0; end_pc = END_PC;
    endfunction

    function logic [31:0] ld(logic [31:0] a, logic [2:0] f3);
      logic [31:0] w = mem[(a >> 2) % mem.size()];
      logic [7:0]  b = w[8*a[1:0] +: 8];
      logic [15:0] h = a[1] ? w[31:16] : w[15:0];
      case (f3)
        3'b000: return {{24{b[7]}}, b};
        3'b001: return {{16{h[15]}}, h};
        3'b100: return {24'b0, b};
        3'b101: return {16'b0, h};
        default: return w;
      endcase
    endfunction

    function void st(logic [31:0] a, logic [2:0] f3, logic [31:0] v);
      int idx = (a >> 2) % mem.size();
      case (f3)
        3'b000: mem[idx][8*a[1:0] +: 8] = v[7:0];
        3'b001: if (a[1]) mem[idx][31:16] = v[15:0]; else mem[idx][15:0] = v[15:0];
        default: mem[idx] = v;
      endcase
    endfunction

    // execute one instruction; returns 0 at the END loop
    function bit step();
      logic [31:0] in, a, b, res, npc;
      logic [63:0] p;
      logic signed [63:0] sp;
      int rd, rs1, rs2;
      logic [2:0] f3;
      logic [31:0] ii, si, bi, ui, ji;
      bit wr;
      if (pc == end_pc) return 0;
      in = prog[pc >> 2];
      rd = in[11:7]; rs1 = in[19:15]; rs2 = in[24:20]; f3 = in[14:12];
      a = x[rs1]; b = x[rs2];
      ii = {{20{in[31]}}, in[31:20]};
      si = {{20{in[31]}}, in[31:25], in[11:7]};
      bi = {{19{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
      ui = {in[31:12], 12'b0};
      ji = {{11{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
      npc = pc + 4; wr = 0; res = 0;
      case (in[6:0])
        7'b0110111: begin res = ui; wr = 1; end
        7'b0010111: begin res = pc + ui; wr = 1; end
        7'b1101111: begin res = pc + 4; wr = 1; npc = pc + ji; end
        7'b1100111: begin res = pc + 4; wr = 1; npc = (a + ii) & ~32'd1; end
        7'b1100011: begin
          bit t;
          case (f3)
            3'b000: t = (a == b);
            3'b001: t = (a != b);
            3'b100: t = ($signed(a) < $signed(b));
            3'b101: t = ($signed(a) >= $signed(b));
            3'b110: t = (a < b);
            default: t = (a >= b);
          endcase
          branches++;
          if (t) npc = pc + bi;
        end
        7'b0000011: begin res = ld(a + ii, f3); wr = 1; end
        7'b0100011: st(a + si, f3, b);
        7'b0010011: begin
          wr = 1;
          case (f3)
            3'b000: res = a + ii;
            3'b010: res = ($signed(a) < $signed(ii)) ? 1 : 0;
            3'b011: res = (a < ii) ? 1 : 0;
            3'b100: res = a ^ ii;
            3'b110: res = a | ii;
            3'b111: res = a & ii;
            3'b001: res = a << in[24:20];
            default: res = in[30] ? 32'($signed(a) >>> in[24:20]) : a >> in[24:20];
          endcase
        end
        7'b0110011: begin
          wr = 1;
          if (in[31:25] == 7'h01) begin
            case (f3)
              3'b000: begin p = 64'(a * b); res = p[31:0]; end
              3'b001: begin sp = 64'($signed(a)) * 64'($signed(b)); res = sp[63:32]; end
              3'b010: begin sp = 64'($signed(a)) * $signed({32'b0, b}); res = sp[63:32]; end
              3'b011: begin p = 64'(a) * 64'(b); res = p[63:32]; end
              3'b100: res = (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : 32'($signed(a) / $signed(b));
              3'b101: res = (b == 0) ? '1 : a / b;
              3'b110: res = (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? 0 : 32'($signed(a) % $signed(b));
              default: res = (b == 0) ? a : a % b;
            endcase
          end else begin
            case (f3)
              3'b000: res = in[30] ? a - b : a + b;
              3'b001: res = a << b[4:0];
              3'b010: res = ($signed(a) < $signed(b)) ? 1 : 0;
              3'b011: res = (a < b) ? 1 : 0;
              3'b100: res = a ^ b;
              3'b101: res = in[30] ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
              3'b110: res = a | b;
              default: res = a & b;
            endcase
          end
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
      retired++;
      return 1;
    endfunction
  endclass

endpackage
