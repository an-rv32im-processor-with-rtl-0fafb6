// alu: RV32I integer arithmetic-logic unit of the execute stage.
//
// Combinational. Addition and subtraction share one adder: for subtract the
// B operand is inverted (b_adj) and a carry of one is injected, so `carry`
// is the adder's carry out and `overflow` the signed overflow of either
// operation. Logic, shift, set-less-than and pass-B (for LUI) are computed
// directly. The operation codes come from rv_pkg::alu_op_e; add = 0 and
// subtract = 1 as in the published waveforms, the rest are this design's own.
module alu
  import rv_pkg::*;
#(
  parameter int XLEN_P = 32
) (
  input  logic [XLEN_P-1:0] a,
  input  logic [XLEN_P-1:0] b,
  input  alu_op_e           alu_ctrl,
  output logic [XLEN_P-1:0] result,
  output logic              carry,
  output logic              overflow,
  output logic              zero
);
  logic              is_sub;
  logic [XLEN_P-1:0] b_adj;
  logic [XLEN_P:0]   sum;
  logic [4:0]        shamt;

  always_comb begin
    is_sub = (alu_ctrl == ALU_SUB) || (alu_ctrl == ALU_SLT) || (alu_ctrl == ALU_SLTU);
    b_adj  = is_sub ? ~b : b;
    sum    = {1'b0, a} + {1'b0, b_adj} + {{XLEN_P{1'b0}}, is_sub};
    carry  = sum[XLEN_P];
    overflow = (a[XLEN_P-1] == b_adj[XLEN_P-1]) && (sum[XLEN_P-1] != a[XLEN_P-1]);
    shamt  = b[4:0];
    unique case (alu_ctrl)
      ALU_ADD, ALU_SUB: result = sum[XLEN_P-1:0];
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_SLT:  result = {{(XLEN_P-1){1'b0}}, sum[XLEN_P-1] ^ overflow};
      ALU_SLTU: result = {{(XLEN_P-1){1'b0}}, ~carry};
      ALU_SLL:  result = a << shamt;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = $signed(a) >>> shamt;
      ALU_PASSB: result = b;
      default:  result = sum[XLEN_P-1:0];
    endcase
    zero = (result == '0);
  end
endmodule
