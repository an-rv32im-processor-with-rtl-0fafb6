// tb_alu: self-checking test of the ALU against a behavioural model, with
// directed corner cases and random operands for every operation.
`timescale 1ns/1ps
module tb_alu;
  import rv_pkg::*;
  logic [31:0] a, b, y;
  alu_op_e op;
  logic c, v, z;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu dut (.a, .b, .alu_ctrl(op), .result(y), .carry(c), .overflow(v), .zero(z));

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] w);
    case (o)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_SLT:  return ($signed(x) < $signed(w)) ? 1 : 0;
      ALU_SLTU: return (x < w) ? 1 : 0;
      ALU_SLL:  return x << w[4:0];
      ALU_SRL:  return x >> w[4:0];
      ALU_SRA:  return 32'($signed(x) >>> w[4:0]);
      default:  return w;
    endcase
  endfunction

  task automatic one(alu_op_e o, logic [31:0] x, logic [31:0] w);
    logic [32:0] s;
    op = o; a = x; b = w; #1;
    checks++;
    if (y !== model(o, x, w) || z !== (model(o, x, w) == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h", o, x, w, y);
    end
    if (o == ALU_ADD) begin
      s = {1'b0, x} + {1'b0, w};
      checks++;
      if (c !== s[32] || v !== ((x[31] == w[31]) && (s[31] != x[31]))) begin
        failures++; $display("FAIL flags add a=%h b=%h", x, w);
      end
    end
    if (o == ALU_SUB) begin
      s = {1'b0, x} + {1'b0, ~w} + 33'd1;
      checks++;
      if (c !== s[32] || v !== ((x[31] != w[31]) && (s[31] != x[31]))) begin
        failures++; $display("FAIL flags sub a=%h b=%h", x, w);
      end
    end
  endtask

  initial begin
    alu_op_e ops [11] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT,
                          ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_PASSB};
    one(ALU_ADD, 32'h7FFF_FFFF, 32'd1);
    one(ALU_SUB, 32'h8000_0000, 32'd1);
    one(ALU_SUB, 32'd5, 32'd5);
    one(ALU_SLT, 32'hFFFF_FFFF, 32'd1);
    one(ALU_SLTU, 32'hFFFF_FFFF, 32'd1);
    one(ALU_SRA, 32'h8000_0000, 32'd31);
    for (int i = 0; i < 2000; i++) one(ops[i % 11], $urandom, (i % 7 == 0) ? $urandom % 40 : $urandom);
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
