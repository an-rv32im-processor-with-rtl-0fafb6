// tb_muldiv: self-checking test of the M-extension unit. Multiplies must be
// ready in the cycle they start; divides must finish exactly 33 cycles after
// start. Results, including division by zero and signed overflow, are
// compared with a behavioural model.
`timescale 1ns/1ps
module tb_muldiv;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] f3;
  logic [31:0] a, b, y;
  logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  muldiv dut (.clk, .rst_n, .start, .funct3(f3), .a, .b, .busy, .done, .result(y));

  function automatic logic [31:0] model(logic [2:0] f, logic [31:0] x, logic [31:0] w);
    logic signed [63:0] sp;
    logic [63:0] up;
    case (f)
      3'b000: return x * w;
      3'b001: begin sp = 64'($signed(x)) * 64'($signed(w)); return sp[63:32]; end
      3'b010: begin sp = 64'($signed(x)) * $signed({32'b0, w}); return sp[63:32]; end
      3'b011: begin up = 64'(x) * 64'(w); return up[63:32]; end
      3'b100: return (w == 0) ? '1 : (x == 32'h8000_0000 && w == '1) ? x : 32'($signed(x) / $signed(w));
      3'b101: return (w == 0) ? '1 : x / w;
      3'b110: return (w == 0) ? x : (x == 32'h8000_0000 && w == '1) ? 0 : 32'($signed(x) % $signed(w));
      default: return (w == 0) ? x : x % w;
    endcase
  endfunction

  task automatic one(logic [2:0] f, logic [31:0] x, logic [31:0] w);
    int lat;
    @(negedge clk);
    f3 = f; a = x; b = w; start = 1;
    if (!f[2]) begin
      #1;
      checks++;
      if (!done || y !== model(f, x, w)) begin failures++; $display("FAIL mul f=%0d %h %h -> %h", f, x, w, y); end
      @(negedge clk); start = 0;
    end else begin
      lat = 0;
      @(negedge clk); start = 0;
      a = $urandom; b = $urandom;   // the unit must hold its own operands
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (y !== model(f, x, w)) begin failures++; $display("FAIL div f=%0d %h %h -> %h exp %h", f, x, w, y, model(f, x, w)); end
      checks++;
      if (lat != 33) begin failures++; $display("FAIL divide latency %0d", lat); end
    end
  endtask

  initial begin
    f3 = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(3'b100, 32'd100, 32'd7);
    one(3'b110, -32'sd100, 32'd7);
    one(3'b100, 32'h8000_0000, 32'hFFFF_FFFF);
    one(3'b101, 32'd5, 32'd0);
    one(3'b111, 32'd5, 32'd0);
    one(3'b001, 32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 300; i++) one(3'($urandom), $urandom, (i % 5 == 0) ? $urandom % 17 : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
