// tb_instr_mem: self-checking test of the instruction memory: words written
// through the load port read back at their addresses, and addresses beyond
// the array read as NOP.
`timescale 1ns/1ps
module tb_instr_mem;
  localparam int W = 256;
  logic clk = 0, we = 0;
  logic [31:0] addr = 0, rdata, waddr = 0, wdata = 0;
  logic [31:0] m [W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  instr_mem #(.WORDS(W)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); we = 1; waddr = 32'(4 * i); wdata = $urandom; m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      addr = 32'(4 * ($urandom % (W + 20)));
      #1;
      checks++;
      if (rdata != ((addr[31:2] < W) ? m[addr[31:2]] : 32'h13)) begin failures++; $display("FAIL addr %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
