// tb_data_mem: self-checking test of the data memory: random byte, half and
// word stores and signed/unsigned loads against a byte-array model.
`timescale 1ns/1ps
module tb_data_mem;
  localparam int W = 64;
  logic clk = 0, we = 0, lwe = 0;
  logic [2:0] f3 = 0;
  logic [31:0] addr = 0, wdata = 0, rdata, laddr = 0, ldata = 0;
  logic [7:0] m [4*W];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  data_mem #(.WORDS(W)) dut (.clk, .addr, .we, .funct3(f3), .wdata, .rdata,
    .load_we(lwe), .load_addr(laddr), .load_data(ldata));

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); lwe = 1; laddr = 32'(4 * i); ldata = '0;
      for (int b = 0; b < 4; b++) m[4 * i + b] = 0;
    end
    @(negedge clk); lwe = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [2:0] sizes [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
      @(negedge clk);
      we = $urandom % 2;
      f3 = we ? 3'($urandom % 3) : sizes[$urandom % 5];
      addr = 32'($urandom % (4 * W));
      if (f3[1:0] == 2'b01) addr[0] = 0;
      if (f3[1:0] == 2'b10) addr[1:0] = 0;
      wdata = $urandom;
      #1;
      if (!we) begin
        logic [31:0] e;
        case (f3)
          3'b000: e = {{24{m[addr][7]}}, m[addr]};
          3'b001: e = {{16{m[addr + 1][7]}}, m[addr + 1], m[addr]};
          3'b100: e = {24'b0, m[addr]};
          3'b101: e = {16'b0, m[addr + 1], m[addr]};
          default: e = {m[addr + 3], m[addr + 2], m[addr + 1], m[addr]};
        endcase
        checks++;
        if (rdata != e) begin failures++; $display("FAIL load f3=%b addr %h: %h exp %h", f3, addr, rdata, e); end
      end else begin
        m[addr] = wdata[7:0];
        if (f3 != 0) m[addr + 1] = wdata[15:8];
        if (f3 == 2) begin m[addr + 2] = wdata[23:16]; m[addr + 3] = wdata[31:24]; end
      end
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
