// tb_regfile: self-checking test of the register file: x0 stays zero,
// writes land, both read ports and the debug port read back, and a
// same-cycle read sees the value being written.
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0] ra1 = 0, ra2 = 0, wa = 0, dra = 0;
  logic [31:0] rd1, rd2, wd = 0, drd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  regfile dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd, .dbg_ra(dra), .dbg_rd(drd));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = $urandom % 2; wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (i % 3 == 0) ? wa : 5'($urandom); dra = 5'($urandom);
      #1;
      chk(rd1 == ((we && wa == ra1 && ra1 != 0) ? wd : shadow[ra1]), $sformatf("rd1 x%0d", ra1));
      chk(rd2 == ((we && wa == ra2 && ra2 != 0) ? wd : shadow[ra2]), $sformatf("rd2 x%0d", ra2));
      chk(drd == shadow[dra], $sformatf("dbg x%0d", dra));
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
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
