// tb_hazard_unit: self-checking test of the hazard control unit: forwarding
// selects, the stall/flush priority (divide, redirect, load-use, selective
// execution) for every input combination, and the consecutive
// misprediction counter.
`timescale 1ns/1ps
module tb_hazard_unit;
  logic clk = 0, rst_n = 0;
  logic r1m, r1w, r2m, r2w, lu, ds, re, ss, br, bm;
  logic [1:0] fa, fb, hs;
  logic sf, sd, se, fd, fe, bmq;
  logic [7:0] cm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hazard_unit dut (.clk, .rst_n, .raw_dep_rs1_mem(r1m), .raw_dep_rs1_wb(r1w),
    .raw_dep_rs2_mem(r2m), .raw_dep_rs2_wb(r2w), .load_use(lu), .div_stall(ds),
    .redirect_e(re), .set_stall_f(ss), .branch_resolved(br), .branch_mispredicted(bm),
    .forward_a(fa), .forward_b(fb), .stall_f(sf), .stall_d(sd), .stall_e(se),
    .flush_d(fd), .flush_e(fe), .bubble_m(bmq), .hazard_state(hs),
    .consecutive_mispredictions(cm));

  initial begin
    int run = 0;
    {r1m, r1w, r2m, r2w, lu, ds, re, ss, br, bm} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      logic [5:0] e;
      {r1m, r1w, r2m, r2w, lu, ds, re, ss} = 8'(v);
      br = 0; bm = 0;
      #1;
      e = ds ? 6'b111001 : re ? 6'b000110 : lu ? 6'b110010 : ss ? 6'b100100 : 6'b000000;
      checks++;
      if (fa != (r1m ? 2'b10 : r1w ? 2'b01 : 2'b00) || fb != (r2m ? 2'b10 : r2w ? 2'b01 : 2'b00) ||
          {sf, sd, se, fd, fe, bmq} != e || hs != {re && !ds, e[5]}) begin
        failures++;
        $display("FAIL v=%b got %b exp %b", v[7:0], {sf, sd, se, fd, fe, bmq}, e);
      end
      @(negedge clk);
    end
    {r1m, r1w, r2m, r2w, lu, ds, re, ss} = '0;
    for (int i = 0; i < 200; i++) begin
      br = $urandom % 2; bm = br && ($urandom % 3 != 0);
      @(negedge clk);
      if (br) run = bm ? run + 1 : 0;
      checks++;
      if (cm != 8'(run)) begin failures++; $display("FAIL miss run %0d exp %0d", cm, run); end
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
