// tb_dependency_checker: self-checking test of the dependency classifier
// with random register numbers (from a small set, so matches are frequent)
// against an independent model of the seven classes.
`timescale 1ns/1ps
module tb_dependency_checker;
  import rv_pkg::*;
  logic [4:0] rs1_d, rs2_d, rd_d, rs1_e, rs2_e, rd_e, rd_m, rd_w;
  logic u1d, u2d, wd, sd, u1e, u2e, we_, le, wm, ww;
  dep_e cls;
  logic [6:0] vec;
  logic ind, lu, r1m, r1w, r2m, r2w;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dependency_checker dut (.rs1_d, .rs2_d, .uses_rs1_d(u1d), .uses_rs2_d(u2d), .rd_d,
    .regwrite_d(wd), .spec_d(sd), .rs1_e, .rs2_e, .uses_rs1_e(u1e), .uses_rs2_e(u2e),
    .rd_e, .regwrite_e(we_), .load_e(le), .rd_m, .regwrite_m(wm), .rd_w, .regwrite_w(ww),
    .dep_class(cls), .dep_vec(vec), .independent(ind), .load_use(lu),
    .raw_dep_rs1_mem(r1m), .raw_dep_rs1_wb(r1w), .raw_dep_rs2_mem(r2m), .raw_dep_rs2_wb(r2w));

  function automatic bit m(logic [4:0] s, bit u, logic [4:0] d, bit w);
    return u && w && d != 0 && s == d;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      bit ex, me, wb, waw, luse;
      dep_e ec;
      {rs1_d, rs2_d, rd_d, rs1_e, rs2_e, rd_e, rd_m, rd_w} = {8{5'b0}};
      rs1_d = 5'($urandom % 4); rs2_d = 5'($urandom % 4); rd_d = 5'($urandom % 4);
      rs1_e = 5'($urandom % 4); rs2_e = 5'($urandom % 4); rd_e = 5'($urandom % 4);
      rd_m = 5'($urandom % 4); rd_w = 5'($urandom % 4);
      {u1d, u2d, wd, sd, u1e, u2e, we_, le, wm, ww} = 10'($urandom);
      #1;
      ex = m(rs1_d, u1d, rd_e, we_) || m(rs2_d, u2d, rd_e, we_);
      me = m(rs1_d, u1d, rd_m, wm) || m(rs2_d, u2d, rd_m, wm);
      wb = m(rs1_d, u1d, rd_w, ww) || m(rs2_d, u2d, rd_w, ww);
      waw = wd && rd_d != 0 && ((we_ && rd_e == rd_d) || (wm && rd_m == rd_d));
      luse = ex && le;
      if (luse) ec = DEP_LOAD_USE;
      else if (sd) ec = DEP_CONTROL;
      else if (ex) ec = DEP_RAW_EX;
      else if (me) ec = DEP_RAW_MEM;
      else if (wb) ec = DEP_RAW_WB;
      else if (waw) ec = DEP_WAW;
      else ec = DEP_NONE;
      checks++;
      if (cls != ec || lu != luse || ind != !(ex || me || wb || sd) ||
          r1m != m(rs1_e, u1e, rd_m, wm) || r2m != m(rs2_e, u2e, rd_m, wm) ||
          r1w != m(rs1_e, u1e, rd_w, ww) || r2w != m(rs2_e, u2e, rd_w, ww) ||
          vec[DEP_WAW] != waw || vec[DEP_NONE] != (ec == DEP_NONE && !waw)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d: class %0d exp %0d", i, cls, ec);
      end
    end
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
