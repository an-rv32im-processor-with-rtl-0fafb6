// tb_selective_exec: self-checking test of the selective execution state
// machine: speculation only at sufficient confidence in high-performance
// mode, holding otherwise and always in real-time mode, late operands
// forcing a hold, fetch stall behind an outstanding branch, the
// conservative state after two mispredictions, tags and cancel.
`timescale 1ns/1ps
module tb_selective_exec;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rt = 0, bif = 0, go = 0, late = 0, res = 0, mis = 0, can = 0;
  logic [7:0] conf = 0;
  logic spec, sf, sh;
  logic [4:0] tag;
  set_state_e st;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  selective_exec #(.CONF_HI(8'd24)) dut (.clk, .rst_n, .mode_rt(rt), .branch_in_f(bif), .branch_go(go),
    .confidence(conf), .operands_late(late), .resolve(res), .mispredict(mis), .cancel(can),
    .speculate(spec), .stall_f(sf), .in_shadow(sh), .branch_tag(tag), .state(st));

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s (state %0d)", s, st); end
  endtask

  // issue a branch with confidence c; returns whether it was speculated
  task automatic issue(input logic [7:0] c, input bit lt, output bit s);
    @(negedge clk);
    bif = 1; go = 1; conf = c; late = lt; #1;
    s = spec;
    @(negedge clk);
    bif = 0; go = 0; late = 0;
  endtask

  task automatic resolve(input bit wrong);
    @(negedge clk); res = 1; mis = wrong;
    @(negedge clk); res = 0; mis = 0;
  endtask

  // random inputs against a cycle model of the controller: 0 = normal,
  // 1 = speculating, 2 = holding; conservative doubles the confidence needed
  task automatic random_phase();
    int m_st, m_miss, exp_st;
    bit m_cons, e_spec, e_sf;
    logic [4:0] m_tag;
    m_st = 0; m_miss = 0; m_cons = 0; m_tag = tag;
    @(negedge clk);
    rst_n = 0; #1; rst_n = 1;
    m_tag = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rt = ($urandom % 8) == 0; bif = $urandom % 2; go = bif && ($urandom % 2);
      conf = 8'($urandom % 80); late = ($urandom % 6) == 0;
      res = ($urandom % 3) == 0; mis = $urandom % 2; can = ($urandom % 10) == 0;
      #1;
      e_spec = (m_st == 0) && go && !rt && !late && (int'(conf) >= (m_cons ? 48 : 24));
      e_sf   = (m_st == 2) || (m_st == 1 && bif);
      exp_st = (m_st == 1) ? SET_SPECULATE : (m_st == 2) ? SET_HOLD : m_cons ? SET_CONSERVATIVE : SET_NORMAL;
      chk(spec == e_spec && sf == e_sf && sh == (m_st == 1) && tag == m_tag && int'(st) == exp_st,
          $sformatf("random step %0d: spec %0d/%0d stall %0d/%0d", i, spec, e_spec, sf, e_sf));
      // next state
      if (m_st != 0 && res) begin
        if (mis) begin
          if (m_miss >= 1) m_cons = 1;
          if (m_miss < 3) m_miss++;
        end else begin
          m_miss = 0; m_cons = 0;
        end
      end
      if (m_st == 0) begin
        if (go) begin
          if (e_spec) begin m_st = 1; m_tag++; end
          else m_st = 2;
        end
      end else if (res || can) m_st = 0;
    end
    rt = 0; bif = 0; go = 0; res = 0; mis = 0; can = 0; late = 0;
  endtask

  initial begin
    bit s;
    logic [4:0] t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t0 = tag;
    issue(8'd60, 0, s);
    chk(s && st == SET_SPECULATE && sh && tag == t0 + 1, "high confidence speculates, new tag");
    bif = 1; #1; chk(sf, "second branch waits behind outstanding one"); bif = 0;
    resolve(0);
    chk(st == SET_NORMAL && !sf, "back to normal after resolution");
    issue(8'd10, 0, s);
    chk(!s && st == SET_HOLD && sf, "low confidence holds and stalls fetch");
    resolve(0);
    issue(8'd60, 1, s);
    chk(!s && st == SET_HOLD, "late operands hold");
    resolve(0);
    rt = 1;
    issue(8'd127, 0, s);
    chk(!s && st == SET_HOLD, "real-time mode holds");
    resolve(0);
    rt = 0;
    issue(8'd60, 0, s); resolve(1);
    issue(8'd60, 0, s); resolve(1);
    chk(st == SET_CONSERVATIVE, "conservative after two mispredictions");
    issue(8'd40, 0, s);
    chk(!s, "conservative needs twice the confidence");
    resolve(0);
    chk(st == SET_NORMAL, "correct prediction ends conservative state");
    issue(8'd40, 0, s);
    chk(s, "normal state speculates at 40");
    @(negedge clk); can = 1; @(negedge clk); can = 0;
    chk(st == SET_NORMAL, "cancel drops the outstanding branch");
    random_phase();
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
