// tb_perf_monitor: self-checking test of the performance counters with
// random event strobes counted independently here, including the cycle at
// which the learning flag first rose.
`timescale 1ns/1ps
module tb_perf_monitor;
  import rv_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] ev = '0;
  logic acc_ok = 0;
  perf_t perf;
  int checks = 0, failures = 0;
  int unsigned n [11];
  int unsigned cyc = 0, learn = 0;
  always #5 clk = ~clk;

  perf_monitor dut (.clk, .rst_n, .retire(ev[0]), .branch_resolved(ev[1]), .branch_correct(ev[2]),
    .mispredict(ev[3]), .speculated(ev[4]), .held(ev[5]), .stall(ev[6]), .flush(ev[7]),
    .forward(ev[8]), .btb_hit(ev[9]), .accuracy_ok(acc_ok), .perf);

  initial begin
    foreach (n[i]) n[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ev = 10'($urandom);
      acc_ok = (i >= 123);
      @(posedge clk);
      for (int k = 0; k < 10; k++) if (ev[k]) n[k]++;
      if (acc_ok && learn == 0) learn = cyc + 1;
      cyc++;
      #1;
      checks++;
      if (perf.cycles != cyc + 1 || perf.retired != n[0] || perf.branches != n[1] ||
          perf.mispredicts != n[3] || perf.btb_hits != n[9]) begin
        failures++;
        if (failures < 10) $display("FAIL at cycle %0d", cyc);
      end
    end
    @(negedge clk);
    checks++; if (perf.cycles != cyc + 1) begin failures++; $display("FAIL cycles %0d exp %0d", perf.cycles, cyc + 1); end
    checks++; if (perf.retired != n[0] || perf.branches != n[1] || perf.correct != n[2]) begin failures++; $display("FAIL retire/branch/correct"); end
    checks++; if (perf.mispredicts != n[3] || perf.speculated != n[4] || perf.held != n[5]) begin failures++; $display("FAIL mispredict/spec/held"); end
    checks++; if (perf.stalls != n[6] || perf.flushes != n[7] || perf.forwards != n[8] || perf.btb_hits != n[9]) begin failures++; $display("FAIL stall/flush/fwd/btb"); end
    checks++; if (perf.learning_cycles != learn) begin failures++; $display("FAIL learning %0d exp %0d", perf.learning_cycles, learn); end
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
