// tb_workload_32br: the processor on a short program of the kind used to
// characterise the predictor: 83 instructions (before the final self-jump)
// with 32 conditional branches. A counted loop of 12 iterations sums
// 1..12 (12 backward branches), then a loop of 10 iterations counts its odd
// iterations with a forward branch that alternates between taken and not
// taken (10 + 10 branches). The processor runs with every parameter at its
// default, in high-performance and then real-time mode. Registers, retired
// instructions and branch counts are compared with the instruction-set
// reference model; the prediction accuracy after branches 4, 15, 24 and 32,
// the cycle count, the IPC, the learning duration and the BTB hits are
// printed. The checks demand that the
// predictor learns the loop branch (more correct than wrong predictions
// overall) and that high-performance mode is not slower than real-time mode.
`timescale 1ns/1ps
module tb_workload_32br;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  localparam logic [31:0] PROG_END = 32'h28;

  logic clk = 1'b0, rst_n = 1'b0, mode_rt = 1'b0;
  logic imem_we = 1'b0, dmem_we = 1'b0;
  logic [31:0] imem_waddr = '0, imem_wdata = '0, dmem_waddr = '0, dmem_wdata = '0;
  logic [4:0]  dbg_reg_addr = '0;
  logic [31:0] dbg_reg_data;
  perf_t       perf;
  events_t     ev;
  logic [7:0]  acc, thr;
  set_state_e  sst;
  logic [1:0]  hst;

  rv32im_flbpu_top dut (
    .clk, .rst_n, .mode_rt, .imem_we, .imem_waddr, .imem_wdata,
    .dmem_we, .dmem_waddr, .dmem_wdata, .dbg_reg_addr, .dbg_reg_data,
    .perf, .events(ev), .prediction_accuracy(acc), .dynamic_threshold(thr),
    .set_state(sst), .hazard_state(hst)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned acc_at [33];

  // accuracy as seen after each resolved branch
  always @(negedge clk) if (rst_n && perf.branches > 0 && perf.branches <= 32)
    acc_at[perf.branches] = perf.correct * 100 / perf.branches;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] prog [$];

  task automatic run(input bit rt, output int unsigned cycles);
    rv_ref ref_m;
    int unsigned guard;
    prog = {};
    prog.push_back(ADDI(2, 0, 12));
    prog.push_back(ADDI(1, 1, 1));      // 0x04 loop A
    prog.push_back(ADD(3, 3, 1));
    prog.push_back(BNE(1, 2, -8));
    prog.push_back(ADDI(5, 0, 10));
    prog.push_back(ADDI(4, 4, 1));      // 0x14 loop B
    prog.push_back(ANDI(6, 4, 1));
    prog.push_back(BEQ(6, 0, 8));
    prog.push_back(ADDI(7, 7, 1));
    prog.push_back(BNE(4, 5, -16));
    prog.push_back(JAL(0, 0));          // 0x28 end
    ref_m = new(64);
    ref_m.prog = prog;
    ref_m.end_pc = PROG_END;
    while (ref_m.step()) ;
    check(ref_m.retired == 83 && ref_m.branches == 32, "program has 83 instructions and 32 branches");
    rst_n = 1'b0; mode_rt = rt;
    @(negedge clk);
    for (int i = 0; i < prog.size(); i++) begin
      imem_we = 1'b1; imem_waddr = 32'(4 * i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      dmem_we = 1'b1; dmem_waddr = 32'(4 * i); dmem_wdata = '0;
      @(negedge clk);
    end
    dmem_we = 1'b0;
    foreach (acc_at[i]) acc_at[i] = 0;
    rst_n = 1'b1;
    guard = 0;
    while (perf.retired < ref_m.retired + 1 && guard < 2000) begin
      @(negedge clk);
      guard++;
    end
    cycles = perf.cycles;
    check(guard < 2000, "program reached its end");
    check(perf.retired == ref_m.retired + 1, $sformatf("retired %0d, expected %0d", perf.retired, ref_m.retired + 1));
    check(perf.branches == 32, $sformatf("branches %0d, expected 32", perf.branches));
    for (int r = 1; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      check(dbg_reg_data == ref_m.x[r], $sformatf("x%0d = %08h, expected %08h", r, dbg_reg_data, ref_m.x[r]));
    end
    $display("mode_rt=%0d: %0d instructions and the final jump in %0d cycles, IPC x1000 = %0d; %0d of 32 correct",
             rt, ref_m.retired, cycles, (ref_m.retired + 1) * 1000 / cycles, perf.correct);
    $display("  accuracy after branch 4: %0d%%, 15: %0d%%, 24: %0d%%, 32: %0d%%",
             acc_at[4], acc_at[15], acc_at[24], acc_at[32]);
    $display("  learning duration %0d cycles, BTB hits %0d, mispredict flushes %0d",
             perf.learning_cycles, perf.btb_hits, perf.mispredicts);
    check(perf.correct > 16, "more correct than wrong predictions");
  endtask

  initial begin
    int unsigned c_hp, c_rt;
    run(1'b0, c_hp);
    run(1'b1, c_rt);
    check(c_hp <= c_rt, "high-performance mode is not slower than real-time mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
