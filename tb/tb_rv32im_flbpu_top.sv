// tb_rv32im_flbpu_top: end-to-end test of the processor.
//
// Loads the test program from tb_rv_pkg, runs it to its final self-jump in
// high-performance mode and again in real-time mode, and compares every
// register and the data memory with the instruction-set reference model.
// It counts how often each pipeline mechanism fired (speculated and held
// branches, misprediction flushes, jumps, load-use and divide stalls, the
// fetch wait behind an outstanding branch, forwarding from memory and
// writeback, BTB hits, emergency learning, the conservative state, commits
// of shadow results, WAW and control dependencies) and fails for any that
// never did. It also checks the retired-instruction and branch counts, that
// real-time mode never speculates, and the two-cycle branch penalty in
// real-time mode.
`timescale 1ns/1ps
module tb_rv32im_flbpu_top;
  import rv_pkg::*;
  import tb_rv_pkg::*;

  localparam int OUTER = 3;
  localparam int DMEM_WORDS = 256;

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
  int unsigned cnt [18];
  string names [18] = '{"retire", "branch_resolved", "branch_correct", "spec_branch",
    "held_branch", "mispredict_flush", "jump_redirect", "load_use_stall", "div_stall",
    "set_stall", "fwd_mem", "fwd_wb", "btb_hit", "emergency", "conservative",
    "shadow_commit", "dep_waw", "dep_control"};

  always @(negedge clk) if (rst_n) begin
    logic [17:0] v;
    v = ev;
    for (int i = 0; i < 18; i++) if (v[17 - i]) cnt[i]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] prog [$];

  task automatic run(input bit rt, output int unsigned cycles);
    rv_ref ref_m;
    int unsigned guard;
    ref_m = new(DMEM_WORDS);
    build_program(prog, OUTER);
    ref_m.prog = prog;
    while (ref_m.step()) ;
    // load while in reset
    rst_n = 1'b0; mode_rt = rt;
    @(negedge clk);
    for (int i = 0; i < prog.size(); i++) begin
      imem_we = 1'b1; imem_waddr = 32'(4 * i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    for (int i = 0; i < DMEM_WORDS; i++) begin
      dmem_we = 1'b1; dmem_waddr = 32'(4 * i); dmem_wdata = '0;
      @(negedge clk);
    end
    dmem_we = 1'b0;
    rst_n = 1'b1;
    guard = 0;
    while (perf.retired < ref_m.retired + 1 && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    cycles = perf.cycles;
    check(guard < 20000, "program reached its end");
    check(perf.retired == ref_m.retired + 1, $sformatf("retired %0d, expected %0d", perf.retired, ref_m.retired + 1));
    check(perf.branches == ref_m.branches, $sformatf("branches %0d, expected %0d", perf.branches, ref_m.branches));
    for (int r = 1; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      check(dbg_reg_data == ref_m.x[r], $sformatf("x%0d = %08h, expected %08h", r, dbg_reg_data, ref_m.x[r]));
    end
    for (int i = 0; i < DMEM_WORDS; i++)
      check(dut.u_dmem.mem[i] == ref_m.mem[i], $sformatf("mem[%0d] = %08h, expected %08h", i, dut.u_dmem.mem[i], ref_m.mem[i]));
    $display("mode_rt=%0d: %0d instructions in %0d cycles (IPC x1000 = %0d), %0d branches, %0d correct (%0d%%), speculated %0d held %0d mispredict flushes %0d",
             rt, perf.retired, perf.cycles, perf.retired * 1000 / perf.cycles, perf.branches,
             perf.correct, acc, perf.speculated, perf.held, perf.mispredicts);
    if (rt) begin
      check(perf.speculated == 0 && perf.mispredicts == 0, "real-time mode never speculates");
      check(perf.held == perf.branches, "real-time mode holds every branch");
    end
  endtask

  initial begin
    int unsigned c_hp, c_rt;
    foreach (cnt[i]) cnt[i] = 0;
    run(1'b0, c_hp);
    run(1'b1, c_rt);
    // a held branch costs two fetch cycles, a correctly speculated one none:
    // real-time mode needs two more cycles per branch that high-performance
    // mode speculated correctly
    check(c_rt > c_hp, "real-time mode is slower");
    for (int i = 0; i < 18; i++) begin
      $display("  %-18s %0d", names[i], cnt[i]);
      check(cnt[i] > 0, {"mechanism never happened: ", names[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
