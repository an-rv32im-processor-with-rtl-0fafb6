// perf_monitor: performance counters of the processor.
//
// Free-running 32-bit counters (rv_pkg::perf_t) that advance on one-cycle
// event strobes: cycles (every cycle after reset), retired instructions
// (writeback commits), resolved conditional branches, correct predictions,
// mispredictions (speculated branches that had to be flushed), speculated
// and held branches, stall and flush cycles, forwarded operands and BTB
// hits. learning_cycles records the cycle count at which prediction
// accuracy first reached 50 % (accuracy_ok) and stays there. IPC and
// accuracy are computed by whoever reads the counters. The counter set
// follows the document's metrics; widths and the learning-duration
// definition are this design's own.
module perf_monitor
  import rv_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  retire,
  input  logic  branch_resolved,
  input  logic  branch_correct,
  input  logic  mispredict,
  input  logic  speculated,
  input  logic  held,
  input  logic  stall,
  input  logic  flush,
  input  logic  forward,
  input  logic  btb_hit,
  input  logic  accuracy_ok,
  output perf_t perf
);
  logic learned_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
      learned_q <= 1'b0;
    end else begin
      perf.cycles <= perf.cycles + 32'd1;
      if (retire)          perf.retired     <= perf.retired + 32'd1;
      if (branch_resolved) perf.branches    <= perf.branches + 32'd1;
      if (branch_correct)  perf.correct     <= perf.correct + 32'd1;
      if (mispredict)      perf.mispredicts <= perf.mispredicts + 32'd1;
      if (speculated)      perf.speculated  <= perf.speculated + 32'd1;
      if (held)            perf.held        <= perf.held + 32'd1;
      if (stall)           perf.stalls      <= perf.stalls + 32'd1;
      if (flush)           perf.flushes     <= perf.flushes + 32'd1;
      if (forward)         perf.forwards    <= perf.forwards + 32'd1;
      if (btb_hit)         perf.btb_hits    <= perf.btb_hits + 32'd1;
      if (accuracy_ok && !learned_q) begin
        learned_q <= 1'b1;
        perf.learning_cycles <= perf.cycles;
      end
    end
  end
endmodule
