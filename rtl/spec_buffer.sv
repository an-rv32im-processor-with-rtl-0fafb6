// spec_buffer: speculative buffer between the memory and writeback stages.
//
// A DEPTH-entry circular FIFO of results (rv_pkg::sb_entry_t: rd, value,
// write enable, speculative flag, branch tag). The memory stage pushes one
// result per cycle (in_valid); the head is offered to writeback in the same
// cycle it becomes the head, so with nothing waiting the buffer adds one
// register stage, as a memory/writeback pipeline register would. Commit
// rule: the head commits when it is not speculative (an independent
// instruction), or when the branch named by its tag has resolved; if that
// branch was mispredicted the entry retires with its write suppressed
// (squashed). Results commit in order. Branch resolutions arrive from
// execute (resolve_valid/tag/ok) and are remembered per tag until the tag
// is reused (alloc); a resolution takes effect from the next cycle, which
// keeps the commit path free of the execute stage's logic. `full` tells the producer to hold.
// The document gives the buffer, its temporary results and commit rules that
// favour independent instructions; depth, tag table and in-order commit are
// this design's own.
module spec_buffer
  import rv_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sb_entry_t  in_entry,
  input  logic       alloc_valid,     // a new speculated branch takes a tag
  input  logic [4:0] alloc_tag,
  input  logic       resolve_valid,
  input  logic [4:0] resolve_tag,
  input  logic       resolve_ok,
  output logic       out_valid,       // head retires this cycle
  output sb_entry_t  out_entry,       // reg_write already cleared if squashed
  output logic       out_squashed,
  output logic       full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int PW = $clog2(DEPTH);

  sb_entry_t       buf_q [DEPTH];
  logic [PW-1:0]   head_q, tail_q;
  logic [PW:0]     cnt_q;
  logic [31:0]     resolved_q, ok_q;
  sb_entry_t       head;
  logic            head_resolved, head_ok, push, pop;

  always_comb begin
    head = buf_q[head_q];
    head_resolved = resolved_q[head.tag];
    head_ok       = ok_q[head.tag];
    pop  = (cnt_q != '0) && (!head.speculative || head_resolved);
    out_valid    = pop;
    out_squashed = pop && head.speculative && !head_ok;
    out_entry    = head;
    out_entry.reg_write = head.reg_write && !out_squashed;
    full  = (cnt_q == (PW+1)'(DEPTH)) && !pop;
    push  = in_valid && !full;
    count = cnt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0; tail_q <= '0; cnt_q <= '0;
      resolved_q <= '0; ok_q <= '0;
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else begin
      if (push) begin
        buf_q[tail_q] <= in_entry;
        tail_q <= (tail_q == PW'(DEPTH - 1)) ? '0 : tail_q + PW'(1);
      end
      if (pop) head_q <= (head_q == PW'(DEPTH - 1)) ? '0 : head_q + PW'(1);
      cnt_q <= cnt_q + (PW+1)'(push) - (PW+1)'(pop);
      if (alloc_valid) begin
        resolved_q[alloc_tag] <= 1'b0;
      end
      if (resolve_valid) begin
        resolved_q[resolve_tag] <= 1'b1;
        ok_q[resolve_tag]       <= resolve_ok;
      end
    end
  end
endmodule
