// hazard_unit: hazard control unit with the forwarding network.
//
// Combinational selects plus one counter. Forwarding: each execute-stage
// operand takes the memory-stage result (select 10) when the dependency
// checker flags a read-after-write on memory, else the writeback result
// (select 01), else the register file (00); memory wins when both match, as
// it is the younger value. Stalls and flushes, in priority order:
//  - a divide still iterating in execute stalls fetch, decode and execute
//    and sends a bubble to memory;
//  - a redirect from execute (a speculated branch that was mispredicted, a
//    held branch reaching resolution, or a jump) flushes decode and execute;
//  - a load-use dependency stalls fetch and decode for one cycle and sends a
//    bubble to execute;
//  - the selective execution controller may stall fetch alone (a second
//    branch waiting behind an unresolved speculated one).
// hazard_state is {flush, stall}: 00 normal, 10 flush as in the published
// waveforms, 01 stall and 11 both. consecutive_mispredictions counts
// mispredicted speculated branches in a row and clears on a correct one.
// The forward codes and the flush state code follow the published
// waveforms; the priority order is this design's own.
module hazard_unit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       raw_dep_rs1_mem,
  input  logic       raw_dep_rs1_wb,
  input  logic       raw_dep_rs2_mem,
  input  logic       raw_dep_rs2_wb,
  input  logic       load_use,
  input  logic       div_stall,
  input  logic       redirect_e,
  input  logic       set_stall_f,
  input  logic       branch_resolved,
  input  logic       branch_mispredicted,
  output logic [1:0] forward_a,
  output logic [1:0] forward_b,
  output logic       stall_f,
  output logic       stall_d,
  output logic       stall_e,
  output logic       flush_d,
  output logic       flush_e,
  output logic       bubble_m,
  output logic [1:0] hazard_state,
  output logic [7:0] consecutive_mispredictions
);
  always_comb begin
    forward_a = raw_dep_rs1_mem ? 2'b10 : (raw_dep_rs1_wb ? 2'b01 : 2'b00);
    forward_b = raw_dep_rs2_mem ? 2'b10 : (raw_dep_rs2_wb ? 2'b01 : 2'b00);
    stall_f = 1'b0; stall_d = 1'b0; stall_e = 1'b0;
    flush_d = 1'b0; flush_e = 1'b0; bubble_m = 1'b0;
    if (div_stall) begin
      stall_f = 1'b1; stall_d = 1'b1; stall_e = 1'b1; bubble_m = 1'b1;
    end else if (redirect_e) begin
      flush_d = 1'b1; flush_e = 1'b1;
    end else if (load_use) begin
      stall_f = 1'b1; stall_d = 1'b1; flush_e = 1'b1;
    end else if (set_stall_f) begin
      stall_f = 1'b1; flush_d = 1'b1;
    end
    hazard_state = {redirect_e && !div_stall, stall_f};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) consecutive_mispredictions <= '0;
    else if (branch_resolved) begin
      if (branch_mispredicted) begin
        if (consecutive_mispredictions != 8'hFF)
          consecutive_mispredictions <= consecutive_mispredictions + 8'd1;
      end else begin
        consecutive_mispredictions <= '0;
      end
    end
  end
endmodule
