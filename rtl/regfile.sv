// regfile: 32 x 32-bit RV32 integer register file.
//
// Two asynchronous read ports for the decode stage and one synchronous
// write port from writeback. x0 always reads zero. A register written in
// the same cycle it is read returns the new value (write-through), so an
// instruction three stages behind its producer needs no forwarding. A third
// read port (dbg) lets a testbench inspect the architectural state. All
// registers reset to zero; both choices are this design's own.
module regfile #(
  parameter int XLEN_P = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [4:0]        ra1,
  input  logic [4:0]        ra2,
  output logic [XLEN_P-1:0] rd1,
  output logic [XLEN_P-1:0] rd2,
  input  logic              we,
  input  logic [4:0]        wa,
  input  logic [XLEN_P-1:0] wd,
  input  logic [4:0]        dbg_ra,
  output logic [XLEN_P-1:0] dbg_rd
);
  logic [XLEN_P-1:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
    dbg_rd = (dbg_ra == 5'd0) ? '0 : regs[dbg_ra];
  end
endmodule
