// instr_mem: instruction memory of the fetch stage.
//
// A word array read asynchronously at addr[..:2] (one instruction per cycle)
// and written one word per cycle through a load port, which a testbench or
// boot loader uses to place the program before reset is released. Reads
// beyond the array return the NOP 0x00000013. The size is this design's
// choice: the document initialises its memory from a hex file and gives no
// size.
module instr_mem #(
  parameter int WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && (waddr[31:2] < 30'(WORDS))) mem[waddr[AW+1:2]] <= wdata;
  end

  always_comb begin
    if (addr[31:2] < 30'(WORDS)) rdata = mem[addr[AW+1:2]];
    else                         rdata = 32'h0000_0013;
  end
endmodule
