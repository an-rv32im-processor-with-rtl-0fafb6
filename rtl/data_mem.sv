// data_mem: data memory of the memory stage.
//
// A word array with byte write enables. Loads read asynchronously and are
// aligned and extended here according to funct3 (LB, LH, LW, LBU, LHU);
// stores (SB, SH, SW) write on the rising clock edge. A second write port
// lets a testbench preload data while the core is held in reset; it has
// priority over the core's store. Addresses wrap within the array and
// misaligned accesses are not trapped. Size and these choices are this
// design's own.
module data_mem #(
  parameter int WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [2:0]  funct3,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  logic [31:0] word, wmask, wshift;
  logic [1:0]  off;
  logic [7:0]  by;
  logic [15:0] hw;

  always_comb begin
    off  = addr[1:0];
    word = mem[addr[AW+1:2]];
    by   = word[8*off +: 8];
    hw   = off[1] ? word[31:16] : word[15:0];
    unique case (funct3)
      3'b000:  rdata = {{24{by[7]}}, by};
      3'b001:  rdata = {{16{hw[15]}}, hw};
      3'b100:  rdata = {24'b0, by};
      3'b101:  rdata = {16'b0, hw};
      default: rdata = word;
    endcase
    unique case (funct3[1:0])
      2'b00:   begin wmask = 32'hFF << (8*off);          wshift = wdata << (8*off); end
      2'b01:   begin wmask = 32'hFFFF << (16*off[1]);    wshift = wdata << (16*off[1]); end
      default: begin wmask = 32'hFFFF_FFFF;              wshift = wdata; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (load_we)
      mem[load_addr[AW+1:2]] <= load_data;
    else if (we)
      mem[addr[AW+1:2]] <= (word & ~wmask) | (wshift & wmask);
  end
endmodule
