// dependency_checker: dependency analysis of the decode stage.
//
// Combinational. It compares the source registers of the instruction in
// decode with the destinations of the instructions in execute, memory and
// writeback and sorts what it finds into seven classes (rv_pkg::dep_e):
// none, write-after-write, read-after-write on writeback, on memory, on
// execute, control (the instruction sits in the shadow of a branch that has
// not yet resolved) and load-use (a read-after-write on a load still in
// execute, the one case forwarding cannot cover). dep_vec flags every class
// present, dep_class is the most severe, and `independent` is set when the
// instruction has no read-after-write and no control dependency.
// For the execute stage it also reports which operand matches the memory or
// writeback destination (raw_dep_rs{1,2}_{mem,wb}); the hazard unit turns
// these into forwarding selects. The document asks for seven classes; which
// seven, and their order of severity, are this design's own.
module dependency_checker
  import rv_pkg::*;
(
  // decode stage
  input  logic [4:0] rs1_d,
  input  logic [4:0] rs2_d,
  input  logic       uses_rs1_d,
  input  logic       uses_rs2_d,
  input  logic [4:0] rd_d,
  input  logic       regwrite_d,
  input  logic       spec_d,
  // execute stage
  input  logic [4:0] rs1_e,
  input  logic [4:0] rs2_e,
  input  logic       uses_rs1_e,
  input  logic       uses_rs2_e,
  input  logic [4:0] rd_e,
  input  logic       regwrite_e,
  input  logic       load_e,
  // memory and writeback stages
  input  logic [4:0] rd_m,
  input  logic       regwrite_m,
  input  logic [4:0] rd_w,
  input  logic       regwrite_w,
  output dep_e       dep_class,
  output logic [6:0] dep_vec,
  output logic       independent,
  output logic       load_use,
  output logic       raw_dep_rs1_mem,
  output logic       raw_dep_rs1_wb,
  output logic       raw_dep_rs2_mem,
  output logic       raw_dep_rs2_wb
);
  function automatic logic reads(input logic [4:0] rs, input logic use_rs,
                                 input logic [4:0] rd, input logic wr);
    return use_rs && wr && (rd != 5'd0) && (rs == rd);
  endfunction

  logic raw_ex, raw_mem, raw_wb, waw;

  always_comb begin
    raw_ex  = reads(rs1_d, uses_rs1_d, rd_e, regwrite_e) || reads(rs2_d, uses_rs2_d, rd_e, regwrite_e);
    raw_mem = reads(rs1_d, uses_rs1_d, rd_m, regwrite_m) || reads(rs2_d, uses_rs2_d, rd_m, regwrite_m);
    raw_wb  = reads(rs1_d, uses_rs1_d, rd_w, regwrite_w) || reads(rs2_d, uses_rs2_d, rd_w, regwrite_w);
    waw     = regwrite_d && (rd_d != 5'd0) &&
              ((regwrite_e && rd_e == rd_d) || (regwrite_m && rd_m == rd_d));
    load_use = raw_ex && load_e;

    dep_vec = '0;
    dep_vec[DEP_WAW]      = waw;
    dep_vec[DEP_RAW_WB]   = raw_wb;
    dep_vec[DEP_RAW_MEM]  = raw_mem;
    dep_vec[DEP_RAW_EX]   = raw_ex && !load_use;
    dep_vec[DEP_CONTROL]  = spec_d;
    dep_vec[DEP_LOAD_USE] = load_use;
    dep_vec[DEP_NONE]     = (dep_vec[6:1] == '0);

    dep_class = DEP_NONE;
    for (int k = 1; k < 7; k++)
      if (dep_vec[k]) dep_class = dep_e'(k);

    independent = !(raw_ex || raw_mem || raw_wb || spec_d);

    raw_dep_rs1_mem = reads(rs1_e, uses_rs1_e, rd_m, regwrite_m);
    raw_dep_rs2_mem = reads(rs2_e, uses_rs2_e, rd_m, regwrite_m);
    raw_dep_rs1_wb  = reads(rs1_e, uses_rs1_e, rd_w, regwrite_w);
    raw_dep_rs2_wb  = reads(rs2_e, uses_rs2_e, rd_w, regwrite_w);
  end
endmodule
