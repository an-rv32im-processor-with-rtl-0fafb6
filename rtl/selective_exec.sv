// selective_exec: selective execution controller (the SET state machine).
//
// For every conditional branch leaving fetch it decides whether the
// pipeline follows the FLBPU's prediction speculatively or holds fetch until
// the branch resolves in execute. Only one branch is outstanding at a time.
//   NORMAL     no branch outstanding. A branch leaving fetch (branch_go) is
//              speculated when the mode is high-performance, its confidence
//              reaches the required level and its operands do not wait on a
//              load or divide still in flight (operands_late); otherwise it
//              is held.
//   SPECULATE  the branch was followed; a further branch in fetch waits
//              (stall_f) until the outstanding one resolves.
//   HOLD       fetch is stopped (stall_f) until the branch resolves; the
//              execute stage then redirects to the correct path, so a held
//              branch never runs wrong-path instructions.
//   CONSERVATIVE is reported in place of NORMAL while the required
//              confidence is doubled, which happens after two outstanding
//              branches in a row were mispredicted (speculated or held, the
//              FLBPU's direction is judged either way) and lasts until one
//              is predicted correctly.
// In real-time mode (mode_rt) every branch is held, which makes branch
// timing independent of prediction. A jump redirecting from execute
// (cancel) removes an outstanding branch that was on its wrong path.
// `speculate` is combinational in the cycle of branch_go; the state changes
// on the next edge. Each speculated branch takes a new 5-bit tag that marks
// the instructions fetched in its shadow.
// The document gives a state machine steered by FLBPU confidence and the
// dependency classes, and a real-time/high-performance dual mode; the states,
// the confidence level CONF_HI and the conservative rule are this design's own.
module selective_exec
  import rv_pkg::*;
#(
  parameter logic [7:0] CONF_HI = 8'd24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mode_rt,
  input  logic       branch_in_f,     // a conditional branch is in fetch
  input  logic       branch_go,       // ... and it leaves fetch this cycle
  input  logic [7:0] confidence,
  input  logic       operands_late,
  input  logic       resolve,         // outstanding branch resolves in execute
  input  logic       mispredict,      // ... and the FLBPU direction was wrong
  input  logic       cancel,          // older jump redirects: drop outstanding branch
  output logic       speculate,
  output logic       stall_f,
  output logic       in_shadow,       // instructions fetched now are speculative
  output logic [4:0] branch_tag,
  output set_state_e state
);
  typedef enum logic [1:0] {S_NORMAL, S_SPEC, S_HOLD} st_e;
  st_e        st_q;
  logic       cons_q;
  logic [1:0] miss_q;
  logic [4:0] tag_q;
  logic [8:0] need;

  always_comb begin
    need      = cons_q ? {CONF_HI, 1'b0} : {1'b0, CONF_HI};
    speculate = (st_q == S_NORMAL) && branch_go && !mode_rt && !operands_late &&
                ({1'b0, confidence} >= need);
    stall_f   = (st_q == S_HOLD) || (st_q == S_SPEC && branch_in_f);
    in_shadow = (st_q == S_SPEC);
    branch_tag = tag_q;
    unique case (st_q)
      S_SPEC:  state = SET_SPECULATE;
      S_HOLD:  state = SET_HOLD;
      default: state = cons_q ? SET_CONSERVATIVE : SET_NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_NORMAL; cons_q <= 1'b0; miss_q <= '0; tag_q <= '0;
    end else begin
      unique case (st_q)
        S_NORMAL: if (branch_go) begin
          if (speculate) begin
            st_q  <= S_SPEC;
            tag_q <= tag_q + 5'd1;
          end else begin
            st_q <= S_HOLD;
          end
        end
        default: if (resolve || cancel) st_q <= S_NORMAL;
      endcase
      if (st_q != S_NORMAL && resolve) begin
        if (mispredict) begin
          if (miss_q != 2'd3) miss_q <= miss_q + 2'd1;
          if (miss_q >= 2'd1) cons_q <= 1'b1;
        end else begin
          miss_q <= '0;
          cons_q <= 1'b0;
        end
      end
    end
  end
endmodule
