// muldiv: RV32 M-extension unit.
//
// MUL, MULH, MULHSU and MULHU are computed in one cycle by a 33x33 signed
// multiply (mapped to DSP blocks on an FPGA): `done` is raised in the cycle
// `start` is high. DIV, DIVU, REM and REMU use a restoring divider that
// retires one quotient bit per cycle: after `start`, `busy` stays high for
// 32 cycles and `done` pulses with the result in the next cycle (33 cycles
// in all), while the operands and funct3 are held in the unit. Division by
// zero and the signed overflow case return the values the RISC-V
// specification defines. A division start in the cycle a division's `done`
// is raised is ignored, as that is the same instruction still in execute.
// The document names the M extension only; the
// multiplier and divider structures are this design's own.
module muldiv #(
  parameter int XLEN_P = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,   // one-cycle request
  input  logic [2:0]        funct3,  // M-extension funct3
  input  logic [XLEN_P-1:0] a,
  input  logic [XLEN_P-1:0] b,
  output logic              busy,
  output logic              done,
  output logic [XLEN_P-1:0] result
);
  localparam int W = XLEN_P;

  // ---------------- multiply (single cycle) ----------------
  logic signed [W:0]     ma, mb;
  logic signed [2*W+1:0] prod;
  logic [W-1:0]          mul_res;
  always_comb begin
    ma = (funct3 == 3'b011) ? $signed({1'b0, a}) : $signed({a[W-1], a});          // MULHU: unsigned a
    mb = (funct3 == 3'b011 || funct3 == 3'b010) ? $signed({1'b0, b}) : $signed({b[W-1], b});
    prod = ma * mb;
    mul_res = (funct3 == 3'b000) ? prod[W-1:0] : prod[2*W-1:W];
  end

  // ---------------- divide (iterative) ----------------
  logic [W-1:0] dividend_q, divisor_q, quot_q, rem_q;
  logic [5:0]   count_q;
  logic         neg_q_q, neg_r_q, is_rem_q, div0_q, ovf_q, running_q, fin_q;
  logic [W-1:0] a_abs, b_abs;
  logic         sgn;
  logic [W:0]   trial;
  logic [W-1:0] rem_shift;

  always_comb begin
    sgn   = ~funct3[0];                       // DIV (100), REM (110) are signed
    a_abs = (sgn && a[W-1]) ? -a : a;
    b_abs = (sgn && b[W-1]) ? -b : b;
    rem_shift = {rem_q[W-2:0], dividend_q[W-1]};
    trial = {1'b0, rem_shift} - {1'b0, divisor_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend_q <= '0; divisor_q <= '0; quot_q <= '0; rem_q <= '0;
      count_q <= '0; neg_q_q <= 1'b0; neg_r_q <= 1'b0; is_rem_q <= 1'b0;
      div0_q <= 1'b0; ovf_q <= 1'b0; running_q <= 1'b0; fin_q <= 1'b0;
    end else begin
      fin_q <= 1'b0;
      if (start && funct3[2] && !running_q && !fin_q) begin
        dividend_q <= a_abs;
        divisor_q  <= b_abs;
        quot_q     <= '0;
        rem_q      <= '0;
        count_q    <= 6'd0;
        neg_q_q    <= sgn && (a[W-1] ^ b[W-1]);
        neg_r_q    <= sgn && a[W-1];
        is_rem_q   <= funct3[1];
        div0_q     <= (b == '0);
        ovf_q      <= sgn && (a == {1'b1, {(W-1){1'b0}}}) && (b == '1);
        running_q  <= 1'b1;
      end else if (running_q) begin
        dividend_q <= {dividend_q[W-2:0], 1'b0};
        if (!trial[W]) begin
          rem_q  <= trial[W-1:0];
          quot_q <= {quot_q[W-2:0], 1'b1};
        end else begin
          rem_q  <= rem_shift;
          quot_q <= {quot_q[W-2:0], 1'b0};
        end
        count_q <= count_q + 6'd1;
        if (count_q == 6'(W - 1)) begin
          running_q <= 1'b0;
          fin_q     <= 1'b1;
        end
      end
    end
  end

  // operands of the finished division, kept for the special cases
  logic [W-1:0] div_a_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_a_q <= '0;
    else if (start && funct3[2] && !running_q && !fin_q) div_a_q <= a;
  end

  logic [W-1:0] div_res;
  always_comb begin
    if (div0_q)
      div_res = is_rem_q ? div_a_q : '1;
    else if (ovf_q)
      div_res = is_rem_q ? '0 : div_a_q;
    else if (is_rem_q)
      div_res = neg_r_q ? -rem_q : rem_q;
    else
      div_res = neg_q_q ? -quot_q : quot_q;
  end

  assign busy   = running_q;
  assign done   = fin_q || (start && !funct3[2] && !running_q && !fin_q);
  assign result = fin_q ? div_res : mul_res;
endmodule
