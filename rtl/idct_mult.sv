// idct_mult - coefficient multiplier of one multiplier column of the kernel.
//
// Every sample is multiplied by the coefficient of its stream slot (pos_i):
// one of d1..d7 (or 2*d1, 2*d2, 2*d3) where the signal-flow graph draws a
// multiplier, 1.0 elsewhere, computed at elaboration from the d_i
// recursion and multiplied by the gain of the column. The
// 2W-bit product is brought back to W bits either by rounding to nearest
// (add half an LSB, arithmetic shift) or by two's complement truncation
// (arithmetic shift only), selected by QMODE. The column's signal gain GAIN
// is folded into the coefficients, which are W-bit numbers with as many
// fraction bits as the largest scaled coefficient leaves (W-1-IB). One
// pipeline register follows the multiplier (latency 1). STAGE selects the
// column (0, 1 or 2).
module idct_mult
  import idct_pkg::*;
#(
  parameter int unsigned W     = 17,
  parameter qmode_e      QMODE = Q_ROUND,
  parameter int unsigned STAGE = 0,
  parameter real         GAIN  = 1.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          pos_i,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  localparam int unsigned IB = coef_ibits(STAGE, GAIN);
  localparam int unsigned CF = W - 1 - IB;

  // Coefficient table of this column, one entry per slot.
  function automatic logic signed [W-1:0] coef_at(input int unsigned slot);
    return W'(coef_int(STAGE, slot, GAIN, CF));
  endfunction

  logic signed [W-1:0]   coef;
  logic signed [2*W-1:0] prod;
  logic signed [2*W-1:0] prod_q;

  always_comb begin
    unique case (pos_i)
      3'd0: coef = coef_at(0);
      3'd1: coef = coef_at(1);
      3'd2: coef = coef_at(2);
      3'd3: coef = coef_at(3);
      3'd4: coef = coef_at(4);
      3'd5: coef = coef_at(5);
      3'd6: coef = coef_at(6);
      default: coef = coef_at(7);
    endcase
    prod = d_i * coef;
    if (QMODE == Q_ROUND) prod_q = (prod + (2*W)'(longint'(1) <<< (CF - 1))) >>> CF;
    else                  prod_q = prod >>> CF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d_o <= '0;
    else if (en) d_o <= prod_q[W-1:0];
  end

endmodule
