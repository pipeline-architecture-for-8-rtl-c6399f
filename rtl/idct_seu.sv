// idct_seu - shift-exchange unit of size K (SEU_K).
//
// A K-register delay line. With c = 0 the line is loaded from the input and
// its last register drives the output, a plain delay of K advances. With
// c = 1 the input is sent straight to the output and the sample leaving the
// line is written back into it. Asserting c while sample i+K arrives
// therefore exchanges samples i and i+K of the stream; everything else is
// delayed by K. The output multiplexer is combinational (the exchanged
// sample passes in the same cycle), as the unit has no register of its own
// beyond the delay line. Mux input assignment follows the unit's block
// diagram; the enable is this design's stall mechanism.
module idct_seu #(
  parameter int unsigned K = 2,
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                c,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  logic signed [W-1:0] line [K];

  assign d_o = c ? d_i : line[K-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) line[k] <= '0;
    end else if (en) begin
      line[0] <= c ? line[K-1] : d_i;
      for (int k = 1; k < K; k++) line[k] <= line[k-1];
    end
  end

endmodule
