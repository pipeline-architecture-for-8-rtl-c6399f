// idct_lsu - local subtraction unit of the sequential IDCT kernel.
//
// One sample enters per advance (en). A delay register keeps the previous
// sample; when `sub` is high the unit outputs the incoming sample minus the
// delayed one, otherwise it passes the incoming sample. It realises the
// first operational stage (x3-x5, x1-x7, x2-x6) and the local subtractions
// of the second stage of the kernel. The result is registered, so the
// latency is one advance; `sub` belongs to the sample on d_i. The difference
// wraps in W bits; the scaling of the kernel keeps it in range. The output
// register is this design's pipelining choice.
module idct_lsu #(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                sub,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  logic signed [W-1:0] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '0;
      d_o <= '0;
    end else if (en) begin
      dly <= d_i;
      d_o <= sub ? W'(d_i - dly) : d_i;
    end
  end

endmodule
