// idct_bu - butterfly unit of the sequential IDCT kernel.
//
// Samples arrive in pairs (a first, b second). Two delay registers keep
// every sample for two advances, so one adder/subtractor can produce both
// results of the butterfly: when b is at the input (sel = 1) the multiplexer
// picks the input and the unit computes b - a; one advance later (sel = 0)
// the multiplexer picks the second delay register and the unit computes
// a + b. Results are registered: output slot 2j carries b-a and slot 2j+1
// carries a+b, two advances after a and b entered (latency 2). This sign
// orientation is the one for which the kernel's signal-flow graph equals the
// IDCT. The output register is this design's pipelining choice.
module idct_bu #(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                sel,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  logic signed [W-1:0] d1, d2;
  logic signed [W-1:0] alu;

  always_comb begin
    if (sel) alu = W'(d_i - d1);   // second minus first
    else     alu = W'(d2 + d1);    // first plus second
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1  <= '0;
      d2  <= '0;
      d_o <= '0;
    end else if (en) begin
      d1  <= d_i;
      d2  <= d1;
      d_o <= alu;
    end
  end

endmodule
