// idct_ps8 - sequential 8-point perfect shuffle.
//
// Reorders every 8-sample vector x0..x7 of the stream into
// x0,x4,x1,x5,x2,x6,x3,x7 with a cascade of two shift-exchange units:
// SEU2 exchanges slots 2<->4 and 3<->5 (control high while slots 4 and 5
// enter it), giving 0,1,4,5,2,3,6,7; SEU1 then exchanges slots 1<->2 and
// 5<->6 (control high while slots 2 and 6 enter it). Latency 3 advances,
// three registers. pos_i is the slot of the sample at d_i.
module idct_ps8 #(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          pos_i,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  logic signed [W-1:0] t;
  logic [2:0] pos_t;
  logic       c0, c1;

  assign pos_t = pos_i - 3'd2;                  // slot at the SEU1 input
  assign c0    = (pos_i == 3'd4) || (pos_i == 3'd5);
  assign c1    = (pos_t == 3'd2) || (pos_t == 3'd6);

  idct_seu #(.K(2), .W(W)) u_seu2 (
    .clk, .rst_n, .en, .c(c0), .d_i, .d_o(t)
  );

  idct_seu #(.K(1), .W(W)) u_seu1 (
    .clk, .rst_n, .en, .c(c1), .d_i(t), .d_o
  );

endmodule
