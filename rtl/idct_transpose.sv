// idct_transpose - sequential 8x8 matrix transposition.
//
// A 64-sample block arrives row by row (slot 8r+c) and leaves column by
// column (slot 8c+r). Writing the slot as bits r2 r1 r0 c2 c1 c0, the
// transposition swaps r_k with c_k for k = 0, 1, 2; each swap is one
// shift-exchange unit: SEU7 exchanges slots i and i+7 where c0=1, r0=0,
// SEU14 slots i and i+14 where c1=1, r1=0, SEU28 slots i and i+28 where
// c2=1, r2=0. A unit's control is high while the later sample of a pair
// reaches it. The network holds 7+14+28 = 49 registers and its latency is
// 49 advances, the largest distance a sample has to move. Control is
// decoded from pos_i, the slot of the sample at d_i.
module idct_transpose #(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [5:0]          pos_i,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  logic [5:0] p7, p14, p28;
  logic signed [W-1:0] s7, s14;

  assign p7  = pos_i;
  assign p14 = pos_i - 6'd7;
  assign p28 = pos_i - 6'd21;

  idct_seu #(.K(7), .W(W)) u_seu7 (
    .clk, .rst_n, .en, .c (p7[3] & ~p7[0]), .d_i (d_i), .d_o (s7)
  );

  idct_seu #(.K(14), .W(W)) u_seu14 (
    .clk, .rst_n, .en, .c (p14[4] & ~p14[1]), .d_i (s7), .d_o (s14)
  );

  idct_seu #(.K(28), .W(W)) u_seu28 (
    .clk, .rst_n, .en, .c (p28[5] & ~p28[2]), .d_i (s14), .d_o (d_o)
  );

endmodule
