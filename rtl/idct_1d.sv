// idct_1d - sequential 8-point IDCT kernel, one sample per advance.
//
// The fast IDCT signal-flow graph is projected onto one processing unit per
// operational stage, cascaded without feedback between units:
//
//   LSU -> SEU2 -> M0 -> BU -> SEU1 -> LSU -> M1 -> BU -> PS8 -> M2 -> BU
//
// Input vectors arrive with slot p carrying frequency index ORD_IN[p]
// (5,3,7,1,6,2,4,0); output vectors leave with slot p carrying spatial index
// ORD_OUT[p] (5,2,6,1,4,3,7,0). The kernel computes twice the orthonormal
// 8-point IDCT times G0*G1*G2, the gains of its three multiplier columns
// (parameters; the defaults are the row kernel's). The multiplier columns
// set the signal level of each segment, the gains are this design's choice.
//
// Control of every unit is decoded from the slot of the sample at its input,
// pos_i minus the latency in front of it. Stage control:
//   LSU (first)  : subtract at slots 1, 3, 5      (x3-x5, x1-x7, x2-x6)
//   SEU2         : exchange slots 0 and 2
//   BU           : second sample of each pair at odd slots
//   SEU1         : exchange slots 1<->2 and 5<->6
//   LSU (second) : subtract at slots 1, 3
//   PS8          : 8-point perfect shuffle
// Every arithmetic unit is followed by one pipeline register, so the
// latency is 17 advances: LSU 1, SEU2 2, M 1, BU 2, SEU1 1, LSU 1, M 1,
// BU 2, PS8 3, M 1, BU 2. The pipeline moves only when en is high.
module idct_1d
  import idct_pkg::*;
#(
  parameter int unsigned W     = 17,
  parameter qmode_e      QMODE = Q_ROUND,
  parameter real         G0    = G_ROW0,
  parameter real         G1    = G_ROW1,
  parameter real         G2    = G_ROW2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          pos_i,
  input  logic signed [W-1:0] d_i,
  output logic signed [W-1:0] d_o
);

  // Slot of the sample at each unit's input.
  logic [2:0] p_lsu1, p_seu2, p_m0, p_bu0, p_seu1, p_lsu2, p_m1, p_bu1, p_ps8, p_m2, p_bu2;
  assign p_lsu1 = pos_i;
  assign p_seu2 = pos_i - 3'(1);
  assign p_m0   = pos_i - 3'(3);
  assign p_bu0  = pos_i - 3'(4);
  assign p_seu1 = pos_i - 3'(6);
  assign p_lsu2 = pos_i - 3'(7);
  assign p_m1   = pos_i - 3'(8);
  assign p_bu1  = pos_i - 3'(9);
  assign p_ps8  = pos_i - 3'(11);
  assign p_m2   = pos_i - 3'(14);
  assign p_bu2  = pos_i - 3'(15);

  logic signed [W-1:0] s_lsu1, s_seu2, s_m0, s_bu0, s_seu1, s_lsu2, s_m1, s_bu1, s_ps8, s_m2;

  idct_lsu #(.W(W)) u_lsu1 (
    .clk, .rst_n, .en,
    .sub ((p_lsu1 == 3'd1) || (p_lsu1 == 3'd3) || (p_lsu1 == 3'd5)),
    .d_i (d_i), .d_o (s_lsu1)
  );

  idct_seu #(.K(2), .W(W)) u_seu2 (
    .clk, .rst_n, .en, .c (p_seu2 == 3'd2), .d_i (s_lsu1), .d_o (s_seu2)
  );

  idct_mult #(.W(W), .QMODE(QMODE), .STAGE(0), .GAIN(G0)) u_m0 (
    .clk, .rst_n, .en, .pos_i (p_m0), .d_i (s_seu2), .d_o (s_m0)
  );

  idct_bu #(.W(W)) u_bu0 (
    .clk, .rst_n, .en, .sel (p_bu0[0]), .d_i (s_m0), .d_o (s_bu0)
  );

  idct_seu #(.K(1), .W(W)) u_seu1 (
    .clk, .rst_n, .en, .c ((p_seu1 == 3'd2) || (p_seu1 == 3'd6)), .d_i (s_bu0), .d_o (s_seu1)
  );

  idct_lsu #(.W(W)) u_lsu2 (
    .clk, .rst_n, .en,
    .sub ((p_lsu2 == 3'd1) || (p_lsu2 == 3'd3)),
    .d_i (s_seu1), .d_o (s_lsu2)
  );

  idct_mult #(.W(W), .QMODE(QMODE), .STAGE(1), .GAIN(G1)) u_m1 (
    .clk, .rst_n, .en, .pos_i (p_m1), .d_i (s_lsu2), .d_o (s_m1)
  );

  idct_bu #(.W(W)) u_bu1 (
    .clk, .rst_n, .en, .sel (p_bu1[0]), .d_i (s_m1), .d_o (s_bu1)
  );

  idct_ps8 #(.W(W)) u_ps8 (
    .clk, .rst_n, .en, .pos_i (p_ps8), .d_i (s_bu1), .d_o (s_ps8)
  );

  idct_mult #(.W(W), .QMODE(QMODE), .STAGE(2), .GAIN(G2)) u_m2 (
    .clk, .rst_n, .en, .pos_i (p_m2), .d_i (s_ps8), .d_o (s_m2)
  );

  idct_bu #(.W(W)) u_bu2 (
    .clk, .rst_n, .en, .sel (p_bu2[0]), .d_i (s_m2), .d_o (d_o)
  );

endmodule
