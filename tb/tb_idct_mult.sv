// tb_idct_mult - self-checking test of the coefficient multiplier.
// Three instances cover the three multiplier columns, with rounding
// (columns 0 and 2) and truncation (column 1). The expected coefficients
// are derived here from cosines (d1 = cos(pi/4), d2 = cos(pi/8),
// d3 = cos(3pi/8), d4 = cos(pi/16), d5 = cos(7pi/16), d6 = cos(3pi/16),
// d7 = cos(5pi/16)), rounded to W-2 fraction bits; the expected output is
// the product shifted right with or without half an LSB added first. Slots
// with coefficient 1 must pass the sample unchanged when the gain is 1. A
// fourth instance multiplies column 0 by a gain of 5.2252, which needs
// three integer bits, leaving W-4 fraction bits.
module tb_idct_mult;
  import idct_pkg::*;
  localparam int W = 17;
  localparam int CF = W - 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] pos_i = '0;
  localparam real GX = 5.2252;
  logic signed [W-1:0] d_i = '0, o0, o1, o2, o3;
  idct_mult #(.W(W), .QMODE(Q_ROUND), .STAGE(0)) u0 (.clk, .rst_n, .en, .pos_i, .d_i, .d_o(o0));
  idct_mult #(.W(W), .QMODE(Q_TRUNC), .STAGE(1)) u1 (.clk, .rst_n, .en, .pos_i, .d_i, .d_o(o1));
  idct_mult #(.W(W), .QMODE(Q_ROUND), .STAGE(2)) u2 (.clk, .rst_n, .en, .pos_i, .d_i, .d_o(o2));
  idct_mult #(.W(W), .QMODE(Q_ROUND), .STAGE(0), .GAIN(GX)) u3 (.clk, .rst_n, .en, .pos_i, .d_i, .d_o(o3));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  real cr [3][8];
  longint ci [3][8];
  longint cg [8];
  function automatic longint expect_q(longint x, longint c, bit rnd, int frac = CF);
    longint p;
    p = x * c;
    if (rnd) p = p + (longint'(1) <<< (frac - 1));
    return p >>> frac;
  endfunction
  initial begin
    real d [8];
    logic signed [W-1:0] x;
    longint e [4];
    d[1] = $cos(PI/4);    d[2] = $cos(PI/8);    d[3] = $cos(3*PI/8);
    d[4] = $cos(PI/16);   d[5] = $cos(7*PI/16); d[6] = $cos(3*PI/16); d[7] = $cos(5*PI/16);
    cr[0] = '{2*d[1], 1.0, 2*d[1], 1.0, 2*d[1], 1.0, d[1], d[1]};
    cr[1] = '{2*d[3], 1.0, 2*d[2], 1.0, d[3], 1.0, d[2], 1.0};
    cr[2] = '{d[7], 1.0, d[6], 1.0, d[5], 1.0, d[4], 1.0};
    foreach (cr[s, p]) ci[s][p] = longint'($floor(cr[s][p] * (2.0 ** CF) + 0.5));
    foreach (cg[p]) cg[p] = longint'($floor(cr[0][p] * GX * (2.0 ** (W - 4)) + 0.5));
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 4000; n++) begin
      x = W'($urandom);
      x = x >>> 1;
      en <= ($urandom_range(3, 0) != 0);
      d_i <= x; pos_i <= 3'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        e[0] = expect_q(longint'(x), ci[0][pos_i], 1'b1);
        e[1] = expect_q(longint'(x), ci[1][pos_i], 1'b0);
        e[2] = expect_q(longint'(x), ci[2][pos_i], 1'b1);
        e[3] = expect_q(longint'(x), cg[pos_i], 1'b1, W - 4);
        checks += 4;
        if (o3 !== W'(e[3])) failures++;   // the gain can exceed the range: wraps
        if (longint'(o0) != e[0]) begin failures++; if (failures < 5) $display("col 0 slot %0d x=%0d: got %0d expected %0d", pos_i, x, o0, e[0]); end
        if (longint'(o1) != e[1]) begin failures++; if (failures < 5) $display("col 1 slot %0d x=%0d: got %0d expected %0d", pos_i, x, o1, e[1]); end
        if (longint'(o2) != e[2]) begin
          failures++;
          if (failures < 5) $display("col 2 slot %0d x=%0d: got %0d expected %0d", pos_i, x, o2, e[2]);
        end
        if (pos_i == 3'd1 || pos_i == 3'd3 || pos_i == 3'd5) begin   // coefficient 1: identity
          checks++;
          if (o0 !== x) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
