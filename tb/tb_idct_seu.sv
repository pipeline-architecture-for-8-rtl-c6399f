// tb_idct_seu - self-checking test of the shift-exchange unit for K = 1, 2
// and 7. The stream is cut into groups of 2K samples; for each slot j of
// the second half of a group the control is raised at random, which must
// exchange samples j-K and j. The expected stream is built by performing
// those exchanges on an array; the unit's output while sample n is at its
// input must be element n-K of that stream. Random idle cycles included.
module tb_idct_seu;
  localparam int W = 17;
  localparam int N = 1400;   // multiple of 2, 4 and 14
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic c1 = 1'b0, c2 = 1'b0, c7 = 1'b0;
  logic signed [W-1:0] d_i = '0, o1, o2, o7;
  idct_seu #(.K(1), .W(W)) u1 (.clk, .rst_n, .en, .c(c1), .d_i, .d_o(o1));
  idct_seu #(.K(2), .W(W)) u2 (.clk, .rst_n, .en, .c(c2), .d_i, .d_o(o2));
  idct_seu #(.K(7), .W(W)) u7 (.clk, .rst_n, .en, .c(c7), .d_i, .d_o(o7));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, nx = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] z [3][N];
  bit cc [3][N];
  int ks [3] = '{1, 2, 7};
  initial begin
    for (int n = 0; n < N; n++) x[n] = W'($urandom);
    for (int u = 0; u < 3; u++) begin
      for (int n = 0; n < N; n++) begin z[u][n] = x[n]; cc[u][n] = 1'b0; end
      for (int n = 0; n < N; n++)
        if ((n % (2*ks[u])) >= ks[u] && $urandom_range(1, 0) == 1) begin
          cc[u][n] = 1'b1;
          z[u][n] = x[n-ks[u]];
          z[u][n-ks[u]] = x[n];
          nx++;
        end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      while ($urandom_range(4, 0) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end
      en <= 1'b1; d_i <= x[n]; c1 <= cc[0][n]; c2 <= cc[1][n]; c7 <= cc[2][n];
      #1;
      if (n >= 7) begin
        checks += 3;
        if (o1 !== z[0][n-1]) failures++;
        if (o2 !== z[1][n-2]) failures++;
        if (o7 !== z[2][n-7]) begin
          failures++;
          if (failures < 5) $display("K=7 slot %0d: got %0d expected %0d", n-7, o7, z[2][n-7]);
        end
      end
      @(posedge clk);
    end
    checks++; if (nx == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
