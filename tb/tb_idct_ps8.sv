// tb_idct_ps8 - self-checking test of the 8-point perfect shuffle.
// Random 8-sample vectors x0..x7 enter back to back (with idle cycles);
// while sample n is at the input the output must be element n-3 of the
// shuffled stream x0,x4,x1,x5,x2,x6,x3,x7 (latency 3).
module tb_idct_ps8;
  localparam int W = 17;
  localparam int N = 800;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] pos_i = '0;
  logic signed [W-1:0] d_i = '0, d_o;
  idct_ps8 #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  int shuf [8] = '{0, 4, 1, 5, 2, 6, 3, 7};
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] z [N];
  initial begin
    for (int n = 0; n < N; n++) x[n] = W'($urandom);
    for (int n = 0; n < N; n++) z[n] = x[(n / 8) * 8 + shuf[n % 8]];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      while ($urandom_range(4, 0) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end
      en <= 1'b1; d_i <= x[n]; pos_i <= 3'(n);
      #1;
      if (n >= 3) begin
        checks++;
        if (d_o !== z[n-3]) begin
          failures++;
          if (failures < 5) $display("slot %0d: got %0d expected %0d", n-3, d_o, z[n-3]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
