// tb_idct_transpose - self-checking test of the sequential 8x8 transposer.
// Random 64-sample blocks enter row by row (with idle cycles); while
// sample n is at the input the output must be element n-49 of the
// column-by-column stream (latency 49).
module tb_idct_transpose;
  localparam int W = 17;
  localparam int N = 1280;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [5:0] pos_i = '0;
  logic signed [W-1:0] d_i = '0, d_o;
  idct_transpose #(.W(W)) dut (.*);
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

  logic signed [W-1:0] x [N];
  logic signed [W-1:0] z [N];
  initial begin
    for (int n = 0; n < N; n++) x[n] = W'($urandom);
    for (int n = 0; n < N; n++) z[n] = x[(n / 64) * 64 + (n % 8) * 8 + (n / 8) % 8];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      while ($urandom_range(4, 0) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end
      en <= 1'b1; d_i <= x[n]; pos_i <= 6'(n);
      #1;
      if (n >= 49) begin
        checks++;
        if (d_o !== z[n-49]) begin
          failures++;
          if (failures < 5) $display("slot %0d: got %0d expected %0d", n-49, d_o, z[n-49]);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
