// tb_idct_bu - self-checking test of the butterfly unit.
// Pairs (a, b) of random samples enter with random idle cycles; output slot
// 2j must be b-a and slot 2j+1 a+b, each visible one accepted sample after
// the next one entered (latency 2).
module tb_idct_bu;
  localparam int W = 17;
  localparam int N = 2000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sel = 1'b0;
  logic signed [W-1:0] d_i = '0, d_o;
  idct_bu #(.W(W)) dut (.*);
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
  logic signed [W-1:0] y [N];
  initial begin
    for (int n = 0; n < N; n++) begin
      x[n] = W'($urandom);
      x[n] = x[n] >>> 2;
    end
    for (int j = 0; j < N; j += 2) begin
      y[j]   = W'(x[j+1] - x[j]);
      y[j+1] = W'(x[j] + x[j+1]);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      while ($urandom_range(3, 0) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end
      en <= 1'b1; d_i <= x[n]; sel <= n[0];
      @(posedge clk);
      #1;
      if (n >= 1) begin
        checks++;
        if (d_o !== y[n-1]) begin
          failures++;
          if (failures < 5) $display("slot %0d: got %0d expected %0d", n-1, d_o, y[n-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
