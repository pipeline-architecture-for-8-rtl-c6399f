// tb_idct_lsu - self-checking test of the local subtraction unit.
// Random samples with random subtract requests and random idle cycles;
// after each accepted sample the registered output must equal the sample
// itself or the sample minus the previously accepted one.
module tb_idct_lsu;
  localparam int W = 17;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, sub = 1'b0;
  logic signed [W-1:0] d_i = '0, d_o;
  idct_lsu #(.W(W)) dut (.*);
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
  initial begin
    logic signed [W-1:0] prev, exp_o, x;
    logic s;
    int nsub;
    prev = '0; nsub = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) begin
      x = W'($urandom);
      x = x >>> 2;
      s = $urandom_range(1, 0) == 1;
      en  <= ($urandom_range(3, 0) != 0);
      d_i <= x; sub <= s;
      @(posedge clk);
      #1;
      if (en) begin
        exp_o = s ? W'(x - prev) : x;
        prev = x;
        nsub += int'(s);
        checks++;
        if (d_o !== exp_o) begin
          failures++;
          if (failures < 5) $display("n=%0d sub=%0d got %0d expected %0d", n, s, d_o, exp_o);
        end
      end
    end
    checks++; if (nsub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
