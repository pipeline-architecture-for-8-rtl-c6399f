// tb_idct_1d - self-checking test of the sequential 8-point IDCT kernel.
// Random coefficient vectors (integers up to +-1024, scaled by 2^SH into the
// W-bit word, which leaves two bits more headroom than the 2-D design) enter back to back in the kernel input order 5,3,7,1,6,2,4,0
// with random idle cycles. The reference is twice the orthonormal 8-point
// IDCT times the gains of the three multiplier columns (G_ROW0..2),
// computed in double precision, listed in the kernel output order
// 5,2,6,1,4,3,7,0. After sample n has been accepted the output must carry
// element n-16 of the reference stream (17-advance latency) within a few LSB of
// quantization error. Also checked with truncating products.
module tb_idct_1d;
  import idct_pkg::*;
  localparam int W = 21;
  localparam int SH = 4;
  localparam int NV = 300;
  localparam int N = NV * 8;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] pos_i = '0;
  logic signed [W-1:0] d_i = '0, o_r, o_t;
  idct_1d #(.W(W), .QMODE(Q_ROUND)) u_r (.clk, .rst_n, .en, .pos_i, .d_i, .d_o(o_r));
  idct_1d #(.W(W), .QMODE(Q_TRUNC)) u_t (.clk, .rst_n, .en, .pos_i, .d_i, .d_o(o_t));
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 40000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
  logic signed [W-1:0] x [N];
  real ref_s [N];
  initial begin
    int f [8];
    real s, er, et, maxe, maxt;
    maxe = 0.0; maxt = 0.0;
    for (int v = 0; v < NV; v++) begin
      // Mostly moderate values, like real DCT data, plus some up to +-1024.
      for (int k = 0; k < 8; k++)
        f[k] = (v % 4 == 0) ? $signed($urandom_range(2047, 0)) - 1024
                            : $signed($urandom_range(600, 0)) - 300;
      for (int p = 0; p < 8; p++) x[v*8+p] = W'(f[ORD_IN[p]] * (1 << SH));
      for (int p = 0; p < 8; p++) begin
        s = 0.0;
        for (int k = 0; k < 8; k++)
          s += ((k == 0) ? $sqrt(0.125) : 0.5) * real'(f[k]) * $cos((2*ORD_OUT[p]+1) * k * PI / 16.0);
        ref_s[v*8+p] = 2.0 * G_ROW0 * G_ROW1 * G_ROW2 * s * (2.0 ** SH);
      end
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < N; n++) begin
      while ($urandom_range(4, 0) == 0) begin
        en <= 1'b0;
        @(posedge clk);
      end
      en <= 1'b1; d_i <= x[n]; pos_i <= 3'(n);
      @(posedge clk);
      #1;
      if (n >= 16) begin
        er = real'(o_r) - ref_s[n-16];
        et = real'(o_t) - ref_s[n-16];
        if (er < 0) er = -er;
        if (et < 0) et = -et;
        if (er > maxe) maxe = er;
        if (et > maxt) maxt = et;
        checks += 2;
        if (er > 16.0) begin
          failures++;
          if (failures < 5) $display("slot %0d: got %0d expected %f", n-16, o_r, ref_s[n-16]);
        end
        if (et > 24.0) failures++;
      end
    end
    $display("largest error with rounding: %f LSB", maxe);
    $display("largest error with truncation: %f LSB", maxt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
