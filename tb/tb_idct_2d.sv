// tb_idct_2d - end-to-end test of the 8x8 IDCT at its default parameters.
//
// Random 8x8 pixel blocks (three ranges: +-255, +-5, +-300) are turned
// into integer DCT coefficients with a double-precision forward DCT, fed to
// the design in its input order with random idle cycles, and every output
// pixel is compared with a double-precision reference IDCT (rounded and
// clipped): the error may be at most 1. The test also checks the 83-cycle
// latency, that each block delivers all 64 (row, column) positions once,
// that a zero block gives zero pixels, and counts how often the mechanisms
// of the datapath occurred: stalls, sample exchanges in the shift-exchange
// units, local subtractions, and output clipping.
module tb_idct_2d;
  import idct_pkg::*;

  localparam int NBLK = 200;
  localparam int MAXCYC = NBLK * 64 * 3 + 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [11:0] in_coef = '0;
  logic [5:0] in_pos;
  logic out_valid;
  logic signed [8:0] out_pix;
  logic [2:0] out_row, out_col;

  idct_2d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > MAXCYC) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // Reference transforms.
  real cm [8][8];
  initial for (int n = 0; n < 8; n++) for (int k = 0; k < 8; k++)
    cm[n][k] = ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2*n+1) * k * 3.14159265358979323846 / 16.0);

  int coef [NBLK][8][8];      // [block][u][v]
  int refp [NBLK][8][8];      // [block][row][col]
  bit rclip[NBLK][8][8];      // reference value was clipped

  task automatic make_block(int b, int lim);
    real p [8][8]; real t; real s;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++)
      p[i][j] = (lim == 0) ? 0.0 : real'($signed($urandom_range(2*lim, 0)) - lim);
    for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) begin
      s = 0.0;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) s += cm[i][u] * p[i][j] * cm[j][v];
      t = $floor(s + 0.5);
      if (t > 2047.0) t = 2047.0;
      if (t < -2048.0) t = -2048.0;
      coef[b][u][v] = int'(t);
    end
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      s = 0.0;
      for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) s += cm[i][u] * real'(coef[b][u][v]) * cm[j][v];
      t = $floor(s + 0.5);
      rclip[b][i][j] = (t > 255.0) || (t < -256.0);
      if (t > 255.0) t = 255.0;
      if (t < -256.0) t = -256.0;
      refp[b][i][j] = int'(t);
    end
  endtask

  // Mechanism counters.
  int n_stall = 0, n_x7 = 0, n_x14 = 0, n_x28 = 0, n_xk = 0, n_sub = 0, n_clip = 0;
  always @(posedge clk) if (rst_n) begin
    if (!in_valid) n_stall++;
    if (in_valid) begin
      if (dut.u_trans.u_seu7.c)  n_x7++;
      if (dut.u_trans.u_seu14.c) n_x14++;
      if (dut.u_trans.u_seu28.c) n_x28++;
      if (dut.u_row.u_seu2.c || dut.u_col.u_ps8.u_seu1.c) n_xk++;
      if (dut.u_row.u_lsu1.sub || dut.u_col.u_lsu2.sub) n_sub++;
    end
  end

  // Output checker.
  int nout = 0;
  int first_out_adv = -1;
  int adv = 0;
  bit seen [8][8];
  always @(posedge clk) if (rst_n) begin
    if (in_valid) adv <= adv + 1;
    if (out_valid) begin
      automatic int b = nout / 64;
      automatic int e;
      if (nout == 0) first_out_adv = adv;
      if (nout % 64 == 0) foreach (seen[i, j]) seen[i][j] = 1'b0;
      if (b < NBLK) begin
        checks++;
        if (seen[out_row][out_col]) begin
          failures++;
          $display("block %0d: position (%0d,%0d) delivered twice", b, out_row, out_col);
        end
        seen[out_row][out_col] = 1'b1;
        e = int'(out_pix) - refp[b][out_row][out_col];
        checks++;
        if (e > 1 || e < -1) begin
          failures++;
          if (failures < 10) $display("block %0d pixel (%0d,%0d): got %0d expected %0d",
                                      b, out_row, out_col, out_pix, refp[b][out_row][out_col]);
        end
        if (rclip[b][out_row][out_col]) n_clip++;
        if (b < 2) begin   // zero blocks must give exact zeros
          checks++;
          if (out_pix != 0) failures++;
        end
      end
      nout++;
    end
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      make_block(b, (b < 2) ? 0 : (b % 3 == 0) ? 255 : (b % 3 == 1) ? 5 : 300);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK + 2; b++) begin
      for (int s = 0; s < 64; s++) begin
        // Random idle cycles while feeding.
        while ($urandom_range(7, 0) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_coef  <= (b < NBLK) ? 12'(coef[b][ORD_IN[s/8]][ORD_IN[s%8]]) : 12'sd0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout < NBLK * 64) begin
      failures++;
      $display("only %0d pixels delivered", nout);
    end
    checks++;
    if (first_out_adv != LAT_2D) begin
      failures++;
      $display("latency %0d advances, expected %0d", first_out_adv, LAT_2D);
    end
    $display("latency %0d advances; stalls %0d; exchanges SEU7 %0d SEU14 %0d SEU28 %0d kernel %0d; subtractions %0d; clipped pixels %0d",
             first_out_adv, n_stall, n_x7, n_x14, n_x28, n_xk, n_sub, n_clip);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_x7 == 0 || n_x14 == 0 || n_x28 == 0 || n_xk == 0) failures++;
    checks++; if (n_sub == 0) failures++;
    checks++; if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
