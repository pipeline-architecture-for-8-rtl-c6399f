// tb_idct_ieee1180 - IEEE Std 1180-1990 accuracy test of the 8x8 IDCT,
// swept over internal word widths.
//
// Runs the six random data sets of the standard (pixel ranges L=256/H=255,
// L=H=5 and L=H=300, each with both signs, NBLK = 10000 blocks per set)
// through fourteen instances of the design side by side: W = 16..22 bits,
// each with rounded and with truncated products. The data generator is the
// linear congruential generator of the standard (x = x*1103515245 + 12345,
// sample = floor((x & 0x7ffffffe) / 0x7fffffff * (L+H+1)) - L), restarted
// for every set. Coefficients are the rounded, clipped double-precision
// forward DCT; the reference output is the rounded, clipped double
// precision IDCT. For every instance and set the peak error, the worst
// per-pixel mean square error, the overall mean square error, the worst
// per-pixel mean error and the overall mean error are printed, and a line
// per instance gives the worst of each over the six sets against the
// limits (1, 0.06, 0.02, 0.015, 0.0015).
//
// Checked: all instances stay in step and zero blocks give zero pixels;
// peak error at most 1 for rounding with W >= 17; all five limits met by
// W = 17 with rounding and W = 22 with truncation; at least one limit missed
// by W = 16 with rounding and W = 21 with truncation, i.e. 17 and 22 bits
// are the narrowest compliant word widths of the two quantization methods.
module tb_idct_ieee1180;
  import idct_pkg::*;

  localparam int NBLK = 10000;
  localparam int NSET = 6;
  localparam longint MAXCYC = longint'(NSET) * (NBLK + 2) * 64 + 1000;

  localparam int NCFG = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [11:0] in_coef = '0;
  logic              ov  [NCFG];
  logic signed [8:0] pix [NCFG];
  logic [2:0]        row [NCFG];
  logic [2:0]        col [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    logic [5:0] pos_unused;
    idct_2d #(.W(16 + g / 2), .QMODE((g % 2 == 1) ? Q_TRUNC : Q_ROUND)) dut (
      .clk, .rst_n, .in_valid, .in_coef, .in_pos(pos_unused),
      .out_valid(ov[g]), .out_pix(pix[g]), .out_row(row[g]), .out_col(col[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > MAXCYC) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  real cm [8][8];
  initial for (int n = 0; n < 8; n++) for (int k = 0; k < 8; k++)
    cm[n][k] = ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2*n+1) * k * 3.14159265358979323846 / 16.0);

  int unsigned randx;
  function automatic int ieee_rand(int L, int H);
    int unsigned i;
    real x;
    randx = randx * 32'd1103515245 + 32'd12345;
    i = randx & 32'h7ffffffe;
    x = real'(i) / real'(32'h7fffffff) * real'(L + H + 1);
    return int'($floor(x)) - L;
  endfunction

  // Blocks in flight (the output lags the input by less than two blocks).
  int coef [4][8][8];
  int refp [4][8][8];

  task automatic make_block(int slot, int L, int H, int sgn);
    real p [8][8]; real s, t;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) p[i][j] = real'(sgn * ieee_rand(L, H));
    for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) begin
      s = 0.0;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) s += cm[i][u] * p[i][j] * cm[j][v];
      t = $floor(s + 0.5);
      if (t > 2047.0) t = 2047.0;
      if (t < -2048.0) t = -2048.0;
      coef[slot][u][v] = int'(t);
    end
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
      s = 0.0;
      for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) s += cm[i][u] * real'(coef[slot][u][v]) * cm[j][v];
      t = $floor(s + 0.5);
      if (t > 255.0) t = 255.0;
      if (t < -256.0) t = -256.0;
      refp[slot][i][j] = int'(t);
    end
  endtask

  // Error statistics per set and instance.
  longint esum [NSET][NCFG][8][8];
  longint esq  [NSET][NCFG][8][8];
  int     epk  [NSET][NCFG];
  int     nout [NCFG];

  initial foreach (esum[s, k, i, j]) begin esum[s][k][i][j] = 0; esq[s][k][i][j] = 0; end
  initial foreach (epk[s, k]) epk[s][k] = 0;
  initial foreach (nout[k]) nout[k] = 0;

  // Output n of an instance belongs to global block n/64, which is block
  // (n/64) % NBLK of set (n/64) / NBLK; blocks past the last set are zero.
  task automatic account(int inst, int n, logic signed [8:0] p, logic [2:0] r, logic [2:0] c);
    int b, e, set;
    b = n / 64;
    set = b / NBLK;
    e = int'(p) - refp[b % 4][r][c];
    if (set >= NSET) begin
      checks++;
      if (e != 0) failures++;   // zero blocks must give zero pixels
      return;
    end
    esum[set][inst][r][c] += e;
    esq[set][inst][r][c]  += e * e;
    if (e < 0) e = -e;
    if (e > epk[set][inst]) epk[set][inst] = e;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NCFG; k++)
      if (ov[k]) begin account(k, nout[k], pix[k], row[k], col[k]); nout[k]++; end
  end

  int Ls [6] = '{256, 5, 300, 256, 5, 300};
  int Hs [6] = '{255, 5, 300, 255, 5, 300};
  int Ss [6] = '{1, 1, 1, -1, -1, -1};

  // Worst figures over the sets, per instance.
  int  w_pk   [NCFG];
  real w_pmse [NCFG], w_omse [NCFG], w_pme [NCFG], w_ome [NCFG];
  initial foreach (w_pk[k]) begin
    w_pk[k] = 0; w_pmse[k] = 0.0; w_omse[k] = 0.0; w_pme[k] = 0.0; w_ome[k] = 0.0;
  end

  function automatic string cfg_name(int k);
    return $sformatf("W=%0d %s", 16 + k / 2, (k % 2 == 1) ? "trunc" : "round");
  endfunction

  function automatic bit meets(int k);
    return w_pk[k] <= 1 && w_pmse[k] <= 0.06 && w_omse[k] <= 0.02 && w_pme[k] <= 0.015 && w_ome[k] <= 0.0015;
  endfunction

  task automatic report(int set);
    real pmse, omse, pme, ome, m;
    for (int k = 0; k < NCFG; k++) begin
      pmse = 0.0; omse = 0.0; pme = 0.0; ome = 0.0;
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) begin
        m = real'(esq[set][k][i][j]) / real'(NBLK);
        if (m > pmse) pmse = m;
        omse += m / 64.0;
        m = real'(esum[set][k][i][j]) / real'(NBLK);
        if (m < 0.0) m = -m;
        if (m > pme) pme = m;
        ome += real'(esum[set][k][i][j]) / real'(NBLK) / 64.0;
      end
      $display("set %0d (L=%0d H=%0d sign=%0d) %s: peak %0d  pixel MSE %.4f  overall MSE %.4f  pixel ME %.4f  overall ME %.5f",
               set, Ls[set], Hs[set], Ss[set], cfg_name(k), epk[set][k], pmse, omse, pme, ome);
      if (epk[set][k] > w_pk[k]) w_pk[k] = epk[set][k];
      if (pmse > w_pmse[k]) w_pmse[k] = pmse;
      if (omse > w_omse[k]) w_omse[k] = omse;
      if (pme > w_pme[k]) w_pme[k] = pme;
      if (ome < 0.0) ome = -ome;
      if (ome > w_ome[k]) w_ome[k] = ome;
      if (k >= 2 && k % 2 == 0) begin   // rounding, W >= 17
        checks++;
        if (epk[set][k] > 1) failures++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int set = 0; set <= NSET; set++) begin
      randx = 1;   // every set restarts the generator, as in the standard
      for (int b = 0; b < ((set < NSET) ? NBLK : 3); b++) begin
        automatic int g = set * NBLK + b;
        if (set < NSET) make_block(g % 4, Ls[set], Hs[set], Ss[set]);
        else begin
          foreach (coef[g % 4][i, j]) coef[g % 4][i][j] = 0;
          foreach (refp[g % 4][i, j]) refp[g % 4][i][j] = 0;
        end
        for (int s = 0; s < 64; s++) begin
          in_valid <= 1'b1;
          in_coef  <= 12'(coef[g % 4][ORD_IN[s/8]][ORD_IN[s%8]]);
          @(posedge clk);
        end
      end
    end
    in_valid <= 1'b0;
    @(posedge clk);
    for (int set = 0; set < NSET; set++) report(set);
    $display("worst over the six sets (limits: peak 1, pixel MSE 0.06, overall MSE 0.02, pixel ME 0.015, overall ME 0.0015):");
    for (int k = 0; k < NCFG; k++)
      $display("  %s: peak %0d  pixel MSE %.4f  overall MSE %.4f  pixel ME %.4f  overall ME %.5f  %s",
               cfg_name(k), w_pk[k], w_pmse[k], w_omse[k], w_pme[k], w_ome[k],
               meets(k) ? "meets all limits" : "outside a limit");
    // Narrowest compliant widths: W=17 round (index 2), W=22 trunc (13);
    // one bit less fails: W=16 round (0), W=21 trunc (11).
    checks += 4;
    if (!meets(2))  failures++;
    if (!meets(13)) failures++;
    if (meets(0))   failures++;
    if (meets(11))  failures++;
    for (int k = 0; k < NCFG; k++) begin
      checks++;
      if (nout[k] != nout[0] || nout[k] < NSET * NBLK * 64) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
