// idct_2d - pipelined 8x8 two-dimensional IDCT (row-column decomposition).
//
// One DCT coefficient enters per accepted cycle (in_valid) and one pixel
// leaves per advance once the pipeline is full. Datapath:
//
//   input scaling -> idct_1d (rows) -> idct_transpose -> idct_1d (columns)
//   -> round to integer and clip
//
// Every register advances only on cycles with in_valid high, so the
// pipeline stalls while no input is offered; to drain it keep feeding (for
// example the next block). Latency: a coefficient accepted on an advance
// contributes to the pixel that appears 83 advances later (17 + 49 + 17);
// the output pixel logic is combinational after the last register.
//
// Ordering. in_pos is the slot (0..63) the next accepted coefficient takes.
// Slot 8r+p must carry coefficient F[u][v] with u = ORD_IN[r], v = ORD_IN[p]
// (ORD_IN = 5,3,7,1,6,2,4,0; u vertical, v horizontal frequency). Pixels
// leave column-major; out_row/out_col give the position of each pixel.
//
// Number format. The 12-bit coefficient is sign-extended and shifted left by
// W-15 bits. Each multiplier column scales the signal by a gain (idct_pkg)
// so that every segment between multipliers peaks at about 80% of the W-bit
// range on the IEEE 1180 test data; the overall gain is 2^(W-10), so the
// result has W-10 fraction bits. It is rounded to the nearest integer with
// ties to even and clipped to the 9-bit pixel range. Internal sums wrap in
// W bits. The internal word width W and the product quantization QMODE are
// parameters: 17 bits with rounding (default) and 22 bits with truncation
// are the two settings that meet IEEE 1180 with the fewest bits. Adjusting
// the levels at the multipliers follows the original architecture; the
// gain values, the output rounding and the stream interface are this
// design's own choices.
module idct_2d
  import idct_pkg::*;
#(
  parameter int unsigned W     = 17,
  parameter qmode_e      QMODE = Q_ROUND,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_coef,
  output logic [5:0]              in_pos,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_pix,
  output logic [2:0]              out_row,
  output logic [2:0]              out_col
);

  localparam int unsigned SIN = W - 15;          // input fraction bits
  localparam int unsigned FB  = W - OUT_SHIFT_OFS; // output fraction bits
  localparam longint      PMAX = (longint'(1) <<< (OUT_W - 1)) - 1;
  localparam longint      PMIN = -(longint'(1) <<< (OUT_W - 1));

  // Stream position and pipeline fill state.
  logic [5:0] pos;
  logic [6:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        pos <= pos + 6'd1;
        if (fill != 7'(LAT_2D)) fill <= fill + 7'd1;
        out_valid <= (fill >= 7'(LAT_2D - 1));
      end
    end
  end

  assign in_pos = pos;

  // Datapath.
  logic signed [W-1:0] x_in, y_row, y_tr, z_col;

  assign x_in = W'(in_coef) <<< SIN;

  idct_1d #(.W(W), .QMODE(QMODE)) u_row (
    .clk, .rst_n, .en (in_valid), .pos_i (pos[2:0]), .d_i (x_in), .d_o (y_row)
  );

  idct_transpose #(.W(W)) u_trans (
    .clk, .rst_n, .en (in_valid), .pos_i (pos - 6'(LAT_1D)), .d_i (y_row), .d_o (y_tr)
  );

  logic [5:0] pos_col;
  assign pos_col = pos - 6'(LAT_1D + LAT_TRANS);

  idct_1d #(.W(W), .QMODE(QMODE), .G0(G_COL0), .G1(G_COL1), .G2(G_COL2)) u_col (
    .clk, .rst_n, .en (in_valid), .pos_i (pos_col[2:0]), .d_i (y_tr), .d_o (z_col)
  );

  // Round to nearest integer, ties to even, then clip.
  logic signed [W-1:0]    z_int;
  logic        [FB-1:0]   z_frac;
  logic                   up;
  logic signed [W:0]      z_rnd;

  always_comb begin
    z_int  = z_col >>> FB;
    z_frac = z_col[FB-1:0];
    up     = z_frac[FB-1] && ((z_frac[FB-2:0] != '0) || z_int[0]);
    z_rnd  = (W+1)'(z_int) + (W+1)'(up);
    if      (z_rnd > (W+1)'(PMAX)) out_pix = OUT_W'(PMAX);
    else if (z_rnd < (W+1)'(PMIN)) out_pix = OUT_W'(PMIN);
    else                           out_pix = z_rnd[OUT_W-1:0];
  end

  // Pixel position of the output slot (column-major, kernel output order).
  logic [5:0] pos_out;
  assign pos_out = pos - 6'(LAT_2D);

  always_comb begin
    out_row = 3'(ORD_OUT[pos_out[2:0]]);
    out_col = 3'(ORD_OUT[pos_out[5:3]]);
  end

endmodule
