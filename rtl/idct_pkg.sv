// idct_pkg - shared constants, types and coefficient generation of the
// sequential 8x8 IDCT.
//
// The cosine coefficients d1..d7 are produced by the recursion
//   d1 = sqrt(1/2), d(2i) = sqrt((1 + d(i)) / 2), d(2i+1) = sqrt((1 - d(i)) / 2)
// (d2 = cos(pi/8), d3 = cos(3pi/8), d4 = cos(pi/16), d5 = cos(7pi/16),
//  d6 = cos(3pi/16), d7 = cos(5pi/16)) and rounded to the internal word
// width with W-2 fraction bits, so that 2*d1 = 1.414 still fits.
// coef_real() gives the multiplier coefficient of every stream slot of the
// three multiplier columns of the kernel's signal-flow graph; a slot without
// a drawn multiplier gets exactly 1.0, so all samples pass the multipliers.
//
// Signal scaling. Each multiplier column also multiplies by a gain, so that
// every segment between two multiplier columns uses about 80% of the word's
// range on the IEEE 1180 test data (the largest of them is the second
// butterfly stage of each kernel). The last gain makes the overall gain,
// 4 * 2^(W-15) * G_ROW0*G_ROW1*G_ROW2*G_COL0*G_COL1*G_COL2, a power of two
// (2^(W-10)) so that the output conversion is a plain shift. A gain also
// applies to slots whose graph coefficient is 1.
//
// Stream orders of the 8-point kernel: slot p of an input vector carries
// frequency index ORD_IN[p], slot p of an output vector carries spatial index
// ORD_OUT[p].
package idct_pkg;

  // Quantization of the multiplier products.
  typedef enum logic {
    Q_ROUND = 1'b0,   // round to nearest (add half an LSB, then shift)
    Q_TRUNC = 1'b1    // two's complement truncation (towards minus infinity)
  } qmode_e;

  localparam int unsigned ORD_IN  [8] = '{5, 3, 7, 1, 6, 2, 4, 0};
  localparam int unsigned ORD_OUT [8] = '{5, 2, 6, 1, 4, 3, 7, 0};

  // Latencies in pipeline advances.
  localparam int unsigned LAT_1D    = 17;
  localparam int unsigned LAT_TRANS = 49;
  localparam int unsigned LAT_2D    = 2 * LAT_1D + LAT_TRANS;  // 83

  // Multiplier column gains of the row and the column kernel.
  localparam real G_ROW0 = 5.2252;
  localparam real G_ROW1 = 0.5209;
  localparam real G_ROW2 = 2.6821;
  localparam real G_COL0 = 0.5069;
  localparam real G_COL1 = 0.5808;
  localparam real G_COL2 = 8.0 / (G_ROW0 * G_ROW1 * G_ROW2 * G_COL0 * G_COL1);
  localparam int unsigned OUT_SHIFT_OFS = 10;  // output fraction bits = W - 10

  // d(i) for i = 1..7 from the recursion above.
  function automatic real d_coef(input int unsigned i);
    real p;
    if (i <= 1) return $sqrt(0.5);
    p = d_coef(i / 2);
    if (i % 2 == 0) return $sqrt((1.0 + p) / 2.0);
    else            return $sqrt((1.0 - p) / 2.0);
  endfunction

  // Real-valued coefficient of multiplier column `stage` (0..2) at slot `slot`.
  function automatic real coef_real(input int unsigned stage, input int unsigned slot);
    case (stage)
      0: case (slot)
           0, 2, 4: return 2.0 * d_coef(1);
           6, 7:    return d_coef(1);
           default: return 1.0;
         endcase
      1: case (slot)
           0:       return 2.0 * d_coef(3);
           2:       return 2.0 * d_coef(2);
           4:       return d_coef(3);
           6:       return d_coef(2);
           default: return 1.0;
         endcase
      default: case (slot)
           0:       return d_coef(7);
           2:       return d_coef(6);
           4:       return d_coef(5);
           6:       return d_coef(4);
           default: return 1.0;
         endcase
    endcase
  endfunction

  // Integer bits (above the sign) a column's scaled coefficients need.
  function automatic int unsigned coef_ibits(input int unsigned stage, input real gain);
    real mx;
    int unsigned ib;
    mx = 0.0;
    for (int unsigned p = 0; p < 8; p++)
      if (coef_real(stage, p) * gain > mx) mx = coef_real(stage, p) * gain;
    ib = 0;
    while ((2.0 ** ib) <= mx) ib++;
    return ib;
  endfunction

  // Scaled coefficient rounded to an integer with `frac` fraction bits
  // (all coefficients and gains are positive).
  function automatic longint coef_int(input int unsigned stage, input int unsigned slot,
                                      input real gain, input int unsigned frac);
    return longint'($floor(coef_real(stage, slot) * gain * (2.0 ** frac) + 0.5));
  endfunction

endpackage
