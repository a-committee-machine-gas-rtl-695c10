// lpf_exp: piecewise-linear approximation of exp(-u) for u >= 0, used by the RBF and
// GMM/PPCA classifiers.
//
// u is unsigned with IN_FRAC = 12 fractional bits; y = 256*exp(-u) saturated to 255.
// The curve is interpolated linearly between eleven points,
//   u  0    0.25 0.5  0.75 1    1.5  2    2.5  3    4    5    6
//   y  256  199  155  121  94   57   35   21   13   5    2    0
// and is 0 beyond u = 6. Every segment length is a power of two (0.25, 0.5 or 1), so a
// segment costs a subtraction, a small constant multiply and a shift. The paper
// approximates the exponential with a piecewise-linear unit but does not give the
// points; these are this design's. Maximum error is about 4/256. Combinational.
module lpf_exp #(
  parameter int unsigned IN_W    = 16,
  parameter int unsigned IN_FRAC = 12
) (
  input  logic [IN_W-1:0] u,
  output logic [7:0]      y
);
  localparam int unsigned NSEG = 11;
  // segment start (in quarters of 1.0), start value, drop, log2(length in quarters)
  localparam int unsigned SEG_Q  [NSEG] = '{0, 1, 2, 3, 4, 6, 8, 10, 12, 16, 20};
  localparam int unsigned SEG_Y  [NSEG] = '{256, 199, 155, 121, 94, 57, 35, 21, 13, 5, 2};
  localparam int unsigned SEG_DY [NSEG] = '{57, 44, 34, 27, 37, 22, 14, 8, 8, 3, 2};
  localparam int unsigned SEG_L  [NSEG] = '{0, 0, 0, 0, 1, 1, 1, 1, 2, 2, 2};
  localparam int unsigned QS = IN_FRAC - 2;     // bits below a quarter
  localparam int unsigned VW = IN_W + 10;

  logic [VW-1:0] dz, v;
  logic [8:0]    y0, dy;
  logic [5:0]    sh;
  always_comb begin
    dz = '0; y0 = '0; dy = '0; sh = 6'(QS);
    for (int s = 0; s < NSEG; s++) begin
      if (VW'(u) >= (VW'(SEG_Q[s]) << QS)) begin
        dz = VW'(u) - (VW'(SEG_Q[s]) << QS);
        y0 = 9'(SEG_Y[s]);
        dy = 9'(SEG_DY[s]);
        sh = 6'(QS + SEG_L[s]);
      end
    end
    if (VW'(u) >= (VW'(24) << QS)) begin
      y0 = '0; dy = '0; dz = '0;
    end
    v = ((VW'(y0) << sh) - dz * VW'(dy)) >> sh;
    y = (v > VW'(255)) ? 8'd255 : 8'(v);
  end
endmodule
