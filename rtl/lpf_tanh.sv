// lpf_tanh: piecewise-linear approximation of tanh for the MLP hidden nodes.
//
// Input a is signed with IN_FRAC fractional bits; output y is Q1.7. The function is
// odd; for m = |a| it uses slopes that are powers of two, so only shifts and adds:
//   m < 0.5         f = m
//   0.5 <= m < 1.25 f = m/2 + 0.25
//   1.25 <= m < 2.25 f = m/8 + 0.71875
//   m >= 2.25       f = 1 (saturated to 127/128)
// Maximum error against tanh is about 0.04. The paper uses a piecewise-linear unit
// here but does not give its segments; these are this design's. Combinational.
module lpf_tanh #(
  parameter int unsigned IN_W    = 20,
  parameter int unsigned IN_FRAC = 12
) (
  input  logic signed [IN_W-1:0] a,
  output logic signed [7:0]      y
);
  localparam logic [IN_W-1:0] HALF  = IN_W'(1) << (IN_FRAC - 1);
  localparam logic [IN_W-1:0] ONE   = IN_W'(1) << IN_FRAC;
  localparam logic [IN_W-1:0] B1    = HALF;                       // 0.5
  localparam logic [IN_W-1:0] B2    = ONE + (ONE >> 2);           // 1.25
  localparam logic [IN_W-1:0] B3    = 2 * ONE + (ONE >> 2);       // 2.25
  localparam logic [IN_W-1:0] C2    = ONE >> 2;                   // 0.25
  localparam logic [IN_W-1:0] C3    = (ONE >> 1) + (ONE >> 3) + (ONE >> 4) + (ONE >> 5); // 0.71875

  logic [IN_W-1:0] m, f, q;
  always_comb begin
    m = a[IN_W-1] ? IN_W'(-a) : IN_W'(a);
    if (m < B1)      f = m;
    else if (m < B2) f = (m >> 1) + C2;
    else if (m < B3) f = (m >> 3) + C3;
    else             f = ONE;
    q = f >> (IN_FRAC - 7);
    if (q > IN_W'(127)) q = IN_W'(127);
    y = a[IN_W-1] ? -8'(q) : 8'(q);
  end
endmodule
