// mlp: two-layer multilayer perceptron with NHID = 6 tanh hidden nodes.
//
//   a_j = sum_i theta[j][i] x_i + theta0[j]      (DA1-1 .. DA1-6, 5-input DA units)
//   phi_j = tanh(a_j)                             (six piecewise-linear units)
//   y_k = sum_j w[k][j] phi_j + w0[k]             (DA2-1 .. DA2-5, 6-input DA units)
// Both vector-matrix products use distributed arithmetic, the inputs entering bit
// serially. x and phi are Q1.7; all weights and biases are 8-bit Q3.5 (this design's
// choice). y_k is signed with 12 fractional bits, sign-extended to SCORE_W.
// Timing: start pulse; 8 cycles in the first layer, the second layer starts in the
// cycle the first finishes, 8 more cycles, and done pulses one cycle later (18 cycles
// from start to done). y is held until the next start.
module mlp
  import gas_pkg::*;
#(
  parameter int unsigned NHID = 6,
  parameter int unsigned CW   = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  pc_t                 x      [NPC],
  input  logic signed [CW-1:0] theta  [NHID][NPC],
  input  logic signed [CW-1:0] theta0 [NHID],
  input  logic signed [CW-1:0] w      [NCLASS][NHID],
  input  logic signed [CW-1:0] w0     [NCLASS],
  output score_t              y      [NCLASS],
  output logic                done
);
  localparam int unsigned Y1W = CW + X_W + $clog2(NPC) + 1;
  localparam int unsigned Y2W = CW + X_W + $clog2(NHID) + 1;
  localparam int unsigned BSH = X_W - 1;   // align a Q3.5 bias with the 12-bit product fraction

  logic signed [Y1W-1:0] y1 [NHID];
  logic signed [Y1W-1:0] a  [NHID];
  logic signed [7:0]     phi [NHID];
  logic [NHID-1:0]       dn1;
  logic signed [Y2W-1:0] y2 [NCLASS];
  logic [NCLASS-1:0]     dn2;

  for (genvar j = 0; j < NHID; j++) begin : g_hid
    da_unit #(.K(NPC), .N(X_W), .CW(CW)) u_da1 (
      .clk, .rst_n, .start, .coef(theta[j]), .x(x), .y(y1[j]), .done(dn1[j])
    );
    assign a[j] = y1[j] + (Y1W'(theta0[j]) <<< BSH);
    lpf_tanh #(.IN_W(Y1W), .IN_FRAC(12)) u_tanh (.a(a[j]), .y(phi[j]));
  end

  for (genvar k = 0; k < NCLASS; k++) begin : g_out
    da_unit #(.K(NHID), .N(8), .CW(CW)) u_da2 (
      .clk, .rst_n, .start(dn1[0]), .coef(w[k]), .x(phi), .y(y2[k]), .done(dn2[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCLASS; k++) y[k] <= '0;
      done <= 1'b0;
    end else begin
      done <= dn2[0];
      if (dn2[0])
        for (int k = 0; k < NCLASS; k++)
          y[k] <= SCORE_W'(y2[k]) + (SCORE_W'(w0[k]) <<< BSH);
    end
  end
endmodule
