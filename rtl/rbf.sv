// rbf: radial-basis-function network with NHID = 13 Gaussian hidden nodes.
//
//   phi_j = exp(-||x - c_j||^2 / sigma_j^2),   y_k = sum_j w[k][j] phi_j
// The components of x enter one per cycle: one subtractor, one squaring unit and one
// accumulator build ||x - c_j||^2 in NPC = 5 cycles. sigma_j^2 is a power of two,
// 2^sexp[j] (sexp signed), so the division is a shift. A piecewise-linear exp unit
// then gives phi_j, and during the next five cycles phi_j is multiplied by w[0][j] ..
// w[4][j] one per cycle into five output accumulators, while the distance to centre
// j+1 is being accumulated. Centres are Q1.7, weights 8-bit Q3.5, phi has 8
// fractional bits, so y has 13 fractional bits (formats are this design's choice).
// Timing: start pulse, then (NHID + 1) * NPC = 70 cycles; done pulses with y valid.
module rbf
  import gas_pkg::*;
#(
  parameter int unsigned NHID = 13,
  parameter int unsigned CW   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  pc_t                  x    [NPC],
  input  pc_t                  c    [NHID][NPC],
  input  logic signed [3:0]    sexp [NHID],
  input  logic signed [CW-1:0] w    [NCLASS][NHID],
  output score_t               y    [NCLASS],
  output logic                 done
);
  localparam int unsigned SQW = 2 * X_W + 1;
  localparam int unsigned DW  = SQW + $clog2(NPC);
  localparam int unsigned UW  = DW + 8;
  localparam int unsigned JW  = $clog2(NHID + 1);
  localparam int unsigned TW  = $clog2(NPC);

  logic              run;
  logic [JW-1:0]     j;
  logic [TW-1:0]     t;
  logic [DW-1:0]     dacc, dtot;
  logic signed [X_W:0] diff;
  logic [SQW-1:0]    sq;
  logic [UW-1:0]     uw;
  logic [15:0]       u;
  logic [7:0]        e;
  logic [7:0]        phi;
  score_t            acc [NCLASS];

  always_comb begin
    diff = (X_W+1)'(x[t]) - (X_W+1)'(c[(j < JW'(NHID)) ? j : '0][t]);
    sq   = SQW'(diff * diff);
    dtot = dacc + DW'(sq);
    // dtot has 14 fractional bits; u has 12 and is dtot / 2^sexp
    if (sexp[(j < JW'(NHID)) ? j : '0] >= 0)
      uw = (UW'(dtot) >> 2) >> sexp[(j < JW'(NHID)) ? j : '0];
    else
      uw = (UW'(dtot) >> 2) << (-sexp[(j < JW'(NHID)) ? j : '0]);
    u = (uw > UW'(16'hFFFF)) ? 16'hFFFF : 16'(uw);
  end

  lpf_exp #(.IN_W(16), .IN_FRAC(12)) u_exp (.u, .y(e));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; j <= '0; t <= '0; dacc <= '0; phi <= '0; done <= 1'b0;
      for (int k = 0; k < NCLASS; k++) begin acc[k] <= '0; y[k] <= '0; end
    end else begin
      done <= 1'b0;
      if (start) begin
        run <= 1'b1; j <= '0; t <= '0; dacc <= '0;
        for (int k = 0; k < NCLASS; k++) acc[k] <= '0;
      end else if (run) begin
        if (j < JW'(NHID)) begin
          if (t == TW'(NPC - 1)) begin
            phi  <= e;
            dacc <= '0;
          end else begin
            dacc <= dtot;
          end
        end
        if (j != '0)
          acc[t] <= acc[t] + SCORE_W'(w[t][j - 1'b1] * $signed({1'b0, phi}));
        if (t == TW'(NPC - 1)) begin
          t <= '0;
          if (j == JW'(NHID)) begin
            run  <= 1'b0;
            done <= 1'b1;
            for (int k = 0; k < NCLASS - 1; k++) y[k] <= acc[k];
            y[NCLASS-1] <= acc[NCLASS-1] + SCORE_W'(w[NCLASS-1][j - 1'b1] * $signed({1'b0, phi}));
          end else j <= j + 1'b1;
        end else t <= t + 1'b1;
      end
    end
  end
endmodule
