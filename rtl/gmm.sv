// gmm: Gaussian-mixture classifier; with M = 1 and its own parameters it is also the
// PPCA classifier, which evaluates the same expression.
//
// For each class k it computes p_k = sum_j K_j exp(-z_j) over its M components, with
// z_j = || (x - mu_j)^T G_j ||^2, where G_j is upper triangular, G_j^T G_j =
// Sigma_j^-1 / 2, and K_j folds the priors and the normalising constant of the
// Gaussian. The pattern sits in Reg-X (port x), the parameters in the mu/g/kc ports.
// Per component:
//   MUL  5 cycles: s_i = x_i - mu_i enters serially; a serial-parallel vector-matrix
//        multiplier adds s_i * G[i][c] into y_c for all c >= i at once
//   SQ   5 cycles: one squaring unit and an accumulator sum y_c^2 into z
//   EXP  1 cycle:  a piecewise-linear unit gives exp(-z), a multiplier by K_j and an
//        accumulator over the M components give p_k
// Formats (this design's): mu Q1.7, G 12-bit with 6 fractional bits, K 16-bit
// unsigned mantissa; p has 8 fractional bits of exp times K. Only ratios of the p_k
// matter to the confidence transform, so a common scale of all K_j cancels.
// Timing: start pulse, NCLASS * M * 11 cycles, done pulses with p valid.
module gmm
  import gas_pkg::*;
#(
  parameter int unsigned M  = 2,
  parameter int unsigned GW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  pc_t                  x  [NPC],
  input  pc_t                  mu [NCLASS][M][NPC],
  input  logic signed [GW-1:0] g  [NCLASS][M][NPC][NPC],
  input  logic [15:0]          kc [NCLASS][M],
  output score_t               p  [NCLASS],
  output logic                 done
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_SQ, S_EXP} state_e;
  localparam int unsigned PW  = X_W + GW + 1;             // one product
  localparam int unsigned YW  = PW + $clog2(NPC);         // y_c, 13 fractional bits
  localparam int unsigned ZW  = 36;                       // z, 16 fractional bits
  localparam int unsigned KW  = $clog2(NCLASS);
  localparam int unsigned MW  = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned IW  = $clog2(NPC);

  state_e              st;
  logic [KW-1:0]       k;
  logic [MW-1:0]       j;
  logic [IW-1:0]       i;
  logic signed [YW-1:0] yv [NPC];
  logic [ZW-1:0]       z;
  score_t              pacc;
  logic signed [X_W:0] s;
  logic signed [YW-1:0] yt;
  logic signed [15:0]  ys;
  logic [15:0]         u;
  logic [7:0]          e;
  score_t              term;

  always_comb begin
    s  = (X_W+1)'(x[i]) - (X_W+1)'(mu[k][j][i]);
    yt = yv[i] >>> 5;                                  // 8 fractional bits
    if (yt > YW'(32767))       ys = 16'sd32767;
    else if (yt < -YW'(32767)) ys = -16'sd32767;
    else                       ys = 16'(yt);
    u    = (z[ZW-1:4] > (ZW-4)'(16'hFFFF)) ? 16'hFFFF : 16'(z >> 4);   // 12 fractional bits
    term = SCORE_W'(kc[k][j]) * SCORE_W'(e);
  end

  lpf_exp #(.IN_W(16), .IN_FRAC(12)) u_exp (.u, .y(e));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; k <= '0; j <= '0; i <= '0; z <= '0; pacc <= '0; done <= 1'b0;
      for (int c = 0; c < NPC; c++) yv[c] <= '0;
      for (int c = 0; c < NCLASS; c++) p[c] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_MUL; k <= '0; j <= '0; i <= '0; pacc <= '0; z <= '0;
          for (int c = 0; c < NPC; c++) yv[c] <= '0;
        end
        S_MUL: begin
          for (int c = 0; c < NPC; c++)
            if (IW'(c) >= i) yv[c] <= yv[c] + YW'(s * g[k][j][i][c]);
          if (i == IW'(NPC - 1)) begin i <= '0; st <= S_SQ; end
          else i <= i + 1'b1;
        end
        S_SQ: begin
          z <= z + ZW'($unsigned(32'(ys * ys)));
          if (i == IW'(NPC - 1)) begin i <= '0; st <= S_EXP; end
          else i <= i + 1'b1;
        end
        S_EXP: begin
          z <= '0;
          for (int c = 0; c < NPC; c++) yv[c] <= '0;
          st <= S_MUL;
          if (j == MW'(M - 1)) begin
            p[k] <= pacc + term;
            pacc <= '0;
            j    <= '0;
            if (k == KW'(NCLASS - 1)) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else k <= k + 1'b1;
          end else begin
            pacc <= pacc + term;
            j    <= j + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
