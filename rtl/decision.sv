// decision: weighted combination of the classifier confidences and winner-takes-all.
//
// S_k = sum_i W_i * Cf_k(i) over the five classifiers (five multipliers and an adder
// tree per class); the class with the highest score wins, ties going to the lower
// class number. The weights follow the normalised weighting rule
// W_i = (P_i - P_worst) / (P_best - P_worst) applied to the classifier accuracies at
// five principal components (KNN 87.7 %, MLP 90.5 %, RBF 86.8 %, GMM 94.5 %,
// PPCA 84.1 %), in 9-bit unsigned with 256 = 1.0: 89, 158, 66, 256, 0. The worst
// classifier thus drops out of the vote. Combinational. The score width allows every
// weight and confidence at 256; with the default weights a few high score bits can never
// be set, and synthesis reports them as constant outputs.
module decision
  import gas_pkg::*;
#(
  parameter conf_t W_KNN  = 9'd89,
  parameter conf_t W_MLP  = 9'd158,
  parameter conf_t W_RBF  = 9'd66,
  parameter conf_t W_GMM  = 9'd256,
  parameter conf_t W_PPCA = 9'd0,
  localparam int unsigned SW = 2 * CONF_W + $clog2(NCLSF)
) (
  input  conf_t               conf  [NCLSF][NCLASS],
  output logic [SW-1:0]       score [NCLASS],
  output logic [$clog2(NCLASS)-1:0] class_idx,
  output label_t              class_onehot
);
  conf_t wgt [NCLSF];
  assign wgt[CL_KNN]  = W_KNN;
  assign wgt[CL_MLP]  = W_MLP;
  assign wgt[CL_RBF]  = W_RBF;
  assign wgt[CL_GMM]  = W_GMM;
  assign wgt[CL_PPCA] = W_PPCA;

  always_comb begin
    for (int c = 0; c < NCLASS; c++) begin
      score[c] = '0;
      for (int i = 0; i < NCLSF; i++) score[c] += SW'(wgt[i]) * SW'(conf[i][c]);
    end
    class_idx = '0;
    for (int c = 1; c < NCLASS; c++)
      if (score[c] > score[class_idx]) class_idx = ($clog2(NCLASS))'(c);
    class_onehot = label_t'(1) << class_idx;
  end
endmodule
