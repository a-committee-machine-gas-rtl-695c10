// ct_knn: confidence transform of the KNN classifier, Cf_k = (neighbours of class k)/K.
//
// Each of the K = 3 one-hot neighbour labels steers a multiplexer that adds 1/3 to the
// confidence of its class, so a class gets 0, 1/3, 2/3 or 1. Confidences are 9-bit
// unsigned with 256 = 1.0 (this design's format): 0, 85, 171, 256. The rounding of
// the thirds is chosen so that three votes give exactly 1.0. Combinational.
module ct_knn
  import gas_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  label_t labels [K],
  output conf_t  conf   [NCLASS]
);
  logic [$clog2(K+1)-1:0] votes [NCLASS];
  always_comb begin
    for (int c = 0; c < NCLASS; c++) begin
      votes[c] = '0;
      for (int n = 0; n < K; n++)
        if (labels[n][c]) votes[c] = votes[c] + 1'b1;
      // round(256 * votes / K)
      conf[c] = CONF_W'((32'(votes[c]) * 512 + K) / (2 * K));
    end
  end
endmodule
