// ct_decision_stage: the confidence-transform and decision configuration.
//
// Five CT units work in parallel on the stored classifier results: the KNN unit turns
// neighbour labels into vote fractions, four normalising units turn the MLP, RBF, GMM
// and PPCA outputs into fractions of their sum. The weighted combination and the
// winner-takes-all then pick the gas class, which is registered with its scores; the
// one-hot class drives the LEDs. Timing: start pulse, the normalising units take
// 5 * 41 cycles, then done pulses one cycle later with the class valid.
module ct_decision_stage
  import gas_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  label_t                     knn_label [3],
  input  score_t                     mlp_y  [NCLASS],
  input  score_t                     rbf_y  [NCLASS],
  input  score_t                     gmm_p  [NCLASS],
  input  score_t                     ppca_p [NCLASS],
  output logic [$clog2(NCLASS)-1:0]  class_idx,
  output label_t                     class_onehot,
  output logic [2*CONF_W+2:0]        score [NCLASS],
  output conf_t                      conf  [NCLSF][NCLASS],
  output logic                       done
);
  localparam int unsigned SW = 2 * CONF_W + $clog2(NCLSF);
  logic [3:0]                  dn;
  logic [SW-1:0]               sc [NCLASS];
  logic [$clog2(NCLASS)-1:0]   idx;
  label_t                      oh;

  ct_knn #(.K(3)) u_ct_knn (.labels(knn_label), .conf(conf[CL_KNN]));
  ct_norm u_ct_mlp  (.clk, .rst_n, .start, .y(mlp_y),  .conf(conf[CL_MLP]),  .done(dn[0]));
  ct_norm u_ct_rbf  (.clk, .rst_n, .start, .y(rbf_y),  .conf(conf[CL_RBF]),  .done(dn[1]));
  ct_norm u_ct_gmm  (.clk, .rst_n, .start, .y(gmm_p),  .conf(conf[CL_GMM]),  .done(dn[2]));
  ct_norm u_ct_ppca (.clk, .rst_n, .start, .y(ppca_p), .conf(conf[CL_PPCA]), .done(dn[3]));

  decision u_dec (.conf, .score(sc), .class_idx(idx), .class_onehot(oh));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      class_idx <= '0; class_onehot <= '0; done <= 1'b0;
      for (int c = 0; c < NCLASS; c++) score[c] <= '0;
    end else begin
      done <= dn[0];
      if (dn[0]) begin
        class_idx    <= idx;
        class_onehot <= oh;
        for (int c = 0; c < NCLASS; c++) score[c] <= sc[c];
      end
    end
  end
endmodule
