// gas_ident_top: committee-machine gas identification system.
//
// Three configurations share the chip in time, sequenced by reconf_ctrl:
//   1 acquisition and preprocessing: sample the 8-sensor array through the analog
//     multiplexer and serial ADC until every sensor is steady, normalise, project onto
//     five principal components (preproc_stage)
//   2 committee machine: KNN, MLP, RBF, GMM and PPCA classify the pattern in parallel
//     (cm_stage)
//   3 confidence transform and decision: per-classifier confidences, weighted vote,
//     winner-takes-all; the class is shown on the LEDs (ct_decision_stage)
// Between stages the FPGA asks the configuration CPLD for the next bit file through
// cfg_req/cfg_addr and waits for cfg_done. On the board the pattern and the classifier
// results are parked in external SRAM across a reconfiguration; here every stage
// exists at once and its output registers hold those values. All trained parameters
// (PCA matrix, KNN training set, network weights, mixture parameters) are inputs.
// One clock drives everything; result_valid pulses when a new class is on led. The
// status outputs show the sequencer busy flag, the per-sensor steady flags, the number
// of scans of the current measurement, the three nearest distances and the class scores.
module gas_ident_top
  import gas_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 20_000_000,
  parameter int unsigned THRESH        = 4,
  parameter int unsigned NPAT          = 220,
  parameter int unsigned GMM_M         = 2,
  localparam int unsigned PAW          = $clog2(NPAT)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  // sensor interface board
  output logic                mux_en,
  output logic [2:0]          mux_addr,
  output logic                adc_cs_n,
  output logic                adc_sclk_en,
  input  logic                adc_sdata,
  // configuration CPLD
  output logic                cfg_req,
  output logic [7:0]          cfg_addr,
  input  logic                cfg_done,
  // trained parameters
  input  logic signed [7:0]   pca_t [NSENS][NPC],
  input  logic                knn_ld_we,
  input  logic [PAW-1:0]      knn_ld_addr,
  input  pc_t                 knn_ld_pat [NPC],
  input  label_t              knn_ld_label,
  input  logic signed [7:0]   mlp_theta  [6][NPC],
  input  logic signed [7:0]   mlp_theta0 [6],
  input  logic signed [7:0]   mlp_w      [NCLASS][6],
  input  logic signed [7:0]   mlp_w0     [NCLASS],
  input  pc_t                 rbf_c    [13][NPC],
  input  logic signed [3:0]   rbf_sexp [13],
  input  logic signed [7:0]   rbf_w    [NCLASS][13],
  input  pc_t                 gmm_mu [NCLASS][GMM_M][NPC],
  input  logic signed [11:0]  gmm_g  [NCLASS][GMM_M][NPC][NPC],
  input  logic [15:0]         gmm_k  [NCLASS][GMM_M],
  input  pc_t                 ppca_mu [NCLASS][1][NPC],
  input  logic signed [11:0]  ppca_g  [NCLASS][1][NPC][NPC],
  input  logic [15:0]         ppca_k  [NCLASS][1],
  // results and status
  output stage_e              stage,
  output pc_t                 pattern [NPC],
  output label_t              knn_label [3],
  output score_t              mlp_y  [NCLASS],
  output score_t              rbf_y  [NCLASS],
  output score_t              gmm_p  [NCLASS],
  output score_t              ppca_p [NCLASS],
  output conf_t               conf   [NCLSF][NCLASS],
  output logic [$clog2(NCLASS)-1:0] class_idx,
  output label_t              led,
  output logic                result_valid,
  output logic                busy,
  output logic [NSENS-1:0]    steady,
  output logic [31:0]         scans,
  output logic [2*X_W+1+$clog2(NPC)-1:0] knn_dist [3],
  output logic [2*CONF_W+2:0] score [NCLASS]
);
  logic [2:0] stage_start, stage_done;

  reconf_ctrl u_seq (
    .clk, .rst_n, .run, .stage_done, .stage_start, .cfg_req, .cfg_addr, .cfg_done,
    .stage, .busy
  );

  preproc_stage #(.SAMPLE_PERIOD(SAMPLE_PERIOD), .THRESH(THRESH)) u_stage1 (
    .clk, .rst_n, .start(stage_start[0]), .mux_en, .mux_addr, .adc_cs_n, .adc_sclk_en,
    .adc_sdata, .t(pca_t), .pattern, .done(stage_done[0]), .steady, .scans
  );

  cm_stage #(.NPAT(NPAT), .GMM_M(GMM_M)) u_stage2 (
    .clk, .rst_n, .start(stage_start[1]), .x(pattern),
    .knn_ld_we, .knn_ld_addr, .knn_ld_pat, .knn_ld_label,
    .mlp_theta, .mlp_theta0, .mlp_w, .mlp_w0, .rbf_c, .rbf_sexp, .rbf_w,
    .gmm_mu, .gmm_g, .gmm_k, .ppca_mu, .ppca_g, .ppca_k,
    .knn_label, .knn_dist, .mlp_y, .rbf_y, .gmm_p, .ppca_p, .done(stage_done[1])
  );

  ct_decision_stage u_stage3 (
    .clk, .rst_n, .start(stage_start[2]), .knn_label, .mlp_y, .rbf_y, .gmm_p, .ppca_p,
    .class_idx, .class_onehot(led), .score, .conf, .done(stage_done[2])
  );

  assign result_valid = stage_done[2];
endmodule
