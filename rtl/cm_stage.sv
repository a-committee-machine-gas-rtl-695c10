// cm_stage: the committee-machine configuration.
//
// The five classifiers (KNN, MLP, RBF, GMM and PPCA) are independent units that start
// together on the stored 5-component gas pattern and run in parallel. Each finishes in
// its own time (MLP 18 cycles, RBF 70, GMM 110, PPCA 55, KNN NPAT + 5); done pulses
// once all five have finished, and every result is held until the next start. PPCA is
// the GMM unit with one component per class and its own parameters.
module cm_stage
  import gas_pkg::*;
#(
  parameter int unsigned NPAT   = 220,
  parameter int unsigned GMM_M  = 2,
  localparam int unsigned PAW   = $clog2(NPAT),
  localparam int unsigned KDW   = 2 * X_W + 1 + $clog2(NPC)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  pc_t                 x [NPC],
  // KNN training-set load port
  input  logic                knn_ld_we,
  input  logic [PAW-1:0]      knn_ld_addr,
  input  pc_t                 knn_ld_pat [NPC],
  input  label_t              knn_ld_label,
  // MLP weights (Q3.5)
  input  logic signed [7:0]   mlp_theta  [6][NPC],
  input  logic signed [7:0]   mlp_theta0 [6],
  input  logic signed [7:0]   mlp_w      [NCLASS][6],
  input  logic signed [7:0]   mlp_w0     [NCLASS],
  // RBF parameters
  input  pc_t                 rbf_c    [13][NPC],
  input  logic signed [3:0]   rbf_sexp [13],
  input  logic signed [7:0]   rbf_w    [NCLASS][13],
  // GMM parameters
  input  pc_t                 gmm_mu [NCLASS][GMM_M][NPC],
  input  logic signed [11:0]  gmm_g  [NCLASS][GMM_M][NPC][NPC],
  input  logic [15:0]         gmm_k  [NCLASS][GMM_M],
  // PPCA parameters
  input  pc_t                 ppca_mu [NCLASS][1][NPC],
  input  logic signed [11:0]  ppca_g  [NCLASS][1][NPC][NPC],
  input  logic [15:0]         ppca_k  [NCLASS][1],
  // results
  output label_t              knn_label [3],
  output logic [KDW-1:0]      knn_dist  [3],
  output score_t              mlp_y  [NCLASS],
  output score_t              rbf_y  [NCLASS],
  output score_t              gmm_p  [NCLASS],
  output score_t              ppca_p [NCLASS],
  output logic                done
);
  logic [NCLSF-1:0] dn, fin;

  knn #(.NPAT(NPAT), .K(3)) u_knn (
    .clk, .rst_n, .ld_we(knn_ld_we), .ld_addr(knn_ld_addr), .ld_pat(knn_ld_pat),
    .ld_label(knn_ld_label), .start, .x, .nn_label(knn_label), .nn_dist(knn_dist),
    .done(dn[CL_KNN])
  );
  mlp #(.NHID(6)) u_mlp (
    .clk, .rst_n, .start, .x, .theta(mlp_theta), .theta0(mlp_theta0), .w(mlp_w),
    .w0(mlp_w0), .y(mlp_y), .done(dn[CL_MLP])
  );
  rbf #(.NHID(13)) u_rbf (
    .clk, .rst_n, .start, .x, .c(rbf_c), .sexp(rbf_sexp), .w(rbf_w), .y(rbf_y),
    .done(dn[CL_RBF])
  );
  gmm #(.M(GMM_M)) u_gmm (
    .clk, .rst_n, .start, .x, .mu(gmm_mu), .g(gmm_g), .kc(gmm_k), .p(gmm_p),
    .done(dn[CL_GMM])
  );
  gmm #(.M(1)) u_ppca (
    .clk, .rst_n, .start, .x, .mu(ppca_mu), .g(ppca_g), .kc(ppca_k), .p(ppca_p),
    .done(dn[CL_PPCA])
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fin <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) fin <= '0;
      else if (&(fin | dn)) begin
        fin  <= '0;
        done <= 1'b1;
      end else fin <= fin | dn;
    end
  end
endmodule
