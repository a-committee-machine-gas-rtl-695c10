// tb_cm_stage: the committee-machine stage against separately instantiated
// classifiers fed the same pattern and parameters. Checks that all five results
// match, that the stage reports done one cycle after the slowest classifier (KNN,
// NPAT + 5 cycles) and that the GMM and PPCA units use their own parameter sets.
module tb_cm_stage;
  import gas_pkg::*;
  localparam int NPAT = 220;
  logic clk = 0, rst_n = 0, start = 0, done;
  pc_t x [NPC];
  logic knn_ld_we = 0;
  logic [7:0] knn_ld_addr = 0;
  pc_t knn_ld_pat [NPC];
  label_t knn_ld_label = 0;
  logic signed [7:0] mlp_theta [6][NPC], mlp_theta0 [6], mlp_w [NCLASS][6], mlp_w0 [NCLASS];
  pc_t rbf_c [13][NPC];
  logic signed [3:0] rbf_sexp [13];
  logic signed [7:0] rbf_w [NCLASS][13];
  pc_t gmm_mu [NCLASS][2][NPC];
  logic signed [11:0] gmm_g [NCLASS][2][NPC][NPC];
  logic [15:0] gmm_k [NCLASS][2];
  pc_t ppca_mu [NCLASS][1][NPC];
  logic signed [11:0] ppca_g [NCLASS][1][NPC][NPC];
  logic [15:0] ppca_k [NCLASS][1];
  label_t knn_label [3], r_label [3];
  logic [19:0] knn_dist [3], r_dist [3];
  score_t mlp_y [NCLASS], rbf_y [NCLASS], gmm_p [NCLASS], ppca_p [NCLASS];
  score_t r_mlp [NCLASS], r_rbf [NCLASS], r_gmm [NCLASS], r_ppca [NCLASS];
  logic [4:0] rdone;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  cm_stage dut (.clk, .rst_n, .start, .x, .knn_ld_we, .knn_ld_addr, .knn_ld_pat, .knn_ld_label,
    .mlp_theta, .mlp_theta0, .mlp_w, .mlp_w0, .rbf_c, .rbf_sexp, .rbf_w,
    .gmm_mu, .gmm_g, .gmm_k, .ppca_mu, .ppca_g, .ppca_k,
    .knn_label, .knn_dist, .mlp_y, .rbf_y, .gmm_p, .ppca_p, .done);

  knn r_knn (.clk, .rst_n, .ld_we(knn_ld_we), .ld_addr(knn_ld_addr), .ld_pat(knn_ld_pat), .ld_label(knn_ld_label),
             .start, .x, .nn_label(r_label), .nn_dist(r_dist), .done(rdone[0]));
  mlp r_mlpu (.clk, .rst_n, .start, .x, .theta(mlp_theta), .theta0(mlp_theta0), .w(mlp_w), .w0(mlp_w0), .y(r_mlp), .done(rdone[1]));
  rbf r_rbfu (.clk, .rst_n, .start, .x, .c(rbf_c), .sexp(rbf_sexp), .w(rbf_w), .y(r_rbf), .done(rdone[2]));
  gmm #(.M(2)) r_gmmu (.clk, .rst_n, .start, .x, .mu(gmm_mu), .g(gmm_g), .kc(gmm_k), .p(r_gmm), .done(rdone[3]));
  gmm #(.M(1)) r_ppcau (.clk, .rst_n, .start, .x, .mu(ppca_mu), .g(ppca_g), .kc(ppca_k), .p(r_ppca), .done(rdone[4]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPAT; p++) begin
      for (int k = 0; k < NPC; k++) knn_ld_pat[k] = 8'($urandom);
      knn_ld_addr = 8'(p); knn_ld_label = label_t'(1 << $urandom_range(0, 4)); knn_ld_we = 1;
      @(negedge clk);
    end
    knn_ld_we = 0;
    for (int t = 0; t < 8; t++) begin
      int lat;
      for (int i = 0; i < NPC; i++) x[i] = 8'($urandom_range(0, 100)) - 8'sd50;
      for (int j = 0; j < 6; j++) begin
        mlp_theta0[j] = 8'($urandom);
        for (int i = 0; i < NPC; i++) mlp_theta[j][i] = 8'($urandom);
      end
      for (int k = 0; k < NCLASS; k++) begin
        mlp_w0[k] = 8'($urandom);
        for (int j = 0; j < 6; j++) mlp_w[k][j] = 8'($urandom);
        for (int j = 0; j < 13; j++) rbf_w[k][j] = 8'($urandom);
      end
      for (int j = 0; j < 13; j++) begin
        rbf_sexp[j] = 4'($urandom_range(0, 4)) - 4'sd2;
        for (int i = 0; i < NPC; i++) rbf_c[j][i] = x[i] + 8'($urandom_range(0, 40)) - 8'sd20;
      end
      for (int c = 0; c < NCLASS; c++) begin
        for (int m = 0; m < 2; m++) begin
          gmm_k[c][m] = 16'($urandom);
          for (int i = 0; i < NPC; i++) begin
            gmm_mu[c][m][i] = x[i] + 8'($urandom_range(0, 30)) - 8'sd15;
            for (int q = 0; q < NPC; q++) gmm_g[c][m][i][q] = 12'($urandom_range(0, 300)) - 12'sd150;
          end
        end
        ppca_k[c][0] = 16'($urandom);
        for (int i = 0; i < NPC; i++) begin
          ppca_mu[c][0][i] = x[i] + 8'($urandom_range(0, 30)) - 8'sd15;
          for (int q = 0; q < NPC; q++) ppca_g[c][0][i][q] = 12'($urandom_range(0, 300)) - 12'sd150;
        end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == NPAT + 6, $sformatf("latency %0d", lat));
      for (int n = 0; n < 3; n++) check(knn_label[n] == r_label[n] && knn_dist[n] == r_dist[n], "KNN result");
      for (int k = 0; k < NCLASS; k++) begin
        check(mlp_y[k] == r_mlp[k], $sformatf("MLP y%0d", k));
        check(rbf_y[k] == r_rbf[k], $sformatf("RBF y%0d", k));
        check(gmm_p[k] == r_gmm[k], $sformatf("GMM p%0d", k));
        check(ppca_p[k] == r_ppca[k], $sformatf("PPCA p%0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
