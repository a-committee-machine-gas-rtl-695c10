// tb_gas_ident_full: one complete identification with every parameter of the top at
// its default, including the 1 s (20 000 000-cycle) sampling period; the rest is as in
// tb_gas_ident_top, with a faster-settling sensor model so that two scans suffice.
//
// The sensor model gives each of the five gases its own eight-sensor signature (one
// strongly responding sensor per gas) and lets every sensor settle exponentially after
// the gas is applied. The trained parameters are built around the pattern each gas
// produces: a PCA matrix, a KNN training set of noisy copies labelled with the gas,
// RBF centres and GMM/PPCA means at the gas patterns, and an MLP whose outputs are
// equal for all classes. A CPLD model acknowledges each reconfiguration request after
// a delay. The test presents each gas in turn and checks the class on the LEDs, the
// stage order, the bit-file addresses and the pattern handed from stage 1 to stage 2.
// It counts the mechanisms of the design and fails if one never happens:
// reconfigurations, rescans of a sensor that is still moving, steady-state detections,
// identifications per gas.
module tb_gas_ident_full;
  import gas_pkg::*;
  localparam int unsigned PERIOD = 20_000_000;
  localparam int NGAS_RUN = 1;
  localparam int OFFSET   = 4;
  localparam int NPAT = 220;
  logic clk = 0, rst_n = 0, run = 0;
  logic mux_en, adc_cs_n, adc_sclk_en, adc_sdata, cfg_req, cfg_done = 0, result_valid;
  logic [2:0] mux_addr, class_idx;
  logic [7:0] cfg_addr;
  logic busy;
  logic [NSENS-1:0] steady;
  logic [31:0] scans;
  logic [2*X_W+1+$clog2(NPC)-1:0] knn_dist [3];
  logic [2*CONF_W+2:0] score [NCLASS];
  logic signed [7:0] pca_t [NSENS][NPC];
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
  stage_e stage;
  pc_t pattern [NPC];
  label_t knn_label [3], led;
  score_t mlp_y [NCLASS], rbf_y [NCLASS], gmm_p [NCLASS], ppca_p [NCLASS];
  conf_t conf [NCLSF][NCLASS];
  logic [11:0] chan [8];

  int checks = 0, failures = 0;
  int level [NCLASS][8];
  int proto [NCLASS][NPC];
  int gas = 0, scan_no = 0, n_id = 0;
  int n_reconf = 0, n_rescan = 0, n_steady_det = 0, n_correct [NCLASS];
  logic mux_en_d = 0;
  logic [7:0] steady_d = 0;
  int expect_stage = 0;
  int scans_prev = 0;

  always #5 clk = ~clk;

  gas_ident_top dut (
    .clk, .rst_n, .run, .mux_en, .mux_addr, .adc_cs_n, .adc_sclk_en, .adc_sdata,
    .cfg_req, .cfg_addr, .cfg_done, .pca_t, .knn_ld_we, .knn_ld_addr, .knn_ld_pat, .knn_ld_label,
    .mlp_theta, .mlp_theta0, .mlp_w, .mlp_w0, .rbf_c, .rbf_sexp, .rbf_w,
    .gmm_mu, .gmm_g, .gmm_k, .ppca_mu, .ppca_g, .ppca_k,
    .stage, .pattern, .knn_label, .mlp_y, .rbf_y, .gmm_p, .ppca_p, .conf, .class_idx, .led, .result_valid,
    .busy, .steady, .scans, .knn_dist, .score);
  adc_model u_adc (.clk, .mux_en, .mux_addr, .cs_n(adc_cs_n), .sclk_en(adc_sclk_en), .chan, .sdata(adc_sdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // sensor response: settles towards the gas signature scan by scan
  always @(posedge clk) begin
    mux_en_d <= mux_en;
    if (rst_n && mux_en && !mux_en_d && mux_addr == 0) begin
      for (int i = 0; i < 8; i++) chan[i] = 12'(level[gas][i] + ((OFFSET + (i % 2)) >> scan_no));
      scan_no++;
    end
  end

  // steady-state detections and rescans seen from the detector flags
  always @(posedge clk) if (rst_n) begin
    steady_d <= steady;
    for (int i = 0; i < 8; i++) if (steady[i] && !steady_d[i]) n_steady_det++;
  end

  // configuration CPLD model
  always @(posedge clk) if (rst_n && cfg_req && !cfg_done) begin
    automatic int nxt = (expect_stage + 1) % 3;
    check(cfg_addr == 8'(nxt), $sformatf("bit file address %0d", cfg_addr));
    n_reconf++;
    repeat (25) @(posedge clk);
    @(negedge clk); cfg_done = 1; expect_stage = nxt;
    @(negedge clk); cfg_done = 0;
  end

  always @(posedge clk) if (rst_n && dut.stage_start != 0)
    check(dut.stage_start == 3'(1 << expect_stage) && stage == stage_e'(expect_stage), "stage order");

  initial begin
    // gas signatures and the patterns they produce through normalisation and PCA
    for (int c = 0; c < NCLASS; c++) begin
      automatic int sum = 0;
      int rn [8];
      for (int i = 0; i < 8; i++) begin level[c][i] = (i == c) ? 2400 : (i == c + 3) ? 1200 : 400; sum += level[c][i]; end
      for (int i = 0; i < 8; i++) rn[i] = level[c][i] * 128 / sum;
      for (int p = 0; p < NPC; p++) begin
        automatic int s = 0;
        for (int i = 0; i < 8; i++) begin
          pca_t[i][p] = (i == p) ? 8'sd127 : (i == p + 3) ? -8'sd32 : 8'sd0;
          s += rn[i] * pca_t[i][p];
        end
        proto[c][p] = s >>> 7;
      end
    end
    // classifier parameters
    for (int j = 0; j < 6; j++) begin
      mlp_theta0[j] = 8'sd16;
      for (int i = 0; i < NPC; i++) mlp_theta[j][i] = 8'($urandom_range(0, 16)) - 8'sd8;
    end
    for (int k = 0; k < NCLASS; k++) begin
      mlp_w0[k] = 8'sd32;
      for (int j = 0; j < 6; j++) mlp_w[k][j] = 8'sd0;
      for (int j = 0; j < 13; j++) rbf_w[k][j] = (j % 5 == k) ? 8'sd64 : 8'sd0;
    end
    for (int j = 0; j < 13; j++) begin
      rbf_sexp[j] = -4'sd2;
      for (int p = 0; p < NPC; p++) rbf_c[j][p] = 8'(proto[j % 5][p] + (j / 5));
    end
    for (int c = 0; c < NCLASS; c++) begin
      for (int m = 0; m < 2; m++) begin
        gmm_k[c][m] = 16'd1000;
        for (int p = 0; p < NPC; p++) begin
          gmm_mu[c][m][p] = 8'(proto[c][p] + m);
          for (int q = 0; q < NPC; q++) gmm_g[c][m][p][q] = (p == q) ? 12'sd512 : 12'sd0;
        end
      end
      ppca_k[c][0] = 16'd500;
      for (int p = 0; p < NPC; p++) begin
        ppca_mu[c][0][p] = 8'(proto[c][p]);
        for (int q = 0; q < NPC; q++) ppca_g[c][0][p][q] = (p == q) ? 12'sd256 : 12'sd0;
      end
    end
    for (int c = 0; c < NCLASS; c++) n_correct[c] = 0;
    for (int i = 0; i < 8; i++) chan[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // load the KNN training set: 44 noisy copies of each gas pattern
    for (int n = 0; n < NPAT; n++) begin
      automatic int c = n % NCLASS;
      for (int p = 0; p < NPC; p++) knn_ld_pat[p] = 8'(proto[c][p] + $urandom_range(0, 6) - 3);
      knn_ld_addr = 8'(n); knn_ld_label = label_t'(1 << c); knn_ld_we = 1;
      @(negedge clk);
    end
    knn_ld_we = 0;
    run = 1;
    for (int g = 0; g < NGAS_RUN; g++) begin
      gas = g; scan_no = 0;
      @(posedge result_valid); @(negedge clk);
      n_id++;
      // scans beyond the first were caused by sensors that had not settled
      n_rescan += int'(scans) - scans_prev - 1;
      scans_prev = int'(scans);
      for (int p = 0; p < NPC; p++) check(int'(pattern[p]) == proto[g][p], $sformatf("gas %0d pattern %0d: %0d vs %0d", g, p, pattern[p], proto[g][p]));
      check(knn_label[0] == label_t'(1 << g), "KNN nearest neighbour");
      check(class_idx == 3'(g), $sformatf("gas %0d identified as %0d", g, class_idx));
      check(led == label_t'(1 << g), "LED");
      check(busy, "sequencer busy while run is high");
      check(steady == '1, "all sensors flagged steady");
      check(knn_dist[0] <= knn_dist[1] && knn_dist[1] <= knn_dist[2], "neighbour distances ordered");
      for (int c = 0; c < NCLASS; c++)
        if (c != g) check(score[g] > score[c], $sformatf("score of class %0d above class %0d", g, c));
      if (class_idx == 3'(g)) n_correct[g]++;
      wait (stage == ST_ACQ);
      if (g == NGAS_RUN - 1) run = 0;
    end
    repeat (200) @(negedge clk);
    $display("identifications %0d, reconfigurations %0d, rescans %0d, steady detections %0d",
             n_id, n_reconf, n_rescan, n_steady_det);
    check(n_reconf == 3 * NGAS_RUN, "three reconfigurations per identification");
    check(n_rescan > 0, "a moving sensor caused a rescan");
    check(n_steady_det == 8 * NGAS_RUN, "every sensor reached steady state");
    for (int c = 0; c < NGAS_RUN; c++) check(n_correct[c] == 1, $sformatf("gas %0d identified", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NGAS_RUN * (PERIOD * 14 + 3000) + NPAT + 1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
