// tb_ct_decision_stage: random classifier outputs through the five CT units, the
// weighted vote and the winner-takes-all. The reference computes the confidences
// (votes/3 for KNN, clamped share of the sum for the others), the weighted scores and
// the winning class; latency is 5 divisions of 42 cycles plus 2.
module tb_ct_decision_stage;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  label_t knn_label [3];
  score_t mlp_y [NCLASS], rbf_y [NCLASS], gmm_p [NCLASS], ppca_p [NCLASS];
  logic [2:0] class_idx;
  label_t class_onehot;
  logic [20:0] score [NCLASS];
  conf_t conf [NCLSF][NCLASS];
  int checks = 0, failures = 0;
  int wt [5] = '{89, 158, 66, 256, 0};
  int hist [NCLASS];

  always #5 clk = ~clk;
  ct_decision_stage dut (.clk, .rst_n, .start, .knn_label, .mlp_y, .rbf_y, .gmm_p, .ppca_p,
                         .class_idx, .class_onehot, .score, .conf, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int share(input score_t v [NCLASS], input int k);
    longint s = 0;
    for (int i = 0; i < NCLASS; i++) if (v[i] > 0) s += v[i];
    if (s == 0 || v[k] <= 0) return 0;
    return int'((longint'(v[k]) * 256) / s);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int cf [NCLSF][NCLASS];
      int s [NCLASS];
      automatic int best = 0; int lat;
      int nl [3];
      for (int n = 0; n < 3; n++) begin nl[n] = $urandom_range(0, 4); knn_label[n] = label_t'(1 << nl[n]); end
      for (int k = 0; k < NCLASS; k++) begin
        mlp_y[k]  = 32'($urandom_range(0, 20000)) - 32'sd5000;
        rbf_y[k]  = 32'($urandom_range(0, 20000)) - 32'sd5000;
        gmm_p[k]  = 32'($urandom_range(0, 1 << 24));
        ppca_p[k] = 32'($urandom_range(0, 1 << 24));
      end
      for (int k = 0; k < NCLASS; k++) begin
        automatic int v = (nl[0] == k) + (nl[1] == k) + (nl[2] == k);
        cf[CL_KNN][k]  = (v == 3) ? 256 : (v * 256 + 1) / 3;
        cf[CL_MLP][k]  = share(mlp_y, k);
        cf[CL_RBF][k]  = share(rbf_y, k);
        cf[CL_GMM][k]  = share(gmm_p, k);
        cf[CL_PPCA][k] = share(ppca_p, k);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 5 * 42 + 2, $sformatf("latency %0d", lat));
      for (int k = 0; k < NCLASS; k++) begin
        s[k] = 0;
        for (int i = 0; i < NCLSF; i++) begin
          s[k] += wt[i] * cf[i][k];
          check(conf[i][k] == 9'(cf[i][k]), $sformatf("conf %0d %0d: %0d vs %0d", i, k, conf[i][k], cf[i][k]));
        end
        check(score[k] == 21'(s[k]), $sformatf("score %0d", k));
        if (s[k] > s[best]) best = k;
      end
      hist[best]++;
      check(class_idx == 3'(best), $sformatf("class %0d vs %0d", class_idx, best));
      check(class_onehot == label_t'(1 << best), "LED one-hot");
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
