// tb_decision: random confidences; scores must equal sum_i W_i Cf_k(i) with the
// weights 89, 158, 66, 256, 0 (KNN, MLP, RBF, GMM, PPCA), and the chosen class the
// first class with the highest score. Includes a case where only the zero-weight
// PPCA classifier favours a class.
module tb_decision;
  import gas_pkg::*;
  conf_t conf [NCLSF][NCLASS];
  logic [20:0] score [NCLASS];
  logic [2:0] class_idx;
  label_t class_onehot;
  int checks = 0, failures = 0;
  int wt [5] = '{89, 158, 66, 256, 0};
  decision dut (.conf, .score, .class_idx, .class_onehot);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic eval();
    int s [NCLASS];
    int best = 0;
    #1;
    for (int k = 0; k < NCLASS; k++) begin
      s[k] = 0;
      for (int i = 0; i < NCLSF; i++) s[k] += wt[i] * conf[i][k];
      check(score[k] == 21'(s[k]), $sformatf("score %0d", k));
      if (s[k] > s[best]) best = k;
    end
    check(class_idx == 3'(best), $sformatf("class %0d vs %0d", class_idx, best));
    check(class_onehot == label_t'(1 << best), "one-hot");
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < NCLSF; i++) for (int k = 0; k < NCLASS; k++)
        conf[i][k] = (t % 3 == 0) ? 9'($urandom_range(0, 3) * 85) : 9'($urandom_range(0, 256));
      eval();
    end
    for (int i = 0; i < NCLSF; i++) for (int k = 0; k < NCLASS; k++) conf[i][k] = 9'd50;
    conf[CL_PPCA][4] = 9'd256;
    eval();
    check(class_idx == 3'd0, "PPCA has no vote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
