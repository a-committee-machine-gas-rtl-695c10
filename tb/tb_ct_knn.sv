// tb_ct_knn: every combination of three neighbour classes; each class confidence must
// be (votes / 3) in units of 1/256, i.e. 0, 85, 171 or 256.
module tb_ct_knn;
  import gas_pkg::*;
  label_t labels [3];
  conf_t  conf [NCLASS];
  int checks = 0, failures = 0;
  ct_knn dut (.labels, .conf);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int tbl [4] = '{0, 85, 171, 256};
    for (int a = 0; a < 5; a++) for (int b = 0; b < 5; b++) for (int c = 0; c < 5; c++) begin
      labels[0] = label_t'(1 << a); labels[1] = label_t'(1 << b); labels[2] = label_t'(1 << c);
      #1;
      for (int k = 0; k < NCLASS; k++) begin
        automatic int v = (a == k) + (b == k) + (c == k);
        check(conf[k] == 9'(tbl[v]), $sformatf("class %0d votes %0d conf %0d", k, v, conf[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
