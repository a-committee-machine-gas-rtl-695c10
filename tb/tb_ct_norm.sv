// tb_ct_norm: random classifier outputs, some negative, some all zero; each confidence
// must be floor(256 * max(y_k,0) / sum of max(y,0)). Latency: 5 divisions of 40 + 2
// cycles plus the start cycle.
module tb_ct_norm;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  score_t y [NCLASS];
  conf_t conf [NCLASS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ct_norm dut (.clk, .rst_n, .start, .y, .conf, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic longint sum = 0;
      int lat;
      for (int k = 0; k < NCLASS; k++) begin
        case (t % 4)
          0: y[k] = 32'($urandom_range(0, 1000));
          1: y[k] = 32'($urandom);
          2: y[k] = (k == 2) ? 32'sd0 : -32'sd5;
          default: y[k] = 32'($urandom_range(0, 2000000)) - 32'sd500000;
        endcase
        if (y[k] > 0) sum += y[k];
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 5 * 42 + 1, $sformatf("latency %0d", lat));
      for (int k = 0; k < NCLASS; k++) begin
        automatic longint e = (sum == 0 || y[k] <= 0) ? 0 : (longint'(y[k]) * 256) / sum;
        check(conf[k] == 9'(e), $sformatf("conf%0d %0d vs %0d", k, conf[k], e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
