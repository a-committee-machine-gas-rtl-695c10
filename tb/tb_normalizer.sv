// tb_normalizer: city-block normalisation of random patterns against
// floor(128 * x_i / sum) saturated at 127, plus a zero pattern, a single-sensor
// pattern and the latency of 8 divisions of 19 + 1 cycles.
module tb_normalizer;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [11:0] rs [8];
  logic signed [7:0] rn [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  normalizer dut (.clk, .rst_n, .start, .rs, .rn, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_one();
    int sum = 0, lat = 0, e;
    for (int i = 0; i < 8; i++) sum += rs[i];
    @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == 8 * (19 + 2) + 1, $sformatf("latency %0d", lat));
    for (int i = 0; i < 8; i++) begin
      e = (sum == 0) ? 0 : (rs[i] * 128) / sum;
      if (e > 127) e = 127;
      check(rn[i] == 8'(e), $sformatf("RN%0d %0d vs %0d", i, rn[i], e));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) rs[i] = 0;
    run_one();
    rs[5] = 12'd1000; run_one();
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 8; i++) rs[i] = 12'($urandom);
      run_one();
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
