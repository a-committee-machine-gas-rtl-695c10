// tb_da_unit: distributed-arithmetic inner products for K = 4, 5 and 6 with random
// signed coefficients and inputs (including -128 and 127), checked against the direct
// sum of products; the 8-cycle latency is checked too.
module tb_da_unit;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [7:0] c4 [4], x4 [4], c5 [5], x5 [5], c6 [6], x6 [6];
  logic signed [18:0] y4;
  logic signed [19:0] y5, y6;
  logic d4, d5, d6;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  da_unit #(.K(4)) dut4 (.clk, .rst_n, .start, .coef(c4), .x(x4), .y(y4), .done(d4));
  da_unit #(.K(5)) dut5 (.clk, .rst_n, .start, .coef(c5), .x(x5), .y(y5), .done(d5));
  da_unit #(.K(6)) dut6 (.clk, .rst_n, .start, .coef(c6), .x(x6), .y(y6), .done(d6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic signed [7:0] rnd(input int mode);
    if (mode == 0) return -8'sd128;
    if (mode == 1) return 8'sd127;
    return 8'($urandom);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int e4 = 0, e5 = 0, e6 = 0, lat;
      for (int k = 0; k < 6; k++) begin
        logic signed [7:0] a, b;
        a = rnd(t < 2 ? t : 2); b = rnd(t < 2 ? 1 - t : 2);
        if (t == 2) b = -8'sd128;
        c6[k] = a; x6[k] = b; e6 += a * b;
        if (k < 5) begin c5[k] = a; x5[k] = b; e5 += a * b; end
        if (k < 4) begin c4[k] = a; x4[k] = b; e4 += a * b; end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!d4) begin @(negedge clk); lat++; end
      check(lat == 9, $sformatf("latency %0d", lat));
      check(d5 && d6, "all done together");
      check(y4 == 19'(e4), $sformatf("K4 %0d vs %0d", y4, e4));
      check(y5 == 20'(e5), $sformatf("K5 %0d vs %0d", y5, e5));
      check(y6 == 20'(e6), $sformatf("K6 %0d vs %0d", y6, e6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
