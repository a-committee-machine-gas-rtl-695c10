// tb_mlp: random weights and patterns; the reference evaluates both layers directly
// (sums of products plus biases), using a separate piecewise-linear tanh instance for
// the hidden nodes, and must match y exactly. Latency: done 19 cycles after start,
// counting the start cycle.
module tb_mlp;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  pc_t x [NPC];
  logic signed [7:0] theta [6][NPC], theta0 [6], w [NCLASS][6], w0 [NCLASS];
  score_t y [NCLASS];
  logic signed [19:0] ra;
  logic signed [7:0]  rphi;
  int checks = 0, failures = 0, nsat = 0;

  always #5 clk = ~clk;
  mlp dut (.clk, .rst_n, .start, .x, .theta, .theta0, .w, .w0, .y, .done);
  lpf_tanh ref_tanh (.a(ra), .y(rphi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      int phi [6];
      int lat;
      for (int i = 0; i < NPC; i++) x[i] = 8'($urandom);
      for (int j = 0; j < 6; j++) begin
        theta0[j] = 8'($urandom);
        for (int i = 0; i < NPC; i++) theta[j][i] = (t < 50) ? 8'($urandom_range(0, 63)) - 8'sd32 : 8'($urandom);
      end
      for (int k = 0; k < NCLASS; k++) begin
        w0[k] = 8'($urandom);
        for (int j = 0; j < 6; j++) w[k][j] = 8'($urandom);
      end
      for (int j = 0; j < 6; j++) begin
        automatic int a = theta0[j] * 128;
        for (int i = 0; i < NPC; i++) a += theta[j][i] * x[i];
        ra = 20'(a); #1;
        phi[j] = rphi;
        if (phi[j] == 127 || phi[j] == -127) nsat++;
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 19, $sformatf("latency %0d", lat));
      for (int k = 0; k < NCLASS; k++) begin
        automatic int e = w0[k] * 128;
        for (int j = 0; j < 6; j++) e += w[k][j] * phi[j];
        check(y[k] == e, $sformatf("y%0d %0d vs %0d", k, y[k], e));
      end
    end
    check(nsat > 0, "tanh saturation exercised");
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
