// tb_rbf: random centres, widths (both shift directions) and weights; the reference
// computes each squared distance, scales it by 2^-sexp, takes exp(-u) from a separate
// piecewise-linear instance and sums the weighted basis outputs. y must match exactly;
// done must come 71 cycles after start, counting the start cycle ((13+1)*5 + 1).
module tb_rbf;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  pc_t x [NPC];
  pc_t c [13][NPC];
  logic signed [3:0] sexp [13];
  logic signed [7:0] w [NCLASS][13];
  score_t y [NCLASS];
  logic [15:0] ru;
  logic [7:0]  re;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rbf dut (.clk, .rst_n, .start, .x, .c, .sexp, .w, .y, .done);
  lpf_exp ref_exp (.u(ru), .y(re));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int phi [13];
      int lat;
      for (int i = 0; i < NPC; i++) x[i] = 8'($urandom_range(0, 120)) - 8'sd60;
      for (int j = 0; j < 13; j++) begin
        automatic longint d = 0; longint u;
        sexp[j] = 4'($urandom_range(0, 5)) - 4'sd3;
        for (int i = 0; i < NPC; i++) begin
          c[j][i] = x[i] + 8'($urandom_range(0, 60)) - 8'sd30;
          d += (int'(x[i]) - int'(c[j][i])) ** 2;
        end
        u = d / 4;                       // 14 -> 12 fractional bits
        if (sexp[j] >= 0) u = u >> sexp[j]; else u = u << (-sexp[j]);
        if (u > 65535) u = 65535;
        ru = 16'(u); #1;
        phi[j] = re;
      end
      for (int k = 0; k < NCLASS; k++) for (int j = 0; j < 13; j++) w[k][j] = 8'($urandom);
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 71, $sformatf("latency %0d", lat));
      for (int k = 0; k < NCLASS; k++) begin
        automatic int e = 0;
        for (int j = 0; j < 13; j++) e += w[k][j] * phi[j];
        check(y[k] == e, $sformatf("y%0d %0d vs %0d", k, y[k], e));
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
