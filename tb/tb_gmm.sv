// tb_gmm: random mixtures (M = 2, the GMM configuration) and M = 1 (the PPCA
// configuration). The reference forms s = x - mu, y = s^T G with G upper triangular,
// rescales and squares y, takes exp(-z) from a separate piecewise-linear instance and
// sums K_j exp(-z_j) per class; p must match exactly. Latency: NCLASS*M*11 cycles plus
// the start cycle.
module tb_gmm;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done2, done1;
  pc_t x [NPC];
  pc_t mu2 [NCLASS][2][NPC];
  logic signed [11:0] g2 [NCLASS][2][NPC][NPC];
  logic [15:0] k2 [NCLASS][2];
  pc_t mu1 [NCLASS][1][NPC];
  logic signed [11:0] g1 [NCLASS][1][NPC][NPC];
  logic [15:0] k1 [NCLASS][1];
  score_t p2 [NCLASS], p1 [NCLASS];
  logic [15:0] ru;
  logic [7:0]  re;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  gmm #(.M(2)) dut2 (.clk, .rst_n, .start, .x, .mu(mu2), .g(g2), .kc(k2), .p(p2), .done(done2));
  gmm #(.M(1)) dut1 (.clk, .rst_n, .start, .x, .mu(mu1), .g(g1), .kc(k1), .p(p1), .done(done1));
  lpf_exp ref_exp (.u(ru), .y(re));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // K * exp(-z) of one component
  task automatic comp(input pc_t m [NPC], input logic signed [11:0] g [NPC][NPC], input logic [15:0] kk, output longint r);
    longint yv [NPC];
    longint z = 0, u;
    for (int col = 0; col < NPC; col++) begin
      yv[col] = 0;
      for (int i = 0; i <= col; i++) yv[col] += (longint'(x[i]) - longint'(m[i])) * longint'(g[i][col]);
      yv[col] = yv[col] >>> 5;
      if (yv[col] > 32767) yv[col] = 32767;
      if (yv[col] < -32767) yv[col] = -32767;
      z += yv[col] * yv[col];
    end
    u = z >> 4;
    if (u > 65535) u = 65535;
    ru = 16'(u); #1;
    r = longint'(kk) * longint'(re);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int lat;
      for (int i = 0; i < NPC; i++) x[i] = 8'($urandom_range(0, 100)) - 8'sd50;
      for (int c = 0; c < NCLASS; c++) begin
        for (int j = 0; j < 2; j++) begin
          k2[c][j] = 16'($urandom);
          for (int i = 0; i < NPC; i++) begin
            mu2[c][j][i] = x[i] + 8'($urandom_range(0, 40)) - 8'sd20;
            for (int q = 0; q < NPC; q++) g2[c][j][i][q] = (t == 0) ? 12'sd2047 : 12'($urandom_range(0, 400)) - 12'sd200;
          end
        end
        k1[c][0] = k2[c][1];
        mu1[c][0] = mu2[c][1];
        g1[c][0] = g2[c][1];
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done1) begin @(negedge clk); lat++; end
      check(lat == NCLASS * 11 + 1, $sformatf("M=1 latency %0d", lat));
      while (!done2) begin @(negedge clk); lat++; end
      check(lat == NCLASS * 2 * 11 + 1, $sformatf("M=2 latency %0d", lat));
      for (int c = 0; c < NCLASS; c++) begin
        longint r0, r1;
        comp(mu2[c][0], g2[c][0], k2[c][0], r0);
        comp(mu2[c][1], g2[c][1], k2[c][1], r1);
        check(p2[c] == 32'(r0 + r1), $sformatf("GMM p%0d %0d vs %0d", c, p2[c], r0 + r1));
        check(p1[c] == 32'(r1), $sformatf("PPCA p%0d %0d vs %0d", c, p1[c], r1));
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
