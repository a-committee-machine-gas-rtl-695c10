// tb_knn: loads a random training set of 220 patterns with one-hot labels, classifies
// random patterns (and a pattern equal to a stored one) and compares the three nearest
// labels and distances with a sorted reference; checks one distance per clock
// (done NPAT + 5 cycles after the start cycle).
module tb_knn;
  import gas_pkg::*;
  localparam int NPAT = 220;
  logic clk = 0, rst_n = 0, start = 0, ld_we = 0, done;
  logic [7:0] ld_addr = 0;
  pc_t ld_pat [NPC], x [NPC];
  label_t ld_label = 0;
  label_t nn_label [3];
  logic [19:0] nn_dist [3];
  pc_t pats [NPAT][NPC];
  int  labs [NPAT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  knn dut (.clk, .rst_n, .ld_we, .ld_addr, .ld_pat, .ld_label, .start, .x, .nn_label, .nn_dist, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic classify();
    int d [NPAT];
    int best [3];
    int lat;
    for (int p = 0; p < NPAT; p++) begin
      d[p] = 0;
      for (int k = 0; k < NPC; k++) d[p] += (int'(x[k]) - int'(pats[p][k])) ** 2;
    end
    // three smallest, earliest index first on ties
    for (int r = 0; r < 3; r++) begin
      best[r] = -1;
      for (int p = 0; p < NPAT; p++) begin
        bit used = 0;
        for (int q = 0; q < r; q++) if (best[q] == p) used = 1;
        if (!used && (best[r] < 0 || d[p] < d[best[r]])) best[r] = p;
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == NPAT + 5, $sformatf("latency %0d", lat));
    for (int r = 0; r < 3; r++) begin
      check(nn_dist[r] == 20'(d[best[r]]), $sformatf("R%0d distance %0d vs %0d", r + 1, nn_dist[r], d[best[r]]));
      check(nn_label[r] == label_t'(1 << labs[best[r]]), $sformatf("R%0d label", r + 1));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPAT; p++) begin
      labs[p] = $urandom_range(0, 4);
      for (int k = 0; k < NPC; k++) begin pats[p][k] = 8'($urandom); ld_pat[k] = pats[p][k]; end
      ld_addr = 8'(p); ld_label = label_t'(1 << labs[p]); ld_we = 1;
      @(negedge clk);
    end
    ld_we = 0;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < NPC; k++) x[k] = (t == 0) ? pats[17][k] : 8'($urandom);
      classify();
      if (t == 0) check(nn_dist[0] == 0, "exact match is nearest");
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
