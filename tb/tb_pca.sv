// tb_pca: projection of random 8-component patterns with random 8x5 matrices, checked
// against z_p = sat(floor(sum_i x_i T_ip / 128)) computed directly; latency 9 cycles.
module tb_pca;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic signed [7:0] x [8], t [8][5], z [5];
  int checks = 0, failures = 0, nsat = 0;

  always #5 clk = ~clk;
  pca dut (.clk, .rst_n, .start, .x, .t, .z, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int lat;
      for (int i = 0; i < 8; i++) begin
        x[i] = (n % 2) ? 8'($urandom_range(0, 127)) : 8'($urandom);
        for (int p = 0; p < 5; p++) t[i][p] = 8'($urandom);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 10, $sformatf("latency %0d", lat));
      for (int p = 0; p < 5; p++) begin
        automatic int s = 0; int e;
        for (int i = 0; i < 8; i++) s += x[i] * t[i][p];
        e = s >>> 7;
        if (e > 127) begin e = 127; nsat++; end
        if (e < -128) begin e = -128; nsat++; end
        check(z[p] == 8'(e), $sformatf("z%0d %0d vs %0d", p, z[p], e));
      end
    end
    check(nsat > 0, "saturation exercised");
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
