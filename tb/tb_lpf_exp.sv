// tb_lpf_exp: sweeps u over [0, 16) and checks 256*exp(-u) within 5/256, monotonic
// decrease, 255 at u = 0 and 0 beyond u = 6.
module tb_lpf_exp;
  logic [15:0] u;
  logic [7:0]  y;
  int checks = 0, failures = 0;
  int prev;

  lpf_exp dut (.u, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    prev = 256;
    for (int v = 0; v < 65536; v += 13) begin
      real r, e;
      u = 16'(v); #1;
      r = real'(y);
      e = 256.0 * $exp(-real'(v) / 4096.0);
      if (e > 255.0) e = 255.0;
      check((r - e < 5.0) && (e - r < 5.0), $sformatf("exp(-%f) = %f got %f", real'(v) / 4096.0, e, r));
      check(int'(y) <= prev, "monotonic");
      prev = int'(y);
    end
    u = 0; #1; check(y == 8'd255, "exp(0)");
    u = 16'd24576; #1; check(y == 8'd0, "exp(-6)");
    u = 16'hFFFF; #1; check(y == 8'd0, "large u");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
