// tb_lpf_tanh: sweeps the input over [-4, 4) and checks the approximation against
// tanh within 0.05, odd symmetry, monotonicity and the saturated ends.
module tb_lpf_tanh;
  logic signed [19:0] a;
  logic signed [7:0]  y;
  int checks = 0, failures = 0;
  real prev;

  lpf_tanh dut (.a, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real tanh_r(input real v);
    return ($exp(v) - $exp(-v)) / ($exp(v) + $exp(-v));
  endfunction

  initial begin
    logic signed [7:0] yp;
    prev = -2.0;
    for (int v = -16384; v < 16384; v += 37) begin
      real r, e;
      a = 20'(v); #1;
      r = real'(y) / 128.0;
      e = tanh_r(real'(v) / 4096.0);
      check((r - e < 0.05) && (e - r < 0.05), $sformatf("tanh(%f) = %f got %f", real'(v) / 4096.0, e, r));
      check(r >= prev, "monotonic");
      prev = r;
      yp = y;
      a = 20'(-v); #1;
      check(y == -yp || (v == 0), "odd symmetry");
    end
    a = 20'sd300000; #1; check(y == 8'sd127, "positive saturation");
    a = -20'sd300000; #1; check(y == -8'sd127, "negative saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
