// tb_seq_divider: random and corner divisions against the reference quotient, with
// the NW-cycle latency checked.
module tb_seq_divider;
  localparam int NW = 16, DW = 12;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [NW-1:0] num, quo;
  logic [DW-1:0] den;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  seq_divider #(.NW(NW), .DW(DW)) dut (.clk, .rst_n, .start, .num, .den, .quo, .done, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic divide(input logic [NW-1:0] n, input logic [DW-1:0] d);
    int lat = 0;
    @(negedge clk); num = n; den = d; start = 1; @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == NW + 1, $sformatf("latency %0d", lat));
    if (d == 0) check(quo == '1, "divide by zero");
    else check(quo == n / d, $sformatf("%0d / %0d = %0d got %0d", n, d, n / d, quo));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    divide(16'hFFFF, 12'd1);
    divide(16'hFFFF, 12'hFFF);
    divide(0, 12'd7);
    divide(100, 12'd0);
    divide(12345, 12'd12345 % 4096);
    for (int i = 0; i < 300; i++) divide(NW'($urandom), DW'($urandom_range(1, 4095)));
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
