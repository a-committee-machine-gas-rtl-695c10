// tb_ssd: self-checking test of steady-state detection.
// A directed sequence on one sensor, then random converging responses on all eight
// compared against an independent reference of the RD/RS rule.
module tb_ssd;
  logic clk = 0, rst_n = 0, clear = 0, sample_valid = 0;
  logic [2:0] sample_idx = 0;
  logic [11:0] sample_data = 0;
  logic [11:0] rs [8];
  logic [7:0] steady;
  logic all_steady;
  int checks = 0, failures = 0;
  int ref_prev [8], ref_rs [8];
  bit ref_st [8];

  always #5 clk = ~clk;
  ssd dut (.clk, .rst_n, .clear, .sample_valid, .sample_idx, .sample_data, .rs, .steady, .all_steady);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input int idx, input int v);
    @(negedge clk); sample_valid = 1; sample_idx = 3'(idx); sample_data = 12'(v);
    @(negedge clk); sample_valid = 0;
    if (!ref_st[idx]) begin
      if ((v > ref_prev[idx] ? v - ref_prev[idx] : ref_prev[idx] - v) > 4) ref_prev[idx] = v;
      else begin ref_rs[idx] = v; ref_st[idx] = 1; end
    end
  endtask

  task automatic reset_ref();
    for (int i = 0; i < 8; i++) begin ref_prev[i] = 0; ref_st[i] = 0; end
  endtask

  initial begin
    reset_ref();
    repeat (2) @(negedge clk); rst_n = 1;
    // directed: 100, 200 moving, 203 steady, later 900 ignored
    put(3, 100); check(!steady[3], "moving after 100");
    put(3, 200); check(!steady[3], "moving after 200");
    put(3, 203); check(steady[3] && rs[3] == 12'd203, "steady at 203");
    put(3, 900); check(rs[3] == 12'd203, "switch disabled after steady");
    put(3, 205);
    check(!all_steady, "not all steady");
    // random converging responses
    for (int trial = 0; trial < 20; trial++) begin
      int v [8], step [8];
      @(negedge clk); clear = 1; @(negedge clk); clear = 0; reset_ref();
      check(steady == 8'h00, "clear");
      for (int i = 0; i < 8; i++) begin v[i] = 500 + $urandom_range(0, 3000); step[i] = $urandom_range(0, 400); end
      for (int scan = 0; scan < 12; scan++) begin
        for (int i = 0; i < 8; i++) begin
          put(i, v[i]);
          check(steady[i] == ref_st[i], $sformatf("steady flag %0d", i));
          if (ref_st[i]) check(rs[i] == 12'(ref_rs[i]), $sformatf("RS%0d", i));
          v[i] = v[i] - step[i];
          step[i] = step[i] / 2;
        end
      end
      check(all_steady, "all steady after decay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
