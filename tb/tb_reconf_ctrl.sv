// tb_reconf_ctrl: stage models that finish after random delays and a CPLD model that
// acknowledges after a random delay. Checks the stage order 1-2-3-1..., the bit-file
// address sent for each next stage, that no stage starts while a reconfiguration is
// pending, and that lowering run stops the loop after stage 3.
module tb_reconf_ctrl;
  import gas_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, cfg_req, cfg_done = 0, busy;
  logic [2:0] stage_done = 0, stage_start;
  logic [7:0] cfg_addr;
  stage_e stage;
  int checks = 0, failures = 0;
  int expect_stage = 0, nstarts = 0, ncfg = 0;
  bit cfg_pending = 0;

  always #5 clk = ~clk;
  reconf_ctrl dut (.clk, .rst_n, .run, .stage_done, .stage_start, .cfg_req, .cfg_addr, .cfg_done, .stage, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // stage models
  always @(posedge clk) if (rst_n && stage_start != 0) begin
    check(stage_start == 3'(1 << expect_stage), $sformatf("start of stage %0d, got %b", expect_stage + 1, stage_start));
    check(!cfg_req, "no start during reconfiguration");
    check(stage == stage_e'(expect_stage), "stage output");
    nstarts++;
    fork begin
      automatic int s = expect_stage;
      repeat ($urandom_range(1, 30)) @(posedge clk);
      @(negedge clk); stage_done[s] = 1; @(negedge clk); stage_done[s] = 0;
    end join_none
  end

  // CPLD model
  always @(posedge clk) if (rst_n && cfg_req && !cfg_pending) begin
    automatic int nxt = (expect_stage + 1) % 3;
    cfg_pending = 1;
    check(cfg_addr == 8'(nxt), $sformatf("bit file address %0d for stage %0d", cfg_addr, nxt + 1));
    ncfg++;
    fork begin
      repeat ($urandom_range(2, 20)) @(posedge clk);
      @(negedge clk); cfg_done = 1; expect_stage = (expect_stage + 1) % 3;
      @(negedge clk); cfg_done = 0; cfg_pending = 0;
    end join_none
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    check(nstarts == 0, "idle while run is low");
    run = 1;
    wait (nstarts == 10);
    run = 0;
    repeat (400) @(negedge clk);
    check(nstarts == 12, $sformatf("stops after stage 3 (%0d starts)", nstarts));
    check(ncfg == 12, $sformatf("one reconfiguration per stage (%0d)", ncfg));
    check(!busy && stage == ST_ACQ, "idle in stage 1 configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
