// tb_preproc_stage: the acquisition and preprocessing stage with the ADC model and a
// shortened sampling period (400 cycles). Each sensor settles exponentially towards
// its own level; the reference finds the steady value of each sensor by the
// threshold rule, normalises by the city-block sum and projects with the PCA matrix.
// Checks the pattern, the number of scans, the spacing of the scans and that the
// stage waits for the slowest sensor.
module tb_preproc_stage;
  import gas_pkg::*;
  localparam int PERIOD = 400;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic mux_en, adc_cs_n, adc_sclk_en, adc_sdata;
  logic [2:0] mux_addr;
  logic signed [7:0] t [NSENS][NPC];
  pc_t pattern [NPC];
  logic [7:0] steady;
  logic [31:0] scans;
  logic [11:0] chan [8];
  int checks = 0, failures = 0;
  int target [8], off [8];
  int cyc = 0, last_scan_start = -1, nspacing = 0;
  logic mux_en_d = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  preproc_stage #(.SAMPLE_PERIOD(PERIOD)) dut (.clk, .rst_n, .start, .mux_en, .mux_addr, .adc_cs_n,
    .adc_sclk_en, .adc_sdata, .t, .pattern, .done, .steady, .scans);
  adc_model u_adc (.clk, .mux_en, .mux_addr, .cs_n(adc_cs_n), .sclk_en(adc_sclk_en), .chan, .sdata(adc_sdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int val(input int i, input int s);
    return target[i] + (off[i] >> s);
  endfunction

  // sensor values follow the scan number
  always @(posedge clk) begin
    mux_en_d <= mux_en;
    if (rst_n && mux_en && !mux_en_d && mux_addr == 0) begin
      if (last_scan_start >= 0 && scans != 0) begin
        check(cyc - last_scan_start == PERIOD, $sformatf("scan spacing %0d", cyc - last_scan_start));
        nspacing++;
      end
      last_scan_start <= cyc;
    end
  end
  always @(scans) for (int i = 0; i < 8; i++) chan[i] = 12'(val(i, int'(scans)));

  initial begin
    for (int trial = 0; trial < 4; trial++) begin
      automatic int need = 0; int rs [8], ssum, lat;
      int rn [8];
      rst_n = 0;
      for (int i = 0; i < 8; i++) begin
        target[i] = $urandom_range(300, 3000);
        off[i] = (i == trial) ? 1000 : $urandom_range(0, 200);
        for (int p = 0; p < NPC; p++) t[i][p] = 8'($urandom);
      end
      // reference: steady value per sensor
      for (int i = 0; i < 8; i++) begin
        automatic int prev = 0;
        for (int s = 0; s < 40; s++) begin
          automatic int v = val(i, s);
          if ((v > prev ? v - prev : prev - v) <= 4) begin
            rs[i] = v;
            if (s + 1 > need) need = s + 1;
            break;
          end
          prev = v;
        end
      end
      ssum = 0;
      for (int i = 0; i < 8; i++) ssum += rs[i];
      for (int i = 0; i < 8; i++) begin
        rn[i] = rs[i] * 128 / ssum;
        if (rn[i] > 127) rn[i] = 127;
      end
      for (int i = 0; i < 8; i++) chan[i] = 12'(val(i, 0));
      last_scan_start = -1;
      repeat (2) @(negedge clk); rst_n = 1;
      @(negedge clk); start = 1; @(negedge clk); start = 0; lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check(scans == 32'(need), $sformatf("scans %0d vs %0d", scans, need));
      check(need >= 2, "sensors needed several scans");
      check(steady == 8'hFF, "all sensors steady");
      for (int p = 0; p < NPC; p++) begin
        automatic int s = 0, e;
        for (int i = 0; i < 8; i++) s += rn[i] * t[i][p];
        e = s >>> 7;
        if (e > 127) e = 127;
        if (e < -128) e = -128;
        check(pattern[p] == 8'(e), $sformatf("pattern %0d: %0d vs %0d", p, pattern[p], e));
      end
    end
    check(nspacing > 0, "scan spacing observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
