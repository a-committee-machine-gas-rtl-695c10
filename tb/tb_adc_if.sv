// tb_adc_if: self-checking test of the sampling controller.
// Three scans of random channel values through the ADC model; checks every word, its
// sensor index, the 20-cycle spacing of the samples, the 160-cycle scan, the
// multiplexer address during each conversion and the 15 SCLK cycles per conversion.
module tb_adc_if;
  logic clk = 0, rst_n = 0, start = 0;
  logic mux_en, adc_cs_n, adc_sclk_en, adc_sdata, sample_valid, scan_done, busy;
  logic [2:0] mux_addr, sample_idx;
  logic [11:0] sample_data;
  logic [11:0] chan [8];
  int checks = 0, failures = 0;
  int cyc = 0, last_valid = -1, nvalid = 0, sclk_cnt = 0, start_cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  adc_if dut (.clk, .rst_n, .start, .mux_en, .mux_addr, .adc_cs_n, .adc_sclk_en, .adc_sdata,
              .sample_valid, .sample_idx, .sample_data, .scan_done, .busy);
  adc_model u_adc (.clk, .mux_en, .mux_addr, .cs_n(adc_cs_n), .sclk_en(adc_sclk_en), .chan, .sdata(adc_sdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (adc_sclk_en) begin
      sclk_cnt <= sclk_cnt + 1;
      check(mux_en, "mux enabled during conversion");
    end
    if (rst_n && sample_valid) begin
      check(sample_data == chan[sample_idx], $sformatf("word of sensor %0d: %h vs %h", sample_idx, sample_data, chan[sample_idx]));
      check(sample_idx == 3'(nvalid % 8), "sensor order");
      if (last_valid >= 0 && nvalid % 8 != 0) check(cyc - last_valid == 20, $sformatf("20 cycles per sensor, got %0d", cyc - last_valid));
      check(sclk_cnt == 15 * (nvalid % 8 + 1), $sformatf("15 SCLK per conversion (%0d)", sclk_cnt));
      last_valid <= cyc;
      nvalid <= nvalid + 1;
    end
    if (rst_n && scan_done) check(sample_valid && sample_idx == 3'd7, "scan_done with last sample");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < 8; i++) chan[i] = 12'($urandom);
      @(negedge clk); sclk_cnt = 0; start = 1; start_cyc = cyc; @(negedge clk); start = 0;
      @(posedge scan_done);
      @(negedge clk);
      check(cyc - start_cyc == 8 * 20 - 2, $sformatf("scan length %0d", cyc - start_cyc));
      wait (!busy);
      check(nvalid == 8 * (s + 1), "eight samples per scan");
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
