// adc_model: behavioural model of the sensor board (analog multiplexer plus 12-bit
// serial ADC) for simulation only; it is not synthesizable logic of the design.
//
// While cs_n is low and the SCLK gate is on, the model shifts out 3 leading zeros and
// then the 12-bit value of the selected channel, MSB first, changing sdata on the
// falling clock edge so the controller can sample on the rising edge. The channel is
// the one mux_addr selects when the conversion starts. cs_n high resets the bit count
// and drives 0 (the tri-stated line, read as 0 in a two-state simulator).
module adc_model #(
  parameter int unsigned NSENS = 8
) (
  input  logic        clk,
  input  logic        mux_en,
  input  logic [2:0]  mux_addr,
  input  logic        cs_n,
  input  logic        sclk_en,
  input  logic [11:0] chan [NSENS],
  output logic        sdata
);
  int unsigned    cnt = 0;
  logic [14:0]    word = '0;
  initial sdata = 1'b0;
  always @(negedge clk) begin
    if (cs_n || !sclk_en) begin
      cnt   <= 0;
      sdata <= 1'b0;
    end else begin
      automatic logic [14:0] w = (cnt == 0) ? {3'b000, (mux_en ? chan[mux_addr] : 12'd0)} : word;
      word  <= w;
      sdata <= w[14 - cnt];
      cnt   <= cnt + 1;
    end
  end
endmodule
