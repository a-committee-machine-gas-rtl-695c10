// adc_if: sampling controller for the analog multiplexer and the 12-bit serial ADC.
//
// One start pulse scans all NSENS sensors. Each sensor takes CYC_PER_SAMPLE = 20
// clock cycles, as in the paper's timing diagram:
//   cycle 0       mux_en high, mux_addr selects the sensor
//   cycles 1..15  adc_cs_n low and adc_sclk_en high: the ADC clock SCLK is the system
//                 clock gated by adc_sclk_en; 3 leading zeros then 12 data bits, MSB
//                 first, are shifted in on the rising edge
//   cycle 16      adc_cs_n high (ADC output tri-stated); the word is presented with a
//                 one-cycle sample_valid
//   cycles 17..19 idle, then the next sensor
// scan_done pulses with the last sample_valid. At a 20 MHz clock this scans the
// sensors at 1 MHz, the rate the paper gives. Producing SCLK from the gate enable
// (for example with an output DDR register) is left to the board-level wrapper; that
// split, and sampling on the rising edge, are this design's choices.
module adc_if #(
  parameter int unsigned NSENS = 8,
  parameter int unsigned ADC_W = 12,
  parameter int unsigned LEAD_ZEROS = 3,
  parameter int unsigned CYC_PER_SAMPLE = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     mux_en,
  output logic [$clog2(NSENS)-1:0] mux_addr,
  output logic                     adc_cs_n,
  output logic                     adc_sclk_en,
  input  logic                     adc_sdata,
  output logic                     sample_valid,
  output logic [$clog2(NSENS)-1:0] sample_idx,
  output logic [ADC_W-1:0]         sample_data,
  output logic                     scan_done,
  output logic                     busy
);
  localparam int unsigned NBITS = LEAD_ZEROS + ADC_W;   // SCLK cycles per conversion
  localparam int unsigned CW = $clog2(CYC_PER_SAMPLE);

  logic [CW-1:0]                cyc;
  logic [$clog2(NSENS)-1:0]     sens;
  logic [NBITS-1:0]             sr;
  logic                         running;

  wire in_conv = running && (cyc >= CW'(1)) && (cyc <= CW'(NBITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running      <= 1'b0;
      cyc          <= '0;
      sens         <= '0;
      sr           <= '0;
      sample_valid <= 1'b0;
      sample_data  <= '0;
      sample_idx   <= '0;
      scan_done    <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      scan_done    <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          cyc     <= '0;
          sens    <= '0;
        end
      end else begin
        if (in_conv) sr <= {sr[NBITS-2:0], adc_sdata};
        if (cyc == CW'(NBITS + 1)) begin
          sample_valid <= 1'b1;
          sample_data  <= sr[ADC_W-1:0];
          sample_idx   <= sens;
          if (sens == ($clog2(NSENS))'(NSENS - 1)) scan_done <= 1'b1;
        end
        if (cyc == CW'(CYC_PER_SAMPLE - 1)) begin
          cyc <= '0;
          if (sens == ($clog2(NSENS))'(NSENS - 1)) running <= 1'b0;
          else sens <= sens + 1'b1;
        end else begin
          cyc <= cyc + 1'b1;
        end
      end
    end
  end

  assign mux_en      = running && (cyc <= CW'(NBITS + 1));
  assign mux_addr    = sens;
  assign adc_cs_n    = !in_conv;
  assign adc_sclk_en = in_conv;
  assign busy        = running;
endmodule
