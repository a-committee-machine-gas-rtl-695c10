// ssd: steady-state detection of the sensor responses.
//
// Each ADC word of sensor i is subtracted from the previous word of the same sensor,
// held in RD[i]. If the magnitude of the difference exceeds THRESH the sensor is still
// moving and the word replaces RD[i]; otherwise the word is the steady-state value and
// goes to RS[i], and that sensor's switch is disabled (steady[i] set) so later samples
// are ignored. all_steady means RS[0..NSENS-1] hold a complete pattern. One subtractor
// and one comparator are shared, as the samples arrive one at a time. clear restarts
// detection (RD and flags to 0). The structure is the paper's; the threshold value
// and the magnitude comparison are this design's choices.
module ssd #(
  parameter int unsigned NSENS  = 8,
  parameter int unsigned ADC_W  = 12,
  parameter int unsigned THRESH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     sample_valid,
  input  logic [$clog2(NSENS)-1:0] sample_idx,
  input  logic [ADC_W-1:0]         sample_data,
  output logic [ADC_W-1:0]         rs [NSENS],
  output logic [NSENS-1:0]         steady,
  output logic                     all_steady
);
  logic [ADC_W-1:0] rd [NSENS];
  logic signed [ADC_W:0] diff;
  logic [ADC_W:0]        mag;
  logic                  moving;   // comparator output: high while still moving

  always_comb begin
    diff   = $signed({1'b0, sample_data}) - $signed({1'b0, rd[sample_idx]});
    mag    = diff[ADC_W] ? (ADC_W+1)'(-diff) : (ADC_W+1)'(diff);
    moving = mag > (ADC_W+1)'(THRESH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSENS; i++) begin rd[i] <= '0; rs[i] <= '0; end
      steady <= '0;
    end else if (clear) begin
      for (int i = 0; i < NSENS; i++) rd[i] <= '0;
      steady <= '0;
    end else if (sample_valid && !steady[sample_idx]) begin
      if (moving) rd[sample_idx] <= sample_data;
      else begin
        rs[sample_idx]     <= sample_data;
        steady[sample_idx] <= 1'b1;
      end
    end
  end

  assign all_steady = &steady;
endmodule
