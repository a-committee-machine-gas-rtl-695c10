// normalizer: city-block normalisation of the steady-state pattern.
//
// RN[i] = RS[i] / (RS[0] + ... + RS[NSENS-1]). The sum comes from an adder tree; one
// shared divider then normalises the components one by one, as in the paper.
// The result is an X_W-bit two's-complement fraction (Q1.7 for X_W = 8):
// RN[i] = floor(2^(X_W-1) * RS[i] / sum), saturated to the largest positive value
// (only reached when a single sensor is non-zero). A zero sum gives zeros.
// Timing: start pulse, then NSENS divisions of (ADC_W + X_W - 1) cycles each plus
// one cycle per component; done pulses once all RN are valid. Output format and
// saturation are this design's choices.
module normalizer #(
  parameter int unsigned NSENS = 8,
  parameter int unsigned ADC_W = 12,
  parameter int unsigned X_W   = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [ADC_W-1:0]        rs [NSENS],
  output logic signed [X_W-1:0]   rn [NSENS],
  output logic                    done
);
  localparam int unsigned SW = ADC_W + $clog2(NSENS);   // sum width
  localparam int unsigned NW = ADC_W + X_W - 1;          // numerator width
  localparam logic [NW-1:0] QMAX = NW'((1 << (X_W - 1)) - 1);

  logic [SW-1:0] sum, sum_r;
  logic [$clog2(NSENS)-1:0] idx;
  logic          div_start, div_done, active;
  logic [NW-1:0] quo;

  always_comb begin
    sum = '0;
    for (int i = 0; i < NSENS; i++) sum += SW'(rs[i]);
  end

  seq_divider #(.NW(NW), .DW(SW)) u_div (
    .clk, .rst_n, .start(div_start),
    .num(NW'(rs[idx]) << (X_W - 1)), .den(sum_r),
    .quo, .done(div_done), .busy()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_r <= '0; idx <= '0; div_start <= 1'b0; active <= 1'b0; done <= 1'b0;
      for (int i = 0; i < NSENS; i++) rn[i] <= '0;
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        sum_r     <= sum;
        idx       <= '0;
        active    <= 1'b1;
        div_start <= 1'b1;
      end else if (active && div_done) begin
        rn[idx] <= (sum_r == '0) ? '0 : (quo > QMAX) ? X_W'(QMAX) : X_W'(quo);
        if (idx == ($clog2(NSENS))'(NSENS - 1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          idx       <= idx + 1'b1;
          div_start <= 1'b1;
        end
      end
    end
  end
endmodule
