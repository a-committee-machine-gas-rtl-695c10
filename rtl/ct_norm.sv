// ct_norm: confidence transform of the MLP, RBF, GMM and PPCA classifiers.
//
// The class outputs are mapped to [0, 1] as conf_k = y_k / sum(y): adders form the sum
// and one shared divider divides the outputs one by one. Negative outputs (possible
// for MLP and RBF) are clamped to 0 first; if every output is 0 all confidences are 0.
// conf is 9-bit unsigned with 256 = 1.0, truncated. The clamping and the format are
// this design's choices. Timing: start pulse, then NCLASS divisions of SCORE_W + 8
// cycles each plus one cycle per class; done pulses with conf valid.
module ct_norm
  import gas_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  score_t y    [NCLASS],
  output conf_t  conf [NCLASS],
  output logic   done
);
  localparam int unsigned SW = SCORE_W + $clog2(NCLASS);
  localparam int unsigned NW = SCORE_W + 8;

  logic [SCORE_W-1:0] yc [NCLASS];
  logic [SW-1:0]      sum, sum_r;
  logic [$clog2(NCLASS)-1:0] idx;
  logic               active, div_start, div_done;
  logic [NW-1:0]      quo;

  always_comb begin
    sum = '0;
    for (int c = 0; c < NCLASS; c++) begin
      yc[c] = y[c][SCORE_W-1] ? '0 : SCORE_W'(y[c]);
      sum  += SW'(yc[c]);
    end
  end

  seq_divider #(.NW(NW), .DW(SW)) u_div (
    .clk, .rst_n, .start(div_start), .num(NW'(yc[idx]) << 8), .den(sum_r),
    .quo, .done(div_done), .busy()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCLASS; c++) conf[c] <= '0;
      sum_r <= '0; idx <= '0; active <= 1'b0; div_start <= 1'b0; done <= 1'b0;
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        sum_r <= sum; idx <= '0; active <= 1'b1; div_start <= 1'b1;
      end else if (active && div_done) begin
        conf[idx] <= (sum_r == '0) ? '0 : CONF_W'(quo);
        if (idx == ($clog2(NCLASS))'(NCLASS - 1)) begin
          active <= 1'b0; done <= 1'b1;
        end else begin
          idx <= idx + 1'b1; div_start <= 1'b1;
        end
      end
    end
  end
endmodule
