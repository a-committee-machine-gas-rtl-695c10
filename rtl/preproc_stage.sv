// preproc_stage: the data acquisition and signal preprocessing configuration.
//
// A controller FSM drives the sampling controller, the steady-state detector, the
// city-block normaliser and the PCA unit in turn. After start it clears the detector
// and scans the eight sensors once every SAMPLE_PERIOD cycles (1 s at the 20 MHz ADC
// clock). After each scan it checks whether every sensor has reached its steady state;
// if so it normalises RS1..RS8 into RN1..RN8, projects them onto the five principal
// components (RP1..RP5, port pattern) and pulses done. The units are enabled one after
// the other, never together, as in the paper. Running the whole stage from the ADC
// clock is this design's choice.
module preproc_stage
  import gas_pkg::*;
#(
  parameter int unsigned SAMPLE_PERIOD = 20_000_000,
  parameter int unsigned THRESH        = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  // sensor board
  output logic                 mux_en,
  output logic [2:0]           mux_addr,
  output logic                 adc_cs_n,
  output logic                 adc_sclk_en,
  input  logic                 adc_sdata,
  // PCA transform matrix, Q1.7
  input  logic signed [7:0]    t [NSENS][NPC],
  // result
  output pc_t                  pattern [NPC],
  output logic                 done,
  // status
  output logic [NSENS-1:0]     steady,
  output logic [31:0]          scans
);
  typedef enum logic [2:0] {P_IDLE, P_SCAN, P_CHECK, P_WAIT, P_NORM, P_PCA} pstate_e;
  localparam int unsigned TW = $clog2(SAMPLE_PERIOD + 1);

  pstate_e         st;
  logic [TW-1:0]   timer;
  logic            adc_start, scan_done, ssd_clear, all_steady;
  logic            sample_valid;
  logic [2:0]      sample_idx;
  adc_t            sample_data;
  adc_t            rs [NSENS];
  pc_t             rn [NSENS];
  logic            norm_start, norm_done, pca_start, pca_done;

  adc_if #(.NSENS(NSENS), .ADC_W(ADC_W)) u_adc (
    .clk, .rst_n, .start(adc_start), .mux_en, .mux_addr, .adc_cs_n, .adc_sclk_en,
    .adc_sdata, .sample_valid, .sample_idx, .sample_data, .scan_done, .busy()
  );

  ssd #(.NSENS(NSENS), .ADC_W(ADC_W), .THRESH(THRESH)) u_ssd (
    .clk, .rst_n, .clear(ssd_clear), .sample_valid, .sample_idx, .sample_data,
    .rs, .steady, .all_steady
  );

  normalizer #(.NSENS(NSENS), .ADC_W(ADC_W), .X_W(X_W)) u_norm (
    .clk, .rst_n, .start(norm_start), .rs, .rn, .done(norm_done)
  );

  pca #(.NSENS(NSENS), .NPC(NPC), .X_W(X_W), .CW(8)) u_pca (
    .clk, .rst_n, .start(pca_start), .x(rn), .t, .z(pattern), .done(pca_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; timer <= '0; adc_start <= 1'b0; ssd_clear <= 1'b0;
      norm_start <= 1'b0; pca_start <= 1'b0; done <= 1'b0; scans <= '0;
    end else begin
      adc_start  <= 1'b0;
      ssd_clear  <= 1'b0;
      norm_start <= 1'b0;
      pca_start  <= 1'b0;
      done       <= 1'b0;
      if (st != P_IDLE) timer <= (timer == TW'(SAMPLE_PERIOD - 1)) ? '0 : timer + 1'b1;
      unique case (st)
        P_IDLE: if (start) begin
          ssd_clear <= 1'b1;
          adc_start <= 1'b1;
          timer     <= '0;
          st        <= P_SCAN;
        end
        P_SCAN:  if (scan_done) begin st <= P_CHECK; scans <= scans + 1'b1; end
        P_CHECK: if (all_steady) begin norm_start <= 1'b1; st <= P_NORM; end
                 else st <= P_WAIT;
        P_WAIT:  if (timer == TW'(SAMPLE_PERIOD - 1)) begin adc_start <= 1'b1; st <= P_SCAN; end
        P_NORM:  if (norm_done) begin pca_start <= 1'b1; st <= P_PCA; end
        P_PCA:   if (pca_done) begin done <= 1'b1; st <= P_IDLE; end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
