// gas_pkg: sizes and number formats shared by the gas identification system.
//
// The sensor array gives eight readings (two chips of four tin-oxide sensors),
// each digitised by a 12-bit ADC. After city-block normalisation each reading is an
// 8-bit two's-complement fraction (Q1.7), and PCA maps the eight of them to five
// principal components, also Q1.7. Five classifiers each score the five gas classes
// of the application (CO, H2, CH4, CO+H2, CO+CH4). Confidences and classifier
// weights are 9-bit unsigned fractions with 256 meaning 1.0. The sizes 8, 12, 5 and
// the class list are the paper's; the fixed-point formats are this design's.
package gas_pkg;
  localparam int unsigned NSENS  = 8;   // sensors in the array
  localparam int unsigned ADC_W  = 12;  // ADC resolution
  localparam int unsigned X_W    = 8;   // pattern component width (Q1.7)
  localparam int unsigned NPC    = 5;   // principal components kept
  localparam int unsigned NCLASS = 5;   // gas classes
  localparam int unsigned NCLSF  = 5;   // classifiers in the committee
  localparam int unsigned CONF_W = 9;   // confidence / weight width, 256 = 1.0
  localparam int unsigned SCORE_W = 32; // classifier output width

  typedef logic signed [X_W-1:0]     pc_t;     // one pattern component, Q1.7
  typedef logic [ADC_W-1:0]          adc_t;    // one ADC word
  typedef logic [NCLASS-1:0]         label_t;  // one-hot class label
  typedef logic [CONF_W-1:0]         conf_t;   // confidence, 256 = 1.0
  typedef logic signed [SCORE_W-1:0] score_t;  // raw classifier output

  // Classifier order in the committee.
  typedef enum logic [2:0] {CL_KNN = 3'd0, CL_MLP = 3'd1, CL_RBF = 3'd2,
                            CL_GMM = 3'd3, CL_PPCA = 3'd4} clsf_e;

  // Active configuration of the time-multiplexed FPGA.
  typedef enum logic [1:0] {ST_ACQ = 2'd0, ST_CM = 2'd1, ST_DEC = 2'd2} stage_e;
endpackage
