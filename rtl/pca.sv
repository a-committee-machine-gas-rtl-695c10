// pca: principal-component projection z = x T of the normalised pattern.
//
// x has NSENS = 8 components and z has NPC = 5. To keep the distributed-arithmetic
// ROMs small, x and T are split into halves (first four and last four rows),
// z = x1 T1 + x2 T2, so each principal component uses two 4-input DA units (2^4 x 10
// bit ROMs) and one adder: ten DA units in all, as in the paper. x and T are Q1.7;
// the integer sum carries 14 fractional bits and is shifted back to Q1.7 with
// saturation before it is registered in RP[0..4] (port z).
// Timing: start pulse, 8 DA cycles, then done pulses one cycle later with z valid.
module pca #(
  parameter int unsigned NSENS = 8,
  parameter int unsigned NPC   = 5,
  parameter int unsigned X_W   = 8,
  parameter int unsigned CW    = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [X_W-1:0] x [NSENS],
  input  logic signed [CW-1:0]  t [NSENS][NPC],
  output logic signed [X_W-1:0] z [NPC],
  output logic                  done
);
  localparam int unsigned KH = NSENS / 2;
  localparam int unsigned YW = CW + X_W + $clog2(KH) + 1;
  localparam int unsigned FRAC_SH = CW - 1;    // coefficient fraction bits to drop

  logic signed [YW-1:0] ypart [NPC][2];
  logic [NPC-1:0]       dn [2];

  for (genvar p = 0; p < NPC; p++) begin : g_pc
    for (genvar h = 0; h < 2; h++) begin : g_half
      logic signed [CW-1:0]  c  [KH];
      logic signed [X_W-1:0] xv [KH];
      for (genvar k = 0; k < KH; k++) begin : g_k
        assign c[k]  = t[h*KH + k][p];
        assign xv[k] = x[h*KH + k];
      end
      da_unit #(.K(KH), .N(X_W), .CW(CW)) u_da (
        .clk, .rst_n, .start, .coef(c), .x(xv), .y(ypart[p][h]), .done(dn[h][p])
      );
    end
  end

  function automatic logic signed [X_W-1:0] sat(input logic signed [YW:0] v);
    logic signed [YW:0] s;
    s = v >>> FRAC_SH;
    if (s > (YW+1)'((1 << (X_W - 1)) - 1)) return {1'b0, {(X_W-1){1'b1}}};
    if (s < -(YW+1)'(1 << (X_W - 1)))      return {1'b1, {(X_W-1){1'b0}}};
    return X_W'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPC; p++) z[p] <= '0;
      done <= 1'b0;
    end else begin
      done <= dn[0][0];
      if (dn[0][0])
        for (int p = 0; p < NPC; p++)
          z[p] <= sat((YW+1)'(ypart[p][0]) + (YW+1)'(ypart[p][1]));
    end
  end
endmodule
