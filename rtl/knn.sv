// knn: K-nearest-neighbour classifier (K = 3) over a stored training set.
//
// The NPC components of the training patterns sit in NPC pattern memories (ROM1..ROM5
// of the paper), indexed by pattern number, with a one-hot class label per pattern.
// After start the unknown pattern x is compared with one stored pattern per clock
// through a pipeline of five subtractors, five squaring units and an adder tree, so a
// new squared Euclidean distance appears every cycle. A winner-takes-all stage of three
// comparators keeps the three smallest distances and their labels in R1 <= R2 <= R3: a
// distance below R1 shifts R1, R2 down into R2, R3; one below R2 shifts R2 into R3;
// one below R3 replaces R3. Ties keep the earlier pattern.
// Timing: start pulse, then NPAT + 5 cycles; done pulses with nn_label/nn_dist valid
// (held until the next start). The memories are written through the ld_* port before
// use. NPAT = 220 and the one-hot labels are this design's reading of the paper.
module knn
  import gas_pkg::*;
#(
  parameter int unsigned NPAT = 220,
  parameter int unsigned K    = 3,
  localparam int unsigned DW  = 2 * X_W + 1 + $clog2(NPC),   // squared distance width
  localparam int unsigned PAW = $clog2(NPAT)
) (
  input  logic           clk,
  input  logic           rst_n,
  // training-set load port
  input  logic           ld_we,
  input  logic [PAW-1:0] ld_addr,
  input  pc_t            ld_pat [NPC],
  input  label_t         ld_label,
  // classification
  input  logic           start,
  input  pc_t            x [NPC],
  output label_t         nn_label [K],
  output logic [DW-1:0]  nn_dist [K],
  output logic           done
);
  localparam int unsigned DIFW = X_W + 1;
  localparam int unsigned SQW  = 2 * X_W + 1;

  logic [NPC*X_W-1:0] mem_pat [NPAT];
  label_t             mem_lab [NPAT];

  always_ff @(posedge clk) begin
    if (ld_we) begin
      for (int k = 0; k < NPC; k++) mem_pat[ld_addr][k*X_W +: X_W] <= ld_pat[k];
      mem_lab[ld_addr] <= ld_label;
    end
  end

  // stage 0: address counter
  logic           run, v1, v2, v3, v4, last1, last2, last3, last4;
  logic [PAW-1:0] addr;
  // stage 1: memory read
  logic [NPC*X_W-1:0] pat1;
  label_t             lab1, lab2, lab3, lab4;
  // stage 2: differences
  logic signed [DIFW-1:0] d2 [NPC];
  // stage 3: squares
  logic [SQW-1:0]         sq3 [NPC];
  // stage 4: distance
  logic [DW-1:0]          dist4;
  logic [DW-1:0]          dsum;

  always_comb begin
    dsum = '0;
    for (int k = 0; k < NPC; k++) dsum += DW'(sq3[k]);
  end

  always_ff @(posedge clk) begin
    pat1  <= mem_pat[addr];
    lab1  <= mem_lab[addr];
    for (int k = 0; k < NPC; k++)
      d2[k] <= DIFW'(x[k]) - DIFW'($signed(pat1[k*X_W +: X_W]));
    lab2  <= lab1;
    for (int k = 0; k < NPC; k++) sq3[k] <= SQW'(d2[k] * d2[k]);
    lab3  <= lab2;
    dist4 <= dsum;
    lab4  <= lab3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; addr <= '0;
      {v1, v2, v3, v4, last1, last2, last3, last4} <= '0;
      done <= 1'b0;
      for (int i = 0; i < K; i++) begin nn_label[i] <= '0; nn_dist[i] <= '1; end
    end else begin
      done <= 1'b0;
      if (start) begin
        run  <= 1'b1;
        addr <= '0;
        for (int i = 0; i < K; i++) begin nn_label[i] <= '0; nn_dist[i] <= '1; end
      end else if (run) begin
        if (addr == PAW'(NPAT - 1)) run <= 1'b0;
        else addr <= addr + 1'b1;
      end
      v1 <= run && !start;  last1 <= run && !start && (addr == PAW'(NPAT - 1));
      v2 <= v1;  last2 <= last1;
      v3 <= v2;  last3 <= last2;
      v4 <= v3;  last4 <= last3;
      // winner-takes-all update of R1..R3
      if (v4) begin
        if (dist4 < nn_dist[0]) begin
          for (int i = K - 1; i > 0; i--) begin
            nn_dist[i] <= nn_dist[i-1]; nn_label[i] <= nn_label[i-1];
          end
          nn_dist[0] <= dist4; nn_label[0] <= lab4;
        end else begin
          for (int j = 1; j < K; j++) begin
            if (dist4 >= nn_dist[j-1] && dist4 < nn_dist[j]) begin
              for (int i = K - 1; i > j; i--) begin
                nn_dist[i] <= nn_dist[i-1]; nn_label[i] <= nn_label[i-1];
              end
              nn_dist[j] <= dist4; nn_label[j] <= lab4;
            end
          end
        end
      end
      done <= last4;
    end
  end
endmodule
