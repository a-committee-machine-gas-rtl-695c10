// da_unit: distributed-arithmetic inner product y = sum_k coef[k] * x[k].
//
// The K inputs are N-bit two's-complement words. At start they are loaded into shift
// registers and then delivered one bit per cycle, LSB first, sign bits last. The K
// bits of one weight position form the address of a 2^K-entry ROM whose entry a is
// the sum of the coefficients selected by the set bits of a. An adder/subtractor adds
// the ROM word to the right-shifted partial result, and subtracts it when the sign
// bits are addressed, which removes the separate sign-bit ROM. Since the partial
// result is kept with N-1 guard bits, the right shifts lose nothing and y is the exact
// integer inner product of the coefficient and input integers.
// Timing: start pulse, N cycles, then done pulses and y is held until the next start.
// ROM word width is CW + clog2(K) bits (10 bits for K = 4, CW = 8, as in the
// paper). The ROM is generated from the coefficient inputs so that any trained
// matrix can be used; in a fixed bitstream they are constants.
module da_unit #(
  parameter int unsigned K  = 4,
  parameter int unsigned N  = 8,
  parameter int unsigned CW = 8,
  localparam int unsigned RW = CW + $clog2(K) + 1,   // ROM word width (with margin for K not a power of two)
  localparam int unsigned YW = CW + N + $clog2(K) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [CW-1:0] coef [K],
  input  logic signed [N-1:0]  x [K],
  output logic signed [YW-1:0] y,
  output logic                 done
);
  localparam int unsigned AW = YW + N;    // accumulator with guard bits

  logic signed [RW-1:0] rom [2**K];
  logic [N-1:0]         sh [K];
  logic [K-1:0]         addr;
  logic [$clog2(N+1)-1:0] cnt;
  logic                 busy;
  logic signed [AW-1:0] acc, term, nxt;

  // ROM contents: entry a = sum of coef[k] for every set bit k of a.
  always_comb begin
    for (int a = 0; a < 2**K; a++) begin
      rom[a] = '0;
      for (int k = 0; k < K; k++)
        if (a[k]) rom[a] = rom[a] + RW'(coef[k]);
    end
  end

  always_comb begin
    for (int k = 0; k < K; k++) addr[k] = sh[k][0];
    term = AW'(rom[addr]) <<< (N - 1);
    // sign control S: subtract when the sign bits address the ROM
    nxt  = (acc >>> 1) + ((cnt == ($clog2(N+1))'(N - 1)) ? -term : term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) sh[k] <= '0;
      acc <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        for (int k = 0; k < K; k++) sh[k] <= x[k];
        acc  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        for (int k = 0; k < K; k++) sh[k] <= sh[k] >> 1;
        acc <= nxt;
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(N+1))'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= YW'(nxt);
        end
      end
    end
  end
endmodule
