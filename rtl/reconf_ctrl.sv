// reconf_ctrl: sequencer of the three time-multiplexed configurations.
//
// The system runs acquisition/preprocessing, then the committee machine, then the
// confidence transform and decision, and starts over. When the active stage reports
// done, the sequencer raises cfg_req with the storage address of the next stage's
// configuration file, as the FPGA does towards the CPLD that reloads it, and holds
// both until cfg_done. It then pulses the next stage's start. While run is low no new
// cycle begins. The request/acknowledge protocol and the file addresses are this
// design's; the paper only says the address is passed to the CPLD. cfg_addr is 8 bits
// wide so that other storage layouts fit; with the default addresses 0, 1 and 2 its
// upper six bits are constant zero, which synthesis reports as idle outputs.
module reconf_ctrl
  import gas_pkg::*;
#(
  parameter logic [7:0] BIT_ADDR1 = 8'd0,
  parameter logic [7:0] BIT_ADDR2 = 8'd1,
  parameter logic [7:0] BIT_ADDR3 = 8'd2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic [2:0] stage_done,
  output logic [2:0] stage_start,
  output logic       cfg_req,
  output logic [7:0] cfg_addr,
  input  logic       cfg_done,
  output stage_e     stage,
  output logic       busy
);
  typedef enum logic [1:0] {R_IDLE, R_RUN, R_CFG} rstate_e;
  rstate_e st;
  stage_e  nxt;

  always_comb begin
    unique case (stage)
      ST_ACQ:  nxt = ST_CM;
      ST_CM:   nxt = ST_DEC;
      default: nxt = ST_ACQ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; stage <= ST_ACQ; stage_start <= '0; cfg_req <= 1'b0; cfg_addr <= BIT_ADDR1;
    end else begin
      stage_start <= '0;
      unique case (st)
        R_IDLE: if (run) begin
          stage_start[stage] <= 1'b1;
          st <= R_RUN;
        end
        R_RUN: if (stage_done[stage]) begin
          cfg_req  <= 1'b1;
          cfg_addr <= (nxt == ST_ACQ) ? BIT_ADDR1 : (nxt == ST_CM) ? BIT_ADDR2 : BIT_ADDR3;
          st <= R_CFG;
        end
        R_CFG: if (cfg_done) begin
          cfg_req <= 1'b0;
          stage   <= nxt;
          if (nxt == ST_ACQ) st <= R_IDLE;
          else begin
            stage_start[nxt] <= 1'b1;
            st <= R_RUN;
          end
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  assign busy = (st != R_IDLE);
endmodule
