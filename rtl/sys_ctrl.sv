// sys_ctrl: SYS_CTRL peripheral of the ConfigMan.
//
// A small write-only register block on the (voted) ConfigMan bus that holds
// the configuration of the SPS static logic and of the HPS:
//   SC_MB_MASK  (0): PRRs whose MicroBlaze takes part in lockstep/voting
//   SC_DECOUPLE (1): PRRs isolated while being reconfigured
//   SC_RESET    (2): any write holds the SPS MicroBlazes in reset for
//                    RESET_CYCLES cycles (resynchronization)
//   SC_HPS_MODE (3): bit 0 requests AMP (1) or SMP (0) from the HPS
// Writes take effect at the clock edge. After reset: no MicroBlaze, nothing
// decoupled, SMP. Only the block's name and its link to the SPS voter come
// from the design; the register map and the reset stretch are this design's.
module sys_ctrl
  import harft_pkg::*;
#(
  parameter int unsigned N_PRR        = 3,
  parameter int unsigned RESET_CYCLES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [1:0]       addr,
  input  logic [31:0]      wdata,
  output logic [N_PRR-1:0] mb_mask,
  output logic [N_PRR-1:0] decouple,
  output logic             sps_reset,
  output hps_mode_e        hps_mode
);
  localparam int unsigned RW = $clog2(RESET_CYCLES + 1);
  logic [RW-1:0] rcnt;

  assign sps_reset = (rcnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_mask  <= '0;
      decouple <= '0;
      hps_mode <= HPS_SMP;
      rcnt     <= '0;
    end else begin
      if (rcnt != '0) rcnt <= rcnt - 1'b1;
      if (we) begin
        case (addr)
          SC_MB_MASK:  mb_mask  <= wdata[N_PRR-1:0];
          SC_DECOUPLE: decouple <= wdata[N_PRR-1:0];
          SC_RESET:    rcnt     <= RW'(RESET_CYCLES);
          SC_HPS_MODE: hps_mode <= hps_mode_e'(wdata[0]);
          default: ;
        endcase
      end
    end
  end
endmodule
