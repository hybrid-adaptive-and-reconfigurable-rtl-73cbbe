// configman: the triplicated configuration manager (ConfigMan).
//
// Three identical configman_core copies run in lockstep from the same reset
// and the same inputs. Their output words are combined by a bitwise TMR
// voter, so the ICAP, the DDR port and the SYS_CTRL peripheral only see the
// majority; `cm_disagree` names a copy that left the majority. Behind the
// voter sit the shared peripherals: FRAME_ECC, which forms the frame syndrome
// from the ICAP read data, and SYS_CTRL, which configures the SPS static logic
// and requests the HPS mode. The copies replace the three lockstepped
// processors of the design with state machines doing the same job.
module configman
  import harft_pkg::*;
#(
  parameter int unsigned N_PRR          = 3,
  parameter int unsigned FRAMES         = NUM_FRAMES,
  parameter int unsigned WORDS          = WORDS_PER_FRAME,
  parameter int unsigned PRR_FRAMES     = 400,
  parameter int unsigned PRR_BASE_FRAME = 4000,
  parameter int unsigned PRR_STRIDE     = 1000,
  parameter logic [31:0] DDR_BASE       = 32'h0,
  parameter int unsigned RESET_CYCLES   = 16,
  parameter int unsigned CNT_W          = 16,
  parameter int unsigned TIME_W         = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            scrub_enable,
  // ICAP
  output icap_req_t                       icap,
  input  logic                            icap_rvalid,
  input  logic [31:0]                     icap_rdata,
  // DDR (partial bitstreams)
  output logic                            ddr_en,
  output logic [31:0]                     ddr_addr,
  input  logic                            ddr_rvalid,
  input  logic [31:0]                     ddr_rdata,
  // policy configuration and ground command
  input  logic [TIME_W-1:0]               window_len,
  input  logic [NUM_MODES-2:0][CNT_W-1:0] thresholds,
  input  logic                            gnd_valid,
  input  harft_mode_e                     gnd_mode,
  input  logic [TIME_W-1:0]               gnd_cycles,
  input  logic                            resync_req,
  // SYS_CTRL outputs
  output logic [N_PRR-1:0]                mb_mask,
  output logic [N_PRR-1:0]                decouple,
  output logic                            sps_reset,
  output hps_mode_e                       hps_mode,
  // status
  output cm_out_t                         status,
  output logic [2:0]                      cm_disagree
);
  localparam int unsigned OW = $bits(cm_out_t);

  cm_out_t          core_out [3];
  logic [OW-1:0]    voted;
  logic             ecc_done, ecc_parity_err;
  logic [SYN_W-1:0] ecc_syndrome;

  for (genvar c = 0; c < 3; c++) begin : g_core
    configman_core #(
      .N_PRR(N_PRR), .FRAMES(FRAMES), .WORDS(WORDS), .PRR_FRAMES(PRR_FRAMES),
      .PRR_BASE_FRAME(PRR_BASE_FRAME), .PRR_STRIDE(PRR_STRIDE), .DDR_BASE(DDR_BASE),
      .CNT_W(CNT_W), .TIME_W(TIME_W)
    ) u_core (
      .clk, .rst_n, .scrub_enable, .icap_rvalid, .icap_rdata,
      .ecc_done, .ecc_syndrome, .ecc_parity_err, .ddr_rvalid, .ddr_rdata,
      .window_len, .thresholds, .gnd_valid, .gnd_mode, .gnd_cycles, .resync_req,
      .out(core_out[c])
    );
  end

  tmr_voter #(.W(OW)) u_vote (
    .in0(core_out[0]), .in1(core_out[1]), .in2(core_out[2]),
    .out(voted), .disagree(cm_disagree)
  );

  assign status   = cm_out_t'(voted);
  assign icap     = status.icap;
  assign ddr_en   = status.ddr_en;
  assign ddr_addr = status.ddr_addr;

  frame_ecc #(.WORDS(WORDS)) u_ecc (
    .clk, .rst_n, .clear(status.ecc_clear), .word_valid(icap_rvalid), .word_data(icap_rdata),
    .done(ecc_done), .syndrome(ecc_syndrome), .parity_err(ecc_parity_err)
  );

  sys_ctrl #(.N_PRR(N_PRR), .RESET_CYCLES(RESET_CYCLES)) u_sc (
    .clk, .rst_n, .we(status.sc_we), .addr(status.sc_addr), .wdata(status.sc_wdata),
    .mb_mask, .decouple, .sps_reset, .hps_mode
  );
endmodule
