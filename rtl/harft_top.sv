// harft_top: programmable-logic static design of HARFT.
//
// Two cooperating parts. The ConfigMan (triplicated, voted) scrubs the
// configuration memory through the ICAP, counts and records upsets, picks
// the operating mode (SMP, AMP, or FEFT simplex/duplex/triplex) from upset
// thresholds or a ground command, and carries a mode switch out by partial
// reconfiguration of only the PRRs that change, copying bitstreams from DDR. Through SYS_CTRL
// it tells the SPS static logic which PRRs hold lockstepped MicroBlazes,
// isolates PRRs under reconfiguration, resets the SPS when processors are
// added, and requests SMP or AMP from the ARM side. The SPS static logic
// votes or compares the MicroBlazes' bus outputs and drives the winner onto
// the interconnect. A duplex mismatch (detected but not maskable) asks the
// ConfigMan for an SPS reset.
// Outside, as ports: the ICAP/configuration memory, DDR, the PRR contents
// (MicroBlazes, accelerators), the AXI interconnect and the HPS.
module harft_top
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
  // ICAP / configuration memory
  output icap_req_t                       icap,
  input  logic                            icap_rvalid,
  input  logic [31:0]                     icap_rdata,
  // DDR holding partial bitstreams
  output logic                            ddr_en,
  output logic [31:0]                     ddr_addr,
  input  logic                            ddr_rvalid,
  input  logic [31:0]                     ddr_rdata,
  // mode policy
  input  logic [TIME_W-1:0]               window_len,
  input  logic [NUM_MODES-2:0][CNT_W-1:0] thresholds,
  input  logic                            gnd_valid,
  input  harft_mode_e                     gnd_mode,
  input  logic [TIME_W-1:0]               gnd_cycles,
  // PRRs
  input  mb_req_t [N_PRR-1:0]             prr_req,
  output mb_rsp_t [N_PRR-1:0]             prr_rsp,
  output logic [N_PRR-1:0]                prr_rst_n,
  output logic [N_PRR-1:0]                prr_decouple,
  // interconnect
  output mb_req_t                         m_req,
  input  mb_rsp_t                         m_rsp,
  // HPS
  output hps_mode_e                       hps_mode,
  // status
  output harft_mode_e                     cur_mode,
  output harft_mode_e                     target_mode,
  output logic                            ground_forced,
  output logic                            upset_corrected,
  output logic                            sys_reset_req,
  output logic                            scrub_pass_done,
  output logic                            mode_switched,
  output logic                            prr_reconfigured,
  output logic [15:0]                     upset_count,
  output logic [15:0]                     unc_count,
  output logic [FRAME_AW-1:0]             last_upset_frame,
  output logic [WORD_AW-1:0]              last_upset_word,
  output logic [4:0]                      last_upset_bit,
  output logic [N_PRR-1:0]                mb_mask,
  output logic                            sps_reset,
  output logic [2:0]                      cm_disagree,
  output logic                            lockstep_err,
  output logic [N_PRR-1:0]                lockstep_disagree,
  output logic                            dwc_block
);
  cm_out_t st;

  configman #(
    .N_PRR(N_PRR), .FRAMES(FRAMES), .WORDS(WORDS), .PRR_FRAMES(PRR_FRAMES),
    .PRR_BASE_FRAME(PRR_BASE_FRAME), .PRR_STRIDE(PRR_STRIDE), .DDR_BASE(DDR_BASE),
    .RESET_CYCLES(RESET_CYCLES), .CNT_W(CNT_W), .TIME_W(TIME_W)
  ) u_cm (
    .clk, .rst_n, .scrub_enable, .icap, .icap_rvalid, .icap_rdata,
    .ddr_en, .ddr_addr, .ddr_rvalid, .ddr_rdata,
    .window_len, .thresholds, .gnd_valid, .gnd_mode, .gnd_cycles,
    .resync_req(dwc_block),
    .mb_mask, .decouple(prr_decouple), .sps_reset, .hps_mode,
    .status(st), .cm_disagree
  );

  sps_static #(.N_PRR(N_PRR)) u_sps (
    .clk, .rst_n, .prr_req, .prr_rsp, .prr_rst_n, .m_req, .m_rsp,
    .mb_mask, .decouple(prr_decouple), .sps_reset,
    .lockstep_err, .disagree(lockstep_disagree), .dwc_block
  );

  always_comb begin
    cur_mode         = st.cur_mode;
    target_mode      = st.target_mode;
    ground_forced    = st.forced;
    upset_corrected  = st.corrected;
    sys_reset_req    = st.uncorrectable;
    scrub_pass_done  = st.pass_done;
    mode_switched    = st.switch_done;
    prr_reconfigured = st.prr_loaded;
    upset_count      = st.upset_count;
    unc_count        = st.unc_count;
    last_upset_frame = st.last_frame;
    last_upset_word  = st.last_word;
    last_upset_bit   = st.last_bit;
  end
endmodule
