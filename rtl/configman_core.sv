// configman_core: one copy of the configuration manager.
//
// Combines the scrubber, the mode policy and the PR controller. The scrubber
// runs continuously while `scrub_enable` is high; every repaired or
// uncorrectable upset is counted by the mode policy, whose target mode the
// PR controller carries out. The two share the ICAP: a pending PR transfer
// pauses the scrubber at its next frame boundary and owns the port until
// the transfer ends. All outputs are gathered in one `cm_out_t` word so that
// three copies can be voted. The sharing rule is this design's choice.
//
// The core also keeps the upset record of the fault monitor: saturating
// 16-bit counts of repaired and of uncorrectable frames, and the frame, word
// and bit of the last repair. They update the cycle after the scrubber's
// `corrected` / `uncorrectable` pulse. Recording upsets follows the original;
// what is recorded and the counter widths are this design's choice.
module configman_core
  import harft_pkg::*;
#(
  parameter int unsigned N_PRR          = 3,
  parameter int unsigned FRAMES         = NUM_FRAMES,
  parameter int unsigned WORDS          = WORDS_PER_FRAME,
  parameter int unsigned PRR_FRAMES     = 400,
  parameter int unsigned PRR_BASE_FRAME = 4000,
  parameter int unsigned PRR_STRIDE     = 1000,
  parameter logic [31:0] DDR_BASE       = 32'h0,
  parameter int unsigned CNT_W          = 16,
  parameter int unsigned TIME_W         = 32
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            scrub_enable,
  input  logic                            icap_rvalid,
  input  logic [31:0]                     icap_rdata,
  input  logic                            ecc_done,
  input  logic [SYN_W-1:0]                ecc_syndrome,
  input  logic                            ecc_parity_err,
  input  logic                            ddr_rvalid,
  input  logic [31:0]                     ddr_rdata,
  input  logic [TIME_W-1:0]               window_len,
  input  logic [NUM_MODES-2:0][CNT_W-1:0] thresholds,
  input  logic                            gnd_valid,
  input  harft_mode_e                     gnd_mode,
  input  logic [TIME_W-1:0]               gnd_cycles,
  input  logic                            resync_req,
  output cm_out_t                         out
);
  icap_req_t   s_icap, p_icap;
  logic        s_idle, p_icap_req;
  logic        corrected, uncorrectable, pass_done;
  harft_mode_e target;
  logic        forced;
  logic [FRAME_AW-1:0] err_frame;
  logic [WORD_AW-1:0]  err_word;
  logic [4:0]          err_bit;
  logic [15:0]         up_cnt, unc_cnt;
  logic [FRAME_AW-1:0] last_frame;
  logic [WORD_AW-1:0]  last_word;
  logic [4:0]          last_bit;

  scrubber #(.FRAMES(FRAMES), .WORDS(WORDS)) u_scrub (
    .clk, .rst_n, .enable(scrub_enable), .pause(p_icap_req), .idle(s_idle),
    .icap(s_icap), .icap_rvalid, .icap_rdata,
    .ecc_clear(out.ecc_clear), .ecc_done, .ecc_syndrome, .ecc_parity_err,
    .corrected, .uncorrectable, .pass_done,
    .err_frame, .err_word, .err_bit
  );

  mode_policy #(.CNT_W(CNT_W), .TIME_W(TIME_W)) u_policy (
    .clk, .rst_n, .fault(corrected | uncorrectable), .window_len, .thresholds,
    .gnd_valid, .gnd_mode, .gnd_cycles,
    .target_mode(target), .forced, .window_count()
  );

  pr_controller #(
    .N_PRR(N_PRR), .WORDS(WORDS), .PRR_FRAMES(PRR_FRAMES),
    .PRR_BASE_FRAME(PRR_BASE_FRAME), .PRR_STRIDE(PRR_STRIDE), .DDR_BASE(DDR_BASE)
  ) u_pr (
    .clk, .rst_n, .target_mode(target), .resync_req,
    .cur_mode(out.cur_mode), .busy(out.pr_busy), .switch_done(out.switch_done),
    .prr_loaded(out.prr_loaded), .sps_reset_issued(out.sps_reset_issued),
    .icap_req(p_icap_req), .icap_grant(p_icap_req && s_idle), .icap(p_icap),
    .ddr_en(out.ddr_en), .ddr_addr(out.ddr_addr), .ddr_rvalid, .ddr_rdata,
    .sc_we(out.sc_we), .sc_addr(out.sc_addr), .sc_wdata(out.sc_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_cnt     <= '0;
      unc_cnt    <= '0;
      last_frame <= '0;
      last_word  <= '0;
      last_bit   <= '0;
    end else begin
      if (corrected) begin
        if (up_cnt != '1) up_cnt <= up_cnt + 16'd1;
        last_frame <= err_frame;
        last_word  <= err_word;
        last_bit   <= err_bit;
      end
      if (uncorrectable && unc_cnt != '1) unc_cnt <= unc_cnt + 16'd1;
    end
  end

  always_comb begin
    out.icap          = s_idle ? p_icap : s_icap;
    out.corrected     = corrected;
    out.uncorrectable = uncorrectable;
    out.pass_done     = pass_done;
    out.target_mode   = target;
    out.forced        = forced;
    out.upset_count   = up_cnt;
    out.unc_count     = unc_cnt;
    out.last_frame    = last_frame;
    out.last_word     = last_word;
    out.last_bit      = last_bit;
  end
endmodule
