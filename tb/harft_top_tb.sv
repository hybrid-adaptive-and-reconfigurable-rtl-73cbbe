// harft_top_tb: end-to-end run of the HARFT static logic at reduced size
// (32 frames, PRRs of 2 frames). Around the design: a configuration memory
// model behind the ICAP, a DDR model holding a valid (ECC-encoded) image for
// every PRR and module, three lockstep MicroBlaze stand-ins in the PRRs, and
// a responding interconnect. The run:
//   1. a clean scrub pass (timed: FRAMES*(WORDS+5) cycles), mode stays SMP;
//   2. upsets injected into static frames -> repaired -> thresholds crossed
//      -> AMP, then FEFT-Simplex and FEFT-Duplex by partial reconfiguration,
//      with the SPS reset when processors are added;
//   3. an upset in a duplex MicroBlaze -> detected, bus blocked, SPS reset
//      resynchronizes the pair;
//   4. a ground command forces FEFT-Triplex for a while; an upset copy is
//      outvoted; on expiry the design returns to Duplex without a reset;
//   5. a double upset -> uncorrectable -> full-system reset request;
//   6. one ConfigMan copy is disturbed -> outvoted, nothing changes.
// The upset record (counts and last repaired location) is checked against
// the injected upsets. Each mechanism is counted and must occur at least once.
module harft_top_tb;
  import harft_pkg::*;
  import harft_tb_pkg::*;
  localparam int N = 3, FR = 32, WD = 101, PF = 2, BASE = 8, STRIDE = 4, TOT = PF * WD;

  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic scrub_enable = 0;
  icap_req_t icap;
  logic icap_rvalid, ddr_en, ddr_rvalid;
  logic [31:0] icap_rdata, ddr_addr, ddr_rdata;
  logic [31:0] window_len = 32'd1_000_000;
  logic [NUM_MODES-2:0][15:0] thresholds;
  logic gnd_valid = 0;
  harft_mode_e gnd_mode = MODE_SMP;
  logic [31:0] gnd_cycles = 0;
  mb_req_t [N-1:0] prr_req;
  mb_rsp_t [N-1:0] prr_rsp;
  logic [N-1:0] prr_rst_n, prr_decouple, mb_mask, lockstep_disagree;
  mb_req_t m_req;
  mb_rsp_t m_rsp;
  hps_mode_e hps_mode;
  harft_mode_e cur_mode, target_mode;
  logic ground_forced, upset_corrected, sys_reset_req, scrub_pass_done, mode_switched;
  logic prr_reconfigured, sps_reset, lockstep_err, dwc_block;
  logic [2:0] cm_disagree;
  logic [15:0] upset_count, unc_count;
  logic [FRAME_AW-1:0] last_upset_frame;
  logic [WORD_AW-1:0] last_upset_word;
  logic [4:0] last_upset_bit;
  logic [N-1:0] upset = 0;
  int checks = 0, failures = 0;

  harft_top #(.FRAMES(FR), .PRR_FRAMES(PF), .PRR_BASE_FRAME(BASE), .PRR_STRIDE(STRIDE), .RESET_CYCLES(4)) dut (.*);
  cfg_mem_model #(.FRAMES(FR), .WORDS(WD)) u_mem (.clk, .icap, .rvalid(icap_rvalid), .rdata(icap_rdata));
  ddr_model #(.DEPTH(2 * N * TOT)) u_ddr (.clk, .en(ddr_en), .addr(ddr_addr), .rvalid(ddr_rvalid), .rdata(ddr_rdata));
  for (genvar i = 0; i < N; i++) begin : g_mb
    mb_model u_mb (.clk, .rst_n(rst_n & prr_rst_n[i]), .upset(upset[i]), .req(prr_req[i]), .rsp(prr_rsp[i]));
  end

  // interconnect: always ready, read data derived from the address
  always_comb begin
    m_rsp = '0;
    m_rsp.ip.arready = 1'b1;
    m_rsp.ip.rvalid  = m_req.ip.arvalid;
    m_rsp.ip.rdata   = m_req.ip.araddr ^ 32'h1357_9BDF;
    m_rsp.dp.awready = 1'b1;
    m_rsp.dp.wready  = 1'b1;
    m_rsp.dp.bvalid  = m_req.dp.wvalid;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_corr = 0, n_unc = 0, n_pass = 0, n_switch = 0, n_prr = 0, n_sps_rst = 0;
  int n_dwc = 0, n_tmr_mask = 0, n_cm_dis = 0, n_forced = 0, n_dec_wr = 0, n_bad_dec = 0;
  int n_pause = 0;
  logic sps_reset_q = 0;
  always @(posedge clk) if (rst_n) begin
    n_corr    <= n_corr + int'(upset_corrected);
    n_unc     <= n_unc + int'(sys_reset_req);
    n_pass    <= n_pass + int'(scrub_pass_done);
    n_switch  <= n_switch + int'(mode_switched);
    n_prr     <= n_prr + int'(prr_reconfigured);
    sps_reset_q <= sps_reset;
    n_sps_rst <= n_sps_rst + int'(sps_reset && !sps_reset_q);
    n_dwc     <= n_dwc + int'(dwc_block);
    n_tmr_mask <= n_tmr_mask + int'(lockstep_err && !dwc_block && $countones(mb_mask) == 3);
    n_cm_dis  <= n_cm_dis + int'(cm_disagree != 0);
    n_forced  <= n_forced + int'(ground_forced && mode_switched);
    if (icap.en && icap.we && int'(icap.frame) >= BASE && int'(icap.frame) < BASE + N * STRIDE) begin
      n_dec_wr <= n_dec_wr + 1;
      if (!prr_decouple[(int'(icap.frame) - BASE) / STRIDE]) n_bad_dec <= n_bad_dec + 1;
    end
    n_pause <= n_pause + int'(dut.u_cm.g_core[0].u_core.p_icap_req && !dut.u_cm.g_core[0].u_core.s_idle);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_mode(input harft_mode_e m, input int limit);
    int t = 0;
    while (!(cur_mode == m && !dut.st.pr_busy) && t < limit) begin @(negedge clk); t++; end
    chk(cur_mode == m, $sformatf("mode %s reached (now %s)", m.name(), cur_mode.name()));
  endtask

  function automatic bit prr_holds(int i, int rm);
    for (int f = 0; f < PF; f++)
      for (int w = 0; w < WD; w++)
        if (u_mem.mem[(BASE + i * STRIDE + f) * WD + w] != u_ddr.mem[(2 * i + rm) * TOT + f * WD + w]) return 0;
    return 1;
  endfunction

  logic [31:0] golden [FR * WD];
  task automatic flip(input int fr, input int pos);
    u_mem.mem[fr * WD + pos / 32][pos % 32] ^= 1'b1;
  endtask

  initial begin
    logic [31:0] f [101];
    int t0, t1, p0, r0;
    thresholds[0] = 1; thresholds[1] = 2; thresholds[2] = 3; thresholds[3] = 4;
    #1;
    for (int img = 0; img < 2 * N * PF; img++) begin
      for (int w = 0; w < WD; w++) f[w] = $urandom;
      ecc_encode(f);
      for (int w = 0; w < WD; w++) u_ddr.mem[img * WD + w] = f[w];
    end
    for (int fr = 0; fr < FR; fr++) begin
      for (int w = 0; w < WD; w++) f[w] = $urandom;
      ecc_encode(f);
      for (int w = 0; w < WD; w++) begin u_mem.mem[fr * WD + w] = f[w]; golden[fr * WD + w] = f[w]; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    scrub_enable = 1;
    // 1. clean pass, timed
    @(posedge clk iff scrub_pass_done);
    t0 = $time / 10;
    @(posedge clk iff scrub_pass_done);
    t1 = $time / 10;
    chk(t1 - t0 == FR * (WD + 5), $sformatf("clean pass %0d cycles", t1 - t0));
    chk(cur_mode == MODE_SMP && hps_mode == HPS_SMP && n_corr == 0, "clean: SMP, no repairs");
    // 2. upsets in static frames -> AMP
    flip(2, 777); flip(25, 64);
    wait_mode(MODE_AMP, 20000);
    chk(hps_mode == HPS_AMP && mb_mask == 0, "AMP: HPS asked for AMP, no MicroBlaze");
    // bit 777 of frame 2 is word 24 bit 9; bit 64 of frame 25 is word 2 bit 0
    chk((last_upset_frame == 2 && last_upset_word == 24 && last_upset_bit == 9) ||
        (last_upset_frame == 25 && last_upset_word == 2 && last_upset_bit == 0), "upset record: location of a repair");
    @(posedge clk iff scrub_pass_done);
    for (int i = 0; i < FR * WD; i++) if (i / WD < BASE || i / WD >= BASE + N * STRIDE) begin
      if (u_mem.mem[i] != golden[i]) begin chk(0, $sformatf("word %0d not repaired", i)); break; end
    end
    r0 = n_sps_rst; p0 = n_prr;
    flip(5, 3000); flip(30, 1);
    wait_mode(MODE_FEFT_DUPLEX, 40000);
    chk(mb_mask == 3'b011 && prr_holds(0, 1) && prr_holds(1, 1), "duplex: PRR0/1 hold MicroBlaze images");
    chk(n_prr - p0 == 2 && n_sps_rst - r0 >= 1, "PRRs reconfigured and SPS reset on growth");
    repeat (20) @(negedge clk);
    chk(!lockstep_err && m_req == prr_req[0], "duplex pair in step");
    // 3. duplex upset -> detect, block, resync
    r0 = n_sps_rst;
    @(negedge clk); upset = 3'b010; @(negedge clk); upset = 0;
    repeat (40) @(negedge clk);
    chk(n_dwc > 0 && n_sps_rst - r0 == 1, "duplex mismatch blocked and resynchronized");
    chk(!lockstep_err && prr_req[1] == prr_req[0], "pair back in step");
    // 4. ground command: triplex for 3000 cycles
    r0 = n_sps_rst; p0 = n_prr;
    @(negedge clk); gnd_valid = 1; gnd_mode = MODE_FEFT_TRIPLEX; gnd_cycles = 3000;
    @(negedge clk); gnd_valid = 0;
    wait_mode(MODE_FEFT_TRIPLEX, 2000);
    chk(ground_forced && mb_mask == 3'b111 && prr_holds(2, 1) && n_prr - p0 == 1, "forced triplex, PRR2 only");
    repeat (20) @(negedge clk);
    @(negedge clk); upset = 3'b100; @(negedge clk); upset = 0;
    repeat (3) @(negedge clk);
    chk(lockstep_err && !dwc_block && lockstep_disagree == 3'b100 && m_req == prr_req[0], "triplex outvotes copy 2");
    r0 = n_sps_rst;
    wait_mode(MODE_FEFT_DUPLEX, 6000);
    chk(!ground_forced && n_sps_rst == r0 && prr_holds(2, 0), "back to duplex, no reset, PRR2 accelerator");
    // 5. double upset
    flip(20, 100); flip(20, 2000);
    @(posedge clk iff sys_reset_req);
    chk(1, "uncorrectable reported");
    // 6. disturb one ConfigMan copy
    @(negedge clk);
    force dut.u_cm.g_core[1].u_core.out.sc_wdata = 32'hFFFF_FFFF;
    force dut.u_cm.g_core[1].u_core.out.sc_we = 1'b1;
    repeat (5) begin
      @(negedge clk);
      chk(dut.u_cm.status == dut.u_cm.core_out[0] && cm_disagree == 3'b010, "ConfigMan copy 1 outvoted");
    end
    release dut.u_cm.g_core[1].u_core.out.sc_wdata;
    release dut.u_cm.g_core[1].u_core.out.sc_we;
    @(negedge clk);
    // every mechanism must have happened
    chk(n_pass > 0, "scrub pass");
    chk(n_corr >= 4, "upset repaired");
    chk(n_unc > 0, "uncorrectable upset");
    chk(n_switch >= 5, "mode switches");
    chk(n_prr > 0, "partial reconfiguration");
    chk(n_dec_wr > 0 && n_bad_dec == 0, "PR writes only into decoupled PRRs");
    chk(n_sps_rst > 0, "SPS reset");
    chk(n_dwc > 0, "duplex detection");
    chk(n_tmr_mask > 0, "triplex masking");
    chk(n_forced > 0, "ground command");
    chk(n_cm_dis > 0, "ConfigMan TMR disagreement");
    chk(n_pause > 0, "scrubber paused for PR");
    chk(int'(upset_count) == n_corr && int'(unc_count) == n_unc, "upset record counts match");
    $display("mechanisms: pass=%0d corr=%0d unc=%0d switch=%0d prr=%0d sps_rst=%0d dwc=%0d tmr=%0d forced=%0d cm_dis=%0d pause=%0d",
             n_pass, n_corr, n_unc, n_switch, n_prr, n_sps_rst, n_dwc, n_tmr_mask, n_forced, n_cm_dis, n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
