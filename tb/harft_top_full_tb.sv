// harft_top_full_tb: one complete operation of harft_top at its default
// size: 7692 configuration frames of 101 words, three PRRs of 400 frames.
// A configuration memory model and a DDR model holding ECC-encoded images
// for every PRR and module surround the design. One upset is injected in a
// static frame; a ground command then forces FEFT-Triplex, so all three PRRs
// are rewritten from DDR (40400 words each) while scrubbing pauses. The test
// checks the repaired word and its upset record, the three PRR images, the
// SYS_CTRL state, and the length of one clean scrub pass over the whole
// device: 7692 * (101 + 5) cycles.
module harft_top_full_tb;
  import harft_pkg::*;
  import harft_tb_pkg::*;
  localparam int N = 3, FR = NUM_FRAMES, WD = WORDS_PER_FRAME, PF = 400, BASE = 4000, STRIDE = 1000;
  localparam int TOT = PF * WD;

  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic scrub_enable = 0;
  icap_req_t icap;
  logic icap_rvalid, ddr_en, ddr_rvalid;
  logic [31:0] icap_rdata, ddr_addr, ddr_rdata;
  logic [31:0] window_len = 32'd100_000_000;
  logic [NUM_MODES-2:0][15:0] thresholds;
  logic gnd_valid = 0;
  harft_mode_e gnd_mode = MODE_SMP;
  logic [31:0] gnd_cycles = 0;
  mb_req_t [N-1:0] prr_req;
  mb_rsp_t [N-1:0] prr_rsp;
  logic [N-1:0] prr_rst_n, prr_decouple, mb_mask, lockstep_disagree;
  mb_req_t m_req;
  mb_rsp_t m_rsp = '0;
  hps_mode_e hps_mode;
  harft_mode_e cur_mode, target_mode;
  logic ground_forced, upset_corrected, sys_reset_req, scrub_pass_done, mode_switched;
  logic prr_reconfigured, sps_reset, lockstep_err, dwc_block;
  logic [2:0] cm_disagree;
  logic [15:0] upset_count, unc_count;
  logic [FRAME_AW-1:0] last_upset_frame;
  logic [WORD_AW-1:0] last_upset_word;
  logic [4:0] last_upset_bit;
  int checks = 0, failures = 0;

  harft_top dut (.*);
  cfg_mem_model #(.FRAMES(FR), .WORDS(WD)) u_mem (.clk, .icap, .rvalid(icap_rvalid), .rdata(icap_rdata));
  ddr_model #(.DEPTH(2 * N * TOT)) u_ddr (.clk, .en(ddr_en), .addr(ddr_addr), .rvalid(ddr_rvalid), .rdata(ddr_rdata));
  for (genvar i = 0; i < N; i++) begin : g_mb
    mb_model u_mb (.clk, .rst_n(rst_n & prr_rst_n[i]), .upset(1'b0), .req(prr_req[i]), .rsp(prr_rsp[i]));
  end

  always #5 clk = ~clk;
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_corr = 0, n_prr = 0;
  always @(posedge clk) if (rst_n) begin
    n_corr <= n_corr + int'(upset_corrected);
    n_prr  <= n_prr + int'(prr_reconfigured);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] f [101];
    int t0, t1;
    bit ok;
    thresholds[0] = 1000; thresholds[1] = 2000; thresholds[2] = 3000; thresholds[3] = 4000;
    #1;
    for (int img = 0; img < 2 * N * PF; img++) begin
      for (int w = 0; w < WD; w++) f[w] = $urandom;
      ecc_encode(f);
      for (int w = 0; w < WD; w++) u_ddr.mem[img * WD + w] = f[w];
    end
    u_mem.mem[7000 * WD + 60][13] = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    scrub_enable = 1;
    repeat (1000) @(negedge clk);
    gnd_valid = 1; gnd_mode = MODE_FEFT_TRIPLEX; gnd_cycles = 32'd50_000_000;
    @(negedge clk); gnd_valid = 0;
    @(posedge clk iff mode_switched);
    repeat (30) @(negedge clk);
    chk(cur_mode == MODE_FEFT_TRIPLEX && mb_mask == 3'b111 && hps_mode == HPS_AMP && prr_decouple == 0, "triplex set up");
    chk(n_prr == 3, "three PRRs reconfigured");
    for (int i = 0; i < N; i++) begin
      ok = 1;
      for (int k = 0; k < TOT; k++)
        if (u_mem.mem[(BASE + i * STRIDE) * WD + k] != u_ddr.mem[(2 * i + 1) * TOT + k]) ok = 0;
      chk(ok, $sformatf("PRR%0d image", i));
    end
    @(posedge clk iff scrub_pass_done);
    chk(n_corr == 1 && u_mem.mem[7000 * WD + 60] == 0, "upset in frame 7000 repaired");
    chk(upset_count == 1 && unc_count == 0 && last_upset_frame == 7000 && last_upset_word == 60 && last_upset_bit == 13,
        "upset record: frame 7000, word 60, bit 13");
    t0 = $time / 10;
    @(posedge clk iff scrub_pass_done);
    t1 = $time / 10;
    chk(t1 - t0 == FR * (WD + 5), $sformatf("full pass %0d cycles", t1 - t0));
    chk(!lockstep_err && m_req == prr_req[0], "triplex MicroBlazes in step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
