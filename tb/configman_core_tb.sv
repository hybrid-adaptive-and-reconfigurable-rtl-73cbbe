// configman_core_tb: one ConfigMan copy with FRAME_ECC, a configuration
// memory model (16 frames) and a DDR model. Checks that injected upsets are
// repaired and recorded, that two repairs cross the first threshold (AMP, no PR), that a
// ground command to FEFT-Duplex rewrites PRR0 and PRR1 from DDR, and that
// the scrubber never touches the ICAP while a PR transfer owns it.
module configman_core_tb;
  import harft_pkg::*;
  import harft_tb_pkg::*;
  localparam int N = 3, FR = 16, WD = 101, PF = 1, BASE = 4, STRIDE = 2, TOT = PF * WD;
  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic scrub_enable = 0;
  logic icap_rvalid, ddr_rvalid, ecc_done, ecc_parity_err;
  logic [31:0] icap_rdata, ddr_rdata;
  logic [SYN_W-1:0] ecc_syndrome;
  logic [31:0] window_len = 32'd1_000_000;
  logic [NUM_MODES-2:0][15:0] thresholds;
  logic gnd_valid = 0;
  harft_mode_e gnd_mode = MODE_SMP;
  logic [31:0] gnd_cycles = 0;
  logic resync_req = 0;
  cm_out_t out;
  int checks = 0, failures = 0;

  configman_core #(.N_PRR(N), .FRAMES(FR), .PRR_FRAMES(PF), .PRR_BASE_FRAME(BASE), .PRR_STRIDE(STRIDE)) dut (.*);
  frame_ecc u_ecc (.clk, .rst_n, .clear(out.ecc_clear), .word_valid(icap_rvalid), .word_data(icap_rdata),
    .done(ecc_done), .syndrome(ecc_syndrome), .parity_err(ecc_parity_err));
  cfg_mem_model #(.FRAMES(FR)) u_mem (.clk, .icap(out.icap), .rvalid(icap_rvalid), .rdata(icap_rdata));
  ddr_model #(.DEPTH(2 * N * TOT)) u_ddr (.clk, .en(out.ddr_en), .addr(out.ddr_addr), .rvalid(ddr_rvalid), .rdata(ddr_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_corr = 0, n_mix = 0, n_prw = 0;
  logic in_pr = 0;
  always @(posedge clk) if (rst_n) begin
    n_corr <= n_corr + int'(out.corrected);
    if (out.icap.en && out.icap.we && int'(out.icap.frame) >= BASE && int'(out.icap.frame) < BASE + N * STRIDE) n_prw <= n_prw + 1;
    if (out.icap.en && out.icap.we && dut.u_pr.busy && int'(out.icap.frame) >= BASE && int'(out.icap.frame) < BASE + N * STRIDE) in_pr <= 1'b1;
    if (out.prr_loaded) in_pr <= 1'b0;
    if (out.icap.en && !out.icap.we && in_pr) n_mix <= n_mix + 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] f [101];
    logic [31:0] g [FR * WD];
    thresholds[0] = 1; thresholds[1] = 10; thresholds[2] = 20; thresholds[3] = 30;
    #1;
    for (int a = 0; a < 2 * N; a++) begin
      for (int w = 0; w < WD; w++) f[w] = $urandom;
      ecc_encode(f);
      for (int w = 0; w < WD; w++) u_ddr.mem[a * WD + w] = f[w];
    end
    for (int i = 0; i < FR * WD; i++) g[i] = u_mem.mem[i];
    u_mem.mem[1 * WD + 9][9] ^= 1'b1;
    u_mem.mem[14 * WD + 99][31] ^= 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    scrub_enable = 1;
    @(posedge clk iff out.pass_done);
    chk(n_corr == 2, "two repairs");
    chk(out.upset_count == 2 && out.unc_count == 0 && out.last_frame == 14 && out.last_word == 99 && out.last_bit == 31,
        "upset record: two repairs, last at frame 14 word 99 bit 31");
    chk(u_mem.mem[1 * WD + 9] == g[1 * WD + 9] && u_mem.mem[14 * WD + 99] == g[14 * WD + 99], "memory repaired");
    repeat (20) @(negedge clk);
    chk(out.cur_mode == MODE_AMP && n_prw == 0, "threshold crossed: AMP without PR");
    @(negedge clk); gnd_valid = 1; gnd_mode = MODE_FEFT_DUPLEX; gnd_cycles = 100000;
    @(negedge clk); gnd_valid = 0;
    @(posedge clk iff out.switch_done);
    @(negedge clk);
    chk(out.cur_mode == MODE_FEFT_DUPLEX && out.forced, "ground command: duplex");
    chk(n_prw == 2 * TOT, "PRR0 and PRR1 rewritten");
    for (int i = 0; i < 2; i++)
      for (int w = 0; w < WD; w++)
        if (u_mem.mem[(BASE + i * STRIDE) * WD + w] != u_ddr.mem[(2 * i + 1) * WD + w]) begin chk(0, "image"); break; end
    chk(n_mix == 0, "scrubber kept off the ICAP during PR");
    @(posedge clk iff out.pass_done);
    chk(n_corr == 2, "rewritten PRRs scrub clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
