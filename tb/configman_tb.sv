// configman_tb: the triplicated ConfigMan with its FRAME_ECC and SYS_CTRL,
// a configuration memory model and a DDR model. Checks a repaired upset, a
// ground command to FEFT-Triplex (all PRRs rewritten, SYS_CTRL mask 111,
// SPS reset pulse, HPS asked for AMP), an uncorrectable double upset, and
// that a disturbed copy is outvoted and named by `cm_disagree`.
module configman_tb;
  import harft_pkg::*;
  import harft_tb_pkg::*;
  localparam int N = 3, FR = 16, WD = 101, PF = 1, BASE = 4, STRIDE = 2, TOT = PF * WD;
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
  logic resync_req = 0;
  logic [N-1:0] mb_mask, decouple;
  logic sps_reset;
  hps_mode_e hps_mode;
  cm_out_t status;
  logic [2:0] cm_disagree;
  int checks = 0, failures = 0;

  configman #(.N_PRR(N), .FRAMES(FR), .PRR_FRAMES(PF), .PRR_BASE_FRAME(BASE), .PRR_STRIDE(STRIDE), .RESET_CYCLES(5)) dut (.*);
  cfg_mem_model #(.FRAMES(FR)) u_mem (.clk, .icap, .rvalid(icap_rvalid), .rdata(icap_rdata));
  ddr_model #(.DEPTH(2 * N * TOT)) u_ddr (.clk, .en(ddr_en), .addr(ddr_addr), .rvalid(ddr_rvalid), .rdata(ddr_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_corr = 0, n_unc = 0, rst_len = 0, n_dis = 0;
  always @(posedge clk) if (rst_n) begin
    n_corr  <= n_corr + int'(status.corrected);
    n_unc   <= n_unc + int'(status.uncorrectable);
    rst_len <= rst_len + int'(sps_reset);
    n_dis   <= n_dis + int'(cm_disagree != 0);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] f [101];
    thresholds[0] = 100; thresholds[1] = 200; thresholds[2] = 300; thresholds[3] = 400;
    #1;
    for (int a = 0; a < 2 * N; a++) begin
      for (int w = 0; w < WD; w++) f[w] = $urandom;
      ecc_encode(f);
      for (int w = 0; w < WD; w++) u_ddr.mem[a * WD + w] = f[w];
    end
    u_mem.mem[2 * WD + 50][17] ^= 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    scrub_enable = 1;
    @(posedge clk iff status.pass_done);
    chk(n_corr == 1 && u_mem.mem[2 * WD + 50] == 0, "upset repaired");
    chk(mb_mask == 0 && hps_mode == HPS_SMP && status.cur_mode == MODE_SMP, "starts in SMP");
    @(negedge clk); gnd_valid = 1; gnd_mode = MODE_FEFT_TRIPLEX; gnd_cycles = 100000;
    @(negedge clk); gnd_valid = 0;
    @(posedge clk iff status.switch_done);
    repeat (10) @(negedge clk);
    chk(mb_mask == 3'b111 && decouple == 0 && hps_mode == HPS_AMP, "SYS_CTRL set for triplex");
    chk(rst_len == 5, $sformatf("SPS reset held %0d cycles", rst_len));
    for (int i = 0; i < N; i++)
      for (int w = 0; w < WD; w++)
        if (u_mem.mem[(BASE + i * STRIDE) * WD + w] != u_ddr.mem[(2 * i + 1) * WD + w]) begin chk(0, "PRR image"); break; end
    chk(n_dis == 0, "copies agree");
    u_mem.mem[9 * WD + 3][3] ^= 1'b1;
    u_mem.mem[9 * WD + 4][4] ^= 1'b1;
    @(posedge clk iff status.uncorrectable);
    chk(1, "uncorrectable");
    @(negedge clk);
    force dut.g_core[2].u_core.out.sc_we = 1'b1;
    force dut.g_core[2].u_core.out.sc_addr = SC_MB_MASK;
    force dut.g_core[2].u_core.out.sc_wdata = 32'h0;
    repeat (3) begin
      @(negedge clk);
      chk(cm_disagree == 3'b100, "copy 2 named");
    end
    release dut.g_core[2].u_core.out.sc_we;
    release dut.g_core[2].u_core.out.sc_addr;
    release dut.g_core[2].u_core.out.sc_wdata;
    @(negedge clk);
    chk(mb_mask == 3'b111, "disturbed copy outvoted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
