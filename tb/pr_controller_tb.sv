// pr_controller_tb: PR controller with 3 PRRs of 2 frames each, a DDR model
// holding a distinct image per (PRR, module) and a configuration memory
// model. Walks SMP -> AMP -> Triplex -> Simplex -> Duplex and a resync
// request, and checks: only changed PRRs are rewritten (ICAP write counts),
// each rewritten PRR holds the right image, every copy happens with that PRR
// decoupled, the SPS reset is written exactly when MicroBlazes are added,
// the MicroBlaze mask and HPS mode written to SYS_CTRL, and the copy rate
// of one word per cycle: from grant to the loaded pulse PRR_FRAMES*WORDS + 3
// cycles (grant seen, one DDR read latency, decouple release).
module pr_controller_tb;
  import harft_pkg::*;
  localparam int N = 3, WD = 101, PF = 2, BASE = 4, STRIDE = 3, FR = 16;
  localparam int TOT = PF * WD;

  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  harft_mode_e target_mode = MODE_SMP, cur_mode;
  logic resync_req = 0, busy, switch_done, prr_loaded, sps_reset_issued;
  logic icap_req, icap_grant = 0;
  icap_req_t icap;
  logic ddr_en, ddr_rvalid;
  logic [31:0] ddr_addr, ddr_rdata;
  logic sc_we;
  logic [1:0] sc_addr;
  logic [31:0] sc_wdata;
  logic icap_rvalid;
  logic [31:0] icap_rdata;
  int checks = 0, failures = 0;

  pr_controller #(.N_PRR(N), .WORDS(WD), .PRR_FRAMES(PF), .PRR_BASE_FRAME(BASE), .PRR_STRIDE(STRIDE)) dut (.*);
  ddr_model #(.DEPTH(2 * N * TOT)) u_ddr (.clk, .en(ddr_en), .addr(ddr_addr), .rvalid(ddr_rvalid), .rdata(ddr_rdata));
  cfg_mem_model #(.FRAMES(FR), .WORDS(WD)) u_mem (.clk, .icap, .rvalid(icap_rvalid), .rdata(icap_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grant the ICAP 3 cycles after it is requested (scrubber finishing a frame)
  int req_age = 0;
  always @(posedge clk) begin
    req_age    <= icap_req ? req_age + 1 : 0;
    icap_grant <= icap_req && req_age >= 2;
  end

  // SYS_CTRL shadow and bookkeeping
  logic [N-1:0] dec = 0, mask_w = 0;
  int resets = 0, hps_w = -1, icap_writes = 0, bad_dec = 0;
  int copy_start = 0, copy_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (sc_we) case (sc_addr)
      SC_DECOUPLE: dec <= sc_wdata[N-1:0];
      SC_MB_MASK:  mask_w <= sc_wdata[N-1:0];
      SC_RESET:    resets <= resets + 1;
      SC_HPS_MODE: hps_w <= int'(sc_wdata[0]);
      default: ;
    endcase
    if (icap.en && icap.we) begin
      icap_writes <= icap_writes + 1;
      if (!dec[(int'(icap.frame) - BASE) / STRIDE]) bad_dec <= bad_dec + 1;
    end
    if (icap_grant && !$past(icap_grant)) copy_start <= $time / 10;
    if (prr_loaded) copy_len <= $time / 10 - copy_start;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic go(input harft_mode_e m);
    @(negedge clk); target_mode = m;
    @(posedge clk iff switch_done);
    @(negedge clk);
    chk(cur_mode == m && !busy, $sformatf("reached %s", m.name()));
  endtask

  function automatic bit prr_holds(int i, int rm);
    for (int f = 0; f < PF; f++)
      for (int w = 0; w < WD; w++)
        if (u_mem.mem[(BASE + i * STRIDE + f) * WD + w] != u_ddr.mem[(2 * i + rm) * TOT + f * WD + w]) return 0;
    return 1;
  endfunction

  initial begin
    int w0, r0;
    #1;
    for (int a = 0; a < 2 * N * TOT; a++) u_ddr.mem[a] = 32'hA500_0000 ^ (a * 32'h0101_0007);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    w0 = icap_writes; r0 = resets;
    go(MODE_AMP);
    chk(icap_writes == w0 && resets == r0 && hps_w == 1 && mask_w == 0, "SMP->AMP: no PR, HPS to AMP");
    w0 = icap_writes; r0 = resets;
    go(MODE_FEFT_TRIPLEX);
    chk(icap_writes - w0 == 3 * TOT, "AMP->Triplex rewrites 3 PRRs");
    chk(prr_holds(0, 1) && prr_holds(1, 1) && prr_holds(2, 1), "triplex images");
    chk(resets - r0 == 1 && mask_w == 3'b111 && dec == 0, "triplex: reset, mask, decouple cleared");
    chk(copy_len == TOT + 3, $sformatf("copy took %0d cycles", copy_len));
    w0 = icap_writes; r0 = resets;
    go(MODE_FEFT_SIMPLEX);
    chk(icap_writes - w0 == 2 * TOT, "Triplex->Simplex rewrites 2 PRRs");
    chk(prr_holds(0, 1) && prr_holds(1, 0) && prr_holds(2, 0), "simplex images");
    chk(resets == r0 && mask_w == 3'b001, "fewer processors: no reset");
    w0 = icap_writes; r0 = resets;
    go(MODE_FEFT_DUPLEX);
    chk(icap_writes - w0 == TOT && prr_holds(1, 1) && prr_holds(2, 0), "Simplex->Duplex rewrites PRR1 only");
    chk(resets - r0 == 1 && mask_w == 3'b011, "more processors: reset");
    go(MODE_SMP);
    chk(hps_w == 0 && mask_w == 0 && prr_holds(0, 0) && prr_holds(1, 0), "back to SMP");
    r0 = resets;
    @(negedge clk); resync_req = 1; @(negedge clk); resync_req = 0;
    repeat (5) @(negedge clk);
    chk(resets - r0 == 1, "resync request resets the SPS");
    chk(bad_dec == 0, "every PR write went to a decoupled PRR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
