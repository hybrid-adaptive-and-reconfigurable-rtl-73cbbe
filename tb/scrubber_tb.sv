// scrubber_tb: scrubber + FRAME_ECC + a behavioural configuration memory of
// 24 frames filled with valid random codewords. Upsets are injected: single
// bits in a data position, a check-bit position and the parity bit, and a
// double upset. After one pass the memory must equal the golden copy except
// for the double-upset frame, each repair must report the injected location,
// the double upset must be reported as uncorrectable, and a clean pass must
// take exactly FRAMES*(WORDS+5) cycles. Pausing must stop ICAP traffic.
module scrubber_tb;
  import harft_pkg::*;
  import harft_tb_pkg::*;
  localparam int FR = 24, WD = 101;

  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic enable = 0, pause = 0, idle;
  icap_req_t icap;
  logic icap_rvalid;
  logic [31:0] icap_rdata;
  logic ecc_clear, ecc_done, ecc_parity_err;
  logic [SYN_W-1:0] ecc_syndrome;
  logic corrected, uncorrectable, pass_done;
  logic [FRAME_AW-1:0] err_frame;
  logic [WORD_AW-1:0] err_word;
  logic [4:0] err_bit;
  int checks = 0, failures = 0;

  scrubber #(.FRAMES(FR), .WORDS(WD)) dut (.*);
  frame_ecc #(.WORDS(WD)) u_ecc (.clk, .rst_n, .clear(ecc_clear), .word_valid(icap_rvalid),
    .word_data(icap_rdata), .done(ecc_done), .syndrome(ecc_syndrome), .parity_err(ecc_parity_err));
  cfg_mem_model #(.FRAMES(FR), .WORDS(WD)) u_mem (.clk, .icap, .rvalid(icap_rvalid), .rdata(icap_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] golden [FR * WD];
  int n_corr = 0, n_unc = 0;
  int exp_f [3] = '{3, 7, 12};
  int exp_p [3] = '{1234, 64, 0};
  always @(posedge clk) begin
    if (rst_n && corrected) begin
      checks++;
      if (n_corr >= 3 || int'(err_frame) != exp_f[n_corr] || int'(err_word) * 32 + int'(err_bit) != exp_p[n_corr]) begin
        failures++;
        $display("FAIL repair %0d at frame %0d pos %0d", n_corr, err_frame, err_word * 32 + err_bit);
      end
      n_corr++;
    end
    if (rst_n && uncorrectable) begin
      checks++;
      if (err_frame != 15) begin failures++; $display("FAIL uncorrectable frame %0d", err_frame); end
      n_unc++;
    end
  end

  initial begin
    logic [31:0] f [101];
    int t0, t1, busy;
    #1;
    for (int fr = 0; fr < FR; fr++) begin
      for (int w = 0; w < WD; w++) f[w] = $urandom;
      ecc_encode(f);
      for (int w = 0; w < WD; w++) begin u_mem.mem[fr * WD + w] = f[w]; golden[fr * WD + w] = f[w]; end
    end
    for (int i = 0; i < 3; i++) u_mem.mem[exp_f[i] * WD + exp_p[i] / 32][exp_p[i] % 32] ^= 1'b1;
    u_mem.mem[15 * WD + 40][3] ^= 1'b1;
    u_mem.mem[15 * WD + 77][30] ^= 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    @(posedge clk iff pass_done);
    checks++;
    if (n_corr != 3 || n_unc != 1) begin failures++; $display("FAIL counts corr=%0d unc=%0d", n_corr, n_unc); end
    for (int i = 0; i < FR * WD; i++) begin
      if (i / WD == 15) continue;
      checks++;
      if (u_mem.mem[i] != golden[i]) begin failures++; $display("FAIL word %0d not repaired", i); end
    end
    // restore the double-upset frame, then time one clean pass
    for (int w = 0; w < WD; w++) u_mem.mem[15 * WD + w] = golden[15 * WD + w];
    @(posedge clk iff pass_done);
    t0 = $time;
    @(posedge clk iff pass_done);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != FR * (WD + 5)) begin failures++; $display("FAIL pass took %0d cycles, expected %0d", (t1 - t0) / 10, FR * (WD + 5)); end
    // pause: scrubber must stop at a frame boundary and leave the ICAP alone
    repeat (37) @(posedge clk);
    pause = 1;
    repeat (WD + 6) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL not idle after pause"); end
    busy = 0;
    repeat (300) begin @(posedge clk); if (icap.en) busy++; end
    checks++;
    if (busy != 0) begin failures++; $display("FAIL ICAP used while paused"); end
    pause = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (idle) begin failures++; $display("FAIL did not resume"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
