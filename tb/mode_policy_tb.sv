// mode_policy_tb: windows of 100 cycles, thresholds 2/5/9/14. Drives known
// numbers of upsets per window and checks the mode stepped to: immediate
// escalation inside a window (3 -> AMP, 6 -> FEFT-Simplex, 15 ->
// FEFT-Triplex), de-escalation only at the window end (10 -> Duplex, 0 ->
// SMP), and a ground command that forces Triplex for 50 cycles and then
// hands back to the adaptive choice.
module mode_policy_tb;
  import harft_pkg::*;
  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic fault = 0;
  logic [31:0] window_len = 100;
  logic [NUM_MODES-2:0][15:0] thresholds;
  logic gnd_valid = 0;
  harft_mode_e gnd_mode = MODE_SMP;
  logic [31:0] gnd_cycles = 0;
  harft_mode_e target_mode;
  logic forced;
  logic [15:0] window_count;
  int checks = 0, failures = 0;
  int c = -1;

  mode_policy dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle count since reset release, and the fault schedule
  always @(posedge clk) if (rst_n) c <= c + 1;
  always @(negedge clk) begin
    fault <= (c >= 110 && c < 113) || (c >= 210 && c < 216) || (c >= 310 && c < 325) ||
             (c >= 410 && c < 420);
    gnd_valid  <= (c == 650);
    gnd_mode   <= MODE_FEFT_TRIPLEX;
    gnd_cycles <= 50;
  end

  task automatic expect_at(input int cyc, input harft_mode_e m, input logic f);
    wait (c == cyc);
    @(negedge clk);
    checks++;
    if (target_mode != m || forced != f) begin
      failures++;
      $display("FAIL cycle %0d: mode %s forced %0b, expected %s %0b", cyc, target_mode.name(), forced, m.name(), f);
    end
  endtask

  initial begin
    thresholds[0] = 2; thresholds[1] = 5; thresholds[2] = 9; thresholds[3] = 14;
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_at(50,  MODE_SMP, 0);
    expect_at(116, MODE_AMP, 0);
    expect_at(150, MODE_AMP, 0);
    expect_at(220, MODE_FEFT_SIMPLEX, 0);
    expect_at(330, MODE_FEFT_TRIPLEX, 0);
    expect_at(450, MODE_FEFT_TRIPLEX, 0);
    expect_at(510, MODE_FEFT_DUPLEX, 0);
    expect_at(590, MODE_FEFT_DUPLEX, 0);
    expect_at(610, MODE_SMP, 0);
    expect_at(655, MODE_FEFT_TRIPLEX, 1);
    expect_at(690, MODE_FEFT_TRIPLEX, 1);
    expect_at(710, MODE_SMP, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
