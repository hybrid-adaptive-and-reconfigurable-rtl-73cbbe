// sys_ctrl_tb: writes every SYS_CTRL register and checks the outputs, the
// reset values, and that a write to the reset register holds `sps_reset`
// for exactly RESET_CYCLES cycles (and restarts the count if rewritten).
module sys_ctrl_tb;
  import harft_pkg::*;
  localparam int N = 3, RC = 16;
  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic we = 0;
  logic [1:0] addr = 0;
  logic [31:0] wdata = 0;
  logic [N-1:0] mb_mask, decouple;
  logic sps_reset;
  hps_mode_e hps_mode;
  int checks = 0, failures = 0;

  sys_ctrl #(.N_PRR(N), .RESET_CYCLES(RC)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d;
    @(negedge clk); we = 0;
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(mb_mask == 0 && decouple == 0 && !sps_reset && hps_mode == HPS_SMP, "reset values");
    for (int v = 0; v < 8; v++) begin
      wr(SC_MB_MASK, v);
      chk(mb_mask == N'(v), "mb_mask");
      wr(SC_DECOUPLE, 7 - v);
      chk(decouple == N'(7 - v) && mb_mask == N'(v), "decouple");
    end
    wr(SC_HPS_MODE, 1);
    chk(hps_mode == HPS_AMP, "hps amp");
    wr(SC_HPS_MODE, 0);
    chk(hps_mode == HPS_SMP, "hps smp");
    // reset pulse length
    @(negedge clk); we = 1; addr = SC_RESET; wdata = 1;
    @(negedge clk); we = 0;
    len = 0;
    while (sps_reset) begin len++; @(negedge clk); end
    chk(len == RC, $sformatf("reset length %0d", len));
    // rewrite while active restarts the count
    wr(SC_RESET, 1);
    repeat (5) @(negedge clk);
    @(negedge clk); we = 1; addr = SC_RESET;
    @(negedge clk); we = 0;
    len = 0;
    while (sps_reset) begin len++; @(negedge clk); end
    chk(len == RC, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
