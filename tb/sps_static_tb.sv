// sps_static_tb: three lockstep MicroBlaze stand-ins in the PRRs feed the
// SPS static logic. Checks triplex masking of an upset copy, resync by the
// SPS reset, duplex detection with the bus blocked, exclusion of a
// decoupled PRR from the vote, simplex pass-through, the idle port with no
// MicroBlaze, and response fan-out to the active PRRs only.
module sps_static_tb;
  import harft_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  mb_req_t [N-1:0] prr_req;
  mb_rsp_t [N-1:0] prr_rsp;
  logic [N-1:0] prr_rst_n, mb_mask = 0, decouple = 0, disagree, upset = 0;
  mb_req_t m_req;
  mb_rsp_t m_rsp;
  logic sps_reset = 0, lockstep_err, dwc_block;
  int checks = 0, failures = 0;

  sps_static #(.N_PRR(N)) dut (.*);
  for (genvar i = 0; i < N; i++) begin : g_mb
    mb_model u_mb (.clk, .rst_n(rst_n & prr_rst_n[i]), .upset(upset[i]), .req(prr_req[i]), .rsp(prr_rsp[i]));
  end

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(negedge clk) m_rsp <= mb_rsp_t'({$urandom, $urandom, $urandom});

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic resync();
    @(negedge clk); sps_reset = 1;
    repeat (3) @(negedge clk);
    sps_reset = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // triplex
    mb_mask = 3'b111;
    resync();
    repeat (5) @(negedge clk);
    chk(m_req == prr_req[0] && !lockstep_err && !dwc_block, "triplex agree");
    for (int i = 0; i < N; i++) chk(prr_rsp[i] == m_rsp, "triplex fan-out");
    @(negedge clk); upset = 3'b100; @(negedge clk); upset = 0;
    repeat (2) @(negedge clk);
    chk(prr_req[2] != prr_req[0], "upset took effect");
    chk(m_req == prr_req[0] && lockstep_err && disagree == 3'b100 && !dwc_block, "triplex masks copy 2");
    resync();
    repeat (2) @(negedge clk);
    chk(!lockstep_err && prr_req[2] == prr_req[0], "resync by reset");
    // decoupled PRR leaves the vote
    decouple = 3'b001;
    @(negedge clk); upset = 3'b010; @(negedge clk); upset = 0;
    repeat (2) @(negedge clk);
    chk(dwc_block && m_req.dp.wvalid == 0 && m_req.ip.arvalid == 0, "decoupled: 1 vs 2 compared");
    decouple = 0;
    resync();
    // duplex
    mb_mask = 3'b011;
    resync();
    repeat (2) @(negedge clk);
    chk(m_req == prr_req[0] && !dwc_block && prr_rsp[2] == '0 && prr_rsp[1] == m_rsp, "duplex agree");
    @(negedge clk); upset = 3'b010; @(negedge clk); upset = 0;
    repeat (2) @(negedge clk);
    chk(dwc_block && lockstep_err && !m_req.ip.arvalid && !m_req.dp.awvalid, "duplex detects and blocks");
    // simplex
    mb_mask = 3'b001;
    upset = 3'b001; @(negedge clk); upset = 0;
    repeat (2) @(negedge clk);
    chk(m_req == prr_req[0] && !lockstep_err, "simplex pass-through");
    chk(prr_rst_n[2] && prr_rst_n[1], "accelerator PRRs not reset");
    // no MicroBlaze
    mb_mask = 0;
    @(negedge clk);
    chk(m_req == '0 && prr_rsp[0] == '0, "idle with no MicroBlaze");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
