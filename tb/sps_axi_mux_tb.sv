// sps_axi_mux_tb: checks that the voted request reaches the interconnect
// when MicroBlazes are active, that the port is idle with none, that a
// duplex mismatch blocks every valid/ready toward the interconnect while a
// triplex mismatch does not, and that responses reach exactly the PRRs in
// the mask.
module sps_axi_mux_tb;
  import harft_pkg::*;
  localparam int N = 3;
  mb_req_t voted_req, m_req;
  mb_rsp_t m_rsp;
  mb_rsp_t [N-1:0] prr_rsp;
  logic [N-1:0] mask;
  logic mismatch, blocked;
  int checks = 0, failures = 0;
  logic clk = 0;

  sps_axi_mux #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mb_req_t rand_req();
    logic [$bits(mb_req_t)-1:0] r;
    for (int i = 0; i < $bits(mb_req_t); i += 32) r = (r << 32) | $bits(r)'($urandom);
    return mb_req_t'(r);
  endfunction

  initial begin
    int cnt;
    bit exp_block;
    for (int t = 0; t < 2000; t++) begin
      voted_req = rand_req();
      m_rsp     = mb_rsp_t'(rand_req());
      mask      = N'($urandom_range(0, 7));
      mismatch  = $urandom_range(0, 1);
      #1;
      cnt = $countones(mask);
      exp_block = (cnt == 2) && mismatch;
      checks++;
      if (blocked != exp_block) begin failures++; $display("FAIL blocked"); end
      checks++;
      if (cnt == 0) begin
        if (m_req != '0) begin failures++; $display("FAIL idle port"); end
      end else if (exp_block) begin
        if (m_req.ip.arvalid || m_req.ip.awvalid || m_req.ip.wvalid || m_req.ip.rready || m_req.ip.bready ||
            m_req.dp.arvalid || m_req.dp.awvalid || m_req.dp.wvalid || m_req.dp.rready || m_req.dp.bready ||
            m_req.dp.awaddr != voted_req.dp.awaddr) begin
          failures++; $display("FAIL duplex block");
        end
      end else if (m_req != voted_req) begin
        failures++; $display("FAIL pass");
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (prr_rsp[i] != (mask[i] ? m_rsp : '0)) begin failures++; $display("FAIL rsp %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
