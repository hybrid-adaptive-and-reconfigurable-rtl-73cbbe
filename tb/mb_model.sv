// mb_model: behavioural stand-in for a MicroBlaze placed in a PRR (vendor
// soft processor, not part of this design). It produces the lockstep bus
// signals of an instruction and a data AXI4-Lite master as a fixed function
// of an internal step counter, so copies released from reset together stay
// identical cycle by cycle. `upset` flips a counter bit, making this copy
// diverge from its partners until its next reset.
module mb_model
  import harft_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    upset,
  output mb_req_t req,
  input  mb_rsp_t rsp
);
  logic [31:0] step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step <= '0;
    else        step <= (step + 32'd1) ^ (upset ? 32'h0000_0100 : 32'h0);
  end

  always_comb begin
    req            = '0;
    req.ip.arvalid = 1'b1;
    req.ip.araddr  = {step[29:0], 2'b00};
    req.ip.rready  = 1'b1;
    req.dp.awvalid = step[0];
    req.dp.awaddr  = 32'h4000_0000 | (step << 2);
    req.dp.wvalid  = step[0];
    req.dp.wdata   = step * 32'h9E37_79B9 ^ (rsp.dp.rvalid ? rsp.dp.rdata : 32'h0);
    req.dp.wstrb   = 4'hF;
    req.dp.bready  = 1'b1;
  end
endmodule
