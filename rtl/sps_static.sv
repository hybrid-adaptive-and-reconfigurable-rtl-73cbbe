// sps_static: static logic of the soft-processing system (SPS-SL).
//
// Sits between the N partially reconfigurable regions and the AXI4
// interconnect. Each PRR offers the lockstep bus signals of the MicroBlaze it
// may hold. PR glue: a PRR whose `decouple` bit is set (it is being
// reconfigured) has its outputs forced to zero before they reach the voter.
// The hybrid voter then compares/votes the copies selected by `mb_mask`
// (from SYS_CTRL) and the AXI4 mux drives the result onto the interconnect
// and returns responses to the active copies. Reset control: `sps_reset`
// from SYS_CTRL holds every PRR in reset (active-low `prr_rst_n`), which
// resynchronizes the MicroBlazes. `lockstep_err` is registered: it pulses
// one cycle after a voter disagreement, with `disagree` naming the copies.
// The structure follows the design; isolation by zero-forcing and the
// registered error report are this design's choices.
module sps_static
  import harft_pkg::*;
#(
  parameter int unsigned N_PRR = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // PRR side
  input  mb_req_t [N_PRR-1:0]  prr_req,
  output mb_rsp_t [N_PRR-1:0]  prr_rsp,
  output logic [N_PRR-1:0]     prr_rst_n,
  // interconnect side
  output mb_req_t              m_req,
  input  mb_rsp_t              m_rsp,
  // configuration from SYS_CTRL
  input  logic [N_PRR-1:0]     mb_mask,
  input  logic [N_PRR-1:0]     decouple,
  input  logic                 sps_reset,
  // status
  output logic                 lockstep_err,
  output logic [N_PRR-1:0]     disagree,
  output logic                 dwc_block
);
  localparam int unsigned W = $bits(mb_req_t);

  logic [N_PRR-1:0][W-1:0] iso;
  logic [W-1:0]            voted;
  logic [N_PRR-1:0]        dis_c;
  logic                    mis_c;
  logic [N_PRR-1:0]        vmask;

  always_comb begin
    for (int i = 0; i < N_PRR; i++) iso[i] = decouple[i] ? '0 : W'(prr_req[i]);
    // a copy being reconfigured or held in reset takes no part in the vote
    vmask = mb_mask & ~decouple & {N_PRR{~sps_reset}};
  end

  hybrid_voter #(.N(N_PRR), .W(W)) u_voter (
    .in(iso), .mask(vmask), .out(voted), .disagree(dis_c), .mismatch(mis_c)
  );

  sps_axi_mux #(.N(N_PRR)) u_mux (
    .voted_req(mb_req_t'(voted)), .mask(vmask), .mismatch(mis_c),
    .m_req(m_req), .m_rsp(m_rsp), .prr_rsp(prr_rsp), .blocked(dwc_block)
  );

  always_comb prr_rst_n = {N_PRR{~sps_reset}} | ~mb_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lockstep_err <= 1'b0;
      disagree     <= '0;
    end else begin
      lockstep_err <= mis_c;
      disagree     <= dis_c;
    end
  end
endmodule
