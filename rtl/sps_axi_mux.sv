// sps_axi_mux: AXI4 multiplexer of the SPS static logic.
//
// Puts the voted lockstep request of the active MicroBlazes (instruction and
// data AXI4-Lite masters) onto the interconnect, and fans the interconnect's
// responses back to every PRR in `mask`, so the lockstepped copies see
// identical inputs. PRRs outside `mask` (accelerators or empty) receive an
// all-zero response. With no MicroBlaze active the master port is idle.
// In duplex (two active copies) a compare mismatch blocks the request: all
// valid/ready outputs toward the interconnect are forced low and `blocked`
// is raised, since a duplex pair can detect but not mask an error.
// Combinational.
module sps_axi_mux
  import harft_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  mb_req_t          voted_req,
  input  logic [N-1:0]     mask,
  input  logic             mismatch,
  output mb_req_t          m_req,
  input  mb_rsp_t          m_rsp,
  output mb_rsp_t [N-1:0]  prr_rsp,
  output logic             blocked
);
  function automatic axil_req_t kill_valids(axil_req_t r);
    axil_req_t k = r;
    k.awvalid = 1'b0;
    k.wvalid  = 1'b0;
    k.arvalid = 1'b0;
    k.bready  = 1'b0;
    k.rready  = 1'b0;
    return k;
  endfunction

  always_comb begin
    int unsigned active;
    active = 0;
    for (int i = 0; i < N; i++) active += int'(mask[i]);
    blocked = (active == 2) && mismatch;
    if (active == 0) begin
      m_req = '0;
    end else if (blocked) begin
      m_req.ip = kill_valids(voted_req.ip);
      m_req.dp = kill_valids(voted_req.dp);
    end else begin
      m_req = voted_req;
    end
    for (int i = 0; i < N; i++) prr_rsp[i] = mask[i] ? m_rsp : '0;
  end
endmodule
