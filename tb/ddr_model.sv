// ddr_model: behavioural model of the DDR memory that stores partial
// bitstreams (external memory, not part of the design). Word addressed,
// DEPTH words; a read returns data one cycle after `en` with `rvalid`.
// Testbenches fill `mem` directly.
module ddr_model #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic        clk,
  input  logic        en,
  input  logic [31:0] addr,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    rvalid = 1'b0;
    rdata  = '0;
  end

  always_ff @(posedge clk) begin
    rvalid <= en;
    if (en) rdata <= (int'(addr) < DEPTH) ? mem[addr] : 32'hDEAD_BEEF;
  end
endmodule
