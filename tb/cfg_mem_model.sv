// cfg_mem_model: behavioural model of the FPGA configuration memory behind the
// ICAP word port (not synthesizable logic of the design; the real memory is
// part of the device). FRAMES frames of WORDS 32-bit words, all zero after
// start-up (a valid codeword). A read returns its word one cycle later with
// `rvalid`; a write takes effect at the clock edge. Testbenches flip bits in
// `mem` directly to model upsets and count `writes`/`reads`.
module cfg_mem_model
  import harft_pkg::*;
#(
  parameter int unsigned FRAMES = 64,
  parameter int unsigned WORDS  = 101
) (
  input  logic        clk,
  input  icap_req_t   icap,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [FRAMES * WORDS];
  int unsigned writes = 0;
  int unsigned reads  = 0;

  initial begin
    for (int i = 0; i < FRAMES * WORDS; i++) mem[i] = '0;
    rvalid = 1'b0;
    rdata  = '0;
  end

  always_ff @(posedge clk) begin
    rvalid <= icap.en && !icap.we;
    if (icap.en) begin
      if (icap.we) begin
        mem[int'(icap.frame) * WORDS + int'(icap.word)] <= icap.wdata;
        writes <= writes + 1;
      end else begin
        rdata <= mem[int'(icap.frame) * WORDS + int'(icap.word)];
        reads <= reads + 1;
      end
    end
  end
endmodule
