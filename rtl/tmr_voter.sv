// tmr_voter: bitwise two-out-of-three majority voter.
//
// Votes the outputs of the three lockstepped ConfigMan copies so that a
// single upset copy cannot reach the ICAP, the DDR port or SYS_CTRL.
// `disagree[i]` is high while copy i differs from the voted word, which
// identifies the faulty copy. Purely combinational; W is the word width.
module tmr_voter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  output logic [W-1:0] out,
  output logic [2:0]   disagree
);
  always_comb begin
    out         = (in0 & in1) | (in1 & in2) | (in0 & in2);
    disagree[0] = (in0 != out);
    disagree[1] = (in1 != out);
    disagree[2] = (in2 != out);
  end
endmodule
