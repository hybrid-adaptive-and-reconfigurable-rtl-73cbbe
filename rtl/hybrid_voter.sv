// hybrid_voter: comparator/voter over the lockstep outputs of N PRRs.
//
// `mask` marks the PRRs that hold a MicroBlaze in lockstep. Each output bit is
// the majority of that bit over the active copies. With one active copy this
// is a pass-through (simplex); with two it is a compare, ties going to the
// lowest-numbered active PRR (the primary) and raising `mismatch` (duplex);
// with three it is a majority vote that masks one faulty copy (triplex).
// `disagree[i]` flags an active copy that differs from the output, and
// `mismatch` is high when any does. Combinational.
module hybrid_voter #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 8
) (
  input  logic [N-1:0][W-1:0] in,
  input  logic [N-1:0]        mask,
  output logic [W-1:0]        out,
  output logic [N-1:0]        disagree,
  output logic                mismatch
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] active;
  logic [N-1:0]  primary;   // one-hot lowest active PRR

  always_comb begin
    active  = '0;
    primary = '0;
    for (int i = 0; i < N; i++) begin
      if (mask[i]) begin
        if (active == '0) primary[i] = 1'b1;
        active = active + CW'(1);
      end
    end
  end

  always_comb begin
    logic [CW-1:0] ones;
    logic          pbit;
    for (int b = 0; b < W; b++) begin
      ones = '0;
      pbit = 1'b0;
      for (int i = 0; i < N; i++) begin
        if (mask[i] && in[i][b]) ones = ones + CW'(1);
        if (primary[i]) pbit = in[i][b];
      end
      if ({1'b0, ones} << 1 > {1'b0, active})       out[b] = 1'b1;
      else if ({1'b0, ones} << 1 == {1'b0, active}) out[b] = pbit & (active != '0);
      else                                           out[b] = 1'b0;
    end
    for (int i = 0; i < N; i++) disagree[i] = mask[i] && (in[i] != out);
    mismatch = |disagree;
  end
endmodule
