// hybrid_voter_tb: drives N=3 copies under every mask (none, simplex,
// duplex, triplex, any PRR subset) with identical and with corrupted
// inputs and checks the output and flags against rules worked out here:
// one copy passes through, two copies compare (primary wins, mismatch
// flagged), three copies give the majority and flag the odd one.
module hybrid_voter_tb;
  localparam int N = 3, W = 40;
  logic [N-1:0][W-1:0] in;
  logic [N-1:0] mask, disagree;
  logic [W-1:0] out;
  logic mismatch;
  int checks = 0, failures = 0;
  logic clk = 0;

  hybrid_voter #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] eo, input logic [N-1:0] ed, input string what);
    checks++;
    if (out !== eo || disagree !== ed || mismatch !== |ed) begin
      failures++;
      $display("FAIL %s mask=%b out=%h exp=%h dis=%b exp=%b", what, mask, out, eo, disagree, ed);
    end
  endtask

  initial begin
    logic [W-1:0] v, e;
    int prim, bad, cnt;
    for (int t = 0; t < 2000; t++) begin
      mask = N'(t % 8);
      v = {$urandom, $urandom};
      e = {$urandom, $urandom} | W'(1);
      for (int i = 0; i < N; i++) in[i] = v;
      #1;
      check(mask == 0 ? '0 : v, '0, "agree");
      cnt = $countones(mask);
      prim = -1;
      for (int i = N - 1; i >= 0; i--) if (mask[i]) prim = i;
      // corrupt one active copy
      if (cnt > 0) begin
        bad = -1;
        for (int i = 0; i < N; i++) if (mask[i] && bad < 0 && ($urandom_range(0, 1) == 1 || i == N - 1)) bad = i;
        if (bad < 0) bad = prim;
        in[bad] = v ^ e;
        #1;
        if (cnt == 1)      check(v ^ e, '0, "simplex");
        else if (cnt == 2) begin
          if (bad == prim) check(v ^ e, mask & ~(N'(1) << prim), "duplex primary bad");
          else             check(v, N'(1) << bad, "duplex check bad");
        end else           check(v, N'(1) << bad, "triplex");
        // an inactive copy must not matter
        for (int i = 0; i < N; i++) if (!mask[i]) in[i] = ~v;
        #1;
        checks++;
        if ((disagree & ~mask) != 0) begin failures++; $display("FAIL inactive copy flagged"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
