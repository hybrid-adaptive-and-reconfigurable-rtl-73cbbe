// tmr_voter_tb: random words with zero, one or two copies corrupted; checks
// the voted word against a bitwise majority worked out here and the
// per-copy disagreement flags.
module tmr_voter_tb;
  localparam int W = 37;
  logic [W-1:0] in0, in1, in2, out;
  logic [2:0] disagree;
  int checks = 0, failures = 0;
  logic clk = 0;

  tmr_voter #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, e;
    logic [W-1:0] exp_out;
    for (int t = 0; t < 3000; t++) begin
      v = {$urandom, $urandom};
      in0 = v; in1 = v; in2 = v;
      e = {$urandom, $urandom} | W'(1);
      case (t % 4)
        1: in0 = v ^ e;
        2: in1 = v ^ e;
        3: in2 = v ^ e;
        default: ;
      endcase
      #1;
      checks++;
      if (out != v) begin failures++; $display("FAIL single upset not masked t=%0d", t); end
      checks++;
      if (disagree != ((t % 4 == 0) ? 3'b000 : 3'b001 << ((t % 4) - 1))) begin
        failures++; $display("FAIL disagree=%b t=%0d", disagree, t);
      end
      // two different corruptions: reference majority per bit
      in0 = {$urandom, $urandom}; in1 = {$urandom, $urandom}; in2 = {$urandom, $urandom};
      #1;
      for (int b = 0; b < W; b++) exp_out[b] = (int'(in0[b]) + int'(in1[b]) + int'(in2[b])) >= 2;
      checks++;
      if (out != exp_out) begin failures++; $display("FAIL majority"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
