// frame_ecc_tb: checks the frame syndrome against a bit-by-bit reference for
// clean frames, frames with one flipped bit (every kind of position: data,
// check, parity) and frames with two flipped bits. Also checks that `done`
// rises exactly one cycle after the last of the 101 words.
module frame_ecc_tb;
  import harft_pkg::*;
  import harft_tb_pkg::*;

  logic clk = 0, rst_n = 1;
  // A falling edge applies the asynchronous reset before the first clock.
  initial #1 rst_n = 1'b0;
  logic clear = 0, word_valid = 0;
  logic [31:0] word_data = '0;
  logic done, parity_err;
  logic [SYN_W-1:0] syndrome;
  int checks = 0, failures = 0;

  frame_ecc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input logic [31:0] f [101], input string what);
    int s; bit p;
    ref_syndrome(f, s, p);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int w = 0; w < 101; w++) begin
      word_valid = 1; word_data = f[w];
      @(negedge clk);
      checks++;
      if (w < 100 && done) begin failures++; $display("FAIL %s: done early at word %0d", what, w); end
    end
    word_valid = 0;
    checks++;
    if (!done || int'(syndrome) != s || parity_err != p) begin
      failures++;
      $display("FAIL %s: done=%0b syn=%0d exp %0d par=%0b exp %0b", what, done, syndrome, s, parity_err, p);
    end
  endtask

  initial begin
    logic [31:0] f [101];
    logic [31:0] g [101];
    int p1, p2, s; bit par;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      for (int w = 0; w < 101; w++) f[w] = $urandom;
      ecc_encode(f);
      ref_syndrome(f, s, par);
      checks++;
      if (s != 0 || par) begin failures++; $display("FAIL encode"); end
      run_frame(f, "clean");
      checks++;
      if (syndrome != 0 || parity_err) begin failures++; $display("FAIL clean frame flagged"); end
      g = f;
      p1 = (t == 0) ? 0 : (t == 1) ? 2048 : (t == 2) ? 3231 : int'($urandom_range(0, 3231));
      g[p1 / 32][p1 % 32] ^= 1'b1;
      run_frame(g, "single");
      checks++;
      if (int'(syndrome) != p1 || !parity_err) begin failures++; $display("FAIL single at %0d gives %0d", p1, syndrome); end
      do p2 = $urandom_range(0, 3231); while (p2 == p1);
      g[p2 / 32][p2 % 32] ^= 1'b1;
      run_frame(g, "double");
      checks++;
      if (syndrome == 0 || parity_err) begin failures++; $display("FAIL double not detected"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
