// frame_ecc: ECC syndrome of one configuration frame, computed on the fly.
//
// Watches the words of a frame as they are read back through the ICAP and
// accumulates an extended-Hamming syndrome, so that the frame needs no second
// pass. Code (this design's choice, the device's own code is not used): bit b
// of word w has position p = 32*w + b; positions 1, 2, 4, ..., 2048 are check
// bits and position 0 is an overall even-parity bit. For a valid frame the
// XOR of the positions of all set bits is zero and the parity is even. One
// flipped bit gives odd parity and a syndrome equal to its position (0 for
// the parity bit itself); two flipped bits give even parity and a nonzero
// syndrome (detected, not correctable).
// Interface: `clear` starts a frame; each `word_valid` adds the next word (in
// order 0..WORDS-1). `done` rises the cycle after the last word is taken and
// stays high with `syndrome` and `parity_err` until the next `clear`.
module frame_ecc
  import harft_pkg::*;
#(
  parameter int unsigned WORDS = WORDS_PER_FRAME
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             word_valid,
  input  logic [31:0]      word_data,
  output logic             done,
  output logic [SYN_W-1:0] syndrome,
  output logic             parity_err
);
  logic [WORD_AW-1:0] idx;
  logic [4:0]         low;     // XOR of set-bit indices within the word
  logic               wpar;

  always_comb begin
    low  = '0;
    wpar = ^word_data;
    for (int b = 0; b < 32; b++) if (word_data[b]) low ^= 5'(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      done       <= 1'b0;
      syndrome   <= '0;
      parity_err <= 1'b0;
    end else if (clear) begin
      idx        <= '0;
      done       <= 1'b0;
      syndrome   <= '0;
      parity_err <= 1'b0;
    end else if (word_valid && !done) begin
      syndrome   <= syndrome ^ {(wpar ? idx : '0), low};
      parity_err <= parity_err ^ wpar;
      if (idx == WORD_AW'(WORDS - 1)) done <= 1'b1;
      idx <= idx + 1'b1;
    end
  end
endmodule
