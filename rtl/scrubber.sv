// scrubber: readback configuration scrubber of the ConfigMan.
//
// Walks the configuration frames 0..FRAMES-1 cyclically. For each frame it
// clears FRAME_ECC, reads the WORDS words through the ICAP into a local frame
// buffer (FRAME_ECC sees the same read data and forms the syndrome), then
// decodes the syndrome:
//   parity even, syndrome 0   -> frame clean, go to the next frame;
//   parity odd,  position < 32*WORDS -> single upset at that position: flip
//                the bit in the buffer and write the whole frame back;
//   otherwise    -> detected but uncorrectable: pulse `uncorrectable`
//                (the system answers with a full reset) and go on.
// `pause` stops the scrubber at the next frame boundary; `idle` is high while
// it is stopped there, so another master (the PR controller) may use the ICAP.
// Timing: a clean frame takes WORDS + 5 cycles; a corrected one WORDS + 1 more
// that. The procedure follows the design; the ICAP word port, the frame order
// and the code are this design's choices (see frame_ecc).
module scrubber
  import harft_pkg::*;
#(
  parameter int unsigned FRAMES = NUM_FRAMES,
  parameter int unsigned WORDS  = WORDS_PER_FRAME
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                pause,
  output logic                idle,
  // ICAP
  output icap_req_t           icap,
  input  logic                icap_rvalid,
  input  logic [31:0]         icap_rdata,
  // FRAME_ECC
  output logic                ecc_clear,
  input  logic                ecc_done,
  input  logic [SYN_W-1:0]    ecc_syndrome,
  input  logic                ecc_parity_err,
  // events (one-cycle pulses) and location of the last upset
  output logic                corrected,
  output logic                uncorrectable,
  output logic                pass_done,
  output logic [FRAME_AW-1:0] err_frame,
  output logic [WORD_AW-1:0]  err_word,
  output logic [4:0]          err_bit
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_READ, S_WAIT, S_DECODE, S_FIX, S_WRITE} state_e;

  state_e              state;
  logic [FRAME_AW-1:0] frame;
  logic [WORD_AW-1:0]  rd_word;   // next word to request
  logic [WORD_AW-1:0]  rx_word;   // next word to arrive
  logic [WORD_AW-1:0]  wr_word;
  logic [31:0]         fbuf [WORDS];
  logic [SYN_W-1:0]    pos;
  logic                bad_pos;

  assign pos     = ecc_syndrome;
  assign bad_pos = int'(pos) >= 32 * WORDS;
  assign idle    = (state == S_IDLE);

  always_comb begin
    icap       = '0;
    icap.frame = frame;
    ecc_clear  = (state == S_CLEAR);
    case (state)
      S_READ: begin
        icap.en   = 1'b1;
        icap.word = rd_word;
      end
      S_WRITE: begin
        icap.en    = 1'b1;
        icap.we    = 1'b1;
        icap.word  = wr_word;
        icap.wdata = fbuf[wr_word];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state != S_IDLE && icap_rvalid) fbuf[rx_word] <= icap_rdata;
    else if (state == S_FIX) fbuf[err_word] <= fbuf[err_word] ^ (32'd1 << err_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      frame         <= '0;
      rd_word       <= '0;
      rx_word       <= '0;
      wr_word       <= '0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
      pass_done     <= 1'b0;
      err_frame     <= '0;
      err_word      <= '0;
      err_bit       <= '0;
    end else begin
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
      pass_done     <= 1'b0;
      if (icap_rvalid && state != S_IDLE) rx_word <= rx_word + 1'b1;
      case (state)
        S_IDLE:  if (enable && !pause) state <= S_CLEAR;
        S_CLEAR: begin
          rd_word <= '0;
          rx_word <= '0;
          state   <= S_READ;
        end
        S_READ: begin
          rd_word <= rd_word + 1'b1;
          if (rd_word == WORD_AW'(WORDS - 1)) state <= S_WAIT;
        end
        S_WAIT:  if (ecc_done) state <= S_DECODE;
        S_DECODE: begin
          if (!ecc_parity_err && pos == '0) begin
            state <= S_IDLE;
          end else if (ecc_parity_err && !bad_pos) begin
            err_frame <= frame;
            err_word  <= WORD_AW'(pos >> 5);
            err_bit   <= pos[4:0];
            state     <= S_FIX;
          end else begin
            err_frame     <= frame;
            uncorrectable <= 1'b1;
            state         <= S_IDLE;
          end
          if (!(ecc_parity_err && !bad_pos)) begin
            frame <= (int'(frame) == FRAMES - 1) ? '0 : frame + 1'b1;
            if (int'(frame) == FRAMES - 1) pass_done <= 1'b1;
          end
        end
        S_FIX: begin
          wr_word <= '0;
          state   <= S_WRITE;
        end
        S_WRITE: begin
          wr_word <= wr_word + 1'b1;
          if (wr_word == WORD_AW'(WORDS - 1)) begin
            corrected <= 1'b1;
            frame     <= (int'(frame) == FRAMES - 1) ? '0 : frame + 1'b1;
            if (int'(frame) == FRAMES - 1) pass_done <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
