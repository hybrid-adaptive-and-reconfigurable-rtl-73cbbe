// pr_controller: mode-switching mechanics of the ConfigMan.
//
// When `target_mode` differs from `cur_mode`, the controller works out which
// PRRs must change between an accelerator and a MicroBlaze and reconfigures
// only those. For each such PRR i it
//   1. sets its decouple bit in SYS_CTRL (the PRR leaves the vote, its
//      outputs are isolated),
//   2. requests the ICAP (`icap_req`) and waits for `icap_grant` (the
//      scrubber stops at a frame boundary),
//   3. copies the partial bitstream word by word from DDR to the ICAP: the
//      image for PRR i and module r (0 accelerator, 1 MicroBlaze) is
//      PRR_FRAMES*WORDS words at DDR_BASE + (2*i + r)*PRR_FRAMES*WORDS and
//      lands in frames PRR_BASE_FRAME + i*PRR_STRIDE onward, one word per
//      cycle once the pipeline is full,
//   4. clears the decouple bit.
// It then writes the new MicroBlaze mask to SYS_CTRL, writes the SPS reset
// register if the mode has more MicroBlazes than before (the copies must be
// resynchronized; a smaller set stays in step and needs no reset), and writes
// the HPS mode (SMP or AMP) request. A `resync_req` pulse (lockstep error
// that the copies cannot mask) also triggers an SPS reset when idle.
// DDR reads return data one cycle after `ddr_en`. Reconfiguring only changed
// regions and the reset rule follow the design; the bitstream layout, the
// frame placement of the PRRs and the register sequence are this design's.
module pr_controller
  import harft_pkg::*;
#(
  parameter int unsigned N_PRR          = 3,
  parameter int unsigned WORDS          = WORDS_PER_FRAME,
  parameter int unsigned PRR_FRAMES     = 400,
  parameter int unsigned PRR_BASE_FRAME = 4000,
  parameter int unsigned PRR_STRIDE     = 1000,
  parameter logic [31:0] DDR_BASE       = 32'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  harft_mode_e       target_mode,
  input  logic              resync_req,
  output harft_mode_e       cur_mode,
  output logic              busy,
  output logic              switch_done,
  output logic              prr_loaded,
  output logic              sps_reset_issued,
  // ICAP
  output logic              icap_req,
  input  logic              icap_grant,
  output icap_req_t         icap,
  // DDR
  output logic              ddr_en,
  output logic [31:0]       ddr_addr,
  input  logic              ddr_rvalid,
  input  logic [31:0]       ddr_rdata,
  // SYS_CTRL register writes
  output logic              sc_we,
  output logic [1:0]        sc_addr,
  output logic [31:0]       sc_wdata
);
  localparam int unsigned TOT = PRR_FRAMES * WORDS;
  localparam int unsigned IW  = (N_PRR > 1) ? $clog2(N_PRR + 1) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_SCAN, S_DEC, S_REQ, S_COPY, S_UNDEC, S_MASK, S_RST, S_HPS, S_RESYNC
  } state_e;

  state_e            state;
  harft_mode_e       new_mode;
  logic [N_PRR-1:0]  old_mask, new_mask, dec;
  logic [IW-1:0]     idx;
  logic [31:0]       rd_cnt;
  logic [31:0]       wr_frame;   // relative frame of the next write
  logic [WORD_AW-1:0] wr_word;
  logic [31:0]       wr_cnt;
  logic              resync_pend;
  logic              new_rm;     // module PRR idx receives
  logic [N_PRR-1:0]  idx_bit;    // one-hot of idx

  always_comb begin
    new_rm  = 1'b0;
    idx_bit = '0;
    for (int i = 0; i < N_PRR; i++) begin
      if (int'(idx) == i) begin
        new_rm     = new_mask[i];
        idx_bit[i] = 1'b1;
      end
    end
  end

  function automatic logic [N_PRR-1:0] mask_of(harft_mode_e m);
    logic [N_PRR-1:0] r = '0;
    for (int i = 0; i < N_PRR; i++) if (i < int'(mode_mb_count(m))) r[i] = 1'b1;
    return r;
  endfunction

  function automatic int unsigned cnt_of(logic [N_PRR-1:0] m);
    int unsigned c = 0;
    for (int i = 0; i < N_PRR; i++) c += int'(m[i]);
    return c;
  endfunction

  always_comb begin
    busy     = (state != S_IDLE);
    icap_req = (state == S_REQ) || (state == S_COPY);
    icap     = '0;
    if (state == S_COPY && ddr_rvalid) begin
      icap.en    = 1'b1;
      icap.we    = 1'b1;
      icap.frame = FRAME_AW'(PRR_BASE_FRAME + int'(idx) * PRR_STRIDE + wr_frame);
      icap.word  = wr_word;
      icap.wdata = ddr_rdata;
    end
    ddr_en   = (state == S_COPY) && (rd_cnt < TOT);
    ddr_addr = '0;
    if (state == S_COPY) ddr_addr = DDR_BASE + 32'((2 * int'(idx) + int'(new_rm)) * TOT) + rd_cnt;
    sc_we    = 1'b0;
    sc_addr  = '0;
    sc_wdata = '0;
    case (state)
      S_DEC:    begin sc_we = 1'b1; sc_addr = SC_DECOUPLE; sc_wdata = 32'(dec | idx_bit); end
      S_UNDEC:  begin sc_we = 1'b1; sc_addr = SC_DECOUPLE; sc_wdata = 32'(N_PRR'(dec & ~idx_bit)); end
      S_MASK:   begin sc_we = 1'b1; sc_addr = SC_MB_MASK;  sc_wdata = 32'(new_mask); end
      S_RST:    begin sc_we = cnt_of(new_mask) > cnt_of(old_mask); sc_addr = SC_RESET; sc_wdata = 32'd1; end
      S_RESYNC: begin sc_we = 1'b1; sc_addr = SC_RESET; sc_wdata = 32'd1; end
      S_HPS:    begin sc_we = 1'b1; sc_addr = SC_HPS_MODE; sc_wdata = 32'(mode_hps(new_mode)); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      cur_mode         <= MODE_SMP;
      new_mode         <= MODE_SMP;
      old_mask         <= '0;
      new_mask         <= '0;
      dec              <= '0;
      idx              <= '0;
      rd_cnt           <= '0;
      wr_cnt           <= '0;
      wr_frame         <= '0;
      wr_word          <= '0;
      resync_pend      <= 1'b0;
      switch_done      <= 1'b0;
      prr_loaded       <= 1'b0;
      sps_reset_issued <= 1'b0;
    end else begin
      switch_done      <= 1'b0;
      prr_loaded       <= 1'b0;
      sps_reset_issued <= 1'b0;
      if (resync_req) resync_pend <= 1'b1;
      case (state)
        S_IDLE: begin
          if (target_mode != cur_mode) begin
            new_mode <= target_mode;
            old_mask <= mask_of(cur_mode);
            new_mask <= mask_of(target_mode);
            idx      <= '0;
            state    <= S_SCAN;
          end else if (resync_pend) begin
            state <= S_RESYNC;
          end
        end
        S_SCAN: begin
          if (int'(idx) >= N_PRR)              state <= S_MASK;
          else if (|((old_mask ^ new_mask) & idx_bit)) state <= S_DEC;
          else                                 idx <= idx + 1'b1;
        end
        S_DEC: begin
          dec      <= dec | idx_bit;
          rd_cnt   <= '0;
          wr_cnt   <= '0;
          wr_frame <= '0;
          wr_word  <= '0;
          state    <= S_REQ;
        end
        S_REQ: if (icap_grant) state <= S_COPY;
        S_COPY: begin
          if (ddr_en) rd_cnt <= rd_cnt + 1'b1;
          if (ddr_rvalid) begin
            wr_cnt <= wr_cnt + 1'b1;
            if (wr_word == WORD_AW'(WORDS - 1)) begin
              wr_word  <= '0;
              wr_frame <= wr_frame + 1'b1;
            end else begin
              wr_word <= wr_word + 1'b1;
            end
            if (wr_cnt == TOT - 1) state <= S_UNDEC;
          end
        end
        S_UNDEC: begin
          dec        <= dec & ~idx_bit;
          prr_loaded <= 1'b1;
          idx        <= idx + 1'b1;
          state      <= S_SCAN;
        end
        S_MASK: state <= S_RST;
        S_RST: begin
          if (cnt_of(new_mask) > cnt_of(old_mask)) begin
            sps_reset_issued <= 1'b1;
            resync_pend      <= 1'b0;
          end
          state <= S_HPS;
        end
        S_HPS: begin
          cur_mode    <= new_mode;
          switch_done <= 1'b1;
          state       <= S_IDLE;
        end
        S_RESYNC: begin
          resync_pend      <= 1'b0;
          sps_reset_issued <= 1'b1;
          state            <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
