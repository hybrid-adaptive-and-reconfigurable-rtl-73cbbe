// mode_policy: adaptive and commanded choice of the fault-tolerant mode.
//
// Adaptive part: upsets reported by the scrubber (`fault` pulses) are counted
// in consecutive windows of `window_len` cycles. The reliability level is the
// number of thresholds the window's count exceeds (thresholds ascending, one
// per step SMP -> AMP -> FEFT-Simplex -> FEFT-Duplex -> FEFT-Triplex). A count
// that crosses a higher threshold raises the level at once; the level falls
// only at a window boundary, to what the finished window's count supports.
// Commanded part: a ground-station command (`gnd_valid` with `gnd_mode` and
// `gnd_cycles`) forces that mode for `gnd_cycles` cycles, after which the
// adaptive choice returns; `forced` is high meanwhile. After reset the mode
// is SMP. `target_mode` is registered. The thresholds and the ground override
// follow the design; the windowing rule is this design's own.
module mode_policy
  import harft_pkg::*;
#(
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned TIME_W = 32
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             fault,
  input  logic [TIME_W-1:0]                window_len,
  input  logic [NUM_MODES-2:0][CNT_W-1:0]  thresholds,
  input  logic                             gnd_valid,
  input  harft_mode_e                      gnd_mode,
  input  logic [TIME_W-1:0]                gnd_cycles,
  output harft_mode_e                      target_mode,
  output logic                             forced,
  output logic [CNT_W-1:0]                 window_count
);
  logic [TIME_W-1:0] wtimer;
  logic [TIME_W-1:0] ftimer;
  logic [2:0]        level;
  logic [CNT_W-1:0]  cnt_next;
  logic [2:0]        lvl_next;
  logic              wend;

  always_comb begin
    cnt_next = window_count + ((fault && window_count != '1) ? CNT_W'(1) : '0);
    lvl_next = '0;
    for (int k = 0; k < NUM_MODES - 1; k++) if (cnt_next > thresholds[k]) lvl_next = 3'(k + 1);
    wend = (wtimer + 1'b1 >= window_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wtimer       <= '0;
      window_count <= '0;
      level        <= '0;
      ftimer       <= '0;
      forced       <= 1'b0;
      target_mode  <= MODE_SMP;
    end else begin
      if (wend) begin
        wtimer       <= '0;
        window_count <= '0;
        level        <= lvl_next;
      end else begin
        wtimer       <= wtimer + 1'b1;
        window_count <= cnt_next;
        if (lvl_next > level) level <= lvl_next;
      end
      if (gnd_valid) begin
        forced      <= (gnd_cycles != '0);
        ftimer      <= gnd_cycles;
        target_mode <= gnd_mode;
      end else if (forced) begin
        ftimer <= ftimer - 1'b1;
        if (ftimer <= 1) forced <= 1'b0;
      end else begin
        target_mode <= harft_mode_e'(level);
      end
    end
  end
endmodule
