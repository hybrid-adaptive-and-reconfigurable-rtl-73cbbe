// harft_pkg: types and constants shared by the HARFT static logic.
//
// Holds the configuration-frame geometry of the target device (7692 frames of
// 101 32-bit words), the fault-tolerant operating modes, the bus structs of a
// MicroBlaze lockstep port (instruction and data AXI4-Lite masters), the word
// port to the configuration access port (ICAP), and the function that maps a
// mode to the set of partially reconfigurable regions (PRRs) holding
// MicroBlaze processors. Frame geometry and the mode list follow the design;
// the bus structs, the ICAP word port and the PRR allocation order are this
// design's own choices.
package harft_pkg;

  // Configuration memory geometry.
  localparam int unsigned NUM_FRAMES      = 7692;
  localparam int unsigned WORDS_PER_FRAME = 101;
  localparam int unsigned WORD_BITS       = 32;
  localparam int unsigned FRAME_AW        = 13;  // enough for 7692 frames
  localparam int unsigned WORD_AW         = 7;   // enough for 101 words
  localparam int unsigned SYN_W           = 12;  // Hamming syndrome bits (3232 bit positions)

  // Operating modes, ordered from highest performance to highest reliability.
  typedef enum logic [2:0] {
    MODE_SMP          = 3'd0,  // Linux SMP on both ARM cores, PRRs as accelerators
    MODE_AMP          = 3'd1,  // Linux on CPU0, RTOS/bare metal on CPU1, PRRs as accelerators
    MODE_FEFT_SIMPLEX = 3'd2,  // one MicroBlaze in a PRR
    MODE_FEFT_DUPLEX  = 3'd3,  // two lockstepped MicroBlazes, compared
    MODE_FEFT_TRIPLEX = 3'd4   // three lockstepped MicroBlazes, voted
  } harft_mode_e;

  localparam int unsigned NUM_MODES = 5;

  // HPS processing model requested from the ARM side.
  typedef enum logic {HPS_SMP = 1'b0, HPS_AMP = 1'b1} hps_mode_e;

  // Reconfigurable module held by a PRR.
  typedef enum logic {RM_ACCEL = 1'b0, RM_MICROBLAZE = 1'b1} rm_e;

  // AXI4-Lite master request (one MicroBlaze bus).
  typedef struct packed {
    logic        awvalid;
    logic [31:0] awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [31:0] araddr;
    logic        rready;
  } axil_req_t;

  // AXI4-Lite slave response.
  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_rsp_t;

  // Lockstep signals of one MicroBlaze: instruction bus (IP) and data bus (DP).
  typedef struct packed {
    axil_req_t ip;
    axil_req_t dp;
  } mb_req_t;

  typedef struct packed {
    axil_rsp_t ip;
    axil_rsp_t dp;
  } mb_rsp_t;

  // Word port to the configuration access port. A read returns its data one
  // cycle later with a valid strobe; a write takes effect at the clock edge.
  typedef struct packed {
    logic                en;
    logic                we;
    logic [FRAME_AW-1:0] frame;
    logic [WORD_AW-1:0]  word;
    logic [31:0]         wdata;
  } icap_req_t;

  // SYS_CTRL register map (word addresses).
  localparam logic [1:0] SC_MB_MASK  = 2'd0;  // PRRs whose MicroBlaze is in lockstep
  localparam logic [1:0] SC_DECOUPLE = 2'd1;  // PRRs isolated during reconfiguration
  localparam logic [1:0] SC_RESET    = 2'd2;  // write: reset pulse to the SPS MicroBlazes
  localparam logic [1:0] SC_HPS_MODE = 2'd3;  // bit 0: 0 = SMP, 1 = AMP

  // Everything one ConfigMan copy drives; the three copies' words are voted.
  typedef struct packed {
    icap_req_t   icap;
    logic        ecc_clear;
    logic        ddr_en;
    logic [31:0] ddr_addr;
    logic        sc_we;
    logic [1:0]  sc_addr;
    logic [31:0] sc_wdata;
    logic        corrected;         // pulse: a frame upset was repaired
    logic        uncorrectable;     // pulse: full system reset needed
    logic        pass_done;         // pulse: all frames scrubbed once
    logic        switch_done;       // pulse: a mode switch finished
    logic        prr_loaded;        // pulse: one PRR was reconfigured
    logic        sps_reset_issued;  // pulse: SPS reset requested
    harft_mode_e target_mode;
    harft_mode_e cur_mode;
    logic        forced;            // ground command in force
    logic        pr_busy;
    logic [15:0] upset_count;       // repaired upsets since reset (saturates)
    logic [15:0] unc_count;         // uncorrectable frames since reset (saturates)
    logic [FRAME_AW-1:0] last_frame;  // location of the last repaired upset
    logic [WORD_AW-1:0]  last_word;
    logic [4:0]          last_bit;
  } cm_out_t;

  // Number of MicroBlazes a mode places in the PRRs.
  function automatic int unsigned mode_mb_count(harft_mode_e m);
    case (m)
      MODE_FEFT_SIMPLEX: return 1;
      MODE_FEFT_DUPLEX:  return 2;
      MODE_FEFT_TRIPLEX: return 3;
      default:           return 0;
    endcase
  endfunction

  // HPS model a mode asks for; FEFT modes keep the ARM cores in AMP.
  function automatic hps_mode_e mode_hps(harft_mode_e m);
    return (m == MODE_SMP) ? HPS_SMP : HPS_AMP;
  endfunction

endpackage
