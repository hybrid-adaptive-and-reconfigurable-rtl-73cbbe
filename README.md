# HARFT static logic: adaptive fault tolerance for a hybrid ARM + FPGA SoC

A Zynq-class SoC pairs hard ARM cores with SRAM-based FPGA fabric. Both are
prone to radiation upsets in space, but they fail differently, and no single
protection scheme is right for every moment of a mission. HARFT (hybrid,
adaptive, reconfigurable fault tolerance) gives the device a ladder of
operating modes. A configuration manager moves along that ladder at run time,
driven by the upset rate it measures while it scrubs the FPGA, or by a
command from the ground:

| mode | ARM cores | partially reconfigurable regions (PRRs) |
|------|-----------|------------------------------------------|
| SMP  | Linux on both cores | all hardware accelerators |
| AMP  | Linux on CPU0, RTOS/bare metal on CPU1 | all hardware accelerators |
| FEFT-Simplex | AMP | PRR0 = MicroBlaze, others accelerators |
| FEFT-Duplex  | AMP | PRR0, PRR1 = lockstepped MicroBlazes, compared |
| FEFT-Triplex | AMP | PRR0..2 = lockstepped MicroBlazes, voted |

Performance falls and reliability rises from top to bottom. This repository
holds synthesizable SystemVerilog for the programmable-logic *static* part of
that system. That part is made of:

- the **ConfigMan**, built three times and voted;
- the **SPS static logic**, the glue between the PRRs and the bus.

Some parts are not in this RTL: the ARM cores, the MicroBlaze soft cores, the
accelerators, the configuration memory, the ICAP primitive, DDR and the AXI
interconnect. They are vendor parts or the device itself, and their
connections are ports of `harft_top`.

```
              +------------------------ configman -------------------------+
 ground cmd ->| configman_core x3 --> tmr_voter --+--> ICAP port ----------+--> configuration memory
 thresholds ->|  (scrubber, mode_policy,          +--> DDR read port ------+--> partial bitstreams
              |   pr_controller)                  +--> frame_ecc (syndrome of ICAP read data)
              |                                   +--> sys_ctrl --+--> hps_mode (SMP/AMP request)
              +---------------------------------------------------|--------+
                                                                  | mb_mask, decouple, sps_reset
 PRR0..2 lockstep buses --> sps_static: isolate -> hybrid_voter -> sps_axi_mux --> AXI interconnect
 PRR resets            <--                                                     <-- responses
```

## The ConfigMan

The configuration manager is three identical `configman_core` copies. They
run in lockstep from one reset and one set of inputs. Every output of a copy
(ICAP command, DDR address, SYS_CTRL write, status) is packed into one
`cm_out_t` word. `tmr_voter` takes the bitwise majority of the three words,
so one upset copy cannot reach the ICAP or SYS_CTRL, and `cm_disagree` names
the copy that left the majority. In the original system the ConfigMan is three
lockstepped soft processors running software. Here the same job is done by state
machines. That changes how it is implemented, not what it does.

### Scrubbing and the frame code

`scrubber` walks frames 0..7691 in a cycle. For each frame it:

1. clears `frame_ecc` and reads the 101 words through the ICAP into a local
   frame buffer; `frame_ecc` builds the syndrome from the same read data as
   it passes;
2. decodes the syndrome;
3. on a single upset, flips the located bit in the buffer and writes the
   whole frame back;
4. on a detectable but uncorrectable error, pulses `sys_reset_req`: the system
   is expected to answer with a full reset.

The device's own frame ECC code is not used, and this design defines its
code. It is an extended Hamming code over the 3232 bits of a frame:

- bit *b* of word *w* has position *p* = 32*w* + *b*;
- positions 1, 2, 4, ..., 2048 are check bits;
- position 0 is an overall even-parity bit.

The syndrome is the XOR of the positions of all set bits, plus the parity:

| parity | syndrome | meaning |
|--------|----------|---------|
| even | 0 | clean |
| odd  | *p* < 3232 | one upset at position *p* (0 = the parity bit) |
| even | non-zero | two upsets: detected, not correctable |
| odd  | *p* ≥ 3232 | not correctable |

Because a word's positions are 32*w* + *b*, a word contributes
`{w if its parity is odd, XOR of its set-bit indices}`. The syndrome hardware
is therefore a 5-bit XOR tree and a 7-bit conditional XOR per word. The frame
contents must be valid codewords: any image written to the configuration
memory (initial configuration, partial bitstreams) must already be encoded.
`tb/harft_tb_pkg.sv` shows the encoder.

Each copy also keeps an upset record, so the ConfigMan can act as a fault
monitor. The record is voted with the other outputs and is available at the
top:

- `upset_count`: repaired upsets since reset, 16 bits, saturating;
- `unc_count`: uncorrectable frames since reset, 16 bits, saturating;
- `last_upset_frame`, `last_upset_word`, `last_upset_bit`: the location of
  the last repair.

The record updates one cycle after the `upset_corrected` or `sys_reset_req`
pulse.

### Choosing the mode

`mode_policy` counts repaired and uncorrectable upsets in windows of
`window_len` cycles. There are four ascending `thresholds`, one per step up
the ladder. The level is the number of thresholds the window's count
*exceeds*. Crossing a threshold inside a window raises the level at once, so
a burst gets an immediate response. The level falls only at a window end, to
what the finished window supports. A ground command (`gnd_valid`, `gnd_mode`,
`gnd_cycles`) forces a mode for a set number of cycles, for example ahead of
a solar flare. `ground_forced` is high meanwhile, and afterwards the adaptive
choice takes over again. After reset the mode is SMP.

### Switching the mode

`pr_controller` carries out a change of `target_mode`. It rewrites only the
PRRs whose module changes between accelerator and MicroBlaze. For each such
PRR it:

1. sets the PRR's decouple bit in SYS_CTRL, which takes it out of the vote
   and isolates its outputs;
2. asks for the ICAP; the scrubber stops at its next frame boundary and
   grants it;
3. streams the partial bitstream from DDR into the PRR's frames, one word
   per cycle;
4. clears the decouple bit.

Then it writes the new MicroBlaze mask and the HPS mode request to SYS_CTRL.
The SPS is reset only when the mode has **more** MicroBlazes than before,
because new copies must start in step with the old ones. When the mode drops
copies, the remaining ones are still in step and keep running. A duplex
mismatch (`dwc_block`) asks for the same SPS reset to resynchronize the pair.

Bitstream layout (this design's choice):

- the image for PRR *i*, module *r* (0 accelerator, 1 MicroBlaze) is
  `PRR_FRAMES*101` words at `DDR_BASE + (2i + r)*PRR_FRAMES*101`;
- PRR *i* occupies frames `PRR_BASE_FRAME + i*PRR_STRIDE` onward.

SMP↔AMP changes no PRR. The HPS side acts on the `hps_mode` output, by
switching boot images in the original system.

### SYS_CTRL register map

| addr | register | effect |
|------|----------|--------|
| 0 | MB_MASK  | PRRs whose MicroBlaze is in lockstep/voting |
| 1 | DECOUPLE | PRRs isolated during reconfiguration |
| 2 | RESET    | any write holds the SPS MicroBlazes in reset for `RESET_CYCLES` cycles |
| 3 | HPS_MODE | bit 0: 1 = AMP, 0 = SMP |

## The SPS static logic

`sps_static` sits between the PRRs and the interconnect. Each PRR offers the
lockstep signals of the MicroBlaze it may hold: the request side of its
instruction and data AXI4-Lite masters (`mb_req_t`). The path through it:

- **Isolation.** A decoupled PRR's signals are forced to zero, and it drops
  out of the vote. A PRR in reset also drops out.
- **`hybrid_voter`** takes the per-bit majority over the active copies:
  - one copy: it passes through (simplex);
  - two copies: a tie goes to the lower-numbered copy and `mismatch` is
    raised (duplex, detect only);
  - three copies: the majority wins and the odd copy is flagged in
    `lockstep_disagree` (triplex, mask).
- **`sps_axi_mux`** drives the voted request onto the interconnect and sends
  the response to every active copy, so they keep seeing identical inputs.
  PRRs holding accelerators get an all-zero response. On a duplex mismatch
  it forces every valid/ready toward the interconnect low (`dwc_block`).
  The bus stays blocked until the pair is reset.
- **Reset control.** `sps_reset` from SYS_CTRL drives `prr_rst_n` low for
  the PRRs in the MicroBlaze mask.

Accelerators in PRRs use their own peripheral AXI ports to the interconnect.
Those ports do not pass through this logic.

## Interfaces and timing

- **ICAP port** (`icap_req_t`: `en`, `we`, `frame`, `word`, `wdata`). A
  simple synchronous word port: read data returns one cycle after the
  request with `icap_rvalid`, and a write takes effect at the clock edge. The
  real configuration port is a command stream. Placing a stream adapter
  behind this port is left to integration.
- **DDR port:** `ddr_en`, word address `ddr_addr`, with data and `ddr_rvalid`
  one cycle later.
- **Scrub rate:**
  - a clean frame takes 101 + 5 cycles;
  - a repaired frame takes 102 cycles more;
  - a clean pass over 7692 frames takes 815,352 cycles, about 8.2 ms at
    100 MHz. The clock frequency is an assumption, not a given.
  - For comparison, the original prototype scrubbed in software through
    the vendor ICAP core. It needed about 1.9 ms to read back one frame,
    14.5 s to read back the whole device and 20 s to write it back.
- **PR rate:** one word per cycle. A 400-frame PRR takes 40,400 cycles plus
  a few cycles of handshake.
- All flops are reset asynchronously by active-low `rst_n`.

## Parameters (`harft_top`)

| parameter | default | note |
|-----------|---------|------|
| `N_PRR` | 3 | three PRRs, as in the prototype. The voter handles any N; the mode ladder uses the first 1/2/3 PRRs. |
| `FRAMES`, `WORDS` | 7692, 101 | Zynq-7020 configuration memory, 32-bit words |
| `PRR_FRAMES` | 400 | size of one PRR's partial bitstream (own choice) |
| `PRR_BASE_FRAME`, `PRR_STRIDE` | 4000, 1000 | frame placement of the PRRs (own choice) |
| `DDR_BASE` | 0 | base of the bitstream store |
| `RESET_CYCLES` | 16 | SPS reset length (own choice) |
| `CNT_W`, `TIME_W` | 16, 32 | upset counter and timer widths |

## Departures and own choices

- ConfigMan as three voted state machines instead of three lockstepped
  processors running software. Mode algorithms are therefore fixed in
  hardware rather than reprogrammable.
- The frame ECC code, the ICAP word port, the DDR bitstream layout, the PRR
  frame placement and the SYS_CTRL register map are this design's own.
- The windowing rule for adaptive switching is this design's own. The
  original leaves the algorithm to the user.
- In FEFT modes the ARM side is asked for AMP.
- A duplex mismatch blocks the bus and resets the pair. A triplex
  disagreement is only masked and reported; the odd copy is not reset
  on its own.
- A ConfigMan copy that leaves the majority is reported but not
  resynchronized.
- The MicroBlaze buses are modelled as AXI4-Lite (single transfers), which
  matches cache-less soft cores.

## Files

`rtl/` holds the package `harft_pkg` and one module per file:

- `tmr_voter`
- `hybrid_voter`
- `sps_axi_mux`
- `sps_static`
- `frame_ecc`
- `scrubber`
- `mode_policy`
- `pr_controller`
- `sys_ctrl`
- `configman_core`
- `configman`
- `harft_top`

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`) and
`harft_top_full_tb.sv`, which runs the top at its default size. It also
holds these behavioural models, which are not part of the design:

- `cfg_mem_model`: the configuration memory behind the ICAP port;
- `ddr_model`: the bitstream store;
- `mb_model`: a lockstep MicroBlaze stand-in;
- `harft_tb_pkg`: the frame encoder and a reference syndrome.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

From the repository root, for example the end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module harft_top_tb \
  -y rtl -y tb +libext+.sv rtl/harft_pkg.sv tb/harft_tb_pkg.sv tb/harft_top_tb.sv
./obj_dir/Vharft_top_tb
```

Replace `harft_top_tb` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/harft_pkg.sv rtl/<module>.sv`.

What the tests cover:

- **`harft_top_tb`** runs at reduced size (32 frames, PRRs of 2 frames). It
  makes every mechanism happen at least once and counts each one:
  - scrub passes, repairs and an uncorrectable upset;
  - adaptive switches SMP → AMP → Simplex → Duplex;
  - partial reconfiguration only into decoupled PRRs, with the scrubber
    paused;
  - SPS reset when processors are added, and none when they are removed;
  - duplex detection with the bus blocked, and resynchronization;
  - triplex masking;
  - a ground override and its expiry;
  - a ConfigMan copy being outvoted;
  - the upset record, against the injected upsets.
- **`harft_top_full_tb`** runs the default size:
  - 7692 frames and three 400-frame PRR rewrites;
  - one repair in frame 7000 and its upset record;
  - a timed full-device pass;
  - it finishes in a few seconds.

Cycle counts are checked where the design fixes them: the pass length, the
PR copy rate and the reset length.

The testbenches start with `rst_n` high and drop it after 1 ns. The falling
edge applies the asynchronous reset before the first clock edge. If `rst_n`
started low, no edge would occur, and the memory models could take a write
from a request made before reset. All tests pass with random initial state
(`--x-initial unique --x-assign unique`, `+verilator+rand+reset+2`) for any
seed tried.
