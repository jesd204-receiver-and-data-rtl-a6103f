# Single-lane JESD204B receiver with on-chip data reduction

A high-speed ADC that speaks JESD204B does not send a parallel bus. It sends its
samples as 8b/10b-coded characters over one serial lane. The receiver has three jobs:

- find where the frames start in that character stream;
- prove the transmitter is still in step;
- rebuild the samples.

This design does those three jobs for a two-converter, 14-bit ADC on a single lane. It is
built for an SoC fabric, so it also has two extra parts:

- an APB-readable FIFO that captures the raw lane octets, for bringing the link up;
- three small data-reduction engines on every converter channel. They are run-length
  encoding, a sliding average and a block average. They cut the data rate before the
  samples reach software.

The receiver follows the JESD204B subclass 2 flow, where SYNC~ gives deterministic latency.
Its link setup is:

| symbol | meaning | value |
|--------|---------|-------|
| L | lanes | 1 |
| M | converters | 2 |
| F | octets per frame | 4 |
| S | samples per converter per frame | 1 |
| N | converter resolution | 14 bits |
| N' | bits per sample word | 16 |
| K | frames per multiframe | 8 |
| CS | control bits per sample | 0 |

At 62.5 MSPS this gives a 2.5 Gbit/s lane. That is 250 M octets/s, or one octet per clock
at 250 MHz, and one frame holding both samples every 4 clocks.

```
 decoded octets          +-----------------------------------------------+
 din, din_k, din_err --> | jesd_top                                      |
 din_valid               |  link_layer ----octet+position---> transport  |--> samples[M]
 resync_req -----------> |  (SYNC~, ILA check, replacement undo)   layer |    sample_valid
 syncn <---------------- |                                               |
                         +-----------------------------------------------+
        |                                                    |
        +--> apbfifo (raw octets, APB slave) --> prdata      +--> per converter:
        |                                                    |     rle_encoder -> tokens
        +--> cgs_fsm + fs_fsm (lane monitor)                 |     sma         -> sliding average
                                                             |     bma         -> block average
```

The top is `rtl/jesd_rx_subsystem.sv`. Everything runs on one clock, the octet clock, with a
synchronous active-low reset. These parts sit in front of `din` and are not part of this RTL:

- the SerDes;
- the 8b/10b decoder;
- the (disabled) descrambler;
- the AMBA bus fabric.

## Bringing the link up: the link layer controller

`link_layer` holds almost all of the protocol. It is a four-state machine:

| state | SYNC~ | what happens | leaves when |
|-------|-------|--------------|-------------|
| IDLE | low | one octet of turnaround; counters cleared | next octet → CGS |
| CGS | low | counts consecutive /K/ (0xBC); any other octet zeroes the count | count reached 4 → ILA, SYNC~ released |
| ILA | high | skips /K/ still in flight; the first other octet is octet 0 of multiframe 1; checks 4 multiframes | 4 good multiframes → DATA; a bad one → IDLE |
| DATA | high | passes octets on with their position in the frame; undoes character replacement; watches alignment | 4 misplaced /A/ or /F/, 4 consecutive /K/, or `resync_req` → IDLE |

From reset, SYNC~ goes high on the clock after the fourth /K/ has been counted. That is the
6th octet: one IDLE octet, four /K/, then the CGS exit check. SYNC~ stays high from then on.

**ILA check.** Each multiframe is F·K = 32 octets. It must start with /R/ (0x1C) and end with
/A/ (0x7C). When the second octet of multiframe 2 is /Q/ (0x9C), the next 14 octets are
captured as the link configuration. These are the JESD204B parameter octets: L, F, K, M, N
and so on, each stored minus one. They appear on `ila_cfg` with `ila_cfg_valid`. A wrong first
or last octet ends the ILA. The controller pulses `ev_ila_fail` and returns to IDLE, which
pulls SYNC~ low and asks for a new synchronisation.

**Character replacement.** A JESD204B transmitter saves no bandwidth. Instead, it marks frame
boundaries with spare data:

- if the last octet of a frame repeats the last octet of the previous frame, it sends /F/
  (0xFC);
- at the end of a multiframe it sends /A/ instead.

In DATA, an /A/ or /F/ in the last octet of a frame is replaced by the stored last octet of
the previous frame. This pulses `ev_replace` and clears the misplacement count. An /A/ or /F/
anywhere else is passed on unchanged. It pulses `ev_misplaced` and adds to the misplacement
count. At the fourth in a row, the receiver decides it has lost frame phase and resynchronises.

**Why spikes appear on real data.** The controller recognises characters by octet value alone.
The default `CHECK_K_FLAG = 0` does this, as the original design did. So a data octet that
happens to equal 0x7C or 0xFC in the last position of a frame is "replaced", and the sample
is corrupted: you see a spike. Setting `CHECK_K_FLAG = 1` makes every character test also
require `din_k`, the decoder's control-character flag, and the effect disappears. That is the
right setting once an 8b/10b decoder drives `din_k`. On random 14-bit data, the value-only receiver corrupted 494 of
about 17,600 frames in 80,000 clocks. Misplaced-looking data octets also made it resynchronise
68 times. With the flag it recovered every frame (`tb_jesd_spikes`).

**Timing.** `dout`, `dout_valid` and `dout_idx` follow `din` by one clock. The status pulses
come out on that same clock. `din_valid` low freezes the whole controller.

## Lane monitor: the standard's CGS and FS machines

`cgs_fsm` and `fs_fsm` are the code-group and frame synchronisation state machines in the
three-state form of the JESD204B standard. They run beside the controller as an observer and
drive nothing in the datapath.

`cgs_fsm` has three states:

- CS_INIT waits for 4 valid /K/;
- CS_CHECK then needs 4 valid characters to reach CS_DATA, and goes back after 3 invalid ones;
- CS_DATA drops to CS_CHECK on one invalid character.

"Valid" means `din_err` is low. `fs_fsm` takes the first non-/K/ character as the frame edge.
It counts octets modulo F and flags an /A/ or /F/ outside the last octet as `mon_align_err`.
Four /K/ in a row, or a sync request, send it back to FS_INIT.

The monitor reports the two states, `mon_sync_request`, the octet position and frame start. It
reacts to decoder errors, which the controller ignores. This makes it useful for spotting a
bad lane.

## Rebuilding samples: the transport layer

`transport_layer` collects the F octets of a frame using the position that comes with each
octet. It releases the frame only if positions 0 … F−1 arrived in order, so a frame broken by
a resync is dropped. The packing is:

- converter 0 first, most significant octet first;
- each 16-bit word holds the sample in its top N bits, then CS control bits, then tail bits.

`samples` and `sample_valid` come one clock after the last octet leaves the link layer. That
is two clocks after the last octet is on `din`. At full rate this gives exactly one sample pair
every F = 4 clocks.

## Raw capture: APBFIFO

`apbfifo` writes every valid lane octet into a 512 × 8 FIFO. Software reads it over APB:

| offset | read | write |
|--------|------|-------|
| 0x00 | capability constant 0xDEADBEEF, to prove the bus path works | — |
| 0x04 | bit 31 = data valid, bit 30 = overflow, bits 7:0 = oldest octet; the read pops it | bit 0 = 1 clears the FIFO and the overflow flag |

There are no wait states and no error responses. A read of 0x04 pops on the access phase.

At 250 M octets/s the FIFO is full after about 2 µs. Octets that arrive while it is full are
dropped and set the overflow flag. So each capture is a snapshot: clear the FIFO, then read it
out. It is one-clock: the APB side runs on the octet clock.

## Data reduction

Each converter channel feeds three engines in parallel:

- **Run-length encoder** (`rle_encoder`, symbol width N, count width `RLE_CW` = 8). Each run
  of equal samples becomes one token:
  - a single sample gives a literal (`tok_is_run = 0`, `tok_count = 1`);
  - a longer run gives (`tok_count`, `tok_value`), with a count of at least 2.

  A run ends at a different value, at the end of a row of `RLE_ROW` = 88 samples, or when the
  count is full. Tokens come out one clock after the sample that ends the run. At a value
  change on the last sample of a row, two tokens are due; the encoder drops `in_ready` for
  one clock to send the second.
- **Sliding average** (`sma`, window 100). A 100-deep shift register and a running sum (add
  the new sample, subtract the one leaving). It outputs floor(sum/100) for every sample, one
  clock after it, once the window is full.
- **Block average** (`bma`, block 100). Sums 100 samples and outputs floor(sum/100) one clock
  after the last one. It then starts over, so there is one output per 100 samples.

Both averages restart when the link resynchronises. They do not average across a break in
the data.

## Parameters

The top's parameters are the link set above plus:

| parameter | default | meaning |
|-----------|---------|---------|
| `FIFO_DEPTH` | 512 | capture FIFO words |
| `SMA_WINDOW` | 100 | sliding-average window |
| `BMA_BLOCK` | 100 | block-average block |
| `RLE_ROW` | 88 | samples per RLE row |
| `RLE_CW` | 8 | RLE count bits |

`K` must satisfy F·K ≥ 16, so that the configuration fits in multiframe 2. `FIFO_DEPTH` must
be a power of two.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

`tb/jesd_tx_model.sv` is a behavioural transmitter. It answers SYNC~, then sends:

- /K/;
- the four-multiframe ILA with the configuration;
- data frames, with the standard's /A/ and /F/ substitution.

It can also inject misplaced characters and a corrupted ILA.

| testbench | what it shows |
|-----------|---------------|
| `tb_link_layer` | SYNC~ released on the 6th octet; ILA of exactly 4·F·K octets; configuration capture; replacement undone for every substitution sent; 3 misplaced characters tolerated, the 4th resyncs; /K/ resync; ILA failure |
| `tb_transport_layer` | unpacking and order checks against a reference packer, for the default link and for M = 4, N = 12, CS = 1, F = 8 |
| `tb_apbfifo` | capability read, FIFO order, full/overflow, clear, random push/pop against a reference queue (DEPTH = 16 for speed) |
| `tb_rle_encoder` | tokens against a software encoder, including row ends and count saturation |
| `tb_sma`, `tb_bma` | outputs against exact integer averages, plus output timing |
| `tb_cgs_fsm`, `tb_fs_fsm` | every state transition, against a reference model |
| `tb_jesd_top` | two-channel sine through transmitter and receiver: every frame recovered, one sample pair every F clocks |
| `tb_jesd_rx_subsystem` | the whole top at its default parameters (see below) |
| `tb_jesd_spikes` | random data through a value-only receiver (spikes and false resyncs occur, only in frames holding control-character values) and a flag-qualified one (every frame exact) |
| `tb_rle_workloads` | the encoder on generated binary images of 88x88, 250x250 and 488x467 pixels and on 14/16-bit signals of 3072, 100,000 and 191,000 samples; prints symbols per token |
| `tb_avg_workloads` | both averages on a noisy 3072-sample sine (30 block averages; the sliding average cuts the mean sample-to-sample step about tenfold), a 100,000-sample triangle (1000 block averages) and a 191,000-sample random walk |

`tb_jesd_rx_subsystem` runs the top through bring-up, FIFO overflow/clear/readback, misplaced
characters, decoder errors, a /K/ resync and a failed ILA. It checks every output stream
against a reference model. It counts each of these mechanisms and fails if any never
happened. It runs in a few seconds.

To run one with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_jesd_rx_subsystem rtl/jesd_pkg.sv tb/tb_jesd_rx_subsystem.sv
./obj_dir/Vtb_jesd_rx_subsystem
```

The testbenches avoid sample values whose octets equal a control character, because the
default receiver cannot tell them from control characters (see above).

## How far it can be trusted

The RTL has been checked in simulation only; it has not run on an FPGA against a real ADC.

- Every block has a testbench with an independent reference model.
- Each testbench is known to catch a deliberately broken copy of its block.
- The full receive path is exercised end to end at its default parameters.

The whole top synthesises with Yosys to about 580 generic cells and 560 flip-flops. It also
holds 7,680 bits of memory: the 4,096-bit capture FIFO and the two 1,792-bit sliding-average
windows.

Two things have not been checked against a real transmitter:

- the exact configuration-octet layout captured from the ILA;
- the octet packing of a real ADC.

Both follow the JESD204B standard as commonly implemented.

## Where this departs from the original design, and what is my own

**Choices of this implementation:**

- **K = 8.** The original design does not state K. Any K with F·K ≥ 16 works; the ILA length
  scales with it.
- **CS = 0 and the bit order.** The number of control bits is not stated. The bit order
  (sample MSB first, tail bits last) follows the JESD204B standard.
- **The ILA start character.** The original state diagram writes the multiframe-start check
  as /K/. Its description and simulation show /R/ at the start of each ILA multiframe, and
  /R/ is implemented.
- **Where a misplacement goes.** In the original diagram the exit after misplaced characters
  points back to the ILA state. Its text says the receiver returns to idle and restarts
  synchronisation, which is what is built.
- **When a misplacement resyncs.** The original diagram tests the stored count of
  misplaced characters on the octet after the fourth one. Here the resync happens on the
  fourth misplaced octet itself, one octet earlier.
- **The RLE count.** The original pseudo-code increments the count after emitting a token.
  Its worked example (0111110 → 0, (5,1), 0) needs the count to restart at 1. The example is
  followed.
- **The block size.** It is not stated; 100 matches the output density of the original
  block-average plots. The FIFO depth, the register bit layout, the RLE count width, row
  length and saturation, and one clock domain are also choices of this implementation.
- **Added features:** `resync_req`, the status pulses, `CHECK_K_FLAG`, the FIFO clear bit, and
  the lane monitor as a separate observer.
- **The reduction engines.** In the original work they existed only as software models. The
  RTL here is new, built to the algorithms described there.

**Not included:**

- the SerDes and 8b/10b decoder, which came from an existing SpaceFibre/high-speed serial
  IP;
- the descrambler, which was disabled in the original design;
- the SPI configuration of the ADC and its clock chip;
- the AMBA AHB/APB fabric, debug links, timer and RAM of the SoC;
- multi-lane operation, including lane-to-lane alignment and the L = 2 configuration;
- subclass 1 SYSREF handling.
