# SALT digital part in SystemVerilog

SALT is a 128-channel readout chip for silicon strip detectors. Each channel samples its
front-end signal with an ADC once per bunch crossing, at 40 MHz. The digital part has to do
four things every crossing:

- clean up the 128 samples;
- throw away the channels that carry nothing;
- pack what is left into a variable-length packet;
- send it out on 3 to 6 serial e-links.

Fast timing and control (TFC) commands arrive on a serial line at the same rate and steer
all of it.

The difficult part is the back end. A packet can be one 12-bit word (a header alone) or
67 words (a full non-zero-suppressed dump). The output carries 24, 32, 40 or 48 bits per
clock, depending on how many e-links a given chip drives, and none of those is a whole
number of 12-bit words in general. This RTL covers the full chain from the ADC samples to
the DDR bit streams on the e-links. It also includes the TFC receiver, the counters, the
triplicated registers and the test-pulse generator.

## Clock domains

| clock | rate | used by |
|---|---|---|
| `main_clk` | 40 MHz, one cycle per crossing | everything in the DSP and back end |
| `adc_clk` | same rate, phase set by a DLL | ADC side of the input FIFO |
| `calib_clk` | same rate, phase set by a DLL | test-pulse generator |
| `data_clk` | 4 × `main_clk` (160 MHz) | serializer and TFC deserializer, both edges used |

Each domain has its own `reset_sync`: two flip-flops that assert reset asynchronously and
release it on a clock edge. The DLL and PLL themselves are outside this RTL, so the four
clocks are inputs of the top.

## Data path, one crossing at a time

```
adc_data ─► adc_fifo ─► ped_mcm ─► zs ─► pck ─► multi_mem ─► out_buf ─► converter ─► serializer ─► dout_rise/fall
(adc_clk)   (3 deep)    (3 clk)   (5 clk) (1 clk)  (RAM)      (128 w)    (12→8 bit)   (DDR, data_clk)
```

### adc_fifo

This FIFO crosses from `adc_clk` to `main_clk`. It has three entries and two rotating
one-hot pointers. Both clocks run at the same frequency, so it needs no full or empty flags.

### ped_mcm

This block works in three register stages:

1. It subtracts a per-channel pedestal.
2. It computes the common mode. This is the mean of the channels that are not masked and
   whose magnitude is at most `mcm_thr`. A channel with a real signal does not pull the mean.
3. It subtracts the mean and clamps the result to 0..31, the 5-bit unsigned range the zero
   suppression expects.

The mean and the number of channels used are kept for NZS packets.

### zs

A channel is a hit when it is not masked and its value is strictly above `zs_thr`. A hit
becomes the 12-bit word `{channel[6:0], value[4:0]}`. The hard part is packing up to 128
scattered hits into a dense list in a fixed time. `zs` does it with a tree of merges:

- Each node takes two packed lists with counts n1 and n2.
- It places the second list right after the first one's n1 entries.
- The tree is registered at five levels: groups of 4, 8, 32, 64 and 128 channels.

The latency is therefore always 5 clocks. Only the first 63 hits are kept. `nhits` still
reports the true count, up to 128.

### pck

`pck` builds the crossing's packet in one clock. Every word is 12 bits, and the header is
`{BXID[3:0], parity, flag, len[5:0]}`. The parity bit makes the header word's parity even.
With that rule the Idle word comes out as `0000_1_1_110000`.

| packet | flag | len | words | when |
|---|---|---|---|---|
| Normal | 0 | number of hits | 1 + hits | default |
| BusyEvent | 1 | `01_0011` | 1 | more than 63 hits |
| NZS | 1 | `00_0110` | 67 | NZS command |
| HeaderOnly | 1 | `01_0010` | 1 | HeaderOnly command |
| BxVeto | 1 | `01_0001` | 1 | BxVeto command |
| BufferFull | 1 | `01_0100` | 1 | a Normal packet with hits does not fit in memory |
| BufferFullN | 1 | `01_0101` | 1 | an NZS packet does not fit in memory |
| Idle | 1 | `11_0000` | 1 | made by the converter, never stored |
| Sync | – | – | one frame | made by the converter on a Synch command |

When several apply, the priority is BxVeto > HeaderOnly > NZS > BusyEvent > Normal.

An NZS packet holds:

- the header;
- `mcm_value`, sign-extended;
- `mcm_channels`;
- then 64 words of two raw 6-bit samples each, starting with `{ch127, ch126}` and ending
  with `{ch1, ch0}`.

That makes 67 words.

Whether a packet fits is decided from the memory's free space. The count leaves out the
packet being written in the same clock, and counts the whole memory when a flush happens
in that clock. Without this correction, a packet would occasionally be dropped inside the
memory without any trace in the output stream.

### multi_mem

The memory writes one whole packet of 1 to 67 words in one clock. It is built from many
small RAMs: 32 instances × 16 rows × 4 words, 2048 words in all.

- The incoming words are appended to a small input buffer of at most 3 words, one row
  less one word.
- Every complete row of 4 words goes straight into the RAMs.
- Consecutive rows go to consecutive instances, so the up to 17 rows of one packet are
  written in parallel.
- What does not fill a row waits in the input buffer for the next packet.

The row width is a parameter. The memory on its own also works with 8-word rows and 16
instances. The top uses 4-word rows, and only that setting has been run through the whole
chain.

A row becomes readable in the clock after it is written. A flush empties the buffer and
the RAMs. The packet written in the same clock is stored after the flush. A write that does
not fit is dropped and flagged on `overflow`. The `pck` space check keeps this from
happening.

### out_buf and converter

`out_buf` is a 128-word circular buffer. It fetches one row per clock whenever there is
room for it, counting a row already in flight.

Each clock the `converter` takes between 0 and 4 words from the buffer and appends them to
a bit accumulator. It then hands `8 × n_elinks` bits to the serializer. The rules are:

- It starts a packet only if every word of that packet is already in `out_buf`.
- Otherwise it inserts an Idle word. This is how a slow memory read turns into padding
  rather than a broken packet.
- On a Synch command it sends one Sync frame, which fills the whole frame: BXID[11:0]
  followed by the top bits of the 36-bit `sync_pattern`. It then restarts on a word boundary.
- On FEReset it drops any half-sent packet.

The number of e-links can be changed at run time and takes effect on the next frame.

### serializer

A toggle flip-flop in `main_clk` marks the frame boundary in `data_clk`. Each e-link byte is
then shifted out as four bit pairs, MSB first. The first bit of each pair is for the rising
edge and the second for the falling edge. The DDR pad cell that merges them is outside the
RTL.

For bringing up a link, the top can send something other than packets. The configuration
field `ser_mode` selects the source:

- `SER_DATA`: packets (the normal mode);
- `SER_PATTERN`: the byte `ser_pattern` on every e-link, so the receiver can set its delay;
- `SER_LOOPBACK`: the TFC byte just received, so the sender can check the phase of both
  edges of the TFC line;
- `SER_COUNTER`: a free-running 8-bit counter.

The multiplexer sits in `salt_digital`, in front of the serializer.

## TFC commands

TFC commands arrive as one byte per crossing on a DDR line at `data_clk`. The `deserializer`
works as follows:

- It samples the line on both edges.
- It keeps a 16-bit history.
- At each `main_clk` frame boundary it takes 8 bits at the offset `deser_cfg[2:0]`.

Bringing up the link means choosing that offset first. Then the remaining latency is set in
the TFC FIFO.

`tfc_fifo` delays the byte by `tfc_fifo_len + 1` clocks, so that a command lines up with the
ADC sample of the same crossing. A fixed delay of 8 clocks (MCM + ZS) then brings it to
`pck`, and one more clock to the memory flush.

Bit assignment (`salt_pkg::tfc_cmd_t`):

| bit | command | effect |
|---|---|---|
| 0 | NZS | NZS packet for this crossing |
| 1 | BXReset | BXID counter reads 0 in the next crossing |
| 2 | HeaderOnly | header-only packet |
| 3 | BxVeto | BxVeto packet |
| 4 | Synch | flush memory and buffers, send a Sync frame |
| 5 | FEReset | flush memory and buffers, clear the TFC counters |
| 6 | Calib | test pulse after a separate delay `cal_delay` |
| 7 | Snapshot | copy the TFC counters to the snapshot registers |

The bit order is this design's choice. Change `tfc_cmd_t` if the link uses another one.

`tfc_counters` keeps one 16-bit counter per command bit and one snapshot register per
counter.

## Triplication

`tmr_reg` holds three copies of a register, and `q` is their bitwise majority. Each copy is
reloaded every clock with either the new value or the voted value, so a single upset is
repaired in the next clock. `mismatch` flags the clock in which the copies differ.

The following are triplicated:

- the whole configuration register;
- the BXID counter;
- the TFC counters and snapshot registers.

A 16-bit SEU counter, itself triplicated, adds 1 in every clock in which any of those
disagree. Clocks, resets, memory pointers and the packet-building logic are not
triplicated.

## Test pulses

The Calib bit passes through its own 1-bit FIFO with delay `cal_delay`, then into
`test_pulse` in the `calib_clk` domain. There:

1. Two flip-flops bring the command into `calib_clk`.
2. A rising-edge detect loads a down-counter with `cal_len` (0 counts as 1).
3. The counter's non-zero state is the pulse, XOR'd with `cal_inv`.
4. Each channel has its own enable bit. A channel that is not enabled stays at the idle
   level.
5. An output register drives `cal_strobe`.

From the command to the strobe is 4 `calib_clk` edges.

## Configuration

`salt_cfg_t` in `salt_pkg.sv` is the whole register set: pedestals, channel mask, MCM and
ZS thresholds, TFC FIFO length, `deser_cfg`, calibration delay, length, polarity and enables,
number of e-links, the sync pattern, and the serializer source and pattern. The top writes it in parallel through
`cfg_we`/`cfg_wdata`. On the chip, this register sits behind an I2C slave that is not part
of this RTL.

## Files

- `rtl/salt_pkg.sv`: sizes, word and command types, header codes and the configuration
  struct.
- `rtl/salt_digital.sv`: the top. It holds the per-domain reset synchronisers, the
  configuration register, the TFC chain, the DSP and the back end.
- `rtl/zs_merge.sv`, `rtl/ram_inst.sv`, `rtl/pipe_delay.sv`: helpers used by `zs`,
  `multi_mem` and the top.
- `tb/tb_<module>.sv`: one self-checking bench per module.

`tb/tb_salt_digital.sv` runs the complete chip at its default size. It works in three stages:

- **Link start-up.** It scans the deserializer first-bit offsets, then measures the TFC
  latency with an NZS marker and programs it.
- **Main run.** It runs 2600 crossings with random commands and bursts of high occupancy.
  These fill the memory, so BufferFull packets appear. It also switches from 6 to 3 e-links
  and flips one copy of the configuration register. At the end it selects each serializer
  test source in turn.
- **Checks.**
  - Every received packet is compared word by word with a model computed inside the bench.
  - The serial pins are compared with the frames.
  - The counters and snapshots are compared with the commands sent.
  - Every mechanism listed above has to occur at least once.

## Simulating

All modules are plain SystemVerilog. Give the package first and let verilator find the
modules by name. The benches use fractional nanosecond delays, so set the time scale:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl --top-module tb_salt_digital rtl/salt_pkg.sv tb/tb_salt_digital.sv
./obj_dir/Vtb_salt_digital
```

`-Wno-fatal` is needed because the full-chip bench flips one copy of a triplicated register
from outside to test the correction, and verilator reports that as a second driver.

A bench prints `TB_RESULT checks=N failures=M` and stops. Every bench has a watchdog. The
full-chip bench takes under a second of CPU time. Use any `tb/tb_<module>.sv` with its module
in the same way.

## What to trust, and what is assumed

The following follow the specification:

- the stage order;
- the 12-bit word and the hit layout;
- the header layout and special codes;
- the 0–63 hit range with BusyEvent above it;
- the ZS latency of 5;
- the FIFO depth of 3;
- the input buffer of one row less one word;
- rows of 4 words;
- Idle fill and whole-frame Sync in the converter;
- 3 to 6 e-links;
- a 4× data clock;
- the command set;
- triplication of configuration, BXID and TFC counters;
- the two-flip-flop reset synchroniser;
- a test pulse with its own delay, length, polarity and per-channel mask.

The following are this design's own choices:

- the common-mode algorithm (thresholded mean with truncating division) and its 3-clock
  latency;
- the exact merge grouping inside `zs`;
- the packet priority and the reading of BufferFullN as "NZS did not fit";
- the parity rule (even, chosen because it reproduces the Idle code);
- the NZS word layout beyond its first two words;
- the memory sizes: 32 × 16 rows, and 128 words of output buffer;
- the TFC bit order;
- the 16-bit counter width;
- the converter's behaviour after a Sync or flush;
- the bit order on the e-links;
- the configuration register contents.

Behaviour under occupancy was tested as follows:

- The memory fills during long bursts of about 28% occupancy with 6 e-links.
- BufferFull replaces packets until the memory drains.
- Nothing is lost silently.

The RTL does not model the analogue front end, the ADC, the DLL, the PLL, the SLVS pads
and the I2C slave. Their signals are ports of `salt_digital`.
