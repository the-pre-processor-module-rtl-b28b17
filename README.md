# Pre-Processor Module of a calorimeter level-1 trigger: SystemVerilog model

A calorimeter trigger has to decide, every 25 ns, whether the current bunch
crossing contains something interesting. Its input is the analog energy sum of
each trigger tower. Those pulses are several bunch crossings wide and are
digitised at 40 MHz. The Pre-Processor Module (PPM) handles 64 such towers. It
does three jobs:

- **Real-time path.** For every tower it works out *which* bunch crossing a
  pulse belongs to (bunch-crossing identification, BCID), and *how much*
  calibrated transverse energy it carried. The 8-bit result goes to the
  cluster processor over a bunch-multiplexed 9-bit link. The 4-tower sum goes
  to the jet/energy processor.
- **Readout path.** It keeps a 128-tick history of raw samples and results.
  On each level-1 accept (L1A) it ships a programmable window of both to the
  data acquisition over a serial "G-Link" line.
- **Set-up and monitoring.** It provides a VME register/memory map, rate
  meters, energy histograms, test-pattern playback, a local trigger
  generator, and loading of the analog-input DACs and fine-timing delays.

The RTL models the digital logic of one module at a 40.08 MHz clock, one
tick per bunch crossing. The top level is `ppm_top`.

## Structure

```
ppm_top
├── rem_vme_if            VME decode, register map, DAQ-mode write protection
├── rem_local_trigger     local L1A / test-pulse generator
├── ttc_counters          bunch and event counters of the readout merger
├── ppr_mcm  x16          one multi-chip module = 4 towers
│   ├── ttc_counters      local bunch/event counters
│   ├── ppr_channel x4    one tower, see below
│   ├── ppr_bcmux   x2    two towers onto one 9-bit link
│   ├── ppr_jet_sum       sum of the four towers
│   └── ppr_sif_tx  x2    serial readout, one line per tower pair
├── rem_sif_rx   x32      serial receivers
├── rem_glink_formatter   builds one frame per L1A on 16 lines
├── rem_spi_dac  x4       analog-input DAC loading
├── rem_i2c_write         fine-timing delay chip loading
└── led_stretch  x3       front-panel indicators
```

The "readout merger" (ReM) is the module's own control and DAQ logic: the
`rem_*` blocks and the second `ttc_counters`.

## One tower: `ppr_channel`

Samples flow through the following stages:

1. **Input register.**
   - The MSB of the 10-bit FADC code is inverted, unless `CR0[4]` is set.
   - The external-BCID bit from the analog discriminator is reduced to a
     one-tick pulse on its rising edge.
2. **Synchronisation delays** (`ppr_delay_line`). Data and the external bit
   each get their own 0–15 tick delay, or are bypassed (`CR3`).
3. **Playback.** The 256-cell memory (`ppr_playback_histo`) can replace the
   input with a stored pattern. It plays once, repeats with a pause, or
   starts synchronously on all channels.
4. **BCID.** Three methods run in parallel:
   - `ppr_fir_filter`: a 5-tap FIR with 4-bit coefficients. It takes
     `StartBit` to choose which 10 bits of the sum are kept, and clips at
     1023.
   - `ppr_peak_finder`: marks a local maximum of the filtered value. `CR15[3]`
     chooses which neighbour comparison is strict.
   - `ppr_sat_bcid`: for pulses that saturate the FADC. It finds the first
     sample above `SatHigh` and uses the sample before it against `SatLow` to
     decide between this crossing and the next.
   - The external bit, delayed by `DelayExtBcid`.
5. **Decision** (`ppr_bcid_decision`). The energy picks one of three ranges
   (`CR10`, `CR11`). Each range has an 8-entry truth table over
   {peak, saturated, external}, held in `CR12`–`CR14`. Bit 8 of those
   registers forces the saturation value in that range.
6. **LUT** (`ppr_lut`). A 1024×8 table maps the identified energy to Et.
   - Non-identified slices give 0.
   - Bypass passes the energy clipped to 255.
   - A write to the "LUT load" address fills the table with
     `min(255, max(0, i − pedestal) · slope / 256)`, one cell per tick.
7. **Readout** (`ppr_readout`). Two 128×11 circular pipelines hold raw
   samples and LUT results. An accept copies a window into a derandomiser
   FIFO (64 words), see below.
8. **Monitoring.**
   - `ppr_ratemeter` counts ticks above a threshold over a programmed window.
   - The histogram mode of the playback memory counts FADC or LUT values
     between two bunch numbers.

**Latency.** An FADC sample clocked in at edge *t* gives its Et at edge
*t* + 9, with both sync delays at zero. On the MCM outputs the BC-mux link
adds 1 tick and the jet sum 2 ticks. The default `DelayExtBcid` (6) and
`DelaySatBcid` (2) line the three BCID methods up with this pipeline.

The 34 control registers CR0–CR33 sit in the channel and reset to the
documented defaults. `ppm_pkg` holds their field layout (`decode_cfg`) and
their defaults (`cr_default`). One default is this design's choice: CR16
selects 5 FADC slices and 1 LUT slice, which matches the default ReM readout
mode.

## Bunch-crossing multiplexing

A real pulse produces a non-zero Et in only one crossing, and never in two
adjacent ones. So two towers can share one link running at the crossing rate.
`ppr_bcmux` looks at each tower pair over two ticks:

- If only one tower has a value, it is sent in the first tick. The link's
  9th bit tells which tower it is.
- If both have values, one is sent in each tick, in a fixed order.
- If neither has a value, the link carries zeros.

A bypass mode (`SIF3` bit 2) sends one selected tower without multiplexing.
Tower letters inside an MCM follow the board wiring: A, B, C and D are
connector inputs 1, 4, 2 and 3. (A, B) share link 0 and (C, D) share link 1.

## Readout words and the serial line

Each readout word is 13 bits. On the serial line it is sent MSB first,
behind a start bit `1`.

| word       | bits 12..0                                  |
|------------|---------------------------------------------|
| read-back  | `0`, 12-bit register value                  |
| header     | `1 0 C L H evt[3:0] bc[3:0]`                |
| LUT slice  | `1 0 PB SB EB Et[7:0]`                      |
| FADC slice | `1 1 EB FADC[9:0]`                          |

- C is the channel within the pair.
- L means data were lost. H means only the header follows, because the FIFO
  had no room for the whole event.
- PB, SB and EB are the peak-finder, saturated and external BCID bits.

`ppr_sif_tx` sends, per accept, a read-back word and then both channels'
events. `rem_sif_rx` strips the read-back word, checks the header order and
channel bit, and unpacks the slices into 11-bit G-Link fields.

## G-Link frame

`rem_glink_formatter` waits until all 32 pair records of an accept have
arrived, or a 2048-tick time-out passes. It then sends one frame with
`glink_dav` high. Each of the 16 lines (one per MCM) carries one bit per
tick, in this order:

1. One bunch-number bit. Line *m* < 12 sends bit *m* of the 12-bit BCID;
   the other lines send 0.
2. Channels A, B, C, D. For each: *n_lut* LUT fields, then *n_fadc* FADC
   fields, 11 bits each, LSB first.
   - A LUT field is `{PB, SB, EB, Et}`.
   - A FADC field is `{FADC[9:0], EB}`, with EB in bit 0.
3. Ten error bits: CD for channels A–D disabled, MA (MCM absent), TO
   (time-out), AFF (data loss), ENM/BNM (event or bunch number of a header
   differs from the ReM counters), RFC (format error or record overrun).
4. An even parity bit.

The length is 4·11·(n_lut + n_fadc) + 12 bits. The readout mode register
picks the slice counts:

| mode | FADC + LUT | bits | 
|------|------------|------|
| 0    | 3 + 1      | 188  |
| 1    | 5 + 1 (default) | 276 |
| 2    | 7 + 1      | 364  |
| 3    | 9 + 3      | 540  |
| 4    | 11 + 5     | 716  |
| 5    | 15 + 1     | 716  |

At 25 ns per bit, modes 0–2 fit the 10 µs between accepts at a 100 kHz
trigger rate. The channels' CR16 must select the same slice counts as the
mode.

**Limitation.** Each receiver holds only one record per pair. A record
arrives faster than a frame leaves, so a burst of accepts closer than about
one frame length overruns that slot. The overrun is flagged (RFC/TO) rather
than buffered. Sparse accepts are fine. Derandomiser overflow inside the
channels is handled as specified, with header-only events.

## VME map

Addresses are byte addresses. The module answers when A31–A28 = 0xC and
A27–A23 equal the geographical address. The accepted address modifiers are
0x09, 0x0A, 0x0B, 0x0D, 0x0E and 0x0F.

| address | contents |
|---------|----------|
| `0x200000 + m·0x2000` | MCM *m* |
| `+0x00..0x0C` | DAC words of inputs 1, 4, 2, 3 (sent over SPI) |
| `+0x10..0x1C` | fine-timing delay of A–D (sent over I²C) |
| `+0x20..0x30`, `+0x40..0x50` | SIF0–SIF4 of pair (A,B), pair (C,D) |
| `+0x60 + c·0x800` | channel *c*: |
| `  +0x004..0x203` | playback memory, 2 cells per word (bits 10:0, 26:16) |
| `  +0x21C` | LUT load (starts the ramp fill) |
| `  +0x224..0x623` | LUT, 4 cells per word, lowest byte first |
| `  +0x624..0x6A8` | CR0..CR33 |
| `0x7FFF60` | readout mode |
| `0x7FFF64` | DAV gap |
| `0x7FFF68` / `0x7FFF6C` | channel disable 1–32 / 33–64 |
| `0x7FFF70` | MCM control: bit 0 starts synchronous playback |
| `0x7FFF80` / `0x7FFF84` | local trigger timing / configuration |
| `0x7FFF88` | local bunch / event counter reset |
| `0x7FFFD0` | version |
| `0x7FFFD4` | status |
| `0x7FFFD8` | DAQ mode |
| `0x7FFFDC` | control |
| `0x7FFFE0` | command |
| `0x7FFFE4` | error register (clears on read) |

In DAQ mode, set-up writes are refused and flagged in the error register.
The bus side is a simple one-tick request/acknowledge. A packed memory word
is moved one cell per tick, so LUT accesses acknowledge after 5 ticks,
playback accesses after 3, and register reads after 2.

## What is modelled, and where it departs from the hardware

- **Not modelled as logic.** These parts have no logic function given, or are
  bought parts. The top brings their digital side out as ports.
  - Analog input conditioning and discriminators (`ext_bcid` is an input).
  - The 10-bit FADCs (`fadc` is an input).
  - The fine-timing delay chips (only their I²C loading is built).
  - The LVDS serialisers and fan-out logic (`cp_link` and `jep` are the
    parallel words).
  - The TTC receiver (`ttc_l1a/bcr/ecr` are inputs).
  - The CAN monitoring controller, configuration memories and CPLDs.
  - The G-Link serialiser (`glink` is the bit stream before it).
- **Not built.** Collection of rate and histogram results by the ReM, spy
  buffers, and the TTC decoder's I²C set-up.
- **Board wiring simplified.** The board passes ASIC set-up through the
  serial readout path. Here, a direct parallel bus from the VME block
  reaches every channel.
- **Choices where the register descriptions are silent.** The LUT ramp
  formula, FIFO and queue depths, the G-Link error-bit order, time-out
  length, and what counts as a local-trigger start. Each module's opening
  comment lists its own choices.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=… failures=…` and stops, and has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_ppr_fir_filter \
    -y rtl rtl/ppm_pkg.sv tb/tb_ppr_fir_filter.sv
./obj_dir/Vtb_ppr_fir_filter
```

- **`tb_ppm_top`** runs the whole module with 2 MCMs, a 16-word
  derandomiser and short rate/LED timers. It uses VME to set up LUTs,
  playback, rate meters, histograms, channel disable, readout modes 0/1/3,
  the local trigger and DAQ mode. It decodes every G-Link frame and checks
  the frame's length, parity, BC bit and error bits. It also checks every
  FADC slice against the samples that were driven in. It counts each
  mechanism (data loss, CD/MA flags, saturated and external BCID bits,
  playback, ramp load, SPI/I²C traffic and so on) and fails any that never
  occurs.
- **`tb_ppm_full`** runs `ppm_top` at its default size (16 MCMs, 64
  channels) through 25 accepts. It checks all 16 lines. It takes under a
  minute with verilator.

The FIR, peak-finder, saturated-BCID, decision, LUT, BC-mux, jet-sum, delay,
counter, rate-meter, local-trigger, SPI, I²C and LED blocks have their own
testbenches. They check cycle-exact reference models. The readout, serial
link, formatter, VME and MCM/channel wiring are checked through
`tb_ppm_top`.
