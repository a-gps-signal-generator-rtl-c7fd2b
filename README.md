# Four-satellite GPS L1 C/A signal generator

This is synthesizable SystemVerilog for an FPGA that generates the civilian GPS
signal of four satellites (SVs) at once. It is meant for a lab: test a receiver
or a decoder, or demonstrate spread-spectrum modulation, without a commercial
GPS simulator. Each satellite's signal is a carrier whose sign is flipped by the
XOR of two bit streams:

* the **C/A code**: a 1023-chip Gold code at 1.023 Mchip/s that repeats every
  1 ms. Each satellite has its own code (its PRN number).
* the **navigation data**: 50 bit/s. A host processor builds the data and loads
  it into a block RAM.

The four signals are added and sent to a DAC. The carrier is 50.127 MHz rather
than the 1575.42 MHz of L1. A cable carries it to the receiver, and an external
mixer can move it to L1. The design does not model Doppler shift or
satellite-to-user delay: every satellite's code and data start together at reset.

The architecture follows a published ROACH (Virtex-5) firmware design built from
Simulink blocks. It keeps that design's dividers, registers, multiplexers and
switches. Where the original is vague, or used a vendor core, the choices made
here are listed under "Own choices" below.

## One clock, exact ratios

Everything runs on one system clock, nominally 200.508 MHz. Every rate in the
signal is an exact integer fraction of it:

| quantity            | ratio                       | value         |
|---------------------|-----------------------------|---------------|
| carrier             | f_sys / 4                   | 50.127 MHz    |
| C/A chip rate       | f_sys / 196                 | 1.023 MHz     |
| carrier cycles/chip | 196 / 4                     | 49            |
| code period (epoch) | 1023 chips                  | 1 ms          |
| data bit            | 20 code periods             | 20 ms (50 Hz) |

There are no other clocks. The "clocks" of the original diagrams are
one-cycle **enable pulses** (ticks) on the system clock:

* `prn_tick` comes every 196 cycles.
* `ms_tick` comes at every code epoch.
* `msg_tick` comes at every data-bit boundary.

The dividers detect their full count cheaply, as the original did. The /196
and /20 counters start at 1 and test only the bits that are set in 196 or 20.
No smaller count has all of those bits. The /1023 counter runs from 2 to 1024
in 11 bits, so its top bit alone marks the full count.

Because every rate comes from the one clock, the data and the code cannot
drift apart. Every data-bit edge falls on a code epoch, as a GPS receiver
expects.

## Structure

```
gps_signal_generator
├── control_registers      host write bus -> per-SV config, SV on/off, BRAM writes
├── sv_channel  x4         one satellite ("single signal model")
│   ├── prn_clock          /196 divider -> prn_tick
│   ├── prn_generator      G1/G2 LFSRs + G2 stage selector -> chip
│   ├── message_clock      /1023 -> ms_tick, edge detect, /20 -> msg_tick
│   ├── message_bram       1023 x 32 navigation data
│   ├── message_data       bit and address counters -> data bit
│   ├── carrier_dds        phase accumulator + sine ROM -> carrier
│   └── bpsk_modulator     chip ^ data selects +carrier / -carrier
└── sv_adder               (SV1+SV2) + (SV3+SV4), per-SV on/off
```

`gps_pkg` holds the shared constants, the `sv_cfg_t` configuration struct, the
`bram_wr_t` write struct and the register enum.

## C/A code generation

`prn_generator` uses two 10-stage shift registers. The stages are numbered 1
(leftmost) to 10, and both registers start at all ones. On each `prn_tick`:

* G1 shifts right and takes `G1[3] ^ G1[10]` into stage 1 (1 + x^3 + x^10).
* G2 shifts right and takes `G2[2]^G2[3]^G2[6]^G2[8]^G2[9]^G2[10]` into stage 1.

The chip is `G1[10] ^ G2[a] ^ G2[b]`. Two 10-way multiplexers pick the stages a
and b. The selects come from two registers per SV, which hold **a-1 and b-1**.
Examples of the standard pairs:

| PRN | a, b  | register values |
|-----|-------|-----------------|
| 1   | 2, 6  | 1, 5            |
| 9   | 3, 10 | 2, 9            |
| 15  | 8, 9  | 7, 8            |
| 23  | 1, 3  | 0, 2            |
| 30  | 2, 7  | 1, 6            |

The full table of PRNs 1–37 and the first ten chips of each (in octal) is in
`tb/tb_prn_generator.sv`. The code repeats every 1023 chips on its own; nothing
restarts it. The `epoch` output is high while G1 is all ones, which marks the
first chip of each period.

## Navigation data path

The host loads the message into `message_bram`: 1023 words of 32 bits per SV.
Each word carries one 30-bit GPS word:

* GPS bit 1 (sent first) is in bit 31, down to GPS bit 30 in bit 2.
* Bits 1:0 are never sent.

`message_data` has a bit counter (0..29) and an address counter (0..1022). Both
advance only on `msg_tick`. After the last bit of word 1022 the address returns
to 0, so the message repeats forever. The `word_wrap` / `sv_msg_wrap` pulse
marks the end of each pass.

**Capacity.** A BRAM holds 1023 × 30 = 30,690 bits, which is 10 minutes 14
seconds of data at 50 bit/s. That is enough for one 1,500-bit frame (subframes
1–5) many times over. It is **not** enough for the complete 25-page almanac
cycle, which is 37,500 bits (1,250 words). To send that, raise `MSG_WORDS` to
1250. `MSG_ADDR_W` is already 10 bits and would need to be 11.

## Timing and alignment

This is the subtle part of the design. A chip tick at cycle *t* that ends a
data bit causes these events:

| cycle | event |
|-------|-------|
| t     | `prn_tick`; the stage-1 counter reaches its last value (1024) |
| t+1   | new chip (first of the period) on the generator output; `ms_tick` (edge-detected 1 kHz level) |
| t+2   | `msg_tick` (edge-detected 50 Hz level); bit/address counters advance at the end of this cycle |
| t+3   | BRAM reads the new word; bit index delayed to match |
| t+4   | new data bit on `data_out` |

`sv_channel` therefore delays the chip by `DATA_ALIGN` = 3 cycles. This puts the
chip edge and the data edge in the same cycle. The modulator is two
multiplexers of four cycles' latency each:

```
sample(t) = (sym(t-8) ? -1 : +1) * carrier(t-4),   sym = (chip & !prn_off) ^ (data & !msg_off)
```

`sv_adder` adds two more cycles. So `dac_data` follows the aligned chip and
data bits (`sv_chip`, `sv_data`) by 10 cycles, and the carrier by 6. The
absolute latency has no effect on the signal. What matters is that all four
SVs, and each SV's code and data, stay in step.

The edge detectors in `message_clock` turn a counter's "full" level into a
single tick. Without them, the data advances on every system clock while the
level is high, and the whole BRAM bursts out once per period instead of one bit
per 20 ms. One of the testbenches' fault checks targets exactly this.

After reset, the first `msg_tick` comes after 1023 × 20 chips. The first data
bit therefore lasts a full 20 ms.

## Output levels

Each SV's carrier is a signed 14-bit sine of amplitude 8191. At the default
tuning the carrier samples are 0, +A, 0, −A. The sum of four equal BPSK signals
can only have a magnitude of 0, 2A or 4A (zero, half and full amplitude). The
16-bit `dac_data` holds the largest sum, ±32764, without overflow. The original
board drives the same signal on both its I and Q DAC outputs, so connect
`dac_data` to both.

## Host register map

The host bus is write-only: `host_we`, a 16-bit word address `host_addr` and
32-bit data `host_wdata`. Writes take effect on the next cycle. The map is also
in `gps_pkg.sv`.

| address                     | register                                            | reset |
|-----------------------------|-----------------------------------------------------|-------|
| `0x0000 + 16*sv + 0`        | G2 selector REG1 (stage − 1), bits 3:0              | 1     |
| `0x0000 + 16*sv + 1`        | G2 selector REG2 (stage − 1), bits 3:0              | 5     |
| `0x0000 + 16*sv + 2`        | message clock switch: data at chip rate (bit 0)    | 0     |
| `0x0000 + 16*sv + 3`        | PRN shutdown: chip forced to 0 (bit 0)              | 0     |
| `0x0000 + 16*sv + 4`        | message shutdown: data forced to 0 (bit 0)          | 0     |
| `0x0040`                    | SV1/SV2 on (bits 1:0)                               | 3     |
| `0x0041`                    | SV3/SV4 on (bits 1:0)                               | 3     |
| `0x8000 + 0x2000*sv + word` | message BRAM word of SV `sv` (0..3)                 | —     |

Reset selects PRN 1 on every channel. It does not clear the BRAMs: the host
must write every word that will be sent.

The three switches are test modes:

* **PRN shutdown** sends the data alone.
* **Message shutdown** sends the code alone.
* **Message clock switch** advances the data at the chip rate. This runs through
  the whole message in 30 ms, which helps to check the BRAM contents and the
  wiring of the counters.

## Own choices

The original design does not specify the following; this implementation chose
them:

* **Host interface.** The original writes registers and BRAMs over the network
  through an embedded processor. Here that is a plain write bus, with the
  address map and reset values above.
* **Carrier generator.** The original used a vendor DDS core of which only the
  output frequency is known. `carrier_dds` is a 32-bit phase accumulator and a
  1024-entry sine ROM. The ROM entries are round(8191·sin(2πk/1024)), computed
  at elaboration. Set `PHASE_INC` to retune it.
* **Sample widths.** 14 bits per SV and one sample per system clock. The
  board's converter clock is four times the system clock. A DAC interface that
  takes four samples per clock would repeat or interpolate `dac_data`.
* **Polarity.** A symbol of 1 (chip XOR data) sends the negated carrier.
* **Alignment.** The 3-cycle chip alignment delay, and a 2-cycle delay of the
  chip tick in the message-clock test mode, are derived from this design's own
  pipeline. The original inserted delays by trial.
* **Out-of-range selects.** A G2 selector value above 9 contributes 0.
* **Reset.** Reset is synchronous and active high.

## Not included

* The DAC (a 16-bit, 1 GS/s converter on the board).
* The generation of the system clock from the board's 802.032 MHz input clock.
* The embedded processor and its network register server.
* The host software. This design only transmits whatever the BRAMs hold. The
  software builds the navigation message: it fetches the almanac, fills
  subframes 1–5 and pages 1–25, and computes the parity bits.
* Doppler shift and per-satellite delay.

## Parameters

All parameters of `gps_signal_generator` have working defaults:

| parameter   | default | meaning |
|-------------|---------|---------|
| `PRN_DIV`   | 196     | system clocks per chip |
| `CODE_LEN`  | 1023    | chips per code period (first message-clock divider) |
| `BIT_DIV`   | 20      | code periods per data bit |
| `MSG_WORDS` | 1023    | message BRAM words used per SV |
| `SAMPLE_W`  | 14      | carrier sample width per SV |
| `MUX_LAT`   | 4       | latency of each modulator multiplexer |
| `DAC_W`     | 16      | output width |

Smaller `PRN_DIV`, `BIT_DIV` and `MSG_WORDS` speed up simulation without
changing the logic.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
expected values are computed independently inside each testbench: a software
LFSR model, the published first-ten-chip table, bit streams packed by the
testbench, and real-valued sines. Example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gps_signal_generator \
  -y rtl -y tb +libext+.sv -Irtl rtl/gps_pkg.sv tb/tb_gps_signal_generator.sv
./obj_dir/Vtb_gps_signal_generator
```

The testbenches:

* **`tb_prn_generator`**: all 37 PRNs against the octal table and the model,
  plus the Gold-code autocorrelation values (−65, −1 or 63).
* **`tb_message_data`**: replays the four bit patterns used to validate the
  original hardware: 270 ones then 330 zeros, runs of 30, word pairs that pin
  the MSB-first order and the word edges, and a walking one.
* **`tb_sv_channel`**: one satellite, end to end. It compares every cycle of the
  chip, data, epoch and sample.
* **`tb_gps_signal_generator`**: all four SVs (PRNs 9, 15, 23, 30) at reduced
  ratios. It covers two full message passes, the three test switches, SVs
  switched off and on, and the message-clock test mode. It counts every
  mechanism, including the zero, half and full amplitude of the sum.
* **`tb_gps_correlation`**: a simple receiver at the default parameters. It
  mixes `dac_data` down with the f_sys/4 carrier and integrates each chip. It
  then correlates one code period against all 37 C/A codes at every code phase.
  Each of PRNs 9, 15, 23 and 30 alone, and all four in the sum, peak near full
  scale (about 0.95) at phase 0. PRN 28 and every other absent code stay below
  0.2. It takes a few seconds.
* **`tb_gps_full_size`**: the same checks at the default parameters. It fills
  all 4 × 1023 BRAM words and sends two real-rate 20 ms data bits (8 million
  cycles). It then sends one full 30,690-bit pass in the message-clock test
  mode. It takes a little over a minute in Verilator.
