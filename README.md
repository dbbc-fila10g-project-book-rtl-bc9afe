# FiLa10G user logic: VSI-H to Mark5B or VDIF over 10 Gigabit Ethernet

FiLa10G sits behind a digital baseband converter (DBBC) in a VLBI station.
It takes the sampled data the DBBC puts out on one or two VSI-H ports and
sends it, unchanged, over a single 10GbE fibre as a stream of UDP packets.
Each packet carries one frame, either Mark5B (a 16-byte header) or VDIF
(a 32-byte header), with the station time in the header and 10000 bytes
of VSI samples after it. A recorder or a network
storage system at the other end of the fibre can then timestamp and store
the samples.

This repository holds the FPGA user logic written in SystemVerilog. The
logic covers everything between the VSI pins and the transmit port of the
10GbE UDP/IP core. The processor that configures it, the 10GbE core and
the clock managers are outside; their signals are ports of `fila10g_top`.

## Data path and clock domains

```
 VSI port #1 (vsi_clk[0]) ─ vsi_tvg ─ vsi_pack ─ async_fifo (64 bit) ─┐
                                                                     ├─ input_combiner ─ vsi_framer ─ tx_* ─▶ 10GbE UDP core
 VSI port #2 (vsi_clk[1]) ─ vsi_tvg ──────────── async_fifo (32 bit) ─┘                         ▲
                                                                                               │ (unix_to_vlba, subsec_timer inside)
 VSI#1 1PPS ─ pulse_sync ─ rtc ────────────────────────────────────────────────────────────────┘
 processor bus ─ plb_regs (configuration, status)                        user_clk domain
```

* **VSI port clocks** (16 to 128 MHz; 32, 64 or optionally 128 MHz from
  the DBBC). Each port has its own clock, and its own cable. `vsi_tvg`
  registers the port's `{1PPS, Valid, data[31:0]}` or, in test vector
  mode, replaces the data with a counter. Port #2's word is written into
  its 32-bit `async_fifo` on every clock. Port #1 has a 32:64 input FIFO:
  `vsi_pack` writes its 64-bit `async_fifo`, as described below.
* **User-logic clock** (`user_clk`, 150 MHz, or 100 MHz for lower power).
  Everything else runs here, including the register bus.

One 64-bit stream is made from the VSI ports:

* **1xVSI (32-bit, "geo" mode).** `vsi_pack` packs two successive words
  of port #1 into one 64-bit word, in the VSI clock, before the FIFO. The
  earlier word goes in bits [31:0]. A word that carries the 1PPS always
  starts a new 64-bit word. If the 1PPS would land in the upper half, the
  held lower half is dropped. After start-up this can happen only once,
  because every VSI-H rate gives an even number of words per second.
  `input_combiner` then passes the packed words on, one per user clock.
  Packing before the FIFO matters for the clock budget. The user logic
  reads 64 bits per clock in both modes, so one port at 128 MHz also
  works with a 100 MHz user clock.
* **2xVSI (64-bit, "astro" mode).** `vsi_pack` writes each word of
  port #1 on its own (upper half zero). `input_combiner` reads both FIFOs.
  Word *n* of port #2 and word *n* of
  port #1 form `{port #2, port #1}`. The two clocks come from the same
  DBBC clock, but the cables differ, so the two FIFOs can start filling a
  clock apart. The combiner therefore empties each FIFO up to its next
  1PPS word, and starts pairing when both FIFO heads carry the 1PPS. From
  then on it reads both FIFOs together, and only while each holds more
  than 4 words, which absorbs the phase offset between the cables. If a
  pair ever shows the 1PPS on one port only, the alignment is dropped and
  the search starts again.

The stream is never reordered or filtered. Bit and channel selection are
done by the DBBC.

## Time keeping: how each frame gets its second

Getting the time right is the subtle part of the design. Three pieces are
involved.

1. **`rtc`: a 32-bit Unix-seconds counter.** Software writes the Unix
   second of the *next* 1PPS (`REG_RTC_BASE`) and the reference clock rate
   in Hz (`REG_REF_RATE`). It then writes the configuration register with
   the ARM bit set. The next 1PPS from VSI port #1 loads the base second
   and sets "1PPS sync gained". That 1PPS reaches `user_clk` through a
   toggle synchroniser, `pulse_sync`. After the load the counter runs on
   the local clock alone, one second every `ref_rate` clocks. It is not
   re-aligned to later 1PPS pulses. Arming again re-triggers it.
2. **`vsi_framer` keeps its own second count.** Frames are aligned to
   the 1PPS carried *in the data*, because that is the only 1PPS that is
   exactly in step with the samples. The framer works as follows:
   * After the RTC has been (re)triggered, the framer waits for the first
     1PPS word in the data. It loads the RTC value rounded to the nearest
     second (`sec_near`). The rounding guards against the RTC ticking a
     few clocks before or after the data 1PPS reaches the framer.
   * After that, every 1PPS word adds one second.
   * A 1PPS word that reaches the framer while the RTC is still armed does
     not count as a load. The next 1PPS loads the RTC value instead.

   The result does not depend on whether the direct 1PPS path or the FIFO
   path is faster.
3. **`unix_to_vlba` converts the second to the VLBA BCD time code.** The
   Mark5B header holds the low three decimal digits of the Modified Julian
   Date and the five-digit second of the day, both in BCD. The converter
   works serially and takes about 50 clocks:
   * a restoring division by 86400 gives the day and the second of the day;
   * the day plus 40587 gives the MJD;
   * shift-and-add-3 gives the BCD digits.

   VDIF needs no conversion: its header holds the seconds since the
   reference epoch, 1 January of the year 2000 + `REG_YEARS`. The framer
   subtracts the Unix time of that date, 946684800 + 86400 × (365 × years
   + leap days before it), valid for 2000 to 2031.

   A conversion runs once per second. During it the 1PPS word waits at the
   combiner output, and the input FIFOs absorb the pause.

The header also holds a fraction of a second, in four BCD digits of
0.1 ms. `subsec_timer` produces it from a phase accumulator. Each clock it
adds 10000; when the sum passes `ref_rate` it subtracts `ref_rate` and
advances the BCD count. It is restarted by each 1PPS word. So it counts
exactly 10000 steps per `ref_rate` clocks without a divider. The framer
samples it when a frame's first header word is sent.

## The frames on the wire

### Mark5B

Each UDP payload is one frame of `PAYLOAD_WORDS + 2` 64-bit words. That is
1252 words, or 10016 bytes, at the default size. Within a 64-bit word, the
earlier 32-bit word is in bits [31:0].

| beat | bits [31:0] | bits [63:32] |
|------|-------------|--------------|
| 0 | sync word `0xABADDEED` | station ID [31:16], T [15], frame number [14:0] |
| 1 | `JJJSSSSS`: BCD MJD mod 1000, BCD second of day | `.SSSS` BCD fraction [31:16], CRC-16 [15:0] |
| 2 … 1251 | VSI data | VSI data |

* **Frame number.** It restarts at 0 with the frame that starts at a 1PPS
  word, then counts up. A 1PPS can fall inside a frame, for example when a
  port glitches. That word is then sent as ordinary data, the next frame
  is numbered 0 of the next second, and the sticky status bit
  `ST_PPS_MISAL` is set.
* **T** is set while test vector mode is on.
* **CRC.** The CRC-16 uses the polynomial x^16 + x^15 + x^2 + 1, starts at
  zero and is fed MSB first. It covers the 48 time-code bits: `JJJSSSSS`
  followed by `.SSSS`.
* **Frame boundaries.** `tx_eof` marks the last payload word. The
  destination IP address and port come with every frame.
* **Valid bit.** A VSI word with Valid low is sent as it is, and sets the
  sticky status bit `ST_INVALID`. Mark5B has no per-frame invalid flag.
* **Back pressure.** The framer sends nothing while `tx_afull` is high.
  In steady state a Mark5B frame takes `PAYLOAD_WORDS + 3` clocks.
* **Start-up.** No frames are sent until the RTC is synchronised. Until
  then the combined stream is read and dropped, so the FIFOs do not
  overflow.

### VDIF

Selected with FORMAT = 2. Each UDP payload is one VDIF 1.0 frame of
`PAYLOAD_WORDS + 4` 64-bit words (10032 bytes at the default size): a
32-byte header followed by the same VSI data.

| beat | bits [31:0] | bits [63:32] |
|------|-------------|--------------|
| 0 | invalid 0, legacy 0, seconds from epoch [29:0] | 0 [31:30], epoch [29:24], frame number [23:0] |
| 1 | version 0 [31:29], log2 channels [28:24], frame length [23:0] | real 0 [31], bits-1 [30:26], thread [25:16], station [15:0] |
| 2, 3 | 0 | 0 |
| 4 … 1253 | VSI data | VSI data |

* **Epoch** is 2 × `REG_YEARS`, in half years since 2000; only 1 January
  epochs are used.
* **Frame length** is in 8-byte units, `PAYLOAD_WORDS + 4` (1254).
* **Channels, bits per sample and thread** come from `REG_VDIF`. The
  reset value describes 16 channels of 2 bits, thread 0. The fields only
  label the data; the samples are not reordered.
* **Frame number** has 24 bits and restarts at each 1PPS word as for
  Mark5B. The invalid bit is always 0; a word with Valid low sets
  `ST_INVALID` as before.
* A VDIF frame takes `PAYLOAD_WORDS + 5` clocks.

## Rates

The input side runs from 16 to 128 MHz per port; the user logic runs at
150 MHz (or 100 MHz, see below).

| input | data rate | 64-bit words/s | frames/s |
|-------|-----------|----------------|----------|
| 1x32 bit @ 32 MHz | 1.024 Gb/s | 16 M | 12800 |
| 1x32 bit @ 64 MHz | 2.048 Gb/s | 32 M | 25600 |
| 1x32 bit @ 128 MHz | 4.096 Gb/s | 64 M | 51200 |
| 2x32 bit @ 32 MHz | 2.048 Gb/s | 32 M | 25600 |
| 2x32 bit @ 64 MHz | 4.096 Gb/s | 64 M | 51200 |
| 2x32 bit @ 128 MHz | 8.192 Gb/s | 128 M | 102400 |

What limits each stage:

* **Framer.** It accepts up to 150 M × 1250/1253 ≈ 149.6 M words/s
  (149.4 M with VDIF).
* **Input FIFOs.** The combiner reads one 64-bit word per user clock in
  either mode.
* **100 MHz user clock.** At 100 MHz the framer takes about 99.8 M
  words/s. That is 6.4 Gb/s of input, enough for the 4.096 Gb/s setups
  (one port at 128 MHz, two ports at 64 MHz) but not for two ports at
  128 MHz.
* **10GbE link.** The highest rate uses about 8.21 Gb/s of Mark5B (8.22
  with VDIF) plus roughly 0.7% of UDP/IP/Ethernet headers, which fits in
  10 Gb/s.

At 150 MHz every configuration fits in bandwidth. But the Mark5B frame number has
only 15 bits, so above 32768 frames/s (2.6 Gb/s) the frame number wraps
within a second. The design sends such rates, but a receiver cannot rely
on the frame number there. The VDIF frame number has 24 bits and does
not wrap at any of these rates. The 8.192 Gb/s rate is the one planned for
links between two FiLa10G units and for network storage rather than for
Mark5C recorders.

## Registers

The registers are 32 bits wide, addressed by a 4-bit word address. A
write takes effect on the clock with `bus_wr` high. Read data appears on
`bus_rdata` one clock after `bus_rd`.

| addr | name | dir | contents |
|------|------|-----|----------|
| 0 | RTC_BASE | W/R | Unix second of the next 1PPS |
| 1 | RTC_NOW | R | current RTC seconds |
| 2 | YEARS | W/R | years since 2000 (8 bits), sets the VDIF epoch |
| 3 | CONFIG | W/R | configuration bits, below |
| 4 | STATUS | R | status bits, below |
| 5 | DEST_IP | W/R | UDP/IP destination address |
| 6 | DEST_PORT | W/R | UDP destination port (16 bits) |
| 7 | STATION | W/R | station ID, two ASCII characters |
| 8 | REF_RATE | W/R | reference (user) clock rate in Hz, reset 150000000 |
| 9 | FRAMES | R | frames sent |
| 10 | FRAME_SEC | R | Unix second of the frame being sent |
| 11 | VDIF | W/R | VDIF fields: log2 channels [19:15], bits per sample - 1 [14:10], thread ID [9:0] |

Configuration bits:

* **0 ARM.** Writing 1 arms the RTC for the next 1PPS. The bit is not
  stored.
* **1 MODE64.** 0 selects 1xVSI, 1 selects 2xVSI.
* **5:2 FORMAT.** 0 is Mark5B, 1 is Mark5C, 2 is VDIF. Mark5B and
  VDIF are built. Any other value stops the data path and sets FMT_BAD.
* **6 HALT.** Holds the data path in reset: FIFOs, test vector
  generators, 32:64 packer, combiner and framer. It also clears the overflow flags.
* **7 TVG.** Selects test vector mode. It is on after reset.

Status bits:

* **0 PPS_SYNC.** 1PPS sync gained.
* **1 LINK_UP.** 10G link up, taken from the `link_up` port.
* **2, 3 FIFO0_OVF, FIFO1_OVF.** A port's input FIFO overflowed (sticky).
* **4 FMT_BAD.** The selected format is not built.
* **5 INVALID.** A word with Valid low was framed (sticky).
* **6 SENDING.** The framer is producing frames.
* **7 PPS_MISAL.** A 1PPS fell inside a frame (sticky).

A typical start-up sequence:

1. Write STATION, DEST_IP, DEST_PORT and REF_RATE; for VDIF also YEARS
   and VDIF.
2. Write RTC_BASE with the Unix second of the coming 1PPS.
3. Write CONFIG with ARM, the input mode and TVG off.
4. Frames start at the first 1PPS after the RTC has loaded.

## Where this design makes its own choices

The behaviour above follows the FiLa10G system description: one or two
VSI-H ports, a test vector mode, an RTC with arm/trigger/count, Mark5B
framing (VDIF optional) with a frame counter reset every second, and the register list
between processor and user logic. That description gives functions, not
implementations. The following are choices made here and are the places
to look first when adapting the design:

* the Mark5B header details (user field = station ID, T = test vector
  mode, CRC bit order) and the source of the fraction of a second;
* the VDIF header details: whole-year epoch, invalid bit always 0, the
  channel, bit and thread fields from a register, the same payload size
  as Mark5B;
* one frame per UDP payload, and the 10GbE core port style
  (64-bit data, valid, end of frame, destination, almost-full);
* the 1PPS alignment of the two ports in 2xVSI mode, and the 1PPS-driven
  realignment of the 32:64 packing. The original plan expected the
  fill-above-4 rule alone to keep the ports aligned;
* the 32:64 input FIFO is a packing stage in the VSI clock in front of a
  64-bit FIFO, rather than a FIFO with different port widths;
* the test vector pattern: a per-port 32-bit counter that restarts at 0
  on the 1PPS, with Valid forced high;
* FIFO depth (512 words), register addresses, bit positions and reset
  values;
* the reference rate reset value of 150 MHz. A 100 MHz user clock was
  also considered, for lower power; with it, write 100000000 to REF_RATE.
  A 100 MHz clock limits the input to 6.4 Gb/s; this has been simulated.

Not built:

* the Mark5C format. It was optional, and its layout is defined in an
  external specification;
* the clock managers, the embedded processor and its shell, and the
  10GbE UDP/IP core.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/fila10g_pkg.sv tb/tb_fila10g_top.sv --top-module tb_fila10g_top -o sim
./obj_dir/sim
```

Replace `tb_fila10g_top` with any other testbench name.

`tb_fila10g_top` runs the whole design at its default parameters. It has
1250-word frames and 512-word FIFOs. The simulated "second" is 10000 VSI
clocks, and the RTC reference rate is set to match through the register
bus. The testbench acts as both the processor and the 10GbE core, and
checks every frame independently. It covers:

* the RTC arm/trigger;
* 1xVSI and 2xVSI test vectors;
* 2xVSI real data with an invalid word;
* random back pressure;
* a 1PPS one clock early, which causes a 1PPS inside a frame and a 32:64
  realignment;
* an input-FIFO overflow;
* an unsupported format (Mark5C);
* VDIF frames from 2xVSI data, with their epoch and seconds;
* halts.

The testbench counts each of these and fails if any of them never
happened. It runs in well under a second.

`tb_fila10g_rates` runs the design, again at its default parameters,
at each input rate against a 150 MHz user clock: one or two ports at 32,
64 and 128 MHz in Mark5B, and two ports at 128 MHz in VDIF. It then runs
the two 4.096 Gb/s setups with a 100 MHz user clock. Each
configuration runs three simulated seconds of 10000 VSI clocks with no
back pressure. The testbench checks that every second holds all of its
frames, that the payload continues the sample sequence without a gap, and
that no input FIFO overflows. The time codes are checked too. These
checks confirm the rate figures above in simulation.

The block testbenches:

| testbench | checks |
|-----------|--------|
| `tb_async_fifo` | the FIFO against a queue model, with two unrelated clocks |
| `tb_vsi_tvg` | source selection and the counter pattern |
| `tb_vsi_pack` | 32:64 packing against word positions, 1PPS realignment at both parities, 2xVSI pass-through |
| `tb_input_combiner` | both modes against FIFO models, including stray words on one port and the 1PPS alignment |
| `tb_rtc` | arm/trigger/count timing |
| `tb_unix_to_vlba` | 200 random dates against integer arithmetic |
| `tb_subsec_timer` | integer and fractional clock-to-0.1 ms ratios |
| `tb_vsi_framer` | Mark5B and VDIF headers, CRC, payload continuity, back pressure, frame period, a misplaced 1PPS |
| `tb_plb_regs` | the register map |

## Files

* `rtl/fila10g_pkg.sv`: shared types (`vsi_word_t`, `vsi64_word_t`),
  register map, configuration and status bits, Mark5B constants, VLBA CRC
  function.
* `rtl/fila10g_top.sv`: the user-logic top.
* `rtl/async_fifo.sv`, `rtl/vsi_tvg.sv`, `rtl/vsi_pack.sv`,
  `rtl/input_combiner.sv`: input side.
* `rtl/rtc.sv`, `rtl/unix_to_vlba.sv`, `rtl/subsec_timer.sv`: time.
* `rtl/vsi_framer.sv`: Mark5B and VDIF framing.
* `rtl/plb_regs.sv`: registers.
* `rtl/sync_2ff.sv`, `rtl/pulse_sync.sv`: clock-domain crossing helpers.
