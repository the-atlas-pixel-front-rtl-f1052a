# FEI pixel front end chip — digital readout in SystemVerilog

The FEI is the readout chip of a hybrid silicon pixel detector for a collider
experiment. It sits under a sensor of 18 x 160 pixels (50 µm x 400 µm each),
receives a charge pulse from every pixel that a particle crosses, and must tell
the outside world, for each *triggered* bunch crossing only, which pixels were
hit and how much charge they saw. Bunch crossings come every 25 ns (40 MHz),
but the level-1 trigger that says "this crossing was interesting" arrives only
after a fixed latency of up to 256 crossings. The chip therefore has to store
every hit, with the crossing it belongs to, long enough for the trigger
decision, and throw away the untriggered ones.

The idea of the architecture is to keep the pixel itself tiny and to do all
buffering at the bottom of the columns:

* a pixel records only *when* its discriminator rose and fell (two 8 bit Gray
  time stamps) and raises a hit flag — it holds one hit at a time;
* every pair of columns shares a pool of 64 end-of-column (EoC) buffer
  locations; a priority scan picks the uppermost hit pixel and moves its hit
  into the pool, freeing the pixel for the next particle;
* in the pool every hit waits until its age equals the trigger latency; in
  exactly that cycle it is either tagged with the trigger number (trigger
  present) or dropped;
* a readout controller sends, trigger by trigger, all tagged hits over one
  serial line.

The charge is measured as *time over threshold* (ToT): the preamplifier's
feedback capacitor is discharged with a constant current, so the discriminator
stays high for a time nearly proportional to the charge. ToT = trailing edge
stamp − leading edge stamp, in 25 ns units.

This repository holds synthesizable RTL of the whole digital part; the analogue
pixel front end, DACs, ADC and LVDS pads are outside it (see
"What is not in the RTL").

## Block structure

```
fei_top
├── global_config          chip-wide settings, serial load and read back
├── gray_counter           8 bit time stamp, Gray to the pixels, binary to the EoC
├── column_pair  x 9       (g_cp[0..8])
│   ├── pixel_config  x 320    shift-register bit + 14 configuration cells
│   ├── pixel_hit_logic x 320  edge stamps, hit flag, mask, injection, hit-bus
│   ├── priority_scan          uppermost hit pixel of the pair
│   ├── column_control         pixel -> EoC transfer, ToT, time walk correction
│   └── eoc_buffer             64 locations, latency compare, trigger tagging
├── self_trigger           delayed hit-OR as level-1 trigger
├── trigger_fifo           trigger counter + list of pending triggers
├── readout_controller     event building
└── serializer             words -> serial bit stream
```

`fei_pkg` holds the shared sizes, the `pix_cfg_t`, `eoc_hit_t` and `gcfg_t`
structs, the `loc_state_e` and `twc_mode_e` enums and `gray2bin`/`bin2gray`.

Everything runs on one clock, the 40 MHz bunch crossing clock `clk`, with an
asynchronous active-low reset `rst_n`.

## The life of a hit

### 1. In the pixel (`pixel_hit_logic`)

The discriminator output `disc` is sampled every clock. The signal the pixel
acts on is `disc & ~mask`, or, in digital-injection mode (`gcfg.dig_inject`),
`inj_strobe & inject` — that lets a test pattern enter right after the
discriminator. On a rising edge of that signal the current Gray stamp goes
into the leading-edge register (LE); on the falling edge it goes into the
trailing-edge register (TE) and the pixel enters its HIT state. A pulse
high in samples n … n+k−1 gives LE = ts(n), TE = ts(n+k), so ToT = k.

While the pixel is in HIT every further edge is ignored; the pixel returns to
idle only when the column logic pulses its `clr`. The pixel also drives its
contribution to the fast hit-OR (`hitbus`), gated by its `hitbus_en` bit, and
a hard-wired address (`PIX_ID` = 2·row + column-in-pair).

### 2. Pixel to end of column (`priority_scan`, `column_control`)

`priority_scan` ORs the 320 hit flags of the pair and returns the highest
index, i.e. the uppermost hit pixel (row 0 is next to the periphery; in a tie
within a row the right column goes first). It is a two-level scan: groups of
16 flags, then the highest non-empty group.

`column_control` opens a transfer slot every 2, 4 or 8 clocks
(`gcfg.xfer_rate` = 0, 1, 2/3 → 20, 10, 5 MHz). In a slot with a hit pixel and
room in the pool it, in the same cycle,

* converts LE and TE from Gray to binary and forms ToT = TE − LE (mod 256);
* applies the time walk correction (below);
* writes {row, column, LE, ToT} into the pool and pulses `clr` of the selected
  pixel.

If the pool is full the hit simply stays in the pixel (which is then blind)
and the sticky overflow warning of the pair is set. It is reported in the next
end-of-event word and cleared there.

**Digital time walk correction.** Small pulses cross the threshold late and
can be stamped one crossing too late. Small pulses also have a small ToT, so
when `gcfg.twc_mode` is `TWC_CORRECT` and ToT < `gcfg.twc_cut`, the stored
LE is LE − 1. In `TWC_DOUBLE` mode such a hit is written twice, with the
nominal and with the corrected LE, into two locations in the same cycle
(it then needs two free locations); this is meant for testing the
correction.

### 3. Waiting for the trigger (`eoc_buffer`, `trigger_fifo`)

Each of the 64 locations is FREE, WAIT or VALID. Every clock, every WAIT
location computes its age, `ts_bin − LE` modulo 256, and compares it with
`gcfg.latency`:

| age vs. latency | trigger accepted this cycle | result |
|---|---|---|
| age = latency | yes | VALID, tagged with the trigger number |
| age = latency | no  | FREE (hit discarded) |
| age > latency | —   | FREE (hit reached the pool too late) |
| age < latency | —   | stays WAIT |

This is the central timing rule of the design. A trigger asserted on `lv1` in
the cycle whose time stamp is T selects exactly the hits whose (possibly
corrected) leading edge is T − latency. Consequences worth knowing:

* a hit must reach its pool before its age reaches the latency, so the latency
  must cover the pulse length plus the queueing time in the column;
* because ages are 8 bit, the useful latency range is 0 … 255 cycles, and a
  hit that waits longer than 256 cycles in a pixel wraps around;
* with the self trigger, setting `gcfg.selftrig_delay = gcfg.latency` makes the
  delayed hit-OR land on exactly the crossing of the hit that caused it.

`trigger_fifo` gives every accepted trigger the current value of a 4 bit
counter and broadcasts it (`trig_acc`, `trig_id`) to all nine pools in the same
cycle, and pushes it into a 16-entry FIFO of pending triggers. Tagging hits
with the trigger number is what allows several triggers to be pending while
earlier ones are still being read out. A trigger arriving while 16 are pending
is dropped (neither counted nor tagged) and sets a warning bit reported in the
next end-of-event word. Because only accepted triggers are counted and the FIFO
depth equals 2^4, the numbers of pending triggers are always distinct.

The level-1 trigger is the external `lv1` OR the self trigger.

### 4. Readout (`readout_controller`, `serializer`)

For the oldest pending trigger the controller sends:

| word | bits 23:22 | content |
|---|---|---|
| start of event | `10` | bits 3:0 trigger number |
| hit (0 … n) | `01` | bit 21 = 0, bits 20:16 column (0–17), 15:8 row (0–159), 7:0 ToT |
| end of event | `11` | bit 9 EoC overflow (any pair), bit 8 trigger FIFO overflow, bits 7:0 hit count |

Hits are taken column pair 0 first, within a pair from the lowest pool
location; each hit's location is freed when its word is accepted. After the
end-of-event word is accepted the trigger is popped and both warning kinds are
cleared.

The serializer sends each 24 bit word as a start bit `1` followed by the word,
most significant bit first, one bit per clock; the line idles at `0`. Words can
follow each other without gap, 25 clocks per word. An event with n hits thus
occupies the line for 25·(n+2) clocks.

## Configuration

**Pixel configuration (`pixel_config`).** Each pixel has 14 configuration
cells (SEU-hardened DICE latches on silicon, flip-flops here):

| cell | 0–4 | 5–9 | 10 | 11 | 12 | 13 |
|---|---|---|---|---|---|---|
| field | `tdac` threshold trim | `fdac` feedback current trim | `mask` | `hitbus_en` | `kill_amp` | `inject` |

and one bit of a shift register that runs through its column (one chain per
column, `pcfg_din[c]` enters at row 0, `pcfg_dout[c]` leaves at row 159). A
configuration is written bit plane by bit plane: shift 160 bits into every
column (row 159's bit first), then pulse `pcfg_write` with `pcfg_sel` = the
cell number. `pcfg_read` with `pcfg_sel` copies the chosen cells back into the
shift register, which is then shifted out (row 159 first). `tdac`, `fdac`,
`kill_amp` and `inject` are brought out on `pix_cfg` for the analogue part.

**Global configuration (`global_config`).** `gcfg_t` (68 bits) is shifted in
most-significant first with `gcfg_shift`, applied with `gcfg_load`, and can be
copied back with `gcfg_read` and shifted out on `gcfg_dout`. Fields, in shift
order: `latency`, `twc_cut`, `twc_mode`, `xfer_rate`, `selftrig_en`,
`selftrig_delay`, `dig_inject`, `cal_high_range`, `leak_meas_en`, `mon_sel`,
and the four 8 bit analogue DAC codes `dac_thr`, `dac_if`, `dac_trim_rng`,
`dac_vcal`. Reset defaults: latency 128, self-trigger delay 128, time walk
correction off, 20 MHz transfers, DAC codes 128, everything else 0. The whole
`gcfg` is an output of `fei_top` so the analogue blocks can use their codes.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fei_top` | `N_CP` | 9 | column pairs (18 columns) |
| | `N_ROWS` | 160 | rows |
| | `EOC_DEPTH` | 64 | EoC locations per column pair |
| | `FIFO_DEPTH` | 16 | pending triggers |
| `fei_pkg` | `TS_W` | 8 | time stamp, latency and ToT width |
| | `L1ID_W` | 4 | trigger number width |
| | `WORD_W` | 24 | readout word width |

The column address in a hit word is 5 bits and the row 8 bits, so `N_CP` ≤ 16
and `N_ROWS` ≤ 256 keep the format valid. All defaults are the full chip.

## What is not in the RTL

The pixel amplifier, discriminator, leakage-current compensation, the per-pixel
trim DACs, the calibration injection circuit, the global bias DACs, the
analogue monitor multiplexer and buffer, the 8 bit leakage-current ADC and the
LVDS driver are analogue or mixed-signal. They have no RTL here; instead
`fei_top` takes the discriminator outputs as `disc[column][row]` and gives out
every code those circuits need (`pix_cfg`, `gcfg`). The module controller that
collects data from 16 chips is a separate chip.

## Choices made in this design

The chip's architecture — edge stamping in the pixel, 64 EoC locations per
column pair, latency comparison with trigger-number tagging, the pending
trigger list, start/end-of-event words, the time walk correction with its
double-write option, the self trigger and the digital injection — follows the
published description of the FEI. The following details are this design's own
and may differ from the silicon:

* the serial word format, bit rate (one bit per clock) and framing;
* trigger number width (4) and FIFO depth (16), and dropping triggers when the
  FIFO is full;
* the status bits in the end-of-event word (overflow warnings, hit count);
* overflow behaviour: the hit stays in the pixel, a sticky warning is set;
* hits that reach the pool older than the latency are discarded;
* ToT is computed at transfer time and stored in place of the trailing edge;
* the serial configuration access, field order and reset defaults, the bit
  order of the 14 pixel cells and the chain direction;
* the priority order inside a row and the pool allocation and readout order;
* the transfer-rate encoding;
* all inputs are taken as synchronous 40 MHz samples.

Not done: the chip can read back *all* stored bits for SEU checks; here only
the pixel and global configuration can be read back, not the pixel time
stamps, the EoC pool or the FIFO.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fei_pkg.sv tb/tb_fei_top.sv \
          --top-module tb_fei_top -o sim
./obj_dir/sim
```

(Replace `fei_top` by any module name.) `tb_fei_top` runs the whole chip at its
full size: it configures the chip through both shift-register paths, reads the
configuration back, fires discriminator pulses over all columns, issues
triggers, decodes the serial stream into events and compares them hit by hit.
It also drives each mechanism at least once and counts it: masked pixels,
discarded untriggered hits, time walk correction in both modes, several
pending triggers, self trigger, digital injection, EoC overflow (70 hits into
one pair) and trigger FIFO overflow (17 triggers in a row). It runs in well
under a second after a build of about two minutes.

Concurrent assertions guard the internal handshake rules (a pool location is
only acknowledged while it matches, the corrected copy is only written with the
nominal hit, the trigger FIFO count stays in range, an offered serializer word
stays offered until taken); build with `--assert` to enable them.

The block testbenches check, among other things, the transfer rates (a slot
every 2/4/8 clocks), the serial throughput (25 clocks per word), exact
self-trigger delays, and the trigger tagging against a scoreboard.
