# Transmit beamformer for annular CMUT arrays

This is a transmit front end for small annular arrays of capacitive
micromachined ultrasonic transducers (CMUTs). It fires each element with a
45 V pulse, or with a 45 V pulse train. It sets the moment each element
fires, so the waves from all elements reach a chosen focal point together.

The main idea is that the phasing is not done on the chip. The ASIC has one
**row** per element, and all rows are identical. Every row gets the same
control word over shared lines, plus its own trigger line from an FPGA. A row
adds the same delay as every other row. So the moment the FPGA raises a row's
trigger is, apart from a constant, the moment that element fires. The FPGA
only has to count clock cycles. The ASIC needs no shift registers, comparators
or phasing logic. This saves area and power. The cost is one trigger wire per
element, which limits the idea to arrays with few elements.

The default build is the chip for a 4x4 annular array: four rings, each cut
into four elements, so 16 rows. The same RTL with `N_ROWS = 4` is the chip
for a four-ring array or a four-sector array. With `N_ROWS = 1` it is the
single-row test cell, whose element is an on-chip capacitor of about 5.1 pF.

## The system at a glance

```
host PC --serial 9600 8N1--> fpga_beam_ctrl ------ ctrl (14 bits, shared) -----+
                              uart_rx                                           |
                              cfg_loader   ------- trig[0..N-1] (one per row) --+--> bf_asic
                              fire_ctrl    ------- osc_rst_n (shared) ----------+    N x bf_row
                                                                                      |
                                                                   v_cmut[r] (0/45 V) to element r
```

`cmut_beamformer_top` wires the two halves together and brings out every
trigger, every row output and every element voltage for observation. Next to
the controller it also holds a small serial-link test for the FPGA board
(`fpga_serial_test`, below), which listens on the same serial line.

## One row: how a trigger becomes a 45 V pulse

```
trig --> demux --sel=0--> oneshot ----------------------------+
          |                                                   |
          +---sel=1--> enable FF --> ring oscillator (DCO)     |
                                       |                       |
                                 8-stage divider               |
                                 f/2 ... f/256                 |
                                       |                       |
                                    mux8 (tap) ----------------+--> mux4 --> 3.3 V pulser --> 45 V pulser --> element
                                                     trig -----+
                                                     ground ---+
```

- **Demultiplexer** (`bf_demux`). Two NAND gates and three inverters. They
  steer the trigger to the oneshot (select 0) or to the oscillator enable
  (select 1). The unused output stays low.
- **Oneshot** (`bf_oneshot`). This makes single pulses. The FPGA sends a
  trigger N clock periods long. The circuit reshapes only the first 10 ns:
  the output rises a code-dependent time after the trigger, then falls with
  the trigger. The 3-bit code gives a first slot of 10, 9.8, 9.7, 9.6, 7.5,
  7.0, 5.0 or 2.5 ns, so a long trigger yields a pulse of length
  `trigger - 10 ns + w(code)`. This gives fine width steps without a fast
  clock.
- **Oscillator** (`bf_dco`). A flip-flop with D tied high is clocked by the
  trigger. Its first rising edge enables a ring of five inverting stages. Three
  of those stages are current-starved delay elements, set by a 5-bit code.
  Only the flip-flop's asynchronous reset stops the ring. The 32 frequencies
  run from 256 MHz (code 0) down to 20 MHz (code 31). They are not monotonic
  across codes 15/16.
- **Frequency divider** (`bf_fdc`). Eight set/reset D flip-flops, each with
  QN fed back to D, clocked in ripple fashion. Tap k is the oscillator divided
  by 2^(k+1). The divider shares the oscillator's reset, so every pulse train
  starts from a known phase.
- **Multiplexers** (`bf_mux8`, `bf_mux4`). On the chip these are
  transmission-gate multiplexers. `mux8` picks the divider tap. `mux4` picks
  the row's source: ground, the raw FPGA trigger, the oneshot or the divided
  pulse train.
- **3.3 V pulser** (`bf_mv_pulser`). Two inverters lift the 1.8 V signal to
  3.3 V. Delay 0.6 ns, rise 0.5 ns, fall 0.3 ns.
- **45 V pulser** (`bf_hv_pulser`). A high-voltage level shifter and buffer
  stages that drive the element. Its timing depends on the load:

  | load   | delay | rise (10-90 %) | fall (10-90 %) |
  |--------|-------|----------------|----------------|
  | 2.5 pF | 4 ns  | 4.2 ns         | 5.3 ns         |
  | 5.1 pF | 4 ns  | 7.8 ns         | 7.8 ns         |
  | 10 pF  | 5 ns  | 13.3 ns        | 17 ns          |

  The load is the `C_LOAD_PF` parameter (default 5.1 pF). Values between the
  three points are interpolated linearly.

The chip also has a four-inverter buffer between `mux4` and the 3.3 V pulser.
It has no logic function, so it is not modelled: `drive` is the `mux4`
output.

### What is logic and what is a model

The demultiplexer, flip-flops, divider and multiplexers are ordinary
synthesizable logic. The oneshot, the ring oscillator and the two pulsers are
analog circuits. They are written as **behavioural timing models** that use
`#` delays and `real` voltages, and they simulate with `--timing`. They are
not meant for synthesis. `bf_row`, `bf_asic` and the top contain these
models, so they are system models, not netlists. The FPGA half
(`fpga_*.sv`) is fully synthesizable.

How the analog models behave:

- **Oneshot.** It delays the trigger's rising edge by `10 ns - w(code)` and
  passes the falling edge straight through. If the trigger ends before that
  delay has passed, there is no pulse.
- **Oscillator.** While enabled, it toggles every half period of the table
  frequency. At rest it sits high, so its first falling edge comes half a
  period after the enable.
- **Pulsers.** Each edge is an RC (exponential) curve, stepped every
  `STEP_NS`. The delay is measured from the input edge to the 50 % point of
  the output. The time constant is the 10-90 % time / 2.197. Each pulser has a
  `real` voltage output and a logic output that is high above half the supply.
  An inertial delay line drops input pulses shorter than the pulser's start
  offset.

## Control word

`bf_pkg::bf_ctrl_t`, 14 bits. It is shared by all rows and held by the FPGA
for the whole sequence.

| bits  | field          | meaning |
|-------|----------------|---------|
| 13    | `demux_sel`    | 0: trigger to oneshot, 1: trigger to oscillator enable |
| 12:10 | `oneshot_code` | first-slot width code, 0..7 (table above) |
| 9:5   | `dco_code`     | oscillator frequency code, 0..31 |
| 4:2   | `mux8_sel`     | divider tap: 0 = f/2 ... 7 = f/256 |
| 1:0   | `mux4_sel`     | 00 ground, 01 FPGA trigger, 10 oneshot, 11 divided oscillator |

Oscillator frequency per code, in MHz (codes 0..31):
256 250 244 238 222 217 213 200 196 179 175 164 156 143 137 127
178 169 158 151 142 130 122 112 100 85 81 65 53 39 34 20.

## FPGA side: serial protocol and firing sequence

**Receiver** (`fpga_uart_rx`). 8 data bits, no parity, 1 stop bit, LSB first.
It has a two-flop synchroniser and samples each bit in the middle.
`CLKS_PER_BIT = 5208` gives 9600 baud from a 50 MHz board clock. A low stop
bit raises `frame_err` and drops the byte.

**Commands** (`fpga_cfg_loader`):

```
CONFIG : A5, ctrl[13:8], ctrl[7:0], pw[7:0], pw[15:8], {lat_r[7:0], lat_r[15:8]} for r = 0..N_ROWS-1
FIRE   : 5A
```

A CONFIG frame is 5 + 2*N_ROWS bytes (37 for 16 rows). It is collected in
shadow registers and takes effect only when its last byte arrives. The
loader ignores, and counts in `bad_cmd` (saturating at 255):

- a FIRE sent before any complete CONFIG;
- any other byte where a command is expected.

There is no timeout. A frame cut short therefore takes the next bytes as its
payload. The host restores sync by sending a full frame.

**Sequencer** (`fpga_fire_ctrl`). On FIRE it copies the latencies and `pw`.
It then counts clock cycles from 0. Row r's trigger is high while
`lat[r] <= count < lat[r] + pw`. The sequence ends at `max(lat) + pw`. A
`pw` of 0 counts as 1. `busy` is high during the sequence. While `busy` is
high:

- a new FIRE starts nothing;
- `osc_rst_n` is released.

Outside the sequence, `osc_rst_n` holds every oscillator enable and divider
in reset. This is what ends a pulse train in oscillator mode. The reset is
shared by all rows, so in that mode each train starts at its own row's
latency and all of them stop together when the sequence ends. Row r carries a
train for `max(lat) + pw - lat[r]` cycles. In oneshot and direct modes `pw`
sets the trigger length.

The host computes each latency as the element-to-focus travel time divided
by the FPGA clock period. An example set for the 4x4 array at one focal
point, in clock counts:

| ring | 45 deg | 135 deg | 225 deg | 315 deg |
|------|--------|---------|---------|---------|
| 1    | 508    | 524     | 536     | 520     |
| 2    | 486    | 528     | 559     | 520     |
| 3    | 473    | 531     | 573     | 520     |
| 4    | 462    | 534     | 585     | 520     |

The counts are 50 MHz cycles: 10.16 µs of travel time is 508 cycles. With
the host's 100 MHz clock setting the same focus needs twice the counts (1016
to 1170). `LAT_W = 16` holds latencies up to 65535 cycles (1.3 ms at 50 MHz).
Only the differences matter, so most testbenches subtract the smallest (462)
before sending them, which keeps the sequences short.

Timing from the wire:

- A configuration takes 37 bytes × 10 bits at 9600 baud, about 38.5 ms.
- After the FIRE byte's stop bit is sampled, row r's trigger rises a fixed
  few cycles plus `lat[r]` cycles later.
- At 5.1 pF the element then crosses 22.5 V about 4.6 ns after the row
  output rises. The oneshot adds its trim; the oscillator path adds half an
  oscillator period.

## Serial-link test on the FPGA board

Before any beamforming, the board's serial link can be checked by eye.
`fpga_serial_test` listens on the same line as the controller and changes
nothing in it:

- **Display.** Four seven-segment digits show, from left to right, the
  switches `sw[7:4]`, `sw[3:0]` and the last byte received with a good stop
  bit (high nibble, then low nibble). All values are in hex. The digits are
  multiplexed one at a time. `an_n` selects the digit, and `seg_n` carries its
  pattern as `{g..a}`. Both are active low. The scan moves to the next digit
  every `CLKS_PER_BIT` clocks.
- **Activity LED.** `flash` comes on when the line is seen low on a 16×-baud
  tick. It stays on for `FLASH_TICKS` (9600) such ticks, which is about 0.06 s
  at 9600 baud.
- **Echo.** While `sw[7]` is high, `fpga_uart_tx` sends `sw[6:0]` (bit 7 = 0)
  as back-to-back 8N1 frames on `uart_tx`.
- **Mirror.** `rx_mirror` is a plain copy of the received line.

The digit order, the LED count and the switch wiring follow the original
board program. The decoder's segment shapes, the transmitter's framing and
the reset are this design's own. The original program also had a second,
conflicting assignment of the shown byte that singled out a few values (00,
FF and the characters '1' and '2'). It is left out: every good byte is shown
as received.

## Where this RTL makes its own choices

The system description leaves these points open or inconsistent. The RTL
settles them as follows:

- **Oscillator frequencies.** The circuit description quotes one code
  (00011) at 287 MHz. Its per-stage delay figures fit neither that value nor
  the host table. The model uses the host software's table (238 MHz for that
  code), because that table is what a user's settings are based on.
- **Oneshot code 0.** The host table lists 0 for this code. It is read as
  "no trimming" (a 10 ns first slot).
- **Trigger quantum.** The oneshot text assumes triggers in 10 ns steps,
  which is a 100 MHz FPGA clock. The serial speed implies a 50 MHz board
  clock, which gives 20 ns steps. The RTL works with any clock. The full-size
  testbench uses 50 MHz and the end-to-end testbench 100 MHz.
- **Counting direction.** The FPGA is described as "counting down" to each
  row's firing time. Here a single up-counter is compared with each row's
  latency, which fires at the same cycle.
- **Direct FPGA input of `mux4`.** This is the row's own trigger line.
- **Enable set inputs.** These are tied inactive. The controller drives only
  the reset, and clears it only during a sequence.
- **Flip-flop priority.** The set/reset flip-flop lets reset win when both
  are asserted.
- **45 V pulser at 10 pF.** The reported 5 ns delay with a 17 ns fall cannot
  both hold for an RC edge. The model starts the fall at once, and its 50 %
  point comes at 5.4 ns.
- **Serial framing and command bytes** are this design's own. So are the
  16-bit latency and pulse-width fields.

## Not included

- The four-inverter buffer (no logic function).
- The CMUT elements and their DC bias network.
- Pads, ESD structures and the on-chip test capacitor (the capacitor appears
  only as the pulser's load parameter).
- The host phasing program and the RS-232 level shifter.
- Any receive electronics.

## Files

| file | role |
|------|------|
| `rtl/bf_pkg.sv` | control word type, select encoding, command bytes |
| `rtl/cmut_beamformer_top.sv` | FPGA controller + ASIC |
| `rtl/fpga_beam_ctrl.sv` | receiver + loader + sequencer |
| `rtl/fpga_uart_rx.sv`, `fpga_cfg_loader.sv`, `fpga_fire_ctrl.sv` | FPGA blocks |
| `rtl/bf_asic.sv`, `bf_row.sv` | ASIC and one row |
| `rtl/bf_demux.sv`, `bf_dff_sr.sv`, `bf_fdc.sv`, `bf_mux8.sv`, `bf_mux4.sv` | row logic |
| `rtl/bf_oneshot.sv`, `bf_dco.sv`, `bf_mv_pulser.sv`, `bf_hv_pulser.sv` | analog models |
| `rtl/fpga_serial_test.sv`, `fpga_seg7.sv`, `fpga_uart_tx.sv` | board serial-link test |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cmut_beamformer_full.sv` | full-size run, every parameter at its default |

## Simulating

Every testbench checks itself. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops on its own, with a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/bf_pkg.sv tb/tb_cmut_beamformer_top.sv --top-module tb_cmut_beamformer_top
./obj_dir/Vtb_cmut_beamformer_top
```

Replace the testbench name to run any other. What the main ones cover:

- **`tb_cmut_beamformer_top`** runs the whole system at 16 rows, with a
  shortened serial bit time (16 clocks). It counts these events and fails if
  any of them never happens:
  - FIRE refused before configuration;
  - unknown command byte;
  - stop-bit error;
  - oneshot mode;
  - direct mode;
  - oscillator mode;
  - pulse trains stopping at the end of the sequence;
  - ground mode;
  - FIRE ignored while busy;
  - the link test showing the last received byte (`5A`) and lighting its LED.

  For each firing it checks the pulse widths, the oscillator period and the
  element timing of all 16 rows.
- **`tb_cmut_beamformer_full`** runs at every default: 5208 clocks per bit
  at 50 MHz, 16 rows. It loads the phasing table above and fires once. It
  checks that every element fires once, 20 ns × (latency difference) after
  the others. This covers about 40 ms of simulated time and takes about
  20 s.
- **`tb_cmut_beamformer_configs`** runs three chips side by side on a
  100 MHz clock:
  - the 16-row chip with the doubled (100 MHz) latency table;
  - a 4-row chip in oscillator mode, checking train start, period and
    length per row;
  - the 1-row test cell with its 5.17 pF load.
- **`tb_bf_asic`** fires all 16 rows with the phasing table, in oneshot and
  in oscillator mode.
- **Block testbenches** check each block against numbers worked out
  independently. For example:
  - every one of the 32 oscillator codes;
  - every divider tap over 256 input edges;
  - every oneshot code for several trigger lengths;
  - the pulser delay, rise and fall at each load.

The oscillator enable and the divider power up in an unknown state. Pulse
`osc_rst_n` low once before relying on them. The controller does this
itself, because it holds `osc_rst_n` low outside a sequence.

To change the design:

- **Another array size:** set `N_ROWS` on the top.
- **Another element load:** set `C_LOAD_PF`.
- **Another board clock or baud rate:** set `CLKS_PER_BIT`.
- **Another oscillator:** edit the frequency function in `bf_dco.sv`.
