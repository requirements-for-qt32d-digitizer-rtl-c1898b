# QT32D digitizer mother board — FPGA logic

The QT32D is a 32-channel VME mother board for the fast trigger detectors of
STAR. It carries four 8-channel daughter cards (QT8B or QT8C). They integrate
each channel's pulse charge over a gate and digitize it to 12 bits, and they
send a discriminator signal per channel. The FPGA on the mother board times
those signals with a 5 ns TDC. Every RHIC crossing (about 9.4 MHz) it stores
each channel's ADC and TDC values in a circular memory that holds the last
64k crossings, about 7 ms, and drives 32 trigger bits to the Level-0 (L0)
trigger. When the trigger sends a *Build_Event* command for a crossing, the
board reads that crossing back from its own memory and ships it to Level 2,
with no VME CPU involved. That direct readout is the new idea of this board
generation: it lets all boards read out in parallel, above 20 kHz.

This repository holds synthesizable SystemVerilog for that FPGA. It also has
a behavioural model of the gate delay lines that sit next to it on the board,
and a self-checking testbench for every block and for the whole design.

The RTL implements a written set of board requirements, which list what the
board must do. They do not give an FPGA architecture, a memory map, an event
format or the timing inside a crossing. Wherever this design had to choose
one, it says so below and in the opening comment of each file.

## Clocking: one fast clock, one tick per crossing

All logic runs on a single clock, `clk_fast`, at 21 times the RHIC clock
(about 200 MHz, so 5 ns per cycle). This is the clock the 5 ns TDC needs.
It comes from a clock multiplier (an FPGA PLL/MMCM, not part of this RTL).

- **Clock source.** The multiplier's input is the RHIC clock the board has
  selected: the STAR standard clock from the backplane, or a local oscillator
  for bench testing. A register bit chooses.
- **Glitch-free switch.** `clock_select` is a glitch-free clock switch and
  drives `rhic_clk_out`.
- **The RHIC tick.** `rs_tick_gen` synchronises the selected RHIC clock into
  `clk_fast` and turns each rising edge into a one-cycle pulse, `rs_tick`.
  The pulse comes 2–3 cycles after the edge.

Every per-crossing action in the design happens on `rs_tick`. A crossing
therefore lasts exactly 21 cycles when the multiplier is locked.

## The crossing pipeline

This section matters most for using the design. Crossing *k* is the interval
between ticks *k* and *k+1*, counted from the start of the run.

| tick | what happens to crossing *k* |
|------|------------------------------|
| *k* | The crossing begins. The gate opens START ns after the RHIC edge. Discriminator edges start the TDC counters. |
| *k+1* | TDC values are stored and the counters are cleared. |
| *k+2* | The ADC results are read. They belong to crossing *k*, because digitization takes two RHIC periods. ADC and TDC are packed into 32 channel words and written to memory entry *k* mod 65536. The words also go out on `chan_words`/`chan_valid` to the L0 algorithm. |
| *k+3* | `l0_result` is sampled. It is taken to be the L0 algorithm's answer for crossing *k*. It is written next to the channel words and enters the output latch delay to P3. |

So the L0 bits of a crossing leave the FPGA (67 + delay) × 5 ns after its
RHIC edge. That is 334 ns at delay 0 and 384 ns at delay 10, inside the
400 ns (4 crossings) the board is allowed. The one-period budget for the
external L0 algorithm is this design's assumption. The required total, two
crossings to digitize plus two for routing, is not.

The memory address is the crossing number modulo 2^16. `xing_counter` resets
it to 0 on the tick where RUN begins, so all boards that start RUN together
agree on addresses. The same counter is the readout timestamp.

## Blocks

| module | role |
|--------|------|
| `qt32d_top` | Wires everything below into the board FPGA. |
| `qt32d_pkg` | Widths, the channel-word struct, the Build_Event command struct, the register struct and the register addresses. |
| `clock_select` | Glitch-free STAR/oscillator clock switch; reports the active clock. |
| `rs_tick_gen` | Synchronises the RHIC clock into `clk_fast` and marks each edge with one tick. |
| `gate_delay` | **Behavioural model**, not FPGA logic: the START/STOP delay lines (1 ns steps, 0–255 ns) that make the daughter-card gate. |
| `tdc5` | 32 counter TDCs with 5 ns bins. |
| `channel_capture` | Packs ADC, TDC and channel number into 4-byte words, tags them with their crossing and writes them. |
| `circ_mem` | 64k-crossing circular memory: 32 words plus the L0 result per entry. |
| `l0_output` | Register-set delay (5 ns steps, 0–127) on the 32 bits to P3. |
| `readout_ctrl` | On Build_Event: reads the crossing and sends the event, optionally zero-suppressed. |
| `run_ctrl` | Chooses RUN/STOP from the RCC2 line or from the local override bits; marks the start of a run. |
| `xing_counter` | Crossing number and readout timestamp. |
| `scaler_router` | Routes discriminator bits to the P2 scaler lines for QT8B or QT8C cards. |
| `test_pulse_gen` | Sets the rate and amplitude of the test charge injection. |
| `led_status` | Two-colour LED: which clock is active, and whether the board is in RUN. |
| `reset_ctrl` | Reload from VME SYSRESET* or by register command. |
| `reg_file` | Configuration and status registers. |

### TDC

Each channel's counter starts at 1 on the cycle its discriminator edge is
seen. It counts up to the next tick, which stores the value and clears the
counter. The stored value is the time from the hit to the end of its
crossing, in 5 ns bins:

- A pulse that arrives *d* cycles after the RHIC edge reads 21 − *d*.
- 0 means no hit.
- Only the first edge in a crossing counts.
- The value saturates at 31.

The discriminator lines pass through a two-flop synchroniser. Its delay
matches that of the tick generator, so the two offsets cancel.

### Channel word and memory entry

A channel word is `{spare[9:0], chan[4:0], tdc[4:0], adc[11:0]}`, 4 bytes;
the order of the fields is this design's. A memory entry holds 32 such
words, 1024 bits, plus a separate 32-bit L0 result. The result has its own
write port because it arrives one crossing after the words. At 64k entries
the channel data alone is 8 MB.

The board is meant to hold this in its large external DRAM (about 500 MB).
Here it is written as an on-chip simple dual-port array with a one-cycle
registered read. A real build would replace `circ_mem` with a DRAM
controller behind the same ports, or shrink `AW` to fit block RAM.

### Build_Event readout and the event format

A command (`build_cmd_t`) carries a 12-bit token and a 32-bit crossing number.
Only the low 16 bits of the crossing number address the memory. The
controller takes one command at a time (`cmd_ready` is high when idle). It
streams the event on a 32-bit valid/ready interface, with `ro_last` on the
final word:

| word | content |
|------|---------|
| 0 | `{8'hD5, zs_en, send_result, 2'b00, token[11:0], nwords[7:0]}`, where `nwords` counts every word of the event |
| 1 | crossing number from the command |
| 2 | readout timestamp: the crossing counter when the command was taken |
| 3… | channel words in channel order: all 32, or with zero suppression only channels whose ADC value is above `zs_thr` |
| last | the stored L0 result of the crossing, if `send_result` is set |

- **Throughput.** Without back-pressure an event of *n* words takes
  *n* + 3 cycles from command to last word. A full event of 36 words takes
  under 200 ns, far inside the 50 µs that 20 kHz allows.
- **Hit criterion.** Zero suppression counts a channel as hit when its ADC
  value is above a register threshold. The requirements do not define a hit;
  this is this design's choice.
- **Empty events.** An event with no hit channel still sends its three
  header words.
- **Pedestal runs.** These need full readout, so zero suppression is a
  register option.
- **Stale crossings.** The controller does not check whether the requested
  crossing has already been overwritten. The timestamp is sent so that the
  trigger system can compare it with the trigger time.
- **Handshake rule.** An assertion in `readout_ctrl` holds the stream
  interface to its rule: a word that is not taken must stay unchanged.

### Daughter-card flavors and the scaler lines

Card *d* drives P2 bits 8*d*…8*d*+7; this numbering is this design's. A
register holds one flavor bit per card, and the same register can be read
back to check the setting. The flavor decides how the lines are used:

- **QT8B.** The card sends eight discriminator bits, which go straight to P2.
- **QT8C.** The card sends six useful bits: four channels, their OR and a
  spare. Its top two connector lines carry a 1.2 V rail instead, switched on
  by `dc_vrail_en`, and the matching P2 bits are driven low.
- **P2 bit 31.** If card 3 is a QT8C, bit 31 is not driven. It is read as the
  TAC Stop input and shown as `tac_stop` in the status register.

### Run control, reset, test pulse, LED

- **Run control.** `use_local = 0`: RUN follows the RCC2 RUN/STOP line.
  `use_local = 1`: `local_run` forces RUN or STOP whatever the RCC2 says.
  Changes take effect on a tick.
  - The requirements first describe an OR of the RCC2 line with a register,
    and then ask for this two-bit override. The override is what is built,
    because an OR cannot force STOP.
- **Reset and reload.** VME SYSRESET*, or writing `0xB007` to `REG_RESET`
  (the reset command arriving over the network), drives the FPGA's
  PROGRAM_B low for 64 cycles. The FPGA then reloads from its PROM. The
  logic stays in reset meanwhile.
- **Test pulse.** `test_pulse` fires on every *period*-th tick and
  `test_dac` carries the amplitude code.
- **LED.** Green means the STAR clock and red the oscillator. The LED is
  steady when stopped and blinks with a half period of 2^20 crossings
  (≈0.11 s) in RUN. The colour code is this design's.

### Gate

`gate_delay` opens the gate START ns after each RHIC rising edge and closes it
STOP ns after it. It uses two 8-bit registers with 1 ns steps. If STOP is not
after START, no gate is made. The one gate is fanned out to all four cards and
to the front-panel test point `tp_gate`; `tp_clk` shows the selected clock. On
the board these are delay-line parts, so the file models them with
delayed non-blocking updates; it needs `--timing` in Verilator, and a
synthesis tool ignores its delays. It behaves like a set/reset flop fed by two
delay lines, so with STOP longer than a RHIC period the STOP of one edge also
ends the gate opened by the next edge.

## Registers

The registers are word addresses on a simple synchronous bus: `reg_wr`
writes `reg_wdata` to `reg_addr`, and `reg_rd` returns data on `reg_rdata`
one cycle later. The bus stands for the board's Ethernet configuration path.
The map is this design's.

| addr | name | bits |
|------|------|------|
| 0x01 | CLOCK | [0] select oscillator; read [1] oscillator active |
| 0x02 | GATE | [7:0] START ns, [15:8] STOP ns (reset 0 / 80) |
| 0x03 | THR | [7:0] discriminator threshold DAC code (out on `thr_code`) |
| 0x04 | FLAVOR | [3:0] 1 = QT8C, per card |
| 0x05 | L0DELAY | [6:0] output delay, 5 ns steps |
| 0x06 | RUN | [0] use_local, [1] local_run; read [2] RUN |
| 0x07 | ZS | [0] zero suppression, [1] append L0 result, [27:16] ADC threshold |
| 0x08 | TP | [0] test pulse on, [27:16] amplitude |
| 0x09 | TPPERIOD | [23:0] crossings between test pulses (reset 1) |
| 0x0A | RESET | write 0xB007 to reload the FPGA |
| 0x0B | XING | read: crossing counter |
| 0x0C | EVENTS | read: events sent |
| 0x0D | STATUS | read: [0] RUN, [1] oscillator active, [2] TAC Stop |

## What is outside this RTL

Each of these is reached through top-level ports:

- **Clock multiplier:** `rhic_clk_out` out, `clk_fast` in.
- **ADCs and integrators on the daughter cards:** `adc_data`, 32 × 12 bits.
  The value is read on the tick; its timing is assumed.
- **Discriminators and threshold DAC:** `disc` in, `thr_code` out.
- **Charge-injection circuit:** `test_pulse`, `test_dac`.
- **L0 algorithm:** `chan_words`/`chan_valid` out, `l0_result` in. Its
  content depends on the detector and is not specified.
- **Fiber link to the trigger network, for commands and data:**
  `cmd_*` in, `ro_*` out. Its protocol is not specified.
- **Ethernet port and its embedded module:** the `reg_*` bus.
- **Backplane:** `p2_*`, `l0_out`, `vme_sysreset_n`, `rcc2_run`.
- **PROGRAM_B pin:** `prog_b_n`.

## Sizes and limits

Defaults are the board's numbers: 32 channels, 4 cards, 12-bit ADC, 5-bit
TDC, 64k crossings (`MEM_AW = 16`), 32 L0 bits, 1 ns gate steps over
0–255 ns. The 7-bit L0 delay range (0–635 ns), the 24-bit test pulse period,
the 12-bit token and the 64-cycle PROGRAM_B pulse are this design's choices.

Known departures and open points:

- The circular memory is on chip. The board would use its external DRAM.
- The gate is one signal for all four cards, since there is one START/STOP
  pair.
- A QT8C card has its own precise TDC. How its data would reach the mother
  board is not specified, so the 5 ns TDC runs on all 32 discriminator lines
  for both flavors.
- `rst_n` resets `clock_select` asynchronously, because that block must reset
  without a running clock, and everything else synchronously. Lint reports
  this mixed use.

## Simulation

Every `tb/tb_<module>.sv` is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and it has a
watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/qt32d_pkg.sv tb/tb_qt32d_top.sv \
  --top-module tb_qt32d_top -Mdir obj_top
obj_top/Vtb_qt32d_top
```

`tb_qt32d_top` runs the whole FPGA at full size: 64k-entry memory and no
parameter overrides. It takes about 3 s of CPU time. It plays the parts
around the FPGA, with ADC values and discriminator delays that are known
functions of the crossing. It checks:

- every word of 32 events against values it works out itself: full,
  zero-suppressed, with the L0 result, under random back-pressure;
- the wrap of the memory after 65,536 crossings;
- the L0 output latency on every crossing;
- gate timing, scaler routing for both flavors with TAC Stop, and the test
  pulse rate;
- the clock switch and the LED;
- RUN from the RCC2 and from the local override;
- reload by command and by SYSRESET.

The end of the run prints how often each of these happened. Block
testbenches check the rest in detail. Examples:

- the TDC value for every hit position;
- the glitch-free clock switch;
- the exact PROGRAM_B pulse length;
- the event cycle count in `readout_ctrl`.
