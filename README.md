# Array Formatter for a phase-tilt weather radar

A phase-tilt radar steers its beam in azimuth electronically: 64 antenna
columns each have a T/R (transmit/receive) Module holding per-column amplitude
and phase settings. In elevation the whole panel is tilted mechanically. The
Array Formatter is the controller that keeps this array in step. It has four
jobs:

- It loads each T/R Module with calibration data and reads every word back to
  verify it.
- Before each beam position, it broadcasts the polarimetric pulse sequence to
  all 64 modules.
- It tells the radar transceiver which beam and sequence come next.
- It generates the trigger pulses that switch the modules and the transceiver
  between transmit and receive, pulse by pulse.

On the real board a soft processor runs the control software and reaches the
custom logic through a bank of 32-bit registers. This repository holds the
custom logic, in synthesizable SystemVerilog:

- the register bank;
- the serial link to the T/R Modules, with its FIFOs, state machines and echo
  path;
- the Timing State Machine that makes the triggers;
- the serial interface to the transceiver;
- the datapath inside each T/R Module: its look-up table, sequence table and
  port registers. The port registers are what the triggers ultimately switch.

The processor and its software, the memories, the clock manager, the
differential I/O buffers and the modules' link decoders are not included. The
top level brings their connections out as ports.

## Structure

```
                 processor register port (pf_wr / pf_addr / pf_wdata / pf_rdata)
                                      |
                                  pf_regs (30 x 32 bit)
      +-------------------+-----------+-------------+---------------------+
      |                   |                         |                     |
   wsm --> async_fifo --> tr_serial_tx -- trm_tx -->|            tsm      |   clk_div --> xcvr_tx
   (50 MHz)  (50->25)      (25 MHz)                 |  trig_xcvr/trig_trm |   (100 MHz)   xcvr_clk/
                                                    |                     |               xcvr_data/xcvr_en
   rsm <-- sync_fifo <-- rx_sync <-- tr_serial_rx <-- channel_enable <-- trm_rx_left / trm_rx_right
   (50 MHz)  (50 MHz)    (25->50)    (25 MHz, negedge)

   phase_tilt_top = array_formatter + 64 x trm_core (clocked by trm_clk, stepped by trig_trm)
```

| Module | Role |
|---|---|
| `afb_pkg` | Register numbers, timing-register struct, TSM sub-states, T/R Module word layouts |
| `pf_regs` | 30 software registers, each wired to one port of the custom logic |
| `wsm` | Write State Machine: one 32-bit register write becomes two 16-bit FIFO words |
| `async_fifo` | Transmit FIFO, 1024 x 16, from 50 MHz to 25 MHz (Gray-coded pointers) |
| `tr_serial_tx` | Serial Transmitter: start bit, 16 data bits MSB first, stop bit |
| `channel_enable` | Picks the left (modules 1..32) or right (33..64) echo channel from the module address |
| `tr_serial_rx` | Serial Receiver, sampling on the falling clock edge |
| `rx_sync` | Moves each received word from 25 MHz to 50 MHz |
| `sync_fifo` | Receive FIFO, 1024 x 16, 50 MHz |
| `rsm` | Read State Machine: hands one received word to software per read request |
| `tsm` | Timing State Machine: 32 states, 4 pulses per pass, Loop Number passes |
| `clk_div` | Divides 100 MHz by 100 for the 1 MHz transceiver interface |
| `xcvr_tx` | Sends the 32-bit scan word with its enable line |
| `array_formatter` | The formatter: all of the above wired together |
| `trm_core` | Datapath of one T/R Module: 1K x 16 look-up table, 8-entry sequence table, port registers |
| `phase_tilt_top` | Top level: the formatter plus 64 `trm_core` |
| `sync_2ff`, `rst_sync` | Bit synchronizer and reset synchronizer |

## Clocks and resets

| Clock | Frequency | Logic in that domain |
|---|---|---|
| `clk_sys` | 50 MHz | Register bank, WSM, RSM, Receive FIFO, channel enable, TSM |
| `clk_tr` | 25 MHz | Serial Transmitter and Receiver, FIFO read side; forwarded as `trm_clk`; clock of every T/R Module |
| `clk_ext` | 100 MHz | Clock divider and transceiver Transmitter |

The design assumes all three clocks come from one clock manager, but it does
not rely on their phase relation. Each crossing is synchronized:

| Crossing | How it is synchronized |
|---|---|
| Transmit words | Asynchronous FIFO |
| Received words | `rx_sync` (a toggle plus a hold register) |
| Transmit-FIFO-empty status flag | Two flip-flops |
| Transceiver ack status flag | Two flip-flops |
| Transceiver software enable | Two flip-flops |
| T/R Module trigger (inside `trm_core`) | Two flip-flops |

`rst_n` is asynchronous and active low. Each domain has its own `rst_sync`, so
reset is released on that domain's own clock. Writing 1 to register 0 holds
both FIFOs in reset until 0 is written again.

## Register map

Registers are 32 bits wide. Single-bit controls use bit 0.

| # | Name | Dir | Connected to |
|---|---|---|---|
| 0 | FIFO reset | W | resets Transmit and Receive FIFOs while 1 |
| 1 | Read enable | W | RSM: rising edge requests one word |
| 2 | Write enable | W | WSM: rising edge writes register 3 to the link |
| 3 | WSM data | W | 32 bits: upper half-word sent first |
| 4 | RSM data | R | [15:0] last word read from the Receive FIFO |
| 5 | Write ack | R | 1 when the WSM has queued both half-words |
| 6 | Read ack | R | 1 when register 4 holds the requested word |
| 7 | Receive FIFO empty | R | |
| 8 | Loop Number | W | [15:0] TSM passes |
| 9 | Channel enable | W | enables the echo channel of the module in register 18 |
| 10 | TSM enable | W | 0 to 1 starts a run; 0 aborts a run and re-arms |
| 11..14 | Timing registers 1..4 | W | one per pulse: [31:16] transmit time, [15:0] receive time, in 50 MHz cycles |
| 15 | Clock 2 | W | storage only |
| 16 | Timing ack | R | 1 when the run has finished |
| 17 | Transmit FIFO empty | R | |
| 18 | T/R Module address | W | [7:0] module 1..64 |
| 19 | Transceiver enable | W | rising edge starts a scan-word transfer |
| 20 | Transceiver data | W | 32-bit scan word |
| 21 | Transceiver ack | R | 1 when the scan word has been sent |
| 22..29 | spare | W | storage |

The bus port is a minimal synchronous port, which stands in for the vendor
bus interface:

- A write happens on the `clk_sys` edge where `pf_wr` is high.
- `pf_rdata` is combinational from `pf_addr`.
- Addresses 30 and 31 read as 0.

All status registers are level signals, so software polls them.

## The T/R Module link

### Frames

All traffic to the modules is broadcast on one line, `trm_tx`, clocked by
`trm_clk` at 25 MHz. A word is sent as an 18-bit frame:

| Bit(s) | Value |
|---|---|
| Start | 0 |
| Data | 16 bits, most significant first |
| Stop | 1 |

The line idles high. The Transmitter changes `trm_tx` on the rising clock
edge, and the receiving side samples on the falling edge, in the middle of
each bit. Back-to-back frames are 19 clocks apart: one idle clock separates
them, in which the Transmitter fetches the next word. That gives 760 ns per
16-bit word, or 1.32 Mwords/s.

### Writing

A 32-bit value written to register 3 goes out as two frames when software
pulses register 2 (1, then 0). The upper half-word is sent first. A command
word and its data word can therefore be written as one register value.

1. The WSM captures the value on the rising edge of the enable and writes both
   halves into the Transmit FIFO.
2. If the FIFO is full, the WSM waits. Nothing is lost: a long calibration
   load simply throttles the software through Write Ack.
3. Write Ack (register 5) is 0 from the enable edge until both halves are
   queued.

Software must wait for Write Ack before its next write.

### Echo and read-back

The modules are wired in two groups. Each group has its own return line:

| Group | Modules | Return line |
|---|---|---|
| Left | 1..32 | `trm_rx_left` |
| Right | 33..64 | `trm_rx_right` |

Before a unicast exchange, software writes the module address to register 18
and sets register 9. `channel_enable` then:

- raises `trm_ch_en_left` or `trm_ch_en_right`;
- routes that line to the Receiver.

If the address is outside 1..64, neither channel is enabled and the Receiver
sees an idle line.

Each received word takes this path:

1. The Receiver decodes it on the falling edge of the 25 MHz clock.
2. `rx_sync` moves it into the 50 MHz domain, 3 to 4 `clk_sys` cycles after
   the Receiver's done pulse.
3. It lands in the Receive FIFO.

Software reads one word at a time:

1. Set register 1.
2. Poll Read Ack (register 6).
3. Read register 4.
4. Clear register 1.

If the FIFO is empty, the RSM waits for a word. With a word waiting, the data
appears two cycles after the enable edge is seen.

The Receive FIFO holds 1024 words, so software must drain echoes before 1024
of them accumulate. An assertion in `array_formatter` flags an overflow in
simulation.

## Timing State Machine

The TSM turns four timing registers and a Loop Number into the trigger
pattern for one beam position. A pass has 32 states, grouped as 4 pulses of 8
sub-states. A run is Loop Number passes, so a beam position gets
4 x Loop Number pulses. Each pulse has two T/R Module edges, one "T" and one
"R", which is 8 edges per pass. That matches the 8 entries of each module's
sequence table, so every pass walks the modules through their sequence once.

One pulse, with `T = TRIG_CYCLES` (default 4) and the pulse's timing register
`{tx_time, rx_time}`:

| Sub-state | Length (cycles) | `trig_xcvr` | `trig_trm` | Meaning |
|---|---|---|---|---|
| 0 LOAD | 1 | 0 | 0 | pick timing register *p* |
| 1 XCVR | T | 1 | 0 | transceiver to transmit |
| 2 BOTH | T | 1 | 1 | "T" edge to the modules |
| 3 TTRIG | T | 0 | 1 | |
| 4 TXWAIT | max(tx_time,1) | 0 | 0 | transmit time |
| 5 RTRIG | T | 0 | 1 | "R" edge: modules to receive |
| 6 RXWAIT | max(rx_time,1) | 0 | 0 | receive time |
| 7 NEXT | 1 | 0 | 0 | next pulse / next pass / done |

```
clk_sys     |1|  T  |  T  |  T  |  tx_time   |  T  |    rx_time     |1|
trig_xcvr   __/‾‾‾‾‾‾‾‾‾‾‾\____________________________________________
trig_trm    ________/‾‾‾‾‾‾‾‾‾‾‾\____________/‾‾‾‾‾\____________________
state       0   1     2     3       4          5          6          7
```

The pulse repetition time, from one `trig_xcvr` rise to the next, is
`tx_time + rx_time + 4*T + 2` cycles of 50 MHz. For example, with T = 4,
`tx_time` = 50 and `rx_time` = 2000 it is 2068 cycles, or 41.36 us. The 16-bit
fields allow up to 1.31 ms each.

- **State output:** `tsm_state` shows `pulse*8 + sub-state` (0..31). All
  outputs are registered, one cycle behind the internal state.
- **Start:** a rising TSM enable (register 10) starts a run. The Loop Number
  and the timing registers are copied at that moment, so software may load
  the next beam's values during a run.
- **End:** after the last pass Timing Ack (register 16) goes to 1 and stays
  there until the next run.
- **Loop Number 0:** acknowledges at once, without a pulse.
- **Abort:** clearing the enable during a run stops it at once, without an
  ack.
- **Next run:** a new run needs the enable to go 0 and then 1.

## Transceiver interface

Before each beam position, software sends the transceiver a 32-bit scan word
(beam position and polarization sequence) over three lines:

| Line | Signal |
|---|---|
| Clock | `xcvr_clk`, 1 MHz, 50 % duty, divided from 100 MHz |
| Enable | `xcvr_en` |
| Data | `xcvr_data` |

Software does this in order:

1. Set register 19.
2. Write the word to register 20.
3. Clear register 19.
4. Poll register 21.

The Transmitter waits two interface clocks after the enable edge before it
copies the word, which gives the data write time to land. It then sends bit 31
first:

- `xcvr_en` is high for exactly 32 clocks.
- Data and enable change on the falling edge of `xcvr_clk` and are stable at
  its rising edge.

A word takes about 34 us.

## Inside a T/R Module (`trm_core`)

Each module has two tables.

**Look-up table (1024 x 16).** Each word has these fields, most significant
first:

| Field | Width |
|---|---|
| T, R, H, V switch bits | 1 bit each |
| attenuator | 6 bits |
| phase | 6 bits |

The table is split into four segments of 256 beam positions, in the order
TH, TV, RH, RV. The table address is `{tr, ~hv, beam[7:0]}`.

**Sequence table (8 x 16).** Each entry has these fields, most significant
first:

| Field | Width | Meaning |
|---|---|---|
| command | 2 bits | mode |
| temperature | 4 bits | |
| T/R | 1 bit | 0 = transmit |
| H/V | 1 bit | 1 = horizontal |
| beam position | 8 bits | |

On each rising edge of `trig_trm`, the port registers load the table word
addressed by the current sequence entry, and the sequence moves to the next
entry, wrapping after 8. The port registers drive the attenuator, phase
shifter and switches. The trigger is synchronized into the module's clock, so
the port registers change 3 clocks (120 ns) after the edge. The temperature
register takes the applied entry's temperature bits. Writing sequence entry 0
restarts the sequence, which is how a new beam's broadcast lines up with the
start of the next TSM run.

The core has four write ports:

| Port | Use |
|---|---|
| Table write | calibration load |
| Sequence write | broadcast |
| Direct port register write | the "write port registers" function, which bypasses the table |
| Address load | port registers from one table word |

In the full system each module's link decoder drives these ports. That decoder
interprets the address-and-command word on the link, and the encoding of that
word is not defined here. `phase_tilt_top` therefore exposes the four ports of
each of the 64 modules as top-level arrays.

## Operating sequences

**Calibration of module *m*:**

1. Write *m* to register 18 and set register 9.
2. Write the command word, the word count (1024) and the 1024 table words, as
   pairs packed into 32-bit writes.
3. Read back the same number of echoed words and compare them.
4. Clear register 9.

On the link this is 1026 words, about 780 us per module.

**One beam position:**

1. Broadcast the 8 sequence entries (four 32-bit writes), with register 9
   clear.
2. Send the scan word to the transceiver.
3. Write the Loop Number and timing registers 1..4.
4. Set register 10 and poll register 16, then clear register 10.

## Simulation

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_phase_tilt_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/afb_pkg.sv tb/tb_phase_tilt_top.sv
./obj_dir/Vtb_phase_tilt_top
```

| Testbench | What it covers |
|---|---|
| `tb_phase_tilt_top` | Whole system at default sizes: 64 modules, 1024-word FIFOs and tables. Calibrates modules 7 (left) and 40 (right) over the link with word-by-word echo comparison. Uses address loads and a direct port write. Runs two beams with Loop Number 2 and 3. After all 40 trigger edges it compares all 64 modules' port registers, temperature and sequence position with a reference model. It counts each mechanism. About 5 s. |
| `tb_array_calibration` | Initialization of the whole array: all 64 modules calibrated over the link, 65,664 words echoed and compared. Each load must take exactly 19,493 link clocks (780 us, no gaps between frames). Then one beam run on the loaded tables. About 52 ms of simulated time, about 10 s. |
| `tb_array_formatter` | The formatter alone, at defaults. Calibration on both channels, an out-of-range address (no answer), 1300 words against the 1024-word FIFO (WSM stalls), FIFO reset, two beams with the trigger count and PRT checked to the cycle, Loop Number 0, scan word bit by bit. |
| `tb_trm_core` | Table and sequence stepping over 20 triggers, restart, bypass write, address load, reset |
| `tb_tsm` | Compares every output on every cycle with an independent timing model, including abort and Loop Number 0 |
| `tb_wsm`, `tb_rsm`, `tb_async_fifo`, `tb_sync_fifo`, `tb_tr_serial_tx`, `tb_tr_serial_rx`, `tb_rx_sync`, `tb_channel_enable`, `tb_clk_div`, `tb_xcvr_tx`, `tb_pf_regs` | One block each |

`tb/trm_echo_model.sv` is a behavioural stand-in for a group of modules on one
echo channel. The system test uses its own simple command convention (listed
in the testbench header) to play the modules' link decoders.

The simulator used is two-state, so every register that is read has a reset.

## Departures and own choices

The description of the formatter leaves many details open. These are the
points where this RTL chose, or where the description is inconsistent:

- **Pulses per pass.** The formatter is described as making 4 pulses per pass
  of the 32-state machine, and elsewhere a measurement mentions 64 pulses per
  pass. This design makes 4. 64 pulses equal 16 passes.
- **Transceiver trigger.** One trigger drawing shows the transceiver trigger
  as a level that spans the pulse; the main trigger figure shows a pulse ahead
  of the module triggers. This design uses the pulse.
- **TSM internals.** These are this design's own: the split into 8 sub-states,
  the trigger width `TRIG_CYCLES`, the timing units (50 MHz cycles), and the
  half-word order of the timing registers.
- **WSM half-words.** The WSM always sends both half-words. A function
  described as sending a single word needs a padding half-word.
- **Processor bus.** Replaced by the simple register port above. Register 15
  ("Clock 2") has no described function and is plain storage.
- **FIFO depth.** 1024 words is assumed. The handshakes (Write/Read Ack
  meaning "done", waiting on full and empty) are this design's.
- **Receiver clock.** The Receiver samples the echo with the formatter's own
  25 MHz clock, not with a clock returned by the modules.
- **T/R Module datapath.** These are this design's choices: the segment
  encoding `{tr, ~hv}`, stepping one sequence entry per trigger edge,
  restarting on a write to entry 0, and when the temperature register loads.
- **Link decoder.** The T/R Module's link decoder and read-back path are not
  built, since the command encoding is not defined. The same holds for the
  processor, memories, UART, Ethernet, clock manager and LVDS buffers.
