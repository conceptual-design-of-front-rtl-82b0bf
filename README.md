# Front-end readout logic for a silicon-strip tracker

This is SystemVerilog RTL for the digital readout of a silicon-strip tracker
built from 64-channel front-end chips. Each detector plane is served by a
**hybrid**: a row of 25 front-end chips, with a **controller chip** at each end.
The front-end chips do three things:

- latch their comparator outputs when a trigger arrives;
- hold up to eight such events;
- on command, shift an event out toward one of the two ends.

A chip with no hits in an event adds just one bit to that stream. The controllers do the rest of the work:

- measure the time over threshold (TOT) of the hybrid's fast-OR;
- decide whether the hybrid took part in a trigger;
- turn the shifted bit stream into a list of hit addresses (zero suppression);
- buffer two events;
- send packets down a token-passing daisy chain that runs through the eight hybrids of one side of a tower.

The front-end chips have no clock of their own. Each controller sends clock
pulses only while it is sending a command or moving data. In the RTL every chip
runs on the common 20 MHz clock, and each controller's pulses appear as a
one-cycle clock enable (`fe_clk_en`). This is the most important modelling
choice in the design, and it is described in [Clocking](#clocking).

The top level is `tower_side`: 8 hybrids, 200 front-end chips and 16
controllers, with two independent readout chains (left and right).

## Hierarchy

```
tower_side            NLAYERS=8 hybrids, token/data chains for the left and right controllers
└─ hybrid             NCH=25 front-end chips between two controllers
   ├─ fe_chip (x25)   digital part of one front-end chip
   │  ├─ fe_cmd_decoder (x2)  one per controller side
   │  ├─ fe_ctrl_reg          207-bit configuration shift register
   │  ├─ fe_event_fifo        8 x 65-bit trigger FIFO
   │  ├─ fe_out_shift (x2)    65-bit output registers, toward the left / right
   │  └─ fe_fast_or           trigger-masked OR chained through the neighbours
   └─ controller (x2)
      ├─ ctl_trigger_logic    fast-OR gate, latency window, TOT counter
      ├─ ctl_tot_fifo         8 x {readout flag, TOT}
      ├─ ctl_global_control   command receiver, job queue, front-end sequencer, read-back
      ├─ ctl_hit_counter      zero suppression of the serial front-end data
      ├─ ctl_event_buffer (x2) 63 x 11-bit hit lists with header fields
      └─ ctl_io_control       packet serialiser, token, pass-through
         └─ ctl_checksum      11-bit modular sum
```

`glast_pkg` holds the shared constants, the command enums and the controller
control-register struct.

## Clocking

- The controller is fully synchronous to a free-running 20 MHz `clk`.
- A front-end chip sees a rising edge of its controller's clock only when that controller sends one. In the RTL each such pulse is a cycle in which the controller's `fe_clk_en` is high. Every chip flip-flop that the real gated clock would drive is enabled by `clk_en_l` or `clk_en_r`.
- The command decoder of each side listens only to its own side's enable.
- The control register and the output registers use the enable of the selected side. The one exception is a register load, which uses the enable of the side that sent it.
- `fe_clk_en` and `fe_cmd` are registered in the controller. A command bit and its clock pulse therefore always leave the controller together, and the chip samples them on the same `clk` edge.
- The trigger strobe reaches the chips from `trigger_in` through gates only. Each chip turns its rising edge into a one-cycle write into its FIFO.
- The fast-OR is purely combinational from the comparator inputs to the controller's `fast_or_out`. Inside the controller it passes through a two-flop synchroniser before its edges start the counters.

If the chips were built with a real gated clock, only this clock-enable layer
would change. The sequencing and bit counts stay the same.

## Front-end chip

### Serial commands

A front-end command consists of:

1. a start bit (1);
2. a 3-bit code;
3. a 5-bit chip address.

Each field is sent least significant bit first, one bit per clock pulse. Address `11111` addresses every chip. A non-load command acts on the pulse after the address, which is the 10th pulse. The controller always puts a 0 in front of the start bit, so two commands are never back to back.

| code | action | pulses sent by the controller |
|---|---|---|
| 000 | no-op | – |
| 001 | load control register: the next 207 pulses carry bits 0..206 | 9 + 207 |
| 010 | read event: move the oldest FIFO row into the selected output register and start shifting | 10, then the data |
| 011 | calibration strobe (`cal_strobe` is held for 512 pulses) | 522 |
| 100 | clear event: drop the oldest FIFO row | 12 |
| 101 | reset chip: registers to their defaults, FIFO empty | 12 (forwarded) |
| 110 | reset FIFO pointers | 12 (forwarded) |
| 111 | end read event: stop shifting | 10 |

Bit 206 of the control register selects the side the chip listens to and reads out to. The chip takes commands and the trigger only from that side. A register load is the exception: it is accepted from either side, because a load is how the side gets changed.

### Control register (207 bits, bit 0 shifted in first)

| bits | field | power-up value |
|---|---|---|
| 0..63 | calibration mask, bit n = channel n | every 4th channel set (0, 4, 8, ...) |
| 64..127 | channel mask, bit 127−n = channel n | all set |
| 128..191 | trigger mask, bit 128+n = channel n | all set |
| 192 | calibration DAC range (1 = high) | 0 |
| 193..198 | calibration DAC setting, bit 198 = LSB | 001111 |
| 199 | threshold DAC range | 0 |
| 200..205 | threshold DAC setting, bit 205 = LSB | 010111 |
| 206 | readout direction, 1 = right | 0 (left) |

A set mask bit enables the channel. The register is a plain shift chain: each pulse moves it one place toward bit 0. The old bit 0 is on `ctrl_out` during the pulse, so a load reads back the previous contents, bit 0 first. `ctrl_oe` is high only when the load used the chip's own address, never the wildcard. On the hybrid all `ctrl_out` lines share one trace, modelled as the OR of the enabled outputs.

### Event path

- On a trigger, the chip writes into its FIFO the comparator outputs ANDed with the channel mask, plus a 65th bit that is the OR of those 64 bits.
- A read event loads the oldest row into the output register of the selected side.
- From the next pulse on, the register shifts once per pulse. Its header bit (the OR bit) leaves first.
- The left register sends channel 0 first. The right register sends channel 63 first.
- If the header is 0, the register becomes a single stage. The data from the chips further out pass through that one bit, so a chip without hits adds one `0` to the stream and a chip with hits adds 65 bits.
- Neighbouring chips are chained, so a controller receives the streams of all chips that read out toward it, nearest chip first.

The fast-OR is the OR of the comparator outputs ANDed with the trigger mask. Each chip ORs its own fast-OR with the one arriving from the far side and passes the result on in its selected direction only.

## Controller chip

### Commands

A controller command consists of:

1. a start bit;
2. a 5-bit layer address;
3. a 3-bit code;
4. data bits, for some codes.

The header is sent most significant bit first. Layer address `11111` reaches every controller on the command line.

| code | command | data bits |
|---|---|---|
| 000 | load control register. For its own address the controller sends the old contents back on `data_out` behind a start bit | 8 |
| 001 | clear event: pop the TOT FIFO, send clear-event to the chips | – |
| 010 | read event (see below) | – |
| 011 | load a front-end control register. Own address only. The 215 data bits are a complete front-end command without its start bit (code, address, 207 register bits). The controller forwards them one clock later, and returns the chip's read-back on `data_out` behind a start bit | 215 |
| 100 | clock on: run `fe_clk_en` continuously while idle | – |
| 101 | calibration strobe: send calibration to all chips with 522 pulses | – |
| 110 | send a front-end command (code and chip address) and 3 more pulses. Meant for chip reset and FIFO reset | 8 |
| 111 | reset the controller | – |

Clear, read, calibration and clock-on are placed in a 4-deep job queue and carried out one at a time by the front-end sequencer. The two forwarding commands are accepted only while the sequencer is idle.

Control register (8 bits, bit 0 first):

| bits | meaning | default |
|---|---|---|
| 0..4 | `nchips`: number of chips this controller reads | 5 |
| 5 | append the check-sum | 1 |
| 6 | unused | 0 |
| 7 | `read_always`: read the chips even without a fast-OR in the window | 1 |

### Trigger, latency window and TOT

A rising fast-OR does two things:

- It clears and starts the TOT counter. The counter advances every fourth clock (5 MHz), has 10 bits and saturates at 1023 (204.6 µs).
- It starts a 26-cycle latency counter (1.3 µs).

The latency counter stops when a trigger arrives. If it runs out first, the TOT counter is cleared. While the window is open, the gate on `fast_or_out` blocks any second fast-OR, so the tower sees one fast-OR per hybrid and trigger window.

Each trigger pushes one entry into the 8-deep TOT FIFO:

- The readout flag says whether the window was open.
- The TOT field holds the count so far, or 0 if the window was closed.
- If the fast-OR is still high at the trigger, the counter keeps running, and its final value is written into the same FIFO entry when the fast-OR falls. A read therefore always finds a finished TOT, provided the fast-OR has ended.

### Read sequence

`ctl_global_control` carries out a queued read as follows:

1. **Wait for a free buffer.** `read_stall` is high while the write-side event buffer still holds a packet that has not been sent.
2. **Pop the TOT FIFO.**
3. **If the readout flag or `read_always` is set:**
   - Send read-event to the chips. This is 10 pulses: gap, start, code, address.
   - Send one more pulse for the load.
   - Keep pulsing while `ctl_hit_counter` samples `fe_data_in` on every pulse. The hit counter reads the header bit of a chip. After a 1 it counts 64 channels, and each 1 latches `{chip[4:0], channel[5:0]}` into the event buffer at position `nhits`.
   - After `nchips` headers the data phase ends. The controller then sends end-read-event and one more pulse.
   - Write the header (hit count, TOT, error) into the buffer.
   - Hits beyond 63 are dropped and set the error flag.
4. **Otherwise:**
   - Send clear-event, 12 pulses in all.
   - Record an empty event (0 hits) in the buffer, so every read command yields exactly one packet.
5. **Switch buffers.** The write-side buffer changes after every event. The read side changes after every packet sent.

Chip numbers in the hit words count from the reading controller: chip 0 is the chip next to it. For the right-hand controller, channel 0 in a hit word is the chip's channel 63. The reader of the data has to know where the hybrid is split.

### Packets, token and pass-through

```
1 | layer[4:0] nhits[5:0] | err tot[9:0] | hit 0 | ... | hit n-1 | checksum
```

- Every word is 11 bits, sent MSB first.
- A packet with no hits stops after the first word.
- The check-sum is the sum modulo 2048 of all words after the start bit. It is sent only if bit 5 of the control register is set.

The token is a one-cycle pulse on `token_in`:

1. The controller holds it until its event buffer is ready.
2. It sends the packet.
3. It releases the buffer and gives a one-cycle `token_out` to the layer above.

When not sending, the controller copies `data_in` to `data_out` with one clock of delay. The packets of all layers above therefore arrive on the same line, layer 0 first. Read-back data (control registers) use the same output and are merged in the same way.

## Where this design makes its own choices

The following points are not fixed by the architecture this RTL follows, and were chosen here:

- The check-sum algorithm (modular sum) and the MSB-first word order.
- The meaning of the error flag: only hit overflow sets it.
- Ten-bit TOT counting at 5 MHz, and a 26-cycle window. Both are first estimates in the original concept and are parameters here: `PRESCALE` and `LATENCY` of `ctl_trigger_logic`.
- Mask polarity (1 = enabled), and the 512-pulse length of the calibration strobe output.
- The layout of the unused bit of the controller register, the 4-deep job queue, and the clock-on behaviour.
- The read phase ends by counting `nchips` chip headers, instead of running a fixed number of clocks held in the control register.
- Layer addresses 0..7 along the chain, and two separate chains per tower side (one for the left controllers, one for the right).
- A full FIFO drops further triggers, and a full TOT FIFO drops further entries. The trigger source is expected to count outstanding events and never overrun them.
- The send-command command forwards any front-end code, not only the two reset commands it is meant for.

The analog parts are not included: amplifiers, comparators, DACs and pads. The
comparator outputs (`disc`) are inputs of the top. The DAC settings, the
calibration masks and the strobe are outputs. The tower controller that builds
the trigger and drives commands and tokens is not included either; the
end-to-end testbench plays its part.

## Size

Coarse synthesis of the full `tower_side` with yosys gives:

- about 61 k cells;
- 84 k flip-flop bits, most of them in the 200 front-end control registers (207 bits each) and output registers;
- 128 k bits of memory cells, mostly the front-end event FIFOs (200 x 8 x 65 bits) and the controllers' event buffers.

Synthesis of the top takes several minutes.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` at the end. It stops
with a failure if its watchdog expires. The simulator is assumed to be
two-state with random initial values, so all testbench state is initialised
explicitly. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/glast_pkg.sv tb/tb_tower_side.sv --top-module tb_tower_side -Mdir obj_tower
obj_tower/Vtb_tower_side +verilator+rand+reset+2
```

The same command works for any `tb_<block>`, which tests `<block>` on its own:

| testbench | what it covers |
|---|---|
| `tb_fe_ctrl_reg` | shifting, defaults, field decode, read-back order |
| `tb_fe_cmd_decoder` | every code, 10th-pulse timing, wildcard and foreign addresses, load length, reset |
| `tb_fe_event_fifo` | random traffic against a queue model, full/empty, clear |
| `tb_fe_out_shift` | both shift directions, bypass of chips without hits, chaining |
| `tb_fe_fast_or` | random masks and directions against the equation |
| `tb_fe_chip` | one chip: commands from both sides, side selection, masks, read-out, read-back enable |
| `tb_ctl_trigger_logic` | window, timeout, gate blocking, TOT value and late TOT update |
| `tb_ctl_tot_fifo`, `tb_ctl_event_buffer`, `tb_ctl_checksum` | against reference models |
| `tb_ctl_hit_counter` | random chip streams, hit numbering, overflow |
| `tb_ctl_io_control` | packet format, token hold and handover, pass-through |
| `tb_ctl_global_control` | decoded front-end frames and pulse counts, read/clear/calibration sequences, forwarding, read-back, stall, reset |
| `tb_controller` | a controller with five chips: random events in and out of the window, overflow, check-sum on/off, TOT |
| `tb_hybrid` | 25 chips split 9/16 between the two ends, DAC/mask outputs, calibration, both packets |
| `tb_tower_side` | full size with default parameters: both chains, every mechanism above counted at least once |

`tb_tower_side` plays the tower controller at full size. Its scenario is:

- configure all controllers and split every hybrid 13/12;
- mask a channel;
- run events that exercise the fast-OR gate, the timeout, the clear path, hit overflow, both buffers with a stalled read, the calibration strobe, clock-on and reset;
- compare every packet of both chains with hit lists computed from the stimulus.

Building it takes under a minute, and running it a few seconds.
