# ABC: binary readout chip for 128 silicon strips

The ABC is the digital half of a two-chip front end for silicon strip
detectors. A companion front-end chip amplifies and discriminates 128 strips.
Every 25 ns bunch crossing it hands the ABC one bit per strip: hit or not.
The ABC must do three things:

- keep those bits for about 3.3 µs, until the experiment's level-1 trigger
  decides whether the crossing is interesting;
- copy out the triggered crossing and its two neighbours, and keep only the
  strips that fired;
- send the result over one serial link that is shared by a chain of chips.

Everything is clocked by the 40 MHz bunch-crossing clock. Control arrives as a
serial command stream on a second line, one bit per clock.

This repository holds synthesizable SystemVerilog for the whole digital part
of the chip. It also holds behavioural models of the two analogue parts that
have a transfer function: the strobe delay line and the current DACs.

## Data path, from strip to readout buffer

```
hit_in[127:0] -> input translator -> input register -> pipeline -> readout buffer -> data compression -> readout logic
                 (test pulses)        (edge, mask)      132 deep     8 events          (hit criterion)     (packets, token)
```

- **Input translator** (`abc_input_translator`). On silicon this stage senses
  currents. Here the hits arrive as logic levels, so only the test feature is
  built. A group of 32 channels (channel k with k mod 4 = Cal_Mode) can be
  forced high. It is held high while the Test_Mode configuration bit is set,
  or for one clock on a "pulse input register" command.
- **Input register** (`abc_input_register`). It latches the 128 bits each
  clock. In edge-detect mode a channel gives one 1 per rising edge, however
  long the input stays high. The 128-bit mask register either gates the
  channels (0 = off) or, in mask test mode, replaces the data. Replacing the
  data lets a known pattern be written into the pipeline.
- **Pipeline** (`abc_pipeline`). A 132 × 128 circular RAM, written every
  clock. The read port always reads the slot that is about to be overwritten,
  so the level-1 latency is exactly 132 clocks. An accumulator ORs every word
  that enters. When the Accumulate bit is set, a trigger reads the accumulator
  instead. This is useful for a source or cosmic run where trigger timing is
  unknown.
- **Readout buffer** (`abc_readout_buffer`). A 24 × 128 RAM that holds 8
  events of 3 words each. It absorbs the randomness of the triggers.

### What a trigger captures

Let the trigger command's last bit be sampled on clock edge `c`. The three
words then hold the hit inputs sampled on edges `c-132`, `c-131` and
`c-130`. The middle one is "the" triggered crossing. In each channel's 3-bit
pattern, bit 2 is the oldest sample.

### Buffer overflow

Overflow is the subtlest part of the buffer. Suppose a ninth event arrives
while 8 are still waiting:

1. The oldest waiting event is overwritten.
2. A 4-bit lost-event counter is incremented.
3. Lost events are always the oldest ones outstanding. So while the counter
   is non-zero, each event "read" only decrements it. The stored data is
   left alone, and the chip sends a lost-event packet for that trigger.

This keeps every later event paired with its own trigger number. After 16
lost events the buffer sets a sticky error flag. From then on it answers with
buffer-error packets until the next reset.

## Compression

`abc_data_compression` takes one event from the buffer and transposes it into
128 3-bit patterns. It keeps the channels that match the criterion set in
configuration bits 1:0:

| bits 1:0 | name            | kept patterns            |
|----------|-----------------|--------------------------|
| 00       | Hit             | any 1 (1XX, X1X, XX1)    |
| 01       | Level           | X1X                      |
| 10       | Edge            | 01X                      |
| 11       | ReadAll / align | every channel            |

It offers the kept channels one at a time, lowest first, with this handshake:

- `ch`, `hit` and `datavalid` describe the channel on offer.
- `adj` is high when the next kept channel is `ch+1`.
- `end` marks the last kept channel.
- A pulse on `next` retires the offered channel; the following one appears
  one clock later.
- After the last kept channel, the block shows `datavalid=0, end=1` ("all
  hits read out"). One more `next` closes the event.

The original chip scans channel by channel. This design does a whole-vector
priority search, which gives the same sequence at one channel per `next`.

## The readout chain

This is the part that takes the most care to follow.

Up to 12 chips share two optical links. On each side of a detector module,
one chip is the **master** and talks to the link. The others are **slaves**,
and the far one is marked as the **end** chip.

A chip is master when its `masterB` pad is low and configuration bit 11 is
clear. A chip that powered up as a slave cannot be made a master. The end chip
is set by configuration bit 12.

### Sequence of one event on the link

1. When a trigger arrives, the master's readout controller
   (`abc_readout_controller`) pushes the chip's 4-bit trigger number and
   8-bit bunch-crossing number into a 24-entry event FIFO (`abc_event_fifo`).
2. When the FIFO is not empty and the link is idle, the master sends a
   preamble and header. Configuration bit 4, Dataout Delay, first adds 4 idle
   clocks. The header is:

   ```
   11101  0  LLLL  BBBBBBBB  1
   ```

3. While header bit 17 is on the link, the controller raises the token. The
   master's own readout logic (`abc_readout_logic`) starts sending its data
   block on the very next clock.
4. Each chip's readout logic sends its block. One clock before its last bit,
   it passes the token to the next chip. That chip's bits come back through
   `datain` and are relayed out behind the chip's own bits, one register
   stage per chip. So the stream on the link has no gaps, whatever the number
   of chips.
5. The end chip appends a trailer: a 1 followed by fifteen 0s.
6. The master watches its own output for the trailer. When it sees it, the
   event is complete and the next FIFO entry may start.

### Packet formats

Each chip's block is one of the following, sent MSB first. `aaaa` is the
chip address bits 3:0, `ccccccc` is the channel, and `ddd` is the hit pattern.

| packet                    | bits                                                     |
|---------------------------|----------------------------------------------------------|
| hit cluster               | `01 aaaa ccccccc 1 ddd`, then `1 ddd` per adjacent channel |
| new cluster, same chip    | again `01 aaaa ccccccc 1 ddd`                            |
| no hit                    | `001`                                                    |
| configuration (send-id)   | `000 aaaa 111 cccccccc 1 cccccccc 1` (config 15:8, 7:0)  |
| buffer error              | `000 aaaa 100 1`                                         |
| lost event (overflow)     | `000 aaaa 010 1`                                         |
| no data available (slave) | `000 aaaa 001 1`                                         |

Notes on the formats:

- Every chip always sends at least 3 bits.
- The trailer cannot appear inside valid data: no packet sequence holds more
  than 11 zeros in a row.
- Error packets are sent only in data-taking mode. In send-id mode the chip
  answers every trigger with its configuration packet.

### Counter values

The first trigger after a reset reads out as trigger number 1. A trigger sent
immediately after a BC reset or soft reset reads bunch crossing 3.

The controller keeps the trigger and bunch-crossing counts in the event FIFO.
If more triggers arrive than the FIFO can hold, the extra triggers are
dropped.

### Redundancy

Each chip has two token/data inputs and two token/data outputs, wired to
different neighbours (`abc_token_data_in`, `abc_token_data_out`):

- Configuration bit 9 chooses the bypass input.
- Bit 10 chooses the bypass output.

Together they route the chain around a dead chip, provided no two adjacent
chips fail. To skip the last chip, make the one before it the end chip. If a
master or its link fails, its chips can be routed to the other side's master.

### Clock feed-through

A master whose configuration bit 13 is clear puts the clock divided by 2 on
the datalink. All-zero is the power-up configuration, so a freshly powered
master shows this. It lets the link be tested before any command is sent.

## Command protocol

`abc_command_decoder` reads one bit of the command stream per clock. A
command starts at the first 1 seen while idle.

| command          | bits                                                           |
|------------------|----------------------------------------------------------------|
| level-1 trigger  | `110`                                                          |
| soft reset       | `101 0100`                                                     |
| BC reset         | `101 0010`                                                     |
| slow command     | `101 0111` + length N (8 bits) + address (6) + code (6) + data |

N counts the bits after the length field:

- 28 for a 16-bit register write;
- 140 for the mask;
- 12 for commands without data.

A chip always consumes exactly N bits, even when the command is not for it.
Every chip on a shared command line therefore stays in step.

The address must have its top bit set. The low 5 bits must match the chip's
`id` pads, or be 11111 for a broadcast.

Slow command codes (the top 3 bits of the code field; the low 3 bits are 000):

| code | action                                        |
|------|-----------------------------------------------|
| 000  | load configuration register                   |
| 001  | load mask register (channel 127 first)        |
| 010  | load strobe delay register                    |
| 011  | load threshold and calibration-amplitude DACs |
| 100  | pulse the input register (test)               |
| 101  | enable data taking                            |
| 110  | issue a calibration strobe                    |
| 111  | load bias DAC                                 |

Any addressed command whose code has its top bit 0 returns the chip to
send-id mode. Only "enable data taking" leaves it.

The power-up sequence is:

1. Configuration.
2. Mask.
3. DACs and delay.
4. Enable data taking.
5. Soft reset.

### Configuration register bits

| bit | meaning                                     |
|-----|---------------------------------------------|
| 1:0 | compression criterion (table above)         |
| 3:2 | Cal_Mode: which quarter of channels is pulsed |
| 4   | Dataout Delay (4 idle clocks before preamble) |
| 5   | Test_Mode of the input translators          |
| 6   | edge detection                              |
| 7   | mask register replaces the input data       |
| 8   | accumulate                                  |
| 9   | use bypass token/data inputs                |
| 10  | use bypass token/data outputs               |
| 11  | 0 = master (combined with the masterB pad)  |
| 12  | end of chain                                |
| 13  | 0 = clock feed-through when master          |

## Calibration and analogue controls

- `abc_calibration_logic` drives the 2-bit calibration code (Cal_Mode) to the
  front-end chip. On a calibration command it starts a strobe one clock later
  that lasts 5 clocks (125 ns).
- The strobe passes through `abc_strobe_delay_line`, a behavioural delay of
  `register × 1.1 ns`.
- `abc_dacs` models the typical transfer of the three current DACs in whole
  nanoamps. The input is the reference current IDAR. The outputs are:
  - threshold: `IDAR/256 × code`;
  - calibration amplitude: `−IDAR/256 × code`;
  - preamp bias: `−1.2·IDAR/16 × code`.
- The registers behind them are `abc_dac_register` and
  `abc_strobe_delay_register`. They share the 16-bit serial shift register of
  `abc_config_register`.
- `abc_test_mux` routes one of 128 internal test points to a test pad. A
  counter advanced by an external test clock selects the point.

## Resets

- **`resetB`** is the pad/power-up reset: asynchronous and active low. It
  clears everything, including the registers. The chip comes up in send-id
  mode, and a master comes up in clock feed-through.
- **Soft reset** is a command. It clears everything except the registers:
  - the pipeline pointer and accumulator;
  - the readout buffer;
  - the compression, readout and controller state;
  - the event FIFO and the counters.

  A transmission in progress stops at once.
- **BC reset** is a command. It zeroes the bunch-crossing counter only.

## Top level

`abc_chip` wires all of the above into one chip. Its parameters are:

- `NCH = 128`
- `PIPE_DEPTH = 132`
- `RB_DEPTH = 24`

Its ports are:

- two clock/command pairs and the `select_pad` that picks between them
  (`abc_clk_cmd_select`);
- `resetB`, `masterB` and the 5-bit `id` pads;
- the 128 hit inputs;
- the calibration outputs;
- both token/data input and output pairs;
- the datalink;
- the DAC currents and the test-mux pads.

Differential pairs are modelled by their positive leg; the complement outputs
are driven.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Shared check macros are in `tb/tb_util.svh`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    tb/tb_abc_chip.sv --top-module tb_abc_chip -o sim
./obj_dir/sim
```

Replace `tb_abc_chip` with any other testbench name, such as `tb_abc_pipeline`
or `tb_abc_occupancy`. The package `rtl/abc_pkg.sv` is found through
`-y rtl`. `-Wno-fatal` keeps the testbenches' width lint warnings from
stopping the build. The simulator is
two-state, so every register a testbench reads is reset.

`tb_abc_chip` runs three chips at full size (128 channels, 132-deep
pipeline) in one chain: a master, a slave, and an end chip on the second
clock/command pair. It parses the datalink bit by bit against a model of the
expected events, and counts each mechanism it exercises:

- send-id packets and clock feed-through;
- data taking in all four compression modes;
- edge detection on the inputs and the accumulator;
- hit and no-hit packets, and adjacent-channel groups;
- FIFO queueing of back-to-back triggers;
- Dataout Delay;
- input test pulses;
- lost-event and buffer-error packets;
- soft and BC reset;
- bypass of the middle chip;
- the calibration strobe and its delay;
- the DACs;
- the test multiplexer;
- the second clock/command input.

It fails if any mechanism never occurs.

`tb_abc_occupancy` runs one side of a detector module: six chips in one
chain, in Level mode, at the two operating points the chip was specified
for. Trigger gaps are drawn at random from an exponential distribution. Every
event is checked packet by packet, and the testbench reports the load on the
datalink and the number of lost events:

| operating point                    | triggers | hits per chip and event | datalink load | events lost |
|------------------------------------|----------|-------------------------|---------------|-------------|
| 1% strip occupancy, 100 kHz trigger rate | 1000 | 1.29 | 0.42 | 0 |
| 25% strip occupancy, 4 kHz trigger rate  | 40   | 31.2 | 0.24 | 0 |

The requirement is below 1% of events lost at the first point. The
testbench checks it.

## Where this design departs from, or fills in, the specification

- **Trigger timing.** The specification gives only the pipeline depth. The
  exact alignment (`c-132 … c-130`) is this design's choice.
- **Counter values.** The specification says the FIFO is loaded "before the
  counters are incremented", but also that the first trigger reads 1 and that
  a trigger right after a BC reset reads BC 3. The numeric statements are
  followed.
- **Overflow.** When a trigger arrives with 8 events waiting, the oldest is
  dropped. Lost events are then answered in order, as described above. A
  trigger that finds the controller's event FIFO full is dropped.
- **End of event.** The specification does not say how the readout logic
  tells the compression logic that an event is done. Here it sends one extra
  `next` after the last segment.
- **Compression `busy`.** The compression block has an extra `busy` output. A
  token that arrives while an event is still being loaded from the buffer
  waits, instead of being answered "no data".
- **Token timing.** The token is passed one clock before a chip's last bit,
  and data is relayed through one register per chip. The specification says
  only "a few clocks before the last bit".
- **Send-id mode.** The chip returns to send-id mode on any addressed command
  whose code has its top bit 0. The bias DAC load (code 111) therefore does
  not return it, although another passage says any register write does.
- **Register latching.** Registers that the specification latches "on the
  falling edge of load" are loaded synchronously on the clock of the one-clock
  load pulse.
- **Mask reset value.** The mask register resets to all-off. Unmasked
  operation therefore needs a mask load, as in the power-up sequence.
- **Analogue parts.** The input translators compare currents; here they take
  logic levels. The LVDS receivers and drivers are modelled by the logic
  level they carry. Idle output pairs drive 0.
- **Test points.** Test-mux points that name state bits of the original
  implementation, which this design does not have, read 0.
- **Not built.** These have no logic function beyond what `abc_chip` already
  brings out as ports:
  - the power-up reset detector (it enters as `resetB`);
  - the datalink LVDS driver;
  - the chip-ID bond pads;
  - pad and layout details.
