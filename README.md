# ABCD3T-style binary strip readout: digital core in SystemVerilog

A silicon strip detector in a collider experiment produces a small charge on a
few of its strips at every bunch crossing. A binary readout chip amplifies and
discriminates each strip and keeps only one bit per strip per crossing: was the
strip above threshold or not. Those bits have to be held on chip for a few
microseconds until the experiment's level-1 (L1) trigger decides whether the
crossing is interesting. Only then are the few hit strips of the chosen
crossings sent off the chip, over a serial link shared by a chain of chips.

This repository holds the digital part of such a chip for 128 strips, built to
the ABCD3T chip specification. It covers sampling of the comparator outputs,
the L1 pipeline, the derandomizing buffer, data compression, token-passing
readout with error reporting, configuration, per-channel trim codes and the
calibration strobe. The analogue front end, the DACs and the pads are outside
the RTL. Their codes and signals are ports of the top module.

## Data path

One clock cycle is one bunch crossing.

```
 disc[127:0] ─► input_register ─► pipeline ─► readout_buffer ─► data_compression ─► readout_controller ─► dout / ledout
 (comparators)  level or edge     132-cycle    8 events of        keeps channels      records, token in/out,
                sensing           delay line   128 x 3 bits       matching a mode     forwarding of other chips
```

* **input_register / edge_detect.** The comparator outputs are registered at
  every rising clock edge. In *level* mode the sampled bits go to the pipeline
  unchanged. In *edge* mode a hit that keeps the comparator on for several
  cycles is reduced to a single `1` in its first cycle. The recorded time then
  does not depend on how long the comparator stays on.
* **pipeline.** A circular memory of 132 words of 128 bits (`PIPE_DEPTH`) is
  written every cycle. A read pointer a programmable `latency` behind the
  write pointer feeds a three-stage shift register. An L1 trigger copies three
  consecutive crossings: the triggered one and one neighbour on each side.
  Each channel's 3-bit *hit pattern* has the oldest crossing in bit 2.
* **readout_buffer.** This FIFO of 8 events (`BUF_EVENTS`) absorbs random
  trigger arrivals while the serial readout is slower.
* **data_compression.** This logic walks through the channels in order and
  offers each channel whose pattern meets the selected criterion:

  | mode | name  | pattern (oldest first) | use                     |
  |------|-------|------------------------|-------------------------|
  | 00   | hit   | 1XX, X1X or XX1        | detector alignment      |
  | 01   | level | X1X                    | normal data taking      |
  | 10   | edge  | 01X                    | normal data taking      |
  | 11   | test  | XXX (every channel)    | chip testing            |

  Non-matching channels cost no time. Each cycle a priority encoder finds the
  next matching channel at or above the scan pointer. An event with *k*
  matching channels therefore takes *k*+1 cycles, not 128. This is what keeps
  the readout fast enough at low occupancy.
* **readout_controller.** Serialises the event, as described next.

### Latency, exactly

Say a comparator output is sampled at clock edge *n*, and an `l1` pulse is
sampled at edge *n* + `latency` + 3. Then that sample is the central bit of the
resulting event. The samples from edges *n*−1 and *n*+1 are its neighbours.
`latency` is an 8-bit configuration field. It is clamped to 1…132 because the
pipeline holds 132 crossings. Back-to-back triggers are accepted.

## The readout chain

This is the part that needs the most care when the chip is used.

Several chips share one serial link. One chip is the **master**. It is
selected by the `masterB` pin at reset (low means master), and its master bit
can be rewritten through the configuration word. The others are **slaves**.
The **token** travels from the master through the slaves. **Data** travels the
other way: every chip copies what arrives on its data input to its data
output, one clock later, whenever it is not sending its own data. Everything
therefore arrives at the master. The master's output also drives `ledout`,
which feeds the optical link.

Sequence for one event:

1. The master's buffer becomes non-empty. If the previous token has returned,
   the master takes the token itself.
2. A chip holding the token copies its oldest event out of the buffer into a
   local register. This frees the buffer slot at once.
3. The chip sends its records, then a one-cycle token pulse on `tkout0` and
   `tkout1`.
4. The next chip does the same when the pulse arrives on its selected token
   input.
5. The last chip's token output is wired back to the master's token input.
   The token gets back in one cycle. The last chip's data, however, is delayed
   one cycle for every chip it passes through. The master therefore waits
   `DRAIN` more cycles (default 16) before it starts the next event. Chains of
   up to 16 chips are safe. Longer chains need a larger `DRAIN`, or the
   master's next header collides with the tail of the previous event.

### Record format

Each record starts with a `1`, and the line is `0` between records. A receiver
skips zeros and decodes a record from its leading bits. Bits are sent MSB
first, one per clock.

| record  | bits                                                        | length |
|---------|-------------------------------------------------------------|--------|
| header  | `1 0 1` id[5:0]                                             | 9      |
| error   | `1 0 0 1` no_data overflow buffer_error config_error         | 8      |
| hit     | `1 1` channel[6:0] pattern[2:0]                              | 12     |
| trailer | `1 0 0 0`                                                   | 4      |

A chip's packet is: a header, an error record if any flag is set, one hit
record per selected channel in channel order, and a trailer. Records follow
each other without gaps while hits are ready. The header's first bit leaves
two cycles after the token is taken. The token pulse follows one cycle after
the trailer's last bit.

### Errors

* **no_data.** The chip received the token but its buffer was empty. This
  happens, for example, when it missed a trigger that the others saw. It sends
  header, error and trailer only.
* **overflow.** The chip receives an event while its buffer is full. The
  oldest event is then overwritten, and the new event carries this flag when
  it is read out. Each flag therefore stands for exactly one lost event.
* **buffer_error.** The buffer keeps an occupancy counter and a pair of
  pointers, and compares them every cycle. A mismatch means the buffer has
  lost track of its contents. The flag then stays set until the chip is reset,
  and the data of events read meanwhile cannot be trusted.
* **config_error.** The chip has not received a configuration write since
  reset. It still sends its header, so its id identifies it.

### Surviving a failed chip

Every chip has two token inputs, two data inputs and two of each output. The
two outputs of a pair carry the same signal. The `in_sel` configuration bit
chooses between input 0, which comes from the nearest neighbour, and input 1,
which comes from the chip beyond it. The chain can thus be rewired around a
dead chip without touching the hardware. The end-to-end testbench shows the
wiring:

* master → S1 on token 0, master → S2 on token 1;
* S2 → S1 → master on data 0, S2 → master on data 1;
* S2's token outputs loop back to the master.

## Control

* **config_register.** Holds one `cfg_t` word (see `abcd_pkg`), written as a
  whole:
  * compression mode and edge enable;
  * trim-DAC range (2 bits);
  * calibration group (2 bits);
  * master and `in_sel`;
  * latency (8 bits);
  * threshold DAC code (8 bits, 2.5 mV/step, 0–640 mV);
  * calibration DAC code (8 bits, 0.625 mV/step, 0–160 mV);
  * calibration strobe delay code (6 bits).

  Reset values: level mode, no edge detection, latency 128, all DAC codes 0,
  and the master bit taken from `masterB`.
* **trim_register.** Holds one 4-bit trim code per channel, written one
  channel at a time by address. The codes go out on `trim` to the per-channel
  threshold-correction DACs.
* **calibration_control.** Four calibration lines each serve every fourth
  channel: line *g* serves channels *g*, *g*+4, …. A calibration command
  strobes the line chosen by the 2-bit address for 4 cycles. `cal_inject`
  shows which channels' capacitors are pulsed. The fine strobe delay (at least
  two clock periods of range) is analogue. Only its code is in the RTL.
* **Clock and command select.** The `select` pin picks `clk1`/`com1` instead
  of `clk0`/`com0`. The chosen command line is passed out on `com`.

## Top-level interface (`abcd3t_top`)

The command decoder is not part of this RTL, because no command encoding is
defined for it. Its decoded outputs enter the top as one-cycle pulses:

* `l1`, `cal_cmd` and `soft_reset`;
* `cfg_wr` with `cfg_wdata`;
* `trim_wr` with `trim_addr` and `trim_wdata`.

The analogue side of the chip is reached through these ports:

* comparator outputs: `disc[127:0]`, in;
* DAC and delay codes: `thr_dac`, `cal_dac`, `strobe_delay`, `trim_range` and
  `trim`, out;
* calibration strobes: `cal_line` and `cal_inject`, out.

The differential pad pairs are single-ended logic signals here. `resetB` (low
active) resets every register synchronously. `soft_reset` acts one cycle after
it is seen.

Parameters: `NCHAN` = 128, `PIPE_DEPTH` = 132, `BUF_EVENTS` = 8. The record
format carries a 7-bit channel number, so `NCHAN` may not exceed 128.

## What follows the specification and what does not

Taken from the specification:

* 128 channels and 3-bit hit patterns;
* the four compression criteria and the channel-by-channel scan;
* edge detection that can be switched on or off;
* the sampling pipeline and the trigger copying the crossing with its
  neighbours;
* overwrite-oldest on overflow, and the four error kinds;
* token passing, the master's LED output, and the duplicated
  clock/command/token/data connections for redundancy;
* 4-bit per-channel trim codes, two range bits, and four calibration groups
  with a 2-bit address;
* the DAC ranges and steps.

This design's own choices:

* the record encoding, the token pulse, the token loop back to the master and
  the drain time;
* the pipeline depth (132, the usual 3.2 µs trigger latency at 40 MHz plus
  margin) and the latency offset;
* the buffer depth (8);
* skipping non-matching channels in one cycle;
* the configuration word layout and its reset values;
* the 4-cycle calibration strobe;
* the condition that raises `config_error`;
* the way the buffer detects a bookkeeping error.

Edge detection: the specification describes it as detecting a high-to-low
transition, but also as writing one `1` per hit independent of the
comparator's response time. This RTL marks the **start** of each hit.

Not in the RTL: the preamplifier, shaper and comparator, the threshold,
calibration, trim and bias DACs, the calibration chopper and strobe delay line,
the LVDS and current-mode pads, the power-up reset, and the command decoder.

### Throughput

The specification asks for less than 1% data loss from full buffers when 1% of
strips are hit per crossing. It does not give the trigger rate or the number of
chips per link. Assume 100 kHz triggers, a 40 MHz clock and 6 chips per link.
One chip then needs about 31 cycles per event in level mode (header, about 1.3
hit records, trailer). A chain of 6 needs about 190 of the 400 cycles between
average triggers. With 8 buffered events the expected overflow is well below
1%. `tb_workload_occupancy` simulates exactly this case: six chips, 1% random
strip hits and 2500 random triggers at 1/400 per cycle. It loses none of the
15,000 chip-events.

## Files

* `rtl/abcd_pkg.sv`: shared types (`cfg_t`, `cmp_mode_e`, `err_flags_t`), record codes and the compression test `cmp_match`.
* `rtl/abcd3t_top.sv`: the chip's digital top.
* `rtl/edge_detect.sv`, `rtl/input_register.sv`, `rtl/pipeline.sv`, `rtl/readout_buffer.sv`, `rtl/data_compression.sv`, `rtl/readout_controller.sv`, `rtl/config_register.sv`, `rtl/trim_register.sv`, `rtl/calibration_control.sv`: the blocks.
* `tb/tb_<block>.sv`: one self-checking testbench per block.
* `tb/tb_workload_occupancy.sv`: buffer-loss measurement on a six-chip link at 1% occupancy.
* `tb/rec_decoder.sv`: a receiver for the record format, used by the readout testbenches.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. It also
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/abcd_pkg.sv tb/tb_abcd3t_top.sv --top-module tb_abcd3t_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_abcd3t_top` to run another testbench. The package must come first
on the command line.

`tb_abcd3t_top` runs a chain of three chips at the default sizes. It takes
about a second. The testbench keeps its own history of every chip's
comparator inputs and a model of each trigger's expected event. It decodes the
master's serial output and checks every packet for:

* chain order;
* error flags;
* hit records for the compression mode in use.

On the way it makes each mechanism occur at least once, counts it, and fails
if one never occurs:

* all four compression modes and edge detection;
* compression stalls and token forwarding;
* a 12-trigger burst that overflows every buffer. The number of lost events
  must match both the overflow flags and the buffer depth: 3 lost on the
  master, 4 on each slave.
* no-data, configuration and buffer errors;
* a calibration pulse on group 2;
* trim writes and clock/command selection;
* a bypass of a chip held in reset.

The block testbenches compare against models of their own:

* a queue model for the buffer;
* a history model for the pipeline, at latencies 1, 10, 77 and 132;
* a reference of the criteria table for compression, including its cycle
  count.

Assertions check the compression handshake: an offered hit stays stable until
it is taken, and a scan starts only when idle.
