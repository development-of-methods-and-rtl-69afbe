# USB-configured trigger controller

This is the FPGA logic for a trigger controller at a klystron test station. The
controller makes eight precisely timed trigger pulses. A PC sets their repetition
rate, time slot, delay and width over USB. The PC connects through a USB stamp
built around an FTDI FT245BM, a chip that presents USB traffic as a simple
8-bit parallel FIFO. This RTL has three parts:

* a small protocol that lets the PC write any of 32 four-octet configuration
  registers, or read one back, through the FIFO;
* the register block that holds the configuration and hands it to the 119 MHz
  trigger clock domain;
* a trigger generator that turns the registers into the eight outputs.

The configuration path (protocol, five-octet buffer, register block, clock
divider) follows the original device closely. The original left the trigger
generator for later, so only its behaviour (rep rate, time slot, delay, width)
comes from there. Its internals and the register map are this design's own.

## The frame protocol

Every transfer starts with an **address octet**. Only its low five bits select a
register (0-31), and the upper three are ignored.

| PC sends                        | Controller does                                                |
|---------------------------------|----------------------------------------------------------------|
| address + four data octets      | stores the four octets in the addressed register               |
| address octet alone             | sends the four octets of the addressed register back to the PC |

Data octet 0 is bits 7:0 of the register and octet 3 is bits 31:24. Read-back
data comes out in the same order. The control program writes a setting and then
reads it straight back to check it.

**How a read is told from a write.** The FIFO carries no frame boundaries, so the
controller decides by time. After taking the address octet it waits
`WAIT_STEPS` steps (default 2, i.e. 2 us) for another octet:

* if one arrives, the frame is a write and the controller collects exactly four
  data octets;
* if none arrives, the frame is a read.

A frame that stops after two to four octets is dropped. This only works if the
PC's five octets are all in the FIFO when the controller looks. That is why the
configuration logic runs at about 1 MHz, far slower than USB needs. A PC that
writes the octets of one frame in separate, delayed USB transfers causes an
**under-run**: the address is taken as a read request and the late data octets
are then treated as a new, short frame and dropped. The controller testbench
shows this case.

## Blocks

```
                 +--------------------+
 usb_rxf_n ----->|                    |---> usb_rd_n, usb_wr
 usb_txe_n ----->| timing_controller  |---> usb_d_t (pad T)
                 | (count selector)   |--- frame_ctrl ---+
                 +---------^----------+--- wr_en, byte_sel ---+
                           | ce                        |      |
 clk ---> clk_divide ------+---> clk_div_out           v      v
                                          +------------------+   +-------------------+
 usb_d_i (pad O) ------------------------>|five_byte_register|-->| big_byte_register |--> usb_d_o (pad I)
                                          +------------------+   |  32 x 32 bit      |
                                                                 |  SYNC = clk       |--> cfg[0..31]
                                                                 +-------------------+        |
 fiducial (360 Hz) ---------------------------------------------> trigger_generator <--------+
                                                                        |--> trig[7:0], group_fire[1:0]
```

| Module | Role |
|---|---|
| `trigger_controller_top` | Wires the blocks together. The data pad's tri-state buffer is left outside, as three ports (`usb_d_i`, `usb_d_o`, `usb_d_t`). |
| `clk_divide` | Divides 119 MHz by `DIV` = 119 into a one-clock enable `ce` (1 MHz) plus a square wave `clkout` for a scope. |
| `timing_controller` | Count selector and control FSM: FIFO handshake, read/write decision, loading of the five-octet register, store, read-back. |
| `five_byte_register` | Collects the octet stream into `byte_address`, `byte_zero` ... `byte_three`. |
| `big_byte_register` | 32 registers of 32 bits. Written from the five-octet register, read back one octet at a time on `OBus`, and copied to `reg_out` on every `SYNC` edge. |
| `trigger_generator` | Slot counter over 360 Hz fiducials, one time counter per channel group, start/stop comparators per channel. |
| `trigger_pkg` | Sizes, register map, octet index enum, five-octet control struct. |

All logic runs on the single 119 MHz clock. The original divided the clock
for the read/write logic. Here the divider gives a clock enable instead, so
there is no derived clock to constrain. The register block's synchronisation
input (`SYNC`) is kept: the configuration is stored on the slow steps and
copied on every `SYNC` edge into the output registers the trigger logic reads.
In the top, `SYNC` is tied to `clk`. The module also works with a separate
clock on `SYNC` because the store and the copy are separate flop sets, as its
testbench shows. That only holds if the store is not written while the copy
is being taken, which the slow write rate makes likely but does not guarantee.

## Timing of the configuration path

One **step** is one `ce` pulse, 1 us at the defaults. Handshake levels are those
of the FT245BM:

* `rxf_n` low means data is waiting.
* While `rd_n` is low the FIFO drives the bus. The octet is taken at the end of
  that step, and the rising edge of `rd_n` removes it.
* `txe_n` low means there is room.
* `wr` high then low writes the bus into the FIFO on the falling edge.

`rxf_n` and `txe_n` go through two-flop synchronisers.

| Sequence | Steps |
|---|---|
| `rd_n` low, per octet | 1 |
| `rd_n` high before the next look at `rxf_n` | 1 |
| write frame, from `rd_n` first falling to the register store | 15 |
| read request, from `rd_n` falling to the first `wr` rising | 5 (with `WAIT_STEPS` = 2) |
| each read-back octet (`txe_n` check, drive with `wr` high, `wr` low) | 3 |

The pad (`usb_d_t` = 0) is driven only in the two steps around each `wr`
strobe. An assertion checks that it never drives while `rd_n` is low. The
register block's new value reaches `reg_out` one `SYNC` edge after the store.

## Register map and trigger generation

| Register | Contents (low bits used) |
|---|---|
| 0  | `REP_DIV` = 360 / rep rate: 1 = 360 Hz, 3 = 120 Hz, 6 = 60 Hz; 0 = off |
| 1  | group 1 time slot, 1..`REP_DIV` (channels 1-6) |
| 2  | group 2 time slot, 1..`REP_DIV` (channels 7-8) |
| 8-15  | start time of channels 1-8, in ticks of 1/119 MHz = 8.403 ns |
| 16-23 | stop time of channels 1-8, same unit |
| 3-7, 24-31 | unused by the trigger logic, still readable and writable |

A 360 Hz fiducial pulse (an input of this design) advances a slot counter
1, 2, ..., `REP_DIV`, 1, ... A group fires on the fiducial whose slot number
equals its slot register. Its 20-bit time counter then restarts at zero and
counts clocks. A channel is high while `start <= time < stop`, so:

* delay = start x 8.403 ns;
* width = (stop - start) x 8.403 ns.

The host rounds its delay and width entries to these ticks. For example, 899 ns
and 25 ns become start 107 and stop 110, which the host shows as 899.16 ns and
25.21 ns. The output rises `3 + start` clocks after the clock edge that first
samples the fiducial high: two synchroniser flops, the counter restart and the
output register. Zero in `REP_DIV` or a slot register never fires, so the
all-zero reset state produces no triggers. A channel with `stop <= start` stays
low.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_DIV` (top) / `DIV` | 119 | system clocks per configuration step (119 MHz to 1 MHz) |
| `WAIT_STEPS` | 2 | steps to wait for a second octet before treating the address as a read |
| `TIME_W` | 20 | trigger time counter width. 2^20 ticks = 8.8 ms, more than one 360 Hz period (330,556 ticks). |

The register count and size (32 x 32) and the channel count (8, grouped 6 + 2)
are constants in `trigger_pkg`.

## Simulating

Each testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/trigger_pkg.sv tb/tb_trigger_controller_top.sv \
    --top-module tb_trigger_controller_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one:

| Testbench | What it checks |
|---|---|
| `tb_trigger_controller_top` | Runs at the default parameters. It plays the host: start-up read of all 32 registers, write-and-verify of every setting (some through aliased addresses), a dropped two-octet frame, six real-rate 360 Hz fiducials at 120 Hz with the 899/25 ns example on channel 1, then a switch to 360 Hz over USB. Every trigger output is compared with a reference model on every clock, and `rd_n` must be low for exactly 119 clocks. About 3.3 M clocks; a few seconds. |
| `tb_timing_controller` | Octet order and indices, single store, four-octet read-back, dropped short frame, under-run, exact step counts, no bus contention. |
| `tb_trigger_generator` | Slot selection at divisors 3, 2, 1 and 0, cycle-exact pulse edges, the `stop <= start` case. |
| `tb_big_byte_register` | Random writes, address aliasing, every octet through `OBus`, `reg_out` updating only on `SYNC` edges. |
| `tb_five_byte_register`, `tb_clk_divide` | Against reference models; the divider at 119, 6 and 7. |

`tb/ft245_model.sv` is a behavioural model of the FT245BM's FIFO side and the
data pad. Its `host_send()` task and its `tx_count()` and `host_recv()`
functions stand in for the PC.

## What comes from the original device and what does not

Taken from the original device:

* the five-octet write / one-octet read protocol;
* the count selector, the intermediate five-octet register and the 128-octet
  register block with a synchronisation input;
* 32 registers of four octets;
* the 119 MHz clock and the ~1 MHz configuration rate;
* the block names and the port names of the registers;
* the trigger settings: rep rate derived from 360 Hz, time slot per group of
  6 and 2 channels, delay, width, and the 8.4 ns unit.

This design's own choices:

* The exact FIFO handshake sequencing, the two-step wait window and the
  dropping of short frames.
* The octet order and the ignored upper address bits.
* The reset, which is asynchronous, active low and clears everything.
* The clock-enable scheme in place of a divided clock.
* The entire register map.
* The trigger generator's structure: the fiducial input, slot counter, time
  counters, 3-clock latency and 20-bit counter width.

Not included:

* the tri-state pad buffer, which is a vendor I/O primitive;
* the USB stamp;
* the clock oscillator;
* the board's BNC buffers and power;
* the host software.

Of the board's four inputs, only one (the fiducial) is used here.

## Limitations

* The read/write decision depends on timing, as in the original. A host that
  splits a write frame across slow transfers gets a read reply and loses the
  write. There is no frame error reported back to the host.
* The trigger generator has not been checked against real trigger hardware.
  Its timing is exact to the 8.4 ns tick but includes the fixed 3-clock latency
  described above.
