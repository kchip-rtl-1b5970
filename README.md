# Kchip: a radiation-tolerant data concentrator for four PACE front-end chips

The Kchip sits between up to four PACE front-end chips and a GOL optical
serializer in the front end of a silicon preshower detector. On every trigger
each PACE reads out 3 columns of its analog pipeline as 32 twelve-bit ADC
samples per column. The Kchip gathers these 4 x 96 samples, packs them into
16-bit words, adds a header with the bunch and event numbers, and sends the
result as one packet on the 16-bit, 40 MHz GOL bus.

Triggers arrive at random times, at a mean rate of 100 kHz. A PACE needs about
6.9 us to read out one event and the Kchip about 7.7 us to send it, so both
sides need buffers. The hard parts of the design come from two goals:

* **Stay in step with the PACE chips, whatever the trigger rate.**
  - Every trigger produces exactly one packet, in order.
  - When a buffer is about to overflow, the trigger is not passed on to the
    PACE chips. Instead an empty "NULL" packet is sent in its place.
* **Tolerate radiation.**
  - Every state machine and configuration register is triplicated.
  - The data path is left unprotected, because an upset there corrupts only
    one sample.

The design is written in synthesizable SystemVerilog, except for a behavioural
model of the fine-delay DLL. It uses one 40 MHz clock domain.

## Block map

```
 trig_cmd ─► kchip_trig_decoder ─► kchip_trig_ctrl ──► pace_trig (to the PACE chips)
                    │                  │  BC/EC, inhibit, NULL
                    ▼                  ▼
             kchip_calib_gen      Trigger FIFO (128x27) ─────────────┐
                │      └─ calibration trigger ─► trig_ctrl           │
                ▼                                                     ▼
             kchip_dll ─► pace_cal                          kchip_packet_fmt ─► gol_data/tx_en/tx_er
                                                                      ▲
 pace_adc/dv ─► kchip_readout_seq ─► 4 x Data FIFO (1024x18) ─────────┤
        │             └──────────► Column Address FIFO (128x27) ──────┤
        │             └──────────► event queue (out-of-sync flag) ────┘
        ▼
 kchip_sync_monitor (DataValid / AlmostFull cross-check) ─► status, packet header

 scl/sda ─► kchip_i2c_slave ─► kchip_regfile (25 registers, FIFO test access)
```

| module | role |
|---|---|
| `kchip_pkg` | shared widths, depths, command codes and FIFO word structs |
| `kchip_top` | wires everything together; parameters `N_PACE=4`, `DFIFO_DEPTH=1024`, `CFIFO_DEPTH=128` |
| `kchip_dp_sram` | dual-port SRAM: one write port and one registered read port |
| `kchip_fifo` | first-word-fall-through FIFO around the SRAM, with count, almost-full and overflow outputs |
| `kchip_tmr_reg` | triplicated register with majority vote and per-cycle refresh |
| `kchip_trig_decoder` | decodes the serial trigger line into trigger, calibrate and resync strobes |
| `kchip_trig_ctrl` | BC/EC counters, trigger inhibit, NULL insertion, forwarding to the PACE chips, Trigger FIFO writes |
| `kchip_calib_gen` | calibration pulse (1–256 cycles) and the trigger that follows it after the latency |
| `kchip_dll` | behavioural fine delay of the calibration pulse (16 steps of 3.25 ns) |
| `kchip_readout_seq` | internal readout sequencer: ADC buses into the Data and Column Address FIFOs, event completion, overflow prediction |
| `kchip_sync_monitor` | cycle-by-cycle DataValid and AlmostFull cross-check |
| `kchip_packet_fmt` | packet builder and link layer (SOF, IDLE, 16-bit words) |
| `kchip_i2c_slave` | synchronous I2C slave, 7-bit address, one byte per transfer |
| `kchip_regfile` | status and control registers, FIFO access for test mode |

## Life of a trigger

1. **Command.** The trigger line is low when idle. A command is 3 bits long,
   one bit per clock, and always starts with a 1:
   * `100` is a trigger.
   * `110` is a calibrate command.
   * `101` is a resync.
   * `111` is invalid and sets a status bit.

2. **Identifiers.** `kchip_trig_ctrl` attaches two numbers to the trigger:
   * The bunch count (BC) is a 12-bit cycle counter that wraps at 3564.
   * The event count (EC) is a 24-bit trigger counter.

   A resync clears both counters, so the first trigger after a resync is
   event 1. The trigger then writes two words into the Trigger FIFO on
   consecutive cycles:
   * word 0 holds the BC and the NULL and calib flags;
   * word 1 holds the EC.

3. **Inhibit or forward.** If the inhibit is enabled and any "almost full"
   condition holds, the trigger is marked NULL and is not forwarded.
   Otherwise the `100` code is re-sent to the PACE chips on `pace_trig`, and
   the readout sequencer counts one more pending event.

4. **Readout.** Each enabled PACE sends 3 columns. For each column:
   * DataValid is high for 33 cycles.
   * The first cycle carries the column (pipeline cell) address.
   * The next 32 cycles carry the samples.

   The sequencer writes:
   * every sample into the Data FIFO of its PACE, as `{col, sample}`;
   * one word per PACE per column into the shared Column Address FIFO, as
     `{pace, col, addr}`.

   When the third column ends, the sequencer pushes the event's
   out-of-sync flag into a 16-entry event queue.

5. **Packet.** The packet formatter takes the next trigger from the Trigger
   FIFO.
   * A NULL entry is sent at once, as a header-only packet.
   * A normal entry waits until the event queue reports the event complete.
     The header, the column words and the packed samples are then sent.

Packets therefore go out strictly in trigger order, NULL ones included. A
receiver can count packets to keep track of events even while the inhibit is
active.

## Packet format

Each cycle the GOL bus carries one of three symbols. Both control symbols
exist in either GOL encoding (CIMT or 8b/10b).

| symbol | tx_en | tx_er | meaning |
|---|---|---|---|
| IDLE | 0 | 0 | filler between packets; keeps the receiver locked |
| SOF | 0 | 1 | start of frame |
| data | 1 | – | one 16-bit word |

A packet has this structure:

```
SOF
H0 = {null, out_of_sync, calib, 0, BC[11:0]}
H1 = {pace_en[3:0], 4'h0, EC[23:16]}
H2 = EC[15:0]
--- normal events only ---
3 x N column words   {pace[1:0], col[1:0], 4'h0, address[7:0]}
72 x N data words    samples packed LSB first
```

Here N is the number of enabled PACE chips.

The samples are taken one group at a time. Each group holds one sample from
every enabled Data FIFO, with the lowest PACE in the lowest bits. The stream
of 12-bit values is packed back to back into 16-bit words: four samples fill
three words.

With four PACE chips a normal packet is 1 + 3 + 12 + 288 = 304 words. It is
sent without gaps. Reading the next Trigger FIFO entry takes 3 more IDLE
cycles, so one event occupies the link for **307 cycles = 7.675 us at 40
MHz**. That is inside the 7.8 us budget and below the 10 us mean spacing of
100 kHz triggers. The link carries 16 bit x 40 MHz = 80 MB/s, against the
57.6 MB/s of sample data at 100 kHz.

## Buffers and overflow prevention

| FIFO | size | holds |
|---|---|---|
| Data FIFO, one per PACE | 1024 x 18 | 96 samples per event, so 10 events |
| Column Address FIFO | 128 x 27 | 12 words per four-PACE event, so 10 events |
| Trigger FIFO | 128 x 27 | 2 words per trigger, so 64 triggers |

The FIFOs are first-word-fall-through: the oldest word is always on `dout`. A
new word becomes visible two clock edges after its push.

Each FIFO reports its occupancy. It drops and flags a push into a full FIFO.

The inhibit signal `busy_af` is the OR of three conditions:

* **The readout sequencer predicts an overflow.** It counts every event that
  is triggered but not yet fully stored (pending or in progress), adds one
  more, and asks whether the Data FIFOs and the Column Address FIFO still have
  room for them all:
  `count + 96 x (pending + in_progress + 1) > 1024`, or
  `col_count + 12 x (...) > 128`.
  A trigger accepted under this rule always has space, so nothing can
  overflow.
* **The Trigger FIFO is almost full.**
* **Any enabled PACE raises AlmostFull.**

A trigger that finds the Trigger FIFO without room for two words cannot even
be recorded as NULL. It is counted as lost and shown in a register. With the
inhibit enabled this does not happen in practice.

The `tb_kchip_rate` testbench runs Poisson triggers against the PACE model,
600 at a mean rate of 100 kHz and then 600 at 200 kHz:

| mean rate | full events | NULL events |
|---|---|---|
| 100 kHz | 599 | 1 |
| 200 kHz | 387 | 213 |

No trigger was lost, no PACE rejected a trigger and no FIFO overflowed. The
highest occupancies were 877 Data FIFO words, 108 Column Address words and 50
Trigger FIFO words. That is close to what a queueing model of this front end
predicts (863, 52 and 26 words over 1.5 million events at 100 kHz).

## Synchronization monitoring

All PACE pipelines run in lock-step. The Kchip checks this every cycle with
two comparisons:

* The DataValid of each enabled PACE must equal the sequencer's own
  expectation (`seq_active`).
* All enabled PACE chips must show the same AlmostFull level.

A mismatch does three things:

* It sets a sticky status bit for that PACE, or for the AlmostFull
  comparison.
* It marks the current event as out of sync. That flag travels through the
  event queue to bit 14 of header word H0.
* It is readable over I2C in STATUS0.

A column can only start after a cycle in which all enabled DataValid lines
were low. A PACE that is one cycle late therefore cannot start a column of its
own from its trailing DataValid.

## Calibration

A `110` command starts a calibration pulse on `pace_cal`:

* The pulse begins on the cycle after the command.
* Its width is `CAL_WIDTH + 1` cycles, so 1–256 cycles.
* The DLL (register `CAL_DELAY`) delays it by a further 0–15 steps of
  3.25 ns.

If automatic calibration triggers are enabled, a trigger request follows
exactly `CAL_LATENCY` cycles after the first pulse cycle. The request is
handled like a physics trigger, with the calib flag set in the header. If it
collides with a physics trigger, it is held until the trigger path is free. A calibrate command that
arrives while a calibration is running is ignored.

## I2C interface and registers

The I2C slave runs on the system clock. SCL and SDA pass through two-flip-flop
synchronizers, and the slave works by detecting their edges. Tests run the
bus at 3.33 Mbit/s, which is 12 system clocks per bit.

* **Address.** The 7-bit address is `{chip_addr[1:0], reg[4:0]}`: the two
  upper bits come from pins, and the lower five select the register.
* **Transfers.** Each transfer moves one byte:
  - write: `START, addr+W, data, STOP`;
  - read: `START, addr+R, data, NACK, STOP`.

| reg | name | access | content |
|---|---|---|---|
| 0 | CTRL | rw | [0] test mode, [1] inhibit enable, [2] calibration trigger enable, [3] packet output enable, [7:4] PACE enable; reset 0xFE |
| 1 | CAL_WIDTH | rw | pulse width − 1 |
| 2 | CAL_DELAY | rw | DLL step [3:0] |
| 3 | CAL_LATENCY | rw | cycles from pulse to trigger; reset 128 |
| 4 | STATUS0 | ro | [3:0] PACE out of sync, [4] AlmostFull mismatch, [5] inhibit active, [6] FIFO overflow, [7] bad command (sticky) |
| 5 | STATUS1 | ro | [3:0] Data FIFO empty, [4] Column FIFO empty, [5] Trigger FIFO empty, [6] Trigger FIFO full, [7] almost-full |
| 6–7 | BC | ro | bunch counter, low byte first |
| 8–10 | EC | ro | event counter |
| 11–12 | NULLS | ro | NULL events inserted |
| 13 | LOST | ro | lost triggers |
| 14–15 | ID | ro | ID fuse pins |
| 16 | FIFO_SEL | rw | 0–3 Data FIFO of a PACE, 4 Column Address, 5 Trigger |
| 17–20 | FIFO_WD | rw | 27-bit word to push |
| 21–23 | FIFO_RD | ro | oldest word of the selected FIFO, bits 23:0 |
| 24 | FIFO_CMD | wo/ro | write: [0] push, [1] pop, [2] clear sticky status, [3] flush all FIFOs; read: FIFO_RD bits 26:24 |

The ID fuses are modelled as the input pins `id_fuses`.

## Test modes

Setting CTRL[0] gives the FIFOs two extra uses.

**FIFO access over I2C.** Any FIFO can be written with FIFO_WD and FIFO_CMD,
and read with FIFO_RD and FIFO_CMD, from I2C. This gives three ways to test
the chip:

* **FIFOs and registers only.** Read and write everything over I2C.
* **ADC bus to I2C.** The readout sequencer takes columns from the ADC buses
  without a pending trigger, so the FIFOs can be filled from the PACE side.
  The data is then read back over I2C.
* **I2C to GOL.** Load the Trigger, Column Address and Data FIFOs by hand over
  I2C. The packet formatter then sends them on the GOL bus without waiting
  for the event queue.

**Normal operation.** With test mode off, the chip runs as a normal data
concentrator: triggers are sent in and events are read out through the GOL.

## Radiation tolerance

`kchip_tmr_reg` holds each state machine's state and each configuration
register in three copies:

* The output is the bitwise majority of the copies.
* The voted value is written back into all three copies on every clock.

A single upset is therefore hidden at once and repaired at the next edge. An
`upset` input flips chosen copies, so tests can inject faults.

The following are deliberately left unprotected: counters that only feed
status registers, the FIFO contents and the data path registers.

## Departures from the original chip and own choices

The partitioning and the numbers above follow the published Kchip
description:

* FIFO sizes, 16-bit words, BC/EC, NULL events, out-of-sync flagging;
* the 25 registers, the I2C mode, the calibration ranges and TMR.

These details are not published and were chosen here:

* the trigger command codes;
* the PACE ADC-bus framing (DataValid for 33 cycles, address first);
* the packet field layout;
* the almost-full rule;
* the register map and reset values;
* the BC wrap at 3564 bunches.

Other points:

* **Data FIFOs.** There is one 1024 x 18 Data FIFO per PACE, so four in all.
  The two 128 x 27 control FIFOs are separate.
* **Event timing.** One four-PACE event takes 7.675 us, slightly less than
  the 7.8 us quoted for the original.
* **Size.** Synthesis to generic cells gives about 590 flip-flop bits outside
  the 80,688 SRAM bits. The original chip has about 1,400 registers, but its
  count includes scan, pads and the clock tree.
* **Not included:**
  - the scan path;
  - pads;
  - clock distribution to the PACE chips and ADCs;
  - the GOL and PACE chips themselves. A behavioural PACE model for
    simulation is in `tb/tb_pace_model.sv`.
* **DLL.** `kchip_dll` is a behavioural model: a pure transport delay of
  `step x 3.25 ns`, with no lock behaviour. It is not synthesizable and would
  be replaced by the analog macro.
* **SRAM.** `kchip_dp_sram` is written as a register array with a registered
  read. A real implementation maps it to a dual-port SRAM macro.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=<n> failures=<n>` and stops itself after a time
limit.

`tb_kchip_top` runs the complete chip at its default sizes. Its environment
has three parts:

* `tb_pace_model`, four PACE chips that each hold 10 events and take about
  6.9 us per event;
* `tb_i2c_master`;
* a GOL stream decoder.

It checks every packet word against values computed independently:

* the EC sequence and BC spacing;
* the column addresses;
* every sample.

Each mechanism in the table must happen at least once, and the test fails if
one never does. One run gives:

| mechanism | count |
|---|---|
| normal events | 33 |
| NULL events under inhibit | 32 |
| calibration events with the pulse width checked | 1 |
| out-of-sync events from a PACE skewed by one cycle | 1 |
| two-PACE packets | 3 |
| test-mode I2C-to-GOL events | 1 |
| resync | EC restarts at 1 |
| single upsets in one copy of a triplicated state register, while events are read out | 20 |

The run makes about 13,000 checks in total. The four-PACE packet period is
checked against 7.8 us. It is measured between packets sent back to back,
when the next event was already waiting, and comes out at 307 cycles.

`tb_kchip_rate` is the Poisson-rate workload described above.

## Simulating

With Verilator 5 (binary mode, timing enabled), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/kchip_pkg.sv tb/tb_kchip_top.sv --top-module tb_kchip_top
./obj_dir/Vtb_kchip_top
```

Replace `tb_kchip_top` with any other testbench name. Each testbench
builds in under a minute and runs in a few seconds.

To change the design:

* `N_PACE` on `kchip_top` sets how many PACE buses exist. Register CTRL[7:4]
  selects which ones are read at run time.
* The FIFO depths are top-level parameters. The overflow rule scales with
  them.
* The trigger codes, the widths and the column and sample counts are in
  `kchip_pkg`.
