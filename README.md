# TGC read-out slave board: Level 1 buffer, Derandomizer and VME read-out

At the LHC, bunches of protons cross every 25 ns (40 MHz). A muon chamber's
front end produces a word of hit data for every crossing, but the Level 1
trigger decides only several microseconds later whether that crossing is worth
keeping. Accepted crossings arrive at random times. This RTL implements the
read-out slave board proposed for the ATLAS end-cap Thin Gap Chamber (TGC),
which has three parts:

1. A **Level 1 buffer** holds every front-end word in a pipeline. The pipeline
   is exactly as long as the trigger latency, so the word leaving it is the one
   the current trigger refers to.
2. A **Derandomizer** FIFO takes a word only when the trigger strobe is high.
   It stores the word together with the TTC (timing, trigger and control) word
   that carries the bunch-crossing number. It smooths out the random trigger
   arrivals for the slower read-out.
3. A **VME slave** lets a host read the Derandomizer. It also switches the
   pipeline on and off, resets the FIFOs, and writes test words into the
   Derandomizer.

Everything runs on one 40 MHz clock. The sizes follow the prototype:

- a 16-bit × 256-word Level 1 buffer with a switch-selectable length of 248 to
  256 steps (6.2 to 6.4 µs);
- a 32-bit × 2048k-word Derandomizer;
- an A32/D32 VME slave with single and block transfers.

## The pipeline and how a trigger finds its data

This is the part that needs care. The Level 1 buffer is a FIFO used as a
delay line (`l1_buffer.sv`). Its controller has four states:

| state   | what happens                                                    | leaves when |
|---------|-----------------------------------------------------------------|-------------|
| `IDLE`  | FIFO flushed, nothing written                                   | run/stop switch `on` is set |
| `ARMED` | waits for the start mark in the TTC word                        | start mark seen → write enable rises next clock |
| `FILL`  | writes every clock, counts writes                               | after `LEN` clocks → read enable rises too |
| `RUN`   | writes and reads every clock; occupancy stays at `LEN` (`running`) | `on` cleared (or an empty FIFO, an error) |

`LEN = 248 + min(dip_len, 8)`. The prototype was measured at `LEN = 254`
(`dip_len = 6`). There, write enable to read enable is 254 clocks = 6.35 µs.

Count clock *t* as the clock in which the inputs are applied. The FIFO read
port is registered, so:

* a front-end word applied in clock *n* appears on the buffer output in clock
  *n + LEN + 1*;
* a trigger strobe in clock *t* makes the Derandomizer write in clock *t + 1*
  (`dr_wen`). It writes the buffer output of that clock, which is the
  front-end word of clock ***t − LEN***.

So the trigger latency the board absorbs is exactly `LEN` clocks.

The TTC word is latched in the trigger clock itself (`ttc_le` is
combinational). The stored bunch ID is therefore the one that came with the
trigger strobe. The board does not subtract `LEN` from it; relating it to the
crossing of the stored data is left to the read-out software.

A Derandomizer entry (`tgc_pkg::dr_word_t`):

```
 31            16 15 14  13    12      11          0
+----------------+-----+-----+--------+-------------+
| front-end word |spare|start|BCSTRB=1| bunch ID    |
+----------------+-----+-----+--------+-------------+
```

Only triggers that arrive while the pipeline is in `RUN` are stored. A trigger
that finds the Derandomizer full is dropped: no busy signal is raised. The
full test counts a write still in flight, so a burst of back-to-back triggers
never overruns the FIFO.

## TTC pattern word

The TTC receiver is replaced by a 16-bit pattern input (`ttc_in`), as on the
prototype's daughter board. The bit layout is this design's own choice:

| bits  | meaning |
|-------|---------|
| 11:0  | bunch-crossing ID |
| 12    | Level 1 trigger strobe (BCSTRB) |
| 13    | DAQ start mark: the pipeline starts writing on the next clock |
| 15:14 | unused |

`ttc_interface.sv` decodes these fields. It holds the latch that the
Derandomizer loads on a trigger, and drives the latched word only during the
write (`ttc_oe`); otherwise it drives zero.

## VME slave

The board answers in a 512-byte window at `BASE_ADDR` (parameter, default
`32'h1000_0000`; only `A[31:9]` are compared). Only aligned D32 accesses
(`LWORD*` low, `A1` low, not `IACK*`) are accepted.

| offset       | read | write |
|--------------|------|-------|
| `0x000`      | pop one Derandomizer word | store a test word (only while the pipeline is off) |
| `0x004`      | bus error | toggle the pipeline run/stop switch |
| `0x018`      | bus error | FIFO reset |
| `0x01C`      | bus error | system reset |
| `0x100-0x1FF`| bus error | bus error (IEEE 1394 daughter-board window, not fitted) |
| other        | bus error | bus error |

FIFO reset and system reset have the same effect. Both:

- empty both FIFOs;
- return the pipeline and Derandomizer control to idle;
- switch the pipeline off.

Derandomizer accesses at `0x000` check the address modifier:

- `09h` or `0Ah` selects a single transfer;
- `0Bh` selects a block transfer;
- any other value gives a bus error.

A read of an empty FIFO gets a bus error. So does a test write while the FIFO
is full or the pipeline is on. The command writes ignore the address modifier
and the data.

Handshake timing: each bus strobe passes through one sampling register. The
cycle starts in the clock in which the address strobe is first seen.

| cycle | DTACK* falls on the … rising edge after DS* | at 40 MHz | prototype measurement |
|-------|-----------------------------------------------|-----------|-----------------------|
| read (single, every block beat) | 2nd | 25-50 ns | about 40 ns |
| test write, first word          | 3rd | 50-75 ns | about 70 ns |
| test write, later block beats   | 2nd | 25-50 ns | — |

In a block read, a word is popped when each data strobe arrives, not when the
previous one is released. The original logic popped early. Popping on arrival
never loses a word when the master ends the block. DTACK*/BERR* stay asserted
until the master releases DS*.

`vme_d_out` with `vme_d_oe` and `vme_d_in` stand for the board's
bidirectional data transceivers.

## Modules

```
slave_board            top: wires everything, exposes VME, front-end and status pins
├── ttc_interface      TTC field decode, trigger latch
├── l1_buffer          pipeline controller
│   └── sync_fifo      16 x 256
├── derandomizer       trigger write control, test-write mux
│   └── sync_fifo      32 x 2048k
└── vme_interface      strobe sampling, address decode, command registers, DTACK/BERR merge
    ├── derand_read_ctrl   single/block read FSM
    └── derand_write_ctrl  single/block test-write FSM
tgc_pkg                sizes, word formats, register map, AM codes
```

`sync_fifo` is a single-clock FIFO with a registered read port. It accepts a
write while full only if a read happens in the same clock, which lets the
256-step pipeline use all 256 words. The prototype used FIFO chips; this FIFO
stands in for them.

Parameters of `slave_board`:

- `L1B_WIDTH` = 16
- `L1B_DEPTH` = 256
- `DR_DEPTH` = 2097152
- `BASE_ADDR`

The 2048k-word Derandomizer is 64 Mbit of memory, so an FPGA or ASIC build
would map it to external or macro memory.

## Where this departs from the prototype

- Control signals are active high inside the design. On the board they were
  active low (L1BWEN, DRWEN, …). VME pins keep their active-low names (`_n`).
- The source of the start mark is not specified. Here it is bit 13 of the TTC
  word. The original compared the pipeline counter with a fixed 254; here a
  4-bit switch selects all nine lengths from 248 to 256, and the counter is
  9 bits wide.
- Board address matching is internal (`BASE_ADDR`) rather than done by
  external comparators. The bus strobes pass through a sampling register
  before decode.
- The original address table lists the system reset at `0x012` and a
  run/stop toggle at `0x020`. Its decode equations use `0x01C` and `0x004`,
  which are followed here.
- Block transfers from an empty FIFO, or into a full one, end with a bus error
  on the offending beat. The original did not define this case.
- The Level 1 buffer FIFO is flushed whenever the pipeline is idle.

## Not included

- **IEEE 1394 read-out.** It is a vendor link/PHY chipset on a daughter board
  that was never functional. Its address window answers with a bus error.
- **TTC receiver chip.** It is replaced by the `ttc_in` pattern input.
- **Local DAQ bus, DAQ master and Read-Out Driver.** These are the parts of
  the proposed system that collect 8-20 slave boards. They were still under
  development and have no defined protocol or data format.
- **Analogue front end and trigger decision logic.** These were not part of
  the prototype.

Capacity notes:

- The 256-word buffer holds far more than the 2.5 µs (100-crossing) Level 1
  latency budget. However, the length switch only covers 6.2-6.4 µs.
- A production slave handles 96 or 128 channels. The 16-bit data path here is
  the prototype's width.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_sync_fifo` | random traffic against a queue model, full/empty/count, full+read, flush |
| `tb_l1_buffer` | write-to-read distance equals `LEN` for several switch settings (including saturation), output equals input delayed by `LEN + 1`, stop and restart |
| `tb_ttc_interface` | field decode, latch and output enable |
| `tb_derandomizer` | (16 words) write one clock after a taken trigger, stored content, drops when full, test path |
| `tb_derand_read_ctrl`, `tb_derand_write_ctrl` | handshakes cycle by cycle: single, block, every bus-error case |
| `tb_vme_interface` | whole register map through a behavioural VME master, DTACK latencies |
| `tb_slave_board` | end to end, 32-word Derandomizer (see below) |
| `tb_slave_board_full` | the same at default sizes: fills all 2,097,152 Derandomizer words with one trigger per clock, drops the extra triggers, reads everything back by block transfer (about 15 s) |
| `tb_l1a_rate` | default sizes, 10 ms of random triggers at the 100 kHz Level 1 accept rate plus a burst of 32 back-to-back triggers, with continuous single-cycle VME read-out: every word read back in order, none dropped, highest occupancy reported (28 words) |

`tb_slave_board` exercises every mechanism and checks each one happened at
least once:

- test writes, then FIFO reset;
- a run with overflow;
- a system reset;
- a run with read-out during data taking;
- bus errors.

It predicts every Derandomizer word from the driven patterns alone. Shared
helpers: `tb/vme_master.sv` (VME cycles) and `tb/tb_slave_board_body.svh`
(end-to-end body).

Run one, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tgc_pkg.sv tb/tb_slave_board_full.sv --top-module tb_slave_board_full
./obj_dir/Vtb_slave_board_full
```

The designs contain SystemVerilog assertions, so keep `--assert`. They check:

- the FIFO never exceeds its depth;
- the pipeline holds exactly `LEN` words while streaming;
- the trigger and test write paths never collide;
- DTACK and BERR are never asserted together;
- only one VME handler is active at a time.
