# COSY channel interface for hardware coprocessors

In the COSY system-design method an application is a network of processes
that talk only through point-to-point, loss-less FIFO channels. A process
writes or reads a whole *vector* of items at a time, and the call blocks
until the last item has gone into, or come out of, the channel. The same
process may later be mapped to a software task or to a hardware
coprocessor. The channel is then implemented in whichever way fits that
mapping: in shared memory between two tasks, or in an interface block
between a task and a coprocessor, or between two coprocessors.

This repository holds the hardware side of those channels. The interface
sits between a coprocessor and the system bus. It gives the coprocessor
the blocking vector read/write calls, keeps the channel FIFOs and their
status where software can see them, and raises interrupts when software
has to act. It reaches the bus only through VCI, a bus-independent
request/response protocol. A small wrapper then adapts VCI to the physical
bus, and that wrapper is not included here.

The default build is the reference configuration of the interface: one
slave input FIFO and one slave output FIFO, each 32 bits wide and 8 slots
deep. The published figures for that configuration are about 5900 gates
at a 100 MHz clock. This RTL has not been checked against either number.

## Structure

```
            coprocessor (SYS vector read / write per channel)
                 |  req / len / done, item streams
   +-------------v--------------+
   |  vector unit (one per FIFO)|   upmc_vector_unit
   +-------------+--------------+
                 |  push / pop, count / free
   +-------------v---------------------------------------------+
   |  service unit                                             |  upmc_service_unit
   |   FIFO unit x N: FIFO, STATE, THRESH, CTRL, IRQ, REQLEN   |  upmc_fifo_unit, upmc_fifo
   |     master FIFOs add: address generator + DMA engine      |  upmc_addr_gen, upmc_dma
   |   configuration registers (to coprocessor)                |
   |   status registers (from coprocessor)                     |
   +------+----------------------------------+-----------------+
          | VCI target                       | VCI initiator per master FIFO
     (bus wrapper, not included)       (bus wrapper, not included)
```

`cosy_upmc_if` is the top. It builds one vector unit per FIFO and the
service unit, and brings out the coprocessor ports, one interrupt line per
FIFO, the configuration and status registers and the VCI ports.

FIFOs are numbered in a fixed order: slave inputs first, then slave
outputs, then master inputs, then master outputs (`N_SIN`, `N_SOUT`,
`N_MIN`, `N_MOUT` of each). "Input" and "output" are seen from the
coprocessor:

| kind          | who fills it                        | who empties it                      |
|---------------|-------------------------------------|-------------------------------------|
| slave input   | bus master writes the DATA register | coprocessor read vectors            |
| slave output  | coprocessor write vectors           | bus master reads the DATA register  |
| master input  | own DMA engine reads memory         | coprocessor read vectors            |
| master output | coprocessor write vectors           | own DMA engine writes memory        |

## Blocking and the threshold protocol

This is the part of the design that needs the most care.

A vector call may be longer than the FIFO, and the other end of the
channel may move items in any pattern. The vector unit moves one item per
cycle while the FIFO allows it. When the FIFO is full (on a write) or
empty (on a read) and items are still left, the unit does not simply retry
on every freed slot. It **stalls** and sets a threshold of
`min(items remaining, DEPTH)`. It wakes only when at least that many slots
are free (write) or that many items are present (read). `cop_stalled`
shows the wait.

The effect is that the unit moves items in chunks. Each wake-up is paid for
by a useful burst, and a wake-up never waits for more than the FIFO can
hold or more than the call still needs. So the channel cannot deadlock,
whatever the vector sizes and the FIFO depth. This mirrors the software
side of the channel. There, a blocked writer asks the reader for a
call-back once `wtr` places are free, and a blocked reader asks once `rtr`
items are present.

Timing of one call:

- `cop_req_valid`/`cop_req_len` are accepted in a cycle where
  `cop_req_ready` is high. The unit is then busy.
- Items move on `cop_wr_valid && cop_wr_ready` (write) or
  `cop_rd_valid && cop_rd_ready` (read). At most one item moves per cycle.
  `cop_rd_data` is the FIFO head, so the coprocessor sees it before taking
  it.
- `cop_done` pulses one cycle after the last item has moved. An unblocked
  L-item vector therefore returns L + 1 cycles after it is accepted. A
  zero-length call returns the cycle after it is accepted.
- A stalled unit leaves the stall at the clock edge after the threshold
  is met. Items move again from the next cycle.

Each accepted request also pulses `req_pulse` into the FIFO unit. This sets
the sticky *request* flag and, if enabled, the FIFO's interrupt. Software
uses this when it is the other end of the channel: the interrupt tells it
that the coprocessor wants data, and `REQLEN` tells it how much.

## Software's view: registers and interrupts

The service unit decodes address bits [11:0] of a VCI access. Decoding
the interface's base address is left to the bus wrapper.

| address             | register                                                       |
|---------------------|----------------------------------------------------------------|
| `0x000 + 0x40*f`    | FIFO f window (below)                                          |
| `0x800 + 4*i`       | configuration register i, read/write, output on `cfg[i]`       |
| `0xC00 + 4*i`       | status register i, read only, input from `stat[i]`             |
| `0x400-0x7FF`, past the last FIFO or register | error response              |

The FIFO window, as word offsets:

| off | name   | access | meaning |
|-----|--------|--------|---------|
| 0   | DATA   | W (slave in) / R (slave out) | push / pop one item. A write to a full or a read from an empty FIFO answers with `rerror` and changes nothing |
| 1   | STATE  | R  | number of free slots (items waiting = DEPTH - STATE) |
| 2   | THRESH | RW | threshold on STATE. Values above DEPTH are clipped |
| 3   | CTRL   | RW | bit0 threshold-interrupt enable, bit1 request-interrupt enable, bit2 DMA enable, bit3 counted DMA, bit4 DMA-done interrupt enable (bits 2-4: master FIFOs) |
| 4   | IRQ    | R, W1C | bit0 threshold condition, bit1 request flag, bit2 DMA retry flag, bit3 DMA done flag (bits 1-3 are cleared by writing 1) |
| 5   | REQLEN | R  | [15:0] length of the coprocessor's last vector call, [31:16] items it still has to move |
| 6   | BASE   | RW | master FIFOs: first DMA address |
| 7   | STRIDE | RW | master FIFOs: address step in bytes (0 keeps the address fixed) |
| 8   | WRAP   | RW | master FIFOs: transfers before the address returns to BASE (0 means never) |
| 9   | ADDR   | R  | master FIFOs: next DMA address |
| 10  | COUNT  | RW | master FIFOs: transfers left in counted mode |

On a slave FIFO, offsets 6–10 answer with an error. On a master FIFO, DATA
does too.

The **threshold condition** points in the direction software cares about:

- input FIFO: `STATE >= THRESH`, meaning there is room for software to write;
- output FIFO: `STATE <= THRESH`, meaning at least `DEPTH - THRESH` items
  are ready to read.

A software reader that wants `rtr` items therefore programs
`THRESH = DEPTH - rtr`. A software writer that wants `wtr` free places
programs `THRESH = wtr`.

Each FIFO has its own `irq` line, a level:
`(THR_IE & threshold condition) | (REQ_IE & request flag) | (DONE_IE & done flag)`. Software clears
it by moving data, clearing the flag, or disabling the source.

## Channel schemes

How the interface serves the four ways of mapping a channel:

- **Hardware producer, software consumer.** The coprocessor writes vectors
  into a slave output FIFO and stalls when the FIFO is full. Software gets
  the threshold interrupt, reads STATE and then pops items from DATA. The
  producer needs no call-back, because it simply stalls.
- **Software producer, hardware consumer.** The coprocessor's read call
  raises the request interrupt. Software reads REQLEN and writes as many
  items as STATE allows. If more items remain, it sets THRESH to
  `min(left, DEPTH)` and waits for the threshold interrupt. If the channel
  FIFO instead lives in shared memory, a master input FIFO reads it by
  DMA. Its address generator walks the memory ring (BASE, STRIDE = 4,
  WRAP = ring size). In counted mode, software hands the engine one chunk
  at a time by writing COUNT, and learns from the DONE interrupt that the
  chunk has gone. The channel's fill level (`n`, `rtr`, `wtr`) stays with
  software.
- **Hardware to hardware.** The producer's master output FIFO writes, with
  STRIDE = 0, to the DATA register of the consumer interface's slave input
  FIFO. No software is involved once the addresses are set.
- **Software to software** does not involve this hardware.

### DMA engine and flow control

A master FIFO's engine issues single-word VCI transfers with one
outstanding at a time. That costs three cycles per word against a
zero-wait target. The item is popped (write) or pushed (read), and the
address advanced, only when the response comes back without error. A
response with `rerror` causes the same transfer to be tried again, and the
IRQ bit2 flag records that a retry happened. This is what keeps a
hardware-to-hardware channel loss-less: the consumer's slave FIFO answers
with an error when it is full, and the producer's DMA tries again until
the consumer has made room. The flag raises no interrupt, because retries
are normal traffic in that scheme.

With CTRL bit3 clear, the engine runs for as long as DMA_EN is set. With
bit3 set, it runs only while COUNT is not zero. Each completed transfer
decrements COUNT, and the transfer that brings it to zero sets the DONE
flag. Writing COUNT again starts the next chunk at the address where the
last one stopped. The address generator restarts at BASE only when DMA_EN
goes from 0 to 1.

## VCI ports

The VCI ports use the records in `cosy_pkg`:

- `vci_req_t`: `cmdval`, `address`, `cmd` (01 read, 10 write), `be`,
  `wdata`, `eop`
- `vci_rsp_t`: `rspval`, `rdata`, `rerror`, `reop`

The handshakes are `cmdack` and `rspack`. Every packet is one word (`eop`
is always 1), and a command stays unchanged until it is acknowledged. The
DMA engine checks that rule with an assertion.

The target port:

- accepts a command whenever no response is waiting, or the waiting one is
  taken in the same cycle (`cmdack = !rspval || rspack`);
- performs the access in the accepting cycle;
- presents the response the next cycle.

With `rspack` held high, it serves one access per cycle. When no master
FIFOs are configured, initiator port 0 exists and is held idle.

## Parameters (`cosy_upmc_if`)

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 32 | item width (at most 32 on this VCI) |
| `DEPTH`   | 8  | slots per FIFO |
| `N_SIN`, `N_SOUT` | 1, 1 | slave input / output FIFOs |
| `N_MIN`, `N_MOUT` | 0, 0 | master input / output FIFOs |
| `N_CFG`, `N_STAT` | 2, 2 | configuration / status registers |

The address map limits the build to 16 FIFOs and 256 registers of each
kind. Vector lengths are 16 bits.

## What follows the published design, and what does not

These follow the published design:

- the three levels (vector unit, service unit, bus wrapper);
- vector calls turned into item-by-item FIFO transfers, with an optional
  interrupt per request;
- per-FIFO state (free slots) and threshold registers, with a threshold
  interrupt;
- configuration and status registers;
- master FIFOs with a run-time configurable address generator;
- the generic parameters and the reference sizes;
- the threshold protocol for blocking.

These are this design's own choices:

- every handshake, the register map and the error responses;
- the direction of the threshold comparison;
- the threshold value `min(remaining, DEPTH)`;
- BASE/STRIDE/WRAP as the address generator's configuration;
- single-outstanding DMA with retry on error;
- the counted DMA mode with its completion interrupt;
- the VCI field subset;
- the default of two configuration and two status registers;
- the asynchronous active-low reset, which clears everything.

Not included:

- the VCI-to-PI-bus wrapper. Its bus protocol is an external standard, so
  the VCI ports are the top-level ports instead.
- the software half of the channels (RTOS tasks, call-back queues, boot
  code);
- the processor and shared memory;
- the calibrated latency models used for performance estimation.

Interrupt priorities belong to the system's interrupt controller.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_cosy_upmc_if \
    -y rtl -y tb +libext+.sv -Irtl rtl/cosy_pkg.sv tb/tb_cosy_upmc_if.sv
./obj_dir/Vtb_cosy_upmc_if
```

The testbenches:

- `tb_upmc_fifo`, `tb_upmc_addr_gen`, `tb_upmc_vector_unit`,
  `tb_upmc_dma`, `tb_upmc_fifo_unit` and `tb_upmc_service_unit` test one
  module each. The vector-unit bench checks the stall/wake rule cycle by
  cycle and the L + 1 return time. The DMA bench checks the three-cycle
  transfer rate.
- `tb_cosy_upmc_if` runs all four channel schemes end to end between two
  interfaces: one with a FIFO of every kind, and one in the reference
  configuration. It counts each mechanism (producer and consumer stalls,
  threshold and request interrupts, the ring wrap, counted-DMA
  completion, DMA retries, error responses, register use) and fails if
  one never happens.
- `tb_cosy_upmc_if_full` runs the reference configuration with every
  parameter at its default, in both directions.

`tb/vci_mem_model.sv` is a behavioural VCI memory with random wait states,
used by the benches.

All testbenches finish in well under a second. Timing closure at 100 MHz
and the gate count have not been checked.
