# PLIU: a programmable line interface unit for a multi-access communications processor

A communications processing system (CPS) sits between a host computer and
hundreds of terminal lines. It buffers data, runs line disciplines and
translates codes. Most of this work is byte-by-byte editing of data
streams. One central processor doing all of it runs out of cycles. A CPS
with a 1.2 µs cycle would need about 156 % of its cycles for the target
load of 114 slow terminals, 25 fast terminals and 10 synchronous devices.
With the byte-level work moved out to line processors, the same load needs
about 36 %.

This design spreads the work over a hierarchy. Up to eighteen
**programmable line interface units (PLIUs)** hang off the CPS. Each PLIU
has its own 8-bit microprocessor, local memory and eight serial line
controllers (URTs). A PLIU does the per-byte work: assembling and editing
bytes, chaining blocks, stripping idles and handling transparent text. It
reaches the CPS memory only over a shared, slotted multiplexer bus. The CPS
then sees only whole blocks and interrupts. Two CPS sets can watch each
other through a timing-window monitor ("fail soft"), so that one set can
take over the lines of the other.

The RTL describes one PLIU in full, together with the shared parts it talks
to. It also holds the line-discipline engines a PLIU applies to its
streams. All of it is synthesizable SystemVerilog-2017 in `rtl/`, with one
self-checking testbench per module in `tb/`.

## The pieces and how they connect

```
                 CPS (PDP-8 class, 12-bit words, 256k)      other 17 PLIUs
                 |  IOT pulses          |  bus slots          |  bus slots
                 v                      v                     v
  pdp8_pio_decode   +------------ multiplexer bus (12 bit, slotted) ------------+
        |           |      mux_bus_arbiter (fixed priority, 3-clock slots)      |
  status_bits       |      interlock_memory      common-memory slave (cm_*)    |
        |           +---------------------------------------------------------+
        |                 ^ bus_buffer / dma_addr_ctrl_mux / dma_data_buffer
        |                 |           dma_request_ctrl        dma_decode
  microop_decode <- addr_decode <- PLIU microprocessor bus (p_*: 16-bit addr, 8-bit data)
        |                 |-> local_memory (16k x 8)      |-> ROM (rom_*)
        |-> URT registers (urt_*), urt_clock, 8 x eia_line, interrupt_logic
  linked_queue x2 (CPS->PLIU, PLIU->CPS)
  failsoft_monitor
  ioc_chain, tdm_input_editor, tdm_output_mux, tt_encoder, tt_decoder,
  sync_msg_tx, sync_msg_rx
```

The top is `cps_pliu_system`. Everything it does not build becomes ports:

- the microprocessor bus `p_*`;
- the ROM `rom_*`;
- the eight URT chips `urt_*`;
- the modem lines `m_*`;
- the CPS I/O instruction pulses `cps_*`;
- the other PLIUs' requests and bus words `oth_*`;
- the CPS memory array `cm_*`;
- the byte streams of the line-discipline engines.

`pliu_pkg` holds the shared types: address map, bus operations and phases,
clock modes, character codes and the IOC record.

## The microprocessor's address space

The microprocessor sees a 64k byte space in six regions:

| Region | Size | Base | Reached through |
|---|---|---|---|
| ROM (restart, vectors, debug) | 4k | `0000` | `rom_*` ports |
| local RAM | 16k | `1000` | `local_memory`: four banks of 4k x 8 |
| micro-operations | 4k | `5000` | `microop_decode`: no memory, the address is the operation |
| relocatable common memory | 4k | `6000` | bus; CPS word = {6-bit page register, offset} |
| interlock memory | 4k | `7000` | bus; `interlock_memory` |
| absolute common memory | 32k | `8000` | bus; CPS words 0..32k-1 |

The region sizes are part of the design. Their order is this design's own
choice, with the ROM at 0 so that the restart vectors are there.

### Micro-operations

An access to the micro-operation region starts operations named by its
address bits, in three independent fields that act at the same time:

- bits 3:0 set (write) or reset (read) flag *n*;
- bits 7:4 test flag *n*, with the result on data bit 0;
- bits 11:8 load (write) or read (read) register *n*.

Each operation fires once, on the first clock of the processor cycle.

Flags: 1 = PLIU-to-CPS interrupt, 2 = CPS-to-PLIU interrupt, 3.. = general.
Tests: 1 = PLIU-to-CPS flag, 2 = CPS-to-PLIU flag, 3 = DMA enable, 4.. = general.

| Register | Write | Read |
|---|---|---|
| 1 | push byte to PLIU→CPS queue | pop byte from CPS→PLIU queue |
| 2 | relocation page | interrupt vector |
| 3 | high 4 bits for the next common write | high 4 bits of the last common read |
| 4 | baud divisor low byte | CPS mailbox (low byte) |
| 5 | baud divisor high nibble, and load | queue flags |
| 6 | line clock mode: data bits 4:2 = line, bits 1:0 = mode | pending interrupts 7:0 |
| 7-10 | interrupt mask bytes 0-3 | – |
| 11 | end of interrupt | – |
| 12 | line select | line select |
| 13 | URT data, selected line | URT data |
| 14 | URT command, selected line | URT status |
| 15 | clear the modem-change flag of the selected line | modem status of the selected line |

## The multiplexer bus: slots, phases and the 8/12-bit join

This is the part that needs the most care. The bus is 12 bits wide and
time-shared.

**Arbitration.** `mux_bus_arbiter` waits until the bus is idle. It then
grants the lowest-numbered active request: 0 = CPS, 1 = this PLIU, 2..18 =
the other PLIUs. The grant holds for one **slot** of three clocks:

| Phase | Word on the bus |
|---|---|
| control | `{op[1:0], 0000, addr[17:12]}` |
| address | `addr[11:0]` |
| data | write data, or the reply of memory or the interlock |

A requester drops its request once granted. A new slot can begin on the
clock after the previous one ends.

**PLIU side.** A processor access to the absolute, relocatable or
interlock region goes to `dma_request_ctrl`. If the CPS has set the DMA
enable, it requests a slot and holds the processor (`p_wait`). It then
drives the control and address words from `dma_addr_ctrl_mux`. On a write
it also drives the data word from `bus_buffer`. Finally it releases the
processor. Uncontended, a reference holds the processor for 6 clocks:

- 1 clock to set the request;
- 1 clock to win the slot;
- 3 clocks of slot;
- 1 clock to release.

If DMA is disabled, the access is not made. `access_error` pulses and the
processor is not held.

Common-memory words are 12 bits but the processor moves 8. The low 8 bits
of a write come from the data bus; the high 4 bits come from register 3,
loaded beforehand (`dma_data_buffer`). A read returns the low 8 bits and
keeps the high 4 for register 3. `bus_buffer` holds the outbound data word
and the inbound reply, so the internal bus and the multiplexer bus run
independently.

**CPS side.** The CPS talks to the PLIU in two ways.

- PDP-8 IOT instructions on device codes 40 and 41 (octal), decoded by
  `pdp8_pio_decode`:
  - 40: IOP1 = skip if the PLIU flag is set; IOP2 = clear the flag;
    IOP4 = AC → mailbox.
  - 41: IOP1 = set DMA enable; IOP2 = clear DMA enable; IOP4 = interrupt
    the PLIU.
- Bus slots whose control word is `{PLIU id, command, line, 0}`, decoded by
  `dma_decode`:

  | Command | Meaning |
  |---|---|
  | 1 | push the data word into the CPS→PLIU queue |
  | 2 | return and pop the PLIU→CPS queue head |
  | 3 | load the mailbox |
  | 4 | read status |
  | 5 | interrupt the PLIU |

  The PLIU answers in the data phase. Status is
  `{p2c_empty, c2p_full, c2p_empty, p2c_full, 0, access_error, illegal_cmd,
  0, 0, dma_enable, cps_flag, pliu_flag}`.

**Interlocks.** `interlock_memory` holds one bit and one 5-bit owner id per
cell. A *test* (processor read of the interlock region) sets the bit and
records the caller if the bit was clear. Either way it returns the bit and
the current owner, so the caller owns the interlock if the returned id is
its own. A *reset* (processor write) clears the bit and records the caller.
In the PLIU the reply arrives as a read: bits 4:0 hold the owner id, and
the bit is the top bit, readable in register 3.

**Queues without locks.** `linked_queue` is a ring in which only the
producer moves the tail and only the consumer moves the head. Neither side
ever waits for the other. Two of them carry all CPS↔PLIU messages, one in
each direction.

## Lines: clocks, EIA signals and interrupts

`urt_clock` gives each of the eight lines one of three clock sources:

- **async**: the shared programmable divider, running at 16 times the bit
  rate;
- **sync**: the modem's transmit and receive clocks, synchronised and
  edge-detected;
- **loopback**: the internal divider feeds both transmitter and receiver.

Clocks are one-clock enable pulses, not separate clock nets.

`eia_line` handles the modem signals of one line: DTR/DSR, RTS/CTS,
TxD/RxD, ring, carrier and a supervisory pair. It also drives eight LEDs.
In loopback it returns the URT's outputs to its own inputs and holds the
modem side idle (marking, controls off). Any change in modem status sets a
sticky flag, which is an interrupt source.

`interrupt_logic` takes 25 sources, lowest number first:

| Sources | Meaning |
|---|---|
| 0-7 | receiver ready |
| 8-15 | transmitter ready |
| 16-23 | modem change |
| 24 | CPS flag |

It masks them and requests an interrupt. On acknowledge it latches the
number of the source as the vector, and it stays in service until end of
interrupt.

## Line disciplines

- **Block chaining (`ioc_chain`).** The CPS queues I/O commands (an address
  and a length) ahead of the current one. Each byte uses the next address.
  When a command runs out, `expended` interrupts the CPS and the next queued
  command takes over in the same clock, so no byte is lost. A byte with no
  command left is an `overrun`. The CPS controls how often it is
  interrupted by choosing the block length.
- **Time-multiplexed input (`tdm_input_editor`).** The stream comes in
  periods of 13 bytes: a sync idle (233 octal) and one byte for each of 12
  channels. The editor drops idles. It sends data bytes to the host block
  and control bytes (break 037, and any other code with bit 7 set) to a
  separate control block, each with its channel number. Normal traffic is
  about 84 % idle, so the CPS then touches only the few control bytes. A bad
  sync byte is a framing error; the editor waits for the next idle to
  resynchronise.
- **Time-multiplexed output (`tdm_output_mux`).** The CPS puts only real
  data into per-channel byte queues. Each period the multiplexer sends the
  sync idle, then one byte per channel, with an idle wherever a queue is
  empty.
- **Transparent text (`tt_encoder`, `tt_decoder`).** The text body may hold
  any byte value. DLE STX enters transparent mode and DLE ETX leaves it.
  Inside, every DLE is sent twice, so a lone DLE always marks control. The
  decoder undoes the doubling. It reports the byte after a lone DLE as the
  control code that ended the mode.
- **Synchronous messages (`sync_msg_tx`, `sync_msg_rx`).** A message on a
  synchronous line is framed by a header and a trailer.
  - The transmitter sends two sync idles (233 octal) and STX, then the
    message, then ETX and a 16-bit checkword.
  - The receiver gains sync on two idles in a row. SOH or STX opens a
    message. It passes the text on, drops idles used as fill, and closes the
    message on ETX or ETB.
  - It then compares the two checkword bytes, low byte first, with its own
    CRC-16 and reports `msg_done` with `msg_ok`.
  - The CRC-16 uses polynomial x^16+x^15+x^2+1, reflected, starting from
    zero. It covers everything after the opening byte, up to and including
    the trailer code.
  - A message longer than `MAXLEN` bytes is dropped as bad.
  - The message itself must not contain these control codes. Transparent
    text is the way to carry arbitrary bytes.

## Fail soft

`failsoft_monitor` watches one CPS set. That set's low-priority software
must pulse `enable` inside a time window after the previous pulse. Time is
counted in ticks of `TICK_DIV` clocks, and the window is `WIN_MIN` to
`WIN_MAX` ticks. There are two kinds of fault:

- an early pulse (cause bit 0);
- no pulse by the end of the window (cause bit 1).

A fault raises `fault_int` if the interrupt is selected. `N_FAULT`
consecutive faults declare the set failed, and `takeover` asks the partner
set to take over the set's multiplexer. `M_GOOD` consecutive correct windows
declare it running again. The set starts out failed, so start-up uses the
same rule.

A set can be taken off line for two more reasons, and `takeover` is the OR of
all three:

- `manual`: an operator takes the set off line, for example for maintenance;
- `self_fail`: the set's own checks report a problem;
- the window monitor declares the set failed, which covers a set that
  malfunctions without noticing it.

## Where this RTL departs from, or goes beyond, the original design

The original defines the structure and the functions. Most encodings are
this design's own choices:

- the region order;
- the micro-operation fields and register map;
- the IOT operation assignment;
- the CPS command codes;
- the 3-phase slot format;
- fixed bus priority;
- the interrupt priority;
- the DLE/STX/ETX codes;
- the synchronous message codes and checkword;
- the rule that codes other than idle and break with bit 7 set count as
  control;
- the window and n/m values;
- all queue depths.

They are marked as choices in each file's header.

Other departures:

- Only one PLIU is built. The other 17 are represented by `oth_req` and
  `oth_bus`.
- The line-discipline functions are built as hardware engines next to the
  PLIU datapath, instead of as microprocessor programs. Their streams are
  ports, because the URTs that would feed them are not part of this RTL.
- Write protection of common memory is left to software. The PLIU offers
  no hardware fence; the CPS controls access through the DMA enable.
- Tri-state buses are modelled as data plus enable, and are ORed onto the
  12-bit bus.
- The framing of synchronous messages is this design's choice: the
  SOH/STX/ETX/ETB codes, the CRC-16 checkword and the two-idle sync rule.
  It follows common binary synchronous practice. The original only requires
  a header that gives byte sync, a trailer, and a checkword.
- Not built: the microprocessor, ROM contents, URT chips, CPS processor and
  memory, host, CPS/host controllers, and EIA level converters. They are
  represented by ports.

## Capacity

These numbers come from the defaults.

- **Bus.** The bus has 19 requesters: the CPS and 18 PLIUs. With 8 lines
  each, that gives 144 lines.
- **Addressing.** 18-bit CPS word addresses cover 256k words.
- **Load.** The bus carries one 12-bit word per slot, and a slot takes 3
  clocks. 144 lines at 9600 b/s in both directions move about 276k bytes
  per second. At one slot per byte, that fits on the bus with a clock above
  about 0.85 MHz.
- **Baud generator.** The 12-bit divisor covers 110 to 9600 b/s (×16) at
  clocks up to about 7 MHz.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -I. -y rtl -y tb +libext+.sv \
    rtl/pliu_pkg.sv tb/tb_cps_pliu_system.sv --top-module tb_cps_pliu_system -o sim
./obj_dir/sim
```

Replace the testbench name to run another block's test; each one is
`tb/tb_<module>.sv`. `tb/tb_check.svh` holds the check and watchdog macros.

`tb_cps_pliu_system` runs the top at its default parameters, end to end:

- ROM and RAM access;
- a refused access while DMA is disabled;
- the CPS enabling DMA;
- absolute, relocatable and high-bit reads and writes, with the 6-clock
  wait checked;
- a three-way bus contention, with the slot order checked;
- interlock acquire, busy and release between two processors;
- queue traffic in both directions;
- interrupts both ways and a skip;
- URT interrupts and their vectors;
- async, sync and loopback line clocks;
- modem-change flags;
- fail-soft takeover and recovery;
- time-multiplexed input into chained IOC blocks, with a framing error;
- time-multiplexed output with idle fill;
- transparent text passed through encoder and decoder;
- a framed synchronous message accepted, and a copy with one corrupted byte
  rejected.

It counts each of these mechanisms and fails if one never happens. Each
block testbench compares its module with an independent model over random
or exhaustive stimulus.
