# FPGA readout and test system for a photon-counting pixel chip

This RTL is the FPGA half of a system that tests hybrid-pixel readout chips.
An x86 PC and an FPGA board are connected over PCIe. The chip under test has
192 × 64 pixels, and each pixel has three counters. It talks over three lines
only: a clock, a data input and a data output.

The FPGA's job splits into two paths:

- **Control.** It sends the chip commands, either one at a time from software
  or as a stored program. A program runs with single-cycle timing, for example
  "open the counting gate, wait exactly N cycles, close it".
- **Data.** It collects the bit stream the chip sends back and turns it into
  pixel values. It buffers those values in on-chip memory until the host pulls
  them out by DMA.

The design follows a published description of such a system: an Arria 10
board on PCIe x8 Gen3, testing a CdTe X-ray counting chip. That description
gives the blocks, how they connect and what each one does. It gives few widths,
encodings or timings. Where it is silent, this implementation makes its own
choices, and the section [What comes from the description and what does
not](#what-comes-from-the-description-and-what-does-not) lists them. A
synthesizable model of the chip is included, so the whole chain can be
simulated (and run on the FPGA) without silicon.

```
            Avalon-MM (from the PCIe hard IP: not included)
     ┌──────────────┬───────────────────┬─────────────────────────┐
     │              │                   │                         │
 csr_regs ──trigger── sequencer        │                      ocm_ram ◄── host / DMA
   │ │ │ │            │ commands        │                         ▲
   │ │ │ └──────► transceiver ◄─────────┘ (direct commands)       │ Avalon-MM writes
   │ │ │          clock gen │ transmitter │ receiver              │
   │ │ │               │ sclk, dout   ▲ din   │ 192-bit words     │
   │ │ │         tx_line_switch ──────┘       ▼                   │
   │ │ │          │            │             dpu ───────────────► dsc
   │ │ │       asic_*      chip_model     decoder → PE0 → PE1     (write/read pointers,
   │ │ │       (ports)                    raw buffer path          overflow flag)
   └─┴─┴── line select, raw mode, PE bypass, clock divider, pointers, flags
```

Top module: `pixel_test_system`. The shared types and constants are in
`pts_pkg`.

## The chip link

The chip has no clock of its own. The FPGA clocks it only while there is
something to send, and it does so for three reasons:

- no stray edges can shift the chip's registers;
- the chip uses less power;
- digital noise stays low while the analog front-ends count photons.

This gating has a consequence: **reading data out of the chip also needs a
transmission.** While the chip answers, the FPGA must keep the clock running,
and the only thing that produces clock edges is a command being sent. A readout
is therefore a long command: the 16 command bits, followed by as many zero bits
as the answer needs. `pts_pkg::READ_LEN` is 16 + 16 × 193 = 3104.

**Clock generator** (`tx_clock_gen`). It toggles `sclk` every
`half_period + 1` system cycles, so the chip clock runs at
f_clk / (2·(half_period+1)). It runs only while the transmitter asks for it,
and it always stops low. It also produces two strobes, `rise` and `fall`. Each
is high in the system cycle at the end of which `sclk` changes. The other
blocks act on these strobes, so the whole FPGA side stays in one clock domain.

**Transmitter** (`tx_transmitter`). It accepts a command `{len[15:0], data[31:0]}`
with a valid/ready handshake, and only when it is idle. It then sends `len`
bits, most significant bit first:

- If `len` ≤ 32, it sends bits `data[len-1:0]`. A 16-bit chip command can
  therefore sit right-aligned in `data`.
- If `len` > 32, it sends `data[31:0]` followed by zeros. Put the command in
  the top bits in this case, as in `chip_cmd(...) << 16`.

`dout` changes on falling edges, so it is stable on every rising edge.
Exactly `len` rising edges occur per command, and none occur between commands.

**Receiver** (`tx_receiver`). It is a 192-bit shift register that samples `din`
on each rising edge. While idle, it waits for a start bit (`1`). It then counts
192 bits and presents the word on an Avalon-ST output. The first bit received
lands in bit 191. The chip cannot be paused, so a word that completes while the
previous one is still waiting is dropped, and a sticky `overrun` flag is set.
`word_count` counts the words delivered.

**Timing of one chip bit** (half_period = 1, so one chip clock = 4 system cycles):

| system cycle | t (fall strobe) | t+1 | t+2 (rise strobe) | t+3 |
|---|---|---|---|---|
| sclk | 1 | 0 | 0 | 1 |
| FPGA dout | old bit | new bit | new bit | new bit |
| receiver | | | samples din at end of cycle | |

**Line switch** (`tx_line_switch`). It routes the three lines to the `asic_*`
ports or to the built-in `chip_model`. The choice is set by CSR `CTRL[0]`. The
port that is not selected gets no clock edges.

## Sequencer programs

Software cannot place two commands a precise number of clock cycles apart. The
sequencer can. The host writes a program into the sequencer RAM (1024 × 64 bit)
and then triggers it from a CSR. Each entry is a `pts_pkg::seq_entry_t`:

| bits | field | meaning |
|---|---|---|
| 63 | `last` | this is the final entry |
| 62 | `kind` | 0 = `SEQ_CMD`, 1 = `SEQ_DELAY` |
| 61:48 | — | reserved |
| 47:32 | `len` | command length in bits (SEQ_CMD) |
| 31:0 | `data` | command payload (SEQ_CMD) or delay in system cycles (SEQ_DELAY) |

The fetcher (`seq_fetcher`) reads one entry at a time and acts on it:

- A command entry is handed to the transmitter as soon as the transmitter is
  free.
- A delay entry first waits for the current transmission to end. It then idles
  for exactly `data` cycles.

**Timing.** After a delay of N cycles, the next command starts transmitting
exactly N + 3 system cycles after the previous transmission ended. The 3
cycles are the RAM fetch and decode, and they are the same every time.

Two gate programs whose delays differ by 300 cycles therefore give counts that
differ by exactly 300. The end-to-end testbench checks this. While a program
runs, it owns the transmitter, and direct commands from the CSR wait.

## From bit planes to pixels: the DPU

The chip returns a row of counters as bit planes. Each 192-bit word carries one
bit of every pixel in the row, the most significant plane first, with bit c
belonging to column c. The **decoder** (`dpu_decoder`) collects 16 such words
and emits one 3072-bit word in which pixel c sits in bits `[16c+15:16c]`. It
does this by shifting each plane into the 192 pixel registers.

After the decoder come `NUM_PE` (default 2) **processing-engine slots**
(`dpu_pe_slot`). Each slot holds a buffering PE, which is a 4-word Avalon-ST
FIFO (`stream_fifo`). Software can detach any slot. A detached slot becomes a
plain wire, with no added latency. A request to detach takes effect only once
the PE has drained; until then the slot accepts no new input. So switching
never drops or reorders a word.

In **raw mode** (`CTRL[1]`), the decoder is skipped. Raw 192-bit words go
through a separate raw buffer and leave the DPU in bits [191:0], flagged
`out_raw`. This is useful for looking at the bit stream itself. The decoder's
plane counter is held at zero in raw mode, so decoding restarts aligned. Change
modes between acquisitions: if both paths hold data at once, raw words go first.

## The OCM as a FIFO: the data storage controller

The on-chip memory (`ocm_ram`) has 4096 words of 256 bits. The storage
controller (`dsc`) writes data into it, and the host reads them out through a
second port.

**Writing.** The controller cuts each DPU word into OCM words and writes them
at consecutive addresses, wrapping at the end of the memory. A pixel word takes
12 OCM words and a raw word takes 1. After each completed write transaction
it advances the **write pointer**.

**Reading.** The host reads up to the write pointer and then writes the new
**read pointer** into a CSR.

**Overflow.** Before the controller stores a word, it compares the two
pointers. If the free space is smaller than the word needs, the whole word is
discarded and the sticky **overflow flag** is set, so data the host has not
read are never overwritten. One OCM word always stays empty, so full and empty
can be told apart; at most 4095 words can be waiting.

A full acquisition fits in one pass: 3 counters × 64 rows × 12 = 2304 words.

## Register map (`csr_regs`, 32-bit registers, word addresses)

| addr | name | access | contents |
|---|---|---|---|
| 0 | CTRL | RW | [0] line select (0 ASIC, 1 model); [1] raw mode; [15:8] PE bypass, PE i in bit 8+i |
| 1 | CLKDIV | RW | [15:0] half_period; reset value 4 |
| 2 | TX_DATA | RW | payload of the next direct command |
| 3 | TX_LEN | RW | [15:0] length; writing sends {TX_LEN, TX_DATA} |
| 4 | STATUS | R / W1C | [0] TX busy, [1] direct command pending, [2] sequencer running, [3] receiver overrun (W1C), [4] OCM overflow (W1C), [15:8] PE bypass in force |
| 5 | SEQ_CTRL | W | [0] = 1: start the sequencer |
| 6 | SEQ_START | RW | first entry of the program |
| 7 | RX_COUNT | R | words received from the chip |
| 8 | DSC_WPTR | R | OCM write pointer (OCM words) |
| 9 | DSC_RPTR | RW | OCM read pointer, written by the host |
| 10 | SEQ_DONE | R | programs completed |

Reads return data one cycle later, with `readdatavalid`. All three host ports
are Avalon-MM slaves: the CSRs, the sequencer RAM and the OCM. They are the
ports where the PCIe hard IP and its DMA engine attach.

## The chip model

The real chip's command protocol is not given in the description this design
follows, so `chip_model` defines a small protocol of its own:

- **Framing.** A command is 16 bits, most significant first: a start bit `1`,
  a 7-bit opcode and an 8-bit argument.
- **Opcodes.** `OPEN_GATE`, `CLOSE_GATE`, `CLEAR`, `WRITE_GREG` (load the global
  register) and `READ`, whose argument is `{counter[1:0], row[5:0]}`.
- **Answer.** The model answers a `READ` with 16 frames, the most significant
  plane first. Each frame is a start bit followed by the bits of columns 191
  down to 0.
- **Counts.** There are no photons. While the gate is open, the model counts
  system cycles (E), and counter k of pixel (row, col) reads
  `E·(k+1) + row·192 + col + greg` (mod 2^16). Every pixel holds a different
  value, so a mistake in routing any bit anywhere in the chain shows up.

The model runs on the system clock and detects the edges of the chip-clock line.
Because of that, `CLKDIV` must be at least 1 when the model is selected. When the
real ASIC is used, the host must follow the ASIC's own protocol. The transmitter
and receiver do not depend on the command set, but they do expect a `1` start
bit ahead of each 192-bit answer word.

## What comes from the description and what does not

Taken from the description:

- the blocks and their connections (CSR, transceiver, sequencer, DPU, DSC, OCM,
  model, line switch);
- the transceiver's three parts, with the clock running only during
  transmission;
- the 192-bit receive shift register clocked on the rising edge, which counts
  bits and signals a valid word;
- variable-length commands;
- the sequencer reading a RAM on a trigger, with a delay ("idle") symbol and a
  last-entry marker;
- the 192-bit raw to 192 × 16-bit conversion;
- bypassable PEs joined by Avalon-ST, and a buffer path around the decoder;
- write and read pointers, an overflow flag, and no overwriting of unread data;
- the chip geometry: 192 × 64 pixels, three counters.

This design's own choices:

- all widths and depths: OCM 4096 × 256, sequencer RAM 1024 × 64, PE and buffer
  depth 4, two PEs;
- the command format `{len, data}`, the zero padding and the bit order;
- the start bit that frames each received word;
- the bit-plane reading of the raw stream;
- the sequencer entry encoding and its N + 3 cycle timing;
- discarding a word on overflow (the description only says the flag is set);
- the receiver overrun flag, the register map, and the whole chip-model
  protocol.

Not included, because they are vendor parts, external silicon or analog:

- the PCIe hard IP and DMA engine, brought out as Avalon-MM ports;
- the tested chip's pixel matrix, front-ends, DACs and bandgap;
- the LVDS buffers; the three lines are plain single-ended ports.

Nothing is scaled down: every default is the size stated above.

## Simulating

Each block has a self-checking testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. Three of them exercise the whole design:

- `pixel_test_system_tb` runs it end to end with a 64-word OCM. It covers
  sequencer gate timing, direct reads under every bypass setting, raw mode,
  overflow, wrap-around and the ASIC port, counts how often each happens, and
  fails if any of them never happened.
- `pixel_test_system_full_tb` runs one complete acquisition at default sizes:
  all 64 rows of all three counters, 36,864 pixels checked. It takes a few
  seconds.
- `pixel_test_system_scan_tb` runs four complete acquisitions back to back, as
  a threshold scan would, with the host emptying the OCM between them. The OCM
  wraps around, and every pixel of every step is checked. The model has no
  threshold; each step uses a different global-register value and gate time
  instead.
- The block testbenches cover each module on its own.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/pts_pkg.sv tb/pixel_test_system_full_tb.sv \
    --top-module pixel_test_system_full_tb -o sim -Mdir obj
obj/sim
```

Replace the testbench name to run any other one. The testbenches reset every
register they read, so they also run with `+verilator+rand+reset+2`.
