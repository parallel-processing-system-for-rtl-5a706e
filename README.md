# A parallel event processor for gamma-ray spin spectrometer data

A 4π gamma-ray spin spectrometer with up to 72 NaI detectors delivers about
5000 events per second (up to 1.3 Mbyte/s, typically 250 bytes or more per
event). First-pass analysis needs at least about 3000 simple integer
operations per event. That is 15 million operations per second: one every
~66 ns, which no affordable single processor of its time could reach.

The data helps, though. Events are independent of one another, so the stream
can be cut at event boundaries and each whole event handed to its own
processor. This design therefore uses **four identical, horizontally
microprogrammed 16-bit processors**. Each runs at a cycle of about 200 ns
(bipolar bit-slice class: sequencer, ALU processor and 16x16 multiplier, all
driven in parallel by a 96-bit microword). Together they give an effective
cycle near 50 ns. Around the processors sit:

* an **INPUT module**, which loads microcode into the processors and hands
  out whole events from a 4k-word FIFO;
* an **OUTPUT module**, which gathers whole processed events into a 4k-word
  FIFO;
* a shared **MEMORY module** of 64k x 16 that the processors reach by
  request/grant;
* a **histogram output** port, which passes 32-bit histogram words to a
  satellite histogramming computer.

The host computer only moves blocks of data. It does no per-event
arithmetic.

```
  host (CAMAC) ---+                                   +--> host (CAMAC read)
  data acq. ------+-> input_module --+   +--> output_module --> front panel
                     (4k FIFO,       |   |     (4k FIFO, whole events,
                      download)      v   |      FCFS + round-robin)
                               +-------------+
                               | pp_processor| x4 ---> hist_out --> satellite
                               |  (Fig. "PU")|           (32-bit words)
                               +-------------+
                                     ^ v request/grant
                                 mem_module (64k x 16, + host port)
```

All of it is synthesizable SystemVerilog in `rtl/`. It runs on one clock with
a synchronous, active-high reset.

---

## 1. The processing unit (`pp_processor`)

This is the hard part of the design, and it is what a user programs.

### 1.1 Structure

```
          seq2910 (next-address)  <-- condition, D field, seq controls
              | 12-bit address
          ustore 4k x 96   <-- camac_if (download, 16 bits at a time)
              | 96
          pipeline_reg  ----------------------------------------------+
    8 |        25 |          16 |            26 |              3 |      | 12+6
  mul29517   alu29116     literal       special_regs       clock_gen  |
      \           \           |         /     |      \                 |
       +-----------+---- 16-bit bus ---+    addr_adder -> data_mem 12k x 16
```

The sequencer picks the next microinstruction address. Meanwhile the
pipeline register holds the instruction now executing, so the fetch of one
instruction overlaps the execution of the previous one. The fields of the
pipeline register drive every unit at once.

All data moves over one 16-bit bus. A 3-bit field of the microword picks
its single driver, one of:

* the ALU result;
* the multiplier output;
* the 16-bit literal;
* a work-memory read;
* a special register;
* the address adder.

The multiplier and the ALU share this bus. So at most one of them produces a
result per cycle. But one cycle can, for example, load a bus word into the
multiplier and add the same word in the ALU. The sequencer and the special
registers work in parallel with either unit.

A data path quirk: the ALU reads the bus as the *other* units drive it. In a
cycle where the ALU drives the bus, the ALU's bus input reads zero. This
keeps the design free of a combinational loop whatever the microcode does.

### 1.2 Cycle timing, stretching and stalls

A processor cycle ends when `clock_gen` issues `adv`. Every register in the
processor loads on that edge: pipeline register, sequencer, ALU, multiplier,
special registers and work memory. Two things decide when `adv` comes:

* **Cycle length.** The 3-bit `cyc` field makes an instruction last `cyc+1`
  base clocks (1 to 8). Slow paths can get a longer cycle. The reference
  program gives its multiply-and-output instructions 3 clocks, for
  example. With a 5 MHz base clock and `cyc = 0` everywhere, this is the
  200 ns machine the proposal describes. With a faster base clock, each
  instruction gets the length it needs.
* **Interface stalls.** An instruction whose `io` operation cannot complete
  holds the cycle until it can. This covers:
  * `IN_POP` while the input register is empty;
  * `OUT` or `OUT_EOE` while the output register is still full;
  * `HIST` while the histogram register is full;
  * `MM_RD` or `MM_WR` until the memory module acknowledges.

  The program therefore needs no polling loop. The same readiness signals
  are also offered as branch conditions, for programs that want to do other
  work while they wait.

Branch conditions are evaluated in the clock that ends the cycle. After a
stall, the condition seen is the one at the moment the interface became
ready. For example, `CJP` on `CS_INEOE` in the same instruction as `IN_POP`
tests the end-of-event flag of the word being popped.

### 1.3 Microword layout (96 bits, `pps_pkg::uword_t`)

| bits  | field      | unit            | meaning |
|-------|------------|-----------------|---------|
| 95:84 | `d`        | sequencer       | branch address / counter value |
| 83:80 | `seq.i`    | sequencer       | one of 16 instructions (`seq_op_e`) |
| 79    | `seq.ccen` | sequencer       | 1 = test the condition, 0 = always pass |
| 78    | `seq.rld`  | sequencer       | load counter R from `d` |
| 77:75 | `cyc`      | clock generator | cycle length − 1 |
| 74:67 | `mul`      | multiplier      | ldx, ldy, tcx, tcy, rnd, ft, ldp, msp |
| 66:42 | `alu`      | ALU             | op(5) asrc(2) bsrc(2) ra(5) dst(3) n(4) tsel(3) sload(1) |
| 41:26 | `imm`      | bus / adder     | 16-bit literal |
| 25:0  | `sr`       | special regs    | bus(3) rd(4) wr(4) ar(2) ar_inc ar_add dm_we cond(3) cpol io(3) sh(2) rng |

The seven field widths (12, 6, 3, 8, 25, 16, 26) are those of the original
block diagram, and they add up to exactly 96. The bit assignment inside each
field and all opcode values are this implementation's own. They are defined
once, in `rtl/pps_pkg.sv`. An all-zero word is the reset word: sequencer
`JZ` (jump to 0) with every other unit idle.

### 1.4 Sequencer (`seq2910`)

This is a functional equivalent of the Am2910:

* 12-bit addresses;
* four address sources: direct `d`, register/counter R, a 5-deep stack and
  uPC;
* the 16 standard instructions: `JZ CJS JMAP CJP PUSH JSRP CJV JRP RFCT
  RPCT CRTN CJPP LDCT LOOP CONT TWB`.

`PUSH` and `CJS` push uPC. At that moment uPC is the address after the
current instruction, so `PUSH` marks the start of a loop body and `CJS`
stores the return address. `RFCT` and `RPCT` count R down to 0, which makes
a loop run R+1 times. A push onto a full stack overwrites the top entry, and
`full_n` warns of it. A pop of an empty stack does nothing.

### 1.5 ALU processor (`alu29116`)

The ALU processor has 32 registers, an accumulator, an input latch and Z/N/C/V
status.

* **A operand:** a register, the accumulator, the latch or the bus.
* **B operand:** a register, the accumulator, the bus or the 4-bit constant
  `n`.
* **Operations:**
  * pass;
  * add and add with carry;
  * subtract, in both directions (carry = no borrow);
  * increment, decrement and negate;
  * AND, OR, XOR and NOT;
  * mask (A & ~B);
  * rotate left, shift left, shift right and arithmetic shift right, by
    0..15 bits;
  * set, clear and test bit `n`;
  * priority encode: 1 + index of the highest set bit, or 0;
  * read status.
* **Destination:** a register, the accumulator, the latch or register plus
  accumulator. The result is always available to the bus.
* **`tsel`:** picks the test output `ct` from the flags of *this* operation:
  Z, !Z, N, C, V, N^V (less than), Z|(N^V) (less or equal) or !C. `ct` can
  drive a branch in the same cycle.

### 1.6 Multiplier (`mul29517`)

This is a 16x16 multiplier. Each operand is loaded from the bus with its own
format: two's complement (`tcx`/`tcy`) or unsigned. So signed, unsigned and
mixed products are all available. `rnd` adds 2^15, which rounds the upper
half.

The product is captured by `ldp`, or seen directly in feed-through mode
(`ft`). `msp` selects which half goes on the 16-bit bus. The product fits in
one cycle. There is no divide. Divide by multiplying by a reciprocal kept in
work memory.

### 1.7 Special registers (`special_regs`) and the address adder

| code | name | function |
|------|------|----------|
| 1–4  | AR0–AR3 | address/index registers; `ar` selects one for the adder and the zero test; `ar_inc` increments it at cycle end |
| 5    | RNG  | 16-bit LFSR (x^16+x^14+x^13+x^11+1), steps on `rng`; for smoothing ADC values |
| 6    | SHPR | shift/priority register: shift left/right by one, or clear highest set bit (`sh`) |
| 7    | PRIO | read only: index of SHPR's highest set bit, 0xFFFF if none |
| 8/9  | IN / INHI | input register: bits 15:0 / {eoe, 0, bits 23:16} of the 24-bit event word |
| 10   | HIST | upper half of the 32-bit histogram word |
| 11/12| MAR / MDR | address and data register for the shared memory |

SHPR and PRIO together scan a hit pattern. Read PRIO and clear the top bit
in the same cycle, then loop until the `CS_SHPRZ` condition says SHPR is
empty.

`io` operations:

* `IN_POP`: free the input register.
* `OUT` and `OUT_EOE`: send the bus word, with or without the end-of-event
  mark.
* `HIST`: send `{HIST, bus}`.
* `MM_RD`: read memory[MAR] into MDR.
* `MM_WR`: write MDR to memory[MAR].
* `AVAIL`: raise the "available" flag, which the INPUT module clears when it
  assigns an event.

Branch conditions (`cond`, inverted by `cpol`):

* always;
* ALU test;
* selected AR is zero;
* input valid;
* input word is end-of-event;
* output register free;
* histogram register free;
* SHPR is zero.

The **address adder** (`addr_adder`) forms the work-memory address as
`AR[ar] + imm`, or `imm` alone, and can also drive the result onto the bus.
**Work memory** (`data_mem`, 12k x 16) reads combinationally and writes at
cycle end. Addresses from 12288 up read as 0. Work memory can only be
loaded by a program: the host reaches the processor through the input
register only.

### 1.8 A worked program

`tb/pps_asm.sv` builds the reference program that all the system tests run.
Per event it does the following:

1. Raise "available".
2. Pop the identifier into MAR and into the upper half of the histogram
   register, and send it as the first output word.
3. For each ADC value:
   * store it in work memory at `0x100+AR0++`;
   * multiply it by a gain of 0.75;
   * send the upper product half;
   * add that half to a running sum.
4. Send the last value with the end-of-event mark.
5. Push `{id, sum}` to the histogram output.
6. Call a subroutine that adds the sum to shared memory word `[id]`.

It is 15 microwords long, and each ADC value costs 3 instructions.

---

## 2. Moving events in and out

**INPUT module** (`input_module`). Event words (24 bits, plus an
end-of-event flag that marks the boundary) enter a FIFO, from one of two
sources:

* host writes over the CAMAC dataway;
* the data-acquisition front-panel port (valid/ready).

`src_das` chooses the source. When the FIFO has data and a running processor
raises "available", the module assigns the next event to that processor. It
picks round-robin among the available ones, starting after the last
processor served, and pulses `p_assign`. It then moves words into that
processor's input register one at a time, as the register frees, until the
end-of-event word has gone. Only then does it assign the next event. Each
event therefore goes whole to one processor. The processors interpret only
the low 16 bits.

**OUTPUT module** (`output_module`). This module decides which processor it
serves. Once started, it takes that processor's whole event before it turns
to another. The next processor is chosen by a mix of first-come-first-served
and round-robin:

* each processor whose output register is full ages by one per clock;
* the oldest one is served first;
* equal ages (processors that began waiting in the same clock) go
  round-robin.

No processor can be starved. Events can leave in a different order from the
one they arrived in. The first output word of each event should identify it,
as in the reference program. The FIFO is read either through the front-panel
port (`fp_mode = 1`) or by host read strobes.

**Shared memory** (`mem_module`, 64k x 16). This memory holds:

* tables too big for the work memory, such as gates;
* values that change during a run, such as a software-stabilised gain;
* histograms.

A processor holds `req` until `ack`. The module grants one request per
access, round-robin, performs it at the grant edge and acknowledges one
clock later. So one access takes two clocks, and no grant is made in a clock
that carries an ack. The host port has priority over the processors.

There is no atomic read-modify-write. Processors that update the same word
must coordinate in software. The reference program avoids the problem
because each event's identifier is unique.

**Histogram output** (`hist_out`). This module collects `{HIST, bus}` words
from the processors, round-robin, into a 16-word FIFO. It tags each word with
its processor number and offers it on a valid/ready port. The satellite
computer that increments the histogram (an MC68000-class system with mass
memory) is outside this design.

## 3. Loading and controlling the processors

The host writes a select mask (`sel_we`, `sel_mask`), then sends commands
(`pc_valid`, `pc_cmd`, `pc_data`). Each command goes to every selected
processor at once, so processors that share one program are loaded in
parallel.

| command | effect |
|---------|--------|
| `CC_SETADDR` | set microword address (`data[11:0]`), slice 0 |
| `CC_WRITE`   | write the 16-bit slice (slice 0 = bits 15:0 … 5 = bits 95:80), then advance; after slice 5 the address increments. Ignored while the processor runs |
| `CC_READ`    | `pc_rdata` shows the slice (from the lowest selected processor), then advance |
| `CC_ENABLE`  | `data[0]`: 1 runs the processor from address 0, 0 stops it and holds it in reset |

The program memory cannot be written by the program itself.

## 4. Top level (`pps_top`)

Parameters, with the original sizes as defaults:

| parameter | default | |
|-----------|---------|--|
| `NPROC` | 4 | processors |
| `USTORE_WORDS` | 4096 | microwords per processor (96 bits) |
| `DMEM_WORDS` | 12288 | work memory words per processor |
| `IN_DEPTH`, `OUT_DEPTH` | 4096 | event FIFOs |
| `MM_WORDS` | 65536 | shared memory |
| `HIST_DEPTH` | 16 | histogram FIFO (own choice) |

Port groups:

* host download (`sel_*`, `pc_*`);
* event input (`src_das`, `host_*`, `das_*`);
* event output (`fp_*`, `host_rd*`);
* satellite histogram (`h_*`);
* host access to shared memory (`mh_*`);
* per-processor LAMs `lam_avail` ("available") and `lam_outrdy` ("output
  ready"), plus `running`, `stalled` and two event counters for
  observation.

The host computer, the CAMAC crate controllers, the data-acquisition system,
the satellite histogramming computer and its mass memory are outside the
design. They connect to these ports.

## 5. Throughput in the three operating configurations

The system is meant to be used in three ways. The event source is either
the data-acquisition front panel (at most 1.3 Mbyte/s) or tapes replayed by
the host over the dataway (at most 0.7 Mbyte/s). The results go to tape
(the host reads the OUTPUT FIFO), to the satellite histogrammer, or to both:

| configuration | source | destinations |
|---------------|--------|--------------|
| live | data acquisition | tapes and satellite histograms |
| replay | tapes | tapes |
| replay to histograms | tapes | satellite histograms |

`tb_pps_workload` runs all three at full size. Its assumptions:

* a 50 ns base clock;
* every microword given a 4-clock (200 ns) cycle;
* events of 250 bytes (one identifier and 124 values);
* the reference program, padded with a sequencer counter loop (`LDCT`,
  then `RPCT` on itself) to exactly 3000 executed microinstructions per
  event.

Measured results:

| run | source rate | result |
|-----|-------------|--------|
| live, source unthrottled | (input FIFO fills to 4096 words and holds the source back) | 6429 events/s; 120000 operations in 124443 clocks, an effective cycle of 51.9 ns; 10 events per processor |
| live | 1.3 Mbyte/s (5200 events/s) | keeps up: input FIFO never holds more than 1 word |
| replay | 0.7 Mbyte/s | keeps up |
| replay to histograms | 0.7 Mbyte/s | keeps up |

The 15 M operations/s target (5000 events x 3000 operations) therefore
holds with about 28% to spare. What costs time beyond the ideal 50 ns (200
ns / 4) is the serial part of each event. The INPUT module feeds one
processor at a time, and the OUTPUT module takes one whole event at a time.
Both are busy for about 125 x 3 processor cycles per event, because the
program reads and writes each value inside its loop. With much shorter
per-event programs, that serial part would set the limit.

## 6. Fidelity: what is given, what is chosen

**Taken from the original proposal:**

* four processors, each with:
  * a 12-bit sequencer with a 5-deep stack, loop counter and 16
    instructions;
  * a 16-bit ALU processor with 32 registers, accumulator, latch,
    rotations up to 15, bit operations, priority encoding and condition
    codes;
  * a 16x16 signed/unsigned/mixed multiplier with its product multiplexed
    onto 16 bits;
  * 4k x 96 horizontal microcode, loaded 16 bits at a time;
  * a pipeline register;
  * 12k x 16 work memory;
  * an address adder;
  * index registers with increment and zero test, a random-number
    register, a shift/priority register, input/output registers, a 32-bit
    histogram register and a memory register pair;
  * "available" and "output ready" signals;
* the microword field widths;
* the INPUT module: download into one or many processors, whole-event
  distribution, a FIFO of at least 4k, host or front-panel sources, 24-bit
  transfers;
* the OUTPUT module: a FIFO of at least 4k, whole-event service, the mixed
  first-come-first-served/round-robin policy, host or front-panel reads;
* the 64k x 16 shared memory with request/grant access.

**Choices made here, because the source is silent:**

* every encoding and opcode;
* the meaning of the 3 clock-generator bits (cycle length);
* stalling on busy interfaces;
* the end-of-event flag as the event boundary;
* the arbitration details (round-robin tie-breaking, age counters);
* the two-clock shared-memory access and its host port;
* the register numbering and read layouts;
* the LFSR polynomial;
* the PRIO encoding;
* the download command set;
* the histogram FIFO;
* a single system clock;
* reset values.

The sequencer's instruction semantics follow the well-known Am2910
behaviour. The ALU and multiplier use their own control encodings, not those
of the Am29116/Am29517 parts.

**Departures and omissions:**

* **Bus:** a multiplexer replaces the tri-state bus.
* **Multiplier ports:** the multiplier takes both operands from the shared
  bus, not from separate ports.
* **Multiplier buffer register:** the optional one ("may be desirable" in
  the proposal) is not built.
* **Work memory size:** it is fixed at 12k. The proposal allows 4k to 12k.
* **Program-controlled block transfers:** the processors move events word by
  word through their input and output registers. This design has no
  separate DMA engine.
* **Processor cycle:** the absolute 200 ns is not modelled. Only relative
  cycle lengths in base clocks are. The throughput figures of section 5
  rest on the assumed 50 ns base clock.
* **Work-memory loading:** the work memory has no host path. As intended,
  constants reach it through a small loader program that copies words
  from the input register. The shared memory, on the other hand, has its
  own host port (`mh_*`) rather than being loaded through the INPUT
  module.

## 7. Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Build one
with plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pps_pkg.sv tb/tb_pps_top.sv --top-module tb_pps_top -o sim
obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_pps_top` | whole system at full size. It tests: parallel download and per-processor verification; host-preset shared memory; 120 events via both input sources; a processor enabled late; output via both read paths. Every output event, histogram word and shared-memory word is checked. It requires input, output and memory stalls, memory contention and multi-way output arbitration to occur. About 3000 clocks |
| `tb_pps_workload` | the three operating configurations with 250-byte, 3000-operation events at full size; checks every output and histogram word, the operation count, the 5000 events/s and 70 ns effective-cycle targets, and that paced sources are kept up with (section 5). About 560000 clocks, under 10 s |
| `tb_pp_processor` | one processor running the reference program against models of its four interfaces; checks outputs, histogram words, shared memory, work memory, and that 3-clock instructions are never shorter |
| `tb_seq2910` | all 16 sequencer instructions against hand-worked addresses |
| `tb_alu29116`, `tb_mul29517` | random operations against reference models |
| `tb_special_regs`, `tb_clock_gen`, `tb_camac_if`, `tb_ustore`, `tb_pipeline_reg`, `tb_data_mem`, `tb_addr_adder` | unit behaviour, handshakes and stalls |
| `tb_input_module`, `tb_output_module`, `tb_mem_module`, `tb_hist_out` | whole-event distribution and collection, the first-come-first-served case, fairness bounds, FIFO full |

Time per event: in the reference program an event of n values takes about
10 + 3n processor cycles, plus waiting. So 3000 operations per event at
200 ns cycles on 4 processors gives the 5000 events/s design target, with
the 4k microcode and 12k work memory far from full.
