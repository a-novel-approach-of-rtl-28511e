# Word-redundancy built-in self-repair (BISR) for an embedded SRAM

An embedded SRAM that fails its test can often be saved without spare rows or
spare columns. This design puts a small array of *redundant words* beside the
memory. A memory BIST runs March SS and looks for faulty words. Each faulty
address it finds, together with the data that word should hold, goes into the
next free redundant word. From then on, every access to that address is also
handled by the redundant word, and a read returns the redundant word's data
instead of what the broken location gives back. The memory itself is not
changed: the repair logic sits at its ports, between an input multiplexer and
an output multiplexer.

```
            user addr / data_in / we / re
                          |
   +------------------+   v
   | MBIST controller |->[input mux]--+-----------> [ sram ] --mem rdata--+
   |  (March SS,      |               |                                   |
   |   microcoded)    |<-- mem rdata -+-----------------------------------+
   +------------------+               |                                   |
     | fault pulse, fault address,    v                                   v
     | correct data           [ redundancy logic array ]--hit, data--> [output mux] --> data_out
     +------------------------------->  (NUM_RED words)
```

The repair runs alongside the test. It adds no cycles to the test: March SS
on 2^ADDR_W words always takes 22·2^ADDR_W + 3 cycles, whether or not there
are faults.

## Two modes

`mode` selects one of two modes (`bisr_pkg::mode_e`).

**Test & repair (`MODE_TEST`).** The input multiplexer connects the memory to
the BIST's address, data and strobe outputs (the *test collar*). The user
port is ignored. A `bist_start` pulse runs the algorithm held in the
instruction storage. Whenever a read returns a word that differs from the
expected word, fault diagnosis raises a one-cycle **fault pulse**, along with
the **fault address** and the **correct data** (the expected word). That
pulse programs the redundancy array:

* If a programmed word already holds this address, nothing happens. March SS
  reads each address 13 times, so one bad cell produces several fault pulses.
  The address is still stored only once.
* Otherwise the next free word (the words fill from index 0 up) gets its FA
  ("fault asserted") bit set. It also stores the address, and the correct data
  goes into its data field. The fill count `red_used` goes up by one.
* If every word is already in use, the sticky `overflow` flag is set instead:
  the memory cannot be repaired. A memory with exactly `NUM_RED` faulty words
  is repaired without an overflow.

`bist_fail` reports that at least one fault was seen. `fault_cnt` counts the
fault pulses. `bist_done` rises when the run is over. At that point every
fault has been recorded, so the memory can go into service straight away.

**Normal (`MODE_NORMAL`).** The user's `addr`, `data_in`, `we` and `re` drive
the memory. Each address is also compared with the address field of every
programmed word:

* A write to a stored address goes to the memory *and* to that word's data
  field (the word's IE, "input enable").
* A read of a stored address takes the word's data field (the word's OE,
  "output enable"). The output multiplexer passes it instead of the memory's
  output.

`bist_start` is ignored in this mode, and no redundancy word is programmed.

Keep `mode` at `MODE_TEST` until `bist_done`. Switching mode during a run
hands the memory to the user port while the BIST is still comparing reads.

## The redundancy word

Each word (`redundancy_word`) has three fields: FA, the address and the data.
It has two comparators:

* one compares the memory-side address with the address field. Its match,
  ANDed with FA, is `hit`; `hit & we` is IE and `hit & re` is OE;
* the array uses the address field and FA to decide whether a fault address
  is already stored.

A word's read output is registered, so it arrives in the same cycle as the
synchronous memory's output. It is zero when the word does not hit. The array
therefore ORs the outputs of all words, and `rd_hit` tells the output
multiplexer to use the result. An assertion in `rl_array` checks that at most
one word ever matches an address.

During the test, the BIST's own writes also reach the programmed words
through the same IE path. After a word is programmed it therefore follows the
March algorithm's data. When the test ends, the word holds what the memory
location should hold. Sometimes a fault pulse arrives in the same cycle as a
write to the same address. This happens in March SS, where `r0` is followed at
once by `w1`. The word then stores the write data instead of the now stale
expected data.

The stored addresses can be read out after the test: put a word index on
`fa_idx`, and `fa_valid`/`fa_addr` show that word's FA bit and address.
Everything in the array is held in flip-flops and is cleared only by reset. A
fresh test after reset therefore finds and stores the faults again.

## The microcoded BIST

Newer march tests apply many operations per address. Four of March SS's six
elements have five operations each. The controller is therefore microcoded: it
steps through a list of operations, not a fixed state machine, so elements of
any length need no extra hardware.

### Instruction format

Each instruction is one march operation (`bisr_pkg::march_instr_t`, 5 bits,
MSB first):

| field  | meaning                                                        |
|--------|----------------------------------------------------------------|
| `stop` | end of the algorithm; the other fields are ignored             |
| `down` | address order of the element: 0 = increasing, 1 = decreasing   |
| `last` | last operation of the element                                  |
| `wr`   | 1 = write, 0 = read                                            |
| `val`  | data value; the word is all zeros (0) or all ones (1)          |

At reset, the instruction storage (32 entries) is loaded with March SS (22
instructions, then stop instructions):

```
{ up(w0); up(r0,r0,w0,r0,w1); up(r1,r1,w1,r1,w0);
  down(r0,r0,w0,r0,w1); down(r1,r1,w1,r1,w0); up(r0) }      22 operations per word
```

The first and last elements may run in either address order; here they run
upward. The function `bisr_pkg::march_ss(i)` gives instruction `i`.

To run another march algorithm, write its instructions through `prog_we`,
`prog_idx` and `prog_instr`, and end the list with a stop instruction. Any
algorithm of up to 31 operations per word fits. That includes March C- (10)
and March SS with its last element extended to (r0,r0,w0,r0,w1) (26). A reset
restores March SS.

### Sequencing

* The **instruction pointer** moves one instruction forward per issued
  operation. After the last operation of an element it does one of two things:
  * if the address generator is not yet at the element's final address, it
    jumps back to the element's first operation (which it remembers);
  * otherwise it goes on to the next element.
* The pointer's *next* value reads the storage, and the **instruction
  register** captures that instruction. So the registered instruction always
  matches the pointer, and one operation issues every cycle.
* The **address generator** is an up/down counter. At the start of each
  element it loads 0 or the top address, depending on the element's order. It
  steps once per pass through the element.
* The **state machine controller** has four states: idle, run, drain and done.
  The drain cycle lets the last read be compared and recorded before `done`.
* The **address generator**, **data generator** and **R/W control** each
  register their output when an operation issues. The resulting address, data
  and strobes drive the memory one cycle after the instruction register.

### Timing of a run

| cycle (0 = `bist_start` sampled)     | what happens                                        |
|-------------------------------------|-----------------------------------------------------|
| 0                                   | pointer cleared, first instruction and address loaded |
| 1 … K·N                             | one operation issued per cycle (K ops/word, N words) |
| 2 … K·N + 1                         | the memory sees each operation one cycle after issue |
| a read's cycle + 1                  | the memory answers; on a mismatch, the fault pulse, and the redundancy word is written at the end of that cycle |
| K·N + 1                             | the stop instruction is in the register             |
| K·N + 2                             | drain: the last read is compared                    |
| K·N + 3                             | `bist_done` = 1, `bist_busy` = 0                     |

For March SS on the default 256-word memory, the run takes 5635 cycles. A new
`bist_start` in the done state runs the algorithm again. A start while a run
is in progress is ignored.

## Module map

```
bisr_top
 ├─ mbist_controller
 │   ├─ bist_smc          state machine controller
 │   ├─ instr_ptr         instruction pointer with element looping
 │   ├─ instr_storage     algorithm store, reset to March SS, writable
 │   ├─ instr_reg         instruction register (reset: stop)
 │   ├─ addr_gen          up/down address counter + address driver
 │   ├─ data_gen          solid data background + data driver
 │   ├─ rw_control        write/read strobes
 │   └─ fault_diag        read compare, fault pulse/address/correct data
 ├─ input_mux             test collar or user port to the memory
 ├─ sram                  single-port synchronous memory with stuck-at defect inputs
 ├─ rl_array              redundancy logic array
 │   └─ redundancy_word × NUM_RED
 └─ output_mux            redundant data over memory data on a hit
```

`bisr_pkg` holds the mode enum, the instruction struct and the March SS
table.

## Parameters of `bisr_top`

| parameter    | default | meaning                                     |
|--------------|---------|---------------------------------------------|
| `ADDR_W`     | 8       | address width; the memory has 2^ADDR_W words |
| `DATA_W`     | 8       | word width                                  |
| `NUM_RED`    | 4       | redundancy words                            |
| `NUM_DEF`    | 8       | stuck-at defect slots of the memory model   |
| `IMEM_DEPTH` | 32      | instruction storage entries                 |

None of these sizes comes from the published architecture, which leaves the
memory size and the number of redundant words ("n words") open. Change them
freely. If `NUM_RED` is not a power of two, do not use `fa_idx` values past
the last word.

## Ports of `bisr_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `mode` | in | `mode_e` | `MODE_TEST` or `MODE_NORMAL` |
| `bist_start` | in | 1 | start the stored algorithm (test mode only) |
| `bist_busy`, `bist_done` | out | 1 | run in progress / finished |
| `bist_fail` | out | 1 | a fault was seen in the last run |
| `fault_cnt` | out | 16 | fault pulses in the last run (saturating) |
| `overflow` | out | 1 | a new faulty address found no free word: not repairable |
| `red_used` | out | clog2(NUM_RED+1) | programmed redundancy words |
| `addr`, `data_in`, `we`, `re` | in | ADDR_W, DATA_W, 1, 1 | user port (normal mode) |
| `data_out` | out | DATA_W | read data, valid the cycle after `re` |
| `fa_idx` → `fa_valid`, `fa_addr` | in → out | clog2(NUM_RED) → 1, ADDR_W | read out stored faulty addresses |
| `prog_we`, `prog_idx`, `prog_instr` | in | 1, clog2(IMEM_DEPTH), 5 | write the instruction storage |
| `def_en`, `def_addr`, `def_bit`, `def_val` | in | NUM_DEF × (1, ADDR_W, clog2(DATA_W), 1) | stuck-at defects of the memory model |

The `def_*` inputs exist so that a repair can be exercised. While
`def_en[k]` is set, bit `def_bit[k]` of word `def_addr[k]` always reads as
`def_val[k]`. In a real chip, the memory is a compiled macro: replace `sram`
with it and tie `def_en` to 0.

## Where this design goes beyond, or departs from, the published scheme

The published scheme gives the block structure, the two modes, the fields
of a redundancy word with its IE/OE controls, the programming flow (fault
pulse → program word → next word → overflow means not repairable), and March
SS. The following are choices of this design:

* **Modes.** Two modes are built: test & repair, and normal. A four-mode
  variant is mentioned for the scheme but never described, so it is not built.
* **Redundancy from normal words.** Turning ordinary memory words into
  redundancy is mentioned as an alternative but not described. Only the
  separate redundancy word array is built.
* **March SS element orders.** The elements run up, up, up, down, down, up.
  This is the published March SS order, and it is consistent with the data
  each element leaves behind.
* **Encodings and timing.** All encodings, widths and latencies are this
  design's own: the instruction format, the one-operation-per-cycle pipeline,
  the one-cycle memory read latency, the registered output of the redundancy
  words, the 22·N + 3 run length, and the solid all-0/all-1 data words.
* **Instruction storage.** The storage is a writable register file, so the
  algorithm can be changed without new hardware.
* **Repair details.** A repeated fault address is ignored. A same-cycle write
  is forwarded into a newly programmed word. `overflow` is raised only by a
  fault that actually needs a word that is not there.
* **Fault read-out.** The stored faulty addresses can be read out through
  `fa_idx`. They are not streamed out serially.
* **Memory model.** The stuck-at defect model in `sram` is for simulation
  only.

## Simulating

Every testbench checks its results itself. Each prints one line,
`TB_RESULT checks=<n> failures=<m>`, then ends. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/bisr_pkg.sv tb/tb_bisr_top.sv --top-module tb_bisr_top -o sim
./obj_dir/sim
```

Any other testbench builds the same way: swap in its file name and top
module.

* `tb_bisr_top`: the whole design at its default sizes. It covers:
  * a clean memory;
  * three faulty words, one of them with two bad bits;
  * six faulty words, which overflow the four spares;
  * a rerun with March C- loaded into the storage;
  * mode switching.

  It compares normal-mode traffic over the whole memory with a reference
  model. It counts each mechanism: fault pulses, repeated addresses,
  programming, redundancy reads and writes, overflow, mode switches and
  algorithm change. Every mechanism must occur at least once.
* `tb_march_workloads`: runs March SS, March SS with the extended last
  element, and March C- on the full-size design. For each, it checks the run
  length (K·256 + 3 cycles), the operation count, the repair, and that the
  memory reads back correctly afterwards.
* `tb_mbist_controller`: follows the test collar operation by operation. It
  compares each one with March SS and March C- written out independently. It
  also checks every fault pulse against a reference faulty memory.
* Each leaf module has its own testbench, `tb_<module>.sv`.

Simulation takes under a second for each testbench.
