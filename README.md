# A 4-bit Tomasulo core

This is a small, dynamically scheduled integer datapath built on Tomasulo's
algorithm. Instructions leave a queue in program order and then wait in
*reservation stations* until their operands exist. They run as soon as their
data is ready, not in program order. Destination registers are *renamed* to
the reservation-station slot that will produce them, so a later instruction
waits for that slot's result and not for the register. Every result goes out
once, with its slot's tag, on a single *common data bus* (CDB). Each waiting
slot and the register file take it from there. Read-after-write dependencies
are therefore tracked by tag. Write-after-read and write-after-write hazards
do not stall anything.

The machine is deliberately tiny. It has 4-bit data, eight registers R0-R7,
ADD, SUB, MUL and LOAD, three adder slots and two multiplier slots. The whole
scheduling mechanism fits on one screen of waveforms. The structure, field
layouts, sizes and block names follow a 2005 teaching design of the
algorithm. Where that design left something open, the choices made here are
listed in "Departures and choices" below.

## Instruction format

An instruction is 15 bits. The queue adds a validity bit on top:

| bits  | 15    | 14:11    | 10:7     | 6:3         | 2:0       |
|-------|-------|----------|----------|-------------|-----------|
| field | valid | source 2 | source 1 | destination | operation |

| operation | code | effect                                |
|-----------|------|---------------------------------------|
| ADD       | 000  | Rd = Rs1 + Rs2 (mod 16)               |
| SUB       | 001  | Rd = Rs1 - Rs2 (mod 16)               |
| MUL       | 010  | Rd = low 4 bits of Rs1 * Rs2          |
| LOAD      | 011  | Rd = the 4-bit value in the source-1 field |

Register fields are 4 bits wide, and bits 2:0 select R0-R7. The validity bit
is there so that an empty slot (all zeros) is never mistaken for
`ADD R0,R0,R0`. Operation codes 100-111 are dropped when they are offered to
the queue.

## Blocks

```
 instruction ─► instruction_queue ──opcode──► opcode_selector ──add──►  add_rs (3) ─► adder_subtractor ─┐
   (16 slots, in-order issue)     │          (registered)   ──mult─► multiplier_rs(2)─► multiplier ─────┤
        ▲ adder_full / mult_full  │                         ──load─┐                                   │
        └─────────────────────────┼──────────────────────────────  │                                   ▼
                                  └──► register_file ◄─────────────┘        common_data_bus (one result/cycle)
                                       (8 x 4 bit)  ◄── write-back ── register_status_table ◄──────────┤
                                         │ output_A/B                   (tag per register) ─ regStatus ─┤
                                         └────────────► both reservation stations ◄──── CDB tag+value ──┘
```

| module | role |
|---|---|
| `tomasulo_core` | top level; wires everything as above |
| `instruction_queue` | 16-slot shift FIFO; issues the head when its station has room |
| `opcode_selector` | registers the issued opcode onto the adder, multiplier or LOAD path |
| `reservation_station` | slots, renaming, operand capture, dispatch; instantiated as `add_rs` and `multiplier_rs` |
| `adder_subtractor` (+ `full_adder`) | 4-bit ripple-carry add/subtract with carry out C4 |
| `multiplier` | 4x4 shift-and-add multiplier, 8-bit product |
| `common_data_bus` | picks one result per cycle, round robin between the two units |
| `register_file` | R0-R7, two registered read ports, CDB and LOAD write paths |
| `register_status_table` | producer tag per register; routes CDB results into the register file |
| `tomasulo_pkg` | widths, the `op_e` enum and the packed records shared by all of the above |

## Life of an instruction

This is the part to understand first. Take an ADD whose operands are already
in registers, issued in cycle 0:

| cycle / edge | what happens |
|---|---|
| cycle 0 | The head of the queue is a valid ADD and `adder_full` = 0, so the queue drives it on `opcode` (combinationally). |
| edge 1 | The queue shifts down. `opcode_selector` registers the ADD onto `opcode_out_add`. The register file registers the two source values (`output_A`, `output_B`). |
| cycle 1 | `add_rs` sees the opcode, the two values and `regStatus`. It picks its lowest free slot and drives `destination_select` = {slot tag, Rd}. |
| edge 2 | The slot is written. The register status table records the slot tag for Rd, so an instruction in cycle 2 already reads the tag. |
| edge 3 | The slot holds both operands, so it is copied to `value_A`/`value_B`/`tag`/`R`. |
| cycle 3 | The adder computes combinationally. The CDB grants the result, and every station and the register status table see {tag, value}. |
| edge 4 | Waiting slots capture the value. Rd is written if it still waits on this tag, and its tag clears. The slot is refilled if an instruction is arriving. |

The slot's operands are present two edges after its opcode reaches the
station, and the result is on the bus three cycles after the instruction
leaves the queue. With independent instructions the core sustains one result
per cycle. A slot is refilled in the cycle its result is on the bus, so three
adder slots are enough for back-to-back ADDs.

Three timing details keep this consistent:

* **Rename in the allocation cycle.** `destination_select` is combinational.
  It reaches the register status table in the same cycle as the slot
  allocation, so the very next instruction sees the new tag. A one-cycle-late
  rename would let that instruction read a stale register.
* **Read forwarding.** The register file's registered read port uses the
  value being written at the same edge. What a station sees in cycle 1 (values
  and tags) therefore always describes the same moment.
* **Bus bypass at issue.** If a source's tag is on the CDB in the allocation
  cycle, the station takes the value off the bus instead of storing the tag.
  Otherwise it would wait for a broadcast that has already passed.

## Renaming and tags

Tags are 4 bits. Tag 0 means "no producer". `add_rs` slots are tags 1, 2, 3
and `multiplier_rs` slots are 4, 5 (`TAG_BASE` + slot number). The register
status table holds one tag per register and exports all of them as a 32-bit
word (register r in bits 4r+3:4r).

* **RAW:** a source whose register has a tag stores the tag in Qa/Qb. The
  slot compares both Q fields with the CDB tag every cycle and fills Va/Vb on
  a match.
* **WAW:** a later writer of Rd overwrites Rd's tag. When the earlier result
  appears, no register matches its tag. The result still reaches the waiting
  slots, but the register file is not written.
* **WAR:** sources are copied (value or tag) into the slot at issue, so a
  later write to the source register cannot affect them.
* **Tag reuse:** a slot stays busy after dispatch until the bus takes its
  result. Two results with the same tag can therefore never be in flight.

## Reservation-station slot

Each slot is the 26-bit `rs_entry_t`:

| bits | 25 | 24:21 | 20 | 19:16 | 15:12 | 11:8 | 7:5 | 4:1 | 0 |
|---|---|---|---|---|---|---|---|---|---|
| field | tag Vb | Vb | tag Va | Va | Qb | Qa | op | RS tag | busy |

"tag Va/Vb" means "operand present". A slot is ready when it is busy, both
flags are set and it has not been dispatched. The lowest-numbered ready slot
goes first. `full` looks ahead: it is 1 when no slot would remain for an
instruction the queue issues now, after counting the one already arriving.
That covers the one-instruction window of the registered selector.

## The common data bus

There is one bus. The adder and the multiplier each present {tag, result},
and tag 0 means nothing to send. When both have a result in the same cycle,
the bus grants them in turn (round robin). The unit that loses keeps its
result in its station's output register, and that station does not dispatch
again until it is granted. The multiplier's product is 8 bits wide, and the
bus carries its low 4 bits.

## LOAD

LOAD goes through the selector like any other instruction, on its own output,
so it acts in program order. At the edge where it leaves the selector, it
writes its 4-bit immediate into Rd and clears Rd's tag. An older instruction
that wrote Rd can then no longer overwrite the loaded value.

## Departures and choices

The overall structure, the sizes (16 queue slots, 3 + 2 station slots, 8
registers, 4-bit data and tags), the instruction and slot layouts, the tag
numbering, the dispatch order, the validity bit and the block interfaces
follow the original design. The following are this implementation's own:

* **Queue output.** The queue drives its output combinationally (the original
  registered it), so only one instruction is in flight past the full flags.
  An `instr_valid` strobe marks new instructions. Instructions offered while
  `queue_full` = 1 are dropped, so the source must wait.
* **Where LOAD's value comes from.** It is carried in the source-1 field. The
  original only calls it external data.
* **Register-file writes.** The register file has two write paths, CDB and
  LOAD, which can both write in one cycle; on the same register, LOAD wins.
  The original described one write port with a data-select mux.
* **When a slot frees.** A slot is freed when the bus takes its result, not
  when it dispatches. Without bus conflicts these are the same cycle.
* **CDB arbitration and multiplier.** The CDB's round-robin arbitration and
  the multiplier's internals are not specified in the original. Both units
  take one cycle.
* **The top level.** The original's own top level worked for only its first
  instruction. This top level is a complete wiring of the same blocks, checked
  against a reference model.

Not included: STORE, logical operations, branches, separate load/store
buffers, and exceptions or a re-order buffer. The original names all of these
only as future extensions.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_tomasulo_core` runs the whole core at its default sizes. It compares
  all registers against a sequential model after each program: the worked
  three-instruction example (ADD R2,R4,R0 / SUB R3,R6,R2 / ADD R5,R3,R2), a
  latency check (issue to bus = 3 cycles), a throughput check (40 independent
  results on 40 consecutive cycles), a 60-deep MUL chain that fills the queue,
  and 40 random programs. It also counts how often each mechanism occurred
  and fails if one never did: station-full stall, full queue, bus bypass at
  issue, snooping, bus conflict, out-of-order completion, superseded result,
  LOAD, dropped instruction.
* `tb_worked_example` issues the three-instruction example on consecutive
  cycles and inspects the adder station and the register status table after
  each allocation. It checks Qb = Add1 for the SUB, the operand taken off the
  bus, the R2 tag being cleared, and the final values. Because Add1 is freed
  in the same cycle it broadcasts, the third instruction reuses Add1 rather
  than Add3.
* `tb_reservation_station` replays a five-instruction issue sequence with
  hand-derived expected outputs. It then covers waiting operands, snooping,
  out-of-order dispatch, the full flag and holding a result without a grant.
  A second instance in the multiplier configuration (two slots, tags 4-5) is
  checked as well.
* The leaf testbenches cover the rest. The adder-subtractor and multiplier
  are checked exhaustively. The register file and register status table are
  checked against shadow models with random traffic, and the queue against a
  queue model.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tomasulo_pkg.sv \
          tb/tb_tomasulo_core.sv --top-module tb_tomasulo_core
./obj_dir/Vtb_tomasulo_core
```

Replace the testbench name to run any other. All of them finish in seconds.
The RTL also carries a few concurrent assertions, enabled by `--assert`:

* the queue never sends to a station with no free slot;
* there is one bus grant per cycle;
* there is one allocation per cycle;
* no two registers wait on the same tag;
* the queue's occupied slots stay contiguous.

## Changing the design

* `tomasulo_core` parameters are `QUEUE_DEPTH` (16), `ADD_ENTRIES` (3) and
  `MULT_ENTRIES` (2). The multiplier's tags start right after the adder's.
  `ADD_ENTRIES + MULT_ENTRIES` must stay at or below 15 (4-bit tags, 0
  reserved).
* Data width, tag width and register count are `localparam`s in
  `tomasulo_pkg`, because the packed records are built from them. The
  adder-subtractor and multiplier follow `DATA_W`. The 15-bit instruction
  format and the 32-bit `regStatus` word assume 4-bit register fields and
  8 registers.
* A new functional unit needs its own `reservation_station` instance with a
  fresh `TAG_BASE`, a selector output, and a request/grant pair on the
  `common_data_bus`.
