# Predecode loop buffer for a two-way VLIW processor

Small embedded programs spend most of their time in a few loops, and each trip
around a loop fetches and decodes the same instructions again. A loop buffer
keeps the loop close to the pipeline so instruction memory is not read again.
This design goes one step further in two ways:

* **It stores decoded control signals, not instruction words.** Once a loop is
  in the buffer, the Prefetch, Dispatch and Decode work for it is skipped. Only
  operand reads still happen, because operands change on every trip. The cost
  is width: a decoded control word is much wider than an instruction.
* **It chooses carefully what to keep.** A simple loop buffer captures the most
  recently taken backward branch. A rarely run loop can then push out a loop
  that runs hundreds of times. Here every taken branch is counted in a small
  Branch Information Table (BIT). A loop enters the buffer only after its
  branch has been taken a threshold number of times. A *replace register*
  judges whether the stored loops are still the ones the program runs.

The processor around it is a two-way VLIW machine. It is built as an
asynchronous 4-phase dual-rail pipeline with six stages: Prefetch, Dispatch,
Decode, EX1, EX2 and Write Back. Its instructions are stored compressed. This
repository contains:

* the loop buffer's control and storage logic (`plb_top` and the modules below it);
* the dual-rail asynchronous cells the pipeline is built from: C-element,
  C_Latch, completion detector, DeMux, Merge and mutual exclusion.

## How a loop gets into the buffer

The mode controller works in EX1, where branches resolve. A branch's BIT record
is read in Decode and travels with it. The record holds a tag, an Execute
Counter, a Frequent Flag and a Pre-Frequent Flag. A record that is not found
reads as all zeros. The controller holds two mode registers, S-reg (store) and
F-reg (fast access), which give three fetch modes:

| mode | S-reg | F-reg | what happens to the following tokens |
|---|---|---|---|
| Direct | 0 | 0 | fetched from memory and decoded as usual |
| Storage | 1 | 0 | fetched and decoded; the decoded word is also written into the buffer |
| Fast Access | 0 | 1 | read from the buffer in Dispatch; Prefetch, Dispatch and Decode are bypassed |

When a branch resolves, the mode for the instructions after it is chosen as
follows (`mode_controller.sv`):

| condition | new mode | BIT update |
|---|---|---|
| Frequent or Pre-Frequent Flag set, branch taken | Fast Access | counter + 1 |
| no flag, taken, counter + 1 >= THRESHOLD | Storage | counter + 1, both flags set |
| no flag, taken, counter + 1 < THRESHOLD | Direct | counter + 1 (entry allocated if absent) |
| branch not taken | Direct | none |
| loop buffer miss (see below) | Direct | none |

Take a loop `ADD … BEQ` with THRESHOLD = 4. The first three taken `BEQ`s only
count. The fourth turns on Storage Mode, so the fifth trip's decoded words are
written into the buffer, `BEQ` included. At the end of that trip, `BEQ` finds
its Frequent Flag set and switches to Fast Access. From the sixth trip on,
every word comes from the buffer. When `BEQ` finally falls through, the mode
returns to Direct. The end-to-end testbench checks this trip by trip.

## Keeping the loop that matters

Each taken branch also updates the 3-bit replace register:

* a taken branch whose Frequent Flag is set counts it down, stopping at 0;
* any other taken branch counts it up.

If counting up overflows the register, the program has left the stored loops
behind and entered a new program phase. The controller then clears every
Frequent Flag in the BIT, which starts the *writing phase*. While at least one
Frequent Flag is set, the BIT is in the *monitoring phase* (output `phase`).

The clear does not flush the buffer, and it does not touch the Pre-Frequent
Flags. A loop stored earlier still has its Pre-Frequent Flag set. When the
program comes back to that loop, its branch goes straight to Fast Access, and
the words still in the buffer are used without storing them again. A
short-lived loop has to be taken THRESHOLD times before it can overwrite
anything. A hot inner loop inside a rarely repeated outer loop therefore keeps
its place.

## Compressed words and the index register

A VLIW word holds two instructions. Each instruction has a p-bit, which
says whether the pair may issue together. If the pair cannot issue together,
Dispatch sends the word twice with the same PC: first the left instruction
(with a NOP on the right), then the right instruction. The PC alone therefore
cannot name a buffer entry. The index register supplies the missing bit
(`index_unit.sv`):

* `change = pbit1 | pbit2`;
* `index_next = ~(change ^ index)`.

A split word (change 0) toggles the direction: left (1), then right (0). A
word that issues whole (change 1) keeps it. A taken branch and reset set the
direction to left. Buffer entries are addressed by `{PC, index}`. In Fast
Access the p-bits come from the buffer entry, because Dispatch is bypassed.

## Misses

The buffer is direct mapped. A word can be overwritten while its branch still
has a flag set, for example by a loop longer than the buffer. The buffer then
misses in Dispatch, and `miss_recovery.sv` does three things:

* it clears F-reg, so the next token is handled in Direct Mode;
* it asks the PC register to reload the missing word's PC (`redirect_q`,
  `redirect_pc_q`, registered one cycle later);
* it replaces the token by a NOP (an all-zero control word).

Only Dispatch needs recovering. In a 4-phase dual-rail pipeline, the stages on
either side of a valid token hold empty spacers. The missing word is then sent
again from memory.

A consequence of these rules, which is not changed here: a loop whose branch
keeps its Pre-Frequent Flag but whose words were evicted misses on every trip.
Each trip goes back to Fast Access at the branch and is never stored again.
The last phase of the end-to-end test shows this with a 20-word loop.

## Timing model of `plb_top`

In the original processor these parts are self-timed. Here the control and
storage logic is synchronous: **one rising clock edge with `tok_valid = 1` is
one VLIW token** passing Dispatch and Decode, and, for a branch, EX1. For each
token the environment supplies:

* `tok_pc`;
* the decoder's control word `tok_ctrl`, ignored on a Fast Access hit;
* the two p-bits;
* `tok_is_branch` and `tok_taken`.

Tokens arrive in program order, after taken-branch squashing. That squashing
belongs to the processor's branch-handling unit, which is not part of this
repository.

Within the token's cycle, these outputs are combinational:

* `out_ctrl`, `out_from_plb`, `out_nop`, `out_stored` and `miss`.

At the clock edge:

* the BIT write, the buffer write, the mode registers, the replace register
  and the index register are updated.

The BIT is read and written for the same branch in one step. Its read is
combinational and its write lands at the edge. This gives the order the
asynchronous design enforces with a mutual-exclusion element: the write comes
after the read has finished.

## Dual-rail cells and the BIT access path

Every bit travels on two wires: `{t,f}` = `00` empty, `01` valid 0, `10` valid
1. Tokens alternate with empty spacers (4-phase return-to-zero).

| module | function |
|---|---|
| `c_element` | Muller C-element with active-low reset: the output follows the inputs when they agree and holds otherwise |
| `completion_detector` | OR per bit, then AND-of-all and OR-of-all joined in one C-element: `done` rises when every bit is valid and falls when every bit is empty |
| `c_latch` | one dual-rail latch bit: two C-elements enabled by the inverted acknowledge of the next stage, and an OR giving the acknowledge backwards |
| `dr_pipeline_latch` | N C_Latches with a completion detector on the outputs giving the word acknowledge |
| `dr_demux` | C-elements join each rail with `sel.t` (upper path) or `sel.f` (lower path); the path not selected stays empty |
| `dr_merge` | OR of the two paths, with an assertion that they are never valid together |
| `mutex` | grants the first of two dual-rail requests; the other waits until the first returns to empty |

These cells are written as level-sensitive latches, not with gate-level
feedback loops. Lint and synthesis therefore report latches, and in `mutex` a
loop through its own state. This is the intended storage. They simulate
directly in a two-state simulator with delays.

`plb_top` also carries the BIT read-access path built from these cells:

1. A PC token enters through a `dr_pipeline_latch`.
2. A `mutex` orders it against a BIT write token.
3. A `dr_demux`, steered by the dual-rail "is branch" select, sends it either
   to the table lookup (`dr_lookup_*`) or to a leg that answers "valid zero"
   (all false rails) once the whole token has arrived.
4. A `dr_merge` joins the table's answer (`dr_info_*`) with the valid zero to
   form `R_Information`.

The table behind this path is the clocked BIT, so the lookup leg is brought out
as ports. The true rails of `R_Information` are wired straight from
`dr_info_t`, because valid zero has no true rails.

## Parameters

The sizes are this design's own choices; the original gives none. The BIT and
buffer depths are set so that their storage bit counts match the reported cell
areas for those blocks. With about 54 µm² per register bit:

* BIT: about 8600 µm², or about 160 bits;
* buffer: about 240000 µm², or about 4400 bits.

| parameter | default | meaning |
|---|---|---|
| `PC_W` | 16 | PC width (word address) |
| `CTRL_W` | 128 | decoded control word of one dispatched VLIW word |
| `EXEC_W` | 4 | Execute Counter width (saturating) |
| `THRESHOLD` | 4 | taken executions before a loop is stored |
| `REPLACE_W` | 3 | replace register width (overflow after 8 net non-hot taken branches) |
| `BIT_ENTRIES` | 8 | BIT entries, direct mapped on low PC bits; each entry has valid, tag, counter and 2 flags (20 bits) |
| `PLB_ENTRIES` | 32 | buffer entries, direct mapped on `{PC[3:0], index}`; each entry has control word, p-bits, tag and valid |
| `DR_W` | 16 | width of the dual-rail BIT access path |

Shared defaults and the `mode_e` / `phase_e` types are in `rtl/plb_pkg.sv`.

## Module hierarchy

```
plb_top
├── loop_buffer          decoded-word storage, read in Dispatch, written after Decode
├── miss_recovery        fast/direct path select, NOP insertion, PC redirect
├── index_unit           left/right direction of split words
├── branch_info_table    tag, Execute Counter, Frequent / Pre-Frequent Flags
├── mode_controller      S-reg, F-reg, replace register, BIT write-back
└── dual-rail BIT access path
    ├── dr_pipeline_latch ── c_latch ── c_element, completion_detector
    ├── mutex
    ├── dr_demux ── c_element
    ├── completion_detector
    └── dr_merge
```

## Simulating

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl +libext+.sv rtl/plb_pkg.sv tb/plb_top_tb.sv --top-module plb_top_tb -o sim
./obj_dir/sim
```

Replace `plb_top_tb` with any other testbench name. Each one runs in well under
a second.

The end-to-end test `plb_top_tb` uses every default. It models the rest of the
processor (PC register, compressed instruction memory, decoder and branch
unit) and runs five program phases:

* one loop, checked trip by trip;
* nested loops: an outer loop around a 2-trip and a 20-trip inner loop;
* five short loops that overflow the replace register;
* the nested loops again, returning through the Pre-Frequent Flag;
* a 20-word loop that misses.

While a token runs in Fast Access, the testbench drives garbage on the decoder
inputs. A correct word can then only come from the buffer. It checks:

* every delivered control word;
* the index of every token;
* the NOP and redirect on each miss;
* that each mechanism happens at least once: fast access, storage, miss, BIT
  hit, overflow clear, split words from the buffer, hot-branch exit,
  Pre-Frequent return, write acknowledge and the dual-rail path.

## Where this departs from the original, and open points

* **Clocked control logic.** The loop-buffer control and storage is synchronous,
  one token per clock edge, not self-timed. The original's 4-phase handshake
  between these units is not reproduced. Only the dual-rail cells and the BIT
  access path are asynchronous.
* **Index equation.** The original describes the next-index logic as an XOR of
  the change bit and the index. Its truth table, which this design follows,
  needs the inverted output.
* **Counter below threshold.** The original's mode table sends a branch with no
  flag and a count below threshold to Direct Mode. Its step-by-step
  description says the mode is left unchanged. The table is followed.
* **Choices made where the original is silent:**
  * the threshold comparison uses the incremented count;
  * Storage Mode sets both flags;
  * the replace register saturates at 0 and wraps on overflow;
  * reset and taken branches set the index to left;
  * the NOP encoding is all zeros;
  * the table organisations are direct mapped;
  * all widths and depths are this design's.
* **Not included:**
  * the processor's pipeline stages, register file and instruction set;
  * the branch-handling unit (I&V register, Dir register, fetch buffer, PC
    merge) and its stall unit. `plb_top` brings out the redirect and NOP
    signals where it would connect;
  * the asynchronous 1-bit register cell;
  * the handshake wrapper around the mode controller and its completion
    signal, which the clocked model does not need;
  * the synchronous/asynchronous memory interface.
* The original reports only synthesis area and delay. No benchmark results are
  reproduced here.
