# Run-time control flow checking for a pipelined RISC CPU

A soft error in the program counter, in a branch unit or in a fetched
instruction can send a processor off to the wrong address. The checkers in
this repository watch the addresses a CPU fetches and tell, within one cycle
of the instruction leaving decode, whether the step it just made is one the
program allows. Each checker can then ask the CPU to fetch the faulty
instruction again before anything it did reaches a register or memory.

Nothing in the checked program is changed. Before the program runs, a
software analysis produces a compact description of its legal control flow,
which is stored in small memories next to the CPU. The checker walks through
that description in step with the program. Straight-line code needs no table
entry at all: the only legal step there is "next word".

Two ways of describing the control flow are built. They are alternatives, and
each stands alone.

* **CFI method** (`cf_checker`): one entry per control flow instruction
  (CFI), meaning a branch, jump, call or return. Each entry holds where the
  CFI is, where it must go, and which entry comes next. A return stack
  checks returns, and traps are let through and their returns checked. This
  is the main design. It never stalls the CPU.
* **Basic block method** (`cf_bb_checker`): one entry per basic block. Each
  entry holds the address of the block's last instruction, how the block
  ends, and the index of the block a taken branch or jump goes to. It needs
  fewer memory bits. It must stall the CPU for one cycle when a block is only
  one instruction long. It can also check a CRC signature of the instruction
  words of each block.

`cfc_top` puts both side by side with separate ports.

## The pair the CPU provides

Both checkers see one pair per instruction leaving decode:

* `pc_n` is the word address of the instruction in decode.
* `pc_n1` is the word address the CPU fetched after it.

On a SPARC-like pipeline these are the decode-stage PC and the fetch-stage PC.

All addresses are **word addresses**: a 32-bit byte address without its two
low bits, so `ADDR_W = 30`. In straight-line code, `pc_n1 == pc_n + 1`.

`DELAY_SLOTS` (default 1, as on SPARC) is the number of instructions that
still execute after a CFI before the transfer happens. With one delay slot:

* the CFI is at address `A`;
* its delay slot is at `A + 1`;
* the pair that shows the transfer is `(A + 1, target)`.

Both checkers check the transfer on that pair. Set `DELAY_SLOTS = 0` for a
CPU without delay slots.

## CFI method: how `cf_checker` works

### The three memories and the CUPC

| memory   | word at index *i*                              | width |
|----------|------------------------------------------------|-------|
| sAdrRam  | `from`: address of CFI *i*                     | ADDR_W |
| jAdrRam  | `to`: target address of CFI *i*                | ADDR_W |
| ctrlRam  | `{kind[2:0], next[IDX_W-1:0]}`                 | 3 + IDX_W |

The entries are kinds of `cf_pkg::cfi_kind_e`:

| kind | code |
|------|------|
| branch | 0 |
| jump | 1 |
| call | 2 |
| return | 3 |
| checking start | 4 |
| checking end | 5 |

`IDX_W = log2(ENTRIES)`.

The checker unit program counter (**CUPC**) is the index of the next CFI the
program must reach. Entries are ordered so that the fall-through path of a
branch at entry *i* meets entry *i + 1* next. The `next` field gives the entry
that follows the taken path: the first CFI at or after the target.

### Three comparisons per pair

| comparator | test | meaning |
|------------|------|---------|
| a | `pc_n1 == pc_n + 1` | straight-line step |
| b | `pc_n == from + DELAY_SLOTS` | the expected CFI transfers now |
| c | `pc_n1 == to` | it went to the stored target |

What is legal while checking is active:

| situation | legal outcome | CUPC afterwards |
|-----------|---------------|-----------------|
| not at the expected CFI (b false) | a | unchanged |
| branch | c | `next` |
| branch | a (not taken) | CUPC + 1 |
| jump | c | `next` |
| call | c | `next` |
| return | `pc_n1` equals the address on top of the return stack | the CUPC stored with it |

A call also pushes `{return address, CUPC + 1}` onto the return stack. The
return address is `pc_n + 1`, the word after the delay slot.

Start and end entries are compared against `pc_n == from`, without the
delay-slot offset. When the program reaches a start entry, checking turns on.
When it reaches an end entry, checking turns off. In both cases CUPC becomes
`next`. While checking is off, the checker only looks for the next start
entry. This lets code the checker cannot follow, such as indirect jumps other
than returns, run unchecked between an end entry and a start entry.

The memories are read synchronously at the *next* CUPC. The entry for the
next pair is therefore always ready in time, and the CFI method costs no
cycles when there are no errors.

### Errors and re-execution

Any other outcome raises `error_o` for one cycle. `err_cause_o` gives the
reason:

* `ERR_SEQ`: a straight-line step was wrong.
* `ERR_TARGET`: a CFI went to the wrong place.
* `ERR_UNDERFLOW`: a return was reached with an empty stack.

`err_pc_o` holds the `pc_n` of the failing pair.

With re-execution enabled (`REEXEC = 1`), `reexec_o` and `reexec_pc_o`
come in the same cycle. They ask the CPU to cancel everything after the
faulty instruction and fetch again from `reexec_pc_o`:

* If a CFI transfer failed, the restart address is the CFI itself (`from`).
  The CFI and its delay slot are executed again.
* For any other fault, the restart address is `pc_n`, the instruction whose
  successor was wrong.

An error leaves CUPC, the activity flag and the return stack unchanged. The
checker state is then exactly what it was before the restarted instruction,
so no rollback is needed inside the checker. After a request, the checker
ignores pairs until `pc_n` equals the restart address again. This drops the
pairs of the wrong path that are still in the pipeline.

The CPU side is not part of this RTL. It must annul instructions it has not
yet completed and restore its PC/nPC to the values it had when it fetched the
restart instruction. On a Leon3-class pipeline this is done by feeding the
execute-stage PC back into next-PC selection, so a restart costs a few
pipeline cycles.

A return that finds the stack empty cannot be repaired by executing it
again. For that case the checker reports `ERR_UNDERFLOW` without a restart
request, turns checking off, and moves CUPC to the entry's `next` field.

### Traps and interrupts

A trap or interrupt redirects the fetch to a vector of the trap table. That
step is neither straight-line nor an expected transfer. The checker accepts
such a step when `TRAP_CHECK` is set and `pc_n1` is the start of a vector:
one of `TRAP_VECTORS` (256) vectors of `TRAP_VEC_WORDS` (4) words from the
trap base. This is the SPARC trap table layout.

Accepting a trap works like a call:

* `{pc_n + 1, CUPC}` is pushed. `pc_n + 1` is the displaced instruction the
  handler will return to.
* Checking pauses while the handler runs. The handler itself has no table
  entries.
* The first jump to the stacked address pops it and resumes checking with
  the saved CUPC.

The trap base is the APB register `TRAPBASE`. Its reset value is the
`TRAP_BASE` parameter.

Limits of the trap handling:

* A trap on the very pair of an expected transfer, such as a CFI's delay
  slot with D = 1 or the CFI with D = 0, is reported as a wrong target.
* A precise trap that must restart an earlier instruction than `pc_n + 1`
  is not covered.
* If the handler jumps back to the wrong place, this goes unnoticed. Checking
  simply stays paused.
* Traps inside a handler are not followed.

Trap checking needs the return stack.

### Versions

| version | `RETURN_STACK` | `REEXEC` | what it checks |
|---------|----------------|----------|----------------|
| A | 0 | 0 | Direct branches and jumps only. A return entry just turns checking off, so it must be used for one function at a time. |
| B | 1 | 0 | Adds calls and returns, using a `STACK_DEPTH`-entry return stack (default 32). |
| C | 1 | 1 | B plus re-execution. This is the default. |

### Bus access (`cf_apb_if`)

An AMBA APB slave lets the CPU load or change the three memories at run time
and read the status. It has no wait states and never signals an error.

Addresses are byte addresses. Bits `[IDX_W+3:IDX_W+2]` select the region and
bits `[IDX_W+1:2]` select the index.

| region | contents |
|--------|----------|
| 0 | sAdrRam |
| 1 | jAdrRam |
| 2 | ctrlRam |
| 3 | registers: index 0 `STATUS`, index 1 `ERRPC`, index 2 `CUPC`, index 3 `TRAPBASE` (read/write) |

`STATUS` has two bits:

* bit 0: checking is active.
* bit 1: a sticky "error seen" flag. Write 1 to clear it.
* bit 2: the checker is paused in a trap handler.

The memories can also be preloaded with `$readmemh` files through the
`S_INIT`, `J_INIT` and `C_INIT` parameters.

## Basic block method: how `cf_bb_checker` works

Blocks are numbered in address order, and there is one table word per block:

`{signature[15:0], kind[1:0], successor[IDX_W-1:0], end[ADDR_W-1:0]}`

The signature field is present only when `SIG_CHECK = 1`, which is the
default.

The kinds are `BB_FALL`, `BB_BRANCH`, `BB_JUMP` and `BB_END`. With delay
slots, `end` is the last delay slot.

Block start addresses are not stored. Block *k* starts at `end(k-1) + 1`, and
block 0 starts at the `seg_start` input. The checker follows the current block
index *k*:

* Inside a block, only straight-line steps are legal.
* At `end(k)`, legality depends on the block kind:
  * A branch may fall through, giving *k + 1*, or go to the start of block
    `successor`.
  * A jump must go to the start of block `successor`.
  * A fall-through block must step to the next word.
  * An end block turns checking off.

Checking turns on when `enable` is high and `pc_n == seg_start`.

The start of the taken successor is `end(successor - 1) + 1`, which is a
second table read. The checker reads the block's own word first and the
successor's predecessor word second. Normally both reads finish while the
block is still executing. The exception is a block that is one instruction
long and ends in a branch or jump: the CPU reaches its end before the second
read is back. In that case `stall_o` is high for one cycle, and the pair must
be held until `stall_o` falls.

With one delay slot, every block that ends in a CFI contains at least the CFI
and its delay slot. The stall can therefore only happen with
`DELAY_SLOTS = 0`.

Errors and restart requests behave as in the CFI method. After a failed
transfer, the restart address is `end - DELAY_SLOTS`, which is the CFI.

### Block signatures

Address checks cannot see a corrupted instruction that does not change the
control flow, such as a flipped bit in an ALU opcode. To catch these, the
basic block checker also takes `instr`, the instruction word at `pc_n`.

For every accepted pair, it folds `instr` into a running CRC-16-CCITT:

* polynomial x^16 + x^12 + x^5 + 1;
* preset to 0xFFFF;
* each 32-bit word fed MSB first;
* implemented by `cf_pkg::sig_update`.

When the block is left, the running value must equal the signature stored
with the block. The table builder computes that signature the same way over
the block's words. A mismatch pulses `sig_error_o` one cycle later, with
`err_pc_o` set to the block end.

No restart is requested for a signature error. By the time the signature can
be compared, the block has already executed. Software has to decide what to
do.

A restart at a CFI replays the delay-slot instructions. To avoid counting
those words twice, the checker keeps the signature values of the last
`DELAY_SLOTS` pairs and rewinds to the right one.

Calls and returns are not followed. Use the checker on call-free code, or
turn it off across calls with `enable`.

## Sizes and parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 30 | word address width (32-bit byte addresses) |
| `ENTRIES` | 512 | CFI-method entries. 1024, 2048 and 4096 are also sensible. |
| `STACK_DEPTH` | 32 | return stack entries |
| `BLOCKS` | 512 | basic block entries |
| `DELAY_SLOTS` | 1 | delay slots after a CFI |
| `RETURN_STACK`, `REEXEC` | 1, 1 | version selection, see above |
| `TRAP_CHECK`, `TRAP_BASE` | 1, 0 | trap acceptance, reset value of `TRAPBASE` |

At the defaults, a CFI-method memory set is 512 × (30 + 30 + 12) bits. The
return stack is 32 words of 39 bits, held in flip-flops.

A 512-entry CFI table holds programs of up to about 500 branches, jumps,
calls and returns. From published SPEC CINT2000 counts, among those programs
only `mcf` (398 CFIs) would fit whole at the default size. Larger programs
need a larger `ENTRIES`, or tables reloaded over the bus for each part of
the program.

## Limits and departures

* **Permanent faults.** There is no retry limit. A permanent fault makes the
  CPU re-execute the same instruction forever. Watch `error_o` or
  `STATUS.bit1` from software if that matters.
* **Wrong path reaching the restart address.** After a restart request, the
  checker resumes at the first pair whose `pc_n` is the restart address. If
  the wrong path itself reaches that address before the CPU flushes it, the
  checker resumes early. This happens only when a corrupted fetch lands just
  below the restart address.
* **Return stack overflow.** More than `STACK_DEPTH` nested calls silently
  overwrite the oldest entries. The outermost returns then find the stack
  empty and are reported as underflow errors. Traps share the same stack.
* **Indirect jumps other than returns** are not supported. They must lie in
  unchecked code.
* **Traps and interrupts** are checked only as far as described above.
* **Signatures** exist only in the basic block checker. A signature error
  is found only at the end of the block.
* The entry encodings, the order of entries and how CUPC is saved on a call
  are this design's own. Any tool that builds the tables must follow the
  formats above.

## Files

| file | contents |
|------|----------|
| `rtl/cf_pkg.sv` | entry kinds, error causes, block kinds |
| `rtl/cf_checker_core.sv` | CFI-method decision logic and CUPC |
| `rtl/cf_dpram.sv` | two-port synchronous memory (checker side and bus side) |
| `rtl/cf_return_stack.sv` | return stack |
| `rtl/cf_apb_if.sv` | APB slave |
| `rtl/cf_checker.sv` | complete CFI-method checker unit |
| `rtl/cf_bb_checker.sv` | basic block method checker |
| `rtl/cfc_top.sv` | both checkers side by side |
| `tb/cf_tb_pkg.sv` | test programs and the table builder |
| `tb/cpu_pc_model.sv` | CPU model that produces the pairs, injects faults and performs restarts |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_cfc_top_full.sv` | end-to-end testbench at the default parameters |
| `tb/tb_cf_checker_sizes.sv` | the CFI-method checker with 1024, 2048 and 4096 entries, table placed at the top of each memory |

The CPU model runs three small programs:

* a loop with two branches and a jump;
* nested calls and returns;
* a return with an empty stack.

It follows SPARC delay-slot rules. It also takes random traps into a trap
table and returns from them. At random steps it flips an address bit
of the next fetch, follows the wrong path for a few cycles, and then checks
that the checker:

* flagged the right pair;
* gave the right restart address;
* let the program finish correctly after the restart.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/cf_pkg.sv tb/cf_tb_pkg.sv tb/tb_cfc_top_full.sv --top-module tb_cfc_top_full
./obj_dir/Vtb_cfc_top_full
```

Replace the testbench file and top module name to run another bench.
`tb_cfc_top` runs both checkers with `DELAY_SLOTS = 0`, so that the
basic block stall also occurs. It fails if any mechanism never occurred:

* re-execution;
* an empty-stack return;
* a taken branch;
* a branch that is not taken;
* a call and its return;
* a trap and the checked jump back;
* a stall;
* a matched block signature and a mismatched one.

The mismatch comes from a final directed run that corrupts one instruction
word.
