# CFIX: a control-flow integrity unit for a SPARC V8 pipeline

Code-reuse attacks (return-oriented and jump-oriented programming) work by
overwriting a return address or a function pointer, so that a `ret` or an
indirect call lands somewhere the program never meant to go. This design
stops both inside the processor core. Returns are checked against a
**shadow stack**. Indirect calls are checked against a **label**. Both live
in small memories that are not memory-mapped, so a software bug cannot
overwrite them. The compiler output is instrumented with six new
instructions. Each one fills a slot the SPARC V8 code already has, mostly
the delay slot after a call or return. In the host pipeline each takes the
time of a NOP.

The RTL is the CFI unit itself: a pipeline that runs beside a 7-stage
integer unit (a Leon3-class core), plus its memories. The host core is not
included. Its side of the interface is described below, and the
testbenches model it.

## The six instructions

| instruction | where it is placed | what the unit does |
|---|---|---|
| `SetPC` | delay slot of a direct `call` | pushes its own PC onto the shadow stack |
| `SetPCLabel L` | delay slot of an indirect call (`jmpl`) | pushes its own PC, loads the 18-bit label `L` into the Label Register, and demands that the next instruction is a `CheckLabel` |
| `CheckLabel L` | first instruction of every function that may be called indirectly | compares `L` with the Label Register, then clears the register |
| `CheckPC` | delay slot of a return (`retl`) | checks that the return target (its nPC) equals top-of-stack + 4, then pops |
| `LJCFI` | delay slot of the call to `longjmp` | enters the long-jump state |
| `SJCFI S` | the instruction a `setjmp` call returns to | saves the stack depth under the 8-bit label `S`; in the long-jump state it restores that depth instead |

The pushed value is the PC of the `SetPC` itself. The call is one word
earlier and the legitimate return point is one word later, which is why
`CheckPC` compares against top + 4:

```
caller:  0x04  call  f          callee f:  0x100 ...
         0x08  setpc    <- pushed 0x08     0x134 restore
         0x0C  ...      <- return here     0x138 retl
                                           0x13C checkpc   (nPC = 0x0C = 0x08 + 4)
```

A `restore` that used to sit in the return's delay slot has to move above
the return. `ret` then becomes `retl`. Tail-call elimination breaks the
call/return pairing and must be turned off when compiling.

### Encoding

The six instructions use the SPARC V8 format-2 space with `op2 = 101`,
which the base ISA does not use. The fields are:

```
 31 30 | 29..25 | 24..22 | 21..18  | 17 ............ 0
  0  0 | ignored|  1 0 1 | sub-op  | label (SJCFI: bits 7..0)
```

| sub-op | instruction |
|---|---|
| 1 | SetPC |
| 2 | SetPCLabel |
| 3 | CheckPC |
| 4 | CheckLabel |
| 5 | SJCFI |
| 6 | LJCFI |

The label widths (18 and 8 bits) are part of the design. The opcode
values are this implementation's choice. `cfix_pkg::cfi_encode()` builds
the words.

## Shadow memory elements

| element | size | module |
|---|---|---|
| Shadow stack | 128 × 32 bits | `shadow_stack` |
| Recursion bitmap | 128 bits, one per stack entry | `shadow_stack` |
| Label Register | 32 bits, holds the 18-bit label zero-extended | `label_check_unit` |
| Setjmp label memory | 128 × 8 bits, holds stack depths | `sjlj_unit` |

Only the CFI instructions can reach these elements. They use neither the
data cache nor a bus. Reads are combinational and writes take effect at
the next clock edge.

## Forward edge: the indirect-call state

`label_check_unit` is a two-state machine: NORMAL and INDIRECT_CALL.

* `SetPCLabel` loads the label and enters INDIRECT_CALL.
* In INDIRECT_CALL, any real instruction other than `CheckLabel` raises a
  **Flow** violation: the call went to a function that is not a legal
  indirect target. Annulled slots and pipeline bubbles do not count.
* `CheckLabel` raises a **Label Mismatch** if its label differs from the
  register. It also raises one if the register is zero, because zero is
  never used as a label.
* After every `CheckLabel` the register is cleared. One `SetPCLabel`
  therefore allows exactly one call.
* A function may be reached both indirectly and by a direct `call`. On the
  direct path the `CheckLabel` follows a `SetPC`, and that `SetPC`
  suppresses the check.

## Backward edge, and the recursion optimisation

The stack is small and fixed, so a deep recursion through one call site
would fill it with copies of the same address. To avoid that, before every
push the unit compares the pushed PC with the top entry. If they are
equal, the unit sets the top entry's **recursion bit** instead of pushing.

This makes `CheckPC` more involved. It uses the top entry T, which has
recursion bit r(T), and the entry below it, N:

1. The stack is empty → **Empty** violation.
2. T + 4 = nPC → the return is accepted. T is popped only if r(T) = 0. A
   recursive entry stays, because more returns to the same site may
   follow.
3. T + 4 ≠ nPC and r(T) = 1 → the recursion has unwound completely. T is
   discarded and the return is compared with N:
   * if N + 4 = nPC, the return is accepted and N is popped as well,
     unless N is also recursive;
   * otherwise → **PC Mismatch**.
4. Otherwise → **PC Mismatch**.

For example, suppose `main` calls `r` from site A, and `r` calls itself
from site B five times. The stack then holds `[A, B*]`, where `*` marks the
recursion bit. Five returns land at B + 4 and leave `B*` in place. The
sixth return, to A + 4, misses B, discards it, matches A and pops it.

Consequence: the bitmap does not count the depth. Inside a recursion
through B, a return to B + 4 is accepted any number of times. This is the
price of a bounded stack.

A push onto a full stack raises **Full**. Full is an error, not a CFI
violation: the stack is too small for the program.

## setjmp / longjmp

A `longjmp` unwinds many frames at once. The shadow stack has to jump with
it, and the unit must not search the stack for a matching address.

* `SJCFI S` sits where `setjmp` returns to. Outside the long-jump state it
  stores the current stack depth in entry `S`.
* `LJCFI` is in the delay slot of the call to `longjmp`. It sets the
  long-jump flag. Any number of instructions may then run.
* `longjmp` lands on the same `SJCFI S`. Because the flag is set, the
  `SJCFI` loads the stack depth from entry `S`, cuts the stack back to
  that depth, and clears the flag.

The entries above the restored depth stay in the memory but are dead. They
could only be used again by raising the depth, and a push overwrites each
one first.

The memory has 128 entries, so the low 7 bits of the 8-bit label select
the entry. Labels that differ only in bit 7 share an entry.

## Pipeline and timing

```
host:  FE  DE          RA   EX         ME              XC              WR
CFI:       label stage  -   PC stage   memory stage    exception stage
           (decode)         (nPC in)   (all state)     (xc_trap)
```

`cfix_unit` takes the instruction as it leaves the host's decode stage
(`de_valid`, `de_inst`, `de_pc`). It decodes the instruction and carries
it down its own registers.

* In the PC stage it takes the instruction's nPC (`ex_npc`) from the
  host's execute stage. For a `CheckPC` in a return's delay slot, the nPC
  is the return target.
* In the CFI memory stage the three units act on the instruction, strictly
  in program order.
* The result is registered. If there is a violation, `xc_trap` is raised
  together with `xc_cause` and `xc_pc`, in the cycle the instruction is in
  the host's exception stage. The host turns `xc_trap` into its
  illegal-instruction trap, which halts the core (error mode).

The timing rules for the host are:

* An instruction presented in cycle *t* is in the exception stage at
  *t* + 4, provided `hold` is low throughout.
* `ex_npc` must carry the nPC of the instruction presented two cycles
  earlier.
* `ex_annul` marks that same instruction as annulled, for example an
  annulled delay slot. An annulled instruction does not act, and it does
  not count as the instruction that must follow a `SetPCLabel`.
* `hold` freezes every stage.
* `flush` is the host's own trap. It annuls the instructions in decode,
  register access and execute, and stops the one in the memory stage from
  changing any CFI state.
* A CFI trap does the same by itself. Nothing behind a violating
  instruction takes effect, and the violating instruction also leaves the
  stack and the setjmp memory unchanged.

The unit never stalls the host. A CFI instruction therefore costs exactly
one issue slot, like a NOP. In the worst case, a loop that does nothing
but indirect-call an empty function, 3 of every 7 instructions are CFI
instructions. Real programs were reported to slow down by under 1 % on
average (6.6 % for the worst loop). The area overhead was reported as
about 2.5 % of a Leon3's registers and LUTs.

### Departures from the described pipeline

The original design spreads the work of one instruction over several
stages:

* `CheckPC` reads the top in register access, compares in execute, and
  makes the second, recursive comparison in memory access.
* `CheckLabel` compares in execute.
* `SJCFI` reads its memory in execute.

Here all reads, comparisons and writes are made in the one CFI memory
stage. The tightly coupled pairs (`SetPCLabel` followed at once by
`CheckLabel`, or a `SetPC` closely followed by a `CheckPC` in a leaf
function) then need no forwarding paths. A second read port on the stack
(top and next) replaces the extra cycle of the recursive comparison. None
of this changes what the host sees: the exception still arrives in the
exception stage of the offending instruction.

Other choices of this implementation:

* the opcode values, described under Encoding above;
* the host handshake (`de_valid`, `ex_npc`, `ex_annul`, `hold`, `flush`);
* asynchronous active-low reset, which empties every element and clears
  every flag;
* when one instruction has two causes, Flow is reported;
* a violating instruction changes no state;
* an `SJCFI` restoring from a label that was never saved restores depth 0.

## Files

| file | contents |
|---|---|
| `rtl/cfix_pkg.sv` | widths, `cfi_op_e`, `violation_e`, the in-flight slot struct, event struct, `cfi_encode()` |
| `rtl/cfi_decoder.sv` | instruction recognition and label extraction |
| `rtl/shadow_stack.sv` | stack, recursion bitmap, index |
| `rtl/backward_edge_unit.sv` | SetPC/SetPCLabel push with recursion, CheckPC check; Full, Empty, PC Mismatch |
| `rtl/label_check_unit.sv` | Label Register, indirect-call state; Flow, Label Mismatch |
| `rtl/sjlj_unit.sv` | setjmp label memory, long-jump flag |
| `rtl/cfix_unit.sv` | top: the CFI pipeline and the host interface |

Parameters of `cfix_unit`:

| parameter | default | meaning |
|---|---|---|
| `STACK_DEPTH` | 128 | shadow-stack entries |
| `SJ_ENTRIES` | 128 | setjmp label memory entries |
| `LREG_W` | 32 | Label Register width |
| `RECURSION_OPT` | 1 | 0 = push every call, no recursion bits |
| `SJLJ_SUPPORT` | 1 | 0 = no setjmp memory; `SJCFI` and `LJCFI` do nothing |

`stack_index` is `$clog2(STACK_DEPTH+1)` bits wide. With both switches at 0 the unit is the smaller first configuration of
the design. That configuration was reported at about a quarter of the area
overhead: 0.65 % registers and 0.81 % LUTs, against 2.52 % and 2.55 %. The
`events` output
gives one-cycle strobes for performance counters: push, recursion mark,
pop, recursive skip, suppressed check, label match, setjmp save and
restore, long jump.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each unit has its own testbench,
`tb/tb_<module>.sv`, which drives random commands and compares the unit
with an independent model. The system-level tests are:

* `tb/tb_cfix_unit.sv` runs at the default sizes. A host model generates
  instrumented traces: call trees with direct and indirect calls, direct
  calls into indirect targets, recursion, and setjmp/longjmp. It issues
  them with random stalls, bubbles and flushes, and a directed test
  annuls instructions in execute. A reference model checks
  the trap, cause, PC and cycle of every instruction. Attack traces
  trigger each of the five violations:
  * a tampered return address;
  * a wrong label;
  * a missing `CheckLabel`;
  * a return from an empty stack;
  * 129 nested calls.
* `tb/tb_cfix_reduced.sv` runs the unit with both switches off. A
  recursion must then push one entry per call. A longjmp must leave the
  stack as it is.
* `tb/tb_indirect_call_loop.sv` runs 2000 iterations of the worst-case
  indirect-call loop. It checks that no trap occurs and that the loop
  takes exactly 7 cycles per iteration.

To run one of them with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cfix_pkg.sv tb/tb_cfix_unit.sv --top-module tb_cfix_unit -o sim
./obj_dir/sim
```

All tests pass, and each takes well under a second.

## Limits

* The core is not included. Connecting the unit to a real Leon3 takes the
  glue that supplies the interface above: PC and nPC per stage, the annul
  state, and the trap input of the exception stage.
* Only one shadow stack exists, so there is no support for several
  processes or threads. A context switch would need the stack saved and
  restored, or one stack per process.
* The design was checked in simulation only. Nothing was synthesised for
  an FPGA, and no instrumented compiler output was run.
