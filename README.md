# CSDrop: a hardware shadow stack built into instruction decoding

Return-oriented programming (ROP) overwrites return addresses on the stack.
Every `ret` then jumps into a short piece of existing code (a "gadget") that
ends in another `ret`. A chain of gadgets can compute anything without
injecting a single instruction. CSDrop stops this inside the processor.
When a program calls a function, the core also saves the return address in a
second stack that software cannot write: the **shadow stack**. When the
function returns, the address on the user stack must agree with the saved
copy, or the return is refused.

The mechanism hides in the decoder. x86 instructions are translated into
micro-ops, and with *context-sensitive decoding* the translation of an
instruction depends on a decoding **context** (`ctx`) as well as on the
micro-op program counter (`microPC`). CSDrop gives `call` and `ret`
translations that contain extra micro-ops. Programs need no recompiling and
cannot see the change.

Three refinements make the idea usable:

* **Access control.** The shadow stack is ordinary memory. A range check next
  to the data TLB refuses every data access into the live shadow stack unless
  the access carries a privilege bit. Only the plug-in's own micro-ops carry
  that bit.
* **Non-local returns.** After `longjmp`, the top of the shadow stack no longer
  matches the user stack. The check therefore pops entries until one matches.
  Each entry holds the caller's **stack pointer** as well as the return
  address, and both must match. This also catches a jump into the middle of a
  function, which a check on the address alone would miss.
* **Speed.** The core's return address stack (RAS) already predicts return
  targets. A return whose prediction equals the address on the user stack is
  trusted, and the shadow stack pointer just moves past the entry. Memory is
  read only after a RAS miss.

This repository holds synthesizable SystemVerilog for the plug-in. The x86
core around it is not included. The plug-in connects to that core through a
macro-op input, a micro-op output, an access-check port and a memory port.

## How a call and a return travel through the plug-in

```
 macro-ops ──► csd_dispatcher ──► csd_decoder ──► micro-ops to the core's back end
 (call/ret/     MSR, ctx choice,    │  csd_uop_rom (kind, ctx, microPC)
  other)        RAS push / pop      │
                   │                ▼ plug-in micro-ops (stall until executed)
                  ras            csd_commit_ctrl ──► squash / re-decode / rop_fault
                                    │
                                 ss_engine (+ ss_ptr_regs: top = t10, bottom = t11)
                                    │ privileged requests
                                 ss_access_ctrl ──► memory port
 core data accesses ──► ss_access_ctrl ──► acc_fault
```

### Contexts and micro-op sequences

The operating system picks the mode through a model-specific register (MSR):
bit 0 turns protection on and bit 1 turns RAS assistance on. The dispatcher
turns the MSR into a context for each macro-op. The decoder switches a `ret`
to context 2 by itself after a RAS miss.

| ctx | meaning | `call` | `ret` |
|---|---|---|---|
| 0 | protection off | `SUBI_SP, ST_RA, WRIP_TGT` | `LD_RA, ADDI_SP, WRIP_RA` |
| 1 | protection on, RAS assisted | `SS_PUSH`, then as ctx 0 | `LD_RA, ADDI_SP, RAS_CMP, WRIP_RA` |
| 2 | re-decode after a RAS miss | as ctx 1 | `LD_RA, ADDI_SP, SS_CHECK, WRIP_RA` |
| 3 | protection on, no RAS assistance | as ctx 1 | as ctx 2 |

`SS_PUSH`, `RAS_CMP` and `SS_CHECK` are executed by the plug-in. They never
reach the back end. The decoder holds each one until `csd_commit_ctrl` says
it is done. This is an in-order simplification, explained under
"Departures" below. Every other micro-op goes out on the `uop` port with its
`ctx` and `microPC`, one per cycle while `uop_ready` is high. Macro-ops other
than `call` and `ret` produce a single `REGULAR` micro-op, which means "the
core's regular decoder handles this one".

### The return check, step by step

1. **Dispatch.** When the `ret` is accepted, the RAS is popped. Its
   prediction travels with the macro-op.
2. **`RAS_CMP`** (ctx 1) compares the prediction with `ret_ra`, the address
   the core found on the user stack.
   * *Hit:* the return is trusted. The engine does a **conceptual pop**: the
     shadow stack pointer moves up one entry and no memory is accessed.
   * *Miss:* there was a RAS overflow, a non-local return or an attack.
     `uop_squash` tells the core to drop the micro-ops it already received for
     this `ret`. The decoder then restarts the same `ret` at microPC 0 in ctx
     2.
3. **`SS_CHECK`** (ctx 2, or ctx 3 on every return) runs the *enhanced
   repetitive check*. While the shadow stack is not empty, the engine reads
   the top entry, pops it, and compares the entry with (`ret_ra`, `sp`). If
   both words match, the check passes. Entries above the match were left
   behind by a `longjmp`, and the check has already discarded them. If the
   stack runs empty first, the return is an attack: the rest of the `ret` is
   dropped, and `rop_fault` pulses with the `ret`'s address in
   `rop_fault_pc`.

Worked example, the classic `setjmp`/`longjmp` program:
`main → first → setjmp` (returns), then `first → second → third → longjmp`.
`longjmp` jumps back into `first` without executing a `ret`, so the entries
pushed by `second`, `third` and `longjmp` stay on the shadow stack. When
`first` returns to `main`, the RAS predicts the stale `longjmp` return and
misses. The check then pops three stale entries, matches `first`'s entry
(address *and* stack pointer) and lets the return proceed. A corrupted
`setjmp` buffer that resumes execution part-way into a function leaves `rsp`
at the wrong place. The return address then still matches an entry, but the
stack pointer does not, and the check fails.

### What "stack pointer" means here

The plug-in stores and compares the stack pointer as the caller sees it:

* for a `call`, `rsp` *before* the call pushes its return address;
* for a `ret`, `rsp` *after* the ret has popped its return address.

For a matching call/return pair, these two values are equal. The core supplies
the value in the `sp` field of each macro-op.

## Shadow stack layout and protection

* The OS maps the region and pulses `ss_init` with `ss_base`, the highest
  address + 1. `ss_top` (logical register t10) and `ss_bottom` (t11) are both
  loaded with `ss_base`.
* The stack grows downward. An entry is 16 bytes: the return address at
  `[top]` and the stack pointer at `[top+8]`. A push writes
  `[top-16]` and `[top-8]`, then lowers `top`. The stack is empty when
  `top == bottom`.
* The pointers belong to the process, like any other register. On a
  context switch the OS saves `ss_top`/`ss_bottom` and later restores them
  with `ss_load`, `ss_load_top` and `ss_load_bottom`. The entries themselves
  stay in memory, so nothing else needs to be copied.
* The region intended for it is between the user half and the kernel half of
  the x86-64 address space. It is as large as the user stack (8 MB). Because
  every x86-64 call frame is at least 16 bytes, the user stack overflows
  before the shadow stack does. The plug-in enforces no size limit of its own.
* `ss_access_ctrl` refuses (`acc_fault`) any access of `acc_size` bytes at
  `acc_addr` that overlaps `[ss_top, ss_bottom)`, unless `acc_priv` is set.
  The check is off while protection is off. The engine's own requests pass
  through a second checker instance. They always carry the privilege, so
  `ss_priv_fault` firing would mean the engine has a bug.

## Top-level interface (`csdrop_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `msr_we`, `msr_wdata[1:0]` | in | MSR write: bit 0 enable, bit 1 RAS assistance (reset: 0) |
| `ss_init`, `ss_base` | in | process start: map an empty shadow stack below `ss_base` |
| `ss_load`, `ss_load_top`, `ss_load_bottom` | in | context switch: restore a saved pointer pair |
| `mop_valid`, `mop`, `mop_ready` | in/in/out | macro-ops (`mop_t`: kind, pc, next_pc, target, sp, ret_ra) |
| `uop_valid`, `uop`, `uop_ready` | out/out/in | micro-ops for the back end (`uop_t`: op, last, ctx, microPC, pc) |
| `uop_squash` | out | drop the micro-ops already issued for the current `ret` |
| `acc_valid`, `acc_addr`, `acc_size`, `acc_priv`, `acc_fault` | in…/out | range check of core data accesses, same-cycle answer |
| `mem_req_valid/ready`, `mem_we`, `mem_addr`, `mem_wdata`, `mem_rvalid`, `mem_rdata` | | engine's memory port: valid/ready requests, one read outstanding, 64-bit words |
| `rop_fault`, `rop_fault_pc`, `rop_detected` | out | attack: 1-cycle pulse, address of the `ret`, sticky flag |
| `ss_priv_fault` | out | an engine request was refused (never expected) |
| `ss_top`, `ss_bottom` | out | shadow stack pointers |
| `cnt_used_ras`, `cnt_ras_incorrect`, `cnt_ss_checks`, `cnt_ss_pops` | out | returns checked with the RAS, RAS misses, full checks, entries popped by checks |

Parameters: `RAS_DEPTH` (16) and `CW` (32, counter width). The package
`csdrop_pkg` fixes 64-bit addresses, 4 contexts and 6 micro-op slots per
macro-op.

Timing, for a macro-op accepted while the decoder is idle:

* Each back-end micro-op takes one cycle while `uop_ready` is high.
* `SS_PUSH` takes two accepted memory writes plus about two cycles.
* `RAS_CMP` takes about two cycles on a hit and is answered in the same cycle
  on a miss.
* `SS_CHECK` costs two memory reads per entry examined.
* One idle cycle separates consecutive macro-ops.

## Files

| file | block |
|---|---|
| `rtl/csdrop_pkg.sv` | shared types: macro-op and micro-op records, contexts, opcodes |
| `rtl/csdrop_top.sv` | the plug-in |
| `rtl/csd_dispatcher.sv` | MSR, context choice, RAS push/pop |
| `rtl/ras.sv` | return address stack, circular, oldest entry lost on overflow |
| `rtl/csd_decoder.sv` | micro-op sequencer with re-decode and kill |
| `rtl/csd_uop_rom.sv` | translation table (kind, ctx, microPC) → micro-op |
| `rtl/csd_commit_ctrl.sv` | executes plug-in micro-ops, squash/re-decode/fault, statistics |
| `rtl/ss_engine.sv` | push, conceptual pop, enhanced repetitive check |
| `rtl/ss_ptr_regs.sv` | shadow stack pointer and frame pointer |
| `rtl/ss_access_ctrl.sv` | shadow stack range check for the TLB path |
| `tb/phys_mem_model.sv` | simulation-only memory with latency and random back-pressure |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Departures and open points

The plug-in's behaviour follows a published design that was evaluated in a
cycle-level simulator rather than as RTL. Several points were therefore left
open, and this implementation settles them as follows:

* **In-order execution of plug-in micro-ops.** The original design lets the
  `ret` execute speculatively and aborts it at commit on a RAS miss. Here the
  decoder stalls on each plug-in micro-op until it has executed. The squash
  therefore only covers the `ret`'s own earlier micro-ops.
* **RAS timing.** The RAS is updated when a macro-op is dispatched, not
  speculatively at fetch, and nothing repairs it after a mis-speculation. The
  depth of 16 is a choice; RAS sizes of tens to hundreds of entries are
  typical.
* **Abstract micro-ops.** `SS_PUSH`, `RAS_CMP` and `SS_CHECK` are single
  plug-in operations, not sequences of x86 load/store/compare micro-ops. The
  context numbering, MSR layout, entry layout and memory handshake are this
  design's own choices.
* **Not included.** The micro-op cache and the branch-predictor change that
  updates `microPC`/`ctx` during speculation are not included. The original
  design names them but does not describe them. Address translation, the
  core, and the operating system's mapping of the region are not included
  either.
* **Faults.** An attack is reported on `rop_fault`. Turning it into an
  exception is the core's job.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Expected values come from models inside the testbench.

* `tb_csdrop_top` runs the whole plug-in at its default parameters, with a
  program model that keeps its own user stack. The scenarios are:
  * nested calls;
  * recursion deeper than the RAS;
  * the `setjmp`/`longjmp` program;
  * a corrupted `setjmp` buffer;
  * the 3-, 4- and 5-gadget ROP payloads, with protection on (detected at the
    victim's `ret`) and off (every gadget reached);
  * the mode without RAS assistance;
  * shadow stack access control;
  * a context switch between two processes with separate shadow stacks;
  * re-initialisation at process start.

  It counts each mechanism and fails if one never happened: RAS hit,
  overflow miss with re-decode, multi-entry pop, stack-pointer catch, ROP
  catch, access fault, back-end stall, context switch.
* `tb_csdrop_random_programs` generates random programs: call trees up to
  40 deep with frames of varying size, `setjmp`/`longjmp`, and a final
  attack.
  * It runs twelve processes in all three modes.
  * It expects no fault on thousands of legitimate returns, including those
    after RAS overflow and non-local returns.
  * It expects a fault on every overwritten return address and on every
    return with a displaced stack pointer while protection is on, and no
    fault while it is off.
  * It prints the RAS hit rate.
* The unit testbenches compare against their own models:
  * a queue model for the RAS, the pointers and the engine;
  * a byte-by-byte model for the range check;
  * an exhaustive table for the ROM;
  * scripted executors for the decoder and the commit control.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/csdrop_pkg.sv tb/tb_csdrop_top.sv --top-module tb_csdrop_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_csdrop_top` with any other `tb_*` name to run a unit test.
