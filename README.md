# DIFT-enhanced accelerator: a hardware datapath with a shadow taint datapath

Dynamic information flow tracking (DIFT) marks untrusted data with *taint tags*,
carries those tags along with every computation, and stops the program when a
tainted value is used where it must not be: as a branch condition, or as an
address that could reach memory it should not. Processors can do this in
software or with a tag co-processor, but a fixed-function hardware accelerator
is a black box to them: if it drops the tags its outputs look trusted (missed
attacks), and if it is treated as untrusted everything it produces is tainted
(false alarms).

This RTL implements the TaintHLS answer to that problem: an accelerator whose
microarchitecture is *shadowed*. Next to every register sits a taint register,
next to every functional unit a propagation module that computes the tag of its
result, next to every multiplexer a tag multiplexer on the same select, next to
every local memory a taint memory on the same address. Values and tags move in
the same clock cycles, so DIFT costs area but, on-chip, no cycles. The
controller is extended only with checks: it reports the tag of every branch
condition and every external address to a security manager, which halts the
accelerator and raises a dedicated interrupt line when the security policy is
broken.

The package is a small but complete example of such an accelerator
(`dift_accel`) plus the library of building blocks it is made from. In the
TaintHLS method the base accelerator is produced by high-level synthesis from C;
here the kernel, its schedule and its binding are written by hand (see
"The example kernel"), and everything about the shadow logic follows the method.

## The shadow datapath

```
           value path                          tag path (shadow)
  cfg / memory / constants              parameter tags / memory tags / 0
           |                                         |
     [tagged_mux sel=S] ------------------ [same mux, same S]
           |                                         |
        adder  ----------(a, b values)---------> pm_add
           |                                         |
     [taint_reg we=E] -------------------- [tag register, same E]
```

Four rules keep the two paths consistent (file in brackets):

* **Registers** (`taint_reg`): every datapath register has a tag register of
  the granularity's width, written by the *same* write enable. A value and its
  tag therefore always have the same lifetime and can share registers the same
  way.
* **Functional units** (`pm_*`): every unit has a propagation module that sees
  the operand *values* as well as their tags. Values matter: `x & 0` is
  untainted whatever `x` is.
* **Multiplexers** (`tagged_mux`): the tag multiplexer has the same shape and
  select as the data multiplexer. Selects themselves are not tracked, because
  the controller only reaches a state after passing its security checks.
* **Chaining**: where the data path chains two units in one cycle (here the
  multiplier into the adder, and inside `mix_fn` the shifter into the XOR
  unit) the propagation modules are chained the same way.
* **Submodules** (`mix_fn`): a called function becomes a submodule with its
  own small FSM and datapath, and the shadow logic is built inside it the same
  way. Its interface gets one extra tag port per parameter and one for the
  return value, so the caller passes tags in and takes the result's tag back
  exactly as it does with a functional unit.

Constants enter the tag path as 0 (untainted). Parameters from the host enter
with tags that the host writes; those tag registers reset to all ones, so an
accelerator started without its tags set treats its inputs as tainted.

## Tag granularity and the propagation rules

A tag can cover one bit, one byte or a whole variable (`dift_pkg::gran_e`,
tag width TW = W, W/8 or 1). The choice is a parameter (`GRAN`) of every module
that stores or computes tags; the whole accelerator uses one granularity.

A propagation rule is **sound** when every result bit that some assignment of
the tainted input bits could change is marked tainted, and **exact** when
nothing else is. The rules below are all sound; those marked exact are also
precise. They are this design's own choices of library content (the method
leaves the rules to a pluggable library).

| module | bit level | byte level | variable level |
| --- | --- | --- | --- |
| `pm_logic` AND/OR/XOR | exact gate-level rules: AND `at&bt | at&b | bt&a` (a known 0 forces 0), OR dual with known 1s, XOR `at|bt` | OR of tags per byte | OR |
| `pm_add` add/sub | bound each operand by its tainted-bits-0 and tainted-bits-1 value; tag = `(min_a+min_b) ^ (max_a+max_b) | at | bt`; subtraction as `a + ~b + 1` | byte k tainted if any byte ≤ k of either operand is (carries go up) | OR |
| `pm_mul` | bit k tainted when a tainted bit ≤ k of one operand can meet a possibly-1 bit ≤ k of the other; a known-zero operand gives an untainted product | prefix OR as for add | OR |
| `pm_shift` | tag moves with the data; a tainted amount taints everything | tag spread to bits, shifted, folded back | same, folded to one bit |
| `pm_cmp` (1-bit result) | exact: EQ/NE tainted when untainted bits agree and something is tainted; LTU/GEU tainted when `min_a < max_b` and `max_a >= min_b` | same rule on byte-expanded masks (exact for byte tags) | OR |

Two helpers convert between tag and bit mask: `tag_expand` (spread each tag
bit over its group) and `tag_reduce` (a group is tainted when any of its bits
is).

The trade-off is visible in the tests: with bit tags, a pointer whose lowest
bit is tainted can still pass a check on its upper bits; with byte tags the
adder conservatively taints every byte above a tainted one; with a variable tag
any taint covers the whole word.

## Security checks in the controller

`security_manager` receives, in the same cycle the controller would act:

* each **conditional transition** (`br_valid`, `br_id`) with the tag of its
  condition from `pm_cmp`. It is a violation if the tag is set and either the
  policy checks every transition (`br_check_all`) or this transition is marked
  critical (`br_critical[br_id]`);
* each **external memory request** (`mem_valid`, `mem_id`) with the taint of
  its address spread to one bit per address bit. It is a violation unless the
  operation is marked benign (`mem_benign[mem_id]`) when any tainted address
  bit is also in `mem_check_mask`. All ones is *strict* protection; only the
  upper bits is *permissive* protection (the access may move within a region,
  but not far). A pointer marked critical (`mem_critical[mem_id]`) is checked
  on every address bit whatever the mask; benign wins if a pointer is marked
  both.

`violation` is combinational: the controller goes to its halt state *instead*
of taking the transition or issuing the request. The interrupt `irq` is set
and holds the cause (branch or memory) and the event id until the host writes
CTRL.clear_irq, which also returns the controller to idle.

## Memories

**Scratchpad** (`taint_spm`): one access per cycle, read data and read tag one
cycle later, exactly the timing the memory has without tags. Two layouts:

* `SHARED = 0` (default): a second memory of DEPTH × TW bits for the tags,
  addressed by the same address.
* `SHARED = 1`: one dual-port memory of 2·DEPTH words; the first port reaches
  the data area, the second the tag area at `DEPTH + addr` (DEPTH a power of
  two, TW ≤ W). This fits when the schedule makes at most one memory operation
  per cycle, so the second port is free for the tag.

**External memory**: the accelerator's memory interface carries a tag with each
request and response. `TAINT_BUS = 1` brings these tag lines out directly
(`ext_wtag`, `ext_rtag`), as a dedicated taint bus. `TAINT_BUS = 0` (default)
inserts `taint_serializer`, for systems whose bus has no room for tags:

* each operation becomes two bus transactions, data then tag;
* with `INTERLEAVE = 1` (default) tags are interleaved with data: word
  address `a` becomes bus address `2a` for the data and `2a+1` for the tag
  (the top address bit is lost);
* with `INTERLEAVE = 0` tags live in their own region: the data stays at `a`
  and the tag goes to `TAG_BASE + a` (default `TAG_BASE` is the upper half of
  the address space, so software must keep data below it);
* a tag travels in the low TW bits of a bus word;
* the data transaction is offered in the cycle the request arrives and the
  response is returned in the cycle the tag arrives, so an operation costs
  exactly two bus transactions and nothing more.

Both sides use a valid/ready request and one response per request, writes
included, so the controller simply waits for the response: the rest of the
design does not know whether the serializer is present. The serializer is the
only place where DIFT adds cycles.

## The example kernel

`dift_accel` runs this function, written as an HLS tool would schedule it:

```c
uint32_t kernel(const uint32_t *src, uint32_t *dst, uint32_t n, uint32_t key) {
    uint32_t buf[DEPTH];                       /* local scratchpad */
    for (i = 0; i < n; i++) buf[i] = src[i] ^ key;
    acc = 0;
    for (i = 0; i < n; i++) acc = acc * 31 + buf[i];
    r = mix(acc);                              /* mix(x) = x ^ (x >> 16) */
    *dst = r;
    return r;
}
```

`i` indexes the scratchpad modulo DEPTH. One adder is shared between the load
address `src + i`, the increments and the accumulation, through operand
multiplexers (and their tag twins). The controller's states and the units they
use:

| state | work | checks |
| --- | --- | --- |
| L1_CHK | `i < n` | branch id 0 |
| L1_ADR | `addr = src + i` (adder) | |
| L1_REQ | external read of `addr` | memory id 0 |
| L1_WT | `v = data ^ key` on the response (XOR) | |
| L1_WR | `buf[i] = v`, `i = i + 1` (adder) | |
| L2_CHK | `i < n` | branch id 1 |
| L2_RD | read `buf[i]`, `i = i + 1` | |
| L2_ACC | `acc = acc * 31 + buf` (multiplier chained into adder) | |
| FIN | call `mix(acc)`: pass `acc` and its tag, pulse `start` | |
| FIN_WT | on `done`, `r` = return value and return tag | |
| ST / ST_WT | external write of `r` with its tag to `dst` | memory id 1 |
| DONE | return value and tag to the registers, `done` pulse | |
| HALT | wait for the interrupt to be cleared | |

Cycle cost: the first loop takes 4 cycles plus one external read per element,
the second loop 3 cycles per element, the end (call and store) 5 cycles plus
one external write. Inside `mix_fn` the parameter is registered on `start`, the
shifter chained into the XOR unit (with chained `pm_shift` and `pm_logic`)
fills the return register in the next cycle, and `done` follows one cycle
later.

With the test memory model (a bus transaction occupies 5 cycles) an element
costs 11 cycles with a dedicated taint bus and 16 with the serializer.

## Programming model

Configuration bus: `cfg_we`, `cfg_addr` (word address), `cfg_wdata`;
`cfg_rdata` is a combinational read. Register map (`dift_pkg`):

| addr | name | use |
| --- | --- | --- |
| 0 | CTRL | write: bit 0 start, bit 1 clear interrupt (and leave halt) |
| 1 | STATUS | bit 0 busy, 1 done, 2 irq, [5:4] cause (1 branch, 2 memory), [15:8] event id |
| 2, 3 | SRC, DST | word addresses in external memory |
| 4, 5 | N, KEY | element count, key |
| 6 | RET | return value |
| 8–11 | SRC_TAG, DST_TAG, N_TAG, KEY_TAG | parameter tags (low TW bits); reset to all ones |
| 12 | RET_TAG | tag of the return value; resets to all ones |
| 16 | BR_POL | bit 0 check every tainted transition, [15:8] critical transitions |
| 17 | MEM_POL | address bits whose taint is a violation (all ones = strict) |
| 18 | MEM_BENIGN | bit k: memory operation k is never checked |
| 19 | MEM_CRIT | bit k: memory operation k is critical, every address bit checked |

Reset policy: every tainted transition is checked and memory protection is
strict. A typical run: write the parameters and their tags, the policy, then
CTRL = 1; wait for `done` or `irq`; read RET and RET_TAG.

## Parameters

| module | parameter | default | meaning |
| --- | --- | --- | --- |
| `dift_accel` | `GRAN` | `GRAN_BIT` | tag granularity |
| | `W` | 32 | data and address width |
| | `DEPTH` | 256 | scratchpad words |
| | `TAINT_BUS` | 0 | 1: tag lines on the external port; 0: serializer |
| | `SPM_SHARED` | 0 | scratchpad layout, see above |
| | `INTERLEAVE` | 1 | serializer tag layout: 1 interleaved, 0 separate region |
| | `TAG_BASE` | `32'h8000_0000` | start of the tag region when `INTERLEAVE = 0` |

None of these numbers come from the TaintHLS evaluation, which reports only
results for generated benchmark accelerators (CRC, AES, BFS and Viterbi);
those accelerators are not part of this package.

## Files

* `rtl/dift_pkg.sv` — granularity, operation and cause enums, register map,
  tag-width functions.
* `rtl/dift_accel.sv` — the top level: controller, datapath, wiring.
* `rtl/taint_reg.sv`, `rtl/tagged_mux.sv` — register and multiplexer pairs.
* `rtl/pm_add.sv`, `pm_logic.sv`, `pm_shift.sv`, `pm_cmp.sv`, `pm_mul.sv` —
  propagation library; `tag_expand.sv`, `tag_reduce.sv` — helpers.
* `rtl/taint_spm.sv`, `rtl/taint_serializer.sv` — memories and external port.
* `rtl/security_manager.sv`, `rtl/cfg_regs.sv` — checks and host interface.
* `rtl/mix_fn.sv` — the called function `mix` as a submodule with tag ports.
* `tb/tb_<module>.sv` — one self-checking testbench per module;
  `tb/tb_dift_accel_env.sv` and `tb/ext_mem_model.sv` are shared by the
  top-level tests.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog.

* Propagation modules are checked against the definition of taint: the
  testbench tries every assignment of the tainted input bits (or a large
  sample) and compares the set of result bits that change with the module's
  tag, requiring equality for the exact rules and coverage for the others.
* `tb_dift_accel` runs four configurations side by side (bit tags with
  serializer; byte tags with taint bus and shared scratchpad; variable tags with
  taint bus; bit tags with serializer, tags in a separate region and a randomly
  stalling bus). Each run is
  compared with a software model of the kernel, and the return tag is checked
  to cover every result bit that changes when the tainted inputs are varied. It
  exercises and counts: parameters left tainted by default, tainted loop bounds
  with critical and non-critical transitions, tainted pointers under strict,
  permissive, critical-pointer and benign settings, interrupt clear and restart, two bus
  transactions per operation with the serializer, cycle counts linear in n and
  unchanged by taint, and a serializer overhead of exactly one bus transaction
  per element.
* `tb_dift_validation` repeats the kernel on 100 random combinations of data
  and taint values for each granularity (bit tags with the serializer, byte
  and variable tags with the taint bus) and compares the return tag and the
  tag stored in external memory bit for bit with a software taint-tracking
  model that applies the same rules, as software DIFT would; it also checks
  the return values. Pointers and the element count stay untainted there, so
  no run is halted.
* `tb_taint_serializer` checks both external tag layouts and the cost of
  exactly two bus transactions per operation.
* `tb_dift_accel_full` runs the top level with every parameter at its default
  for n = 256 (the full scratchpad).

Simulating with Verilator 5 (two-state; the testbenches initialise what they
read):

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dift_pkg.sv tb/tb_dift_accel.sv --top-module tb_dift_accel
./obj_dir/Vtb_dift_accel
```

Replace `tb_dift_accel` with any other testbench name to run it.

## Limits and departures

* The base accelerator is hand-written, not generated from C; there is one
  kernel, with one called function, and one local memory. The chain of local memories with run-time
  pointer resolution that HLS-generated memory systems use is not modelled: the
  controller addresses its one scratchpad and the external port directly.
* Scratchpad addresses are not checked for taint; only external addresses are.
* The propagation rules for add, multiply and shift are sound but not exact at
  bit level; they over-taint in some cases.
* With the serializer, external addresses lose their top bit to the
  interleaving (or must stay below `TAG_BASE` with a separate region), and
  tags occupy as much external memory as data; no tag compression is done.
* The host processor, the system bus and the DRAM are outside this package;
  `tb/ext_mem_model.sv` is a behavioural stand-in for the memory.
* Lint notes: `ext_wtag` is constant 0 when the serializer is used (the tag
  travels on the data lines); `pm_shift` uses only the low log2(W) bits of its
  amount operand.
