# Warp Engine: a parse-and-match front end for an FPGA eBPF executor

An eBPF/XDP program on a NIC usually begins with the same kind of work:
it reads header fields from the packet and compares them with constants.
Only after that does it use maps, helpers or rewrite the packet. A soft
eBPF processor on an FPGA runs at a few hundred MHz, so it spends much of
its time on that first part. The Warp Engine does that part in a fixed,
runtime-configured hardware pipeline placed in front of the processor
(hXDP in the original system). A compiler turns the program's parsing
branches into match-action rules. For each packet the engine then either:

* **decides the packet's fate itself.** It hands the executor an XDP return code
  (DROP, PASS, TX, ...) in R0, and the processor runs no instruction for
  that packet; or
* **restores a context.** It hands the executor a program counter, values for
  R1-R9 and some stack bytes. These are exactly the state the program would
  have reached after the skipped ("warped") instructions. The processor then
  resumes from that PC.

The engine never stalls by itself. It only holds when the executor does not
accept the next packet. It keeps packet order and adds a fixed 28-cycle
latency (112 ns at 250 MHz).

This repository holds synthesizable SystemVerilog for the engine,
with the sizes of the published configuration (128B chunk, 16B key, 12 key
extractor stages, 64 TCAM entries, 9 register and 10 stack extractor stages,
136B stack), and self-checking testbenches. The rule compiler and the eBPF
processor itself are not included. The engine's configuration ports take the
compiler's output, and its context and packet outputs go to the processor.

## The pipeline

```
 in_* (64B beats) ──► pkt_splitter ──► pkt_fifo ─────────────────────────────► pkt_* (to executor)
                          │ first 128B (chunk)
                          ▼
                   key_extractor (12 × ke_stage) ──► 16B key
                          ▼
                   match_action_unit: tcam ─► line number ─► action / reg-cfg / stack-cfg line_memory
                          ▼
                   context_restoration_unit
                     ├─ 9 × cr_stage (R1..R9) + delay
                     └─ 10 × cr_stage (stack image)
                          ▼
                   hand-off register ──► ctx_valid / ctx (to executor)
```

| stage | cycles | module |
|---|---|---|
| input register, chunk assembly | 2 | `pkt_splitter` |
| key extraction | 12 | `key_extractor`, `ke_stage` |
| TCAM compare, priority encode | 2 | `tcam` |
| memory read | 1 | `line_memory` ×3 in `match_action_unit` |
| context restoration | 10 | `context_restoration_unit`, `cr_stage` |
| hand-off | 1 | `warp_engine` |

The 28 stages add up to the published latency. The count runs from the
input beat that completes a packet's 128B chunk (its second beat, or its
only beat) to `ctx_valid`. One packet can enter every cycle, so a stream of
64B packets is taken at the clock rate.

**Stall.** Every register in the pipeline shares one enable,
`en = !ctx_valid || ctx_ready`. While the executor leaves a context
untaken, the whole pipeline holds and `in_ready` is low. Nothing inside the
engine ever waits for anything else. The packet beats go into `pkt_fifo`
in the cycle they enter the pipeline, and they leave it in order. So the
executor always finds the data of the packet whose context it has just
taken at the head of the FIFO. `in_ready` also drops when the FIFO is full.

## Key extraction

The engine knows nothing about headers. It only reads bit vectors at fixed
offsets of the first 128 bytes (the *chunk*). Each of the 12 stages has a
static configuration (`ke_cfg_t`):

| field | meaning |
|---|---|
| `op` | `EXT_NOP` (stage idle), `EXT_AND`, `EXT_OR`, `EXT_XOR` with the constant, or `EXT_CONST` (constant alone) |
| `len` | bytes to read, 0..2 |
| `off` | byte offset in the chunk |
| `konst` | 2B constant |

A stage writes its result into the key at the *running key offset* and then
advances that offset by `len`. The key is therefore the concatenation, in
stage order, of the fields the active stages read. Unused key bytes are
zero, and bytes past 16 are dropped. Multi-byte reads are little-endian:
the byte at `off` is the least significant, as an eBPF load on a
little-endian machine would see it. The key and the chunk keep wire order
(byte *i* at bits `8i+7:8i`). So an EtherType 0x86DD appears in the key as
byte 0 = 0x86, byte 1 = 0xDD.

## Match-action unit and its three memories

The TCAM holds 64 value/mask entries of 16B (a mask bit of 0 is "don't
care"). The lowest-numbered valid matching entry wins. The compiler numbers
rules by priority, longest match list first, and writes rule *p* to entry
*p*. The matched line number reads, in parallel, three memories with one
line per TCAM entry:

* **Action Memory** (`action_t`, 81 bits): `restore` (0 = forwarding
  decision, 1 = context restore), `r0` (64-bit R0 value, the XDP code for a
  forwarding decision) and `pc` (16-bit resume PC).
* **Registers Configuration Memory** (`reg_line_t`): 9 extractor entries.
* **Stack Configuration Memory** (`stack_line_t`): 10 extractor entries.

For a forwarding decision, only the action line goes on. Both configuration
lines are replaced by idle lines, so nothing is restored. On a **TCAM miss**
the packet leaves with `hit = 0`, `restore = 1`, `pc = 0` and nothing
restored. The executor then runs the whole program, which is always correct.
The document does not specify the miss case; this is this implementation's
choice.

## Context restoration — the subtle part

The configuration of the key extractor is the same for every packet. That
of context restoration is not: it depends on which rule the packet matched.
Since packets follow each other one per cycle, every stage must carry its
own packet's configuration line with it. Each `cr_stage` therefore passes
four things to the next stage, all registered: the chunk, the whole
configuration line, the partially built buffer, and its byte write enables.

An extractor entry (`cr_cfg_t`, 86 bits) holds:

| field | meaning |
|---|---|
| `op` | as for the key extractor |
| `len` | bytes to read from the chunk, 0..8 |
| `off` | byte offset in the chunk |
| `konst` | 8B constant |
| `dst` | stack byte address (stack stages only) |

* **Registers pipeline.** Stage *i* (0..8) fills R(*i*+1) with the 64-bit
  result. Loads shorter than 8B are zero-extended, and `EXT_CONST` loads the
  full constant. That covers immediates and stack-relative pointers such as
  R2 = R10 − 8, because R10 is a constant in the executor. A tenth register,
  the *delay element*, makes this pipeline as long as the stack pipeline.
  R0 is not restored. The compiler guarantees that the program writes R0
  before it reads it after the resume point.
* **Stack pipeline.** Stage *j* (0..9) writes `len` result bytes at stack
  byte `dst`, clipped at the end of the buffer. Later stages overwrite
  earlier ones. Byte *i* of the 136B image stands for stack address
  R10 − 136 + *i*, so "stack[−8]" is byte 128.

The context word `ctx` (`ctx_t`) gives `hit`, the action, `regs[0..8]` for
R1-R9 with `reg_we`, and the 136B `stack` image with per-byte `stack_we`.
The executor writes only the enabled registers and bytes.

## Programming example

The L2 access-list program drops IPv6, looks up IPv4 source MACs in a map,
and passes everything else. It becomes:

* key stage 0: `AND`, `len` 2, `off` 12, constant 0xFFFF (the EtherType);
  stages 1-11 `NOP`;
* TCAM 0: key bytes 0-1 = 86 DD → forward, R0 = XDP_DROP;
* TCAM 1: key bytes 0-1 = 08 00 → restore at PC 34 (an illustrative value: the first instruction the compiler did not warp),
  R1 = 0, R2 = −8 (`EXT_CONST`), stack bytes 128..133 = packet bytes 6..11
  (source MAC, `AND` with all-ones, `len` 6, `off` 6, `dst` 128);
* TCAM 2: mask 0 → forward, R0 = XDP_PASS.

`tb/tb_warp_engine.sv` programs exactly this in its first phase.

## Configuration ports

All configuration is written at run time, one item per cycle:
`ke_cfg_we/idx/data` writes a key stage. `tcam_we/idx/valid/value/mask`
writes a TCAM entry. `act_we`, `regcfg_we` and `stkcfg_we` write line
`line_idx` of the three memories. Write the memory lines before making the
TCAM entry valid: the memory arrays are not reset. Reconfiguring while
packets are in flight is allowed, but a packet may then see part of the old
rules and part of the new.

## Where this RTL departs from or adds to the source design

* Line formats, field widths, the operation set, byte order, the
  stack-address mapping, the PC width (16 bits) and the context/packet
  interface to the executor are not given by the source. They are this
  implementation's choices.
* The TCAM is written as registers compared in parallel, in two cycles.
  An FPGA build may want a different TCAM structure. The split into two
  cycles makes the stage count add up to the published 28.
* The packet data path is a 64-beat FIFO. The source says only that packet
  data moves in step with the pipeline on a 64B datapath.
* The TCAM-miss behaviour, described above.
* Not included: the rule compiler (Warp Optimizer), the hXDP executor
  (Active Packet Selector, processor, register file, stack, helpers, maps),
  the NIC's receive queue and the drop counter used for measurements. They
  connect at the engine's configuration ports, its `ctx_*`/`pkt_*` outputs
  and its `in_*` inputs.
* No timing or area results: the design was simulated and linted, not
  placed and routed. The published design closes at 250 MHz on an
  UltraScale+ part.

## Capacity against the published applications

The six applications used to evaluate the original design need 3 to 49
TCAM entries (64 built), 2 to 16 B of key (16 B built) and 6 to 80 B of
stack (136 B built). Their key fields need at most 8 of the 12 key stages
at 2 B each. Their stack needs at most 10 of the 10 stack stages at 8 B
each, if the bytes are contiguous. All of them fit the default
configuration.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against a byte-wise reference model (`tb/tb_ref_pkg.sv`) and uses
random stimulus and random stalls. The testbenches check latencies in
enabled cycles. `tb_warp_engine` runs the whole engine at its default sizes:

1. It runs the L2 ACL example above with no executor stalls. Every context
   must arrive exactly 28 cycles after its chunk-completing beat. A burst
   of 64B packets must enter one per cycle.
2. It runs two random programs: 12 random key stages and 64 random TCAM
   entries with random actions and restoration lines. Random packets of
   1-6 beats go through, while the executor randomly refuses contexts and
   packet beats.

It compares every context and every packet beat, and it counts the
mechanisms. Each of these must occur at least once: forwarding decision,
context restore, TCAM miss, executor stall, single- and multi-beat packets,
back-to-back chunks, and input backpressure.

`tb_warp_workloads` sizes one rule set after each of the six applications
in the capacity section. It uses that application's TCAM entries, key
bytes and stack bytes. The rules themselves are synthetic: they share the
sizes, not the programs. For each rule set it sends a back-to-back stream
of 64B packets that hits every entry, plus misses. It checks every context
against the reference model. It also checks that contexts leave one per
cycle, each 28 cycles after its packet entered. A last run repeats the
largest rule set with 65B packets. One byte over the datapath width, they
take two beats each, so contexts leave one every two cycles: 125 Mpps at
250 MHz.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/warp_pkg.sv tb/tb_ref_pkg.sv tb/tb_warp_engine.sv --top-module tb_warp_engine
./obj_dir/Vtb_warp_engine
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. To lint a
module: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/warp_pkg.sv rtl/<module>.sv`.
Verilator's `-Wall` reports unused package constants and the common word
`stack`; neither affects the design.

## Files

| file | content |
|---|---|
| `rtl/warp_pkg.sv` | sizes, encodings, line and context structs, read/operate helpers |
| `rtl/warp_engine.sv` | top level |
| `rtl/pkt_splitter.sv` | chunk capture and beat hand-off |
| `rtl/pkt_fifo.sv` | packet data path |
| `rtl/key_extractor.sv`, `rtl/ke_stage.sv` | key extraction |
| `rtl/tcam.sv`, `rtl/line_memory.sv`, `rtl/match_action_unit.sv` | match-action |
| `rtl/context_restoration_unit.sv`, `rtl/cr_stage.sv` | context restoration |
| `tb/tb_*.sv` | testbenches; `tb/tb_ref_pkg.sv` is the reference model, `tb/tb_warp_workloads.sv` the application-sized runs |
