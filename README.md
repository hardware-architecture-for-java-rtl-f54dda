# A Java bytecode co-processor for a hardware/software virtual machine

This is the hardware half of a Java virtual machine that is split between a
host CPU and an FPGA card. The software half, on the host, keeps everything
that is large or complicated: class loading and verification, object
creation, garbage collection, type checks, exceptions and threads. The
hardware half runs the plain bytecode of a method: constants, local
variables, stack manipulation, int arithmetic, compares and branches, and the
already-resolved "quick" forms of field and constant-pool access. Software
hands a method over by writing a few addresses into registers. The hardware
runs until it reaches something it does not do, then raises an interrupt.
Software then reads back the PC and the stack depth and carries on.

The design is meant for a small FPGA, and every buffer is a parameter. The
instruction cache, the local-variable cache and the operand-stack cache can
be shrunk to fit. The local-variable cache can be left out completely.

## Structure

```
              host (software VM)            host memory
                 | register bus, irq      (constant pool, objects)
                 v                              ^
          +----------------+  on-board RAM      |
          | host_interface |<----------------------- RAM arbiter:
          +----------------+                    |    data > stack > fetch
            | fetch    ^ ready                  |
            v          |                        |
          +----------------+           +------------+
          |  instr_buffer  |           | data_cache |
          +----------------+           +------------+
            | instruction  ^ ready,          ^
            v              | redirect        | local variables
          +----------------------------------------+
          |              exec_engine               |--- stack spill/fill,
          +----------------------------------------+    host memory (via host_interface)
```

There are three pipeline stages: fetch (host interface to instruction
buffer), decode (instruction buffer) and execute (engine). Each stage tells
the stage that feeds it when it can take the next item. Nothing is forwarded
automatically, because many instructions take a variable number of cycles.
All memory traffic goes through `host_interface`. The on-board RAM holds the
bytecode, the local variables and the full operand stack. The host memory
holds the constant pool and the object store. Software never writes these
areas while the hardware is running.

| Module | Role |
|---|---|
| `jvm_pkg` | Word and memory-bundle types, opcodes, instruction-length and stack-use tables |
| `host_interface` | Software registers, interrupt, on-board RAM arbiter, host-memory path |
| `instr_buffer` | Bytecode cache, word fetch, alignment of packed instructions, branch redirect |
| `exec_engine` | Stack machine with an operand-stack cache, spill/fill, exits to software |
| `data_cache` | Write-through cache of local variables, 0 to 256 lines |
| `jvm_coproc` | Top level; wires the four units together |

## Handing a method to the hardware

Software uses a 4-bit register bus (`sw_we`, `sw_addr`, `sw_wdata`,
`sw_rdata`) and one interrupt line:

| Reg | Name | Meaning |
|---|---|---|
| 0 | CTRL | Write bit0 = 1: start. Write 0: clear the interrupt. Read: `{busy, done}` |
| 1 | PC | Java PC to start at; after the run, PC of the instruction not executed |
| 2 | CODE | Byte address of the method's bytecode (PC 0) in on-board RAM |
| 3 | LOCALS | Word address of local variable 0 in on-board RAM |
| 4 | STACK | Word address of the bottom of the operand stack in on-board RAM |
| 5 | DEPTH | Stack words already in RAM at start; the full depth after the run |
| 6 | CPOOL | Word address of the constant pool in host memory |
| 7 | STATUS | `{opcode[15:8], exit[1:0]}`. Exit: 0 return, 1 left to software, 2 exception |
| 8 | CYCLES | Clock cycles of the last run |

The hardware always stops *before* the instruction named by PC, and the
stack is left as it was before that instruction. Software then executes that
instruction itself. Exits happen in these cases:

- **Return** (`return`, `ireturn`, `areturn`): software pops the frame.
- **Left to software**: any opcode outside the subset, such as `new`,
  invokes, unresolved `getfield`, long/float/double, `tableswitch` and `wide`.
- **Exception**: null reference, array index out of bounds, division by
  zero, or a pop below the bottom of the stack.

Before raising the interrupt, the engine writes every cached stack word back
to RAM, so software always finds the whole stack there.

Objects live in host memory with a layout chosen for this design:

- A reference is a word address, and 0 is null.
- `getfield_quick n` / `putfield_quick n` access word `ref + n`, where n is
  the first operand byte.
- An int array stores its length at `ref` and element i at `ref + 1 + i`.

## Operand-stack cache

The top `STACK_ENTRIES` (64) words of the operand stack sit in a circular
register array. The rest of the stack is in RAM, starting at STACK.
Nothing is loaded when a run starts. Before each instruction the engine
compares what the instruction pops and pushes (from `op_stack()` in
`jvm_pkg`) with the number of words held:

- **Fill**: if the cache holds fewer words than the instruction pops, the
  engine reads one word below the cached ones from RAM. It repeats this
  until there are enough. If RAM is empty as well, this is a stack-underflow
  exception.
- **Spill**: if the result would not fit in the cache, the engine writes the
  bottom cached word to RAM.

Each spill or fill is one RAM transaction. Loading only on demand avoids
copying a stack into the hardware when execution may go back to software
almost at once. All stack updates happen in the cycle an instruction
completes, so an instruction that exits part-way leaves no trace.

## Instruction buffer

Java instructions are 1 to 5 bytes long and packed byte by byte. The buffer
fetches 32-bit words from RAM and keeps bytes for one contiguous range of
PCs, `[lo, hi)`, in a circular array of `CACHE_BYTES` bytes. The byte at PC
`p` sits in slot `p % CACHE_BYTES`, so any size of 8 bytes or more works,
not only powers of two. Fetching has three rules:

- **Prefetch**: while there is room for another word, the word at `hi` is
  fetched. Fetches run back to back.
- **Eviction**: bytes are dropped from `lo` only when the cache is full and
  the decoder has fewer than five bytes ahead of it. Even then, only bytes
  below the decode PC are dropped. Prefetch alone never evicts anything, so
  a loop that fits stays cached.
- **Decode**: the decoder looks at the byte at the decode PC and gets the
  instruction length from `op_len()`. Once all of its bytes are present, it
  loads opcode, the next four bytes, PC and length into the output register.

The buffer predicts that no branch is taken. A taken branch, `jsr` or `ret`
in the engine asserts `redirect` in the cycle it completes. The buffer drops
the instruction in its output register and then does one of two things:

- **Hit**: the target is in `[lo, hi)`. Decoding continues from the target
  in the next cycle.
- **Miss**: the cache is cleared and refilled from the target. A fetch
  already in flight is discarded when its data returns.

## Local-variable cache

`data_cache` holds the current frame's locals. Local n goes in line
`n % ENTRIES` and keeps n as its tag. Writes go to RAM at once
(write-through), so nothing needs flushing when control returns to software.
The cache is invalidated at every start, because software may have changed
the frame in between. With `ENTRIES = 0`, every access becomes a RAM access.

A read hit is acknowledged one cycle after the request. A miss or a write
waits for RAM.

## Memory arbitration and timing

The on-board RAM has one port shared by three clients, in this priority
order:

1. data cache
2. stack spill/fill
3. instruction fetch

The engine is stalled while it waits for data or stack traffic, so those go
first. Fetch uses the port when it is otherwise idle. A winner that finds the
port idle is passed to the RAM in the same cycle. It keeps the port until the
RAM acknowledges.

All memory ports use the `mem_req_t`/`mem_rsp_t` bundles from `jvm_pkg`. The
requester holds `req`, `we`, `addr` (word address) and `wdata` steady until
the memory answers with a one-cycle `ack`, which carries `rdata`.

Simple instructions (constants, stack operations, ALU operations, branches
with the instruction already buffered) complete in one cycle, giving one
instruction per clock. The slower cases are:

- local-variable access: at least 2 cycles
- `idiv`/`irem`: 34 cycles
- host-memory access: the host latency
- array access: two host transactions (length check, then the element)

## Parameters

| Parameter | Default | Range |
|---|---|---|
| `IC_BYTES` (`instr_buffer.CACHE_BYTES`) | 1024 | 8 and up |
| `DC_ENTRIES` (`data_cache.ENTRIES`) | 64 | 0..256 |
| `STACK_ENTRIES` | 64 | power of two, 4 and up |

## Measured behaviour

The testbenches use an on-board RAM with 2-cycle latency and a host memory
with 8-cycle latency. All runs use the default sizes unless the table says
otherwise.

| Workload | Cycles | Notes |
|---|---|---|
| Loop counter, 1000 iterations | 23,174 | 9,009 instructions |
| Fibonacci, fib(40) | 1,333 | |
| Ackermann(3,5), arguments kept on the operand stack | 1,886,636 | 20,735 spills plus fills, stack up to 253 words |
| Bubble sort of 64 locals, pass unrolled (958 bytes) | 51,509 | |
| Bubble sort, 64-byte instruction cache | 75,861 | |
| Bubble sort, 1088-byte instruction cache, 62-line data cache | 52,265 | |
| Bubble sort, no data cache | 87,230 | |
| Insertion sort of 40 ints in host memory | 32,544 | 2,287 host accesses |

Removing the data cache costs more than shrinking the instruction cache.

Shrinking the data cache in steps (bubble sort, default instruction cache):

| Data cache entries | 64 | 48 | 32 | 16 | 8 | 2 | 0 |
|---|---|---|---|---|---|---|---|
| Cycles | 51,508 | 57,460 | 63,226 | 63,226 | 63,227 | 63,227 | 87,229 |
| Misses | 190 | 2,173 | 4,095 | 4,095 | 4,095 | 4,095 | 12,096 |

The cost does not grow evenly as the cache shrinks. Each compare-and-swap
step touches only two neighbouring locals several times, so any cache of
two entries or more catches that reuse. Reuse from one pass to the next
needs room for most of the 64 locals, so it is lost by 32 entries. Between
32 and 2 entries the cycle count is flat. A design whose cost should fall
smoothly with size would need a different mapping or replacement policy.
Shrinking the instruction cache to 64 bytes costs about 47% here, more than
one would hope. The cause is that fetch shares the single RAM port and has
the lowest priority; the sorting method's many local-variable accesses delay
it. A design with a separate or wider fetch path would close this gap.

## Limits and choices to know about

- **No method calls.** Invokes are not executed in hardware: every call and
  every return goes back to software. Recursive code therefore switches to
  software at each call. The Ackermann workload above keeps its pending
  arguments on the operand stack instead of recursing.
- **Int only.** There is no long, float or double support. Only the
  word-sized array instructions `iaload`, `aaload`, `iastore` and
  `arraylength` are implemented. `aastore` needs a type check and goes to
  software.
- **Own choices.** These are not fixed by anything outside this design and
  can be changed freely:
  - register map and exit codes
  - object layout
  - stack write-back at the end of a run
  - cache organisations
  - eviction rule
  - arbitration order between data and stack traffic
- **No folding.** Instruction folding is left out on purpose. The idea is
  that a class loader in software can do it once, instead of hardware doing
  it on every execution.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
`tb/mem_model.sv` is the RAM model used for both memories. To build and run
one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/jvm_pkg.sv tb/tb_jvm_coproc.sv \
          --top-module tb_jvm_coproc -Mdir obj && ./obj/Vtb_jvm_coproc
```

| Testbench | What it covers |
|---|---|
| `tb_jvm_coproc` | Whole design at default sizes, driven through the register bus: all workloads, a far branch, an exit to software; checks that every mechanism occurred |
| `tb_jvm_cache_sizes` | Four differently sized co-processors running bubble sort side by side |
| `tb_jvm_dc_sweep` | Bubble sort on seven co-processors with data caches from 64 entries down to none |
| `tb_exec_engine` | Every implemented instruction class, every exit, spills/fills with an 8-word stack cache, one-instruction-per-clock throughput |
| `tb_instr_buffer` | Random packed programs, back-pressure, near and far redirects, 64-byte cache |
| `tb_data_cache` | Random read/write against a reference, write-through, hit latency, zero-size cache |
| `tb_host_interface` | Registers, interrupt, arbitration order, 600 cycles of random traffic from the three RAM clients |

To add an instruction, add it to three places and extend `tb_exec_engine`:

1. `op_len()` in `jvm_pkg` (if it is not one byte long)
2. `op_stack()` in `jvm_pkg`
3. the result or sequencing logic in `exec_engine`
