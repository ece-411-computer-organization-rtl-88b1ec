# RV32IM five-stage pipelined processor with L1 caches and local branch prediction

This is an in-order, five-stage (IF, ID, EX, MEM, WB) RISC-V processor for the RV32I base
integer set plus the M extension (multiply, divide, remainder). It aims to run a program in as
few cycles as possible while keeping a short clock path. The main pieces are:

* **Forwarding and stalling.** A single hazard unit does both. Dependent instructions
  normally run back to back. The pipeline stalls only for a load feeding the next instruction,
  a cache miss, or a multiply/divide still in progress.
* **Next-PC prediction in the fetch stage.** A two-level *local* branch predictor (5 bits of
  history per branch, kept in a table indexed by 6 PC bits) gives the direction for
  conditional branches and JAL. Their targets are decoded straight from the fetched
  instruction. A branch target buffer (BTB) supplies JALR targets.
* **A multi-cycle multiply/divide unit (MDU).** Its multiplier is a Wallace tree that is
  walked one reduction level per clock. Its divider is a shift-and-subtract divider that
  produces one quotient bit per clock.
* **Two L1 caches built from one parameterized module.** The instruction cache is 4-way and
  the data cache 2-way. Both answer a hit in the same cycle. They share physical memory
  through an arbiter and a cacheline adaptor.

The configuration above (4-way I-cache, 2-way D-cache, 5-bit local history indexed by 6 PC
bits, no L2 cache) is the one the design targets. The other sizes are parameters.

```
            +------------------------------- cpu ---------------------------------+
            |  IF ---------> ID ----------> EX -------------> MEM -------> WB     |
            |  pc            decoder        alu, branch_cmp   load/store   regfile|
            |  bp_unit       regfile        mdu (wallace_mul,  align        write  |
            |  (local_bp,    (write-        shift_sub_div)                        |
            |   btb)          through)      resolve next PC                       |
            |                 hazard_unit: forwarding, hold/bubble per register   |
            +-----+-----------------------------------------------+--------------+
                  | word, same-cycle hit                          | word
            +-----v------+                                  +-----v------+
            | cache      | I: 4-way x 8 sets                | cache      | D: 2-way x 8 sets
            +-----+------+                                  +-----+------+
                  | 256-bit line bus                              |
                  +------------------> arbiter <------------------+   (data wins ties)
                                          |
                                  cacheline_adaptor  (256 bits <-> 4 x 64-bit beats)
                                          |
                                  physical memory (pmem_* ports of rv_top)
```

## The pipeline and its hazards

### Forwarding

EX takes each operand from one of three places:

* the ID/EX register;
* the EX/MEM result (**MEM->EX**);
* the value being written back (**WB->EX**).

If MEM and WB both hold the register, MEM wins because it holds the newer value. A load in
MEM is never a MEM->EX source, because its data only exists at the end of MEM.

Store data has one more path, **WB->MEM**. With it, a load followed directly by a store of the
loaded value runs without a stall.

There is no WB->ID path, because the register file is *write-through*. A register read in the
same cycle as its write returns the new value.

### Stalls and bubbles

Every stage that can be "not ready" follows one rule. All earlier pipeline registers keep
their contents, and the next register takes a bubble (an all-zero control word, `valid = 0`).
The hazard unit turns the four reasons into per-register controls:

| cause | PC | IF/ID | ID/EX | EX/MEM | MEM/WB |
|---|---|---|---|---|---|
| I-cache miss (`if_stall`) | hold | bubble | - | - | - |
| load-use in ID | hold | hold | bubble | - | - |
| MDU busy in EX | hold | hold | hold | bubble | - |
| D-cache miss in MEM | hold | hold | hold | hold | bubble |
| misprediction resolved in EX | redirect | bubble | bubble | - | - |
| misprediction while the I-cache is missing | hold | hold | hold | bubble | - |

Two details here are easy to get wrong.

1. **A forwarding source can leave during a stall.** Take an instruction that is held in EX
   (or held in MEM as a store) while its operand comes from WB. The instruction in WB
   retires and is replaced by a bubble, so the forwarded value would vanish. To prevent
   this, every cycle that ID/EX (or EX/MEM) holds, it reloads its operand fields with the
   forwarded values. A held instruction therefore always carries correct operands.
2. **A misprediction does not redirect fetch while the I-cache is filling a line.** The cache
   uses the live fetch address during a miss. So a branch that resolves as mispredicted then
   waits in EX until the fill ends, and only then redirects.

A load-use hazard costs exactly one cycle. The consumer then gets the loaded value through
WB->EX. The load-use check ignores a store's data register, since WB->MEM covers that case.

### Control flow

Conditional branches, JAL and JALR all resolve in EX. The actual next PC is compared with the
prediction that travelled down with the instruction. If the two differ, the PC is redirected
and the two younger instructions are squashed, a two-cycle penalty. This check covers every
instruction, so a wrong guess of any kind is repaired the same way. The predictor is trained
at the same point:

* BR and JAL update the local predictor;
* JALR writes its target into the BTB.

Training happens once per instruction, in the cycle it leaves EX.

## Next-PC prediction (`bp_unit`, `local_bp`, `btb`)

The fetch stage decodes the instruction that the I-cache returns:

* **BR / JAL.** The local predictor gives the direction.
  * In `local_bp`, PC[7:2] selects one of 64 five-bit histories.
  * That history selects one of 32 two-bit saturating counters, and the counter's upper bit
    is the prediction.
  * A taken prediction jumps to PC + immediate, with the immediate decoded right here.
  * JAL goes through the direction predictor too. It is trained "taken" on every execution,
    so it predicts correctly after its first run.
* **JALR.** `btb` is direct-mapped, with 64 entries and a full tag. On a hit it predicts a
  jump to the stored target.
* **Anything else, or a BTB miss:** PC + 4.

Decoding targets in IF puts the I-cache data, an adder and the PC mux on one combinational
path. Predicting targets from the BTB alone would shorten that path, at the cost of BTB
capacity. The histories are updated when a branch resolves, not speculatively. All counters
reset to weakly not-taken.

## Multiply/divide unit (`mdu`, `wallace_mul`, `shift_sub_div`)

Both arithmetic submodules work on unsigned numbers only. The MDU turns signed operations
into unsigned ones:

1. **Cycle 1.** Register the absolute value of each operand that the operation treats as
   signed, and record whether the result must be negated:
   * product: the signs differ;
   * quotient: the signs differ and the divisor is not zero;
   * remainder: the dividend is negative.

   This register stage keeps the EX forwarding muxes out of the multiplier's and divider's
   combinational paths.
2. **Cycle 2.** Start the multiplier or the divider.
3. **When it finishes,** negate the result if needed, then pick the result:
   * the low word for MUL;
   * the high word for MULH, MULHSU and MULHU;
   * the quotient or the remainder for the divide operations.

   The result waits in a DONE state until the pipeline takes it (`ack`).

**Multiplier.** The 32 partial products are loaded into a bank of 32 registered 64-bit rows.
Each clock applies one Wallace level to the rows:

* Groups of three rows become a sum row (XOR) and a carry row (majority, shifted left by one).
* Rows left over from the grouping pass through.
* Rows beyond the live count are zero and stay zero, so one fixed network serves every level.

The row count goes 32, 22, 15, 10, 7, 5, 4, 3, 2, which takes eight levels. One carry-propagate
add of the last two rows follows.

**Divider.** For i = 31 down to 0: if x >= (y << i), set q[i] and subtract (y << i) from x.
What is left in x is the remainder, so one run gives both results. A zero divisor naturally
gives q = all ones and r = x, which is what RISC-V requires.

Signed overflow (-2^31 / -1) also comes out right: the quotient is -2^31 and the remainder 0.

| unit | start to done |
|---|---|
| `wallace_mul` | 10 cycles (load, 8 levels, final add) |
| `shift_sub_div` | 33 cycles (load, 32 steps) |
| `mdu`, multiply | 12 cycles |
| `mdu`, divide / remainder | 35 cycles |

## Memory system (`cache`, `arbiter`, `cacheline_adaptor`)

**Cache.** This is a set-associative, write-back, write-allocate cache with 32-byte
(256-bit) lines. WAYS and SETS must be powers of two, and WAYS must be at least 2.

* The CPU holds a word request until `resp`.
* **Hits** answer combinationally in the same cycle. A write hit merges bytes under `wmask`
  and sets the line's dirty bit at the clock edge.
* **On a miss** the cache picks a victim: an invalid way if there is one, otherwise the
  tree pseudo-LRU way. It then goes through these steps:
  1. write the victim back if it is dirty (`S_WB`);
  2. read the missing line (`S_FILL`);
  3. return to `S_IDLE`, where the request now hits.

Because the hit is single-cycle, the tag compare and the way mux set the cycle time of a
highly associative configuration.

**Line bus.** The caches, the arbiter and the adaptor exchange `rv_pkg::line_req_t`
(address, read, write, 256-bit data) and `line_rsp_t` (256-bit data, one-cycle `resp`).

**Arbiter.** The arbiter has three states: IDLE, SERVE_I and SERVE_D. It serves first come,
first served. When both caches ask in the same IDLE cycle, the data cache wins, since it
belongs to the later pipeline stage. A grant lasts until memory responds, and granting costs
one cycle.

**Cacheline adaptor.** The adaptor splits a line into four 64-bit beats, with beat 0 holding
bits 63:0. It holds `pmem_read`/`pmem_write` high for the whole burst. Memory marks each
beat with `pmem_resp`. A line transfer takes memory latency + 4 beats + 2 cycles.

For a miss that has to write back a dirty victim, the cost from the cache's side is:

* the arbiter grant;
* one full write burst;
* another grant;
* one full read burst;
* one cycle to re-check the tag.

## Parameters

All are parameters of `rv_top` and are passed down.

| parameter | default | meaning | origin |
|---|---|---|---|
| `I_WAYS` | 4 | I-cache associativity | design configuration |
| `D_WAYS` | 2 | D-cache associativity | design configuration |
| `I_SETS`, `D_SETS` | 8 | sets per cache (8 x 32 B per way) | own choice |
| `BP_HIST` | 5 | local history bits | design configuration |
| `BP_PC` | 6 | PC bits indexing the history table | design configuration |
| `BTB_BITS` | 6 | log2 of BTB entries | own choice |
| `RESET_PC` | 0 | first fetch address | own choice |

Other configurations are reached by changing these parameters:

* a 2-way I-cache: `I_WAYS=2`;
* a larger predictor: `BP_HIST=7, BP_PC=7`, up to `BP_HIST=10, BP_PC=8`.

## Top-level interface (`rv_top`)

* **Clock and reset.** `clk`; `rst`, which is synchronous and active high.
* **Physical memory.**
  * outputs: `pmem_addr` (line address), `pmem_read`, `pmem_write`, `pmem_wdata[63:0]`;
  * inputs: `pmem_rdata[63:0]`, `pmem_resp` (one per beat).
* **Retirement trace.** One entry per instruction that leaves WB: `commit_valid`,
  `commit_pc`, `commit_rd` (0 if nothing is written) and `commit_wdata`.
* **Event counters** (32 bits each):
  * control transfers resolved and mispredictions;
  * load-use stalls;
  * MEM->EX, WB->EX and WB->MEM forwards;
  * MDU stall cycles;
  * I/D hit cycles and misses;
  * D-cache write-backs;
  * arbiter conflicts.

  Prediction accuracy is `1 - perf_mispredict / perf_ctrl`.

## Where this design departs from, or adds to, its description

**Chosen here, because the description is silent:**

* the cache set count, and write-back with pseudo-LRU replacement;
* the 32-byte line and the 4 x 64-bit burst;
* the BTB size and organisation;
* indexing the pattern table by history alone;
* branch resolution in EX;
* the MDU start/done/ack handshake;
* the reset PC.

**Not supported:** FENCE, ECALL, EBREAK and the CSR instructions, which decode as nops. Loads
and stores must be naturally aligned. There are no exceptions or interrupts.

**Left out:** an L2 cache (built from the same cache module), an eviction write buffer in
front of memory, and a global-history branch predictor. The first two cost area and power
and did not pay for themselves once the L1 instruction cache was 4-way. The global predictor
was less accurate than the local one. The arbiter therefore does not add the extra cycle on
each side that an L2 behind it would need.

**Timing:** the single-cycle-hit caches and the IF-stage target decode are the long paths.
Nothing here is retimed for a specific FPGA or clock.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_rv_top` | Whole processor at default parameters with the `burst_mem` model. A test program (built in `rv_testprog_pkg`) runs; every retired instruction is compared against an instruction-set reference model in the same package. Also requires each mechanism at least once: every forwarding path, load-use stall, MDU stall, misprediction, BTB hit, I- and D-cache misses, dirty write-back, arbiter conflict. |
| `tb_workloads` | Eleven processors side by side, each with its own memory and reference model. Runs a factorial workload with `MUL` and with a shift-and-add multiply at the final configuration. Runs the test program with a 2- and 8-way I-cache, a 4-way D-cache and the predictor sizes 2/2, 4/3, 6/5, 7/7, 8/6 and 10/8 (history/PC bits). Reports cycles, prediction accuracy and hit rates (table below). |
| `tb_cpu` | Pipeline alone on a word memory with 0-2 random wait cycles, same program and reference. One-instruction-per-cycle throughput on straight-line code. |
| `tb_hazard_unit` | Every forwarding case and the hold/bubble pattern of every stall cause. |
| `tb_cache` | 4-way and 2-way instances, random byte/half/word traffic over 8 KiB against a byte model. Single-cycle hits and write-back/refill integrity. |
| `tb_arbiter`, `tb_cacheline_adaptor` | Tie-break and first-come order, routing, beat order, latency. |
| `tb_mdu`, `tb_wallace_mul`, `tb_shift_sub_div` | Corner and random operands for all eight operations, plus exact latencies. |
| `tb_local_bp`, `tb_btb`, `tb_bp_unit` | Predictor against a reference model, pattern learning, BTB tag/replace/reset, next-PC per instruction class. |
| `tb_regfile`, `tb_alu`, `tb_branch_cmp`, `tb_decoder` | Datapath basics. |

Testbench helpers are `rv_asm_pkg` (instruction encoders), `rv_testprog_pkg` (program and
reference model), `burst_mem` (physical memory), `line_mem` (line-bus memory) and
`rv_workload_run` (one processor, memory and reference model, used by `tb_workloads`). No data
files are needed.

To run a testbench with Verilator 5, for example the full system:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/rv_testprog_pkg.sv tb/burst_mem.sv tb/line_mem.sv \
  tb/rv_workload_run.sv rtl/*.sv tb/tb_rv_top.sv --top-module tb_rv_top -o sim
./obj_dir/sim
```

Replace `tb_rv_top` with any other testbench name. The full-system test retires about 385
instructions in about 1,900 cycles and finishes in well under a second.

**Workload results** (`tb_workloads`, 8-cycle memory latency before each 4-beat burst):

| run | cycles | retired | prediction accuracy | I-cache hits | D-cache hits |
|---|---|---|---|---|---|
| factorial, `MUL` | 2279 | 382 | 70.7% | 99.9% | 88.9% |
| factorial, software multiply | 3249 | 1997 | 76.2% | 99.8% | 88.9% |
| test program, final configuration (`tb_rv_top`) | 1900 | 385 | 79.6% | 99.0% | 79.3% |
| test program, 2-way I-cache | 2255 | 385 | 79.2% | 97.7% | 79.3% |
| test program, 8-way I-cache | 1899 | 385 | 79.2% | 99.0% | 79.3% |
| test program, 4-way D-cache | 1882 | 385 | 79.2% | 99.0% | 80.2% |
| test program, predictor 2/2, 4/3, 6/5, 7/7, 8/6, 10/8 | 1893, 1897, 1905, 1907, 1911, 1917 | 385 | 82.2%, 79.0%, 75.0%, 75.2%, 73.3%, 70.3% | 99.0% | 79.3% |

Hit rates count cache cycles with a request, so a fetch held during a stall counts again.
With `MUL` the factorial workload takes 30% fewer cycles. The 2-way I-cache is clearly worse
than 4 ways on code spread over one set, while 8 ways gain nothing. These programs are short, so
a larger predictor table only takes longer to warm up and its accuracy falls.

**How far to trust it.**

* The pipeline, caches and MDU are checked instruction by instruction against an independent
  reference on two directed programs. They are not a compliance suite.
* The memory models stand in for a real memory controller.
* Timing closure has not been checked on any device.
