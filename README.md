# Radiation-tolerant PicoBlaze-3: selectable TMR hardening and a fault-emulation harness

A radiation-induced single event upset (SEU) flips one stored bit inside a processor. There are two
ways to survive it: software redundancy (the program keeps every value three times and votes) or
hardware redundancy (the flip-flops are triplicated and voted). Software costs execution time.
Hardware costs area. The best design is often a mix of the two.

This RTL makes that trade-off something you can measure. It has two parts:

* **`pb_core`**: an 8-bit processor that runs PicoBlaze-3 code. A single parameter, `HARDEN`,
  selects which of its register sets are triplicated (versions P0 to P4).
* **A fault-emulation harness** around it (`rt_picoblaze_system`). It injects one bit-flip per
  program run. A *Smart Table* then classifies the run by comparing the processor's outputs with
  those recorded in a fault-free *golden run*. Lateness up to a limit is allowed.

The architecture, the five hardening versions and the Smart Table rules follow the paper "Rapid
Prototyping of Radiation-Tolerant Embedded Systems on FPGA" (Restrepo-Calle et al.). That paper
takes its instruction set and timing from Xilinx's PicoBlaze-3 (KCPSM3). The section
"Where this RTL departs from the original" below lists every point where this code makes its own
choices.

## The processor

| feature | value |
|---|---|
| data registers | 16 × 8 bit (s0…sF) |
| flags | Z (zero), C (carry) |
| program store | 1024 × 18-bit instructions (`pb_program_store`), loaded through a write port |
| scratchpad RAM | 64 bytes (`pb_scratchpad`) |
| call stack | 31 return addresses, 5-bit stack pointer (`pb_stack`) |
| I/O | `port_id`, `out_port`, `in_port`, `read_strobe`, `write_strobe`, 256 ports each way |
| interrupt | one input; vector 0x3FF; `interrupt_ack` |
| timing | 2 clock cycles per instruction, always |

The instruction set is the PicoBlaze-3 one. The encodings are in `pb_pkg`:

* LOAD, AND, OR, XOR, TEST, COMPARE, ADD, ADDCY, SUB, SUBCY, each with a constant or a register as
  the second operand;
* the ten shifts and rotates (SR0, SR1, SRX, SRA, RR, SL0, SL1, SLX, SLA, RL);
* INPUT, OUTPUT, FETCH, STORE, each with a constant or (sY) address;
* JUMP, CALL and RETURN, unconditional or on Z, NZ, C or NC;
* RETURNI ENABLE/DISABLE and ENABLE/DISABLE INTERRUPT.

`pb_pkg` also has small functions that build instruction words (`i_k`, `i_r`, `i_shift`,
`i_flow`, `i_flow_c`, …). The testbenches use them as an assembler.

### The two-cycle rhythm

```
cycle        fetch (t_state=0)                 execute (t_state=1)
address  ->  current PC                        next PC (combinational)
             instruction word -> IR            IR decoded; ALU, register file, flags,
                                               scratchpad, stack written at the end;
                                               port_id/out_port/strobes valid
```

The program store reads synchronously. During the execute cycle the core therefore drives the
*next* PC onto `address`, so the next word is ready for the fetch cycle.

After reset the core spends one idle execute cycle, then fetches address 0.

An interrupt is taken in an execute cycle when interrupts are enabled and the registered request
is high. The instruction that would have executed in that cycle is not executed. Instead:

* its address is pushed on the stack;
* Z and C are saved;
* interrupts are disabled;
* `interrupt_ack` is high for that cycle;
* execution continues at 0x3FF.

RETURNI restores Z and C and resumes at the interrupted instruction.

## Hardening versions

Four register sets can be upset: the register file, PC, flags and SP, and the pipeline. Each is
stored in a `tmr_reg` (or, for the register file, in `pb_regfile`). These modules hold either one
copy or three copies plus a bitwise 2-of-3 voter.

| `HARDEN` | register file (128 b) | PC (10 b), flags (2 b), SP (5 b) | pipeline (24 b) |
|---|---|---|---|
| `P0` | – | – | – |
| `P1` (default) | – | TMR | – |
| `P2` | – | – | TMR |
| `P3` | – | TMR | TMR |
| `P4` | TMR | TMR | TMR |

P1 is the default. It is the configuration the study recommends when it is combined with software
hardening: high reliability for a small hardware cost.

The pipeline set holds these bits (24 in total):

* instruction register, 18 bits;
* `t_state`, 1 bit;
* a start-up bit, 1 bit;
* interrupt enable, 1 bit;
* saved Z and C, 2 bits;
* registered interrupt request, 1 bit.

The program store, scratchpad and stack storage are never triplicated. They count as memory, which
is assumed to have its own protection.

**How a triplicated register behaves.** On a clock edge, every copy loads either the new value (if
the register is written) or the current *voted* value. So a flipped copy is outvoted at once, and
it is rewritten with the correct value at the next edge. Two upsets in different copies of the
same bit are therefore harmless if they are at least one cycle apart. The voter always sits
between the copies and the logic that reads the register. No architectural state can see a single
upset.

**Injecting an upset.** `pb_core` has one port for this, `seu` (`pb_pkg::seu_t`), with four fields:

* `valid`;
* `target`: `SEU_RF`, `SEU_PC`, `SEU_FLAGS`, `SEU_SP` or `SEU_PIPE`;
* `bit_idx`: the bit within the set. Register-file bit 8r+i is bit i of register r. Flags bit 0
  is Z and bit 1 is C. Pipeline bits follow the packed `pipe_t` struct, LSB first.
* `copy`: 0, 1 or 2. An unhardened set has only copy 0, and the field is ignored.

While `valid` is high, the selected bit is XORed into the value stored at the next clock edge.
Tie `seu` to `'0` in normal use.

## The fault-emulation harness

`rt_picoblaze_system` connects one core (the *target*), its program store, an output register, a
`seu_injector` and a `smart_table`. The output register captures `{port_id, out_port}` on every
OUTPUT instruction. The Smart Table watches that 16-bit value.

### Run protocol

1. With `run` low, the core is held in reset. Load the program through `load_we`, `load_addr` and
   `load_data`.
2. **Golden run.** Set `st_mode = ST_GOLDEN`, keep `inj_arm = 0` and raise `run`. Every change of
   the output register is stored as a pair [value, cycle]. When the program has finished, pulse
   `st_finish` and drop `run`.
3. **Test runs.** Set `st_mode = ST_TEST` and `t_crit`. Choose the upset with `inj_cycle`,
   `inj_target`, `inj_bit` and `inj_copy`, set `inj_arm = 1`, and raise `run`. When `st_done`
   rises, `st_verdict` holds the classification. The core is then frozen in reset until `run`
   falls.

Cycles are counted in clock edges after the cycle in which `run` rose. The golden run and the test
runs count them the same way.

### Smart Table verdicts

A plain cycle-by-cycle comparison would call it an error when software hardening repairs a fault
but delivers the output a few cycles late. The Smart Table relaxes the timing instead. Take the
next expected pair [E, C]:

| what happens | verdict |
|---|---|
| output changes to E at any cycle ≤ C + T_crit | pair matched, go to next; lateness `max(0, cycle−C)` updates `st_recovery_time` |
| output changes to anything else at a cycle ≤ C + T_crit | `V_OUTPUT_DAMAGE` (silent data corruption) |
| cycle C + T_crit + 1 is reached with no change | `V_TIMEOUT` (hang, or too slow to recover) |
| all pairs matched | `V_NO_DAMAGE` (the upset was harmless) |

A correct value that arrives early is accepted. Outputs after the last recorded pair are not
checked. An output event is a *change* of the watched register: a program that writes the same
port and value twice in a row produces one event, in the golden run and in test runs alike.
In the terms of reliability studies, no damage is *unACE*, output damage is *SDC* (silent data
corruption) and timeout is *Hang*. The table holds 256 pairs. The cycle counter is 32 bits wide and T_crit is 16 bits wide; the
study used T_crit = 1023.

## Where this RTL departs from the original

* **Pipeline set size.** The original's pipeline set has 52 bits; its contents are not published.
  This core's set has 24 bits, so 169 bits can be upset in total, against 197.
* **Register file in flip-flops.** The register file is built from flip-flops in every version, so
  that all 128 bits can be upset and triplicated. PicoBlaze-3 uses distributed RAM for it. Reset
  clears it.
* **I/O timing.** `port_id` and `out_port` are valid only in the execute cycle. PicoBlaze-3 holds
  `port_id` for both cycles of an I/O instruction. Code that samples I/O on the strobe sees no
  difference.
* **Interrupt timing.** The exact cycle in which an interrupt is taken, relative to the request,
  is this design's choice (the request is registered, then taken in the next execute cycle).
* **How upsets are injected.** The original emulator flips bits through partial reconfiguration
  of the FPGA. Here dedicated XOR masks do it, driven by `seu_injector`. Choosing a random cycle
  and bit for each run is left to whoever drives the system (the testbenches do it).
* **Stopping the emulation.** The processor is held in reset once a verdict is reached.
* **Own choices in the Smart Table.** These are: detecting outputs by value change, watching
  `{port_id, out_port}`, the table depth and counter widths, and the `st_recovery_time` report.
* **Not modelled.** The software hardening tools (compiler front-ends, the hardener that applies
  the software voting technique, the instruction-set simulator) are not hardware. Neither are the
  emulation board, its host software, or FPGA configuration scrubbing. The benchmark kernels in
  the testbench package are this code's own. They are not the original benchmark binaries.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pb_core` runs all five versions side by side on a generated program against a reference
  instruction-set model in the testbench. The program covers every instruction, conditional
  calls and returns, and twelve interrupts. The model predicts every output and its cycle.
  The run is repeated with random upsets every 37 cycles into each version's triplicated sets;
  the outputs must not change. Finally, a register upset is shown to be visible in P0 and masked
  in P4.
* `tb_rt_picoblaze_system` is the end-to-end test at the default configuration (P1, no parameter
  overrides). It runs eight benchmark kernels. It also runs software-hardened versions of five of
  them (`fib_h`, `gcd_h`, `div_h`, `madd_h`, `bub_h`). These keep three register copies of every
  value; a byte read from the scratchpad is copied twice. The copies are voted before each
  output, store or address use, and before each instruction that sets a branch's flags. The
  multiply-based kernels have no hardened version: three copies of their working registers do
  not fit in sixteen registers without spilling to the scratchpad. For each
  program it does a golden run and checks the outputs against values computed in SystemVerilog.
  Then it does 12 upset runs for each of the five register sets, with T_crit = 1023. It checks
  that upsets in P1's triplicated sets are always harmless. It also checks that each mechanism
  occurs at least once: output damage, timeout, late-but-correct output, TMR masking, interrupt.
  It runs in about 5 s after compilation.
* `tb_campaign_versions` runs the same campaign on P0…P4 with identical upsets. The upset bit is
  drawn uniformly over all attacked bits, and the testbench prints the verdict percentages per
  version. The study weighted all attacked bits equally, and this testbench does the same. It checks
  that P4 is never damaged. One run gave:

  | version | unhardened kernels: no damage / SDC / hang | hardened kernels: no damage / SDC / hang |
  |---|---|---|
  | P0 | 75.0 / 17.2 / 7.8 % | 90.0 / 5.5 / 4.5 % |
  | P1 | 82.2 / 15.6 / 2.2 % | 94.5 / 3.5 / 2.0 % |
  | P2 | 76.9 / 15.3 / 7.8 % | 91.5 / 5.0 / 3.5 % |
  | P3 | 83.8 / 14.1 / 2.2 % | 96.0 / 3.0 / 1.0 % |
  | P4 | 100 / 0 / 0 % | 100 / 0 / 0 % |

  These numbers come from 40 runs per program and version (320 and 200 runs per row), so they carry
  a few percent of sampling noise. The study behind this design used 5000 upsets per register set
  and a different pipeline set, so only the trends are comparable:
  * P1 gains much more than P2;
  * P4 is never damaged;
  * software triplication on an unhardened core beats P1, P2 and P3 running unhardened programs.

  Area per version is not reported here. The trend is clear from the bit counts alone: P1 adds
  2 × 17 flip-flops, P2 adds 2 × 24 and P4 adds 2 × 169, each with a voter per bit.
* `tb/pb_bench_pkg.sv` is shared by these two testbenches. It holds a small assembler class and
  the benchmark kernels (bubble sort, division, Fibonacci, GCD, matrix add, matrix multiply,
  multiply, power) and the five hardened ones.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/pb_pkg.sv rtl/ftu_pkg.sv tb/tb_rt_picoblaze_system.sv \
    --top-module tb_rt_picoblaze_system -o sim && obj_dir/sim
```

Replace the testbench name to run another one. Change `RUNS_PER_SET` (end-to-end test) or `RUNS`
(version campaign) for larger campaigns. To add a program, extend `pb_program::build` in
`tb/pb_bench_pkg.sv`: write it with the `ldk`/`ldr`/`e`/`jmp`/`lbl` helpers, end it with
`halt()`, and push the expected `{port, value}` outputs onto `expv`.

## Files

| file | contents |
|---|---|
| `rtl/pb_pkg.sv` | opcodes, hardening and upset types, instruction builders |
| `rtl/ftu_pkg.sv` | Smart Table mode and verdict types |
| `rtl/tmr_reg.sv` | one-copy or triplicated register with voter and upset mask |
| `rtl/pb_alu.sv` | ALU and flag logic |
| `rtl/pb_regfile.sv` | 16 × 8 register file, optionally triplicated |
| `rtl/pb_scratchpad.sv` | 64-byte data RAM |
| `rtl/pb_stack.sv` | 31-entry call stack with (optionally triplicated) SP |
| `rtl/pb_program_store.sv` | 1K × 18 program memory with load port |
| `rtl/pb_core.sv` | the processor |
| `rtl/seu_injector.sv` | schedules one upset per run |
| `rtl/smart_table.sv` | golden-run recorder and relaxed-timing output checker |
| `rtl/rt_picoblaze_system.sv` | top: target processor plus harness |
