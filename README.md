# Loop datapaths with counter-based pipeline control

This RTL is a hardware version of an inner C loop over arrays, built the way a loop-to-hardware compiler would build it. The loop body becomes a **datapath**. Array reads become a **shift-register queue**, so each iteration fetches only one new element. A separate **controller** runs the datapath as a software pipeline: a prologue, a steady state and an epilogue. The controller does not list every state. A few small counters hold its position, and a combinational function of those counters drives the control lines.

The main example is the three-point moving average

```c
for (i = 0; i < N; i++)
    b[i] = (a[i] + a[i+1] + a[i+2]) / 4;
```

with `N` given at run time. The same loop is also built a second way, as a streaming datapath that keeps a partial sum in place of a queue. Beside them is a third, smaller engine for a loop whose result feeds the next iteration:

```c
for (i = 1; i <= N; i++)
    a[i] = (a[i-1] + a[i] + a[i+1]) / 4;
```

The structure follows the paper *Very High-Level Synthesis of Datapath and Control Structures for Reconfigurable Logic Devices*: its datapath drawings, its control-signal chart, its stage-length equations and its counter-based controller. The widths, memories, handshakes and reset behaviour are this implementation's own choices; they are listed under "Choices and departures" below.

## Data reuse: the input queue

A naive datapath would read `a[i]`, `a[i+1]` and `a[i+2]` from memory in every iteration. But two of the three values needed by iteration `i+1` were already read by iteration `i`. `input_queue` keeps them in a chain of registers. On each shift (`s`), a new element enters at `q[0]`, the oldest is dropped and the rest move up one place. After the queue is full, `q[2]`, `q[1]` and `q[0]` hold `a[i]`, `a[i+1]` and `a[i+2]`. As a result, `N` results need only `N+2` reads.

A queue serves all references `a[α·i + β]` whose `β` values have the same remainder modulo `α`. Its length is

```
LEN = (max β − min β) / α + 1
```

`input_queue` computes `LEN` from the parameters `ALPHA`, `BETA_MIN` and `BETA_MAX`. For the moving average, α = 1 and β = 0, 1, 2, which gives three entries. A loop with several remainder classes would use one queue per class. The number of queues is decided when the datapath is generated; it is not a run-time setting.

## The moving-average datapath (`mavg_datapath`)

```
 a[] ──► q[0] ─┐
         │     (+)──┐
         q[1] ─┘    (+)──► R1 ──► ÷4 (two 1-bit shifts) ──► R2 ──► b[]
         │          │      l1      d, d                     l2     r
         q[2] ──────┘
         s
```

- **Sum.** Two binary `adder`s form the sum `q[0]+q[1]+q[2]`. It is W+2 bits wide, so it cannot overflow.
- **R1.** `load_reg` R1 takes the sum on `l1`.
- **Divider.** `shift_divider` divides by 4 as two right shifts of one bit, each on a cycle with `d` high.
- **R2.** R2 takes the quotient on `l2`. On `r`, the top level writes R2 into the result memory.

The divider has one register per shift step. Stage 1 takes `R1 >> 1` and stage 2 takes `stage1 >> 1`, both on `d`. The schedule needs this. In the steady state, `d` is high in every cycle, and R1 is reloaded for the next iteration while the previous value is still in its second shift step. A single register shifting in place would lose that value.

## The schedule

One iteration issues its control lines at fixed offsets after its own queue shift:

| offset | 0 | 1  | 2 | 3 | 4  | 5 |
|--------|---|----|---|---|----|---|
| action | s | l1 | d | d | l2 | r |

A new iteration starts every **c = 2** cycles. The period is set by the divider, the slowest unit, which is busy for two cycles. Two extra shifts (**Q = 2**) fill the queue before the first iteration. The latency from an iteration's shift to its `l2` is **d = 5**. With these three numbers, a run has three stages:

| stage        | length                          | moving average |
|--------------|---------------------------------|----------------|
| prologue     | d + Q                           | 7 cycles       |
| steady state | c · (N − ⌈d/c⌉)                 | 2(N − 3) cycles |
| epilogue     | (⌈d/c⌉ − 1) · c + 1             | 5 cycles       |

The whole run takes **2N + 6 cycles**, so a new result comes out every 2 cycles. The first cycles look like this (cycle 0 is the first cycle after `start`):

```
cycle   0  1  2  3  4  5  6  7  8  9  10 11
it 0          s  l1 d  d  l2 r
it 1                s  l1 d  d  l2 r
it 2                      s  l1 d  d  l2 r
fill    s  s
        |------ prologue -----|-- steady ...
```

In the steady state the pattern repeats with period 2:

- first cycle of each period: `r`, `d`, `l1`
- second cycle of each period: `s`, `d`, `l2`

The epilogue drains the last ⌈d/c⌉ = 3 iterations.

The equations assume N ≥ ⌈d/c⌉ = 3. When N = 3, the steady state is empty and the prologue leads directly into the epilogue.

### Non-pipelined execution

The same controller can also run the datapath one iteration at a time. With the input `pipelined` low at `start`, the period becomes c = d + 1 = 6, so an iteration ends before the next one begins. Then ⌈d/c⌉ = 1:

- the prologue is still 7 cycles;
- the steady state has N − 1 iterations of 6 cycles;
- the epilogue is 1 cycle (the last store).

A run takes **6N + 2 cycles**, and N may be as small as 1. The datapath is the same in both modes; only the control timing changes.

## The counter-based controller (`ctrl_fsm`)

`ctrl_fsm` is a Moore machine. Its state is a two-bit stage register (idle, prologue, steady, epilogue) plus three `loop_counter`s:

| counter   | counts                           | limit                  |
|-----------|----------------------------------|------------------------|
| `u_pe_cnt`  | cycles of the prologue, then of the epilogue | d+Q−1, then the epilogue length − 1 |
| `u_per_cnt` | cycle within the steady-state period (wraps) | c−1 (1 or 5) |
| `u_it_cnt`  | steady-state iterations          | N − ⌈d/c⌉ − 1          |

`loop_counter` is deliberately simple: if the count is below the limit it increments, otherwise it holds and raises `done`, and a clear input resets it. The top level builds its memory address counters from the same module.

The control lines are a combinational function of the stage register, the latched mode and the counter values. That function evaluates the offset template of the table above, using the parameters `D_LAT`, `Q_FILL` and `C_PER` and one offset mask per line (`M_S` … `M_R`):

- **Prologue**, counter value `t`: the action at offset `k` fires when `t − Q − k` is a non-negative multiple of `c`. Fill shifts are added for `t < Q`.
- **Steady state**: the same test, taken modulo `c`. Every iteration that overlaps a steady-state cycle is in range, so no iteration check is needed.
- **Epilogue**: the test is taken relative to the last iteration, so it does not depend on `N`.

A different loop body (other latency, period or action offsets) needs only new parameter values. The counter structure stays the same.

**Handshake.** A one-cycle `start` while idle latches `n_iter` and `pipelined`, and the prologue begins on the next cycle. `busy` stays high through the last epilogue cycle. `done` pulses for one cycle after it. An assertion flags a start with `n_iter` below ⌈d/c⌉ for the chosen mode.

With `NW = 8`, the controller has 26 flip-flops. The paper reports 13 for its counter-based controller, but it does not give its counter widths, and this controller also carries the mode logic, so the two numbers cannot be compared directly.

## Top level (`mavg_top`)

- **Input memory.** `local_mem` `u_mem_a` holds `a[]`. The host loads it through `a_we / a_addr / a_wdata`.
- **Reading.** A read-address counter advances on every `s`. The memory read is combinational, so the element reaches the queue in the same cycle.
- **Writing.** A write-address counter advances on every `r`, and `u_mem_b` stores R2 there. The host reads `b[]` through `b_addr / b_rdata`.
- **Starting a run.** `start` is ignored while `busy`. Load `a[0 .. N+1]`, then pulse `start` with `n_iter = N` and `pipelined`. N may be 3 … 254 when pipelined and 1 … 254 when not. Wait for `done`; the results are then in `b[0 .. N−1]`.
- **Observation.** The outputs `ctrl` and `phase` show the five control lines and the controller stage.

Two more engines sit beside the moving average. Each has its own ports and shares nothing with the others except the clock and reset:

- the streaming engine `mavg_nary` (`st_*`);
- the loop-carried filter `lcd_filter` (`lc_*`).

## Streaming form with an n-ary adder (`mavg_nary`)

Addition is commutative and associative. A compiler that sees the loop body as "sum of three consecutive elements", rather than as two separate additions, can therefore reuse a partial sum:

```
 x ──► B1 ──► B2 ──► (+) ──► B3 ──► (+) ──► ÷4 ──► OUT
       │              ▲              ▲
       └──────────────┴──────────────┘
```

B1 and B2 delay the input by one and two samples. B3 holds `x[k-1] + x[k-2]`, and the second adder adds the newest sample `x[k]` from B1. This replaces the queue, the two adders and the pipeline registers of the queued version. The divide by 4 and the output register stay.

**Timing.** The engine accepts one sample per clock on `st_valid`. The result for sample `k` appears one clock later with a one-cycle `st_out_valid`. Results start from the third sample after `st_clr` or reset. It needs no address counters and no controller, but it only fits loops whose operator is commutative and associative.

## Loop-carried dependence (`lcd_filter`, `lcd_queue`)

In `a[i] = (a[i-1] + a[i] + a[i+1]) / 4`, the value `a[i-1]` is the one computed in the previous iteration. To avoid a round trip through memory, `lcd_queue` puts a multiplexor in front of the oldest queue entry. With `sel_fb` high, that entry takes the fed-back result instead of its predecessor.

Because the result loops back into the datapath, the loop cannot be pipelined. Each iteration takes two clocks:

- **CALC:** the output register takes `(q[2] + q[1] + q[0]) >> 2`.
- **STORE:** the output register is written to `a[i]`. If `i < N`, the queue also shifts with the feedback selected and reads `a[i+2]`.

Three fill shifts come first, so a run takes **3 + 2N cycles**. The computation is in place in one `local_mem`. The host owns the memory port while the engine is idle and the engine owns it while busy. `n_iter` may be 1 … 254.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `mavg_top`, `mavg_datapath`, `mavg_nary`, `lcd_filter` | `W` | 16 | data width (unsigned) |
| `mavg_top`, `lcd_filter`, `local_mem` | `AW` | 8 | memory address width (256 words) |
| `ctrl_fsm` | `NW` | 8 | iteration-count width |
| `ctrl_fsm` | `D_LAT`, `Q_FILL`, `C_PER` | 5, 2, 2 | schedule latency, queue fill, period |
| `ctrl_fsm` | `M_S`, `M_L1`, `M_D`, `M_L2`, `M_R` | see `mavg_pkg` | action offsets within an iteration |
| `input_queue` | `ALPHA`, `BETA_MIN`, `BETA_MAX` | 1, 0, 2 | stride and offset range → `LEN` = 3 |
| `shift_divider` | `STAGES` | 2 | number of 1-bit shifts (÷4) |
| `lcd_queue` | `LEN`, `INS` | 3, 2 | queue length, entry fed by the multiplexor |

`mavg_pkg` holds the shared control-line struct `ctrl_t`, the stage enum `phase_t` and the moving-average schedule constants.

## Choices and departures

- **Data.** Data is unsigned, so `/4` is a floor shift, which matches C integer division of non-negative values. The source does not state widths.
- **Memories.** The local memories, their size, the combinational read port and the host ports are this implementation's own; the source only names a local memory that results are stored to.
- **Divider staging.** The staged divider is this implementation's reading of "shift right 1 bit, two cycles" that fits the overlapped schedule.
- **Counters.** The source speaks of four counters for the controller but describes three (two for the steady state, one for prologue and epilogue). The controller uses those three. The address counters are the other users of the counter module.
- **Non-pipelined mode.** It is a run-time input here; a generator would fix it when it builds the controller. Its period of d + 1 is this implementation's choice.
- **Streaming engine.** Its valid handshake, restart input and output register are this implementation's; the source draws only its adders and registers.
- **Loop-carried filter.** Its control sequence is this implementation's; the source draws only its datapath and presents it as an extension. Its loop runs over `i = 1 .. N` so that `a[i-1]` never falls outside the memory.
- **Not built.** Several things are left out:
  - the state-table controller the paper compares against;
  - the intermediate datapath variants (the version without a queue, and the queued version with pipeline registers between the adders);
  - the compiler itself;
  - conditional loop bodies and nested loops, which the source lists as future work.
- **Reset.** Registers reset to zero asynchronously (`rst_n` active low). Memory contents are not reset.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. To build and run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/mavg_pkg.sv tb/tb_mavg_top.sv \
          --top-module tb_mavg_top -o sim
./obj_dir/sim
```

The testbenches are:

- **`tb_mavg_top`** runs both engines end to end at the default sizes:
  - pipelined moving-average runs with N = 3, 5, 12, 100 and 254;
  - non-pipelined runs with N = 1, 9 and 254, mixed in so the mode switches;
  - 3000 cycles of streaming input with gaps and a restart;
  - loop-carried runs with N = 40 and 254.

  It checks every result, the 2N+6 (or 6N+2) cycle count and the N+2 reads per run. It counts prologue, steady-state and epilogue cycles, overlapped iterations, runs without a steady state, non-pipelined runs, mode switches, stream results and feedback insertions, and fails if any of them never occurs.
- **`tb_ctrl_fsm`** compares every control line in every cycle with an independently built schedule, in both modes, for N up to 255.
- **`tb_mavg_datapath`** drives the datapath with the overlapped schedule and checks every stored result.
- **`tb_mavg_nary`** streams random samples with gaps and restarts and checks every result and its timing.
- **The leaf testbenches** (`tb_adder`, `tb_load_reg`, `tb_loop_counter`, `tb_shift_divider`, `tb_local_mem`, `tb_input_queue`, `tb_lcd_queue`, `tb_lcd_filter`) check their modules against reference models.
