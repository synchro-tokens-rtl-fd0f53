# Synchro-tokens: deterministic wrappers for GALS systems

A globally-asynchronous, locally-synchronous (GALS) chip gives every core its
own clock. The usual way to pass data between such cores is through
synchronizers or arbiters. Those circuits decide on the relative order of two
unrelated edges, so the same chip fed the same inputs can show a different
cycle-by-cycle state sequence on every run. A production tester or a
silicon-debug session then has no single "good" response to compare against.

The synchro-tokens scheme removes that decision. Every synchronous block (SB)
sits inside a wrapper. For every pair of SBs that talk to each other, a
*token* circulates on a two-node ring, one node in each wrapper. A data
channel between the two SBs may only be touched by the side whose node holds
the token. Each node counts its own clock cycles to know when it must give
the token away and when it expects it back. If the token is late, the node
stops its SB's clock until the token arrives, and nothing is decided by a
race. The result is that each SB sees every word in a local clock cycle that
is fixed in advance. The data sequences do not change when clock frequencies
or wire and FIFO delays change. Only the wall-clock time changes.

This repository holds synthesizable SystemVerilog for the wrapper and the
parts around it. The wrapper is made of the node, the data ports and the
self-timed FIFO. Around it are the test clock control and a self-timed
scan chain. A behavioural model stands in for the stoppable ring
oscillator. It also holds a three-SB example system and
self-checking testbenches for every module.

## The node: holding, recycling and stopping the clock

The node (`rtl/token_node.sv`) is the heart of the scheme and the part whose
exact timing matters most.

**Token encoding.** The ring is two wires, each node's `token_out` driving
the other's `token_in`, with one inverter somewhere on the loop. A node
*has the token* while `token_in != token_out`. It passes the token by
toggling `token_out`. Thanks to the inverter, exactly one of the two nodes has
the token at any time. In `st_system` the inverter is on the path from the
lower-numbered SB, so after reset the higher-numbered SB has it.

**Two counters, two registers.** Each node has a *hold* down-counter and a
*recycle* down-counter. Each is reloaded from its own register (`hold_reg`,
`recycle_reg`). The registers reset to `HOLD_RESET`/`RECYCLE_RESET` (default
4 and 6). They can be rewritten at any time through `cfg_we`/`cfg_hold`/`cfg_recycle`,
which stands for a ROM, fuse or tester download path.

**Cycle schedule** with hold = H and recycle = R:

```
 phase      | recycle ........................ | hold ............. | recycle ...
 recycle_cnt| R   R-1  ...  1   0   (0 ...)    | 0   0   ...  0     | R  R-1 ...
 hold_cnt   | H   H    ...  H   H              | H   H-1 ...  1     | H  H   ...
 dclken     | 0                                | 1 (exactly H cycles)| 0
 token_out  |                                  |       toggles at the end ^
```

* **Recycle phase.** The recycle counter counts down by one per cycle. The
  node ignores `token_in` completely until the counter is zero, so a token
  that comes back early has no effect. At zero the node checks for the
  token. If the token is there, the hold phase starts at the next edge. The
  recycle phase therefore lasts R+1 cycles.
* **Late token.** If the counter is zero and the token is not there,
  `sbclken` drops right after the clock edge. The AND of all node enables in
  the wrapper drops too, and the ring oscillator stops in its low phase.
  When the token arrives, `sbclken` rises at once (it is combinational in
  `token_in`) and the oscillator restarts. The next rising edge moves the node
  into the hold phase. In *local cycles* the schedule is therefore the same
  whether the token was early or late. This is the source of determinism.
* **Hold phase.** `dclken` is high for exactly H cycles, and the data ports
  of this node may exchange words with their channels. On the edge that ends
  the last hold cycle, three things happen together:
  * the hold counter presets;
  * the recycle counter loads R;
  * `token_out` toggles, which passes the token.

A late token on any ring stops the *whole* SB, including nodes that are
holding their own token at that moment. `sb_wrapper_tb` checks that this
case occurs and is handled.

**Deadlock.** Two SBs each stopped while waiting for the other's token can
form a cycle. Whether this happens is itself deterministic. It is avoided if,
in every SB, the hold+recycle sums of all its nodes are equal. This
condition is sufficient but not necessary. `st_system` gives every node the
same values, so it meets the condition by default. Keep it in mind when you
load other values.

**Throughput.** A channel moves at most H words per H+R+1 cycles. At the
defaults that is 4/11 of a word per cycle. A deeper analysis of the scheme
usually quotes H/(H+R). The extra cycle here is the cycle spent at recycle
count zero, in which the token is checked.

## Data ports and the asynchronous channels

Each channel is a four-phase, bundled-data handshake (`req` rises with valid
data, `ack` rises, `req` falls, `ack` falls). Channels may be pipelined with
self-timed FIFOs.

* **`output_port`** (SB to channel). It takes a word on a rising edge where
  `dclken & valid & !full`. That edge registers the word and raises `req`.
  `ack` clears `req` asynchronously. `full` is high when the port is
  disabled or a handshake is still in progress, which includes a FIFO that
  is full.
* **`input_port`** (channel to SB). On each rising edge where `dclken` is
  high and the FIFO head offers a new word, the port registers the word and
  raises `ack`. In the next cycle `empty` is low and `data` shows the word.
  The SB must take every word shown with `empty` low: there is no read
  strobe. When the FIFO drops `req`, `ack` clears asynchronously and the
  next word can be taken on the next edge. With `dclken` low the port
  samples nothing, so an asynchronous change of `req` is never seen while
  the port is disabled. `empty` and `data` come straight from flip-flops.
* **`fifo_stage` / `self_timed_fifo`**. This is a clockless FIFO of `DEPTH`
  stages (default 4, equal to the hold value). Each stage is a fully
  decoupled latch controller with three latched state bits: `full`,
  `in_ack` and `out_req`. A FIFO of N stages therefore holds N words. The
  handshake wires of neighbouring stages form combinational loops on
  purpose, and lint tools report them as such.

The scheme relies on two timing rules that the RTL does not enforce. They
must be met by the physical design:

1. Every FIFO stage and port must complete a four-phase handshake within one
   local clock cycle of the SBs at both ends. This gives one word per cycle
   and a deterministic `full`/`empty`.
2. A word written just before the token leaves must reach the FIFO head
   before the token reaches the receiving node and that node enables its
   input port.

In zero-delay simulation both rules hold trivially. `st_determinism_tb`
adds wire delays that respect them. When the token wires are made faster
than the channel ends, which breaks rule 2, the same test sees the data
sequences change.

## Clocks

* **`stoppable_clock`** is a *behavioural model*, not synthesizable. It
  stands for a ring oscillator closed through a NAND gate with the clock
  enable. Each period is a low phase and then a high phase, each
  `BASE_HALF_PS + freq_sel*STEP_HALF_PS` long. At the end of a low phase
  the model waits for `clken` and, after `RESTART_PS`, rises. A stop request
  always lets the current high pulse finish. The first pulse after a restart
  has full width. `freq_sel` models digitally selected inverter delay.
  Synthesis sees no clock from this model. To synthesize a wrapper, build
  it with `EXT_CLK=1` and feed `ext_clk` from a real stoppable oscillator
  that is gated by the wrapper's `clken`.
* **`test_clock_ctrl`** clocks the Test SB from the tester's TCK.
  * In *Interlocked Mode* (`interlocked=1`) a latch-based gate lets a TCK
    pulse through only if the wrapper's clock enable was high while TCK was
    low. A late token then suppresses whole TCK pulses, and exchanges with
    the tester stay deterministic.
  * In *Independent Mode* TCK passes ungated. Tokens and TCK no longer wait
    for each other, and exchanges are no longer deterministic. No
    synchronizer is placed on `token_in` for this mode.
  * Change `interlocked` only while TCK is low.

## The scan chain: a self-timed shift register clocked at both ends

`self_timed_scan_chain` shows how test data can move through the design
without a global clock. The bits sit in a self-timed FIFO of
`LEN + TAIL_EMPTY` one-bit stages (defaults 16 + 3). An output port
writes the tail and an input port reads the head. Both ports are clocked
by TCK and enabled by `shift_en`.

* After reset the chain is empty. The first `LEN` shifts only fill it,
  and `tdo` stays 0 during them.
* After that, each shift pops one bit at the head and pushes one at the
  tail. `LEN` bits stay inside, and the empty tail stages always leave room
  for the next bit.
* Seen from TCK it is a `LEN`-bit shift register, cleared by reset, with
  a registered output. After shift k (k > `LEN`), `tdo` holds the bit
  shifted in at shift k − `LEN`.

Between shifts the bits ripple forward on their own. That ripple must
finish within one TCK period. Two assertions catch a TCK that is too
fast: the tail must always accept a bit, and the head must always offer
one once the chain is full.

Only the shift path is built. The chain has no cells that capture or
update SB state, such as boundary-scan cells or access to the hold and
recycle registers.

## The example system: `st_system`

This is the top module. It has three SBs, three token rings and six FIFOs.
The SB cores are outside the module: their synchronous interfaces are ports
indexed `[SB][node]`, and each SB's clock is an output so that core logic
can run on it.

| ring | node A     | node B     | FIFOs                     |
|------|------------|------------|---------------------------|
| 0    | SB0 node 0 | SB1 node 0 | SB0→SB1, SB1→SB0          |
| 1    | SB0 node 1 | SB2 node 0 | SB0→SB2, SB2→SB0          |
| 2    | SB1 node 1 | SB2 node 1 | SB1→SB2, SB2→SB1          |

* SB0 and SB1 run on their own stoppable oscillators, with frequency set by
  `freq_sel[0]` and `freq_sel[1]`.
* SB2 is the Test SB. Its wrapper is built with `EXT_CLK=1` and is clocked
  from `tck` through `test_clock_ctrl`.
* A scan chain is shifted on the ungated `tck`, through ports
  `scan_en`, `scan_tdi` and `scan_tdo`. A TAP controller would drive these
  ports. Because the chain runs on `tck` rather than on the gated Test SB
  clock, it can still shift after the system clocks have stopped.

Parameters and their defaults: `DATA_W=8`, `CNT_W=8`, `FIFO_DEPTH=4`,
`HOLD_RESET=4`, `RECYCLE_RESET=6`, `BASE_HALF_PS=5000`, `STEP_HALF_PS=500`,
`SCAN_LEN=16`, `SCAN_EMPTY=3`.
The hold and recycle defaults follow the example waveforms of the method.
The widths, the depth and the oscillator settings are choices of this
design.

`sb_wrapper` is usable on its own. It has `N_NODES` nodes. Each node
has `N_OUT` output channels and `N_IN` input channels (default 1 each).
Every node has the same counts, with at least one channel each way. To
leave a port unused, tie `tx_valid` or `in_req` low. All channel
ports are indexed `[node][channel]`, and all ports of a node open and close
together with its Dclken. The SB clock comes from the built-in oscillator,
or from `ext_clk` when `EXT_CLK=1`.

## Module list

| file | kind | role |
|------|------|------|
| `rtl/st_pkg.sv` | package | widths, default hold/recycle/depth, node phase enum |
| `rtl/token_node.sv` | RTL | token-ring node (counters, Dclken, SBclken) |
| `rtl/output_port.sv` | RTL | SB → channel data port |
| `rtl/input_port.sv` | RTL | channel → SB data port |
| `rtl/fifo_stage.sv` | RTL (latches) | one self-timed FIFO stage |
| `rtl/self_timed_fifo.sv` | RTL | chain of FIFO stages |
| `rtl/stoppable_clock.sv` | behavioural model | stoppable ring oscillator |
| `rtl/test_clock_ctrl.sv` | RTL | Test SB clock from TCK, two modes |
| `rtl/self_timed_scan_chain.sv` | RTL | TCK-shifted self-timed shift register |
| `rtl/sb_wrapper.sv` | RTL | one SB's wrapper |
| `rtl/st_system.sv` | RTL (top) | three-SB example system |

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself after a fixed time
limit. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/st_pkg.sv tb/st_system_tb.sv \
          --top-module st_system_tb -o sim
./obj_dir/sim
```

Replace `st_system` with any other module name to run its test. Three
more system-level tests have their own names: `st_determinism_tb`,
`st_throughput_tb` and `sb_wrapper_multi_tb`. Two files in `tb/` are
helpers, not tests:
* `sb_core_model.sv` stands in for the core side of one node;
* `delay_wire.sv` is a transport delay. Add
`-Wno-fatal` if your Verilator version turns the lint warnings about the
intended latches and loops into errors.

What the tests establish:

* **`st_system_tb`** runs the top at its default parameters, with the
  testbench acting as the three SB cores. It runs nine scenarios:
  * five scenarios with different oscillator settings (up to twice the
    nominal period) and TCK periods from 5 ns to 20 ns;
  * three scenarios after loading hold 6 / recycle 3 into every node;
  * one scenario in Independent Mode.

  In every Interlocked scenario, each SB's signature over its first 400
  local cycles must equal that of the first scenario of its group. The
  signature covers which words were sent and received in which local cycle.
  In every scenario, all words must arrive in order and every hold must last
  exactly H cycles.

  The test also counts these events, and each must occur at least once:
  * token passes;
  * early tokens;
  * clock stops;
  * suppressed TCK pulses;
  * an output port full while enabled;
  * an input port empty while enabled;
  * register loads;
  * the Independent Mode run;
  * a breakpoint.

  In the breakpoint scenario, TCK is stopped while the Test SB holds both
  its tokens. Both system SBs must stop once their recycle counters run
  out. Their traces must still match the reference after TCK resumes. This
  is the way to freeze the whole system from the tester: hold tokens in the
  Test SB, and every other SB stops at a deterministic cycle.

  A last part shows single stepping. Every node loads hold 1 and recycle
  1, and TCK slows to a 1 µs period. The system SBs then run a short burst
  every third TCK cycle, 3 cycles each, and are stopped before every TCK
  edge. The per-step cycle counts must be identical for two oscillator
  settings. Finer breakpoints come from smaller hold and recycle values on
  the rings to the Test SB.

  In all scenarios, the scan chain is also shifted on random TCK cycles
  with random data. After every TCK cycle, `scan_tdo` is compared with a
  16-bit shift-register model. Scan shifts and single steps are counted
  as further mechanisms.
* **`st_determinism_tb`** rebuilds the same three-SB, six-FIFO system from
  wrappers and FIFOs, and puts a transport delay (`tb/delay_wire.sv`) on
  every token wire and on every request, acknowledge and data wire at both
  ends of every FIFO. Nominal delays are 5 ns per token wire and 500 ps per
  channel wire. The data wires get half the delay of their request wire.
  These values meet both timing rules:
  * one four-phase handshake fits in a clock cycle;
  * a word sent just before a token pass reaches the FIFO head before the
    token reaches the receiver.

  After a nominal run, 4000 runs set each delay independently to 50%, 75%,
  100%, 150% or 200% of nominal, and each oscillator to between 100% and
  200% of its nominal period. Every node's signature over its first 100
  local cycles must equal the nominal one. Shrinking the token delays
  below the channel delays breaks the second rule, and the signatures
  then differ in every run.

  For contrast, 20 more runs force every node's `dclken` and `sbclken`
  high. The ports are then always open, the clocks never stop, and the
  same delay changes must alter the sequences. They do so in every
  bypassed run, even though all words still arrive in order.
* **`st_throughput_tb`** measures one channel pair between two one-node
  wrappers. Both SBs have the same 10 ns clock and FIFOs of depth H = 4.
  The recycle value R is swept from 0 to 9. The test checks:
  * a node period is always H + R + 1 local cycles;
  * each hold carries exactly H words;
  * a FIFO of depth H never fills during a hold;
  * throughput never exceeds H/(H+R).

  From R = 4 upward no time is lost to clock stops. Each direction then
  carries H/(H+R+1) words per clock period, which is 4/9 at R = 4. Below
  R = 4, late tokens stop the clocks, and the rate stays near 1/2.
* **`sb_wrapper_multi_tb`** joins a node with two output channels and one
  input channel to a node with one output and two inputs. All three
  FIFOs on that ring must deliver in order. Both A→B channels must show
  words in the same receiver cycle, and the traces must match for three
  frequency pairs.
* **`sb_wrapper_tb`** builds a two-node wrapper between two one-node
  wrappers and checks:
  * ordered delivery;
  * that the clock enable is the AND of the node enables;
  * that a late token stops the SB while the other node holds;
  * identical signatures for two sets of frequencies.
* The block tests check:
  * the node's exact counter sequence, and its hold and recycle lengths with
    early tokens, with late tokens and after a register load;
  * the ports' throughput of one word per cycle and their full/empty rules;
  * the FIFO's capacity and ordering;
  * the clock model's periods, stop and restart;
  * the test clock gate's pulse integrity;
  * that the scan chain behaves as a plain shift register, including while
    it fills after reset and while `shift_en` is low.

In testbenches, drive the asynchronous handshake inputs with nonblocking
assignments. The latch loops of the FIFO settle reliably in Verilator when
their inputs change in the NBA region.

## Limits and departures

* **Simulation delays.** All wrapper logic is zero-delay RTL. Wire delays
  are added only in `st_determinism_tb`, on the token wires and at the two
  ends of each FIFO. Delays inside the FIFO stages and the ports are not
  varied.
* **Circuits chosen here.** The method specifies the function of the data
  ports and FIFO stages, not their circuits. The port circuits, the
  decoupled FIFO stage, the test clock gate and the exact cycle alignment of
  the node (Dclken for H cycles, one check cycle at recycle zero) are this
  design's choices.
* **Test and scan logic not included.** The following are not part of this
  RTL:
  * the IEEE 1149.1 TAP controller of the Test SB;
  * the scan cells that would connect a self-timed scan chain to
    boundary, P1500, internal or hold/recycle state (only the chain's shift
    path is built);
  * the I/O SB.

  The hold and recycle registers are loaded through a parallel port on each
  node instead of a scan chain.
* **Area figures.** The method's area estimates (about 136 two-input gates
  per node, 13 + 4.5 per data bit per port, 4 + 4.5 per data bit per FIFO
  stage) were not reproduced.
* **Independent Mode metastability.** In Independent Mode the Test SB's
  nodes sample `token_in` without a synchronizer, so metastability is
  possible there.
