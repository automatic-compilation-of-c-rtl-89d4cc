# A template co-processor for C functions on FPGAs

This RTL accelerates one C function in hardware by running it on a small co-processor. The co-processor
has two halves:

* a **controller**, which is a finite-state machine (FSM) that executes the function's static schedule at
  one state per clock;
* a **data-path**, which holds the function's variables in registers and feeds them through multiplexers
  into a set of single-purpose functional units (FUs).

An optimising C compiler is what normally produces the schedule. It lists, for every clock cycle, which
FUs run, which registers they read and write, and where control goes next. The hardware does not
interpret instructions. Each state directly drives register enables, multiplexer selects and FU enables,
as in a horizontally microcoded or VLIW machine whose instruction word is spread over the whole data-path.

A second, smaller piece shows the other idea behind the approach: **bit-width inference**. Some register
bits can be proved constant at compile time. Those bits need no flip-flops, and the logic that computes
them can be removed (`bw_pkg`, `bw_example_dp`).

Everything is SystemVerilog 2017. It passes `verilator --lint-only -Wall` and is synthesizable. At its
default size (32-bit data, 16 registers, 64 states, 256 words of local memory), `coproc_top` synthesizes
to about 420 word-level cells, 524 flip-flop bits and 28 352 RAM bits (the top adds the example
data-path described below: 446 cells and 543 flip-flop bits in all):

* 8 192 of the RAM bits are the data memory;
* 20 160 are the table of control words.

## Block structure

```
coproc_top
├── controller                 FSM
│   ├── ctrl_store             one control word per state (loadable table)
│   ├── ctrl_next_state        next-state decoding
│   ├── ctrl_state_reg         state register
│   └── ctrl_signal_decode     control-signal decoding -> dp_ctl_t
├── datapath
│   ├── dp_regfile             16 x 32-bit registers, per-register enable and write mux
│   ├── operand_mux  (x3/FU)   register (or immediate) -> FU input
│   ├── fu_addsub fu_shift fu_mul fu_mac fu_logic fu_cmp fu_mux
│   └── fu_mem + data_mem      memory access unit and local dual-port RAM
└── bw_example_dp              independent bit-width-trimmed example data-path (uses bw_pkg),
                               side by side with the co-processor, ports ex_*
```

Shared types and sizes are in `rtl/coproc_pkg.sv`:

* `ctrl_word_t` is the encoded control word of one state;
* `dp_ctl_t` holds the decoded data-path controls;
* `fu_id_e` numbers the FUs;
* the `OP_*` constants are the per-FU operation codes.

## How a schedule executes

This section is what a schedule writer must get right, so it comes first.

**One state per clock.** In each state, every FU enabled in that state's control word does three things:

1. it reads its operands from the registers, as they were at the start of the state;
2. it computes its result combinationally;
3. it writes the result into its destination register at the clock edge that ends the state.

Several FUs may work in the same state. At most one FU of each kind exists, so the schedule may use each
kind of FU once per state. A register may be read and written in the same state; the read sees the old
value.

**When results become visible.**

| producer in state *s*                        | value usable from state |
|----------------------------------------------|-------------------------|
| any combinational FU (add, shift, mul, mac, logic, cmp, mux) | *s*+1  |
| load (`fu_mem`, `OP_LOAD`)                   | *s*+2                   |
| store                                        | memory updated at the end of *s*; a load in *s*+1 sees it |

A load takes two states because the RAM reads synchronously. The memory unit remembers the load's
destination register and writes the returning word one state later, alongside whatever the FUs of that
state write. A schedule must not let an FU write the same register in that state; an assertion checks
this.

**Control flow.** State 0 is the idle state. A one-cycle `start` moves the FSM to state 1. After each
state the next state is chosen by `ctrl_next_state`, in this order:

1. if the word has `last` set, go back to idle (0) and pulse `done`;
2. else if `br_en` is set and register `br_src` is non-zero (zero when `br_inv` is set), go to `br_target`;
3. else go to `next`.

The branch condition is a register value, so it must be written in an earlier state. Usually the
comparator writes it (`fu_cmp` returns 0 or 1). Loops are backward branches. Because the comparison can
be issued early in the loop body, a loop can close with no extra state.

**Timing seen by the host.** If `start` is sampled at clock edge *E*, state 1 runs in the cycle after
*E*. A run that executes *N* states (counting the `last` state) raises `done` for one cycle right after
the edge *E*+*N*. So `done` comes *N*+1 cycles after the cycle in which `start` was high. `busy` is high
exactly while the FSM is outside state 0.

## The control word

`ctrl_word_t` is 315 bits. It contains one 37-bit `fu_ctrl_t` slot per FU, indexed by `fu_id_e`, plus the
control-flow fields:

| field            | bits | meaning |
|------------------|------|---------|
| `fu[f].en`       | 1    | FU *f* issues in this state |
| `fu[f].op`       | 3    | operation (see below) |
| `fu[f].src_a/b/c`| 4 each | operand registers |
| `fu[f].b_imm`    | 1    | operand B is `fu[f].imm` (16-bit, sign-extended) instead of `src_b` |
| `fu[f].dst`      | 4    | destination register (load destination for the memory unit; unused for stores) |
| `br_en`, `br_inv`, `br_src`, `br_target` | 1,1,4,6 | conditional branch |
| `next`           | 6    | fall-through successor |
| `last`           | 1    | end of the schedule |

The FU operations are:

| FU (`fu_id_e`) | operation |
|---|---|
| `FU_ADDSUB` | `op[0]`: 0 a+b, 1 a−b |
| `FU_SHIFT`  | 0 a<<b, 1 a>>b logical, 2 a>>b arithmetic (b mod 32) |
| `FU_MUL`    | low 32 bits of a·b |
| `FU_MAC`    | a·b + c |
| `FU_LOGIC`  | 0 and, 1 or, 2 xor, 3 not a |
| `FU_CMP`    | 0 ==, 1 !=, 2 <, 3 <=, 4 >, 5 >= (signed), 6 <, 7 >= (unsigned); result 0/1 |
| `FU_MUX`    | c ≠ 0 ? a : b (the C `?:` operator, for if-converted code) |
| `FU_MEM`    | 0 load `dst ← mem[a+b]`, 1 store `mem[a+b] ← c` (address mod 256) |

All arithmetic wraps modulo 2³², as C `int` arithmetic does on a 32-bit machine.

`ctrl_signal_decode` expands a word into `dp_ctl_t`, which holds:

* the FU enables;
* every operand multiplexer's select and sign-extended immediate;
* one register enable and one 3-bit write-source select per register;
* the load destination;
* the condition register index.

Two FUs naming the same destination is a schedule error. It raises `wr_conflict`, the lower-numbered FU
wins, and the controller asserts. In the idle state every enable is off.

## Controller

The controller has the three classic parts of an FSM, each in its own module: state register, next-state
decoding and control-signal decoding. The one addition is `ctrl_store`. This is the per-state table that
the two decoders read. It is written through `cfg_we/cfg_addr/cfg_wdata`, one word per cycle, while the
machine is idle.

A flow that generates a co-processor for a single function would fold this table into fixed decoding
logic. Keeping it as a loadable RAM means one netlist runs any schedule of up to 63 states. The cost is
the table's 20 kbit. For a frozen single-function design, replace `ctrl_store` with a constant function
of the state; nothing else changes.

## Data-path

* **Registers** (`dp_regfile`): 16 × 32 bits, all reset to 0. Each register has its own enable and its own
  8-input write multiplexer, so every FU can write any register in parallel. A host port writes one
  register while idle, and host writes win.
* **Interconnect** (`operand_mux`): each FU has three operand multiplexers: A and C from any register,
  and B from any register or the immediate. This is a full crossbar. A generated design would keep only
  the register-to-FU paths its schedule uses, binding FUs to registers so as to share multiplexer inputs.
  The crossbar is the general, schedule-independent form of the same structure.
* **FUs**: combinational units, one of each kind (table above). `FU_MASK` on `coproc_top`/`datapath`
  removes FUs that an application does not need. A cleared bit removes the unit, its operand
  multiplexers and its write-back input. `tb_workloads` runs two kernels on an instance without the
  multiply-accumulate unit.
* **Memory** (`fu_mem`, `data_mem`): a 256-word true dual-port RAM. Port A belongs to the memory unit and
  port B to the host. Both ports read synchronously (read-before-write on the same port). Writing the same
  word from both ports in one cycle is forbidden, and an assertion checks for it.

By default the data-path is not pipelined: an FU result is registered at the end of the state that
issues it. The `PIPELINED` parameter (on `datapath` and `coproc_top`) inserts a register stage in the
interconnect, between the operand multiplexers and the FUs. Operands and FU-side controls are captured
at the end of the issuing state, and the FUs compute in the next state. Every result then arrives one
state later: usable two states after issue, and load data three. Branch conditions still read the
registers directly. A schedule must be written for the latency it runs with: the same control words do
not give the same results in both modes. `tb_datapath_pipe` checks the pipelined data-path against a
delayed model with random controls. `tb_coproc_pipelined` runs a dot product end to end on it.

The `FU_W` parameter (an array with one width per FU kind, default `DATA_W` for all) narrows the
add/subtract, multiply, multiply-accumulate, logic, compare and select FUs. A narrowed FU works on the
low `W` bits of its operands. Its result is sign-extended back to `DATA_W`; the compare flag is
zero-extended. The shifter and the memory FU always stay at full width. Widths outside 2..`DATA_W` stop
elaboration with an error. The widths are meant to come from a bit-width analysis such as the rules
below, but they are set by hand. `tb_datapath_narrow` checks a data-path with mixed widths against a
model that truncates and extends in the same way.

## Host interface (`coproc_top`)

All signals are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset.

1. While `busy` is low:
   * write the schedule with `cfg_we`, `cfg_addr` (state 1 first) and `cfg_wdata`;
   * write the arguments with `host_reg_we`, `host_reg_idx` and `host_reg_wdata`;
   * write the input arrays with `host_mem_we`, `host_mem_addr` and `host_mem_wdata`.
2. Pulse `start` for one cycle.
3. Wait for `done`. Then read the registers through `host_reg_idx`/`host_reg_rdata`, which is
   combinational, and the memory through `host_mem_addr`/`host_mem_rdata`, whose data arrives one cycle
   after the address.

`state`, which is the current FSM state, and `fu_active`, which shows the FUs issuing this cycle, are
status outputs for profiling. Assertions flag any host register, memory or control-store write while
`busy`.

The `ex_*` ports reach `bw_example_dp` (next section), which sits beside the co-processor and shares only
its clock and reset. Tie them to 0 if the example is not wanted; synthesis then removes it.

## Bit-width inference (`bw_pkg`, `bw_example_dp`)

A 32-bit C variable rarely needs 32 flip-flops. `bw_pkg` gives every bit one of three values: 0, 1 or
unknown (U). It then propagates these values through operators with per-bit rules:

| result bit *i* for operand bits (m, n) | 0,0 | 0,1 | 1,1 | 0,U | 1,U | U,U |
|---|---|---|---|---|---|---|
| AND | 0 | 0 | 1 | 0 | U | U |
| OR  | 0 | 1 | 1 | U | 1 | U |
| 2-1 multiplexer | 0 | U | 1 | U | U | U |
| adder (only if no lower bit position can generate a carry, else U) | 0 | 1 | 0 | U | U | U |
| multiplier (only if the 0 operand is 0 in all lower bits too, else U) | 0 | 0 | U | 0 | U | U |
| left shift by *k* | low *k* bits 0, the others shifted | | | | | |

Any bit that comes out as known needs no storage.

`bw_example_dp` applies these rules at elaboration time to a small data-path:

* Reg1 and Reg2 hold values whose two low bits are constants (`R1_LOW`, `R2_LOW`).
* M1 selects between Reg1 and Reg2.
* The multiplier forms M1 × Reg1.
* The shifter forms Reg2 << 2.
* M2 selects between the product and the shifted value, and the result goes to Reg3.

With the defaults (both low bit pairs ending in 0), the analysis runs as follows:

1. M1's LSB is 0, because both multiplexer inputs have LSB 0.
2. The product's LSB is therefore 0.
3. The shifter's two LSBs are 0.
4. Reg3's LSB is therefore the constant 0.

The module generates a flip-flop only for each unknown bit and ties each known bit to its constant. At
`WIDTH` = 8 it keeps 19 flip-flops instead of 24. Assertions check at run time that every bit declared
constant really holds that value. The port behaviour is identical to the untrimmed circuit, and the
testbench compares it bit for bit against a full-width model.

The rules are plain constant functions (`t_and`, `t_or`, `t_mux` per bit; `tv_mux`, `tv_add`, `tv_mul`,
`tv_shl` per vector), so they can be reused to size the FUs and registers of other instances. The co-processor
itself is parameterised by `DATA_W`; its FU widths can be narrowed with `FU_W`, but not automatically.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Shared test code is in `tb/coproc_ref_pkg.sv`. It
contains a C-semantics reference for every FU, and the helpers `rr`, `ri`, `word` and `branch`, which
assemble control words. Writing a schedule looks like this:

```systemverilog
p[4].fu[FU_MEM] = ri(OP_LOAD, 6, 4, 0);   // r6 <- mem[r4 + 0]
p[4].fu[FU_CMP] = rr(OP_LT,   9, 4, 8);   // r9 <- r4 < r8
p[7].fu[FU_MAC] = rr(0, 5, 6, 7, 5);      // r5 <- r6*r7 + r5
p[7] = branch(p[7], 9, 4);                // if r9 goto 4
```

The FU and memory testbenches use random operands including corner values. Units with state are checked
against shadow models. `tb_datapath` drives random multi-FU control vectors and checks all registers every
cycle. `tb_datapath_pipe` and `tb_datapath_narrow` do the same for the pipelined and the narrowed
variants. `tb_controller` walks a schedule with loops and checks each state's enables and the `done` timing.

The end-to-end tests are hand-scheduled embedded kernels. Each is checked against a C-level model for
results and for the exact cycle count:

| testbench | kernel | schedule | cycles |
|---|---|---|---|
| `tb_coproc_top` (full default size) | autocorrelation, `out[lag] = Σ x[i]·x[i+lag] >> scale` | 10 states | 3 + Σ_lag (3 + 4(N−lag)) |
| `tb_coproc_top` | comb sort, if-converted with `fu_cmp` + `fu_mux` | 17 states | 7 per inner step + 8 per pass + 2 |
| `tb_workloads` (no MAC unit) | rate-1/2, K=7 convolutional encoder | 17 states | 2 + 15 per bit |
| `tb_workloads` (no MAC unit) | Viterbi add-compare-select butterflies | 13 states | 2 + 11 per butterfly |
| `tb_workloads_media` | RGB to YCbCr, 8-bit fixed-point coefficients, MUL and MAC in parallel | 14 states | 2 + 12 per pixel |
| `tb_workloads_media` | IMA ADPCM decoder: table look-ups, if-converted bit tests, clamps as multiply-by-flag | 23 states | 2 + 21 per sample |
| `tb_workloads_media` | IMA ADPCM coder: three compare-and-subtract quantiser steps, MAC adds flag·step | 26 states | 2 + 24 per sample |
| `tb_workloads_sha` | SHA-1 compression of one block (message expansion and 80 rounds); checked against the published digest of "abc" | 56 states | 1022 per block |
| `tb_workloads_viterbi` | Viterbi branch metrics: four distances per received pair of 3-bit soft symbols | 9 states | 2 + 8 per pair |
| `tb_workloads_idct` | 8x8 integer IDCT row pass (Chen–Wang form, 11 multiplications per row) | 30 states | 3 + 28 per row |
| `tb_workloads_idct` | matching column pass with rounding and clipping to [−256, 255]; also run after the row pass as a full 2-D IDCT | 41 states | 3 + 39 per column |
| `tb_workloads_fdct` | 8x8 integer forward DCT row pass (13-bit constants, 12 multiplications per row), in place | 43 states | 3 + 41 per row |
| `tb_coproc_pipelined` (`PIPELINED=1`) | dot product with the multiply-accumulate unit, scheduled for the pipelined latencies | 9 states | 3 + 6 per element |

One further kernel of the embedded suite used to evaluate the template is not scheduled here: a
complete Viterbi decoder (metrics, add-compare-select and traceback in one function).

`tb_coproc_top` also counts how often each mechanism occurs, and fails if any never does. The mechanisms
are:

* each FU issuing;
* parallel issue;
* branch taken;
* branch not taken;
* load;
* store;
* `done`;
* host register and memory access.

These schedules were written by hand, not produced by a compiler, so their cycle counts show what the
hardware does, not what an optimising scheduler would achieve.

To run any testbench with plain Verilator, from the folder that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/coproc_pkg.sv rtl/bw_pkg.sv tb/coproc_ref_pkg.sv tb/tb_coproc_top.sv \
    --top-module tb_coproc_top -o sim && ./obj_dir/sim
```

Every testbench finishes in well under a second of simulation time.

## Design choices to know about

These are choices made for this RTL rather than fixed properties of the template:

* **Sizes.** The 32-bit word, 16 registers, 64 states, 16-bit immediates and 256-word memory are
  package parameters in `coproc_pkg`. Change them there.
* **Schedule storage.** The schedule is a loadable table, not hard-wired decode logic (see Controller).
* **Interconnect.** The operand interconnect is a full crossbar, not a bound, reduced interconnect.
* **FU count.** There is one FU of each kind. Duplicating a kind, such as two adders, would need more
  slots in `ctrl_word_t` and more write-source codes.
* **Memory.** A load takes two states. The memory is a single local RAM; there is no path to
  system memory.
* **Branch conditions.** A branch condition is "register non-zero", optionally inverted. There are no
  flags.
* **Host protocol.** The start/busy/done handshake and the host access ports are this design's own.
* **Bit-width trimming.** Automatic trimming is shown on the example data-path. In the co-processor,
  FU widths can be reduced through `FU_W`, but they are chosen by hand. The registers, the
  interconnect and the shifter stay at `DATA_W`.
* **Not included.** No C compiler, scheduler, binder or estimator is included. Schedules must be written
  by hand with the helpers in `tb/coproc_ref_pkg.sv`, or generated by an external tool that emits
  `ctrl_word_t` values.
