# Mutual inter-unit test hardware for mesh-connected multiprocessors

A self-test circuit that checks itself is only as good as its own test logic.
This design avoids that weak point. In a mesh of processor units, every unit
is tested by several of its neighbours, and it tests several neighbours in turn.
A unit is declared faulty only when a **majority** of its testers say so. One
tester with broken test logic therefore cannot condemn a healthy unit, and it
cannot clear a faulty one. Every test runs at the same time in every unit, in
hardware, while the machine is operating.

The RTL is written in SystemVerilog. It holds the per-unit test hardware, the
majority voter, and a parameterised 2-D or 3-D mesh that wires them together.
The processor cores are outside the design. They appear only as ports: a
signature goes in and a response comes back.

## Who tests whom

Units sit on a `D`-dimensional grid, with `D` = 2 or 3. Unit `(x, y, z)` is
numbered `u = x + N_COLS*(y + M_ROWS*z)`. The grid wraps around at every edge,
so it is a torus. For example, the unit at the top of a column counts the
bottom unit of that column as the neighbour "above" it.

- **Tested set C(u):** the units one step *ahead* of `u` along any non-empty
  subset of the dimensions.
- **Testing set K(u):** the units one step *behind* `u` in the same way.

Each set has `2^D - 1` members, which is always an odd number, so a majority
is always defined:

| D | neighbours | tested set C(x,y[,z]) (steps of +1, mod size) |
|---|-----------|-----------------------------------------------|
| 2 | 3 | (x+1,y), (x,y+1), (x+1,y+1) |
| 3 | 7 | every non-zero combination of +1 on x, y, z |

Inside the RTL, neighbour number `i` (1 .. 2^D−1) is identified by its bits:
bit 0 is a step in x, bit 1 in y and bit 2 in z. NTU `i` of unit `u` tests
unit `u + offset(i)`, where it is testing neighbour number `i`. The same index
`i` is used at both ends of every link. `mit_pkg::neighbour()` does this
arithmetic.

The number of neighbours is sometimes written as `d(d−1)+1`. That formula
agrees with `2^d − 1` only for d = 2 and d = 3. Those are the only sizes
supported here, and `mit_mesh` rejects any other `D` at elaboration.

## One test loop

Each unit runs the same loop over and over, as long as its own neighbours
still judge it healthy:

1. **Wait.** Counter 2 counts `TAU0_MAX` clock ticks.
2. **Issue.** When counter 2 wraps to zero, the core reads test signature
   `T(k)` from memory 1. It pulses `start` and advances `k` modulo `KMAX`.
3. **Send.** Every NTU (neighbour test unit) latches `T(k)` and `k`, and raises
   `t_valid` for one cycle towards its tested neighbour. The NTU is now busy.
4. **Collect.** Counter 12 of each NTU counts `TAU_RESP` ticks. The first
   `r_valid` seen during that window is captured.
5. **Judge.** When the window closes, the comparator checks the captured
   response against `R0(k)`, the expected response read from the NTU's memory 11.
   A missing response fails the check, and so does a different one. A failure
   clears the NTU's flag for that neighbour (flip-flop 14). The flag stays
   cleared until reset.
6. Once every NTU is idle again, flip-flop 4 clears and the next wait begins.

The cycle timing, as the testbenches check it:

```
cycle   0        start (core, 1 cycle)          loop_active=1
cycle   1        t_valid (all NTUs, 1 cycle)    busy=1
cycles  1..TAU_RESP      response window (r_valid accepted)
cycle   TAU_RESP+1       check / check_fail pulse, busy=0
cycle   TAU_RESP+2       loop_active=0, wait counting starts
cycle   TAU0_MAX+TAU_RESP+2   next start
```

The loop period is therefore `TAU0_MAX + TAU_RESP + 2` cycles: 82 with the
defaults.

**Contract for the processor core.** A core that receives `t_valid` in cycle
1 must raise `r_valid` with its answer in one of the cycles 1 .. `TAU_RESP`. A
registered answer can come back at most `TAU_RESP − 1` cycles after `t_valid`.

## The decision

`mit_majority` adds up the `2^D − 1` votes about a unit and sets
`unit_healthy[u]` when more than half of them are 1. The final flag has two
effects:

- It marks the unit for isolation. Removing the unit from service, or
  swapping in a spare, is outside this design.
- It stops the unit's own test loop, because a unit judged faulty should not
  judge others. The flags the unit has already produced keep their last values.

Two failure cases show how the vote behaves:

- **Faulty core.** All of the unit's testers see wrong or missing answers, so
  the unit is voted out.
- **Faulty tester.** Only one vote about a healthy unit is wrong, and the
  majority outvotes it.

In a 3-D mesh a unit's status stays correct with up to three wrong votes out
of seven. In a 2-D mesh it stays correct with one wrong vote out of three.

## Modules

| file | role |
|------|------|
| `rtl/mit_pkg.sv` | neighbour arithmetic and width helpers |
| `rtl/mit_majority.sv` | majority operator over N (odd) votes |
| `rtl/mit_core.sv` | device core: memory 1 (signatures), counter 2 (wait), counter 3 (k), flip-flop 4, start pulse |
| `rtl/mit_ntu.sv` | neighbour test unit: memory 11 (references), counter 12 (response window), flip-flops 13 (busy) and 14 (flag), comparator |
| `rtl/mit_test_hw.sv` | one unit's test hardware: a core plus `2^D − 1` NTUs and a shared memory write port |
| `rtl/mit_mesh.sv` | **top**: the mesh, the neighbour wiring and one voter per unit |

The component numbers (memory 1, counter 12 and so on) follow the classic
gate-level drawing of this circuit. In the original, clock gating and one-shot
pulse generators (univibrators) do the control. Here everything runs on one
clock: each gated clock becomes a clock enable and each one-shot becomes a
one-cycle registered pulse.

### Top-level ports (`mit_mesh`)

In the table, `NU = N_COLS*M_ROWS*P_DEPTH` and `NNB = 2^D − 1`. Array index
`[u][j]` always means "unit `u`, neighbour number `j+1`".

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `test_en` | in | global enable for test loops (hold it low while the memories are being loaded) |
| `cfg_we, cfg_unit, cfg_sel, cfg_addr, cfg_data` | in | memory write port. `cfg_sel = 0` selects memory 1 (signatures `T(k)`) of unit `cfg_unit`. `cfg_sel = j+1` selects memory 11 of NTU `j+1` (expected responses `R0(k)` of that unit's tested neighbour `j+1`). |
| `pu_t_valid/pu_t_data[u][j]` | out | signature sent to the core of unit `u` by its testing neighbour `j+1` |
| `pu_r_valid/pu_r_data[u][j]` | in | the core's answer to that testing neighbour |
| `unit_healthy[u]` | out | final majority flag; 0 = faulty |
| `partial_flags[u][j]` | out | vote of testing neighbour `j+1` about unit `u` |
| `loop_start, loop_k, loop_active, check, check_fail` | out | observation strobes |

Memories have no reset. Load every signature and every expected response
before raising `test_en`. An NTU that compares against an unwritten entry will
condemn its neighbour, and the flag stays cleared until reset. The expected
response `R0(k)` for NTU `j+1` of unit `u` is whatever a healthy core of
neighbour `u + offset(j+1)` returns for signature `T_u(k)`.

### Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `D` | 3 | the worked area example of this scheme is a 3-D mesh |
| `KMAX` | 32 | signatures per unit ("32 test routines" in that example) |
| `N_COLS, M_ROWS, P_DEPTH` | 4, 4, 4 | own choice; use `P_DEPTH = 1` for `D = 2` |
| `SIG_W` | 16 | own choice |
| `TAU0_MAX` | 64 | own choice (ticks between loops) |
| `TAU_RESP` | 16 | own choice (response window; the same for every NTU) |

## Design choices not fixed by the method

- Handshake: a valid strobe travels with the data in each direction. The first
  response in a window is kept.
- A response that never arrives counts as a failure.
- One response window `TAU_RESP` serves every NTU. The method allows a separate
  maximum response time per tested neighbour; give each NTU its own parameter
  if the cores' test routines differ much in length.
- A failed partial flag stays cleared until reset. No recovery is modelled.
- The first loop starts `TAU0_MAX` ticks after reset (or after `test_en` rises).
- The memory write port, `test_en` and the observation outputs are additions.
- The method's rules for testing neighbours are written with a sign function
  (`x + (1 − sign(x))·n − 1`). That is exactly `x − 1` modulo `n`, which is how
  the RTL computes it. The testbenches use the sign form, as an independent
  check.
- Not built: meshes of 4 or more dimensions; the isolation or reconfiguration
  that acts on `unit_healthy`; the processor cores themselves.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_mit_majority.sv` | all input patterns for N = 3 and N = 7 |
| `tb/tb_mit_core.sv` | exactly `TAU0_MAX` idle ticks before each loop; `T(k)` and `k` wrapping; waiting for busy NTUs; halting while `test_en` or `self_healthy` is low |
| `tb/tb_mit_ntu.sv` | `t_valid` timing; a `TAU_RESP`-cycle window; responses at every delay, including the last cycle; a duplicate response ignored; wrong `k`; a missing or late response; the flag staying cleared |
| `tb/tb_mit_test_hw.sv` | one 2-D unit: all NTUs sending together, the loop period, per-NTU reference memories, a wrong and a silent neighbour, halting |
| `tb/tb_mit_mesh.sv` | full default mesh (4×4×4, 7 neighbours, 32 signatures), end to end |
| `tb/tb_mit_mesh_2d.sv` | the same scenario on a 3×4 2-D mesh with 3 neighbours |
| `tb/tb_mit_mesh_k512.sv` | the same scenario on a 3×3×3 mesh with 512 signatures per unit, run through every entry |

The three mesh testbenches load every memory and then run more than `KMAX`
loops, so `k` wraps. Every signature that reaches a core must come from the
unit given by the testing-neighbour rule and carry that unit's current `T(k)`.
Next, three faults are injected:

- one core answers wrongly;
- one core stops answering;
- one reference memory in a tester is corrupted.

The testbenches then check every vote and every final flag. The two bad units
must be isolated and must stop testing. The bad tester's vote must be
outvoted. Each mechanism is counted and must occur at least once: loop,
signature wrap, passed check, wrong response, missing response, faulty tester,
masked vote, isolation and halt.

`tb/mit_pu_model.sv` is a simulation-only model of the processor cores. A
healthy core answers with a fixed mix of the signature's bits, after a delay
that varies. A core can also be made to answer wrongly or not at all.
`tb/mit_tb_pkg.sv` holds the signature and response functions and an
independent copy of the neighbour rules.

### Running with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mit_pkg.sv tb/mit_tb_pkg.sv tb/tb_mit_mesh.sv --top-module tb_mit_mesh
./obj_dir/Vtb_mit_mesh
```

Replace the testbench name to run any of the others. The unit-level benches
need only `rtl/mit_pkg.sv` before them. Verilator finds the other modules
through `-Irtl -Itb`. The full-size mesh testbench takes about 20 s to build
and well under a second to run (about 20,000 cycles, most of them spent
loading memories).

## Cost

Each unit holds `(2^D) · KMAX · SIG_W` bits of signature and reference memory:
4,096 bits at the defaults. It also holds `2^D − 1` comparators and
a few small counters. The memories dominate and grow linearly with `KMAX`, so
the number of distinct test routines per unit is the main cost knob.
