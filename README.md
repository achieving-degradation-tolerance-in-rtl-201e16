# A degradation-tolerant Gauss-Seidel accelerator with self-routing dispatchers

Transistors age and vary: NBTI, hot-carrier injection, local voltage droop and
heat can make one functional unit of a chip markedly slower than its
neighbours. A synchronous design needs a timing margin big enough for the
worst unit, or it fails outright. This design takes the asynchronous route
instead. Every unit says when it has finished (a completion signal), and
small routers called **dispatchers** send each new piece of work to whichever
unit is idle. A degraded unit still does useful work. It simply receives less
of it. Results stay correct, and throughput drops much less than the slowdown
of the unit. There are no spare units, no monitors and no central scheduler.

The example accelerator is a linear-equation solver for `A x = b` with 32
unknowns of 16 bits each. It uses the Gauss-Seidel method with four parallel
multiply-accumulate units.

## The computation

A Gauss-Seidel sweep updates the unknowns in order. Each update uses the
newest values of the others:

    x_i = (1/a_ii) * b_i  +  sum_{j != i} (-a_ij / a_ii) * x_j

Row `i` is one dot product of a coefficient row `c_i` with a vector `v`:

- `c_ij = -a_ij/a_ii` for `j != i`, and `c_ii = 1/a_ii`;
- `v_j = x_j`, except `v_i = b_i`.

The host loads the coefficients already divided by the diagonal. There is no
divider in hardware. After row `i`, the new `x_i` is written back before row
`i+1` starts, so later rows of the same sweep use it.

Numbers are signed 16-bit fixed point with 8 fraction bits (`gs_pkg::FRAC`).
A product has 16 fraction bits and is summed exactly in 40-bit accumulators.
The row total is shifted right by 8 (rounding toward minus infinity) and
saturated to 16 bits. Integer addition is exact, so **the result does not
depend on which unit computed which product**. This is what allows the
dispatchers to send work anywhere.

## Dataflow

```
 host port ─┬─ lane 0: lane_mem ─ data_gen ─┐  ┌─────────────┐  ┌─ mac_fu 0 ─┐
            ├─ lane 1: lane_mem ─ data_gen ─┤  │ dispatch_   │  ├─ mac_fu 1 ─┤  adder_tree
            ├─ lane 2: lane_mem ─ data_gen ─┼──┤ network     ├──┼─ mac_fu 2 ─┼──► x_new ──┐
            └─ lane 3: lane_mem ─ data_gen ─┘  │ (2 columns) │  └─ mac_fu 3 ─┘            │
                   ▲                           └─────────────┘   ack_delay_inject: 1 per  │
                   └──────────── write-back of x_i to the lane holding column i ◄─────────┘
                                  gs_control: row sequencing, product count
```

- **lane_mem** (one per lane): lane `l` holds columns `8l .. 8l+7` of every
  coefficient row, plus the matching entries of `x` and `b`.
- **data_gen** (one per lane): for the current row it streams the lane's 8
  pairs `(c_ij, v_j)`, putting `b_i` in the diagonal position.
- **dispatch_network**: four 2x2 dispatchers in two columns. Lanes 1 and 2
  cross between the columns, so any generator can reach any unit.
- **mac_fu** (four): multiplies a pair and adds the product into its own
  accumulator. It acknowledges only when its dual-rail result is complete.
- **adder_tree**: two adders, then one, sum the four accumulators into `x_i`.
- **gs_control**: starts each row, counts the 32 products reported by the
  units, then writes `x_i` back and clears the accumulators.

## Two-phase handshakes and the dispatcher

Every arrow between a generator, a dispatcher and a unit is a bundled-data
channel with two-phase signalling:

- the sender puts data on the channel and toggles `req`;
- the receiver toggles `ack` when it has taken the data.

So a channel **has a request** while `req != ack`, and it is **idle** while
`req == ack`. No return-to-zero phase is needed.

A dispatcher (`rtl/dispatcher.sv`) has two such inputs and two outputs:

1. `c[k] = in_req[k] ^ in_ack[k]` means input `k` is requesting.
2. `g[k] = ~(out_req[k] ^ out_ack[k])` means output `k` is idle.
3. An input mutex (`me_arbiter`) picks one requesting input. An output mutex
   picks one idle output.
4. When both picks exist, the dispatcher fires. It copies the chosen input's
   data through the single multiplexer into that output's register, toggles
   that output's `req`, and toggles the input's `ack`.

A unit that is slow keeps its `ack` back, so its output of the dispatcher is
never idle, and data goes to the other output. That is the whole
degradation-tolerance mechanism. It works the same way one column back:
column-1 dispatchers see a column-2 dispatcher as busy while both of its
outputs are busy.

Rules this design adds where the original leaves a choice:

- when both outputs are idle, input `k` goes straight to output `k`;
- when both inputs request in the same cycle, they take turns;
- normal mode moves at most one datum per dispatcher per cycle, since there
  is one multiplexer;
- in **dispatcher-through mode** (`through = 1`), input `k` only ever goes to
  output `k`, and both lanes may move in the same cycle. This is the
  comparison mode with no redistribution. The crossed wires between the
  columns mean generator 1 then feeds unit 2 and generator 2 feeds unit 1.

Example, matching the published timing diagram: a datum on input 0 goes to
output 0. A second datum arrives on input 0 before output 0 has answered, so
it goes to output 1 on the next clock.

## Dual-rail completion inside a unit

In dual-rail encoding, each bit has a true rail and a false rail:

| rails (t,f) | meaning |
|---|---|
| (0,0) | spacer, no data |
| (1,0) | one |
| (0,1) | zero |

`completion_detector` ORs the two rails of each bit and joins the results
with a Muller C-element. Its output rises when every bit is valid, falls when
every bit is back at the spacer, and holds in between.

`mac_fu` puts its product on a dual-rail register and waits for completion.
It then accumulates the value, returns the register to the spacer, and waits
for completion to fall. Only then does it toggle `ack`. The acknowledge
therefore reports that the work is actually done, not that a fixed time has
passed.

The code also exposes many stuck-at faults. A rail stuck at 1 makes a bit
show both rails high, which is no code word. `completion_detector` flags this
as `invalid`, and `mac_fu` keeps a sticky `code_err`, brought out as
`dr_error[l]`. A stuck rail also stops the word from returning to the
spacer, so the faulty unit never acknowledges again. The dispatchers then
route new pairs around it, but the product it holds is lost, so the row in
progress never completes. The solver stops rather than giving a wrong
result, and it needs a reset.

## How this RTL models the asynchronous circuit

The original is a self-timed circuit. Its timing comes from matched delay
elements and from completion detection. This RTL is **synchronous, on one
clock `clk`**, so it simulates with plain Verilator and synthesises with
ordinary tools. The control behaviour stays the same: two-phase levels,
request and idle detection, mutex choice, and the dual-rail phases. Delays
become clock cycles:

| step | cost |
|---|---|
| dispatcher firing (local clock plus its delay element) | 1 cycle |
| `mac_fu`: request to acknowledge (evaluate, complete, spacer, complete low, ack) | 5 cycles |
| C-element of the completion detector | a flip-flop, so 1 cycle |
| one injected delay element (`EL_CYCLES`) | 2 cycles |
| mutexes | combinational; a tie is broken by a preference input, not by arrival time |

So a clock-cycle count measures the model, not the silicon. Metastability,
data-dependent arithmetic delay and true delay faults are outside it.

## Fault injection and the evaluation modes

`ack_delay_inject` sits between each unit's `ack` and the dispatcher. It
delays the `ack` by 0, 1 or 2 delay elements, chosen at run time with
`ack_dly_sel[l]`. This makes the unit look degraded.

The end-to-end test slows units 0 and 1 and runs 3 sweeps of a 32-unknown
system. Cycle counts, relative to normal mode with no delay:

| delay elements on units 0 and 1 | normal | dispatcher-through |
|---|---|---|
| 0 | 1.000 | 0.982 |
| 1 | 1.109 | 1.236 |
| 2 | 1.218 | 1.491 |

Without faults, redistribution costs about 2%: through mode moves both lanes
of a dispatcher in the same cycle, while normal mode moves one. With faults, normal mode loses about half as much time as through
mode.

Normal mode cannot stay flat here, because the injected delay is large
against the unit's own time. A unit takes about 6 cycles per pair, and two
delay elements add 4. Even perfect balancing over two fast and two slow
units then gives about 1.25 times the fault-free time. Normal mode reaches
1.22. The rest is lost because each row is only 32 products and cannot close
until its last product is done, even one sitting in a slow unit. These
numbers depend on the cycle costs chosen above; a shorter delay element
gives smaller losses in both modes.

## Top-level interface (`gs_solver_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `host_we`, `host_kind`, `host_row`, `host_col`, `host_wdata` | in | 1, 2, 5, 5, 16 | write a coefficient (`HOST_COEF`, row, column), an initial `x` (`HOST_X`, index in `host_col`) or a `b` entry (`HOST_B`) |
| `host_raddr` / `host_rdata` | in / out | 5 / 16 | read `x` (combinational) |
| `start`, `iters` | in | 1, 8 | run `iters` sweeps (at least 1) |
| `busy`, `done` | out | 1 | running; finished (held until the next `start`) |
| `through` | in | 1 | dispatcher-through mode |
| `ack_dly_sel[4]` | in | 2 each | delay elements on each unit's acknowledge |
| `sweep` | out | 8 | sweeps completed |
| `crossed` | out | 4 | one pulse per dispatcher whenever it sends a datum across |
| `dr_error` | out | 4 | per unit: a non-code dual-rail word was seen (sticky until reset) |

Load the problem only while `busy` is low. Loading is one word per cycle.
The coefficients, `x` and `b` are kept between runs, so reload `x` to start
again from an initial guess.

Parameters: `N = 32` unknowns (must be 4 times a power of two), `MAX_EL = 2`,
`EL_CYCLES = 2`. The four lanes and the 2x2 dispatcher network are fixed.

Storage: 4 lanes x (32x8 coefficients + 8 `x` + 8 `b`) x 16 bits = 17,408
memory bits. The memories are plain arrays with combinational read. To map
them to SRAM macros, a pipeline stage would have to be added to `data_gen`.

## Where this design departs from or adds to the original

- Clocked model of a self-timed circuit (see above). Delay elements are clock
  cycles.
- The number format (Q7.8), the accumulator width, rounding and saturation
  are choices of this design. The original gives only "16-bit variables".
- Only the product register of `mac_fu` is dual-rail. The multiplier and adder
  are ordinary arithmetic.
- Row sequencing counts products in `gs_control`. The original does not say
  how a row is closed. Some barrier is needed, because `x_i` must be final
  before row `i+1` reads it.
- The host interface is a minimal word-wide write and read port. The
  original shows only an interface per lane.
- The dispatcher toggles the input `ack` on the same clock edge as the output
  `req`. The original's timing diagram shows the input ack following the
  output req.
- Through mode is implemented inside each dispatcher rather than as a bypass.
  As a result, generators 1 and 2 swap units in that mode.
- The delay of one delay element is chosen here (2 cycles). The original
  counts elements only.
- Not modelled: the physical 0.13 µm chip, its pads and package, and the real
  delay elements.

## Files

| file | content |
|---|---|
| `rtl/gs_pkg.sv` | widths, operand and dual-rail types, fixed-point scaling |
| `rtl/gs_solver_top.sv` | the accelerator |
| `rtl/gs_control.sv` | row and sweep sequencing |
| `rtl/lane_mem.sv`, `rtl/data_gen.sv` | per-lane memory and operand generator |
| `rtl/dispatch_network.sv`, `rtl/dispatcher.sv`, `rtl/me_arbiter.sv` | routing |
| `rtl/mac_fu.sv`, `rtl/completion_detector.sv` | functional unit with dual-rail completion |
| `rtl/ack_delay_inject.sv` | delay-fault injection |
| `rtl/adder_tree.sv` | final summation and scaling |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench checks its module against values computed independently. It
prints `TB_RESULT checks=N failures=M` and stops. For example, the
end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl rtl/gs_pkg.sv rtl/*.sv \
          tb/tb_gs_solver_top.sv --top-module tb_gs_solver_top -o sim
./obj_dir/sim
```

Swap in another `tb/tb_<module>.sv` and `--top-module` to test a single
block. All of them run in well under a second.

`tb_gs_solver_top` does the following:

- builds a random, diagonally dominant 32x32 system with a known solution and
  loads it through the host port;
- runs normal and through mode with 0, 1 and 2 delay elements, and compares
  every result bit for bit with a fixed-point reference model;
- checks that normal mode beats through mode when units are slowed, and that
  20 sweeps converge to the known solution;
- forces a stuck-at-1 rail in unit 3 and checks that it is flagged, that the
  unit stops acknowledging and that no result is reported;
- confirms that redistribution, input ties, delayed acknowledges, write-backs,
  through-mode transfers and stuck-at detection all occurred.

Assertions check three rules:

- a dispatcher output toggles only while idle;
- a mutex never grants twice;
- a row is written back only after every generator has finished.
