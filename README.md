# Partial-scan test wrapper with a six-neighbourhood cellular-automaton pattern generator

Testing a sequential circuit is hard because its flip-flops cannot be set or
read directly. Scan design fixes this. A 2:1 multiplexer goes in front of each
flip-flop, and the flip-flops are chained into a shift register. A tester can
then shift any state in, run one functional clock, and shift the result out.
The sequential test problem becomes a combinational one. A full scan chain
costs a multiplexer and chain wiring for every flip-flop. This design therefore
uses a **partial** scan chain: only the flip-flops that fault simulation shows
to be needed stay in the chain. The coverage lost that way is won back with
**observation points**. An observation point is an extra output taken from an
internal line at the centre of a fan-in cone where many undetected faults
cluster.

Test patterns come from a **two-dimensional hybrid cellular automaton (CA)**.
It is a 3x3 grid of one-bit cells. Each cell's next state is the XOR of a
subset of six neighbours: self, top, left, bottom, right and bottom-right
(hence "6NCA"). Each cell has its own 6-bit rule that selects that subset.

The RTL holds the parts of this scheme that are hardware:

| file | what it is |
|---|---|
| `rtl/dft_pkg.sv` | rule type, rule bit positions, default 3x3 rule matrix |
| `rtl/ca6n_tpg.sv` | the 6NCA pattern generator |
| `rtl/scan_register.sv` | multiplexed scan flip-flop |
| `rtl/partial_scan_chain.sv` | the circuit's state flip-flops, selected ones chained |
| `rtl/dft_6nca_top.sv` | the test wrapper that joins them and brings out observation points |

The circuit under test itself is not included. This applies to the ISCAS'85/'89
benchmarks the scheme targets (s510 and others). Its combinational logic sits
outside the wrapper and connects through ports.

## The 6NCA pattern generator (`ca6n_tpg`)

Cell (i, j) sits in row i and column j. In `pattern`, it is bit `i*COLS + j`.
Its neighbours are:

```
            (i-1,j) top
(i,j-1) left   (i,j) self   (i,j+1) right
            (i+1,j) bottom   (i+1,j+1) bottom-right
```

A rule is a 6-bit number. From MSB to LSB, its bits select
**[self, top, left, bottom, right, bottom-right]**. The cell's next state is
the XOR of the selected neighbours. Some examples from the default matrix:

| rule | binary | next state of the cell = XOR of |
|---|---|---|
| 53 | 110101 | self, top, bottom, bottom-right |
| 57 | 111001 | self, top, left, bottom-right |
| 50 | 110010 | self, top, right |
| 45 | 101101 | self, left, bottom, bottom-right |
| 22 | 010110 | top, bottom, right (not itself) |
| 37 | 100101 | self, bottom, bottom-right |
| 52 | 110100 | self, top, bottom |
| 56 | 111000 | self, top, left |

The default rule matrix (parameter `RULES`, element `[i*3+j]`) is:

```
53 57 50
45 22 37
50 52 56
```

A neighbour outside the grid reads as 0 (null boundary). The automaton is
linear over GF(2), so the all-zero state maps to itself and the seed must be
non-zero. Reset loads `SEED` (default `9'h001`). `load` loads `seed_in` and
takes priority over `en`. Each clock with `en` high gives one new 9-bit
pattern, available one cycle after the edge that computed it.

**What to expect from the default rules.** This rule matrix is not
maximal-length. Its transition matrix is singular, so some states have no
predecessor. From seed 1 the automaton passes two transient states and then
repeats a cycle of 15 patterns. No seed gives a longer cycle. Those 15–17
distinct patterns are enough for a small circuit:
`tb/tb_c17_fault_coverage.sv` detects all 22 single stuck-at faults of c17.
Cells 4..8 drive the inputs, and the seed is `9'h053`. Longer test sequences
need a different `RULES` matrix; any 6-bit value per cell is accepted. `ROWS`
and `COLS` can also change, but then `RULES` must be supplied, because only
the 3x3 matrix is defined.

## Scan register and partial scan chain

`scan_register` is a multiplexer followed by a D flip-flop. With `se = 0`
(data mode) it captures `di`, the next state from the combinational logic.
With `se = 1` (test mode) it captures `si`.

`partial_scan_chain` holds all `N_FF` state flip-flops. Flip-flop k is a
scan register if `SCAN_MASK[k]` is set, and otherwise a plain D flip-flop.

- The scan registers form one chain in ascending index order.
- The lowest scan register takes `scan_in`.
- Each later scan register takes the output of the previous one.
- The highest scan register drives `scan_out`.
- Flip-flops outside the chain capture `d[k]` on every clock, whether or not
  `se` is high.
- `SCAN_MASK` all ones gives the full scan chain.

The wiring is worked out at elaboration from the constant mask, so the chain
costs no logic beyond the multiplexers.

Which flip-flops to keep in the chain is decided off-line, not in hardware:

1. Start from the full chain.
2. For each flip-flop in turn, remove it and fault-simulate.
3. Keep it out of the chain if fault coverage stays above a chosen target.

The result of this procedure is the value of `SCAN_MASK`.

## The wrapper (`dft_6nca_top`)

```
          func_pi ─┐                        ┌─► cut_pi ──►┌────────────────────┐
 ca6n_tpg ─pattern─┴─ test_mode mux ────────┘             │ combinational logic│──► primary outputs
    │ last cell ─┐                                        │ of the circuit     │
 scan_in ────────┴─ test_mode mux ─► partial_scan_chain   │ under test         │
                                      d ◄── cut_ns ◄──────│ (outside)          │
                                      q ──► cut_ps ──────►│                    │
                                      scan_out            └────────┬───────────┘
                                                            obs_in │ internal lines
                                                  obs_out ◄────────┘
```

- With `test_mode` high, the CA drives primary input k from cell `k mod 9`.
  The scan input then takes the last cell. With `test_mode` low, the wrapper
  is transparent: `cut_pi = func_pi`, and the scan input is the `scan_in`
  port.
- With `se` high the chain shifts; with `se` low every flip-flop captures.
- `obs_out` are the observation points. They are internal lines of the
  combinational logic, chosen by fault-cone analysis and brought out as
  extra outputs.

A scan test with a chain of length L works like this:

1. Hold `se` high for L cycles. The chain loads L CA bits while the previous
   response shifts out on `scan_out`.
2. Lower `se` for one capture cycle.

The CA keeps stepping during this (`tpg_en` high), so the primary inputs get
a new pattern every clock. `obs_out` and the circuit's primary outputs are
observed in the capture cycle.

The defaults match a circuit of the size of ISCAS'89 s510:

| parameter | default |
|---|---|
| `N_PI` (primary inputs) | 19 |
| `N_FF` (flip-flops) | 6 |
| `SCAN_MASK` | `6'b001111` (4 of the 6 flip-flops in the chain) |
| `N_OBS` (observation points) | 1 |
| `ROWS`, `COLS` | 3, 3 |

To fit another circuit, set `N_PI`, `N_FF`, `SCAN_MASK` and `N_OBS` to match
it.

## Choices made here, and limits

- **Sources in the scheme.** The following come from the scheme itself: the
  multiplexer polarity, the XOR next-state function with its 6-bit rule
  encoding, the 3x3 rule matrix, and the partial-scan and observation-point
  ideas. The s510 sizes also come from it.
- **Choices of this RTL.** These are the null boundary, seeds, enables and
  resets. Also chosen here are the chain order, which four flip-flops are
  scanned by default, the mapping of cells onto inputs and the scan input,
  and the `test_mode` multiplexer.
- **Rule matrix is the reference.** A published characteristic (T) matrix for
  this automaton does not match its rule matrix. The RTL follows the rule
  matrix and its per-cell rule table.
- **Only 9 pattern bits per clock.** The CA produces 9 bits per clock. With
  more than 9 primary inputs, inputs share cells and receive correlated
  values. This limits coverage on wide circuits.
- **No response compaction.** Responses are meant to be compared against a
  fault-free simulation, not compressed on chip. `scan_out` and `obs_out`
  are plain outputs.
- **Not included.** The benchmark netlists and the off-line selection of scan
  flip-flops and observation points are not part of this RTL.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, run the end-to-end test at
default sizes:

```
verilator --binary --timing --assert -Irtl \
  rtl/dft_pkg.sv rtl/scan_register.sv rtl/ca6n_tpg.sv rtl/partial_scan_chain.sv \
  rtl/dft_6nca_top.sv tb/tb_dft_6nca_top.sv --top-module tb_dft_6nca_top
./obj_dir/Vtb_dft_6nca_top
```

The testbenches are:

| testbench | what it checks |
|---|---|
| `tb_scan_register` | mux polarity and reset |
| `tb_ca6n_tpg` | every step against a reference model built from the neighbour table; hold, load priority, the 15-state cycle |
| `tb_partial_scan_chain` | a 4-of-6 partial chain and a 5-flip-flop full chain against a shift model; chain latency |
| `tb_dft_6nca_top` | the whole wrapper at default parameters, cycle by cycle against a reference model, with a stand-in combinational circuit |
| `tb_c17_fault_coverage` | stuck-at fault simulation of c17 under CA patterns |

`tb_dft_6nca_top` covers functional mode, the switch to test mode, seed load,
scan shift and capture, generator hold, and an external scan load. It counts
each of these and fails if one never happens.
