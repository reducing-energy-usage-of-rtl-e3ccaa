# NULL Cycle Reduction around a dual-rail NCL multiplier

This is clockless (asynchronous) hardware written in NULL Convention Logic (NCL). Every result
in NCL is followed by a NULL wavefront: a spacer that clears the logic before the next data.
That makes each operation two passes through the logic, one for DATA and one for NULL.
**NULL Cycle Reduction (NCR)** hides the NULL pass. The circuit is built twice, and successive
operations go to the two copies in turn, so one copy can reset to NULL while the other
computes. The pair then runs faster than one copy alone. Or, at equal speed, each copy may be
slower, for example at a lower supply voltage, and the whole design uses less energy per
operation.

The circuit being duplicated here is a 4-bit by 4-bit dual-rail NCL multiplier. Optionally it
can be a chain of 2 or 4 such multipliers: a larger copied circuit gains more from the lower
supply. The RTL describes the logic at the level of NCL threshold gates. It simulates with plain
Verilator and elaborates with other SystemVerilog tools. Supply voltages, power and delay lie
outside what RTL can express. The RTL only keeps the parts that would sit in different supply
domains in separate instances.

## Signalling conventions

* **Dual-rail bit** (`ncl_pkg::dr_t`, fields `r1`, `r0`):
  * `r0=1`: DATA0 (logic 0)
  * `r1=1`: DATA1 (logic 1)
  * both 0: NULL (no data)
  * both 1: illegal
  * A word is a packed array `dr_t [W-1:0]`.
* **Handshake wires** `ki` / `ko` are single-rail.
  * `1` = *rfd*, request for DATA.
  * `0` = *rfn*, request for NULL.
  * A block's `ko` tells its sender what it wants next. Its `ki` is what its receiver wants.
* **Four-phase protocol**, the same at every interface:
  1. The sender waits for `ko=1` and presents DATA.
  2. `ko` falls once the block has taken the data.
  3. The sender presents NULL. `ko` rises once the NULL is taken.
  4. The receiver keeps `ki=1` until it sees a complete DATA word. It then drops `ki` and waits
     for NULL.
* **Reset** (`rst`, active high) clears all registers to NULL. After reset every `ko` is 1.

## Threshold gates (`th_gate`)

Every piece of logic is made of one primitive, `th_gate`. This is a THmn gate with hysteresis:
* Its output rises when its *set function* becomes true.
* Once high, it stays high until **all** of its inputs are low again.

This hold rule makes NCL insensitive to delays. A gate cannot take part in the next DATA
wavefront until the NULL wavefront has fully reached it.

The set functions on offer:

| `FN`          | set function                                   | used as                        |
|---------------|------------------------------------------------|--------------------------------|
| `FN_THRESH`   | weighted count of high inputs ≥ `M` (`a[0]` weighs `W0`) | THmn, C-elements (M = N), OR (M = 1), TH34w2 |
| `FN_AND0`     | A·B + B·C + A·D (`a[0..3]` = A..D)            | rail 0 of AND and half-adder carry |
| `FN_TH24COMP` | A·C + B·C + A·D + B·D                          | XOR rails                      |

`RST_MODE` adds a reset to 0 (N gates) or to 1 (D gates). The state is modelled as output
feedback, `z = set | (z & ~all_low)`. So every tool reports combinational loops in this design.
That is expected: the loops are how NCL holds state, together with the closed handshake rings.
No gate delays are modelled. A delay-insensitive circuit must work under any gate delays,
including zero, so a zero-delay simulation is a valid functional check. It says nothing about
speed.

## The NCR wrapper (`ncr_top`)

```
            ko <──[ncl_completion]<── per-bit NULL detect ──┐
                          │                                 │
                    [ncr_sequencer #1]──s1,s2──>[ncr_demux]─┤ A ──> Circuit #1 ──┐
  {x,y} ─────────────────────────────────────────> D        │                    ├─>[ncr_mux]──> s
                                                            └ B ──> Circuit #2 ──┘
                                 Circuit #1/#2 ko ──> demux ki1/ki2
  ki ──>[ncr_sequencer #2]── s1 ──> Circuit #1 ki,  s2 ──> Circuit #2 ki
```

* **Sequencers** (`ncr_sequencer`): a ring of four 3-input C-elements, stepped once by each
  change of their `ki`. Over the four phases of two DATA/NULL cycles (`ki` = 1,0,1,0):
  * `s1` is 1,0,0,0
  * `s2` is 0,0,1,0

  So `s1` is high only during the DATA phase of odd operations, and `s2` only during even
  ones.
  * Sequencer #1 is stepped by the design's own `ko`. It picks the demultiplexer output that
    receives the next DATA.
  * Sequencer #2 is stepped by the receiver's `ki`. Its outputs are the two circuits' requests,
    so only the circuit whose turn it is may release its result. Results therefore leave in the
    order the operands arrived.
* **Demultiplexer** (`ncr_demux`): each rail of output A is a C-element of the input rail, `s1`
  and Circuit #1's `ko`. Output B likewise uses `s2` and Circuit #2's `ko`.
  * A DATA word reaches a side only when that side is selected and its circuit asks for DATA.
  * Hysteresis holds the word there until the input, the select and the request have all
    dropped. That is also exactly when the NULL may pass.
  * Per bit, `ko` is the NOR of all four output rails. `ncl_completion` conjoins these bits
    into the design's `ko`.
* **Multiplexer** (`ncr_mux`): a rail-wise OR of the two circuit outputs. It is correct because
  the sequencer lets only one circuit hold DATA at its output at a time.

What NCR buys shows up in the testbench as overlap. While the receiver still holds result *n*,
operation *n+1* is already inside the other circuit. The input stalls only when both circuits
are busy.

## The multiplier (`ncl_mult4x4`) and the chains (`ncl_mult_chain`)

Registers and completion:
* The input register (8 bits, `{x, y}`) and the output register (8 bits) are `ncl_register`s.
  Each rail is a TH22 gate of the incoming rail and the request, and the per-bit acknowledge is
  the NOR of the two rails.
* Full-word completion: `ncl_completion` (a tree of TH44 gates) combines the output register's
  acknowledges. The result is the input register's request.
* A second completion tree over the input register's acknowledges gives the module's `ko`.

The combinational stage between the registers:

* **Partial products** `pp[i][j] = y[i] & x[j]` (column `i+j`).
  * The four diagonal products (`i == j`) use the input-complete AND (`ncl_and2 #(1)`). Its
    output turns DATA only after both inputs are DATA.
  * The other twelve use a cheaper input-incomplete AND (`ncl_and2 #(0)`, rail 0 = OR of the
    rail-0 inputs).
  * Every operand bit meets one diagonal AND. So the product as a whole still waits for every
    input bit, in both the DATA and the NULL direction.
* **Reduction tree** (HA = `ncl_half_adder`, FA = `ncl_full_adder`, both input-complete):

  | level | col 1 | col 2 | col 3 | col 4 | col 5 | col 6 | col 7 |
  |-------|-------|-------|-------|-------|-------|-------|-------|
  | 1 | HA(pp01,pp10) | FA(pp02,pp11,pp20) | FA(pp03,pp12,pp21) | FA(pp13,pp22,pp31) | HA(pp23,pp32) | | |
  | 2 | | HA | FA(+pp30) | HA | HA | HA(+pp33) | |
  | 3 | | | HA | FA | FA | FA (carry unused) | `ncl_gens7` |

  `ncl_gens7` forms bit 7 as `c XOR maj(...)`: the level-2 column-7 carry with the carry out of
  column 6. The two cannot both be 1 in a 4×4 product.

`ncl_mult_chain #(N_MULT)` puts `N_MULT` multipliers in series. Stage *k* takes bits 7..4 of
the previous product as `x` and bits 3..0 as `y`. Its request is the next stage's `ko`. The
chain computes `f` applied `N_MULT` times to `{x, y}`, where `f(p) = p[7:4] * p[3:0]`. With
`N_MULT = 2` or `4` the result is no longer a plain product. These variants only stand for a
larger circuit to duplicate.

## Parameters

| module           | parameter   | default | meaning                                       |
|------------------|-------------|---------|-----------------------------------------------|
| `ncr_top`        | `N_MULT`    | 1       | multipliers in series in each of the two circuits (1, 2 or 4 in the reference study) |
| `ncl_mult_chain` | `N_MULT`    | 1       | same, for a single circuit                    |
| `ncl_register`   | `WIDTH`, `INIT_NULL` | 8, 1 | width; reset to NULL (1) or DATA0 (0)  |
| `ncl_completion`, `ncr_demux`, `ncr_mux` | `WIDTH` | 8 | word width            |
| `th_gate`        | `N`, `M`, `W0`, `FN`, `RST_MODE` | 2, 2, 1, threshold, none | gate shape |

## Simulating

All files in `rtl/` and `tb/` are SystemVerilog-2017. Every testbench prints
`TB_RESULT checks=N failures=F` and ends with `$finish`. Example:

```
verilator --binary --timing -Wno-fatal --top-module tb_ncr_top -y rtl -y tb +libext+.sv \
          rtl/ncl_pkg.sv tb/tb_ncr_top.sv
./obj_dir/Vtb_ncr_top
```

| testbench            | what it runs |
|----------------------|--------------|
| `tb_ncr_top`         | full design at default size. 600 operations (all 256 operand pairs, then random ones) with random sender/receiver delays. Checks every result in order, strict A/B alternation into and out of the circuits, and that overlap, input stalls and receiver back-pressure all occur. |
| `tb_ncr_workloads`   | NCR with 2- and 4-multiplier circuits, 300 operations each |
| `tb_ncl_mult4x4`, `tb_ncl_mult_chain` | one multiplier (512 operations); chains of 2 and 4 |
| `tb_ncr_demux`, `tb_ncr_mux`, `tb_ncr_sequencer`, `tb_ncl_register`, `tb_ncl_completion`, `tb_th_gate` | each part against a reference model |

Two immediate assertions guard the protocol during any simulation with assertions enabled:
* every `ncl_register` bit must never hold both rails high;
* `ncr_mux` must never see DATA from both circuits on the same bit at once.

`tb/ncl_mult_env.sv` is the shared sender/receiver. Use it to drive any of the multiplier
circuits.

## How far to trust it, and where it departs from the reference design

* The following are taken from the reference design:
  * the NCR architecture and its connections
  * the demultiplexer, multiplexer and sequencer gate structures
  * the multiplier's register/completion arrangement and its adder tree
  * the 1/2/4-multiplier chains

  The tests exercise all of them in zero-delay simulation.
* Several insides are choices of this implementation, using the usual NCL cell equations:
  * the register cell
  * the completion tree shape
  * the half/full adders
  * the column-7 generator
  * the exact gates of the complete and incomplete ANDs

  The reference gives only the names and roles of these cells.
* Timing is not verified. The reference design's figures of merit are transistor-level periods
  and energies per operation. Examples: a 4.18 ns cycle for one multiplier alone, and about 25 %
  less energy for the four-multiplier NCR design at equal speed, with the duplicated circuits and
  the multiplexer at 1.00 V instead of 1.20 V. Logic simulation cannot reproduce these figures, and delay
  insensitivity under real gate delays is not checked either.
* Supply domains and the power study are not part of the RTL. In the reference study:
  * the demultiplexer, Sequencer #1 and the completion logic share a global supply
  * the two circuits share a lowered local supply
  * the multiplexer and Sequencer #2 each have their own supply

  The instance boundaries in `ncr_top` match these groups.
* Synthesis: there are no clocks and no flip-flops. A standard synchronous flow will see
  latches and combinational loops. A real implementation maps `th_gate` instances onto an NCL
  threshold-gate cell library.
