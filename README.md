# Pipelined on-line back-propagation trainer

Training a fully connected network by gradient back-propagation is normally
sequential: an example's forward pass, error, backward pass and coefficient
update must all finish before the next example starts, so each example costs
the whole chain of operations. This design removes that dependency. It splits
one training step of a two-layer network into 17 one-clock operations and
starts a new example every clock. Seventeen examples are then in flight at
once, each in a different step.

The price is **delayed adaptation**. When an example starts, the examples
ahead of it have not yet written back their coefficient updates, so it trains
against slightly stale coefficients. A smaller step size compensates for this.
Even if that means about four times as many examples to reach the same error,
issuing one example per clock instead of one per 17 clocks leaves an overall
speed-up of about 17/4.

## Network and arithmetic

* Layer 1: `N1` sigmoid neurons over `N0` inputs. Layer 2: `N2` output neurons,
  linear by default (`OUT_SIGMOID = 0`) or sigmoid.
* The defaults, N0 = N2 = 32 and N1 = 32, fit the reference task: learning a
  16-point complex DFT. The input is 16 complex Gaussian samples, real parts
  then imaginary parts. The target is their DFT in the same layout.
* Every quantity is a signed 32-bit fixed-point number with 20 fraction bits
  (Q12.20, type `fx_t` in `nn_pkg`). Products are truncated toward minus
  infinity and sums wrap; nothing saturates.
* The step size `delta` is a 16-bit unsigned input with 24 fraction bits.
  5e-4 is 8389 and 1e-4 is 1678.
* The sigmoid is a 65-entry table of f at the segment boundaries of [-8, 8),
  with linear interpolation inside each segment. The table is computed at
  elaboration. Inputs are clamped to [-8, 8). Maximum error is about 8e-4.

The update rule is plain back-propagation with squared error
E = 1/2 sum (z - t)^2:

    L_k = z_k - t_k                 (linear output; sigmoid: (z-t) z (1-z))
    P_j = C_j (1 - C_j) sum_k L_k w2_kj
    theta2_k -= delta L_k           w2_kj -= delta L_k C_j
    theta1_j -= delta P_j           w1_ji -= delta P_j z0_i

## The 17-clock schedule

Clock 1 is the clock in which an example leaves the input buffer. Every value
is registered at the end of the clock named. Each clock holds one operation of
one example.

| clock | operation (per example)                                  | block |
|-------|----------------------------------------------------------|-------|
| 1     | A = w1 · z0 (all N1×N0 products)                         | `fp_module` ×N1 |
| 2     | B = ΣA + θ1                                              | `fp_module` |
| 3–5   | C = f(B) (three-clock sigmoid)                           | `sigmoid_lut` |
| 6     | D = w2 · C; F = 1 − C                                    | `fp_module` ×N2, `bp_deriv` |
| 7     | G = ΣD + θ2; H = C·F                                     | `fp_module`, `bp_deriv` |
| 8–10  | I = f(G), or I = G through three registers if linear     | `fp_module` |
| 11    | J = I − t; K = 1 − I (t leaves the t-buffer now)         | `cost_unit` |
| 12    | L = J·I·K or L = J; cost ½ΣJ²                            | `cost_unit` |
| 13    | M = L·w2 (the example's own w2); N = L·C; θ2 −= δL       | `bp_sum`, `adapt_module` |
| 14    | O = ΣM; w2 −= δN                                         | `bp_sum`, `param_regs` |
| 15    | P = H·O                                                  | `bp_deriv` |
| 16    | Q = P·z0; θ1 −= δP                                       | `adapt_module` |
| 17    | w1 −= δQ                                                 | `param_regs` |

Coefficients are read at fixed clocks: w1 in clock 1, θ1 in clock 2, w2 in
clock 6, θ2 in clock 7. So an example sees w1 without the updates of up to 16
examples ahead of it, and w2 without those of up to 8. The backward pass must
use the w2 that the example itself saw, and the C and z0 it produced. Those
travel alongside it in `delay_line` shift registers:

* w2 and C are held for 7 clocks (clock 6 to clock 13).
* z0 is held for 15 clocks (clock 1 to clock 16).
* H is held for 7 clocks inside `bp_deriv`.

No example's values overwrite another's.

All datapath registers run every clock. Only the four coefficient writes are
gated. `control_unit` keeps a 17-stage valid shift register and raises
`theta2_upd`, `w2_upd`, `theta1_upd` and `w1_upd` in clocks 13, 14, 16 and 17
of each valid example. Bubbles, from an empty buffer or `train_en` low, write
nothing.

## Blocks

| module | role |
|--------|------|
| `nn_train_top` | wires everything below into the schedule above |
| `nn_pkg` | number format, default sizes, schedule constants, `fx_mul`, `fx_scale` |
| `sample_buffer` | FIFO of whole vectors, used as the z-buffer (inputs) and the t-buffer (targets), first-word fall-through |
| `param_regs` | coefficient and bias registers of one layer, with host load and adaptation ports |
| `fp_module` | one forward neuron: products, sum plus bias, activation (five clocks) |
| `sigmoid_lut` | three-clock table sigmoid |
| `cost_unit` | J, K, L and the example's cost |
| `bp_sum` | O_j = Σ_k L_k w2_kj for one hidden neuron (two clocks) |
| `bp_deriv` | P_j = C_j(1 − C_j)·O_j for one hidden neuron |
| `adapt_module` | δ·err for the biases, err·act registered, then δ·(err·act) for the coefficients |
| `delay_line` | fixed-length shift register |
| `control_unit` | issue, valid tracking, write enables, load gating, counter |

## Using it

1. Hold `rst_n` low, then release it. Every coefficient and bias is now zero.
2. Load the initial values one per clock: `ld_en`, `ld_layer` (0 means layer
   1), `ld_bias`, `ld_row`, `ld_col`, `ld_data`. A load is accepted only while
   `busy` is low; otherwise `ld_rejected` pulses.
3. Write examples with `smp_wr_en`, `smp_z` and `smp_t` while `smp_full` is low.
   The input vector and its target go in together.
4. Raise `train_en`. Each clock in which the z-buffer is not empty issues one
   example. `out_valid`/`out_z` show its network output 10 clocks later.
   `cost_valid`/`cost` show its cost 12 clocks later. `n_trained` counts
   examples whose last update (w1) is done. Keep `delta` constant while `busy`
   is high.
5. Read any coefficient or bias at any time through
   `rd_layer`/`rd_bias`/`rd_row`/`rd_col` → `rd_data` (combinational).

The z-buffer holds `BUF_DEPTH` examples. The t-buffer holds `BUF_DEPTH + 11`
targets: its vector leaves only when the example reaches the cost unit, so it
also carries the up to 11 examples between clock 1 and clock 11. With equal
depths, the t-buffer would fill first and throttle the pipeline below one
example per clock.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. With plain Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/nn_pkg.sv tb/tb_ref_pkg.sv \
        tb/tb_nn_train_full.sv --top-module tb_nn_train_full -o sim
    ./obj_dir/sim

`tb_ref_pkg` re-implements the fixed-point arithmetic and the sigmoid table
independently of the RTL.

The two end-to-end testbenches contain a cycle-level reference model of the
delayed-adaptation schedule. It checks every network output and cost, the
flags every clock, and every coefficient at the end, bit for bit:

* `tb_nn_train_top` runs at reduced size (4-5-3, 8-entry buffer) on 600 random
  examples. It takes a few seconds.
* `tb_nn_train_sigout` is the same test with a sigmoid output layer
  (`OUT_SIGMOID = 1`).
* `tb_nn_train_full` runs at the default sizes on 800 DFT examples with δ = 5e-4.
  It takes about 1.5 minutes to build and under a second to run.

Both also count how often each mechanism occurred, and fail if one never did:

* buffer full
* bubble (buffer empty while training)
* training paused with examples waiting
* all 17 stages busy
* forward pass with adaptations still pending
* load refused while busy
* drain

Each block also has its own testbench, `tb/tb_<module>.sv`.

800 examples are far too few to show convergence on the DFT task, which needs
millions. The full-size test prints the normalised error of its first and last
quarter only for information (about 1.0 and 0.97).

## Departures and choices to be aware of

* **Hidden-layer error.** P_j is computed as C_j(1 − C_j)·O_j, the
  back-propagation formula. One tabulation of the schedule writes it as
  (1 − C_j)·O_j. That would be a wrong gradient, so it was not followed.
* **θ2 read time.** θ2 is read in clock 7 together with the layer-2 sum, one
  clock after w2, just as θ1 is read one clock after w1.
* **Linear output latency.** The linear output layer keeps the three
  activation clocks as plain registers, so both output types share one
  schedule.
* **Step length.** One training step takes 17 clocks (8q + 1 for q = 2
  layers). A figure of 23 clocks also appears for this design; it does not
  match the schedule and is not used.
* **Fixed delay.** The adaptation delay is a property of the schedule and
  cannot be configured. The effect of other delays (up to about 100 examples)
  can only be studied in software.
* **Own choices.** The following are not specified by the architecture and
  were chosen here: the number format, the sigmoid table size and
  interpolation, the hidden layer size, the buffer organisation and depths, the
  host load and read-back ports, the load-while-busy rule, and reset clearing
  all coefficients.
* **Hardware cost.** The design is fully parallel, as the architecture asks:
  one multiplier per product. At the default sizes that is about 5 × 1024
  32-bit products per clock, plus the w2 delay line: 7 × 1024 words of
  registers. This is a large circuit. No effort was made to share multipliers
  or map the delay lines to RAM.
