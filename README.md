# Low-power scan-based logic BIST

Pseudo-random test patterns switch many more nodes per clock than real workloads do. A
logic built-in self-test (BIST) can therefore draw far more current than normal operation,
and the supply droops. This design is a complete scan-based logic BIST that keeps that
switching down in two ways:

1. **Weighted heavy inputs.** Some primary inputs of the circuit under test (CUT) cause
   much more internal switching than others ("heavy inputs"). These inputs get a biased
   bit from an AND/OR gate tree instead of a plain LFSR bit, so they toggle less often.
   The bias is 1/4 or 1/8 (one AND gate, or two in cascade) or 3/4 or 7/8 (one or two OR
   gates). All other inputs take an LFSR stage directly (1/2).
2. **Quiet scan shift.** Each scan cell has a separate output hold flop. While the chains
   shift, the logic keeps seeing the last test vector applied. The logic switches only
   when a new vector is applied and when the response is captured, not on every shift
   clock.

The rest is a standard logic BIST. A phase shifter feeds the scan chains, and a space
compactor and a multiple-input signature register (MISR) compress the responses. A
comparator checks the signature against a golden value from a ROM. A controller
sequences the session and then returns the chip to normal operation.

## Block map

```
                 +------------------ modified_lfsr ------------------+
                 | prpg_lfsr (16-stage LFSR) --state--> weight_tree  |
                 +-------|-------------------------------|-----------+
                    state|                       weighted|
                   phase_shifter                   input_mux <-- a_in, b_in (normal)
                         | si[3:0]                       | pi = {b, a}
                 +-------v-------------- cut ------------v-----------+
                 |  4 x scan_chain (4 cells each) <--> array_multiplier
                 |  acc (16 bits) <= acc + a*b                       |
                 +-------|-------------------------------------------+
                         | so[3:0]
                  space_compactor --z[1:0]--> misr --signature--> tra --> fail
                                                     golden_rom -->
                 bist_controller drives every control signal (lbist_pkg::bist_ctl_t)
```

| Module | Role |
|---|---|
| `lbist_pkg` | Shared types: weight classes, scan operations, controller bundle |
| `prpg_lfsr` | Primitive-polynomial LFSR, x^16+x^14+x^13+x^11+1, seed `16'hACE1` |
| `weight_tree` | AND/OR gate tree that biases the heavy inputs |
| `modified_lfsr` | Low-power TPG: LFSR plus gate tree; outputs both the raw and the weighted pattern |
| `phase_shifter` | XOR network: each chain's scan-in bit is the XOR of three LFSR stages |
| `scan_chain` | L scan cells, each a shift flop plus an output hold flop |
| `array_multiplier`, `half_adder`, `full_adder` | Ripple-array 8x8 multiplier |
| `cut` | Example CUT: a multiply-accumulate unit whose accumulator flip-flops are the scan chains |
| `input_mux` | Selects normal or test inputs into the CUT's primary-input register |
| `space_compactor` | XOR of the chain outputs down to the MISR width |
| `misr` | 16-bit signature register with 2 inputs |
| `golden_rom` | One golden signature per selectable test length |
| `tra` | Signature comparator; registers pass/fail |
| `bist_controller` | Sequences the session |
| `lbist_top` | Everything wired together |

## A test session, cycle by cycle

This is the part that is easiest to get wrong when changing the design. Pulse `start` for
one clock, with `sel` choosing the test length. `sel` = 0, 1, 2, 3 gives P = 16, 64, 256,
1024 patterns. The controller then runs:

| State | Cycles | What happens |
|---|---|---|
| INIT | 1 | LFSR reloads its seed. MISR and the pass/fail result are cleared. |
| SHIFT | L = 4 | Each chain shifts one bit per clock. The new pattern comes in from the phase shifter and the previous response goes out to the compactor. The LFSR steps once per clock. The hold flops and the primary-input register do not change. |
| UPDATE | 1 | Hold flops take the newly shifted vector. The primary-input register takes the weighted TPG pattern. This is the launch of the new test vector. |
| CAPTURE | 1 | Shift flops take the logic's response, `acc + a*b`. Hold flops keep the vector. |
| ... | | SHIFT, UPDATE and CAPTURE repeat P times. |
| SHIFT | L | One more pass that only unloads the last response. |
| COMPARE | 1 | `tra` compares the signature with `golden_rom[sel]`. |
| DONE | - | Normal mode again, with `done` high and `fail` valid. |

Points to note:

- The MISR is **not** enabled during the first SHIFT pass. At that point the chains still
  hold functional state, which would make the signature depend on the chip's history. It
  is enabled on the other P passes, so it absorbs P x L compacted words.
- A session takes `1 + P*(L+2) + L + 1` clocks from the `start` edge to DONE: 102 clocks
  for P = 16 and 6150 for P = 1024.
- The logic's inputs change only on the UPDATE edge (hold flops and primary-input
  register) and on the CAPTURE edge (nothing the logic reads). They never change during
  SHIFT. This is what keeps the current flat during shift.
- In IDLE and DONE the CUT runs in normal mode. `a_in` and `b_in` pass through the
  primary-input register, and the accumulator adds their product on the following clock.
  Both flops of every scan cell load together, so each cell acts as an ordinary
  flip-flop.

## The scan cell

`scan_chain` implements each cell as two flops, `sh` (scan path) and `q` (drives the
logic). The scan operations are:

| `scan_op_e` | shift flop `sh` | hold flop `q` |
|---|---|---|
| `SC_FUNC` | d | d |
| `SC_SHIFT` | previous cell (cell 0: `si`) | hold |
| `SC_UPDATE` | hold | `sh` |
| `SC_CAPTURE` | d | hold |
| `SC_HOLD` | hold | hold |

`so` is the shift flop of the last cell. The only requirement here is that the cell keeps
the last applied test vector at its outputs during shift. The two-flop cell and the
separate update cycle are one way to meet it. A cell with an output-gating latch would
meet it equally well.

## The weighted pattern generator

Output `i` of `weight_tree` is built from LFSR stages `i`, `i+1` and `i+2` (mod 16),
according to `WEIGHTS[i]`:

| Weight | Logic | P(1) |
|---|---|---|
| `W_HALF` | `q[i]` | 1/2 |
| `W_QUARTER` | `q[i] & q[i+1]` | 1/4 |
| `W_EIGHTH` | `q[i] & q[i+1] & q[i+2]` | 1/8 |
| `W_3QUARTER` | `q[i] \| q[i+1]` | 3/4 |
| `W_7EIGHTH` | `q[i] \| q[i+1] \| q[i+2]` | 7/8 |

The default treats bits 0 and 1 (a[0], a[1]) as 1/4, bit 8 (b[0]) as 1/8, bit 9 (b[1]) as
3/4 and bit 15 (b[7]) as 7/8. Picking heavy inputs properly takes a software analysis:
simulate the CUT with plain LFSR patterns, rank the nodes by weighted switching activity,
and trace back from the busiest nodes to the inputs that drive them. The probability for
each input is chosen so that the patterns a deterministic test generator would need
remain likely. The default here is only an example for the multiplier CUT, so expect to
change `WEIGHTS` for a real CUT.

Adjacent LFSR stages are time-shifted copies of each other. A gate over stages `i..i+k`
therefore shares all but one input with its own value one clock later. Over a full LFSR
period, a 2-input gate toggles on 1/4 of the steps and a 3-input gate on 1/8, against
1/2 for a plain stage. `tb_modified_lfsr` checks these rates.

## The example circuit under test

The CUT is the one block that stands in for "your logic". `cut` is an 8x8
multiply-accumulate unit, `acc <= acc + a*b`. It is built so that there are state
flip-flops to scan: the 16 accumulator bits form 4 chains of 4 cells, and accumulator bit
`k*4 + c` is chain `k`, cell `c`. The multiplier is an array of half and full adders: one
ripple row per partial product, each row retiring one product bit.

To test a different circuit:

- replace `cut` with your logic and its scan chains;
- set `W` to its primary-input count, and `S` and `L` to its chain count and chain length;
- choose `WEIGHTS`;
- recompute the golden signatures (see below).

## Golden signatures

`golden_rom` holds `16'h92B0, 16'h38FD, 16'h2DAD, 16'h3A99` for 16, 64, 256 and 1024
patterns. These are the signatures of the fault-free default design. They follow from the
LFSR seed and polynomial, the weights, the phase-shifter taps, the chain layout, the MISR
polynomial and the rule that the MISR starts at zero and skips the first unload. Two
things were checked:

- an independent bit-level model of the session gives the same four values;
- the same model with the accumulator next-state bit 3 stuck at 0 gives `16'hD2E1` for 16
  patterns, and the end-to-end testbench reproduces that value.

If you change any of these inputs, get the new values by running a fault-free session of
the changed RTL (or an independent model of it) and reading `signature`.

## Parameters (defaults)

| Where | Parameter | Default |
|---|---|---|
| `lbist_top` | `N` operand width, `S` chains, `L` cells/chain, `M` MISR inputs, `W = 2N` | 8, 4, 4, 2, 16 |
| `prpg_lfsr` | `TAPS`, `SEED` | `16'hB400`, `16'hACE1` |
| `misr` | `TAPS` | `16'hB400` |
| `bist_controller` | `PAT_COUNTS` | 16, 64, 256, 1024 |
| `phase_shifter` | `MASKS` | stages {0,5,10}, {1,7,13}, {2,9,14}, {3,6,11} |

`S*L` must equal `2N` (asserted in `cut`). The phase-shifter masks and the golden
contents are written for the default sizes, so changing the sizes requires new ones.

## What is this design's own choice

The architecture itself is fixed: a weighted AND/OR gate tree on the LFSR for the heavy
inputs, scan cells that hold their outputs during shift, and the chain of phase shifter,
space compactor, MISR, golden-signature ROM, comparator, input multiplexer and
controller. The gate counts per probability are fixed too.

The following were chosen here, and are the first things to revisit for a real chip:

- all widths and sizes, the LFSR and MISR polynomials and the seed;
- the phase-shifter taps and the compactor grouping;
- the choice of heavy inputs and which stages feed their gates;
- the multiply-accumulate CUT;
- the two-flop scan cell and its separate update cycle;
- the registered input multiplexer;
- the controller's state sequence and the four test lengths.

The status output is `fail`, high when the signature differs. The low-power technique in
which two LFSR halves are clocked at half speed on separate clocks is a different scheme
and is not part of this design.

The design uses one clock throughout, with an asynchronous active-low reset.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_lbist_top \
    -y rtl +libext+.sv -Irtl rtl/lbist_pkg.sv tb/tb_lbist_top.sv -o sim
./obj_dir/sim
```

- `tb_lbist_top` runs at the default size. It exercises normal operation and one session
  of each length, checking the signatures, pass, and the cycle counts. It then injects a
  stuck-at fault with `force` and checks for `fail`. It counts every mechanism (held
  shift, update, capture, MISR compaction, pass, fail, biased heavy input, return to
  normal mode) and fails if any of them never happens.
- `tb_power_compare` runs one 1024-pattern session on two copies of the CUT, one driven by
  the weighted TPG and one by the plain LFSR. It compares bit toggles on the logic's
  nets. With the default weights the weighted copy toggles 4.6% less. The toggles the
  logic sees during shift fall from about 31,000 (ordinary scan flops) to 0 (hold flops).
  The toggle count is an unweighted stand-in for switching activity, not a power
  estimate.
- `tb_fault_coverage` injects each single stuck-at fault on the 16 product bits, the 16
  accumulator next-state bits and the 16 primary inputs (96 faults, forced one at a
  time). It runs a 64-pattern session for each fault and requires every one to end with
  `fail`. All 96 are detected, the biased heavy inputs included.
- Every other block has its own testbench against an independent reference: exhaustive
  for the multiplier, the gate tree and the compactor, and a full LFSR period for the
  TPG.

All testbenches finish in well under a second. Two concurrent assertions guard the
scheme's rules. `lbist_top` asserts that the CUT's primary inputs and scan-cell outputs
are stable across every shift clock. `bist_controller` asserts that every update is
directly followed by a capture. Keep `--assert` on so that they are checked.
