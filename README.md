# Pilotless frame synchronizer for LDPC-coded links

A receiver has to know where each frame starts before it can decode it. The usual answer is a
pilot: a known bit pattern in front of every frame that the receiver correlates against. A
78-bit pilot on a 1944-bit frame costs about 0.17 dB of bandwidth efficiency. This design finds
the frame boundary with no pilot at all. It uses the parity checks that the LDPC code already
puts into every codeword.

The idea fits in two sentences. If a window of N received hard decisions is exactly one
codeword, nearly all of the code's parity checks hold, apart from those broken by channel
errors. If the window is shifted by any amount, the bits are unrelated to the checks and about
half of them fail. So the synchronizer slides an N-bit window over the received stream, counts
the unsatisfied checks at every candidate offset, and picks the offset with the fewest. Each
check is a small XOR, and no decoding iteration is needed.

The RTL targets the rate-1/2, 1944-bit quasi-cyclic LDPC code of IEEE 802.11n. That code has
972 parity checks (810 of degree 7, 162 of degree 8) and a circulant size of 81.

## Why the checks are compared against S, not zero

In a quasi-cyclic code, a codeword shifted by less than one circulant (81 bits) still satisfies
many checks. The count therefore ramps towards the true offset instead of peaking sharply
there. The transmitter removes the ramp by XORing every codeword with a pseudo-noise (PN)
sequence z that restarts at each frame boundary. Since cH = 0, the received aligned frame
satisfies (c + z)H = zH = S. The receiver compares each check with its bit of S, so a check
"holds" when its parity equals S_c. S depends only on the PN sequence and the code. It is a
configuration input (`syndrome`), one bit per check.

## Datapath: one offset per clock

```
bits -> sync_shift_reg (N bits) -> constraint_xor_bank (Nc checks, ^S) -> multiop_adder (U)
                                                                            |
     sync_counter (mu, i) -> unsat_ram U_0..U_{N-1} <-- read / add / write --+
                                                                            |
                         frame M-1:  sync_decision (min_U, min_mu)  or  candidate_list
```

Offset mu of frame i is the window that starts at received bit j = mu + i*N. Bits enter at
one per clock. Once the first N-1 bits are in, every new bit completes the next window, so
positions j = 0, 1, 2, ... appear in order, one per clock. The pipeline has three stages.

- **Stage A.** `sync_shift_reg` holds r_j..r_{j+N-1}, and `sync_counter` labels the window
  with its offset mu and frame index i.
- **Stage B.** `constraint_xor_bank` evaluates all 972 checks in parallel. Each check is an
  XOR of 7 or 8 window bits and S_c, and outputs 1 when the check fails.
  `multiop_adder` is a balanced tree of two-input adders. It counts the failures as U.
  In the same cycle the RAM word U_mu is read.
- **Stage C.** For frames 0..M-2, the running total U + U_mu is written back to U_mu. Frame 0
  writes U alone, so the RAM never needs clearing. For frame M-1 the M-frame total goes to
  the decision logic instead.

The RAM has one read port and one write port, so each offset's read-add-write takes a single
cycle. An acquisition reads N*(M+1)-1 bits: 5831 for the default M = 2. The maximum-method
result is ready 3 cycles after the last bit. The same address never comes up twice within N
cycles, so the pipeline has no read-after-write hazard.

The synchronizer works with *unsatisfied* checks, because a satisfied check gives XOR = 0.
Fewest unsatisfied means most satisfied.

## The three decision rules

`method` is sampled at `start`.

- **Maximum** (`METHOD_MAXIMUM`). The comparator keeps the smallest M-frame total (min_U)
  and its offset (min_mu = `mu_hat`). It updates only on a strictly smaller total, so the
  lowest offset wins a tie.
- **Threshold** (`METHOD_THRESHOLD`). The first offset whose total is at or below `u_thresh`
  is the estimate, and the acquisition ends as soon as that total reaches stage C.
  - The threshold theta is defined on *satisfied* checks, so set
    `u_thresh = M*Nc_active - theta`.
  - If no offset qualifies, `done` still comes after the last offset, with `found` low.
  - The total work then depends on where the frame starts. With the maximum rule it is
    always the same.
- **List** (`METHOD_LIST`). A cheap first pass and a more careful second pass over the same
  frames. This rule needs the most explanation:
  1. **Stage 1** runs the whole datapath, but examines only the checks selected by
     `con_en_s1` (for example half of them, F_Nc = 0.5). Each offset's M-frame total goes
     into `candidate_list`, which keeps the GAMMA = 100 smallest totals. The list is sorted,
     smallest first. It is a row of registers: a new entry is inserted behind all entries
     with a smaller or equal total, everything behind it moves back one place, and the last
     entry falls out.
  2. While stage 1 ran, every received bit was also written to `frame_buffer`: N*(M+1) bits,
     the synchronizer buffer.
  3. **Stage 2** starts on its own once stage 1 has drained. The buffer is replayed through
     the same shift register and datapath, with the checks in `con_en` (normally all of
     them). Only offsets that are in the list reach the comparator. The list has GAMMA
     parallel comparators for this lookup.
  4. The result is the best listed offset under the full set of checks. `done` comes
     N*(M+1)+6 cycles after the cycle that presented the last input bit.

  In this streaming design, stage 2 still evaluates every window, because the windows pass
  by anyway. The list restricts which offsets may win, not how much hardware toggles. The
  operation count of the list method is lower only in a design that evaluates checks one
  offset at a time. What this RTL reproduces is the list method's decision rule.

## Checking a subset of the constraints

`con_en` (and `con_en_s1`) switch individual checks on or off. A disabled check always counts
as satisfied. Checking fewer constraints over more frames (small F_Nc, large M) can
synchronize better for the same work, if the chosen checks share few variables and have low
degree. A greedy search can find such a set. The search is not part of this RTL: supply the
chosen subset as the mask.

## The parity-check matrix

`ldpc_sync_pkg` holds the 12 x 24 base matrix of the 802.11n rate-1/2 code. Each entry is a
cyclic shift of an identity block, or -1 for an all-zero block. The circulant size Z is a
parameter, so that tests can run the same structure on a small code:

- N = 24*Z and Nc = 12*Z;
- check c = br*Z + k reads variable bc*Z + ((k + BASE[br][bc]) mod Z);
- with Z below 81, the shifts are taken modulo Z.

The shift values come from the 802.11n standard, not from a derivation here. Some checks
support them: the row weights give exactly the 810/162 split of check degrees, and
synthesis of the XOR bank at Z = 81 gives 6966 two-input XORs. That is the count
N_c * sum(j * rho_j) for this code. The testbenches encode real codewords through the
dual-diagonal parity part of the same matrix and check that they satisfy every check. They
cannot prove that each shift value matches the standard. To use another quasi-cyclic code
of the same 12 x 24 shape, replace BASE. A code of another shape needs the MB/NB constants
changed as well.

## Interface

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `syndrome[NC]` | in | S = zH, stable during an acquisition |
| `con_en[NC]`, `con_en_s1[NC]` | in | checks examined (list: stage 2 / stage 1) |
| `method`, `u_thresh` | in | decision rule and threshold bound, sampled at `start` |
| `start` | in | one-cycle pulse: begin an acquisition (clears all state) |
| `bit_valid`, `bit_in`, `bit_ready` | in/in/out | received hard decisions; a bit moves when valid and ready are both high |
| `busy`, `done` | out | acquisition running; one-cycle pulse when the result is ready |
| `mu_hat`, `min_u`, `found` | out | offset estimate, its M-frame unsatisfied total, and whether the threshold rule found an offset |

The first N-1 bits after `start` only fill the window. Offset mu is measured from the first
bit after `start`. `bit_ready` drops once all N*(M+1)-1 bits have been taken, or during list
stage 2. The results hold until the next `start`.

Parameters of `frame_sync_top`:

| parameter | default | meaning |
|---|---|---|
| `Z` | 81 | circulant size, so N = 1944 and Nc = 972 |
| `M` | 2 | frames per offset, used by both list stages |
| `GAMMA` | 100 | list length |

## Cost at the default size

Coarse synthesis of `frame_sync_top` gives the following:

- 6966 XOR gates for the checks;
- one multioperand adder over the 972 check results;
- a 1944 x 11-bit RAM (21384 bits) and a 5832-bit receive buffer, 27 kbit of storage;
- about 2000 bits of window register, plus the 100-entry list (22 bits per entry plus a
  valid bit).

The full-size acquisition takes N*(M+1)+2 cycles for the maximum rule. The list rule takes
about twice that. The check tree and adder form one combinational stage. A fast clock would
need pipeline registers inside `multiop_adder`.

## Where this design departs from, or adds to, the architecture it follows

- Pipeline registers, the `start`/`busy`/`done` control, the valid/ready input and the reset
  are this design's. The architecture defines none of them.
- Frame 0 writes its count straight into the RAM instead of adding it to a cleared word.
- The threshold and list rules reuse the maximum-method datapath. The architecture only says
  that it can be modified for them. The replay buffer, the sorted list and the
  membership-gated comparator are choices made here.
- Both list stages use the same M. A first stage with a different M from the second is not
  supported.
- The constraint subset for F_Nc < 1 is a run-time mask. No selection algorithm is built in.
- Only the rate-1/2 1944-bit code is built in. The rate-2/3 and rate-3/4 codes, and the
  1008- and 4000-bit codes, need their own matrices.
- The LDPC decoder that follows the synchronizer is not part of this RTL. Neither are the
  pilot-based and decoder-based synchronizers it is compared against.

## Files

`rtl/`:

| file | contents |
|---|---|
| `ldpc_sync_pkg.sv` | base matrix, sizes, method enum |
| `frame_sync_top.sv` | the synchronizer |
| `sync_shift_reg.sv` | window register |
| `constraint_xor_bank.sv` | the Nc check XORs |
| `multiop_adder.sv` | adder tree |
| `sync_counter.sv` | offset and frame counter |
| `unsat_ram.sv` | per-offset partial sums |
| `sync_decision.sv` | comparator with min_U / min_mu |
| `candidate_list.sv` | list-method stage-1 list |
| `frame_buffer.sv` | receive buffer for the replay |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and two end-to-end ones:

- `tb_frame_sync_top` runs at Z = 5 (N = 120), M = 2, GAMMA = 10.
- `tb_frame_sync_full` runs the top at its default parameters.

Both end-to-end benches build scrambled codewords, place them at a random offset, flip bits
at random and stream them in, with and without idle cycles. They compare `mu_hat`, `min_u`,
`found`, the number of bits taken and the latency with a reference model in the testbench.
The scenarios cover all three rules, a reduced check set and candidates pushed out of the
list. Each bench also counts that every one of these scenarios happened.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_sync_pkg.sv tb/tb_frame_sync_top.sv \
    --top-module tb_frame_sync_top -Mdir obj_top
./obj_top/Vtb_frame_sync_top
```

Every bench ends with a line `TB_RESULT checks=<n> failures=<n>`. Replace the testbench name
for the unit benches. The full-size bench builds in about three minutes and runs in seconds.
Lint any module with `verilator --lint-only -Wall -Irtl rtl/ldpc_sync_pkg.sv rtl/<module>.sv`.
