# Error-detecting parallel polynomial hashing for Hash-Counter-Hash enciphering

Tweakable enciphering schemes of the Hash-Counter-Hash family (HCH, HCTR,
XCB) wrap a counter-mode layer between two polynomial hashes over GF(2^128).
The hashes are by far the most expensive part in hardware: one field
multiplication per 128-bit block. This RTL implements those hashes as
Q-branch parallel Horner evaluators (default Q = 64 multipliers) and protects
them against natural and injected faults with **recomputation on swapped
entries**: every hash is computed twice, the second time with each branch
working on the data of a partner branch, and the two runs are compared. A
multiplier with a permanent defect then corrupts *different* lanes of data in
the two runs, so the comparison catches permanent faults as well as transient
ones, without any decoding and without any assumption about how the
multiplier is built.

The three hashes (K is the hash subkey, m_1..m_pi the message blocks,
pi = G*Q, + is XOR, products are in GF(2^128) modulo x^128+x^7+x^2+x+1):

| engine | hash                                                                     |
|--------|--------------------------------------------------------------------------|
| HCH    | H = Qt + sum_j m_j K^(pi-j)                   (K = R = E_K(T), Qt = E_K(R + bin(n*pi))) |
| HCTR   | H = sum_j m_j K^(pi-j+2) + bin(\|m\|) K                                   |
| XCB    | H = sum_j m_j K^(pi-j+3) + T K^2 + (bin(\|P\|) \|\| bin(\|T\|)) K         |

The block cipher that produces R, Qt and h, and the counter-mode layer, are not
part of this RTL: their results are inputs of the top.

## How the hash is split over Q branches

Branch k (0-based) owns the lane m_{k+1}, m_{Q+k+1}, m_{2Q+k+1}, ... (message
group i supplies block k of every lane). Each branch is an XOR, a GF(2^128)
multiplier and a 128-bit register r_k in a loop:

    r_k <= (acc + entry) * operand          acc = 0, r_k, or a stored value

| step (per run)        | entry of branch k                 | operand                |
|-----------------------|-----------------------------------|------------------------|
| 0 .. G-2  (phase 1)   | block k of group s                | K^Q                    |
| G-1 (phase 2, first)  | block k of the last group         | K^a(k)                 |
| G   (phase 2, second; HCTR and XCB only) | X for branches 0/1, else 0 | K^b(k) |
| phase 3               | XOR tree over all r_k (+ Qt for HCH) | -                   |

with the per-branch exponents (k = 0..Q-1)

| mode | a(k)                           | b(k)                         | X            |
|------|--------------------------------|------------------------------|--------------|
| HCH  | Q-1-k  (R^63 ... R, 1)         | -                            | -            |
| HCTR | Q for k<=1, else Q-k+1 (h^64, h^64, h^63 ... h^2) | 1 for k=0, else 0 | bin(\|m\|) on branch 0 |
| XCB  | Q for k<=2, else Q-k+2 (h^64, h^64, h^64, h^63 ... h^3) | 2 for k=0, 1 for k=1, else 0 | T on branch 0, length block on branch 1 |

After phase 1, r_k holds a Horner chain in K^Q; the phase-2 multiply moves
every lane to its final power, and the XOR tree adds the lanes. Multiplying
by K^0 = 1 in the second step simply keeps the branch value. All operands
come from a table K^0..K^Q that `key_power_gen` builds at every start (one
power per clock by repeated multiplication, Q clocks), because the HCH
subkey R depends on the tweak.

## The two runs and how they share the hardware

The multiplier is a one-step Karatsuba-Ofman design (three 64x64 carry-less
products) with one pipeline register after the sub-products. With that
register the branch loop r -> XOR -> multiplier stage -> r holds **two**
values, and the two runs of the error-detection scheme fill them
alternately:

    clock        : 0    1    2    3    4    5   ...
    issues       : N0   S0   N1   S1   N2   S2  ...   (N = normal run, S = swapped run,
    r holds      : -    N0'  S0'  N1'  S1'  N2' ...    digit = step)

So each run advances one step every two clocks, and both runs of a hash take
as many clocks as a single run would take with an unpipelined multiplier,
at roughly twice the clock rate. Every message group is read in two
consecutive clocks (normal, then swapped) and is fetched from the source only
once.

In phase 1 the swapped run feeds branch j with the entry of its partner:

* `SWAP_ADJACENT`: branches (0,1), (2,3), ... exchange entries;
* `SWAP_INTERLEAVED`: branches (0,2), (1,3), (4,6), (5,7), ... exchange
  entries, so neighbouring multipliers hit by one burst do not hold the two
  copies of the same lane.

**Phase-1 check.** At step l the normal run's registers are copied into the
check bank (`cser_checker`) on slot 0; one clock later the swapped run's
registers, mapped back to lane order by the same swap network (the swap is
its own inverse), are compared lane by lane. `l_steps = 0` (or >= G-1)
checks at the end of phase 1, which covers every phase-1 clock. A smaller l
checks earlier: permanent and long faults are still caught, a short
transient fault after step l is not, and the swapped run then sits idle until
phase 2 (it saves energy, not clocks, in this interleaved implementation).

**Phases 2 and 3** are recomputed *without* swapping: the swapped run restarts
from the normal run's stored phase-1 result (held in the check bank), performs
the same phase-2 steps, and the two XOR-tree outputs are compared. Permanent
multiplier faults are already caught in phase 1; this recomputation catches
transient faults in the last steps and in the tree.

**Flags.** `err_lane[c]` is set when lane c differs between the runs;
`err_p1` is their OR, `err_p2` flags a final-hash mismatch. A permanent fault
in branch b typically marks lane b and lane partner(b) (lane b is computed by
branch b in the normal run, lane partner(b) by branch b in the swapped run);
a transient fault in one run marks a single lane. Flags are cleared at start
and hold after `done`.

What is *not* protected: the key-power table (both runs read the same
entries), the comparator itself (no triple-modular redundancy), and the
message source.

## Interface and timing (`poly_hash_cser`, and each engine of the top)

| port                   | meaning |
|------------------------|---------|
| `start`                | starts an operation (only when `busy` is low); samples the key and request inputs |
| `hkey`                 | hash subkey (R for HCH, h for HCTR and XCB) |
| `q_term`               | HCH: Qt, added in phase 3 |
| `extra0`, `extra1`     | HCTR: `extra0` = bin(\|m\|). XCB: `extra0` = T, `extra1` = bin(\|P\|) \|\| bin(\|T\|) |
| `n_groups`             | G = pi/Q, at least 2 |
| `l_steps`              | phase-1 check point l; 0 = end of phase 1 |
| `swap_sel`             | `SWAP_ADJACENT` or `SWAP_INTERLEAVED` |
| `msg_idx`, `msg[Q]`, `msg_valid`, `msg_ready` | message groups in order; `msg[k]` = m_{idx*Q+k+1}; hold the group valid and stable until `msg_ready` |
| `done`, `hash`, `err_p1`, `err_p2`, `err_lane` | result; `done` pulses, the rest holds until the next start |

Without stalls, `done` is high Q + 3 + 2(G-1+P2) clocks after the start
clock, with P2 = 1 for HCH and 2 for HCTR and XCB (Q clocks of key powers,
two clocks per step for the two runs, plus three clocks of control). For
Q = 64 and pi = 1024 blocks (G = 16): 99 clocks for HCH, 101 for HCTR and
XCB. A missing message group (`msg_valid` low when the group is needed)
freezes the whole engine, both runs included.

Integers: bit i of a 128-bit word is the coefficient of x^i (plain
polynomial basis, not the bit-reflected order of GCM).

## Files

| file | contents |
|------|----------|
| `rtl/tes_pkg.sv`        | types, modes, swap pairing, phase-2 exponent tables, carry-less multiply (column by column: bit j is the parity of `a` AND a window of bit-reversed `b`) and reduction |
| `rtl/gf128_mul_ko.sv`   | one-step Karatsuba-Ofman GF(2^128) multiplier, optional pipeline stage |
| `rtl/hash_branch.sv`    | one branch: XOR, multiplier, branch register |
| `rtl/cser_swap.sv`      | entry swap network (adjacent / interleaved) |
| `rtl/cser_checker.sv`   | check bank, lane compare, final-hash compare, flags |
| `rtl/xor_tree.sv`       | balanced XOR tree plus the extra term |
| `rtl/key_power_gen.sv`  | table K^0..K^Q |
| `rtl/poly_hash_cser.sv` | one engine: control, Q branches, swap, checker, tree |
| `rtl/tes_ph_cser_top.sv`| HCH, HCTR and XCB engines side by side |
| `tb/gf_ref_pkg.sv`      | bit-serial reference multiplier and plain-Horner reference hashes |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_fault_campaign` |

## Choices made here, and where the published description is ambiguous

* **Exponents of HCH.** One formula of the published scheme gives
  m_1 R^(pi-1) ... m_pi R, while the parallel decomposition and the phase-2
  datapath (last branch multiplied by 1) give m_j R^(pi-j). The RTL follows
  the decomposition: H = Qt + sum m_j R^(pi-j).
* **Where the last block enters.** Phase 1 runs pi/Q - 1 steps; the last block
  of each lane is added in the first phase-2 step, together with the lane's
  final power. HCTR and XCB need a second phase-2 step for the length/tweak
  words on branches 0 and 1; the other branches multiply by 1 there.
* **Interleaved runs.** The published scheme runs the swapped recomputation
  after (or for l cycles after) the normal run and suggests sub-pipelining the
  multipliers to recover throughput. Here the two runs are interleaved clock by
  clock through that pipeline stage; the checks are the same, but the
  check-after-l variant compares during phase 1 instead of after it.
* **Key powers** are computed at every start with one extra multiplier,
  rather than taken as inputs; they are not covered by the recomputation.
* **Message interface** (valid/ready per group of Q blocks, requested by
  index), the per-lane flag encoding and the reset scheme (asynchronous,
  control state only; datapath registers are not reset) are this design's.
* **Not included:** the block cipher, the counter-mode layer, hardening of the
  comparator, and deeper (two- or three-stage) multiplier pipelines.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

    verilator --binary --timing --assert --top-module tb_poly_hash_cser \
        rtl/tes_pkg.sv tb/gf_ref_pkg.sv rtl/*.sv tb/tb_poly_hash_cser.sv
    ./obj_dir/Vtb_poly_hash_cser

| testbench | what it checks |
|-----------|----------------|
| `tb_gf128_mul_ko`   | 300+ products against a bit-serial reference, pipelined and combinational, stall hold |
| `tb_cser_swap`      | both pairings at Q = 64, involution |
| `tb_xor_tree`       | Q = 64 and Q = 4 against a sequential XOR |
| `tb_hash_branch`    | two chains interleaved through one branch, restart from a stored value, stall |
| `tb_key_power_gen`  | all of K^0..K^64, latency of Q clocks |
| `tb_cser_checker`   | clean compare, single corrupted register flags the right lane, hash compare, clear |
| `tb_poly_hash_cser` | all three modes at Q = 8, G = 2..6, both pairings, l = 1 and full, random message gaps, latency; permanent stuck-at and one-clock transient faults (phase 1 and phase 2) must raise the flags |
| `tb_fault_campaign` | LFSR-driven fault injection on the three engines at Q = 8, G = 8..16: single, multiple (2-4) and biased (six leftmost branches) faults, transient and permanent, 150 injections per model and mode |
| `tb_tes_ph_cser_top`| the top at its default size (Q = 64) with pi = 1024 blocks per hash: hash values, latency, stalls, both pairings, partial check, permanent fault (phase-1 flag, only the two expected lanes), transient phase-2 fault (final flag only) |

The top testbench takes a few minutes to compile (195 GF(2^128) multipliers)
and seconds to run. Faults are injected with `force` on a multiplier output
bit or a branch register bit.

Results of the fault campaign (share of the injections that corrupt the hash
and are flagged): 100 % for every single fault, transient or permanent, in all
three modes; 100 % for multiple and biased transient faults; 98.6 to 100 % for
multiple and biased permanent faults. The misses are the scheme's blind spot:
the same stuck-at bit in a branch and in its swap partner corrupts both runs
identically. About half of the transient flips do not change the hash at all:
they hit the recomputation run, whose values only feed the comparison. The
flags still report most of them, since the two runs then differ.

## Size

Per engine at Q = 64: 65 Karatsuba-Ofman multipliers (64 branches and the
key-power unit), 64 x 128 branch registers, 64 x 381 pipeline bits, a
64 x 128 check bank, a 65 x 128 key-power table and a 64 x 128-bit swap
multiplexer on the message inputs and on the compare path. Published 65 nm
figures for this kind of architecture are 2.6 to 2.9 million gate
equivalents per hash engine, of which 3.8 to 5.1 % is the error detection.
