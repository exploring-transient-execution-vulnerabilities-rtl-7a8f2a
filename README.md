# STBPU: a branch predictor keyed by a per-thread secret token

Branch-target injection and branch-predictor side channels need one of two things:
- an attacker's branch collides with a victim's branch in a predictor table;
- a target the attacker planted is taken as a victim's prediction.

Both work because the predictor's hashes are fixed, public functions of the branch address. This design keeps the familiar Skylake-style predictor structure but changes how it is addressed:

- Each hardware thread carries a 64-bit secret token (ST), split into two 32-bit halves, ψ (psi) and φ (phi).
- Every index, tag and offset hash is a keyed remapping function of ψ and the usual inputs. Code running under a different token therefore lands on unrelated entries. Collisions cannot be constructed; they happen only at random.
- Every target written to the BTB or the return stack is XORed with φ. A target planted under one token decodes to a pseudo-random address under another.
- An attacker could still learn a mapping by brute force, by provoking collisions and watching evictions or mispredictions. To stop that, each thread counts its mispredictions and its BTB evictions. When either count crosses an OS-set threshold, the thread's token is replaced from an on-chip PRNG. Everything learnt so far becomes useless.

Software entities that share a token, such as one process, keep full prediction accuracy. Because no tables are flushed or partitioned, the performance cost is small.

## Structure

| Block | Module | Size (defaults) |
|---|---|---|
| Branch target buffer | `btb` | 512 sets × 8 ways; 8-bit tag, 5-bit offset, 32-bit encrypted target |
| Pattern history table | `pht` | 16384 two-bit counters, 1-level and 2-level addressing with a chooser |
| Return stack buffer | `rsb` | 16 × 32-bit encrypted return addresses, circular, reports overflow and underflow |
| Histories | `branch_history` | 58-bit BHB (taken-branch address folding), 16-bit GHR |
| Indirect mode selector | `mode_selector` | 4-state FSM choosing IP-addressed or BHB-addressed BTB entries |
| Keyed remapping | `st_remap` | S-box / XOR-fold / P-box / C-S compression network, one instance per function |
| Target codec | `st_target_codec` | XOR with φ; rebuilds a 48-bit target from the branch's upper 16 bits |
| Token control | `st_token_ctrl` | per-thread ST, thresholds and down-counters as privileged CSRs; re-randomization |
| Random source | `st_prng` | 64-bit xorshift with reseed |
| Top | `stbpu` | two threads; prediction, update, CSR and event ports |

The four remappings:

| Name | Input | Output |
|---|---|---|
| R1 | {ψ, ip[47:0]} (80 bits) | BTB set index (9), IP-mode tag (8), offset (5) |
| R2 | {ψ, BHB} (90 bits) | BHB-mode tag (8) |
| R3 | {ψ, ip} (80 bits) | PHT 1-level index (14) |
| R4 | {ψ, GHR, ip} (96 bits) | PHT 2-level index (14) |

The prediction path and the update path each carry their own copies of R1 through R4. This lets a prediction and a training write use different threads' tokens in the same clock.

Each remapping is a fixed network with these stages:
1. a layer of 4-bit S-boxes, alternating the PRESENT and SPONGENT tables;
2. an XOR fold to the middle width (40 or 48 bits);
3. a second S-box layer;
4. three affine P-boxes separated by rotate-XOR mixers;
5. a final S-box layer;
6. an XOR compression to the output width.

Measured avalanche is about 48% of output bits per flipped input bit.

## Interfaces and timing

- **Prediction.** Drive `pred_valid` with a thread id, a 48-bit address and a branch kind (conditional, direct, indirect, return). One clock later, `resp_*` gives:
  - the direction;
  - whether a target was found, and the target itself;
  - its source: IP-mode BTB, BHB-mode BTB or RSB.

  Sources by branch kind:
  - Conditional and direct branches use the IP-mode BTB entry.
  - Indirect branches read both modes from one set. If both hit, the mode selector decides.
  - Returns use the RSB, falling back to the BHB-mode entry when it is empty.
- **Update.** Resolved branches arrive in program order. Each one is accepted when `upd_valid && upd_ready`. An update:
  - trains the PHT;
  - writes the BTB;
  - pushes or pops the RSB;
  - steps the selector and the histories;
  - counts a misprediction when `upd_mispredict` is high.

  An indirect branch writes both of its BTB entries. The second write takes one extra clock, and `upd_ready` is low during it.
- **CSR.** A privileged-only port reads and writes, per thread:
  - the token;
  - the two thresholds;
  - the two live counters.

  Unprivileged accesses are refused with `csr_err`. A threshold of 0 disables that counter.
- **Events.** `st_rerand[t]`, `btb_evict`, `rsb_overflow` and `rsb_underflow` are one-clock pulses.

Default thresholds are 41,500 mispredictions and 26,500 evictions. These are 5% of the estimated attack cost (8.3×10^5 mispredictions, 5.3×10^5 evictions), i.e. r = 0.05.

## Where the design follows its source and where it chooses

**Taken from the STBPU description:**
- the structure sizes;
- the remapping widths;
- the stage order and both S-box tables;
- XOR encryption of stored targets with φ, and the 16+32-bit target rebuild;
- the per-thread token and the counter/threshold re-randomization rule;
- the indirect-branch selector's states and arcs. With them, the FSM reproduces the hit/miss sequences measured with the probe patterns it was derived from, and `tb_mode_selector` checks those sequences.

**Chosen here because the description does not give them:**

| Item | Choice made here |
|---|---|
| P-box wirings | Affine permutations. The originals were randomly generated and are not published. |
| Mixer and C-S wirings | Own choice. |
| BHB folding | 16-bit XOR fold, shift by 2. |
| BTB replacement | Round-robin. |
| PHT mode chooser | Global 2-bit counter. |
| Reset values | Own choice. |
| Pipeline | One clock per prediction. |
| Training | Resolve-time training in program order. |
| CSR map | Own choice. |
| PRNG | The cited generator is not described. xorshift stands in for it; it is not cryptographic. |

**Departures from the description:**
- The selector is one global FSM. The description also mentions per-entry accuracy monitoring; it is not built.
- The return stack and the BHB/GHR histories are single structures shared by the two threads. The description does not say whether they are per-thread.
- The TAGE-SC-L and perceptron variants of STBPU, and the μop-cache adaptation, are not built.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/stbpu_pkg.sv tb/tb_stbpu.sv --top-module tb_stbpu && obj_dir/Vtb_stbpu
```

`tb_stbpu` runs the full-size design with its default parameters. It exercises:
- cross-token isolation and same-token sharing;
- exact φ garbling;
- direction learning;
- nested calls, with RSB overflow and underflow;
- return fallback and per-context indirect targets;
- selector switching and the update stall;
- misprediction- and eviction-driven re-randomization.

It fails if any of these mechanisms never occurred.

`tb_stbpu_workload` also runs at full size. It measures accuracy on a synthetic program that both threads execute at the same virtual addresses:
- an outer loop calling one of four functions;
- counted inner loops and data-dependent conditionals;
- a switch (an indirect branch) and returns.

A branch counts as right only if both its direction and its full target are right. Typical results:

| Condition | Accuracy |
|---|---|
| Distinct tokens, default thresholds | 93%, with no re-randomization |
| Misprediction threshold of 20 | 57%, tokens replaced about 400 times |
| Thread joining an already-trained thread's token | 93% from the first branch |
| Same cold start under a fresh token | 82% |

These results match the expected behaviour:
- Isolation costs little.
- Very aggressive thresholds destroy learnt state.
- Sharing a token between copies of one program avoids retraining.

`tb_stbpu_attack` runs at full size with the default thresholds. An attacker thread floods the BTB with 45,000 branches at fresh addresses. Each of them is a miss, and once the BTB is full, an eviction. The testbench checks these points:
- The attacker's token is replaced exactly at its 26,500th eviction.
- It is replaced again at its 41,500th misprediction.
- The CSR counters read back the expected remainders.
- The victim thread's token and counters are untouched.
- The victim's branches, possibly evicted by the flood, retrain under its unchanged token.

Flooding is still a denial of service: the token cannot prevent it, because the tables stay shared.
