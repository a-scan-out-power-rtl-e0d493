# Scan-out power reduction for a low-power multi-cycle logic BIST

Logic BIST shifts pseudo-random patterns into the scan chains and shifts the
circuit's responses out at the same time. Low-power pattern generators can make
the *scan-in* stream very smooth, but the *scan-out* stream is the circuit's
response, which the generator does not control, and it ends up causing about
twice the shift switching of the scan-in side.

This design attacks the scan-out side directly. A few scan flip-flops are
declared **controllable**: flip-flops whose value right after the last capture
hardly matters for fault detection. At that last capture, instead of keeping
their response, they are **filled** with a value that makes the vector about to
be shifted out smoother:

* **0-filling** – load 0 (zeros dominate typical scan-out data);
* **adjacent-value filling** – copy the value captured by the neighbouring FF on
  the scan-in side, so a controllable FF can never form an isolated `010` or
  `101`.

Two kinds of flip-flop are safe to control:

* **Observation FFs**. The capture compactor reads them after every capture of
  the multi-cycle test. Their fault effects are already recorded, so their final
  value is expendable. They are always filled.
* **LSWF-FFs** (low switching frequency). These almost never change at the last
  capture, so they detect little there. They are filled only when they would not
  switch at that capture. A switching LSWF-FF keeps its response, which may be a
  transition-fault detection.

The fill happens only at the last capture. The first capture sets the capture
power, and the responses of the earlier captures are not touched, so capture
power and most of the test coverage stay as they were.

## Architecture

```
 seed ─► bist_lfsr ─► phase_shifter ─cur,fut─► plpf ─si[c]─► scan_chain[c] ──so[c]──► scan_misr ─► misr_sig
          (x^16+x^15+x^13+x^4+1)                ▲               │   ▲  (100 FFs each, c = 0..7)
                                                └── q[c][0] ────┘   │
                                                                ff_q│cut_resp
                                                                    ▼   │
                                                              circuit under test (external)
                                     ff_q (observation FFs) ─► obs_compactor ─► comp_sig
             bist_controller: se, capture, fast, lcap, comp_en, misr_en, lfsr_load/clear
```

| Module | Role |
|---|---|
| `lp_bist_top` | The whole BIST. The circuit under test (CUT) is outside: `ff_q` drives it and `cut_resp` brings its next state back. |
| `bist_controller` | Sequences one session: seed load, then for each pattern 100 shift cycles, 10 slow captures and 10 fast captures. `lcap` is high on the last capture. A final unload shift ends the session. |
| `bist_lfsr` | 16-bit Fibonacci LFSR with polynomial x^16+x^15+x^13+x^4+1. It shifts toward bit 0. |
| `phase_shifter` | Gives each chain an XOR of three LFSR stages (`cur`). It also gives the value that channel will have one shift later (`fut`). |
| `plpf` | Pseudo low-pass filter. The scan-in bit is the majority of the previous scan-in bit, `cur` and `fut`. That is the rounded moving average of a 3-bit window. |
| `scan_chain` | One scan chain. Its mask parameters decide which FF cell sits at each position. |
| `scan_ff` | Plain mux-D scan FF. |
| `obs_ff_zero_fill`, `obs_ff_adj_fill` | Observation FF cells. They always fill at `lcap`. |
| `lswf_ff_zero_fill`, `lswf_ff_adj_fill` | LSWF-FF cells. They fill at `lcap` only if `di == q`. |
| `obs_compactor` | XOR-folds the observation FFs onto 16 lines and feeds a 16-bit MISR after each capture. |
| `scan_misr` | 16-bit MISR over the scan outputs. The compactor uses it too. |
| `lpbist_pkg` | Holds the fill-mode enum, the LFSR taps, the phase-shifter taps and the default mask functions. |

## The controllable flip-flop cells

Every cell is a mux-D scan FF: `se = 1` shifts (`q <= si`), `se = 0` captures.
At a capture edge where `lcap = 1`:

| Cell | Next `q` at the last capture |
|---|---|
| `scan_ff` | `di` |
| `obs_ff_zero_fill` | `0` |
| `lswf_ff_zero_fill` | `di == q ? 0 : di` |
| `obs_ff_adj_fill` | `adj_di` |
| `lswf_ff_adj_fill` | `di == q ? adj_di : di` |

`adj_di` is the data input of the neighbour one position closer to scan-in.
Because it is that neighbour's *data input*, the filled FF ends up equal to
whatever the neighbour captured. For a plain neighbour that is its final value.

**Synchronous fill.** A gate-level version of this scheme builds the fill from
the FF's asynchronous set/reset. For observation FFs the reset (or set) comes
from a NAND of the capture clock and LCAP. For LSWF-FFs an XNOR of DI and DO
also gates it, with a buffer on DO for hold timing. The RTL here makes the same
choice synchronously: the fill value replaces `di` in the D-input mux at the
last capture edge. The FF holds the same value after the last capture, but the
cell needs no clock-gated asynchronous reset and stays ordinary synthesizable
logic. The gate counts differ from that cell-level form. If you port it to
set/reset FFs, keep the XNOR comparison on the *pre-edge* `q`.

**Worked example** (10-FF chain, controllable FFs 4th and 8th from scan-in,
vectors written scan-in end first):

```
captured response      0 0 1 1 1 1 1 0 1 1   3 transitions
0-filling              0 0 1 0 1 1 1 0 1 1   5 transitions (a new 1-0-1 appears)
adjacent-value filling 0 0 1 1 1 1 1 1 1 1   1 transition
```

The example shows why adjacent filling is the default. 0-filling can break a
run of ones and create new high-frequency content. Adjacent filling can only
lengthen existing runs.

## Choosing the controllable FFs

The masks `OBS_MASK` and `LSWF_MASK` are per chain: one `CHAIN_LEN`-bit mask for
each chain, where bit *p* is position *p* counted from scan-in. Choosing them is
an offline job on the real circuit, not hardware:

1. Pick about 20% of the FFs as observation FFs with a testability measure
   (SCOAP-style).
2. Simulate the multi-cycle BIST with 30k patterns and 20 captures. Record how
   often each FF toggles at the last capture. Also record whether it ever
   differs from its neighbour there. An FF that never differs from its
   neighbour gains nothing from a fill.
3. Keep the FFs that switch in under 1% of patterns. Weight each one's toggle
   rate by its distance from scan-out: the scan-out FF counts 1 and the scan-in
   FF counts the chain length. That distance is how many shift clocks its value
   spends in the chain.
4. In each chain, take the FFs with the largest weighted value until the target
   ratio is reached. 10–20% of the FFs on top of the observation FFs is typical.

The default masks are placeholders only. Each chain has observation FFs at
positions p%5==2 and LSWF-FFs at p%5==4, so 20% + 20%. Replace them with the
result of the selection for your circuit. In adjacent mode, position 0 (the
first scan-in FF) has no neighbour, and selecting it is an elaboration error. A
position may not be in both masks.

Observation FFs also feed the compactor (`obs_compactor` gets `OBS_MASK`), so
an FF you mark as "observation" must really be observed there. LSWF-FFs are not
compacted.

## Session timing

With defaults (`CHAIN_LEN=100`, `N_SLOW=N_FAST=10`, `NUM_PATTERNS=30000`):

```
start ─► [shift 100][capture x20] ... x30000 patterns ... [unload shift 100] ─► done
                     ^ slow x10 ^ fast x10 (fast=1); lcap on capture 20
```

* The session takes `1 + NUM_PATTERNS*(CHAIN_LEN+N_SLOW+N_FAST) + CHAIN_LEN`
  clocks, 3,600,101 at the defaults. That count includes the start cycle, which
  loads the seed and clears both signatures.
* The MISR takes the scan outputs during every shift except the first
  pattern's, because the chains hold no response yet. It also takes them during
  the final unload.
* The compactor takes the observation FFs on capture cycles 2..20. That covers
  the responses of captures 1..19. The 20th response is the one the fill
  overwrites.
* `fast` only flags the at-speed half of the captures. The clock source is
  expected to switch the capture clock frequency; this RTL runs on one clock.
* While idle or done, `se = 0`, so the FFs capture `cut_resp` every cycle, as
  in functional mode.

## Parameters of `lp_bist_top`

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CHAINS` | 8 | Scan chains. 8 x 100 holds the largest circuit size targeted, 735 FFs. |
| `CHAIN_LEN` | 100 | FFs per chain. Use 200 for circuits with more than 1600 FFs. |
| `N_SLOW`, `N_FAST` | 10, 10 | Slow (stuck-at) and at-speed (delay) captures per pattern |
| `NUM_PATTERNS` | 30000 | Patterns per session |
| `FILL` | `FILL_ADJ` | `FILL_ZERO` or `FILL_ADJ` |
| `OBS_MASK`, `LSWF_MASK` | 20% + 20% per chain | Controllable-FF placement, `[NUM_CHAINS][CHAIN_LEN]` |

## Design choices not fixed by the method

These choices are this implementation's own, and each can be changed:

* **Phase-shifter taps.** Channel *c* XORs stages c, c+5 and c+11 (mod 15).
  Every tap is at stage 14 or below, so the look-ahead is one position up. The
  channels repeat beyond 15 chains.
* **PLPF window.** The window is 3 bits (majority). A wider window smooths more.
* **MISR and compactor.** Both are 16 bits wide and use the LFSR polynomial.
  Chain *c* feeds MISR stage *c*, so `NUM_CHAINS <= 16`. The compactor folds
  input *i* onto line *i* mod 16.
* **Reset and start.** Reset is asynchronous, active low, and clears every FF to
  0. The LFSR resets to 1, and a zero seed is replaced by 1.
* **Chain count.** The design does not derive it from a circuit. It is set to 8.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Notable ones:

* `tb_scan_chain`: the worked example above, bit-exact, including the
  shifted-out stream and its transition counts. It also runs random
  shift/capture/last-capture sequences on 100-FF chains in both fill modes
  against a model.
* `tb_lp_bist_top`: three copies of the BIST (adjacent fill, 0-fill, no
  control) at reduced size, 4x20 FFs with 40 patterns. Each copy is compared
  cycle by cycle with an independent reference model, `tb/lp_bist_model.sv`. The
  test counts every mechanism (shift, slow and fast capture, last capture,
  observation fill, LSWF fill, LSWF kept, filter smoothing, MISR and compactor
  updates) and fails if one never happens.
* `tb_lp_bist_full`: one full session with all defaults (8x100 FFs, 30000
  patterns), checked against the reference model every cycle. It takes about a
  minute with Verilator.
* `tb_scan_out_power`: the six configurations (0-fill and adjacent fill with
  20/30/40% controllable FFs) plus an uncontrolled copy at 3x100 FFs. It
  predicts every filled response from the uncontrolled copy and reports a
  weighted scan-out transition count. In that count, a transition between
  positions p and p+1 weighs `CHAIN_LEN-1-p`, the shifts it still has to travel.

All circuit-level tests use `tb/cut_model.sv`, a small synthetic next-state
function. It is **not** a benchmark circuit, so the power numbers the tests
print only show that the mechanism works. They say nothing about how much power
a real design saves. With that stand-in, adjacent filling at 40% lowers the
weighted scan-out transitions from about 23% to about 18.5% of the maximum.

Running a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lpbist_pkg.sv tb/tb_lp_bist_top.sv --top-module tb_lp_bist_top
./obj_dir/Vtb_lp_bist_top
```

Replace `tb_lp_bist_top` with any other testbench name. The `-y` options let
Verilator find each module in its own file.

## Limits

* The CUT, its primary inputs and outputs, and the slow/fast clock switching
  are outside this RTL.
* The selection of controllable FFs is an offline flow and is not included. The
  masks must come from it.
* The synchronous fill matches the cell-level asynchronous set/reset in the
  value held after the last capture, but not in gate count or timing.
* Verilator reports `SYNCASYNCNET` on `rst_n`. It comes from the assertions,
  which use `disable iff (!rst_n)` while the flip-flops use `rst_n` as an
  asynchronous reset. It does not affect the hardware.
