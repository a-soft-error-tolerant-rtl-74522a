# Soft-error tolerant adder: complementary DMR run as two-stage TMR

A particle strike can flip a bit in a logic module for a moment (a
single-event transient). Triple modular redundancy (TMR) hides such an upset
by running three copies and taking the majority. The cost is that the third
copy runs on every operation, even though upsets are rare. This design runs
the scheme in two stages and spends the third copy only when it is needed:

* **Primary stage.** Two copies compute the result and are compared. If they
  agree, which is nearly always, that result is final and the third copy
  never runs.
* **Supplementary stage.** Only when the two primary copies disagree is the
  third copy computed. A majority vote over the three then gives the result.

Each "copy" is a complementary dual-modular-redundancy (CDMR) pair: one
branch carries the result in true form and the other carries its complement.
A voter then merges the two branches and refuses to pass on any bit where
they disagree. The protected function is a 16-bit carry-lookahead adder.

A second, independent part of the RTL is a small FIFO memory with a
*transparent* in-field memory test (SOA-MATS++). The test finds stuck-at and
transition faults without destroying the stored data.

## Datapath

```
             operand reg (a, b, cin)
            /        |         |        \
       Module 1  Module 2   Module 3  Module 4      cla_adder x4
          |         |          |         |          (3, 4 see zeros unless
        A (true)  B (inv)    C (true)  D (inv)       the supplementary stage
           \      /             \      /             is active)
            E1 voter             E2 voter           cdmr_merge
         y1, mismatch1          y2, mismatch2
                 \                 /
                   MUX, per bit: sel = mismatch1 latched      cdmr_mux
                        |
                   result, cout  (+ complementary rail result_n, cout_n)
```

`two_stage_tmr_ctrl` sequences one operation at a time:

| cycle after `start` | action | strobe |
|---|---|---|
| 0 | operands latched | `opnd_load` |
| 1 | modules 1 and 2 captured in A (true) and B (complemented) | `pri_cap` |
| 2 | E1 merges; the mismatch vector of A/B is examined and latched as `sel` | `pri_merge` |
| 3 | agreement: `done`, `supp_used = 0` | `done` |
| 3 | disagreement: modules 3 and 4 get operands; C and D capture | `supp_active`, `supp_cap` |
| 4 | E2 merges | `supp_merge` |
| 5 | `done`, `supp_used = 1` | `done` |

`start` is accepted only while `busy` is low. An assertion enforces this.
`result` and `cout` are valid while `done` is high and stay put until the
next operation. The published scheme hides the extra time of the
supplementary stage by running it at maximum voltage and frequency. RTL has
no equivalent, so here that stage simply costs two more clock cycles.

### The complementary voter (E1, E2)

`cdmr_merge` receives a true copy `t` and a complemented copy `c`. In a
fault-free pair, `t == ~c` on every bit. The voter behaves like a bank of
C-elements:

* a bit where the copies agree loads the new value `t`;
* a bit where they disagree **keeps its previous value**.

So an upset in either branch cannot reach the voter output. The bit stays
where it was until agreeing inputs arrive. The voter has two outputs, `y`
and `y_n = ~y`. This is the "two outputs without duplicating the voter"
idea: a following stage could take them as a new true/complement pair. Here
the hold is a flip-flop with a per-bit load enable, not a feedback latch.
The voter also reports its current disagreement as a `mismatch` vector and
as `err`, the OR of that vector.

Stage-1 blocks B and D do the inversion. That keeps all four adder copies
identical, which matters if the copies are to be interchangeable. After
reset, A and C hold zero and B and D hold all ones, so every pair agrees.

### Why the multiplexer is a majority vote

For each bit, the output mux takes E1's value where the primary pair agreed
and E2's value where it disagreed (`sel` = latched primary mismatch). With
three copies c1, c2, c3:

* where c1 = c2, the majority is c1, whatever c3 says;
* where c1 ≠ c2, the majority is c3.

That is exactly what the per-bit mux does. So no separate 2-of-3 voter is
needed, and the mux from the CDMR structure doubles as the majority vote of
the two-stage scheme. When the primary pair agrees, `sel` is zero and E2's
stale contents never matter.

### What is and is not corrected

* Any set of upsets confined to one branch of the primary pair is corrected
  (one bit or many). The supplementary pair supplies the disagreeing bits.
* Upsets in both stages are corrected as long as no bit position is hit in
  both a primary and a supplementary branch.
* If a bit is hit in the primary pair *and* in the supplementary pair, E2
  holds its old value for that bit. The result bit is then unreliable, and
  `uncorrectable` goes high. This flag is an addition of this design.
* Upsets in both branches of the primary pair at the same bit position
  cancel out in the comparison and go undetected. Two-stage TMR shares this
  limit with conventional TMR, which also assumes that two copies do not
  fail in the same way at once.
* Upsets inside the voter and controller flip-flops are not modelled.

### Energy saving

Outside their capture cycle, the supplementary adders (modules 3 and 4) get
all-zero operands (operand isolation). C, D and E2 are clocked only when
needed. On the fault-free path, therefore, the third copy does no switching.
`seu_mask[k]` XORs an error pattern into the result of module k+1. It exists
only to inject upsets in simulation, so tie it to zero in a real build.

## Transparent FIFO memory test

`fifo_mem` is a FIFO of 4-bit words (16 words by default). It has
push/pop, full/empty flags and a first-word-fall-through `dout`. A test port
(`test_en`, `t_addr`, `t_we`, `t_wdata`, `t_rdata`, with same-cycle read)
gives direct access to the storage array. While the test port is in use,
push and pop are ignored. The pointers and the stored data are untouched.

`soa_mats_test` walks every location `i` and runs three iterations `j`:

| j | operation | expected |
|---|---|---|
| 0 | `temp <- read(i)`; `original <- temp`; `write(i, ~temp)` | - |
| 1 | `temp <- read(i)`; `result = temp ^ original`; `write(i, ~temp)` | all ones; a 0 marks a bit that did not invert |
| 2 | `temp <- read(i)`; `result = temp ^ original` | all zeros; a 1 marks a bit that did not restore |

Worked example: a location holds `1010` and its MSB is stuck at 1.

1. j=0 reads `1010` and writes `0101`. The cell actually holds `1101`.
2. j=1 reads `1101`. XOR with `1010` gives `0111`, and the 0 points at the
   MSB.

A bit that can rise but not fall escapes j=1, because the inverting write
succeeds. The restore write then fails, and j=2 catches it. In a good cell
the j=1 write of `~temp` puts back the original word, so the test leaves the
data unchanged.

Timing: each j takes a read cycle and a compare/write cycle. A full pass
takes `6 * DEPTH` cycles after `start`, and then `done` pulses. `fault` is
sticky until the next start. `fault_addr` and `fault_bits` record the first
faulty location and the bits that deviated.

The `inj_*` inputs of `fifo_mem` force stuck-at bits into one cell on the
read path, for simulation. Tie `inj_en` low in use.

## Top-level ports (`cdmr_top`)

Parameters: `WIDTH = 16` (adder width, must be a multiple of 4),
`WORD = 4`, `DEPTH = 16`.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `a`, `b`, `cin` | in | begin one addition |
| `seu_mask[4][WIDTH+1]` | in | upset injection per module (simulation) |
| `busy`, `done` | out | operation in progress / result valid |
| `result`, `cout` | out | corrected sum and carry |
| `result_n`, `cout_n` | out | complementary rail from the voters' inverted outputs |
| `supp_used` | out | the last operation needed the supplementary stage |
| `uncorrectable` | out | a result bit was confirmed by neither pair |
| `pri_err`, `supp_err` | out | current disagreement of the primary / supplementary pair |
| `push`, `din`, `pop`, `dout`, `full`, `empty` | | FIFO |
| `mt_start`, `mt_busy`, `mt_done` | | run the transparent test |
| `mt_fault`, `mt_fault_addr`, `mt_fault_bits`, `mt_result` | out | test outcome |
| `inj_en`, `inj_addr`, `inj_sa0`, `inj_sa1` | in | stuck-at injection into one cell (simulation) |

The adder datapath and the memory share only clock and reset.

## Files

| file | contents |
|---|---|
| `rtl/cdmr_pkg.sv` | state enums of the sequencer and of the memory test |
| `rtl/cla4.sv`, `rtl/cla_adder.sv` | 4-bit lookahead group; WIDTH-bit adder of rippled groups |
| `rtl/cdmr_stage1.sv` | stage-1 capture register, optional inversion (A-D) |
| `rtl/cdmr_merge.sv` | complementary voter with per-bit hold (E1, E2) |
| `rtl/cdmr_mux.sv` | per-bit output mux / majority, `uncorrectable` |
| `rtl/two_stage_tmr_ctrl.sv` | sequencer of the primary and supplementary stages |
| `rtl/fifo_mem.sv` | FIFO with test port and stuck-at injection |
| `rtl/soa_mats_test.sv` | transparent SOA-MATS++ controller |
| `rtl/cdmr_top.sv` | everything wired together |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself,
including through a watchdog. For example, the end-to-end run at default
sizes:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cdmr_pkg.sv \
    tb/tb_cdmr_top.sv --top-module tb_cdmr_top
./obj_dir/Vtb_cdmr_top
```

The same command with `tb_cla_adder`, `tb_cdmr_merge` and so on runs the
block tests. `tb_cdmr_top` covers:

* 400+ additions, with and without upsets;
* the 3-cycle and 5-cycle latencies;
* operand isolation of the supplementary adders;
* the uncorrectable case;
* a fault-free memory test that preserves the FIFO data;
* a located stuck-at cell;
* FIFO full and empty.

It counts each of these and fails if one never happened.
`tb_soa_mats_test` replays the worked example above, plus faults that only
j=2 or only j=1 detect, against a memory model with stuck-at and transition
faults.

## What follows the published scheme and what is this design's choice

These follow the published scheme:

* the two stages and skipping the third copy on agreement;
* the complementary branches and the two-output voter that holds disagreeing
  bits;
* four modules feeding two voters and a multiplexer;
* the 4-bit memory word;
* the three iterations of the transparent test.

These are this design's choices:

* a carry-lookahead adder as the protected module;
* the inversion placed in stage-1 registers B and D;
* the per-bit mux select that turns the mux into the majority vote;
* pairing modules 1/2 as the primary stage and 3/4 as the supplementary
  stage;
* the cycle plan;
* operand isolation;
* FIFO depth, flags and test port;
* writing `~temp` as the restore;
* the fault-report outputs and the simulation injection ports.

The scheme was first shown applied to an 8×8 router. Its routing function
was never specified, so no router is included here. The protected adder's
operand and result ports are exposed instead.
