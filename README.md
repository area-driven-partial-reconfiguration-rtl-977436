# Area-driven partial duplication for SEU detection on SRAM FPGAs

Configuration upsets (SEUs) in an SRAM FPGA silently change the function of
the logic. The classic defence, duplicating the whole circuit and comparing
(DMR), doubles its area. This design instead keeps **one spare slot**, a
small reconfigurable partition, next to the circuit. Partial
reconfiguration loads a copy of one operator of the circuit into that slot.
Two multiplexers then feed the copy with the same operands as the original and
compare the two results. Over time every operator takes its turn in the slot.
Each operator stays there for a time **proportional to its area**: a bigger
operator holds more configuration bits, so it collects more of the upsets. When
the comparison finds a difference, the whole circuit is scrubbed (rewritten
with a clean bitstream).

The result trades detection coverage for area. An upset in an operator that
is not in the slot goes unnoticed until that operator's turn comes. The gain
is that the protected circuit grows by one operator, two multiplexers and a
comparator, not by a second copy of itself.

The RTL contains:

* the circuit under protection, a 16-bit pipeline that evaluates
  F(x) = 3x² + 5x + 5;
* its partially duplicated version with the checker slot;
* a scheduler that picks the operator to check and asks for reconfigurations
  and scrubs;
* the test harness used to measure availability under injected faults: input
  RAM, reference ("Gold") circuit, result RAMs, comparator and AXI4-Lite
  registers;
* the multiplexer that shares the FPGA's configuration port between the fault
  injector and the bitstream writer.

## The protected circuit

`poly_baseline` computes F(x) in Horner form, ((3·x + 5)·x) + 5, with four
operators in a row:

| # | operator | enum | inputs | output tap |
|---|----------|------|--------|-----------|
| 0 | constant multiplier ×3 | `OP_CMUL` | x | `m3` |
| 1 | constant adder +5 | `OP_ADD1` | m3 | `a1` |
| 2 | two-input multiplier | `OP_MUL` | a1, x delayed by 2 | `p` |
| 3 | constant adder +5 | `OP_ADD2` | p | `y` |

Every operator registers its result. The input x runs alongside the first two
operators through two delay registers, so it meets 3x + 5 at the two-input
multiplier. The pipeline takes one input per enabled cycle, and F(x) comes out
exactly four enabled cycles later. All arithmetic is modulo 2¹⁶. With `en` low
the whole pipeline is frozen. The harness does this while a fault is being
injected.

`poly_reconfig` wraps this datapath with the checker:

* **select input** multiplexer: routes the operands of operator `sel_in` to
  the partition (`rp_checker`);
* **partition**: holds a copy of the operator named by `rp_cfg`, with the same
  one-cycle register;
* **select output** multiplexer: picks the result of operator `sel_out` from
  the main datapath;
* **comparator**: raises `dmr_error` when the two results differ.

Because both copies register on the same edge, the comparison is made on
registered values. Checking adds no delay to the main output.
`dmr_error` is qualified by `cmp_en`. It is only raised once the partition has
been loaded with comparison on for at least one enabled edge. A change of
operator therefore never compares two different functions.

An FPGA partition holds whatever bitstream was last written into it. RTL
cannot express that. `rp_checker` therefore contains all four operator copies,
and `rp_cfg` (the operator whose bitstream is loaded) selects which one
drives its output. On the device only one of them exists at a time.

## The area-driven schedule

`area_scheduler` visits the operators in the order 0, 1, 2, 3, 0, … Each visit
has three steps:

1. **Load.** The scheduler raises `pr_req` with `pr_kind = PR_MODULE` and
   `pr_target = k`. The reconfiguration engine writes the partition bitstream
   of operator k (5,296 bytes) and pulses `pr_done`. The scheduler then sets
   `rp_cfg = k`.
2. **Check.** `cmp_en` is high for `AREA[k] × unit_cycles` clock cycles.
   `sel` drives both multiplexers.
3. **Scrub on error.** A `dmr_error` during the check raises `pr_req` with
   `pr_kind = PR_SCRUB`. This asks for the whole design to be rewritten
   (17,651 bytes). After `pr_done`, the same operator finishes its remaining
   check time. The full bitstream also contains the partition with its current
   contents.

`pr_kind` and `pr_target` are stable while `pr_req` is high. `cmp_en` is never
high at the same time as `pr_req`. Assertions check both rules.
`unit_cycles` sets the check rate. It comes from a register, so software can
sweep the ratio of reconfiguration rate to SEU rate. `n_loads` and `n_scrubs`
count completed reconfigurations and scrubs.

**Area weights.** The default `AREA` is `'{16, 16, 129, 16}` (LUTs). The
constant operators are taken as one LUT per bit. The multiplier is taken as
16 + 113 LUTs. 113 is the measured spread between the smallest and the largest
operator loaded into the partition of the built design (509 to 622 LUTs for
the whole circuit). The result is that the multiplier is watched about 73 % of
the time. These weights are an estimate, not measured per operator. Set them
from your own synthesis results.

## Test harness (`user_ip`)

The harness measures how often the protected circuit is wrong:

* An **input RAM** is loaded over AXI4-Lite and read in a loop of `LEN`
  words. The loop feeds the circuit under test (`poly_reconfig`) and a
  **Gold** copy (`poly_baseline`) with the same data. The Gold copy is assumed
  to sit in a part of the device that is hardened by other means.
* Both results go to a **CUT RAM** and a **Gold RAM**.
* An **oracle comparator** compares the two results. `oracle_error` is the
  ground truth for availability.
* `dmr_error` is what the circuit knows about itself ("self-aware"
  availability).
* While `ext_pause` (the injector is busy) or `CTRL.pause` is set, the read
  pointer and both pipelines are frozen. This keeps injection latency out of
  the measurement.

Timing: a result is stored six cycles after the run starts. That is one cycle
of RAM read, four operators, and one cycle to store it.

Register map (32-bit words, 20-bit byte address):

| address | reg | meaning |
|---|---|---|
| 0x00000 | CTRL | [0] run, [1] pause, [2] scheduler enable, [3] ICAP owner (1 = HWICAP), [4] write 1 to clear counters and restart result storage at word 0 |
| 0x00004 | STATUS | [0] oracle error seen, [1] DMR error seen, [2] running, [3] comparing, [5:4] operator under check, [7:6] operator in partition |
| 0x00008 | LEN | input loop length (1..DEPTH) |
| 0x0000C | UNIT | cycles of checking per unit of area |
| 0x00010–0x00020 | OUTCNT, ORACNT, DMRCNT, LOADS, SCRUBS | counters |
| 0x40000 + 4i | input word i | write only |
| 0x80000 + 4i / 0xC0000 + 4i | CUT / Gold result i | read only |

The interrupt pulses are `irq_oracle_set`, `irq_oracle_clr`, `irq_dmr` and, on
the top, `irq_pr`. They mark when results turn wrong, when they turn right
again, when an error is detected and when a reconfiguration is requested.
External timers use them to time-stamp events.

## Sharing the configuration port (`icap_mux`)

The fault injector (Xilinx SEM core) and the bitstream writer (Xilinx HWICAP)
both need the one ICAP. `icap_mux` connects one of them at a time. The owner
is requested with CTRL bit 3. The owner only changes while the current owner's
chip select (CSIB) is inactive, so no transfer is ever cut in half. The master
that does not own the port reads zeros.

## Top level and what lies outside it

`seu_framework_top` holds `user_ip`, the triplicated scheduler
(`area_scheduler_tmr`) and `icap_mux`. The
following parts sit outside the logic and connect through top-level ports:

* the processor that runs the experiment;
* the SEM core, the HWICAP and the AXI timers, which are vendor IP;
* the AXI interconnect;
* DDR memory with the bitstreams;
* the ICAP primitive.

A system integrator serves `pr_req` by copying the requested bitstream from
memory through the HWICAP. The integrator then pulses `pr_done`.

## Where this RTL departs from the published design

* **Scheduling is in logic.** The original system runs the schedule and the
  reconfigurations from processor software. Here the decisions are made in
  `area_scheduler`, and only the bitstream copy is left to the processor.
* **Only the scheduler is triplicated.** The original system places the
  control part in a triple-modular-redundant (TMR) region. Here the scheduler
  runs as three voted copies (`area_scheduler_tmr`, `tmr_voter`), and
  `tmr_mismatch` reports a masked upset. The Gold circuit and the harness are
  not triplicated. A copy that has gone out of step is not brought back until
  reset.
* **Invented details.**
  * The operator output registers follow from the two delay registers of the
    datapath drawing.
  * Own choices: the area weights, the scrub-then-resume rule, the register
    map, the RAM depth (16,384 words each), the ICAP hand-over rule and the
    interrupt events. Four event outputs are provided; the original has five
    interrupt lines whose events are not specified.
* **The partition model.** It holds all four operators at once (see above). Its
  synthesized area is therefore larger than that of the real slot.
* **Not built.** The fully duplicated (DMR) version and the blind,
  uniform-round-robin and on-demand scrubbing schemes were used only for
  comparison and are not built.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/seu_pkg.sv tb/tb_seu_framework_top.sv --top-module tb_seu_framework_top
    ./obj_dir/Vtb_seu_framework_top

Testbenches:

* Unit tests: `tb_op_cmul`, `tb_op_cadd`, `tb_op_mul`, `tb_poly_baseline`,
  `tb_rp_checker`, `tb_bram_sdp`, `tb_icap_mux`, `tb_tmr_voter`.
* `tb_area_scheduler_tmr` knocks one of the three scheduler copies out of
  step during the run. The voted outputs must not change.
* `tb_poly_reconfig` forces a wrong result onto one operator. Detection must
  happen exactly when that operator is the one being checked.
* `tb_area_scheduler` checks the cyclic order, exact check times and
  scrub-and-resume, using a model of the reconfiguration engine.
* `tb_user_ip` drives the harness over AXI4-Lite. It checks stored results
  against F(x), the pause, the counters and the interrupts.
* `tb_seu_framework_top` is an end-to-end run at default sizes:
  * the processor, SEM core and HWICAP are modelled;
  * 14 upsets, picked with probability proportional to operator area,
    including latent ones and one in the checker itself;
  * one upset in a scheduler copy;
  * full-size bitstreams are streamed through the ICAP multiplexer;
  * every mechanism must occur at least once.
* `tb_rate_sweep` sweeps the ratio of partition-reconfiguration rate to SEU
  rate from 1/16 to 16. SEU arrivals are exponential, with a mean of
  200,000 cycles; 40 upsets per point. About 75 M cycles; under a minute.

The processor model writes one bitstream word per clock cycle. A real HWICAP
driven by software is much slower: a full scrub takes on the order of
milliseconds. The test timing is therefore scaled, not realistic.

Faults are modelled as a stuck result word on one operator, applied with
`force`. A scrub releases all of them. Loading an operator into the partition
repairs a fault in the partition.

Output of `tb_rate_sweep` (40 upsets per point, so expect noise of a few
hundredths):

| reconfig/SEU rate | 1/16 | 1/8 | 1/4 | 1/2 | 1 | 2 | 4 | 8 | 16 |
|---|---|---|---|---|---|---|---|---|---|
| availability | 0.59 | 0.64 | 0.55 | 0.67 | 0.81 | 0.87 | 0.89 | 0.93 | 0.95 |
| partition loads | 3 | 3 | 7 | 19 | 37 | 85 | 183 | 343 | 624 |
| scrubs | 26 | 26 | 25 | 23 | 34 | 35 | 34 | 37 | 39 |
| bitstream bytes (k) | 475 | 475 | 478 | 507 | 796 | 1068 | 1569 | 2470 | 3993 |

At low rates the slot sits in the multiplier for a long time. Upsets there,
about three quarters of all, are caught at once. Upsets elsewhere wait for
the next round. At high rates availability is bought with bitstream traffic.
Most of that traffic is partition loads (5,296 bytes each), not scrubs
(17,651 bytes each).

The trend is the expected one: the more often the slot moves, the sooner a
latent upset is found. These numbers come from a time-scaled model with a
simple fault model. They are not a prediction for a real device.

## Files

| file | module |
|---|---|
| `rtl/seu_pkg.sv` | widths, operator enum, coefficients, area weights, bitstream sizes |
| `rtl/op_cmul.sv`, `rtl/op_cadd.sv`, `rtl/op_mul.sv` | registered operators |
| `rtl/poly_baseline.sv` | F(x) pipeline (also the Gold reference) |
| `rtl/rp_checker.sv` | checker partition model |
| `rtl/poly_reconfig.sv` | partially duplicated circuit |
| `rtl/area_scheduler.sv` | area-driven schedule |
| `rtl/area_scheduler_tmr.sv`, `rtl/tmr_voter.sv` | scheduler in triple modular redundancy |
| `rtl/bram_sdp.sv` | block RAM |
| `rtl/user_ip.sv` | test harness with AXI4-Lite registers |
| `rtl/icap_mux.sv` | configuration-port sharing |
| `rtl/seu_framework_top.sv` | top level |
