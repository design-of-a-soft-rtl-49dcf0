# Lockstep soft-error detector with RESO fault location for a pair of PicoBlaze cores

A soft error (single-event upset) in an SRAM-based FPGA can silently change
what a soft-core processor computes. This design protects an 8-bit KCPSM3
(PicoBlaze) core by running two copies in lockstep. It combines two checks:

* **Duplication with comparison (DWC).** Both cores get the same input and
  run the same program. A comparator checks their results. If they differ,
  one core is faulty, but DWC alone cannot say which.
* **Recomputing with shifted operands (RESO).** Each core also processes its
  input shifted left by one bit. When the result is shifted right again it
  should equal the result from the unshifted input. A fault in the core's
  logic or configuration usually hits different bit positions in the two
  computations, so the two results disagree. The core whose results disagree
  is the faulty one.

When the duplicated results disagree, the detector holds its output register
for one clock and reads the two RESO checks. It then connects the fault-free
core to the output and reports the faulty core to a reconfiguration engine
for repair. Fault-free operation costs no clocks, and locating a fault costs
exactly one.

## Structure

```
                din ──┬───────────────────────────────┐
                      ▼                               ▼
             core_io_ports u_io1              core_io_ports u_io2
       (port 00: din, port 01: din<<1)   (same, for core 2)
             ▲ KCPSM3 bus │ q_act/q_shf       ▲ KCPSM3 bus │ q_act/q_shf
   core 1 ───┘            │              core 2┘           │
   (external)             │              (external)        │
          ┌───────────────┼───────────────┬────────────────┤
          ▼               ▼               ▼                ▼
   reso_checker u_chk1  comparator u_cmp_dwc  core_mux u_mux   reso_checker u_chk2
   (q_shf>>1 == q_act)  (act1 == act2)        (act1 / act2)    (q_shf>>1 == q_act)
          │ out2          │ out1               │               │ out3
          └───────────────┴──────► dwc_ced_ctrl u_ctrl ◄───────┘
                                   (output register, hold, select)
                                          │
                         out4, sel, faulty, recover_req, unresolved
```

| Module | Role |
|---|---|
| `reso_pkg` | Data width (8), shift distance (1), I/O port numbers, core-select and controller-state enums, and the KCPSM3 bus struct |
| `reso_lockstep_top` | The complete detector. The two cores and the reconfiguration engine connect to its ports |
| `core_io_ports` | One core's I/O: a registered input mux serving the input and the shifted input, plus the two result registers |
| `comparator` | Equality comparator. High = equal, low = mismatch |
| `reso_checker` | Right shift by 1 (RESO decoder) followed by a comparator |
| `core_mux` | Chooses which core's actual result goes to the output |
| `dwc_ced_ctrl` | Output register, one-clock hold, faulty-core decision, repair handshake |

The cores themselves are not in this RTL. They are the vendor's KCPSM3
macro, used unchanged. The top exposes each core's `port_id`, `out_port`,
`write_strobe` and `read_strobe` as a `kcpsm_bus_t` input, and drives the
core's `in_port`.

## The program contract

The detector does not look inside the cores. It relies on the program they
run, which must do the following in every iteration:

1. `INPUT sA, 00`: read the system input.
2. `INPUT sB, 01`: read the system input shifted left by 1, with zero fill
   and the top bit dropped.
3. Compute the same function on both values.
4. `OUTPUT sA, 00`: write the result from the actual input.
5. `OUTPUT sB, 01`: write the result from the shifted input. This write must
   come last.

`core_io_ports` holds the port-00 result in a staging register. The port-01
write then updates both result registers (`q_act`, `q_shf`) in the same
clock and pulses `pair_stb`. The comparators are combinational and watch
these registers. Because both registers change together, the comparators
never see a new actual result next to an old shifted one.

RESO works only for computations that commute with a left shift, such as
copying, AND/OR/XOR, addition, subtraction and multiplication by a constant.
A right shift or a comparison does not commute. There is a second limit:
the shifted result is only 8 bits wide. A fault-free core therefore passes
its self-check only if its result is below 128; otherwise the bit shifted
out is lost. The DWC comparator is unaffected by this. But if such a value
meets a real fault, both RESO checks may fail, and the controller reports
the mismatch as unresolved (see below).

## Locating the fault: timing

The controller (`dwc_ced_ctrl`) has three states:

| State | Output register | Selected core | Leaves on |
|---|---|---|---|
| `ST_MONITOR` | loads every clock | core 1 | a mismatch in a new result pair |
| `ST_ISOLATED` | loads every clock | the fault-free core | `reconfig_done` |
| `ST_UNRESOLVED` | loads every clock | core 1, alarm raised | `reconfig_done` |

Take a pair that arrives in clock *t*, so `pair_stb` is high in *t*:

* Fault free (`out1` = 1). `out4` shows the new result after the edge that
  ends clock *t*.
* Mismatch (`out1` = 0) while monitoring. `hold` is high in clock *t*. The
  edge that ends *t* leaves `out4` unchanged. The same edge records the
  decision from `out2`/`out3`:
  * `out2` = 1, `out3` = 0: core 2 is faulty and core 1 stays on the output.
  * `out2` = 0, `out3` = 1: core 1 is faulty and core 2 is switched to the
    output.
  * Both checks equal: the faulty core cannot be told. Core 1 stays on the
    output and `unresolved` is set.

  The next edge loads the selected core's result into `out4`. The result
  therefore arrives one clock late, once per fault.
* After a fault has been reported, further mismatches are expected and are
  ignored. `faulty` (bit 0 = core 1, bit 1 = core 2) and `recover_req` stay
  set until the reconfiguration engine pulses `reconfig_done`. The detector
  then returns to monitoring with core 1 selected.

A mismatch is judged only in the clock where a new pair arrives (`eval`,
which is `pair_stb` of either core). The result registers change only at
that point, so this sees the same data as comparing on every clock, with one
exception: right after a repair, the stale pair that caused the report is
still in the registers, and it must not trigger the report again.

The comparator sits in the path that enables the output register. The
clock period therefore grows by one comparator delay. That is the only cost
of the scheme in fault-free operation.

Assertions in `dwc_ced_ctrl` check three rules. An isolated fault names
exactly one core. That core is never the selected one. A hold lasts one
clock unless a repair happens in the same clock.

## Signals of `reso_lockstep_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset that clears all registers and selects core 1 |
| `din` | in | 8 | System input, given to both cores |
| `core1_bus`, `core2_bus` | in | `kcpsm_bus_t` | The cores' `port_id`, `out_port`, `write_strobe`, `read_strobe` |
| `core1_in_port`, `core2_in_port` | out | 8 | To the cores' `in_port` (registered) |
| `out1` | out | 1 | 1 when the cores' actual results agree, 0 on a mismatch |
| `out2`, `out3` | out | 1 | 1 when core 1 / core 2 passes its RESO self-check |
| `out4` | out | 8 | System output (registered) |
| `sel` | out | 1 | Core driving `out4` (`CORE1` = 0, `CORE2` = 1) |
| `faulty` | out | 2 | Located faulty core: bit 0 = core 1, bit 1 = core 2. When unresolved, the cores whose RESO check failed (possibly none) |
| `recover_req` | out | 1 | A fault was reported and a repair is needed |
| `unresolved` | out | 1 | Mismatch seen but the faulty core could not be told |
| `reconfig_done` | in | 1 | One-clock pulse from the reconfiguration engine when the repair is done |
| `hold` | out | 1 | `out4` is held at this clock edge |
| `core1_pair_stb`, `core2_pair_stb` | out | 1 | A core has just written a result pair |

`out1`..`out3` are combinational from the result registers. Everything else
is registered.

## What is specified and what is chosen here

The following come from the design description:

* The two cores with shared input.
* The left shift of the input by one bit, and the right shift of the shifted
  result.
* The three comparators and their polarity (low = mismatch or faulty core).
* The multiplexer, with core 1 as the primary output.
* The one-clock hold on a mismatch.
* Keeping the fault-free core on the output until reconfiguration.

The following are this design's own choices:

* The I/O port numbers and the paired update of the result registers.
* The registered input mux.
* Handling of the case where both checks pass or both fail.
* The `reconfig_done` handshake and the `eval` qualifier.
* The reset behaviour.

The description leaves the cores' program open. Both results are computed
in every iteration, rather than only after a mismatch, so they are already
available when a mismatch has to be resolved.

Not included:

* **The KCPSM3 cores** (vendor IP).
* **The configuration engine** that repairs a faulty core (FPGA partial
  reconfiguration). Its interface is the `faulty`, `recover_req` and
  `reconfig_done` ports.

## Testbenches and simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `comparator_tb` | Equal words, every single-bit difference, random pairs |
| `reso_checker_tb` | All fault-free inputs (pass below 128), single stuck bits, random pairs |
| `core_mux_tb` | Random selection and data |
| `core_io_ports_tb` | Input mux for ports 00, 01 and others; staged pair update; ignored writes; `pair_stb` width |
| `dwc_ced_ctrl_tb` | Against a reference model: output latency, single hold, core-1/core-2/unresolved decisions, stale mismatches, repair, random sequences |
| `reso_lockstep_top_tb` | End to end, with two core models (see below) |

`tb/kcpsm3_model.sv` is a behavioural stand-in for a KCPSM3 core running the
program above:

* It has the real core's I/O ports and two-clock instruction timing.
* The compute step is either a copy or a doubling, chosen at run time.
* A soft error is injected as stuck bits on its ALU result.

`reso_lockstep_top_tb` uses two of these models and runs the following
cases:

* The reference case: input 3, core 2 with bit 0 stuck at 0. Core 1
  produces 3 and 6, and core 2 produces 2 and 6. This gives `out1` = 0,
  `out2` = 1, `out3` = 0 and `out4` = 3.
* A core-1 fault, which switches core 2 to the output.
* A double fault, which is reported as unresolved.
* About 400 random iterations with random single faults and repairs.

Each pair is checked against results computed in the testbench. The
testbench counts fault-free pairs, mismatches, holds, isolations of each
core, unresolved reports and repairs, and fails if any of them never occurs.
It runs the top at its default parameters.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/reso_pkg.sv \
    tb/reso_lockstep_top_tb.sv --top-module reso_lockstep_top_tb
./obj_dir/Vreso_lockstep_top_tb
```

Replace the testbench name to run another one. Each finishes in well under
a second.

## Changing the design

* **Shift distance.** `SHIFT_K` in `reso_pkg` sets it everywhere. A larger
  shift moves the error to more distant bit positions. It also lowers the
  largest result that passes the self-check to below 2^(8−K).
* **Data width.** `DATA_W` sizes the comparators, checkers, mux and output
  register. It must stay 8 while the cores are KCPSM3s, because their I/O
  bus and `core_io_ports` are 8 bits wide. The leaf modules take their own
  `W` parameter and can be reused at other widths.
* **Primary core.** Core 1 is the default. It is selected again after reset
  and after every repair.
