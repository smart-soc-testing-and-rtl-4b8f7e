# On-chip test and trim access through IJTAG, from a tester or from the CPU

Analog blocks in an SoC need trim and configuration values. Digital blocks need test
access. The usual way in is a JTAG port and an IEEE 1687 (IJTAG) scan network behind it.
That network is then only reachable from an external tester. This design adds a second
controller for the same network: a small APB peripheral that the SoC's own CPU can drive.
Firmware can then run self-tests, trims and reconfigurations in the field, with no
instrument-specific hardware.

The example is a comparator-based self-trim. A 10-bit trim value sits in an IJTAG
subnetwork, and a 1-bit comparator result is captured in the same subnetwork. The CPU runs
a binary search over the trim range:

1. Write a candidate value.
2. Commit it to the analog block.
3. Read the comparator.
4. Repeat.

An external tester can do exactly the same through the JTAG pins.

## Overall structure

```
            jtag_tck/tms/tdi ──► tck_edge_detect ──► jtag_module ──► jtag_tdo
                                  (rise/fall            │  TAP, IR, BYPASS, IDCODE
                                   enables)             ├──► boundary_scan_register ◄─► bsc_sys_in/out
                                                        │
 APB slave ─► apb_module (Instruction/Action/Write/Read registers, FSM)
                     │                                  │
                     └───────────► switch ◄─────────────┘   jtag_apb_switch: 1 = APB, 0 = JTAG
                                     │  TAP enables, scan input, IJTAG/SIB/EXCFG selects
                                     ▼
                               ijtag_module  (SIB control register + remote scan muxes)
                         ┌───────────┼────────────────┐
                    subnetwork0  subnetwork1   ijtag_trim_subnetwork (subnetwork 2)
                    (ports)      (ports)        SIB1 ─ TrimValue[10] (config cells) ─ SIB0
                                               ComparatorResult[1] ─┘      │
                                                    ▲ comparator           └► trim_value[9:0]
```

`ijtag_soc_top` wires all of this together. Subnetworks 0 and 1 have unknown contents, so
their interfaces are top-level ports:

- a select and a scan input going out;
- a scan output and an error flag coming back.

Every module shares one clock, `sysclk`, and one asynchronous active-low reset, `sysrst_n`.

## The single clock: TCK as an enable

TCK never clocks a flip-flop. `tck_edge_detect` samples TCK, TMS and TDI through two
synchroniser flops. It then compares successive TCK samples and outputs one-cycle `rise` and
`fall` enables. Everything that IEEE 1149.1 clocks on the TCK rising edge works on `rise`:

- the TAP state machine;
- capture;
- shift.

Everything clocked on the falling edge works on `fall`:

- update;
- the registered TDO.

When the APB module drives the network, each system-clock cycle counts as both edges
(`rise = fall = 1`). The same scan cells then shift at full system-clock speed.

Consequences:

- **Oversampling.** TCK must be oversampled. The enables arrive 2–3 system clocks after a
  TCK edge, and TDO changes about one cycle after `fall`. Each TCK phase must therefore be
  several system clocks long. With two synchroniser stages, TCK needs to be oversampled
  at least 8 times, before any pad and wire delays. The end-to-end testbench mostly runs
  TCK at 1/16 of `sysclk`. It also reads IDCODE and BYPASS at exactly 1/8.
- **Edge outputs.** `jtag_tap_clock_rising/falling` and `ijtag_tap_clock_rising/falling`
  are these enables. They are exported so that external subnetworks can use the same scheme.

## JTAG side (`jtag_module`, `tap_controller`)

The JTAG side follows the IEEE 1149.1 pattern:

- The 16-state TAP controller produces capture/shift/update enables for DR and IR, plus
  Idle, Reset and Pause flags (`jtag_tap_ext`).
- The IR is 8 bits wide.
- The IR's shift stage captures `0000_0001`.
- Test-Logic-Reset loads IDCODE.
- An instruction code that is not listed below selects BYPASS.
- TDO is registered on `fall`.

| Code | Instruction    | Selected register                                       |
|------|----------------|---------------------------------------------------------|
| 1    | IDCODE         | 32-bit IDCODE, value `0x00000083`                       |
| 19   | SAMPLE/PRELOAD | boundary scan register, normal mode                     |
| 18   | EXTEST         | boundary scan register, cells drive `bsc_sys_out`       |
| 255  | BYPASS         | 1-bit bypass                                            |
| 8    | IJTAG          | the IJTAG network data path                             |
| 9    | SIB            | the control register of the remote scan multiplexers    |
| 10   | EXCFG          | the IJTAG network, with configuration commit enabled    |

The boundary scan register has `BSC_LEN` cells (default 8). It stands for whatever border
signals a real chip has.

## CPU side (`apb_module`, `apb2csc_bridge`)

The CPU sees seven 16-bit registers at byte offsets `2*index`. Only `PADDR[3:1]` is decoded.
The CPU builds scan operations from three kinds of write:

| Index | Register    | Access | Meaning                                                     |
|-------|-------------|--------|-------------------------------------------------------------|
| 0     | Instruction | R/W    | own 8-bit IR, written in parallel (same codes as above)      |
| 1     | Action      | W      | bit 0 = capture, bit 1 = update; ORed into a pending set     |
| 2     | WriteF      | W      | shift all 16 bits, bit 0 first                              |
| 3     | WriteP      | W      | shift only the MSB-aligned part (first-zero encoding)       |
| 4     | Read        | R      | bits shifted out by the last write, MSB-aligned             |
| 5     | Control     | R/W    | 1 bit, reserved                                             |
| 6     | Status      | R      | bit 0 = busy                                                |

**First-zero encoding.** To shift `n < 16` bits, put them in bits `15..16-n`. Put a `0` in
bit `15-n` and ones below it. The serialiser still walks all 16 bit positions, one per
cycle. It keeps the shift enable low up to and including the first zero. For example, the
3 bits `100` are written as `0b100_0_111111111111`. Read data comes back aligned the same
way: the `n` bits shifted out sit in the top `n` bits of Read, and the bits below are zero.

**Actions.** Pending actions run update first, then capture, one cycle each. Writing
`Action = 3` therefore ends one scan operation and starts the next, which is the common
case between two back-to-back scans.

**Ordering and stalls.** A three-state machine (Idle, Shift, Actions) runs operations in
the order they were written. An access that would break that order is stalled with PREADY
low; none is refused:

- An Instruction write stalls while actions are pending.
- An Action write stalls while an instruction change is pending.
- WriteF/WriteP stalls while:
  - a previous write is waiting or shifting;
  - actions are pending or running.
- A Read stalls until the current serialisation has finished.
- An instruction written during a shift is held. It is applied when the shift ends, and the
  bus does not stall.

Software can therefore issue its sequence without polling Status. Status is still there
for flow control, and PSLVERR flags both an unmapped index and a wrong-direction access.

A typical CPU scan operation:

```
Instruction = 8              // IJTAG
Action      = 1              // capture
WriteP      = data           // shift n bits
Read        -> result        // stalls until the shift is complete
Action      = 2              // update
```

## The IJTAG network

### Remote scan multiplexers (`ijtag_module`)

Under the SIB instruction the scan path is a 3-bit control register, one bit per
subnetwork. Bit `i` set means two things:

- subnetwork `i` gets its select;
- subnetwork `i` is spliced into the IJTAG data path.

Subnetwork 2 sits nearest to the scan input and subnetwork 0 nearest to the output. The
first bit shifted lands in subnetwork 0's bit. Writing the 3 bits `100` (MSB-aligned, as
above) therefore enables subnetwork 2 alone.

### SIB cells (`sib_cell`)

A SIB is a one-bit register with an update stage. When the update stage is 1, the SIB
includes its hosted segment: its scan input comes from the end of that segment instead of
from the chain. An update opens or closes the SIB. A capture loads its current state, so
it can be read back.

### Configuration cells (`config_register`)

Each trim bit has three stages: shift, update (U) and config (Cfg). Only Cfg drives the
analog block.

- A normal update copies shift → U.
- Under the EXCFG instruction an update copies U → Cfg instead.
- `ijtag_config_lock` blocks both kinds of update.
- When U and Cfg differ while the lock is set, `ijtag_error` is raised.

A new value therefore needs two scan operations: one to write it, one to commit it. In
between, the old value stays live. The error flag catches a value that was written but not
committed, or a bit flip.

### The trim subnetwork (`ijtag_trim_subnetwork`)

Seen from its scan input, the subnetwork holds:

```
si ─► [ComparatorResult] ─► SIB1 ─► [TrimValue 9..0] ─► SIB0 ─► so
         hosted by SIB1 ──┘         hosted by SIB0 ──┘
```

The active path depends on which SIBs are open:

| Open SIB | Path length | Contents                                |
|----------|-------------|-----------------------------------------|
| none     | 2 bits      | SIB1, SIB0                              |
| SIB0     | 12 bits     | SIB1, 10 trim bits, SIB0                |
| SIB1     | 3 bits      | comparator cell, SIB1, SIB0             |

The comparator cell is capture-only. The trim register is a 10-bit `config_register`
whose Cfg stage is the `trim_value` output.

### A complete self-trim step, as firmware does it

All writes below are WriteP (first-zero encoded); "actions" are Action writes.

| Step | Instruction | Data shifted                          | Actions                    |
|------|-------------|---------------------------------------|----------------------------|
| select subnetwork 2 | SIB (9)   | `100`                         | update                     |
| open trim SIB       | IJTAG (8) | `010`                         | update                     |
| write the value     | IJTAG (8) | `0, v[9:0], 0` (12 bits)      | capture before, update after; this also closes SIB0 |
| commit              | EXCFG (10)| `010`, then 12 zeros          | update after each          |
| read the comparator | IJTAG (8) | `100` (open SIB1), then `000` | update; capture; then read bits `[15:13]` = {comparator, 1, 0} and update |

The commit re-opens SIB0 under EXCFG. It then shifts zeros and updates, which moves U to
Cfg and closes the SIB again.

## Where this design makes its own choices

- **Top-level contents.** Subnetwork 2 and the boundary scan register are inside
  `ijtag_soc_top`, so the trim example runs end to end. Their SoC-side signals are ports:
  `trim_value`, `comparator`, `bsc_sys_in/out`. A generated design could equally leave them
  outside.
- **Subnetworks 0 and 1** are not built; only their interfaces exist. The testbench models
  them as 4- and 6-bit shift registers.
- **Analog unit and comparator** are not logic. In the testbench the comparator is the
  expression `trim_value >= 613`.
- **Edge detection and TDO.** The synchroniser has two stages, and TDO is registered on
  `fall`.
- **APB write ordering.** A WriteF/WriteP waits not only for running actions but also for
  merely scheduled ones. A cached write is always served before anything written after it.
  Without this, a sequence such as `capture; write; update` could run the update before the
  shift.
- **Reset values.** Registers reset to zero, so the APB IR selects nothing after reset.
  The U and Cfg stages of the trim register both reset to 0, so no error shows after reset.
- **Extra outputs.** `apb_busy` and the individual JTAG instruction selects are extra
  outputs, provided for observation.

## Files

`rtl/`:

- `ijtag_pkg.sv`: shared types (TAP and TDR interface structs), instruction codes, the
  APB register indices and IDCODE.
- Leaf cells: `tdr_register.sv`, `sib_cell.sv`, `config_register.sv`,
  `boundary_scan_register.sv`.
- Controllers: `tck_edge_detect.sv`, `tap_controller.sv`, `jtag_module.sv`,
  `apb2csc_bridge.sv`, `apb_module.sv`.
- Network: `ijtag_module.sv`, `ijtag_trim_subnetwork.sv`.
- Top level: `ijtag_soc_top.sv`.

`tb/`:

- Each `tb_<module>.sv` is a self-checking testbench. It prints
  `TB_RESULT checks=<n> failures=<m>` and finishes, and a watchdog catches hangs.
- `apb_master.svh` holds the APB read/write tasks. It counts stall cycles.
- `tb_ijtag_soc_top.sv` runs the whole design at its default parameters:
  1. Through the JTAG pins: it reads IDCODE, runs SAMPLE/PRELOAD and EXTEST, and enables
     subnetworks 0 and 1, checking the resulting 10-bit path. It then performs one trim
     step from the tester: it writes a value into subnetwork 2, commits it under EXCFG and
     reads the comparator back.
  2. It switches to APB.
  3. It runs the full 10-step binary-search trim. The search must end bracketing the
     comparator threshold exactly.
  4. It checks the 10-bit path over APB, instruction holding, and the config lock and error.
  5. It counts each mechanism used and fails if any count is zero. The mechanisms are:
     TCK edges, Test-Logic-Reset, Pause-DR, EXTEST, capture, shift, update, EXCFG update,
     update followed by capture, APB stall, held instruction, each subnetwork select, and
     the configuration error.

## Simulating

Everything is plain SystemVerilog-2017 and runs with Verilator 5, for example:

```
verilator --binary --timing -Itb --top-module tb_ijtag_soc_top \
    rtl/ijtag_pkg.sv $(ls rtl/*.sv | grep -v pkg) tb/tb_ijtag_soc_top.sv -o sim
./obj_dir/sim
```

Use the same command with another `tb_<module>` for a single block. The package must come
first. The end-to-end test takes well under a second.

To change the design, start from these places:

- Instruction codes and IDCODE are package constants.
- Widths are parameters: `BSC_LEN`, `TRIM_WIDTH`, the number of subnetworks `N` in
  `ijtag_module`, and `WIDTH` of the cells.
- To add a subnetwork, raise `NUM_SUBNETS` in the package. Then connect its
  `ijtag_tdr_in_t`/`ijtag_tdr_out_t` pair in the top.
