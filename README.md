# IEEE P1687 test access for 3D die stacks and passive interposers

A 3D integrated circuit has to be tested several times: each die alone on the
wafer (pre-bond), partial stacks (mid-bond), and the finished part (post-bond).
Every one of these tests should use the same test port, the same instruments
and the same test patterns. This RTL implements the test-access architectures
of "3D Design For Test Architectures Based on IEEE P1687". It is built on two
ideas:

* **Automatic die detection.** Each die has a small detector on a dedicated
  TSV toward the die below and another toward the die above. Once bonded, a
  die takes its JTAG inputs from the die below instead of from its own probe
  pads. It also returns the TDO of the die above instead of its own. The same
  silicon is therefore tested through its own pads before bonding and through
  the stack afterwards, with nothing to configure.
* **IEEE P1687 (IJTAG) instrument networks.** The instruments of a die
  (BIST engines, wrapped cores and so on) sit behind Segment Insertion Bits
  (SIBs). A SIB splices its test data register (TDR) into the scan path only
  when it is opened. One JTAG instruction, *Gateway*, selects the network.
  Which instruments are reachable then depends only on the data shifted in.

The design has two independent systems, side by side in `p1687_3d_top`:

1. **A three-die TSV stack** (`stack3d`). It follows the third, "merged"
   architecture: every die has its own TAP, and a multiplexer chooses between
   two test paths. On the *JTAG path* the TAPs are daisy-chained and each TAP
   drives its own network. On the *P1687 path* only the bottom TAP is used,
   and it drives the networks of all dies as one chain. These two settings
   reproduce the first architecture (one TAP for the whole stack) and the
   second architecture (separate JTAG dies).
2. **A passive-interposer system** (`interposer_sys`) with three dies side
   by side. Die 0 carries the JTAG and P1687 logic. Die 1 has only static
   test pins (start, enable, result). Die 2 has an IEEE 1500 wrapper. Die 0
   reaches both through two SIBs and two purpose-built TDRs.

## The stack: where a die's JTAG signals come from

Each die (`stack_die`) has two die detectors (`die_detector`, behavioural).
A detector reads 1 when the die on the other side of its TSV drives the TSV
high. When no die is there, a pull-down makes the TSV read 0. The detector
outputs steer `die_jtag_mux`:

| detected          | TRSTn, TCK, TMS, TDI come from | the die's TDO (pad and TSV down) is |
|-------------------|--------------------------------|-------------------------------------|
| nothing           | own probe pads                 | own TDO                             |
| die below only    | TSVs from the die below        | own TDO                             |
| die above         | (as above)                     | TDO coming down from the die above  |

TRSTn, TCK and TMS are passed straight up to the next die, so every die sees
the same control signals. In `stack3d`, the input `bonded[k]` says that die k
sits on die k-1. It drives the detection TSVs between those two dies. The
assembly stages are then:

* `bonded = 2'b00`: pre-bond. Each die answers on its own pads.
* `bonded = 2'b01`: mid-bond. Dies 0 and 1 are chained behind die 0's pads.
  Die 2 is still alone.
* `bonded = 2'b11`: post-bond. All three dies are reached from die 0's pads.

## The two test paths of the stack

This is the least obvious part of the design. The shared TDI-TDO wires carry
different chains depending on the active path.

**Selecting the path.** The bottom die's TAP has a one-bit data register,
PATHSEL (opcode `0101`). A die with no die below (the head of the stack) uses
its own PATHSEL. Every other die uses the path bit received on a TSV from the
die below and passes it up. Setting PATHSEL in the bottom die therefore
switches the whole stack in one DR scan. PATHSEL clears in Test-Logic-Reset,
so the stack always starts on the JTAG path.

**JTAG path (PATHSEL = 0).** The TDI of each die feeds its TAP. The TAP's
TDO goes up as the next die's TDI, and the top die's TDO comes back down.
With N dies bonded:

* An IR scan is 4·N bits long. The top die's IR is nearest TDO: the first
  bits shifted in end up there, and its captured bits come out first.
* Gateway in a die selects that die's network. Bypass and the boundary-scan
  registers are the usual 1149.1 registers.
* Each die is independent, so instructions can differ per die. EXTEST in
  adjacent dies tests the TSVs between them.

**P1687 path (PATHSEL = 1).** Only the bottom TAP is active. Every other die
does three things:

* it takes the network control bundle (`net_ctrl_t`: reset, select, capture,
  shift, update) from the TSVs below and passes it up;
* it sends its network's scan output up as the next die's TDI;
* it returns its network output, or the return from above, as its TDO.

The upper dies' TAPs are held in reset. Their IRs then stay at BYPASS
instead of loading random bits as network data passes through them.

The bottom TAP's Gateway register is the concatenation of the networks:
die 0, then die 1, then die 2, then back down into die 0's TDO stage. An IR
scan is now only 4 bits. One Gateway instruction reaches all nine
instruments, and with every SIB closed the DR path is 3·3 = 9 bits long.

Switching back takes an IR scan of PATHSEL into the bottom TAP (4 bits) and a
one-bit DR scan of 0.

**What the switch saves.** Only instruction setup is cheaper: the data
registers are the same length on both paths. With three dies:

* On the JTAG path, an IR scan costs 18 TCK cycles from Run-Test/Idle back
  to Run-Test/Idle.
* On the P1687 path, it costs 10.
* Switching to the P1687 path costs 26 cycles once: a 12-bit IR scan and a
  3-bit DR scan through PATHSEL and two bypass bits.

The end-to-end testbench checks both IR scan costs.

## Instrument networks: SIBs and TDRs

`p1687_network` chains `NUM_SEG` segments (three per die, as drawn in the
original figures). Each segment is a `sib` with a `tdr` behind it:

```
TDI ─► SIB0 ─► SIB1 ─► SIB2 ─► TDO        (all closed: 3 bits)
        ▲        ▲        ▲
       TDR0     TDR1     TDR2              (open SIB k: TDR k, 8 bits, sits in front of SIB k)
```

Each SIB's bit is written in Update-DR. Opening SIB k adds `TDR_W` bits to the
path from the next scan on. A Capture-DR reads back each SIB's state and each
open TDR's status word (`inst_status`). An Update-DR writes the open TDRs'
control words (`inst_ctrl`).

A typical session therefore has three scans:

1. Shift `111` to open all SIBs.
2. Shift 27 bits to write three control words and read three status words.
3. Shift 27 bits with 0 in the three SIB positions, to close the SIBs again.

The test package `tb/p1687_tb_pkg.sv` builds these vectors. Bit 0 of a vector
is shifted first and lands at the far end: the last SIB, then that SIB's TDR
LSB first, then the SIB before it, and so on.

The instruments themselves are not part of this RTL. Their control and
status words are ports of the top.

## Boundary scan and the inter-die TSV test

Each stack die has boundary-scan cells (`boundary_scan_register`) on
`N_TSV` functional TSVs coming in from below and `N_TSV` going up. The chain
runs from the input cells to the output cells. The last output cell is
nearest TDO.

* **EXTEST**: the output cells drive the upward TSVs, and the die above
  captures them on its input cells.
* **INTEST**: the input cells drive the die's core.

To test a TSV bundle, put both dies in EXTEST. Load a pattern into the lower
die's output cells, then capture and read the upper die's input cells.
`stack3d_tb` and `p1687_3d_top_tb` do this between dies 0→1 and 1→2.

## The passive-interposer system

Die 0 (`interposer_die0`) has a TAP, boundary cells on its own logic, and a
two-SIB network:

```
TDI ─► SIB_top ─► SIB_right ─► TDO
          ▲            ▲
   [Top_die TDR]  [right_die TDR]
```

**right_die TDR** (`right_die_tdr`, 2 bits) is the Type-A access to Die 1.
Bit 0 drives Tst Start and captures Tst Result. Bit 1 drives Tst Enable and
reads back its own value. To run a test:

1. Scan with Enable set.
2. Scan with Start set.
3. Wait for the self test.
4. Scan again: the captured bit 0 is the result.

**Top_die TDR** (`top_die_tdr`) is the Type-C access to Die 2's IEEE 1500
wrapper. The segment is one local bit, SelectWIR, followed by the wrapper's
own serial path: TDI side → SelectWIR → WSI … WSO → SIB. The wrapper runs
directly on the network signals:

* WRCK is TCK and WRSTn is the network reset.
* ShiftWR, CaptureWR and UpdateWR are the network's Shift, Capture and Update
  strobes, gated by the segment select.

SelectWIR takes its new value at Update-DR, like any TDR bit. Loading a
wrapper instruction therefore takes one scan that sets SelectWIR (through
the old data register) and one scan through the 3-bit WIR that clears it
again. The exact bit sequences for the behavioural wrapper are in
`tb/interposer_die0_tb.sv`. For example, with both SIBs open and SelectWIR
set, the path is 1 + 2 + 1 + 1 + 3 = 8 bits long: two SIBs, the right_die
TDR, SelectWIR and the 3-bit WIR. With SelectWIR clear and the wrapper's
8-bit data register selected, it is 13 bits.

Die 1 and Die 2 keep probe pads for tests before mounting.
`test_port_mux` gives each of them its test inputs from the pads or from the
interposer, steered by a die detector. Die 0 does the same for its JTAG
pins. The `*_mounted` inputs of `interposer_sys` stand for the assembly
state.

## Instructions

| opcode | name    | register selected                      |
|--------|---------|----------------------------------------|
| 0000   | EXTEST  | boundary scan, drives the output pins  |
| 0010   | INTEST  | boundary scan, drives the core inputs  |
| 0100   | GATEWAY | the P1687 network (the whole stack's networks on the P1687 path) |
| 0101   | PATHSEL | 1-bit path register (used in the bottom die) |
| 1111   | BYPASS  | 1-bit bypass; all unlisted opcodes act as BYPASS |

The IR is 4 bits, captures `0001` and resets to BYPASS. There is no IDCODE
register.

## Timing

Everything is on TCK and follows IEEE 1149.1:

* The TAP state, capture and shift happen on the rising edge.
* Update registers (IR, SIB bits, TDR control words, boundary cells,
  PATHSEL) load on the falling edge in Update-IR or Update-DR.
* TDO is re-timed on the falling edge, so the next TAP in a chain samples it
  safely.
* The network reset is a registered "not in Test-Logic-Reset" signal, also
  updated on the falling edge. TRSTn clears it at once.
* Scan costs: an IR scan of n bits takes n + 6 TCK cycles from Run-Test/Idle
  back to Run-Test/Idle, and a DR scan takes n + 5. The testbenches check
  both.

The die detectors, the pad/TSV multiplexers and the path multiplexer are
combinational. TCK itself passes through the multiplexers.

## Files

| file | contents |
|------|----------|
| `rtl/p1687_pkg.sv` | TAP states, opcodes, `net_ctrl_t`, `wsp_t` |
| `rtl/tap_controller.sv`, `jtag_ir.sv`, `jtag_tap.sv` | the JTAG logic of a die |
| `rtl/sib.sv`, `tdr.sv`, `p1687_network.sv` | P1687 network |
| `rtl/boundary_scan_register.sv` | boundary-scan cells |
| `rtl/die_detector.sv` | behavioural model of the analog detector cell |
| `rtl/die_jtag_mux.sv`, `p1687_path_mux.sv` | die-detection multiplexers, two-path multiplexer |
| `rtl/stack_die.sv`, `stack3d.sv` | one stack die, the stack |
| `rtl/right_die_tdr.sv`, `top_die_tdr.sv`, `test_port_mux.sv`, `interposer_die0.sv`, `interposer_sys.sv` | interposer system |
| `rtl/p1687_3d_top.sv` | both systems |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/jtag_if.sv`, `tb/p1687_tb_pkg.sv` | JTAG driver, scan-vector helpers |
| `tb/die1_bist_model.sv`, `tb/wrapper1500_model.sv` | behavioural models of Die 1 and Die 2 |

## Simulating

Any testbench runs with plain Verilator 5, from the folder holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/p1687_pkg.sv tb/p1687_tb_pkg.sv tb/p1687_3d_top_tb.sv --top-module p1687_3d_top_tb
./obj_dir/Vp1687_3d_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M`. `p1687_3d_top_tb` runs
the whole design at its default sizes in about a second. It also prints how
often each mechanism occurred: pre-, mid- and post-bond test; pad→TSV
switching; TDO from above; both paths and the switch between them; the TAP
hold; SIB open and close; the EXTEST TSV test; INTEST; BYPASS; and the
Type-A and Type-C accesses. A mechanism that never occurs counts as a
failure. The simulator is two-state: testbenches pulse TRSTn before use.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `NUM_DIES` | 3 | the stack drawn in the original figures |
| `NUM_SEG` | 3 | three SIB/TDR segments per die, as drawn |
| `TDR_W` | 8 | this design's choice |
| `N_TSV` | 4 | functional TSVs per direction per die, this design's choice |
| `N_BSC` | 4 | boundary cells on Die 0's own logic, this design's choice |

## How far this follows the original architecture

Taken from the original:

* the three-dies-by-three-instruments structure of the stack;
* die detection with a pull-down micro-buffer, pads versus TSVs, and TDO
  from the current or upper die;
* shared TRSTn, TCK and TMS, with TDI and TDO daisy-chained;
* the two test paths sharing TDI-TDO while the control signals are
  multiplexed;
* EXTEST, INTEST and Gateway;
* the interposer case: Die 0 with two SIBs, a TDR for Die 1's three static
  signals, and a TDR for Die 2's 1500 wrapper, with the signal names of its
  figure.

The original describes these parts at block-diagram level. The following are
this design's own choices:

* the opcodes and IR width;
* the PATHSEL register, and the TSV that carries the path bit up the stack;
* holding the upper TAPs in reset on the P1687 path;
* the SIB structure and the flat chain order;
* TDR widths and bit assignments;
* the boundary-cell counts and the presence of cells on every stack die;
* the SIB order in Die 0 (read left to right from the figure);
* the SelectWIR bit and the way WSP strobes are derived;
* the use of detectors to steer the interposer test-port multiplexers;
* all reset behaviour.

Not built:

* **The embedded instruments, Die 1's self test, Die 2's core and wrapper,
  and Die 0's functional logic.** These are only named. Their interfaces are
  ports, and the testbenches use behavioural models.
* **TSVs and the interposer.** These are passive wires.
* **The ICL/PDL tool flow.** This is software.

The first architecture's limitation — no TSV test, because only the bottom
die has boundary cells — is not reproduced. The stack here always has cells
on every die.

The detector is an analog cell. `die_detector.sv` is a behavioural model
with a delay, not synthesizable logic. A floating TSV cannot be shown in two
states, so it is modelled with two inputs: *driven* and *level*.

Every module has been linted with Verilator (`-Wall`) and elaborated by
Yosys with the slang front end. Every testbench passes, and each one fails
against a deliberately broken copy of its module. No gate-level or timing
analysis has been done. Two lint warnings remain by design:

* `SYNCASYNCNET`: the network reset travels in the same struct as the
  synchronous strobes.
* `UNUSEDSIGNAL`: the top die's upward TSV outputs have nothing to connect
  to.
