# REBEL: measuring path delays with the scan chain

REBEL (regional delay behaviour) is an embedded test structure. It measures the
delay of individual combinational paths inside a real logic macro. It adds no
ring oscillators and no time-to-digital converters. It reuses the pipeline
registers that already exist as LSSD scan flip-flops.

The idea: pick one flip-flop in a capture register as the **insertion point**.
Then turn it and every flip-flop to its right into a **delay chain**, so that
each master latch passes its input on to the next master latch. Raise the
system clock `Clk`. The launch register sends a transition into the logic. The
transition comes out of the path-under-test, enters the insertion point, and
runs along the chain, one element delay per flip-flop. Lower `Clk` after an
interval Δt, the **launch-capture interval (LCI)**. The chain freezes. Scan it
out, and you have a *digital snapshot*: how far the edge got. This also shows
any glitch that travelled ahead of it.

    T_path = T_lc - T_dc

Here `T_lc` is the LCI and `T_dc` is the delay through the chain elements the
edge passed. Repeat the test with a sweep of LCIs ("clock strobing"). The
snapshots then bracket the path delay to within one LCI step. This works even
for paths shorter than the smallest usable LCI, so no faster-than-at-speed
clocking is needed.

This repository has the SystemVerilog of the on-chip part. That is the REBEL
scan cells, their clock front end, the row control logic, the rows, and a top
level with 28 rows. The rows sit in the six pipeline-register stages P0..P5
of a five-stage pipelined macro (a floating-point unit in the reference
chip). The macro's own logic is not included. It connects through ports.

## Hierarchy

    rebel_fpu_top            28 rows on one scan chain, si -> P0 .. P5 -> so
      rebel_row  (x28)       one REBEL row RRx, 32 cells
        rebel_rcl            row control logic: configuration + decode
        rebel_front_end (x32) clock front end of one cell
        rebel_scan_cell (x32) clocked-LSSD scan flip-flop with chain port
    rebel_pkg                constants, cell_ctrl_t, latch_en_t, row_stage()

## The scan cell and how the chain is formed

Each cell is a master latch L1 and a slave latch L2 (`rebel_scan_cell`). L1
has three write ports. Each port has its own enable, and at most one enable
is open at a time:

| port   | enable | L1 takes                                              |
|--------|--------|-------------------------------------------------------|
| scan   | `a_en` | `si`, the previous cell's L2                          |
| system | `c_en` | `d`, the macro output                                 |
| REBEL  | `r_en` | `d` at the insertion point, else `ci`, the previous cell's L1 |

L2 copies L1 while `l2_en` is high. It drives `q` (the next logic stage) and
`so`.

The chain runs **master to master** (`co` -> next `ci`). This has two effects:

* REBEL adds only one fanout load to the master latch.
* The slave latches, which feed the next logic stage, stay quiet while an
  edge runs along the chain.

Separate ports per latch avoid a data-mux race. When an enable closes, the
data of its port is stable, because another port's select never switches at
that moment.

`co` is `L1` delayed by `FLUSH_DELAY_PS`. This is a simulation-only
annotation of one element's propagation delay. Synthesis ignores it. The
default of 450 ps is typical of the flip-flop delays measured on the
reference 90-nm chip (about 416 to 483 ps in the calibration window).
Without it, a zero-delay simulation would flush the whole chain at once.

## Clocking: the front end

`rebel_front_end` derives the four enables of each cell from `Clk`,
`scan_en`, the LSSD scan clocks A and B, and the cell's control:

| cell kind                 | `a_en` | `c_en`                  | `r_en`     | `l2_en`           |
|---------------------------|--------|-------------------------|------------|-------------------|
| functional                | A      | `!Clk & !scan_en`       | 0          | `B \| Clk`        |
| delay chain (`rebel = 1`) | A      | 0                       | `Clk`      | `B`               |

A functional cell is a rising-edge flip-flop. A chain cell is transparent for
exactly the time `Clk` is high. A and B must never overlap, and an immediate
assertion checks this. Which cells are chain cells is decided by the row
control logic.

## Row control logic and configuration

Each row begins with a 6-bit configuration register (`rebel_rcl`). It uses
LSSD latches that only A and B can write, so `Clk` never disturbs it.

* element 0 is `rebel_mode`
* elements 1..5 hold `ins_pt`, the insertion index, LSB first

In REBEL mode, cell `ins_pt` is the insertion point. It and every cell with a
higher index form the chain. Cells to its left stay functional: they still
launch. In functional mode the whole row is an ordinary pipeline register.

A test configuration is nothing more than these bits, scanned in together
with the pattern. The reference test plan uses four configurations:

* **Cfg1/Cfg2**: stages P2, P4 and P5 in REBEL mode; P0, P1 and P3 functional.
* **Cfg3/Cfg4**: stages P1, P3 and P5 in REBEL mode; P0, P2 and P4 functional.

## One measurement, step by step

The scan chain order is `si` -> row 0 (configuration, then cells 0..31) ->
row 1 -> ... -> row 27 -> `so`. That is 28 x 38 = 1064 bits.

1. **Load.** With `scan_en = 1` and `Clk = 0`, shift the configuration and
   pattern in: for each bit, drive `si`, pulse A, then pulse B. The first
   bit shifted ends up last in the chain.
2. **Prepare the launch.**
   * *Launch-off-shift*: keep `scan_en = 1` and give one more A pulse with
     no B. `Clk` then completes that one-bit shift.
   * *Launch-off-capture*: set `scan_en = 0`. The functional master latches
     follow the logic outputs, and `Clk` captures them.
3. **Launch-capture interval.** Raise `Clk`: functional rows launch, and the
   chains open. Lower `Clk` one LCI later: the chains freeze.
4. **Read out.** Set `scan_en = 1` and pulse B once. This copies the frozen
   master latches into the slaves. Then shift out with A/B pulses.

A chain cell `k + m` (insertion point `k`) ends up holding the insertion
input as it was `m` element delays before `Clk` fell. That holds if the chain
was already open by then. Otherwise the cell keeps what it held before the
launch. The testbench reference model (`tb/rebel_tb_pkg.sv`) uses exactly
this rule.

## Reading a delay out of a sweep

One snapshot says only how many chain cells (`n`) the edge reached. That
gives a bound: `LCI - n·D < T_path < LCI - (n-1)·D`, where `D` is the element
delay. A sweep of LCIs narrows the bound. The reference measurements sweep
159 LCIs from 2745 to 8400 ps.

To read the delay, start at the largest LCI inside a window where the element
delays are steady. The reference window is 4355..5250 ps. Note the last cell
`k+n-1` the edge reached there. Walk back to the first snapshot in which the
edge has not yet entered that cell. That snapshot's LCI, minus `(n-1)·D`, is
the path delay. Walking backwards means that for a glitching path the *last*
transition is the one timed.

In this model the path ends at the insertion cell's input, and every element
delay sits between one master latch and the next. So `T_dc` counts the
elements from the insertion cell up to, but not including, the cell being
entered. The reference calibration subtracts one element fewer. Its path
delay therefore includes the insertion flip-flop itself.

On silicon, `D` is not a constant. It differs from flip-flop to flip-flop,
and it changes with the LCI because of the supply transient caused by the two
clock edges. Each element delay must therefore be calibrated from the
snapshots at the LCI used for the path. That calibration is offline
software. It is not part of this RTL.

## Parameters

| parameter                   | default | origin |
|-----------------------------|---------|--------|
| `NUM_ROWS`                  | 28      | reference chip (RR1..RR28) |
| stages                      | 6 (P0..P5) | reference chip |
| `ROW_WIDTH`                 | 32      | own choice; the reference rows have at least 25 flip-flops |
| `FLUSH_DELAY_PS`            | 450     | typical measured flip-flop delay; simulation only |
| rows per stage              | 5,5,5,5,4,4 | own choice (`rebel_pkg::row_stage`) |

## What follows the reference design and what is this design's own

These follow the reference design:

* 28 rows in stages P0..P5 on one scan chain from SI1.
* LSSD master/slave scan flip-flops.
* The chain formed from the insertion point rightwards, tapped from the
  master latch.
* `Clk` high launches and opens the chain; `Clk` falling freezes it.
* Both launch-off-shift and launch-off-capture.
* The configuration scanned in with the pattern.
* The four stage configurations.

These are this design's own choices:

* The row width.
* The split of rows over stages.
* The gate equations of the front end, including the `scan_en` input.
* The configuration encoding (mode bit + binary index).
* The latch-port structure of the cell.
* The readout order (B first, then A/B).

The LSSD flush-delay principle and the per-cell function are from the
reference. The exact circuits of its row control and front-end logic were not
available, so they are reconstructed here from their function.

## Not included

* The macro under test: the floating-point unit. Its stage logic connects to
  `mut_out` / `mut_in`.
* The off-chip clock source that generates LCIs of programmable width. This
  was an FPGA clock manager with fine phase adjust, whose steps map
  non-linearly onto LCI widths.
* The offline analysis:
  * calibration of per-flip-flop delays against the LCI (the power-supply
    transient makes them vary by up to 2x);
  * reverse parsing of snapshots for glitching paths;
  * regression analysis of within-die variation.

The simulation model has one fixed element delay. It therefore does not
reproduce the LCI-dependent element delays seen in silicon.

## Simulating

Every file starts with `timeunit 1ps`. Each testbench needs the two packages
first. For example:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/rebel_pkg.sv tb/rebel_tb_pkg.sv tb/tb_rebel_row.sv \
      --top tb_rebel_row -o sim && obj_dir/sim

Every testbench prints `TB_RESULT checks=N failures=M`.

| testbench              | what it does |
|------------------------|--------------|
| `tb_rebel_front_end`   | exhaustive enable truth table |
| `tb_rebel_scan_cell`   | all latch ports, hold, one-element chain delay |
| `tb_rebel_rcl`         | 200 random configurations: decode, hold, shift-out order |
| `tb_rebel_row`         | 60 full scan/launch/capture/scan-out tests on a 16-cell row, every bit checked |
| `tb_rebel_lci_sweep`   | 159-LCI clock-strobing sweep of one path (insertion at cell 15 of a 32-cell row); recovers the path delay from the snapshots alone, by bracketing and by the reverse parse over 4355..5250 ps |
| `tb_rebel_fpu_top`     | whole design at default size: Cfg1..Cfg4, four LCIs each, every bit of the 1064-bit chain checked |

The testbenches replace the macro's logic with `tb_mut_model`. Bit `j` of a
stage is the inverted source bit, delayed by `1501 + 110·j` ps. Bit 1
instead produces a 900 ps glitch. The row and top testbenches count each
mechanism and fail if one never happened:

* launch-off-shift and launch-off-capture;
* configuration switches;
* snapshots that caught nothing, a partial edge, a full flush, or a glitch.

The full-size test is slow to compile: Verilator must schedule about 1800
delayed assignments.
