// rebel_pkg: shared constants and types of the REBEL embedded test structure.
//
// REBEL measures path delays inside a pipelined macro by turning the scan
// flip-flops to the right of a chosen "insertion point" into a delay chain
// (LSSD flush-delay style) while the system clock Clk is high, and freezing
// that chain when Clk falls.  The frozen chain is a digital snapshot of how
// far a transition from the path-under-test travelled.
//
// Numbers that follow the reference design: 28 REBEL rows, a five-stage
// pipeline whose pipeline registers form stages P0..P5.  The row width, the
// split of rows over the stages and the layout of the per-row configuration
// are this design's own choices.
package rebel_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Number of REBEL rows (RR1..RR28) in the instrumented macro.
  parameter int unsigned REBEL_NUM_ROWS  = 28;
  // Pipeline-register stages P0..P5 around the five logic stages.
  parameter int unsigned NUM_STAGES = 6;
  // Scan flip-flops per row (own choice; the reference row has at least 25).
  parameter int unsigned REBEL_ROW_WIDTH = 32;
  // Simulation-only propagation delay of one delay-chain element, in ps.
  // Measured flip-flop delays in the reference chip are 416..483 ps.
  parameter int unsigned REBEL_FLUSH_DELAY_PS = 450;

  // Per-cell control produced by the row control logic.
  //   rebel  : the cell is part of the row's delay chain (at or right of the
  //            insertion point of a row in REBEL mode)
  //   insert : the cell is the insertion point; its master latch takes the
  //            macro output D instead of the previous cell's master latch
  typedef struct packed {
    logic rebel;
    logic insert;
  } cell_ctrl_t;

  // Latch-port enables of one clocked-LSSD scan cell, made by the front end.
  typedef struct packed {
    logic a_en;   // L1 scan port   (L1 <= SI)
    logic c_en;   // L1 system port (L1 <= D)
    logic r_en;   // L1 REBEL port  (L1 <= D or previous L1, per 'insert')
    logic l2_en;  // L2 enable      (L2 <= L1)
  } latch_en_t;

  // Number of configuration bits a row's control logic holds: one mode bit
  // and the insertion-point index.
  function automatic int unsigned cfg_bits(int unsigned width);
    return 1 + ((width > 1) ? $clog2(width) : 1);
  endfunction

  // Stage (0 = P0 .. 5 = P5) of REBEL row r.  The rows are split as evenly as
  // possible over the six stages, earlier stages taking the extra rows
  // (28 rows -> 5,5,5,5,4,4).
  function automatic int unsigned row_stage(int unsigned r, int unsigned nrows);
    int unsigned base, extra, acc;
    base  = nrows / NUM_STAGES;
    extra = nrows % NUM_STAGES;
    acc   = 0;
    for (int unsigned s = 0; s < NUM_STAGES; s++) begin
      acc += base + ((s < extra) ? 1 : 0);
      if (r < acc) return s;
    end
    return NUM_STAGES - 1;
  endfunction
endpackage
