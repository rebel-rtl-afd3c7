// rebel_front_end: per-cell clock front end of a REBEL row.
//
// Turns the chip-level clocks (system clock Clk, LSSD scan clocks A and B,
// scan enable) and the cell's control from the row control logic into the
// four latch enables of one clocked-LSSD scan cell.  Purely combinational.
//
//   functional cell (ctrl.rebel = 0)
//     L1 system port open while Clk is low (gated off by scan_en), L2 open
//     while Clk is high: the pair acts as a rising-edge flip-flop, so
//     asserting Clk launches (launch-off-capture with scan_en = 0, a one-bit
//     shift with scan_en = 1 after a final A pulse: launch-off-shift).
//   delay-chain cell (ctrl.rebel = 1)
//     L1 REBEL port open while Clk is high, closed otherwise, so the chain is
//     transparent for exactly the launch-capture interval and holds the
//     snapshot once Clk falls.  L2 stays closed during the test so the next
//     logic stage does not see the moving edge.
//   every cell: A opens the L1 scan port, B opens L2 (scan shift).
//
// The reference design names this block but does not give its gates; the
// equations above are this design's own reading of "Clk asserted launches,
// Clk deasserted halts the delay chain".
module rebel_front_end
  import rebel_pkg::*;
(
  input  logic       clk,      // system clock Clk
  input  logic       scan_en,  // 1: scan/shift mode, gates the L1 system port
  input  logic       scan_a,   // LSSD scan clock A (L1 scan port)
  input  logic       scan_b,   // LSSD scan clock B (L2)
  input  cell_ctrl_t ctrl,     // from the row control logic
  output latch_en_t  en        // to the scan cell
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    en.a_en  = scan_a;
    en.c_en  = ~ctrl.rebel & ~clk & ~scan_en;
    en.r_en  =  ctrl.rebel &  clk;
    en.l2_en = scan_b | (~ctrl.rebel & clk);
  end

  // A and B are non-overlapping LSSD clocks.
  always_comb begin
    a_b_nonoverlap: assert (!(scan_a && scan_b))
      else $error("LSSD scan clocks A and B overlap");
  end
endmodule
