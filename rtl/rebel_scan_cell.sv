// rebel_scan_cell: clocked-LSSD scan flip-flop with the REBEL delay-chain port.
//
// Two level-sensitive latches.  The master L1 has three write ports, each with
// its own enable from the front end (at most one is open at a time):
//   scan port   (a_en)  L1 = si   (previous cell's L2, scan shift)
//   system port (c_en)  L1 = d    (macro output, normal capture)
//   REBEL port  (r_en)  L1 = d    when this cell is the insertion point,
//                       L1 = ci   otherwise (previous cell's L1: delay chain)
// The slave L2 copies L1 while l2_en is high and drives q and so.
//
// The delay chain runs from master latch to master latch (co -> next ci), so
// REBEL adds one fanout load to the master latch, as in the reference design,
// and the slave latches -- which feed the next logic stage -- stay quiet while
// an edge travels along the chain.
//
// FLUSH_DELAY_PS is a simulation-only annotation of the propagation delay of
// one chain element (synthesis ignores it).  It lets a simulation reproduce
// the snapshots the structure exists to capture.
module rebel_scan_cell
  import rebel_pkg::*;
#(
  parameter int unsigned FLUSH_DELAY_PS = rebel_pkg::REBEL_FLUSH_DELAY_PS
) (
  input  latch_en_t en,      // latch enables from the front end
  input  logic      insert,  // cell is the insertion point (REBEL port takes d)
  input  logic      d,       // system data from the macro-under-test
  input  logic      si,      // scan in (previous cell's L2)
  input  logic      ci,      // chain in (previous cell's L1, delayed)
  output logic      q,       // L2: system output to the next logic stage
  output logic      so,      // scan out (= L2)
  output logic      co       // chain out: L1 after one element delay
);
  timeunit 1ps; timeprecision 1ps;

  logic l1;

  always_latch begin
    if (en.a_en)      l1 = si;
    else if (en.c_en) l1 = d;
    else if (en.r_en) l1 = insert ? d : ci;
  end

  always_latch begin
    if (en.l2_en) q = l1;
  end

  assign so = q;
  assign #(FLUSH_DELAY_PS) co = l1;
endmodule
