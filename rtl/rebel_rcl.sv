// rebel_rcl: row control logic (RCL) of one REBEL row.
//
// Holds the row's configuration in a short LSSD scan register that sits in
// the scan chain ahead of the row's flip-flops, and decodes it into the
// control of every cell:
//   rebel_mode = 0 : every cell is an ordinary functional scan flip-flop
//   rebel_mode = 1 : the cell at index ins_pt is the insertion point and it
//                    and every cell to its right (higher index) form the
//                    row's delay chain; cells to its left stay functional.
// Configuration is loaded by the same scan operation that loads the test
// pattern and is only changed by the scan clocks A and B, so the system clock
// never disturbs it.
//
// Scan order inside the register: si -> element 0 -> ... -> element CFG-1 -> so.
// Element 0 is rebel_mode, element 1+k is bit k of ins_pt.  An ins_pt at or
// beyond WIDTH selects no cell (the row then captures nothing in REBEL mode).
//
// The reference design names the RCL and its job (make every flip-flop right
// of the insertion point part of a delay chain); the register layout and the
// binary insertion index are this design's choice.
module rebel_rcl
  import rebel_pkg::*;
#(
  parameter  int unsigned WIDTH = rebel_pkg::REBEL_ROW_WIDTH,
  localparam int unsigned IW    = (WIDTH > 1) ? $clog2(WIDTH) : 1,
  localparam int unsigned CFG   = 1 + IW
) (
  input  logic          scan_a,      // LSSD scan clock A
  input  logic          scan_b,      // LSSD scan clock B
  input  logic          si,          // scan in
  output logic          so,          // scan out (to the row's first cell)
  output logic          rebel_mode,  // row is in REBEL mode
  output logic [IW-1:0] ins_pt,      // insertion-point index
  output cell_ctrl_t    ctrl [WIDTH] // per-cell control
);
  timeunit 1ps; timeprecision 1ps;

  logic [CFG-1:0] l2;

  // One L1/L2 latch pair per configuration bit; L1 has only a scan port.
  for (genvar e = 0; e < CFG; e++) begin : g_cfg
    logic l1, l1_d, l2_q;
    if (e == 0) begin : g_first
      assign l1_d = si;
    end else begin : g_next
      assign l1_d = g_cfg[e-1].l2_q;
    end
    always_latch begin
      if (scan_a) l1 = l1_d;
    end
    always_latch begin
      if (scan_b) l2_q = l1;
    end
    assign l2[e] = l2_q;
  end

  assign so         = l2[CFG-1];
  assign rebel_mode = l2[0];
  assign ins_pt     = l2[CFG-1:1];

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      ctrl[i].rebel  = rebel_mode && (IW'(i) >= ins_pt);
      ctrl[i].insert = rebel_mode && (IW'(i) == ins_pt);
    end
  end
endmodule
