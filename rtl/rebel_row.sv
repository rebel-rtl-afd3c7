// rebel_row: one REBEL row (RRx), a pipeline register of the instrumented
// macro extended with REBEL.
//
// A row is WIDTH clocked-LSSD scan cells, each with its own clock front end,
// plus the row control logic (RCL).  In functional mode the row is an
// ordinary rising-edge pipeline register: it captures d (outputs of the logic
// stage before it) and drives q (inputs of the stage after it).  In REBEL
// mode the RCL picks one insertion point; while Clk is high the output of the
// path-under-test enters that cell and runs to the right through the master
// latches of all later cells, one element delay per cell; when Clk falls the
// chain freezes.  A B pulse then copies the snapshot into the slave latches
// and A/B pulses shift it out.
//
// Scan order: si -> RCL configuration -> cell 0 -> ... -> cell WIDTH-1 -> so.
//
// Test sequence (one launch-capture interval, LCI):
//   1. scan_en = 1, Clk = 0: shift configuration and pattern with A then B.
//   2. launch-off-shift: leave scan_en = 1, give the last bit's A pulse only;
//      launch-off-capture: set scan_en = 0 (functional L1s follow d).
//   3. raise Clk (launch), lower it LCI later (capture / freeze).
//   4. scan_en = 1, pulse B once, then shift out with A/B.
module rebel_row
  import rebel_pkg::*;
#(
  parameter  int unsigned WIDTH          = rebel_pkg::REBEL_ROW_WIDTH,
  parameter  int unsigned FLUSH_DELAY_PS = rebel_pkg::REBEL_FLUSH_DELAY_PS,
  localparam int unsigned IW             = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic             clk,        // system clock Clk (launch / capture)
  input  logic             scan_en,    // scan mode
  input  logic             scan_a,     // LSSD scan clock A
  input  logic             scan_b,     // LSSD scan clock B
  input  logic             si,         // scan in
  output logic             so,         // scan out
  input  logic [WIDTH-1:0] d,          // from the logic stage before the row
  output logic [WIDTH-1:0] q,          // to the logic stage after the row
  output logic             rebel_mode, // configuration, for observation
  output logic [IW-1:0]    ins_pt
);
  timeunit 1ps; timeprecision 1ps;

  cell_ctrl_t       ctrl [WIDTH];
  latch_en_t        en   [WIDTH];
  logic             rcl_so;
  logic [WIDTH-1:0] so_c, co_c;

  rebel_rcl #(.WIDTH(WIDTH)) u_rcl (
    .scan_a, .scan_b, .si, .so(rcl_so), .rebel_mode, .ins_pt, .ctrl
  );

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    logic si_i, ci_i;
    if (i == 0) begin : g_first
      assign si_i = rcl_so;
      assign ci_i = 1'b0;  // cell 0 can only start a chain, never continue one
    end else begin : g_next
      assign si_i = so_c[i-1];
      assign ci_i = co_c[i-1];
    end

    rebel_front_end u_fe (
      .clk, .scan_en, .scan_a, .scan_b, .ctrl(ctrl[i]), .en(en[i])
    );

    rebel_scan_cell #(.FLUSH_DELAY_PS(FLUSH_DELAY_PS)) u_cell (
      .en(en[i]), .insert(ctrl[i].insert), .d(d[i]), .si(si_i), .ci(ci_i),
      .q(q[i]), .so(so_c[i]), .co(co_c[i])
    );
  end

  assign so = so_c[WIDTH-1];
endmodule
