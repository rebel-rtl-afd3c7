// rebel_fpu_top: REBEL integration around a five-stage pipelined macro.
//
// The instrumented macro (a pipelined floating-point unit in the reference
// chip) keeps its combinational logic outside this module: every pipeline
// register of it is a REBEL row here, and the logic between the rows connects
// through the mut_out / mut_in ports.  NUM_ROWS rows (RR1..RR28) are spread
// over the pipeline-register stages P0..P5 (rebel_pkg::row_stage) and all sit
// on one scan chain from si (SI1) through P0 .. P5 to so.
//
//   mut_in[r]  : q of row r, the inputs the row drives into the next stage
//   mut_out[r] : the stage outputs that row r captures
//   rebel_mode / ins_pt : each row's current configuration (observation)
//
// A test configuration (e.g. stages P2, P4, P5 in REBEL mode and P0, P1, P3
// functional) is nothing but the configuration bits scanned in with the
// pattern; the clocking of one launch-capture interval is described in
// rebel_row.  Scan chain length is NUM_ROWS * (ROW_WIDTH + 1 + log2 ROW_WIDTH).
module rebel_fpu_top
  import rebel_pkg::*;
#(
  parameter  int unsigned NUM_ROWS       = rebel_pkg::REBEL_NUM_ROWS,
  parameter  int unsigned ROW_WIDTH      = rebel_pkg::REBEL_ROW_WIDTH,
  parameter  int unsigned FLUSH_DELAY_PS = rebel_pkg::REBEL_FLUSH_DELAY_PS,
  localparam int unsigned IW             = (ROW_WIDTH > 1) ? $clog2(ROW_WIDTH) : 1
) (
  input  logic                 clk,
  input  logic                 scan_en,
  input  logic                 scan_a,
  input  logic                 scan_b,
  input  logic                 si,
  output logic                 so,
  input  logic [ROW_WIDTH-1:0] mut_out    [NUM_ROWS],
  output logic [ROW_WIDTH-1:0] mut_in     [NUM_ROWS],
  output logic [NUM_ROWS-1:0]  rebel_mode,
  output logic [IW-1:0]        ins_pt     [NUM_ROWS]
);
  timeunit 1ps; timeprecision 1ps;

  logic [NUM_ROWS:0] chain;

  assign chain[0] = si;

  for (genvar r = 0; r < NUM_ROWS; r++) begin : g_row
    rebel_row #(.WIDTH(ROW_WIDTH), .FLUSH_DELAY_PS(FLUSH_DELAY_PS)) u_row (
      .clk, .scan_en, .scan_a, .scan_b,
      .si(chain[r]), .so(chain[r+1]),
      .d(mut_out[r]), .q(mut_in[r]),
      .rebel_mode(rebel_mode[r]), .ins_pt(ins_pt[r])
    );
  end

  assign so = chain[NUM_ROWS];
endmodule
