// tb_rebel_rcl: loads random configurations into the row control logic
// through its scan port (A then B per bit) and checks the decoded per-cell
// control against a reference decode, that the configuration is kept while
// the scan clocks are idle, and that it shifts out of so in order.
module tb_rebel_rcl;
  import rebel_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WIDTH = 32;
  localparam int unsigned IW    = $clog2(WIDTH);
  localparam int unsigned CFG   = 1 + IW;

  logic scan_a, scan_b, si, so, rebel_mode;
  logic [IW-1:0] ins_pt;
  cell_ctrl_t ctrl [WIDTH];
  int checks = 0, failures = 0;

  rebel_rcl #(.WIDTH(WIDTH)) dut (.scan_a, .scan_b, .si, .so, .rebel_mode, .ins_pt, .ctrl);

  task automatic shift(input logic b, output logic out);
    out = so;
    si = b;
    #100 scan_a = 1; #1000 scan_a = 0;
    #100 scan_b = 1; #1000 scan_b = 0;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CFG-1:0] cfg, prev;
    logic o;
    scan_a = 0; scan_b = 0; si = 0;
    prev = '0;
    for (int k = 0; k < CFG; k++) shift(1'b0, o);
    for (int it = 0; it < 200; it++) begin
      logic m;
      logic [IW-1:0] p;
      m = 1'($urandom);
      p = IW'($urandom);
      // element 0 = mode, element 1+b = bit b of the index
      cfg = {p, m};
      // element e receives the bit shifted in at step CFG-1-e
      for (int s = 0; s < CFG; s++) begin
        shift(cfg[CFG-1-s], o);
        // what comes out is the previous configuration, last element first
        checks++;
        if (o !== prev[CFG-1-s]) begin
          failures++;
          $display("FAIL so order step %0d", s);
        end
      end
      #500;
      checks++;
      if (rebel_mode !== m || ins_pt !== p) begin
        failures++;
        $display("FAIL cfg got %b/%0d exp %b/%0d", rebel_mode, ins_pt, m, p);
      end
      for (int i = 0; i < WIDTH; i++) begin
        checks++;
        if (ctrl[i].rebel !== (m && i >= int'(p)) || ctrl[i].insert !== (m && i == int'(p))) begin
          failures++;
          $display("FAIL ctrl[%0d] mode=%b ins=%0d got %b%b", i, m, p, ctrl[i].rebel, ctrl[i].insert);
        end
      end
      prev = cfg;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
