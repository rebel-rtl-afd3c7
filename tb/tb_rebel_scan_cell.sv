// tb_rebel_scan_cell: directed test of one clocked-LSSD REBEL scan cell.
// Drives the latch enables directly and checks: system capture into L1 and
// transfer to L2, scan through the A port, holding with all enables low,
// the REBEL port taking d at the insertion point and ci otherwise, and the
// chain output lagging L1 by exactly one element delay.
module tb_rebel_scan_cell;
  import rebel_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DLY = 450;

  latch_en_t en;
  logic insert, d, si, ci, q, so, co;
  int checks = 0, failures = 0;

  rebel_scan_cell #(.FLUSH_DELAY_PS(DLY)) dut (.en, .insert, .d, .si, .ci, .q, .so, .co);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0; insert = 0; d = 0; si = 0; ci = 0;
    for (int it = 0; it < 20; it++) begin
      logic v, w;
      v = 1'($urandom); w = ~v;
      // system capture: L1 <= d, then L2 <= L1
      d = v; en.c_en = 1; #100; en.c_en = 0; #10;
      d = w; #100;                        // L1 closed: d changes ignored
      en.l2_en = 1; #10; check("capture->q", q, v); check("so=q", so, v);
      en.l2_en = 0; #10;
      // scan: L1 <= si, L2 <= L1
      si = w; en.a_en = 1; #100; en.a_en = 0; si = v; #10;
      check("hold before B", q, v);
      en.l2_en = 1; #10; check("scan->q", q, w); en.l2_en = 0; #10;
      // chain output follows L1 after exactly one element delay
      si = v; en.a_en = 1; #10; en.a_en = 0;
      #(DLY + 10); check("co settled", co, v);
      // REBEL port at the insertion point: follows d while open
      insert = 1; d = v; en.r_en = 1; #(DLY + 10);
      d = w; #(DLY - 20); check("co before delay", co, v);
      #40; check("co after delay", co, w);
      en.r_en = 0; #10; d = v; #(DLY + 50);
      check("insert frozen", co, w);
      check("q untouched by chain", q, w);
      // REBEL port past the insertion point: follows ci
      insert = 0; ci = v; d = w; en.r_en = 1; #(DLY + 10);
      check("chain takes ci", co, v);
      ci = w; #(DLY + 10); check("chain follows ci", co, w);
      en.r_en = 0; #10; ci = v; #(DLY + 50); check("chain frozen", co, w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
