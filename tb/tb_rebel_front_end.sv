// tb_rebel_front_end: exhaustive check of the REBEL clock front end.
// Every combination of Clk, scan_en, A, B (A and B never together) and the
// two control bits is applied; the four enables are compared with the
// intended behaviour written out case by case below.
module tb_rebel_front_end;
  import rebel_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic clk, scan_en, scan_a, scan_b;
  cell_ctrl_t ctrl;
  latch_en_t  en;
  int checks = 0, failures = 0;

  rebel_front_end dut (.clk, .scan_en, .scan_a, .scan_b, .ctrl, .en);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_a, exp_c, exp_r, exp_l2;
    for (int v = 0; v < 64; v++) begin
      logic [5:0] vec;
      vec = 6'(v);
      if (vec[3] && vec[2]) continue;  // A and B never overlap
      {clk, scan_en, scan_a, scan_b, ctrl.rebel, ctrl.insert} = vec;
      #10;
      // scan clocks always reach the latches
      exp_a = scan_a;
      if (ctrl.rebel) begin
        // chain cell: master open exactly while Clk is high, slave only by B
        exp_c  = 1'b0;
        exp_r  = clk;
        exp_l2 = scan_b;
      end else begin
        // functional cell: master open while Clk low unless scanning,
        // slave open while Clk high or by B
        exp_c  = !clk && !scan_en;
        exp_r  = 1'b0;
        exp_l2 = clk || scan_b;
      end
      checks++;
      if (en.a_en !== exp_a || en.c_en !== exp_c || en.r_en !== exp_r || en.l2_en !== exp_l2) begin
        failures++;
        $display("FAIL v=%b got a=%b c=%b r=%b l2=%b exp %b %b %b %b", 6'(v),
                 en.a_en, en.c_en, en.r_en, en.l2_en, exp_a, exp_c, exp_r, exp_l2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
