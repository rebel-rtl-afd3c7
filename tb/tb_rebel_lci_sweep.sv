// tb_rebel_lci_sweep: clock-strobing sweep of one path, as in the reference
// measurements: the same test is applied with 159 launch-capture intervals,
// FPA settings 128..444 in steps of two mapped linearly onto 2745..8400 ps.
//
// A 32-cell REBEL row has its insertion point at cell 15; the path-under-test
// (stand-in logic, 3151 ps) launches a transition from cell 0.  The chain
// starts from a uniform value, so each snapshot shows how many elements the
// edge passed.  Every snapshot bit is checked against the reference model;
// then the path delay is recovered from the snapshots alone as
// T_path = T_lc - T_dc (T_dc = elements passed x element delay) and must
// bracket the true delay within two LCI steps.  The same delay is also found
// by the reverse parse over the calibration window W1 (4355..5250 ps).
module tb_rebel_lci_sweep;
  import rebel_pkg::*;
  import rebel_tb_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  localparam int R   = 1;
  localparam int W   = 32;
  localparam int DLY = int'(REBEL_FLUSH_DELAY_PS);
  localparam int IW  = $clog2(W);
  localparam int CFG = 1 + IW;
  localparam int SEG = CFG + W;
  localparam int E   = R * SEG;

  logic clk, scan_en, scan_a, scan_b, si, so;
  logic [W-1:0]  mut_out [R];
  logic [W-1:0]  mut_in  [R];
  logic [R-1:0]  rebel_mode;
  logic [IW-1:0] ins_pt  [R];

  rebel_row #(.WIDTH(W), .FLUSH_DELAY_PS(DLY)) dut (
    .clk, .scan_en, .scan_a, .scan_b, .si, .so,
    .d(mut_out[0]), .q(mut_in[0]), .rebel_mode(rebel_mode[0]), .ins_pt(ins_pt[0])
  );

  for (genvar r = 0; r < R; r++) begin : g_mut
    tb_mut_model #(.WIDTH(W)) u_mut (.src(mut_in[(r == 0) ? 0 : r - 1][0]), .out(mut_out[r]));
  end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_los = 0, n_loc = 0, n_cfg_switch = 0, n_partial = 0;
  int n_nocapture = 0, n_fullflush = 0, n_glitch = 0, n_funcrow = 0;

  function automatic int src_row(int r);
    return (r == 0) ? 0 : r - 1;
  endfunction

  function automatic int lci_of_fpa(int fpa);
    int ps;
    ps = 2745 + ((fpa - 128) * (8400 - 2745) + 158) / 316;
    return (ps / 10) * 10 + 2;
  endfunction

  task automatic pulse_a();
    #200 scan_a = 1; #500 scan_a = 0;
  endtask
  task automatic pulse_b();
    #200 scan_b = 1; #500 scan_b = 0;
  endtask

  // Current contents of the chain's slave latches, by element.
  logic v[];
  logic snap[];
  bit   uniform_chain = 0;
  logic [R-1:0] last_mode;

  // One complete REBEL test.
  task automatic run_test(input logic [R-1:0] mode, input int ins[R], input int lci,
                          input bit los);
    logic l1[], init[], got;
    logic pre[R], post[R];
    logic s_last;
    int   e;

    v = new[E];
    snap = new[E];
    for (int i = 0; i < E; i++) v[i] = 1'($urandom);
    for (int r = 0; r < R; r++) begin
      v[r*SEG] = mode[r];
      for (int b = 0; b < IW; b++) v[r*SEG + 1 + b] = 1'(ins[r] >> b);
      // make cell 0 toggle on a launch-off-shift
      v[r*SEG + CFG] = ~v[r*SEG + CFG - 1];
      // optionally start the chain from a uniform value
      if (uniform_chain && mode[r])
        for (int c = (ins[r] > 0 ? ins[r] - 1 : 0); c < W; c++)
          if (c > 0) v[r*SEG + CFG + c] = v[r*SEG + CFG - 1];
    end
    if (mode != last_mode) n_cfg_switch++;
    last_mode = mode;

    // 1. scan in
    scan_en = 1; clk = 0;
    for (int s = 0; s < E; s++) begin
      si = v[E-1-s]; pulse_a(); pulse_b();
    end
    // 2. launch preparation
    l1 = new[E];
    if (los) begin
      s_last = 1'($urandom);
      si = s_last; pulse_a();
      l1[0] = s_last;
      for (int i = 1; i < E; i++) l1[i] = v[i-1];
      n_los++;
    end else begin
      scan_en = 0;
      for (int i = 0; i < E; i++) l1[i] = v[i];
      n_loc++;
    end
    #20_000;
    // source bit of every row's logic stage before and after the launch
    for (int r = 0; r < R; r++) begin
      int sr, se;
      sr = src_row(r);
      se = sr*SEG + CFG;
      pre[r] = v[se];
      if (mode[sr] && ins[sr] == 0) post[r] = pre[r];           // chain cell: L2 stays closed
      else if (los)                  post[r] = l1[se];
      else                           post[r] = mut_at(0, -100000, pre[sr], pre[sr]);
    end
    for (int r = 0; r < R; r++) begin
      checks++;
      if (mut_in[src_row(r)][0] !== pre[r]) begin
        failures++; $display("FAIL pre-launch source row %0d", r);
      end
    end
    // 3. launch-capture interval
    clk = 1;
    #100;
    for (int r = 0; r < R; r++) begin
      checks++;
      if (mut_in[src_row(r)][0] !== post[r]) begin
        failures++; $display("FAIL launch row %0d got %b exp %b", src_row(r), mut_in[src_row(r)][0], post[r]);
      end
      if (!mode[r]) n_funcrow++;
    end
    #(lci - 100);
    clk = 0;
    #20_000;
    // 4. transfer and scan out
    scan_en = 1;
    pulse_b();
    for (int s = 0; s < E; s++) begin
      logic exp;
      int r, c;
      e = E - 1 - s;
      r = e / SEG;
      c = e % SEG - CFG;
      got = so;
      snap[e] = got;
      if (c >= 0 && mode[r] && c >= ins[r]) begin
        init = new[W];
        for (int i = 0; i < W; i++) init[i] = l1[r*SEG + CFG + i];
        exp = snapshot_bit(c, ins[r], lci, DLY, init, pre[r], post[r]);
      end else if (c >= 0 && !los) begin
        // functional cell, L1 followed its d until scan_en rose
        exp = mut_at(c, 1_000_000, pre[r], post[r]);
      end else begin
        exp = l1[e];
      end
      checks++;
      if (got !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL row %0d elem %0d lci %0d: got %b exp %b", r, e % SEG, lci, got, exp);
      end
      si = 1'b0; pulse_a(); pulse_b();
    end
    // classify what the chains caught (from the reference model)
    for (int r = 0; r < R; r++) begin
      if (mode[r]) begin
        logic first, prev, cur;
        int trans, same;
        init = new[W];
        for (int i = 0; i < W; i++) init[i] = l1[r*SEG + CFG + i];
        trans = 0; same = 1;
        first = snapshot_bit(ins[r], ins[r], lci, DLY, init, pre[r], post[r]);
        prev = first;
        for (int c = ins[r]; c < W; c++) begin
          cur = snapshot_bit(c, ins[r], lci, DLY, init, pre[r], post[r]);
          if (cur != init[c]) same = 0;
          if (c > ins[r] && cur != prev) trans++;
          prev = cur;
        end
        if (pre[r] != post[r]) begin
          if (same) n_nocapture++;
          else if (ins[r] == 1 && trans >= 2) n_glitch++;
          else if (lci > path_delay(ins[r]) + (W - 1 - ins[r]) * DLY) n_fullflush++;
          else n_partial++;
        end
      end
    end
  endtask

  function automatic logic [R-1:0] cfg_mode(int cfg);
    logic [R-1:0] m;
    for (int r = 0; r < R; r++) begin
      int s;
      s = int'(row_stage(r, R));
      if (cfg <= 2) m[r] = (s == 2 || s == 4 || s == 5);
      else          m[r] = (s == 1 || s == 3 || s == 5);
    end
    return m;
  endfunction

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ins[R];
    clk = 0; scan_en = 1; scan_a = 0; scan_b = 0; si = 0;
    last_mode = '0;
    begin
      logic [R-1:0] m;
      longint lo, hi;
      int n, nprev, nsteps, k;
      int n_at[159], lci_at[159], idx;
      int top_i, last_n, est;
      m = '1;
      k = 15;
      ins[0] = k;
      uniform_chain = 1;
      lo = 0; hi = 1_000_000; nprev = -1; nsteps = 0; idx = 0;
      for (int fpa = 128; fpa <= 444; fpa += 2) begin
        int lci;
        logic newv;
        lci = lci_of_fpa(fpa);
        run_test(m, ins, lci, 1'b1);
        // new value at the insertion input after the launch
        newv = ~v[CFG - 1];
        n = 0;
        for (int c = k; c < W; c++) begin
          if (snap[CFG + c] == newv) n++;
          else break;
        end
        if (n != nprev) nsteps++;
        if (n > 0 && n < W - k) begin
          // T_path lies in (T_lc - n*D, T_lc - (n-1)*D)
          if (longint'(lci - n * DLY) > lo) lo = lci - n * DLY;
          if (longint'(lci - (n - 1) * DLY) < hi) hi = lci - (n - 1) * DLY;
        end else if (n == 0) begin
          if (longint'(lci) > lo) lo = lci;
        end
        nprev = n;
        n_at[idx] = n; lci_at[idx] = lci; idx++;
      end
      $display("path delay from snapshots: %0d..%0d ps (true %0d ps), %0d snapshot changes",
               lo, hi, path_delay(k), nsteps);
      checks++;
      if (!(lo < path_delay(k) && path_delay(k) < hi) || hi - lo > 2 * 36) begin
        failures++;
        $display("FAIL path delay not recovered");
      end
      // Reverse parse inside window W1 (LCIs 4355..5250 ps): start at the
      // largest LCI, find the last cell the edge reached there, and step back
      // to the snapshot where the edge has not yet entered that cell.  That
      // LCI minus the chain elements before the cell gives the path delay.
      top_i = 0;
      for (int i = 0; i < 159; i++) if (lci_at[i] <= 5250) top_i = i;
      last_n = n_at[top_i];
      est = -1;
      for (int i = top_i; i >= 0 && lci_at[i] >= 4355; i--) begin
        if (n_at[i] < last_n) begin
          est = lci_at[i] - (last_n - 1) * DLY;
          break;
        end
      end
      $display("reverse parse in W1: edge reaches %0d chain cells at %0d ps, path delay %0d ps",
               last_n, lci_at[top_i], est);
      checks++;
      if (est < 0 || est > path_delay(k) || path_delay(k) - est > 40) begin
        failures++;
        $display("FAIL reverse parse");
      end
      checks++;
      if (nsteps < 10) begin
        failures++;
        $display("FAIL edge barely moved over the sweep");
      end
    end
    $display("mechanisms: los=%0d loc=%0d cfg_switch=%0d partial=%0d nocapture=%0d fullflush=%0d glitch=%0d funcrow=%0d",
             n_los, n_loc, n_cfg_switch, n_partial, n_nocapture, n_fullflush, n_glitch, n_funcrow);
    if (n_los == 0 || n_partial == 0 || n_nocapture == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
