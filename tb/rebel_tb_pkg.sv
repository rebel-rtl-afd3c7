// rebel_tb_pkg: reference model used by the REBEL testbenches.
//
// The testbenches drive the macro-under-test side of a REBEL row with a small
// behavioural stand-in (tb_mut_model): every output bit j of a logic stage
// is the inverse of one source bit, delayed by path_delay(j); bit 1 instead
// is the XOR of the source bit delayed by GLITCH_T1 and by GLITCH_T2, so a
// transition of the source makes a pulse (a glitch) of GLITCH_T2-GLITCH_T1 ps
// and no lasting change.
//
// snapshot_bit() predicts, independently of the RTL, what a delay-chain cell
// holds after one launch-capture interval: cell k+m of a chain that starts at
// insertion point k holds the insertion input as it was m element delays
// before Clk fell, provided the chain was already open then; otherwise it
// holds the value the cell had before Clk rose.
package rebel_tb_pkg;
  timeunit 1ps; timeprecision 1ps;

  // Path delays of the stand-in logic.  All odd, while the applied LCIs are
  // = 2 (mod 10) and the element delay a multiple of 10 ps, so no event of
  // the model coincides with a clock edge.
  parameter int PATH_BASE_PS = 1501;
  parameter int PATH_STEP_PS = 110;
  parameter int GLITCH_T1    = 1201;
  parameter int GLITCH_T2    = 2101;

  function automatic int path_delay(int j);
    return PATH_BASE_PS + PATH_STEP_PS * j;
  endfunction

  // Source bit at time x (ps after Clk rose): the launch happens at x = 0.
  function automatic logic src_at(longint x, logic pre, logic post);
    return (x >= 0) ? post : pre;
  endfunction

  // Output bit j of the stand-in logic at time x.
  function automatic logic mut_at(int j, longint x, logic pre, logic post);
    if (j == 1)
      return src_at(x - GLITCH_T1, pre, post) ^ src_at(x - GLITCH_T2, pre, post);
    return ~src_at(x - path_delay(j), pre, post);
  endfunction

  // Value held by cell c of a chain starting at k after an LCI of lci ps.
  // init[c] is what cell c held before Clk rose; pre/post the source bit.
  function automatic logic snapshot_bit(int c, int k, longint lci, int dly,
                                        const ref logic init[], input logic pre,
                                        input logic post);
    longint x;
    int     cc;
    x  = lci;
    cc = c;
    while (cc > k) begin
      x  -= dly;
      cc -= 1;
      if (x < 0) return init[cc];
    end
    return mut_at(k, x, pre, post);
  endfunction
endpackage
