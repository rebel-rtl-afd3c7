// tb_mut_model: behavioural stand-in for one combinational logic stage of the
// macro-under-test.  Output bit j follows source bit 'src' through the delays
// described in rebel_tb_pkg (inverted, path_delay(j) ps), except bit 1 which
// is a glitch generator: src delayed by GLITCH_T1 XOR src delayed by GLITCH_T2.
module tb_mut_model
  import rebel_tb_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             src,
  output logic [WIDTH-1:0] out
);
  timeunit 1ps; timeprecision 1ps;

  logic g1, g2;
  assign #(GLITCH_T1) g1 = src;
  assign #(GLITCH_T2) g2 = src;

  for (genvar j = 0; j < WIDTH; j++) begin : g_bit
    if (j == 1) begin : g_glitch
      assign out[j] = g1 ^ g2;
    end else begin : g_path
      assign #(path_delay(j)) out[j] = ~src;
    end
  end
endmodule
