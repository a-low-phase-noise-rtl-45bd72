`timescale 1ps/1ps
// Multiplier selector: decodes the external multiplier bits B[2:0].
//
// The multiplication factor is M = B + 1. The selector routes phase P(2M) of
// the delay line out as the feedback clock Int_clk (B = 000 selects P2,
// B = 111 selects P16), so the DLL locks 2M cell delays to one Ref_clk period
// and P1..P(2M) split the period into 2M equal steps. It also drives the pulse
// enables D[8:1] as a thermometer code: D[k] is high for k <= M, enabling the
// pulse pairs B_k/B_kb that the edge combiner needs for M output cycles.
// Purely combinational.
//
// The B-to-Int_clk mapping is the design's truth table; the thermometer form
// of D[8:1] is this design's reading of a signal the description only names.
module multiplier_selector
  import clkgen_pkg::*;
(
  input  logic [B_W-1:0]      b,
  input  logic [N_PHASES-1:0] p,
  output logic                int_clk,
  output logic [MAX_MULT-1:0] d
);

  always_comb begin
    int_clk = p[2 * int'(b) + 1];
    for (int unsigned k = 0; k < MAX_MULT; k++) d[k] = (k <= int'(b));
  end

endmodule
