`timescale 1ps/1ps
// Phase comparator (PC) of the coarse tune loop.
//
// On each rising edge of Ref_clk a flip-flop samples the feedback clock
// Int_clk. If Int_clk is still low, its rising edge has not arrived yet, so
// Ref_clk leads and Comp is driven high; if Int_clk is already high, Ref_clk
// lags and Comp is low. Comp is registered: it reflects the Ref_clk edge just
// passed and changes only on Ref_clk rising edges.
//
// The polarity of Comp follows the design description. Building the
// comparator as one sampling flip-flop is this design's choice; it decides
// correctly while the loop delay is within half a Ref_clk period of one
// period, which the SAR's mid-code start and the delay-line range ensure.
module phase_comparator (
  input  logic ref_clk,
  input  logic int_clk,
  output logic comp
);

  always_ff @(posedge ref_clk) comp <= ~int_clk;

endmodule
