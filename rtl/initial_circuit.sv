`timescale 1ps/1ps
// Initial circuit: produces the Start signal that puts the coarse SAR and the
// fine up/down counter at their mid codes before locking begins.
//
// Reset (active high, asynchronous) sets a short shift register to all ones;
// after Reset is released, zeros are shifted in on each rising edge of
// Ref_clk. Start is the last stage, so it is high while Reset is high and for
// exactly START_CYCLES Ref_clk rising edges after Reset falls, and its falling
// edge is synchronous to Ref_clk.
//
// The role of this block (initialise SAR and counter at mid to avoid harmonic
// and stuck locking) follows the design description; the shift-register
// implementation and START_CYCLES are this design's choices.
module initial_circuit #(
  parameter int unsigned START_CYCLES = 2
) (
  input  logic ref_clk,
  input  logic reset,
  output logic start
);

  logic [START_CYCLES-1:0] sh;

  always_ff @(posedge ref_clk or posedge reset) begin
    if (reset) sh <= '1;
    else       sh <= START_CYCLES'(sh << 1);
  end

  assign start = sh[START_CYCLES-1];

endmodule
