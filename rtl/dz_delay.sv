`timescale 1ps/1ps
// Behavioural model (not synthesizable): fixed delay element that sets the
// dead-zone width of the fine phase detector.
//
// The output follows the input after DZ_PS picoseconds. In silicon this is a
// short inverter chain; the width of the dead zone is not given by the design
// description and DZ_PS is this design's choice. It must exceed the change of
// total loop delay caused by one fine step (2 x factor x TF_PS of the delay
// line) for the fine loop to come to rest, and stay below half a Ref_clk
// period.
module dz_delay #(
  parameter int unsigned DZ_PS = 450
) (
  input  logic in,
  output logic out
);

  always @(in) out <= #(DZ_PS) in;

endmodule
