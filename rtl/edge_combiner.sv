`timescale 1ps/1ps
// Edge combiner: merges the pulses into the output clock pair Out/Outb.
//
// The circuit is a cross-coupled latch. Any high B_x pulls Out low (Outb
// high); any high B_xb pulls Outb low (Out high); with no pulse present the
// latch keeps its state. Because the B_x and B_xb pulses alternate around the
// reference period, Out rises once per B_xb pulse and falls once per B_x
// pulse: M enabled pulse pairs give M output cycles per reference cycle. Out
// changes as soon as a pulse arrives (no clock). If both sides were driven at
// once, the B_x side wins.
//
// The latch is intended: it is the cross-coupled PMOS pair of the circuit,
// and it is the only state element of the block. Table-level behaviour
// (B_x high -> Out 0, B_xb high -> Out 1) follows the design description;
// the hold state and the priority are this design's reading of the circuit.
module edge_combiner
  import clkgen_pkg::*;
(
  input  logic [MAX_MULT-1:0] bx,
  input  logic [MAX_MULT-1:0] bxb,
  output logic                out,
  output logic                outb
);

  logic q;

  always_latch begin
    if (|bx)       q = 1'b0;
    else if (|bxb) q = 1'b1;
  end

  assign out  = q;
  assign outb = ~q;

endmodule
