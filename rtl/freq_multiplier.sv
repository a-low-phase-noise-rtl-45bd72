`timescale 1ps/1ps
// Frequency multiplier: multiplier selector, pulse generator and edge
// combiner.
//
// From the 16 delay-line phases and the multiplier bits B[2:0] it returns the
// DLL feedback clock Int_clk = P(2M), M = B + 1, and builds Clkout/Clkoutb at
// M times the reference frequency by turning each phase pair into a pulse
// (pulse_generator) and merging the pulses in a latch (edge_combiner). There
// is no clock: the output edges follow the phase edges through a few gates.
// The block structure follows the design description.
module freq_multiplier
  import clkgen_pkg::*;
(
  input  logic [B_W-1:0]      b,
  input  logic [N_PHASES-1:0] p,
  input  logic [N_PHASES-1:0] pb,
  output logic                int_clk,
  output logic                clkout,
  output logic                clkoutb
);

  logic [MAX_MULT-1:0] d, bx, bxb;

  multiplier_selector u_sel (.b, .p, .int_clk, .d);
  pulse_generator     u_pg  (.p, .pb, .d, .bx, .bxb);
  edge_combiner       u_ec  (.bx, .bxb, .out(clkout), .outb(clkoutb));

endmodule
