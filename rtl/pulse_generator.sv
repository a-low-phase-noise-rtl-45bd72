`timescale 1ps/1ps
// Pulse generator: AND gates that cut the delay-line phases into pulses.
//
// For pair x = 1..8 (index x-1 here):
//   B_x  = P(2x-1) AND P(2x)b
//   B_xb = P(2x)   AND P(2x+1)b
// With the line locked, B_x is high from the P(2x-1) edge to the P(2x) edge
// and B_xb from the P(2x) edge to the P(2x+1) edge, so the enabled pulses tile
// the reference period. Pair x is enabled by D[x]. For the last enabled pair
// x = M the phase P(2M+1) is replaced by P1, which is the same waveform one
// period later once the loop is locked (for M = 8 there is no P17).
// Purely combinational.
//
// The gate equations follow the design description; the enable gating by
// D[8:1] and the wrap to P1 for the last pair are this design's choices.
module pulse_generator
  import clkgen_pkg::*;
(
  input  logic [N_PHASES-1:0] p,
  input  logic [N_PHASES-1:0] pb,
  input  logic [MAX_MULT-1:0] d,
  output logic [MAX_MULT-1:0] bx,
  output logic [MAX_MULT-1:0] bxb
);

  for (genvar i = 0; i < MAX_MULT; i++) begin : g_pair
    logic nxt_b;    // complement of the phase after P(2x)

    if (i == MAX_MULT - 1) begin : g_top
      assign nxt_b = pb[0];
    end else begin : g_mid
      // pair i is the highest enabled one when pair i+1 is off
      assign nxt_b = d[i+1] ? pb[2*i+2] : pb[0];
    end

    assign bx[i]  = d[i] & p[2*i]   & pb[2*i+1];
    assign bxb[i] = d[i] & p[2*i+1] & nxt_b;
  end

endmodule
