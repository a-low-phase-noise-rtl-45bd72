`timescale 1ps/1ps
// Shared sizes and helpers of the programmable DLL-based clock generator.
//
// The delay line has sixteen phase taps P1..P16. The coarse code C is three
// binary-weighted bits, the fine code F is a five-bit thermometer code, and the
// multiplication factor runs from 1 to 8, chosen by the three-bit input B
// (factor = B + 1). These sizes follow the design description; the mid fine
// level used at start-up (level 2 of 0..5) is this implementation's choice.
package clkgen_pkg;

  localparam int unsigned N_PHASES = 16;  // delay-line taps P1..P16
  localparam int unsigned C_W      = 3;   // coarse code width (binary)
  localparam int unsigned F_W      = 5;   // fine code width (thermometer)
  localparam int unsigned MAX_MULT = 8;   // largest multiplication factor
  localparam int unsigned B_W      = 3;   // multiplier select width

  localparam logic [C_W-1:0] C_MID = 3'b100;  // SAR start code
  localparam int unsigned    F_MID = 2;        // fine start level

  // Thermometer code with 'level' ones in the low bits.
  function automatic logic [F_W-1:0] therm(input int unsigned level);
    logic [F_W-1:0] t;
    for (int unsigned i = 0; i < F_W; i++) t[i] = (i < level);
    return t;
  endfunction

  // Number of ones in a thermometer code.
  function automatic int unsigned therm_level(input logic [F_W-1:0] t);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < F_W; i++) n += int'(t[i]);
    return n;
  endfunction

endpackage
