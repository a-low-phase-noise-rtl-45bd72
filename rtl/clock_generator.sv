`timescale 1ps/1ps
// All-digital programmable DLL-based clock generator (top level).
//
// A delay-locked loop (dll_core) aligns tap P(2M) of a 16-cell delay line
// with the next Ref_clk edge, M = B[2:0] + 1. The phases P1..P(2M) then
// divide the reference period into 2M equal steps, and the frequency
// multiplier turns consecutive phase pairs into pulses and merges them into
// Clkout/Clkoutb, which run at M times the reference frequency (x1..x8).
// Reset restarts the lock sequence; after changing B[2:0], pulse Reset so the
// loop relocks for the new feedback tap. S adds a fixed load to every delay
// cell, extending the delay range for low reference frequencies.
//
// Lock time with the default SETTLE_CYCLES = 4: Start lasts two Ref_clk
// cycles after Reset, the coarse search 12 cycles, then each fine step at
// most 4 cycles (at most five steps). The outputs are valid once lock is
// reached; before that their frequency is M times the reference but their
// duty cycle and edge spacing are not yet even.
//
// The architecture follows the design description. The delay-line and dead-
// zone timing are behavioural models, so this top simulates the whole
// generator while its control logic and frequency multiplier are
// synthesizable RTL.
module clock_generator
  import clkgen_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned DZ_PS         = 450,
  parameter int unsigned T0_PS         = 300,
  parameter int unsigned TC_PS         = 60,
  parameter int unsigned TF_PS         = 25,
  parameter int unsigned TS_PS         = 600
) (
  input  logic           ref_clk,
  input  logic           reset,
  input  logic           s,
  input  logic [B_W-1:0] b,
  output logic           clkout,
  output logic           clkoutb,
  output logic           ld,
  output logic [C_W-1:0] c,
  output logic [F_W-1:0] f
);

  logic [N_PHASES-1:0] p, pb;
  logic                int_clk;

  dll_core #(
    .SETTLE_CYCLES(SETTLE_CYCLES), .DZ_PS(DZ_PS),
    .T0_PS(T0_PS), .TC_PS(TC_PS), .TF_PS(TF_PS), .TS_PS(TS_PS)
  ) u_core (
    .ref_clk, .reset, .s, .int_clk, .p, .pb, .ld, .c, .f
  );

  freq_multiplier u_fm (.b, .p, .pb, .int_clk, .clkout, .clkoutb);

endmodule
