`timescale 1ps/1ps
// DLL core: locks the 16-cell delay line so that the selected feedback tap
// Int_clk is one Ref_clk period behind Ref_clk.
//
// Sequence after Reset:
//   1. The initial circuit holds Start high; the SAR loads C = 100 and the
//      up/down counter loads F = 00011 (mid codes).
//   2. Coarse tune: the phase comparator samples Int_clk at Ref_clk, and the
//      SAR resolves C[2:0] one bit per SETTLE_CYCLES cycles. When it is done,
//      LD goes high and C is frozen.
//   3. Fine tune: with LD high, the dead-zone phase detector steers the
//      up/down counter one thermometer step per SETTLE_CYCLES cycles until the
//      Int_clk edge falls within DZ_PS after the Ref_clk edge, where the
//      counter stops.
// Int_clk leaves the core to the multiplier selector, which picks it from
// the phases, and comes back in. All control logic runs on Ref_clk rising
// edges. The delay line (dcdl) and the dead-zone delay (dz_delay) are
// behavioural timing models; the rest is synthesizable.
//
// The loop structure and order of coarse and fine tuning follow the design
// description; the settling interval, dead-zone width and delay values are
// this design's choices.
module dll_core
  import clkgen_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned DZ_PS         = 450,
  parameter int unsigned T0_PS         = 300,
  parameter int unsigned TC_PS         = 60,
  parameter int unsigned TF_PS         = 25,
  parameter int unsigned TS_PS         = 600
) (
  input  logic                ref_clk,
  input  logic                reset,
  input  logic                s,
  input  logic                int_clk,
  output logic [N_PHASES-1:0] p,
  output logic [N_PHASES-1:0] pb,
  output logic                ld,
  output logic [C_W-1:0]      c,
  output logic [F_W-1:0]      f
);

  logic start, comp, ref_clk_late, up, dn;

  initial_circuit u_init (.ref_clk, .reset, .start);

  // coarse tune loop
  phase_comparator u_pc (.ref_clk, .int_clk, .comp);
  sar #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_sar (.clk(ref_clk), .start, .comp, .c, .ld);

  // fine tune loop
  dz_delay #(.DZ_PS(DZ_PS)) u_dz (.in(ref_clk), .out(ref_clk_late));
  phase_detector u_pd (.ref_clk, .ref_clk_late, .int_clk, .up, .dn);
  updn_counter #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_cnt (
    .clk(ref_clk), .start, .en(ld), .up, .dn, .f
  );

  dcdl #(.T0_PS(T0_PS), .TC_PS(TC_PS), .TF_PS(TF_PS), .TS_PS(TS_PS)) u_dcdl (
    .ref_clk, .s, .c, .f, .p, .pb
  );

endmodule
