`timescale 1ps/1ps
// Behavioural model (not synthesizable): digital-controlled delay line (DCDL).
//
// A chain of N_PHASES differential delay cells is driven by Ref_clk; cell k
// outputs phase P(k+1) on p[k] and its complement on pb[k]. Every cell has
// switchable load transistors on both outputs, gated by the coarse code
// C[2:0] (binary weighted), the fine code F[4:0] (thermometer) and S, so all
// cells share one delay:
//
//   cell delay = T0_PS + TC_PS*C + TF_PS*(ones in F) + TS_PS*S
//
// Each edge entering a cell is scheduled to leave it after the delay in force
// when the edge arrived (transport delay). Code changes therefore affect only
// edges launched afterwards, as in the real line. Delays are counted in
// STEP_PS quanta, so the delay values should be multiples of STEP_PS.
//
// The cell count, the load-transistor control by C, F and S and the binary
// and thermometer weighting follow the design description. The picosecond
// values are this model's own. Three fine steps must cover at least one
// coarse step (3*TF_PS >= TC_PS), so that the fine loop, started at level 2
// of 0..5, can close the gap the coarse search leaves.
module dcdl
  import clkgen_pkg::*;
#(
  parameter int unsigned T0_PS   = 300,  // intrinsic cell delay
  parameter int unsigned TC_PS   = 60,   // delay per unit of C
  parameter int unsigned TF_PS   = 25,   // delay per ones-bit of F
  parameter int unsigned TS_PS   = 600,  // extra delay with S high
  parameter int unsigned STEP_PS = 5     // time quantum of the model
) (
  input  logic                ref_clk,
  input  logic                s,
  input  logic [C_W-1:0]      c,
  input  logic [F_W-1:0]      f,
  output logic [N_PHASES-1:0] p,
  output logic [N_PHASES-1:0] pb
);

  int unsigned cell_dly;

  always_comb cell_dly = T0_PS + TC_PS * int'(c) + TF_PS * therm_level(f) + TS_PS * int'(s);

  for (genvar k = 0; k < N_PHASES; k++) begin : g_cell
    logic din;
    logic q;

    if (k == 0) begin : g_first
      assign din = ref_clk;
    end else begin : g_next
      assign din = p[k-1];
    end

    // each edge gets its own waiting process, so edges closer together
    // than the cell delay are all kept (transport, not inertial, delay)
    task automatic launch(input logic v, input int unsigned steps);
      fork
        begin
          repeat (steps) #(STEP_PS);
          q = v;
        end
      join_none
    endtask

    initial q = 1'b0;

    always begin
      @(din);
      launch(din, cell_dly / STEP_PS);
    end

    assign p[k]  = q;
    assign pb[k] = ~q;
  end

endmodule
