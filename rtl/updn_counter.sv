`timescale 1ps/1ps
// Up/down counter of the fine tune loop, with thermometer-coded output.
//
// The counter holds a level from 0 to F_W and drives F[F_W-1:0] as a
// thermometer code with that many ones in the low bits. Start loads the mid
// level F_MID. While En (the coarse lock LD) is high the counter may take one
// step every SETTLE_CYCLES Ref_clk cycles: up on Up_F, down on Dn_F, nothing
// when neither (or both) is set, saturating at 0 and F_W. F changes only on
// Ref_clk rising edges.
//
// Five thermometer bits, start at mid and enabling after coarse lock follow
// the design description; the choice of level 2 as mid and the step interval
// are this design's.
module updn_counter
  import clkgen_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic           clk,
  input  logic           start,
  input  logic           en,
  input  logic           up,
  input  logic           dn,
  output logic [F_W-1:0] f
);

  localparam int unsigned CNT_W = $clog2(SETTLE_CYCLES + 1);
  localparam int unsigned LVL_W = $clog2(F_W + 1);

  logic [LVL_W-1:0] lvl;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (start) begin
      lvl <= LVL_W'(F_MID);
      cnt <= '0;
    end else if (en) begin
      if (cnt == CNT_W'(SETTLE_CYCLES - 1)) begin
        cnt <= '0;
        if (up && !dn && lvl != LVL_W'(F_W)) lvl <= lvl + 1'b1;
        else if (dn && !up && lvl != '0)      lvl <= lvl - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < F_W; i++) f[i] = (LVL_W'(i) < lvl);
  end

  // F is always a thermometer code (ones only in the low bits)
  a_thermometer: assert property (@(posedge clk) (f & (f + 1'b1)) == '0);

endmodule
