`timescale 1ps/1ps
// Successive approximation register (SAR) of the coarse tune loop, including
// its initial circuit.
//
// While Start is high the coarse code C is loaded with mid-code 3'b100 and LD
// is cleared. Afterwards the SAR decides one bit per SETTLE_CYCLES Ref_clk
// cycles, most significant first: if Comp is high (Ref_clk leads, so the line
// delay is too long) the trial bit is cleared, otherwise kept, and the next
// lower bit is set as the new trial. After the last bit LD (coarse lock) goes
// high and C is frozen until the next Start. The coarse search therefore ends
// 3*SETTLE_CYCLES Ref_clk rising edges after Start falls.
//
// Binary search from mid-code, the three-bit width and the LD output follow
// the design description; the settling interval between decisions is this
// design's choice, giving the delay line time to show the new code at Int_clk.
module sar
  import clkgen_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic           clk,
  input  logic           start,
  input  logic           comp,
  output logic [C_W-1:0] c,
  output logic           ld
);

  localparam int unsigned CNT_W = $clog2(SETTLE_CYCLES + 1);

  logic [$clog2(C_W)-1:0] idx;   // bit under trial
  logic [CNT_W-1:0]       cnt;   // cycles since the trial bit was set

  always_ff @(posedge clk) begin
    if (start) begin
      c   <= C_MID;
      idx <= $clog2(C_W)'(C_W - 1);
      cnt <= '0;
      ld  <= 1'b0;
    end else if (!ld) begin
      if (cnt == CNT_W'(SETTLE_CYCLES - 1)) begin
        cnt <= '0;
        if (idx == '0) begin
          c[0] <= ~comp;
          ld   <= 1'b1;
        end else begin
          c[idx]     <= ~comp;
          c[idx - 1] <= 1'b1;
          idx        <= idx - 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // once coarse lock is reached the code is frozen until the next Start
  a_frozen_after_lock: assert property (
    @(posedge clk) disable iff (start) (ld && $past(ld) && !$past(start)) |-> $stable(c)
  );

endmodule
