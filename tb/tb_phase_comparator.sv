`timescale 1ps/1ps
// Test of the coarse phase comparator: Int_clk is Ref_clk delayed by a chosen
// amount; Comp must be high when the Int_clk edge comes after the Ref_clk
// edge (delay modulo the period below half a period) and low otherwise.
module tb_phase_comparator;

  localparam int T = 2000;
  logic ref_clk = 1'b0, int_clk, comp;
  int unsigned dly = 300;
  int checks = 0, failures = 0;
  int cyc = 0;

  tb_delay u_dly (.in(ref_clk), .dly_ps(dly), .out(int_clk));
  phase_comparator dut (.ref_clk, .int_clk, .comp);

  always #(T/2) ref_clk = ~ref_clk;
  always @(posedge ref_clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // sweep the delay over (0.5 T, 1.5 T) in 50 ps steps, skipping the
    // ambiguous point at exactly one period
    for (int d = 1050; d <= 2950; d += 50) begin
      bit expect_comp;
      if (d == T) continue;
      dly = d;
      repeat (5) @(posedge ref_clk);
      #10;
      expect_comp = ((d % T) < T / 2);
      checks++;
      if (comp !== expect_comp) begin
        failures++;
        $display("FAIL: delay %0d comp=%0d expected %0d", d, comp, expect_comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
