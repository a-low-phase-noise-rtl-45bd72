`timescale 1ps/1ps
// Test of the dead-zone phase detector: Int_clk is Ref_clk delayed by one
// period plus an offset, Ref_clk_late is Ref_clk delayed by the 300 ps dead
// zone. Offset < 0 (Int leads) must give Up_F only, offset inside (0, 300)
// neither, offset > 300 (Int lags) Dn_F only.
module tb_phase_detector;

  localparam int T = 2000, DZ = 300;
  logic ref_clk = 1'b0, ref_clk_late, int_clk, up, dn;
  int unsigned dly = T;
  int checks = 0, failures = 0;
  int cyc = 0;

  tb_delay u_late (.in(ref_clk), .dly_ps(DZ), .out(ref_clk_late));
  tb_delay u_int  (.in(ref_clk), .dly_ps(dly), .out(int_clk));
  phase_detector dut (.ref_clk, .ref_clk_late, .int_clk, .up, .dn);

  always #(T/2) ref_clk = ~ref_clk;
  always @(posedge ref_clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int offs[9] = '{-400, -100, -20, 20, 150, 280, 320, 500, 800};
    foreach (offs[i]) begin
      bit eu, ed;
      dly = int'(T + offs[i]);
      repeat (6) @(posedge ref_clk);
      eu = offs[i] < 0;
      ed = offs[i] > DZ;
      repeat (3) begin
        @(posedge ref_clk);
        #10;
        checks++;
        if (up !== eu || dn !== ed) begin
          failures++;
          $display("FAIL: offset %0d up=%0d dn=%0d expected %0d %0d", offs[i], up, dn, eu, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
