`timescale 1ps/1ps
// Test of the DLL core on its own: the testbench feeds back tap P(2M) as
// Int_clk. For three operating points it checks LD after 14 Ref_clk edges,
// the coarse code and fine level against an independent model of the search
// (cell = 300 + 60*C + 25*ones(F) + 600*S ps, 450 ps dead zone), and that
// after lock the P(2M) rising edge falls within the dead zone after the
// Ref_clk edge.
module tb_dll_core;

  localparam int T0 = 300, TC = 60, TF = 25, TS = 600, DZ = 450, FMID = 2;
  logic ref_clk, reset, s, int_clk, ld;
  logic [15:0] p, pb;
  logic [2:0] c;
  logic [4:0] f;
  int period_ps = 2400;
  int m_sel = 2;
  int checks = 0, failures = 0;
  int cyc = 0;

  dll_core dut (.ref_clk, .reset, .s, .int_clk, .p, .pb, .ld, .c, .f);

  assign int_clk = p[2 * m_sel - 1];

  always begin
    ref_clk = 1'b1;
    repeat (period_ps / 10) #5;
    ref_clk = 1'b0;
    repeat (period_ps / 10) #5;
  end
  always @(posedge ref_clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic int loop_delay(input int m, input int sv, input int cc, input int lvl);
    return 2 * m * (T0 + TC * cc + TF * lvl + TS * sv);
  endfunction

  task automatic run(input int m, input int sv, input int t, input int exp_c, input int exp_l);
    int edges;
    realtime tr;
    period_ps = t; m_sel = m; s = sv[0];
    reset = 1'b1;
    repeat (3) @(posedge ref_clk);
    @(negedge ref_clk) reset = 1'b0;
    edges = 0;
    while (!ld && edges < 100) begin
      @(posedge ref_clk);
      #1 edges++;
    end
    check(edges == 14, $sformatf("M=%0d: LD after %0d edges", m, edges));
    check(int'(c) == exp_c, $sformatf("M=%0d: C=%0d expected %0d", m, c, exp_c));
    repeat (48) @(posedge ref_clk);
    check(f == 5'((1 << exp_l) - 1), $sformatf("M=%0d: F=%b expected level %0d", m, f, exp_l));
    @(posedge ref_clk);
    tr = $realtime;
    @(posedge int_clk);
    check(($realtime - tr) >= 0 && ($realtime - tr) <= DZ,
          $sformatf("M=%0d: Int_clk %0t after Ref_clk", m, $realtime - tr));
    // worked-out lock condition
    check(loop_delay(m, sv, exp_c, exp_l) >= t && loop_delay(m, sv, exp_c, exp_l) <= t + DZ,
          "expected codes satisfy the lock window");
  endtask

  initial begin
    reset = 1'b1; s = 1'b0;
    // hand-worked: M=2, T=2400: 4*(300+240+50)=2360 < 2400 -> C=4, level 3 (2460)
    run(2, 0, 2400, 4, 3);
    // M=8, T=9600: 16*590=9440 -> C=4, level 3 (9840)
    run(8, 0, 9600, 4, 3);
    // M=1, S=1, T=2200: C=2 (2*1070=2140), level 4 (2240)
    run(1, 1, 2200, 2, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
