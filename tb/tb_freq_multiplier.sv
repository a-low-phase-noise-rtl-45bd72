`timescale 1ps/1ps
// Test of the frequency multiplier with ideal phases: P(k) is Ref_clk
// delayed by k*T/(2M), as a locked delay line would give. For every factor
// M = 1..8 (B = M-1) the test checks Int_clk = P(2M), exactly 16*M Clkout
// rising edges in 16 reference periods, every Clkout period equal to T/M and
// every high time equal to T/(2M), and Clkoutb = not Clkout.
module tb_freq_multiplier;

  logic ref_clk = 1'b0;
  logic [2:0]  b;
  logic [15:0] p, pb;
  logic        int_clk, clkout, clkoutb;
  int unsigned period = 3200;
  int unsigned step = 800;
  int checks = 0, failures = 0;
  int cyc = 0;

  for (genvar k = 0; k < 16; k++) begin : g_ph
    tb_delay u_d (.in(ref_clk), .dly_ps((k + 1) * step), .out(p[k]));
    assign pb[k] = ~p[k];
  end

  freq_multiplier dut (.b, .p, .pb, .int_clk, .clkout, .clkoutb);

  always begin
    repeat (period / 10) #5;
    ref_clk = ~ref_clk;
  end
  always @(posedge ref_clk) cyc++;
  realtime t_ref_rise;
  always @(posedge ref_clk) t_ref_rise = $realtime;

  initial begin
    wait (cyc == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int m = 1; m <= 8; m++) begin
      int rises, bad_per, bad_hi, bad_comp, bad_int, bad_align;
      realtime t_end, t_last, t_r;
      b = 3'(m - 1);
      period = 1600 * m;
      step = 800;
      repeat (4) @(posedge ref_clk);
      rises = 0; bad_align = 0; bad_per = 0; bad_hi = 0; bad_comp = 0; bad_int = 0;
      t_last = -1;
      t_end = $realtime + 16.0 * period;
      while ($realtime < t_end) begin
        @(posedge clkout or posedge ref_clk);
        if ($realtime >= t_end) break;
        #1;
        if (clkoutb !== ~clkout) bad_comp++;
        if (int_clk !== p[2 * m - 1]) bad_int++;
      end
      // rising edges and high times in a second pass, in a window that
      // starts between edges
      @(negedge ref_clk);
      #3;
      t_end = $realtime + 16.0 * period;
      t_last = -1;
      while (1) begin
        @(posedge clkout);
        if ($realtime >= t_end) break;
        rises++;
        t_r = $realtime;
        // rising edges come from B_xb, i.e. at the P(2x) edges: multiples of
        // T/M after the Ref_clk rising edge
        if ((longint'(t_r - t_ref_rise) % longint'(period / m)) != 0) bad_align++;
        if (t_last >= 0 && (t_r - t_last) != real'(period) / m) bad_per++;
        t_last = t_r;
        @(negedge clkout);
        if (($realtime - t_r) != real'(period) / (2 * m)) bad_hi++;
      end
      check(rises == 16 * m, $sformatf("M=%0d: %0d rises in 16 periods", m, rises));
      check(bad_per == 0, $sformatf("M=%0d: %0d periods not T/M", m, bad_per));
      check(bad_align == 0, $sformatf("M=%0d: %0d rises not at P(2x) edges", m, bad_align));
      check(bad_hi == 0, $sformatf("M=%0d: %0d high times not T/2M", m, bad_hi));
      check(bad_comp == 0, $sformatf("M=%0d: Clkoutb not complementary", m));
      check(bad_int == 0, $sformatf("M=%0d: Int_clk is not P%0d", m, 2 * m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
