`timescale 1ps/1ps
// End-to-end test of the clock generator at its default parameters.
//
// For every multiplier setting B = 000..111 (factor M = 1..8) the reference
// period is chosen so that the loop can lock, Reset is pulsed, and the test
// checks:
//   - LD rises exactly 14 Ref_clk edges after Reset falls (2 Start cycles,
//     then 3 SAR decisions of 4 cycles each);
//   - the coarse code C and the fine level F equal the values of an
//     independent model of the binary search and of the dead-zone walk, using
//     the delay-line equation cell = 300 + 60*C + 25*ones(F) + 600*S ps;
//   - Clkout has exactly 16*M rising edges in 16 reference periods, every
//     output period and high time is within the dead zone of T/M and T/(2M),
//     and Clkoutb is the complement of Clkout.
// It then runs the operating points x2 and x3 from 400 MHz, x5 from 200 MHz
// and x8 from 150 MHz, which give 800 MHz, 1.2 GHz, 1 GHz and 1.2 GHz.
// It also runs S = 1 (factor 1 at a lower reference frequency) and a
// reference-frequency step after lock that the fine loop must follow
// downwards. Each mechanism is counted and must occur at least once.
module tb_clock_generator;

  // delay-line model constants, restated from the specification
  localparam int T0 = 300, TC = 60, TF = 25, TS = 600, DZ = 450;
  localparam int FMID = 2, SETTLE = 4;

  logic       ref_clk, reset, s;
  logic [2:0] b;
  logic       clkout, clkoutb, ld;
  logic [2:0] c;
  logic [4:0] f;

  int checks = 0, failures = 0;
  int period_ps = 2400;
  longint unsigned ref_edges = 0;

  // mechanism counters
  int n_coarse_lock = 0, n_sar_clear = 0, n_fine_up = 0, n_fine_down = 0;
  int n_deadzone_hold = 0, n_s_range = 0, n_mode_switch = 0, n_track = 0, n_workload = 0;
  bit [7:0] mult_seen = '0;

  clock_generator dut (
    .ref_clk, .reset, .s, .b, .clkout, .clkoutb, .ld, .c, .f
  );

  always begin
    // periods are multiples of 10 ps; wait in 5 ps steps
    ref_clk = 1'b1;
    repeat (period_ps / 10) #5;
    ref_clk = 1'b0;
    repeat (period_ps / 10) #5;
  end

  always @(posedge ref_clk) ref_edges++;

  // watchdog
  initial begin
    wait (ref_edges == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int ones(input logic [4:0] v);
    int n = 0;
    for (int i = 0; i < 5; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic int loop_delay(input int m, input int sv, input int cc, input int lvl);
    return 2 * m * (T0 + TC * cc + TF * lvl + TS * sv);
  endfunction

  // binary search from 100: a bit is cleared when the delay exceeds T
  function automatic int exp_c(input int m, input int sv, input int t);
    int cc = 0;
    for (int bit_i = 2; bit_i >= 0; bit_i--) begin
      cc |= (1 << bit_i);
      if (loop_delay(m, sv, cc, FMID) > t) cc &= ~(1 << bit_i);
    end
    return cc;
  endfunction

  // fine walk: up while the loop is short, down while beyond the dead zone
  function automatic int exp_lvl(input int m, input int sv, input int t, input int cc, input int lvl0);
    int lvl = lvl0;
    for (int i = 0; i < 10; i++) begin
      if (loop_delay(m, sv, cc, lvl) < t && lvl < 5) lvl++;
      else if (loop_delay(m, sv, cc, lvl) > t + DZ && lvl > 0) lvl--;
    end
    return lvl;
  endfunction

  // monitors for SAR clears and fine steps
  logic [2:0] c_prev;
  int         lvl_prev;
  always @(posedge ref_clk) begin
    if (!reset) begin
      if (!ld && ((c_prev & ~c) != 0) && !(c_prev == 3'b100 && c == 3'b100)) n_sar_clear++;
      if (ld && ones(f) > lvl_prev) n_fine_up++;
      if (ld && ones(f) < lvl_prev) n_fine_down++;
    end
    c_prev   <= c;
    lvl_prev <= ones(f);
  end

  task automatic wait_edges(input int n);
    repeat (n) @(posedge ref_clk);
  endtask

  // measure Clkout over 16 reference periods
  task automatic measure(input int m);
    int rises = 0;
    realtime t_rise_last = 0, t_rise = 0, t_fall = 0;
    bit have_rise = 0;
    realtime t_end;
    int per_bad = 0, high_bad = 0, comp_bad = 0;
    @(posedge ref_clk);
    t_end = $realtime + 16.0 * period_ps;
    fork
      begin
        while ($realtime < t_end) begin
          @(clkout or posedge ref_clk);
          if ($realtime >= t_end) break;
          #1;
          if (clkoutb !== ~clkout) comp_bad++;
        end
      end
      begin
        while (1) begin
          @(posedge clkout);
          if ($realtime >= t_end) break;
          rises++;
          t_rise = $realtime;
          if (have_rise) begin
            if ((t_rise - t_rise_last) > real'(period_ps) / m + DZ + 10 ||
                (t_rise - t_rise_last) < real'(period_ps) / m - DZ - 10) per_bad++;
          end
          have_rise   = 1;
          t_rise_last = t_rise;
          @(negedge clkout);
          t_fall = $realtime;
          if ((t_fall - t_rise) > real'(period_ps) / (2 * m) + DZ + 10 ||
              (t_fall - t_rise) < real'(period_ps) / (2 * m) - DZ - 10) high_bad++;
        end
      end
    join_any
    disable fork;
    check(rises == 16 * m, $sformatf("M=%0d: %0d Clkout rises in 16 periods", m, rises));
    check(per_bad == 0, $sformatf("M=%0d: %0d output periods off T/M", m, per_bad));
    check(high_bad == 0, $sformatf("M=%0d: %0d high times off T/2M", m, high_bad));
    check(comp_bad == 0, $sformatf("M=%0d: Clkoutb not complementary %0d times", m, comp_bad));
  endtask

  // reset, lock, check codes and output
  task automatic run_case(input int m, input int sv, input int t);
    int edges_to_ld = 0;
    int ec, el;
    period_ps = t;
    b = 3'(m - 1);
    s = sv[0];
    reset = 1'b1;
    wait_edges(3);
    @(negedge ref_clk);
    reset = 1'b0;
    while (!ld && edges_to_ld < 200) begin
      @(posedge ref_clk);
      #1;
      edges_to_ld++;
    end
    check(edges_to_ld == 2 + 3 * SETTLE, $sformatf("M=%0d: LD after %0d edges", m, edges_to_ld));
    if (ld) n_coarse_lock++;
    ec = exp_c(m, sv, t);
    check(int'(c) == ec, $sformatf("M=%0d S=%0d T=%0d: C=%0d expected %0d", m, sv, t, c, ec));
    wait_edges(6 * SETTLE * 2);
    el = exp_lvl(m, sv, t, ec, FMID);
    check(ones(f) == el, $sformatf("M=%0d: fine level %0d expected %0d", m, ones(f), el));
    check(f == 5'((1 << el) - 1), "F is a thermometer code");
    // dead zone: no further steps once locked
    begin
      logic [4:0] f_hold;
      f_hold = f;
      wait_edges(5 * SETTLE);
      check(f == f_hold, $sformatf("M=%0d: fine code moved inside the dead zone", m));
      if (f == f_hold) n_deadzone_hold++;
    end
    measure(m);
    if (failures == 0) mult_seen[m-1] = 1'b1;
    if (sv != 0) n_s_range++;
  endtask

  initial begin
    reset = 1'b1;
    s     = 1'b0;
    b     = 3'd1;
    c_prev = '0;
    lvl_prev = 0;
    // every factor, reference period 1.2 ns * M (cell delay near 600 ps)
    for (int m = 1; m <= 8; m++) begin
      run_case(m, 0, 1200 * m);
      if (m > 1) n_mode_switch++;
    end
    // measured operating points: x2 and x3 from 400 MHz, x5 from 200 MHz,
    // x8 from 150 MHz (6.67 ns)
    run_case(2, 0, 2500);
    run_case(3, 0, 2500);
    run_case(5, 0, 5000);
    run_case(8, 0, 6670);
    n_workload += 4;
    // S = 1 range: factor 1 at 2.2 ns reference (two fine steps up)
    run_case(1, 1, 2200);
    // reference frequency step: lock at 2.4 ns, then shorten to 1.95 ns
    run_case(2, 0, 2400);
    begin
      int lvl_before;
      int el;
      lvl_before = ones(f);
      period_ps = 1950;
      wait_edges(8 * SETTLE);
      el = exp_lvl(2, 0, 1950, int'(c), lvl_before);
      check(ones(f) == el, $sformatf("tracking: fine level %0d expected %0d", ones(f), el));
      check(ones(f) < lvl_before, "tracking: fine loop stepped down");
      if (ones(f) < lvl_before) n_track++;
      measure(2);
    end

    check(n_coarse_lock > 0, "coarse lock never happened");
    check(n_sar_clear > 0, "SAR never cleared a trial bit");
    check(n_fine_up > 0, "fine loop never stepped up");
    check(n_fine_down > 0, "fine loop never stepped down");
    check(n_deadzone_hold > 0, "dead zone never held the counter");
    check(n_s_range > 0, "S range never used");
    check(n_mode_switch > 0, "multiplier never switched");
    check(n_track > 0, "frequency step never tracked");
    check(mult_seen == 8'hff, $sformatf("factors locked: %b", mult_seen));
    $display("coarse_locks=%0d sar_clears=%0d fine_up=%0d fine_down=%0d deadzone_holds=%0d s_runs=%0d mode_switches=%0d tracking=%0d",
             n_coarse_lock, n_sar_clear, n_fine_up, n_fine_down, n_deadzone_hold, n_s_range, n_mode_switch, n_track);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
