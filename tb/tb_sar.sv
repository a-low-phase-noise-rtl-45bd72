`timescale 1ps/1ps
// Test of the SAR: Comp is driven from a threshold model ("the delay is too
// long for codes >= K"). For every K = 0..8 the final code must be the
// largest code below K (0 if none), the start code must be 100, LD must rise
// exactly 3*SETTLE_CYCLES edges after Start falls, and C must stay frozen
// afterwards.
module tb_sar;

  localparam int SETTLE = 4;
  logic clk = 1'b0, start, comp, ld;
  logic [2:0] c;
  int k_thr = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  sar #(.SETTLE_CYCLES(SETTLE)) dut (.clk, .start, .comp, .c, .ld);

  always #500 clk = ~clk;
  always @(posedge clk) cyc++;
  assign comp = (int'(c) >= k_thr);

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

  initial begin
    for (int k = 0; k <= 8; k++) begin
      int edges, expc;
      logic [2:0] c_lock;
      k_thr = k;
      @(negedge clk) start = 1'b1;
      @(negedge clk);
      check(c == 3'b100 && !ld, "start loads 100 and clears LD");
      start = 1'b0;
      edges = 0;
      while (!ld && edges < 100) begin
        @(posedge clk);
        #1 edges++;
      end
      check(edges == 3 * SETTLE, $sformatf("K=%0d: LD after %0d edges", k, edges));
      expc = (k == 0) ? 0 : k - 1;
      check(int'(c) == expc, $sformatf("K=%0d: C=%0d expected %0d", k, c, expc));
      c_lock = c;
      k_thr = 8 - k;
      repeat (3 * SETTLE) @(posedge clk);
      #1 check(c == c_lock && ld, "C frozen after LD");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
