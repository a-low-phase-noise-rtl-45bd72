`timescale 1ps/1ps
// Test of the initial circuit: Start must be high during Reset, stay high
// for exactly two Ref_clk rising edges after Reset falls, then stay low.
module tb_initial_circuit;

  logic ref_clk = 1'b0, reset, start;
  int checks = 0, failures = 0;
  int cyc = 0;

  initial_circuit dut (.ref_clk, .reset, .start);

  always #500 ref_clk = ~ref_clk;
  always @(posedge ref_clk) cyc++;

  initial begin
    wait (cyc == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    reset = 1'b1;
    #1200;
    for (int trial = 0; trial < 10; trial++) begin
      int hi;
      reset = 1'b1;
      #(100 + $urandom_range(0, 200));
      check(start == 1'b1, "Start high while Reset is high");
      repeat (1 + $urandom_range(0, 3)) @(posedge ref_clk);
      #10 check(start == 1'b1, "Start high during Reset, after edges");
      @(negedge ref_clk);
      reset = 1'b0;
      hi = 0;
      repeat (6) begin
        @(posedge ref_clk);
        #10;
        if (start) hi++;
      end
      check(hi == 1, $sformatf("Start high for %0d extra edges after release, expected 1 (2 edges total)", hi));
      check(start == 1'b0, "Start low after initialisation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
