`timescale 1ps/1ps
// Test of the fine up/down counter: Start loads level 2 (F = 00011); with
// En low nothing moves; with En high one step happens every SETTLE_CYCLES
// edges in the requested direction, saturating at 0 and 5; neither or both
// requests hold. F is compared with a reference counter after every edge.
module tb_updn_counter;

  localparam int SETTLE = 4;
  logic clk = 1'b0, start, en, up, dn;
  logic [4:0] f;
  int checks = 0, failures = 0;
  int cyc = 0;
  int ref_lvl, ref_cnt;

  updn_counter #(.SETTLE_CYCLES(SETTLE)) dut (.clk, .start, .en, .up, .dn, .f);

  always #500 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit e, input bit u, input bit d);
    @(negedge clk);
    en = e; up = u; dn = d; start = 1'b0;
    @(posedge clk);
    if (e) begin
      if (ref_cnt == SETTLE - 1) begin
        ref_cnt = 0;
        if (u && !d && ref_lvl < 5) ref_lvl++;
        else if (d && !u && ref_lvl > 0) ref_lvl--;
      end else ref_cnt++;
    end
    #1;
    checks++;
    if (f !== 5'((1 << ref_lvl) - 1)) begin
      failures++;
      $display("FAIL @%0t: f=%b expected level %0d", $time, f, ref_lvl);
    end
  endtask

  initial begin
    @(negedge clk);
    start = 1'b1; en = 1'b0; up = 1'b0; dn = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (f !== 5'b00011) begin failures++; $display("FAIL: start level f=%b", f); end
    ref_lvl = 2; ref_cnt = 0;
    repeat (10) step(0, 1, 0);         // disabled
    repeat (40) step(1, 1, 0);         // up to saturation
    repeat (12) step(1, 0, 0);         // hold
    repeat (12) step(1, 1, 1);         // both: hold
    repeat (40) step(1, 0, 1);         // down to saturation
    repeat (200) step(1, 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
