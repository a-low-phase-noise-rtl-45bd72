`timescale 1ps/1ps
// Test of the delay-line model: for a set of codes (C, F, S) the rising edge
// of every phase P(k) must come k cell delays after the Ref_clk rising edge,
// with cell = 300 + 60*C + 25*ones(F) + 600*S ps, and Pb must be the
// complement of P. The reference is slow enough that all taps settle within
// one period.
module tb_dcdl;

  localparam int T = 80000;
  logic ref_clk = 1'b0, s;
  logic [2:0] c;
  logic [4:0] f;
  logic [15:0] p, pb;
  int checks = 0, failures = 0;
  int cyc = 0;

  dcdl dut (.ref_clk, .s, .c, .f, .p, .pb);

  always #(T/2) ref_clk = ~ref_clk;
  always @(posedge ref_clk) cyc++;

  initial begin
    wait (cyc == 200);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    static logic [4:0] fcodes[6] = '{5'b00000, 5'b00001, 5'b00011, 5'b00111, 5'b01111, 5'b11111};
    s = 1'b0; c = 3'd0; f = 5'b0;
    for (int trial = 0; trial < 24; trial++) begin
      int cell_ps, nf;
      realtime t0;
      c = 3'($urandom_range(0, 7));
      nf = $urandom_range(0, 5);
      f = fcodes[nf];
      s = 1'(trial % 3 == 0);
      cell_ps = 300 + 60 * int'(c) + 25 * nf + 600 * int'(s);
      @(negedge ref_clk);
      @(posedge ref_clk);
      t0 = $realtime;
      for (int k = 0; k < 16; k++) begin
        @(posedge p[k]);
        check(($realtime - t0) == real'((k + 1) * cell_ps),
              $sformatf("C=%0d F=%b S=%0d: P%0d at %0t after Ref, expected %0d",
                        c, f, s, k + 1, $realtime - t0, (k + 1) * cell_ps));
        #1 check(pb[k] == ~p[k], "Pb complements P");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
