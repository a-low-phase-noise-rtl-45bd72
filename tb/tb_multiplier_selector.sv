`timescale 1ps/1ps
// Test of the multiplier selector against its truth table: for every B the
// feedback Int_clk must be P(2B+2) (B=000 -> P2 ... B=111 -> P16) and D[8:1]
// must enable exactly pairs 1..B+1. Phases are random vectors.
module tb_multiplier_selector;

  logic [2:0]  b;
  logic [15:0] p;
  logic        int_clk;
  logic [7:0]  d;
  int checks = 0, failures = 0;

  multiplier_selector dut (.b, .p, .int_clk, .d);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Table I: phase number selected for B = 0..7
    static int tap[8] = '{2, 4, 6, 8, 10, 12, 14, 16};
    for (int i = 0; i < 400; i++) begin
      logic [7:0] de;
      b = 3'(i % 8);
      p = 16'($urandom);
      #10;
      de = 8'((1 << (int'(b) + 1)) - 1);
      checks++;
      if (int_clk !== p[tap[b] - 1] || d !== de) begin
        failures++;
        $display("FAIL: B=%0d p=%h int_clk=%0d d=%b", b, p, int_clk, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
