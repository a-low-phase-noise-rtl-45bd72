`timescale 1ps/1ps
// Test of the edge combiner latch: any B_x drives Out low and Outb high, any
// B_xb drives Out high and Outb low, no pulse holds the previous state, and
// both at once give Out low. Random pulse patterns are compared with a
// reference latch.
module tb_edge_combiner;

  logic [7:0] bx, bxb;
  logic       out, outb;
  logic       ref_q;
  int checks = 0, failures = 0;

  edge_combiner dut (.bx, .bxb, .out, .outb);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] a, input logic [7:0] ab);
    bx = a; bxb = ab;
    #10;
    if (|a) ref_q = 1'b0;
    else if (|ab) ref_q = 1'b1;
    checks++;
    if (out !== ref_q || outb !== ~ref_q) begin
      failures++;
      $display("FAIL: bx=%b bxb=%b out=%0d outb=%0d expected %0d", a, ab, out, outb, ref_q);
    end
  endtask

  initial begin
    apply(8'h01, 8'h00);                 // Table II row 1
    apply(8'h00, 8'h00);                 // hold low
    apply(8'h00, 8'h01);                 // Table II row 2
    apply(8'h00, 8'h00);                 // hold high
    apply(8'h80, 8'h00);
    apply(8'h00, 8'h40);
    apply(8'h02, 8'h02);                 // both: Out low
    for (int i = 0; i < 500; i++) begin
      logic [7:0] a, ab;
      a  = ($urandom_range(0, 2) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;
      ab = ($urandom_range(0, 2) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;
      apply(a, ab);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
