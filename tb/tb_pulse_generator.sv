`timescale 1ps/1ps
// Test of the pulse generator gates with random phase vectors (P and Pb
// drawn independently) and every enable pattern D = 1..M: B_x = P(2x-1) and
// P(2x)b, B_xb = P(2x) and P(2x+1)b, with P(2M+1) replaced by P1 for the last
// enabled pair, and disabled pairs low.
module tb_pulse_generator;

  logic [15:0] p, pb;
  logic [7:0]  d, bx, bxb;
  int checks = 0, failures = 0;

  pulse_generator dut (.p, .pb, .d, .bx, .bxb);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase numbers are 1-based as in the specification
  function automatic logic ph(input int n);  return p[n - 1];  endfunction
  function automatic logic phb(input int n); return pb[n - 1]; endfunction

  initial begin
    for (int i = 0; i < 800; i++) begin
      int m;
      logic [7:0] eb, ebb;
      m  = (i % 8) + 1;
      d  = 8'((1 << m) - 1);
      p  = 16'($urandom);
      pb = 16'($urandom);
      #10;
      eb = '0; ebb = '0;
      for (int x = 1; x <= m; x++) begin
        eb[x-1]  = ph(2 * x - 1) & phb(2 * x);
        ebb[x-1] = ph(2 * x) & phb((x == m) ? 1 : 2 * x + 1);
      end
      checks++;
      if (bx !== eb || bxb !== ebb) begin
        failures++;
        $display("FAIL: M=%0d p=%h pb=%h bx=%b/%b bxb=%b/%b", m, p, pb, bx, eb, bxb, ebb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
