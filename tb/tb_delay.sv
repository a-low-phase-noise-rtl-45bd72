`timescale 1ps/1ps
// Testbench helper: transport delay of a one-bit signal by dly_ps
// picoseconds (rounded down to 5 ps steps). Each input change is scheduled
// independently, so pulses shorter than the delay pass through.
module tb_delay (
  input  logic        in,
  input  int unsigned dly_ps,
  output logic        out
);

  task automatic launch(input logic v, input int unsigned steps);
    fork
      begin
        repeat (steps) #5;
        out = v;
      end
    join_none
  endtask

  initial out = 1'b0;

  always begin
    @(in);
    launch(in, dly_ps / 5);
  end

endmodule
