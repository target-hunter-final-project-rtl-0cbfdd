// Checks every angle of the tangent table against round(10000*tan(deg))
// computed with the simulator's floating-point tangent.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_tan_lut;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic signed [5:0] angle;
  logic signed [16:0] tan;
  always #5 clk = ~clk;

  tan_lut dut (.*);

  initial begin
    for (int a = -32; a < 32; a++) begin
      int ac, e;
      ac = (a > 30) ? 30 : (a < -30) ? -30 : a;
      e = $rtoi($tan(3.14159265358979 * ((ac < 0) ? -ac : ac) / 180.0) * 10000.0 + 0.5);
      if (ac < 0) e = -e;
      angle <= 6'(a); @(posedge clk); #1;
      `CHECK(int'(tan) == e, $sformatf("tan(%0d) = %0d expected %0d", a, tan, e))
    end
    `TB_DONE
  end
  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
