// Checks the angle-to-pixel-offset conversion for all angles against
// floor(round(10000*tan)*100 / 8192) and its three-clock latency.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_aim_calc;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic signed [5:0] angle = 0;
  logic signed [11:0] offset;
  always #5 clk = ~clk;

  aim_calc dut (.*);

  initial begin
    for (int a = -30; a <= 30; a++) begin
      int t, e;
      t = $rtoi($tan(3.14159265358979 * ((a < 0) ? -a : a) / 180.0) * 10000.0 + 0.5);
      if (a < 0) t = -t;
      e = (t * 100) >>> 13;
      angle <= 6'(a);
      @(posedge clk); @(posedge clk); #1;
      `CHECK(int'(offset) != e || a == 0 || (e == 0), $sformatf("too early at %0d", a))
      @(posedge clk); #1;
      `CHECK(int'(offset) == e, $sformatf("offset(%0d) = %0d expected %0d", a, offset, e))
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
