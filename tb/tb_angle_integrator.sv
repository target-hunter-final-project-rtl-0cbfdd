// Feeds rate readings to the angle integrator and compares with a
// clamped running total kept by the testbench (repeats ignored).
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_angle_integrator;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [7:0] rate;
  logic signed [5:0] angle;
  always #5 clk = ~clk;

  angle_integrator dut (.*);

  initial begin
    int tot, last, r;
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(angle == 0, "zero after reset")
    tot = 0; last = 0;
    for (int i = 0; i < 2000; i++) begin
      if (i % 7 == 3) r = last;             // a repeated reading
      else if (i < 100) r = 5;              // would saturate upward, but repeats
      else r = int'($urandom % 21) - 10;
      rate <= 8'(r); in_valid <= 1; @(posedge clk); in_valid <= 0; #1;
      if (r != last) begin
        tot += r;
        if (tot >= 30) tot = 30;
        if (tot <= -30) tot = -30;
      end
      last = r;
      `CHECK(int'(angle) == tot, $sformatf("step %0d: %0d vs %0d", i, angle, tot))
      // no change without in_valid
      rate <= 8'sd9; @(posedge clk); #1;
      `CHECK(int'(angle) == tot, "holds without in_valid")
    end
    // saturation both ways
    for (int i = 0; i < 20; i++) begin
      rate <= 8'(i % 2 ? 20 : 21); in_valid <= 1; @(posedge clk); in_valid <= 0; #1;
    end
    `CHECK(angle == 30, "upper limit")
    for (int i = 0; i < 20; i++) begin
      rate <= 8'(i % 2 ? -20 : -21); in_valid <= 1; @(posedge clk); in_valid <= 0; #1;
    end
    `CHECK(angle == -30, "lower limit")
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
