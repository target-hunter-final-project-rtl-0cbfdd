// Runs a target for many frames against a testbench model of the bouncing
// motion, checks that pause freezes it and that it stays near the box.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_target_mover;
  int checks = 0, failures = 0, bounces = 0;
  logic clk = 0, rst = 1, frame_tick = 0, pause = 0, bounced;
  logic [4:0] speed = 5'd7;
  logic [10:0] x; logic [9:0] y;
  always #5 clk = ~clk;

  target_mover #(.START_X(100), .START_Y(300), .START_VX(1'b1), .START_VY(1'b0)) dut (.*);

  int mx, my; bit vx, vy;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    mx = 100; my = 300; vx = 1; vy = 0;
    `CHECK(x == 100 && y == 300, "reset position")
    for (int f = 0; f < 400; f++) begin
      bit nvx, nvy;
      pause = (f % 50) >= 45;
      frame_tick <= 1; @(posedge clk); frame_tick <= 0; @(posedge clk); #1;
      if (!pause) begin
        nvx = vx; nvy = vy;
        if (my >= 410) nvy = 1;
        if (mx >= 560) nvx = 0;
        if (mx <= 70)  nvx = 1;
        if (my <= 70)  nvy = 0;
        mx = vx ? mx + speed : mx - speed;
        my = vy ? my - speed : my + speed;
        if (nvx != vx || nvy != vy) bounces++;
        vx = nvx; vy = nvy;
      end
      `CHECK(x == 11'(mx) && y == 10'(my), $sformatf("frame %0d: %0d,%0d expected %0d,%0d", f, x, y, mx, my))
      `CHECK(x >= 70 - 2 * 7 && x <= 560 + 2 * 7 && y >= 70 - 2 * 7 && y <= 410 + 2 * 7, "inside box")
      repeat (3) @(posedge clk);
    end
    `CHECK(bounces > 5, $sformatf("bounces %0d", bounces))
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
