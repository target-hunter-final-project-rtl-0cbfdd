// Checks the camera-to-screen mapping with and without the gyro offsets,
// the clamping at the screen edges and that hold freezes the sight.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_aim_combiner;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, gyro_en = 0, hold = 0;
  logic [10:0] cam_x = 0, adj_x, aim_x; logic [9:0] cam_y = 0, adj_y, aim_y;
  logic signed [11:0] dx = 0, dy = 0;
  always #5 clk = ~clk;

  aim_combiner dut (.*);

  function automatic int clampi(int v, int hi);
    return v < 0 ? 0 : v > hi ? hi : v;
  endfunction

  initial begin
    int cx, cy, ex, ey;
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      cam_x <= 11'($urandom % 640); cam_y <= 10'($urandom % 480);
      dx <= 12'(int'($urandom % 121) - 60); dy <= 12'(int'($urandom % 121) - 60);
      gyro_en <= 1'($urandom);
      hold <= (i % 10 == 9);
      @(posedge clk); #1;
      if (!hold) begin
        cx = int'(cam_x) + (gyro_en ? int'(dx) : 0);
        cy = int'(cam_y) + (gyro_en ? int'(dy) : 0);
        ex = clampi(640 - (((cx - 20) * 1084) >>> 10), 639);
        ey = clampi(((cy - 40) * 1170) >>> 10, 479);
        `CHECK(int'(aim_x) == ex && int'(aim_y) == ey,
               $sformatf("cam %0d,%0d -> %0d,%0d expected %0d,%0d", cx, cy, aim_x, aim_y, ex, ey))
        `CHECK(int'(adj_x) == clampi(cx, 2047) && int'(adj_y) == clampi(cy, 1023), "corrected camera point")
      end else begin
        `CHECK(int'(aim_x) == ex && int'(aim_y) == ey, "held")
      end
    end
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
