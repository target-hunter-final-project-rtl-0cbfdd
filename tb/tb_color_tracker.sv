// Scans small frames (24x12 visible) holding a block of "ball colour"
// pixels plus lone noise pixels and checks the per-frame sums and count
// that the tracker reports against sums computed by the testbench.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_color_tracker;
  localparam int HA = 24, VA = 12, HT = 30, VT = 15;
  int checks = 0, failures = 0, frames_done = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [10:0] hcount = 0; logic [9:0] vcount = 0;
  logic [7:0] h, s, v;
  logic match, frame_done;
  logic [30:0] sum_x, sum_y; logic [22:0] count;

  color_tracker #(.H_ACTIVE(HA), .V_ACTIVE(VA)) dut (.*);

  bit ball [VT][HT];
  function automatic void make_frame(int bx, int by, int bw, int bh);
    for (int yy = 0; yy < VT; yy++) for (int xx = 0; xx < HT; xx++)
      ball[yy][xx] = (xx >= bx && xx < bx + bw && yy >= by && yy < by + bh);
    ball[1][3] = 1;     // isolated noise pixel: not counted
    ball[9][20] = 1;
  endfunction

  initial begin
    longint ex, ey, en;
    repeat (2) @(posedge clk); rst <= 0;
    for (int f = 0; f < 4; f++) begin
      int bx = 3 + 4 * f, by = 2 + f, bw = 4 + f, bh = 3;
      make_frame(bx, by, bw, bh);
      ex = 0; ey = 0; en = 1;
      for (int yy = 0; yy < VT; yy++)
        for (int xx = 0; xx < HT; xx++) begin
          hcount <= 11'(xx); vcount <= 10'(yy);
          // ball colour or a background colour outside the window
          if (ball[yy][xx]) begin h <= 8'h30; s <= 8'h60; v <= 8'd200; end
          else if ((xx + yy) % 3 == 0) begin h <= 8'h30; s <= 8'h20; v <= 8'd200; end
          else begin h <= 8'h90; s <= 8'h60; v <= 8'd200; end
          if (xx < HA && yy < VA && ball[yy][xx] && xx > 0 && ball[yy][xx-1] && !(xx == 0 && yy == 0)) begin
            ex += xx; ey += yy; en++;
          end
          @(posedge clk);
        end
      // the frame's totals appear when the scan passes (HA, VA)
      #1;
      `CHECK(sum_x == 31'(ex) && sum_y == 31'(ey) && count == 23'(en),
             $sformatf("frame %0d: %0d,%0d,%0d expected %0d,%0d,%0d", f, sum_x, sum_y, count, ex, ey, en))
      `CHECK(sum_x / count == 31'(ex / en), "centre")
    end
    `CHECK(frames_done == 4, $sformatf("frame_done pulses %0d", frames_done))
    `TB_DONE
  end
  always @(posedge clk) if (frame_done && !rst) frames_done++;
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
