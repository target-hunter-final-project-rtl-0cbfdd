// Checks the VGA scan generator over two whole frames against counters
// kept by the testbench: line and frame length, sync pulse positions and
// widths, blanking and the frame-start pulse.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_vga_timing;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [10:0] hcount; logic [9:0] vcount;
  logic hsync_n, vsync_n, blank, frame_start;
  always #20 clk = ~clk;

  vga_timing dut (.*);

  int exp_h, exp_v, cyc, fs_count, hs_low, hs_pulses;
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    // first cycle after reset release: position (0,0) was shown during reset
    exp_h = hcount; exp_v = vcount;
    fs_count = 0; hs_low = 0; hs_pulses = 0;
    for (cyc = 0; cyc < 2 * 800 * 524; cyc++) begin
      `CHECK(hcount == exp_h && vcount == exp_v, $sformatf("position %0d,%0d expected %0d,%0d", hcount, vcount, exp_h, exp_v))
      `CHECK(hsync_n == !(exp_h >= 656 && exp_h < 752), $sformatf("hsync at h=%0d", exp_h))
      `CHECK(vsync_n == !(exp_v >= 491 && exp_v < 493), $sformatf("vsync at v=%0d", exp_v))
      `CHECK(blank == (exp_h >= 640 || exp_v >= 480), $sformatf("blank at %0d,%0d", exp_h, exp_v))
      `CHECK(frame_start == (exp_h == 0 && exp_v == 0), "frame_start")
      if (frame_start) fs_count++;
      if (!hsync_n) hs_low++;
      exp_h++;
      if (exp_h == 800) begin exp_h = 0; exp_v = (exp_v == 523) ? 0 : exp_v + 1; end
      @(posedge clk); #1;
    end
    `CHECK(fs_count == 2, $sformatf("frame starts %0d", fs_count))
    `CHECK(hs_low == 2 * 524 * 96, $sformatf("hsync low cycles %0d", hs_low))
    `TB_DONE
  end
  initial begin
    repeat (3 * 800 * 524) @(posedge clk);
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
