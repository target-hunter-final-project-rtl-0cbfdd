// Random camera pixels, match flags and centre positions: the output must
// be yellow on the two centre lines and on matched pixels, the camera
// pixel elsewhere, one clock later.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_track_overlay;
  int checks = 0, failures = 0, yellow = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [10:0] hcount, cx; logic [9:0] vcount, cy;
  logic [23:0] cam_rgb, pixel; logic match;

  track_overlay dut (.*);

  initial begin
    logic [23:0] e;
    for (int i = 0; i < 4000; i++) begin
      hcount = 11'($urandom % 16); vcount = 10'($urandom % 16);
      cx = 11'($urandom % 16); cy = 10'($urandom % 16);
      cam_rgb = 24'($urandom); match = ($urandom % 4 == 0);
      e = (hcount == cx || vcount == cy || match) ? 24'hFFFF00 : cam_rgb;
      if (e == 24'hFFFF00) yellow++;
      @(posedge clk); #1;
      `CHECK(pixel == e, $sformatf("pixel %h expected %h", pixel, e))
    end
    `CHECK(yellow > 500, "yellow pixels seen")
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
