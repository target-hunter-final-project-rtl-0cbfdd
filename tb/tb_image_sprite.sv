// Loads a small random picture and colour table into a sprite, then scans
// a window around it and compares each output pixel, two clocks late,
// with the pixel worked out from the testbench's own copy of the picture.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_image_sprite;
  localparam int W = 7, H = 5;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [10:0] x = 11'd30, hcount;
  logic [9:0]  y = 10'd12, vcount;
  logic [23:0] pixel;
  logic load_we = 0, pal_we = 0;
  logic [5:0] load_addr; logic [3:0] load_index, pal_addr; logic [23:0] pal_rgb;
  logic [3:0]  pic [W*H];
  logic [23:0] pal [16];

  image_sprite #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  logic [23:0] exp_q [$];
  initial begin
    for (int i = 0; i < 16; i++) pal[i] = {$urandom} & 24'hFFFFFF | 24'h000001;
    for (int i = 0; i < W*H; i++) pic[i] = 4'($urandom);
    @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      pal_we <= 1; pal_addr <= 4'(i); pal_rgb <= pal[i]; @(posedge clk);
    end
    pal_we <= 0;
    for (int i = 0; i < W*H; i++) begin
      load_we <= 1; load_addr <= 6'(i); load_index <= pic[i]; @(posedge clk);
    end
    load_we <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin x = 11'd0; y = 10'd0; end
      for (int v = int'(y) - 2; v < int'(y) + H + 2; v++)
        for (int h = int'(x) - 3; h < int'(x) + W + 3; h++) begin
          if (h < 0 || v < 0) continue;
          hcount <= 11'(h); vcount <= 10'(v);
          @(posedge clk); @(posedge clk); #1;
          if (h >= x && h < x + W && v >= y && v < y + H)
            `CHECK(pixel == pal[pic[(h - x) + (v - y) * W]], $sformatf("pixel %0d,%0d = %h", h, v, pixel))
          else
            `CHECK(pixel == 0, $sformatf("outside pixel %0d,%0d = %h", h, v, pixel))
        end
    end
    // streaming: one new position per clock, result two clocks later
    x = 11'd100; y = 10'd50;
    for (int i = 0; i < 61; i++) begin
      int h, v;
      h = 98 + i % 12; v = 49 + i / 12;
      if (i < 60) begin
        hcount <= 11'(h); vcount <= 10'(v);
        exp_q.push_back((h >= 100 && h < 100 + W && v >= 50 && v < 50 + H) ?
                        pal[pic[(h - 100) + (v - 50) * W]] : 24'd0);
      end
      @(posedge clk); #1;
      if (i >= 1) `CHECK(pixel == exp_q.pop_front(), $sformatf("stream %0d", i))
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
