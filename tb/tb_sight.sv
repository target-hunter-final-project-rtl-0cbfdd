// Sweeps the scan over a square around the sight centre and compares the
// sight's pixels, two clocks late, with a ring / cross model computed by
// the testbench.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_sight;
  int checks = 0, failures = 0, on_count = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [10:0] x = 11'd200, hcount = 0;
  logic [9:0]  y = 10'd150, vcount = 0;
  logic [23:0] pixel;

  sight dut (.*);

  function automatic bit model(int dx, int dy);
    int d2 = dx * dx + dy * dy;
    bit ring = (d2 >= 64) && (d2 <= 100);
    bit vb = (dx >= -2 && dx < 2 && dy >= -8 && dy < 8);
    bit hb = (dy >= -2 && dy < 2 && dx >= -8 && dx < 8);
    return ring | vb | hb;
  endfunction

  bit exp_q [$];
  initial begin
    @(posedge clk);
    for (int dy = -14; dy <= 14; dy++)
      for (int dx = -14; dx <= 14; dx++) begin
        hcount <= 11'(200 + dx); vcount <= 10'(150 + dy);
        exp_q.push_back(model(dx, dy));
        @(posedge clk); #1;
        if (exp_q.size() > 1) begin
          bit e;
          e = exp_q.pop_front();
          `CHECK(pixel == (e ? 24'hFF8000 : 24'h0), $sformatf("pixel before %0d,%0d: got %h exp %0d", dx, dy, pixel, e))
          if (e) on_count++;
        end
      end
    // spot checks: centre and ring points are drawn, corners are not
    `CHECK(model(0, 0) && model(9, 0) && model(0, -10) && !model(12, 12) && !model(5, 5), "model sanity")
    `CHECK(on_count > 150 && on_count < 300, $sformatf("lit pixel count %0d", on_count))
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
