// Converts random and corner-case colours and compares with a hue,
// saturation and value computed in floating point by the testbench
// (hue scaled to 256 per turn; 2 steps of rounding slack on hue and 1 on
// saturation).  Also checks the two-clock latency with a pixel per clock.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_rgb2hsv;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] r, g, b, h, s, v;

  rgb2hsv dut (.*);

  typedef struct { int h, s, v; } hsv_t;
  function automatic hsv_t model(int rr, int gg, int bb);
    hsv_t o; real mx, mn, d, hh;
    mx = rr; if (gg > mx) mx = gg; if (bb > mx) mx = bb;
    mn = rr; if (gg < mn) mn = gg; if (bb < mn) mn = bb;
    d = mx - mn;
    o.v = int'(mx);
    o.s = (mx == 0) ? 0 : $rtoi(255.0 * d / mx);
    if (d == 0) hh = 0;
    else if (mx == rr) hh = (gg - bb) / d;
    else if (mx == gg) hh = 2.0 + (bb - rr) / d;
    else hh = 4.0 + (rr - gg) / d;
    hh = hh * 256.0 / 6.0;
    if (hh < 0) hh += 256.0;
    o.h = $rtoi(hh);
    return o;
  endfunction

  function automatic int hdist(int a, int c);
    int dd = (a - c) & 255;
    return (dd > 128) ? 256 - dd : dd;
  endfunction

  hsv_t q [$];
  initial begin
    hsv_t m;
    for (int i = 0; i < 3001; i++) begin
      if (i < 3000) begin
        case (i)
          0: begin r = 255; g = 0; b = 0; end
          1: begin r = 0; g = 255; b = 0; end
          2: begin r = 0; g = 0; b = 255; end
          3: begin r = 100; g = 100; b = 100; end
          4: begin r = 0; g = 0; b = 0; end
          5: begin r = 120; g = 220; b = 60; end
          default: begin r = 8'($urandom); g = 8'($urandom); b = 8'($urandom); end
        endcase
        q.push_back(model(r, g, b));
      end
      @(posedge clk); #1;
      if (i >= 1) begin
        m = q.pop_front();
        `CHECK(int'(v) == m.v, $sformatf("v %0d vs %0d", v, m.v))
        `CHECK(int'(s) - m.s <= 1 && m.s - int'(s) <= 1, $sformatf("s %0d vs %0d", s, m.s))
        `CHECK(hdist(h, m.h) <= 2, $sformatf("h %0d vs %0d", h, m.h))
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
