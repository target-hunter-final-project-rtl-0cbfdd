// Runs the countdown with a 10-clock "second": checks the expiry time
// after a start, that pause stretches it, that a new start reloads it, and
// that the count of seconds left steps down once per second.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_countdown_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, pause = 0, expire;
  logic [7:0] seconds_left;
  always #5 clk = ~clk;

  countdown_timer #(.CLK_HZ(10), .SECONDS(3)) dut (.*);

  int t0, t;
  initial begin
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(!expire, "idle after reset")
    start <= 1; @(posedge clk); start <= 0; #1;
    t0 = $time / 10;
    `CHECK(seconds_left == 3, "loaded")
    repeat (15) @(posedge clk); #1;
    `CHECK(seconds_left == 2, $sformatf("after 1.5 s: %0d", seconds_left))
    while (!expire) begin @(posedge clk); #1; end
    t = $time / 10 - t0;
    `CHECK(t == 30, $sformatf("expired after %0d clocks", t))
    `CHECK(seconds_left == 0, "zero left")
    repeat (5) @(posedge clk); #1;
    `CHECK(expire, "expire held")
    // paused for 12 clocks: expiry 12 clocks later
    start <= 1; @(posedge clk); start <= 0; #1;
    `CHECK(!expire, "start clears expire")
    t0 = $time / 10;
    repeat (5) @(posedge clk);
    pause <= 1; repeat (12) @(posedge clk); pause <= 0;
    while (!expire) begin @(posedge clk); #1; end
    t = $time / 10 - t0;
    `CHECK(t == 42, $sformatf("paused expiry after %0d clocks", t))
    // restart in the middle
    start <= 1; @(posedge clk); start <= 0;
    repeat (25) @(posedge clk);
    start <= 1; @(posedge clk); start <= 0; #1;
    t0 = $time / 10;
    while (!expire) begin @(posedge clk); #1; end
    t = $time / 10 - t0;
    `CHECK(t == 30, $sformatf("restarted expiry after %0d clocks", t))
    `TB_DONE
  end
  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
