// Bounces the input and checks that the output only follows a level that
// stayed put for the stable time (20 clocks here), and when.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_debounce;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, noisy = 1, clean;
  always #5 clk = ~clk;

  debounce #(.STABLE_CYCLES(20)) dut (.*);

  initial begin
    int n;
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(clean == 1, "takes input level at reset")
    for (int k = 0; k < 30; k++) begin
      // bursts of bounces shorter than the stable time
      repeat (6) begin
        noisy <= ~noisy; repeat ($urandom % 15 + 1) @(posedge clk);
      end
      noisy <= ~noisy; @(posedge clk); #1;
      n = 0;
      while (clean != noisy) begin @(posedge clk); #1; n++; end
      `CHECK(n >= 19 && n <= 22, $sformatf("settled after %0d clocks", n))
      // short glitch: ignored
      noisy <= ~noisy; repeat (5) @(posedge clk); noisy <= ~noisy; #1;
      repeat (30) begin @(posedge clk); #1; `CHECK(clean == noisy, "glitch ignored") end
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
