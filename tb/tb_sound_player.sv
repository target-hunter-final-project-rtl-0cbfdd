// Loads three short clips with known samples, then plays them with
// changing requests and codec frame pulses.  A testbench model of each
// clip's address (one step per two frame pulses while requested, wrap at
// the clip length) and of the request priority gives the expected sample.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_sound_player;
  import th_pkg::*;
  localparam int L0 = 10, L1 = 7, L2 = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ready = 0, load_we = 0;
  logic [1:0] load_sel; logic [3:0] load_addr; logic [15:0] load_data;
  sound_req_t req = '0;
  logic [7:0] sample;
  always #5 clk = ~clk;

  sound_player #(.BG_LEN(L0), .GOBBLE_LEN(L1), .GUN_LEN(L2)) dut (.*);

  function automatic logic [7:0] clip_val(int c, int k);
    return 8'(c * 64 + k * 5 + 1);
  endfunction

  initial begin
    int a [3], half [3], len [3], plays;
    logic [7:0] e;
    len[0] = L0; len[1] = L1; len[2] = L2;
    repeat (2) @(posedge clk); rst <= 0;
    for (int c = 0; c < 3; c++)
      for (int k = 0; k < len[c]; k++) begin
        load_we <= 1; load_sel <= 2'(c); load_addr <= 4'(k);
        load_data <= {clip_val(c, k), 8'($urandom)}; @(posedge clk);
      end
    load_we <= 0;
    for (int c = 0; c < 3; c++) begin a[c] = 0; half[c] = 0; end
    plays = 0;
    for (int f = 0; f < 400; f++) begin
      if (f % 23 == 0) begin
        req <= sound_req_t'($urandom);
        @(posedge clk);
      end
      ready <= 1; @(posedge clk); ready <= 0;
      // model: clips with play=1 step on every second frame pulse
      if (req.background) begin half[0] ^= 1; if (half[0]) a[0] = (a[0] + 1) % L0; end
      if (req.gobble)     begin half[1] ^= 1; if (half[1]) a[1] = (a[1] + 1) % L1; end
      if (req.gun)        begin half[2] ^= 1; if (half[2]) a[2] = (a[2] + 1) % L2; end
      repeat (4) @(posedge clk); #1;
      e = req.gun ? clip_val(2, a[2]) : req.background ? clip_val(0, a[0]) :
          req.gobble ? clip_val(1, a[1]) : 8'd0;
      if (e != 0) plays++;
      `CHECK(sample == e, $sformatf("frame %0d req %b: %0d expected %0d", f, req, sample, e))
    end
    `CHECK(plays > 100, "clips played")
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
