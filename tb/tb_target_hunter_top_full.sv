// Whole-game test with every parameter of target_hunter_top at its default
// (25 MHz clock, 10 s rounds, 650000-clock debounce, 24M-clock re-fire
// hold-off, 1875-clock gyro sample period, full-length sound clips).
//
// The run checks the VGA line and frame periods and sync pulse widths,
// loads all pictures and sounds, tracks the camera ball, selects the
// beginner level from the title, hits the moving deer, goes back to the
// game with the higher speed, waits for the deer to bounce off an edge, and applies one gyro reading (4 pixels of
// camera x, which the mirrored mapping turns into about 4 screen pixels).  The round
// time-out (250M clocks) and the later levels are left to the reduced
// test.  Every mechanism it exercises is counted and must have happened.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_target_hunter_top_full;
  import th_pkg::*;
  localparam int FRAME = 800 * 524;
  localparam int GYRO_TICK_TB = 1875;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  always #20 clk = ~clk;
  rgb_t cam_rgb;
  logic fire_n = 1, pause = 0, gyro_en = 0, show_camera = 0;
  logic [1:0] gyro_ser = 0;
  logic [10:0] hcount; logic [9:0] vcount;
  rgb_t vga_rgb; logic vga_hsync_n, vga_vsync_n, vga_blank;
  logic img_we = 0; image_id_t img_sel = IMG_BACKGROUND; logic [18:0] img_addr = 0;
  logic [3:0] img_index = 0; logic pal_we = 0; logic [3:0] pal_addr = 0; rgb_t pal_rgb = 0;
  logic codec_ready = 0; logic [7:0] sound_sample; sound_req_t sound_req;
  logic snd_we = 0; logic [1:0] snd_sel = 0; logic [16:0] snd_addr = 0; logic [15:0] snd_data = 0;
  game_state_t state; logic [4:0] speed; logic [7:0] seconds_left;
  logic [10:0] aim_x, ball_x; logic [9:0] aim_y, ball_y; logic [1:0] targets_down;
  logic [6:0] events;

  target_hunter_top dut (.*);

  `include "th_tb_common.svh"

  // VGA timing: line period, frame period and sync widths
  int n_sync_ok, n_select, n_hit, n_speedup, n_bounce, n_gun_sound, n_bg_sound,
      n_centre_ok, n_gyro_ok, n_pixel_ok;
  longint t_hs_fall, t_vs_fall;
  initial begin
    n_sync_ok = 0; n_select = 0; n_hit = 0; n_speedup = 0; n_bounce = 0;
    n_gun_sound = 0; n_bg_sound = 0; n_centre_ok = 0; n_gyro_ok = 0; n_pixel_ok = 0;
    t_hs_fall = -1; t_vs_fall = -1;
  end
  bit loaded = 0;
  longint cyc = 0;
  logic hs_q = 1, vs_q = 1;
  longint hs_low_start, vs_low_start;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    hs_q <= vga_hsync_n; vs_q <= vga_vsync_n;
    if (!rst) begin
      if (hs_q && !vga_hsync_n) begin
        if (t_hs_fall >= 0) `CHECK(cyc - t_hs_fall == 800, $sformatf("line period %0d", cyc - t_hs_fall))
        t_hs_fall <= cyc;
      end
      if (!hs_q && vga_hsync_n && t_hs_fall >= 0) begin
        `CHECK(cyc - t_hs_fall == 96, $sformatf("hsync width %0d", cyc - t_hs_fall))
      end
      if (vs_q && !vga_vsync_n) begin
        if (t_vs_fall >= 0) begin
          `CHECK(cyc - t_vs_fall == FRAME, $sformatf("frame period %0d", cyc - t_vs_fall))
          if (cyc - t_vs_fall == FRAME) n_sync_ok++;
        end
        t_vs_fall <= cyc;
      end
      if (!vs_q && vga_vsync_n && t_vs_fall >= 0) begin
        `CHECK(cyc - t_vs_fall == 2 * 800, $sformatf("vsync width %0d", cyc - t_vs_fall))
      end
      if (events[0]) n_select++;
      if (events[1]) n_hit++;
      if (events[3]) n_speedup++;
      if (events[6]) n_bounce++;
      if (codec_ready && sound_req.gun && sound_sample >= 8'd161) n_gun_sound++;
      if (codec_ready && sound_req.background && !sound_req.gun && sound_sample >= 8'd1 && sound_sample < 8'd81) n_bg_sound++;
      // title picture pixel, away from the sight
      if (loaded && state == ST_TITLE && h_hist[2] == 11'd100 && v_hist[2] == 10'd60 && aim_y > 10'd150) begin
        logic [23:0] e;
        e = pal_colour(1, int'(pic_index(1, 30 + 10 * 500)));
        `CHECK(vga_rgb == e, $sformatf("title pixel %h expected %h", vga_rgb, e))
        if (vga_rgb == e) n_pixel_ok++;
      end
    end
  end

  initial begin
    int tx, ty, s0, ax0, ax1;
    repeat (4) @(posedge clk);
    rst <= 0;
    load_pictures();
    load_sounds(110000, 110000, 22000);
    loaded = 1;
    ball_cx = 300; ball_cy = 200;
    wait_frames(3);
    `CHECK(int'(ball_x) == exp_centre_x() && int'(ball_y) == exp_centre_y(),
           $sformatf("ball centre %0d,%0d expected %0d,%0d", ball_x, ball_y, exp_centre_x(), exp_centre_y()))
    if (int'(ball_x) == exp_centre_x()) n_centre_ok++;

    // select beginner once the start-up hold-off has passed
    aim_at(340, 240);
    wait (dut.u_fsm.holdoff > 25'(24_000_000));
    pull_trigger(3);
    `CHECK(state == ST_BEGINNER && seconds_left == 8'd10, $sformatf("beginner selected, state %0d", state))

    // hit the deer
    for (int tries = 0; tries < 4 && state == ST_BEGINNER; tries++) begin
      tx = dut.t1_x; ty = dut.t1_y;
      aim_at(tx + 50, ty + 50, 3);
      pull_trigger(3);
    end
    `CHECK(state == ST_HIT, "deer hit")
    wait (dut.u_fsm.holdoff > 25'(24_000_000));
    aim_at(600, 40);
    pull_trigger(3);
    `CHECK(state == ST_BEGINNER && speed == 5'd3, $sformatf("back in the game, speed %0d", speed))

    // let the deer run into an edge of its area and bounce
    begin
      int guard = 0;
      while (n_bounce == 0 && guard < 200) begin wait_frames(1); guard++; end
    end
    `CHECK(state == ST_BEGINNER, "still in the round after the bounce")

    // one gyro reading on the x axis: 64 -> angle 2 -> 4 pixels
    aim_at(320, 120);
    wait_frames(1);
    ax0 = aim_x;
    gyro_send(0, 8'd64);
    gyro_en <= 1;
    wait_frames(2);
    ax1 = aim_x;
    begin
      int cx, e0, e1;
      cx = int'(ball_x);
      e0 = 640 - (((cx - 20) * 1084) >>> 10);
      e1 = 640 - (((cx + 4 - 20) * 1084) >>> 10);
      `CHECK(ax0 == e0 && ax1 == e1, $sformatf("gyro: aim %0d -> %0d expected %0d -> %0d", ax0, ax1, e0, e1))
      if (ax1 == e1 && ax0 != ax1) n_gyro_ok++;
    end
    gyro_en <= 0;

    `CHECK(n_sync_ok >= 5, "VGA frames")
    `CHECK(n_select >= 1, "level selection")
    `CHECK(n_hit >= 1, "hit")
    `CHECK(n_speedup >= 1, "speed-up")
    `CHECK(n_bounce >= 1, "target bounce")
    `CHECK(n_gun_sound >= 1, "gunshot played")
    `CHECK(n_bg_sound >= 1, "background music played")
    `CHECK(n_centre_ok >= 1, "ball centre")
    `CHECK(n_gyro_ok >= 1, "gyro correction")
    `CHECK(n_pixel_ok >= 1, "title picture")
    $display("mechanisms: frames=%0d select=%0d hit=%0d speedup=%0d bounce=%0d gun=%0d bg=%0d",
             n_sync_ok, n_select, n_hit, n_speedup, n_bounce, n_gun_sound, n_bg_sound);
    `TB_DONE
  end

  initial begin
    repeat (64'd150_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired in state %0d", state);
    `TB_DONE
  end
endmodule
