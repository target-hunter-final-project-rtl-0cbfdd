// Whole-game test at reduced timing: one "second" of the countdown is one
// video frame, the trigger debounce is a few clocks, the re-fire hold-off is three frames, the
// gyro's 75 us sample period is 4 clocks, the speed steps by 8 and the
// level changes after one speed-up, and the sound clips are short.
// Pictures and screen size are full size.
//
// A closed-loop player model moves the camera ball until the sight is on
// the chosen spot, then pulls the trigger.  The run selects the beginner
// level, hits the deer, speeds up, hits it again and advances, downs both
// turkeys one after the other, speeds up, pauses, lets the clock run out,
// checks the gyro correction and the camera view, and finally selects the
// expert level.  Every mechanism is counted and must happen at least once.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_target_hunter_top;
  import th_pkg::*;
  localparam int FRAME = 800 * 524;
  localparam int GYRO_TICK_TB = 4;
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

  target_hunter_top #(
    .CLK_HZ(FRAME), .ROUND_SECONDS(40), .DEBOUNCE_CYCLES(4), .FIRE_HOLDOFF(3 * FRAME),
    .GUN_CYCLES(20000), .GYRO_TICK(GYRO_TICK_TB), .SPEED_STEP(8), .SPEED_MAX(8),
    .BG_LEN(64), .GOBBLE_LEN(48), .GUN_LEN(32)
  ) dut (.*);

  `include "th_tb_common.svh"

  // mechanism counters
  int n_select, n_hit, n_first, n_speedup, n_advance, n_expire, n_bounce;
  int n_gun_sound, n_gobble_sound, n_bg_sound, n_pause_ok, n_gyro_ok, n_camview_ok,
      n_pixel_ok, n_centre_ok;
  initial begin
    n_select = 0; n_hit = 0; n_first = 0; n_speedup = 0; n_advance = 0; n_expire = 0;
    n_bounce = 0; n_gun_sound = 0; n_gobble_sound = 0; n_bg_sound = 0; n_pause_ok = 0;
    n_gyro_ok = 0; n_camview_ok = 0; n_pixel_ok = 0; n_centre_ok = 0;
  end
  always @(posedge clk) if (!rst) begin
    if (events[0]) n_select++;
    if (events[1]) n_hit++;
    if (events[2]) n_first++;
    if (events[3]) n_speedup++;
    if (events[4]) n_advance++;
    if (events[5]) n_expire++;
    if (events[6]) n_bounce++;
    if (codec_ready && sound_req.gun && sound_sample >= 8'd161) n_gun_sound++;
    if (codec_ready && sound_req.gobble && !sound_req.gun && sound_sample >= 8'd81 && sound_sample < 8'd161) n_gobble_sound++;
    if (codec_ready && sound_req.background && !sound_req.gun && sound_sample >= 8'd1 && sound_sample < 8'd81) n_bg_sound++;
  end

  // background-only pixel check in the levels: a point far from the
  // targets and the sight must show the background picture
  always @(posedge clk) if (!rst && !show_camera) begin
    if ((state == ST_BEGINNER || state == ST_INTERMEDIATE) && h_hist[2] == 11'd5 && v_hist[2] == 10'd470 &&
        dut.t1_x > 150 && dut.t2_x > 150 && aim_x > 100) begin
      rgb_t e;
      e = pal_colour(0, int'(pic_index(0, 5 + 470 * 640)));
      `CHECK(vga_rgb == e, $sformatf("background pixel %h expected %h", vga_rgb, e))
      if (vga_rgb == e) n_pixel_ok++;
    end
  end

  task automatic shoot_target(input bit second);
    int tx, ty, w;
    w = (state == ST_BEGINNER) ? 100 : (state == ST_INTERMEDIATE) ? 50 : 25;
    for (int tries = 0; tries < 4; tries++) begin
      tx = second ? int'(dut.t2_x) : int'(dut.t1_x);
      ty = second ? int'(dut.t2_y) : int'(dut.t1_y);
      aim_at(tx + w / 2, ty + w / 2, 3);
      pull_trigger(2);
      if (state == ST_HIT || (second ? targets_down[1] : targets_down[0])) return;
    end
  endtask

  initial begin
    game_state_t s0;
    int ax0, ax1, t1x, t1y;
    repeat (4) @(posedge clk);
    rst <= 0;
    load_pictures();
    load_sounds(64, 48, 32);
    wait_frames(2);
    `CHECK(state == ST_TITLE, "starts on the title")

    // ball tracking: centre as the testbench works it out
    ball_cx = 300; ball_cy = 200;
    wait_frames(3);
    `CHECK(int'(ball_x) == exp_centre_x() && int'(ball_y) == exp_centre_y(),
           $sformatf("ball centre %0d,%0d expected %0d,%0d", ball_x, ball_y, exp_centre_x(), exp_centre_y()))
    if (int'(ball_x) == exp_centre_x()) n_centre_ok++;

    // camera view: ball pixels yellow, dark scene elsewhere
    show_camera <= 1;
    wait_frames(1);
    @(posedge clk iff (h_hist[2] == 11'(ball_cx + 4) && v_hist[2] == 10'(ball_cy + 2))); #1;
    `CHECK(vga_rgb == YELLOW, "ball shown yellow in camera view")
    @(posedge clk iff (h_hist[2] == 11'(ball_cx + 100) && v_hist[2] == 10'(ball_cy + 100))); #1;
    `CHECK(vga_rgb == DARK_RGB, $sformatf("camera pixel %h", vga_rgb))
    if (vga_rgb == DARK_RGB) n_camview_ok++;
    show_camera <= 0;

    // select beginner
    aim_at(340, 240);
    pull_trigger();
    `CHECK(state == ST_BEGINNER, $sformatf("beginner selected, state %0d", state))

    // hit the deer, speed up, hit again, advance
    shoot_target(0);
    `CHECK(state == ST_HIT, "deer hit")
    wait_frames(4);
    tap_trigger();
    `CHECK(state == ST_BEGINNER && speed == 9, $sformatf("speed-up: state %0d speed %0d", state, speed))
    shoot_target(0);
    `CHECK(state == ST_HIT, "deer hit at speed 9")
    wait_frames(4);
    tap_trigger();
    `CHECK(state == ST_INTERMEDIATE && speed == 1, "advanced to intermediate")

    // two turkeys
    shoot_target(0);
    `CHECK(state == ST_INTERMEDIATE && targets_down == 2'b01, "first turkey down")
    shoot_target(1);
    `CHECK(state == ST_HIT, "second turkey down")
    wait_frames(4);
    tap_trigger();
    `CHECK(state == ST_INTERMEDIATE && speed == 9, "intermediate speed-up")

    // pause: targets and timer stand still, trigger ignored
    pause <= 1;
    wait_frames(1);
    t1x = dut.t1_x; t1y = dut.t1_y;
    s0 = state;
    begin
      int secs;
      secs = seconds_left;
      wait_frames(3);
      `CHECK(dut.t1_x == 11'(t1x) && dut.t1_y == 10'(t1y) && seconds_left == 8'(secs), "paused")
      if (dut.t1_x == 11'(t1x)) n_pause_ok++;
    end
    pull_trigger();
    `CHECK(state == s0, "trigger ignored while paused")
    pause <= 0;

    // let the countdown run out: back to the title
    begin
      int guard = 0;
      while (state != ST_TITLE && guard < 60) begin wait_frames(1); guard++; end
    end
    `CHECK(state == ST_TITLE && n_expire == 1, "timer expiry")

    // gyro correction: one reading of 64 deg/s gives angle 2 -> offset 4 px
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
    wait_frames(1);

    // expert selection
    aim_at(340, 440);
    wait_frames(3);
    pull_trigger();
    `CHECK(state == ST_EXPERT, $sformatf("expert selected: state %0d aim %0d,%0d", state, aim_x, aim_y))
    wait_frames(2);

    `CHECK(n_select >= 2, $sformatf("level selections %0d", n_select))
    `CHECK(n_hit >= 3, $sformatf("rounds won %0d", n_hit))
    `CHECK(n_first >= 1, "first-of-two hits")
    `CHECK(n_speedup >= 2, "speed-ups")
    `CHECK(n_advance >= 1, "level advance")
    `CHECK(n_expire >= 1, "timer expiry")
    `CHECK(n_bounce >= 1, $sformatf("target bounces %0d", n_bounce))
    `CHECK(n_gun_sound >= 1, "gunshot played")
    `CHECK(n_gobble_sound >= 1, "gobble played")
    `CHECK(n_bg_sound >= 1, "background music played")
    `CHECK(n_pause_ok >= 1, "pause")
    `CHECK(n_gyro_ok >= 1, "gyro correction")
    `CHECK(n_camview_ok >= 1, "camera view")
    `CHECK(n_pixel_ok >= 1, $sformatf("background pixels checked %0d", n_pixel_ok))
    `CHECK(n_centre_ok >= 1, "ball centre")
    $display("mechanisms: select=%0d hit=%0d first=%0d speedup=%0d advance=%0d expire=%0d bounce=%0d gun=%0d gobble=%0d bg=%0d",
             n_select, n_hit, n_first, n_speedup, n_advance, n_expire, n_bounce, n_gun_sound, n_gobble_sound, n_bg_sound);
    `TB_DONE
  end

  initial begin
    repeat (260 * FRAME) @(posedge clk);
    failures++;
    $display("watchdog expired in state %0d", state);
    `TB_DONE
  end
endmodule
