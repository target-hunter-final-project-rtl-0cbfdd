// Drives the game controller through a whole game with short hold-off and
// gunshot times: level selection by sight position, misses, single and
// double hits, pause, speed-ups, level advance, timer expiry.  Expected
// states are written out by hand from the game rules.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_game_fsm;
  import th_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic fire = 0, pause = 0, expire = 0, hit_a = 0, hit_b = 0;
  logic [10:0] aim_x = 0; logic [9:0] aim_y = 0;
  game_state_t state; logic [4:0] speed; logic a_down, b_down, start_on;
  sound_req_t sound;
  logic ev_select, ev_hit, ev_first_hit, ev_speedup, ev_advance, ev_expire;
  int starts = 0, gun_cycles = 0;

  game_fsm #(.FIRE_HOLDOFF(20), .GUN_CYCLES(6)) dut (.*);

  always @(posedge clk) begin
    if (start_on && !rst) starts++;
    if (sound.gun && !rst) gun_cycles++;
  end

  task automatic pull(input int cycles = 1);
    fire <= 1; repeat (cycles) @(posedge clk); fire <= 0; @(posedge clk); #1;
  endtask
  task automatic wait_holdoff; repeat (25) @(posedge clk); #1; endtask
  task automatic shoot(input bit a, input bit b);
    hit_a <= a; hit_b <= b; pull(); hit_a <= 0; hit_b <= 0; @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    `CHECK(state == ST_TITLE && speed == 1, "reset to title")
    `CHECK(sound.background && !sound.gobble, "title music")
    // a pull before the hold-off has passed is ignored
    aim_x <= 300; aim_y <= 250; pull();
    `CHECK(state == ST_TITLE, "pull within hold-off ignored")
    wait_holdoff();
    // a pull outside every level button keeps the title
    aim_x <= 100; aim_y <= 250; pull();
    `CHECK(state == ST_TITLE, "pull beside the buttons")
    wait_holdoff();
    aim_x <= 300; aim_y <= 250; pull();
    `CHECK(state == ST_BEGINNER, "beginner selected")
    `CHECK(starts == 1, $sformatf("timer started on level entry: %0d", starts))
    // miss: no hit signal
    pull();
    `CHECK(state == ST_BEGINNER, "miss stays")
    // paused: a hit does not count
    pause <= 1; shoot(1, 0); pause <= 0;
    `CHECK(state == ST_BEGINNER, "paused shot ignored")
    shoot(1, 0);
    `CHECK(state == ST_HIT, "deer hit")
    // first pull on Hit! screen comes after the hold-off: back with speed 3
    wait_holdoff(); pull();
    `CHECK(state == ST_BEGINNER && speed == 3, $sformatf("speed-up to %0d", speed))
    `CHECK(starts == 2, "timer restarted")
    // run through all speeds: 3,5,...,29 then advance
    for (int k = 0; k < 13; k++) begin
      shoot(1, 0); wait_holdoff(); pull();
    end
    `CHECK(state == ST_BEGINNER && speed == 29, $sformatf("top speed %0d", speed))
    shoot(1, 0); wait_holdoff(); pull();
    `CHECK(state == ST_INTERMEDIATE && speed == 1, "advanced to intermediate")
    @(posedge clk); #1;
    `CHECK(sound.gobble && !sound.background, "gobble in intermediate")
    // two targets: first hit marks A, second hit on A again does nothing,
    // hit on B ends the round
    shoot(1, 0);
    `CHECK(state == ST_INTERMEDIATE && a_down && !b_down, "first turkey down")
    shoot(1, 0);
    `CHECK(state == ST_INTERMEDIATE && a_down && !b_down, "same turkey again")
    shoot(0, 1);
    `CHECK(state == ST_HIT, "second turkey ends round")
    `CHECK(!a_down && !b_down, "flags cleared on Hit! screen")
    wait_holdoff(); pull();
    `CHECK(state == ST_INTERMEDIATE && speed == 3, "back to intermediate")
    // timer expiry sends the player back to the title
    shoot(0, 1);
    `CHECK(b_down, "B first this time")
    // like the countdown, expire stays high until the next start_on
    expire <= 1; @(posedge clk); @(posedge clk); #1;
    `CHECK(state == ST_TITLE, "expired to title")
    // expert from the title, and advancing from expert returns to title
    wait_holdoff(); aim_x <= 300; aim_y <= 420; pull();
    `CHECK(state == ST_EXPERT, "expert selected")
    expire <= 0;
    repeat (3) @(posedge clk); #1;
    `CHECK(state == ST_EXPERT && !expire, "stale expire ignored on level entry")
    wait_holdoff(); aim_x <= 300; aim_y <= 350;
    for (int k = 0; k < 15; k++) begin
      shoot(1, 0); shoot(0, 1); wait_holdoff(); pull();
    end
    `CHECK(state == ST_TITLE, $sformatf("expert completed, state %0d", state))
    wait_holdoff(); pull();
    `CHECK(state == ST_INTERMEDIATE, "intermediate selected")
    `CHECK(gun_cycles > 6 * 20, $sformatf("gunshot requested %0d cycles", gun_cycles))
    `TB_DONE
  end
  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
