// Game controller: which screen is shown and what a trigger pull does.
//
// States (th_pkg::game_state_t) follow the report: 0 title, 1 beginner
// (one deer), 2 intermediate (two turkeys), 3 expert (two ducks), 4 "Hit!".
//
//  * Title: a trigger pull selects a level by where the sight is.  With the
//    sight x strictly between SEL_X_LO and SEL_X_HI, y strictly inside
//    200..280 picks beginner, 300..380 intermediate and 400..480 expert
//    (the report's pixel ranges).  Speed goes back to 1.
//  * Level: a trigger pull while the sight and a target overlap on the
//    same pixel (hit_a / hit_b, computed outside) is a hit.  Beginner goes
//    straight to "Hit!"; in the two-target levels the first target hit is
//    marked (and hidden by the display) and the second one ends the round.
//    The safety switch (pause) blocks shooting.  When the countdown timer
//    expires the player is sent back to the title.
//  * Hit!: the next trigger pull returns to the same level with the speed
//    raised by SPEED_STEP, or, once the speed has passed SPEED_MAX, moves on
//    to the next level with the smaller animal (expert goes to the title).
//
// On the title and Hit! screens a pull is only accepted FIRE_HOLDOFF clocks
// after the previous accepted pull or after leaving a level, so one long
// pull does not pass two screens.  A
// hit or a title pull raises `gun` (gunshot sound) for GUN_CYCLES clocks.
// start_on pulses for one clock together with every entry into a level so
// the countdown restarts; the report holds it high for a while instead.
// Music: gobble in the intermediate level, background music elsewhere
// (unchanged while on the Hit! screen).  The cycle counts are the report's
// numbers; that start_on is a single pulse is this design's choice.
//
// Timing: fire, hit_a, hit_b are sampled every clock; state changes on the
// clock edge after the qualifying input.
module game_fsm
  import th_pkg::*;
#(
  parameter int unsigned FIRE_HOLDOFF = 24_000_000,
  parameter int unsigned GUN_CYCLES   = 17_500_000,
  parameter int unsigned SPEED_STEP   = 2,
  parameter int unsigned SPEED_MAX    = 27,
  parameter int unsigned SEL_X_LO     = 240,
  parameter int unsigned SEL_X_HI     = 440
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fire,       // trigger pulled (debounced, active high)
  input  logic        pause,      // safety switch on
  input  logic        expire,     // countdown reached zero
  input  logic [10:0] aim_x,      // sight centre on screen
  input  logic [9:0]  aim_y,
  input  logic        hit_a,      // sight overlaps target A at this pixel
  input  logic        hit_b,      // sight overlaps target B at this pixel
  output game_state_t state,
  output logic [4:0]  speed,
  output logic        a_down,     // target A already hit this round
  output logic        b_down,     // target B already hit this round
  output logic        start_on,
  output sound_req_t  sound,
  // event strobes, one clock each
  output logic        ev_select,
  output logic        ev_hit,
  output logic        ev_first_hit,
  output logic        ev_speedup,
  output logic        ev_advance,
  output logic        ev_expire
);
  localparam int unsigned HW = $clog2(FIRE_HOLDOFF + 2);
  localparam int unsigned GW = $clog2(GUN_CYCLES + 2);

  game_state_t level_hold;
  logic [HW-1:0] holdoff;
  logic [GW-1:0] gun_cnt;
  logic          gun_fire;
  logic          music_gobble;
  logic          ready_fire;

  assign ready_fire = fire && (holdoff > HW'(FIRE_HOLDOFF));

  function automatic game_state_t select_level(input logic [10:0] ax, input logic [9:0] ay);
    select_level = ST_TITLE;
    if (ax > 11'(SEL_X_LO) && ax < 11'(SEL_X_HI)) begin
      if      (ay > 10'd200 && ay < 10'd280) select_level = ST_BEGINNER;
      else if (ay > 10'd300 && ay < 10'd380) select_level = ST_INTERMEDIATE;
      else if (ay > 10'd400 && ay < 10'd480) select_level = ST_EXPERT;
    end
  endfunction

  function automatic game_state_t next_level(input game_state_t l);
    case (l)
      ST_BEGINNER:     next_level = ST_INTERMEDIATE;
      ST_INTERMEDIATE: next_level = ST_EXPERT;
      default:         next_level = ST_TITLE;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    start_on     <= 1'b0;
    gun_fire     <= 1'b0;
    ev_select    <= 1'b0;
    ev_hit       <= 1'b0;
    ev_first_hit <= 1'b0;
    ev_speedup   <= 1'b0;
    ev_advance   <= 1'b0;
    ev_expire    <= 1'b0;
    if (rst) begin
      state        <= ST_TITLE;
      level_hold   <= ST_BEGINNER;
      speed        <= 5'd1;
      a_down       <= 1'b0;
      b_down       <= 1'b0;
      holdoff      <= '0;
      music_gobble <= 1'b0;
    end else begin
      unique case (state)
        ST_TITLE: begin
          music_gobble <= 1'b0;
          speed        <= 5'd1;
          a_down       <= 1'b0;
          b_down       <= 1'b0;
          if (ready_fire) begin
            holdoff  <= '0;
            gun_fire <= 1'b1;
            if (select_level(aim_x, aim_y) != ST_TITLE) begin
              state      <= select_level(aim_x, aim_y);
              level_hold <= select_level(aim_x, aim_y);
              start_on   <= 1'b1;
              ev_select  <= 1'b1;
            end
          end else if (holdoff <= HW'(FIRE_HOLDOFF)) begin
            holdoff <= holdoff + 1'b1;
          end
        end

        ST_BEGINNER, ST_INTERMEDIATE, ST_EXPERT: begin
          music_gobble <= (state == ST_INTERMEDIATE);
          holdoff      <= '0;
          // expire still shows the last round's time-out on the clock that
          // start_on restarts the timer
          if (expire && !start_on) begin
            state     <= ST_TITLE;
            ev_expire <= 1'b1;
          end else if (fire && !pause) begin
            if (state == ST_BEGINNER) begin
              if (hit_a) begin
                gun_fire <= 1'b1;
                state    <= ST_HIT;
                ev_hit   <= 1'b1;
              end
            end else if (hit_a) begin
              gun_fire <= 1'b1;
              if (b_down) begin
                state  <= ST_HIT;
                ev_hit <= 1'b1;
              end else if (!a_down) begin
                a_down       <= 1'b1;
                ev_first_hit <= 1'b1;
              end
            end else if (hit_b) begin
              gun_fire <= 1'b1;
              if (a_down) begin
                state  <= ST_HIT;
                ev_hit <= 1'b1;
              end else if (!b_down) begin
                b_down       <= 1'b1;
                ev_first_hit <= 1'b1;
              end
            end
          end
        end

        ST_HIT: begin
          a_down <= 1'b0;
          b_down <= 1'b0;
          if (ready_fire && !pause) begin
            holdoff <= '0;
            if (speed > 5'(SPEED_MAX)) begin
              speed      <= 5'd1;
              state      <= next_level(level_hold);
              level_hold <= next_level(level_hold);
              start_on   <= (next_level(level_hold) != ST_TITLE);
              ev_advance <= 1'b1;
            end else begin
              speed      <= speed + 5'(SPEED_STEP);
              state      <= level_hold;
              start_on   <= 1'b1;
              ev_speedup <= 1'b1;
            end
          end else if (holdoff <= HW'(FIRE_HOLDOFF)) begin
            holdoff <= holdoff + 1'b1;
          end
        end

        default: state <= ST_TITLE;
      endcase
    end
  end

  // gunshot sound request, held for GUN_CYCLES after each shot
  always_ff @(posedge clk) begin
    if (rst)                gun_cnt <= '0;
    else if (gun_fire)      gun_cnt <= GW'(GUN_CYCLES);
    else if (gun_cnt != '0) gun_cnt <= gun_cnt - 1'b1;
  end

  always_comb begin
    sound.gun        = (gun_cnt != '0);
    sound.gobble     = music_gobble;
    sound.background = !music_gobble;
  end

  // a level is only ever entered together with a countdown restart
  a_start_with_level: assert property (@(posedge clk) disable iff (rst)
    ((state inside {ST_BEGINNER, ST_INTERMEDIATE, ST_EXPERT}) &&
     ($past(state) inside {ST_TITLE, ST_HIT})) |-> start_on);
endmodule
