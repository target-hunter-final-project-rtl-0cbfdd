// Picks the colour of each screen pixel from the layers of the game.
//
// All layer inputs are pixels of the same scan position (a layer is black,
// 0, where it draws nothing).  The priority per game state follows the
// report:
//   title    : sight, "Beginner", title (white = see-through), "Expert",
//              "Intermediate", background
//   beginner : sight, deer, background
//   two-target levels: sight, target A unless already hit, target B unless
//              already hit, background
//   Hit!     : "Hit!" block (its near-white backdrop 24'hFCFBFB is
//              see-through), background
// A target pixel that is pure white shows the background, which is how the
// pictures' white surroundings are cut away.  In the two-target levels the
// report cuts away the whole pixel when either target is white there; this
// design does the same.
//
// Timing: one register; out_pixel is one clock behind the inputs.
module display_compositor
  import th_pkg::*;
(
  input  logic        clk,
  input  game_state_t state,
  input  logic        a_down,
  input  logic        b_down,
  input  rgb_t        sight_px,
  input  rgb_t        background_px,
  input  rgb_t        title_px,
  input  rgb_t        beginner_px,
  input  rgb_t        intermediate_px,
  input  rgb_t        expert_px,
  input  rgb_t        target_a_px,
  input  rgb_t        target_b_px,
  input  rgb_t        hit_px,
  output rgb_t        out_pixel
);
  localparam rgb_t HIT_KEY = 24'hFC_FB_FB;
  rgb_t px;

  always_comb begin
    unique case (state)
      ST_TITLE:
        if      (sight_px != '0)        px = sight_px;
        else if (beginner_px != '0)     px = beginner_px;
        else if (title_px == WHITE)     px = background_px;
        else if (title_px != '0)        px = title_px;
        else if (expert_px != '0)       px = expert_px;
        else if (intermediate_px != '0) px = intermediate_px;
        else                            px = background_px;
      ST_BEGINNER:
        if      (sight_px != '0)        px = sight_px;
        else if (target_a_px == WHITE)  px = background_px;
        else if (target_a_px != '0)     px = target_a_px;
        else                            px = background_px;
      ST_INTERMEDIATE, ST_EXPERT:
        if      (sight_px != '0)                           px = sight_px;
        else if (target_a_px == WHITE || target_b_px == WHITE) px = background_px;
        else if (target_a_px != '0 && !a_down)             px = target_a_px;
        else if (target_b_px != '0 && !b_down)             px = target_b_px;
        else                                               px = background_px;
      ST_HIT:
        if      (hit_px == HIT_KEY)     px = background_px;
        else if (hit_px != '0)          px = hit_px;
        else                            px = background_px;
      default:                          px = background_px;
    endcase
  end

  always_ff @(posedge clk) out_pixel <= px;
endmodule
