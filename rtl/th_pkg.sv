// Shared types and constants of the target shooting game.
//
// The game state encoding follows the report's numbering of the five
// screens (0 title, 1 beginner, 2 intermediate, 3 expert, 4 "Hit!").
// Pixels are 24-bit RGB, red in bits 23:16, green 15:8, blue 7:0.
// Screen coordinates are 11-bit x (0..799 over a line, 0..639 visible)
// and 10-bit y (0..523 over a frame, 0..479 visible).
package th_pkg;

  typedef enum logic [2:0] {
    ST_TITLE        = 3'd0,
    ST_BEGINNER     = 3'd1,
    ST_INTERMEDIATE = 3'd2,
    ST_EXPERT       = 3'd3,
    ST_HIT          = 3'd4
  } game_state_t;

  typedef logic [23:0] rgb_t;
  typedef logic [10:0] xcoord_t;
  typedef logic [9:0]  ycoord_t;

  // Sound request bundle sent from the game to the sound player.
  typedef struct packed {
    logic gun;         // gunshot effect
    logic background;  // background music
    logic gobble;      // turkey gobble (intermediate level)
  } sound_req_t;

  // Picture numbers on the shared picture load port.
  typedef enum logic [3:0] {
    IMG_BACKGROUND   = 4'd0,
    IMG_TITLE        = 4'd1,
    IMG_BEGINNER     = 4'd2,
    IMG_INTERMEDIATE = 4'd3,
    IMG_EXPERT       = 4'd4,
    IMG_DEER         = 4'd5,
    IMG_TURKEY       = 4'd6,
    IMG_DUCK         = 4'd7,
    IMG_HIT          = 4'd8
  } image_id_t;

  localparam rgb_t WHITE  = 24'hFF_FF_FF;
  localparam rgb_t YELLOW = 24'hFF_FF_00;
  localparam rgb_t ORANGE = 24'hFF_80_00;

endpackage
