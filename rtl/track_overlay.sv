// Camera view used to check the ball tracking.
//
// Shows the camera picture with every pixel that passes the ball's colour
// test painted yellow, and two lines through the tracked centre: a
// vertical line at x = cx and a horizontal one at y = cy, yellow-white
// (red and green full, blue 0), like the tracking view of the report.
//
// Timing: one register; pixel is one clock behind its inputs.
module track_overlay
  import th_pkg::*;
(
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  rgb_t        cam_rgb,
  input  logic        match,
  input  logic [10:0] cx,
  input  logic [9:0]  cy,
  output rgb_t        pixel
);
  always_ff @(posedge clk) begin
    if (hcount == cx || vcount == cy) pixel <= YELLOW;
    else if (match)                   pixel <= YELLOW;
    else                              pixel <= cam_rgb;
  end
endmodule
