// Works out where the sight is drawn from the camera and gyro results.
//
// The ball's centre found in the camera picture is corrected by the gyro
// offsets when gyro_en is set (x + dx, y + dy), then mapped from camera to
// screen coordinates:
//   screen_x = H_ACTIVE - ((x - X_OFS) * X_GAIN) / 1024
//   screen_y =            ((y - Y_OFS) * Y_GAIN) / 1024
// The x axis is mirrored because the camera faces the player.  Offsets and
// gains 20/1084 and 40/1170 are the report's; clamping the result to the
// visible screen is this design's choice.  While hold is high (rifle
// safety on) the sight stays where it is, as in the report.
//
// Timing: two registers; aim_x/aim_y follow their inputs two clocks later.
module aim_combiner #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned X_OFS  = 20,
  parameter int unsigned X_GAIN = 1084,
  parameter int unsigned Y_OFS  = 40,
  parameter int unsigned Y_GAIN = 1170
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               gyro_en,
  input  logic               hold,
  input  logic [10:0]        cam_x,
  input  logic [9:0]         cam_y,
  input  logic signed [11:0] dx,
  input  logic signed [11:0] dy,
  output logic [10:0]        adj_x,   // corrected camera coordinates
  output logic [9:0]         adj_y,
  output logic [10:0]        aim_x,   // screen coordinates of the sight
  output logic [9:0]         aim_y
);
  localparam logic signed [13:0] XO = 14'(X_OFS);
  localparam logic signed [13:0] YO = 14'(Y_OFS);
  localparam logic signed [27:0] XG = 28'(X_GAIN);
  localparam logic signed [27:0] YG = 28'(Y_GAIN);
  localparam logic signed [17:0] HA = 18'(H_ACTIVE);
  logic signed [13:0] cx, cy;
  logic signed [27:0] px, py;
  logic signed [17:0] sx, sy;

  always_comb begin
    cx = $signed({3'b0, cam_x}) + (gyro_en ? 14'(dx) : 14'sd0);
    cy = $signed({4'b0, cam_y}) + (gyro_en ? 14'(dy) : 14'sd0);
    px = 28'(cx - XO) * XG;
    py = 28'(cy - YO) * YG;
    sx = HA - 18'(px >>> 10);
    sy = 18'(py >>> 10);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      adj_x <= '0;
      adj_y <= '0;
      aim_x <= 11'(H_ACTIVE / 2);
      aim_y <= 10'(V_ACTIVE / 2);
    end else if (!hold) begin
      adj_x <= (cx < 0) ? '0 : cx[10:0];
      adj_y <= (cy < 0) ? '0 : cy[9:0];
      aim_x <= (sx < 0) ? '0 : (sx > 18'(H_ACTIVE - 1)) ? 11'(H_ACTIVE - 1) : sx[10:0];
      aim_y <= (sy < 0) ? '0 : (sy > 18'(V_ACTIVE - 1)) ? 10'(V_ACTIVE - 1) : sy[9:0];
    end
  end
endmodule
