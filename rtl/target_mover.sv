// Moves one target around the playing field like the puck of a Pong game.
//
// The target always travels diagonally, `speed` pixels in x and in y once
// per frame (frame_tick).  Two direction flags pick the diagonal: vel_x
// (1 = right) and vel_y (1 = up).  Each frame the flags are turned around
// when the position has reached a wall -- x >= X_MAX turns it left,
// x <= X_MIN right, y >= Y_MAX up, y <= Y_MIN down -- and the position is
// stepped with the flags as they were before that frame's update, so a
// target may cross a wall by one step before it comes back, as in the
// report.  The walls 70/560 and 70/410 are the report's values.  While
// pause is high the target stands still.  Reset puts it at
// (START_X, START_Y) with the START_VX/START_VY directions; the start values
// are this design's choice.
//
// Timing: x and y change on the clock after frame_tick.
module target_mover #(
  parameter int unsigned X_MIN   = 70,
  parameter int unsigned X_MAX   = 560,
  parameter int unsigned Y_MIN   = 70,
  parameter int unsigned Y_MAX   = 410,
  parameter int unsigned START_X = 320,
  parameter int unsigned START_Y = 240,
  parameter bit          START_VX = 1'b0,
  parameter bit          START_VY = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        frame_tick,
  input  logic        pause,
  input  logic [4:0]  speed,
  output logic [10:0] x,
  output logic [9:0]  y,
  output logic        bounced   // pulses when a direction flag turns
);
  logic vel_x, vel_y;
  logic vel_x_nx, vel_y_nx;

  always_comb begin
    vel_x_nx = vel_x;
    vel_y_nx = vel_y;
    if (y >= 10'(Y_MAX)) vel_y_nx = 1'b1;
    if (x >= 11'(X_MAX)) vel_x_nx = 1'b0;
    if (x <= 11'(X_MIN)) vel_x_nx = 1'b1;
    if (y <= 10'(Y_MIN)) vel_y_nx = 1'b0;
  end

  always_ff @(posedge clk) begin
    bounced <= 1'b0;
    if (rst) begin
      x     <= 11'(START_X);
      y     <= 10'(START_Y);
      vel_x <= START_VX;
      vel_y <= START_VY;
    end else if (frame_tick && !pause) begin
      vel_x   <= vel_x_nx;
      vel_y   <= vel_y_nx;
      bounced <= (vel_x_nx != vel_x) || (vel_y_nx != vel_y);
      x <= vel_x ? x + 11'(speed) : x - 11'(speed);
      y <= vel_y ? y - 10'(speed) : y + 10'(speed);
    end
  end
endmodule
