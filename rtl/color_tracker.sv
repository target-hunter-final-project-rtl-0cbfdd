// Finds the rifle's green ball in the camera picture.
//
// Every visible pixel whose hue, saturation and value lie inside the
// ball's window (H_LO < h < H_HI, S_LO < s < S_HI, v > V_LO, the report's
// thresholds) is a candidate; a pixel is counted only if the pixel before
// it on the scan was a candidate too, which drops isolated noise pixels.
// For counted pixels the x and y positions are added to running sums and a
// pixel count is kept.  The sums restart at scan position (0,0); when the
// scan reaches (H_ACTIVE, V_ACTIVE), after the visible part of the frame,
// the frame's totals are copied to the outputs and frame_done pulses.  The
// count starts at 1, not 0, so that dividing by it is always defined.
// `match` tells whether the current pixel is a candidate (used to paint
// matched pixels yellow in the camera view).
//
// Timing: h/s/v and hcount/vcount must refer to the same pixel; match is
// combinational, the totals change on the clock edge after the frame end.
module color_tracker #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned V_ACTIVE = 480,
  parameter logic [7:0] H_LO = 8'h25,
  parameter logic [7:0] H_HI = 8'h40,
  parameter logic [7:0] S_LO = 8'h51,
  parameter logic [7:0] S_HI = 8'h7A,
  parameter logic [7:0] V_LO = 8'd110
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [7:0]  h,
  input  logic [7:0]  s,
  input  logic [7:0]  v,
  output logic        match,
  output logic [30:0] sum_x,
  output logic [30:0] sum_y,
  output logic [22:0] count,
  output logic        frame_done
);
  logic        match_q;
  logic [30:0] acc_x, acc_y;
  logic [22:0] acc_n;

  assign match = (h > H_LO) && (h < H_HI) && (s > S_LO) && (s < S_HI) && (v > V_LO);

  always_ff @(posedge clk) begin
    frame_done <= 1'b0;
    if (rst) begin
      match_q <= 1'b0;
      acc_x   <= '0;
      acc_y   <= '0;
      acc_n   <= 23'd1;
      sum_x   <= '0;
      sum_y   <= '0;
      count   <= 23'd1;
    end else begin
      match_q <= match;
      if (hcount == '0 && vcount == '0) begin
        acc_x <= '0;
        acc_y <= '0;
        acc_n <= 23'd1;
      end else if (hcount < 11'(H_ACTIVE) && vcount < 10'(V_ACTIVE) && match && match_q) begin
        acc_x <= acc_x + 31'(hcount);
        acc_y <= acc_y + 31'(vcount);
        acc_n <= acc_n + 23'd1;
      end
      if (hcount == 11'(H_ACTIVE) && vcount == 10'(V_ACTIVE)) begin
        sum_x      <= acc_x;
        sum_y      <= acc_y;
        count      <= acc_n;
        frame_done <= 1'b1;
      end
    end
  end
endmodule
