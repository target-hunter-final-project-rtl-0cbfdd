// Aiming sight, drawn in real time rather than stored.
//
// The sight is a ring (distance from its centre between R_IN and R_OUT)
// with a cross through it: a vertical bar CROSS_W wide and 2*R_IN tall and a
// horizontal bar 2*R_IN wide and CROSS_W tall, all centred on (x, y) and all
// in orange.  The ring radii 8 and 10, the bar sizes and the colour are the
// report's; where the report adds the three layers, this design ORs the
// "on" conditions so overlaps stay orange.
//
// Timing: pixel is valid two clocks after its hcount/vcount, the same
// delay as image_sprite, so the two can be compared pixel by pixel.
module sight #(
  parameter int unsigned R_IN    = 8,
  parameter int unsigned R_OUT   = 10,
  parameter int unsigned CROSS_W = 4,
  parameter th_pkg::rgb_t COLOR  = th_pkg::ORANGE
) (
  input  logic         clk,
  input  logic [10:0]  x,
  input  logic [9:0]   y,
  input  logic [10:0]  hcount,
  input  logic [9:0]   vcount,
  output th_pkg::rgb_t pixel
);
  localparam logic signed [12:0] HALF_W = 13'(CROSS_W / 2);
  localparam logic signed [12:0] ARM    = 13'(R_IN);
  logic signed [12:0] dx, dy;
  logic [25:0] d2;
  logic        ring, vbar, hbar, on_q;

  always_comb begin
    dx   = $signed({2'b0, hcount}) - $signed({2'b0, x});
    dy   = $signed({3'b0, vcount}) - $signed({3'b0, y});
    d2   = 26'(dx * dx) + 26'(dy * dy);
    ring = (d2 >= 26'(R_IN * R_IN)) && (d2 <= 26'(R_OUT * R_OUT));
    // vertical bar: columns x-CROSS_W/2 .. x+CROSS_W/2-1, rows y-R_IN .. y+R_IN-1
    vbar = (dx >= -HALF_W) && (dx < HALF_W) && (dy >= -ARM) && (dy < ARM);
    hbar = (dy >= -HALF_W) && (dy < HALF_W) && (dx >= -ARM) && (dx < ARM);
  end

  always_ff @(posedge clk) begin
    on_q  <= ring || vbar || hbar;
    pixel <= on_q ? COLOR : '0;
  end
endmodule
