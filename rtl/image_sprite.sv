// One stored picture drawn at a screen position (a "sprite").
//
// Each picture is kept as WIDTH*HEIGHT 4-bit colour indices, row by row,
// plus a 16-entry table that turns an index into 24-bit RGB.  This is how
// the report stores all of its images: one index memory per picture and a
// red, green and blue colour table of 16 entries each.  While the scan
// position (hcount, vcount) lies inside the WIDTH x HEIGHT box whose
// top-left corner is (x, y), the index at address
// (hcount-x) + (vcount-y)*WIDTH is read and mapped; outside the box the
// output is black (0).
//
// Timing: pixel is valid two clocks after the hcount/vcount it belongs to
// (one clock for the index memory, one for the colour table).
//
// The report fills the memories at configuration time from picture files
// that are not part of it.  Here both memories have a write port instead
// (load_* for the index memory, pal_* for the colour table) so the pictures
// can be loaded after reset; that port is this design's choice.
module image_sprite #(
  parameter int unsigned WIDTH  = 100,
  parameter int unsigned HEIGHT = 100,
  localparam int unsigned DEPTH = WIDTH * HEIGHT,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [10:0]   x,
  input  logic [9:0]    y,
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  output th_pkg::rgb_t  pixel,
  // picture load port
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [3:0]    load_index,
  input  logic          pal_we,
  input  logic [3:0]    pal_addr,
  input  th_pkg::rgb_t  pal_rgb
);
  logic [3:0]   index_mem [DEPTH];
  th_pkg::rgb_t palette   [16];

  logic         in_box, in_box_q;
  logic [21:0]  addr_full;
  logic [AW-1:0] addr;
  logic [3:0]   index_q;

  always_comb begin
    in_box = ({1'b0, hcount} >= {1'b0, x}) && ({1'b0, hcount} < {1'b0, x} + 12'(WIDTH)) &&
             ({1'b0, vcount} >= {1'b0, y}) && ({1'b0, vcount} < {1'b0, y} + 11'(HEIGHT));
    addr_full = 22'(hcount - x) + 22'(vcount - y) * 22'(WIDTH);
    addr = in_box ? addr_full[AW-1:0] : '0;
  end

  always_ff @(posedge clk) begin
    if (load_we) index_mem[load_addr] <= load_index;
    if (pal_we)  palette[pal_addr]    <= pal_rgb;
    index_q  <= index_mem[addr];
    in_box_q <= in_box;
    pixel    <= in_box_q ? palette[index_q] : '0;
  end
endmodule
