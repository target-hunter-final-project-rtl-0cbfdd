// RGB to HSV colour conversion, 8 bits per component.
//
// Hue is mapped onto 0..255 for a full turn of the colour wheel (red 0,
// green about 85, blue about 171), saturation is 255*(max-min)/max and
// value is max(r,g,b).  With max = min the hue and saturation are 0.
// Hue is computed as a base of 0, 85 or 171 for the largest component plus
// 43*(difference of the other two)/(max-min), wrapping modulo 256.
// The report converts the camera pixels to HSV because the hue carries most
// of the colour; it does not list the converter, so the arithmetic here is
// this design's own (the common integer formulation).
//
// Timing: two pipeline registers; h, s, v belong to the r, g, b presented
// two clocks earlier.  A new pixel may enter every clock.
module rgb2hsv (
  input  logic       clk,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic [7:0] h,
  output logic [7:0] s,
  output logic [7:0] v
);
  typedef enum logic [1:0] {MAX_R, MAX_G, MAX_B} maxsel_t;

  // stage 1: extremes
  logic [7:0]  mx, mn, mx_q, delta_q;
  maxsel_t     sel, sel_q;
  logic signed [8:0] diff, diff_q;

  always_comb begin
    if (r >= g && r >= b) begin
      mx = r; sel = MAX_R; diff = $signed({1'b0, g}) - $signed({1'b0, b});
    end else if (g >= b) begin
      mx = g; sel = MAX_G; diff = $signed({1'b0, b}) - $signed({1'b0, r});
    end else begin
      mx = b; sel = MAX_B; diff = $signed({1'b0, r}) - $signed({1'b0, g});
    end
    mn = (r <= g && r <= b) ? r : (g <= b) ? g : b;
  end

  always_ff @(posedge clk) begin
    mx_q    <= mx;
    delta_q <= mx - mn;
    sel_q   <= sel;
    diff_q  <= diff;
  end

  // stage 2: divisions
  logic signed [15:0] hue_off;
  logic [7:0]         base;
  logic [15:0]        sat;

  always_comb begin
    if (delta_q == '0) begin
      hue_off = '0;
      sat     = '0;
    end else begin
      hue_off = (16'sd43 * 16'(diff_q)) / $signed({8'd0, delta_q});
      sat     = (16'd255 * 16'(delta_q)) / {8'd0, mx_q};
    end
    unique case (sel_q)
      MAX_R:   base = 8'd0;
      MAX_G:   base = 8'd85;
      default: base = 8'd171;
    endcase
  end

  always_ff @(posedge clk) begin
    h <= (delta_q == '0) ? 8'd0 : base + hue_off[7:0];
    s <= sat[7:0];
    v <= mx_q;
  end
endmodule
