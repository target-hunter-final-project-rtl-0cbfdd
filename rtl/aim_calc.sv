// Turns a rifle angle into an aim offset in pixels.
//
// offset = (tan(angle) * 10000 * SCALE) >>> 13, i.e. about
// tan(angle) * SCALE * 1.22 pixels: the aim point moves by the tangent of
// the angle times a distance factor.  The table lookup, the factor 100 and
// the 13-bit shift are the report's.
//
// Timing: three registers (table, tangent, product); offset follows angle
// three clocks later.
module aim_calc #(
  parameter int SCALE = 100
) (
  input  logic               clk,
  input  logic signed [5:0]  angle,
  output logic signed [11:0] offset
);
  logic signed [16:0] tan, tan_q;
  logic signed [25:0] prod;

  tan_lut u_lut (.clk, .angle, .tan);

  always_ff @(posedge clk) begin
    tan_q <= tan;
    prod  <= 26'(tan_q) * 26'(SCALE);
  end

  assign offset = 12'(prod >>> 13);
endmodule
