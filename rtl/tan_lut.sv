// Tangent table for angles of -30..+30 degrees.
//
// tan = round(10000 * tan(|angle| degrees)), with the sign of the angle.
// Angles beyond +-30 are clipped to +-30.  The table replaces a
// trigonometric unit because the rifle never turns more than about 15
// degrees either way; the 1-degree steps and the 10000 scaling are the
// report's.
//
// Timing: registered, tan belongs to the angle of the previous clock.
module tan_lut (
  input  logic               clk,
  input  logic signed [5:0]  angle,
  output logic signed [16:0] tan
);
  logic [4:0]  mag;
  logic [12:0] t;

  always_comb begin
    mag = angle[5] ? 5'(-angle) : angle[4:0];
    if (angle < -6'sd30 || angle > 6'sd30) mag = 5'd30;
    unique case (mag)
      5'd0:  t = 13'd0;     5'd1:  t = 13'd175;   5'd2:  t = 13'd349;
      5'd3:  t = 13'd524;   5'd4:  t = 13'd699;   5'd5:  t = 13'd875;
      5'd6:  t = 13'd1051;  5'd7:  t = 13'd1228;  5'd8:  t = 13'd1405;
      5'd9:  t = 13'd1584;  5'd10: t = 13'd1763;  5'd11: t = 13'd1944;
      5'd12: t = 13'd2126;  5'd13: t = 13'd2309;  5'd14: t = 13'd2493;
      5'd15: t = 13'd2679;  5'd16: t = 13'd2867;  5'd17: t = 13'd3057;
      5'd18: t = 13'd3249;  5'd19: t = 13'd3443;  5'd20: t = 13'd3640;
      5'd21: t = 13'd3839;  5'd22: t = 13'd4040;  5'd23: t = 13'd4245;
      5'd24: t = 13'd4452;  5'd25: t = 13'd4663;  5'd26: t = 13'd4877;
      5'd27: t = 13'd5095;  5'd28: t = 13'd5317;  5'd29: t = 13'd5543;
      default: t = 13'd5774;
    endcase
  end

  always_ff @(posedge clk)
    tan <= angle[5] ? -$signed({4'd0, t}) : $signed({4'd0, t});
endmodule
