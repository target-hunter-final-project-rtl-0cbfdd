// Keeps the rifle's angle as a running total of the gyro's changes.
//
// Each new reading (in_valid) whose value differs from the one before it
// is added to the total, and the total is held inside -LIMIT..+LIMIT
// (+-30, the range of the tangent table).  A reading equal to the previous
// one is taken as a repeat and ignored, as in the report.  Reset sets the
// total to 0, i.e. the rifle's pose at reset is the reference.
//
// Timing: angle changes on the clock edge that sees in_valid.
module angle_integrator #(
  parameter int LIMIT = 30
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic signed [7:0] rate,
  output logic signed [5:0] angle
);
  logic signed [7:0] last;
  logic signed [9:0] total, nx;

  assign nx    = total + 10'(rate);
  assign angle = total[5:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      total <= '0;
      last  <= '0;
    end else if (in_valid) begin
      last <= rate;
      if (rate != last) begin
        if      (nx >=  10'(LIMIT))  total <=  10'(LIMIT);
        else if (nx <= -10'(LIMIT))  total <= -10'(LIMIT);
        else                         total <= nx;
      end
    end
  end
endmodule
