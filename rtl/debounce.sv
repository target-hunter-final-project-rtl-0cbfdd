// Debouncer for a mechanical contact (the rifle trigger).
//
// The output follows the input only after the input has stayed at the same
// level for STABLE_CYCLES clocks; any change restarts the wait.  The
// report's count of 650000 clocks is about 26 ms at 25 MHz.  At reset the
// output takes the input's level at once.
//
// Timing: clean changes STABLE_CYCLES+1 clocks after the last bounce.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 650_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);
  logic [CW-1:0] cnt;
  logic          last;

  always_ff @(posedge clk) begin
    if (rst) begin
      last  <= noisy;
      clean <= noisy;
      cnt   <= '0;
    end else if (noisy != last) begin
      last <= noisy;
      cnt  <= '0;
    end else if (cnt == CW'(STABLE_CYCLES)) begin
      clean <= last;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
