// Level countdown: the player has SECONDS seconds to hit the target.
//
// A divider makes a one-clock tick every CLK_HZ clocks (one second).  A
// start pulse loads SECONDS into the count and restarts the divider; each
// tick then takes one off while the count is above zero and pause (the
// rifle's safety switch) is low.  expire is high from the clock the count
// reaches zero until the next start.  After reset the timer is idle with
// expire low.  The ten seconds, the start signal from the game controller
// and pausing by the safety switch are the report's; the report does not
// show the timer's insides, so this is the simplest circuit that does it.
//
// Timing: start takes effect on the next clock edge; expire rises on the
// clock after the last tick.
module countdown_timer #(
  parameter int unsigned CLK_HZ  = 25_000_000,
  parameter int unsigned SECONDS = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       pause,
  output logic       expire,
  output logic [7:0] seconds_left
);
  localparam int unsigned DW = $clog2(CLK_HZ + 1);
  logic [DW-1:0] div;
  logic          running;
  logic          tick;

  assign tick = (div == DW'(CLK_HZ - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      div          <= '0;
      running      <= 1'b0;
      expire       <= 1'b0;
      seconds_left <= '0;
    end else if (start) begin
      div          <= '0;
      running      <= 1'b1;
      expire       <= 1'b0;
      seconds_left <= 8'(SECONDS);
    end else if (running && !pause) begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        seconds_left <= seconds_left - 8'd1;
        if (seconds_left == 8'd1) begin
          running <= 1'b0;
          expire  <= 1'b1;
        end
      end
    end
  end
endmodule
