// Receiver for the gyro's pulse-width serial line.
//
// The rifle's gyro board sends one 8-bit two's-complement rate reading at
// a time, least significant bit first: a long start pulse (2 ms), then for
// each bit a high pulse of 0.6 ms for a one or 0.3 ms for a zero, pulses
// separated by 0.2 ms low.  The line is sampled every TICK_CYCLES clocks
// (75 us at the default 25 MHz clock, the report's sample period).  The
// number of high samples of a pulse is counted; when the line falls a
// count of ONE_MIN..ONE_MAX is a one, ZERO_MIN..ZERO_MAX a zero, and any
// other length (the start pulse among them) only clears the count.  Bits
// enter at the top of a shift register, so after eight bits the first one
// sent is bit 0.  Each finished byte goes into a 16-entry history, and the
// output is the signed sum of the history divided by 32, rounded towards
// minus infinity (the report's choice, half the average).
//
// The pulse lengths, the 75 us sampling, the count windows 3..5 and 7..12,
// the 16-value history and the divide by 32 are the report's.  Dropping
// pulses of any other length is this design's choice.
//
// Interface: byte_valid pulses for one clock when a byte has been
// received (raw_byte holds it); val_out and val_valid follow one clock
// later with the new average.  receiving is high while a byte is coming in.
module pulse_receiver #(
  parameter int unsigned TICK_CYCLES = 1875,
  parameter int unsigned ZERO_MIN = 3,
  parameter int unsigned ZERO_MAX = 5,
  parameter int unsigned ONE_MIN  = 7,
  parameter int unsigned ONE_MAX  = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              data,
  output logic signed [7:0] raw_byte,
  output logic              byte_valid,
  output logic signed [7:0] val_out,
  output logic              val_valid,
  output logic              receiving
);
  localparam int unsigned TW = $clog2(TICK_CYCLES + 1);
  logic [TW-1:0] div;
  logic          tick;
  logic [5:0]    cnt;
  logic [3:0]    bits;
  logic [7:0]    sh;
  logic signed [7:0] hist [16];
  logic signed [12:0] sum;

  assign tick = (div == TW'(TICK_CYCLES - 1));

  always_comb begin
    sum = '0;
    for (int i = 0; i < 16; i++) sum += 13'($signed(hist[i]));
  end

  always_ff @(posedge clk) begin
    byte_valid <= 1'b0;
    val_valid  <= 1'b0;
    if (rst) begin
      div       <= '0;
      cnt       <= '0;
      bits      <= '0;
      sh        <= '0;
      raw_byte  <= '0;
      val_out   <= '0;
      receiving <= 1'b0;
      for (int i = 0; i < 16; i++) hist[i] <= '0;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        if (data) begin
          if (cnt != '1) cnt <= cnt + 1'b1;
          receiving <= 1'b1;
        end else if (cnt != '0) begin
          cnt <= '0;
          if (cnt >= 6'(ONE_MIN) && cnt <= 6'(ONE_MAX)) begin
            sh   <= {1'b1, sh[7:1]};
            bits <= bits + 1'b1;
          end else if (cnt >= 6'(ZERO_MIN) && cnt <= 6'(ZERO_MAX)) begin
            sh   <= {1'b0, sh[7:1]};
            bits <= bits + 1'b1;
          end
        end
      end
      if (bits == 4'd8) begin
        bits       <= '0;
        receiving  <= 1'b0;
        raw_byte   <= sh;
        byte_valid <= 1'b1;
        hist[0]    <= sh;
        for (int i = 1; i < 16; i++) hist[i] <= hist[i-1];
      end
      if (byte_valid) begin
        val_out   <= sum[12:5];
        val_valid <= 1'b1;
      end
    end
  end
endmodule
