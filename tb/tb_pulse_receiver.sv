// Sends gyro readings the way the rifle's microcontroller does (2 ms start
// pulse; 0.6 ms high for a one, 0.3 ms for a zero, 0.2 ms gaps, LSB first,
// 10 ms pause between readings) and checks every received byte and the
// running 16-reading sum / 32.  The sampling tick is 4 clocks, so the
// clock period is chosen to make 4 clocks 75 us.
`timescale 1us/1ns
`include "tb_util.svh"
module tb_pulse_receiver;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, data = 0;
  always #9.375 clk = ~clk;     // 4 clocks = 75 us
  logic signed [7:0] raw_byte, val_out;
  logic byte_valid, val_valid, receiving;

  pulse_receiver #(.TICK_CYCLES(4)) dut (.*);

  task automatic send(input logic [7:0] b);
    data = 1; #2000; data = 0; #200;
    for (int i = 0; i < 8; i++) begin
      data = 1;
      if (b[i]) #600; else #300;
      data = 0; #200;
    end
    #10000;
  endtask

  logic signed [7:0] sent [$];
  int got = 0, avgs = 0;
  always @(posedge clk) begin
    if (byte_valid && !rst) begin
      `CHECK(got < sent.size() && raw_byte == sent[got], $sformatf("byte %0d = %0d", got, raw_byte))
      got++;
    end
    if (val_valid && !rst) begin
      int sum;
      sum = 0;
      for (int k = 0; k < 16; k++) if (got - 1 - k >= 0) sum += int'($signed(sent[got - 1 - k]));
      `CHECK(val_out == 8'(sum >>> 5), $sformatf("average after %0d: %0d vs %0d", got, val_out, sum >>> 5))
      avgs++;
    end
  end

  initial begin
    logic signed [7:0] b;
    #100 rst = 0;
    #1000;
    for (int i = 0; i < 40; i++) begin
      case (i)
        0: b = 8'sd0;  1: b = -8'sd1; 2: b = 8'sd127; 3: b = -8'sd128; 4: b = 8'sd85;
        default: b = 8'($urandom);
      endcase
      sent.push_back(b);
      send(b);
    end
    #1000;
    `CHECK(got == 40 && avgs == 40, $sformatf("received %0d bytes, %0d averages", got, avgs))
    `TB_DONE
  end
  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
