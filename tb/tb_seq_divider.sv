// Random divisions compared with the testbench's own / and %, including
// division by one and by zero, and the NW-clock latency.
`timescale 1ns/1ps
`include "tb_util.svh"
module tb_seq_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [30:0] dividend, quotient; logic [22:0] divisor, remainder;
  always #5 clk = ~clk;

  seq_divider #(.NW(31), .DW(23)) dut (.*);

  initial begin
    int lat;
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      dividend <= 31'($urandom);
      case (i % 10)
        0: divisor <= 23'd1;
        1: divisor <= 23'd0;
        2: divisor <= 23'($urandom % 50);
        default: divisor <= 23'($urandom);
      endcase
      start <= 1; @(posedge clk); start <= 0; #1;
      lat = 0;
      while (!done) begin @(posedge clk); #1; lat++; end
      if (divisor == 0)
        `CHECK(quotient == '1, "divide by zero")
      else begin
        `CHECK(quotient == dividend / 31'(divisor), $sformatf("%0d / %0d = %0d", dividend, divisor, quotient))
        `CHECK(remainder == 23'(dividend % 31'(divisor)), "remainder")
      end
      `CHECK(lat == 31, $sformatf("latency %0d", lat))
      @(posedge clk);
    end
    `TB_DONE
  end
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    `TB_DONE
  end
endmodule
