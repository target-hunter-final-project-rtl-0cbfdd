// Unsigned divider, one quotient bit per clock (restoring division).
//
// Used to turn the per-frame position sums of the ball tracker into the
// ball's centre (sum / count).  The report uses a divider core for this
// without describing its insides; this is the simplest serial divider.
//
// Interface: a start pulse latches dividend and divisor; NW clocks later
// done pulses for one clock with quotient and remainder valid; they hold
// until the next start.  busy is high in between; a start while busy is
// ignored.  Division by zero gives an all-ones quotient.
module seq_divider #(
  parameter int unsigned NW = 31,
  parameter int unsigned DW = 23
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder,
  output logic          busy,
  output logic          done
);
  localparam int unsigned CW = $clog2(NW + 1);
  logic [NW-1:0] q;
  logic [DW-1:0] rem;
  logic [DW-1:0] d;
  logic [CW-1:0] n;
  logic [DW:0]   trial;

  assign trial = {rem, q[NW-1]};

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy      <= 1'b0;
      q         <= '0;
      rem       <= '0;
      d         <= '0;
      n         <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        q    <= dividend;
        d    <= divisor;
        rem  <= '0;
        n    <= CW'(NW);
      end
    end else begin
      if (trial >= {1'b0, d}) begin
        rem <= DW'(trial - {1'b0, d});
        q   <= {q[NW-2:0], 1'b1};
      end else begin
        rem <= trial[DW-1:0];
        q   <= {q[NW-2:0], 1'b0};
      end
      n <= n - 1'b1;
      if (n == CW'(1)) begin
        busy      <= 1'b0;
        done      <= 1'b1;
        quotient  <= (trial >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        remainder <= (trial >= {1'b0, d}) ? DW'(trial - {1'b0, d}) : trial[DW-1:0];
      end
    end
  end
endmodule
