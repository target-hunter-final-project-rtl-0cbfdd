// One stored sound clip, played in a loop while `play` is high.
//
// The clip is LEN 16-bit samples.  On every second `ready` pulse of the
// audio codec (ready comes once per 48 kHz codec frame) the read address
// steps by one, wrapping from LEN-1 to 0, so the clip plays at 24 kHz, as
// in the report.  While play is low the address stays where it is.  The
// upper 8 bits of the addressed sample are the output.  The clip lengths
// and the 16-bit words are the report's.  The samples themselves come
// from recordings that are not part of this design, so the memory has a
// write port (load_*) to fill it; that port is this design's choice.
//
// Timing: sample follows the address by two clocks (memory read and
// output register).
module sound_clip #(
  parameter int unsigned LEN = 110_000,
  localparam int unsigned AW = $clog2(LEN)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ready,
  input  logic          play,
  output logic [7:0]    sample,
  output logic [AW-1:0] addr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [15:0]   load_data
);
  logic [15:0] mem [LEN];
  logic [15:0] word_q;
  logic        half;   // skips every other ready pulse

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
      half <= 1'b0;
    end else if (ready && play) begin
      half <= !half;
      if (!half) addr <= (addr == AW'(LEN - 1)) ? '0 : addr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    word_q <= mem[addr];
    sample <= word_q[15:8];
  end
endmodule
