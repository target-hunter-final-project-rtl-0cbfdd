// 640x480 @ 60 Hz VGA scan generator.
//
// Two counters walk the raster: hcount over 800 pixel clocks per line and
// vcount over 524 lines per frame, which at a 25 MHz pixel clock gives the
// report's 60 Hz refresh.  Visible area is 640x480; the horizontal sync
// pulse covers hcount 656..751 and the vertical one lines 491..492, both
// active low, as in the report's scan generator.  blank is high outside the
// visible area.  hcount/vcount are registered outputs; hsync, vsync and
// blank are registered and refer to the same (hcount, vcount) as presented
// in the same cycle.  frame_start pulses for one clock when the scan
// returns to (0,0).  Reset behaviour is this design's choice.
module vga_timing #(
  parameter int unsigned H_ACTIVE  = 640,
  parameter int unsigned H_SYNC_ON = 656,
  parameter int unsigned H_SYNC_OFF= 752,
  parameter int unsigned H_TOTAL   = 800,
  parameter int unsigned V_ACTIVE  = 480,
  parameter int unsigned V_SYNC_ON = 491,
  parameter int unsigned V_SYNC_OFF= 493,
  parameter int unsigned V_TOTAL   = 524
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        blank,
  output logic        frame_start
);
  logic [10:0] h_nx;
  logic [9:0]  v_nx;

  always_comb begin
    if (hcount == 11'(H_TOTAL - 1)) begin
      h_nx = '0;
      v_nx = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end else begin
      h_nx = hcount + 11'd1;
      v_nx = vcount;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount      <= '0;
      vcount      <= '0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      blank       <= 1'b0;
      frame_start <= 1'b1;
    end else begin
      hcount      <= h_nx;
      vcount      <= v_nx;
      hsync_n     <= !(h_nx >= 11'(H_SYNC_ON) && h_nx < 11'(H_SYNC_OFF));
      vsync_n     <= !(v_nx >= 10'(V_SYNC_ON) && v_nx < 10'(V_SYNC_OFF));
      blank       <= (h_nx >= 11'(H_ACTIVE)) || (v_nx >= 10'(V_ACTIVE));
      frame_start <= (h_nx == '0) && (v_nx == '0);
    end
  end
endmodule
