// Sound effects of the game: background music, turkey gobble, gunshot.
//
// Three sound_clip memories play while the game asks for them
// (th_pkg::sound_req_t).  The sample sent to the codec is the gunshot's
// if the gunshot is requested, else the background music's if that is
// requested, else the gobble's, else silence, the priority of the report.
// Clip lengths are the report's: 110000 samples for the background music
// and the gobble, 22000 for the gunshot.  In the report this unit sits on
// a second FPGA board that receives the three request wires; here it is
// a module of its own that can be placed on either side.
//
// Interface: `ready` is the codec's once-per-frame pulse, `sample` the
// 8-bit value to send; one shared load port (load_sel picks the clip:
// 0 background, 1 gobble, 2 gunshot) fills the clip memories.
// Timing: sample changes two clocks after a clip's address steps.
module sound_player
  import th_pkg::*;
#(
  parameter int unsigned BG_LEN     = 110_000,
  parameter int unsigned GOBBLE_LEN = 110_000,
  parameter int unsigned GUN_LEN    = 22_000,
  localparam int unsigned AW = $clog2(BG_LEN > GOBBLE_LEN ? BG_LEN : GOBBLE_LEN)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ready,
  input  sound_req_t   req,
  output logic [7:0]   sample,
  input  logic         load_we,
  input  logic [1:0]   load_sel,
  input  logic [AW-1:0] load_addr,
  input  logic [15:0]  load_data
);
  localparam int unsigned BW = $clog2(BG_LEN);
  localparam int unsigned OW = $clog2(GOBBLE_LEN);
  localparam int unsigned GW = $clog2(GUN_LEN);
  logic [7:0]    s_bg, s_gob, s_gun;
  logic [BW-1:0] a_bg;
  logic [OW-1:0] a_gob;
  logic [GW-1:0] a_gun;
  sound_req_t    req_q, req_qq;

  sound_clip #(.LEN(BG_LEN)) u_bg (
    .clk, .rst, .ready, .play(req.background), .sample(s_bg), .addr(a_bg),
    .load_we(load_we && load_sel == 2'd0), .load_addr(BW'(load_addr)), .load_data);
  sound_clip #(.LEN(GOBBLE_LEN)) u_gobble (
    .clk, .rst, .ready, .play(req.gobble), .sample(s_gob), .addr(a_gob),
    .load_we(load_we && load_sel == 2'd1), .load_addr(OW'(load_addr)), .load_data);
  sound_clip #(.LEN(GUN_LEN)) u_gun (
    .clk, .rst, .ready, .play(req.gun), .sample(s_gun), .addr(a_gun),
    .load_we(load_we && load_sel == 2'd2), .load_addr(GW'(load_addr)), .load_data);

  // the request is delayed like the clip samples so the mux matches them
  always_ff @(posedge clk) begin
    if (rst) begin
      req_q  <= '0;
      req_qq <= '0;
    end else begin
      req_q  <= req;
      req_qq <= req_q;
    end
  end

  always_comb begin
    if      (req_qq.gun)        sample = s_gun;
    else if (req_qq.background) sample = s_bg;
    else if (req_qq.gobble)     sample = s_gob;
    else                        sample = 8'd0;
  end
endmodule
