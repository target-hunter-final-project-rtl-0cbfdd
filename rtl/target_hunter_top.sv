// Target shooting game: camera- and gyro-aimed rifle against moving
// animal targets on a 640x480 VGA screen.
//
// Aiming.  The camera picture arrives pixel by pixel in scan order
// (cam_rgb belongs to the hcount/vcount this module outputs in the same
// clock).  It is converted to HSV, pixels in the colour window of the green
// ball on the rifle's muzzle are found, and once per frame the sums of
// their x and y positions are divided by their number to give the ball's
// centre.  Two pulse-width serial lines from the rifle's gyro board carry
// yaw (gyro_ser[0]) and pitch (gyro_ser[1]) rates; each is integrated to
// an angle, looked up in a tangent table and scaled to a pixel offset that
// is added to the camera result when gyro_en is high.  The sum is mapped
// to screen coordinates and is where the sight is drawn.
//
// Game.  game_fsm runs the title, the three levels and the "Hit!" screen;
// target_mover units move the targets once per frame at the level speed;
// countdown_timer gives each round ten seconds.  A hit is a trigger pull
// while the sight and a visible (non-white) target pixel coincide.
//
// Display.  Every picture is an image_sprite (4-bit indexed image plus
// colour table); the sight is drawn on the fly; display_compositor layers
// them according to the game state.  show_camera swaps in the tracking
// view instead (camera picture, matched pixels yellow, lines through the
// centre).
//
// Sound.  sound_player plays background music, a gobble or a gunshot as the
// game asks; it takes the audio codec's frame pulse and gives 8-bit samples.
//
// Loading.  The pictures and sound clips are recordings that this design
// does not contain; img_* / pal_* / snd_* ports fill the memories after
// reset (img_sel / snd_sel pick the memory, see th_pkg::image_id_t and
// sound_player).
//
// From the original game: the block structure, the 640x480 screen at a
// 25 MHz clock, the picture sizes, the HSV window, the camera-to-screen
// mapping, the state numbering and all counts and limits in the
// parameters.  This design's own choices: the load ports, the sound player
// sharing the chip with the game (the original used a second board), the
// gyro_en switch, the status outputs, the start positions of targets and
// leaving white (transparent) target pixels out of the hit test.
//
// Timing: one clock domain (the 25 MHz pixel clock).  The VGA outputs are
// three clocks behind hcount/vcount and carry their own matching sync and
// blank.  fire_n is the trigger contact, low while pulled (pull-up to the
// supply, switch to ground).
module target_hunter_top
  import th_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 25_000_000,
  parameter int unsigned ROUND_SECONDS  = 10,
  parameter int unsigned DEBOUNCE_CYCLES= 650_000,
  parameter int unsigned FIRE_HOLDOFF   = 24_000_000,
  parameter int unsigned GUN_CYCLES     = 17_500_000,
  parameter int unsigned GYRO_TICK      = 1875,
  parameter int unsigned SPEED_STEP     = 2,
  parameter int unsigned SPEED_MAX      = 27,
  parameter int unsigned BG_LEN         = 110_000,
  parameter int unsigned GOBBLE_LEN     = 110_000,
  parameter int unsigned GUN_LEN        = 22_000
) (
  input  logic         clk,
  input  logic         rst,
  // camera, rifle and switches
  input  rgb_t         cam_rgb,
  input  logic         fire_n,
  input  logic         pause,
  input  logic         gyro_en,
  input  logic         show_camera,
  input  logic [1:0]   gyro_ser,
  // scan position (for the camera frame buffer read-out)
  output logic [10:0]  hcount,
  output logic [9:0]   vcount,
  // VGA
  output rgb_t         vga_rgb,
  output logic         vga_hsync_n,
  output logic         vga_vsync_n,
  output logic         vga_blank,
  // picture load port
  input  logic         img_we,
  input  image_id_t    img_sel,
  input  logic [18:0]  img_addr,
  input  logic [3:0]   img_index,
  input  logic         pal_we,
  input  logic [3:0]   pal_addr,
  input  rgb_t         pal_rgb,
  // sound
  input  logic         codec_ready,
  output logic [7:0]   sound_sample,
  output sound_req_t   sound_req,
  input  logic         snd_we,
  input  logic [1:0]   snd_sel,
  input  logic [16:0]  snd_addr,
  input  logic [15:0]  snd_data,
  // status
  output game_state_t  state,
  output logic [4:0]   speed,
  output logic [7:0]   seconds_left,
  output logic [10:0]  aim_x,
  output logic [9:0]   aim_y,
  output logic [10:0]  ball_x,
  output logic [9:0]   ball_y,
  output logic [1:0]   targets_down,
  // one-clock event strobes: {bounce, expire, advance, speed-up, first hit,
  // round won, level selected}
  output logic [6:0]   events
);
  // ---------------- scan ----------------
  logic hsync_n, vsync_n, blank, frame_start;
  vga_timing u_vga (.clk, .rst, .hcount, .vcount, .hsync_n, .vsync_n, .blank, .frame_start);

  // scan position delayed to match the two-clock camera colour conversion
  logic [10:0] hc_d [2];
  logic [9:0]  vc_d [2];
  rgb_t        cam_d [2];
  logic [2:0]  hs_d, vs_d, bl_d;
  always_ff @(posedge clk) begin
    hc_d[0] <= hcount;  hc_d[1] <= hc_d[0];
    vc_d[0] <= vcount;  vc_d[1] <= vc_d[0];
    cam_d[0] <= cam_rgb; cam_d[1] <= cam_d[0];
    hs_d <= {hs_d[1:0], hsync_n};
    vs_d <= {vs_d[1:0], vsync_n};
    bl_d <= {bl_d[1:0], blank};
  end

  // ---------------- camera tracking ----------------
  logic [7:0]  hue, sat, val;
  logic        match, track_done, cx_done, cy_done;
  logic [30:0] sum_x, sum_y, qx, qy;
  logic [22:0] npix, rx, ry;
  logic        bx_busy, by_busy;

  rgb2hsv u_hsv (.clk, .r(cam_rgb[23:16]), .g(cam_rgb[15:8]), .b(cam_rgb[7:0]),
                 .h(hue), .s(sat), .v(val));

  color_tracker u_track (.clk, .rst, .hcount(hc_d[1]), .vcount(vc_d[1]),
                         .h(hue), .s(sat), .v(val), .match,
                         .sum_x, .sum_y, .count(npix), .frame_done(track_done));

  seq_divider #(.NW(31), .DW(23)) u_div_x (.clk, .rst, .start(track_done), .dividend(sum_x),
    .divisor(npix), .quotient(qx), .remainder(rx), .busy(bx_busy), .done(cx_done));
  seq_divider #(.NW(31), .DW(23)) u_div_y (.clk, .rst, .start(track_done), .dividend(sum_y),
    .divisor(npix), .quotient(qy), .remainder(ry), .busy(by_busy), .done(cy_done));

  always_ff @(posedge clk) begin
    if (rst) begin
      ball_x <= 11'd320;
      ball_y <= 10'd240;
    end else begin
      if (cx_done) ball_x <= qx[10:0];
      if (cy_done) ball_y <= qy[9:0];
    end
  end

  // ---------------- gyro ----------------
  logic signed [7:0]  rate_raw [2], rate_avg [2];
  logic               byte_ok [2], rate_ok [2], rx_busy [2];
  logic signed [5:0]  angle [2];
  logic signed [11:0] offset [2];

  for (genvar a = 0; a < 2; a++) begin : g_axis
    pulse_receiver #(.TICK_CYCLES(GYRO_TICK)) u_rx (
      .clk, .rst, .data(gyro_ser[a]), .raw_byte(rate_raw[a]), .byte_valid(byte_ok[a]),
      .val_out(rate_avg[a]), .val_valid(rate_ok[a]), .receiving(rx_busy[a]));
    angle_integrator u_int (.clk, .rst, .in_valid(rate_ok[a]), .rate(rate_avg[a]), .angle(angle[a]));
    aim_calc u_aim (.clk, .angle(angle[a]), .offset(offset[a]));
  end

  logic [10:0] adj_x;
  logic [9:0]  adj_y;
  aim_combiner u_comb (.clk, .rst, .gyro_en, .hold(pause), .cam_x(ball_x), .cam_y(ball_y),
                       .dx(offset[0]), .dy(offset[1]), .adj_x, .adj_y, .aim_x, .aim_y);

  // ---------------- rifle trigger ----------------
  logic trig_clean, fire;
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_deb (.clk, .rst, .noisy(fire_n), .clean(trig_clean));
  assign fire = !trig_clean;

  // ---------------- game ----------------
  logic a_down, b_down, start_on, expire;
  logic hit_a, hit_b;
  logic ev_select, ev_hit, ev_first_hit, ev_speedup, ev_advance, ev_expire;

  game_fsm #(.FIRE_HOLDOFF(FIRE_HOLDOFF), .GUN_CYCLES(GUN_CYCLES),
             .SPEED_STEP(SPEED_STEP), .SPEED_MAX(SPEED_MAX)) u_fsm (
    .clk, .rst, .fire, .pause, .expire, .aim_x, .aim_y, .hit_a, .hit_b,
    .state, .speed, .a_down, .b_down, .start_on, .sound(sound_req),
    .ev_select, .ev_hit, .ev_first_hit, .ev_speedup, .ev_advance, .ev_expire);
  assign targets_down = {b_down, a_down};

  countdown_timer #(.CLK_HZ(CLK_HZ), .SECONDS(ROUND_SECONDS)) u_timer (
    .clk, .rst, .start(start_on), .pause, .expire, .seconds_left);

  logic [10:0] t1_x, t2_x;
  logic [9:0]  t1_y, t2_y;
  logic        t1_b, t2_b;
  target_mover #(.START_X(320), .START_Y(240), .START_VX(1'b0), .START_VY(1'b0)) u_move1 (
    .clk, .rst, .frame_tick(frame_start), .pause, .speed, .x(t1_x), .y(t1_y), .bounced(t1_b));
  target_mover #(.START_X(320), .START_Y(240), .START_VX(1'b1), .START_VY(1'b1)) u_move2 (
    .clk, .rst, .frame_tick(frame_start), .pause, .speed, .x(t2_x), .y(t2_y), .bounced(t2_b));

  assign events = {t1_b | t2_b, ev_expire, ev_advance, ev_speedup, ev_first_hit, ev_hit, ev_select};

  // ---------------- pictures ----------------
  rgb_t px_bg, px_title, px_beg, px_int, px_exp, px_deer, px_tk1, px_tk2, px_dk1, px_dk2,
        px_hit, px_sight, px_a, px_b, px_game, px_cam;

  function automatic logic sel(input image_id_t want, input image_id_t got, input logic we);
    return we && (want == got);
  endfunction

  image_sprite #(.WIDTH(640), .HEIGHT(480)) u_bg (.clk, .x(11'd0), .y(10'd0), .hcount, .vcount,
    .pixel(px_bg), .load_we(sel(IMG_BACKGROUND, img_sel, img_we)), .load_addr(19'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_BACKGROUND, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(500), .HEIGHT(100)) u_title (.clk, .x(11'd70), .y(10'd50), .hcount, .vcount,
    .pixel(px_title), .load_we(sel(IMG_TITLE, img_sel, img_we)), .load_addr(16'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_TITLE, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(200), .HEIGHT(75)) u_beg (.clk, .x(11'd210), .y(10'd200), .hcount, .vcount,
    .pixel(px_beg), .load_we(sel(IMG_BEGINNER, img_sel, img_we)), .load_addr(14'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_BEGINNER, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(200), .HEIGHT(75)) u_int (.clk, .x(11'd210), .y(10'd300), .hcount, .vcount,
    .pixel(px_int), .load_we(sel(IMG_INTERMEDIATE, img_sel, img_we)), .load_addr(14'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_INTERMEDIATE, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(200), .HEIGHT(75)) u_exp (.clk, .x(11'd210), .y(10'd400), .hcount, .vcount,
    .pixel(px_exp), .load_we(sel(IMG_EXPERT, img_sel, img_we)), .load_addr(14'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_EXPERT, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(100), .HEIGHT(100)) u_deer (.clk, .x(t1_x), .y(t1_y), .hcount, .vcount,
    .pixel(px_deer), .load_we(sel(IMG_DEER, img_sel, img_we)), .load_addr(14'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_DEER, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(50), .HEIGHT(50)) u_turkey1 (.clk, .x(t1_x), .y(t1_y), .hcount, .vcount,
    .pixel(px_tk1), .load_we(sel(IMG_TURKEY, img_sel, img_we)), .load_addr(12'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_TURKEY, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(50), .HEIGHT(50)) u_turkey2 (.clk, .x(t2_x), .y(t2_y), .hcount, .vcount,
    .pixel(px_tk2), .load_we(sel(IMG_TURKEY, img_sel, img_we)), .load_addr(12'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_TURKEY, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(25), .HEIGHT(25)) u_duck1 (.clk, .x(t1_x), .y(t1_y), .hcount, .vcount,
    .pixel(px_dk1), .load_we(sel(IMG_DUCK, img_sel, img_we)), .load_addr(10'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_DUCK, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(25), .HEIGHT(25)) u_duck2 (.clk, .x(t2_x), .y(t2_y), .hcount, .vcount,
    .pixel(px_dk2), .load_we(sel(IMG_DUCK, img_sel, img_we)), .load_addr(10'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_DUCK, img_sel, pal_we)), .pal_addr, .pal_rgb);
  image_sprite #(.WIDTH(100), .HEIGHT(50)) u_hit (.clk, .x(11'd270), .y(10'd200), .hcount, .vcount,
    .pixel(px_hit), .load_we(sel(IMG_HIT, img_sel, img_we)), .load_addr(13'(img_addr)),
    .load_index(img_index), .pal_we(sel(IMG_HIT, img_sel, pal_we)), .pal_addr, .pal_rgb);

  sight u_sight (.clk, .x(aim_x), .y(aim_y), .hcount, .vcount, .pixel(px_sight));

  // the level's targets: A moves with mover 1, B with mover 2
  always_comb begin
    unique case (state)
      ST_BEGINNER:     begin px_a = px_deer; px_b = '0;     end
      ST_INTERMEDIATE: begin px_a = px_tk1;  px_b = px_tk2; end
      ST_EXPERT:       begin px_a = px_dk1;  px_b = px_dk2; end
      default:         begin px_a = '0;      px_b = '0;     end
    endcase
    // white is transparent in the pictures, so it is not part of the target
    hit_a = (px_a != '0) && (px_a != WHITE) && (px_sight != '0);
    hit_b = (px_b != '0) && (px_b != WHITE) && (px_sight != '0);
  end

  display_compositor u_comp (.clk, .state, .a_down, .b_down, .sight_px(px_sight),
    .background_px(px_bg), .title_px(px_title), .beginner_px(px_beg), .intermediate_px(px_int),
    .expert_px(px_exp), .target_a_px(px_a), .target_b_px(px_b), .hit_px(px_hit),
    .out_pixel(px_game));

  track_overlay u_overlay (.clk, .hcount(hc_d[1]), .vcount(vc_d[1]), .cam_rgb(cam_d[1]), .match,
                           .cx(ball_x), .cy(ball_y), .pixel(px_cam));

  always_comb begin
    vga_rgb     = bl_d[2] ? '0 : (show_camera ? px_cam : px_game);
    vga_hsync_n = hs_d[2];
    vga_vsync_n = vs_d[2];
    vga_blank   = bl_d[2];
  end

  // ---------------- sound ----------------
  sound_player #(.BG_LEN(BG_LEN), .GOBBLE_LEN(GOBBLE_LEN), .GUN_LEN(GUN_LEN)) u_sound (
    .clk, .rst, .ready(codec_ready), .req(sound_req), .sample(sound_sample),
    .load_we(snd_we), .load_sel(snd_sel), .load_addr(snd_addr), .load_data(snd_data));
endmodule
