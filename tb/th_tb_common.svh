// Shared stimulus for the two whole-game testbenches: a model of the
// camera (a square green ball plus lone noise pixels on a dark scene), a
// model of the gyro board's serial line, picture loading and a
// closed-loop "player" that moves the ball until the sight sits where it
// wants to shoot.  Included inside the testbench module, after the design
// signals are declared; it expects `int checks, failures;` and the
// localparam GYRO_TICK_TB there.

// ---------------- camera model ----------------
localparam logic [23:0] BALL_RGB = 24'hB4_C8_78;  // (180,200,120): in the ball window
localparam logic [23:0] DARK_RGB = 24'h28_28_3C;  // too dark to match
localparam int BALL_W = 9;
int ball_cx = 320, ball_cy = 240;                 // camera position of the ball

function automatic bit in_ball(int h, int v);
  return h >= ball_cx && h < ball_cx + BALL_W && v >= ball_cy && v < ball_cy + BALL_W;
endfunction

always_comb begin
  if (in_ball(int'(hcount), int'(vcount)))           cam_rgb = BALL_RGB;
  else if (hcount % 97 == 13 && vcount % 53 == 7)    cam_rgb = BALL_RGB;  // lone noise pixel
  else                                               cam_rgb = DARK_RGB;
end

// centre the tracker should report for the ball: a pixel counts when the
// pixel before it also matched, and the count starts at one
function automatic int exp_centre_x();
  int s = 0, n = 1;
  for (int x = ball_cx + 1; x < ball_cx + BALL_W; x++) begin s += x * BALL_W; n += BALL_W; end
  return s / n;
endfunction
function automatic int exp_centre_y();
  int s = 0, n = 1;
  for (int y = ball_cy; y < ball_cy + BALL_W; y++) begin s += y * (BALL_W - 1); n += BALL_W - 1; end
  return s / n;
endfunction

// ---------------- helpers ----------------
task automatic wait_frames(input int n);
  repeat (n) begin
    @(posedge clk iff (hcount == 0 && vcount == 0));
  end
  @(posedge clk); #1;
endtask

// move the ball until the sight is within tol pixels of (sx, sy)
task automatic aim_at(input int sx, input int sy, input int tol = 2);
  for (int it = 0; it < 8; it++) begin
    int ex, ey;
    wait_frames(1);
    ex = sx - int'(aim_x);
    ey = sy - int'(aim_y);
    if (ex <= tol && ex >= -tol && ey <= tol && ey >= -tol) return;
    ball_cx = ball_cx - (ex * 1024) / 1084;   // screen x is mirrored
    ball_cy = ball_cy + (ey * 1024) / 1170;
    if (ball_cx < 1) ball_cx = 1;
    if (ball_cx > 620) ball_cx = 620;
    if (ball_cy < 0) ball_cy = 0;
    if (ball_cy > 460) ball_cy = 460;
    wait_frames(1);
  end
endtask

task automatic pull_trigger(input int frames = 1);
  fire_n <= 1'b0;
  wait_frames(frames);
  fire_n <= 1'b1;
  repeat (10) @(posedge clk);
  #1;
endtask

// gyro board: start pulse, then LSB first, 0.6 ms high = 1, 0.3 ms = 0
// short pull (a few dozen clocks) used to leave the Hit! screen, so the
// same pull cannot also count as a shot in the level that follows
task automatic tap_trigger;
  fire_n <= 1'b0;
  repeat (40) @(posedge clk);
  fire_n <= 1'b1;
  repeat (10) @(posedge clk);
  #1;
endtask

task automatic gyro_send(input int axis, input logic [7:0] b);
  localparam int US75 = GYRO_TICK_TB;      // clocks per 75 us
  gyro_ser[axis] <= 1'b1; repeat (US75 * 2000 / 75) @(posedge clk);
  gyro_ser[axis] <= 1'b0; repeat (US75 * 200 / 75) @(posedge clk);
  for (int i = 0; i < 8; i++) begin
    gyro_ser[axis] <= 1'b1;
    repeat (US75 * (b[i] ? 600 : 300) / 75) @(posedge clk);
    gyro_ser[axis] <= 1'b0;
    repeat (US75 * 200 / 75) @(posedge clk);
  end
  repeat (US75 * 4) @(posedge clk);
endtask

// ---------------- pictures ----------------
function automatic logic [23:0] pal_colour(int img, int i);
  return {8'(img * 25 + 3), 8'(i * 16), 8'(200 - img * 10)};
endfunction
function automatic logic [3:0] pic_index(int img, int a);
  return 4'((a / 7 + img) % 16);
endfunction

task automatic load_pictures;
  int sizes [9];
  sizes = '{640*480, 500*100, 200*75, 200*75, 200*75, 100*100, 50*50, 25*25, 100*50};
  for (int img = 0; img < 9; img++) begin
    img_sel <= th_pkg::image_id_t'(img);
    for (int i = 0; i < 16; i++) begin
      pal_we <= 1'b1; pal_addr <= 4'(i); pal_rgb <= pal_colour(img, i);
      @(posedge clk);
    end
    pal_we <= 1'b0;
    for (int a = 0; a < sizes[img]; a++) begin
      img_we <= 1'b1; img_addr <= 19'(a); img_index <= pic_index(img, a);
      @(posedge clk);
    end
    img_we <= 1'b0;
  end
endtask

task automatic load_sounds(input int l0, input int l1, input int l2);
  int lens [3];
  lens = '{l0, l1, l2};
  for (int c = 0; c < 3; c++)
    for (int a = 0; a < lens[c]; a++) begin
      snd_we <= 1'b1; snd_sel <= 2'(c); snd_addr <= 17'(a);
      snd_data <= {8'(c * 80 + a % 50 + 1), 8'h00};
      @(posedge clk);
    end
  snd_we <= 1'b0;
endtask

// codec frame pulse, 48 kHz at the 25 MHz pixel clock
int ready_div = 0;
always @(posedge clk) begin
  ready_div <= (ready_div == 520) ? 0 : ready_div + 1;
  codec_ready <= (ready_div == 0);
end

// VGA output is three clocks behind the scan position
logic [10:0] h_hist [3];
logic [9:0]  v_hist [3];
always @(posedge clk) begin
  h_hist[0] <= hcount; h_hist[1] <= h_hist[0]; h_hist[2] <= h_hist[1];
  v_hist[0] <= vcount; v_hist[1] <= v_hist[0]; v_hist[2] <= v_hist[1];
end
