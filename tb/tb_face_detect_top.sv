// tb_face_detect_top: end-to-end testbench for face_detect_top at its
// default size (640 x 480 active, 800 x 525 raster, skin window Cb 95..126,
// Cr 140..168, 3x3 majority filter, MIN_PIXELS 256, 97 x 97 box outline).
//
// The testbench plays the frame source: it answers every pixel request
// exactly SRC_LATENCY = 2 clocks later with a synthetic picture. Each frame
// has a bluish background sprinkled with isolated skin-coloured noise pixels
// and, in all frames but one, a skin-coloured rectangle (the "face") with
// isolated dark holes. The face moves between frames. Six frames are run.
//
// Reference model, independent of the RTL: for every frame the testbench
// converts the picture to YCbCr in floating point, applies the skin window,
// applies the 3x3 majority rule (centres (0..638, 0..478), outside pixels
// count as non-skin) and takes count and floor(mean) of the skin
// coordinates. It then checks
//   - every tracker update: pixel count, found flag and centroid;
//   - every VGA pixel, three clocks after its request: blank_n, and the
//     colour, which is the source colour except on the box outline drawn
//     around the centroid of the previous frame;
//   - the sync outputs: 525 hsync pulses of 96 clocks per frame, one vsync
//     pulse of 2 lines per frame, both active low.
// Mechanisms that must each occur at least once: a frame with a face found,
// a frame with no face, noise removed by the filter (raw skin count differs
// from the filtered count that the tracker reports), holes filled, a box
// drawn, a box moved between frames, and a frame shown without a box.
`timescale 1ns/1ps
module tb_face_detect_top;
  import face_pkg::*;

  localparam int W = 640, H = 480, HT = 800, VT = 525, NF = 6, LAT = 3;
  localparam int MINP = 256, HALF = 48, THICK = 2;
  localparam rgb_t GREEN = '{r: 8'd0, g: 8'd255, b: 8'd0};

  // Face rectangle per frame: x0, y0, width, height; width 0 = no face.
  localparam int FX [NF] = '{200, 380,   0, 100, 500, 260};
  localparam int FY [NF] = '{150, 260,   0, 300,  90, 200};
  localparam int FW [NF] = '{100,  90,   0, 120,  80, 110};
  localparam int FH [NF] = '{120, 110,   0, 100, 130, 150};

  logic clk = 1'b0, rst_n = 1'b0;
  logic src_req;
  coord_t src_x, src_y;
  rgb_t src_rgb;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_blank_n;
  logic face_update, face_found;
  coord_t face_x, face_y;
  logic [$clog2(W*H+1)-1:0] face_pixels;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  face_detect_top dut (
    .clk, .rst_n, .src_req, .src_x, .src_y, .src_rgb,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n,
    .face_update, .face_found, .face_x, .face_y, .face_pixels);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- picture
  function automatic bit in_face(input int f, input int x, input int y, input int margin);
    return FW[f] != 0 && x >= FX[f] - margin && x < FX[f] + FW[f] + margin &&
           y >= FY[f] - margin && y < FY[f] + FH[f] + margin;
  endfunction

  function automatic rgb_t picture(input int f, input int x, input int y);
    if (in_face(f, x, y, 0)) begin
      if (x % 11 == 0 && y % 13 == 0) return '{r: 8'd60, g: 8'd50, b: 8'd40};  // hole
      return '{r: 8'(200 + x % 8), g: 8'd150, b: 8'd120};                         // skin
    end
    if (!in_face(f, x, y, 3) && x % 37 == 5 && y % 29 == (7 + f) % 29)
      return '{r: 8'd205, g: 8'd150, b: 8'd120};                                   // noise
    return '{r: 8'(50 + x % 16), g: 8'd90, b: 8'(160 + y % 32)};                   // background
  endfunction

  // ---------------------------------------------------------- reference model
  bit     raw  [H][W];
  int     ref_cnt [NF], ref_raw [NF], ref_cx [NF], ref_cy [NF];
  bit     ref_found [NF];
  int     ref_filled [NF];

  function automatic bit skin_ref(input rgb_t c);
    real cb, cr;
    cb = -0.169 * c.r - 0.331 * c.g + 0.500 * c.b + 128.0;
    cr =  0.500 * c.r - 0.419 * c.g - 0.081 * c.b + 128.0;
    return cb >= 95.0 && cb <= 126.0 && cr >= 140.0 && cr <= 168.0;
  endfunction

  task automatic build_reference(input int f);
    longint sx, sy;
    int cnt, nraw, nfill, n;
    bit m;
    nraw = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        raw[y][x] = skin_ref(picture(f, x, y));
        nraw += int'(raw[y][x]);
      end
    cnt = 0; sx = 0; sy = 0; nfill = 0;
    for (int y = 0; y < H - 1; y++)
      for (int x = 0; x < W - 1; x++) begin
        n = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (x + dx >= 0 && x + dx < W && y + dy >= 0 && y + dy < H)
              n += int'(raw[y + dy][x + dx]);
        m = (n >= 5);
        if (m && !raw[y][x]) nfill++;
        if (m) begin cnt++; sx += x; sy += y; end
      end
    ref_raw[f]    = nraw;
    ref_cnt[f]    = cnt;
    ref_filled[f] = nfill;
    ref_found[f]  = cnt >= MINP;
    ref_cx[f]     = (cnt > 0) ? int'(sx / cnt) : 0;
    ref_cy[f]     = (cnt > 0) ? int'(sy / cnt) : 0;
  endtask

  // ------------------------------------------------------------ frame source
  typedef struct packed {
    logic   act;
    logic [7:0] f;
    coord_t x;
    coord_t y;
  } req_t;

  req_t q1, q2, r3;
  int   req_frame = -1;
  logic is00;

  assign is00 = src_req && src_x == '0 && src_y == '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      q1 <= '0; q2 <= '0; r3 <= '0;
    end else begin
      if (is00) req_frame <= req_frame + 1;
      q1 <= '{act: src_req, f: 8'(is00 ? req_frame + 1 : req_frame), x: src_x, y: src_y};
      q2 <= q1;
      r3 <= q2;
    end
  end

  assign src_rgb = q2.act ? picture(int'(q2.f) % NF, int'(q2.x), int'(q2.y)) : rgb_t'(24'h5a5a5a);

  // ------------------------------------------------------------- monitors
  int n_updates = 0, n_found = 0, n_lost = 0, n_noise_removed = 0, n_holes_filled = 0;
  int n_box_px = 0, n_box_frames = 0, n_nobox_frames = 0, n_box_moves = 0;
  int frame_box_px [NF];
  int last_box_cx = -1, last_box_cy = -1;

  always @(negedge clk) begin
    if (rst_n && face_update) begin
      int f;
      f = n_updates;
      if (f < NF) begin
        check(int'(face_pixels) == ref_cnt[f], "tracker pixel count");
        check(face_found == ref_found[f], "tracker found flag");
        if (ref_found[f]) begin
          check(int'(face_x) == ref_cx[f] && int'(face_y) == ref_cy[f], "tracker centroid");
          n_found++;
        end else n_lost++;
        if (int'(face_pixels) == ref_cnt[f] && ref_raw[f] != ref_cnt[f]) n_noise_removed++;
        if (ref_filled[f] > 0) n_holes_filled++;
        $display("frame %0d: skin %0d raw / %0d filtered, found %0b, centroid (%0d,%0d), expected (%0d,%0d)",
                 f, ref_raw[f], face_pixels, face_found, face_x, face_y, ref_cx[f], ref_cy[f]);
      end
      n_updates++;
    end
  end

  // VGA pixel check
  always @(negedge clk) begin
    if (rst_n && r3.f != 8'hff && int'(r3.f) < NF) begin
      int f, x, y, dx, dy;
      bit box;
      rgb_t e, got;
      f = int'(r3.f); x = int'(r3.x); y = int'(r3.y);
      got = '{r: vga_r, g: vga_g, b: vga_b};
      check(vga_blank_n == r3.act, "blank_n");
      if (r3.act) begin
        box = 1'b0;
        if (f > 0 && ref_found[f - 1]) begin
          dx = (x > ref_cx[f - 1]) ? x - ref_cx[f - 1] : ref_cx[f - 1] - x;
          dy = (y > ref_cy[f - 1]) ? y - ref_cy[f - 1] : ref_cy[f - 1] - y;
          box = dx <= HALF && dy <= HALF && (dx > HALF - THICK || dy > HALF - THICK);
        end
        e = box ? GREEN : picture(f, x, y);
        check(got == e, "VGA pixel");
        if (box && got == GREEN) begin
          n_box_px++;
          frame_box_px[f]++;
        end
      end else begin
        check(got == '0, "black in blanking");
      end
    end
  end

  // Sync check: hsync pulse widths and count per frame (between vsync falls).
  int hs_width = 0, hs_pulses = 0, vs_width = 0, n_vs = 0;
  logic hs_d = 1'b1, vs_d = 1'b1;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!vga_hs) hs_width++;
      if (vga_hs && !hs_d) begin
        check(hs_width == 96, "hsync width");
        hs_width = 0;
      end
      if (!vga_hs && hs_d) hs_pulses++;
      if (!vga_vs) vs_width++;
      if (vga_vs && !vs_d) begin
        check(vs_width == 2 * HT, "vsync width");
        vs_width = 0;
      end
      if (!vga_vs && vs_d) begin
        if (n_vs > 0) check(hs_pulses == VT, "hsync pulses per frame");
        hs_pulses = 0;
        n_vs++;
      end
      hs_d = vga_hs;
      vs_d = vga_vs;
    end
  end

  initial begin : watchdog
    repeat ((NF + 2) * HT * VT) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      build_reference(f);
      frame_box_px[f] = 0;
    end
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    // Run until the last frame has been shown and tracked.
    wait (n_updates == NF);
    repeat (HT * 20) @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      if (frame_box_px[f] > 0) begin
        n_box_frames++;
        // Box in this frame and the one before, around different centroids.
        if (f >= 2 && frame_box_px[f - 1] > 0 &&
            (ref_cx[f - 1] != ref_cx[f - 2] || ref_cy[f - 1] != ref_cy[f - 2]))
          n_box_moves++;
      end else n_nobox_frames++;
    end
    check(n_updates == NF, "one tracker update per frame");
    check(n_vs >= NF, "one vsync per frame");
    check(n_found > 0,          "mechanism: face found");
    check(n_lost > 0,           "mechanism: no face");
    check(n_noise_removed > 0,  "mechanism: noise removed by filter");
    check(n_holes_filled > 0,   "mechanism: holes filled by filter");
    check(n_box_px > 0,         "mechanism: box drawn");
    check(n_box_moves > 0,      "mechanism: box moved");
    check(n_nobox_frames > 0,   "mechanism: frame without box");
    $display("found %0d, no face %0d, noise removed %0d, holes filled %0d, box pixels %0d, box frames %0d, moves %0d, frames without box %0d",
             n_found, n_lost, n_noise_removed, n_holes_filled, n_box_px, n_box_frames, n_box_moves, n_nobox_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
