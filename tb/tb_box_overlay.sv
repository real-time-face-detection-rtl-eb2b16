// tb_box_overlay: self-checking testbench for box_overlay.
//
// A 20 x 16 raster with BOX_HALF = 4 and BOX_THICK = 2 runs four frames whose
// pixels carry a colour computed from their position. The centroid inputs
// are changed in the middle of frames to check that they are sampled only
// at sof. Each output pixel is compared, one clock later, with the expected
// picture: box colour on the outline around the centroid sampled for that
// frame, the input colour elsewhere, and black in blanking. One frame has
// found_i low and must show no box; the number of box pixels drawn is
// checked against the count the outline should have (clipped at the image
// edge for the box that touches it).
`timescale 1ns/1ps
module tb_box_overlay;
  import face_pkg::*;

  localparam int W = 20, H = 16, HB = 3, VB = 10, HALF = 4, THICK = 2;
  localparam rgb_t COL = '{r: 8'd0, g: 8'd255, b: 8'd0};

  logic clk = 1'b0, rst_n = 1'b0;
  vid_t vid_i, vid_o;
  rgb_t rgb_i, rgb_o;
  logic found_i;
  coord_t cx_i, cy_i;
  int checks = 0, failures = 0, drawn = 0, expected_drawn = 0;

  // Expected output, built when the input is applied, compared a clock later.
  rgb_t exp_rgb;
  bit   exp_valid;
  bit   exp_act;

  always #5 clk = ~clk;

  box_overlay #(.BOX_HALF(HALF), .BOX_THICK(THICK), .BOX_COLOUR(COL)) dut (
    .clk, .rst_n, .vid_i, .rgb_i, .found_i, .cx_i, .cy_i, .vid_o, .rgb_o);

  function automatic rgb_t pix(input int x, input int y);
    return '{r: 8'(x * 9 + 1), g: 8'(y * 7 + 2), b: 8'(x + y)};
  endfunction

  function automatic bit on_box(input int x, input int y, input int cx, input int cy);
    int dx = (x > cx) ? x - cx : cx - x;
    int dy = (y > cy) ? y - cy : cy - y;
    return dx <= HALF && dy <= HALF && (dx > HALF - THICK || dy > HALF - THICK);
  endfunction

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input vid_t v, input rgb_t c, input rgb_t e);
    @(negedge clk);
    if (exp_valid) begin
      checks++;
      if (rgb_o != exp_rgb || vid_o.active != exp_act) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h", rgb_o, exp_rgb);
      end
      if (exp_act && rgb_o == COL) drawn++;
    end
    vid_i = v; rgb_i = c;
    exp_rgb = e; exp_act = v.active; exp_valid = 1'b1;
  endtask

  initial begin
    // Frame settings: centroid, found, and the values changed mid-frame.
    int fcx [4] = '{10, 2, 7, 15};
    int fcy [4] = '{8, 3, 12, 5};
    bit ffound [4] = '{1, 1, 0, 1};
    vid_t v;
    rgb_t c, e;
    vid_i = '0; rgb_i = '0; found_i = 1'b0; cx_i = '0; cy_i = '0; exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      int frame_exp;
      frame_exp = 0;
      cx_i = coord_t'(fcx[f]); cy_i = coord_t'(fcy[f]); found_i = ffound[f];
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          v = '0;
          v.active = 1'b1;
          v.x = coord_t'(x);
          v.y = coord_t'(y);
          v.sof = (x == 0 && y == 0);
          v.eof = (x == W - 1 && y == H - 1);
          c = pix(x, y);
          e = (ffound[f] && on_box(x, y, fcx[f], fcy[f])) ? COL : c;
          if (e == COL) frame_exp++;
          step(v, c, e);
          // Scramble the centroid inputs after sof: must not be used.
          if (x == 0 && y == 0) begin
            @(posedge clk);
            #1;
            cx_i = coord_t'($urandom_range(W - 1));
            cy_i = coord_t'($urandom_range(H - 1));
            found_i = ~ffound[f];
          end
        end
        repeat (HB) begin
          v = '0; v.hsync = 1'b1;
          step(v, rgb_t'($urandom), '0);
        end
      end
      repeat (VB) begin
        v = '0; v.vsync = 1'b1;
        step(v, rgb_t'($urandom), '0);
      end
      expected_drawn += frame_exp;
    end
    step('0, '0, '0);
    checks++;
    if (drawn != expected_drawn || drawn == 0) begin
      failures++;
      $display("FAIL drew %0d box pixels, expected %0d", drawn, expected_drawn);
    end
    $display("box pixels drawn %0d", drawn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
