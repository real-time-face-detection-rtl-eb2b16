// tb_centroid_tracker: self-checking testbench for centroid_tracker.
//
// A 16 x 12 raster with MIN_PIXELS = 4 carries nine frames: random masks of
// several densities, a full mask, an empty one, one with only two skin
// pixels and one of four pixels that include the last pixel of the frame. For each frame the testbench sums the skin coordinates itself and
// checks, at the update pulse, count, found and floor(sum / count) for x and
// y; frames under MIN_PIXELS must report no face and keep the previous
// coordinates. The update pulse must come SUM_W + 3 = 15 clocks after the
// eof pixel (SUM_W = 12 bits of coordinate sum at this size).
`timescale 1ns/1ps
module tb_centroid_tracker;
  import face_pkg::*;

  localparam int W = 16, H = 12, MINP = 4, HBLANK = 3, VBLANK = 40, LAT = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  vid_t vid_i;
  logic mask_i, update_o, found_o;
  coord_t cx_o, cy_o;
  logic [$clog2(W*H+1)-1:0] pixels_o;
  int checks = 0, failures = 0, n_found = 0, n_lost = 0;
  longint cyc = 0, eof_cyc;
  bit seen_update;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  centroid_tracker #(.H_ACTIVE(W), .V_ACTIVE(H), .MIN_PIXELS(MINP)) dut (
    .clk, .rst_n, .vid_i, .mask_i, .update_o, .found_o, .cx_o, .cy_o, .pixels_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int density [9] = '{30, 100, 0, 60, -2, 5, 90, 45, -3};
    int cnt, sx, sy, exp_cx, exp_cy;
    bit m;
    vid_i = '0; mask_i = 1'b0;
    exp_cx = 0; exp_cy = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 9; f++) begin
      cnt = 0; sx = 0; sy = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          if (density[f] >= 0) m = ($urandom_range(99) < density[f]);
          else if (density[f] == -2) m = (x == 3 && y == 4) || (x == 9 && y == 10);   // two pixels only
          else m = (x + y <= 1) || (x == W - 1 && y == H - 1);   // includes the eof pixel
          vid_i = '0;
          vid_i.active = 1'b1;
          vid_i.x = coord_t'(x);
          vid_i.y = coord_t'(y);
          vid_i.sof = (x == 0 && y == 0);
          vid_i.eof = (x == W - 1 && y == H - 1);
          mask_i = m;
          if (m) begin cnt++; sx += x; sy += y; end
          if (vid_i.eof) eof_cyc = cyc;
        end
        repeat (HBLANK) begin
          @(negedge clk);
          vid_i = '0;
          mask_i = 1'($urandom);   // ignored outside the active region
        end
      end
      seen_update = 0;
      repeat (VBLANK) begin
        @(negedge clk);
        vid_i = '0;
        vid_i.vsync = 1'b1;
        mask_i = 1'($urandom);
        if (update_o) begin
          seen_update = 1;
          check(cyc - eof_cyc == LAT, "update latency");
          if (cyc - eof_cyc != LAT) $display("latency %0d", cyc - eof_cyc);
          check(int'(pixels_o) == cnt, "pixel count");
          check(found_o == (cnt >= MINP), "found flag");
          if (cnt >= MINP) begin
            exp_cx = sx / cnt;
            exp_cy = sy / cnt;
            n_found++;
          end else begin
            n_lost++;
          end
          check(int'(cx_o) == exp_cx && int'(cy_o) == exp_cy, "centroid");
          if (failures > 0 && failures < 10)
            $display("frame %0d: cnt %0d got (%0d,%0d) exp (%0d,%0d)", f, cnt, cx_o, cy_o, exp_cx, exp_cy);
        end
      end
      check(seen_update, "one update per frame");
    end
    check(n_found > 0 && n_lost > 0, "both face and no-face frames seen");
    $display("frames with face %0d, without %0d", n_found, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
