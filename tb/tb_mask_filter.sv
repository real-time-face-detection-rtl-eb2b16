// tb_mask_filter: self-checking testbench for mask_filter.
//
// Streams four random 12 x 8 binary masks of different densities through a
// filter with 12-pixel lines, with horizontal and vertical blanking between
// lines and frames. The reference is the 3x3 majority rule evaluated on the
// whole frame in the testbench (neighbours outside the image count as 0).
// Every emitted pixel is checked for its coordinates and value, and the
// number of emitted pixels per frame must be (12 - 1) x (8 - 1). The test
// also counts isolated skin pixels that the filter removed and holes it
// filled, and fails if neither occurred.
`timescale 1ns/1ps
module tb_mask_filter;
  import face_pkg::*;

  localparam int W = 12, H = 8, HBLANK = 4, VBLANK = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  vid_t vid_i, vid_o;
  logic mask_i, mask_o;
  bit   img [H][W];
  int checks = 0, failures = 0, removed = 0, filled = 0, emitted = 0;

  always #5 clk = ~clk;

  mask_filter #(.H_ACTIVE(W)) dut (.clk, .rst_n, .vid_i, .mask_i, .vid_o, .mask_o);

  function automatic bit ref_px(input int cx, input int cy);
    int n = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (cx + dx >= 0 && cx + dx < W && cy + dy >= 0 && cy + dy < H)
          n += int'(img[cy + dy][cx + dx]);
    return n >= 5;
  endfunction

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor
  always @(negedge clk) begin
    if (rst_n && vid_o.active) begin
      bit e;
      emitted++;
      e = ref_px(int'(vid_o.x), int'(vid_o.y));
      checks++;
      if (mask_o != e || vid_o.x > coord_t'(W - 2) || vid_o.y > coord_t'(H - 2)) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %0b exp %0b", vid_o.x, vid_o.y, mask_o, e);
      end
      if (img[vid_o.y][vid_o.x] && !mask_o) removed++;
      if (!img[vid_o.y][vid_o.x] && mask_o) filled++;
    end
  end

  initial begin
    int density [4] = '{30, 50, 70, 10};
    vid_i = '0; mask_i = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = ($urandom_range(99) < density[f]);
      emitted = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          vid_i = '0;
          vid_i.active = 1'b1;
          vid_i.x = coord_t'(x);
          vid_i.y = coord_t'(y);
          vid_i.sof = (x == 0 && y == 0);
          vid_i.eof = (x == W - 1 && y == H - 1);
          mask_i = img[y][x];
        end
        repeat (HBLANK) begin
          @(negedge clk);
          vid_i = '0;
          vid_i.hsync = 1'b1;
          mask_i = 1'($urandom);
        end
      end
      repeat (VBLANK) begin
        @(negedge clk);
        vid_i = '0;
        vid_i.vsync = 1'b1;
        mask_i = 1'($urandom);
      end
      checks++;
      if (emitted != (W - 1) * (H - 1)) begin
        failures++;
        $display("FAIL frame %0d emitted %0d pixels", f, emitted);
      end
    end
    checks++;
    if (removed == 0 || filled == 0) begin
      failures++;
      $display("FAIL filter never removed (%0d) or filled (%0d) a pixel", removed, filled);
    end
    $display("isolated pixels removed %0d, holes filled %0d", removed, filled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
