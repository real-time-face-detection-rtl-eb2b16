// vga_timing: raster timing generator for the video pipeline.
//
// Two counters walk the whole raster, active area and blanking, one pixel
// per clock. Each line is the active region followed by the horizontal
// blanking interval, which holds front porch, sync pulse and back porch in
// that order; frames are built the same way from lines with the vertical
// front porch, sync pulse and back porch. This is the ordering of active
// video and blanking described for a video data stream (blanking with FP,
// S, BP around the sync pulse). The porch and pulse lengths are not given
// by the design description; the defaults are the common 640 x 480 at 60 Hz
// VGA mode (800 x 525 total, 25.175 MHz pixel clock), which is this
// design's own choice.
//
// Interface: `vid` is decoded from the counter registers and describes the
// pixel of the current clock: its coordinates (only meaningful when
// vid.active), the sync flags (1 = inside the pulse) and single-cycle
// sof / eof markers for the first and last active pixel of a frame. After reset the first output is
// pixel (0, 0) with sof set.
module vga_timing
  import face_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic clk,
  input  logic rst_n,
  output vid_t vid
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  coord_t h_cnt, v_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (h_cnt == coord_t'(H_TOTAL - 1)) begin
      h_cnt <= '0;
      v_cnt <= (v_cnt == coord_t'(V_TOTAL - 1)) ? '0 : v_cnt + 1'b1;
    end else begin
      h_cnt <= h_cnt + 1'b1;
    end
  end

  always_comb begin
    vid.active = (h_cnt < coord_t'(H_ACTIVE)) && (v_cnt < coord_t'(V_ACTIVE));
    vid.hsync  = (h_cnt >= coord_t'(H_ACTIVE + H_FP)) &&
                 (h_cnt <  coord_t'(H_ACTIVE + H_FP + H_SYNC));
    vid.vsync  = (v_cnt >= coord_t'(V_ACTIVE + V_FP)) &&
                 (v_cnt <  coord_t'(V_ACTIVE + V_FP + V_SYNC));
    vid.sof    = (h_cnt == '0) && (v_cnt == '0);
    vid.eof    = (h_cnt == coord_t'(H_ACTIVE - 1)) && (v_cnt == coord_t'(V_ACTIVE - 1));
    vid.x      = h_cnt;
    vid.y      = v_cnt;
  end

  initial begin
    assert (H_TOTAL < (1 << COORD_W) && V_TOTAL < (1 << COORD_W))
      else $error("vga_timing: raster exceeds coordinate width");
  end

endmodule
