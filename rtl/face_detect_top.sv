// face_detect_top: real-time skin-colour face detector and tracker.
//
// The design streams video one pixel per clock and finds a face by its skin
// colour: each pixel is converted from RGB to YCbCr, classified as skin when
// its chrominance lies in the skin window, the resulting binary mask is
// cleaned by a 3x3 majority filter, and the centroid of the remaining skin
// pixels is taken as the face position. A box centred on that position is
// drawn over the video sent to the VGA monitor. The chain (YCbCr skin
// segmentation, filtering, centroid, display on VGA) follows the design
// description; the filter type, the box and all widths, latencies and
// handshakes are this design's own choices.
//
// Data path, all stages carrying a face_pkg::vid_t alongside the data:
//
//   vga_timing --(request x,y)--> external frame source --rgb--+
//        |                                                      |
//        +-- delay SRC_LATENCY --> rgb2ycbcr -> skin_segment -> mask_filter
//                         |                                        |
//                         |                               centroid_tracker
//                         |                                        | cx, cy, found
//                         +-----------------------> box_overlay <--+
//                                                       |
//                                            VGA pins (RGB, syncs, blank_n)
//
// Interface: the design is the raster master. It asks for the pixel at
// (src_x, src_y) whenever src_req is high and expects its colour on src_rgb
// exactly SRC_LATENCY clocks later; a camera frame buffer in external
// memory is the intended source. The VGA outputs follow the request by
// SRC_LATENCY + 1 clocks. Sync polarities are set by HSYNC_POL / VSYNC_POL
// (1 = active high). The tracker outputs update once per frame, during
// vertical blanking, with face_update pulsing for one clock; the box drawn
// in a frame is the centroid found in the frame before it.
module face_detect_top
  import face_pkg::*;
#(
  // Raster (default: 640 x 480 at 60 Hz, 25.175 MHz pixel clock)
  parameter int unsigned H_ACTIVE    = 640,
  parameter int unsigned H_FP        = 16,
  parameter int unsigned H_SYNC      = 96,
  parameter int unsigned H_BP        = 48,
  parameter int unsigned V_ACTIVE    = 480,
  parameter int unsigned V_FP        = 10,
  parameter int unsigned V_SYNC      = 2,
  parameter int unsigned V_BP        = 33,
  parameter bit          HSYNC_POL   = 1'b0,
  parameter bit          VSYNC_POL   = 1'b0,
  // Frame source read latency in clocks
  parameter int unsigned SRC_LATENCY = 2,
  // Skin window in the Cb-Cr plane
  parameter logic [7:0]  CB_MIN      = 8'd95,
  parameter logic [7:0]  CB_MAX      = 8'd126,
  parameter logic [7:0]  CR_MIN      = 8'd140,
  parameter logic [7:0]  CR_MAX      = 8'd168,
  // Mask filter and tracker
  parameter int unsigned FILTER_THRESH = 5,
  parameter int unsigned MIN_PIXELS  = 256,
  parameter int unsigned BOX_HALF    = 48,
  parameter int unsigned BOX_THICK   = 2,
  parameter rgb_t        BOX_COLOUR  = '{r: 8'd0, g: 8'd255, b: 8'd0}
) (
  input  logic   clk,
  input  logic   rst_n,
  // Frame source
  output logic   src_req,
  output coord_t src_x,
  output coord_t src_y,
  input  rgb_t   src_rgb,
  // VGA output
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic   vga_hs,
  output logic   vga_vs,
  output logic   vga_blank_n,
  // Tracking result
  output logic   face_update,
  output logic   face_found,
  output coord_t face_x,
  output coord_t face_y,
  output logic [$clog2(H_ACTIVE*V_ACTIVE+1)-1:0] face_pixels
);

  vid_t   t_raster, t_src, t_ycc, t_skin, t_filt, t_out;
  ycbcr_t ycc;
  rgb_t   rgb_out;
  logic   skin, skin_filt;

  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_timing (
    .clk, .rst_n, .vid(t_raster)
  );

  assign src_req = t_raster.active;
  assign src_x   = t_raster.x;
  assign src_y   = t_raster.y;

  // Align the raster position with the colour returned by the source.
  generate
    if (SRC_LATENCY == 0) begin : g_no_delay
      assign t_src = t_raster;
    end else begin : g_delay
      vid_t pipe [SRC_LATENCY];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < SRC_LATENCY; i++) pipe[i] <= '0;
        end else begin
          pipe[0] <= t_raster;
          for (int i = 1; i < SRC_LATENCY; i++) pipe[i] <= pipe[i-1];
        end
      end
      assign t_src = pipe[SRC_LATENCY-1];
    end
  endgenerate

  rgb2ycbcr u_csc (
    .clk, .rst_n, .vid_i(t_src), .rgb_i(src_rgb), .vid_o(t_ycc), .ycc_o(ycc)
  );

  skin_segment #(
    .CB_MIN(CB_MIN), .CB_MAX(CB_MAX), .CR_MIN(CR_MIN), .CR_MAX(CR_MAX)
  ) u_skin (
    .clk, .rst_n, .vid_i(t_ycc), .ycc_i(ycc), .vid_o(t_skin), .skin_o(skin)
  );

  mask_filter #(.H_ACTIVE(H_ACTIVE), .THRESH(FILTER_THRESH)) u_filter (
    .clk, .rst_n, .vid_i(t_skin), .mask_i(skin), .vid_o(t_filt), .mask_o(skin_filt)
  );

  centroid_tracker #(
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .MIN_PIXELS(MIN_PIXELS)
  ) u_centroid (
    .clk, .rst_n, .vid_i(t_filt), .mask_i(skin_filt),
    .update_o(face_update), .found_o(face_found),
    .cx_o(face_x), .cy_o(face_y), .pixels_o(face_pixels)
  );

  box_overlay #(
    .BOX_HALF(BOX_HALF), .BOX_THICK(BOX_THICK), .BOX_COLOUR(BOX_COLOUR)
  ) u_overlay (
    .clk, .rst_n, .vid_i(t_src), .rgb_i(src_rgb),
    .found_i(face_found), .cx_i(face_x), .cy_i(face_y),
    .vid_o(t_out), .rgb_o(rgb_out)
  );

  assign vga_r       = rgb_out.r;
  assign vga_g       = rgb_out.g;
  assign vga_b       = rgb_out.b;
  assign vga_hs      = HSYNC_POL ? t_out.hsync : ~t_out.hsync;
  assign vga_vs      = VSYNC_POL ? t_out.vsync : ~t_out.vsync;
  assign vga_blank_n = t_out.active;

endmodule
