// box_overlay: draws the tracking box over the outgoing video.
//
// A square outline, BOX_THICK pixels thick, is drawn around the tracked
// centroid: a pixel is painted BOX_COLOUR when it lies at most BOX_HALF
// pixels from the centroid in both x and y, and more than
// BOX_HALF - BOX_THICK pixels away in x or in y. Other active pixels pass
// through unchanged and blanking pixels are driven black, as a VGA DAC
// expects. Showing the detected face as a box on the monitor follows the
// design description; a fixed box size, its colour and thickness are this
// design's choices.
//
// The centroid inputs are sampled at the first pixel of each frame (sof),
// so a result that arrives during a frame is used from the next frame on
// and a box is never torn. With found_i low at that moment, no box is drawn
// for the whole frame.
//
// Timing: one register stage; `vid_o` / `rgb_o` follow `vid_i` / `rgb_i`
// by one clock.
module box_overlay
  import face_pkg::*;
#(
  parameter int unsigned BOX_HALF   = 48,
  parameter int unsigned BOX_THICK  = 2,
  parameter rgb_t        BOX_COLOUR = '{r: 8'd0, g: 8'd255, b: 8'd0}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  vid_t   vid_i,
  input  rgb_t   rgb_i,
  input  logic   found_i,
  input  coord_t cx_i,
  input  coord_t cy_i,
  output vid_t   vid_o,
  output rgb_t   rgb_o
);

  coord_t cx_l, cy_l, cx_u, cy_u, dx, dy;
  logic   found_l, found_u, in_box, ring, draw;

  // Values valid for the current frame: taken straight from the inputs on
  // the sof pixel, from the latch afterwards.
  always_comb begin
    cx_u    = vid_i.sof ? cx_i    : cx_l;
    cy_u    = vid_i.sof ? cy_i    : cy_l;
    found_u = vid_i.sof ? found_i : found_l;
    dx      = (vid_i.x >= cx_u) ? vid_i.x - cx_u : cx_u - vid_i.x;
    dy      = (vid_i.y >= cy_u) ? vid_i.y - cy_u : cy_u - vid_i.y;
    in_box  = (dx <= coord_t'(BOX_HALF)) && (dy <= coord_t'(BOX_HALF));
    ring    = (dx > coord_t'(BOX_HALF - BOX_THICK)) || (dy > coord_t'(BOX_HALF - BOX_THICK));
    draw    = vid_i.active && found_u && in_box && ring;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx_l    <= '0;
      cy_l    <= '0;
      found_l <= 1'b0;
      vid_o   <= '0;
      rgb_o   <= '0;
    end else begin
      if (vid_i.sof) begin
        cx_l    <= cx_i;
        cy_l    <= cy_i;
        found_l <= found_i;
      end
      vid_o <= vid_i;
      if (!vid_i.active) rgb_o <= '0;
      else if (draw)     rgb_o <= BOX_COLOUR;
      else               rgb_o <= rgb_i;
    end
  end

  initial begin
    assert (BOX_THICK >= 1 && BOX_THICK <= BOX_HALF + 1)
      else $error("box_overlay: BOX_THICK must lie in 1..BOX_HALF+1");
  end

endmodule
