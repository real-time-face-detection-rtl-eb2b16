// face_pkg: types and constants shared by the skin-colour face tracker.
//
// Every pipeline stage passes a vid_t along with its data so that pixel
// position and sync flags stay aligned with the pixel whatever the stage
// latency is. Coordinates are COORD_W bits wide, enough for lines of up to
// 2047 pixels. The sync flags inside vid_t are "in sync pulse" flags (1 =
// inside the pulse); the output polarity is applied only at the pins.
package face_pkg;

  localparam int unsigned COORD_W = 11;

  typedef logic [COORD_W-1:0] coord_t;

  // 8 bits per colour channel, 0..255.
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Y, Cb (blue chrominance) and Cr (red chrominance), chroma offset by 128.
  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycbcr_t;

  // Position and timing of the pixel travelling with the data.
  typedef struct packed {
    logic   active;  // pixel lies in the active (visible) region
    logic   hsync;   // inside the horizontal sync pulse
    logic   vsync;   // inside the vertical sync pulse
    logic   sof;     // first active pixel of a frame (x = 0, y = 0)
    logic   eof;     // last active pixel of a frame
    coord_t x;
    coord_t y;
  } vid_t;

endpackage
