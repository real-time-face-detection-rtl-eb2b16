// mask_filter: 3x3 binary majority filter for the skin mask.
//
// Skin segmentation leaves isolated false-positive pixels in the background
// and small holes in the face (eyes, shadows). This filter replaces each
// mask pixel by the majority of its 3x3 neighbourhood: the pixel is kept as
// skin when at least THRESH of the nine pixels are skin (THRESH = 5 makes it
// a binary median filter). The description names an image-filtering step
// after segmentation without saying which filter; a 3x3 median is this
// design's choice as the simplest filter that removes salt-and-pepper noise
// from a binary mask.
//
// How it works: a line_buffer of width 2 holds, per column, the mask of the
// two previous lines (read-before-write, the old line y-1 bit moves into
// the line y-2 slot). Together with the incoming pixel this gives a 3-pixel
// column; two column registers hold the two previous columns. Neighbours
// outside the image count as non-skin.
//
// Timing: the result for centre pixel (x-1, y-1) is produced one clock after
// input pixel (x, y). Centres exist for x >= 1 and y >= 1 only, so the last
// column and the last line of the frame are never emitted: the output mask
// covers (H_ACTIVE-1) x (V_ACTIVE-1) pixels. `vid_o` carries the centre
// coordinates with active = 1 for emitted pixels; its eof marks the last
// emitted pixel and its sync flags follow the input by one clock.
module mask_filter
  import face_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned THRESH   = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  vid_t vid_i,
  input  logic mask_i,
  output vid_t vid_o,
  output logic mask_o
);

  localparam int unsigned AW = $clog2(H_ACTIVE);

  logic [1:0] lb_rdata, lb_wdata;   // {line y-1, line y-2}
  logic [2:0] col_new;              // {top (y-2), middle (y-1), bottom (y)}
  logic [2:0] col_a, col_b;         // columns x-1 and x-2
  logic [2:0] col_a_eff, col_b_eff;
  logic [3:0] votes;
  logic       emit;

  line_buffer #(.DEPTH(H_ACTIVE), .WIDTH(2)) u_lines (
    .clk   (clk),
    .en    (vid_i.active),
    .addr  (vid_i.x[AW-1:0]),
    .wdata (lb_wdata),
    .rdata (lb_rdata)
  );

  always_comb begin
    lb_wdata  = {mask_i, lb_rdata[1]};
    col_new   = {lb_rdata[0] & (vid_i.y >= coord_t'(2)),
                 lb_rdata[1] & (vid_i.y >= coord_t'(1)),
                 mask_i};
    col_a_eff = (vid_i.x >= coord_t'(1)) ? col_a : 3'b000;
    col_b_eff = (vid_i.x >= coord_t'(2)) ? col_b : 3'b000;
    votes     = 4'($countones({col_new, col_a_eff, col_b_eff}));
    emit      = vid_i.active && (vid_i.x >= coord_t'(1)) && (vid_i.y >= coord_t'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_a  <= '0;
      col_b  <= '0;
      vid_o  <= '0;
      mask_o <= 1'b0;
    end else begin
      if (vid_i.active) begin
        col_b <= col_a_eff;
        col_a <= col_new;
      end
      vid_o.active <= emit;
      vid_o.hsync  <= vid_i.hsync;
      vid_o.vsync  <= vid_i.vsync;
      vid_o.sof    <= emit && (vid_i.x == coord_t'(1)) && (vid_i.y == coord_t'(1));
      vid_o.eof    <= vid_i.eof;
      vid_o.x      <= vid_i.x - 1'b1;
      vid_o.y      <= vid_i.y - 1'b1;
      mask_o       <= emit && (votes >= 4'(THRESH));
    end
  end

endmodule
