// centroid_tracker: per-frame centroid of the filtered skin region.
//
// The face position is the centroid of the skin pixels:
//     cx = sum(x) / count,  cy = sum(y) / count
// taken over every pixel the filtered mask marks as skin in one frame. The
// centroid as the face location follows the design description; the
// accumulate-then-divide structure, the sequential dividers and the
// minimum-area test are this design's own.
//
// How it works: while the frame streams in, three accumulators add the pixel
// count and the x and y coordinates of skin pixels. On the frame's eof
// marker the totals are captured, the accumulators cleared for the next
// frame, and two restoring dividers (one quotient bit per clock) produce
// cx and cy while the raster is in vertical blanking, which lasts far longer
// than the division. A frame with fewer than MIN_PIXELS skin pixels reports
// no face (found_o = 0) and leaves the coordinates unchanged.
//
// Timing: `update_o` pulses SUM_W + 3 clocks after the eof pixel is on the
// input (one clock to capture, one to load the dividers, SUM_W clocks to
// divide, one to register the result); at the default 640 x 480 that is
// 31 clocks. cx_o, cy_o, found_o and pixels_o change only with update_o.
module centroid_tracker
  import face_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned V_ACTIVE   = 480,
  parameter int unsigned MIN_PIXELS = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  vid_t   vid_i,
  input  logic   mask_i,
  output logic   update_o,
  output logic   found_o,
  output coord_t cx_o,
  output coord_t cy_o,
  output logic [$clog2(H_ACTIVE*V_ACTIVE+1)-1:0] pixels_o
);

  localparam longint unsigned AREA  = longint'(H_ACTIVE) * V_ACTIVE;
  localparam longint unsigned MAXC  = (H_ACTIVE > V_ACTIVE) ? longint'(H_ACTIVE) : longint'(V_ACTIVE);
  localparam int unsigned     CNT_W = $clog2(AREA + 1);
  localparam int unsigned     SUM_W = $clog2(AREA * MAXC + 1);

  typedef logic [CNT_W-1:0] cnt_t;
  typedef logic [SUM_W-1:0] sum_t;

  cnt_t cnt, cnt_next, cnt_cap;
  sum_t sx, sy, sx_next, sy_next;
  logic hit, start_div, done_x, done_y, busy_x, busy_y;
  sum_t qx, qy;
  cnt_t rx, ry;

  always_comb begin
    hit      = vid_i.active && mask_i;
    cnt_next = cnt + cnt_t'(hit);
    sx_next  = sx + (hit ? sum_t'(vid_i.x) : '0);
    sy_next  = sy + (hit ? sum_t'(vid_i.y) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      sx        <= '0;
      sy        <= '0;
      cnt_cap   <= '0;
      start_div <= 1'b0;
    end else begin
      start_div <= 1'b0;
      if (vid_i.eof) begin
        cnt       <= '0;
        sx        <= '0;
        sy        <= '0;
        cnt_cap   <= cnt_next;
        start_div <= 1'b1;
      end else begin
        cnt <= cnt_next;
        sx  <= sx_next;
        sy  <= sy_next;
      end
    end
  end

  // The dividers sample the captured totals one clock after eof.
  sum_t sx_cap, sy_cap;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx_cap <= '0;
      sy_cap <= '0;
    end else if (vid_i.eof) begin
      sx_cap <= sx_next;
      sy_cap <= sy_next;
    end
  end

  seq_divider #(.N(SUM_W), .D(CNT_W)) u_div_x (
    .clk, .rst_n, .start(start_div), .dividend(sx_cap), .divisor(cnt_cap),
    .busy(busy_x), .done(done_x), .quotient(qx), .remainder(rx)
  );

  seq_divider #(.N(SUM_W), .D(CNT_W)) u_div_y (
    .clk, .rst_n, .start(start_div), .dividend(sy_cap), .divisor(cnt_cap),
    .busy(busy_y), .done(done_y), .quotient(qy), .remainder(ry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      update_o <= 1'b0;
      found_o  <= 1'b0;
      cx_o     <= '0;
      cy_o     <= '0;
      pixels_o <= '0;
    end else begin
      update_o <= done_x;
      if (done_x) begin
        pixels_o <= cnt_cap;
        found_o  <= (cnt_cap >= cnt_t'(MIN_PIXELS));
        if (cnt_cap >= cnt_t'(MIN_PIXELS) && cnt_cap != '0) begin
          cx_o <= coord_t'(qx);
          cy_o <= coord_t'(qy);
        end
      end
    end
  end

  // Both dividers run in lock step, and a frame must not end while the
  // previous frame is still being divided (the raster's vertical blanking
  // has to be longer than the division).
  assert property (@(posedge clk) done_x == done_y);
  assert property (@(posedge clk) vid_i.eof |-> !(busy_x || busy_y));

endmodule
