// skin_segment: colour-based skin classifier.
//
// A pixel is marked as skin when both chrominance components lie inside a
// fixed window: CB_MIN <= Cb <= CB_MAX and CR_MIN <= Cr <= CR_MAX. Luminance
// is ignored, because skin tones of different people differ mainly in
// brightness and cluster in the Cb-Cr plane. The default windows, Cb 95..126
// and Cr 140..168, are the Cb/Cr skin ranges quoted in the design
// description; they are parameters so that they can be retuned.
//
// Timing: one register stage. `skin_o` and `vid_o` belong to the pixel that
// was on `ycc_i` / `vid_i` one clock earlier. `skin_o` is forced to 0
// outside the active region.
module skin_segment
  import face_pkg::*;
#(
  parameter logic [7:0] CB_MIN = 8'd95,
  parameter logic [7:0] CB_MAX = 8'd126,
  parameter logic [7:0] CR_MIN = 8'd140,
  parameter logic [7:0] CR_MAX = 8'd168
) (
  input  logic   clk,
  input  logic   rst_n,
  input  vid_t   vid_i,
  input  ycbcr_t ycc_i,
  output vid_t   vid_o,
  output logic   skin_o
);

  logic in_cb, in_cr;

  always_comb begin
    in_cb = (ycc_i.cb >= CB_MIN) && (ycc_i.cb <= CB_MAX);
    in_cr = (ycc_i.cr >= CR_MIN) && (ycc_i.cr <= CR_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vid_o  <= '0;
      skin_o <= 1'b0;
    end else begin
      vid_o  <= vid_i;
      skin_o <= vid_i.active && in_cb && in_cr;
    end
  end

endmodule
