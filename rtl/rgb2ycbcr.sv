// rgb2ycbcr: RGB to YCbCr colour-space converter.
//
// Implements the conversion matrix
//     Y  =  0.299 R + 0.587 G + 0.114 B
//     Cb = -0.169 R - 0.331 G + 0.500 B
//     Cr =  0.500 R - 0.419 G - 0.081 B
// with the coefficients scaled by 256 and rounded (77, 150, 29 / -43, -85,
// 128 / 128, -107, -21; each row keeps its exact sum of 256 or 0). The
// matrix itself comes from the design description. Adding 128 to Cb and Cr
// so that they fit an unsigned byte, rounding to nearest and clamping to
// 0..255 are this design's own choices (the usual 8-bit YCbCr convention,
// which the Cb/Cr skin ranges used downstream assume).
//
// Timing: two-stage pipeline, one pixel per clock. Stage 1 forms the nine
// products, stage 2 sums, rounds, offsets and clamps. `vid_o` is `vid_i`
// delayed by the same two cycles.
module rgb2ycbcr
  import face_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  vid_t   vid_i,
  input  rgb_t   rgb_i,
  output vid_t   vid_o,
  output ycbcr_t ycc_o
);

  // Coefficients, Q8 (value x 256).
  localparam logic signed [9:0] KYR  =  10'sd77,  KYG  =  10'sd150, KYB  =  10'sd29;
  localparam logic signed [9:0] KCBR = -10'sd43,  KCBG = -10'sd85,  KCBB =  10'sd128;
  localparam logic signed [9:0] KCRR =  10'sd128, KCRG = -10'sd107, KCRB = -10'sd21;

  typedef logic signed [18:0] prod_t;   // 10-bit signed x 9-bit signed

  prod_t p_yr, p_yg, p_yb, p_cbr, p_cbg, p_cbb, p_crr, p_crg, p_crb;
  vid_t  vid_s1;

  function automatic prod_t mul(input logic signed [9:0] k, input logic [7:0] v);
    return prod_t'(k * $signed({1'b0, v}));
  endfunction

  // Round to nearest, shift out the Q8 fraction, add the chroma offset and
  // clamp to one byte.
  function automatic logic [7:0] finish(input logic signed [20:0] sum, input logic [8:0] offset);
    logic signed [20:0] v;
    v = ((sum + 21'sd128) >>> 8) + $signed({12'd0, offset});
    if (v < 0)          return 8'd0;
    else if (v > 255)   return 8'd255;
    else                return v[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_yr, p_yg, p_yb, p_cbr, p_cbg, p_cbb, p_crr, p_crg, p_crb} <= '0;
      vid_s1 <= '0;
      vid_o  <= '0;
      ycc_o  <= '0;
    end else begin
      p_yr  <= mul(KYR,  rgb_i.r);  p_yg  <= mul(KYG,  rgb_i.g);  p_yb  <= mul(KYB,  rgb_i.b);
      p_cbr <= mul(KCBR, rgb_i.r);  p_cbg <= mul(KCBG, rgb_i.g);  p_cbb <= mul(KCBB, rgb_i.b);
      p_crr <= mul(KCRR, rgb_i.r);  p_crg <= mul(KCRG, rgb_i.g);  p_crb <= mul(KCRB, rgb_i.b);
      vid_s1 <= vid_i;

      ycc_o.y  <= finish(21'(p_yr)  + 21'(p_yg)  + 21'(p_yb),  9'd0);
      ycc_o.cb <= finish(21'(p_cbr) + 21'(p_cbg) + 21'(p_cbb), 9'd128);
      ycc_o.cr <= finish(21'(p_crr) + 21'(p_crg) + 21'(p_crb), 9'd128);
      vid_o    <= vid_s1;
    end
  end

endmodule
