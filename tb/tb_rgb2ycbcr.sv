// tb_rgb2ycbcr: self-checking testbench for rgb2ycbcr.
//
// Drives corner colours and 5000 random colours, one per clock, and compares
// each output, two clocks later, with the conversion computed in floating
// point (Y = 0.299R + 0.587G + 0.114B, Cb/Cr with +128), rounded and clamped.
// A difference of one code is allowed for the Q8 coefficient rounding. The
// vid_t side band is checked to arrive with the same two-clock latency.
`timescale 1ns/1ps
module tb_rgb2ycbcr;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vid_t vid_i, vid_o;
  rgb_t rgb_i;
  ycbcr_t ycc_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rgb2ycbcr dut (.clk, .rst_n, .vid_i, .rgb_i, .vid_o, .ycc_o);

  function automatic int ref_ch(input real v);
    int r;
    r = int'($floor(v + 0.5));
    if (r < 0) r = 0;
    if (r > 255) r = 255;
    return r;
  endfunction

  function automatic ycbcr_t reference(input rgb_t c);
    ycbcr_t o;
    real r, g, b;
    r = real'(c.r); g = real'(c.g); b = real'(c.b);
    o.y  = 8'(ref_ch( 0.299 * r + 0.587 * g + 0.114 * b));
    o.cb = 8'(ref_ch(-0.169 * r - 0.331 * g + 0.500 * b + 128.0));
    o.cr = 8'(ref_ch( 0.500 * r - 0.419 * g - 0.081 * b + 128.0));
    return o;
  endfunction

  function automatic bit close(input logic [7:0] a, input logic [7:0] b);
    return (int'(a) - int'(b) <= 1) && (int'(b) - int'(a) <= 1);
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rgb_t   stim [$];
  ycbcr_t exp_q [$];
  coord_t tag_q [$];

  initial begin
    int n;
    rgb_t c;
    ycbcr_t e;
    stim.push_back('{8'd0, 8'd0, 8'd0});
    stim.push_back('{8'd255, 8'd255, 8'd255});
    stim.push_back('{8'd255, 8'd0, 8'd0});
    stim.push_back('{8'd0, 8'd255, 8'd0});
    stim.push_back('{8'd0, 8'd0, 8'd255});
    stim.push_back('{8'd200, 8'd150, 8'd120});
    for (int i = 0; i < 5000; i++) stim.push_back(rgb_t'($urandom));
    vid_i = '0; rgb_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    n = stim.size();
    for (int i = 0; i < n + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        e = exp_q.pop_front();
        checks++;
        if (!(close(ycc_o.y, e.y) && close(ycc_o.cb, e.cb) && close(ycc_o.cr, e.cr))) begin
          failures++;
          if (failures < 10) $display("FAIL colour %0d: got %h exp %h", i - 2, ycc_o, e);
        end
        checks++;
        if (!(vid_o.active && vid_o.x == tag_q.pop_front())) begin
          failures++;
          if (failures < 10) $display("FAIL side band latency at %0d", i - 2);
        end
      end
      if (i < n) begin
        c = stim[i];
        rgb_i = c;
        vid_i = '0;
        vid_i.active = 1'b1;
        vid_i.x = coord_t'(i);
        exp_q.push_back(reference(c));
        tag_q.push_back(coord_t'(i));
      end else begin
        vid_i = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
