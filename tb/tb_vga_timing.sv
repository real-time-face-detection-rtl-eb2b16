// tb_vga_timing: self-checking testbench for vga_timing.
//
// A small raster (8 x 4 active, 14 x 8 total) is checked pixel by pixel
// against counters kept in the testbench: active, hsync, vsync, sof, eof and
// the coordinates. A second instance at the default 640 x 480 mode is
// checked for its frame period (800 x 525 = 420000 clocks), its number of
// active pixels per frame and its number of hsync pulses per frame.
`timescale 1ns/1ps
module tb_vga_timing;
  import face_pkg::*;

  localparam int HA = 8, HF = 2, HS = 3, HB = 1, VA = 4, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;

  logic clk = 1'b0, rst_n = 1'b0;
  vid_t vid_s, vid_d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vga_timing #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
               .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut_s (.clk, .rst_n, .vid(vid_s));
  vga_timing dut_d (.clk, .rst_n, .vid(vid_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v;
    longint sof_t0, cyc;
    int n_act, n_hs;
    bit prev_hs;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Small raster: walk three frames.
    h = 0; v = 0;
    for (int c = 0; c < 3 * HT * VT; c++) begin
      #1;
      check(vid_s.active == (h < HA && v < VA), "active");
      check(vid_s.hsync  == (h >= HA + HF && h < HA + HF + HS), "hsync");
      check(vid_s.vsync  == (v >= VA + VF && v < VA + VF + VS), "vsync");
      check(vid_s.sof    == (h == 0 && v == 0), "sof");
      check(vid_s.eof    == (h == HA - 1 && v == VA - 1), "eof");
      if (h < HA && v < VA) check(vid_s.x == coord_t'(h) && vid_s.y == coord_t'(v), "xy");
      @(posedge clk);
      h++;
      if (h == HT) begin h = 0; v = (v == VT - 1) ? 0 : v + 1; end
    end
    // Default raster: frame period and per-frame counts.
    do begin @(posedge clk); #1; end while (!vid_d.sof);
    cyc = 0; n_act = 0; n_hs = 0; prev_hs = 0;
    do begin
      if (vid_d.active) n_act++;
      if (vid_d.hsync && !prev_hs) n_hs++;
      prev_hs = vid_d.hsync;
      @(posedge clk); #1;
      cyc++;
    end while (!vid_d.sof);
    check(cyc == 420000, "default frame period");
    check(n_act == 640 * 480, "default active pixels");
    check(n_hs == 525, "default hsync pulses");
    $display("default frame: %0d clocks, %0d active, %0d hsync pulses", cyc, n_act, n_hs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
