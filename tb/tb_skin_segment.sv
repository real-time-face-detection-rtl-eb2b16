// tb_skin_segment: self-checking testbench for skin_segment.
//
// Sweeps Cb and Cr around every window edge, then applies 4000 random
// YCbCr values, and checks the mask one clock later against the window
// test written out in the testbench. Pixels outside the active region must
// never be marked as skin. The default window (Cb 95..126, Cr 140..168) is
// used.
`timescale 1ns/1ps
module tb_skin_segment;
  import face_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vid_t vid_i, vid_o;
  ycbcr_t ycc_i;
  logic skin_o;
  int checks = 0, failures = 0, n_skin = 0;

  always #5 clk = ~clk;

  skin_segment dut (.clk, .rst_n, .vid_i, .ycc_i, .vid_o, .skin_o);

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] cb, input logic [7:0] cr, input bit act);
    bit expect_skin;
    @(negedge clk);
    ycc_i = '{y: 8'($urandom), cb: cb, cr: cr};
    vid_i = '0;
    vid_i.active = act;
    expect_skin = act && cb >= 95 && cb <= 126 && cr >= 140 && cr <= 168;
    @(negedge clk);
    checks++;
    if (skin_o != expect_skin || vid_o.active != act) begin
      failures++;
      if (failures < 10) $display("FAIL cb=%0d cr=%0d act=%0b got %0b", cb, cr, act, skin_o);
    end
    if (expect_skin) n_skin++;
  endtask

  initial begin
    vid_i = '0; ycc_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cb = 93; cb <= 128; cb++)
      for (int cr = 138; cr <= 170; cr++)
        apply(8'(cb), 8'(cr), 1'b1);
    for (int i = 0; i < 4000; i++)
      apply(8'($urandom), 8'($urandom), 1'($urandom));
    apply(8'd110, 8'd150, 1'b0);
    check_count: begin
      checks++;
      if (n_skin < 32 * 29) begin failures++; $display("FAIL too few skin samples"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
