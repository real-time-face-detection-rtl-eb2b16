// tb_line_buffer: self-checking testbench for line_buffer.
//
// A 16-word, 4-bit buffer is swept column by column for 20 lines with random
// data. From the second line on, every read must return the word written at
// the same column one line earlier (read-before-write). Clocks with `en`
// low, inserted as blanking, must leave the contents unchanged.
`timescale 1ns/1ps
module tb_line_buffer;

  localparam int DEPTH = 16, WIDTH = 4;

  logic clk = 1'b0;
  logic en;
  logic [3:0] addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  line_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .addr, .wdata, .rdata);

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; addr = '0; wdata = '0;
    for (int line = 0; line < 20; line++) begin
      for (int c = 0; c < DEPTH; c++) begin
        @(negedge clk);
        en = 1'b1;
        addr = 4'(c);
        wdata = WIDTH'($urandom);
        #1;
        if (line > 0) begin
          checks++;
          if (rdata != model[c]) begin
            failures++;
            if (failures < 10) $display("FAIL line %0d col %0d: got %h exp %h", line, c, rdata, model[c]);
          end
        end
        model[c] = wdata;
      end
      // Blanking: enable low with changing address and data.
      repeat (5) begin
        @(negedge clk);
        en = 1'b0;
        addr = 4'($urandom);
        wdata = WIDTH'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
