// line_buffer: single-port line memory for a sliding image window.
//
// DEPTH words of WIDTH bits, one word per pixel column. On every clock with
// `en` set, the word at `addr` is read out on `rdata` (combinational read of
// the old contents) and replaced by `wdata` at the clock edge, so that a
// column visited once per line returns what was written one line earlier.
// Chaining the read data back into the write data (as the mask filter does)
// turns one memory into a stack of delay lines. It is written as a plain
// array so that synthesis can map it to distributed or block RAM.
//
// The memory is cleared by nothing: the reader must ignore words that have
// not yet been written in the current frame.
module line_buffer #(
  parameter int unsigned DEPTH = 640,
  parameter int unsigned WIDTH = 2
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (en) mem[addr] <= wdata;
  end

endmodule
