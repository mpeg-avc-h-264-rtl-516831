// search_window_buf: one integer-pel search-window memory ("Mem A" / "Mem B").
//
// Holds a SW_EDGE x SW_EDGE luma window (48x48 bytes, the size the design budgets
// for a +-16 search around a 16x16 macroblock). Two such buffers are used in
// ping-pong fashion by the search controller: while one feeds the SAD array the
// other can be refilled from the frame buffer.
//
// Write port: one 32-bit EBUS word (4 pixels, byte 0 = leftmost) per cycle at
// (wrow, wword). Read port: combinational, returns RD_PIX (17) consecutive pixels
// of row rrow starting at column rcol; columns past the right edge repeat the
// last column. 17 pixels are returned so that the bilinear interpolator can form
// 16 fractional samples. The storage is a register file; the asynchronous read
// is this design's choice (the document does not give the buffer's timing).
module search_window_buf
  import me_pkg::*;
#(
  parameter int unsigned SW_EDGE = me_pkg::SW
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(SW_EDGE)-1:0] wrow,
  input  logic [$clog2(SW_EDGE/4)-1:0] wword,
  input  logic [BUS_W-1:0]           wdata,
  input  logic [$clog2(SW_EDGE)-1:0] rrow,
  input  logic [$clog2(SW_EDGE)-1:0] rcol,
  output row17_t                     rdata
);
  localparam int unsigned WORDS = SW_EDGE / 4;

  logic [BUS_W-1:0] mem [SW_EDGE][WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wword] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < RD_PIX; i++) begin
      int unsigned c;
      c = int'(rcol) + i;
      if (c > SW_EDGE - 1) c = SW_EDGE - 1;
      rdata[i] = mem[rrow][c / 4][8 * (c % 4) +: 8];
    end
  end

endmodule
