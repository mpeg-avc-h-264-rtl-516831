// cur_mb_buf: current-macroblock buffer (16x16 luma bytes).
//
// Loaded by the memory controller one 32-bit EBUS word (4 pixels, byte 0 =
// leftmost) per cycle. Two combinational read ports each deliver one 16-pixel
// row, so that the SAD array can consume two rows per cycle when both search
// window buffers hold the same window. The 16-pixel row width follows the
// design's block diagram; the second read port and the asynchronous read are
// this design's choices.
module cur_mb_buf
  import me_pkg::*;
(
  input  logic             clk,
  input  logic             we,
  input  logic [3:0]       wrow,
  input  logic [1:0]       wword,
  input  logic [BUS_W-1:0] wdata,
  input  logic [3:0]       rrow0,
  input  logic [3:0]       rrow1,
  output row16_t           rdata0,
  output row16_t           rdata1
);
  logic [BUS_W-1:0] mem [MB][MB/4];

  always_ff @(posedge clk) begin
    if (we) mem[wrow][wword] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < MB; i++) begin
      rdata0[i] = mem[rrow0][i / 4][8 * (i % 4) +: 8];
      rdata1[i] = mem[rrow1][i / 4][8 * (i % 4) +: 8];
    end
  end

endmodule
