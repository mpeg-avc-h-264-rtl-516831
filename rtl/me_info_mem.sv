// me_info_mem: "ME info stored memory", the result memory of the estimator.
//
// A small dual-port memory of 32-bit words holding one macroblock's results
// (see the map in me_pkg): per-4x4-block motion vectors, partition ids and
// SADs, the best 16x16 vector of each reference frame and the chosen modes.
// The search controller writes through port A; the host reads through port B
// with one clock of latency. Depth and word layout are this design's choices;
// the document names the memory only.
module me_info_mem
  import me_pkg::*;
#(
  parameter int unsigned DEPTH = me_pkg::INFO_DEPTH
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
