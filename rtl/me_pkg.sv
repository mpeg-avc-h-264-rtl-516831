// me_pkg: constants and types shared by the H.264 motion-estimation accelerator.
//
// Sizes follow the design's memory budget: a 16x16 current macroblock, a 48x48
// integer-pel search window (search range +-16), three reference frames and a
// 384x320 luma frame. Pixel and bus widths (8-bit luma, 32-bit AHB data) and
// the layout of the result words are this design's own choices.
package me_pkg;

  localparam int unsigned PIX_W  = 8;    // luma sample width
  localparam int unsigned MB     = 16;   // macroblock edge
  localparam int unsigned SR     = 16;   // integer search range +-SR
  localparam int unsigned SW     = MB + 2 * SR;  // 48: search window edge
  localparam int unsigned NREF   = 3;    // reference frames searched per MB
  localparam int unsigned NBLK   = 16;   // 4x4 blocks per macroblock
  localparam int unsigned SAD4_W  = 12;  // 16 * 255 = 4080
  localparam int unsigned SAD16_W = 16;  // 256 * 255 = 65280
  localparam int unsigned BUS_W  = 32;   // EBUS data width
  localparam int unsigned RD_PIX = MB + 1; // pixels per window row read (17 for bilinear)

  typedef logic [PIX_W-1:0] pix_t;
  typedef pix_t [MB-1:0]    row16_t;     // element 0 is the leftmost pixel
  typedef pix_t [RD_PIX-1:0] row17_t;

  // Motion vector. Integer-pel stages use integer units, the sub-pel stage
  // and the stored results use quarter-pel units.
  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } mv_t;

  // Macroblock partition (H.264 P macroblock types) and sub-macroblock partition.
  typedef enum logic [1:0] {P16X16 = 2'd0, P16X8 = 2'd1, P8X16 = 2'd2, P8X8 = 2'd3} mb_mode_e;
  typedef enum logic [1:0] {S8X8 = 2'd0, S8X4 = 2'd1, S4X8 = 2'd2, S4X4 = 2'd3} sub_mode_e;

  // Memory-controller commands.
  typedef enum logic [0:0] {MC_LOAD_CUR = 1'b0, MC_LOAD_SW = 1'b1} mc_cmd_e;

  // ME-info memory map (one macroblock's results, 32-bit words):
  //   0..15  per 4x4 block (raster order): {mv.x q-pel, mv.y q-pel, part_id, sad4x4}
  //   16..18 per reference frame: {mv.x int, mv.y int, sad16x16}
  //   19     {best_ref, mb_mode, sub_mode[3..0]}
  localparam int unsigned INFO_DEPTH = 32;
  localparam int unsigned INFO_AW    = 5;
  localparam int unsigned INFO_REF0  = 16;
  localparam int unsigned INFO_MODE  = 19;

  typedef struct packed {
    mv_t               mv;        // final quarter-pel MV
    logic [3:0]        part_id;   // index of the top-left 4x4 block of its partition
    logic [SAD4_W-1:0] sad;       // integer 4x4 SAD from the +-2 refinement
  } blk_info_t;

  typedef struct packed {
    mv_t                mv;       // best integer 16x16 MV in this reference
    logic [SAD16_W-1:0] sad;
  } ref_info_t;

  typedef struct packed {
    logic [13:0]   rsvd;
    logic [1:0]    best_ref;
    mb_mode_e      mb_mode;
    sub_mode_e [3:0] sub_mode;    // index = 8x8 quadrant in raster order
    logic [5:0]    nparts;        // number of motion partitions
  } mode_info_t;

  function automatic pix_t absdiff(pix_t a, pix_t b);
    return (a > b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

endpackage
