// me_top: H.264 integer/sub-pel motion-estimation accelerator.
//
// Finds, for one 16x16 luma macroblock of the current frame, the best of three
// reference frames, a motion vector for every 4x4 block, the H.264 partition
// those vectors merge into, and quarter-pel vectors per partition. Frames stay
// in external memory and are fetched over the EBUS (AHB-Lite master ports); two
// 48x48 search-window buffers work in ping-pong so that loading the next window
// overlaps the search (see search_ctrl for the stage-by-stage schedule).
//
// Blocks: mem_ctrl (EBUS master) -> search_window_buf A/B and cur_mb_buf ->
// pe_array (16 sad4x4 units) under search_ctrl; bilinear_interp between the two
// window buffers and the array for sub-pel candidates; partition_merge for the
// mode decision; me_info_mem for the results, which the host reads through the
// info_* port. The six-tap interpolator of the block diagram is included with
// its own ports (sixtap_*): the document draws it but does not say what feeds it.
//
// Host use: set mb_x/mb_y (macroblock indices), cur_frame, ref_frame[0..2]
// (frame-buffer slots, [0] the most recent) and merge_th, pulse start, wait for
// done, then read words 0..19 of the result memory (layout in me_pkg). The
// internal bus of the block diagram is replaced by direct wiring.
module me_top
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W = 384,
  parameter int unsigned FRAME_H = 320,
  parameter logic [31:0] FB_BASE = 32'h0000_0000
) (
  input  logic               clk,
  input  logic               rst_n,
  // host control
  input  logic               start,
  input  logic [7:0]         mb_x,
  input  logic [7:0]         mb_y,
  input  logic [1:0]         cur_frame,
  input  logic [1:0]         ref_frame [NREF],
  input  logic [3:0]         merge_th,
  output logic               busy,
  output logic               done,
  output logic [2:0]         pipe,
  // result read port
  input  logic               info_re,
  input  logic [INFO_AW-1:0] info_raddr,
  output logic [31:0]        info_rdata,
  // EBUS (AHB-Lite master)
  output logic [31:0]        haddr,
  output logic [1:0]         htrans,
  output logic               hwrite,
  output logic [2:0]         hsize,
  output logic [2:0]         hburst,
  input  logic               hready,
  input  logic [31:0]        hrdata,
  // six-tap interpolator
  input  pix_t [MB+4:0]      sixtap_pix,
  output row16_t             sixtap_half,
  output row16_t             sixtap_quarter
);
  // memory controller <-> controller / buffers
  logic       mc_valid, mc_ready, mc_busy;
  mc_cmd_e    mc_cmd;
  logic [1:0] mc_frame, mc_dest;
  logic [7:0] mc_mbx, mc_mby;
  logic       sw_we_a, sw_we_b, cur_we;
  logic [5:0] sw_wrow;
  logic [3:0] sw_wword;
  logic [3:0] cur_wrow;
  logic [1:0] cur_wword;
  logic [BUS_W-1:0] wdata;

  // buffer read side
  logic [5:0] a_rrow, a_rcol, b_rrow, b_rcol;
  row17_t     a_rdata, b_rdata;
  logic [3:0] cur_rrow0, cur_rrow1;
  row16_t     cur_rdata0, cur_rdata1;
  logic [1:0] bil_fx, bil_fy;
  row16_t     bil_out;

  // PE array
  logic               pe_first, pe_v0, pe_v1;
  logic [3:0]         pe_row0, pe_row1;
  row16_t             pe_cur0, pe_ref0, pe_cur1, pe_ref1;
  logic [SAD4_W-1:0]  pe_sad4 [NBLK];
  logic [SAD16_W-1:0] pe_sad16;

  // merge
  mv_t        mg_mv [NBLK];
  logic [3:0] mg_th;
  mb_mode_e   mg_mb_mode;
  sub_mode_e  mg_sub_mode [4];
  logic [3:0] mg_part_id [NBLK];
  logic [5:0] mg_nparts;

  // results
  logic               info_we;
  logic [INFO_AW-1:0] info_waddr;
  logic [31:0]        info_wdata;

  mem_ctrl #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .FB_BASE(FB_BASE)) u_mem_ctrl (
    .clk, .rst_n,
    .cmd_valid(mc_valid), .cmd_ready(mc_ready), .cmd(mc_cmd), .frame(mc_frame),
    .mb_x(mc_mbx), .mb_y(mc_mby), .dest(mc_dest), .busy(mc_busy),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hready, .hrdata,
    .sw_we_a, .sw_we_b, .sw_wrow, .sw_wword, .cur_we, .cur_wrow, .cur_wword, .wdata
  );

  search_window_buf u_sw_a (
    .clk, .we(sw_we_a), .wrow(sw_wrow), .wword(sw_wword), .wdata,
    .rrow(a_rrow), .rcol(a_rcol), .rdata(a_rdata)
  );

  search_window_buf u_sw_b (
    .clk, .we(sw_we_b), .wrow(sw_wrow), .wword(sw_wword), .wdata,
    .rrow(b_rrow), .rcol(b_rcol), .rdata(b_rdata)
  );

  cur_mb_buf u_cur (
    .clk, .we(cur_we), .wrow(cur_wrow), .wword(cur_wword), .wdata,
    .rrow0(cur_rrow0), .rrow1(cur_rrow1), .rdata0(cur_rdata0), .rdata1(cur_rdata1)
  );

  bilinear_interp u_bil (
    .top(a_rdata), .bot(b_rdata), .fx(bil_fx), .fy(bil_fy), .out(bil_out)
  );

  pe_array u_pe (
    .clk, .rst_n, .first(pe_first),
    .v0(pe_v0), .row0(pe_row0), .cur0(pe_cur0), .ref0(pe_ref0),
    .v1(pe_v1), .row1(pe_row1), .cur1(pe_cur1), .ref1(pe_ref1),
    .sad4(pe_sad4), .sad16(pe_sad16)
  );

  partition_merge u_merge (
    .mv(mg_mv), .th(mg_th), .mb_mode(mg_mb_mode), .sub_mode(mg_sub_mode),
    .part_id(mg_part_id), .nparts(mg_nparts)
  );

  search_ctrl u_ctrl (
    .clk, .rst_n,
    .start, .mb_x, .mb_y, .cur_frame, .ref_frame, .merge_th, .busy, .done, .pipe,
    .mc_valid, .mc_ready, .mc_cmd, .mc_frame, .mc_mbx, .mc_mby, .mc_dest, .mc_busy,
    .a_rrow, .a_rcol, .a_rdata, .b_rrow, .b_rcol, .b_rdata,
    .cur_rrow0, .cur_rrow1, .cur_rdata0, .cur_rdata1,
    .bil_fx, .bil_fy, .bil_out,
    .pe_first, .pe_v0, .pe_row0, .pe_cur0, .pe_ref0, .pe_v1, .pe_row1, .pe_cur1, .pe_ref1,
    .pe_sad4, .pe_sad16,
    .mg_mv, .mg_th, .mg_mb_mode, .mg_sub_mode, .mg_part_id, .mg_nparts,
    .info_we, .info_waddr, .info_wdata
  );

  me_info_mem u_info (
    .clk, .we(info_we), .waddr(info_waddr), .wdata(info_wdata),
    .re(info_re), .raddr(info_raddr), .rdata(info_rdata)
  );

  sixtap_interp u_sixtap (
    .pix(sixtap_pix), .half(sixtap_half), .quarter(sixtap_quarter)
  );

endmodule
