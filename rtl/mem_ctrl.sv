// mem_ctrl: EBUS master that fills the on-chip buffers from the frame buffer.
//
// Frames live in external memory, one luma plane per frame at
// FB_BASE + frame * FRAME_W * FRAME_H, row-major, one byte per pixel.
// Two commands are accepted (cmd_valid && cmd_ready):
//   MC_LOAD_CUR: the 16x16 macroblock (mb_x, mb_y) of `frame` -> current-MB buffer
//   MC_LOAD_SW : the 48x48 window around that macroblock (origin 16 pixels up and
//                left) -> search-window buffer A and/or B (dest[0] = A, dest[1] = B)
// Window rows above/below the frame repeat the edge row; 4-pixel words left or
// right of the frame repeat the edge pixel (H.264 edge padding). Because the
// window origin is 16-pixel aligned a word is either wholly inside or wholly
// outside the frame. Loading A and B with the same window costs one transfer.
//
// Bus side: AHB-Lite style single 32-bit reads, one transfer at a time (address
// phase with HTRANS = NONSEQ, then a data phase with HTRANS = IDLE, each held
// while HREADY is low): two cycles per word without wait states. `busy` is high
// from the cycle after acceptance until the last word is written.
// The frame-buffer layout, the window geometry (48x48, Table 1 of the design
// study) and AHB as EBUS protocol follow the document; single non-pipelined
// transfers and the padding rule are this design's choices.
module mem_ctrl
  import me_pkg::*;
#(
  parameter int unsigned FRAME_W = 384,
  parameter int unsigned FRAME_H = 320,
  parameter logic [31:0] FB_BASE = 32'h0000_0000
) (
  input  logic             clk,
  input  logic             rst_n,
  // command
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  mc_cmd_e          cmd,
  input  logic [1:0]       frame,
  input  logic [7:0]       mb_x,
  input  logic [7:0]       mb_y,
  input  logic [1:0]       dest,
  output logic             busy,
  // EBUS (AHB-Lite master, read only)
  output logic [31:0]      haddr,
  output logic [1:0]       htrans,
  output logic             hwrite,
  output logic [2:0]       hsize,
  output logic [2:0]       hburst,
  input  logic             hready,
  input  logic [31:0]      hrdata,
  // buffer write ports
  output logic             sw_we_a,
  output logic             sw_we_b,
  output logic [5:0]       sw_wrow,
  output logic [3:0]       sw_wword,
  output logic             cur_we,
  output logic [3:0]       cur_wrow,
  output logic [1:0]       cur_wword,
  output logic [BUS_W-1:0] wdata
);
  localparam logic [1:0] HT_IDLE = 2'b00, HT_NONSEQ = 2'b10;
  localparam int FRAME_SZ = FRAME_W * FRAME_H;

  typedef enum logic [1:0] {ST_IDLE, ST_ADDR, ST_DATA} st_e;
  st_e st;

  mc_cmd_e    c_cmd;
  logic [1:0] c_frame, c_dest;
  logic [7:0] c_mbx, c_mby;
  logic [5:0] row;     // window / macroblock row
  logic [3:0] word;    // word within the row

  // Frame coordinates of the current word and the clamped bus address.
  int signed  fy, fx;
  logic [31:0] addr_c;
  logic [1:0]  pad_c;  // 0: none, 1: repeat byte 0, 2: repeat byte 3
  always_comb begin
    if (c_cmd == MC_LOAD_SW) begin
      fy = int'(c_mby) * MB - int'(SR) + int'(row);
      fx = int'(c_mbx) * MB - int'(SR) + 4 * int'(word);
    end else begin
      fy = int'(c_mby) * MB + int'(row);
      fx = int'(c_mbx) * MB + 4 * int'(word);
    end
    pad_c = 2'd0;
    if (fy < 0) fy = 0;
    if (fy > int'(FRAME_H) - 1) fy = int'(FRAME_H) - 1;
    if (fx < 0) begin
      fx = 0;
      pad_c = 2'd1;
    end else if (fx > int'(FRAME_W) - 4) begin
      fx = int'(FRAME_W) - 4;
      pad_c = 2'd2;
    end
    addr_c = FB_BASE + 32'(int'(c_frame) * FRAME_SZ + fy * int'(FRAME_W) + fx);
  end

  logic last_word;
  assign last_word = (c_cmd == MC_LOAD_SW) ? (row == 6'(SW - 1) && word == 4'(SW / 4 - 1))
                                           : (row == 6'(MB - 1) && word == 4'(MB / 4 - 1));

  assign cmd_ready = (st == ST_IDLE);
  assign busy      = (st != ST_IDLE);
  assign hwrite    = 1'b0;
  assign hsize     = 3'b010;   // 32-bit
  assign hburst    = 3'b000;   // SINGLE
  assign htrans    = (st == ST_ADDR) ? HT_NONSEQ : HT_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= ST_IDLE;
      c_cmd   <= MC_LOAD_CUR;
      c_frame <= '0;
      c_dest  <= '0;
      c_mbx   <= '0;
      c_mby   <= '0;
      row     <= '0;
      word    <= '0;
    end else begin
      unique case (st)
        ST_IDLE: if (cmd_valid) begin
          c_cmd   <= cmd;
          c_frame <= frame;
          c_dest  <= dest;
          c_mbx   <= mb_x;
          c_mby   <= mb_y;
          row     <= '0;
          word    <= '0;
          st      <= ST_ADDR;
        end
        ST_ADDR: if (hready) st <= ST_DATA;
        ST_DATA: if (hready) begin
          if (last_word) st <= ST_IDLE;
          else begin
            st <= ST_ADDR;
            if (word == ((c_cmd == MC_LOAD_SW) ? 4'(SW / 4 - 1) : 4'(MB / 4 - 1))) begin
              word <= '0;
              row  <= row + 6'd1;
            end else begin
              word <= word + 4'd1;
            end
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  // The address follows the counters, which are stable during the address
  // phase; the padding rule of the word is kept for its data phase.
  assign haddr = addr_c;
  logic [1:0]  pad_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pad_q   <= '0;
    end else if (st == ST_ADDR) begin
      pad_q   <= pad_c;
    end
  end

  // Buffer write in the completing data phase.
  logic [BUS_W-1:0] wd;
  always_comb begin
    unique case (pad_q)
      2'd1:    wd = {4{hrdata[7:0]}};
      2'd2:    wd = {4{hrdata[31:24]}};
      default: wd = hrdata;
    endcase
  end

  logic wr;
  assign wr        = (st == ST_DATA) && hready;
  assign wdata     = wd;
  assign sw_we_a   = wr && c_cmd == MC_LOAD_SW && c_dest[0];
  assign sw_we_b   = wr && c_cmd == MC_LOAD_SW && c_dest[1];
  assign sw_wrow   = row;
  assign sw_wword  = word;
  assign cur_we    = wr && c_cmd == MC_LOAD_CUR;
  assign cur_wrow  = row[3:0];
  assign cur_wword = word[1:0];

endmodule
