// search_ctrl: search controller of the motion-estimation accelerator.
//
// For one macroblock it runs the memory pipeline of the two search-window
// buffers (A and B) together with a fast search over three reference frames:
//   pipe 0  load current MB, load window of ref 0 into A and B
//   pipe 1  16x16 search in ref 0, both buffers feed the SAD array (2 rows/cycle):
//           coarse grid of step 8 over +-16 (25 points), keep the 3 best, then a
//           three-step search (steps 3, 2, 1) from each of them
//   pipe 2  load window of ref 1 into A and B
//   pipe 3  16x16 search in ref 1 (2 rows/cycle), starting from the best vector
//           of ref 0, reduced to steps 2 and 1
//   pipe 4  load window of ref 2 into A
//   pipe 5  16x16 search in ref 2 from A (1 row/cycle), starting from the best
//           vector of ref 1, steps 2 and 1; meanwhile the better of refs 0/1 is
//           loaded into B
//   pipe 6  4x4 search (+-2 around the best 16x16 vector, all 16 blocks at once)
//           in the best reference, from whichever buffer holds it (1 row/cycle);
//           meanwhile the other buffer is loaded with the same reference
//   pipe 7  partition merge, then per partition a sub-pel search over +-1 pel
//           around its integer vector: the 5x5 half-pel grid (step 2 q-pel,
//           centre first), then the 8 quarter-pel neighbours of the best
//           half-pel point that stay within +-1 pel, with bilinear samples
//           built from row y of A and row y+1 of B; results go to the
//           ME-info memory.
// A candidate takes 8 (two lanes) or 16 (one lane) row cycles plus one cycle
// in which its SADs are evaluated. Candidates whose pixels fall outside the
// 48x48 window (integer vectors beyond +-16) are skipped. Ties keep the earlier
// candidate. `done` pulses one cycle after the last result word is written.
//
// Taken from the document: the pipeline above (buffers loaded, which buffer feeds
// the array, which reference is loaded when), coarse step 8 with three best
// candidates, three-step steps 3/2/1, searching older references around the
// newer reference's best vector in a reduced window, the +-2 4x4 search, merging
// of similar 4x4 vectors, and bilinear half/quarter-pel refinement per partition.
// This design's own choices: two rows per cycle when both buffers hold the same
// window, the reduced search being steps 2/1, the order of the sub-pel
// search (all half-pel points first, then quarter-pel around the best), tie breaking, and the
// result memory layout.
module search_ctrl
  import me_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host
  input  logic               start,
  input  logic [7:0]         mb_x,
  input  logic [7:0]         mb_y,
  input  logic [1:0]         cur_frame,
  input  logic [1:0]         ref_frame [NREF],   // [0] = most recent
  input  logic [3:0]         merge_th,
  output logic               busy,
  output logic               done,
  output logic [2:0]         pipe,               // pipeline stage in progress
  // memory controller
  output logic               mc_valid,
  input  logic               mc_ready,
  output mc_cmd_e            mc_cmd,
  output logic [1:0]         mc_frame,
  output logic [7:0]         mc_mbx,
  output logic [7:0]         mc_mby,
  output logic [1:0]         mc_dest,
  input  logic               mc_busy,
  // search-window buffers
  output logic [5:0]         a_rrow,
  output logic [5:0]         a_rcol,
  input  row17_t             a_rdata,
  output logic [5:0]         b_rrow,
  output logic [5:0]         b_rcol,
  input  row17_t             b_rdata,
  // current MB buffer
  output logic [3:0]         cur_rrow0,
  output logic [3:0]         cur_rrow1,
  input  row16_t             cur_rdata0,
  input  row16_t             cur_rdata1,
  // bilinear interpolator (top = a_rdata, bot = b_rdata)
  output logic [1:0]         bil_fx,
  output logic [1:0]         bil_fy,
  input  row16_t             bil_out,
  // PE array
  output logic               pe_first,
  output logic               pe_v0,
  output logic [3:0]         pe_row0,
  output row16_t             pe_cur0,
  output row16_t             pe_ref0,
  output logic               pe_v1,
  output logic [3:0]         pe_row1,
  output row16_t             pe_cur1,
  output row16_t             pe_ref1,
  input  logic [SAD4_W-1:0]  pe_sad4 [NBLK],
  input  logic [SAD16_W-1:0] pe_sad16,
  // partition merge
  output mv_t                mg_mv [NBLK],
  output logic [3:0]         mg_th,
  input  mb_mode_e           mg_mb_mode,
  input  sub_mode_e          mg_sub_mode [4],
  input  logic [3:0]         mg_part_id [NBLK],
  input  logic [5:0]         mg_nparts,
  // ME-info memory write port
  output logic               info_we,
  output logic [INFO_AW-1:0] info_waddr,
  output logic [31:0]        info_wdata
);
  typedef enum logic [3:0] {
    S_IDLE, S_MC_ISSUE, S_MC_WAIT, S_SEL, S_RUN, S_EVAL, S_PHEND, S_MERGE, S_WRITE, S_DONE
  } state_e;
  typedef enum logic [2:0] {PH_TWSS, PH_REFC, PH_TSS, PH_4X4, PH_SUB} phase_e;
  typedef enum logic [1:0] {M_DUAL, M_SINGLE_A, M_SINGLE_B, M_SUB} run_e;
  // what to do after a memory-controller command
  typedef enum logic [2:0] {N_LOAD_REF0, N_SEARCH_REF0, N_SEARCH_REF1, N_SEARCH_REF2_LOADB,
                            N_SEARCH_REF2, N_4X4, N_SUB} next_e;

  localparam logic [SAD16_W-1:0] SAD_MAX = '1;

  state_e st;
  phase_e ph;
  run_e   rmode;
  next_e  nxt;

  // latched job
  logic [7:0] j_mbx, j_mby;
  logic [1:0] j_ref [NREF];
  logic [3:0] j_th;

  // candidate being evaluated
  logic signed [7:0] cx, cy;
  logic [3:0]        rc;

  // search state
  logic [1:0]           k;          // reference index
  logic [4:0]           idx;        // coarse-grid / 4x4 index
  mv_t                  b3_mv  [3];
  logic [SAD16_W-1:0]   b3_sad [3];
  logic [1:0]           ci;         // which of the 3 candidates is refined
  logic [1:0]           step;
  logic [3:0]           nb;         // neighbour index, 8 = step finished
  mv_t                  ctr_mv,  stp_mv,  g_mv;
  logic [SAD16_W-1:0]   stp_sad, g_sad;
  mv_t                  rb_mv  [NREF];
  logic [SAD16_W-1:0]   rb_sad [NREF];
  logic [1:0]           best_ref;
  mv_t                  blk_mv  [NBLK];   // integer
  logic [SAD4_W-1:0]    blk_sad [NBLK];
  mv_t                  blk_qmv [NBLK];   // quarter-pel
  logic [3:0]           pid [NBLK];
  mb_mode_e             r_mb_mode;
  sub_mode_e            r_sub_mode [4];
  logic [5:0]           r_nparts;
  logic [3:0]           pb;               // partition being refined (its top-left block)
  logic [4:0]           wa;               // result write address

  // neighbour offsets of a ring, in raster order without the centre
  function automatic logic signed [1:0] offx(logic [2:0] n);
    unique case (n)
      3'd0, 3'd3, 3'd5: return -2'sd1;
      3'd1, 3'd6:       return 2'sd0;
      default:          return 2'sd1;
    endcase
  endfunction
  function automatic logic signed [1:0] offy(logic [2:0] n);
    unique case (n)
      3'd0, 3'd1, 3'd2: return -2'sd1;
      3'd3, 3'd4:       return 2'sd0;
      default:          return 2'sd1;
    endcase
  endfunction

  function automatic logic in_int(logic signed [8:0] v);
    return (v >= -9'sd16) && (v <= 9'sd16);
  endfunction
  function automatic logic in_q(logic signed [8:0] v);
    return (v >= -9'sd64) && (v <= 9'sd64);
  endfunction

  // ---------------------------------------------------------------- candidate selection
  // For the current phase and indices: the candidate, whether it is inside
  // the window, and whether the phase (or the current step) has run out.
  logic signed [8:0] sel_x, sel_y;
  logic              sel_ok, sel_end;
  mv_t               sub_base;    // integer vector of partition pb, in q-pel
  assign sub_base.x = blk_mv[pb].x <<< 2;
  assign sub_base.y = blk_mv[pb].y <<< 2;
  always_comb begin
    logic [4:0] kk;
    sel_x = '0;
    sel_y = '0;
    sel_ok = 1'b0;
    sel_end = 1'b0;
    kk = '0;
    unique case (ph)
      PH_TWSS: begin
        sel_end = (idx == 5'd25);
        sel_x   = 9'(-16 + 8 * (int'(idx) % 5));
        sel_y   = 9'(-16 + 8 * (int'(idx) / 5));
        sel_ok  = 1'b1;
      end
      PH_REFC: begin
        sel_x  = 9'(rb_mv[k - 2'd1].x);
        sel_y  = 9'(rb_mv[k - 2'd1].y);
        sel_ok = 1'b1;
      end
      PH_TSS: begin
        sel_end = (nb == 4'd8);
        sel_x   = 9'(ctr_mv.x) + 9'(offx(nb[2:0])) * 9'(step);
        sel_y   = 9'(ctr_mv.y) + 9'(offy(nb[2:0])) * 9'(step);
        sel_ok  = in_int(sel_x) && in_int(sel_y);
      end
      PH_4X4: begin
        sel_end = (idx == 5'd25);
        if (idx == 5'd0) kk = 5'd12;
        else if (idx <= 5'd12) kk = idx - 5'd1;
        else kk = idx;
        sel_x  = 9'(ctr_mv.x) + 9'(int'(kk) % 5 - 2);
        sel_y  = 9'(ctr_mv.y) + 9'(int'(kk) / 5 - 2);
        sel_ok = in_int(sel_x) && in_int(sel_y);
      end
      default: begin // PH_SUB
        if (step == 2'd2) begin
          // half-pel grid: 5x5 points of step 2 q-pel (+-1 pel), centre first
          sel_end = (idx == 5'd25);
          if (idx == 5'd0) kk = 5'd12;
          else if (idx <= 5'd12) kk = idx - 5'd1;
          else kk = idx;
          sel_x  = 9'(sub_base.x) + 9'(2 * (int'(kk) % 5 - 2));
          sel_y  = 9'(sub_base.y) + 9'(2 * (int'(kk) / 5 - 2));
          sel_ok = in_q(sel_x) && in_q(sel_y);
        end else begin
          // quarter-pel ring around the best half-pel point, kept inside +-1 pel
          sel_end = (nb == 4'd9);
          sel_x   = 9'(ctr_mv.x) + 9'(offx(3'(nb - 4'd1)));
          sel_y   = 9'(ctr_mv.y) + 9'(offy(3'(nb - 4'd1)));
          sel_ok  = in_q(sel_x) && in_q(sel_y) &&
                    (sel_x - 9'(sub_base.x) <= 9'sd4) && (9'(sub_base.x) - sel_x <= 9'sd4) &&
                    (sel_y - 9'(sub_base.y) <= 9'sd4) && (9'(sub_base.y) - sel_y <= 9'sd4);
        end
      end
    endcase
  end

  // ---------------------------------------------------------------- row datapath
  logic signed [7:0] ix, iy;      // integer part of the candidate
  logic [5:0]        ox, oy;      // window coordinates of the candidate's corner
  always_comb begin
    if (rmode == M_SUB) begin
      ix = cx >>> 2;
      iy = cy >>> 2;
    end else begin
      ix = cx;
      iy = cy;
    end
    ox = 6'(ix + 8'sd16);
    oy = 6'(iy + 8'sd16);
  end

  logic running;
  assign running = (st == S_RUN);

  always_comb begin
    logic [6:0] rb;
    a_rcol    = ox;
    b_rcol    = ox;
    bil_fx    = (rmode == M_SUB) ? cx[1:0] : 2'd0;
    bil_fy    = (rmode == M_SUB) ? cy[1:0] : 2'd0;
    pe_first  = running && rc == 4'd0;
    pe_v0     = running;
    pe_v1     = running && rmode == M_DUAL;
    pe_row0   = (rmode == M_DUAL) ? {rc[2:0], 1'b0} : rc;
    pe_row1   = {rc[2:0], 1'b1};
    cur_rrow0 = pe_row0;
    cur_rrow1 = pe_row1;
    pe_cur0   = cur_rdata0;
    pe_cur1   = cur_rdata1;
    a_rrow    = oy + 6'(pe_row0);
    rb        = 7'(oy) + 7'(pe_row1);
    b_rrow    = 6'(rb);
    if (rmode == M_SINGLE_B) b_rrow = oy + 6'(rc);
    if (rmode == M_SUB) begin
      rb     = 7'(oy) + 7'(rc) + 7'd1;
      b_rrow = (rb > 7'(SW - 1)) ? 6'(SW - 1) : 6'(rb);
    end
    pe_ref1 = b_rdata[MB-1:0];
    unique case (rmode)
      M_SINGLE_B: pe_ref0 = b_rdata[MB-1:0];
      M_SUB:      pe_ref0 = bil_out;
      default:    pe_ref0 = a_rdata[MB-1:0];
    endcase
  end

  logic last_row;
  assign last_row = (rmode == M_DUAL) ? (rc == 4'd7) : (rc == 4'd15);

  // SAD of the partition with top-left block pb
  logic [SAD16_W-1:0] part_sad;
  always_comb begin
    part_sad = '0;
    for (int b = 0; b < NBLK; b++)
      if (pid[b] == pb) part_sad += SAD16_W'(pe_sad4[b]);
  end

  assign mg_th  = j_th;
  assign mc_mbx = j_mbx;
  assign mc_mby = j_mby;
  for (genvar b = 0; b < NBLK; b++) begin : g_mg
    assign mg_mv[b] = blk_mv[b];
  end

  // ---------------------------------------------------------------- bookkeeping helpers
  mv_t c_mv;                      // candidate just evaluated
  assign c_mv.x = cx;
  assign c_mv.y = cy;

  // best of all refinements so far, including the one that just finished
  logic [SAD16_W-1:0] gs;
  mv_t                gm;
  assign gs = (stp_sad < g_sad) ? stp_sad : g_sad;
  assign gm = (stp_sad < g_sad) ? stp_mv  : g_mv;

  // next partition after pb (partitions are the blocks with pid[b] == b)
  logic       found;
  logic [3:0] np;
  always_comb begin
    found = 1'b0;
    np    = '0;
    for (int b = NBLK - 1; b >= 0; b--)
      if (b > int'(pb) && pid[b] == 4'(b)) begin
        found = 1'b1;
        np    = 4'(b);
      end
  end

  // result word at address wa
  logic [31:0] info_word;
  always_comb begin
    blk_info_t  bi;
    ref_info_t  ri;
    mode_info_t mi;
    bi.mv      = blk_qmv[wa[3:0]];
    bi.part_id = pid[wa[3:0]];
    bi.sad     = blk_sad[wa[3:0]];
    ri.mv      = rb_mv[2'(wa - 5'(INFO_REF0))];
    ri.sad     = rb_sad[2'(wa - 5'(INFO_REF0))];
    mi.rsvd     = '0;
    mi.best_ref = best_ref;
    mi.mb_mode  = r_mb_mode;
    for (int q = 0; q < 4; q++) mi.sub_mode[q] = r_sub_mode[q];
    mi.nparts   = r_nparts;
    if (wa < 5'(NBLK))           info_word = bi;
    else if (wa < 5'(INFO_MODE)) info_word = ri;
    else                         info_word = mi;
  end

  // ---------------------------------------------------------------- main FSM
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      ph        <= PH_TWSS;
      rmode     <= M_DUAL;
      nxt       <= N_LOAD_REF0;
      pipe      <= '0;
      done      <= 1'b0;
      mc_valid  <= 1'b0;
      mc_cmd    <= MC_LOAD_CUR;
      mc_frame  <= '0;
      mc_dest   <= '0;
      j_mbx     <= '0;
      j_mby     <= '0;
      j_th      <= '0;
      cx        <= '0;
      cy        <= '0;
      rc        <= '0;
      k         <= '0;
      idx       <= '0;
      ci        <= '0;
      step      <= '0;
      nb        <= '0;
      ctr_mv    <= '0;
      stp_mv    <= '0;
      stp_sad   <= '0;
      g_mv      <= '0;
      g_sad     <= '0;
      best_ref  <= '0;
      r_mb_mode <= P16X16;
      r_nparts  <= '0;
      pb        <= '0;
      wa        <= '0;
      info_we   <= 1'b0;
      info_waddr <= '0;
      info_wdata <= '0;
      for (int i = 0; i < NREF; i++) begin
        j_ref[i]  <= '0;
        rb_mv[i]  <= '0;
        rb_sad[i] <= '0;
      end
      for (int i = 0; i < 3; i++) begin
        b3_mv[i]  <= '0;
        b3_sad[i] <= '0;
      end
      for (int i = 0; i < 4; i++) r_sub_mode[i] <= S8X8;
      for (int i = 0; i < NBLK; i++) begin
        blk_mv[i]  <= '0;
        blk_sad[i] <= '0;
        blk_qmv[i] <= '0;
        pid[i]     <= '0;
      end
    end else begin
      done    <= 1'b0;
      info_we <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          j_mbx    <= mb_x;
          j_mby    <= mb_y;
          j_th     <= merge_th;
          for (int i = 0; i < NREF; i++) j_ref[i] <= ref_frame[i];
          pipe     <= 3'd0;
          mc_cmd   <= MC_LOAD_CUR;
          mc_frame <= cur_frame;
          mc_dest  <= 2'b00;
          mc_valid <= 1'b1;
          nxt      <= N_LOAD_REF0;
          st       <= S_MC_ISSUE;
        end

        S_MC_ISSUE: if (mc_ready) begin
          mc_valid <= 1'b0;
          // A search that overlaps the load starts right away; the others wait.
          if (nxt == N_SEARCH_REF2 || nxt == N_4X4) begin
            rmode <= (nxt == N_4X4) ? ((best_ref == 2'd2) ? M_SINGLE_A : M_SINGLE_B) : M_SINGLE_A;
            ph    <= (nxt == N_4X4) ? PH_4X4 : PH_REFC;
            idx   <= '0;
            st    <= S_SEL;
          end else begin
            st <= S_MC_WAIT;
          end
        end

        S_MC_WAIT: if (!mc_busy && !mc_valid) begin
          unique case (nxt)
            N_LOAD_REF0: begin
              mc_cmd   <= MC_LOAD_SW;
              mc_frame <= j_ref[0];
              mc_dest  <= 2'b11;
              mc_valid <= 1'b1;
              nxt      <= N_SEARCH_REF0;
              st       <= S_MC_ISSUE;
            end
            N_SEARCH_REF0: begin
              pipe  <= 3'd1;
              k     <= 2'd0;
              rmode <= M_DUAL;
              ph    <= PH_TWSS;
              idx   <= '0;
              for (int i = 0; i < 3; i++) begin
                b3_sad[i] <= SAD_MAX;
                b3_mv[i]  <= '0;
              end
              st <= S_SEL;
            end
            N_SEARCH_REF1: begin
              pipe  <= 3'd3;
              k     <= 2'd1;
              rmode <= M_DUAL;
              ph    <= PH_REFC;
              st    <= S_SEL;
            end
            N_SEARCH_REF2_LOADB: begin
              // pipe 5: search ref 2 from A while the better of refs 0/1 goes to B
              pipe     <= 3'd5;
              k        <= 2'd2;
              mc_cmd   <= MC_LOAD_SW;
              mc_frame <= (rb_sad[1] < rb_sad[0]) ? j_ref[1] : j_ref[0];
              mc_dest  <= 2'b10;
              mc_valid <= 1'b1;
              nxt      <= N_SEARCH_REF2;
              st       <= S_MC_ISSUE;
            end
            N_4X4: begin
              // pipe 6: the buffer that does not hold the best reference is refilled
              pipe     <= 3'd6;
              mc_cmd   <= MC_LOAD_SW;
              mc_frame <= j_ref[best_ref];
              mc_dest  <= (best_ref == 2'd2) ? 2'b10 : 2'b01;
              mc_valid <= 1'b1;
              ctr_mv   <= rb_mv[best_ref];
              for (int b = 0; b < NBLK; b++) blk_sad[b] <= '1;
              st       <= S_MC_ISSUE;
            end
            default: begin // N_SUB
              pipe  <= 3'd7;
              rmode <= M_SUB;
              ph    <= PH_SUB;
              pb    <= 4'd0;
              step  <= 2'd2;
              idx   <= '0;
              st    <= S_SEL;
            end
          endcase
        end

        S_SEL: begin
          if (sel_end) begin
            if (ph == PH_TSS && step > 2'd1) begin
              // next, smaller step around the best point of this step
              step    <= step - 2'd1;
              nb      <= '0;
              ctr_mv  <= stp_mv;
            end else if (ph == PH_SUB && step == 2'd2) begin
              step    <= 2'd1;
              nb      <= 4'd1;
              ctr_mv  <= stp_mv;
            end else begin
              st <= S_PHEND;
            end
          end else if (sel_ok) begin
            cx <= 8'(sel_x);
            cy <= 8'(sel_y);
            rc <= '0;
            st <= S_RUN;
          end else begin
            if (ph == PH_4X4 || (ph == PH_SUB && step == 2'd2)) idx <= idx + 5'd1;
            else nb <= nb + 4'd1;
          end
        end

        S_RUN: begin
          rc <= rc + 4'd1;
          if (last_row) st <= S_EVAL;
        end

        S_EVAL: begin
          st <= S_SEL;
          unique case (ph)
            PH_TWSS: begin
              if (pe_sad16 < b3_sad[0]) begin
                b3_mv[2] <= b3_mv[1];  b3_sad[2] <= b3_sad[1];
                b3_mv[1] <= b3_mv[0];  b3_sad[1] <= b3_sad[0];
                b3_mv[0] <= c_mv;         b3_sad[0] <= pe_sad16;
              end else if (pe_sad16 < b3_sad[1]) begin
                b3_mv[2] <= b3_mv[1];  b3_sad[2] <= b3_sad[1];
                b3_mv[1] <= c_mv;         b3_sad[1] <= pe_sad16;
              end else if (pe_sad16 < b3_sad[2]) begin
                b3_mv[2] <= c_mv;         b3_sad[2] <= pe_sad16;
              end
              idx <= idx + 5'd1;
            end
            PH_REFC: begin
              ctr_mv.x <= cx;  ctr_mv.y <= cy;
              stp_mv.x <= cx;  stp_mv.y <= cy;  stp_sad <= pe_sad16;
              g_sad    <= SAD_MAX;
              ph       <= PH_TSS;
              step     <= 2'd2;
              nb       <= '0;
            end
            PH_TSS: begin
              if (pe_sad16 < stp_sad) begin
                stp_mv.x <= cx;
                stp_mv.y <= cy;
                stp_sad  <= pe_sad16;
              end
              nb <= nb + 4'd1;
            end
            PH_4X4: begin
              for (int b = 0; b < NBLK; b++) begin
                if (pe_sad4[b] < blk_sad[b]) begin
                  blk_sad[b]  <= pe_sad4[b];
                  blk_mv[b].x <= cx;
                  blk_mv[b].y <= cy;
                end
              end
              idx <= idx + 5'd1;
            end
            default: begin // PH_SUB
              if ((step == 2'd2 && idx == 5'd0) || part_sad < stp_sad) begin
                stp_mv.x <= cx;
                stp_mv.y <= cy;
                stp_sad  <= part_sad;
              end
              if (step == 2'd2) idx <= idx + 5'd1;
              else nb <= nb + 4'd1;
            end
          endcase
        end

        S_PHEND: begin
          unique case (ph)
            PH_TWSS: begin
              ph      <= PH_TSS;
              ci      <= '0;
              step    <= 2'd3;
              nb      <= '0;
              ctr_mv  <= b3_mv[0];
              stp_mv  <= b3_mv[0];
              stp_sad <= b3_sad[0];
              g_sad   <= SAD_MAX;
              st      <= S_SEL;
            end
            PH_TSS: begin
              // one refinement finished: keep the best of all refinements
              g_sad <= gs;
              g_mv  <= gm;
              if (k == 2'd0 && ci < 2'd2) begin
                ci      <= ci + 2'd1;
                step    <= 2'd3;
                nb      <= '0;
                ctr_mv  <= b3_mv[ci + 2'd1];
                stp_mv  <= b3_mv[ci + 2'd1];
                stp_sad <= b3_sad[ci + 2'd1];
                st      <= S_SEL;
              end else begin
                rb_mv[k]  <= gm;
                rb_sad[k] <= gs;
                unique case (k)
                  2'd0: begin  // pipe 2: ref 1 into A and B
                    pipe     <= 3'd2;
                    mc_cmd   <= MC_LOAD_SW;
                    mc_frame <= j_ref[1];
                    mc_dest  <= 2'b11;
                    mc_valid <= 1'b1;
                    nxt      <= N_SEARCH_REF1;
                    st       <= S_MC_ISSUE;
                  end
                  2'd1: begin  // pipe 4: ref 2 into A
                    pipe     <= 3'd4;
                    mc_cmd   <= MC_LOAD_SW;
                    mc_frame <= j_ref[2];
                    mc_dest  <= 2'b01;
                    mc_valid <= 1'b1;
                    nxt      <= N_SEARCH_REF2_LOADB;
                    st       <= S_MC_ISSUE;
                  end
                  default: begin  // ref 2 done: pick the best reference
                    if (gs < rb_sad[0] && gs < rb_sad[1]) best_ref <= 2'd2;
                    else if (rb_sad[1] < rb_sad[0])        best_ref <= 2'd1;
                    else                                   best_ref <= 2'd0;
                    nxt <= N_4X4;
                    st  <= S_MC_WAIT;    // B must hold the better of refs 0/1 first
                  end
                endcase
              end
            end
            PH_4X4: st <= S_MERGE;
            PH_SUB: begin
              // partition done: all its blocks get the refined vector
              for (int b = 0; b < NBLK; b++)
                if (pid[b] == pb) blk_qmv[b] <= stp_mv;
              if (found) begin
                pb       <= np;
                step     <= 2'd2;
                idx      <= '0;
                st       <= S_SEL;
              end else begin
                wa <= '0;
                st <= S_WRITE;
              end
            end
            default: st <= S_IDLE;
          endcase
        end

        S_MERGE: begin
          for (int b = 0; b < NBLK; b++) pid[b] <= mg_part_id[b];
          for (int q = 0; q < 4; q++) r_sub_mode[q] <= mg_sub_mode[q];
          r_mb_mode <= mg_mb_mode;
          r_nparts  <= mg_nparts;
          nxt       <= N_SUB;
          st        <= S_MC_WAIT;     // the other buffer must hold the best reference
        end

        S_WRITE: begin
          info_we    <= 1'b1;
          info_waddr <= wa;
          info_wdata <= info_word;
          if (wa == 5'(INFO_MODE)) st <= S_DONE;
          wa <= wa + 5'd1;
        end

        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
