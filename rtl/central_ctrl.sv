// central_ctrl: central controller of the accelerator.
//
// Executes one command at a time (cmd_valid/cmd_ready; see cmd_t in
// revit_pkg) and configures every unit for it:
//  - OP_LOAD starts the prefetcher and waits for it.
//  - OP_SWAP flips the double-buffered regions named in the mask.
//  - OP_MATMUL runs n0 slices on the PE array. Per slice it reads the
//    centroid word and the operand word, then the feature word, and starts
//    the array; after the last slice it drains the results to the chosen
//    sink: Q/V buffer (one column per cycle, requantised to DW bits), group
//    generation engine (hash rows of one column per patch) or K/A buffer
//    (one row of scores per cycle, requantised to 16 bits). Columns,
//    per-column mode and switch boxes come with the command, or the switch
//    boxes from the scheduler (auto_link). The first slice clears the
//    accumulators; save_base keeps the final sums as centroid results.
//    A command tagged PH_INTRA / PH_INTER reports the groups in grp_mask
//    finished to the scheduler when it ends.
//  - OP_SCHED lets the scheduler size the sub-arrays from the group counts.
//  - OP_SOFTMAX feeds n0 query rows of n1 score blocks from the K/A buffer
//    through the softmax unit and writes the probabilities back.
//  - OP_PRUNE gives n0 candidates (value word, attention lane) to the patch
//    or group pruner and waits until it is idle.
//  - OP_CLEAR clears the group and pruning counters.
// Buffers are read on their drain side and written on their fill side, so
// a producer and its consumer are separated by an OP_SWAP.
//
// Buffer word layouts: input word, lane (c*PC+j) = feature j of the slice
// for column c; operand word, lane (r*PC+j) = element j for row r; Q/V word
// lane r = output r of one column; K/A word lane c = 16-bit value for
// column c.
//
// From the document: a central controller configuring all units, and the
// order of steps of the differential attention flow. Own choices: the
// command set, word layouts, requantisation by shift and saturation, and
// no overlap between buffer reads and array work.
module central_ctrl
  import revit_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned COLS  = 64,
  parameter int unsigned PC    = 4,
  parameter int unsigned G     = NGRP,
  parameter int unsigned PIDW  = 8,
  parameter int unsigned NBLK  = 4,
  parameter int unsigned IN_AW = 8,
  parameter int unsigned W_AW  = 9,
  parameter int unsigned QV_AW = 10,
  parameter int unsigned KA_AW = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // command port
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  cmd_t                   cmd,
  input  logic [COLS-1:0]        cmd_col_en,
  input  logic [COLS-1:0]        cmd_col_mode,
  input  logic [COLS-2:0]        cmd_link,
  output logic                   busy,
  // prefetcher
  output logic                   pf_start,
  output logic [31:0]            pf_src,
  output logic [15:0]            pf_len,
  output logic [15:0]            pf_dst,
  output logic                   pf_sel,
  input  logic                   pf_done,
  // buffer control
  output logic [3:0]             swap,
  output logic                   in_rd_en,
  output logic [IN_AW-1:0]       in_rd_addr,
  input  logic [COLS*PC*DW-1:0]  in_rd_data,
  output logic                   w_rd_en,
  output logic [W_AW-1:0]        w_rd_addr,
  input  logic [ROWS*PC*DW-1:0]  w_rd_data,
  output logic                   qv_we,
  output logic [QV_AW-1:0]       qv_waddr,
  output logic [ROWS*DW-1:0]     qv_wdata,
  output logic                   qv_rd_en,
  output logic [QV_AW-1:0]       qv_rd_addr,
  input  logic [ROWS*DW-1:0]     qv_rd_data,
  output logic                   ka_we,
  output logic [KA_AW-1:0]       ka_waddr,
  output logic [COLS*16-1:0]     ka_wdata,
  output logic                   ka_rd_en,
  output logic [KA_AW-1:0]       ka_rd_addr,
  input  logic [COLS*16-1:0]     ka_rd_data,
  // PE array
  output logic                   mm_start,
  output logic                   mm_first,
  output logic                   mm_save_base,
  output logic [COLS-1:0]        mm_col_en,
  output logic [COLS-1:0]        mm_col_mode,
  output logic [COLS-2:0]        mm_link,
  output logic signed [DW-1:0]   mm_x [COLS][PC],
  output logic signed [DW-1:0]   mm_c [COLS][PC],
  output logic signed [DW-1:0]   mm_w [ROWS][PC],
  input  logic                   mm_done,
  input  logic signed [ACCW-1:0] mm_result [ROWS][COLS],
  // group generation engine
  output logic                   gg_valid,
  input  logic                   gg_ready,
  output logic [PIDW-1:0]        gg_pid,
  output logic signed [ACCW-1:0] gg_hash [G],
  output logic                   gg_clear,
  // softmax unit
  output logic                   sm_valid,
  input  logic                   sm_ready,
  output logic signed [15:0]     sm_score [COLS],
  output logic [COLS-1:0]        sm_mask,
  output logic                   sm_last,
  input  logic                   sm_out_valid,
  input  logic [15:0]            sm_out_prob [COLS],
  input  logic [$clog2(NBLK+1)-1:0] sm_out_blk,
  input  logic                   sm_out_last,
  // scheduler
  output logic                   rs_cfg_start,
  output logic                   rs_flat,
  output logic                   rs_ooo,
  input  logic [COLS-2:0]        rs_link,
  output logic [G-1:0]           rs_intra_done,
  output logic [G-1:0]           rs_inter_done,
  // pruners
  output logic [1:0]             pr_valid,
  input  logic [1:0]             pr_ready,
  output logic [PIDW-1:0]        pr_pid,
  output logic [15:0]            pr_att,
  output logic signed [DW-1:0]   pr_v [ROWS],
  input  logic [1:0]             pr_busy,
  output logic                   pr_clear
);

  typedef enum logic [4:0] {
    C_IDLE, C_PF, C_SCHED,
    C_M_RDC, C_M_RDX, C_M_GO, C_M_START, C_M_WAIT, C_M_SINK, C_M_END,
    C_S_RD, C_S_WAIT, C_S_FEED, C_S_OUT,
    C_P_RD, C_P_WAIT, C_P_FEED, C_P_DRAIN
  } cstate_e;
  cstate_e state;

  cmd_t             cq;
  logic [COLS-1:0]  col_en_q, col_mode_q;
  logic [COLS-2:0]  link_q;
  logic [15:0]      cnt, cnt2;
  logic [COLS*PC*DW-1:0] x_word, c_word;
  logic [ROWS*PC*DW-1:0] w_word;

  function automatic logic signed [DW-1:0] sat8(input logic signed [ACCW-1:0] v, input logic [4:0] sh);
    logic signed [ACCW-1:0] t;
    t = v >>> sh;
    if (t > ACCW'((1 << (DW - 1)) - 1)) return DW'((1 << (DW - 1)) - 1);
    if (t < -ACCW'(1 << (DW - 1)))      return DW'(-(1 << (DW - 1)));
    return t[DW-1:0];
  endfunction

  function automatic logic signed [15:0] sat16(input logic signed [ACCW-1:0] v, input logic [4:0] sh);
    logic signed [ACCW-1:0] t;
    t = v >>> sh;
    if (t > 32'sd32767)  return 16'sd32767;
    if (t < -32'sd32768) return -16'sd32768;
    return t[15:0];
  endfunction

  // Unpack buffer words onto the array operands.
  always_comb begin
    for (int cc = 0; cc < COLS; cc++)
      for (int j = 0; j < PC; j++) begin
        mm_x[cc][j] = x_word[(cc*PC+j)*DW +: DW];
        mm_c[cc][j] = c_word[(cc*PC+j)*DW +: DW];
      end
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < PC; j++) mm_w[r][j] = w_word[(r*PC+j)*DW +: DW];
  end
  assign mm_col_en   = col_en_q;
  assign mm_col_mode = col_mode_q;
  assign mm_link     = link_q;

  // Result drains.
  always_comb begin
    for (int r = 0; r < ROWS; r++) qv_wdata[r*DW +: DW] = sat8(mm_result[r][cnt[$clog2(COLS)-1:0]], cq.shift);
    // K/A writes carry scores from the array, or probabilities from softmax
    for (int cc = 0; cc < COLS; cc++)
      ka_wdata[cc*16 +: 16] = (state == C_S_OUT) ? sm_out_prob[cc]
                                                 : 16'(sat16(mm_result[cnt[$clog2(ROWS)-1:0]][cc], cq.shift));
    for (int k = 0; k < G; k++) gg_hash[k] = mm_result[k][cnt[$clog2(COLS)-1:0]];
    for (int cc = 0; cc < COLS; cc++) sm_score[cc] = ka_rd_data[cc*16 +: 16];
    for (int r = 0; r < ROWS; r++) pr_v[r] = qv_rd_data[r*DW +: DW];
    pr_att = ka_rd_data[cnt[$clog2(COLS)-1:0]*16 +: 16];
  end
  assign sm_mask = col_en_q;

  always_comb begin
    cmd_ready  = (state == C_IDLE);
    busy       = (state != C_IDLE);
    in_rd_en   = 1'b0; in_rd_addr = '0;
    w_rd_en    = 1'b0; w_rd_addr  = '0;
    qv_rd_en   = 1'b0; qv_rd_addr = '0;
    ka_rd_en   = 1'b0; ka_rd_addr = '0;
    qv_we      = 1'b0; qv_waddr   = '0;
    ka_we      = 1'b0; ka_waddr   = '0;
    mm_start   = 1'b0;
    gg_valid   = 1'b0; gg_pid = '0;
    sm_valid   = 1'b0; sm_last = 1'b0;
    pr_valid   = '0;   pr_pid = '0;
    case (state)
      C_M_RDC: begin
        in_rd_en = 1'b1; in_rd_addr = IN_AW'(cq.a1 + cnt);
        w_rd_en  = 1'b1; w_rd_addr  = W_AW'(cq.a2 + cnt);
      end
      C_M_RDX: begin
        in_rd_en = 1'b1; in_rd_addr = IN_AW'(cq.a0 + cnt);
      end
      C_M_START: mm_start = 1'b1;
      C_M_SINK: begin
        case (cq.sink)
          SINK_QV: begin
            qv_we    = col_en_q[cnt[$clog2(COLS)-1:0]];
            qv_waddr = QV_AW'(cq.dst + cnt);
          end
          SINK_SCORE: begin
            ka_we    = 1'b1;
            ka_waddr = KA_AW'(cq.dst + cnt);
          end
          SINK_HASH: begin
            gg_valid = col_en_q[cnt[$clog2(COLS)-1:0]];
            gg_pid   = PIDW'(cq.dst + cnt);
          end
          default: ;
        endcase
      end
      C_S_RD: begin
        ka_rd_en = 1'b1; ka_rd_addr = KA_AW'(cq.a0 + cnt2 * cq.a2 + cnt);
      end
      C_S_FEED: begin
        sm_valid = 1'b1;
        sm_last  = (cnt2 == 16'(cq.n1) - 1'b1);
      end
      C_S_OUT: begin
        ka_we    = sm_out_valid;
        ka_waddr = KA_AW'(cq.a1 + 16'(sm_out_blk) * cq.a2 + cnt);
      end
      C_P_RD: begin
        qv_rd_en = 1'b1; qv_rd_addr = QV_AW'(cq.a0 + cnt);
        ka_rd_en = 1'b1; ka_rd_addr = KA_AW'(cq.a1);
      end
      C_P_FEED: begin
        pr_valid[cq.pr_sel] = 1'b1;
        pr_pid = PIDW'(cq.dst + cnt);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      cq            <= '0;
      col_en_q      <= '0;
      col_mode_q    <= '0;
      link_q        <= '1;
      cnt           <= '0;
      cnt2          <= '0;
      x_word        <= '0;
      c_word        <= '0;
      w_word        <= '0;
      pf_start      <= 1'b0;
      pf_src        <= '0;
      pf_len        <= '0;
      pf_dst        <= '0;
      pf_sel        <= 1'b0;
      swap          <= '0;
      mm_first      <= 1'b0;
      mm_save_base  <= 1'b0;
      gg_clear      <= 1'b0;
      pr_clear      <= 1'b0;
      rs_cfg_start  <= 1'b0;
      rs_flat       <= 1'b0;
      rs_ooo        <= 1'b1;
      rs_intra_done <= '0;
      rs_inter_done <= '0;
    end else begin
      pf_start      <= 1'b0;
      swap          <= '0;
      gg_clear      <= 1'b0;
      pr_clear      <= 1'b0;
      rs_cfg_start  <= 1'b0;
      rs_intra_done <= '0;
      rs_inter_done <= '0;
      case (state)
        C_IDLE: if (cmd_valid) begin
          cq         <= cmd;
          col_en_q   <= cmd_col_en;
          col_mode_q <= cmd_col_mode;
          link_q     <= cmd.auto_link ? rs_link : cmd_link;
          cnt        <= '0;
          cnt2       <= '0;
          case (cmd.op)
            OP_LOAD: begin
              pf_start <= 1'b1;
              pf_src   <= cmd.src;
              pf_len   <= cmd.len;
              pf_dst   <= cmd.a0;
              pf_sel   <= cmd.bufsel[0];
              state    <= C_PF;
            end
            OP_SWAP:  swap <= cmd.bufsel;
            OP_CLEAR: begin gg_clear <= 1'b1; pr_clear <= 1'b1; end
            OP_SCHED: begin
              rs_cfg_start <= 1'b1;
              rs_flat      <= cmd.flat;
              rs_ooo       <= cmd.ooo;
              state        <= C_SCHED;
            end
            OP_MATMUL:  if (cmd.n0 != 0 && cmd_col_en != '0) state <= C_M_RDC;
            OP_SOFTMAX: if (cmd.n0 != 0 && cmd.n1 != 0) state <= C_S_RD;
            OP_PRUNE:   if (cmd.n0 != 0) state <= C_P_RD;
            default: ;
          endcase
        end
        C_PF:    if (pf_done) state <= C_IDLE;
        C_SCHED: state <= C_IDLE;
        // ---- matrix multiplication ----
        C_M_RDC: state <= C_M_RDX;
        C_M_RDX: begin
          c_word <= in_rd_data;
          w_word <= w_rd_data;
          state  <= C_M_GO;
        end
        C_M_GO: begin
          x_word       <= in_rd_data;
          mm_first     <= (cnt == 0);
          mm_save_base <= cq.save_base && (cnt == cq.n0 - 1'b1);
          state        <= C_M_START;
        end
        C_M_START: state <= C_M_WAIT;
        C_M_WAIT: if (mm_done) begin
          if (cnt == cq.n0 - 1'b1) begin
            cnt   <= '0;
            state <= (cq.sink == SINK_NONE) ? C_M_END : C_M_SINK;
          end else begin
            cnt   <= cnt + 1'b1;
            state <= C_M_RDC;
          end
        end
        C_M_SINK: begin
          if (cq.sink != SINK_HASH || !gg_valid || gg_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == 16'((cq.sink == SINK_SCORE) ? ROWS - 1 : COLS - 1)) state <= C_M_END;
          end
        end
        C_M_END: begin
          if (cq.phase == PH_INTRA) rs_intra_done <= G'(cq.grp_mask);
          if (cq.phase == PH_INTER) rs_inter_done <= G'(cq.grp_mask);
          state <= C_IDLE;
        end
        // ---- softmax: cnt = query row, cnt2 = block ----
        C_S_RD:   state <= C_S_WAIT;
        C_S_WAIT: state <= C_S_FEED;
        C_S_FEED: if (sm_ready) begin
          if (cnt2 == 16'(cq.n1) - 1'b1) state <= C_S_OUT;
          else begin
            cnt2  <= cnt2 + 1'b1;
            state <= C_S_RD;
          end
        end
        C_S_OUT: if (sm_out_valid && sm_out_last) begin
          cnt2 <= '0;
          if (cnt == cq.n0 - 1'b1) state <= C_IDLE;
          else begin
            cnt   <= cnt + 1'b1;
            state <= C_S_RD;
          end
        end
        // ---- pruning: cnt = candidate ----
        C_P_RD:   state <= C_P_WAIT;
        C_P_WAIT: state <= C_P_FEED;
        C_P_FEED: if (pr_ready[cq.pr_sel]) begin
          if (cnt == cq.n0 - 1'b1) state <= C_P_DRAIN;
          else begin
            cnt   <= cnt + 1'b1;
            state <= C_P_RD;
          end
        end
        C_P_DRAIN: if (pr_busy == '0) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
