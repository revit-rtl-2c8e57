// revit_top: vision-transformer attention accelerator with semantic-aware
// differential attention.
//
// Patches of an image are hashed into semantic groups; within a group,
// patches differ little from the group's centroid, so the PE array works on
// the differences (deltas), which have few non-zero Booth digits and
// therefore take few cycles in the bit-serial PEs, and adds the centroid's
// result back. The array is split column-wise into one sub-array per group,
// sized to the group, and the groups' global (inter-group) steps are issued
// out of order as soon as each group's local work ends.
//
// Units:
//   central_ctrl    command sequencer, configures everything below
//   prefetcher      HBM -> input / weight buffers
//   global buffer   double-buffered input (128 KB), weight (256 KB),
//                   Q/V (128 KB) and K/A (144 KB) regions, plus a 4 KB
//                   index buffer: 660 KB in all
//   rmmu            ROWS x COLS bit-serial PE array with column switch boxes
//   diff_softmax    blockwise softmax (SIMD vector unit)
//   sgg_engine      hash codes -> semantic group indexes, group sizes
//   rsched          sub-array sizing and out-of-order inter-group issue
//   pruner x2       patch pruner and group pruner (same design)
//
// Interface: commands (cmd_t, see revit_pkg) on cmd_valid/cmd_ready with
// column enables, modes and switch-box bits alongside; an HBM read port;
// hash offsets and pruning thresholds as static inputs; pruning masks,
// group counts and scheduler events as outputs; a host read port into the
// Q/V, K/A and index buffers, usable while the controller is idle (read
// data one cycle after host_rd_en).
//
// From the document: the set of engines and buffers, the 64 x 64 PE array,
// 660 KB of on-chip buffer, a 2048-bit (256 bytes per cycle) memory port.
// Own choices: the split of the buffer among regions, the command
// interface, the host read port, and that the softmax results reach the
// weight buffer for the A x V step only through memory.
//
// rst_n is an asynchronous reset for all flops and also the disable
// condition of the handshake assertions; lint reports that mix, which has
// no effect on the circuit.
module revit_top
  import revit_pkg::*;
#(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned COLS      = 64,
  parameter int unsigned PC        = 4,
  parameter int unsigned G         = NGRP,
  parameter int unsigned PIDW      = 8,
  parameter int unsigned NBLK      = 4,
  parameter int unsigned IN_DEPTH  = 256,
  parameter int unsigned W_DEPTH   = 512,
  parameter int unsigned QV_DEPTH  = 1024,
  parameter int unsigned KA_DEPTH  = 576,
  parameter int unsigned IDX_DEPTH = 16384,
  parameter int unsigned NGPE      = 4,
  parameter int unsigned NPPE      = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  cmd_t                   cmd,
  input  logic [COLS-1:0]        cmd_col_en,
  input  logic [COLS-1:0]        cmd_col_mode,
  input  logic [COLS-2:0]        cmd_link,
  output logic                   busy,
  // HBM read port
  output logic                   hbm_req_valid,
  input  logic                   hbm_req_ready,
  output logic [31:0]            hbm_req_addr,
  input  logic                   hbm_rsp_valid,
  input  logic [COLS*PC*DW-1:0]  hbm_rsp_data,
  // static configuration
  input  logic signed [ACCW-1:0] hash_beta [G],
  input  logic [47:0]            patch_thr,
  input  logic [47:0]            group_thr,
  // pruning results
  output logic                   patch_mask_we,
  output logic [PIDW-1:0]        patch_mask_addr,
  output logic                   patch_mask_keep,
  output logic [PIDW:0]          patch_kept,
  output logic                   group_mask_we,
  output logic [PIDW-1:0]        group_mask_addr,
  output logic                   group_mask_keep,
  output logic [PIDW:0]          group_kept,
  // grouping and scheduling
  output logic [PIDW:0]          group_count [G],
  output logic [$clog2(COLS)-1:0]   grp_first [G],
  output logic [$clog2(COLS+1)-1:0] grp_cols  [G],
  output logic                   inter_go,
  output logic [$clog2(G)-1:0]   inter_grp,
  output logic                   sched_done,
  output logic [31:0]            idle_cols,
  // host read port
  input  logic                   host_rd_en,
  input  logic [15:0]            host_rd_addr,
  output logic [ROWS*DW-1:0]     host_qv_data,
  output logic [COLS*16-1:0]     host_ka_data,
  output logic [$clog2(G)-1:0]   host_idx_data
);

  localparam int unsigned IN_AW  = $clog2(IN_DEPTH);
  localparam int unsigned W_AW   = $clog2(W_DEPTH);
  localparam int unsigned QV_AW  = $clog2(QV_DEPTH);
  localparam int unsigned KA_AW  = $clog2(KA_DEPTH);
  localparam int unsigned IDX_AW = $clog2(IDX_DEPTH);
  localparam int unsigned BAW    = (IN_AW > W_AW) ? IN_AW : W_AW;
  localparam int unsigned XW     = COLS*PC*DW;
  localparam int unsigned WW     = ROWS*PC*DW;

  // ---------------- controller ----------------
  logic        pf_start, pf_sel, pf_done, pf_busy;
  logic [31:0] pf_src;
  logic [15:0] pf_len, pf_dst;
  logic [3:0]  swap;
  logic              in_rd_en, w_rd_en, qv_we, qv_rd_en, ka_we, ka_rd_en;
  logic [IN_AW-1:0]  in_rd_addr;
  logic [W_AW-1:0]   w_rd_addr;
  logic [QV_AW-1:0]  qv_waddr, qv_rd_addr;
  logic [KA_AW-1:0]  ka_waddr, ka_rd_addr;
  logic [XW-1:0]     in_rd_data;
  logic [WW-1:0]     w_rd_data;
  logic [ROWS*DW-1:0] qv_wdata, qv_rd_data;
  logic [COLS*16-1:0] ka_wdata, ka_rd_data;
  logic mm_start, mm_first, mm_save_base, mm_done, mm_busy;
  logic [COLS-1:0] mm_col_en, mm_col_mode, mm_col_done;
  logic [COLS-2:0] mm_link;
  logic signed [DW-1:0]   mm_x [COLS][PC];
  logic signed [DW-1:0]   mm_c [COLS][PC];
  logic signed [DW-1:0]   mm_w [ROWS][PC];
  logic signed [ACCW-1:0] mm_result [ROWS][COLS];
  logic gg_valid, gg_ready, gg_clear, gg_busy;
  logic [PIDW-1:0] gg_pid;
  logic signed [ACCW-1:0] gg_hash [G];
  logic sm_valid, sm_ready, sm_last, sm_out_valid, sm_out_last;
  logic signed [15:0] sm_score [COLS];
  logic [COLS-1:0] sm_mask;
  logic [15:0] sm_out_prob [COLS];
  logic [$clog2(NBLK+1)-1:0] sm_out_blk;
  logic signed [15:0] sm_row_max;
  logic rs_cfg_start, rs_flat, rs_ooo, rs_alloc_valid;
  logic [COLS-2:0] rs_link;
  logic [G-1:0] rs_intra_done, rs_inter_done, rs_intra_go;
  logic [1:0] pr_valid, pr_ready, pr_busy;
  logic [PIDW-1:0] pr_pid;
  logic [15:0] pr_att;
  logic signed [DW-1:0] pr_v [ROWS];
  logic pr_clear;

  central_ctrl #(.ROWS(ROWS), .COLS(COLS), .PC(PC), .G(G), .PIDW(PIDW), .NBLK(NBLK),
                 .IN_AW(IN_AW), .W_AW(W_AW), .QV_AW(QV_AW), .KA_AW(KA_AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_col_en, .cmd_col_mode, .cmd_link, .busy,
    .pf_start, .pf_src, .pf_len, .pf_dst, .pf_sel, .pf_done,
    .swap, .in_rd_en, .in_rd_addr, .in_rd_data, .w_rd_en, .w_rd_addr, .w_rd_data,
    .qv_we, .qv_waddr, .qv_wdata, .qv_rd_en, .qv_rd_addr, .qv_rd_data,
    .ka_we, .ka_waddr, .ka_wdata, .ka_rd_en, .ka_rd_addr, .ka_rd_data,
    .mm_start, .mm_first, .mm_save_base, .mm_col_en, .mm_col_mode, .mm_link,
    .mm_x, .mm_c, .mm_w, .mm_done, .mm_result,
    .gg_valid, .gg_ready, .gg_pid, .gg_hash, .gg_clear,
    .sm_valid, .sm_ready, .sm_score, .sm_mask, .sm_last,
    .sm_out_valid, .sm_out_prob, .sm_out_blk, .sm_out_last,
    .rs_cfg_start, .rs_flat, .rs_ooo, .rs_link, .rs_intra_done, .rs_inter_done,
    .pr_valid, .pr_ready, .pr_pid, .pr_att, .pr_v, .pr_busy, .pr_clear);

  // ---------------- prefetcher and buffers ----------------
  logic           buf_we;
  logic [BAW-1:0] buf_addr;
  logic [XW-1:0]  buf_wdata;

  prefetcher #(.AW(32), .BAW(BAW), .WIDTH(XW), .LENW(16)) u_pf (
    .clk, .rst_n, .start(pf_start), .src_addr(pf_src), .dst_addr(BAW'(pf_dst)), .len(pf_len),
    .busy(pf_busy), .done(pf_done),
    .req_valid(hbm_req_valid), .req_ready(hbm_req_ready), .req_addr(hbm_req_addr),
    .rsp_valid(hbm_rsp_valid), .rsp_data(hbm_rsp_data),
    .buf_we, .buf_addr, .buf_wdata);

  logic in_fill, w_fill, qv_fill, ka_fill;
  pingpong_buffer #(.WIDTH(XW), .DEPTH(IN_DEPTH)) u_inbuf (
    .clk, .rst_n, .swap(swap[0]), .fill_sel(in_fill),
    .wr_en(buf_we && !pf_sel), .wr_addr(IN_AW'(buf_addr)), .wr_data(buf_wdata),
    .rd_en(in_rd_en), .rd_addr(in_rd_addr), .rd_data(in_rd_data));
  pingpong_buffer #(.WIDTH(WW), .DEPTH(W_DEPTH)) u_wbuf (
    .clk, .rst_n, .swap(swap[1]), .fill_sel(w_fill),
    .wr_en(buf_we && pf_sel), .wr_addr(W_AW'(buf_addr)), .wr_data(WW'(buf_wdata)),
    .rd_en(w_rd_en), .rd_addr(w_rd_addr), .rd_data(w_rd_data));

  // Q/V and K/A regions: the host may read while the controller is idle.
  logic host_ok;
  assign host_ok = host_rd_en && !busy;
  pingpong_buffer #(.WIDTH(ROWS*DW), .DEPTH(QV_DEPTH)) u_qvbuf (
    .clk, .rst_n, .swap(swap[2]), .fill_sel(qv_fill),
    .wr_en(qv_we), .wr_addr(qv_waddr), .wr_data(qv_wdata),
    .rd_en(qv_rd_en || host_ok), .rd_addr(host_ok ? QV_AW'(host_rd_addr) : qv_rd_addr),
    .rd_data(qv_rd_data));
  pingpong_buffer #(.WIDTH(COLS*16), .DEPTH(KA_DEPTH)) u_kabuf (
    .clk, .rst_n, .swap(swap[3]), .fill_sel(ka_fill),
    .wr_en(ka_we), .wr_addr(ka_waddr), .wr_data(ka_wdata),
    .rd_en(ka_rd_en || host_ok), .rd_addr(host_ok ? KA_AW'(host_rd_addr) : ka_rd_addr),
    .rd_data(ka_rd_data));
  assign host_qv_data = qv_rd_data;
  assign host_ka_data = ka_rd_data;

  // Index buffer: written by the group engine, read by the host.
  logic                 idx_we;
  logic [PIDW-1:0]      idx_waddr;
  logic [$clog2(G)-1:0] idx_wdata;
  scratch_bank #(.WIDTH($clog2(G)), .DEPTH(IDX_DEPTH)) u_idxbuf (
    .clk, .wr_en(idx_we), .wr_addr(IDX_AW'(idx_waddr)), .wr_data(idx_wdata),
    .rd_en(host_ok), .rd_addr(IDX_AW'(host_rd_addr)), .rd_data(host_idx_data));

  // ---------------- engines ----------------
  rmmu #(.ROWS(ROWS), .COLS(COLS), .PC(PC)) u_rmmu (
    .clk, .rst_n, .start(mm_start), .first(mm_first), .save_base(mm_save_base),
    .col_en(mm_col_en), .col_mode(mm_col_mode), .link(mm_link),
    .x(mm_x), .c(mm_c), .w(mm_w),
    .busy(mm_busy), .done(mm_done), .col_done(mm_col_done), .result(mm_result));

  diff_softmax #(.BLK(COLS), .NBLK(NBLK), .SIW(16), .F(4)) u_softmax (
    .clk, .rst_n, .in_valid(sm_valid), .in_ready(sm_ready), .in_score(sm_score),
    .in_mask(sm_mask), .in_last(sm_last), .out_valid(sm_out_valid), .out_prob(sm_out_prob),
    .out_blk(sm_out_blk), .out_last(sm_out_last), .row_max(sm_row_max));

  sgg_engine #(.G(G), .NGPE(NGPE), .GSHIFT(4), .PIDW(PIDW)) u_sgg (
    .clk, .rst_n, .clear(gg_clear), .beta(hash_beta),
    .in_valid(gg_valid), .in_ready(gg_ready), .in_pid(gg_pid), .in_hash(gg_hash),
    .idx_we, .idx_addr(idx_waddr), .idx_data(idx_wdata),
    .group_count, .busy(gg_busy));

  logic [PIDW:0] grp_size [G];
  always_comb for (int g = 0; g < G; g++) grp_size[g] = group_count[g];

  rsched #(.G(G), .COLS(COLS), .SZW(PIDW+1)) u_rsched (
    .clk, .rst_n, .cfg_start(rs_cfg_start), .flat(rs_flat), .ooo_en(rs_ooo),
    .grp_size, .alloc_valid(rs_alloc_valid), .link(rs_link),
    .grp_first, .grp_cols, .intra_go(rs_intra_go), .intra_done(rs_intra_done),
    .inter_go, .inter_grp, .inter_done(rs_inter_done), .all_done(sched_done), .idle_cols);

  logic [47:0]   patch_score, group_score;
  logic [PIDW:0] patch_pruned, group_pruned;
  pruner #(.NPPE(NPPE), .D(ROWS), .VL(8), .PIDW(PIDW)) u_patch_pruner (
    .clk, .rst_n, .clear(pr_clear), .thr(patch_thr),
    .in_valid(pr_valid[0]), .in_ready(pr_ready[0]), .in_pid(pr_pid), .in_att(pr_att), .in_v(pr_v),
    .mask_we(patch_mask_we), .mask_addr(patch_mask_addr), .mask_keep(patch_mask_keep),
    .mask_score(patch_score), .n_kept(patch_kept), .n_pruned(patch_pruned), .busy(pr_busy[0]));
  pruner #(.NPPE(NPPE), .D(ROWS), .VL(8), .PIDW(PIDW)) u_group_pruner (
    .clk, .rst_n, .clear(pr_clear), .thr(group_thr),
    .in_valid(pr_valid[1]), .in_ready(pr_ready[1]), .in_pid(pr_pid), .in_att(pr_att), .in_v(pr_v),
    .mask_we(group_mask_we), .mask_addr(group_mask_addr), .mask_keep(group_mask_keep),
    .mask_score(group_score), .n_kept(group_kept), .n_pruned(group_pruned), .busy(pr_busy[1]));

endmodule
