// tb_revit_top: end-to-end test of the accelerator at a reduced size
// (8 x 8 PE array, 2 lanes per PE, small buffers). The host module
// revit_host drives the command port, models the HBM, and checks every
// result and that each mechanism (prefetch, buffer swap, hashing, array
// split and flat modes, differential mode, out-of-order global steps,
// softmax rescaling, pruning keep and drop) happened; it prints TB_RESULT,
// and has a watchdog.
`timescale 1ns/1ps
module tb_revit_top;
  localparam int ROWS = 8, COLS = 8, PC = 2;
  import revit_pkg::*;
  logic clk, rst_n, cmd_valid, cmd_ready, busy;
  cmd_t cmd;
  logic [COLS-1:0] cmd_col_en, cmd_col_mode;
  logic [COLS-2:0] cmd_link;
  logic hbm_req_valid, hbm_req_ready, hbm_rsp_valid;
  logic [31:0] hbm_req_addr;
  logic [COLS*PC*DW-1:0] hbm_rsp_data;
  logic signed [ACCW-1:0] hash_beta [NGRP];
  logic [47:0] patch_thr, group_thr;
  logic patch_mask_we, patch_mask_keep, group_mask_we, group_mask_keep;
  logic [7:0] patch_mask_addr, group_mask_addr;
  logic [8:0] patch_kept, group_kept;
  logic [8:0] group_count [NGRP];
  logic [$clog2(COLS)-1:0] grp_first [NGRP];
  logic [$clog2(COLS+1)-1:0] grp_cols [NGRP];
  logic inter_go, sched_done;
  logic [$clog2(NGRP)-1:0] inter_grp;
  logic [31:0] idle_cols;
  logic host_rd_en;
  logic [15:0] host_rd_addr;
  logic [ROWS*DW-1:0] host_qv_data;
  logic [COLS*16-1:0] host_ka_data;
  logic [$clog2(NGRP)-1:0] host_idx_data;

  revit_host #(.ROWS(ROWS), .COLS(COLS), .PC(PC)) host (.*);
  revit_top #(.ROWS(ROWS), .COLS(COLS), .PC(PC), .IN_DEPTH(16), .W_DEPTH(16), .QV_DEPTH(64),
              .KA_DEPTH(64), .IDX_DEPTH(256)) dut (.*);
endmodule
