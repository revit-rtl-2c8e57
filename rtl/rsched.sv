// rsched: workload scheduler of the reconfigurable attention engine.
//
// Two jobs.
// (1) Column allocation (PE-unit-level reconfiguration). Given the number of
// patches in each of the G semantic groups, it splits the COLS columns of
// the PE array into one contiguous sub-array per non-empty group, sized in
// proportion to the group: a_g = 1 + floor(size_g * (COLS - nz) / N), where
// N is the total patch count and nz the number of non-empty groups; the
// columns left over go to the largest group. It drives the switch-box bits
// (`link`, 0 at each sub-array boundary) and reports each group's first
// column and width. With `flat` set, the whole array is one sub-array.
// (2) Latency-aware out-of-order issue. After allocation it starts the
// intra-group (local) attention of every group at once (intra_go). When
// group g reports intra_done, its columns are free; with ooo_en the
// scheduler issues the inter-group (global) attention step of g on them at
// once (inter_go, inter_grp, one group per cycle, lowest group first when
// several finish together). Without ooo_en it waits for every group's local
// attention and then issues the groups in order, which is the sequential
// reference. `idle_cols` accumulates, per cycle, the columns of groups that
// have finished local work and are waiting to be issued; all_done pulses
// when every issued group has reported inter_done.
//
// Timing: alloc_valid rises the cycle after cfg_start; intra_go pulses one
// cycle later.
//
// From the document: proportional allocation of columns to groups,
// flattened mode with all switch boxes closed, and out-of-order issue of
// inter-group work as soon as a group finishes. Own choices: the
// allocation formula, one issue per cycle, the idle counter.
module rsched
  import revit_pkg::*;
#(
  parameter int unsigned G    = NGRP,
  parameter int unsigned COLS = 64,
  parameter int unsigned SZW  = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_start,
  input  logic                      flat,
  input  logic                      ooo_en,
  input  logic [SZW-1:0]            grp_size [G],
  output logic                      alloc_valid,
  output logic [COLS-2:0]           link,
  output logic [$clog2(COLS)-1:0]   grp_first [G],
  output logic [$clog2(COLS+1)-1:0] grp_cols  [G],
  output logic [G-1:0]              intra_go,
  input  logic [G-1:0]              intra_done,
  output logic                      inter_go,
  output logic [$clog2(G)-1:0]      inter_grp,
  input  logic [G-1:0]              inter_done,
  output logic                      all_done,
  output logic [31:0]               idle_cols
);

  localparam int unsigned CW = $clog2(COLS+1);

  // ---- allocation (combinational, registered on cfg_start) ----
  logic [CW-1:0]            a_cols  [G];
  logic [$clog2(COLS)-1:0]  a_first [G];
  logic [COLS-2:0]          a_link;
  always_comb begin
    int unsigned n, nz, sum, big, pos;
    n = 0; nz = 0; sum = 0; big = 0;
    for (int g = 0; g < G; g++) begin
      n += int'(grp_size[g]);
      if (grp_size[g] != 0) nz++;
      if (grp_size[g] > grp_size[big]) big = g;
    end
    for (int g = 0; g < G; g++) begin
      if (flat || n == 0) a_cols[g] = (g == 0) ? CW'(COLS) : '0;
      else if (grp_size[g] == 0) a_cols[g] = '0;
      else a_cols[g] = CW'(1 + (int'(grp_size[g]) * (COLS - nz)) / n);
      sum += int'(a_cols[g]);
    end
    if (!flat && n != 0) a_cols[big] = a_cols[big] + CW'(COLS - sum);
    pos = 0;
    a_link = '1;
    for (int g = 0; g < G; g++) begin
      a_first[g] = ($clog2(COLS))'(pos);
      pos += int'(a_cols[g]);
      if (a_cols[g] != 0 && pos < COLS) a_link[pos-1] = 1'b0;
    end
  end

  // ---- out-of-order issue ----
  logic [G-1:0] running, waiting, issued, finished;
  logic         active;

  logic [G-1:0]           can_issue;
  logic                   any_issue;
  logic [$clog2(G)-1:0]   first_g;
  logic [31:0]            idle_now;
  always_comb begin
    if (ooo_en) can_issue = waiting;
    else        can_issue = (running == '0) ? waiting : '0;
    any_issue = 1'b0;
    first_g   = '0;
    for (int g = G - 1; g >= 0; g--)
      if (can_issue[g]) begin any_issue = 1'b1; first_g = g[$clog2(G)-1:0]; end
    idle_now = '0;
    for (int g = 0; g < G; g++) if (waiting[g]) idle_now += 32'(grp_cols[g]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_valid <= 1'b0;
      link        <= '1;
      intra_go    <= '0;
      inter_go    <= 1'b0;
      inter_grp   <= '0;
      all_done    <= 1'b0;
      running     <= '0;
      waiting     <= '0;
      issued      <= '0;
      finished    <= '0;
      active      <= 1'b0;
      idle_cols   <= '0;
      for (int g = 0; g < G; g++) begin grp_cols[g] <= '0; grp_first[g] <= '0; end
    end else begin
      intra_go <= '0;
      inter_go <= 1'b0;
      all_done <= 1'b0;
      if (cfg_start) begin
        alloc_valid <= 1'b1;
        link        <= a_link;
        grp_cols    <= a_cols;
        grp_first   <= a_first;
        running     <= '0;
        waiting     <= '0;
        issued      <= '0;
        finished    <= '0;
        idle_cols   <= '0;
        active      <= 1'b1;
        for (int g = 0; g < G; g++) intra_go[g] <= (a_cols[g] != 0);
        for (int g = 0; g < G; g++) running[g]  <= (a_cols[g] != 0);
      end else if (active) begin
        logic [G-1:0] nrun, nwait, niss, nfin;
        nrun  = running & ~intra_done;
        nwait = waiting | (running & intra_done);
        niss  = issued;
        nfin  = finished | (issued & inter_done);
        if (any_issue) begin
          inter_go  <= 1'b1;
          inter_grp <= first_g;
          nwait[first_g] = 1'b0;
          niss[first_g]  = 1'b1;
        end
        running   <= nrun;
        waiting   <= nwait;
        issued    <= niss;
        finished  <= nfin;
        idle_cols <= idle_cols + idle_now;
        if (nrun == '0 && nwait == '0 && nfin == niss && niss != '0) begin
          all_done <= 1'b1;
          active   <= 1'b0;
        end
      end
    end
  end

endmodule
