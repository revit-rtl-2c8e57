// revit_host: test host for revit_top, used by end-to-end testbenches
// such as tb_revit_top at any array size. It
// plays the host processor and the HBM: it builds an image of clustered
// patches in a model memory that answers HLAT cycles after a request, then
// runs hashing into semantic groups, sub-array allocation, the centroid and
// differential passes of a projection, out-of-order global steps, attention
// scores over two key blocks, blockwise softmax, and patch and group pruning.
// Commands go one at a time through the valid/ready command port; the host
// waits for busy to fall before the next. Every result read back through the
// host read port or seen on the mask outputs is compared with values
// computed here from the raw data, and each mechanism is counted.
module revit_host
  import revit_pkg::*;
#(
  parameter int ROWS = 8,
  parameter int COLS = 8,
  parameter int PC   = 2
) (
  output logic                   clk,
  output logic                   rst_n,
  output logic                   cmd_valid,
  input  logic                   cmd_ready,
  output cmd_t                   cmd,
  output logic [COLS-1:0]        cmd_col_en,
  output logic [COLS-1:0]        cmd_col_mode,
  output logic [COLS-2:0]        cmd_link,
  input  logic                   busy,
  input  logic                   hbm_req_valid,
  output logic                   hbm_req_ready,
  input  logic [31:0]            hbm_req_addr,
  output logic                   hbm_rsp_valid,
  output logic [COLS*PC*DW-1:0]  hbm_rsp_data,
  output logic signed [ACCW-1:0] hash_beta [NGRP],
  output logic [47:0]            patch_thr,
  output logic [47:0]            group_thr,
  input  logic                   patch_mask_we,
  input  logic [7:0]             patch_mask_addr,
  input  logic                   patch_mask_keep,
  input  logic [8:0]             patch_kept,
  input  logic                   group_mask_we,
  input  logic [7:0]             group_mask_addr,
  input  logic                   group_mask_keep,
  input  logic [8:0]             group_kept,
  input  logic [8:0]             group_count [NGRP],
  input  logic [$clog2(COLS)-1:0]   grp_first [NGRP],
  input  logic [$clog2(COLS+1)-1:0] grp_cols [NGRP],
  input  logic                   inter_go,
  input  logic [$clog2(NGRP)-1:0] inter_grp,
  input  logic                   sched_done,
  input  logic [31:0]            idle_cols,
  output logic                   host_rd_en,
  output logic [15:0]            host_rd_addr,
  input  logic [ROWS*DW-1:0]     host_qv_data,
  input  logic [COLS*16-1:0]     host_ka_data,
  input  logic [$clog2(NGRP)-1:0] host_idx_data
);
  localparam int G = NGRP, NS = 2, D = NS * PC, XW = COLS * PC * DW, SH = 3, NBLK = 4;
  localparam int HLAT = 6;

  initial clk = 0;
  always #5 clk = ~clk;
  initial rst_n = 0;

  int checks = 0, failures = 0;
  bit split_now = 0;  // set once the scheduler has split the array
  // mechanism counters
  int n_hash = 0, n_split = 0, n_delta = 0, n_flat = 0, n_inter = 0, n_rescale = 0;
  int n_sat = 0, n_keep = 0, n_prune = 0, n_swap = 0, n_prefetch = 0, n_gkeep = 0;

  // ---------------- model HBM ----------------
  logic [XW-1:0] hbm [int];
  logic [HLAT-1:0] vpipe;
  logic [31:0] apipe [HLAT];
  assign hbm_req_ready = 1'b1;
  always @(posedge clk) begin
    vpipe <= rst_n ? {vpipe[HLAT-2:0], hbm_req_valid & hbm_req_ready} : '0;
    apipe[0] <= hbm_req_addr;
    for (int i = 1; i < HLAT; i++) apipe[i] <= apipe[i-1];
  end
  assign hbm_rsp_valid = rst_n && vpipe[HLAT-1];
  assign hbm_rsp_data  = hbm.exists(int'(apipe[HLAT-1])) ? hbm[int'(apipe[HLAT-1])] : '0;

  // ---------------- host helpers ----------------
  function automatic cmd_t new_cmd(opcode_e op);
    cmd_t c = '0;
    c.op = op;
    c.sink = SINK_NONE;
    c.phase = PH_NONE;
    return c;
  endfunction

  task automatic issue(input cmd_t c, input logic [COLS-1:0] en = '1,
                       input logic [COLS-1:0] md = '0, input logic [COLS-2:0] lk = '1);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_col_en = en; cmd_col_mode = md; cmd_link = lk; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (busy) @(negedge clk);
    if (c.op == OP_SWAP) n_swap++;
    if (c.op == OP_LOAD) n_prefetch++;
    if (c.op == OP_MATMUL) begin
      if (c.auto_link ? split_now : (lk != '1)) n_split++;
      if (md != '0) n_delta++;
      if (!c.auto_link && lk == '1 && md == '0) n_flat++;
      if (c.sink == SINK_HASH) n_hash++;
    end
  endtask

  task automatic load(input int src, input int len, input int dst, input bit to_w);
    cmd_t c = new_cmd(OP_LOAD);
    c.src = 32'(src); c.len = 16'(len); c.a0 = 16'(dst); c.bufsel = {3'b0, to_w};
    issue(c);
  endtask

  task automatic swap_bufs(input logic [3:0] m);
    cmd_t c = new_cmd(OP_SWAP);
    c.bufsel = m;
    issue(c);
  endtask

  task automatic host_read(input int addr);
    @(negedge clk);
    host_rd_en = 1; host_rd_addr = 16'(addr);
    @(negedge clk);
    host_rd_en = 0;
  endtask

  function automatic int sat(int v, int sh, int bits);
    int t = v >>> sh;
    int hi = (1 << (bits - 1)) - 1;
    if (t > hi) return hi;
    if (t < -hi - 1) return -hi - 1;
    return t;
  endfunction

  // word with, for column c, PC features of slice s of vector vec[c]
  function automatic logic [XW-1:0] col_word(int vec [COLS][D], int s);
    logic [XW-1:0] w = '0;
    for (int c = 0; c < COLS; c++)
      for (int j = 0; j < PC; j++) w[(c*PC+j)*DW +: DW] = DW'(vec[c][s*PC+j]);
    return w;
  endfunction
  function automatic logic [XW-1:0] row_word(int vec [ROWS][D], int s);
    logic [XW-1:0] w = '0;
    for (int r = 0; r < ROWS; r++)
      for (int j = 0; j < PC; j++) w[(r*PC+j)*DW +: DW] = DW'(vec[r][s*PC+j]);
    return w;
  endfunction

  // inter-group issue events from the scheduler
  int inter_q [$];
  always @(posedge clk) if (rst_n && inter_go) inter_q.push_back(int'(inter_grp));
  int sched_done_seen = 0;
  always @(posedge clk) if (rst_n && sched_done) sched_done_seen++;

  // pruning mask writes
  bit   pmask_seen [COLS];
  bit   pmask_keep [COLS];
  bit   gmask_seen [G];
  bit   gmask_keep [G];
  always @(posedge clk) if (rst_n) begin
    if (patch_mask_we) begin pmask_seen[patch_mask_addr] = 1; pmask_keep[patch_mask_addr] = patch_mask_keep; end
    if (group_mask_we) begin gmask_seen[group_mask_addr] = 1; gmask_keep[group_mask_addr] = group_mask_keep; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- the run ----------------
  int X [COLS][D];          // patches
  int A [ROWS][D];          // hash projection rows (rows >= G are zero)
  int WQ [ROWS][D];         // projection weights
  int grp_of [COLS];
  int cen [G][D];
  int colvec [COLS][D];
  int cenvec [COLS][D];
  int Qm [ROWS][D];
  int Km [2][COLS][D];
  int score [ROWS][2*COLS];
  int qout [COLS][ROWS];
  int prob0 [2*COLS];

  initial begin
    int centre [3][D];
    int best, bv, v, sz [G], nz, ntot, a [G], sum, big, npass, pos;
    int cols_of [G][$];
    logic [COLS-1:0] en, lead;
    logic [G-1:0] nonempty;
    cmd_t c;
    real den, rp;
    int mx, pr, nrm;
    longint sc [COLS], srt [$];

    cmd_valid = 0; cmd = '0; cmd_col_en = '0; cmd_col_mode = '0; cmd_link = '1;
    host_rd_en = 0; host_rd_addr = 0; patch_thr = '0; group_thr = '0;
    for (int k = 0; k < G; k++) hash_beta[k] = $urandom_range(0, 15);

    // image: three clusters of similar patches
    for (int k = 0; k < 3; k++) for (int d = 0; d < D; d++) centre[k][d] = int'($urandom_range(0, 120)) - 60;
    for (int p = 0; p < COLS; p++) for (int d = 0; d < D; d++)
      X[p][d] = centre[(p * 7 + p / 3) % 3][d] + int'($urandom_range(0, 6)) - 3;
    for (int r = 0; r < ROWS; r++) for (int d = 0; d < D; d++) begin
      A[r][d]  = (r < G) ? int'($urandom_range(0, 16)) - 8 : 0;
      WQ[r][d] = int'($urandom_range(0, 40)) - 20;
    end
    for (int s = 0; s < NS; s++) begin
      hbm[s]      = col_word(X, s);
      hbm[NS + s] = '0;
      hbm[16 + s] = row_word(A, s);
      hbm[32 + s] = row_word(WQ, s);
    end

    repeat (4) @(negedge clk);
    rst_n = 1;

    // ---- 1. hash every patch into a semantic group ----
    load(0, 2 * NS, 0, 0);
    load(16, NS, 0, 1);
    load(32, NS, NS, 1);
    swap_bufs(4'b0011);
    issue(new_cmd(OP_CLEAR));
    c = new_cmd(OP_MATMUL);
    c.a0 = 0; c.a1 = NS; c.a2 = 0; c.n0 = NS; c.sink = SINK_HASH; c.dst = 0;
    issue(c);
    repeat (8) @(negedge clk);
    for (int k = 0; k < G; k++) sz[k] = 0;
    for (int p = 0; p < COLS; p++) begin
      best = 0; bv = -(1 << 30);
      for (int k = 0; k < G; k++) begin
        v = 0;
        for (int d = 0; d < D; d++) v += A[k][d] * X[p][d];
        v = (v + int'(hash_beta[k])) >>> 4;
        if (v > bv) begin bv = v; best = k; end
      end
      grp_of[p] = best;
      sz[best]++;
      host_read(p);
      check(int'(host_idx_data) == best, $sformatf("group index of patch %0d: %0d, expected %0d", p, host_idx_data, best));
    end
    for (int k = 0; k < G; k++) check(int'(group_count[k]) == sz[k], "group count");

    // ---- 2. size the sub-arrays ----
    c = new_cmd(OP_SCHED); c.ooo = 1;
    issue(c);
    nz = 0; ntot = 0; big = 0; sum = 0;
    for (int k = 0; k < G; k++) begin ntot += sz[k]; if (sz[k] != 0) nz++; if (sz[k] > sz[big]) big = k; end
    for (int k = 0; k < G; k++) begin a[k] = (sz[k] == 0) ? 0 : 1 + sz[k] * (COLS - nz) / ntot; sum += a[k]; end
    a[big] += COLS - sum;
    for (int k = 0; k < G; k++) check(int'(grp_cols[k]) == a[k], "sub-array width");

    // ---- 3. centroids (host) and per-pass column placement ----
    nonempty = '0;
    for (int k = 0; k < G; k++) begin
      cols_of[k] = {};
      if (sz[k] != 0) nonempty[k] = 1'b1;
      for (int d = 0; d < D; d++) begin
        v = 0;
        for (int p = 0; p < COLS; p++) if (grp_of[p] == k) v += X[p][d];
        cen[k][d] = (sz[k] == 0) ? 0 : int'($floor(real'(v) / real'(sz[k])));
      end
    end
    for (int p = 0; p < COLS; p++) cols_of[grp_of[p]].push_back(p);
    npass = 0;
    for (int k = 0; k < G; k++) if (sz[k] != 0) begin
      v = (sz[k] + a[k] - 1) / a[k];
      if (v > npass) npass = v;
    end
    split_now = ($countones(nonempty) > 1);
    lead = '0;
    for (int k = 0; k < G; k++) if (sz[k] != 0) lead[grp_first[k]] = 1'b1;
    for (int ps = 0; ps < npass; ps++) begin
      en = '0;
      for (int cc = 0; cc < COLS; cc++) for (int d = 0; d < D; d++) begin colvec[cc][d] = 0; cenvec[cc][d] = 0; end
      for (int k = 0; k < G; k++) if (sz[k] != 0)
        for (int i = 0; i < a[k]; i++) begin
          pos = int'(grp_first[k]) + i;
          for (int d = 0; d < D; d++) cenvec[pos][d] = cen[k][d];
          if (ps * a[k] + i < sz[k]) begin
            en[pos] = 1'b1;
            for (int d = 0; d < D; d++) colvec[pos][d] = X[cols_of[k][ps * a[k] + i]][d];
          end
        end
      for (int s = 0; s < NS; s++) begin
        hbm[64 + s]      = col_word(colvec, s);
        hbm[64 + NS + s] = col_word(cenvec, s);
      end
      load(64, 2 * NS, 0, 0);
      swap_bufs(4'b0001);
      // centroid pass: leading column of each sub-array, raw features
      c = new_cmd(OP_MATMUL);
      c.a0 = NS; c.a1 = NS; c.a2 = NS; c.n0 = NS; c.auto_link = 1; c.save_base = 1;
      issue(c, lead, '0);
      // differential pass over the patches
      c = new_cmd(OP_MATMUL);
      c.a0 = 0; c.a1 = NS; c.a2 = NS; c.n0 = NS; c.auto_link = 1; c.sink = SINK_QV;
      c.dst = 16'(ps * COLS); c.shift = SH;
      if (ps == npass - 1) begin c.phase = PH_INTRA; c.grp_mask = nonempty; end
      issue(c, en, '1);
      swap_bufs(4'b0100);
      for (int cc = 0; cc < COLS; cc++) if (en[cc]) begin
        int p;
        p = -1;
        for (int q = 0; q < COLS; q++) begin
          bit same = 1;
          for (int d = 0; d < D; d++) if (X[q][d] != colvec[cc][d]) same = 0;
          if (same && grp_of[q] == grp_of[cols_of[grp_of[q]][0]] && p < 0) p = q;
        end
        host_read(ps * COLS + cc);
        for (int r = 0; r < ROWS; r++) begin
          v = 0;
          for (int d = 0; d < D; d++) v += WQ[r][d] * colvec[cc][d];
          if ((v >>> SH) > 127 || (v >>> SH) < -128) n_sat++;
          v = sat(v, SH, DW);
          if (ps == 0) qout[cc][r] = v;
          check(int'($signed(host_qv_data[r*DW +: DW])) == v,
                $sformatf("projection pass %0d col %0d row %0d: %0d, expected %0d", ps, cc, r, $signed(host_qv_data[r*DW +: DW]), v));
        end
      end
      if (ps != npass - 1) swap_bufs(4'b0100);
    end

    // ---- 4. global steps, issued as groups finish ----
    repeat (G + 2) @(negedge clk);
    check(inter_q.size() == $countones(nonempty), $sformatf("%0d global steps issued", inter_q.size()));
    while (inter_q.size() != 0) begin
      int g;
      g = inter_q.pop_front();
      n_inter++;
      c = new_cmd(OP_MATMUL);
      c.a0 = NS; c.a1 = NS; c.a2 = NS; c.n0 = NS; c.auto_link = 1;
      c.phase = PH_INTER; c.grp_mask = G'(1 << g);
      issue(c, lead, '0);
    end
    repeat (3) @(negedge clk);
    check(sched_done_seen == 1, "scheduler completion");

    // ---- 5. attention scores over two key blocks, then softmax ----
    for (int r = 0; r < ROWS; r++) for (int d = 0; d < D; d++) Qm[r][d] = int'($urandom_range(0, 60)) - 30;
    for (int b = 0; b < 2; b++) for (int cc = 0; cc < COLS; cc++) for (int d = 0; d < D; d++)
      Km[b][cc][d] = int'($urandom_range(0, 60)) - 30 + (b * 8);
    for (int s = 0; s < NS; s++) begin
      hbm[128 + s]          = row_word(Qm, s);
      hbm[144 + s]          = col_word(Km[0], s);
      hbm[144 + NS + s]     = col_word(Km[1], s);
    end
    load(128, NS, 0, 1);
    load(144, 2 * NS, 0, 0);
    swap_bufs(4'b0011);
    for (int b = 0; b < 2; b++) begin
      c = new_cmd(OP_MATMUL);
      c.a0 = 16'(b * NS); c.a1 = 0; c.a2 = 0; c.n0 = NS; c.sink = SINK_SCORE; c.dst = 16'(b * ROWS); c.shift = 2;
      issue(c);
    end
    for (int r = 0; r < ROWS; r++) for (int b = 0; b < 2; b++) for (int cc = 0; cc < COLS; cc++) begin
      v = 0;
      for (int d = 0; d < D; d++) v += Qm[r][d] * Km[b][cc][d];
      score[r][b * COLS + cc] = sat(v, 2, 16);
    end
    swap_bufs(4'b1000);
    c = new_cmd(OP_SOFTMAX);
    c.a0 = 0; c.a1 = 0; c.a2 = 16'(ROWS); c.n0 = 16'(ROWS); c.n1 = 2;
    issue(c);
    swap_bufs(4'b1000);
    for (int r = 0; r < ROWS; r++) begin
      int m0, m1;
      m0 = -(1 << 30); m1 = -(1 << 30);
      for (int cc = 0; cc < COLS; cc++) begin
        if (score[r][cc] > m0) m0 = score[r][cc];
        if (score[r][COLS + cc] > m1) m1 = score[r][COLS + cc];
      end
      if (m1 > m0) n_rescale++;
      mx = (m0 > m1) ? m0 : m1;
      den = 0.0;
      for (int i = 0; i < 2 * COLS; i++) den += $pow(2.0, real'(score[r][i] - mx) / 16.0);
      for (int b = 0; b < 2; b++) begin
        host_read(b * ROWS + r);
        for (int cc = 0; cc < COLS; cc++) begin
          rp = 32768.0 * $pow(2.0, real'(score[r][b * COLS + cc] - mx) / 16.0) / den;
          pr = int'(host_ka_data[cc*16 +: 16]);
          if (r == 0) prob0[b * COLS + cc] = pr;
          check(real'(pr) - rp < 40.0 && rp - real'(pr) < 40.0,
                $sformatf("probability row %0d key %0d: %0d, expected %f", r, b * COLS + cc, pr, rp));
        end
      end
    end

    // ---- 6. pruning: value vectors = projection outputs of pass 0, attention = row 0 ----
    for (int cc = 0; cc < COLS; cc++) begin
      nrm = 0;
      for (int r = 0; r < ROWS; r++) nrm += (qout[cc][r] < 0) ? -qout[cc][r] : qout[cc][r];
      sc[cc] = longint'(prob0[cc]) * longint'(nrm);
      srt.push_back(sc[cc]);
    end
    srt.sort();
    // threshold: the smallest score above the minimum, so both outcomes occur
    patch_thr = 48'(srt[COLS - 1]);
    for (int i = COLS - 1; i >= 0; i--) if (srt[i] > srt[0]) patch_thr = 48'(srt[i]);
    group_thr = patch_thr;
    c = new_cmd(OP_PRUNE);
    c.a0 = 0; c.a1 = 0; c.n0 = 16'(COLS); c.dst = 0; c.pr_sel = 0;
    issue(c);
    c.n0 = 16'(G); c.pr_sel = 1;
    issue(c);
    repeat (3) @(negedge clk);
    for (int cc = 0; cc < COLS; cc++) begin
      check(pmask_seen[cc] && pmask_keep[cc] == (sc[cc] >= longint'(patch_thr)), $sformatf("patch mask %0d", cc));
      if (pmask_keep[cc]) n_keep++; else n_prune++;
    end
    for (int k = 0; k < G; k++) begin
      check(gmask_seen[k] && gmask_keep[k] == (sc[k] >= longint'(group_thr)), $sformatf("group mask %0d", k));
      if (gmask_keep[k]) n_gkeep++;
    end
    check(int'(patch_kept) == n_keep, "kept counter");

    // ---- mechanisms exercised ----
    $display("mechanisms: prefetch=%0d swap=%0d hash=%0d split=%0d flat=%0d delta=%0d inter=%0d rescale=%0d sat=%0d keep=%0d prune=%0d",
             n_prefetch, n_swap, n_hash, n_split, n_flat, n_delta, n_inter, n_rescale, n_sat, n_keep, n_prune);
    check(n_prefetch > 0, "prefetch never ran");
    check(n_swap > 0, "buffer swap never ran");
    check(n_hash > 0, "hashing never ran");
    check(n_split > 0, "array never split into sub-arrays");
    check(n_flat > 0, "array never ran flat");
    check(n_delta > 0, "differential mode never ran");
    check(n_sat > 0, "requantisation never saturated");
    check(n_inter > 0, "no out-of-order global step");
    check(n_rescale > 0, "softmax never rescaled an earlier block");
    check(n_keep > 0 && n_prune > 0, "pruning did not both keep and prune");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
