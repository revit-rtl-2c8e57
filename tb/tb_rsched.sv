// tb_rsched: self-checking test of the attention scheduler. For random
// group sizes it checks the column allocation and switch-box bits against
// an independent computation, then runs a model of the PE array whose
// local-attention time grows with patches per column, in out-of-order and
// in sequential mode. It checks that out-of-order mode issues each group's
// global step the cycle after its local step ends, that sequential mode
// waits for all groups, that out-of-order finishes no later with fewer
// idle column-cycles, and the flattened configuration.
`timescale 1ns/1ps
module tb_rsched;
  import revit_pkg::*;
  localparam int G = 4, COLS = 16, SZW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_start, flat, ooo_en, alloc_valid, inter_go, all_done;
  logic [SZW-1:0] grp_size [G];
  logic [COLS-2:0] link;
  logic [$clog2(COLS)-1:0] grp_first [G];
  logic [$clog2(COLS+1)-1:0] grp_cols [G];
  logic [G-1:0] intra_go, intra_done, inter_done;
  logic [$clog2(G)-1:0] inter_grp;
  logic [31:0] idle_cols;

  rsched #(.G(G), .COLS(COLS), .SZW(SZW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int intra_left [G], inter_left [G];
  int intra_end [G], inter_start [G];
  int n_ooo_issue = 0;

  always @(posedge clk) cyc++;

  // PE array model: local step takes 6 cycles per patch per column.
  always @(posedge clk) begin
    intra_done <= '0;
    inter_done <= '0;
    for (int g = 0; g < G; g++) begin
      if (intra_go[g] && grp_cols[g] != 0) intra_left[g] = 6 * ((int'(grp_size[g]) + int'(grp_cols[g]) - 1) / int'(grp_cols[g]));
      else if (intra_left[g] > 0) begin
        intra_left[g]--;
        if (intra_left[g] == 0) begin intra_done[g] <= 1'b1; intra_end[g] = cyc; end
      end
      if (inter_go && int'(inter_grp) == g) begin inter_left[g] = 4; inter_start[g] = cyc; end
      else if (inter_left[g] > 0) begin
        inter_left[g]--;
        if (inter_left[g] == 0) inter_done[g] <= 1'b1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit ooo, output int t_total, output int idle);
    int t0;
    ooo_en = ooo;
    @(negedge clk); cfg_start = 1; @(negedge clk); cfg_start = 0;
    t0 = cyc;
    while (!all_done && cyc - t0 < 2000) @(negedge clk);
    t_total = cyc - t0;
    idle = int'(idle_cols);
    for (int g = 0; g < G; g++) if (grp_cols[g] != 0) begin
      checks++;
      if (ooo && inter_start[g] > intra_end[g] + G) begin failures++; $display("group %0d issued late", g); end
      if (!ooo) begin
        for (int h = 0; h < G; h++) if (grp_cols[h] != 0 && inter_start[g] <= intra_end[h]) begin
          failures++; $display("sequential mode issued group %0d before group %0d ended", g, h);
        end
      end
    end
  endtask

  initial begin
    int sz [G];
    int n, nz, sum, big, pos, a [G], t_o, t_s, i_o, i_s;
    logic [COLS-2:0] el;
    cfg_start = 0; flat = 0; ooo_en = 1;
    for (int g = 0; g < G; g++) begin grp_size[g] = 0; intra_left[g] = 0; inter_left[g] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      n = 0; nz = 0; big = 0; sum = 0;
      for (int g = 0; g < G; g++) begin
        sz[g] = (trial % 5 == 4 && g == 1) ? 0 : $urandom_range(1, 120);
        grp_size[g] = SZW'(sz[g]);
      end
      for (int g = 0; g < G; g++) begin n += sz[g]; if (sz[g] != 0) nz++; if (sz[g] > sz[big]) big = g; end
      for (int g = 0; g < G; g++) begin a[g] = (sz[g] == 0) ? 0 : 1 + sz[g] * (COLS - nz) / n; sum += a[g]; end
      a[big] += COLS - sum;
      el = '1; pos = 0;
      for (int g = 0; g < G; g++) begin pos += a[g]; if (a[g] != 0 && pos < COLS) el[pos-1] = 1'b0; end
      run(1'b1, t_o, i_o);
      for (int g = 0; g < G; g++) begin
        checks++;
        if (int'(grp_cols[g]) != a[g]) begin failures++; $display("cols g%0d %0d exp %0d", g, grp_cols[g], a[g]); end
      end
      checks++;
      if (link != el) begin failures++; $display("link %b exp %b", link, el); end
      run(1'b0, t_s, i_s);
      checks++;
      if (t_o > t_s || i_o > i_s) begin failures++; $display("ooo %0d/%0d seq %0d/%0d", t_o, i_o, t_s, i_s); end
      if (i_o < i_s) n_ooo_issue++;
    end
    checks++;
    if (n_ooo_issue == 0) begin failures++; $display("out-of-order never saved idle time"); end
    flat = 1;
    run(1'b1, t_o, i_o);
    checks++;
    if (link != '1 || int'(grp_cols[0]) != COLS) begin failures++; $display("flat config wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
