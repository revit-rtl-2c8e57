// tb_sgg_engine: self-checking test of the semantic group generation engine.
// Streams random hash projections (one per cycle, with random gaps),
// computes the expected group of each patch with real arithmetic
// (floor((h + beta) / gamma), first maximum wins) and checks every index
// written, the write order, the group counts and the steady throughput.
`timescale 1ns/1ps
module tb_sgg_engine;
  import revit_pkg::*;
  localparam int G = 4, NGPE = 4, GSHIFT = 4, PIDW = 8, NP = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, in_ready, idx_we, busy;
  logic [PIDW-1:0] in_pid, idx_addr;
  logic signed [ACCW-1:0] beta [G], in_hash [G];
  logic [$clog2(G)-1:0] idx_data;
  logic [PIDW:0] group_count [G];

  sgg_engine #(.G(G), .NGPE(NGPE), .GSHIFT(GSHIFT), .PIDW(PIDW)) dut (.*);

  int checks = 0, failures = 0;
  int hv [NP][G];
  int exp_idx [NP];
  int cnt [G];
  int nwr = 0;
  int got_idx [NP];
  bit seen [NP];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && idx_we) begin
    checks++;
    if (int'(idx_addr) != nwr) begin failures++; $display("write order: pid %0d at write %0d", idx_addr, nwr); end
    got_idx[idx_addr] = int'(idx_data);
    seen[idx_addr] = 1'b1;
    nwr++;
  end

  initial begin
    int best, t0, t1;
    real bv, v;
    clear = 0; in_valid = 0; in_pid = 0;
    for (int k = 0; k < G; k++) begin beta[k] = $urandom_range(0, 15); in_hash[k] = 0; end
    for (int k = 0; k < G; k++) cnt[k] = 0;
    for (int p = 0; p < NP; p++) begin
      seen[p] = 0;
      best = 0; bv = -1.0e30;
      for (int k = 0; k < G; k++) begin
        hv[p][k] = int'($urandom_range(0, 4000)) - 2000;
        if (p % 5 == 0 && k == 2) hv[p][k] = hv[p][0];   // force some ties
        v = $floor(real'(hv[p][k] + beta[k]) / 16.0);
        if (v > bv) begin bv = v; best = k; end
      end
      exp_idx[p] = best;
      cnt[best]++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    t0 = $time;
    for (int p = 0; p < NP; p++) begin
      in_valid = 1; in_pid = PIDW'(p);
      for (int k = 0; k < G; k++) in_hash[k] = hv[p][k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      in_valid = 0;
      if (p >= NP / 2 && $urandom_range(0, 3) == 0) @(negedge clk);  // gaps in the second half
    end
    in_valid = 0;
    t1 = $time;
    repeat (6) @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (!seen[p] || got_idx[p] != exp_idx[p]) begin failures++; $display("pid %0d idx %0d exp %0d", p, got_idx[p], exp_idx[p]); end
    end
    for (int k = 0; k < G; k++) begin
      checks++;
      if (int'(group_count[k]) != cnt[k]) begin failures++; $display("count %0d: %0d exp %0d", k, group_count[k], cnt[k]); end
    end
    checks++;
    if (stalls != 0) begin failures++; $display("%0d stall cycles", stalls); end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-to-back patches must be accepted one per cycle
  int stalls = 0;
  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;
endmodule
