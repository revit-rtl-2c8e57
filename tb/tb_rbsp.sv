// tb_rbsp: self-checking test of the bit-serial processing element.
// Random raw and delta slices, multi-slice accumulation, base capture and
// differential reconstruction. Expected sums come from plain
// multiplication; expected cycle counts from a table-driven Booth digit count.
`timescale 1ns/1ps
module tb_rbsp;
  import revit_pkg::*;
  localparam int PC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, first, save_base, busy, done;
  pe_mode_e mode;
  logic signed [DW-1:0] x [PC], c [PC], w [PC];
  logic signed [ACCW-1:0] base_own, result;

  int checks = 0, failures = 0;

  rbsp #(.PC(PC)) dut (.clk, .rst_n, .start, .first, .mode, .save_base, .x, .c, .w,
                       .base_in(base_own), .base_own, .busy, .done, .result);

  // Number of non-zero radix-4 Booth digits of v, by table lookup on bit triplets.
  function automatic int nz_digits(int v);
    int tbl [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
    int n = 0;
    int vv = v << 1;
    for (int k = 0; k < NDIG; k++) if (tbl[(vv >> (2 * k)) & 7] != 0) n++;
    return n;
  endfunction

  // Runs one slice, returns cycles from start to done.
  task automatic run_slice(input bit f, input pe_mode_e m, input bit sv, output int cyc);
    @(negedge clk);
    first = f; mode = m; save_base = sv; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 100) break;
    end
    cyc--;  // count clock edges after the one that sampled start
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, maxd, expect_acc, expect_cyc, wsum;
    logic signed [DW-1:0] xs [4][PC];
    logic signed [DW-1:0] cs [4][PC];
    logic signed [DW-1:0] ws [4][PC];
    start = 0; first = 0; save_base = 0; mode = MODE_RAW;
    for (int j = 0; j < PC; j++) begin x[j] = 0; c[j] = 0; w[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Single raw slices: value and cycle count.
    for (int t = 0; t < 200; t++) begin
      expect_acc = 0; maxd = 0;
      for (int j = 0; j < PC; j++) begin
        x[j] = DW'($urandom); w[j] = DW'($urandom);
        if (t % 4 == 0) x[j] = DW'($urandom_range(0, 3));
        expect_acc += int'(x[j]) * int'(w[j]);
        if (nz_digits(int'(x[j])) > maxd) maxd = nz_digits(int'(x[j]));
      end
      run_slice(1, MODE_RAW, 0, cyc);
      checks++;
      if (result !== expect_acc) begin failures++; $display("raw value mismatch %0d vs %0d", result, expect_acc); end
      expect_cyc = maxd + 1;
      checks++;
      if (cyc != expect_cyc) begin failures++; $display("raw cycles %0d vs %0d", cyc, expect_cyc); end
    end

    // Differential: centroid pass saves base, then delta passes over 4 slices.
    for (int t = 0; t < 50; t++) begin
      for (int s = 0; s < 4; s++)
        for (int j = 0; j < PC; j++) begin
          cs[s][j] = DW'($urandom);
          xs[s][j] = DW'(int'(cs[s][j]) + $urandom_range(0, 6) - 3);
          ws[s][j] = DW'($urandom);
        end
      // centroid: W.c over 4 slices, saved as base
      for (int s = 0; s < 4; s++) begin
        for (int j = 0; j < PC; j++) begin x[j] = cs[s][j]; w[j] = ws[s][j]; end
        run_slice(s == 0, MODE_RAW, s == 3, cyc);
      end
      wsum = 0;
      for (int s = 0; s < 4; s++) for (int j = 0; j < PC; j++) wsum += int'(cs[s][j]) * int'(ws[s][j]);
      checks++;
      if (base_own !== wsum) begin failures++; $display("base mismatch"); end
      // patch: W.(x-c) + base must equal W.x
      expect_acc = 0;
      for (int s = 0; s < 4; s++) begin
        maxd = 0;
        for (int j = 0; j < PC; j++) begin
          x[j] = xs[s][j]; c[j] = cs[s][j]; w[j] = ws[s][j];
          expect_acc += int'(xs[s][j]) * int'(ws[s][j]);
          if (nz_digits(int'(xs[s][j]) - int'(cs[s][j])) > maxd) maxd = nz_digits(int'(xs[s][j]) - int'(cs[s][j]));
        end
        run_slice(s == 0, MODE_DELTA, 0, cyc);
        checks++;
        if (cyc != maxd + 1) begin failures++; $display("delta cycles %0d vs %0d", cyc, maxd + 1); end
      end
      checks++;
      if (result !== expect_acc) begin failures++; $display("delta value mismatch %0d vs %0d", result, expect_acc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
