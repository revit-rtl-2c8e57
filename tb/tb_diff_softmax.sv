// tb_diff_softmax: self-checking test of the blockwise softmax unit. Rows
// of 1..NBLK blocks with partly masked lanes and a maximum that moves to a
// later block, so earlier partial sums must be rescaled. Each probability
// is compared with a real-valued softmax (base 2) within a small tolerance,
// the row maximum is checked exactly, and the output timing is checked
// (reciprocal cycle, then one block per cycle).
`timescale 1ns/1ps
module tb_diff_softmax;
  localparam int BLK = 8, NBLK = 4, SIW = 16, F = 4;
  localparam int TOL = 24;   // Q1.15 LSBs
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_last, out_valid, out_last;
  logic signed [SIW-1:0] in_score [BLK];
  logic [BLK-1:0] in_mask;
  logic [15:0] out_prob [BLK];
  logic [$clog2(NBLK+1)-1:0] out_blk;
  logic signed [SIW-1:0] row_max;

  diff_softmax #(.BLK(BLK), .NBLK(NBLK), .SIW(SIW), .F(F)) dut (.*);

  int checks = 0, failures = 0;
  int sc [NBLK][BLK];
  bit mk [NBLK][BLK];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, mx, got, lat;
    real den, ref_p;
    in_valid = 0; in_last = 0; in_mask = 0;
    for (int i = 0; i < BLK; i++) in_score[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < 60; row++) begin
      nb = 1 + row % NBLK;
      mx = -100000;
      for (int b = 0; b < nb; b++)
        for (int i = 0; i < BLK; i++) begin
          // later blocks tend to have larger scores
          sc[b][i] = $urandom_range(0, 160) - 120 + b * 24;
          mk[b][i] = (b == nb - 1 && i >= BLK - (row % 3)) ? 1'b0 : 1'b1;
          if (mk[b][i] && sc[b][i] > mx) mx = sc[b][i];
        end
      den = 0.0;
      for (int b = 0; b < nb; b++) for (int i = 0; i < BLK; i++)
        if (mk[b][i]) den += $pow(2.0, real'(sc[b][i] - mx) / 16.0);
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        checks++;
        if (!in_ready) begin failures++; $display("not ready"); end
        in_valid = 1; in_last = (b == nb - 1);
        for (int i = 0; i < BLK; i++) begin in_score[i] = SIW'(sc[b][i]); in_mask[i] = mk[b][i]; end
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      lat = 1;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("first output after %0d cycles", lat); end
      checks++;
      if (int'(row_max) != mx) begin failures++; $display("row max %0d exp %0d", row_max, mx); end
      for (int b = 0; b < nb; b++) begin
        checks++;
        if (!out_valid || int'(out_blk) != b || out_last != (b == nb - 1)) begin
          failures++; $display("output sequencing wrong at block %0d", b);
        end
        for (int i = 0; i < BLK; i++) begin
          ref_p = mk[b][i] ? 32768.0 * $pow(2.0, real'(sc[b][i] - mx) / 16.0) / den : 0.0;
          got = int'(out_prob[i]);
          checks++;
          if (real'(got) - ref_p > real'(TOL) || ref_p - real'(got) > real'(TOL)) begin
            failures++; $display("row %0d blk %0d lane %0d got %0d exp %f", row, b, i, got, ref_p);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
