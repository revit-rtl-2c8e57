// tb_pingpong_buffer: self-checking test of the double-buffered region.
// Fills one side while reading back the other, swaps, and repeats; every
// read is compared with a model memory, and the read latency is checked.
`timescale 1ns/1ps
module tb_pingpong_buffer;
  localparam int WIDTH = 32, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic swap, fill_sel, wr_en, rd_en;
  logic [$clog2(DEPTH)-1:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;

  pingpong_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [2][DEPTH];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int side;
    swap = 0; wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    side = 0;
    // first fill, no reads yet
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = a[$clog2(DEPTH)-1:0]; wr_data = $urandom;
      model[side][a] = wr_data;
    end
    @(negedge clk); wr_en = 0; swap = 1; @(negedge clk); swap = 0; side = 1;
    for (int round = 0; round < 8; round++) begin
      checks++;
      if (fill_sel != side[0]) begin failures++; $display("fill side"); end
      // fill the new side while draining the other in reverse order
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = a[$clog2(DEPTH)-1:0]; wr_data = $urandom;
        model[side][a] = wr_data;
        rd_en = 1; rd_addr = $clog2(DEPTH)'(DEPTH - 1 - a);
        @(posedge clk); #1;
        wr_en = 0; rd_en = 0;
        checks++;
        if (rd_data !== model[1 - side][DEPTH - 1 - a]) begin failures++; $display("read %0d wrong", DEPTH - 1 - a); end
      end
      @(negedge clk); swap = 1; @(negedge clk); swap = 0; side = 1 - side;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
