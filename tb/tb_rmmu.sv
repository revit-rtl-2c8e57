// tb_rmmu: self-checking test of the reconfigurable PE array at a reduced
// size. Splits the array into three sub-arrays (one semantic group each),
// runs the centroid pass and the differential pass, and checks every output
// against W.x computed directly; then runs it as one flat array in raw mode.
// The slice latency is checked against the Booth digit count of the busiest
// column.
`timescale 1ns/1ps
module tb_rmmu;
  import revit_pkg::*;
  localparam int ROWS = 4, COLS = 8, PC = 2, NS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, first, save_base, busy, done;
  logic [COLS-1:0] col_en, col_mode, col_done;
  logic [COLS-2:0] link;
  logic signed [DW-1:0] x [COLS][PC], c [COLS][PC], w [ROWS][PC];
  logic signed [ACCW-1:0] result [ROWS][COLS];

  rmmu #(.ROWS(ROWS), .COLS(COLS), .PC(PC)) dut (.*);

  int checks = 0, failures = 0;
  logic signed [DW-1:0] X [COLS][NS*PC];   // patch features
  logic signed [DW-1:0] C [3][NS*PC];      // group centroids
  logic signed [DW-1:0] W [ROWS][NS*PC];   // operand rows
  int grp [COLS] = '{0, 0, 0, 1, 1, 2, 2, 2};
  int lead [3] = '{0, 3, 5};

  function automatic int nz_digits(int v);
    int tbl [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
    int n = 0;
    int vv = v << 1;
    for (int k = 0; k < NDIG; k++) if (tbl[(vv >> (2 * k)) & 7] != 0) n++;
    return n;
  endfunction

  task automatic slice(input int s, input bit f, input bit sv, input int expect_lat);
    int lat;
    for (int r = 0; r < ROWS; r++) for (int j = 0; j < PC; j++) w[r][j] = W[r][s*PC+j];
    @(negedge clk);
    start = 1; first = f; save_base = sv;
    @(negedge clk);
    start = 0; lat = 0;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != expect_lat) begin failures++; $display("slice latency %0d expected %0d", lat, expect_lat); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, e;
    start = 0; first = 0; save_base = 0; col_en = 0; col_mode = 0; link = 0;
    for (int cc = 0; cc < COLS; cc++) for (int j = 0; j < PC; j++) begin x[cc][j] = 0; c[cc][j] = 0; end
    for (int r = 0; r < ROWS; r++) for (int j = 0; j < PC; j++) w[r][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 10; trial++) begin
      for (int g = 0; g < 3; g++) for (int d = 0; d < NS*PC; d++) C[g][d] = DW'($urandom_range(0, 200) - 100);
      for (int cc = 0; cc < COLS; cc++) for (int d = 0; d < NS*PC; d++) X[cc][d] = DW'(int'(C[grp[cc]][d]) + $urandom_range(0, 8) - 4);
      for (int r = 0; r < ROWS; r++) for (int d = 0; d < NS*PC; d++) W[r][d] = DW'($urandom);
      // three sub-arrays: columns 0-2, 3-4, 5-7
      link = 7'b1101011;
      // centroid pass in the leading column of each sub-array
      col_en = '0; col_mode = '0;
      for (int g = 0; g < 3; g++) col_en[lead[g]] = 1'b1;
      for (int s = 0; s < NS; s++) begin
        mx = 0;
        for (int cc = 0; cc < COLS; cc++) for (int j = 0; j < PC; j++) begin
          x[cc][j] = C[grp[cc]][s*PC+j];
          if (col_en[cc] && nz_digits(int'(x[cc][j])) > mx) mx = nz_digits(int'(x[cc][j]));
        end
        slice(s, s == 0, s == NS-1, mx + 2);
      end
      // differential pass in every column
      col_en = '1; col_mode = '1;
      for (int s = 0; s < NS; s++) begin
        mx = 0;
        for (int cc = 0; cc < COLS; cc++) for (int j = 0; j < PC; j++) begin
          x[cc][j] = X[cc][s*PC+j];
          c[cc][j] = C[grp[cc]][s*PC+j];
          if (nz_digits(int'(x[cc][j]) - int'(c[cc][j])) > mx) mx = nz_digits(int'(x[cc][j]) - int'(c[cc][j]));
        end
        slice(s, s == 0, 1'b0, mx + 2);
      end
      for (int r = 0; r < ROWS; r++) for (int cc = 0; cc < COLS; cc++) begin
        e = 0;
        for (int d = 0; d < NS*PC; d++) e += int'(X[cc][d]) * int'(W[r][d]);
        checks++;
        if (result[r][cc] !== e) begin failures++; $display("diff r%0d c%0d got %0d exp %0d", r, cc, result[r][cc], e); end
      end
      // flat mode: one large array, raw features
      link = '1; col_en = '1; col_mode = '0;
      for (int s = 0; s < NS; s++) begin
        mx = 0;
        for (int cc = 0; cc < COLS; cc++) for (int j = 0; j < PC; j++) begin
          x[cc][j] = X[cc][s*PC+j];
          if (nz_digits(int'(x[cc][j])) > mx) mx = nz_digits(int'(x[cc][j]));
        end
        slice(s, s == 0, 1'b0, mx + 2);
      end
      for (int r = 0; r < ROWS; r++) for (int cc = 0; cc < COLS; cc++) begin
        e = 0;
        for (int d = 0; d < NS*PC; d++) e += int'(X[cc][d]) * int'(W[r][d]);
        checks++;
        if (result[r][cc] !== e) begin failures++; $display("flat r%0d c%0d", r, cc); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
