// rmmu: reconfigurable matrix multiplication unit.
//
// A ROWS x COLS array of bit-serial processing elements (rbsp). Column c
// holds one patch: its PC-wide feature slice x[c] and centroid slice c[c]
// are broadcast down the column. Row r holds one operand vector (a weight
// row of W_Q/W_K/W_V, a hash projection vector, or a query): its PC-wide
// slice w[r] is broadcast along the row. PE(r,c) therefore accumulates
// output feature r of patch c, and a full dot product of length D is run as
// D/PC slices.
//
// Column reconfiguration: a switch box between column c and c+1, controlled
// by link[c] (1 = connected, 0 = broken), decides whether column c+1
// receives the intermediate result of its left neighbour. Each maximal run
// of linked columns is an independent sub-array (sub-RMMU) serving one
// semantic group: the base (centroid result) saved in the leftmost column
// of the run travels right through the closed switch boxes and is used by
// every column of the run to reconstruct W.x from W.(x - c). With every
// link set the array is one engine for flattened attention.
//
// Control: start (pulse) begins one slice in every column whose col_en bit
// is set; first, save_base and the per-column mode are sampled with it.
// col_done[c] pulses when column c finishes (all its rows finish together
// since they share the serial operand); done pulses once every enabled
// column has finished, one cycle after the last col_done. result[r][c] is
// valid from then on. A start with no enabled column is ignored.
//
// From the document: the PE array, per-column switch boxes with one control
// bit, and sub-arrays formed by columns only. Own choices: what the switch
// box forwards (the saved centroid result), a common row operand for all
// sub-arrays, and a shared slice start.
module rmmu
  import revit_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64,
  parameter int unsigned PC   = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   first,
  input  logic                   save_base,
  input  logic [COLS-1:0]        col_en,
  input  logic [COLS-1:0]        col_mode,   // 1 = MODE_DELTA
  input  logic [COLS-2:0]        link,
  input  logic signed [DW-1:0]   x [COLS][PC],
  input  logic signed [DW-1:0]   c [COLS][PC],
  input  logic signed [DW-1:0]   w [ROWS][PC],
  output logic                   busy,
  output logic                   done,
  output logic [COLS-1:0]        col_done,
  output logic signed [ACCW-1:0] result [ROWS][COLS]
);

  logic signed [ACCW-1:0] base_own [ROWS][COLS];
  logic signed [ACCW-1:0] base_in  [ROWS][COLS];
  logic [COLS-1:0]        pe_busy;
  logic [COLS-1:0]        pending;

  // Switch boxes: forward the left neighbour's base while linked.
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      base_in[r][0] = base_own[r][0];
      for (int cc = 1; cc < COLS; cc++)
        base_in[r][cc] = link[cc-1] ? base_in[r][cc-1] : base_own[r][cc];
    end
  end

  for (genvar cc = 0; cc < COLS; cc++) begin : g_col
    logic col_start;
    logic [ROWS-1:0] rdone, rbusy;
    assign col_start = start && col_en[cc];
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      rbsp #(.PC(PC)) u_pe (
        .clk, .rst_n,
        .start    (col_start),
        .first,
        .mode     (pe_mode_e'(col_mode[cc])),
        .save_base,
        .x        (x[cc]),
        .c        (c[cc]),
        .w        (w[r]),
        .base_in  (base_in[r][cc]),
        .base_own (base_own[r][cc]),
        .busy     (rbusy[r]),
        .done     (rdone[r]),
        .result   (result[r][cc])
      );
    end
    assign col_done[cc] = &rdone;  // all rows finish together
    assign pe_busy[cc]  = |rbusy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) pending <= col_en;
      else if (pending != '0) begin
        pending <= pending & ~col_done;
        if ((pending & ~col_done) == '0) done <= 1'b1;
      end
    end
  end

  assign busy = (pending != '0) || (pe_busy != '0);

endmodule
