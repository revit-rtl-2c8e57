// gpe: group-generation processing element of the semantic group engine.
//
// Turns the G-dimensional locality-sensitive hash projection of one patch,
// h = alpha . x (computed on the PE array), into a semantic group index:
//     H_k = floor((h_k + beta_k) / gamma),   idx = argmax_k H_k
// Each hash register holds one dimension; G ALUs add beta and divide by the
// bucket width in parallel (gamma = 2^GSHIFT, so the division is an
// arithmetic shift), and a compare tree picks the largest. Ties go to the
// lower index.
//
// Timing: `load` (while !busy) captures the hash and patch number; the index
// is computed in the next cycle and `valid` pulses one cycle after that,
// with `pid` and `idx`. busy is high from load until valid.
//
// From the document: hash registers, parallel ALUs, the max operation and
// equations (3)-(4). Own choices: a power-of-two bucket width, tie rule,
// two-cycle latency.
module gpe
  import revit_pkg::*;
#(
  parameter int unsigned G      = NGRP,
  parameter int unsigned GSHIFT = 4,
  parameter int unsigned PIDW   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [PIDW-1:0]        load_pid,
  input  logic signed [ACCW-1:0] hash [G],
  input  logic signed [ACCW-1:0] beta [G],
  output logic                   busy,
  output logic                   valid,
  output logic [PIDW-1:0]        pid,
  output logic [$clog2(G)-1:0]   idx
);

  logic signed [ACCW-1:0] hash_reg [G];
  logic                   stage;

  logic signed [ACCW-1:0] bucket [G];
  logic [$clog2(G)-1:0]   best;
  always_comb begin
    for (int k = 0; k < G; k++) bucket[k] = (hash_reg[k] + beta[k]) >>> GSHIFT;
    best = '0;
    for (int k = 1; k < G; k++) if (bucket[k] > bucket[best]) best = k[$clog2(G)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      stage <= 1'b0;
      valid <= 1'b0;
      pid   <= '0;
      idx   <= '0;
      for (int k = 0; k < G; k++) hash_reg[k] <= '0;
    end else begin
      valid <= 1'b0;
      if (load && !busy) begin
        busy  <= 1'b1;
        stage <= 1'b1;
        pid   <= load_pid;
        for (int k = 0; k < G; k++) hash_reg[k] <= hash[k];
      end else if (stage) begin
        stage <= 1'b0;
        idx   <= best;
        valid <= 1'b1;
        busy  <= 1'b0;
      end
    end
  end

endmodule
