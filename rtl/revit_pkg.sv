// revit_pkg: types, sizes and helper functions shared by the accelerator.
//
// Feature values are 8-bit two's complement (the design runs 8-bit
// quantised models). Dot products accumulate in 32 bits. A processing
// element multiplies bit-serially: its serial operand is recoded into
// radix-4 modified Booth digits, and each non-zero digit is one signed power
// of two, which is applied to the parallel operand with a shifter. The
// helper functions below do that recoding; they are used by the processing
// element and, independently re-derived, nowhere else.
package revit_pkg;

  localparam int unsigned DW    = 8;       // feature / weight width
  localparam int unsigned SW    = DW + 2;  // width of a raw value or delta after sign extension
  localparam int unsigned NDIG  = SW / 2;  // radix-4 Booth digits of an SW-bit value
  localparam int unsigned ACCW  = 32;      // accumulator width
  localparam int unsigned NGRP  = 4;       // semantic groups per image

  // Execution mode of a processing element (the MUX of Fig. 8(b)).
  typedef enum logic {
    MODE_RAW   = 1'b0,  // serial operand is the raw feature
    MODE_DELTA = 1'b1   // serial operand is feature minus centroid; output is reconstructed
  } pe_mode_e;

  // One radix-4 Booth digit, -2..+2.
  typedef logic signed [2:0] bdig_t;

  // Radix-4 modified Booth recoding: digit k = -2*v[2k+1] + v[2k] + v[2k-1].
  function automatic bdig_t booth_digit(input logic signed [SW-1:0] v, input int unsigned k);
    int d;
    d = -2 * int'(v[2*k+1]) + int'(v[2*k]) + ((k == 0) ? 0 : int'(v[2*k-1]));
    return bdig_t'(d);
  endfunction

  // Commands accepted by the central controller.
  typedef enum logic [2:0] {
    OP_LOAD    = 3'd0,  // prefetch len HBM words from src to buffer `bufsel` (0 input, 1 weight) at a0
    OP_SWAP    = 3'd1,  // swap the double-buffered regions in bufsel mask (b0 in, b1 weight, b2 Q/V, b3 K/A)
    OP_MATMUL  = 3'd2,  // n0 slices: x words at a0+s, centroid words at a1+s, operand words at a2+s
    OP_SCHED   = 3'd3,  // size sub-arrays from the group counts; flat/ooo flags
    OP_SOFTMAX = 3'd4,  // n0 query rows of n1 blocks: score words at a0 + b*a2 + q, results at a1 + b*a2 + q
    OP_PRUNE   = 3'd5,  // n0 candidates: value words at a0+p, attention word a1 lane p; ids from dst
    OP_CLEAR   = 3'd6   // clear group and pruning counters
  } opcode_e;

  // Where the results of a matrix multiplication go.
  typedef enum logic [1:0] {
    SINK_QV    = 2'd0,  // column c, all rows, requantised to DW bits -> Q/V buffer word dst+c
    SINK_HASH  = 2'd1,  // column c, rows 0..G-1 -> group generation engine as patch dst+c
    SINK_SCORE = 2'd2,  // row r, all columns, requantised to 16 bits -> K/A buffer word dst+r
    SINK_NONE  = 2'd3   // keep in the array (centroid passes)
  } sink_e;

  // Role of a multiplication in the hierarchical schedule.
  typedef enum logic [1:0] {
    PH_NONE  = 2'd0,
    PH_INTRA = 2'd1,    // last command of the local attention of the groups in grp_mask
    PH_INTER = 2'd2     // last command of their global step
  } phase_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  bufsel;
    logic [31:0] src;
    logic [15:0] len;
    logic [15:0] a0;
    logic [15:0] a1;
    logic [15:0] a2;
    logic [15:0] n0;
    logic [7:0]  n1;
    logic [15:0] dst;
    sink_e       sink;
    logic [4:0]  shift;       // right shift before requantising results
    logic        save_base;   // keep the final sums as the sub-array's centroid result
    logic        auto_link;   // take switch-box settings from the scheduler
    logic        flat;        // OP_SCHED: one sub-array
    logic        ooo;         // OP_SCHED: out-of-order issue
    logic        pr_sel;      // OP_PRUNE: 0 patch pruner, 1 group pruner
    logic [NGRP-1:0] grp_mask; // groups whose step ends with this command
    phase_e      phase;
  } cmd_t;

endpackage
