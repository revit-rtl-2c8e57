// ppe: pruning processing element.
//
// Scores one patch (or one semantic group's centroid) for pruning. The norm
// generator reads the patch's value vector VL elements per cycle and sums
// their magnitudes into the norm register (L1 norm, D/VL cycles). The
// multiplier then forms importance = att * norm, where att is the class
// token's attention to this patch held in the att register. The decision
// stage keeps the patch when importance >= thr: this is the inference-time
// form of the hard Gumbel-softmax, whose two logits (keep, prune) differ by
// the importance minus a learned bias and whose noise is off at inference.
//
// Timing: `load` (while !busy) captures pid, att and the D-element vector;
// `valid` pulses D/VL + 2 cycles later with pid, keep and score.
//
// From the document: norm generator over V, att register, multiplication
// for the importance score, Gumbel-softmax decision. Own choices: the L1
// norm, VL = 8 lanes, threshold form of the decision, widths.
module ppe
  import revit_pkg::*;
#(
  parameter int unsigned D    = 64,
  parameter int unsigned VL   = 8,
  parameter int unsigned PIDW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [PIDW-1:0]      load_pid,
  input  logic [15:0]          load_att,
  input  logic signed [DW-1:0] load_v [D],
  input  logic [47:0]          thr,
  output logic                 busy,
  output logic                 valid,
  output logic [PIDW-1:0]      pid,
  output logic                 keep,
  output logic [47:0]          score
);

  localparam int unsigned NCH = D / VL;
  localparam int unsigned NW  = DW + $clog2(D) + 1;

  typedef enum logic [1:0] {P_IDLE, P_NORM, P_MUL, P_DEC} pstate_e;
  pstate_e state;

  logic signed [DW-1:0]        vbuf [D];
  logic [15:0]                 att_reg;
  logic [NW-1:0]               norm_reg;
  logic [$clog2(NCH+1)-1:0]    chunk;

  // Norm generator: |v| summed over one chunk of VL elements.
  logic [NW-1:0] chunk_sum;
  always_comb begin
    chunk_sum = '0;
    for (int l = 0; l < VL; l++) begin
      logic signed [DW-1:0] e;
      e = vbuf[int'(chunk) * VL + l];
      chunk_sum = chunk_sum + NW'(e < 0 ? -int'(e) : int'(e));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      att_reg  <= '0;
      norm_reg <= '0;
      chunk    <= '0;
      valid    <= 1'b0;
      pid      <= '0;
      keep     <= 1'b0;
      score    <= '0;
      for (int i = 0; i < D; i++) vbuf[i] <= '0;
    end else begin
      valid <= 1'b0;
      case (state)
        P_IDLE: if (load) begin
          pid      <= load_pid;
          att_reg  <= load_att;
          vbuf     <= load_v;
          norm_reg <= '0;
          chunk    <= '0;
          state    <= P_NORM;
        end
        P_NORM: begin
          norm_reg <= norm_reg + chunk_sum;
          chunk    <= chunk + 1'b1;
          if (chunk == NCH - 1) state <= P_MUL;
        end
        P_MUL: begin
          score <= 48'(att_reg) * 48'(norm_reg);
          state <= P_DEC;
        end
        P_DEC: begin
          keep  <= (score >= thr);
          valid <= 1'b1;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign busy = (state != P_IDLE);

endmodule
