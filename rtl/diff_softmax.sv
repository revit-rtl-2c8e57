// diff_softmax: blockwise ("differential") softmax of the SIMD vector unit.
//
// Attention scores arrive one block of BLK lanes per cycle (one row of RMMU
// outputs covering BLK keys). Softmax over a whole row normally needs the
// row's maximum and the sum of all exponentials before anything can be
// normalised. Instead, this unit keeps two running statistics: the largest
// score seen so far m_g, and the sum l_g of exponentials taken relative to
// m_g. For each new block it finds the block maximum m_b, the exponentials
// e_i = 2^(s_i - m_b), their sum l_b, and merges:
//     m_new = max(m_g, m_b)
//     l_g   = l_g * 2^(m_g - m_new) + l_b * 2^(m_b - m_new)
// The block's exponentials and m_b are kept in a score buffer. When the
// last block has been merged, one reciprocal 1/l_g is formed and every
// stored block is rescaled by 2^(m_b - m_g) and multiplied by it, giving the
// true probabilities. Only m_g and l_g are carried between blocks.
//
// Number formats: scores are signed SIW-bit fixed point with F fractional
// bits, in base-2 units (the 1/sqrt(d_k) scaling and the log2(e) factor are
// folded into the score before this unit). 2^(-t) for t >= 0 is formed as a
// table value 2^(-frac(t)) with 16 fraction bits, shifted right by int(t).
// Outputs are unsigned Q1.15 probabilities (32768 = 1.0).
//
// Interface and timing: in_valid/in_ready handshake per block, in_mask
// marks real lanes (masked lanes get probability 0), in_last ends a row. A
// row holds at most NBLK blocks. After the last block the unit spends one
// cycle on the reciprocal, then emits block b = 0..n-1 on consecutive cycles
// (out_valid, out_blk, out_last); in_ready is low meanwhile.
//
// From the document: block-by-block softmax keeping a running maximum and a
// running sum, and old blocks corrected with the final statistics. Own
// choices: base-2 exponentials from a 16-entry table, the correction of old
// blocks deferred to one normalisation pass, and all widths.
module diff_softmax #(
  parameter int unsigned BLK  = 64,
  parameter int unsigned NBLK = 4,
  parameter int unsigned SIW  = 16,
  parameter int unsigned F    = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [SIW-1:0] in_score [BLK],
  input  logic [BLK-1:0]        in_mask,
  input  logic                  in_last,
  output logic                  out_valid,
  output logic [15:0]           out_prob [BLK],
  output logic [$clog2(NBLK+1)-1:0] out_blk,
  output logic                  out_last,
  output logic signed [SIW-1:0] row_max
);

  localparam int unsigned EW = 17;              // 2^0 = 65536 needs 17 bits
  localparam int unsigned LW = EW + $clog2(BLK) + 1;
  localparam int unsigned BW = $clog2(NBLK+1);

  typedef enum logic [1:0] {S_ACC, S_RECIP, S_OUT} state_e;
  state_e state;

  // 2^(-f/2^F) * 2^16 for f = 0 .. 2^F-1
  function automatic logic [EW-1:0] exp2_frac(input int unsigned f);
    return EW'($rtoi($floor(65536.0 * $pow(2.0, -real'(f) / real'(1 << F)))));
  endfunction

  // v * 2^(-t) for t >= 0 given in SIW+1-bit fixed point
  function automatic logic [LW+EW-1:0] scale_down(input logic [LW-1:0] v, input logic [SIW:0] t);
    logic [LW+EW-1:0] p;
    int unsigned q;
    q = int'(t >> F);
    p = (LW+EW)'(v) * (LW+EW)'(exp2_frac(int'(t) & ((1 << F) - 1)));
    if (q > 40) return '0;
    return p >> (16 + q);
  endfunction

  logic [EW-1:0]         ebuf [NBLK][BLK];
  logic signed [SIW-1:0] mbuf [NBLK];
  logic [BLK-1:0]        kbuf [NBLK];
  logic signed [SIW-1:0] m_g;
  logic [LW-1:0]         l_g;
  logic [BW-1:0]         nblk, oblk;
  logic [63:0]           recip;

  // Block statistics for the incoming block.
  logic signed [SIW-1:0] m_b;
  logic [EW-1:0]         e_b [BLK];
  logic [LW-1:0]         l_b;
  always_comb begin
    m_b = {1'b1, {(SIW-1){1'b0}}};
    for (int i = 0; i < BLK; i++)
      if (in_mask[i] && in_score[i] > m_b) m_b = in_score[i];
    l_b = '0;
    for (int i = 0; i < BLK; i++) begin
      logic [SIW:0] t;
      t      = (SIW+1)'(m_b) - (SIW+1)'(in_score[i]);
      e_b[i] = in_mask[i] ? EW'(scale_down(LW'(65536), t)) : '0;
      l_b    = l_b + LW'(e_b[i]);
    end
  end

  // Merge with the running statistics.
  logic signed [SIW-1:0] m_new;
  logic [LW-1:0]         l_new;
  always_comb begin
    if (nblk == 0) begin
      m_new = m_b;
      l_new = l_b;
    end else begin
      m_new = (m_b > m_g) ? m_b : m_g;
      l_new = LW'(scale_down(l_g, (SIW+1)'(m_new) - (SIW+1)'(m_g)))
            + LW'(scale_down(l_b, (SIW+1)'(m_new) - (SIW+1)'(m_b)));
    end
  end

  assign in_ready = (state == S_ACC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_ACC;
      m_g       <= '0;
      l_g       <= '0;
      nblk      <= '0;
      oblk      <= '0;
      recip     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_blk   <= '0;
      for (int b = 0; b < NBLK; b++) begin
        mbuf[b] <= '0;
        kbuf[b] <= '0;
        for (int i = 0; i < BLK; i++) ebuf[b][i] <= '0;
      end
      for (int i = 0; i < BLK; i++) out_prob[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      case (state)
        S_ACC: if (in_valid && nblk < BW'(NBLK)) begin
          for (int i = 0; i < BLK; i++) ebuf[nblk][i] <= e_b[i];
          mbuf[nblk] <= m_b;
          kbuf[nblk] <= in_mask;
          m_g  <= m_new;
          l_g  <= l_new;
          nblk <= nblk + 1'b1;
          if (in_last) state <= S_RECIP;
        end
        S_RECIP: begin
          // l_g >= 1.0 (65536) because the maximum contributes 2^0
          recip <= (l_g == '0) ? '0 : (64'd1 << 40) / 64'(l_g);
          oblk  <= '0;
          state <= S_OUT;
        end
        S_OUT: begin
          for (int i = 0; i < BLK; i++) begin
            logic [LW+EW-1:0] en;
            logic [127:0]     p;
            en = scale_down(LW'(ebuf[oblk][i]), (SIW+1)'(m_g) - (SIW+1)'(mbuf[oblk]));
            p  = 128'(en) * 128'(recip);
            out_prob[i] <= kbuf[oblk][i] ? 16'(p >> 25) : 16'd0;
          end
          out_valid <= 1'b1;
          out_blk   <= oblk;
          out_last  <= (oblk == nblk - 1'b1);
          oblk      <= oblk + 1'b1;
          if (oblk == nblk - 1'b1) begin
            state <= S_ACC;
            nblk  <= '0;
          end
        end
        default: state <= S_ACC;
      endcase
    end
  end

  assign row_max = m_g;

endmodule
