// rbsp: reconfigurable bit-serial processing element.
//
// Computes one slice of a dot product, sum_j v_j * w_j over PC lanes, where
// the serial operand v_j is either the raw feature x_j (MODE_RAW) or its
// difference from the group centroid, x_j - c_j (MODE_DELTA, produced by the
// delta generator). Each lane's serial operand is recoded into radix-4
// modified Booth digits by an offset generator; every cycle each lane
// consumes its lowest non-zero digit, which selects a shift of the lane's
// weight and a sign. The PC shifted weights are summed by an adder tree into
// the accumulator. A slice therefore takes as many cycles as the busiest
// lane has non-zero digits (zero digits cost nothing), which is where
// small deltas pay off.
//
// Slices of a longer dot product accumulate: `first` clears the accumulator.
// The differential reconstruction stage (DRP) adds `base_in`, the result
// computed for the group centroid, to the accumulator when the last slice
// ran in MODE_DELTA, so `result` is always the full-precision W.x. With
// `save_base` the finished accumulator is kept in the base register and
// offered on `base_own`; the array forwards it to the right along a
// sub-array (switch boxes in rmmu).
//
// Interface and timing: x, c, w, mode, first and save_base are sampled on
// `start` (one-cycle pulse while idle). `done` pulses N+1 cycles later,
// N = largest number of non-zero Booth digits among the lanes; `result` is
// valid from `done` until the next start.
//
// From the document: the raw/delta MUX, delta generator, Booth offset
// generators, shifters, adder tree and DRP. Own choices: PC = 4 lanes,
// one digit per lane per cycle with lanes kept in lock-step, and the saved
// base register as the source of the reconstruction term.
module rbsp
  import revit_pkg::*;
#(
  parameter int unsigned PC = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   first,
  input  pe_mode_e               mode,
  input  logic                   save_base,
  input  logic signed [DW-1:0]   x [PC],
  input  logic signed [DW-1:0]   c [PC],
  input  logic signed [DW-1:0]   w [PC],
  input  logic signed [ACCW-1:0] base_in,
  output logic signed [ACCW-1:0] base_own,
  output logic                   busy,
  output logic                   done,
  output logic signed [ACCW-1:0] result
);

  bdig_t                 dig_q [PC][NDIG];
  logic signed [DW-1:0]  w_q   [PC];
  logic signed [ACCW-1:0] acc_q, base_q;
  pe_mode_e              mode_q;
  logic                  save_q;

  // Delta generator and offset generator: recode the selected serial operand.
  bdig_t dig_new [PC][NDIG];
  always_comb begin
    for (int j = 0; j < PC; j++) begin
      logic signed [SW-1:0] v;
      if (mode == MODE_DELTA) v = SW'(x[j]) - SW'(c[j]);
      else                    v = SW'(x[j]);
      for (int k = 0; k < NDIG; k++) dig_new[j][k] = booth_digit(v, k);
    end
  end

  // Per lane: pick the lowest remaining non-zero digit, shift the weight,
  // and sum the lanes in the adder tree.
  logic                   any_left;
  logic signed [ACCW-1:0] tree_sum;
  logic [NDIG-1:0]        take [PC];
  always_comb begin
    any_left = 1'b0;
    tree_sum = '0;
    for (int j = 0; j < PC; j++) begin
      logic found;
      logic signed [ACCW-1:0] term;
      found   = 1'b0;
      term    = '0;
      take[j] = '0;
      for (int k = 0; k < NDIG; k++) begin
        if (!found && dig_q[j][k] != 0) begin
          found      = 1'b1;
          take[j][k] = 1'b1;
          // |digit| is 1 or 2: one signed power of two, 2^(2k) or 2^(2k+1)
          term = ACCW'(w_q[j]) <<< (2 * k + ((dig_q[j][k] == 3'sd2 || dig_q[j][k] == -3'sd2) ? 1 : 0));
          if (dig_q[j][k] < 0) term = -term;
        end
      end
      any_left = any_left | found;
      tree_sum = tree_sum + term;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      acc_q  <= '0;
      base_q <= '0;
      mode_q <= MODE_RAW;
      save_q <= 1'b0;
      for (int j = 0; j < PC; j++) begin
        w_q[j] <= '0;
        for (int k = 0; k < NDIG; k++) dig_q[j][k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        mode_q <= mode;
        save_q <= save_base;
        if (first) acc_q <= '0;
        for (int j = 0; j < PC; j++) begin
          w_q[j] <= w[j];
          for (int k = 0; k < NDIG; k++) dig_q[j][k] <= dig_new[j][k];
        end
      end else if (busy) begin
        if (any_left) begin
          acc_q <= acc_q + tree_sum;
          for (int j = 0; j < PC; j++)
            for (int k = 0; k < NDIG; k++)
              if (take[j][k]) dig_q[j][k] <= '0;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (save_q) base_q <= acc_q;
        end
      end
    end
  end

  assign base_own = base_q;
  // Differential reconstruction: add the centroid's result back after delta work.
  assign result   = (mode_q == MODE_DELTA) ? acc_q + base_in : acc_q;

endmodule
