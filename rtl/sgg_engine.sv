// sgg_engine: semantic group generation engine.
//
// Assigns every patch to one of G semantic groups. Patch hash projections
// stream in (one per cycle at most); the task scheduler gSched hands each to
// a free group-generation PE (gpe), searching round-robin from the PE after
// the last one used. Each gpe returns a group index two cycles later; the
// engine writes it to the index buffer (idx_we/idx_addr/idx_data, one write
// per cycle) and counts the patches of each group, which the attention
// scheduler uses to size the sub-arrays.
//
// Interface: in_valid/in_ready per patch with in_pid (patch number) and
// in_hash. `clear` zeroes the group counts before a new image. busy is high
// while any gpe holds a patch.
//
// From the document: gSched, a set of G-PEs and the index buffer as the
// destination. Own choices: NGPE = 4 PEs, round-robin dispatch, the group
// counters.
module sgg_engine
  import revit_pkg::*;
#(
  parameter int unsigned G      = NGRP,
  parameter int unsigned NGPE   = 4,
  parameter int unsigned GSHIFT = 4,
  parameter int unsigned PIDW   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic signed [ACCW-1:0] beta [G],
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [PIDW-1:0]        in_pid,
  input  logic signed [ACCW-1:0] in_hash [G],
  output logic                   idx_we,
  output logic [PIDW-1:0]        idx_addr,
  output logic [$clog2(G)-1:0]   idx_data,
  output logic [PIDW:0]          group_count [G],
  output logic                   busy
);

  localparam int unsigned PW = (NGPE > 1) ? $clog2(NGPE) : 1;

  logic [NGPE-1:0]      pe_busy, pe_valid, pe_load;
  logic [PIDW-1:0]      pe_pid [NGPE];
  logic [$clog2(G)-1:0] pe_idx [NGPE];
  logic [PW-1:0]        rr, pick;
  logic                 found;

  // gSched: first free PE at or after the round-robin pointer.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int n = 0; n < NGPE; n++) begin
      int unsigned p;
      p = (int'(rr) + n) % NGPE;
      if (!found && !pe_busy[p]) begin
        found = 1'b1;
        pick  = PW'(p);
      end
    end
    pe_load = '0;
    if (in_valid && found) pe_load[pick] = 1'b1;
  end
  assign in_ready = found;

  for (genvar n = 0; n < NGPE; n++) begin : g_pe
    gpe #(.G(G), .GSHIFT(GSHIFT), .PIDW(PIDW)) u_gpe (
      .clk, .rst_n,
      .load     (pe_load[n]),
      .load_pid (in_pid),
      .hash     (in_hash),
      .beta,
      .busy     (pe_busy[n]),
      .valid    (pe_valid[n]),
      .pid      (pe_pid[n]),
      .idx      (pe_idx[n])
    );
  end

  // Results come back in dispatch order, at most one per cycle.
  always_comb begin
    idx_we   = 1'b0;
    idx_addr = '0;
    idx_data = '0;
    for (int n = 0; n < NGPE; n++)
      if (pe_valid[n]) begin
        idx_we   = 1'b1;
        idx_addr = pe_pid[n];
        idx_data = pe_idx[n];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int k = 0; k < G; k++) group_count[k] <= '0;
    end else begin
      if (in_valid && found) rr <= PW'((int'(pick) + 1) % NGPE);
      if (clear) for (int k = 0; k < G; k++) group_count[k] <= '0;
      else if (idx_we) group_count[idx_data] <= group_count[idx_data] + 1'b1;
    end
  end

  assign busy = |pe_busy;

  // Dispatch is at most one per cycle and every gpe has the same latency,
  // so results never collide on the index buffer port.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pe_valid));

endmodule
