// pruner: semantic-aware pruning engine.
//
// Decides which patches (local patch pruning) or which semantic groups
// (global group pruning) are kept. Both uses share this block; the top
// instantiates it twice. The task scheduler psched gives each incoming
// candidate (its number, the class token's attention to it and its value
// vector) to a free pruning PE (ppe), searching round-robin. Results return
// one per cycle at most, in dispatch order, as a keep/prune mask write
// (mask_we, mask_addr, mask_keep) plus the importance score; kept and
// pruned candidates are counted until `clear`.
//
// Interface: in_valid/in_ready per candidate. With NPPE PEs of latency
// D/VL + 3 cycles (load to result), the engine accepts NPPE candidates per
// D/VL + 3 cycles.
//
// From the document: psched, a group of P-PEs, keep/prune masks, one
// micro-architecture for both pruners. Own choices: NPPE = 4, round-robin
// dispatch, the counters. Summarising pruned patches into a package patch
// is not built here.
module pruner
  import revit_pkg::*;
#(
  parameter int unsigned NPPE = 4,
  parameter int unsigned D    = 64,
  parameter int unsigned VL   = 8,
  parameter int unsigned PIDW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [47:0]          thr,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PIDW-1:0]      in_pid,
  input  logic [15:0]          in_att,
  input  logic signed [DW-1:0] in_v [D],
  output logic                 mask_we,
  output logic [PIDW-1:0]      mask_addr,
  output logic                 mask_keep,
  output logic [47:0]          mask_score,
  output logic [PIDW:0]        n_kept,
  output logic [PIDW:0]        n_pruned,
  output logic                 busy
);

  localparam int unsigned PW = (NPPE > 1) ? $clog2(NPPE) : 1;

  logic [NPPE-1:0] pe_busy, pe_valid, pe_load, pe_keep;
  logic [PIDW-1:0] pe_pid [NPPE];
  logic [47:0]     pe_score [NPPE];
  logic [PW-1:0]   rr, pick;
  logic            found;

  // psched: first idle PE at or after the round-robin pointer.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int n = 0; n < NPPE; n++) begin
      logic [PW-1:0] p;
      p = PW'((int'(rr) + n) % NPPE);
      if (!found && !pe_busy[p]) begin
        found = 1'b1;
        pick  = p;
      end
    end
    pe_load = '0;
    if (in_valid && found) pe_load[pick] = 1'b1;
  end
  assign in_ready = found;

  for (genvar n = 0; n < NPPE; n++) begin : g_pe
    ppe #(.D(D), .VL(VL), .PIDW(PIDW)) u_ppe (
      .clk, .rst_n,
      .load     (pe_load[n]),
      .load_pid (in_pid),
      .load_att (in_att),
      .load_v   (in_v),
      .thr,
      .busy     (pe_busy[n]),
      .valid    (pe_valid[n]),
      .pid      (pe_pid[n]),
      .keep     (pe_keep[n]),
      .score    (pe_score[n])
    );
  end

  always_comb begin
    mask_we    = 1'b0;
    mask_addr  = '0;
    mask_keep  = 1'b0;
    mask_score = '0;
    for (int n = 0; n < NPPE; n++)
      if (pe_valid[n]) begin
        mask_we    = 1'b1;
        mask_addr  = pe_pid[n];
        mask_keep  = pe_keep[n];
        mask_score = pe_score[n];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr       <= '0;
      n_kept   <= '0;
      n_pruned <= '0;
    end else begin
      if (in_valid && found) rr <= PW'((int'(pick) + 1) % NPPE);
      if (clear) begin
        n_kept   <= '0;
        n_pruned <= '0;
      end else if (mask_we) begin
        if (mask_keep) n_kept   <= n_kept + 1'b1;
        else           n_pruned <= n_pruned + 1'b1;
      end
    end
  end

  assign busy = |pe_busy;

  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pe_valid));

endmodule
