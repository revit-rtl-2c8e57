// tb_pruner: self-checking test of the pruning engine at a reduced vector
// length. 40 candidates are offered back to back; each importance score
// (attention times L1 norm of the value vector) and keep decision is
// computed independently and compared, the kept/pruned counters are
// checked, and the completion time of the burst is checked against the
// PE latency (NPPE candidates per D/VL + 3 cycles).
`timescale 1ns/1ps
module tb_pruner;
  import revit_pkg::*;
  localparam int NPPE = 4, D = 16, VL = 4, PIDW = 8, NC = 40;
  localparam int NCH = D / VL;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, in_ready, mask_we, mask_keep, busy;
  logic [47:0] thr, mask_score;
  logic [PIDW-1:0] in_pid, mask_addr;
  logic [15:0] in_att;
  logic signed [DW-1:0] in_v [D];
  logic [PIDW:0] n_kept, n_pruned;

  pruner #(.NPPE(NPPE), .D(D), .VL(VL), .PIDW(PIDW)) dut (.*);

  int checks = 0, failures = 0;
  int att [NC];
  int vv [NC][D];
  longint sc [NC];
  int nres = 0, nk = 0;
  int cyc = 0, t_first = -1, t_last = -1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid && in_ready && t_first < 0) t_first = cyc;
    if (rst_n && mask_we) begin
      t_last = cyc;
      checks++;
      if (longint'(mask_score) != sc[mask_addr] || mask_keep != (sc[mask_addr] >= longint'(thr))) begin
        failures++; $display("pid %0d score %0d exp %0d", mask_addr, mask_score, sc[mask_addr]);
      end
      checks++;
      if (int'(mask_addr) != nres) begin failures++; $display("order"); end
      nres++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    clear = 0; in_valid = 0; in_pid = 0; in_att = 0;
    for (int i = 0; i < D; i++) in_v[i] = 0;
    thr = 48'd16000000;
    for (int k = 0; k < NC; k++) begin
      att[k] = $urandom_range(0, 32767);
      n = 0;
      for (int i = 0; i < D; i++) begin
        vv[k][i] = int'($urandom_range(0, 255)) - 128;
        n += (vv[k][i] < 0) ? -vv[k][i] : vv[k][i];
      end
      sc[k] = longint'(att[k]) * longint'(n);
      if (sc[k] >= 16000000) nk++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < NC; k++) begin
      in_valid = 1; in_pid = PIDW'(k); in_att = 16'(att[k]);
      for (int i = 0; i < D; i++) in_v[i] = DW'(vv[k][i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (nres != NC) begin failures++; $display("%0d results", nres); end
    checks++;
    if (int'(n_kept) != nk || int'(n_pruned) != NC - nk) begin failures++; $display("counts %0d/%0d exp %0d", n_kept, n_pruned, nk); end
    checks++;
    if (nk == 0 || nk == NC) begin failures++; $display("threshold did not split the set"); end
    checks++;
    if (t_last - t_first != (NC / NPPE - 1) * (NCH + 3) + (NPPE - 1) + NCH + 3) begin
      failures++; $display("burst took %0d cycles", t_last - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
