// hbm_model: behavioural model of the off-chip HBM read path for
// simulation. Word-addressed; a request is accepted when req_ready is high
// (randomly withheld about one cycle in RDY_GAP), and its word returns
// exactly LAT cycles later, in order. The contents are a fixed function of
// the address, word(a) = hash of a, so a checker can recompute them.
module hbm_model #(
  parameter int unsigned AW      = 32,
  parameter int unsigned WIDTH   = 2048,
  parameter int unsigned LAT     = 12,
  parameter int unsigned RDY_GAP = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [AW-1:0]    req_addr,
  output logic             rsp_valid,
  output logic [WIDTH-1:0] rsp_data
);

  function automatic logic [WIDTH-1:0] word_at(input logic [AW-1:0] a);
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH / 32; i++) w[i*32 +: 32] = (32'(a) * 32'h9E3779B1) ^ (32'(i) * 32'h85EBCA77) ^ 32'h5bd1e995;
    return w;
  endfunction

  logic [LAT-1:0]  vpipe;
  logic [AW-1:0]   apipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe     <= '0;
      req_ready <= 1'b0;
      for (int i = 0; i < LAT; i++) apipe[i] <= '0;
    end else begin
      req_ready <= ($urandom_range(0, RDY_GAP - 1) != 0);
      vpipe[0]  <= req_valid && req_ready;
      apipe[0]  <= req_addr;
      for (int i = 1; i < LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        apipe[i] <= apipe[i-1];
      end
    end
  end

  assign rsp_valid = vpipe[LAT-1];
  assign rsp_data  = word_at(apipe[LAT-1]);

endmodule
