// scratch_bank: one scratchpad SRAM bank of the global buffer.
//
// DEPTH words of WIDTH bits, one write port and one read port usable in
// the same cycle. Reads are synchronous: rd_data holds the word addressed
// on the previous cycle's rd_en. A read and a write to the same address in
// one cycle return the old word. The array is left uninitialised, as an
// SRAM macro would be; everything read is written first.
module scratch_bank #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
