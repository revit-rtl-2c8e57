// pingpong_buffer: double-buffered region of the global buffer.
//
// Two scratch banks; at any time one is the fill side, written by the
// prefetcher (or by a compute engine storing results), and the other is the
// drain side, read by the compute engines. `swap` exchanges the roles, so
// the next tile is loaded while the current one is being used and the
// transfer time is hidden. Each bank holds DEPTH words of WIDTH bits; the
// region therefore holds 2*DEPTH words.
//
// Timing: writes land the cycle they are presented; reads return one cycle
// after rd_en. `fill_sel` shows which bank is the fill side.
//
// From the document: double buffering of the global buffer made of scratch
// banks. Own choices: two banks per region and the swap interface.
module pingpong_buffer #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     swap,
  output logic                     fill_sel,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);

  logic [WIDTH-1:0] rd0, rd1;
  logic             rd_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_sel <= 1'b0;
      rd_sel   <= 1'b1;
    end else begin
      if (swap) fill_sel <= ~fill_sel;
      if (rd_en) rd_sel <= ~fill_sel;
    end
  end

  scratch_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_bank0 (
    .clk, .wr_en(wr_en && !fill_sel), .wr_addr, .wr_data,
    .rd_en(rd_en && fill_sel), .rd_addr, .rd_data(rd0));
  scratch_bank #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_bank1 (
    .clk, .wr_en(wr_en && fill_sel), .wr_addr, .wr_data,
    .rd_en(rd_en && !fill_sel), .rd_addr, .rd_data(rd1));

  assign rd_data = rd_sel ? rd1 : rd0;

endmodule
