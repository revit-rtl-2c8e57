// tb_prefetcher: self-checking test of the HBM prefetcher against the
// behavioural HBM model. Several transfers of different lengths; every
// buffer write is checked for address and data, the number of writes and
// the outstanding-request limit are checked, and a long transfer must
// stream at close to the memory's request rate.
`timescale 1ns/1ps
module tb_prefetcher;
  localparam int AW = 32, BAW = 10, WIDTH = 128, LENW = 16, MAXOUT = 16, LAT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, req_valid, req_ready, rsp_valid, buf_we;
  logic [AW-1:0] src_addr, req_addr;
  logic [BAW-1:0] dst_addr, buf_addr;
  logic [LENW-1:0] len;
  logic [WIDTH-1:0] rsp_data, buf_wdata;

  prefetcher #(.AW(AW), .BAW(BAW), .WIDTH(WIDTH), .LENW(LENW), .MAXOUT(MAXOUT)) dut (.*);
  hbm_model #(.AW(AW), .WIDTH(WIDTH), .LAT(LAT), .RDY_GAP(4)) u_hbm (.*);

  int checks = 0, failures = 0;
  int exp_n = 0, nwr = 0, max_out = 0, outs = 0;
  logic [AW-1:0] cur_src;
  logic [BAW-1:0] cur_dst;

  always @(posedge clk) if (rst_n) begin
    if (buf_we) begin
      checks++;
      if (buf_addr !== BAW'(cur_dst + BAW'(nwr)) || buf_wdata !== u_hbm.word_at(cur_src + AW'(nwr))) begin
        failures++; $display("write %0d wrong", nwr);
      end
      nwr++;
    end
    outs += int'(req_valid && req_ready) - int'(rsp_valid);
    if (outs > max_out) max_out = outs;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t;
    int lens [5] = '{1, 3, 17, 40, 200};
    start = 0; src_addr = 0; dst_addr = 0; len = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      cur_src = $urandom; cur_dst = BAW'($urandom_range(0, 500)); nwr = 0;
      @(negedge clk);
      src_addr = cur_src; dst_addr = cur_dst; len = LENW'(lens[k]); start = 1;
      @(negedge clk); start = 0;
      t0 = $time;
      while (!done) @(negedge clk);
      t = ($time - t0) / 10;
      checks++;
      if (nwr != lens[k]) begin failures++; $display("%0d writes for len %0d", nwr, lens[k]); end
      if (lens[k] == 200) begin
        // 3 of 4 cycles accept a request on average: allow 200*4/3 + latency + margin
        checks++;
        if (t > 200 * 4 / 3 + LAT + 40) begin failures++; $display("200 words took %0d cycles", t); end
      end
    end
    checks++;
    if (max_out > MAXOUT) begin failures++; $display("%0d outstanding", max_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
