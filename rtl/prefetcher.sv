// prefetcher: moves tiles of patches and weights from off-chip HBM into
// the global buffer.
//
// A transfer is `len` consecutive HBM words starting at src_addr, written to
// consecutive buffer words starting at dst_addr. Read requests are issued
// one per cycle (valid/ready) while fewer than MAXOUT are outstanding;
// responses return in order, one word each, and are written straight into
// the buffer, so a transfer streams at the memory's full rate once the
// first response arrives. `done` pulses when the last word is written.
//
// Interface: start (while !busy) samples src_addr, dst_addr and len
// (len >= 1). HBM side: req_valid/req_ready/req_addr, rsp_valid/rsp_data
// (responses are always accepted). Buffer side: buf_we/buf_addr/buf_wdata.
//
// From the document: explicit prefetch of patches and weights from HBM
// into the global buffer. Own choices: everything about the protocol.
module prefetcher #(
  parameter int unsigned AW     = 32,
  parameter int unsigned BAW    = 10,
  parameter int unsigned WIDTH  = 2048,
  parameter int unsigned LENW   = 16,
  parameter int unsigned MAXOUT = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [AW-1:0]    src_addr,
  input  logic [BAW-1:0]   dst_addr,
  input  logic [LENW-1:0]  len,
  output logic             busy,
  output logic             done,
  output logic             req_valid,
  input  logic             req_ready,
  output logic [AW-1:0]    req_addr,
  input  logic             rsp_valid,
  input  logic [WIDTH-1:0] rsp_data,
  output logic             buf_we,
  output logic [BAW-1:0]   buf_addr,
  output logic [WIDTH-1:0] buf_wdata
);

  logic [LENW-1:0]            to_issue, to_recv;
  logic [$clog2(MAXOUT+1)-1:0] outstanding;
  logic [BAW-1:0]             wptr;

  assign req_valid = busy && (to_issue != 0) && (outstanding < MAXOUT);
  assign buf_we    = busy && rsp_valid;
  assign buf_addr  = wptr;
  assign buf_wdata = rsp_data;

  logic issue, recv;
  assign issue = req_valid && req_ready;
  assign recv  = busy && rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      to_issue    <= '0;
      to_recv     <= '0;
      outstanding <= '0;
      req_addr    <= '0;
      wptr        <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        to_issue <= len;
        to_recv  <= len;
        req_addr <= src_addr;
        wptr     <= dst_addr;
      end else if (busy) begin
        if (issue) begin
          to_issue <= to_issue - 1'b1;
          req_addr <= req_addr + 1'b1;
        end
        if (recv) begin
          to_recv <= to_recv - 1'b1;
          wptr    <= wptr + 1'b1;
          if (to_recv == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        case ({issue, recv})
          2'b10:   outstanding <= outstanding + 1'b1;
          2'b01:   outstanding <= outstanding - 1'b1;
          default: ;
        endcase
      end
    end
  end

  a_no_stray_rsp: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> (busy && outstanding != 0));

endmodule
