// tb_bus_mem: behavioural global memory on the system bus, for testbenches.
//
// Word-addressed sparse memory (associative array, unwritten words read 0).
// A read is acknowledged RD_LAT cycles after req is first seen, a write WR_LAT
// cycles after; the ack lasts one cycle. Counts reads and writes.
module tb_bus_mem
  import hthreads_pkg::*;
#(
  parameter int unsigned RD_LAT = 2,
  parameter int unsigned WR_LAT = 2
) (
  input  logic     clk,
  input  bus_req_t req,
  output bus_rsp_t rsp
);

  logic [31:0] mem [logic [29:0]];
  int unsigned cnt;
  int unsigned n_reads, n_writes;
  logic        busy;

  initial begin
    rsp      = BUS_RSP_IDLE;
    cnt      = 0;
    busy     = 1'b0;
    n_reads  = 0;
    n_writes = 0;
  end

  function automatic logic [31:0] rd(logic [31:0] a);
    if (mem.exists(a[31:2])) return mem[a[31:2]];
    return '0;
  endfunction

  always @(posedge clk) begin
    rsp.ack <= 1'b0;
    if (req.req && !rsp.ack) begin
      cnt = busy ? cnt + 1 : 1;
      busy = 1'b1;
      if (cnt >= (req.we ? WR_LAT : RD_LAT)) begin
        busy = 1'b0;
        rsp.ack <= 1'b1;
        if (req.we) begin
          mem[req.addr[31:2]] = req.wdata;
          n_writes++;
          rsp.rdata <= '0;
        end else begin
          rsp.rdata <= rd(req.addr);
          n_reads++;
        end
      end
    end else if (!req.req) begin
      busy = 1'b0;
    end
  end

endmodule
