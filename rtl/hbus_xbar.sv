// hbus_xbar: the shared system bus of the hthreads system.
//
// Joins NUM_M bus masters (the CPU side and every HWTI) to NUM_S slaves (the
// HWTI register files, the Mutex Manager, the Thread Manager, global memory)
// over one shared single-beat bus: one transfer at a time.
//   Arbitration: round robin. In IDLE the first requesting master after the
//   one served last is granted; the grant is held until the addressed slave
//   acknowledges, then the bus returns to IDLE.
//   Decoding: the granted address goes to the lowest-numbered slave j with
//   (addr & SLV_MASK[j]) == SLV_BASE[j]; a slave with mask 0 catches every
//   address and so serves as the default (global memory, last in the list).
//   An address that matches no slave is answered by the bus itself with
//   rdata 0 so that no master can hang.
// Timing: one cycle of arbitration, after which the slave sees the request;
// the slave's ack passes back to the master in the same cycle.
// Protocol (hthreads_pkg): a master holds req, we, addr and wdata until ack
// and drops req in the cycle after it.
// The design only names its system bus (a vendor bus and bus attachment);
// this arbiter and decoder are the simplest bus that serves it.
module hbus_xbar
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_M = 4,
  parameter int unsigned NUM_S = 6,
  parameter logic [NUM_S-1:0][ADDR_W-1:0] SLV_BASE =
    '{32'h0000_0000, 32'h3000_0000, 32'h2000_0000,
      32'h1000_0200, 32'h1000_0100, 32'h1000_0000},
  parameter logic [NUM_S-1:0][ADDR_W-1:0] SLV_MASK =
    '{32'h0000_0000, 32'hF000_0000, 32'hF000_0000,
      32'hFFFF_FF00, 32'hFFFF_FF00, 32'hFFFF_FF00}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  bus_req_t [NUM_M-1:0] m_req,
  output bus_rsp_t [NUM_M-1:0] m_rsp,
  output bus_req_t [NUM_S-1:0] s_req,
  input  bus_rsp_t [NUM_S-1:0] s_rsp
);

  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1;
  localparam int unsigned SW = $clog2(NUM_S + 1);

  logic          busy;
  logic [MW-1:0] grant;
  logic [MW-1:0] last;
  logic [MW-1:0] pick;
  logic          pick_valid;
  logic [SW-1:0] sel;       // NUM_S means "no slave"
  bus_req_t      g_req;
  logic          err_ack;

  // round-robin choice among the requesting masters
  always_comb begin
    pick       = last;
    pick_valid = 1'b0;
    for (int k = 1; k <= NUM_M; k++) begin
      int unsigned idx;
      idx = (32'(last) + k) % NUM_M;
      if (!pick_valid && m_req[idx].req) begin
        pick       = MW'(idx);
        pick_valid = 1'b1;
      end
    end
  end

  assign g_req = m_req[grant];

  // address decode of the granted request
  always_comb begin
    sel = SW'(NUM_S);
    for (int j = NUM_S - 1; j >= 0; j--) begin
      if ((g_req.addr & SLV_MASK[j]) == SLV_BASE[j]) sel = SW'(j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      grant   <= '0;
      last    <= MW'(NUM_M - 1);
      err_ack <= 1'b0;
    end else begin
      err_ack <= 1'b0;
      if (!busy) begin
        if (pick_valid) begin
          busy  <= 1'b1;
          grant <= pick;
        end
      end else begin
        if (sel == SW'(NUM_S)) begin
          if (!err_ack) err_ack <= 1'b1;
          else begin
            busy <= 1'b0;
            last <= grant;
          end
        end else if (s_rsp[sel].ack) begin
          busy <= 1'b0;
          last <= grant;
        end
      end
    end
  end

  always_comb begin
    for (int j = 0; j < NUM_S; j++) begin
      s_req[j] = BUS_REQ_IDLE;
      if (busy && sel == SW'(j)) s_req[j] = g_req;
    end
    for (int i = 0; i < NUM_M; i++) begin
      m_rsp[i] = BUS_RSP_IDLE;
      if (busy && grant == MW'(i)) begin
        if (sel == SW'(NUM_S)) m_rsp[i] = '{ack: err_ack, rdata: '0};
        else                   m_rsp[i] = s_rsp[sel];
      end
    end
  end

  // The granted master keeps its request until the transfer ends.
  a_grant_held: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> g_req.req);

endmodule
