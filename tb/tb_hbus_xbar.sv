// tb_hbus_xbar: self-checking testbench of the shared system bus.
//
// Three masters issue random reads and writes to the address regions of the
// default map (three HWTI windows, Mutex Manager, Thread Manager, memory).
// Every slave is a behavioural responder with its own random latency that
// answers a read with a value built from its own index and the address, so
// each answer shows which slave served it. Checks: routing of each transfer,
// write data and direction arriving unchanged, at most one slave addressed at
// a time, the single arbitration cycle, fair round-robin service when all
// masters keep requesting, and the bus's own answer for an unmapped address
// (a map without a default slave).
module tb_hbus_xbar;
  import hthreads_pkg::*;

  localparam int unsigned NM = 3, NS = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  bus_req_t [NM-1:0] m_req;
  bus_rsp_t [NM-1:0] m_rsp;
  bus_req_t [NS-1:0] s_req;
  bus_rsp_t [NS-1:0] s_rsp;

  hbus_xbar #(.NUM_M(NM), .NUM_S(NS)) dut (.clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp);

  // second instance: no default slave, so some addresses are unmapped
  bus_req_t [0:0] u_mreq;
  bus_rsp_t [0:0] u_mrsp;
  bus_req_t [0:0] u_sreq;
  bus_rsp_t [0:0] u_srsp;
  hbus_xbar #(.NUM_M(1), .NUM_S(1), .SLV_BASE(32'h2000_0000), .SLV_MASK(32'hF000_0000))
    dut_nodef (.clk, .rst_n, .m_req(u_mreq), .m_rsp(u_mrsp), .s_req(u_sreq), .s_rsp(u_srsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // expected slave of an address (independent of the DUT's decoder)
  function automatic int exp_slave(logic [31:0] a);
    if (a[31:8] == 24'h100000) return 0;
    if (a[31:8] == 24'h100001) return 1;
    if (a[31:8] == 24'h100002) return 2;
    if (a[31:28] == 4'h2) return 3;
    if (a[31:28] == 4'h3) return 4;
    return 5;
  endfunction

  function automatic logic [31:0] answer(int s, logic [31:0] a);
    return {s[3:0], a[27:0]} ^ 32'h5A5A_0000;
  endfunction

  // behavioural slaves
  int unsigned       scnt [NS];
  int unsigned       slat [NS];
  logic [31:0]       last_w_data [NS];
  logic [31:0]       last_w_addr [NS];
  for (genvar s = 0; s < NS; s++) begin : g_slv
    initial begin
      s_rsp[s] = BUS_RSP_IDLE;
      scnt[s] = 0;
      slat[s] = 1;
    end
    always @(posedge clk) begin
      s_rsp[s].ack <= 1'b0;
      if (s_req[s].req && !s_rsp[s].ack) begin
        scnt[s]++;
        if (scnt[s] >= slat[s]) begin
          scnt[s] = 0;
          slat[s] = $urandom_range(1, 4);
          s_rsp[s].ack <= 1'b1;
          if (s_req[s].we) begin
            last_w_data[s] = s_req[s].wdata;
            last_w_addr[s] = s_req[s].addr;
            s_rsp[s].rdata <= '0;
          end else s_rsp[s].rdata <= answer(s, s_req[s].addr);
        end
      end
    end
  end

  // at most one slave sees a request at a time
  always @(negedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int s = 0; s < NS; s++) if (s_req[s].req) n++;
    if (n > 1) begin
      failures++;
      $display("FAIL: %0d slaves addressed at once", n);
    end
  end

  function automatic logic [31:0] pick_addr();
    case ($urandom_range(0, 5))
      0: return 32'h1000_0000 | ($urandom_range(0, 63) << 2);
      1: return 32'h1000_0100 | ($urandom_range(0, 63) << 2);
      2: return 32'h1000_0200 | ($urandom_range(0, 63) << 2);
      3: return 32'h2000_0000 | ($urandom() & 32'h0FFF_FFFC);
      4: return 32'h3000_0000 | ($urandom() & 32'h0FFF_FFFC);
      default: return ($urandom() & 32'h0FFF_FFFC) | 32'h4000_0000;
    endcase
  endfunction

  int unsigned served [NM];
  bit          stop_all = 1'b0;

  for (genvar i = 0; i < NM; i++) begin : g_mst
    initial begin
      m_req[i] = BUS_REQ_IDLE;
      served[i] = 0;
      @(posedge rst_n);
      repeat (2) @(posedge clk);
      while (!stop_all) begin
        logic [31:0] a, d;
        bit we;
        int unsigned t0;
        a = pick_addr();
        we = $urandom_range(0, 1) == 1;
        d = $urandom();
        #1;
        m_req[i] = '{req: 1'b1, we: we, addr: a, wdata: d};
        t0 = cyc;
        do @(negedge clk); while (!m_rsp[i].ack);
        served[i]++;
        if (we) begin
          check(last_w_addr[exp_slave(a)] == a && last_w_data[exp_slave(a)] == d,
                $sformatf("master %0d write to %h reaches slave %0d", i, a, exp_slave(a)));
        end else begin
          check(m_rsp[i].rdata == answer(exp_slave(a), a),
                $sformatf("master %0d read of %h served by slave %0d", i, a, exp_slave(a)));
        end
        check(cyc - t0 >= 2, "at least one arbitration cycle before the slave's answer");
        @(posedge clk);
        #1 m_req[i] = BUS_REQ_IDLE;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u_mreq[0] = BUS_REQ_IDLE;
    u_srsp[0] = BUS_RSP_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    stop_all = 1'b1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < NM; i++) begin
      check(served[i] > 100, $sformatf("master %0d served %0d times", i, served[i]));
      check(served[i] + 2 >= served[(i + 1) % NM] && served[(i + 1) % NM] + 2 >= served[i],
            "round robin keeps the masters within two transfers of each other");
    end

    // unmapped address on a map without default slave: the bus answers 0
    @(posedge clk); #1;
    u_mreq[0] = '{req: 1'b1, we: 1'b0, addr: 32'h7000_0000, wdata: '0};
    begin
      int unsigned t0;
      t0 = cyc;
      do @(negedge clk); while (!u_mrsp[0].ack && cyc - t0 < 20);
      check(u_mrsp[0].ack && u_mrsp[0].rdata == 0, "unmapped address answered by the bus");
      check(!u_sreq[0].req, "unmapped address reaches no slave");
    end
    @(posedge clk); #1 u_mreq[0] = BUS_REQ_IDLE;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
