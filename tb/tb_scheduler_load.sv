// tb_scheduler_load: the Scheduler at its default size with 2 to 250 active
// software threads.
//
// For each load N in {2, 10, 50, 100, 250}: N software threads with random
// priorities are made ready (through add and wake), then the CPU side takes
// them one by one with NEXT. Checked for every load: next_thread settles one
// cycle after the last thread became ready, every NEXT is answered two cycles
// after its request, the threads come out in priority order (lowest ID first
// within a priority), each exactly once, and an empty NEXT ends the round.
// It prints, per load, the decision time and the answer time, which must not
// depend on N: the property the scheduler timings of the design demonstrate
// for 2 to 250 threads.
module tb_scheduler_load;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  bus_req_t         s_req, m_req;
  bus_rsp_t         s_rsp, m_rsp;
  logic             add_valid, add_ready, wake_valid, wake_ready;
  logic [TID_W-1:0] add_tid, wake_tid;
  logic             next_valid, preempt;
  logic [TID_W-1:0] next_tid;

  scheduler dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp,
    .add_valid, .add_tid, .add_ready, .wake_valid, .wake_tid, .wake_ready,
    .next_valid, .next_tid, .preempt
  );

  assign m_rsp = BUS_RSP_IDLE;   // no hardware threads in this test

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic sc(input sched_op_e op, input int obj, input bit we, input logic [31:0] d,
                    output logic [31:0] r, output int unsigned lat);
    int unsigned t0;
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: we, addr: svc_addr(SCHED_BASE, op, 8'd0, 8'(obj)), wdata: d};
    t0 = cyc;
    do @(negedge clk); while (!s_rsp.ack);
    r = s_rsp.rdata;
    lat = cyc - t0;
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LOADS [5] = '{2, 10, 50, 100, 250};

  int prio_of [256];

  initial begin
    logic [31:0] r;
    int unsigned lat;
    s_req = BUS_REQ_IDLE;
    add_valid = 1'b0;
    wake_valid = 1'b0;
    add_tid = '0;
    wake_tid = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 250 software threads, IDs 1..250, random priorities 0..15
    for (int t = 1; t <= 250; t++) begin
      prio_of[t] = $urandom_range(15);
      sc(SCHED_OP_SET_SW, t, 1'b1, 32'(prio_of[t]), r, lat);
    end

    foreach (LOADS[l]) begin
      int n, best, got, decide, max_lat, prev_p, prev_t;
      int ids [$];
      bit seen [256];
      n = LOADS[l];
      // pick n distinct threads
      ids.delete();
      for (int t = 1; t <= 250; t++) ids.push_back(t);
      ids.shuffle();
      ids = ids[0:n-1];
      foreach (seen[i]) seen[i] = 1'b0;
      best = -1;
      // make them ready, alternating add and wake, one per cycle
      foreach (ids[i]) begin
        @(posedge clk); #1;
        add_valid = 1'b0;
        wake_valid = 1'b0;
        if (i % 2 == 0) begin
          add_valid = 1'b1;
          add_tid = 8'(ids[i]);
        end else begin
          wake_valid = 1'b1;
          wake_tid = 8'(ids[i]);
        end
        if (best < 0 || prio_of[ids[i]] < prio_of[best] ||
            (prio_of[ids[i]] == prio_of[best] && ids[i] < best)) best = ids[i];
      end
      @(posedge clk); #1;      // last ready event taken at this edge
      add_valid = 1'b0;
      wake_valid = 1'b0;
      decide = 1;
      @(posedge clk); #1;
      while (!(next_valid && int'(next_tid) == best) && decide < 50) begin
        @(posedge clk); #1;
        decide++;
      end
      check(decide == 1, $sformatf("N=%0d: next_thread one cycle after the last ready (%0d)",
                                   n, decide));
      // drain with NEXT
      max_lat = 0;
      prev_p = -1;
      prev_t = -1;
      for (int k = 0; k < n; k++) begin
        sc(SCHED_OP_NEXT, 0, 1'b0, '0, r, lat);
        if (int'(lat) > max_lat) max_lat = lat;
        got = int'(r[7:0]);
        check(r[31] && !seen[got] && got >= 1 && got <= 250,
              $sformatf("N=%0d: NEXT %0d gives a new ready thread (%0h)", n, k, r));
        seen[got] = 1'b1;
        check(prio_of[got] > prev_p || (prio_of[got] == prev_p && got > prev_t),
              $sformatf("N=%0d: thread %0d (priority %0d) in priority order", n, got, prio_of[got]));
        prev_p = prio_of[got];
        prev_t = got;
      end
      foreach (ids[i]) check(seen[ids[i]], $sformatf("N=%0d: thread %0d dispatched", n, ids[i]));
      check(max_lat == 2, $sformatf("N=%0d: every NEXT answered in 2 cycles (max %0d)", n, max_lat));
      sc(SCHED_OP_NEXT, 0, 1'b0, '0, r, lat);
      check(r[31] == 1'b0, $sformatf("N=%0d: ready set empty at the end", n));
      $display("load %3d threads: decision %0d cycle(s), NEXT answer %0d cycles", n, decide, max_lat);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
