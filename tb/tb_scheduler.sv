// tb_scheduler: self-checking testbench of the Scheduler.
//
// A small bus slave stands in for the HWTIs and records every command write.
// Checked: a hardware thread made ready (by add or by wake) is dispatched
// with one RUN write to its own HWTI's command register, several ready
// together are all dispatched once each; software threads wait in the
// ready-to-run set, next_thread is the highest-priority one (lowest ID on a
// tie) one cycle after it became ready, NEXT takes it and makes it the running
// thread, PEEK does not, preempt is raised only while a ready thread has a
// higher priority than the running one, an empty NEXT answers not-valid, the
// two-cycle answer time, and add and wake in the same cycle. Random part:
// 300 rounds of random priorities and ready events against a reference model.
module tb_scheduler;
  import hthreads_pkg::*;

  localparam int unsigned NT = 32;

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

  scheduler #(.NUM_THREADS(NT)) dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp,
    .add_valid, .add_tid, .add_ready, .wake_valid, .wake_tid, .wake_ready,
    .next_valid, .next_tid, .preempt
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // HWTI stand-in: acknowledges after 3 cycles, records command writes
  logic [31:0] runs [$];
  int          wait_n = 0;
  initial m_rsp = BUS_RSP_IDLE;
  always @(posedge clk) begin
    m_rsp.ack <= 1'b0;
    if (m_req.req && !m_rsp.ack) begin
      if (wait_n == 2) begin
        m_rsp.ack <= 1'b1;
        wait_n    <= 0;
        if (m_req.we && m_req.wdata == 32'(CMD_RUN)) runs.push_back(m_req.addr);
      end else wait_n <= wait_n + 1;
    end
  end

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

  task automatic add(input int t);
    @(posedge clk); #1;
    add_valid = 1'b1;
    add_tid = 8'(t);
    @(posedge clk); #1;
    add_valid = 1'b0;
  endtask

  task automatic wake(input int t);
    @(posedge clk); #1;
    wake_valid = 1'b1;
    wake_tid = 8'(t);
    @(posedge clk); #1;
    wake_valid = 1'b0;
  endtask

  function automatic logic [31:0] cmd_addr(int k);
    return HWTI_BASE + 32'(k) * HWTI_SPAN + 32'(REG_COMMAND) * 4;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_prio [NT];
  bit ref_ready [NT];

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

    check(!next_valid && !preempt, "nothing ready after reset");
    sc(SCHED_OP_NEXT, 0, 1'b0, '0, r, lat);
    check(r[31] == 1'b0, "empty NEXT answers not valid");
    check(lat == 2, $sformatf("answer two cycles after req (got %0d)", lat));

    // hardware threads 5 and 9 behind HWTI 0 and 2
    sc(SCHED_OP_SET_HW, 5, 1'b1, HWTI_BASE, r, lat);
    sc(SCHED_OP_SET_HW, 9, 1'b1, HWTI_BASE + 2 * HWTI_SPAN, r, lat);
    add(5);
    repeat (12) @(posedge clk);
    check(runs.size() == 1 && runs[0] == cmd_addr(0), "added hardware thread gets RUN");
    check(!next_valid, "a hardware thread never waits for the CPU");
    runs.delete();
    wake(9);
    repeat (12) @(posedge clk);
    check(runs.size() == 1 && runs[0] == cmd_addr(2), "woken hardware thread gets RUN");
    runs.delete();
    // both at once: add and wake in the same cycle
    @(posedge clk); #1;
    add_valid = 1'b1; add_tid = 8'd9;
    wake_valid = 1'b1; wake_tid = 8'd5;
    @(posedge clk); #1;
    add_valid = 1'b0; wake_valid = 1'b0;
    repeat (20) @(posedge clk);
    check(runs.size() == 2 && runs[0] == cmd_addr(0) && runs[1] == cmd_addr(2),
          "two hardware threads ready together are each dispatched once, in ID order");
    runs.delete();

    // software threads 1 (priority 3), 2 (priority 1), 3 (priority 1)
    sc(SCHED_OP_SET_SW, 1, 1'b1, 32'd3, r, lat);
    sc(SCHED_OP_SET_SW, 2, 1'b1, 32'd1, r, lat);
    sc(SCHED_OP_SET_SW, 3, 1'b1, 32'd1, r, lat);
    add(1);
    @(posedge clk); #1;
    check(next_valid && next_tid == 1, "next_thread one cycle after the thread became ready");
    check(preempt, "preempt while the CPU runs nothing");
    sc(SCHED_OP_NEXT, 0, 1'b0, '0, r, lat);
    check(r == {1'b1, 23'd0, 8'd1}, "NEXT takes thread 1");
    repeat (2) @(posedge clk);
    check(!next_valid && !preempt, "ready set empty after NEXT");
    add(3);
    wake(2);
    @(posedge clk); #1;
    check(next_valid && next_tid == 2, "lowest ID wins a priority tie");
    check(preempt, "preempt: ready priority 1 beats running priority 3");
    sc(SCHED_OP_PEEK, 0, 1'b0, '0, r, lat);
    check(r == {1'b1, 23'd0, 8'd2}, "PEEK shows thread 2");
    sc(SCHED_OP_NEXT, 0, 1'b0, '0, r, lat);
    check(r == {1'b1, 23'd0, 8'd2}, "NEXT takes thread 2");
    repeat (2) @(posedge clk);
    check(next_valid && next_tid == 3, "thread 3 is next");
    check(!preempt, "no preempt: equal priority does not interrupt");
    add(1);
    repeat (2) @(posedge clk);
    check(next_tid == 3 && !preempt, "a lower-priority ready thread does not interrupt");
    check(runs.size() == 0, "software threads are never sent RUN");

    // random part: software threads only
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (ref_ready[i]) begin
      ref_ready[i] = 1'b0;
      ref_prio[i] = $urandom_range(7);
      sc(SCHED_OP_SET_SW, i, 1'b1, 32'(ref_prio[i]), r, lat);
    end
    for (int n = 0; n < 300; n++) begin
      int bt, bp, k;
      k = $urandom_range(3);
      for (int j = 0; j < k; j++) begin
        int t;
        t = $urandom_range(NT - 1);
        ref_ready[t] = 1'b1;
        if ($urandom_range(1)) add(t);
        else wake(t);
      end
      if ($urandom_range(3) == 0) begin
        int t;
        t = $urandom_range(NT - 1);
        ref_prio[t] = $urandom_range(7);
        sc(SCHED_OP_SET_SW, t, 1'b1, 32'(ref_prio[t]), r, lat);
      end
      bt = -1;
      bp = 99;
      foreach (ref_ready[i]) if (ref_ready[i] && ref_prio[i] < bp) begin
        bt = i;
        bp = ref_prio[i];
      end
      sc(SCHED_OP_NEXT, 0, 1'b0, '0, r, lat);
      if (bt < 0) check(r[31] == 1'b0, "random: empty NEXT");
      else begin
        check(r == {1'b1, 23'd0, 8'(bt)},
              $sformatf("random: NEXT %0h, expected thread %0d", r, bt));
        ref_ready[bt] = 1'b0;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
