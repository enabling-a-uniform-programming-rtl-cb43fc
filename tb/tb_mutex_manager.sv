// tb_mutex_manager: self-checking testbench of the Mutex Manager.
//
// Directed part: grant, re-lock error, queueing of two waiters, trylock,
// unlock by a non-owner, hand-over in FIFO order with the wake-up offered to
// the scheduler (held while the scheduler is not ready, new requests stalled
// meanwhile), owner query, out-of-range mutex, writes ignored, and the
// two-cycle answer time. Random part: 2000 operations by 8 threads on 4
// mutexes against a reference model (a blocked thread issues nothing until it
// is woken, as a real thread would).
module tb_mutex_manager;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;
  logic             ack_wv;   // wake-up state seen in the answer cycle
  logic [7:0]       ack_wt;

  bus_req_t         s_req;
  bus_rsp_t         s_rsp;
  logic             wake_valid, wake_ready;
  logic [TID_W-1:0] wake_tid;

  mutex_manager dut (.clk, .rst_n, .s_req, .s_rsp, .wake_valid, .wake_tid, .wake_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // one service load; returns the answer, the latency and whether a wake-up
  // was raised together with the answer
  task automatic mm(input mutex_op_e op, input int tid, input int mid,
                    output logic [31:0] r, output int unsigned lat);
    int unsigned t0;
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: 1'b0,
              addr: svc_addr(MUTEX_BASE, op, TID_W'(tid), 8'(mid)), wdata: '0};
    t0 = cyc;
    do @(negedge clk); while (!s_rsp.ack);
    r = s_rsp.rdata;
    lat = cyc - t0;
    ack_wv = wake_valid;
    ack_wt = wake_tid;
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model for the random part
  int          ref_owner  [4];
  bit          ref_locked [4];
  int          ref_q      [4][$];
  bit          blocked    [8];

  function automatic bit owns_any(int t);
    for (int k = 0; k < 4; k++) if (ref_locked[k] && ref_owner[k] == t) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    logic [31:0] r;
    int unsigned lat;
    s_req = BUS_REQ_IDLE;
    wake_ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    mm(MUTEX_OP_LOCK, 1, 0, r, lat);
    check(r == MUTEX_GRANTED, "free mutex is granted");
    check(lat == 2, $sformatf("answer two cycles after request (got %0d)", lat));
    mm(MUTEX_OP_OWNER, 9, 0, r, lat);
    check(r == 32'h8000_0001, "owner query: locked by thread 1");
    mm(MUTEX_OP_LOCK, 1, 0, r, lat);
    check(r == MUTEX_ERROR, "re-lock by the owner is an error");
    mm(MUTEX_OP_LOCK, 2, 0, r, lat);
    check(r == MUTEX_BLOCKED, "second locker is blocked");
    mm(MUTEX_OP_LOCK, 3, 0, r, lat);
    check(r == MUTEX_BLOCKED, "third locker is blocked");
    mm(MUTEX_OP_TRYLOCK, 4, 0, r, lat);
    check(r == MUTEX_BLOCKED, "trylock on a taken mutex answers busy");
    mm(MUTEX_OP_UNLOCK, 2, 0, r, lat);
    check(r == MUTEX_ERROR, "unlock by a non-owner is an error");
    check(!wake_valid, "no wake-up without a hand-over");

    wake_ready = 1'b0;
    mm(MUTEX_OP_UNLOCK, 1, 0, r, lat);
    check(r == MUTEX_GRANTED, "owner unlock succeeds");
    check(wake_valid && wake_tid == 2, "oldest waiter (2) is woken");
    // a request while the wake-up is pending waits for the scheduler
    fork
      begin
        mm(MUTEX_OP_LOCK, 5, 1, r, lat);
      end
      begin
        repeat (6) @(negedge clk);
        check(wake_valid && wake_tid == 2, "wake-up held until taken");
        wake_ready = 1'b1;
      end
    join
    check(lat > 6, "request stalled while the wake-up was pending");
    check(r == MUTEX_GRANTED, "stalled lock of a free mutex then granted");
    check(!wake_valid, "wake-up taken");
    mm(MUTEX_OP_OWNER, 9, 0, r, lat);
    check(r == 32'h8000_0002, "ownership handed to thread 2");
    mm(MUTEX_OP_UNLOCK, 2, 0, r, lat);
    check(r == MUTEX_GRANTED && ack_wv && ack_wt == 3, "then thread 3 is woken");
    mm(MUTEX_OP_UNLOCK, 3, 0, r, lat);
    check(r == MUTEX_GRANTED && !ack_wv, "last owner unlocks, nobody to wake");
    mm(MUTEX_OP_OWNER, 9, 0, r, lat);
    check(r[31] == 1'b0, "mutex 0 free again");
    mm(MUTEX_OP_TRYLOCK, 4, 0, r, lat);
    check(r == MUTEX_GRANTED, "trylock on a free mutex is granted");
    mm(MUTEX_OP_UNLOCK, 4, 0, r, lat);
    mm(MUTEX_OP_UNLOCK, 5, 1, r, lat);
    mm(MUTEX_OP_LOCK, 1, 64, r, lat);
    check(r == MUTEX_ERROR, "mutex number out of range is an error");
    // a write is acknowledged and changes nothing
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: 1'b1,
              addr: svc_addr(MUTEX_BASE, MUTEX_OP_LOCK, 8'd1, 8'd2), wdata: '1};
    do @(negedge clk); while (!s_rsp.ack);
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
    mm(MUTEX_OP_OWNER, 9, 2, r, lat);
    check(r[31] == 1'b0, "a bus write does not lock");

    // ---------------- random part ----------------
    for (int m = 0; m < 4; m++) begin
      ref_locked[m] = 1'b0;
      ref_owner[m]  = 0;
    end
    for (int t = 0; t < 8; t++) blocked[t] = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      int t, m, op;
      logic [31:0] exp;
      int exp_wake;
      // owners never block (no lock cycles), so some unlock is always possible
      m = $urandom_range(0, 3);
      if (ref_locked[m] && $urandom_range(0, 1) == 1) begin
        t = ref_owner[m];
        op = 1;
      end else begin
        t = $urandom_range(0, 7);
        op = $urandom_range(0, 2);
        if (blocked[t] || (op == 0 && owns_any(t) && !(ref_locked[m] && ref_owner[m] == t)))
          continue;
      end
      exp_wake = -1;
      if (op == 0 || op == 2) begin
        if (!ref_locked[m]) begin
          ref_locked[m] = 1'b1; ref_owner[m] = t; exp = MUTEX_GRANTED;
        end else if (ref_owner[m] == t) exp = MUTEX_ERROR;
        else begin
          exp = MUTEX_BLOCKED;
          if (op == 0) begin ref_q[m].push_back(t); blocked[t] = 1'b1; end
        end
      end else begin
        if (ref_locked[m] && ref_owner[m] == t) begin
          exp = MUTEX_GRANTED;
          if (ref_q[m].size() == 0) ref_locked[m] = 1'b0;
          else begin
            ref_owner[m] = ref_q[m].pop_front();
            blocked[ref_owner[m]] = 1'b0;
            exp_wake = ref_owner[m];
          end
        end else exp = MUTEX_ERROR;
      end
      mm(op == 0 ? MUTEX_OP_LOCK : op == 1 ? MUTEX_OP_UNLOCK : MUTEX_OP_TRYLOCK,
         t, m, r, lat);
      check(r == exp, $sformatf("random op %0d thread %0d mutex %0d: got %0d want %0d",
                                op, t, m, r, exp));
      if (exp_wake >= 0)
        check(ack_wv && int'(ack_wt) == exp_wake, "random hand-over wakes the right thread");
      else
        check(!ack_wv, "random: no spurious wake-up");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
