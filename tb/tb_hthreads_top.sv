// tb_hthreads_top: end-to-end test of the hthreads FPGA side at its default
// size (two hardware mutexAdd threads, one simple_thread, Mutex Manager,
// Thread Manager and Scheduler).
//
// The testbench models what lies outside the FPGA fabric:
//   * the CPU on the host bus port. Its main thread (ID 0) creates every
//     thread through the Thread Manager, writes a hardware thread's thread_id
//     and argument into its HWTI and registers it with the Scheduler, gives a
//     software thread its priority, readies each with add_thread, and joins
//     on all of them. A software mutexAdd thread works on the same vectors
//     through the same Mutex Manager. Context switches are modelled by a
//     dispatcher that takes next_thread from the Scheduler (NEXT) whenever one
//     is ready and resumes that software thread; software threads run side
//     by side rather than time-sliced;
//   * global memory (tb_bus_mem) with 9-cycle reads and 28-cycle writes.
// Workload: the matrix add of SIZE elements shared by the three workers,
// Z = X + Y, with the struct matrix in memory. Afterwards the simple_thread's
// HWTI is RESET, re-created with a new thread ID and argument and run again.
// Checks: every Z element, the workers' shares add up to SIZE, each thread's
// exit value and status, the re-created thread's result, and that each
// mechanism occurred: CREATE, add_thread, RUN sent by the Scheduler, LOAD,
// STORE, MUTEX_LOCK granted and blocked (BLOCKED status), hand-over wake-up
// and resume by the Scheduler's RUN, software resume through next_thread,
// preempt, MUTEX_UNLOCK, YIELD, EXIT, JOIN that had to wait and JOIN that did
// not, RESET, and bus contention between masters.
module tb_hthreads_top;
  import hthreads_pkg::*;

  localparam int unsigned SIZE     = 100;
  localparam int unsigned NHW      = 3;          // HWTIs in the default top
  localparam int unsigned BOUND    = 50;         // simple_thread argument
  localparam logic [31:0] STRUCT   = 32'h0000_1000;
  localparam logic [31:0] XB = 32'h0001_0000, YB = 32'h0002_0000, ZB = 32'h0003_0000;
  localparam logic [7:0]  MAIN_TID = 8'h00;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  bus_req_t         host_req, mem_req;
  bus_rsp_t         host_rsp, mem_rsp;
  logic             next_valid, preempt;
  logic [TID_W-1:0] next_tid;

  hthreads_top dut (.clk, .rst_n, .host_req, .host_rsp, .mem_req, .mem_rsp,
                    .next_valid, .next_tid, .preempt);

  tb_bus_mem #(.RD_LAT(9), .WR_LAT(28)) u_mem (.clk, .req(mem_req), .rsp(mem_rsp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---------------- host bus port, shared by the CPU-side processes -------
  bit host_lock = 1'b0;
  task automatic host_xfer(input bit we, input logic [31:0] a, input logic [31:0] d,
                           output logic [31:0] r);
    while (host_lock) @(posedge clk);
    host_lock = 1'b1;
    @(posedge clk); #1;
    host_req = '{req: 1'b1, we: we, addr: a, wdata: d};
    do @(negedge clk); while (!host_rsp.ack);
    r = host_rsp.rdata;
    @(posedge clk); #1;
    host_req = BUS_REQ_IDLE;
    host_lock = 1'b0;
  endtask

  function automatic logic [31:0] hwti_reg(int k, logic [2:0] off);
    return HWTI_BASE + 32'(k) * HWTI_SPAN + {27'd0, off, 2'b00};
  endfunction

  function automatic logic [31:0] tm_call(tm_op_e op, logic [7:0] caller, logic [7:0] obj);
    return svc_addr(TM_BASE, op, caller, obj);
  endfunction

  function automatic logic [31:0] sched_call(sched_op_e op, logic [7:0] obj);
    return svc_addr(SCHED_BASE, op, 8'd0, obj);
  endfunction

  // ---------------- CPU context switches ----------------
  // Whenever the Scheduler has a next_thread, the CPU switches to it.
  bit woken [256];
  int n_dispatch = 0;
  initial begin
    foreach (woken[i]) woken[i] = 1'b0;
    forever begin
      logic [31:0] r;
      @(posedge clk);
      if (rst_n && next_valid) begin
        host_xfer(1'b0, sched_call(SCHED_OP_NEXT, 8'd0), '0, r);
        if (r[31]) begin
          woken[r[7:0]] = 1'b1;
          n_dispatch++;
        end
      end
    end
  end

  task automatic wait_woken(input logic [7:0] t);
    while (!woken[t]) @(posedge clk);
    woken[t] = 1'b0;
  endtask

  // join: returns when thread t has exited
  int n_join_wait = 0, n_join_now = 0;
  task automatic join_thread(input logic [7:0] t);
    logic [31:0] r;
    host_xfer(1'b0, tm_call(TM_OP_JOIN, MAIN_TID, t), '0, r);
    if (r == TM_WAIT) begin
      n_join_wait++;
      wait_woken(MAIN_TID);
    end else begin
      check(r == TM_OK, $sformatf("JOIN on thread %0d answered OK or WAIT", t));
      n_join_now++;
    end
  endtask

  // ---------------- mechanism monitors ----------------
  int n_blocked = 0, n_yield = 0, n_load = 0, n_store = 0, n_lock = 0, n_unlock = 0;
  int n_contend = 0, n_exit = 0, n_wake = 0, n_add = 0, n_run = 0, n_preempt = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.wake_valid && dut.wake_ready) n_wake++;
    if (dut.add_valid && dut.add_ready) n_add++;
    if (dut.m_req[NHW + 1].req && dut.m_rsp[NHW + 1].ack) n_run++;
    if (preempt && !$past(preempt)) n_preempt++;
  end
  sys_status_e prev_st [NHW];
  for (genvar k = 0; k < NHW; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_thread[k].u_hwti.u_sys.status == ST_BLOCKED && prev_st[k] != ST_BLOCKED)
        n_blocked++;
      prev_st[k] <= dut.g_thread[k].u_hwti.u_sys.status;
      if (dut.g_thread[k].u_hwti.u_ctrl.call_take)
        case (dut.g_thread[k].u_hwti.user_opcode)
          OP_HTHREAD_YIELD:        n_yield++;
          OP_LOAD:                 n_load++;
          OP_STORE:                n_store++;
          OP_HTHREAD_MUTEX_LOCK:   n_lock++;
          OP_HTHREAD_MUTEX_UNLOCK: n_unlock++;
          OP_HTHREAD_EXIT:         n_exit++;
          default: ;
        endcase
    end
  end
  always @(posedge clk) if (rst_n) begin
    int n;
    n = 0;
    for (int i = 0; i < NHW + 2; i++) if (dut.m_req[i].req) n++;
    if (n > 1) n_contend++;
  end

  // ---------------- software mutexAdd thread (on the CPU) ----------------
  int sw_done = 0;
  int n_sw_block = 0;
  task automatic sw_thread(input logic [7:0] me);
    logic [31:0] r, size, idx, x, y;
    wait_woken(me);   // first dispatched by the Scheduler
    host_xfer(1'b0, STRUCT, '0, size);
    idx = 0;
    while (idx < size) begin
      host_xfer(1'b0, svc_addr(MUTEX_BASE, MUTEX_OP_LOCK, me, 8'd0), '0, r);
      if (r == MUTEX_BLOCKED) begin
        n_sw_block++;
        wait_woken(me);
      end else check(r == MUTEX_GRANTED, "software lock answered GRANTED or BLOCKED");
      host_xfer(1'b0, STRUCT + 4, '0, idx);
      host_xfer(1'b1, STRUCT + 4, idx + 1, r);
      host_xfer(1'b0, svc_addr(MUTEX_BASE, MUTEX_OP_UNLOCK, me, 8'd0), '0, r);
      check(r == MUTEX_GRANTED, "software unlock accepted");
      if (idx < size) begin
        host_xfer(1'b0, XB + (idx << 2), '0, x);
        host_xfer(1'b0, YB + (idx << 2), '0, y);
        host_xfer(1'b1, ZB + (idx << 2), x + y, r);
        sw_done++;
        repeat (40) @(posedge clk);   // a slower software thread
      end
    end
    host_xfer(1'b0, tm_call(TM_OP_EXIT, me, 8'd0), '0, r);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [31:0] xv [SIZE];
    logic [31:0] yv [SIZE];
    int unsigned hw_share [2];
    int unsigned t_start;
    logic [7:0] hw_tid [NHW];
    logic [7:0] sw_tid;
    host_req = BUS_REQ_IDLE;

    // global data: struct matrix and the X, Y vectors
    u_mem.mem[STRUCT[31:2]]     = SIZE;
    u_mem.mem[STRUCT[31:2] + 1] = 0;
    u_mem.mem[STRUCT[31:2] + 2] = XB;
    u_mem.mem[STRUCT[31:2] + 3] = YB;
    u_mem.mem[STRUCT[31:2] + 4] = ZB;
    for (int i = 0; i < SIZE; i++) begin
      xv[i] = $urandom();
      yv[i] = $urandom();
      u_mem.mem[XB[31:2] + i] = xv[i];
      u_mem.mem[YB[31:2] + i] = yv[i];
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // main thread: create the hardware threads
    host_xfer(1'b1, sched_call(SCHED_OP_SET_SW, MAIN_TID), 32'd5, r);
    for (int k = 0; k < NHW; k++) begin
      host_xfer(1'b0, tm_call(TM_OP_CREATE, MAIN_TID, 8'd0), '0, r);
      check(r[31] == 1'b0, "CREATE gave a thread ID");
      hw_tid[k] = r[7:0];
      host_xfer(1'b1, hwti_reg(k, REG_THREAD_ID), 32'(hw_tid[k]), r);
      host_xfer(1'b1, hwti_reg(k, REG_ARGUMENT), (k < 2) ? STRUCT : BOUND, r);
      host_xfer(1'b1, sched_call(SCHED_OP_SET_HW, hw_tid[k]), hwti_reg(k, 3'd0), r);
      host_xfer(1'b0, hwti_reg(k, REG_STATUS), '0, r);
      check(r == 32'(ST_USED), $sformatf("HWTI %0d USED after creation", k));
    end
    // and the software thread, priority 1 (above the main thread's 5)
    host_xfer(1'b0, tm_call(TM_OP_CREATE, MAIN_TID, 8'd0), '0, r);
    sw_tid = r[7:0];
    host_xfer(1'b1, sched_call(SCHED_OP_SET_SW, sw_tid), 32'd1, r);
    fork sw_thread(sw_tid); join_none
    t_start = cyc;
    // add_thread: the Scheduler starts the hardware threads with RUN
    for (int k = 0; k < NHW; k++)
      host_xfer(1'b0, tm_call(TM_OP_ADD, MAIN_TID, hw_tid[k]), '0, r);
    host_xfer(1'b0, tm_call(TM_OP_ADD, MAIN_TID, sw_tid), '0, r);
    repeat (20) @(posedge clk);
    for (int k = 0; k < NHW; k++) begin
      host_xfer(1'b0, hwti_reg(k, REG_STATUS), '0, r);
      check(r == 32'(ST_RUNNING) || r == 32'(ST_BLOCKED) || r == 32'(ST_EXITED),
            $sformatf("HWTI %0d started by the Scheduler", k));
    end

    // join on every thread
    for (int k = 0; k < NHW; k++) join_thread(hw_tid[k]);
    join_thread(sw_tid);
    $display("matrix add of %0d elements done in %0d cycles", SIZE, cyc - t_start);

    for (int k = 0; k < 2; k++) begin
      host_xfer(1'b0, hwti_reg(k, REG_STATUS), '0, r);
      check(r == 32'(ST_EXITED), $sformatf("mutexAdd thread %0d EXITED", k));
      host_xfer(1'b0, hwti_reg(k, REG_RESULT), '0, r);
      hw_share[k] = r;
    end
    $display("shares: hw0=%0d hw1=%0d sw=%0d", hw_share[0], hw_share[1], sw_done);
    check(hw_share[0] + hw_share[1] + sw_done == SIZE, "the three shares add up to SIZE");
    check(hw_share[0] > 0 && hw_share[1] > 0, "both hardware threads did work");
    for (int i = 0; i < SIZE; i++)
      check(u_mem.rd(ZB + 4 * i) == xv[i] + yv[i], $sformatf("Z[%0d] = X[%0d] + Y[%0d]", i, i, i));
    check(u_mem.rd(STRUCT + 4) == SIZE + 3, "shared index: one final draw per worker");

    host_xfer(1'b0, hwti_reg(2, REG_RESULT), '0, r);
    check(r == BOUND, "simple_thread returns its bound");
    host_xfer(1'b0, hwti_reg(2, REG_STATUS), '0, r);
    check(r == 32'(ST_EXITED), "simple_thread EXITED");

    // RESET and re-create the simple thread with a new ID and argument
    host_xfer(1'b1, hwti_reg(2, REG_COMMAND), 32'(CMD_RESET), r);
    host_xfer(1'b0, hwti_reg(2, REG_STATUS), '0, r);
    check(r == 32'(ST_NOT_USED), "RESET returns the HWTI to NOT_USED");
    check(dut.g_thread[2].status == 4'(USER_STATUS_RESET), "RESET reaches the user logic");
    host_xfer(1'b0, tm_call(TM_OP_CREATE, MAIN_TID, 8'd0), '0, r);
    check(r[31] == 1'b0, "CREATE after the joins gave a thread ID");
    hw_tid[2] = r[7:0];
    host_xfer(1'b1, hwti_reg(2, REG_THREAD_ID), 32'(hw_tid[2]), r);
    host_xfer(1'b1, hwti_reg(2, REG_ARGUMENT), 32'd7, r);
    host_xfer(1'b1, sched_call(SCHED_OP_SET_HW, hw_tid[2]), hwti_reg(2, 3'd0), r);
    host_xfer(1'b0, tm_call(TM_OP_ADD, MAIN_TID, hw_tid[2]), '0, r);
    join_thread(hw_tid[2]);
    host_xfer(1'b0, hwti_reg(2, REG_RESULT), '0, r);
    check(r == 7, "re-created thread runs with its new argument");
    host_xfer(1'b0, hwti_reg(2, REG_THREAD_ID), '0, r);
    check(r == 32'(hw_tid[2]), "re-created thread has its new ID");

    // mechanisms
    $display("mechanisms: blocked=%0d wake=%0d add=%0d run=%0d sw_block=%0d dispatch=%0d preempt=%0d lock=%0d unlock=%0d load=%0d store=%0d yield=%0d exit=%0d join_wait=%0d join_now=%0d contention=%0d",
             n_blocked, n_wake, n_add, n_run, n_sw_block, n_dispatch, n_preempt, n_lock,
             n_unlock, n_load, n_store, n_yield, n_exit, n_join_wait, n_join_now, n_contend);
    check(n_blocked > 0, "a hardware thread was BLOCKED on the mutex");
    check(n_wake > 0, "the Mutex Manager handed the mutex over");
    check(n_run > NHW + 1, "the Scheduler resumed a blocked hardware thread with RUN");
    check(n_add == NHW + 2 + n_join_wait, "add_thread and waiting joins reached the Scheduler");
    check(n_sw_block > 0, "the software thread blocked and was resumed via next_thread");
    check(n_dispatch == 1 + n_sw_block + n_join_wait, "every ready software thread was dispatched once");
    check(n_preempt > 0, "preempt was raised");
    check(n_lock > 0 && n_unlock == n_lock, "hardware LOCKs and UNLOCKs pair up");
    check(n_load > 0 && n_store > 0, "hardware LOADs and STOREs");
    check(n_yield == hw_share[0] + hw_share[1], "one YIELD per hardware element");
    check(n_exit == 4, "four hardware HTHREAD_EXIT calls");
    check(n_join_wait > 0, "a JOIN had to wait for its child");
    check(n_join_now > 0, "a JOIN found its child already exited");
    check(n_contend > 0, "bus masters contended");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
