// tb_hwti: self-checking testbench of the hardware thread interface.
//
// The testbench plays three parts: the system services writing the HWTI's
// system registers over its slave port, a user thread issuing system calls
// (one-cycle opcode strobes) on the user interface, and the bus on the master
// port (global memory, Mutex Manager and Thread Manager with fixed
// latencies). It checks every register, every Table-1 system call, thread
// creation, RUN, BLOCKED and resume, EXIT and RESET, and the cycle counts:
// for the bus latencies chosen here (read 9, write 28, mutex 15, exit 16
// cycles) LOAD, STORE, MUTEX_LOCK/UNLOCK and EXIT take exactly the
// 14 / 33 / 20 / 20 / 20 cycles of the published operation timing; calls and
// commands that need no bus are checked against their (shorter) cycle counts
// in this implementation and against the published upper figures.
module tb_hwti;
  import hthreads_pkg::*;

  localparam int unsigned RD_LAT = 9, WR_LAT = 28, MTX_LAT = 15, TM_LAT = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  bus_req_t s_req, m_req;
  bus_rsp_t s_rsp, m_rsp;
  logic [USTAT_W-1:0]  ustat;
  logic [DATA_W-1:0]   ures;
  logic [OPCODE_W-1:0] opcode;
  logic [DATA_W-1:0]   a1, a2;

  hwti dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp,
    .intrfc2thrd_status(ustat), .intrfc2thrd_result(ures),
    .thrd2intrfc_opcode(opcode),
    .thrd2intrfc_argument_one(a1), .thrd2intrfc_argument_two(a2)
  );

  // ---------------- bus responder on the master port ----------------
  logic [31:0] mem [logic [29:0]];
  logic [31:0] mutex_answer = MUTEX_GRANTED;
  logic [31:0] last_addr = '0;
  logic        last_we = 1'b0;
  int unsigned bcnt = 0;
  initial m_rsp = BUS_RSP_IDLE;

  function automatic int unsigned lat_of(bus_req_t r);
    if (r.addr[31:28] == MUTEX_BASE[31:28]) return MTX_LAT;
    if (r.addr[31:28] == TM_BASE[31:28])    return TM_LAT;
    return r.we ? WR_LAT : RD_LAT;
  endfunction

  always @(posedge clk) begin
    m_rsp.ack <= 1'b0;
    if (m_req.req && !m_rsp.ack) begin
      bcnt = bcnt + 1;
      if (bcnt >= lat_of(m_req)) begin
        bcnt = 0;
        last_addr = m_req.addr;
        last_we   = m_req.we;
        m_rsp.ack <= 1'b1;
        if (m_req.addr[31:28] == MUTEX_BASE[31:28]) m_rsp.rdata <= mutex_answer;
        else if (m_req.addr[31:28] == TM_BASE[31:28]) m_rsp.rdata <= '0;
        else if (m_req.we) begin
          mem[m_req.addr[31:2]] = m_req.wdata;
          m_rsp.rdata <= '0;
        end else m_rsp.rdata <= mem.exists(m_req.addr[31:2]) ? mem[m_req.addr[31:2]] : '0;
      end
    end
  end

  // ---------------- helpers ----------------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic sys_write(input logic [2:0] off, input logic [31:0] d,
                           output int unsigned t0);
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: 1'b1, addr: HWTI_BASE | {27'd0, off, 2'b00}, wdata: d};
    t0 = cyc;
    do @(negedge clk); while (!s_rsp.ack);
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
  endtask

  task automatic sys_read(input logic [2:0] off, output logic [31:0] d);
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: 1'b0, addr: HWTI_BASE | {27'd0, off, 2'b00}, wdata: '0};
    do @(negedge clk); while (!s_rsp.ack);
    d = s_rsp.rdata;
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
  endtask

  // user-thread system call: opcode for one cycle, then wait for ACK and RUN
  task automatic ucall(input opcode_e op, input logic [31:0] x1, input logic [31:0] x2,
                       output logic [31:0] r, output int unsigned t_ack,
                       output int unsigned t_run);
    int unsigned t0;
    @(posedge clk); #1;
    opcode = op; a1 = x1; a2 = x2;
    t0 = cyc;
    @(posedge clk); #1;
    opcode = OP_NOOP;
    do @(negedge clk); while (ustat != USER_STATUS_ACK);
    r = ures;
    t_ack = cyc - t0;
    @(negedge clk);
    t_run = cyc - t0;
    check(ustat == USER_STATUS_RUN, "user_status back to RUN one cycle after ACK");
  endtask

  task automatic wait_cond_status(input sys_status_e s, input int unsigned t0,
                                  output int unsigned dt);
    int unsigned guard = 0;
    do begin @(negedge clk); guard++; end
    while (dut.u_sys.status != s && guard < 200);
    dt = cyc - t0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    int unsigned t0, dt, tack, trun;
    logic [31:0] r;
    s_req = BUS_REQ_IDLE;
    opcode = OP_NOOP; a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    sys_read(REG_STATUS, r);
    check(r == 32'(ST_NOT_USED), "status NOT_USED after start-up");
    check(ustat == USER_STATUS_RESET, "user_status RESET after start-up");

    // RUN before a thread ID is assigned is ignored
    sys_write(REG_COMMAND, 32'(CMD_RUN), t0);
    repeat (6) @(negedge clk);
    check(ustat == USER_STATUS_RESET, "RUN ignored while NOT_USED");

    // creation: thread ID -> USED
    sys_write(REG_THREAD_ID, 32'h2A, t0);
    wait_cond_status(ST_USED, t0, dt);
    check(dt == 2, $sformatf("thread_id write -> USED in 2 cycles (got %0d)", dt));
    check(dt <= 5, "thread_id write -> USED within published 5 cycles");
    sys_read(REG_THREAD_ID, r);
    check(r == 32'h2A, "thread_id reads back");

    sys_write(REG_ARGUMENT, 32'h1234_5678, t0);
    sys_read(REG_ARGUMENT, r);
    check(r == 32'h1234_5678, "argument reads back");

    // RUN: argument into user_result, then user_status RUN
    sys_write(REG_COMMAND, 32'(CMD_RUN), t0);
    do @(negedge clk); while (ustat != USER_STATUS_RUN);
    dt = cyc - t0;
    check(dt == 4, $sformatf("RUN -> user_status RUN in 4 cycles (got %0d)", dt));
    check(dt <= 5, "RUN within published 5 cycles");
    check(ures == 32'h1234_5678, "argument passed into user_result on RUN");
    sys_read(REG_STATUS, r);
    check(r == 32'(ST_RUNNING), "status RUNNING");
    sys_read(REG_COMMAND, r);
    check(r == 32'(CMD_RUN), "command register reads back RUN");

    // HTHREAD_SELF
    ucall(OP_HTHREAD_SELF, '0, '0, r, tack, trun);
    check(r == 32'h2A, "HTHREAD_SELF returns the thread ID");
    check(trun == 4, $sformatf("HTHREAD_SELF back to RUN in 4 cycles (got %0d)", trun));
    check(trun <= 5, "HTHREAD_SELF within published 5 cycles");

    // HTHREAD_YIELD
    ucall(OP_HTHREAD_YIELD, '0, '0, r, tack, trun);
    check(trun == 4, $sformatf("HTHREAD_YIELD back to RUN in 4 cycles (got %0d)", trun));

    // LOAD
    mem[30'h40] = 32'hDEAD_BEEF;
    ucall(OP_LOAD, 32'h0000_0100, '0, r, tack, trun);
    check(r == 32'hDEAD_BEEF, "LOAD returns the memory word");
    check(last_addr == 32'h100 && !last_we, "LOAD reads argument_one's address");
    check(trun == 5 + RD_LAT, $sformatf("LOAD cycles = 5 + bus read (got %0d)", trun));
    check(trun == 14, "LOAD matches published 14 cycles at this bus latency");

    // STORE
    ucall(OP_STORE, 32'h0000_0104, 32'hCAFE_F00D, r, tack, trun);
    check(mem.exists(30'h41) && mem[30'h41] == 32'hCAFE_F00D, "STORE writes argument_two");
    check(last_we, "STORE is a bus write");
    check(trun == 33, $sformatf("STORE matches published 33 cycles (got %0d)", trun));

    // MUTEX_LOCK granted
    mutex_answer = MUTEX_GRANTED;
    ucall(OP_HTHREAD_MUTEX_LOCK, 32'd3, '0, r, tack, trun);
    check(last_addr == svc_addr(MUTEX_BASE, MUTEX_OP_LOCK, 8'h2A, 8'd3),
          "MUTEX_LOCK encodes op, thread ID and mutex in the address");
    check(r == MUTEX_GRANTED, "MUTEX_LOCK granted result");
    check(trun == 20, $sformatf("MUTEX_LOCK matches published 20 cycles (got %0d)", trun));

    // MUTEX_UNLOCK
    ucall(OP_HTHREAD_MUTEX_UNLOCK, 32'd3, '0, r, tack, trun);
    check(last_addr == svc_addr(MUTEX_BASE, MUTEX_OP_UNLOCK, 8'h2A, 8'd3),
          "MUTEX_UNLOCK address");
    check(trun == 20, $sformatf("MUTEX_UNLOCK matches published 20 cycles (got %0d)", trun));

    // MUTEX_LOCK blocked, then resumed by a RUN command
    mutex_answer = MUTEX_BLOCKED;
    @(posedge clk); #1;
    opcode = OP_HTHREAD_MUTEX_LOCK; a1 = 32'd5;
    @(posedge clk); #1;
    opcode = OP_NOOP;
    t0 = cyc;
    wait_cond_status(ST_BLOCKED, t0, dt);
    check(dut.u_sys.status == ST_BLOCKED, "status BLOCKED while waiting for the mutex");
    begin
      bit saw_ack = 1'b0;
      repeat (30) begin
        @(negedge clk);
        if (ustat == USER_STATUS_ACK) saw_ack = 1'b1;
      end
      check(!saw_ack, "no ACK while blocked");
    end
    sys_read(REG_STATUS, r);
    check(r == 32'(ST_BLOCKED), "status register reads BLOCKED");
    sys_write(REG_COMMAND, 32'(CMD_RUN), t0);
    do @(negedge clk); while (ustat != USER_STATUS_ACK && cyc - t0 < 20);
    check(ustat == USER_STATUS_ACK, "RUN command resumes the blocked call with ACK");
    check(ures == MUTEX_GRANTED, "resumed MUTEX_LOCK returns success");
    @(negedge clk);
    check(dut.u_sys.status == ST_RUNNING, "status RUNNING after resume");
    mutex_answer = MUTEX_GRANTED;

    // HTHREAD_EXIT
    @(posedge clk); #1;
    opcode = OP_HTHREAD_EXIT; a1 = 32'h0000_0055;
    t0 = cyc;
    @(posedge clk); #1;
    opcode = OP_NOOP;
    wait_cond_status(ST_EXITED, t0, dt);
    check(dt == 20, $sformatf("HTHREAD_EXIT -> EXITED matches published 20 cycles (got %0d)", dt));
    check(last_addr == svc_addr(TM_BASE, TM_OP_EXIT, 8'h2A, 8'h00),
          "HTHREAD_EXIT calls the Thread Manager with the thread ID");
    sys_read(REG_RESULT, r);
    check(r == 32'h55, "result register holds the exit value");
    sys_read(REG_STATUS, r);
    check(r == 32'(ST_EXITED), "status register reads EXITED");

    // RESET
    sys_write(REG_COMMAND, 32'(CMD_RESET), t0);
    do @(negedge clk); while (ustat != USER_STATUS_RESET && cyc - t0 < 20);
    dt = cyc - t0;
    check(dt == 2, $sformatf("RESET -> user_status RESET in 2 cycles (got %0d)", dt));
    check(dt <= 4, "RESET within published 4 cycles");
    sys_read(REG_STATUS, r);
    check(r == 32'(ST_NOT_USED), "status NOT_USED after RESET");
    sys_read(REG_THREAD_ID, r);
    check(r == 0, "thread_id cleared by RESET");
    sys_read(REG_RESULT, r);
    check(r == 0, "result cleared by RESET");

    // re-creation with a new ID
    sys_write(REG_THREAD_ID, 32'h07, t0);
    sys_write(REG_ARGUMENT, 32'h99, t0);
    sys_write(REG_COMMAND, 32'(CMD_RUN), t0);
    do @(negedge clk); while (ustat != USER_STATUS_RUN);
    check(ures == 32'h99, "re-created thread gets its new argument");
    ucall(OP_HTHREAD_SELF, '0, '0, r, tack, trun);
    check(r == 32'h07, "re-created thread has its new ID");

    // RESET while a bus transfer is open takes effect after it
    @(posedge clk); #1;
    opcode = OP_LOAD; a1 = 32'h100;
    @(posedge clk); #1;
    opcode = OP_NOOP;
    repeat (3) @(posedge clk);
    sys_write(REG_COMMAND, 32'(CMD_RESET), t0);
    do @(negedge clk); while (ustat != USER_STATUS_RESET && cyc - t0 < 40);
    check(ustat == USER_STATUS_RESET, "RESET during a LOAD completes");
    check(!m_req.req, "no bus request left open after RESET");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
