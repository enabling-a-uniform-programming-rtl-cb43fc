// tb_matrix_workloads: the matrix-add workloads on the default top.
//
// Runs the vector addition Z = X + Y with the mixes of hardware and software
// threads used to evaluate the design: 1 or 2 hardware mutexAdd threads and 0,
// 1 or 2 software threads (software threads are modelled on the CPU-side bus
// port, each adding a fixed 40-cycle compute delay per element), over the
// array sizes 100 and 5,000 for every mix, and 25,000 for the two-hardware-
// thread mixes. Between runs each hardware thread is RESET and re-created.
// For every run it checks each Z element, that the threads' shares add up to
// the size, and the final shared index; it prints the cycle count and the
// percentage of elements done by software, the two quantities of the
// published comparison. Threads are created, started and joined through the
// Thread Manager and Scheduler; the CPU's context switches and global memory
// are modelled as in tb_hthreads_top.
module tb_matrix_workloads;
  import hthreads_pkg::*;

  localparam logic [31:0] STRUCT = 32'h0000_1000;
  localparam logic [31:0] XB = 32'h0010_0000, YB = 32'h0020_0000, ZB = 32'h0030_0000;
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

  // CPU-side bus port shared by the modelled processes
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

  // CPU context switches: whenever the Scheduler has a next_thread, take it
  bit woken [256];
  initial begin
    foreach (woken[i]) woken[i] = 1'b0;
    forever begin
      logic [31:0] r;
      @(posedge clk);
      if (rst_n && next_valid) begin
        host_xfer(1'b0, sched_call(SCHED_OP_NEXT, 8'd0), '0, r);
        if (r[31]) woken[r[7:0]] = 1'b1;
      end
    end
  end

  task automatic wait_woken(input logic [7:0] t);
    while (!woken[t]) @(posedge clk);
    woken[t] = 1'b0;
  endtask

  task automatic join_thread(input logic [7:0] t);
    logic [31:0] r;
    host_xfer(1'b0, tm_call(TM_OP_JOIN, MAIN_TID, t), '0, r);
    if (r == TM_WAIT) wait_woken(MAIN_TID);
    else check(r == TM_OK, $sformatf("JOIN on thread %0d", t));
  endtask

  // software mutexAdd thread
  int sw_done [2];
  task automatic sw_thread(input int s, input logic [7:0] me);
    logic [31:0] r, size, idx, x, y;
    wait_woken(me);
    host_xfer(1'b0, STRUCT, '0, size);
    idx = 0;
    while (idx < size) begin
      host_xfer(1'b0, svc_addr(MUTEX_BASE, MUTEX_OP_LOCK, me, 8'd0), '0, r);
      if (r == MUTEX_BLOCKED) wait_woken(me);
      host_xfer(1'b0, STRUCT + 4, '0, idx);
      host_xfer(1'b1, STRUCT + 4, idx + 1, r);
      host_xfer(1'b0, svc_addr(MUTEX_BASE, MUTEX_OP_UNLOCK, me, 8'd0), '0, r);
      if (idx < size) begin
        host_xfer(1'b0, XB + (idx << 2), '0, x);
        host_xfer(1'b0, YB + (idx << 2), '0, y);
        host_xfer(1'b1, ZB + (idx << 2), x + y, r);
        sw_done[s]++;
        repeat (40) @(posedge clk);
      end
    end
    host_xfer(1'b0, tm_call(TM_OP_EXIT, me, 8'd0), '0, r);
  endtask

  task automatic run(input int unsigned size, input int nhw, input int nsw);
    logic [31:0] r;
    int unsigned t0, hw_total, sw_total;
    logic [7:0] hw_tid [2];
    logic [7:0] sw_tid [2];
    u_mem.mem[STRUCT[31:2]]     = size;
    u_mem.mem[STRUCT[31:2] + 1] = 0;
    u_mem.mem[STRUCT[31:2] + 2] = XB;
    u_mem.mem[STRUCT[31:2] + 3] = YB;
    u_mem.mem[STRUCT[31:2] + 4] = ZB;
    for (int i = 0; i < size; i++) begin
      u_mem.mem[XB[31:2] + i] = $urandom();
      u_mem.mem[YB[31:2] + i] = $urandom();
      u_mem.mem[ZB[31:2] + i] = 32'hBAD0_0000;
    end
    // (re-)create the hardware threads and create the software threads
    for (int k = 0; k < nhw; k++) begin
      host_xfer(1'b1, hwti_reg(k, REG_COMMAND), 32'(CMD_RESET), r);
      host_xfer(1'b0, tm_call(TM_OP_CREATE, MAIN_TID, 8'd0), '0, r);
      hw_tid[k] = r[7:0];
      host_xfer(1'b1, hwti_reg(k, REG_THREAD_ID), 32'(hw_tid[k]), r);
      host_xfer(1'b1, hwti_reg(k, REG_ARGUMENT), STRUCT, r);
      host_xfer(1'b1, sched_call(SCHED_OP_SET_HW, hw_tid[k]), hwti_reg(k, 3'd0), r);
    end
    for (int s = 0; s < nsw; s++) begin
      automatic int ss = s;
      host_xfer(1'b0, tm_call(TM_OP_CREATE, MAIN_TID, 8'd0), '0, r);
      sw_tid[s] = r[7:0];
      host_xfer(1'b1, sched_call(SCHED_OP_SET_SW, sw_tid[s]), 32'd1, r);
      sw_done[s] = 0;
      fork sw_thread(ss, sw_tid[ss]); join_none
    end
    for (int s = nsw; s < 2; s++) sw_done[s] = 0;
    t0 = cyc;
    for (int k = 0; k < nhw; k++)
      host_xfer(1'b0, tm_call(TM_OP_ADD, MAIN_TID, hw_tid[k]), '0, r);
    for (int s = 0; s < nsw; s++)
      host_xfer(1'b0, tm_call(TM_OP_ADD, MAIN_TID, sw_tid[s]), '0, r);
    for (int k = 0; k < nhw; k++) join_thread(hw_tid[k]);
    for (int s = 0; s < nsw; s++) join_thread(sw_tid[s]);
    t0 = cyc - t0;
    hw_total = 0;
    for (int k = 0; k < nhw; k++) begin
      host_xfer(1'b0, hwti_reg(k, REG_RESULT), '0, r);
      hw_total += r;
    end
    sw_total = sw_done[0] + sw_done[1];
    check(hw_total + sw_total == size,
          $sformatf("%0d HW / %0d SW, size %0d: shares add up (%0d + %0d)", nhw, nsw, size,
                    hw_total, sw_total));
    for (int i = 0; i < size; i++)
      if (u_mem.rd(ZB + 4 * i) != u_mem.rd(XB + 4 * i) + u_mem.rd(YB + 4 * i))
        check(1'b0, $sformatf("size %0d: Z[%0d] wrong", size, i));
    check(1'b1, "Z vector verified");
    check(u_mem.rd(STRUCT + 4) == size + nhw + nsw, "final shared index");
    $display("workload: %0d HW %0d SW size %6d : %9d cycles, software share %0d%%",
             nhw, nsw, size, t0, (100 * sw_total) / size);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_req = BUS_REQ_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    foreach (SIZES[i]) begin
      run(SIZES[i], 1, 0);
      run(SIZES[i], 2, 0);
      run(SIZES[i], 1, 1);
      run(SIZES[i], 2, 1);
      run(SIZES[i], 1, 2);
      run(SIZES[i], 2, 2);
    end
    run(25000, 2, 0);
    run(25000, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned SIZES [2] = '{100, 5000};

endmodule
