// scheduler: the hthreads Scheduler, reduced to its role in this system.
//
// Threads become ready through two ports that are always accepted in the
// cycle they are offered: add_* from the Thread Manager (add_thread, or a
// parent whose joined child exited) and wake_* from the Mutex Manager (a
// blocked thread that has been handed a mutex). What happens next depends on
// the thread's entry in the thread table, written over the bus slave port:
//   SET_HW  (store to SCHED_BASE, op 1, obj = thread, wdata = HWTI base):
//           the thread runs in hardware. Once ready it is dispatched at once
//           by writing RUN into its HWTI's command register over the bus
//           master port; hardware threads never wait for the CPU.
//   SET_SW  (op 0, wdata = priority, 0 highest): the thread runs on the CPU.
//           Ready software threads wait in the ready-to-run set. The
//           Scheduler keeps next_thread, the highest-priority ready thread
//           (lowest ID on a tie), up to date without the CPU's help, and
//           raises preempt when next_thread has a higher priority than the
//           thread now on the CPU. A thread with no entry is a software
//           thread of priority 0.
//   NEXT    (load, op 2): the CPU's context switch. Answers {valid, 23'b0,
//           next_thread}, removes next_thread from the ready set and makes it
//           the running thread (none when valid is 0).
//   PEEK    (load, op 3): the same answer without taking the thread.
//
// Timing: next_thread/preempt are registered one cycle after the ready set
// or a priority changes, for any number of ready threads (a priority
// encoder). Slave calls are acknowledged two cycles after req, like the other
// system services. A RUN dispatch is a single bus write, one at a time, in
// thread-ID order when several hardware threads are ready together.
// What the Scheduler does (the ready-to-run queue, next_thread decided ahead
// of the CPU, an interrupt only when a higher-priority thread is ready, RUN
// commands to hardware threads) follows the design; the priority encoder in
// place of its 13-cycle decision, the encodings and the 7-bit priority are
// this implementation's.
module scheduler
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  // thread table and CPU calls
  input  bus_req_t         s_req,
  output bus_rsp_t         s_rsp,
  // RUN commands to HWTIs
  output bus_req_t         m_req,
  input  bus_rsp_t         m_rsp,
  // ready events
  input  logic             add_valid,
  input  logic [TID_W-1:0] add_tid,
  output logic             add_ready,
  input  logic             wake_valid,
  input  logic [TID_W-1:0] wake_tid,
  output logic             wake_ready,
  // to the CPU
  output logic             next_valid,
  output logic [TID_W-1:0] next_tid,
  output logic             preempt
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_ACK} sl_state_e;
  typedef enum logic [1:0] {D_IDLE, D_WRITE, D_DROP} dp_state_e;
  sl_state_e sstate;
  dp_state_e dstate;

  logic              is_hw    [NUM_THREADS];
  logic [PRIO_W-1:0] prio     [NUM_THREADS];
  logic [ADDR_W-1:0] hwti_base[NUM_THREADS];
  logic              sw_ready [NUM_THREADS];
  logic              hw_ready [NUM_THREADS];

  logic              run_valid;
  logic [PRIO_W-1:0] run_prio;

  sched_op_e         r_op;
  logic              r_we;
  logic [TID_W-1:0]  r_obj;
  logic [DATA_W-1:0] r_wdata;

  assign add_ready  = 1'b1;
  assign wake_ready = 1'b1;

  // next_thread: highest priority (lowest value), lowest ID on a tie
  logic              pick_valid;
  logic [TID_W-1:0]  pick_tid;
  logic [PRIO_W-1:0] pick_prio;
  always_comb begin
    pick_valid = 1'b0;
    pick_tid   = '0;
    pick_prio  = '1;
    for (int i = 0; i < NUM_THREADS; i++)
      if (sw_ready[i] && (!pick_valid || prio[i] < pick_prio)) begin
        pick_valid = 1'b1;
        pick_tid   = TID_W'(i);
        pick_prio  = prio[i];
      end
  end

  // lowest-numbered hardware thread waiting for its RUN command
  logic             hw_found;
  logic [TID_W-1:0] hw_id;
  always_comb begin
    hw_found = 1'b0;
    hw_id    = '0;
    for (int i = NUM_THREADS - 1; i >= 0; i--)
      if (hw_ready[i]) begin
        hw_found = 1'b1;
        hw_id    = TID_W'(i);
      end
  end

  logic             take_next;   // NEXT executes this cycle
  logic             take_hw;     // dispatcher starts on hw_id this cycle
  assign take_next = (sstate == S_EXEC) && !r_we && r_op == SCHED_OP_NEXT;
  assign take_hw   = (dstate == D_IDLE) && hw_found;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sstate     <= S_IDLE;
      s_rsp      <= BUS_RSP_IDLE;
      r_op       <= SCHED_OP_SET_SW;
      r_we       <= 1'b0;
      r_obj      <= '0;
      r_wdata    <= '0;
      run_valid  <= 1'b0;
      run_prio   <= '0;
      next_valid <= 1'b0;
      next_tid   <= '0;
      preempt    <= 1'b0;
      for (int i = 0; i < NUM_THREADS; i++) begin
        is_hw[i]     <= 1'b0;
        prio[i]      <= '0;
        hwti_base[i] <= '0;
        sw_ready[i]  <= 1'b0;
        hw_ready[i]  <= 1'b0;
      end
    end else begin
      s_rsp.ack <= 1'b0;

      // the decision, registered
      next_valid <= pick_valid;
      next_tid   <= pick_tid;
      preempt    <= pick_valid && (!run_valid || pick_prio < run_prio);

      // bus slave: thread table and CPU calls
      unique case (sstate)
        S_IDLE:
          if (s_req.req) begin
            r_op    <= sched_op_e'(s_req.addr[SVC_OP_LSB+:2]);
            r_we    <= s_req.we;
            r_obj   <= s_req.addr[SVC_OBJ_LSB+:TID_W];
            r_wdata <= s_req.wdata;
            sstate  <= S_EXEC;
          end
        S_EXEC: begin
          sstate      <= S_ACK;
          s_rsp.ack   <= 1'b1;
          s_rsp.rdata <= '0;
          if (r_we) begin
            if (32'(r_obj) < NUM_THREADS) begin
              if (r_op == SCHED_OP_SET_SW) begin
                is_hw[r_obj] <= 1'b0;
                prio[r_obj]  <= r_wdata[PRIO_W-1:0];
              end else if (r_op == SCHED_OP_SET_HW) begin
                is_hw[r_obj]     <= 1'b1;
                hwti_base[r_obj] <= r_wdata;
              end
            end
          end else if (r_op == SCHED_OP_NEXT || r_op == SCHED_OP_PEEK) begin
            s_rsp.rdata <= {pick_valid, {(DATA_W-1-TID_W){1'b0}}, pick_tid};
            if (take_next) begin
              run_valid <= pick_valid;
              run_prio  <= pick_prio;
              if (pick_valid) sw_ready[pick_tid] <= 1'b0;
            end
          end
        end
        S_ACK: sstate <= S_IDLE;
        default: sstate <= S_IDLE;
      endcase

      if (take_hw) hw_ready[hw_id] <= 1'b0;

      // ready events (after the removals, so a new event is never lost)
      if (add_valid) begin
        if (is_hw[add_tid]) hw_ready[add_tid] <= 1'b1;
        else                sw_ready[add_tid] <= 1'b1;
      end
      if (wake_valid) begin
        if (is_hw[wake_tid]) hw_ready[wake_tid] <= 1'b1;
        else                 sw_ready[wake_tid] <= 1'b1;
      end
    end
  end

  // RUN dispatcher (bus master)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate <= D_IDLE;
      m_req  <= BUS_REQ_IDLE;
    end else begin
      unique case (dstate)
        D_IDLE:
          if (take_hw) begin
            m_req  <= '{req: 1'b1, we: 1'b1,
                        addr: hwti_base[hw_id] + {27'd0, REG_COMMAND, 2'b00},
                        wdata: DATA_W'(CMD_RUN)};
            dstate <= D_WRITE;
          end
        D_WRITE:
          if (m_rsp.ack) begin
            m_req  <= BUS_REQ_IDLE;
            dstate <= D_DROP;
          end
        D_DROP: dstate <= D_IDLE;
        default: dstate <= D_IDLE;
      endcase
    end
  end

  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.req && !m_rsp.ack) |=> (m_req.req && $stable(m_req.addr)));

endmodule
