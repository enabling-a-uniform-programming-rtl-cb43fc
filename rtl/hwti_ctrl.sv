// hwti_ctrl: system-call state machine of the hardware thread interface.
//
// Sits between the system interface (hwti_sys_if) and the user interface
// (hwti_user_if) and carries out what each side asks for:
//   * thread_id written while idle      -> status USED
//   * RUN command while USED            -> argument copied into user_result,
//                                          status RUNNING, then user_status RUN
//   * RUN command while BLOCKED         -> the mutex is now owned: the pending
//                                          MUTEX_LOCK call is acknowledged
//   * RESET command                     -> every register back to its initial
//                                          state (NOT_USED / user RESET)
//   * system calls of the user thread:
//       HTHREAD_SELF   result = thread_id
//       HTHREAD_YIELD  no effect for a hardware thread, acknowledged at once
//       LOAD           bus read of address argument_one, result = data
//       STORE          bus write of argument_two to address argument_one
//       MUTEX_LOCK     load from the Mutex Manager (mutex = argument_one);
//                      if the mutex is taken the thread is BLOCKED until the
//                      scheduler writes RUN into the command register
//       MUTEX_UNLOCK   load from the Mutex Manager, result = its answer
//       HTHREAD_EXIT   result register = argument_one, then a load to the
//                      Thread Manager announcing the exit; status EXITED
//     Every call ends with user_status ACK for one cycle (user_result valid),
//     then RUN again.
// Service calls are single bus loads whose address encodes the operation,
// the calling thread ID and the object (hthreads_pkg::svc_addr); the encoding
// is this implementation's choice.
//
// Timing (cycle 0 = the cycle the user thread drives the opcode):
// user_status is ACK in cycle 3 and RUN again in cycle 4 for SELF and YIELD;
// a bus call adds the bus round trip, i.e. ACK in cycle 3 + (cycles from
// request to acknowledge). A RESET that arrives while a bus transfer is in
// flight takes effect when that transfer ends.
module hwti_ctrl
  import hthreads_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // system interface
  input  logic [TID_W-1:0]   thread_id,
  input  logic [DATA_W-1:0]  argument,
  input  logic               tid_written,
  input  logic               cmd_run,
  input  logic               cmd_reset,
  input  sys_status_e        status,
  output logic               clr,
  output logic               sys_status_we,
  output sys_status_e        sys_status_d,
  output logic               sys_result_we,
  output logic [DATA_W-1:0]  sys_result_d,
  // user interface
  input  logic               call_valid,
  input  opcode_e            user_opcode,
  input  logic [DATA_W-1:0]  user_argument_one,
  input  logic [DATA_W-1:0]  user_argument_two,
  output logic               call_take,
  output logic               usr_status_we,
  output user_status_e       usr_status_d,
  output logic               usr_result_we,
  output logic [DATA_W-1:0]  usr_result_d,
  // system bus master
  output bus_req_t           m_req,
  input  bus_rsp_t           m_rsp
);

  typedef enum logic [3:0] {
    C_IDLE,       // NOT_USED / USED / EXITED: waiting for commands
    C_START,      // copy argument into user_result, status RUNNING
    C_GO,         // user_status RUN
    C_WAIT_CALL,  // user thread running, waiting for a system call
    C_DECODE,     // act on the latched opcode
    C_BUS,        // bus transfer in flight
    C_BLOCKED,    // waiting for the scheduler to resume the thread
    C_ACK,        // user_status ACK (one cycle)
    C_DONE        // exited: user_status back to RUN, thread idles
  } ctrl_state_e;

  ctrl_state_e state;
  opcode_e     op;
  logic        reset_pending;

  // A RESET is applied as soon as no bus transfer is open.
  assign clr = (cmd_reset || reset_pending) && (state != C_BUS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      op            <= OP_NOOP;
      reset_pending <= 1'b0;
      m_req         <= BUS_REQ_IDLE;
    end else if (clr) begin
      state         <= C_IDLE;
      op            <= OP_NOOP;
      reset_pending <= 1'b0;
    end else begin
      if (cmd_reset) reset_pending <= 1'b1;
      unique case (state)
        C_IDLE:
          if (cmd_run && status == ST_USED) state <= C_START;
        C_START:
          state <= C_GO;
        C_GO:
          state <= C_WAIT_CALL;
        C_WAIT_CALL:
          if (call_valid) begin
            op    <= user_opcode;
            state <= C_DECODE;
          end
        C_DECODE: begin
          unique case (op)
            OP_LOAD: begin
              m_req <= '{req: 1'b1, we: 1'b0, addr: user_argument_one, wdata: '0};
              state <= C_BUS;
            end
            OP_STORE: begin
              m_req <= '{req: 1'b1, we: 1'b1, addr: user_argument_one,
                         wdata: user_argument_two};
              state <= C_BUS;
            end
            OP_HTHREAD_MUTEX_LOCK: begin
              m_req <= '{req: 1'b1, we: 1'b0,
                         addr: svc_addr(MUTEX_BASE, MUTEX_OP_LOCK, thread_id,
                                        user_argument_one[7:0]),
                         wdata: '0};
              state <= C_BUS;
            end
            OP_HTHREAD_MUTEX_UNLOCK: begin
              m_req <= '{req: 1'b1, we: 1'b0,
                         addr: svc_addr(MUTEX_BASE, MUTEX_OP_UNLOCK, thread_id,
                                        user_argument_one[7:0]),
                         wdata: '0};
              state <= C_BUS;
            end
            OP_HTHREAD_EXIT: begin
              m_req <= '{req: 1'b1, we: 1'b0,
                         addr: svc_addr(TM_BASE, TM_OP_EXIT, thread_id, 8'h00),
                         wdata: '0};
              state <= C_BUS;
            end
            default: state <= C_ACK;   // SELF, YIELD, anything else
          endcase
        end
        C_BUS:
          if (m_rsp.ack) begin
            m_req.req <= 1'b0;
            if (op == OP_HTHREAD_MUTEX_LOCK && m_rsp.rdata == MUTEX_BLOCKED)
              state <= C_BLOCKED;
            else
              state <= C_ACK;
          end
        C_BLOCKED:
          if (cmd_run) state <= C_ACK;
        C_ACK:
          state <= (op == OP_HTHREAD_EXIT) ? C_DONE : C_WAIT_CALL;
        C_DONE:
          state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  // Register updates requested from the two interfaces
  always_comb begin
    sys_status_we = 1'b0;
    sys_status_d  = status;
    sys_result_we = 1'b0;
    sys_result_d  = user_argument_one;
    usr_status_we = 1'b0;
    usr_status_d  = USER_STATUS_RUN;
    usr_result_we = 1'b0;
    usr_result_d  = '0;
    call_take     = 1'b0;

    if (!clr) begin
      unique case (state)
        C_IDLE:
          if (tid_written && status != ST_RUNNING && status != ST_BLOCKED) begin
            sys_status_we = 1'b1;
            sys_status_d  = ST_USED;
          end
        C_START: begin
          usr_result_we = 1'b1;
          usr_result_d  = argument;
          sys_status_we = 1'b1;
          sys_status_d  = ST_RUNNING;
        end
        C_GO: begin
          usr_status_we = 1'b1;
          usr_status_d  = USER_STATUS_RUN;
        end
        C_WAIT_CALL:
          call_take = call_valid;
        C_DECODE:
          unique case (op)
            OP_HTHREAD_SELF: begin
              usr_result_we = 1'b1;
              usr_result_d  = DATA_W'(thread_id);
              usr_status_we = 1'b1;
              usr_status_d  = USER_STATUS_ACK;
            end
            OP_LOAD, OP_STORE, OP_HTHREAD_MUTEX_LOCK, OP_HTHREAD_MUTEX_UNLOCK: ;
            OP_HTHREAD_EXIT: begin
              sys_result_we = 1'b1;
              sys_result_d  = user_argument_one;
            end
            default: begin
              usr_result_we = 1'b1;
              usr_result_d  = '0;
              usr_status_we = 1'b1;
              usr_status_d  = USER_STATUS_ACK;
            end
          endcase
        C_BUS:
          if (m_rsp.ack) begin
            if (op == OP_HTHREAD_MUTEX_LOCK && m_rsp.rdata == MUTEX_BLOCKED) begin
              sys_status_we = 1'b1;
              sys_status_d  = ST_BLOCKED;
            end else begin
              usr_result_we = 1'b1;
              usr_result_d  = (op == OP_STORE) ? '0 : m_rsp.rdata;
              usr_status_we = 1'b1;
              usr_status_d  = USER_STATUS_ACK;
              if (op == OP_HTHREAD_EXIT) begin
                sys_status_we = 1'b1;
                sys_status_d  = ST_EXITED;
              end
            end
          end
        C_BLOCKED:
          if (cmd_run) begin
            sys_status_we = 1'b1;
            sys_status_d  = ST_RUNNING;
            usr_result_we = 1'b1;
            usr_result_d  = MUTEX_GRANTED;
            usr_status_we = 1'b1;
            usr_status_d  = USER_STATUS_ACK;
          end
        C_ACK: begin
          usr_status_we = 1'b1;
          usr_status_d  = USER_STATUS_RUN;
        end
        default: ;
      endcase
    end
  end

  // Bus master rule: request and address stay put until acknowledged.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (m_req.req && !m_rsp.ack) |=> (m_req.req && $stable(m_req.addr)));

endmodule
