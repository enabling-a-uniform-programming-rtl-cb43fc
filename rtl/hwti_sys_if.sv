// hwti_sys_if: system interface of the hardware thread interface (HWTI).
//
// Holds the five address-mapped registers through which the system services
// see a hardware thread: thread_id, command, status, argument and result.
// Together they are the hardware thread's context. The registers are a bus
// slave; the user thread cannot reach them.
//   thread_id - written by the system when the thread is created; the write
//               is reported to the controller (status then becomes USED).
//   command   - RUN or RESET written by the scheduler; each write is passed to
//               the controller as a one-cycle pulse and kept for read-back.
//   status    - read-only here; set by the controller (NOT_USED, USED,
//               RUNNING, BLOCKED, EXITED).
//   argument  - the single thread argument (a value or a pointer).
//   result    - read-only here; set by the controller on HTHREAD_EXIT.
// A RESET from the controller (clr) returns every register to zero /
// NOT_USED.
//
// Timing: a bus access is answered with ack one cycle after req is seen
// (the slave state machine has two states, IDLE and ACK). The write takes
// effect at that same edge; the pulse to the controller is visible in the
// ack cycle. Register word offsets (byte address [4:2]) are 0 thread_id,
// 1 command, 2 status, 3 argument, 4 result; other offsets read as zero.
// The offsets and the bus protocol are this implementation's choice.
module hwti_sys_if
  import hthreads_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // system bus slave
  input  bus_req_t             s_req,
  output bus_rsp_t             s_rsp,
  // to the controller
  output logic [TID_W-1:0]     thread_id,
  output logic [DATA_W-1:0]    argument,
  output logic                 tid_written,   // pulse: thread_id written
  output logic                 cmd_run,       // pulse: RUN written
  output logic                 cmd_reset,     // pulse: RESET written
  // from the controller
  input  logic                 clr,           // return to initial state
  input  logic                 status_we,
  input  sys_status_e          status_d,
  input  logic                 result_we,
  input  logic [DATA_W-1:0]    result_d,
  output sys_status_e          status
);

  typedef enum logic {S_IDLE, S_ACK} slv_state_e;
  slv_state_e state;

  logic [1:0]        command;
  logic [DATA_W-1:0] result;
  logic [2:0]        reg_sel;
  logic              wr_fire;

  assign reg_sel = s_req.addr[4:2];
  assign wr_fire = (state == S_IDLE) && s_req.req && s_req.we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      s_rsp       <= BUS_RSP_IDLE;
      thread_id   <= '0;
      argument    <= '0;
      command     <= CMD_NONE;
      status      <= ST_NOT_USED;
      result      <= '0;
      tid_written <= 1'b0;
      cmd_run     <= 1'b0;
      cmd_reset   <= 1'b0;
    end else begin
      tid_written <= 1'b0;
      cmd_run     <= 1'b0;
      cmd_reset   <= 1'b0;
      s_rsp.ack   <= 1'b0;

      unique case (state)
        S_IDLE: if (s_req.req) begin
          state     <= S_ACK;
          s_rsp.ack <= 1'b1;
          if (s_req.we) begin
            s_rsp.rdata <= '0;
          end else begin
            unique case (reg_sel)
              REG_THREAD_ID: s_rsp.rdata <= DATA_W'(thread_id);
              REG_COMMAND:   s_rsp.rdata <= DATA_W'(command);
              REG_STATUS:    s_rsp.rdata <= DATA_W'(status);
              REG_ARGUMENT:  s_rsp.rdata <= argument;
              REG_RESULT:    s_rsp.rdata <= result;
              default:       s_rsp.rdata <= '0;
            endcase
          end
        end
        S_ACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      // controller updates
      if (status_we) status <= status_d;
      if (result_we) result <= result_d;

      // bus writes
      if (wr_fire) begin
        unique case (reg_sel)
          REG_THREAD_ID: begin
            thread_id   <= s_req.wdata[TID_W-1:0];
            tid_written <= 1'b1;
          end
          REG_COMMAND: begin
            command <= s_req.wdata[1:0];
            if (s_req.wdata[1:0] == CMD_RUN)   cmd_run   <= 1'b1;
            if (s_req.wdata[1:0] == CMD_RESET) cmd_reset <= 1'b1;
          end
          REG_ARGUMENT: argument <= s_req.wdata;
          default: ;
        endcase
      end

      if (clr) begin
        thread_id <= '0;
        argument  <= '0;
        command   <= CMD_NONE;
        result    <= '0;
        status    <= ST_NOT_USED;
      end
    end
  end

  // A master keeps its request up until it is acknowledged.
  property p_ack_only_on_req;
    @(posedge clk) disable iff (!rst_n) s_rsp.ack |-> $past(s_req.req);
  endproperty
  a_ack_only_on_req: assert property (p_ack_only_on_req);

endmodule
