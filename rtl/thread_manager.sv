// thread_manager: the hthreads Thread Manager, reduced to the calls the
// hardware and software threads of this system make.
//
// Every call is one bus load; the address carries the operation (bits
// [19:18]), the calling thread ID ([17:10]) and the target thread ID ([9:2]),
// exactly like the Mutex Manager's calls. The load returns:
//   CREATE  the lowest free thread ID, now in use,
//           or TM_NO_ID (bit 31) when all IDs are taken
//   ADD     TM_OK; the target is handed to the Scheduler's ready-to-run
//           queue on add_valid/add_tid (taken with add_ready)
//   JOIN    target has exited -> TM_OK, and its ID is free again;
//           target still running -> TM_WAIT, the caller is recorded as the
//           target's joiner and must give up the CPU (context switch);
//           target not in use -> TM_ERROR
//   EXIT    TM_OK; the caller is marked exited. If a thread is already
//           joined on it, that joiner goes to the ready-to-run queue and the
//           caller's ID is freed at once.
// Writes are acknowledged and ignored. Thread ID 0 is the main thread and is
// in use from reset.
//
// Timing: as the Mutex Manager, the request is taken in the cycle req is
// seen, executed in the next and acknowledged in the one after (ack two
// cycles after req). No request is taken while a hand-over to the Scheduler
// is still pending. CREATE finds the free ID with a priority encoder in the
// execute cycle.
// The calls and what they do follow the design (create, add_thread, join,
// exit, and the parent re-queued on the child's exit); their encoding, the
// result codes, the reserved main-thread ID and the single-cycle table are
// this implementation's.
module thread_manager
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         s_req,
  output bus_rsp_t         s_rsp,
  output logic             add_valid,
  output logic [TID_W-1:0] add_tid,
  input  logic             add_ready
);

  typedef enum logic [1:0] {T_IDLE, T_EXEC, T_ACK} tm_state_e;
  tm_state_e state;

  logic             used      [NUM_THREADS];
  logic             exited    [NUM_THREADS];
  logic             joined    [NUM_THREADS];
  logic [TID_W-1:0] joiner    [NUM_THREADS];

  tm_op_e           r_op;
  logic             r_we;
  logic [TID_W-1:0] r_tid, r_obj;
  logic             bad_tid;

  // lowest free thread ID
  logic             free_found;
  logic [TID_W-1:0] free_id;
  always_comb begin
    free_found = 1'b0;
    free_id    = '0;
    for (int i = NUM_THREADS - 1; i >= 0; i--)
      if (!used[i]) begin
        free_found = 1'b1;
        free_id    = TID_W'(i);
      end
  end

  assign bad_tid = (32'(r_tid) >= NUM_THREADS) || (32'(r_obj) >= NUM_THREADS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      s_rsp     <= BUS_RSP_IDLE;
      add_valid <= 1'b0;
      add_tid   <= '0;
      r_op      <= TM_OP_EXIT;
      r_we      <= 1'b0;
      r_tid     <= '0;
      r_obj     <= '0;
      for (int i = 0; i < NUM_THREADS; i++) begin
        used[i]   <= (i == 0);
        exited[i] <= 1'b0;
        joined[i] <= 1'b0;
        joiner[i] <= '0;
      end
    end else begin
      s_rsp.ack <= 1'b0;
      if (add_valid && add_ready) add_valid <= 1'b0;
      unique case (state)
        T_IDLE:
          if (s_req.req && !add_valid) begin
            r_op  <= tm_op_e'(s_req.addr[SVC_OP_LSB+:2]);
            r_we  <= s_req.we;
            r_tid <= s_req.addr[SVC_TID_LSB+:TID_W];
            r_obj <= s_req.addr[SVC_OBJ_LSB+:TID_W];
            state <= T_EXEC;
          end
        T_EXEC: begin
          state       <= T_ACK;
          s_rsp.ack   <= 1'b1;
          s_rsp.rdata <= TM_ERROR;
          if (r_we) begin
            s_rsp.rdata <= TM_OK;
          end else if (!bad_tid) begin
            unique case (r_op)
              TM_OP_CREATE:
                if (free_found) begin
                  used[free_id]   <= 1'b1;
                  exited[free_id] <= 1'b0;
                  joined[free_id] <= 1'b0;
                  s_rsp.rdata     <= DATA_W'(free_id);
                end else begin
                  s_rsp.rdata <= TM_NO_ID;
                end
              TM_OP_ADD: begin
                add_valid   <= 1'b1;
                add_tid     <= r_obj;
                s_rsp.rdata <= TM_OK;
              end
              TM_OP_JOIN:
                if (!used[r_obj] || joined[r_obj] || r_obj == r_tid) begin
                  s_rsp.rdata <= TM_ERROR;
                end else if (exited[r_obj]) begin
                  used[r_obj]   <= 1'b0;
                  exited[r_obj] <= 1'b0;
                  s_rsp.rdata   <= TM_OK;
                end else begin
                  joined[r_obj] <= 1'b1;
                  joiner[r_obj] <= r_tid;
                  s_rsp.rdata   <= TM_WAIT;
                end
              TM_OP_EXIT: begin
                s_rsp.rdata <= TM_OK;
                if (joined[r_tid]) begin
                  add_valid      <= 1'b1;
                  add_tid        <= joiner[r_tid];
                  used[r_tid]    <= 1'b0;
                  exited[r_tid]  <= 1'b0;
                  joined[r_tid]  <= 1'b0;
                end else begin
                  exited[r_tid] <= 1'b1;
                end
              end
              default: ;
            endcase
          end
        end
        T_ACK: state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  // A hand-over to the Scheduler is held until it is taken.
  a_add_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (add_valid && !add_ready) |=> (add_valid && $stable(add_tid)));

endmodule
