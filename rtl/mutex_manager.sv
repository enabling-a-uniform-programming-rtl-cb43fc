// mutex_manager: hardware mutex service of the hthreads system.
//
// Software and hardware threads lock and release mutexes with a single bus
// load each; the address lines carry the operation (bits [19:18]), the
// calling thread ID ([17:10]) and the mutex number ([9:2]), and the load
// returns the answer:
//   LOCK     free mutex -> the caller owns it, answer GRANTED (0);
//            taken      -> the caller is appended to the mutex's FIFO of
//                          waiters, answer BLOCKED (1);
//            caller already owns it, or bad mutex number -> ERROR (2)
//   TRYLOCK  like LOCK, but a taken mutex answers BLOCKED without queueing
//   UNLOCK   only the owner may unlock (else ERROR). With no waiters the
//            mutex becomes free; otherwise ownership passes straight to the
//            oldest waiter and that thread ID is offered to the scheduler on
//            wake_valid/wake_tid (accepted with wake_ready), so that the
//            scheduler can resume it (for a hardware thread, a RUN command to
//            its HWTI). Answer GRANTED.
//   OWNER    answer bit 31 = locked, low bits = owner ID
// Writes are acknowledged and ignored.
//
// The waiting queues are linked lists threaded through one next-pointer
// table indexed by thread ID (a thread can wait on one mutex at a time), with
// a head, tail and non-empty flag per mutex, so every operation is O(1).
//
// Timing: a request is taken in the cycle req is seen, processed in the next
// and acknowledged in the one after that (ack two cycles after req). A new
// request is not taken while a wake-up is still waiting for the scheduler.
// The service itself follows the design; its encoding, FIFO order and
// queue structure are this implementation's.
module mutex_manager
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_MUTEXES = 64,
  parameter int unsigned NUM_THREADS = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         s_req,
  output bus_rsp_t         s_rsp,
  output logic             wake_valid,
  output logic [TID_W-1:0] wake_tid,
  input  logic             wake_ready
);

  localparam int unsigned MID_W = (NUM_MUTEXES > 1) ? $clog2(NUM_MUTEXES) : 1;

  typedef enum logic [1:0] {M_IDLE, M_EXEC, M_ACK} mm_state_e;
  mm_state_e state;

  logic             locked [NUM_MUTEXES];
  logic             qv     [NUM_MUTEXES];
  logic [TID_W-1:0] owner  [NUM_MUTEXES];
  logic [TID_W-1:0] head   [NUM_MUTEXES];
  logic [TID_W-1:0] tail   [NUM_MUTEXES];
  logic [TID_W-1:0] nxt    [NUM_THREADS];

  mutex_op_e        r_op;
  logic             r_we;
  logic [TID_W-1:0] r_tid;
  logic [7:0]       r_obj;
  logic [MID_W-1:0] m;
  logic             bad_mid;

  assign m       = r_obj[MID_W-1:0];
  assign bad_mid = (32'(r_obj) >= NUM_MUTEXES) || (32'(r_tid) >= NUM_THREADS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      s_rsp      <= BUS_RSP_IDLE;
      wake_valid <= 1'b0;
      wake_tid   <= '0;
      r_op       <= MUTEX_OP_LOCK;
      r_we       <= 1'b0;
      r_tid      <= '0;
      r_obj      <= '0;
      for (int i = 0; i < NUM_MUTEXES; i++) begin
        locked[i] <= 1'b0;
        qv[i]     <= 1'b0;
      end
    end else begin
      s_rsp.ack <= 1'b0;
      if (wake_valid && wake_ready) wake_valid <= 1'b0;

      unique case (state)
        M_IDLE:
          if (s_req.req && !wake_valid) begin
            r_op  <= mutex_op_e'(s_req.addr[SVC_OP_LSB+:2]);
            r_we  <= s_req.we;
            r_tid <= s_req.addr[SVC_TID_LSB+:TID_W];
            r_obj <= s_req.addr[SVC_OBJ_LSB+:8];
            state <= M_EXEC;
          end
        M_EXEC: begin
          state     <= M_ACK;
          s_rsp.ack <= 1'b1;
          s_rsp.rdata <= MUTEX_ERROR;
          if (r_we) begin
            s_rsp.rdata <= '0;
          end else if (!bad_mid) begin
            unique case (r_op)
              MUTEX_OP_LOCK, MUTEX_OP_TRYLOCK:
                if (!locked[m]) begin
                  locked[m]   <= 1'b1;
                  owner[m]    <= r_tid;
                  s_rsp.rdata <= MUTEX_GRANTED;
                end else if (owner[m] == r_tid) begin
                  s_rsp.rdata <= MUTEX_ERROR;
                end else begin
                  s_rsp.rdata <= MUTEX_BLOCKED;
                  if (r_op == MUTEX_OP_LOCK) begin
                    if (qv[m]) nxt[tail[m]] <= r_tid;
                    else       head[m]      <= r_tid;
                    tail[m] <= r_tid;
                    qv[m]   <= 1'b1;
                  end
                end
              MUTEX_OP_UNLOCK:
                if (locked[m] && owner[m] == r_tid) begin
                  s_rsp.rdata <= MUTEX_GRANTED;
                  if (!qv[m]) begin
                    locked[m] <= 1'b0;
                  end else begin
                    owner[m]   <= head[m];
                    wake_valid <= 1'b1;
                    wake_tid   <= head[m];
                    if (head[m] == tail[m]) qv[m]   <= 1'b0;
                    else                    head[m] <= nxt[head[m]];
                  end
                end
              MUTEX_OP_OWNER:
                s_rsp.rdata <= {locked[m], {(DATA_W-1-TID_W){1'b0}}, owner[m]};
              default: ;
            endcase
          end
        end
        M_ACK: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  // A wake-up is held until the scheduler takes it.
  a_wake_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (wake_valid && !wake_ready) |=> (wake_valid && $stable(wake_tid)));

endmodule
