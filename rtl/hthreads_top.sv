// hthreads_top: the FPGA side of an hthreads hybrid CPU/FPGA system.
//
// Hardware threads run as independent, autonomous circuits and use the same
// system services as software threads on the CPU. This top holds:
//   * NUM_MATRIX_THREADS hardware mutexAdd threads (matrix_add_thread), each
//     behind its own HWTI, all using mutex MUTEX_ID;
//   * one simple_thread behind its own HWTI;
//   * the system services: Mutex Manager, Thread Manager and Scheduler. A
//     mutex hand-over (Mutex Manager wake-up) and an add_thread or a finished
//     join (Thread Manager) make a thread ready in the Scheduler, which sends
//     RUN to a hardware thread's HWTI itself and keeps next_thread ready for
//     the CPU;
//   * the shared system bus (hbus_xbar) joining them.
// The CPU with its software threads and global memory are outside and attach
// through ports:
//   host_req/host_rsp   bus master port of the CPU side (creating threads,
//                       service calls of software threads, context switches)
//   mem_req/mem_rsp     bus slave port of global memory
//   next_valid/next_tid the Scheduler's next_thread for the CPU
//   preempt             a ready software thread outranks the running one
//                       (the CPU's scheduling interrupt)
// Address map (hthreads_pkg): HWTI k registers at 0x1000_0000 + k*0x100
// (k = 0..NUM_MATRIX_THREADS-1 the mutexAdd threads, k = NUM_MATRIX_THREADS
// the simple_thread), Mutex Manager 0x2xxx_xxxx, Thread Manager 0x3xxx_xxxx,
// Scheduler 0x4xxx_xxxx, everything else global memory. Bus master 0 is the
// CPU side, master k+1 is HWTI k, and the last master is the Scheduler.
// The set of components follows the design's matrix-add system with two
// hardware threads; the bus and its address map are this implementation's.
module hthreads_top
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_MATRIX_THREADS = 2,
  parameter int unsigned NUM_MUTEXES        = 64,
  parameter int unsigned NUM_THREADS        = 256,
  parameter int unsigned MUTEX_ID           = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bus_req_t         host_req,
  output bus_rsp_t         host_rsp,
  output bus_req_t         mem_req,
  input  bus_rsp_t         mem_rsp,
  output logic             next_valid,
  output logic [TID_W-1:0] next_tid,
  output logic             preempt
);

  localparam int unsigned NH    = NUM_MATRIX_THREADS + 1;  // HWTIs
  localparam int unsigned NUM_M = NH + 2;
  localparam int unsigned NUM_S = NH + 4;
  localparam int unsigned M_SCH = NH + 1;
  localparam int unsigned S_MTX = NH;
  localparam int unsigned S_TM  = NH + 1;
  localparam int unsigned S_SCH = NH + 2;
  localparam int unsigned S_MEM = NH + 3;

  typedef logic [NUM_S-1:0][ADDR_W-1:0] amap_t;

  function automatic amap_t slave_base();
    amap_t b;
    for (int k = 0; k < NUM_S; k++) begin
      if (k < NH)          b[k] = HWTI_BASE + ADDR_W'(k) * HWTI_SPAN;
      else if (k == S_MTX) b[k] = MUTEX_BASE;
      else if (k == S_TM)  b[k] = TM_BASE;
      else if (k == S_SCH) b[k] = SCHED_BASE;
      else                 b[k] = '0;
    end
    return b;
  endfunction

  function automatic amap_t slave_mask();
    amap_t m;
    for (int k = 0; k < NUM_S; k++) begin
      if (k < NH)           m[k] = ~(HWTI_SPAN - 1);
      else if (k < S_MEM)   m[k] = 32'hF000_0000;
      else                  m[k] = '0;
    end
    return m;
  endfunction

  bus_req_t [NUM_M-1:0] m_req;
  bus_rsp_t [NUM_M-1:0] m_rsp;
  bus_req_t [NUM_S-1:0] s_req;
  bus_rsp_t [NUM_S-1:0] s_rsp;

  logic             wake_valid, wake_ready;   // Mutex Manager -> Scheduler
  logic [TID_W-1:0] wake_tid;
  logic             add_valid, add_ready;     // Thread Manager -> Scheduler
  logic [TID_W-1:0] add_tid;

  assign m_req[0] = host_req;
  assign host_rsp = m_rsp[0];
  assign mem_req  = s_req[S_MEM];
  assign s_rsp[S_MEM] = mem_rsp;

  hbus_xbar #(
    .NUM_M   (NUM_M),
    .NUM_S   (NUM_S),
    .SLV_BASE(slave_base()),
    .SLV_MASK(slave_mask())
  ) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .s_req, .s_rsp
  );

  mutex_manager #(
    .NUM_MUTEXES(NUM_MUTEXES),
    .NUM_THREADS(NUM_THREADS)
  ) u_mutex (
    .clk, .rst_n,
    .s_req(s_req[S_MTX]), .s_rsp(s_rsp[S_MTX]),
    .wake_valid, .wake_tid, .wake_ready
  );

  thread_manager #(
    .NUM_THREADS(NUM_THREADS)
  ) u_tm (
    .clk, .rst_n,
    .s_req(s_req[S_TM]), .s_rsp(s_rsp[S_TM]),
    .add_valid, .add_tid, .add_ready
  );

  scheduler #(
    .NUM_THREADS(NUM_THREADS)
  ) u_sched (
    .clk, .rst_n,
    .s_req(s_req[S_SCH]), .s_rsp(s_rsp[S_SCH]),
    .m_req(m_req[M_SCH]), .m_rsp(m_rsp[M_SCH]),
    .add_valid, .add_tid, .add_ready,
    .wake_valid, .wake_tid, .wake_ready,
    .next_valid, .next_tid, .preempt
  );

  for (genvar k = 0; k < NH; k++) begin : g_thread
    logic [USTAT_W-1:0]  status;
    logic [DATA_W-1:0]   result;
    logic [OPCODE_W-1:0] opcode;
    logic [DATA_W-1:0]   arg1, arg2;

    hwti u_hwti (
      .clk, .rst_n,
      .s_req(s_req[k]), .s_rsp(s_rsp[k]),
      .m_req(m_req[k+1]), .m_rsp(m_rsp[k+1]),
      .intrfc2thrd_status(status), .intrfc2thrd_result(result),
      .thrd2intrfc_opcode(opcode),
      .thrd2intrfc_argument_one(arg1), .thrd2intrfc_argument_two(arg2)
    );

    if (k < NUM_MATRIX_THREADS) begin : g_matrix
      matrix_add_thread #(.MUTEX_ID(MUTEX_ID)) u_user (
        .clk,
        .intrfc2thrd_status(status), .intrfc2thrd_result(result),
        .thrd2intrfc_opcode(opcode),
        .thrd2intrfc_argument_one(arg1), .thrd2intrfc_argument_two(arg2)
      );
    end else begin : g_simple
      simple_thread u_user (
        .clk,
        .intrfc2thrd_status(status), .intrfc2thrd_result(result),
        .thrd2intrfc_opcode(opcode),
        .thrd2intrfc_argument_one(arg1), .thrd2intrfc_argument_two(arg2)
      );
    end
  end

endmodule
