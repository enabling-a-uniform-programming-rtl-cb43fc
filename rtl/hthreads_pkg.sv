// hthreads_pkg: types and constants shared by the hardware thread interface
// (HWTI), the user threads, the Mutex Manager and the system bus.
//
// Names that come from the design itself: the HWTI system-call opcodes (NOOP,
// HTHREAD_EXIT, LOAD, STORE, HTHREAD_SELF, HTHREAD_YIELD, mutex lock and
// unlock), the user_status values RESET/RUN/ACK, the system status values
// NOT_USED/USED/RUNNING/BLOCKED/EXITED, the commands RUN/RESET, the five
// system registers, and the widths of the user-thread signals (4-bit status,
// 32-bit result and arguments, 8-bit opcode).
//
// Choices of this implementation: the numeric encodings, the 8-bit thread ID,
// the register offsets, the address map and the single-beat request/acknowledge
// bus that stands in for the vendor bus attachment.
package hthreads_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned TID_W    = 8;   // up to 256 threads
  localparam int unsigned OPCODE_W = 8;
  localparam int unsigned USTAT_W  = 4;

  // ---------------------------------------------------------------------
  // User interface: system-call opcodes placed on thrd2intrfc_opcode
  // ---------------------------------------------------------------------
  typedef enum logic [OPCODE_W-1:0] {
    OP_NOOP                 = 8'h00,
    OP_HTHREAD_EXIT         = 8'h01,
    OP_LOAD                 = 8'h02,
    OP_STORE                = 8'h03,
    OP_HTHREAD_SELF         = 8'h04,
    OP_HTHREAD_YIELD        = 8'h05,
    OP_HTHREAD_MUTEX_LOCK   = 8'h06,
    OP_HTHREAD_MUTEX_UNLOCK = 8'h07
  } opcode_e;

  // user_status values driven by the HWTI into the user thread
  typedef enum logic [USTAT_W-1:0] {
    USER_STATUS_RESET = 4'h0,
    USER_STATUS_RUN   = 4'h1,
    USER_STATUS_ACK   = 4'h2
  } user_status_e;

  // ---------------------------------------------------------------------
  // System interface: status register values and commands
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    ST_NOT_USED = 3'd0,
    ST_USED     = 3'd1,
    ST_RUNNING  = 3'd2,
    ST_BLOCKED  = 3'd3,
    ST_EXITED   = 3'd4
  } sys_status_e;

  typedef enum logic [1:0] {
    CMD_NONE  = 2'd0,
    CMD_RUN   = 2'd1,
    CMD_RESET = 2'd2
  } command_e;

  // Word offsets (byte address bits [4:2]) of the system registers
  localparam logic [2:0] REG_THREAD_ID = 3'd0;
  localparam logic [2:0] REG_COMMAND   = 3'd1;
  localparam logic [2:0] REG_STATUS    = 3'd2;
  localparam logic [2:0] REG_ARGUMENT  = 3'd3;
  localparam logic [2:0] REG_RESULT    = 3'd4;

  // ---------------------------------------------------------------------
  // Address map (bits [31:28] select the region)
  //   0x1000_0000 + k*0x100 : system registers of HWTI k
  //   0x2000_0000           : Mutex Manager
  //   0x3000_0000           : Thread Manager
//   0x4000_0000           : Scheduler
  //   anything else         : global memory
  // Service calls are single loads; the operation, the calling thread and
  // the object are encoded in the address lines.
  // ---------------------------------------------------------------------
  localparam logic [ADDR_W-1:0] HWTI_BASE  = 32'h1000_0000;
  localparam logic [ADDR_W-1:0] HWTI_SPAN  = 32'h0000_0100;
  localparam logic [ADDR_W-1:0] MUTEX_BASE = 32'h2000_0000;
  localparam logic [ADDR_W-1:0] TM_BASE    = 32'h3000_0000;

  // Service address fields
  localparam int unsigned SVC_OP_LSB  = 18;  // [19:18] operation
  localparam int unsigned SVC_TID_LSB = 10;  // [17:10] calling thread ID
  localparam int unsigned SVC_OBJ_LSB = 2;   // [9:2]   mutex / target thread

  typedef enum logic [1:0] {
    MUTEX_OP_LOCK    = 2'd0,
    MUTEX_OP_UNLOCK  = 2'd1,
    MUTEX_OP_TRYLOCK = 2'd2,
    MUTEX_OP_OWNER   = 2'd3
  } mutex_op_e;

  // Mutex Manager load results
  localparam logic [DATA_W-1:0] MUTEX_GRANTED = 32'd0;
  localparam logic [DATA_W-1:0] MUTEX_BLOCKED = 32'd1;
  localparam logic [DATA_W-1:0] MUTEX_ERROR   = 32'd2;

  // Thread Manager calls (loads; operation, caller and target in the address)
  typedef enum logic [1:0] {
    TM_OP_EXIT   = 2'd0,   // caller has finished
    TM_OP_JOIN   = 2'd1,   // caller waits for thread obj to exit
    TM_OP_CREATE = 2'd2,   // allocate a thread ID, parent = caller
    TM_OP_ADD    = 2'd3    // put thread obj on the ready-to-run queue
  } tm_op_e;

  // Thread Manager load results (CREATE returns the new ID, or TM_NO_ID)
  localparam logic [DATA_W-1:0] TM_OK      = 32'd0;  // done / joined
  localparam logic [DATA_W-1:0] TM_WAIT    = 32'd1;  // join: child still running
  localparam logic [DATA_W-1:0] TM_ERROR   = 32'd2;
  localparam logic [DATA_W-1:0] TM_NO_ID   = 32'h8000_0000;

  // Scheduler calls
  localparam logic [ADDR_W-1:0] SCHED_BASE = 32'h4000_0000;
  typedef enum logic [1:0] {
    SCHED_OP_SET_SW = 2'd0,  // store: thread obj is a software thread, wdata = priority
    SCHED_OP_SET_HW = 2'd1,  // store: thread obj is a hardware thread, wdata = HWTI base
    SCHED_OP_NEXT   = 2'd2,  // load: context switch, take next_thread
    SCHED_OP_PEEK   = 2'd3   // load: next_thread without taking it
  } sched_op_e;
  localparam int unsigned PRIO_W = 7;   // priority 0 is the highest

  function automatic logic [ADDR_W-1:0] svc_addr(logic [ADDR_W-1:0] base,
                                                 logic [1:0] op,
                                                 logic [TID_W-1:0] tid,
                                                 logic [7:0] obj);
    logic [ADDR_W-1:0] a;
    a = base;
    a[SVC_OP_LSB+:2]     = op;
    a[SVC_TID_LSB+:TID_W] = tid;
    a[SVC_OBJ_LSB+:8]    = obj;
    return a;
  endfunction

  // ---------------------------------------------------------------------
  // System bus: single-beat transfers. A master raises req with we, addr and
  // wdata and holds them until the slave answers with a one-cycle ack (with
  // rdata on a read); it drops req in the cycle after ack.
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              ack;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  localparam bus_req_t BUS_REQ_IDLE = '{req: 1'b0, we: 1'b0, addr: '0, wdata: '0};
  localparam bus_rsp_t BUS_RSP_IDLE = '{ack: 1'b0, rdata: '0};

endpackage
