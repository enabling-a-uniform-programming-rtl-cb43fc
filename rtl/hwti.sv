// hwti: hardware thread interface.
//
// The HWTI is to a hardware thread what the syscall layer is to a software
// thread: the user thread's logic asks for system services (Table of opcodes
// in hthreads_pkg) through a small register interface, and the HWTI turns
// them into loads and stores on the system bus towards global memory, the
// Mutex Manager and the Thread Manager, using the same load/store protocol a
// software thread uses. The system services in turn see the hardware thread
// only through five bus registers (its context).
//
// It is built from three state machines, as in the design it follows:
//   hwti_sys_if   system interface: thread_id, command, status, argument,
//                 result, a bus slave (the system side of the thread)
//   hwti_user_if  user interface: user_status, user_result, user_opcode,
//                 user_argument_one/two (the user-thread side)
//   hwti_ctrl     the system-call mechanism joining the two
//
// Ports: s_req/s_rsp is the slave port for the system registers (decoded on
// address bits [4:2]); m_req/m_rsp is the master port for service calls and
// memory accesses; the intrfc2thrd_* / thrd2intrfc_* signals go to the user
// thread. See hwti_ctrl for the cycle timing of each call.
module hwti
  import hthreads_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  bus_req_t            s_req,
  output bus_rsp_t            s_rsp,
  output bus_req_t            m_req,
  input  bus_rsp_t            m_rsp,
  output logic [USTAT_W-1:0]  intrfc2thrd_status,
  output logic [DATA_W-1:0]   intrfc2thrd_result,
  input  logic [OPCODE_W-1:0] thrd2intrfc_opcode,
  input  logic [DATA_W-1:0]   thrd2intrfc_argument_one,
  input  logic [DATA_W-1:0]   thrd2intrfc_argument_two
);

  logic [TID_W-1:0]  thread_id;
  logic [DATA_W-1:0] argument;
  logic              tid_written, cmd_run, cmd_reset, clr;
  sys_status_e       status, sys_status_d;
  logic              sys_status_we, sys_result_we;
  logic [DATA_W-1:0] sys_result_d;

  logic              call_valid, call_take;
  opcode_e           user_opcode;
  logic [DATA_W-1:0] user_argument_one, user_argument_two;
  logic              usr_status_we, usr_result_we;
  user_status_e      usr_status_d, user_status;
  logic [DATA_W-1:0] usr_result_d;

  hwti_sys_if u_sys (
    .clk, .rst_n, .s_req, .s_rsp,
    .thread_id, .argument, .tid_written, .cmd_run, .cmd_reset,
    .clr, .status_we(sys_status_we), .status_d(sys_status_d),
    .result_we(sys_result_we), .result_d(sys_result_d), .status
  );

  hwti_user_if u_user (
    .clk, .rst_n,
    .intrfc2thrd_status, .intrfc2thrd_result,
    .thrd2intrfc_opcode, .thrd2intrfc_argument_one, .thrd2intrfc_argument_two,
    .call_valid, .user_opcode, .user_argument_one, .user_argument_two,
    .call_take, .clr,
    .status_we(usr_status_we), .status_d(usr_status_d),
    .result_we(usr_result_we), .result_d(usr_result_d), .user_status
  );

  hwti_ctrl u_ctrl (
    .clk, .rst_n,
    .thread_id, .argument, .tid_written, .cmd_run, .cmd_reset, .status,
    .clr, .sys_status_we, .sys_status_d, .sys_result_we, .sys_result_d,
    .call_valid, .user_opcode, .user_argument_one, .user_argument_two,
    .call_take, .usr_status_we, .usr_status_d, .usr_result_we, .usr_result_d,
    .m_req, .m_rsp
  );

endmodule
