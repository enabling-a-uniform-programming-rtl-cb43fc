// hwti_user_if: user interface of the hardware thread interface (HWTI).
//
// Holds the registers the user thread sees: user_status, user_result,
// user_opcode, user_argument_one and user_argument_two. They are not on the
// bus; together they play the part of a software thread's syscall entry.
// The user thread places an opcode other than NOOP on thrd2intrfc_opcode for
// one cycle, with its arguments; this state machine latches opcode and both
// arguments and raises call_valid to the controller until the controller takes
// the call with call_take. A new opcode is only latched while user_status is
// RUN and no call is pending; while a call is being served the thread waits
// for user_status ACK, which the controller holds for one cycle together with
// the result in user_result, and then returns to RUN.
//
// user_status and user_result are written only by the controller
// (status_we / result_we); clr returns everything to RESET / zero.
//
// Timing: an opcode driven in cycle t is latched at the edge ending cycle t,
// so call_valid is high from cycle t+1. The one-cycle opcode strobe follows
// the generated thread code of the design (opcode, then NOOP while waiting for
// ACK); the valid/take handshake to the controller is this implementation's.
module hwti_user_if
  import hthreads_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // user thread side
  output logic [USTAT_W-1:0]  intrfc2thrd_status,
  output logic [DATA_W-1:0]   intrfc2thrd_result,
  input  logic [OPCODE_W-1:0] thrd2intrfc_opcode,
  input  logic [DATA_W-1:0]   thrd2intrfc_argument_one,
  input  logic [DATA_W-1:0]   thrd2intrfc_argument_two,
  // controller side
  output logic                call_valid,
  output opcode_e             user_opcode,
  output logic [DATA_W-1:0]   user_argument_one,
  output logic [DATA_W-1:0]   user_argument_two,
  input  logic                call_take,
  input  logic                clr,
  input  logic                status_we,
  input  user_status_e        status_d,
  input  logic                result_we,
  input  logic [DATA_W-1:0]   result_d,
  output user_status_e        user_status
);

  logic [DATA_W-1:0] user_result;

  assign intrfc2thrd_status = user_status;
  assign intrfc2thrd_result = user_result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      user_status       <= USER_STATUS_RESET;
      user_result       <= '0;
      user_opcode       <= OP_NOOP;
      user_argument_one <= '0;
      user_argument_two <= '0;
      call_valid        <= 1'b0;
    end else if (clr) begin
      user_status       <= USER_STATUS_RESET;
      user_result       <= '0;
      user_opcode       <= OP_NOOP;
      user_argument_one <= '0;
      user_argument_two <= '0;
      call_valid        <= 1'b0;
    end else begin
      if (status_we) user_status <= status_d;
      if (result_we) user_result <= result_d;
      if (call_take) call_valid <= 1'b0;
      if (!call_valid && user_status == USER_STATUS_RUN &&
          thrd2intrfc_opcode != OP_NOOP) begin
        user_opcode       <= opcode_e'(thrd2intrfc_opcode);
        user_argument_one <= thrd2intrfc_argument_one;
        user_argument_two <= thrd2intrfc_argument_two;
        call_valid        <= 1'b1;
      end
    end
  end

  // The controller only takes a call that is pending.
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 call_take |-> call_valid);

endmodule
