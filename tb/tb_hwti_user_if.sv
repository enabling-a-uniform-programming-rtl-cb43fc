// tb_hwti_user_if: self-checking testbench of the HWTI user interface.
//
// Plays the user thread (one-cycle opcode strobes) and the controller
// (call_take, status and result updates). Checks: RESET status after start;
// no call is latched while user_status is RESET; a call issued while RUN is
// latched with both arguments the cycle after the strobe and stays pending
// until taken; a second strobe while a call is pending is not taken; NOOP
// latches nothing; user_status and user_result follow the controller and are
// seen by the thread; clr returns everything to RESET.
module tb_hwti_user_if;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  logic [USTAT_W-1:0]  st;
  logic [DATA_W-1:0]   res;
  logic [OPCODE_W-1:0] opcode;
  logic [DATA_W-1:0]   a1, a2;
  logic                call_valid, call_take, clr, status_we, result_we;
  opcode_e             user_opcode;
  logic [DATA_W-1:0]   ua1, ua2, result_d;
  user_status_e        status_d, user_status;

  hwti_user_if dut (
    .clk, .rst_n, .intrfc2thrd_status(st), .intrfc2thrd_result(res),
    .thrd2intrfc_opcode(opcode), .thrd2intrfc_argument_one(a1),
    .thrd2intrfc_argument_two(a2), .call_valid, .user_opcode,
    .user_argument_one(ua1), .user_argument_two(ua2), .call_take, .clr,
    .status_we, .status_d, .result_we, .result_d, .user_status
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic strobe(input opcode_e op, input logic [31:0] x1, input logic [31:0] x2);
    @(posedge clk); #1;
    opcode = op; a1 = x1; a2 = x2;
    @(posedge clk); #1;
    opcode = OP_NOOP; a1 = '1; a2 = '1;
  endtask

  task automatic set_status(input user_status_e s, input logic [31:0] r);
    @(posedge clk); #1;
    status_we = 1'b1; status_d = s; result_we = 1'b1; result_d = r;
    @(posedge clk); #1;
    status_we = 1'b0; result_we = 1'b0;
  endtask

  task automatic take();
    @(posedge clk); #1 call_take = 1'b1;
    @(posedge clk); #1 call_take = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode = OP_NOOP; a1 = '0; a2 = '0;
    call_take = 1'b0; clr = 1'b0; status_we = 1'b0; result_we = 1'b0;
    status_d = USER_STATUS_RESET; result_d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    check(st == USER_STATUS_RESET, "user_status RESET after start");
    strobe(OP_LOAD, 32'h10, 32'h20);
    @(negedge clk);
    check(!call_valid, "no call latched while RESET");

    set_status(USER_STATUS_RUN, 32'h0000_ABCD);
    check(st == USER_STATUS_RUN && res == 32'h0000_ABCD, "thread sees RUN and user_result");

    strobe(OP_STORE, 32'h0000_0100, 32'h0000_0200);
    // strobe() returns one cycle after the strobe cycle: call already pending
    check(call_valid, "call pending the cycle after the strobe");
    check(user_opcode == OP_STORE && ua1 == 32'h100 && ua2 == 32'h200,
          "opcode and both arguments latched");
    strobe(OP_HTHREAD_SELF, 32'h1, 32'h2);
    check(user_opcode == OP_STORE && ua1 == 32'h100, "second strobe ignored while pending");
    repeat (3) @(negedge clk);
    check(call_valid, "call stays pending until taken");
    take();
    @(negedge clk);
    check(!call_valid, "call_take clears the pending call");

    repeat (3) @(posedge clk);
    check(!call_valid, "NOOP latches nothing");

    set_status(USER_STATUS_ACK, 32'h5555_AAAA);
    check(st == USER_STATUS_ACK && res == 32'h5555_AAAA, "ACK and result seen by the thread");
    strobe(OP_HTHREAD_YIELD, '0, '0);
    check(!call_valid, "no call latched while ACK");
    set_status(USER_STATUS_RUN, 32'h5555_AAAA);
    strobe(OP_HTHREAD_EXIT, 32'h77, '0);
    check(call_valid && user_opcode == OP_HTHREAD_EXIT && ua1 == 32'h77, "EXIT latched");

    @(posedge clk); #1 clr = 1'b1;
    @(posedge clk); #1 clr = 1'b0;
    check(st == USER_STATUS_RESET && res == 0 && !call_valid && user_opcode == OP_NOOP,
          "clr returns the user interface to RESET");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
