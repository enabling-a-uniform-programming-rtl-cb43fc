// tb_simple_thread: self-checking testbench of the simple_thread user logic.
//
// The testbench acts as the HWTI: it holds user_status at RESET, passes the
// bound in user_result and switches to RUN, waits for the thread's
// HTHREAD_EXIT opcode, answers with ACK and then RUN. Checks, for several
// bounds including 0: the exit value equals the bound, the opcode is a
// one-cycle strobe, the loop takes bound + 3 cycles from RUN to the strobe,
// nothing else is ever issued, the thread stays quiet after the ACK, and a
// RESET status brings it back so that it can run again.
module tb_simple_thread;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  logic [USTAT_W-1:0]  st;
  logic [DATA_W-1:0]   res;
  logic [OPCODE_W-1:0] opcode;
  logic [DATA_W-1:0]   a1, a2;

  simple_thread dut (.clk, .intrfc2thrd_status(st), .intrfc2thrd_result(res),
                     .thrd2intrfc_opcode(opcode), .thrd2intrfc_argument_one(a1),
                     .thrd2intrfc_argument_two(a2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic run_one(input int unsigned bound);
    int unsigned t0, n_ops;
    @(posedge clk); #1 st = USER_STATUS_RESET; res = 32'hFFFF_FFFF;
    repeat (2) @(posedge clk);
    #1 res = bound; st = USER_STATUS_RUN;
    t0 = cyc;
    do @(negedge clk); while (opcode == OP_NOOP && cyc - t0 < bound + 50);
    check(opcode == OP_HTHREAD_EXIT, $sformatf("bound %0d: thread calls HTHREAD_EXIT", bound));
    check(a1 == bound, $sformatf("bound %0d: exit value %0d", bound, a1));
    check(cyc - t0 == bound + 3, $sformatf("bound %0d: %0d cycles from RUN to exit", bound, cyc - t0));
    @(negedge clk);
    check(opcode == OP_NOOP, "opcode is a one-cycle strobe");
    repeat (3) @(negedge clk);
    @(posedge clk); #1 st = USER_STATUS_ACK;
    @(posedge clk); #1 st = USER_STATUS_RUN;
    n_ops = 0;
    repeat (20) begin
      @(negedge clk);
      if (opcode != OP_NOOP) n_ops++;
    end
    check(n_ops == 0, "thread stays idle after the exit ACK");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = USER_STATUS_RESET; res = '0;
    run_one(5);
    run_one(0);
    run_one(1);
    run_one(200);
    run_one($urandom_range(2, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
