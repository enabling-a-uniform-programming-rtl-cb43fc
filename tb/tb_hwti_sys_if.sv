// tb_hwti_sys_if: self-checking testbench of the HWTI system interface.
//
// Drives the bus slave port and the controller-side update inputs directly.
// Checks: reset values; write/read-back of thread_id and argument; the
// one-cycle pulses for a thread_id write and for RUN and RESET commands (and
// none for other writes); command read-back; status and result are read-only
// from the bus and follow the controller's updates; clr returns every
// register to its initial value; unknown offsets read zero; every access is
// acknowledged exactly one cycle after the request, for one cycle.
module tb_hwti_sys_if;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  bus_req_t          s_req;
  bus_rsp_t          s_rsp;
  logic [TID_W-1:0]  thread_id;
  logic [DATA_W-1:0] argument, result_d;
  logic              tid_written, cmd_run, cmd_reset, clr, status_we, result_we;
  sys_status_e       status_d, status;

  hwti_sys_if dut (.clk, .rst_n, .s_req, .s_rsp, .thread_id, .argument,
                   .tid_written, .cmd_run, .cmd_reset, .clr, .status_we,
                   .status_d, .result_we, .result_d, .status);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // pulse counters
  int n_tid = 0, n_run = 0, n_rst = 0;
  always @(negedge clk) begin
    if (tid_written) n_tid++;
    if (cmd_run)     n_run++;
    if (cmd_reset)   n_rst++;
  end

  task automatic access(input bit we, input logic [2:0] off, input logic [31:0] d,
                        output logic [31:0] r);
    int unsigned t0;
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: we, addr: 32'h1000_0000 | {27'd0, off, 2'b00}, wdata: d};
    t0 = cyc;
    do @(negedge clk); while (!s_rsp.ack);
    r = s_rsp.rdata;
    check(cyc - t0 == 1, "ack one cycle after the request");
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
    @(negedge clk);
    check(!s_rsp.ack, "ack lasts one cycle");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    s_req = BUS_REQ_IDLE;
    clr = 1'b0; status_we = 1'b0; result_we = 1'b0;
    status_d = ST_NOT_USED; result_d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    access(1'b0, REG_STATUS, '0, r);
    check(r == 32'(ST_NOT_USED), "status NOT_USED after reset");
    access(1'b0, REG_THREAD_ID, '0, r);
    check(r == 0, "thread_id 0 after reset");

    access(1'b1, REG_THREAD_ID, 32'hFFFF_FF5C, r);
    check(thread_id == 8'h5C, "thread_id written (low bits)");
    check(n_tid == 1, "thread_id write pulses tid_written once");
    access(1'b0, REG_THREAD_ID, '0, r);
    check(r == 32'h5C, "thread_id reads back");

    access(1'b1, REG_ARGUMENT, 32'hA5A5_0F0F, r);
    check(argument == 32'hA5A5_0F0F, "argument written");
    access(1'b0, REG_ARGUMENT, '0, r);
    check(r == 32'hA5A5_0F0F, "argument reads back");
    check(n_tid == 1 && n_run == 0 && n_rst == 0, "argument write gives no pulse");

    access(1'b1, REG_COMMAND, 32'(CMD_RUN), r);
    check(n_run == 1 && n_rst == 0, "RUN command pulses cmd_run once");
    access(1'b0, REG_COMMAND, '0, r);
    check(r == 32'(CMD_RUN), "command reads back RUN");
    access(1'b1, REG_COMMAND, 32'(CMD_RESET), r);
    check(n_rst == 1 && n_run == 1, "RESET command pulses cmd_reset once");

    // status and result are not writable from the bus
    access(1'b1, REG_STATUS, 32'd3, r);
    access(1'b1, REG_RESULT, 32'h1234, r);
    access(1'b0, REG_STATUS, '0, r);
    check(r == 32'(ST_NOT_USED), "status is read-only on the bus");
    access(1'b0, REG_RESULT, '0, r);
    check(r == 0, "result is read-only on the bus");

    // controller updates
    @(posedge clk); #1;
    status_we = 1'b1; status_d = ST_BLOCKED;
    result_we = 1'b1; result_d = 32'hBEEF_0001;
    @(posedge clk); #1;
    status_we = 1'b0; result_we = 1'b0;
    check(status == ST_BLOCKED, "status follows the controller");
    access(1'b0, REG_STATUS, '0, r);
    check(r == 32'(ST_BLOCKED), "status reads BLOCKED");
    access(1'b0, REG_RESULT, '0, r);
    check(r == 32'hBEEF_0001, "result reads the controller's value");

    access(1'b0, 3'd6, '0, r);
    check(r == 0, "unknown offset reads zero");

    // clr
    @(posedge clk); #1 clr = 1'b1;
    @(posedge clk); #1 clr = 1'b0;
    check(thread_id == 0 && argument == 0 && status == ST_NOT_USED, "clr resets the context");
    access(1'b0, REG_RESULT, '0, r);
    check(r == 0, "clr clears result");
    access(1'b0, REG_COMMAND, '0, r);
    check(r == 32'(CMD_NONE), "clr clears command");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
