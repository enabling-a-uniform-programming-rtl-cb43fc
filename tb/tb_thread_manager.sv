// tb_thread_manager: self-checking testbench of the Thread Manager.
//
// Directed part: thread ID 0 reserved, CREATE handing out the lowest free IDs
// in order, ADD passed on to the scheduler port (held while add_ready is low,
// new calls stalled meanwhile), JOIN on a running child answering WAIT and
// the parent re-queued when the child exits, JOIN on an exited child
// answering OK, IDs reused after a join, errors (join on a free ID, on
// itself, a second joiner), writes ignored, the two-cycle answer time, and
// CREATE running out of IDs. Random part: 1500 calls against a reference
// model of the thread table.
module tb_thread_manager;
  import hthreads_pkg::*;

  localparam int unsigned NT = 16;   // small table so that it can be filled

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  bus_req_t         s_req;
  bus_rsp_t         s_rsp;
  logic             add_valid, add_ready;
  logic [TID_W-1:0] add_tid;

  thread_manager #(.NUM_THREADS(NT)) dut (.clk, .rst_n, .s_req, .s_rsp,
                                          .add_valid, .add_tid, .add_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  // hand-overs seen on the scheduler port
  int adds [$];
  always @(posedge clk) if (rst_n && add_valid && add_ready) adds.push_back(int'(add_tid));

  task automatic tm(input tm_op_e op, input int caller, input int obj, input bit we,
                    output logic [31:0] r, output int unsigned lat);
    int unsigned t0;
    @(posedge clk); #1;
    s_req = '{req: 1'b1, we: we,
              addr: svc_addr(TM_BASE, op, TID_W'(caller), 8'(obj)), wdata: 32'hFFFF_FFFF};
    t0 = cyc;
    do @(negedge clk); while (!s_rsp.ack);
    r = s_rsp.rdata;
    lat = cyc - t0;
    @(posedge clk); #1;
    s_req = BUS_REQ_IDLE;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit ref_used [NT], ref_exited [NT], ref_joined [NT];
  int ref_joiner [NT];

  initial begin
    logic [31:0] r;
    int unsigned lat;
    int t;
    s_req = BUS_REQ_IDLE;
    add_ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // CREATE hands out 1, 2, 3 (0 is the main thread)
    tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
    check(r == 1, $sformatf("first CREATE gives 1 (got %0d)", r));
    check(lat == 2, $sformatf("answer two cycles after req (got %0d)", lat));
    tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
    check(r == 2, "second CREATE gives 2");
    tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
    check(r == 3, "third CREATE gives 3");

    // ADD passes the thread on
    tm(TM_OP_ADD, 0, 2, 1'b0, r, lat);
    check(r == TM_OK, "ADD answers OK");
    repeat (2) @(posedge clk);
    check(adds.size() == 1 && adds[0] == 2, "ADD hands thread 2 to the scheduler");
    adds.delete();

    // JOIN on a running child: WAIT; the child's EXIT re-queues the parent
    tm(TM_OP_JOIN, 0, 2, 1'b0, r, lat);
    check(r == TM_WAIT, "JOIN on a running child answers WAIT");
    tm(TM_OP_JOIN, 3, 2, 1'b0, r, lat);
    check(r == TM_ERROR, "second joiner is refused");
    tm(TM_OP_EXIT, 2, 0, 1'b0, r, lat);
    check(r == TM_OK, "EXIT answers OK");
    repeat (2) @(posedge clk);
    check(adds.size() == 1 && adds[0] == 0, "child's EXIT re-queues the joined parent");
    adds.delete();

    // ID 2 is free again and is reused
    tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
    check(r == 2, "joined child's ID is reused");

    // JOIN on an exited child: OK at once, nothing re-queued
    tm(TM_OP_EXIT, 3, 0, 1'b0, r, lat);
    tm(TM_OP_JOIN, 0, 3, 1'b0, r, lat);
    check(r == TM_OK, "JOIN on an exited child answers OK");
    repeat (2) @(posedge clk);
    check(adds.size() == 0, "no hand-over for a join that need not wait");
    tm(TM_OP_JOIN, 0, 3, 1'b0, r, lat);
    check(r == TM_ERROR, "JOIN on a free ID is an error");
    tm(TM_OP_JOIN, 1, 1, 1'b0, r, lat);
    check(r == TM_ERROR, "JOIN on itself is an error");

    // writes are ignored
    tm(TM_OP_CREATE, 0, 0, 1'b1, r, lat);
    tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
    check(r == 3, "a write does not create");

    // hand-over held while the scheduler is busy; calls stall meanwhile
    add_ready = 1'b0;
    tm(TM_OP_ADD, 0, 1, 1'b0, r, lat);
    repeat (5) @(posedge clk);
    check(add_valid && add_tid == 1, "hand-over held while add_ready is low");
    fork
      tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
      begin
        repeat (6) @(posedge clk);
        #1 add_ready = 1'b1;
      end
    join
    check(lat >= 7, $sformatf("call stalled behind the pending hand-over (%0d cycles)", lat));
    check(r == 4, "CREATE after the stall gives 4");
    adds.delete();

    // fill the table
    for (int i = 5; i < NT; i++) begin
      tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
      check(r == 32'(i), $sformatf("CREATE gives %0d", i));
    end
    tm(TM_OP_CREATE, 0, 0, 1'b0, r, lat);
    check(r == TM_NO_ID, "CREATE with no free ID answers TM_NO_ID");

    // random part: start from a fresh table
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    adds.delete();
    foreach (ref_used[i]) begin
      ref_used[i] = (i == 0);
      ref_exited[i] = 1'b0;
      ref_joined[i] = 1'b0;
    end
    for (int n = 0; n < 1500; n++) begin
      int op, caller, obj, exp_add;
      logic [31:0] exp;
      op = $urandom_range(3);
      caller = $urandom_range(NT - 1);
      obj = $urandom_range(NT - 1);
      exp_add = -1;
      case (op)
        TM_OP_CREATE: begin
          exp = TM_NO_ID;
          for (int i = 0; i < NT; i++)
            if (!ref_used[i]) begin
              exp = 32'(i);
              ref_used[i] = 1'b1;
              ref_exited[i] = 1'b0;
              ref_joined[i] = 1'b0;
              break;
            end
        end
        TM_OP_ADD: begin
          exp = TM_OK;
          exp_add = obj;
        end
        TM_OP_JOIN:
          if (!ref_used[obj] || ref_joined[obj] || obj == caller) exp = TM_ERROR;
          else if (ref_exited[obj]) begin
            exp = TM_OK;
            ref_used[obj] = 1'b0;
            ref_exited[obj] = 1'b0;
          end else begin
            exp = TM_WAIT;
            ref_joined[obj] = 1'b1;
            ref_joiner[obj] = caller;
          end
        default: begin  // EXIT
          exp = TM_OK;
          if (ref_joined[caller]) begin
            exp_add = ref_joiner[caller];
            ref_used[caller] = 1'b0;
            ref_exited[caller] = 1'b0;
            ref_joined[caller] = 1'b0;
          end else ref_exited[caller] = 1'b1;
        end
      endcase
      tm(tm_op_e'(op), caller, obj, 1'b0, r, lat);
      check(r == exp, $sformatf("random op %0d caller %0d obj %0d: %0h, expected %0h",
                                op, caller, obj, r, exp));
      @(posedge clk);
      if (exp_add >= 0) begin
        t = (adds.size() > 0) ? adds.pop_front() : -1;
        check(t == exp_add, $sformatf("random hand-over %0d, expected %0d", t, exp_add));
      end
      check(adds.size() == 0, "no unexpected hand-over");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
