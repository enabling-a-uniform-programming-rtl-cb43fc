// tb_matrix_add_thread: self-checking testbench of the mutexAdd hardware thread.
//
// The testbench acts as the HWTI and everything behind it: it answers each
// system call after a random delay with ACK and a result, keeps a behavioural
// global memory holding the shared struct matrix and the X, Y and Z vectors,
// and tracks the mutex. It checks that Z = X + Y for every element, that the
// shared index ends at size + 1 (one final draw past the end), that the index
// word is only read and written while the thread holds the mutex, that every
// LOCK is followed by an UNLOCK of the same mutex, that a YIELD follows each
// element, that no memory outside the struct and vectors is touched, and that
// the exit value is the number of elements this thread added. A second run
// starts with the index part-way, as if other threads had taken the first
// elements, and checks that only the rest is done.
module tb_matrix_add_thread;
  import hthreads_pkg::*;

  localparam int unsigned MID = 3;
  localparam logic [31:0] STRUCT = 32'h0000_1000;
  localparam logic [31:0] XB = 32'h0001_0000, YB = 32'h0002_0000, ZB = 32'h0003_0000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  logic [USTAT_W-1:0]  st;
  logic [DATA_W-1:0]   res;
  logic [OPCODE_W-1:0] opcode;
  logic [DATA_W-1:0]   a1, a2;

  matrix_add_thread #(.MUTEX_ID(MID)) dut (
    .clk, .intrfc2thrd_status(st), .intrfc2thrd_result(res),
    .thrd2intrfc_opcode(opcode), .thrd2intrfc_argument_one(a1),
    .thrd2intrfc_argument_two(a2));

  logic [31:0] mem [logic [29:0]];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  function automatic bit legal(logic [31:0] a, int unsigned size);
    if (a >= STRUCT && a < STRUCT + 20) return 1'b1;
    if (a >= XB && a < XB + 4 * size) return 1'b1;
    if (a >= YB && a < YB + 4 * size) return 1'b1;
    if (a >= ZB && a < ZB + 4 * size) return 1'b1;
    return 1'b0;
  endfunction

  // serve the thread until it exits; returns its exit value
  task automatic serve(input int unsigned size, output logic [31:0] exit_val,
                       output int unsigned n_lock, output int unsigned n_yield);
    bit held = 1'b0;
    bit done = 1'b0;
    int unsigned since_elem = 0;
    n_lock = 0;
    n_yield = 0;
    exit_val = '0;
    while (!done) begin
      logic [31:0] r;
      opcode_e op;
      logic [31:0] x1, x2;
      do @(negedge clk); while (opcode == OP_NOOP);
      op = opcode_e'(opcode); x1 = a1; x2 = a2;
      r = '0;
      case (op)
        OP_LOAD: begin
          check(legal(x1, size), $sformatf("LOAD address %h inside the data", x1));
          if (x1 == STRUCT + 4) check(held, "index read under the mutex");
          r = mem.exists(x1[31:2]) ? mem[x1[31:2]] : '0;
        end
        OP_STORE: begin
          check(legal(x1, size), $sformatf("STORE address %h inside the data", x1));
          if (x1 == STRUCT + 4) check(held, "index written under the mutex");
          if (x1 >= ZB) since_elem++;
          mem[x1[31:2]] = x2;
        end
        OP_HTHREAD_MUTEX_LOCK: begin
          check(!held && x1 == MID, "LOCK of the configured mutex, not held yet");
          held = 1'b1;
          n_lock++;
        end
        OP_HTHREAD_MUTEX_UNLOCK: begin
          check(held && x1 == MID, "UNLOCK of the held mutex");
          held = 1'b0;
        end
        OP_HTHREAD_YIELD: begin
          check(since_elem == 1, "one YIELD after each element");
          since_elem = 0;
          n_yield++;
        end
        OP_HTHREAD_EXIT: begin
          check(!held, "exit without holding the mutex");
          exit_val = x1;
          done = 1'b1;
        end
        default: check(1'b0, $sformatf("unexpected opcode %0d", op));
      endcase
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #1 st = USER_STATUS_ACK; res = r;
      @(posedge clk); #1 st = USER_STATUS_RUN;
    end
  endtask

  task automatic run_one(input int unsigned size, input int unsigned start_idx);
    logic [31:0] ev;
    int unsigned nl, ny;
    mem.delete();
    mem[STRUCT[31:2]]     = size;
    mem[STRUCT[31:2] + 1] = start_idx;
    mem[STRUCT[31:2] + 2] = XB;
    mem[STRUCT[31:2] + 3] = YB;
    mem[STRUCT[31:2] + 4] = ZB;
    for (int i = 0; i < size; i++) begin
      mem[XB[31:2] + i] = $urandom();
      mem[YB[31:2] + i] = $urandom();
    end
    @(posedge clk); #1 st = USER_STATUS_RESET;
    repeat (2) @(posedge clk);
    #1 res = STRUCT; st = USER_STATUS_RUN;
    serve(size, ev, nl, ny);
    for (int i = 0; i < size; i++) begin
      if (i < start_idx)
        check(!mem.exists(ZB[31:2] + i), $sformatf("Z[%0d] left to the other threads", i));
      else
        check(mem.exists(ZB[31:2] + i) &&
              mem[ZB[31:2] + i] == mem[XB[31:2] + i] + mem[YB[31:2] + i],
              $sformatf("Z[%0d] = X + Y", i));
    end
    check(mem[STRUCT[31:2] + 1] == size + 1, "shared index ends at size + 1");
    check(ev == size - start_idx, $sformatf("exit value %0d = elements added", ev));
    check(nl == size - start_idx + 1, "one LOCK per element plus the final draw");
    check(ny == size - start_idx, "one YIELD per element");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = USER_STATUS_RESET; res = '0;
    run_one(20, 0);
    run_one(30, 12);
    run_one(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
