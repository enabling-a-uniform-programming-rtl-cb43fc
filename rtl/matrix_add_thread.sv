// matrix_add_thread: the hardware mutexAdd thread.
//
// Adds two vectors in global memory, Z[i] = X[i] + Y[i], sharing the work
// with any number of other threads (hardware or software) that run the same
// algorithm on the same data. The thread's argument points to a shared
// struct matrix in global memory, word layout
//     +0 size   +4 index   +8 X base   +12 Y base   +16 Z base
// After reading size and the three base addresses, the thread repeats:
//     MUTEX_LOCK(MUTEX_ID); idx = LOAD(index); STORE(index, idx+1);
//     MUTEX_UNLOCK(MUTEX_ID);
//     if (idx < size) { Z[idx] = LOAD(X[idx]) + LOAD(Y[idx]); YIELD; }
// until it draws an index >= size, and then calls HTHREAD_EXIT with the
// number of elements it added (its share of the work).
//
// Every step is one system call through the HWTI's user interface: the
// opcode and arguments are driven for one cycle, then the thread waits for
// user_status ACK and takes user_result. The thread is reset synchronously
// by user_status RESET and starts on RUN, taking the struct pointer from
// intrfc2thrd_result. The algorithm follows the software thread it mirrors;
// the struct layout, the mutex number as a parameter and the exit value are
// this implementation's choices. Elements are 32-bit words, added modulo 2^32.
module matrix_add_thread
  import hthreads_pkg::*;
#(
  parameter int unsigned MUTEX_ID = 0
) (
  input  logic                clk,
  input  logic [USTAT_W-1:0]  intrfc2thrd_status,
  input  logic [DATA_W-1:0]   intrfc2thrd_result,
  output logic [OPCODE_W-1:0] thrd2intrfc_opcode,
  output logic [DATA_W-1:0]   thrd2intrfc_argument_one,
  output logic [DATA_W-1:0]   thrd2intrfc_argument_two
);

  typedef enum logic [4:0] {
    S_START, S_WAIT, S_GOT_SIZE, S_GOT_X, S_GOT_Y, S_GOT_Z, S_LOOP,
    S_LOCKED, S_GOT_IDX, S_STORED_IDX, S_UNLOCKED, S_GOT_XI, S_GOT_YI,
    S_STORED_Z, S_EXIT, S_DONE
  } st_e;

  st_e               current, ret;
  logic [DATA_W-1:0] res, base, size, xp, yp, zp, idx, xv, count;

  localparam logic [DATA_W-1:0] MUTEX_ARG = DATA_W'(MUTEX_ID);

  always_ff @(posedge clk) begin
    if (intrfc2thrd_status == USER_STATUS_RESET) begin
      current                  <= S_START;
      ret                      <= S_START;
      res                      <= '0;
      base                     <= '0;
      size                     <= '0;
      xp                       <= '0;
      yp                       <= '0;
      zp                       <= '0;
      idx                      <= '0;
      xv                       <= '0;
      count                    <= '0;
      thrd2intrfc_opcode       <= OP_NOOP;
      thrd2intrfc_argument_one <= '0;
      thrd2intrfc_argument_two <= '0;
    end else begin
      // default: the opcode is a one-cycle strobe
      thrd2intrfc_opcode <= OP_NOOP;
      unique case (current)
        S_START:
          if (intrfc2thrd_status == USER_STATUS_RUN) begin
            base <= intrfc2thrd_result;
            call(OP_LOAD, intrfc2thrd_result, '0, S_GOT_SIZE);
          end
        S_WAIT:
          if (intrfc2thrd_status == USER_STATUS_ACK) begin
            res     <= intrfc2thrd_result;
            current <= ret;
          end
        S_GOT_SIZE: begin
          size <= res;
          call(OP_LOAD, base + 32'd8, '0, S_GOT_X);
        end
        S_GOT_X: begin
          xp <= res;
          call(OP_LOAD, base + 32'd12, '0, S_GOT_Y);
        end
        S_GOT_Y: begin
          yp <= res;
          call(OP_LOAD, base + 32'd16, '0, S_GOT_Z);
        end
        S_GOT_Z: begin
          zp      <= res;
          current <= S_LOOP;
        end
        S_LOOP:
          call(OP_HTHREAD_MUTEX_LOCK, MUTEX_ARG, '0, S_LOCKED);
        S_LOCKED:
          call(OP_LOAD, base + 32'd4, '0, S_GOT_IDX);
        S_GOT_IDX: begin
          idx <= res;
          call(OP_STORE, base + 32'd4, res + 32'd1, S_STORED_IDX);
        end
        S_STORED_IDX:
          call(OP_HTHREAD_MUTEX_UNLOCK, MUTEX_ARG, '0, S_UNLOCKED);
        S_UNLOCKED:
          if (idx < size) call(OP_LOAD, xp + (idx << 2), '0, S_GOT_XI);
          else            current <= S_EXIT;
        S_GOT_XI: begin
          xv <= res;
          call(OP_LOAD, yp + (idx << 2), '0, S_GOT_YI);
        end
        S_GOT_YI: begin
          count <= count + 32'd1;
          call(OP_STORE, zp + (idx << 2), xv + res, S_STORED_Z);
        end
        S_STORED_Z:
          call(OP_HTHREAD_YIELD, '0, '0, S_LOOP);
        S_EXIT:
          call(OP_HTHREAD_EXIT, count, '0, S_DONE);
        S_DONE:
          current <= S_DONE;
        default:
          current <= S_START;
      endcase
    end
  end

  // Issue one system call and wait for its ACK, then continue at `next`.
  task automatic call(input opcode_e op, input logic [DATA_W-1:0] a1,
                      input logic [DATA_W-1:0] a2, input st_e next);
    thrd2intrfc_opcode       <= op;
    thrd2intrfc_argument_one <= a1;
    thrd2intrfc_argument_two <= a2;
    ret                      <= next;
    current                  <= S_WAIT;
  endtask

endmodule
