// simple_thread: a minimal hardware user thread behind an HWTI.
//
// The hardware form of the C thread
//     x = 0; for (i = 0; i < bound; i++) x++; return x;
// with bound the thread's argument. It shows how a user thread is
// sequenced by its HWTI: while intrfc2thrd_status is RESET the thread holds
// its initial state; when it turns RUN the argument is read from
// intrfc2thrd_result and the loop runs one iteration per clock; at the end the
// thread issues HTHREAD_EXIT with x as argument_one for one cycle, waits for
// ACK, and then idles until the HWTI resets it.
//
// Ports are the five user-interface signals of the HWTI (4-bit status,
// 32-bit result and arguments, 8-bit opcode) and the clock; there is no
// reset pin, the HWTI's RESET status resets the thread synchronously, as in
// the generated thread code this follows. State names and the one-cycle
// opcode strobe follow that code; the loop body is this implementation's.
// Timing: the exit opcode appears bound + 3 cycles after user_status turns RUN.
module simple_thread
  import hthreads_pkg::*;
(
  input  logic                clk,
  input  logic [USTAT_W-1:0]  intrfc2thrd_status,
  input  logic [DATA_W-1:0]   intrfc2thrd_result,
  output logic [OPCODE_W-1:0] thrd2intrfc_opcode,
  output logic [DATA_W-1:0]   thrd2intrfc_argument_one,
  output logic [DATA_W-1:0]   thrd2intrfc_argument_two
);

  typedef enum logic [2:0] {N0, N_LOOP, FINAL0, FINAL1, FINAL2} st_e;
  st_e               current;
  logic [DATA_W-1:0] bound, x, i;

  assign thrd2intrfc_argument_two = '0;

  always_ff @(posedge clk) begin
    if (intrfc2thrd_status == USER_STATUS_RESET) begin
      current                  <= N0;
      bound                    <= '0;
      x                        <= '0;
      i                        <= '0;
      thrd2intrfc_opcode       <= OP_NOOP;
      thrd2intrfc_argument_one <= '0;
    end else if (intrfc2thrd_status == USER_STATUS_RUN ||
                 intrfc2thrd_status == USER_STATUS_ACK) begin
      unique case (current)
        N0:
          if (intrfc2thrd_status == USER_STATUS_RUN) begin
            bound   <= intrfc2thrd_result;
            current <= N_LOOP;
          end
        N_LOOP:
          if (i < bound) begin
            x <= x + 1;
            i <= i + 1;
          end else begin
            current <= FINAL0;
          end
        FINAL0: begin
          thrd2intrfc_opcode       <= OP_HTHREAD_EXIT;
          thrd2intrfc_argument_one <= x;
          current                  <= FINAL1;
        end
        FINAL1: begin
          thrd2intrfc_opcode <= OP_NOOP;
          if (intrfc2thrd_status == USER_STATUS_ACK) current <= FINAL2;
        end
        FINAL2: current <= FINAL2;
        default: current <= N0;
      endcase
    end
  end

endmodule
