// control_unit: finite state machine that runs a matrix multiplication.
//
// After `start` it multiplies the matrix pairs 0 .. mat_last held in the
// input memories, one pair after the other, and then pulses `stop`. For each
// pair it steps the element counter through the N*N pairs (k, j), k outer and
// j inner, and for each one goes through
//   C_READ  read A[*][k] (all banks) and B[k][j] (rd_enable);
//   C_MUL   pulse `mul_start` to every processing element;
//   C_WAIT  wait for `mul_stop`; in that cycle pulse `acc_en` (with `first`
//           while k = 0) so each PE adds its product into its FIFO, and step
//           the counters: back to C_READ, or to C_DRAIN after the last pair;
// and in C_DRAIN writes the N*N results, one per cycle, from the PE FIFOs into
// the result memory (PE `drain_row` = i, column j from its FIFO head), then
// steps the matrix counter and starts the next pair, or ends in C_DONE.
// C_INIT clears the counters and latches `mat_last`.
//
// Addresses, for pair m = matcount, with count = rowcount*N + colcount:
//   A banks: m*N + rowcount      B memory and result memory: m*N*N + count
//
// Timing: each element takes W+4 cycles (read, start, W+2 for the multiplier),
// so one pair takes N*N*(W+4) + N*N cycles, and a run of P pairs takes
// 2 + P*N*N*(W+5) + 1 cycles from `start` to `stop` (P*117 + 3 for N=3, W=8).
//
// Following the original description: a control unit built as a state machine with Start and
// Stop that operates the submodules, memories read from address zero on, and
// the row, column and matrix counters. The states, the loop order and the
// address layout are this design's own choices.
module control_unit #(
  parameter int unsigned N      = matmul_pkg::MAT_N,
  parameter int unsigned ADDR_W = matmul_pkg::ADDR_W,
  parameter int unsigned MAT_W  = 3,
  localparam int unsigned RC_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CNT_W = $clog2(N * N + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [MAT_W-1:0]  mat_last,   // index of the last matrix pair
  output logic              busy,
  output logic              stop,       // one-cycle pulse at the end
  // counters
  output logic              cnt_inc,
  output logic              mat_clr,
  output logic              mat_inc,
  input  logic [CNT_W-1:0]  count,
  input  logic [RC_W-1:0]   rowcount,
  input  logic [MAT_W-1:0]  matcount,
  input  logic              last,
  // input memories
  output logic              mem_rd,
  output logic [ADDR_W-1:0] a_addr,
  output logic [ADDR_W-1:0] b_addr,
  // processing elements
  output logic              mul_start,
  input  logic              mul_stop,
  output logic              acc_en,
  output logic              first,
  output logic              drain,
  output logic [RC_W-1:0]   drain_row,
  // result memory
  output logic              res_we,
  output logic [ADDR_W-1:0] res_addr
);

  import matmul_pkg::*;

  ctrl_state_e      state, state_nx;
  logic [MAT_W-1:0] mat_last_q;
  logic             last_mat;

  assign last_mat = (matcount == mat_last_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= C_IDLE;
      mat_last_q <= '0;
    end else begin
      state <= state_nx;
      if (state == C_IDLE && start) mat_last_q <= mat_last;
    end
  end

  always_comb begin
    state_nx  = state;
    cnt_inc   = 1'b0;
    mat_clr   = 1'b0;
    mat_inc   = 1'b0;
    mem_rd    = 1'b0;
    mul_start = 1'b0;
    acc_en    = 1'b0;
    drain     = 1'b0;
    res_we    = 1'b0;
    stop      = 1'b0;
    unique case (state)
      C_IDLE:  if (start) state_nx = C_INIT;
      C_INIT: begin
        mat_clr  = 1'b1;
        state_nx = C_READ;
      end
      C_READ: begin
        mem_rd   = 1'b1;
        state_nx = C_MUL;
      end
      C_MUL: begin
        mul_start = 1'b1;
        state_nx  = C_WAIT;
      end
      C_WAIT: if (mul_stop) begin
        acc_en   = 1'b1;
        cnt_inc  = 1'b1;
        state_nx = last ? C_DRAIN : C_READ;
      end
      C_DRAIN: begin
        drain   = 1'b1;
        res_we  = 1'b1;
        cnt_inc = 1'b1;
        if (last) begin
          if (last_mat) state_nx = C_DONE;
          else begin
            mat_inc  = 1'b1;
            state_nx = C_READ;
          end
        end
      end
      C_DONE: begin
        stop     = 1'b1;
        state_nx = C_IDLE;
      end
      default: state_nx = C_IDLE;
    endcase
  end

  assign busy      = (state != C_IDLE);
  assign first     = (rowcount == '0);
  assign drain_row = rowcount;
  assign a_addr    = ADDR_W'(matcount * N + rowcount);
  assign b_addr    = ADDR_W'(matcount * N * N + count);
  assign res_addr  = b_addr;

  a_start_once : assert property (@(posedge clk) disable iff (rst)
    mul_start |-> !mul_stop)
    else $error("control_unit: multiplication started while a product was ready");

endmodule
